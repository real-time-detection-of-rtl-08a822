// tb_sdram_top: the FIFO controller and SDRAM controller together on the
// SDRAM model. After initialisation a 3000-word frame starting 128 words
// before a row end is written from a 13 ns pixel clock in bursts of 200,
// then read back twice through the read FIFO at 40 ns (the read address
// wraps to the frame start like a frame buffer) and compared word by word. The model
// checks command timing, refresh spacing and bank/row state. Counts write
// bursts, read bursts, refreshes and bursts cut at a row end.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_sdram_top;
  localparam int FW = 3000;
  localparam logic [23:0] BASE = 24'h010180;
  logic sclk = 0, pclk = 0, vclk = 0, rst_n = 1;
  logic wreq = 0, rreq = 0, read_valid = 0, wfull, rempty, init_end;
  logic [15:0] wdata, rdata;
  logic cke, cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba, dqm;
  logic [12:0] addr;
  logic [15:0] dq_o, dq_i;
  int checks = 0, failures = 0, wr_sent = 0, rd_got = 0, stream_frame = 0;
  int n_cut = 0;

  initial #1 rst_n = 0;
  always #5 sclk = !sclk;
  always #6.5 pclk = !pclk;
  always #20 vclk = !vclk;

  sdram_top #(.FRAME_WORDS(FW), .FIFO_AW(9), .T_POWER(200), .T_REF(750)) dut (
    .sys_clk(sclk), .sys_rst_n(rst_n), .wr_burst_len(10'd200), .rd_burst_len(10'd200),
    .wr_fifo_wr_clk(pclk), .wr_fifo_wr_req(wreq), .wr_fifo_wr_data(wdata), .sdram_wr_b_addr(BASE),
    .wr_fifo_full(wfull), .rd_fifo_rd_clk(vclk), .rd_fifo_rd_req(rreq), .rd_fifo_rd_data(rdata),
    .rd_fifo_empty(rempty), .sdram_rd_b_addr(BASE), .read_valid, .init_end,
    .sdram_cke(cke), .sdram_cs_n(cs_n), .sdram_ras_n(ras_n), .sdram_cas_n(cas_n), .sdram_we_n(we_n),
    .sdram_ba(ba), .sdram_addr(addr), .sdram_dqm(dqm), .sdram_dq_o(dq_o), .sdram_dq_oe(dq_oe),
    .sdram_dq_i(dq_i));

  sdram_model #(.T_POWER(200)) mem (.clk(sclk), .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .addr, .dqm,
                                    .dq_in(dq_o), .dq_oe, .dq_out(dq_i));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [15:0] pix(int f, int i);
    return 16'(f * 7919 + i * 5 + 3);
  endfunction

  always @(negedge pclk) if (rst_n) wreq <= (wr_sent / FW < stream_frame) && ($urandom_range(0, 3) != 0);
  always @(posedge pclk) if (rst_n && wreq && !wfull) wr_sent <= wr_sent + 1;
  assign wdata = pix(wr_sent / FW, wr_sent % FW);

  always @(negedge vclk) rreq <= !rempty && read_valid && rd_got < 2 * FW;
  always @(posedge vclk) if (rreq && !rempty) begin
    check(rdata == pix(0, rd_got % FW),
          $sformatf("read %0d: %h expected %h", rd_got, rdata, pix(0, rd_got % FW)));
    rd_got <= rd_got + 1;
  end

  always @(posedge sclk) if (dut.sdram_wr_req && dut.wr_len < 200 && 32'(dut.sdram_wr_addr - BASE) + 32'(dut.wr_len) < FW)
    if (!$past(dut.sdram_wr_req)) n_cut++;

  initial begin
    repeat (3) @(posedge sclk);
    rst_n = 1;
    wait (init_end);
    check(mem.errors == 0, "initialisation accepted by the model");
    stream_frame = 1;
    wait (wr_sent == FW);
    wait (dut.u_fifo_ctrl.wr_off == 0 && !dut.sdram_wr_ack && dut.u_fifo_ctrl.wf_level == 0);
    repeat (20) @(posedge sclk);
    read_valid = 1;
    wait (rd_got == 2 * FW);
    $display("model: ACT %0d WRITE %0d READ %0d AREF %0d BST %0d, bursts cut at row end %0d, max refresh gap %0d",
             mem.n_act, mem.n_wr, mem.n_rd, mem.n_aref, mem.n_bst, n_cut, mem.max_ref_gap);
    check(mem.errors == 0, "no SDRAM protocol errors");
    check(mem.n_wr > 0 && mem.n_rd > 0 && mem.n_aref > 0 && n_cut > 0, "writes, reads, refreshes and row cuts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
