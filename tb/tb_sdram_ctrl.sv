// tb_sdram_ctrl: the controller against the SDRAM model. After the
// power-up sequence (PRECHARGE, 8 AUTO REFRESH, LOAD MODE REGISTER with CAS
// latency 3 and full-page bursts) it writes one 10-word burst and reads it
// back, as in the reference simulation, then runs random bursts of 1..512
// words inside rows; every word read is compared with what was written.
// Checks: the model saw no protocol error, refreshes kept coming during the
// traffic (never more than 8 behind one per 7.8 us, and no gap longer than
// one period plus one 512-word burst), and read data arrives CAS latency + 2
// clocks after its column is issued.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_sdram_ctrl;
  import sdram_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  logic wr_req = 0, rd_req = 0, wr_ack, rd_ack, init_end;
  logic [23:0] wr_addr = 0, rd_addr = 0;
  logic [9:0]  wr_len = 0, rd_len = 0;
  logic [15:0] data_in, data_out;
  logic cke, cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba, dqm;
  logic [12:0] addr;
  logic [15:0] dq_o, dq_i;
  int checks = 0, failures = 0, widx = 0;
  logic [15:0] wbuf [512];
  logic [15:0] golden [int];

  always #5 clk = !clk;

  sdram_ctrl #(.T_POWER(200), .T_REF(750)) dut (
    .clk, .rst_n, .sdram_wr_req(wr_req), .sdram_wr_addr(wr_addr), .wr_len, .sdram_data_in(data_in),
    .sdram_wr_ack(wr_ack), .sdram_rd_req(rd_req), .sdram_rd_addr(rd_addr), .rd_len,
    .sdram_data_out(data_out), .sdram_rd_ack(rd_ack), .init_end,
    .sdram_cke(cke), .sdram_cs_n(cs_n), .sdram_ras_n(ras_n), .sdram_cas_n(cas_n), .sdram_we_n(we_n),
    .sdram_ba(ba), .sdram_addr(addr), .sdram_dqm(dqm), .sdram_dq_o(dq_o), .sdram_dq_oe(dq_oe),
    .sdram_dq_i(dq_i));
  sdram_model #(.T_POWER(200)) mem (.clk, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .addr, .dqm,
                                   .dq_in(dq_o), .dq_oe, .dq_out(dq_i));

  // show-ahead source for write data
  assign data_in = wbuf[widx];
  always @(posedge clk) if (wr_ack) widx <= widx + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_write(input logic [23:0] a, input int len);
    for (int i = 0; i < len; i++) begin
      wbuf[i] = 16'($urandom);
      golden[a + i] = wbuf[i];
    end
    @(negedge clk);
    widx = 0; wr_addr = a; wr_len = 10'(len); wr_req = 1;
    wait (wr_ack);
    @(negedge clk); wr_req = 0;
    wait (!wr_ack);
    check(widx == len, $sformatf("write took %0d words, expected %0d", widx, len));
  endtask

  int rd_first_cycle, cyc = 0, cmd_cycle = -1;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (!cs_n && ras_n && !cas_n && we_n) cmd_cycle = cyc;  // READ on pins

  task automatic do_read(input logic [23:0] a, input int len);
    int got = 0;
    @(negedge clk);
    rd_addr = a; rd_len = 10'(len); rd_req = 1;
    wait (rd_ack);
    rd_first_cycle = cyc;
    rd_req = 0;
    while (got < len) begin
      @(negedge clk);
      if (rd_ack) begin
        check(data_out == golden[a + got], $sformatf("read %h+%0d: %h exp %h", a, got, data_out, golden[a + got]));
        got++;
      end else if (got < len) begin
        check(0, "read data not contiguous");
        break;
      end
    end
    @(negedge clk);
    check(!rd_ack, "no extra read words");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_end);
    check(mem.n_aref == 8 && mem.n_lmr == 1 && mem.n_pre == 1, "init: PRE, 8 AREF, LMR");
    check(mem.cl == 3 && mem.blen == 512, "mode register: CL 3, full page");
    check(mem.first_cmd_t >= 200, "power-up wait");
    // the reference burst: 10 words at bank 0, row 0, column 0
    do_write(24'h000000, 10);
    do_read(24'h000000, 10);
    check(rd_first_cycle - cmd_cycle == CAS_LATENCY + 1,  // model samples next edge, data CL later, registered in
          $sformatf("read latency pins->data %0d", rd_first_cycle - cmd_cycle));
    for (int n = 0; n < 40; n++) begin
      automatic int len = (n % 5 == 0) ? 512 : $urandom_range(1, 300);
      automatic logic [23:0] a = {2'($urandom), 13'($urandom), 9'(0)};
      a[8:0] = 9'($urandom_range(0, 512 - len));
      do_write(a, len);
      if (n % 3 == 0) repeat ($urandom_range(0, 900)) @(posedge clk);
      do_read(a, len);
    end
    check(mem.n_aref > 8 + 10, $sformatf("refreshes during traffic: %0d", mem.n_aref - 8));
    check(mem.max_ref_gap <= 750 + 540, $sformatf("max refresh gap %0d", mem.max_ref_gap));
    check(mem.errors == 0, $sformatf("SDRAM protocol errors: %0d", mem.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
