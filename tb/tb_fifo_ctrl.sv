// tb_fifo_ctrl: fifo_ctrl with a behavioural stand-in for sdram_ctrl that
// answers each request after a random delay with an ack of wr_len/rd_len
// clocks and keeps a word memory. A 1000-word frame starting 256 words
// before a row end is written with bursts of 100 from a 13 ns pixel clock,
// read back through the read FIFO at 11 ns, then a second frame is written
// over it. Checks: every burst address follows the previous one and wraps
// to the base at the frame end; every burst length equals the requested
// length cut at the row end and the frame end; a write request only when
// the write FIFO already holds the burst; the memory holds the pixels in
// order; the read stream equals the first frame. Counts bursts cut at the
// row end and at the frame end.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_fifo_ctrl;
  localparam int FW = 1000;
  localparam logic [23:0] BASE = 24'h000300;
  logic sclk = 0, pclk = 0, vclk = 0, rst_n = 1;
  logic wreq = 0, rreq = 0, read_valid = 0, wfull, rempty;
  logic [15:0] wdata, rdata;
  logic sdram_wr_req, sdram_rd_req, wr_ack = 0, rd_ack = 0;
  logic [23:0] wr_addr, rd_addr;
  logic [9:0]  wr_len, rd_len;
  logic [15:0] din, dout = 0;
  logic [15:0] mem [logic [23:0]];
  int checks = 0, failures = 0, n_row_cut = 0, n_frame_cut = 0, n_wb = 0, n_rb = 0, n_wrap = 0;
  int wr_sent = 0, rd_got = 0, stream_frame = 0;
  logic [23:0] exp_waddr = BASE, exp_raddr = BASE;

  initial #1 rst_n = 0;
  always #5 sclk = !sclk;
  always #6.5 pclk = !pclk;
  always #5.5 vclk = !vclk;

  fifo_ctrl #(.FRAME_WORDS(FW), .FIFO_AW(8)) dut (
    .sys_clk(sclk), .sys_rst_n(rst_n), .wr_burst_len(10'd100), .rd_burst_len(10'd100),
    .wr_fifo_wr_clk(pclk), .wr_fifo_wr_req(wreq), .wr_fifo_wr_data(wdata), .sdram_wr_b_addr(BASE),
    .wr_fifo_full(wfull), .rd_fifo_rd_clk(vclk), .rd_fifo_rd_req(rreq), .rd_fifo_rd_data(rdata),
    .rd_fifo_empty(rempty), .sdram_rd_b_addr(BASE), .read_valid, .init_end(1'b1),
    .sdram_wr_req, .sdram_wr_addr(wr_addr), .wr_len, .sdram_data_in(din), .sdram_wr_ack(wr_ack),
    .sdram_rd_req, .sdram_rd_addr(rd_addr), .rd_len, .sdram_rd_ack(rd_ack), .sdram_data_out(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic int exp_len(logic [23:0] a);
    automatic int off = int'(a - BASE), l = 100;
    if (512 - int'(a[8:0]) < l) l = 512 - int'(a[8:0]);
    if (FW - off < l) l = FW - off;
    return l;
  endfunction

  function automatic logic [15:0] pix(int f, int i);
    return 16'(f * 4099 + i * 3 + 1);
  endfunction

  // pixel source: frame stream_frame, one word per accepted request
  always @(negedge pclk) if (rst_n) begin
    automatic int f = wr_sent / FW;
    wreq <= (f < stream_frame) && ($urandom_range(0, 3) != 0);
  end
  always @(posedge pclk) if (rst_n && wreq && !wfull) wr_sent <= wr_sent + 1;
  assign wdata = pix(wr_sent / FW, wr_sent % FW);

  // stand-in SDRAM controller
  initial begin
    wait (rst_n == 0);
    wait (rst_n == 1);
    forever begin
      @(posedge sclk);
      if (sdram_wr_req) begin
        automatic logic [23:0] a = wr_addr;
        automatic int l = int'(wr_len);
        check(a == exp_waddr, $sformatf("write address %h expected %h", a, exp_waddr));
        check(l == exp_len(a), $sformatf("write length %0d at %h", l, a));
        check(int'(dut.wf_level) >= l, "write requested before the burst is buffered");
        if (l < 100 && int'(a - BASE) + l == FW) n_frame_cut++;
        else if (l < 100) n_row_cut++;
        repeat ($urandom_range(0, 4)) @(posedge sclk);
        for (int i = 0; i < l; i++) begin
          wr_ack <= 1;
          @(posedge sclk);
          mem[a + 24'(i)] = din;
        end
        wr_ack <= 0;
        n_wb++;
        exp_waddr = (int'(a - BASE) + l >= FW) ? BASE : a + 24'(l);
        if (exp_waddr == BASE) n_wrap++;
        repeat (2) @(posedge sclk);
      end else if (sdram_rd_req) begin
        automatic logic [23:0] a = rd_addr;
        automatic int l = int'(rd_len);
        check(a == exp_raddr, $sformatf("read address %h expected %h", a, exp_raddr));
        check(l == exp_len(a), $sformatf("read length %0d at %h", l, a));
        repeat ($urandom_range(0, 4)) @(posedge sclk);
        for (int i = 0; i < l; i++) begin
          rd_ack <= 1;
          dout   <= mem.exists(a + 24'(i)) ? mem[a + 24'(i)] : 16'hDEAD;
          @(posedge sclk);
        end
        rd_ack <= 0;
        n_rb++;
        exp_raddr = (int'(a - BASE) + l >= FW) ? BASE : a + 24'(l);
        repeat (2) @(posedge sclk);
      end
    end
  end

  // video side reader
  always @(negedge vclk) rreq <= !rempty && read_valid && rd_got < FW && ($urandom_range(0, 2) != 0);
  always @(posedge vclk) if (rreq && !rempty) begin
    check(rdata == pix(0, rd_got), $sformatf("read word %0d: %h expected %h", rd_got, rdata, pix(0, rd_got)));
    rd_got <= rd_got + 1;
  end

  initial begin
    repeat (3) @(posedge sclk);
    rst_n = 1;
    stream_frame = 1;
    wait (n_wb > 0 && exp_waddr == BASE);
    for (int i = 0; i < FW; i++) check(mem[BASE + 24'(i)] == pix(0, i), $sformatf("frame 0 word %0d", i));
    read_valid = 1;
    wait (rd_got == FW);
    @(posedge sclk);
    read_valid = 0;
    repeat (400) @(posedge sclk);
    stream_frame = 2;
    wait (wr_sent == 2 * FW);
    wait (exp_waddr == BASE && !wr_ack);
    repeat (5) @(posedge sclk);
    for (int i = 0; i < FW; i++) check(mem[BASE + 24'(i)] == pix(1, i), $sformatf("frame 1 word %0d", i));
    $display("write bursts %0d read bursts %0d, cut at row end %0d, cut at frame end %0d, wraps %0d",
             n_wb, n_rb, n_row_cut, n_frame_cut, n_wrap);
    check(n_row_cut > 0 && n_frame_cut > 0 && n_wrap == 2, "row cut, frame cut and wrap seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
