// tb_sdram_write: the write module drives the SDRAM model through a pin
// register (as in sdram_ctrl). Bursts of random length and address are
// written; the model's memory must then hold exactly the words supplied
// while wr_ack was high, the words after the burst must be untouched, the
// sequence must be ACT, WRITE, BST, PRE per burst, the model must report no
// timing error, and a burst must take wr_len + 5 clocks from grant to end.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_sdram_write;
  import sdram_pkg::*;
  logic clk = 0, rst_n = 1, wr_en = 0;
  logic [23:0] wr_addr = 0;
  logic [9:0]  wr_len = 0;
  logic [15:0] wr_data, dq, dq_r, dq_i;
  logic wr_ack, wr_end, dq_oe, oe_r;
  sdram_cmd_t cmd, cmd_r;
  logic [1:0] ba, ba_r;
  logic [12:0] a, a_r;
  int checks = 0, failures = 0, cyc = 0, widx = 0;
  logic [15:0] src [512];

  initial #1 rst_n = 0;
  always #5 clk = !clk;
  sdram_write dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_len, .wr_data, .wr_ack, .wr_end,
                   .wr_cmd(cmd), .wr_ba(ba), .wr_sdram_addr(a), .wr_dq(dq), .wr_dq_oe(dq_oe));
  always @(posedge clk) begin cmd_r <= cmd; ba_r <= ba; a_r <= a; dq_r <= dq; oe_r <= dq_oe; end
  initial begin cmd_r = CMD_NOP; oe_r = 0; end
  sdram_model #(.T_POWER(0)) mem (.clk, .cke(1'b1), .cs_n(cmd_r[3]), .ras_n(cmd_r[2]), .cas_n(cmd_r[1]),
                                  .we_n(cmd_r[0]), .ba(ba_r), .addr(a_r), .dqm(2'b00), .dq_in(dq_r),
                                  .dq_oe(oe_r), .dq_out(dq_i));
  assign wr_data = src[widx];
  always @(posedge clk) if (wr_ack) widx <= widx + 1;
  always @(negedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      automatic int len = (n == 0) ? 10 : $urandom_range(1, 400);
      automatic logic [23:0] ad = {2'($urandom), 13'($urandom), 9'($urandom_range(0, 511 - len))};
      automatic int t0, nact = mem.n_act, nwr = mem.n_wr, nbst = mem.n_bst, npre = mem.n_pre;
      automatic logic [15:0] after = 16'hBEEF;
      for (int i = 0; i < len; i++) src[i] = 16'($urandom);
      if (32'(ad[8:0]) + len < 512) mem.mem[mem.key(ad[23:22], ad[21:9], ad[8:0] + len)] = after;
      @(negedge clk);
      widx = 0; wr_addr = ad; wr_len = 10'(len); wr_en = 1; t0 = cyc;
      do @(negedge clk); while (!wr_end);
      check(cyc - t0 == len + 5, $sformatf("burst of %0d took %0d clocks", len, cyc - t0));
      wr_en = 0;
      repeat (3) @(negedge clk);
      check(widx == len, "words taken");
      for (int i = 0; i < len; i++)
        check(mem.mem[mem.key(ad[23:22], ad[21:9], ad[8:0] + i)] == src[i], $sformatf("word %0d of burst %0d", i, n));
      if (32'(ad[8:0]) + len < 512)
        check(mem.mem[mem.key(ad[23:22], ad[21:9], ad[8:0] + len)] == after, "word after burst untouched");
      check(mem.n_act == nact + 1 && mem.n_wr == nwr + 1 && mem.n_bst == nbst + 1 && mem.n_pre == npre + 1,
            "ACT, WRITE, BST, PRE");
    end
    check(mem.errors == 0, "no SDRAM protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
