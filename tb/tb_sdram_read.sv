// tb_sdram_read: the read module against the SDRAM model (through pin and
// input registers as in sdram_ctrl). The model memory is preloaded; random
// bursts must return exactly rd_len consecutive words in order, with rd_ack
// contiguous, the first word CAS latency + 1 negedges after the READ command
// leaves the module, ACT, READ, BST, PRE per burst and no timing error.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_sdram_read;
  import sdram_pkg::*;
  logic clk = 0, rst_n = 1, rd_en = 0;
  logic [23:0] rd_addr = 0;
  logic [9:0]  rd_len = 0;
  logic [15:0] dq_i, dq_in_r, rd_data;
  logic rd_ack, rd_end;
  sdram_cmd_t cmd, cmd_r;
  logic [1:0] ba, ba_r;
  logic [12:0] a, a_r;
  int checks = 0, failures = 0, cyc = 0, read_t = 0;

  initial #1 rst_n = 0;
  always #5 clk = !clk;
  sdram_read dut (.clk, .rst_n, .rd_en, .rd_addr, .rd_len, .dq_in(dq_in_r), .rd_ack, .rd_data, .rd_end,
                  .rd_cmd(cmd), .rd_ba(ba), .rd_sdram_addr(a));
  always @(posedge clk) begin cmd_r <= cmd; ba_r <= ba; a_r <= a; dq_in_r <= dq_i; end
  initial cmd_r = CMD_NOP;
  sdram_model #(.T_POWER(0)) mem (.clk, .cke(1'b1), .cs_n(cmd_r[3]), .ras_n(cmd_r[2]), .cas_n(cmd_r[1]),
                                  .we_n(cmd_r[0]), .ba(ba_r), .addr(a_r), .dqm(2'b00), .dq_in(16'h0),
                                  .dq_oe(1'b0), .dq_out(dq_i));
  always @(negedge clk) begin
    cyc++;
    if (cmd == CMD_READ) read_t = cyc;
  end

  function automatic logic [15:0] pat(logic [23:0] x);
    return x[15:0] ^ {x[23:16], x[23:16]} ^ 16'h5A5A;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      automatic int len = (n == 0) ? 10 : $urandom_range(1, 512);
      automatic logic [23:0] ad = {2'($urandom), 13'($urandom), 9'($urandom_range(0, 512 - len))};
      automatic int got = 0, first_t = -1;
      automatic bit gap = 0;
      for (int i = 0; i < len; i++) mem.mem[mem.key(ad[23:22], ad[21:9], ad[8:0] + i)] = pat(ad + 24'(i));
      @(negedge clk);
      rd_addr = ad; rd_len = 10'(len); rd_en = 1;
      forever begin
        @(negedge clk);
        if (rd_ack) begin
          if (first_t < 0) first_t = cyc;
          else if (gap) check(0, "rd_ack not contiguous");
          if (got < len) check(rd_data == pat(ad + 24'(got)), $sformatf("word %0d of burst %0d", got, n));
          got++;
        end else if (got > 0) gap = 1;
        if (rd_end) break;
      end
      rd_en = 0;
      check(got == len, $sformatf("burst %0d: %0d words, expected %0d", n, got, len));
      check(first_t - read_t == CAS_LATENCY + 1, $sformatf("latency %0d", first_t - read_t));
      @(negedge clk);
    end
    check(mem.errors == 0, "no SDRAM protocol errors");
    check(mem.n_act == 60 && mem.n_rd == 60 && mem.n_bst == 60 && mem.n_pre == 60, "ACT, READ, BST, PRE");
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
