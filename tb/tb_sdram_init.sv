// tb_sdram_init: runs the initialisation module alone and checks its
// command stream: nothing but NOP for T_POWER clocks, then PRECHARGE ALL,
// eight AUTO REFRESH at least T_RFC+1 clocks apart, LOAD MODE REGISTER with
// 13'h037 on bank 0, and init_end T_MRD clocks later and held.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_sdram_init;
  import sdram_pkg::*;
  localparam int TP = 100;
  logic clk = 0, rst_n = 1;
  sdram_cmd_t cmd;
  logic [1:0] ba;
  logic [12:0] addr;
  logic init_end;
  int checks = 0, failures = 0, cyc = 0;
  int cmds [$], times [$];
  int lmr_t = -1, end_t = -1;

  initial #1 rst_n = 0;
  always #5 clk = !clk;
  sdram_init #(.T_POWER(TP)) dut (.clk, .rst_n, .init_cmd(cmd), .init_ba(ba), .init_addr(addr), .init_end);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (cmd != CMD_NOP) begin
      cmds.push_back(int'(cmd)); times.push_back(cyc);
      if (cmd == CMD_PRE) check(addr[10], "precharge all banks");
      if (cmd == CMD_LMR) begin
        lmr_t = cyc;
        check(addr == 13'h037 && ba == 2'b00, $sformatf("mode word %h", addr));
      end
    end
    if (init_end && end_t < 0) end_t = cyc;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (TP + 200) @(posedge clk);
    check(cmds.size() == 10, $sformatf("10 commands, saw %0d", cmds.size()));
    if (cmds.size() == 10) begin
      check(cmds[0] == int'(CMD_PRE) && times[0] >= TP, "PRE first, after the power-up wait");
      for (int i = 1; i <= 8; i++) begin
        check(cmds[i] == int'(CMD_AREF), $sformatf("command %0d is AREF", i));
        check(times[i] - times[i-1] >= ((i == 1) ? 2 : 8), "spacing");
      end
      check(cmds[9] == int'(CMD_LMR) && times[9] - times[8] >= 8, "LMR last");
    end
    check(end_t > lmr_t && end_t - lmr_t <= 3, $sformatf("init_end %0d clocks after LMR", end_t - lmr_t));
    check(init_end, "init_end held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
