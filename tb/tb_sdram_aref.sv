// tb_sdram_aref: the refresh module with a fake arbiter that grants after
// a random wait. Checks: aref_req rises every T_REF clocks on average (the
// count after N periods), each grant yields PRECHARGE ALL then AUTO REFRESH
// T_RP clocks later, aref_end comes T_RFC clocks after the refresh, and no
// request is raised before init_end.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_sdram_aref;
  import sdram_pkg::*;
  localparam int TR = 100;
  logic clk = 0, rst_n = 1, init_end = 0, aref_en = 0;
  logic aref_req, aref_end;
  sdram_cmd_t cmd;
  logic [1:0] ba;
  logic [12:0] addr;
  int checks = 0, failures = 0, cyc = 0, pre_t = -1, aref_t = -1, n_ref = 0;

  initial #1 rst_n = 0;
  always #5 clk = !clk;
  sdram_aref #(.T_REF(TR)) dut (.clk, .rst_n, .init_end, .aref_en, .aref_req, .aref_end,
                                .aref_cmd(cmd), .aref_ba(ba), .aref_addr(addr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    cyc++;
    if (cmd == CMD_PRE) begin pre_t = cyc; check(addr[10], "precharge all"); end
    if (cmd == CMD_AREF) begin aref_t = cyc; n_ref++; check(cyc - pre_t == 3, $sformatf("PRE->AREF %0d", cyc - pre_t)); end
    if (aref_end) check(cyc - aref_t == 7, $sformatf("AREF->end %0d", cyc - aref_t));
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);
    check(!aref_req, "no request before init_end");
    @(negedge clk) init_end = 1;
    for (int i = 0; i < 30; i++) begin
      wait (aref_req);
      repeat ($urandom_range(0, 60)) @(negedge clk);
      aref_en = 1;
      @(negedge clk);
      wait (aref_end);
      @(negedge clk);
      aref_en = 0;
    end
    check(n_ref == 30, "30 refreshes");
    // 30 requests need 30 periods
    check(cyc >= 300 + 30 * TR && cyc < 300 + 31 * TR + 80, $sformatf("30 periods in %0d clocks", cyc - 300));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
