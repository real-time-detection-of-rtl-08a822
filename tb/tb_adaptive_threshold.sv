// tb_adaptive_threshold: the worked example window
// (36,129,9,99,13,141,141,101,18) must give sum 687 one clock later and
// thigh 76 / tlow 38 one clock after that; then random windows, including
// all-255, are compared with sum/9 and sum/18.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_adaptive_threshold;
  import canny_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  logic [2:0][2:0][7:0] win;
  logic [11:0] sum;
  logic out_valid, out_sof;
  logic [7:0] thigh, tlow;
  int checks = 0, failures = 0;

  always #5 clk = !clk;
  adaptive_threshold dut (.clk, .rst_n, .in_valid, .in_sof, .win, .sum, .out_valid, .out_sof, .thigh, .tlow);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ex [9] = '{36, 129, 9, 99, 13, 141, 141, 101, 18};
    int p [3][3];
    int es, eh, el;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 9; i++) win[i/3][i%3] = 8'(ex[i]);
    in_valid = 1; in_sof = 1;
    @(negedge clk);
    in_valid = 0; in_sof = 0; win = '0;
    check(sum == 12'd687, $sformatf("sum after one clock = %0d", sum));
    @(negedge clk);
    check(out_valid && out_sof, "valid/sof after two clocks");
    check(thigh == 8'd76 && tlow == 8'd38, $sformatf("thigh %0d tlow %0d", thigh, tlow));
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 9; i++) begin
        p[i/3][i%3] = (n == 0) ? 255 : $urandom_range(255);
        win[i/3][i%3] = 8'(p[i/3][i%3]);
      end
      thr_ref(p, es, eh, el);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(sum == 12'(es), "random sum");
      @(negedge clk);
      check(out_valid && thigh == 8'(eh) && tlow == 8'(el),
            $sformatf("random thresholds %0d/%0d exp %0d/%0d", thigh, tlow, eh, el));
    end
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
