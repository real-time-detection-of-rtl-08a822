// tb_nms: random 3x3 windows of {magnitude, direction, thigh, tlow},
// biased towards ties and ridges, compared with the reference suppression
// and classification; checks the one-clock latency, that all three classes
// and all four directions occur, and that in_ok = 0 gives no edge.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_nms;
  import canny_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0, in_ok = 1;
  logic [2:0][2:0][27:0] win;
  logic out_valid, out_sof, out_ok;
  logic [9:0] mag;
  logic [1:0] cls;
  int checks = 0, failures = 0;
  int cls_seen [3] = '{0, 0, 0};

  always #5 clk = !clk;
  nms dut (.clk, .rst_n, .in_valid, .in_sof, .in_ok, .win, .out_valid, .out_sof, .out_ok, .mag, .cls);

  initial begin
    int m [3][3];
    int d, th, tl, em, ec;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      d  = n % 4;
      th = $urandom_range(255);
      tl = th / 2;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
        m[r][c] = (n % 5 == 0) ? 300 : $urandom_range(0, 400);
        win[r][c] = {10'(m[r][c]), 2'($urandom_range(3)), 8'($urandom_range(255)), 8'($urandom_range(255))};
      end
      if (n % 3 == 0) m[1][1] = $urandom_range(0, 1000);
      win[1][1] = {10'(m[1][1]), 2'(d), 8'(th), 8'(tl)};
      in_ok = (n % 40 != 7);
      em = in_ok ? nms_ref(m, d) : 0;
      ec = class_ref(em, th, tl);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || mag != 10'(em) || cls != 2'(ec)) begin
        failures++; $display("FAIL: n %0d mag %0d cls %0d exp %0d %0d", n, mag, cls, em, ec);
      end
      if (in_ok) cls_seen[cls]++;
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (cls_seen[i] == 0) begin failures++; $display("FAIL: class %0d never produced", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
