// tb_sobel4: random and structured 3x3 windows (steps and ramps in the four
// directions) compared with the reference four-direction Sobel; checks the
// two-clock latency, the magnitude, the direction, that every direction
// wins at least once and that the largest magnitude 1020 fits.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_sobel4;
  import canny_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0, in_ok = 1;
  logic [2:0][2:0][7:0] win;
  logic out_valid, out_sof, out_ok;
  logic [9:0] mag;
  logic [1:0] dir;
  int checks = 0, failures = 0, cyc = 0;
  int mq [$], dq [$], cq [$];
  int seen [4] = '{0, 0, 0, 0};
  int maxmag = 0;

  always #5 clk = !clk;
  always @(posedge clk) cyc++;
  sobel4 dut (.clk, .rst_n, .in_valid, .in_sof, .in_ok, .win, .out_valid, .out_sof, .out_ok, .mag, .dir);

  always @(negedge clk) if (rst_n && out_valid) begin
    automatic int em = mq.pop_front(), ed = dq.pop_front(), c = cq.pop_front();
    checks++;
    if (mag != 10'(em) || dir != 2'(ed) || cyc - c != 2) begin
      failures++; $display("FAIL: mag %0d dir %0d exp %0d %0d lat %0d", mag, dir, em, ed, cyc - c);
    end
    seen[dir]++;
    if (mag > maxmag) maxmag = mag;
  end

  initial begin
    int p [3][3];
    int em, ed;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      automatic int kind = n % 6;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
        case (kind)
          0: p[r][c] = $urandom_range(255);
          1: p[r][c] = (c == 2) ? 255 : (c == 1 ? $urandom_range(255) : 0);   // vertical step
          2: p[r][c] = (r == 2) ? 255 : (r == 1 ? $urandom_range(255) : 0);   // horizontal step
          3: p[r][c] = (r + c > 2) ? 255 : (r + c == 2 ? $urandom_range(60) : 0); // diagonal
          4: p[r][c] = (c > r) ? 255 : (c == r ? $urandom_range(60) : 0);     // anti-diagonal
          default: p[r][c] = 100 + 10 * r + $urandom_range(3);
        endcase
        win[r][c] = 8'(p[r][c]);
      end
      sobel_ref(p, em, ed);
      mq.push_back(em); dq.push_back(ed); cq.push_back(cyc);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      if (n % 4 == 0) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL: direction %0d never chosen", i); end
    end
    checks++;
    if (maxmag != 1020) begin failures++; $display("FAIL: max magnitude %0d", maxmag); end
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
