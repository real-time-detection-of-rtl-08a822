// tb_amf: random 5x5 windows (smooth patches with salt-and-pepper impulses)
// through the adaptive median filter; each output is compared with the
// reference decision tree, the latency must be two clocks, and all four
// selection branches must occur.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_amf;
  import canny_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0, in_ok = 0;
  logic [4:0][4:0][7:0] win;
  logic out_valid, out_sof, out_ok;
  logic [7:0] dout;
  logic [1:0] sel;
  int checks = 0, failures = 0, cyc = 0;
  int exp_q [$], sel_q [$], cyc_q [$], ok_q [$];
  int seen [4] = '{0, 0, 0, 0};

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  amf dut (.clk, .rst_n, .in_valid, .in_sof, .in_ok, .win, .out_valid, .out_sof, .out_ok, .dout, .sel);

  always @(negedge clk) if (rst_n && out_valid) begin
    automatic int e = exp_q.pop_front(), s = sel_q.pop_front(), c = cyc_q.pop_front(), ok = ok_q.pop_front();
    checks++;
    if (dout != 8'(ok ? e : 0) || (ok && sel != 2'(s)) || out_ok != 1'(ok) || cyc - c != 2) begin
      failures++;
      $display("FAIL: got %0d/%0d exp %0d/%0d latency %0d", dout, sel, e, s, cyc - c);
    end
    if (ok) seen[sel]++;
  end

  initial begin
    int w [5][5];
    int s, e, base, dens;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      base = $urandom_range(30, 220);
      dens = $urandom_range(0, 100);
      for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) begin
        automatic int u = $urandom_range(99);
        w[r][c] = base + $urandom_range(0, 6) - 3;
        if (u < dens / 2) w[r][c] = 255;
        else if (u < dens) w[r][c] = 0;
        win[r][c] = 8'(w[r][c]);
      end
      if (n % 7 == 0) begin                 // flat patch: every order statistic equal
        for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) begin w[r][c] = base; win[r][c] = 8'(base); end
      end
      e = amf_ref(w, s);
      in_valid = 1;
      in_ok = (n % 50 != 3);
      exp_q.push_back(e); sel_q.push_back(s); cyc_q.push_back(cyc); ok_q.push_back(in_ok);
      @(negedge clk);
      in_valid = 0;
      if (n % 3 == 0) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL: branch %0d never taken", i); end
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
