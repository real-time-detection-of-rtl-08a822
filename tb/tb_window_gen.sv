// tb_window_gen: a 5x5 generator on 12-pixel rows. Pixel value encodes its
// frame position; for every output the full window is compared with the
// positions it must hold (centre two rows above and two columns left of the
// newest input) and win_ok with the in-frame rule, over two frames with
// input gaps, including a frame that restarts early (in_sof mid-frame).
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_window_gen;
  localparam int W = 12, K = 5, R = K / 2;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0, in_ok = 1;
  logic [11:0] in_data = 0;
  logic out_valid, out_sof, win_ok;
  logic [K-1:0][K-1:0][11:0] win;
  int checks = 0, failures = 0, nok = 0;

  always #5 clk = !clk;
  window_gen #(.K(K), .IMG_W(W), .DW(12)) dut (
    .clk, .rst_n, .in_valid, .in_sof, .in_ok, .in_data, .out_valid, .out_sof, .win_ok, .win);

  function automatic logic [11:0] code(int f, int r, int c);
    return 12'((f << 10) | (r << 5) | c);
  endfunction

  task automatic run_frame(input int f, input int rows);
    for (int n = 0; n < rows * W; n++) begin
      automatic int r = n / W, c = n % W;
      automatic bit exp_ok = (r >= K - 1) && (c >= K - 1);
      in_valid = 1; in_sof = (n == 0); in_data = code(f, r, c);
      @(negedge clk);
      in_valid = 0; in_sof = 0;
      checks++;
      if (!out_valid || out_sof != (n == 0) || win_ok != exp_ok) begin
        failures++; $display("FAIL: f%0d r%0d c%0d valid %0d ok %0d", f, r, c, out_valid, win_ok);
      end
      if (exp_ok) begin
        nok++;
        for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) begin
          checks++;
          if (win[i][j] != code(f, r - (K - 1) + i, c - (K - 1) + j)) begin
            failures++;
            $display("FAIL: f%0d r%0d c%0d tap %0d,%0d = %h", f, r, c, i, j, win[i][j]);
          end
        end
      end
      if (n % 5 == 0) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_frame(0, 6);     // early restart: only 6 rows
    run_frame(1, 9);
    checks++;
    if (nok == 0) failures++;
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
