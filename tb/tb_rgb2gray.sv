// tb_rgb2gray: all primaries, black and white plus random colours compared
// with (77R + 150G + 29B) / 256 after one clock.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_rgb2gray;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  logic [23:0] in_rgb = 0;
  logic out_valid, out_sof;
  logic [7:0] gray;
  int checks = 0, failures = 0;

  always #5 clk = !clk;
  rgb2gray dut (.clk, .rst_n, .in_valid, .in_sof, .in_rgb, .out_valid, .out_sof, .gray);

  initial begin
    logic [23:0] fixed [5] = '{24'hFFFFFF, 24'h000000, 24'hFF0000, 24'h00FF00, 24'h0000FF};
    int expg [5] = '{255, 0, 76, 149, 28};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 1005; n++) begin
      automatic logic [23:0] c = (n < 5) ? fixed[n] : 24'($urandom);
      automatic int e = (77 * c[23:16] + 150 * c[15:8] + 29 * c[7:0]) / 256;
      if (n < 5) e = expg[n];
      in_rgb = c; in_valid = 1; in_sof = (n == 0);
      @(negedge clk);
      in_valid = 0; in_sof = 0;
      checks++;
      if (!out_valid || gray != 8'(e) || out_sof != (n == 0)) begin
        failures++; $display("FAIL: %h -> %0d exp %0d", c, gray, e);
      end
    end
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
