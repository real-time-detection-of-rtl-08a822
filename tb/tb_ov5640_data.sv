// tb_ov5640_data: a DVP camera model sends 16x12 frames. cfg_done is raised
// in the middle of the first frame, so capture must begin with the second
// frame. Every captured pixel is compared with the byte pair sent, pix_sof
// must mark each frame's first pixel, and each frame must yield 192 pixels.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_ov5640_data;
  import canny_ref_pkg::*;
  localparam int W = 16, H = 12;
  logic pclk = 0, rst_n = 0, cfg_done = 0, en = 0;
  logic vsync, href, pix_valid, pix_sof;
  logic [7:0] data;
  logic [15:0] pix_data;
  int checks = 0, failures = 0, n = 0, f = 1, sofs = 0;

  always #7 pclk = !pclk;
  ov5640_dvp_model #(.W(W), .H(H)) cam (.cam_pclk(pclk), .enable(en), .cam_vsync(vsync), .cam_href(href), .cam_data(data));
  ov5640_data dut (.cam_pclk(pclk), .rst_n, .cfg_done, .cam_vsync(vsync), .cam_href(href), .cam_data(data),
                   .pix_valid, .pix_sof, .pix_data);

  always @(negedge pclk) if (rst_n && pix_valid) begin
    automatic logic [15:0] e = test_rgb565(f, n / W, n % W, W, H);
    checks++;
    if (pix_data != e || pix_sof != (n == 0)) begin
      failures++; $display("FAIL: frame %0d pixel %0d got %h exp %h sof %0d", f, n, pix_data, e, pix_sof);
    end
    if (pix_sof) sofs++;
    n++;
    if (n == W * H) begin n = 0; f++; end
  end

  initial begin
    repeat (3) @(posedge pclk);
    rst_n = 1; en = 1;
    wait (href);                    // inside frame 0
    repeat (50) @(posedge pclk);
    cfg_done = 1;
    wait (cam.frames == 4);
    repeat (10) @(posedge pclk);
    checks++;
    if (f != 4 || n != 0 || sofs != 3) begin
      failures++; $display("FAIL: frames %0d pixels %0d sofs %0d", f, n, sofs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge pclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
