// ov5640_dvp_model: behavioural model of the camera's DVP output.
//
// Behavioural model, not synthesizable. On cam_pclk it sends frames of
// W x H RGB565 pixels (canny_ref_pkg::test_rgb565, high byte first): VS
// lines with vsync high, VB idle lines, then H lines each of 2*W clocks with
// href high followed by HB clocks with href low. frames counts frames sent.
// With STILL = 1 every frame shows the picture of frame 0.
//
// DVP signalling (PCLK, VSYNC, HREF, 8-bit data) follows the camera
// description; the blanking lengths and the test picture are this model's.
module ov5640_dvp_model #(
  parameter int W = 16,
  parameter int H = 12,
  parameter int HB = 20,
  parameter int VS = 2,
  parameter int VB = 2,
  parameter bit STILL = 0
) (
  input  logic       cam_pclk,
  input  logic       enable,
  output logic       cam_vsync,
  output logic       cam_href,
  output logic [7:0] cam_data
);
  import canny_ref_pkg::*;
  int frames = 0;
  localparam int LINE = 2 * W + HB;

  initial begin
    cam_vsync = 0; cam_href = 0; cam_data = 0;
    wait (enable);
    forever begin
      @(posedge cam_pclk);
      cam_vsync <= 1;
      repeat (VS * LINE) @(posedge cam_pclk);
      cam_vsync <= 0;
      repeat (VB * LINE) @(posedge cam_pclk);
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          automatic logic [15:0] p = test_rgb565(STILL ? 0 : frames, r, c, W, H);
          cam_href <= 1; cam_data <= p[15:8];
          @(posedge cam_pclk);
          cam_data <= p[7:0];
          @(posedge cam_pclk);
        end
        cam_href <= 0; cam_data <= 0;
        repeat (HB) @(posedge cam_pclk);
      end
      frames++;
    end
  end
endmodule
