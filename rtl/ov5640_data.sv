// ov5640_data: camera acquisition from the OV5640 DVP port.
//
// The sensor sends RGB565 as two bytes per pixel on cam_data[7:0], high byte
// first, qualified by cam_href and timed by cam_pclk; cam_vsync marks the
// frame gap. Capture is enabled only once cfg_done (from the configuration
// domain, synchronised here) is high, and starts at the next rising edge of
// cam_vsync so that the first pixel delivered is the first pixel of a frame.
// Every second byte of a line completes a pixel: pix_valid pulses one
// cam_pclk after that byte with pix_data = {first byte, second byte};
// pix_sof marks the first pixel of each frame. The byte order and the
// frame-aligned start are this design's choices.
module ov5640_data (
  input  logic        cam_pclk,
  input  logic        rst_n,
  input  logic        cfg_done,
  input  logic        cam_vsync,
  input  logic        cam_href,
  input  logic [7:0]  cam_data,
  output logic        pix_valid,
  output logic        pix_sof,
  output logic [15:0] pix_data
);

  logic [1:0] done_sync;
  logic       vsync_d, armed, byte_phase, first_pix;
  logic [7:0] hi_byte;

  always_ff @(posedge cam_pclk or negedge rst_n)
    if (!rst_n) begin
      done_sync  <= '0;
      vsync_d    <= 1'b0;
      armed      <= 1'b0;
      byte_phase <= 1'b0;
      first_pix  <= 1'b0;
      hi_byte    <= '0;
      pix_valid  <= 1'b0;
      pix_sof    <= 1'b0;
      pix_data   <= '0;
    end else begin
      done_sync <= {done_sync[0], cfg_done};
      vsync_d   <= cam_vsync;
      pix_valid <= 1'b0;
      pix_sof   <= 1'b0;
      if (cam_vsync && !vsync_d) begin        // new frame
        armed      <= done_sync[1];
        first_pix  <= 1'b1;
        byte_phase <= 1'b0;
      end else if (!cam_href) begin
        byte_phase <= 1'b0;
      end else if (armed) begin
        byte_phase <= !byte_phase;
        if (!byte_phase) hi_byte <= cam_data;
        else begin
          pix_valid <= 1'b1;
          pix_sof   <= first_pix;
          pix_data  <= {hi_byte, cam_data};
          first_pix <= 1'b0;
        end
      end
    end

endmodule
