// vga_ctrl: VGA timing generator and pixel output, 640x480 at 60 Hz.
//
// A line is H_SYNC + H_BACK + H_LEFT + H_VALID + H_RIGHT + H_FRONT =
// 96 + 40 + 8 + 640 + 8 + 8 = 800 clocks of the 25 MHz vga_clk; a frame is
// V_SYNC + V_BACK + V_TOP + V_VALID + V_BOTTOM + V_FRONT = 2 + 25 + 8 + 480
// + 8 + 2 = 525 lines. The horizontal stage lengths are the documented
// ones; the vertical ones are the standard 640x480@60 values. hsync and
// vsync are low during their sync stage and high otherwise.
//
// A horizontal counter cnt_h (0..H_TOTAL-1) and a vertical counter cnt_v
// (0..V_TOTAL-1) run from reset; sync stage first. In the active area
// pix_data_req is high and rgb = pix_data in the same clock (the pixel
// source is a show-ahead FIFO popped by pix_data_req); elsewhere rgb is 0.
module vga_ctrl #(
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BACK   = 40,
  parameter int unsigned H_LEFT   = 8,
  parameter int unsigned H_VALID  = 640,
  parameter int unsigned H_RIGHT  = 8,
  parameter int unsigned H_FRONT  = 8,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BACK   = 25,
  parameter int unsigned V_TOP    = 8,
  parameter int unsigned V_VALID  = 480,
  parameter int unsigned V_BOTTOM = 8,
  parameter int unsigned V_FRONT  = 2
) (
  input  logic        vga_clk,
  input  logic        sys_rst_n,
  input  logic [15:0] pix_data,
  output logic        hsync,
  output logic        vsync,
  output logic        pix_data_req,
  output logic [15:0] rgb
);

  localparam int unsigned H_TOTAL = H_SYNC + H_BACK + H_LEFT + H_VALID + H_RIGHT + H_FRONT;
  localparam int unsigned V_TOTAL = V_SYNC + V_BACK + V_TOP + V_VALID + V_BOTTOM + V_FRONT;
  localparam int unsigned H_ACT0  = H_SYNC + H_BACK + H_LEFT;
  localparam int unsigned V_ACT0  = V_SYNC + V_BACK + V_TOP;

  logic [$clog2(H_TOTAL)-1:0] cnt_h;
  logic [$clog2(V_TOTAL)-1:0] cnt_v;

  always_ff @(posedge vga_clk or negedge sys_rst_n)
    if (!sys_rst_n) begin
      cnt_h <= '0;
      cnt_v <= '0;
    end else if (32'(cnt_h) == H_TOTAL - 1) begin
      cnt_h <= '0;
      cnt_v <= (32'(cnt_v) == V_TOTAL - 1) ? '0 : cnt_v + 1'b1;
    end else begin
      cnt_h <= cnt_h + 1'b1;
    end

  assign hsync = !(32'(cnt_h) < H_SYNC);
  assign vsync = !(32'(cnt_v) < V_SYNC);
  assign pix_data_req = (32'(cnt_h) >= H_ACT0) && (32'(cnt_h) < H_ACT0 + H_VALID) &&
                        (32'(cnt_v) >= V_ACT0) && (32'(cnt_v) < V_ACT0 + V_VALID);
  assign rgb = pix_data_req ? pix_data : 16'h0000;

endmodule
