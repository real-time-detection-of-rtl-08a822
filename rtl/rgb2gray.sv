// rgb2gray: colour to 8-bit gray conversion.
//
// gray = (77*R + 150*G + 29*B) >> 8, the ITU-R BT.601 luma weights
// (0.299, 0.587, 0.114) scaled by 256; the weights are this design's choice.
// Input is 8 bits per colour, {R, G, B}. One register stage: out_valid,
// out_sof and gray follow in_valid / in_sof by one clock.
module rgb2gray (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_sof,
  input  logic [23:0] in_rgb,
  output logic        out_valid,
  output logic        out_sof,
  output logic [7:0]  gray
);

  logic [15:0] acc;
  always_comb
    acc = 16'd77 * in_rgb[23:16] + 16'd150 * in_rgb[15:8] + 16'd29 * in_rgb[7:0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      gray      <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_sof & in_valid;
      if (in_valid) gray <= acc[15:8];
    end

endmodule
