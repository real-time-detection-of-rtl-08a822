// adaptive_threshold: local double threshold from a 3x3 gray window.
//
// The high threshold is the mean gray level of the 3x3 neighbourhood,
// rounded down, and the low threshold is half of it:
//   sum = sum of the 9 pixels, thigh = sum / 9, tlow = thigh / 2.
// Bright, textured areas thus get a higher threshold than smooth dark ones.
// The mean-of-3x3 rule and the factor of two follow the document.
// Example: window 36,129,9,99,13,141,141,101,18 gives sum 687, thigh 76,
// tlow 38.
//
// Timing: stage 1 registers sum (one clock after the window), stage 2
// registers thigh and tlow (one clock after sum). The sum is 12 bits wide
// so that it cannot overflow (9*255 = 2295).
module adaptive_threshold (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sof,
  input  logic [2:0][2:0][7:0] win,
  output logic [11:0]          sum,
  output logic                 out_valid,
  output logic                 out_sof,
  output logic [7:0]           thigh,
  output logic [7:0]           tlow
);

  logic [11:0] acc;
  logic        v1, s1;
  always_comb begin
    acc = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) acc = acc + 12'(win[r][c]);
  end

  logic [11:0] mean;
  assign mean = sum / 12'd9;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      {v1, s1, out_valid, out_sof} <= '0;
      sum   <= '0;
      thigh <= '0;
      tlow  <= '0;
    end else begin
      v1        <= in_valid;
      s1        <= in_valid & in_sof;
      out_valid <= v1;
      out_sof   <= s1;
      if (in_valid) sum <= acc;
      if (v1) begin
        thigh <= mean[7:0];
        tlow  <= mean[8:1];
      end
    end

endmodule
