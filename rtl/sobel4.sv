// sobel4: four-direction 3x3 Sobel gradient.
//
// Instead of the two-direction gradient of the classic Canny operator the
// 3x3 window is convolved with four Sobel kernels, one per direction
// (p = win[row][col], row 0 on top):
//   dir 0, horizontal gradient: [-1 0 1; -2 0 2; -1 0 1]
//   dir 1, top-left to bottom-right: [-2 -1 0; -1 0 1; 0 1 2]
//   dir 2, vertical gradient: [-1 -2 -1; 0 0 0; 1 2 1]
//   dir 3, top-right to bottom-left: [0 1 2; -1 0 1; -2 -1 0]
// The gradient magnitude is the largest absolute response and the
// direction is the kernel that gave it (lowest index on ties). Taking the
// maximum rather than a root of squares, and these kernel weights, are
// this design's choices; four directions are what the document specifies.
//
// Timing: two register stages (kernel sums, then abs/max). out_* follow
// in_* by two clocks; mag is 0 when in_ok is low. mag <= 1020 fits 10 bits.
module sobel4 (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sof,
  input  logic                 in_ok,
  input  logic [2:0][2:0][7:0] win,
  output logic                 out_valid,
  output logic                 out_sof,
  output logic                 out_ok,
  output logic [9:0]           mag,
  output logic [1:0]           dir
);

  typedef logic signed [11:0] grad_t;

  function automatic grad_t px(input logic [7:0] v);
    return grad_t'({4'b0, v});
  endfunction

  grad_t g [4];
  always_comb begin
    g[0] = (px(win[0][2]) + 2*px(win[1][2]) + px(win[2][2]))
         - (px(win[0][0]) + 2*px(win[1][0]) + px(win[2][0]));
    g[1] = (px(win[1][2]) + 2*px(win[2][2]) + px(win[2][1]))
         - (px(win[0][1]) + 2*px(win[0][0]) + px(win[1][0]));
    g[2] = (px(win[2][0]) + 2*px(win[2][1]) + px(win[2][2]))
         - (px(win[0][0]) + 2*px(win[0][1]) + px(win[0][2]));
    g[3] = (px(win[0][1]) + 2*px(win[0][2]) + px(win[1][2]))
         - (px(win[1][0]) + 2*px(win[2][0]) + px(win[2][1]));
  end

  grad_t g_r [4];
  logic  v1, s1, ok1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      {v1, s1, ok1} <= '0;
      for (int i = 0; i < 4; i++) g_r[i] <= '0;
    end else begin
      v1  <= in_valid;
      s1  <= in_valid & in_sof;
      ok1 <= in_ok;
      if (in_valid) for (int i = 0; i < 4; i++) g_r[i] <= g[i];
    end

  logic [9:0] best;
  logic [1:0] best_dir;
  always_comb begin
    best     = '0;
    best_dir = '0;
    for (int i = 0; i < 4; i++) begin
      logic [11:0] a;
      a = g_r[i][11] ? 12'(-g_r[i]) : 12'(g_r[i]);
      if (a[9:0] > best) begin
        best     = a[9:0];
        best_dir = 2'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      {out_valid, out_sof, out_ok} <= '0;
      mag <= '0;
      dir <= '0;
    end else begin
      out_valid <= v1;
      out_sof   <= s1;
      out_ok    <= ok1;
      if (v1) begin
        mag <= ok1 ? best : 10'd0;
        dir <= best_dir;
      end
    end

endmodule
