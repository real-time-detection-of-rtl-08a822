// hysteresis: hysteresis thresholding of classified edge pixels.
//
// Input is a 3x3 window of edge classes (2 strong, 1 weak, 0 none). A strong
// centre is an edge; a weak centre is an edge only if at least one of its
// eight neighbours is strong, which connects weak edge segments to strong
// ones; everything else is background. This is a single-pass, 8-neighbour
// form of the hysteresis connection, chosen here because it streams with a
// fixed latency.
//
// Timing: one register stage; edge (255 or 0) follows the window by one
// clock. promoted pulses with an output that is a weak pixel kept as edge.
//
// Strong/weak classes and connecting weak edges to strong ones follow the
// described algorithm; the one-pass neighbourhood test is this design's.
module hysteresis (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_sof,
  input  logic                 in_ok,
  input  logic [2:0][2:0][1:0] win,
  output logic                 out_valid,
  output logic                 out_sof,
  output logic [7:0]           edge_pix,
  output logic                 promoted
);

  logic strong_nb, is_edge, is_prom;
  always_comb begin
    strong_nb = 1'b0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (!(r == 1 && c == 1) && win[r][c] == 2'd2) strong_nb = 1'b1;
    is_prom = in_ok && win[1][1] == 2'd1 && strong_nb;
    is_edge = in_ok && (win[1][1] == 2'd2 || is_prom);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      {out_valid, out_sof, promoted} <= '0;
      edge_pix <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_valid & in_sof;
      promoted  <= in_valid & is_prom;
      if (in_valid) edge_pix <= is_edge ? 8'd255 : 8'd0;
    end

endmodule
