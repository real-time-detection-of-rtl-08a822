// nms: non-maximum suppression and double-threshold classification.
//
// Input is a 3x3 window of words {mag[9:0], dir[1:0], thigh[7:0], tlow[7:0]}
// (bits 27..18, 17..16, 15..8, 7..0) produced by sobel4 and
// adaptive_threshold. The centre magnitude survives only if it is a local
// maximum along its gradient direction:
//   dir 0 (horizontal): left / right     dir 1: top-left / bottom-right
//   dir 2 (vertical):   above / below    dir 3: top-right / bottom-left
// It must be greater than the first neighbour and not less than the second,
// so a plateau of two equal maxima keeps exactly one pixel (this tie rule is
// this design's). The surviving magnitude is then classified against the
// centre's own thresholds: strong if mag >= thigh, weak if tlow <= mag <
// thigh, none otherwise; a zero magnitude is never an edge.
//
// Timing: one register stage; out_* follow in_* by one clock. Output class
// encoding: 2 strong, 1 weak, 0 none.
module nms (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_sof,
  input  logic                  in_ok,
  input  logic [2:0][2:0][27:0] win,
  output logic                  out_valid,
  output logic                  out_sof,
  output logic                  out_ok,
  output logic [9:0]            mag,
  output logic [1:0]            cls
);

  logic [9:0] c, n1, n2, keep_mag;
  logic [1:0] d;
  logic [7:0] th, tl;
  logic [1:0] cls_nx;

  function automatic logic [9:0] m(input logic [27:0] w);
    return w[27:18];
  endfunction

  always_comb begin
    c  = m(win[1][1]);
    d  = win[1][1][17:16];
    th = win[1][1][15:8];
    tl = win[1][1][7:0];
    unique case (d)
      2'd0:    begin n1 = m(win[1][0]); n2 = m(win[1][2]); end
      2'd1:    begin n1 = m(win[0][0]); n2 = m(win[2][2]); end
      2'd2:    begin n1 = m(win[0][1]); n2 = m(win[2][1]); end
      default: begin n1 = m(win[0][2]); n2 = m(win[2][0]); end
    endcase
    keep_mag = (in_ok && c > n1 && c >= n2) ? c : 10'd0;
    if (keep_mag != 0 && keep_mag >= {2'b00, th})      cls_nx = 2'd2;
    else if (keep_mag != 0 && keep_mag >= {2'b00, tl}) cls_nx = 2'd1;
    else                                               cls_nx = 2'd0;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      {out_valid, out_sof, out_ok} <= '0;
      mag <= '0;
      cls <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_valid & in_sof;
      out_ok    <= in_ok;
      if (in_valid) begin
        mag <= keep_mag;
        cls <= cls_nx;
      end
    end

endmodule
