// canny_pipe: improved Canny edge detector for a streaming 8-bit gray image.
//
// Stages, each fed by its own sliding-window generator:
//   5x5 window -> amf (adaptive median filter, replaces the Gaussian blur)
//   3x3 window -> sobel4 (four-direction gradient) and, on the same window,
//                 adaptive_threshold (thigh = 3x3 mean, tlow = thigh/2)
//   3x3 window of {mag, dir, thigh, tlow} -> nms (suppression + classes)
//   3x3 window of classes -> hysteresis -> edge pixel (255 / 0)
// The stage order is the documented algorithm flow; the thresholds are
// taken from the filtered image at the same pixel as the gradient.
//
// Timing: one output per input pixel. Every window stage delays the image
// by half its size in rows and columns, so output pixel n of a frame shows
// the edge map at image position (row(n)-5, col(n)-5); outputs whose
// neighbourhood reaches outside the frame are 0. The clock latency for a
// pixel through the compute registers is 11 clocks plus the row/column lag.
// in_sof marks the first pixel of a frame; out_sof marks the first output.
module canny_pipe #(
  parameter int unsigned IMG_W = 640
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_sof,
  input  logic [7:0] in_gray,
  output logic       out_valid,
  output logic       out_sof,
  output logic [7:0] edge_pix,
  // intermediate streams, for observation
  output logic       med_valid,
  output logic [7:0] med_pix
);

  // --- adaptive median filter --------------------------------------------
  logic                 w5_v, w5_s, w5_ok;
  logic [4:0][4:0][7:0] w5;
  window_gen #(.K(5), .IMG_W(IMG_W), .DW(8)) u_win5 (
    .clk, .rst_n, .in_valid, .in_sof, .in_ok(1'b1), .in_data(in_gray),
    .out_valid(w5_v), .out_sof(w5_s), .win_ok(w5_ok), .win(w5));

  logic       m_v, m_s, m_ok;
  logic [7:0] m_pix;
  logic [1:0] m_sel;
  amf u_amf (.clk, .rst_n, .in_valid(w5_v), .in_sof(w5_s), .in_ok(w5_ok), .win(w5),
             .out_valid(m_v), .out_sof(m_s), .out_ok(m_ok), .dout(m_pix), .sel(m_sel));
  assign med_valid = m_v;
  assign med_pix   = m_pix;

  // --- gradient and adaptive threshold -----------------------------------
  logic                 g3_v, g3_s, g3_ok;
  logic [2:0][2:0][7:0] g3;
  window_gen #(.K(3), .IMG_W(IMG_W), .DW(8)) u_win_grad (
    .clk, .rst_n, .in_valid(m_v), .in_sof(m_s), .in_ok(m_ok), .in_data(m_pix),
    .out_valid(g3_v), .out_sof(g3_s), .win_ok(g3_ok), .win(g3));

  logic       s_v, s_s, s_ok;
  logic [9:0] s_mag;
  logic [1:0] s_dir;
  sobel4 u_sobel (.clk, .rst_n, .in_valid(g3_v), .in_sof(g3_s), .in_ok(g3_ok), .win(g3),
                  .out_valid(s_v), .out_sof(s_s), .out_ok(s_ok), .mag(s_mag), .dir(s_dir));

  logic [11:0] t_sum;
  logic [7:0]  t_high, t_low;
  logic        t_v, t_s;
  adaptive_threshold u_thr (.clk, .rst_n, .in_valid(g3_v), .in_sof(g3_s), .win(g3),
                            .sum(t_sum), .out_valid(t_v), .out_sof(t_s),
                            .thigh(t_high), .tlow(t_low));

  // --- non-maximum suppression -------------------------------------------
  logic                  n3_v, n3_s, n3_ok;
  logic [2:0][2:0][27:0] n3;
  window_gen #(.K(3), .IMG_W(IMG_W), .DW(28)) u_win_nms (
    .clk, .rst_n, .in_valid(s_v), .in_sof(s_s), .in_ok(s_ok),
    .in_data({s_mag, s_dir, t_high, t_low}),
    .out_valid(n3_v), .out_sof(n3_s), .win_ok(n3_ok), .win(n3));

  logic       n_v, n_s, n_ok;
  logic [9:0] n_mag;
  logic [1:0] n_cls;
  nms u_nms (.clk, .rst_n, .in_valid(n3_v), .in_sof(n3_s), .in_ok(n3_ok), .win(n3),
             .out_valid(n_v), .out_sof(n_s), .out_ok(n_ok), .mag(n_mag), .cls(n_cls));

  // --- hysteresis ---------------------------------------------------------
  logic                 h3_v, h3_s, h3_ok;
  logic [2:0][2:0][1:0] h3;
  window_gen #(.K(3), .IMG_W(IMG_W), .DW(2)) u_win_hys (
    .clk, .rst_n, .in_valid(n_v), .in_sof(n_s), .in_ok(n_ok), .in_data(n_cls),
    .out_valid(h3_v), .out_sof(h3_s), .win_ok(h3_ok), .win(h3));

  logic h_prom;
  hysteresis u_hys (.clk, .rst_n, .in_valid(h3_v), .in_sof(h3_s), .in_ok(h3_ok), .win(h3),
                    .out_valid, .out_sof, .edge_pix, .promoted(h_prom));

  // sobel4 and adaptive_threshold have equal latency
  assert property (@(posedge clk) disable iff (!rst_n) s_v == t_v);

endmodule
