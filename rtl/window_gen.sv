// window_gen: KxK sliding-window generator for a raster pixel stream.
//
// K-1 line buffers of IMG_W words hold the previous rows; a KxK register
// array shifts one column left for every accepted pixel, its right column
// loaded from the line buffers and the new pixel. win[r][c] is row r,
// column c of the neighbourhood, r=0 the oldest row and c=0 the leftmost
// column; the centre win[K/2][K/2] is the pixel K/2 rows above and K/2
// columns left of the newest input. Each stored word carries an 'ok' flag
// so that win_ok is high only when all KxK taps lie inside the current
// frame (input column and row both >= K-1) and were themselves valid.
//
// Timing: one output per input. out_valid / out_sof follow in_valid /
// in_sof by one clock; in_sof must accompany the first pixel of a frame and
// resets the column and row counters. Every frame has IMG_W pixels per row.
// The output stream therefore has the same length as the input but its
// centres lag by K/2 rows and columns; pixels whose window reaches outside
// the frame come out with win_ok = 0. This border handling is this design's.
module window_gen #(
  parameter int unsigned K     = 3,
  parameter int unsigned IMG_W = 640,
  parameter int unsigned DW    = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_sof,
  input  logic                          in_ok,
  input  logic [DW-1:0]                 in_data,
  output logic                          out_valid,
  output logic                          out_sof,
  output logic                          win_ok,
  output logic [K-1:0][K-1:0][DW-1:0]   win
);

  localparam int unsigned CW = $clog2(IMG_W);
  localparam int unsigned RW = $clog2(K);

  logic [DW:0]   lb [K-1][IMG_W];        // {ok, data}; lb[0] = previous row
  logic [DW:0]   w  [K][K];
  logic [DW:0]   column [K];
  logic [CW-1:0] col, col_cur;
  logic [RW-1:0] row, row_cur;           // saturates at K-1
  logic          pos_ok;

  // Position of the incoming pixel (in_sof restarts the frame).
  assign col_cur = in_sof ? '0 : col;
  assign row_cur = in_sof ? '0 : row;

  always_comb begin
    column[K-1] = {in_ok, in_data};
    for (int j = 0; j < K - 1; j++) column[K-2-j] = lb[j][col_cur];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      pos_ok    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_valid & in_sof;
      if (in_valid) begin
        pos_ok <= (32'(col_cur) >= K - 1) && (32'(row_cur) >= K - 1);
        if (32'(col_cur) == IMG_W - 1) begin
          col <= '0;
          row <= (32'(row_cur) == K - 1) ? row_cur : row_cur + 1'b1;
        end else begin
          col <= col_cur + 1'b1;
          row <= row_cur;
        end
      end
    end

  // Line buffers and window registers (no reset: gated by pos_ok).
  always_ff @(posedge clk)
    if (in_valid) begin
      lb[0][col_cur] <= {in_ok, in_data};
      for (int j = 1; j < K - 1; j++) lb[j][col_cur] <= lb[j-1][col_cur];
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) w[r][c] <= w[r][c+1];
        w[r][K-1] <= column[r];
      end
    end

  always_comb begin
    win_ok = pos_ok;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++) begin
        win[r][c] = w[r][c][DW-1:0];
        win_ok    = win_ok & w[r][c][DW];
      end
  end

endmodule
