// amf: adaptive median filter (3x3 / 5x5) with its selection controller.
//
// From a 5x5 neighbourhood the filter takes the minimum, median and maximum
// of the inner 3x3 block and of the full 5x5 block, then selects:
//   if min3 < med3 < max3  (3x3 median is not an impulse)
//     out = (min3 < centre < max3) ? centre : med3
//   else if min5 < med5 < max5
//     out = (min5 < centre < max5) ? centre : med5
//   else
//     out = med5
// so a pixel that is not an impulse is kept unchanged and an impulse is
// replaced by the median of the smallest window whose median is reliable.
// The decision tree is the documented one; its last branch (both medians
// are impulses) is this design's choice.
//
// Timing: two register stages. Stage 1 registers the six order statistics
// and the centre, stage 2 registers the selected pixel. out_valid, out_sof,
// out_ok follow in_valid, in_sof, in_ok by two clocks. When in_ok is low
// (the window reaches outside the frame) the output pixel is 0.
// sel reports the branch taken for the current output: 0 centre kept by
// 3x3, 1 3x3 median, 2 centre kept by 5x5, 3 5x5 median.
module amf (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_sof,
  input  logic                    in_ok,
  input  logic [4:0][4:0][7:0]    win,
  output logic                    out_valid,
  output logic                    out_sof,
  output logic                    out_ok,
  output logic [7:0]              dout,
  output logic [1:0]              sel
);

  logic [8:0][7:0]  w3;
  logic [24:0][7:0] w5;
  logic [7:0] min3, med3, max3, min5, med5, max5;

  always_comb
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) begin
        w5[r*5+c] = win[r][c];
        if (r >= 1 && r <= 3 && c >= 1 && c <= 3) w3[(r-1)*3 + (c-1)] = win[r][c];
      end

  minmedmax #(.N(9),  .DW(8)) u_sort3 (.din(w3), .vmin(min3), .vmed(med3), .vmax(max3));
  minmedmax #(.N(25), .DW(8)) u_sort5 (.din(w5), .vmin(min5), .vmed(med5), .vmax(max5));

  // Stage 1
  logic [7:0] min3_r, med3_r, max3_r, min5_r, med5_r, max5_r, ctr_r;
  logic       v1, s1, ok1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      {v1, s1, ok1} <= '0;
      {min3_r, med3_r, max3_r, min5_r, med5_r, max5_r, ctr_r} <= '0;
    end else begin
      v1  <= in_valid;
      s1  <= in_valid & in_sof;
      ok1 <= in_ok;
      if (in_valid) begin
        min3_r <= min3;  med3_r <= med3;  max3_r <= max3;
        min5_r <= min5;  med5_r <= med5;  max5_r <= max5;
        ctr_r  <= win[2][2];
      end
    end

  // Stage 2: selection controller
  logic [7:0] pick;
  logic [1:0] branch;
  always_comb begin
    if (min3_r < med3_r && med3_r < max3_r) begin
      if (min3_r < ctr_r && ctr_r < max3_r) begin pick = ctr_r;  branch = 2'd0; end
      else                                  begin pick = med3_r; branch = 2'd1; end
    end else if (min5_r < med5_r && med5_r < max5_r) begin
      if (min5_r < ctr_r && ctr_r < max5_r) begin pick = ctr_r;  branch = 2'd2; end
      else                                  begin pick = med5_r; branch = 2'd3; end
    end else                                begin pick = med5_r; branch = 2'd3; end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      {out_valid, out_sof, out_ok} <= '0;
      dout <= '0;
      sel  <= '0;
    end else begin
      out_valid <= v1;
      out_sof   <= s1;
      out_ok    <= ok1;
      if (v1) begin
        dout <= ok1 ? pick : 8'd0;
        sel  <= branch;
      end
    end

endmodule
