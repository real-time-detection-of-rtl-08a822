// minmedmax: combinational minimum, median and maximum of N values (N odd).
//
// The median is found by ranking: element i is the median when exactly
// N/2 elements are smaller than it, counting equal elements with a lower
// index as smaller, so ties resolve to a single element. This needs
// N*(N-1) comparators and no sorting network. Purely combinational.
//
// The filter needs the sorted minimum, median and maximum of each window as
// described; computing them by rank counting is this design's choice.
module minmedmax #(
  parameter int unsigned N  = 9,
  parameter int unsigned DW = 8
) (
  input  logic [N-1:0][DW-1:0] din,
  output logic [DW-1:0]        vmin,
  output logic [DW-1:0]        vmed,
  output logic [DW-1:0]        vmax
);

  localparam int unsigned CNT_W = $clog2(N + 1);

  always_comb begin
    vmin = din[0];
    vmax = din[0];
    vmed = din[0];
    for (int i = 1; i < N; i++) begin
      if (din[i] < vmin) vmin = din[i];
      if (din[i] > vmax) vmax = din[i];
    end
    for (int i = 0; i < N; i++) begin
      logic [CNT_W-1:0] rank;
      rank = '0;
      for (int j = 0; j < N; j++)
        if (j != i && (din[j] < din[i] || (din[j] == din[i] && j < i)))
          rank = rank + 1'b1;
      if (32'(rank) == N / 2) vmed = din[i];
    end
  end

endmodule
