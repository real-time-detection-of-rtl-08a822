// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// DEPTH = 2**AW words of DW bits. Each side keeps a binary pointer one bit
// wider than the address and publishes it in Gray code; the other side
// synchronises it through two flip-flops. full / empty and the fill counts
// are computed from the synchronised pointers, so they are pessimistic by
// up to three clocks of the other domain and never overstate free space or
// stored data.
//
// Show-ahead read: rd_data is the oldest word whenever empty is low, and
// rd_en removes it at the rd_clk edge. A write while full or a read while
// empty is ignored. rst_n resets both sides asynchronously.
//
// The FIFOs between the clock domains are part of the described system; the
// Gray-code construction and the show-ahead read are this design's choice.
module async_fifo #(
  parameter int unsigned DW = 16,
  parameter int unsigned AW = 10
) (
  input  logic          rst_n,
  input  logic          wr_clk,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          full,
  output logic [AW:0]   wr_count,
  input  logic          rd_clk,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty,
  output logic [AW:0]   rd_count
);

  logic [DW-1:0] mem [2**AW];
  logic [AW:0]   wbin, rbin, wgray, rgray;
  logic [AW:0]   rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]   rbin_w, wbin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  assign rbin_w   = gray2bin(rgray_w2);
  assign wr_count = wbin - rbin_w;
  assign full     = (wr_count == (AW+1)'(2**AW));

  always_ff @(posedge wr_clk or negedge rst_n)
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end

  always_ff @(posedge wr_clk)
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;

  // read side
  assign wbin_r   = gray2bin(wgray_r2);
  assign rd_count = wbin_r - rbin;
  assign empty    = (rd_count == '0);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rst_n)
    if (!rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end

endmodule
