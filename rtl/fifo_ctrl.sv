// fifo_ctrl: FIFO control between the pixel clock domains and the SDRAM
// controller.
//
// A write FIFO takes pixels in the wr_fifo_wr_clk domain and a read FIFO
// hands them out in the rd_fifo_rd_clk domain; both are dual-clock FIFOs
// of 2**FIFO_AW words. In the SDRAM clock domain this module
//  - raises sdram_wr_req when the write FIFO holds a whole burst, and walks
//    the write address through one frame of FRAME_WORDS words starting at
//    sdram_wr_b_addr, wrapping back to it at the end of the frame;
//  - raises sdram_rd_req when read_valid is high and the read FIFO has room
//    for a whole burst, walking the read address the same way from
//    sdram_rd_b_addr.
// A burst is wr_burst_len / rd_burst_len words, shortened where needed so
// that it ends at the end of an SDRAM row (512 words, full-page bursts wrap
// inside a row) and at the end of the frame. Buffering both directions in
// FIFOs around one controller is the documented structure; the request
// rules, the row split and the frame wrap are this design's.
//
// Handshake with sdram_ctrl: a request is held, with its address and length
// stable, until the matching ack rises; the address advances when the ack
// falls. The write FIFO is popped by sdram_wr_ack, the read FIFO is pushed
// by sdram_rd_ack with sdram_data_out.
module fifo_ctrl #(
  parameter int unsigned FRAME_WORDS = 640 * 480,
  parameter int unsigned FIFO_AW     = 10
) (
  input  logic        sys_clk,
  input  logic        sys_rst_n,
  input  logic [9:0]  wr_burst_len,
  input  logic [9:0]  rd_burst_len,
  // write side (pixel source)
  input  logic        wr_fifo_wr_clk,
  input  logic        wr_fifo_wr_req,
  input  logic [15:0] wr_fifo_wr_data,
  input  logic [23:0] sdram_wr_b_addr,
  output logic        wr_fifo_full,
  // read side (display)
  input  logic        rd_fifo_rd_clk,
  input  logic        rd_fifo_rd_req,
  output logic [15:0] rd_fifo_rd_data,
  output logic        rd_fifo_empty,
  input  logic [23:0] sdram_rd_b_addr,
  input  logic        read_valid,
  // SDRAM controller side
  input  logic        init_end,
  output logic        sdram_wr_req,
  output logic [23:0] sdram_wr_addr,
  output logic [9:0]  wr_len,
  output logic [15:0] sdram_data_in,
  input  logic        sdram_wr_ack,
  output logic        sdram_rd_req,
  output logic [23:0] sdram_rd_addr,
  output logic [9:0]  rd_len,
  input  logic        sdram_rd_ack,
  input  logic [15:0] sdram_data_out
);

  localparam int unsigned OFF_W = $clog2(FRAME_WORDS + 1);
  localparam int unsigned DEPTH = 2 ** FIFO_AW;

  logic [FIFO_AW:0] wf_level, rf_level, wf_wcount, rf_rcount;
  logic             rf_full, wf_empty;

  async_fifo #(.DW(16), .AW(FIFO_AW)) u_wr_fifo (
    .rst_n(sys_rst_n),
    .wr_clk(wr_fifo_wr_clk), .wr_en(wr_fifo_wr_req), .wr_data(wr_fifo_wr_data),
    .full(wr_fifo_full), .wr_count(wf_wcount),
    .rd_clk(sys_clk), .rd_en(sdram_wr_ack), .rd_data(sdram_data_in),
    .empty(wf_empty), .rd_count(wf_level));

  async_fifo #(.DW(16), .AW(FIFO_AW)) u_rd_fifo (
    .rst_n(sys_rst_n),
    .wr_clk(sys_clk), .wr_en(sdram_rd_ack), .wr_data(sdram_data_out),
    .full(rf_full), .wr_count(rf_level),
    .rd_clk(rd_fifo_rd_clk), .rd_en(rd_fifo_rd_req), .rd_data(rd_fifo_rd_data),
    .empty(rd_fifo_empty), .rd_count(rf_rcount));

  // Burst length limited by the row end and the frame end.
  function automatic logic [9:0] clamp_len(input logic [9:0] blen, input logic [23:0] addr,
                                           input logic [OFF_W-1:0] off);
    logic [31:0] l, row_rem, frame_rem;
    l         = (blen == 0) ? 32'd1 : 32'(blen);
    row_rem   = 32'd512 - 32'(addr[8:0]);
    frame_rem = 32'(FRAME_WORDS) - 32'(off);
    if (row_rem < l)   l = row_rem;
    if (frame_rem < l) l = frame_rem;
    return 10'(l);
  endfunction

  logic [OFF_W-1:0] wr_off, rd_off;
  logic             wr_ack_d, rd_ack_d, wr_busy, rd_busy;

  assign sdram_wr_addr = sdram_wr_b_addr + 24'(wr_off);
  assign sdram_rd_addr = sdram_rd_b_addr + 24'(rd_off);
  assign wr_len        = clamp_len(wr_burst_len, sdram_wr_addr, wr_off);
  assign rd_len        = clamp_len(rd_burst_len, sdram_rd_addr, rd_off);

  always_ff @(posedge sys_clk or negedge sys_rst_n)
    if (!sys_rst_n) begin
      wr_off <= '0;  rd_off <= '0;
      wr_ack_d <= 1'b0;  rd_ack_d <= 1'b0;
      wr_busy <= 1'b0;   rd_busy <= 1'b0;
      sdram_wr_req <= 1'b0;  sdram_rd_req <= 1'b0;
    end else begin
      wr_ack_d <= sdram_wr_ack;
      rd_ack_d <= sdram_rd_ack;
      // write: request, drop at ack, advance at the end of the ack
      if (!wr_busy && init_end && 32'(wf_level) >= 32'(wr_len)) begin
        sdram_wr_req <= 1'b1;
        wr_busy      <= 1'b1;
      end
      if (sdram_wr_ack) sdram_wr_req <= 1'b0;
      if (wr_ack_d && !sdram_wr_ack) begin
        wr_busy <= 1'b0;
        wr_off  <= (32'(wr_off) + 32'(wr_len) >= FRAME_WORDS) ? '0 : wr_off + OFF_W'(wr_len);
      end
      // read: request when a whole burst fits into the read FIFO
      if (!rd_busy && init_end && read_valid && 32'(rf_level) + 32'(rd_len) <= DEPTH) begin
        sdram_rd_req <= 1'b1;
        rd_busy      <= 1'b1;
      end
      if (sdram_rd_ack) sdram_rd_req <= 1'b0;
      if (rd_ack_d && !sdram_rd_ack) begin
        rd_busy <= 1'b0;
        rd_off  <= (32'(rd_off) + 32'(rd_len) >= FRAME_WORDS) ? '0 : rd_off + OFF_W'(rd_len);
      end
    end

  // The write FIFO must never be popped empty and the read FIFO never
  // pushed full.
  assert property (@(posedge sys_clk) disable iff (!sys_rst_n) sdram_wr_ack |-> !wf_empty);
  assert property (@(posedge sys_clk) disable iff (!sys_rst_n) sdram_rd_ack |-> !rf_full);

endmodule
