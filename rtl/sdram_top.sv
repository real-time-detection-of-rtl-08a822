// sdram_top: SDRAM frame store = fifo_ctrl + sdram_ctrl.
//
// Pixels written in the wr_fifo_wr_clk domain are stored frame by frame
// from sdram_wr_b_addr; read_valid lets the read side prefetch the frame
// from sdram_rd_b_addr into the read FIFO, from which the display pulls
// words in the rd_fifo_rd_clk domain. sys_clk is the SDRAM clock (100 MHz
// by default timing). See fifo_ctrl and sdram_ctrl for the protocol
// details; this module only connects them, as in the documented top-level
// SDRAM structure.
//
// sdram_cke, sdram_dqm and sdram_cs_n are constant (see sdram_ctrl).
module sdram_top #(
  parameter int unsigned FRAME_WORDS = 640 * 480,
  parameter int unsigned FIFO_AW     = 10,
  parameter int unsigned T_POWER     = 20_000,
  parameter int unsigned T_REF       = 750
) (
  input  logic        sys_clk,
  input  logic        sys_rst_n,
  input  logic [9:0]  wr_burst_len,
  input  logic [9:0]  rd_burst_len,
  input  logic        wr_fifo_wr_clk,
  input  logic        wr_fifo_wr_req,
  input  logic [15:0] wr_fifo_wr_data,
  input  logic [23:0] sdram_wr_b_addr,
  output logic        wr_fifo_full,
  input  logic        rd_fifo_rd_clk,
  input  logic        rd_fifo_rd_req,
  output logic [15:0] rd_fifo_rd_data,
  output logic        rd_fifo_empty,
  input  logic [23:0] sdram_rd_b_addr,
  input  logic        read_valid,
  output logic        init_end,
  output logic        sdram_cke,
  output logic        sdram_cs_n,
  output logic        sdram_ras_n,
  output logic        sdram_cas_n,
  output logic        sdram_we_n,
  output logic [1:0]  sdram_ba,
  output logic [12:0] sdram_addr,
  output logic [1:0]  sdram_dqm,
  output logic [15:0] sdram_dq_o,
  output logic        sdram_dq_oe,
  input  logic [15:0] sdram_dq_i
);

  logic        sdram_wr_req, sdram_wr_ack, sdram_rd_req, sdram_rd_ack;
  logic [23:0] sdram_wr_addr, sdram_rd_addr;
  logic [9:0]  wr_len, rd_len;
  logic [15:0] sdram_data_in, sdram_data_out;

  fifo_ctrl #(.FRAME_WORDS(FRAME_WORDS), .FIFO_AW(FIFO_AW)) u_fifo_ctrl (
    .sys_clk, .sys_rst_n, .wr_burst_len, .rd_burst_len,
    .wr_fifo_wr_clk, .wr_fifo_wr_req, .wr_fifo_wr_data, .sdram_wr_b_addr, .wr_fifo_full,
    .rd_fifo_rd_clk, .rd_fifo_rd_req, .rd_fifo_rd_data, .rd_fifo_empty,
    .sdram_rd_b_addr, .read_valid, .init_end,
    .sdram_wr_req, .sdram_wr_addr, .wr_len, .sdram_data_in, .sdram_wr_ack,
    .sdram_rd_req, .sdram_rd_addr, .rd_len, .sdram_rd_ack, .sdram_data_out);

  sdram_ctrl #(.T_POWER(T_POWER), .T_REF(T_REF)) u_sdram_ctrl (
    .clk(sys_clk), .rst_n(sys_rst_n),
    .sdram_wr_req, .sdram_wr_addr, .wr_len, .sdram_data_in, .sdram_wr_ack,
    .sdram_rd_req, .sdram_rd_addr, .rd_len, .sdram_data_out, .sdram_rd_ack, .init_end,
    .sdram_cke, .sdram_cs_n, .sdram_ras_n, .sdram_cas_n, .sdram_we_n,
    .sdram_ba, .sdram_addr, .sdram_dqm, .sdram_dq_o, .sdram_dq_oe, .sdram_dq_i);

endmodule
