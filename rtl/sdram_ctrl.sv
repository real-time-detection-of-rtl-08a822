// sdram_ctrl: SDR SDRAM controller (initialisation, auto refresh, burst
// write, burst read, arbitration).
//
// It joins sdram_init, sdram_aref, sdram_write, sdram_read and sdram_arbit
// and registers every SDRAM pin once, so command, address and write data
// leave on the same clock edge, and registers dq on the way in. The
// structure, five sub-modules under one controller, is the documented one.
//
// User side: hold sdram_wr_req with sdram_wr_addr / wr_len stable until
// sdram_wr_ack rises; while sdram_wr_ack is high, sdram_data_in is taken
// every clock (show-ahead FIFO head). Hold sdram_rd_req likewise; while
// sdram_rd_ack is high, sdram_data_out carries one read word per clock.
// init_end rises when the SDRAM is ready. Addresses are 24-bit word
// addresses {bank, row, column}; a burst of 1..512 words must stay within
// one row. The dq bus is split into dq_o / dq_oe / dq_i; the tri-state
// buffer belongs to the pad. sdram_cke is held high and dqm low.
//
// sdram_cke is tied high and sdram_dqm low on purpose: the controller never
// uses power-down or self refresh and always writes whole 16-bit words.
// sdram_cs_n stays low for the same reason as in the sequencers: idle clocks
// send NOP, the chip is never deselected.
module sdram_ctrl
  import sdram_pkg::*;
#(
  parameter int unsigned T_POWER = 20_000,
  parameter int unsigned T_REF   = 750
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sdram_wr_req,
  input  logic [23:0] sdram_wr_addr,
  input  logic [9:0]  wr_len,
  input  logic [15:0] sdram_data_in,
  output logic        sdram_wr_ack,
  input  logic        sdram_rd_req,
  input  logic [23:0] sdram_rd_addr,
  input  logic [9:0]  rd_len,
  output logic [15:0] sdram_data_out,
  output logic        sdram_rd_ack,
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

  sdram_cmd_t  init_cmd, aref_cmd, wr_cmd, rd_cmd, cmd;
  logic [1:0]  init_ba, aref_ba, wr_ba, rd_ba, ba;
  logic [12:0] init_addr, aref_addr, wr_a, rd_a, addr;
  logic        aref_req, aref_en, aref_end, wr_en, wr_end, rd_en, rd_end;
  logic [15:0] wr_dq, dq_o, dq_in_r;
  logic        wr_dq_oe, dq_oe;

  sdram_init #(.T_POWER(T_POWER)) u_init (
    .clk, .rst_n, .init_cmd, .init_ba, .init_addr, .init_end);

  sdram_aref #(.T_REF(T_REF)) u_aref (
    .clk, .rst_n, .init_end, .aref_en, .aref_req, .aref_end,
    .aref_cmd, .aref_ba, .aref_addr);

  sdram_write u_write (
    .clk, .rst_n, .wr_en, .wr_addr(sdram_wr_addr), .wr_len, .wr_data(sdram_data_in),
    .wr_ack(sdram_wr_ack), .wr_end, .wr_cmd, .wr_ba, .wr_sdram_addr(wr_a),
    .wr_dq, .wr_dq_oe);

  sdram_read u_read (
    .clk, .rst_n, .rd_en, .rd_addr(sdram_rd_addr), .rd_len, .dq_in(dq_in_r),
    .rd_ack(sdram_rd_ack), .rd_data(sdram_data_out), .rd_end, .rd_cmd, .rd_ba,
    .rd_sdram_addr(rd_a));

  sdram_arbit u_arbit (
    .clk, .rst_n, .init_end, .init_cmd, .init_ba, .init_addr,
    .aref_req, .aref_end, .aref_cmd, .aref_ba, .aref_addr,
    .wr_req(sdram_wr_req), .wr_end, .wr_cmd, .wr_ba, .wr_addr(wr_a), .wr_dq, .wr_dq_oe,
    .rd_req(sdram_rd_req), .rd_end, .rd_cmd, .rd_ba, .rd_addr(rd_a),
    .aref_en, .wr_en, .rd_en, .cmd, .ba, .addr, .dq_o, .dq_oe);

  // pin registers
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      {sdram_cs_n, sdram_ras_n, sdram_cas_n, sdram_we_n} <= CMD_NOP;
      sdram_ba    <= '0;
      sdram_addr  <= '0;
      sdram_dq_o  <= '0;
      sdram_dq_oe <= 1'b0;
      dq_in_r     <= '0;
    end else begin
      {sdram_cs_n, sdram_ras_n, sdram_cas_n, sdram_we_n} <= cmd;
      sdram_ba    <= ba;
      sdram_addr  <= addr;
      sdram_dq_o  <= dq_o;
      sdram_dq_oe <= dq_oe;
      dq_in_r     <= sdram_dq_i;
    end

  assign sdram_cke = 1'b1;
  assign sdram_dqm = 2'b00;

endmodule
