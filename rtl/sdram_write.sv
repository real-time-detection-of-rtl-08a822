// sdram_write: one SDRAM write burst.
//
// On wr_en (from the arbiter, held until wr_end) the burst address and
// length are captured and the module issues ACTIVE (bank, row), waits
// T_RCD, issues WRITE at the start column with the first word and supplies
// one word per clock for wr_len clocks, then BURST TERMINATE (the mode
// register sets full-page bursts, so the burst is cut to wr_len words) and
// PRECHARGE of the bank, and waits T_RP. ACT, WRITE, BST, PRE is the
// documented write sequence; the cycle counts are this design's.
//
// Word address = {bank[1:0], row[12:0], col[8:0]}; the burst must not cross
// a row (fifo_ctrl guarantees this). wr_ack is high in the clocks in which
// wr_data is taken: it pops a show-ahead FIFO. wr_end is high in the last
// clock of the sequence. Outputs are combinational from the state; the
// pin registers in sdram_ctrl delay command and data alike, so they stay
// aligned. T_RP >= 2 and T_RCD >= 2 are assumed.
//
// wr_dq is wr_data passed straight on (the pin register in sdram_ctrl times
// it), and the CS# bit of wr_cmd is always 0 because idle clocks send NOP
// rather than DESELECT.
module sdram_write
  import sdram_pkg::*;
#(
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_RP  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [23:0] wr_addr,
  input  logic [9:0]  wr_len,
  input  logic [15:0] wr_data,
  output logic        wr_ack,
  output logic        wr_end,
  output sdram_cmd_t  wr_cmd,
  output logic [1:0]  wr_ba,
  output logic [12:0] wr_sdram_addr,
  output logic [15:0] wr_dq,
  output logic        wr_dq_oe
);

  typedef enum logic [2:0] {W_IDLE, W_ACT, W_TRCD, W_DATA, W_BST, W_PRE, W_TRP} wr_state_t;
  wr_state_t   state;
  logic [9:0]  cnt, len;
  logic [23:0] addr;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= W_IDLE;
      cnt   <= '0;
      len   <= '0;
      addr  <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      unique case (state)
        W_IDLE: if (wr_en) begin
                  state <= W_ACT;
                  addr  <= wr_addr;
                  len   <= (wr_len == 0) ? 10'd1 : wr_len;
                end
        W_ACT:  begin state <= (T_RCD > 1) ? W_TRCD : W_DATA; cnt <= '0; end
        W_TRCD: if (cnt == 10'(T_RCD - 2)) begin state <= W_DATA; cnt <= '0; end
        W_DATA: if (cnt == len - 1'b1) state <= W_BST;
        W_BST:  state <= W_PRE;
        W_PRE:  begin state <= W_TRP; cnt <= '0; end
        W_TRP:  if (wr_end) state <= W_IDLE;
        default: state <= W_IDLE;
      endcase
    end

  assign wr_end   = (state == W_TRP) && (cnt == 10'(T_RP - 2));
  assign wr_ack   = (state == W_DATA);
  assign wr_dq_oe = (state == W_DATA);
  assign wr_dq    = wr_data;

  always_comb begin
    wr_cmd        = CMD_NOP;
    wr_ba         = addr[23:22];
    wr_sdram_addr = 13'h0000;
    unique case (state)
      W_ACT:  begin wr_cmd = CMD_ACT; wr_sdram_addr = addr[21:9]; end
      W_DATA: if (cnt == 0) begin wr_cmd = CMD_WRITE; wr_sdram_addr = {4'b0000, addr[8:0]}; end
      W_BST:  wr_cmd = CMD_BST;
      W_PRE:  wr_cmd = CMD_PRE;          // A10 = 0: this bank only
      default: ;
    endcase
  end

endmodule
