// sdram_read: one SDRAM read burst.
//
// On rd_en (from the arbiter, held until rd_end) the burst address and
// length are captured and the module issues ACTIVE, waits T_RCD, issues
// READ at the start column, lets the full-page burst run for rd_len clocks,
// then issues BURST TERMINATE and PRECHARGE and waits T_RP. ACT, READ, BST,
// PRE is the documented read sequence with CAS latency 3.
//
// Data timing: the command leaves through the pin register of sdram_ctrl
// (1 clock), the SDRAM answers CAS_LATENCY clocks after it samples READ, and
// sdram_ctrl registers dq on the way in (1 clock). A word issued in data
// clock k is therefore on rd_data RD_DELAY = CAS_LATENCY + 2 clocks later;
// rd_ack marks exactly those clocks. The word-in-flight pipeline must drain
// before rd_end, which is high in the last clock of the sequence.
//
// rd_data is the registered dq_in passed straight on, valid with rd_ack, and
// the CS# bit of rd_cmd is always 0 because idle clocks send NOP rather than
// DESELECT.
module sdram_read
  import sdram_pkg::*;
#(
  parameter int unsigned T_RCD    = 2,
  parameter int unsigned T_RP     = 2,
  parameter int unsigned RD_DELAY = CAS_LATENCY + 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rd_en,
  input  logic [23:0] rd_addr,
  input  logic [9:0]  rd_len,
  input  logic [15:0] dq_in,           // registered dq from the pins
  output logic        rd_ack,
  output logic [15:0] rd_data,
  output logic        rd_end,
  output sdram_cmd_t  rd_cmd,
  output logic [1:0]  rd_ba,
  output logic [12:0] rd_sdram_addr
);

  typedef enum logic [2:0] {R_IDLE, R_ACT, R_TRCD, R_DATA, R_BST, R_PRE, R_TRP, R_DRAIN} rd_state_t;
  rd_state_t         state;
  logic [9:0]        cnt, len;
  logic [23:0]       addr;
  logic [RD_DELAY-1:0] inflight;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= R_IDLE;
      cnt      <= '0;
      len      <= '0;
      addr     <= '0;
      inflight <= '0;
    end else begin
      cnt      <= cnt + 1'b1;
      inflight <= {inflight[RD_DELAY-2:0], state == R_DATA};
      unique case (state)
        R_IDLE:  if (rd_en) begin
                   state <= R_ACT;
                   addr  <= rd_addr;
                   len   <= (rd_len == 0) ? 10'd1 : rd_len;
                 end
        R_ACT:   begin state <= (T_RCD > 1) ? R_TRCD : R_DATA; cnt <= '0; end
        R_TRCD:  if (cnt == 10'(T_RCD - 2)) begin state <= R_DATA; cnt <= '0; end
        R_DATA:  if (cnt == len - 1'b1) state <= R_BST;
        R_BST:   state <= R_PRE;
        R_PRE:   begin state <= R_TRP; cnt <= '0; end
        R_TRP:   if (cnt == 10'(T_RP - 2)) state <= R_DRAIN;
        R_DRAIN: if (rd_end) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end

  // Last clock: no word left in flight except the one delivered now.
  assign rd_end  = (state == R_DRAIN) && (inflight[RD_DELAY-2:0] == '0);
  assign rd_ack  = inflight[RD_DELAY-1];
  assign rd_data = dq_in;

  always_comb begin
    rd_cmd        = CMD_NOP;
    rd_ba         = addr[23:22];
    rd_sdram_addr = 13'h0000;
    unique case (state)
      R_ACT:  begin rd_cmd = CMD_ACT; rd_sdram_addr = addr[21:9]; end
      R_DATA: if (cnt == 0) begin rd_cmd = CMD_READ; rd_sdram_addr = {4'b0000, addr[8:0]}; end
      R_BST:  rd_cmd = CMD_BST;
      R_PRE:  rd_cmd = CMD_PRE;
      default: ;
    endcase
  end

endmodule
