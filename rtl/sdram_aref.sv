// sdram_aref: periodic auto refresh.
//
// After init_end a counter raises aref_req every T_REF clocks (750 clocks =
// 7.5 us at 100 MHz, inside the 64 ms / 8192 rows = 7.8 us budget). The
// request stays high until the arbiter grants aref_en; the module then
// issues PRECHARGE ALL, waits T_RP, issues AUTO REFRESH, waits T_RFC; aref_end
// is high during the last of those clocks. A request that has to wait keeps the next period
// running, so waiting does not push later refreshes back. The periodic
// refresh follows the document; the period and command sequence are this
// design's.
//
// aref_ba, aref_addr and the CS# bit of aref_cmd are constant by design:
// the refresh sequence always uses PRECHARGE ALL (A10 high) and AUTO REFRESH,
// which take no bank or row, and the chip is always selected (idle is NOP).
module sdram_aref
  import sdram_pkg::*;
#(
  parameter int unsigned T_REF = 750,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RFC = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init_end,
  input  logic        aref_en,
  output logic        aref_req,
  output logic        aref_end,
  output sdram_cmd_t  aref_cmd,
  output logic [1:0]  aref_ba,
  output logic [12:0] aref_addr
);

  typedef enum logic [2:0] {A_IDLE, A_PRE, A_TRP, A_AREF, A_TRFC} aref_state_t;
  aref_state_t  state;
  logic [15:0]  period_cnt;
  logic [3:0]   cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      period_cnt <= '0;
      aref_req   <= 1'b0;
    end else if (init_end) begin
      period_cnt <= (period_cnt == 16'(T_REF - 1)) ? '0 : period_cnt + 1'b1;
      if (period_cnt == 16'(T_REF - 1)) aref_req <= 1'b1;
      else if (aref_en && state == A_IDLE) aref_req <= 1'b0;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= A_IDLE;
      cnt      <= '0;
    end else begin
      cnt      <= cnt + 1'b1;
      unique case (state)
        A_IDLE: if (aref_en) state <= A_PRE;
        A_PRE:  begin state <= A_TRP; cnt <= '0; end
        A_TRP:  if (cnt == 4'(T_RP - 1)) state <= A_AREF;
        A_AREF: begin state <= A_TRFC; cnt <= '0; end
        A_TRFC: if (aref_end) state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end

  // aref_end is high in the last clock of the sequence, so an arbiter that
  // drops aref_en on it never restarts the sequence.
  assign aref_end = (state == A_TRFC) && (cnt == 4'(T_RFC - 1));

  always_comb begin
    aref_cmd  = CMD_NOP;
    aref_ba   = 2'b11;
    aref_addr = 13'h1FFF;               // A10 = 1: precharge all banks
    unique case (state)
      A_PRE:  aref_cmd = CMD_PRE;
      A_AREF: aref_cmd = CMD_AREF;
      default: ;
    endcase
  end

endmodule
