// sdram_init: SDRAM power-up initialisation.
//
// Sequence: wait T_POWER clocks (200 us at 100 MHz) with NOP, PRECHARGE ALL
// (A10=1), wait T_RP, then AREF_NUM times AUTO REFRESH each followed by
// T_RFC clocks, then LOAD MODE REGISTER with sdram_pkg::MODE_REG (CAS
// latency 3, sequential, full-page burst) and T_MRD clocks; init_end then
// rises and stays high. The command order PRE, AREF..., LMR is the
// documented one; the cycle counts are this design's for a 100 MHz clock.
//
// Outputs are combinational from the state registers; sdram_ctrl registers
// them on the way to the pins.
//
// The CS# bit of init_cmd is always 0: the chip stays selected and waits
// are sent as NOP.
module sdram_init
  import sdram_pkg::*;
#(
  parameter int unsigned T_POWER  = 20_000,
  parameter int unsigned T_RP     = 2,
  parameter int unsigned T_RFC    = 7,
  parameter int unsigned T_MRD    = 2,
  parameter int unsigned AREF_NUM = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  output sdram_cmd_t  init_cmd,
  output logic [1:0]  init_ba,
  output logic [12:0] init_addr,
  output logic        init_end
);

  typedef enum logic [2:0] {I_WAIT, I_PRE, I_TRP, I_AREF, I_TRFC, I_LMR, I_TMRD, I_END} init_state_t;
  init_state_t  state;
  logic [15:0]  cnt;
  logic [3:0]   aref_cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= I_WAIT;
      cnt      <= '0;
      aref_cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      unique case (state)
        I_WAIT: if (cnt == 16'(T_POWER - 1)) begin state <= I_PRE; cnt <= '0; end
        I_PRE:  begin state <= I_TRP; cnt <= '0; end
        I_TRP:  if (cnt == 16'(T_RP - 1)) begin state <= I_AREF; cnt <= '0; end
        I_AREF: begin state <= I_TRFC; cnt <= '0; aref_cnt <= aref_cnt + 1'b1; end
        I_TRFC: if (cnt == 16'(T_RFC - 1)) begin
                  state <= (aref_cnt == 4'(AREF_NUM)) ? I_LMR : I_AREF;
                  cnt   <= '0;
                end
        I_LMR:  begin state <= I_TMRD; cnt <= '0; end
        I_TMRD: if (cnt == 16'(T_MRD - 1)) state <= I_END;
        I_END:  cnt <= cnt;
        default: state <= I_WAIT;
      endcase
    end

  always_comb begin
    init_cmd  = CMD_NOP;
    init_ba   = 2'b11;
    init_addr = 13'h1FFF;
    unique case (state)
      I_PRE:  init_cmd = CMD_PRE;
      I_AREF: init_cmd = CMD_AREF;
      I_LMR:  begin
                init_cmd  = CMD_LMR;
                init_ba   = 2'b00;
                init_addr = MODE_REG;
              end
      default: ;
    endcase
  end

  assign init_end = (state == I_END);

endmodule
