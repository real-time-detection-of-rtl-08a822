// sdram_arbit: arbitration between initialisation, refresh, write and read.
//
// Until init_end the initialisation module owns the command bus. Afterwards
// the arbiter waits in IDLE for a request and grants, in fixed priority,
// refresh (data retention must not wait), then write (the camera FIFO must
// not overflow), then read. The grant (aref_en / wr_en / rd_en) is held
// until the granted module signals its end; the arbiter then returns to
// IDLE and looks at the requests again in the next clock. Requests arriving
// during a transfer wait for it to finish. The priority order is this
// design's choice. The command, bank and address buses are multiplexed
// from the owner; dq_oe and dq_o come only from the write module.
//
// dq_o is the write module's data passed on unchanged: only a write drives
// DQ, so there is nothing to select; dq_oe is what the arbiter gates.
module sdram_arbit
  import sdram_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init_end,
  input  sdram_cmd_t  init_cmd,
  input  logic [1:0]  init_ba,
  input  logic [12:0] init_addr,
  input  logic        aref_req,
  input  logic        aref_end,
  input  sdram_cmd_t  aref_cmd,
  input  logic [1:0]  aref_ba,
  input  logic [12:0] aref_addr,
  input  logic        wr_req,
  input  logic        wr_end,
  input  sdram_cmd_t  wr_cmd,
  input  logic [1:0]  wr_ba,
  input  logic [12:0] wr_addr,
  input  logic [15:0] wr_dq,
  input  logic        wr_dq_oe,
  input  logic        rd_req,
  input  logic        rd_end,
  input  sdram_cmd_t  rd_cmd,
  input  logic [1:0]  rd_ba,
  input  logic [12:0] rd_addr,
  output logic        aref_en,
  output logic        wr_en,
  output logic        rd_en,
  output sdram_cmd_t  cmd,
  output logic [1:0]  ba,
  output logic [12:0] addr,
  output logic [15:0] dq_o,
  output logic        dq_oe
);

  typedef enum logic [2:0] {ARB_INIT, ARB_IDLE, ARB_AREF, ARB_WRITE, ARB_READ} arb_state_t;
  arb_state_t state;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= ARB_INIT;
    else unique case (state)
      ARB_INIT:  if (init_end) state <= ARB_IDLE;
      ARB_IDLE:  if (aref_req)    state <= ARB_AREF;
                 else if (wr_req) state <= ARB_WRITE;
                 else if (rd_req) state <= ARB_READ;
      ARB_AREF:  if (aref_end) state <= ARB_IDLE;
      ARB_WRITE: if (wr_end)   state <= ARB_IDLE;
      ARB_READ:  if (rd_end)   state <= ARB_IDLE;
      default:   state <= ARB_INIT;
    endcase

  assign aref_en = (state == ARB_AREF);
  assign wr_en   = (state == ARB_WRITE);
  assign rd_en   = (state == ARB_READ);

  always_comb begin
    cmd   = CMD_NOP;
    ba    = 2'b11;
    addr  = 13'h1FFF;
    dq_o  = wr_dq;
    dq_oe = 1'b0;
    unique case (state)
      ARB_INIT:  begin cmd = init_cmd; ba = init_ba; addr = init_addr; end
      ARB_AREF:  begin cmd = aref_cmd; ba = aref_ba; addr = aref_addr; end
      ARB_WRITE: begin cmd = wr_cmd;   ba = wr_ba;   addr = wr_addr; dq_oe = wr_dq_oe; end
      ARB_READ:  begin cmd = rd_cmd;   ba = rd_ba;   addr = rd_addr; end
      default: ;
    endcase
  end

  // one owner at a time
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({aref_en, wr_en, rd_en}));

endmodule
