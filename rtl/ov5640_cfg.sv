// ov5640_cfg: camera register configuration sequencer.
//
// After reset it waits POWER_UP_WAIT clk cycles for the sensor to come up,
// then writes the entries of a small register table one after another
// through iic_ctrl (single-byte writes at 16-bit register addresses). An
// entry whose write is not acknowledged is retried. cfg_done rises after the
// last entry and stays high.
//
// The table selects what the capture path expects: RGB565 pixels on the
// 8-bit DVP port and a 640x480 output window. Its register addresses and
// values come from the sensor's public register map, not from the system
// description, which names this block without listing its table; a full
// bring-up table (PLL, ISP, exposure settings) would be appended here.
//
// Interface: iic_start/byte_addr/wr_data drive iic_ctrl; iic_end and
// ack_err come back from it. Timing: one entry per IIC transfer, no gap.
//
// Bits of byte_addr and wr_data that are equal in every table entry (for
// example address bit 15) are constant outputs; they change when the table
// does.
module ov5640_cfg #(
  parameter int unsigned POWER_UP_WAIT = 50_000   // 1 ms at 50 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        iic_start,
  output logic [15:0] byte_addr,
  output logic [7:0]  wr_data,
  input  logic        iic_end,
  input  logic        ack_err,
  output logic        cfg_done,
  output logic [3:0]  reg_idx       // entry being written (status)
);

  localparam int unsigned REG_NUM = 8;
  localparam int unsigned WAIT_W  = $clog2(POWER_UP_WAIT + 2);

  // {register address, value}
  function automatic logic [23:0] cfg_entry(input logic [3:0] i);
    unique case (i)
      4'd0:    return {16'h3103, 8'h11};   // system clock from pad
      4'd1:    return {16'h3008, 8'h42};   // power down during setup
      4'd2:    return {16'h4300, 8'h61};   // output format RGB565
      4'd3:    return {16'h501F, 8'h01};   // ISP format RGB
      4'd4:    return {16'h3808, 8'h02};   // DVP output width  = 640
      4'd5:    return {16'h3809, 8'h80};
      4'd6:    return {16'h380A, 8'h01};   // DVP output height = 480
      default: return (i == 4'd7) ? {16'h380B, 8'hE0} : {16'h3008, 8'h02};
    endcase
  endfunction

  typedef enum logic [1:0] {S_WAIT, S_START, S_BUSY, S_DONE} cfg_state_t;
  cfg_state_t        state;
  logic [WAIT_W-1:0] wait_cnt;
  logic [3:0]        idx;

  assign reg_idx  = idx;
  assign cfg_done = (state == S_DONE);
  assign {byte_addr, wr_data} = cfg_entry(idx);
  assign iic_start = (state == S_START);

  // The wake-up write (3008 = 02) is the final entry, index REG_NUM.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= S_WAIT;
      wait_cnt <= '0;
      idx      <= '0;
    end else begin
      unique case (state)
        S_WAIT:  if (wait_cnt == WAIT_W'(POWER_UP_WAIT)) state <= S_START;
                 else wait_cnt <= wait_cnt + 1'b1;
        S_START: state <= S_BUSY;
        S_BUSY:  if (iic_end) begin
                   if (ack_err)                 state <= S_START;   // retry
                   else if (idx == 4'(REG_NUM)) state <= S_DONE;
                   else begin
                     idx   <= idx + 4'd1;
                     state <= S_START;
                   end
                 end
        S_DONE:  ;
        default: state <= S_WAIT;
      endcase
    end

endmodule
