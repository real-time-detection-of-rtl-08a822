// iic_ctrl: IIC / SCCB bus master for camera register access.
//
// One transfer is either a single-byte write or a random single-byte read
// at an 8- or 16-bit register address. A 16-state machine walks the bus
// phases: IDLE, START_1, SEND_D_ADDR, ACK_1, SEND_B_ADDR_H, ACK_2,
// SEND_B_ADDR_L, ACK_3, WR_DATA, ACK_4, START_2, SEND_RD_ADDR, ACK_5,
// RD_DATA, N_ACK, STOP. The state names, their order and the branch
// conditions (addr_num selects the 16-bit address path, wr_en / rd_en pick
// the branch after ACK_3, a missing acknowledge returns to IDLE) follow the
// documented state machine; the bit-level waveform is this design's own.
//
// Timing: every bus bit is four quarter-periods of SCL, counted by
// cnt_iic_clk 0..3. A quarter lasts SYS_CLK_FREQ/(4*SCL_FREQ) clk cycles.
// Within a data bit SCL is low in quarter 0 (SDA changes there), high in
// quarters 1 and 2 (SDA sampled at the end of quarter 2) and low in quarter 3.
// START: SDA falls while SCL is high (quarter 2). STOP: SDA rises while SCL
// is high (quarter 2). SDA is open drain: sda_oe=1 pulls the line low,
// sda_oe=0 releases it; sda_i is the line as seen on the pin.
//
// Interface: pulse iic_start for one clk with wr_en or rd_en, addr_num,
// byte_addr and wr_data valid; they are captured. iic_end pulses for one
// clk when the transfer has ended, together with ack_err=1 if a slave
// acknowledge was missing (the transfer was then abandoned) and, for a read,
// rd_data holding the byte read. busy is high from iic_start to iic_end.
module iic_ctrl #(
  parameter int unsigned SYS_CLK_FREQ = 50_000_000,
  parameter int unsigned SCL_FREQ     = 250_000,
  parameter logic [6:0]  DEVICE_ADDR  = 7'b1010_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        iic_start,
  input  logic        wr_en,
  input  logic        rd_en,
  input  logic        addr_num,     // 1: 16-bit register address, 0: 8-bit
  input  logic [15:0] byte_addr,
  input  logic [7:0]  wr_data,
  output logic [7:0]  rd_data,
  output logic        iic_end,
  output logic        ack_err,
  output logic        busy,
  output logic        scl,
  output logic        sda_oe,
  input  logic        sda_i
);

  localparam int unsigned QUARTER = (SYS_CLK_FREQ / (4 * SCL_FREQ)) > 0 ?
                                    (SYS_CLK_FREQ / (4 * SCL_FREQ)) : 1;
  localparam int unsigned DIV_W = $clog2(QUARTER + 1);

  typedef enum logic [3:0] {
    IDLE, START_1, SEND_D_ADDR, ACK_1, SEND_B_ADDR_H, ACK_2, SEND_B_ADDR_L,
    ACK_3, WR_DATA, ACK_4, START_2, SEND_RD_ADDR, ACK_5, RD_DATA, N_ACK, STOP
  } iic_state_t;

  iic_state_t         state, state_nx;
  logic [DIV_W-1:0]   div_cnt;
  logic               tick;            // end of a quarter period
  logic [1:0]         cnt_iic_clk;
  logic [2:0]         cnt_bit;
  logic               ack;             // sampled acknowledge (0 = ACK)
  logic               req_wr, req_rd, req_a16, start_req;
  logic [15:0]        req_addr;
  logic [7:0]         req_wdata, rd_shift;
  logic               scl_nx, sda_nx;  // sda_nx: 1 = released / high
  logic               bit_end;

  assign tick    = (div_cnt == DIV_W'(QUARTER - 1));
  assign bit_end = tick && (cnt_iic_clk == 2'd3);
  assign busy    = start_req || (state != IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) div_cnt <= '0;
    else        div_cnt <= tick ? '0 : div_cnt + 1'b1;

  // Capture the request.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      start_req <= 1'b0;
      req_wr    <= 1'b0;
      req_rd    <= 1'b0;
      req_a16   <= 1'b0;
      req_addr  <= '0;
      req_wdata <= '0;
    end else if (iic_start && state == IDLE && !start_req) begin
      start_req <= 1'b1;
      req_wr    <= wr_en;
      req_rd    <= rd_en;
      req_a16   <= addr_num;
      req_addr  <= byte_addr;
      req_wdata <= wr_data;
    end else if (tick && state == IDLE) begin
      start_req <= 1'b0;
    end

  // Next state, following the documented transition conditions.
  always_comb begin
    state_nx = state;
    unique case (state)
      IDLE:          if (tick && start_req) state_nx = START_1;
      START_1:       if (bit_end) state_nx = SEND_D_ADDR;
      SEND_D_ADDR:   if (bit_end && cnt_bit == 3'd7) state_nx = ACK_1;
      ACK_1:         if (bit_end) state_nx = ack ? IDLE : (req_a16 ? SEND_B_ADDR_H : SEND_B_ADDR_L);
      SEND_B_ADDR_H: if (bit_end && cnt_bit == 3'd7) state_nx = ACK_2;
      ACK_2:         if (bit_end) state_nx = ack ? IDLE : SEND_B_ADDR_L;
      SEND_B_ADDR_L: if (bit_end && cnt_bit == 3'd7) state_nx = ACK_3;
      ACK_3:         if (bit_end) state_nx = ack ? IDLE : (req_wr ? WR_DATA : (req_rd ? START_2 : STOP));
      WR_DATA:       if (bit_end && cnt_bit == 3'd7) state_nx = ACK_4;
      ACK_4:         if (bit_end) state_nx = ack ? IDLE : STOP;
      START_2:       if (bit_end) state_nx = SEND_RD_ADDR;
      SEND_RD_ADDR:  if (bit_end && cnt_bit == 3'd7) state_nx = ACK_5;
      ACK_5:         if (bit_end) state_nx = ack ? IDLE : RD_DATA;
      RD_DATA:       if (bit_end && cnt_bit == 3'd7) state_nx = N_ACK;
      N_ACK:         if (bit_end) state_nx = STOP;
      STOP:          if (bit_end) state_nx = IDLE;
      default:       state_nx = IDLE;
    endcase
  end

  function automatic logic is_ack_state(iic_state_t s);
    return s inside {ACK_1, ACK_2, ACK_3, ACK_4, ACK_5};
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state       <= IDLE;
      cnt_iic_clk <= '0;
      cnt_bit     <= '0;
      ack         <= 1'b1;
      rd_shift    <= '0;
      rd_data     <= '0;
      iic_end     <= 1'b0;
      ack_err     <= 1'b0;
    end else begin
      iic_end <= 1'b0;
      ack_err <= 1'b0;
      if (tick) begin
        state       <= state_nx;
        cnt_iic_clk <= (state == IDLE) ? 2'd0 : cnt_iic_clk + 2'd1;
        if (state != state_nx) cnt_bit <= '0;
        else if (cnt_iic_clk == 2'd3) cnt_bit <= cnt_bit + 3'd1;
        if (cnt_iic_clk == 2'd2) begin
          if (is_ack_state(state)) ack <= sda_i;
          if (state == RD_DATA)    rd_shift <= {rd_shift[6:0], sda_i};
        end
        if (bit_end && is_ack_state(state) && ack) begin
          iic_end <= 1'b1;
          ack_err <= 1'b1;
        end
        if (bit_end && state == STOP) begin
          iic_end <= 1'b1;
          rd_data <= rd_shift;
        end
      end
    end

  // Bus waveform per state and quarter.
  always_comb begin
    logic [7:0] tx;
    unique case (state)
      SEND_D_ADDR:   tx = {DEVICE_ADDR, 1'b0};
      SEND_RD_ADDR:  tx = {DEVICE_ADDR, 1'b1};
      SEND_B_ADDR_H: tx = req_addr[15:8];
      SEND_B_ADDR_L: tx = req_addr[7:0];
      WR_DATA:       tx = req_wdata;
      default:       tx = 8'hFF;
    endcase
    scl_nx = 1'b1;
    sda_nx = 1'b1;
    unique case (state)
      IDLE: ;
      START_1, START_2: begin
        scl_nx = (cnt_iic_clk != 2'd0) && (cnt_iic_clk != 2'd3);
        sda_nx = (cnt_iic_clk <= 2'd1);
      end
      STOP: begin
        scl_nx = (cnt_iic_clk != 2'd0);
        sda_nx = (cnt_iic_clk >= 2'd2);
      end
      ACK_1, ACK_2, ACK_3, ACK_4, ACK_5, RD_DATA, N_ACK: begin
        scl_nx = (cnt_iic_clk == 2'd1) || (cnt_iic_clk == 2'd2);
        sda_nx = 1'b1;
      end
      default: begin
        scl_nx = (cnt_iic_clk == 2'd1) || (cnt_iic_clk == 2'd2);
        sda_nx = tx[3'd7 - cnt_bit];
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      scl    <= 1'b1;
      sda_oe <= 1'b0;
    end else begin
      scl    <= scl_nx;
      sda_oe <= !sda_nx;
    end

endmodule
