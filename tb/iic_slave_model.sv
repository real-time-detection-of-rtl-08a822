// iic_slave_model: behavioural IIC/SCCB slave for simulation.
//
// Behavioural model, not synthesizable. Watches scl and the wired-AND sda
// line on every clk edge (clk must be much faster than SCL), recognises
// START/STOP, matches DEV_ADDR, takes an 8- or 16-bit register address
// (ADDR16), stores written bytes in a 64 K byte array and returns them on
// reads. sda_oe = 1 pulls the line low. While nack is high the device
// address is not acknowledged. Every write is logged in wr_log_addr /
// wr_log_data (index wr_count).
//
// The protocol follows the IIC/SCCB description; the memory preset and the
// forced NACK input are test features of this model.
module iic_slave_model #(
  parameter logic [6:0] DEV_ADDR = 7'b1010_000,
  parameter bit         ADDR16   = 1'b1
) (
  input  logic clk,
  input  logic scl,
  input  logic sda,
  input  logic nack,
  output logic sda_oe
);
  typedef enum {P_IDLE, P_DEV, P_AH, P_AL, P_WD, P_RD} phase_t;
  phase_t      phase = P_IDLE;
  logic        scl_d = 1'b1, sda_d = 1'b1, rw = 1'b0;
  int          bitc = 0;
  logic [7:0]  shreg = '0, txbyte = '0;
  logic [15:0] regaddr = '0;
  logic [7:0]  mem [65536];
  logic [15:0] wr_log_addr [64];
  logic [7:0]  wr_log_data [64];
  int          wr_count = 0, starts = 0, stops = 0;

  initial begin
    sda_oe = 1'b0;
    for (int i = 0; i < 65536; i++) mem[i] = 8'(i * 7 + 3);
  end

  always @(posedge clk) begin
    scl_d <= scl;
    sda_d <= sda;
    if (scl && scl_d && sda_d && !sda) begin             // START
      phase <= P_DEV; bitc <= 0; sda_oe <= 1'b0; starts <= starts + 1;
    end else if (scl && scl_d && !sda_d && sda) begin    // STOP
      phase <= P_IDLE; sda_oe <= 1'b0; stops <= stops + 1;
    end else if (scl && !scl_d) begin                    // rising SCL
      if (phase inside {P_DEV, P_AH, P_AL, P_WD} && bitc < 8) begin
        shreg <= {shreg[6:0], sda};
        bitc  <= bitc + 1;
      end
    end else if (!scl && scl_d) begin                    // falling SCL
      if (phase == P_RD) begin
        if (bitc < 8) begin sda_oe <= !txbyte[7 - bitc]; bitc <= bitc + 1; end
        else begin sda_oe <= 1'b0; bitc <= bitc + 1; end
      end else if (phase != P_IDLE) begin
        if (bitc == 8) begin
          bitc <= 9;
          if (phase == P_DEV) begin
            if (shreg[7:1] == DEV_ADDR && !nack) begin sda_oe <= 1'b1; rw <= shreg[0]; end
            else phase <= P_IDLE;
          end else sda_oe <= 1'b1;
        end else if (bitc == 9) begin
          sda_oe <= 1'b0;
          bitc   <= 0;
          unique case (phase)
            P_DEV: if (rw) begin
                     phase  <= P_RD;
                     txbyte <= mem[regaddr];
                     sda_oe <= !mem[regaddr][7];
                     bitc   <= 1;
                   end else phase <= ADDR16 ? P_AH : P_AL;
            P_AH:  begin regaddr[15:8] <= shreg; phase <= P_AL; end
            P_AL:  begin regaddr <= ADDR16 ? {regaddr[15:8], shreg} : {8'h00, shreg}; phase <= P_WD; end
            P_WD:  begin
                     mem[regaddr] <= shreg;
                     if (wr_count < 64) begin
                       wr_log_addr[wr_count] <= regaddr;
                       wr_log_data[wr_count] <= shreg;
                     end
                     wr_count <= wr_count + 1;
                     regaddr  <= regaddr + 1'b1;
                   end
            default: ;
          endcase
        end
      end
    end
  end
endmodule
