// tb_iic_ctrl: self-checking test of the IIC master against a slave model.
// Writes and reads back at a 16-bit and an 8-bit register address, checks
// the returned byte, the slave's memory, the SCL period (4 quarters of
// SYS_CLK_FREQ/(4*SCL_FREQ) clocks) and that a missing acknowledge ends the
// transfer with ack_err.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_iic_ctrl;
  localparam int unsigned SYS = 50_000_000, SCL = 250_000;
  logic clk = 0, rst_n = 0;
  logic iic_start = 0, wr_en = 0, rd_en = 0, addr_num = 1;
  logic [15:0] byte_addr = 0;
  logic [7:0]  wr_data = 0, rd_data;
  logic iic_end, ack_err, busy, scl, m_oe, s_oe, sda, nack = 0;
  int checks = 0, failures = 0;

  assign sda = !(m_oe || s_oe);
  always #10 clk = !clk;

  iic_ctrl #(.SYS_CLK_FREQ(SYS), .SCL_FREQ(SCL), .DEVICE_ADDR(7'b1010_000)) dut (
    .clk, .rst_n, .iic_start, .wr_en, .rd_en, .addr_num, .byte_addr, .wr_data,
    .rd_data, .iic_end, .ack_err, .busy, .scl, .sda_oe(m_oe), .sda_i(sda));
  iic_slave_model #(.DEV_ADDR(7'b1010_000), .ADDR16(1'b1)) slave16 (
    .clk, .scl, .sda, .nack, .sda_oe(s_oe));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input bit wr, input bit a16, input logic [15:0] a,
                      input logic [7:0] d, output bit err);
    @(posedge clk);
    wr_en <= wr; rd_en <= !wr; addr_num <= a16; byte_addr <= a; wr_data <= d;
    iic_start <= 1;
    @(posedge clk); iic_start <= 0;
    do @(posedge clk); while (!iic_end);
    err = ack_err;
  endtask

  // SCL period
  longint last_rise = -1, period = 0;
  longint cyc = 0;
  logic scl_d = 1;
  always @(posedge clk) begin
    cyc++;
    scl_d <= scl;
    if (scl && !scl_d) begin
      if (last_rise >= 0 && (cyc - last_rise) < 400) period = cyc - last_rise;
      last_rise = cyc;
    end
  end

  initial begin
    bit err;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // 16-bit address write then random read (values of the reference run)
    xfer(1, 1, 16'd13604, 8'd129, err);
    check(!err, "write acknowledged");
    check(slave16.mem[16'd13604] == 8'd129, "slave memory written");
    check(period == 4 * (SYS / (4 * SCL)), $sformatf("SCL period %0d", period));
    xfer(0, 1, 16'd13604, 8'd0, err);
    check(!err, "read acknowledged");
    check(rd_data == 8'd129, $sformatf("read back %0d", rd_data));
    // another location, preset by the model
    xfer(0, 1, 16'h0102, 8'd0, err);
    check(rd_data == 8'(16'h0102 * 7 + 3), "read of preset byte");
    // 8-bit address path: the 16-bit slave sees one address byte less,
    // so the data byte lands as the low address byte; check the bus count
    xfer(1, 0, 16'h0055, 8'hA5, err);
    check(!err, "8-bit address write acknowledged");
    check(slave16.starts == 6 && slave16.stops == 4, "START/STOP count");
    // missing acknowledge
    nack = 1;
    xfer(1, 1, 16'h0001, 8'h11, err);
    check(err, "missing ACK reported");
    check(slave16.mem[16'h0001] != 8'h11, "nothing written on NACK");
    nack = 0;
    repeat (400) @(posedge clk);
    check(!busy && scl, "bus idle after error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
