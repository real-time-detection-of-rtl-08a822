// tb_ov5640_cfg: the configuration sequencer drives iic_ctrl into a slave
// model. The first transfer is refused (NACK) to exercise the retry; the
// test then checks that all nine table entries arrive in order with the
// expected register addresses and values and that cfg_done rises.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_ov5640_cfg;
  logic clk = 0, rst_n = 0;
  logic iic_start, iic_end, ack_err, busy, cfg_done, scl, m_oe, s_oe, sda, nack = 1;
  logic [15:0] byte_addr;
  logic [7:0]  wr_data, rd_data;
  logic [3:0]  reg_idx;
  int checks = 0, failures = 0, retries = 0;

  assign sda = !(m_oe || s_oe);
  always #10 clk = !clk;

  ov5640_cfg #(.POWER_UP_WAIT(20)) dut (
    .clk, .rst_n, .iic_start, .byte_addr, .wr_data, .iic_end, .ack_err, .cfg_done, .reg_idx);
  iic_ctrl #(.SYS_CLK_FREQ(4_000_000), .SCL_FREQ(250_000)) u_iic (
    .clk, .rst_n, .iic_start, .wr_en(1'b1), .rd_en(1'b0), .addr_num(1'b1), .byte_addr,
    .wr_data, .rd_data, .iic_end, .ack_err, .busy, .scl, .sda_oe(m_oe), .sda_i(sda));
  iic_slave_model #(.DEV_ADDR(7'b1010_000), .ADDR16(1'b1)) slave (
    .clk, .scl, .sda, .nack, .sda_oe(s_oe));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (iic_end && ack_err) begin retries++; nack <= 1'b0; end

  // expected table: OV5640 register map values for RGB565, 640x480
  logic [15:0] exp_a [9] = '{16'h3103, 16'h3008, 16'h4300, 16'h501F, 16'h3808,
                             16'h3809, 16'h380A, 16'h380B, 16'h3008};
  logic [7:0]  exp_d [9] = '{8'h11, 8'h42, 8'h61, 8'h01, 8'h02, 8'h80, 8'h01, 8'hE0, 8'h02};

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    check(!cfg_done, "not done after reset");
    wait (cfg_done);
    repeat (10) @(posedge clk);
    check(retries == 1, $sformatf("one retry after NACK (%0d)", retries));
    check(slave.wr_count == 9, $sformatf("nine writes (%0d)", slave.wr_count));
    for (int i = 0; i < 9; i++) begin
      check(slave.wr_log_addr[i] == exp_a[i] && slave.wr_log_data[i] == exp_d[i],
            $sformatf("entry %0d: %h=%h", i, slave.wr_log_addr[i], slave.wr_log_data[i]));
    end
    check(!busy, "IIC idle after configuration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
