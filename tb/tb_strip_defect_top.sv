// tb_strip_defect_top: end-to-end test of the whole detector at a reduced
// picture size (32 x 24, short VGA blanking, fast IIC, short SDRAM power-up).
//
// Around the top: an IIC slave at the configured device address (it refuses
// the first transfers, so the configuration has to retry), the camera DVP
// model sending the same test picture frame after frame once configured,
// and the SDRAM model checking every command. The reference model computes
// the edge map of that picture; once three camera frames have been taken
// and one further VGA frame has passed, a whole VGA frame is captured from the
// output and compared pixel by pixel (16'hFFFF for an edge, 0 otherwise),
// including the blanking (rgb 0) and the sync pulse widths.
//
// Every mechanism is counted and each count must be non-zero: IIC retries,
// configuration writes, the four branches of the adaptive median filter,
// hysteresis promotions, SDRAM refreshes, write and read bursts, bursts cut
// at a row end, requests kept waiting by the arbiter, edge pixels shown.
// A read from the empty display FIFO is counted as a failure.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_strip_defect_top;
  import canny_ref_pkg::*;
  localparam int W = 32, H = 24, FRAMES = 3;
  localparam int HS = 4, HBK = 4, HL = 2, HR = 2, HF = 2, VS = 2, VBK = 2, VT = 1, VBT = 1, VF = 1;
  localparam int HT = HS + HBK + HL + W + HR + HF, VT_ALL = VS + VBK + VT + H + VBT + VF;

  logic clk_50m = 0, clk_100m = 0, clk_25m = 0, pclk = 0, rst_n = 1;
  logic cam_vsync, cam_href, cam_en = 0;
  logic [7:0] cam_data;
  logic scl, m_oe, s_oe, sda, nack = 1, cfg_done;
  logic cke, cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba, dqm;
  logic [12:0] addr;
  logic [15:0] dq_o, dq_i;
  logic hsync, vsync;
  logic [15:0] rgb;
  int checks = 0, failures = 0;
  int n_retry = 0, n_amf [4] = '{0, 0, 0, 0}, n_prom = 0, n_cut = 0, n_wait = 0, n_underflow = 0;
  int n_edge_shown = 0;

  initial #1 rst_n = 0;
  always #10 clk_50m = !clk_50m;
  always #5  clk_100m = !clk_100m;
  always #20 clk_25m = !clk_25m;
  always #7  pclk = !pclk;
  assign sda = !(m_oe || s_oe);

  strip_defect_top #(
    .H_SYNC(HS), .H_BACK(HBK), .H_LEFT(HL), .IMG_W(W), .H_RIGHT(HR), .H_FRONT(HF),
    .V_SYNC(VS), .V_BACK(VBK), .V_TOP(VT), .IMG_H(H), .V_BOTTOM(VBT), .V_FRONT(VF),
    .SYS_CLK_FREQ(4_000_000), .SCL_FREQ(250_000), .CFG_WAIT(20), .T_POWER(200), .T_REF(750),
    .BURST_LEN(48), .FIFO_AW(7)) dut (
    .clk_50m, .clk_100m, .clk_25m, .rst_n, .cam_pclk(pclk), .cam_vsync, .cam_href, .cam_data,
    .sccb_scl(scl), .sccb_sda_oe(m_oe), .sccb_sda_i(sda), .cfg_done,
    .sdram_cke(cke), .sdram_cs_n(cs_n), .sdram_ras_n(ras_n), .sdram_cas_n(cas_n), .sdram_we_n(we_n),
    .sdram_ba(ba), .sdram_addr(addr), .sdram_dqm(dqm), .sdram_dq_o(dq_o), .sdram_dq_oe(dq_oe),
    .sdram_dq_i(dq_i), .vga_hsync(hsync), .vga_vsync(vsync), .vga_rgb(rgb));

  iic_slave_model #(.DEV_ADDR(7'b1010_000), .ADDR16(1'b1)) cam_sccb (
    .clk(clk_50m), .scl, .sda, .nack, .sda_oe(s_oe));
  ov5640_dvp_model #(.W(W), .H(H), .HB(20), .VS(2), .VB(2), .STILL(1)) cam (
    .cam_pclk(pclk), .enable(cam_en), .cam_vsync, .cam_href, .cam_data);
  sdram_model #(.T_POWER(200)) mem (.clk(clk_100m), .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .addr, .dqm,
                                    .dq_in(dq_o), .dq_oe, .dq_out(dq_i));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- mechanism counters ----
  always @(posedge clk_50m) if (dut.ack_err && dut.iic_end) n_retry++;
  always @(posedge pclk) begin
    if (dut.u_canny.m_v && dut.u_canny.m_ok) n_amf[dut.u_canny.m_sel]++;
    if (dut.u_canny.h_prom) n_prom++;
  end
  always @(posedge clk_100m) begin
    if (dut.u_sdram.sdram_wr_req && !$past(dut.u_sdram.sdram_wr_req) && dut.u_sdram.wr_len < 48 &&
        32'(dut.u_sdram.sdram_wr_addr) + 32'(dut.u_sdram.wr_len) < W * H) n_cut++;
    if ((dut.u_sdram.sdram_wr_req || dut.u_sdram.sdram_rd_req) &&
        (dut.u_sdram.u_sdram_ctrl.aref_en || dut.u_sdram.u_sdram_ctrl.wr_en || dut.u_sdram.u_sdram_ctrl.rd_en) &&
        !dut.u_sdram.sdram_wr_ack && !dut.u_sdram.sdram_rd_ack) n_wait++;
  end
  always @(posedge clk_25m) if (dut.rd_req && dut.rd_fifo_empty && cam.frames >= FRAMES) n_underflow++;

  // ---- stimulus and frame check ----
  canny_model m;
  int write_done_t;

  initial begin
    m = new(W, H);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) m.gray[r][c] = gray_of(test_rgb565(0, r, c, W, H));
    m.run();
    repeat (3) @(posedge clk_50m);
    rst_n = 1;
    // the camera refuses its address for the first transfers
    wait (n_retry >= 2);
    nack = 0;
    wait (cfg_done);
    check(cam_sccb.wr_count == 9, $sformatf("configuration writes %0d", cam_sccb.wr_count));
    check(cam_sccb.mem[16'h3008] == 8'h02 && cam_sccb.mem[16'h4300] == 8'h61 && cam_sccb.mem[16'h380B] == 8'hE0,
          "register values in the camera");
    cam_en = 1;
    wait (cam.frames == FRAMES);
    // the whole frame store now holds the picture; one VGA frame later
    // nothing older is left in the read FIFO
    @(negedge vsync);
    @(negedge vsync);
    capture_frame();
    $display("IIC retries %0d, AMF branches %0d/%0d/%0d/%0d, promotions %0d", n_retry,
             n_amf[0], n_amf[1], n_amf[2], n_amf[3], n_prom);
    $display("SDRAM: AREF %0d WRITE %0d READ %0d, row cuts %0d, arbitration waits %0d, edge pixels shown %0d",
             mem.n_aref, mem.n_wr, mem.n_rd, n_cut, n_wait, n_edge_shown);
    check(n_retry > 0, "IIC retry seen");
    for (int s = 0; s < 4; s++) check(n_amf[s] > 0, $sformatf("AMF branch %0d seen", s));
    check(n_prom > 0, "hysteresis promotion seen");
    check(mem.n_aref > 0 && mem.n_wr > 0 && mem.n_rd > 0, "refresh, write and read seen");
    check(n_cut > 0, "row-end burst cut seen");
    check(n_wait > 0, "arbitration wait seen");
    check(n_edge_shown > 0, "edges shown");
    check(n_underflow == 0, $sformatf("display FIFO underflows %0d", n_underflow));
    check(mem.errors == 0, "no SDRAM protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One VGA frame starting at the vsync fall: sample every clock.
  task automatic capture_frame();
    automatic int mism = 0, hs_low = 0;
    for (int v = 0; v < VT_ALL; v++)
      for (int h = 0; h < HT; h++) begin
        automatic bit act = (h >= HS + HBK + HL) && (h < HS + HBK + HL + W) &&
                            (v >= VS + VBK + VT) && (v < VS + VBK + VT + H);
        automatic int n = (v - VS - VBK - VT) * W + (h - HS - HBK - HL);
        automatic logic [15:0] exp = (act && m.expect_edge(n) != 0) ? 16'hFFFF : 16'h0000;
        @(negedge clk_25m);
        if (!hsync) hs_low++;
        check(vsync == !(v < VS), $sformatf("vsync at line %0d", v));
        if (rgb != exp) begin
          if (mism < 10) $display("FAIL: pixel line %0d col %0d: %h expected %h", v, h, rgb, exp);
          mism++;
        end
        if (act && rgb == 16'hFFFF) n_edge_shown++;
      end
    check(mism == 0, $sformatf("%0d pixels differ", mism));
    check(hs_low == VT_ALL * HS, $sformatf("hsync low %0d clocks", hs_low));
  endtask

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
