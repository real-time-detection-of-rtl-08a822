// tb_strip_defect_full: the detector at its real size, with the top-level
// parameters left at their defaults (640 x 480 picture, standard VGA
// timing, 50 MHz IIC clock with 250 kHz SCL, 1 ms camera power-up wait,
// 200 us SDRAM power-up, 512-word bursts).
//
// Clocks as on the board: 50, 100 and 25 MHz from the PLL, the camera pixel
// clock at 72 MHz. The camera model repeats one 640 x 480 test picture; the
// SDRAM model checks every command. After two camera frames have been
// stored, the next whole VGA frame (800 x 525 clocks) is captured and
// compared pixel by pixel with the reference edge map, together with the
// sync pulse widths. Also checked: nine configuration writes, refreshes,
// write and read bursts seen, no read from the empty display FIFO and no
// SDRAM protocol error.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_strip_defect_full;
  import canny_ref_pkg::*;
  localparam int W = 640, H = 480;
  localparam int HS = 96, HBK = 40, HL = 8, VS = 2, VBK = 25, VT = 8;
  localparam int HT = 800, VT_ALL = 525;

  logic clk_50m = 0, clk_100m = 0, clk_25m = 0, pclk = 0, rst_n = 1;
  logic cam_vsync, cam_href, cam_en = 0;
  logic [7:0] cam_data;
  logic scl, m_oe, s_oe, sda, cfg_done;
  logic cke, cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba, dqm;
  logic [12:0] addr;
  logic [15:0] dq_o, dq_i;
  logic hsync, vsync;
  logic [15:0] rgb;
  int checks = 0, failures = 0, n_underflow = 0, n_edge_shown = 0;

  initial #1 rst_n = 0;
  always #10    clk_50m = !clk_50m;
  always #5     clk_100m = !clk_100m;
  always #20    clk_25m = !clk_25m;
  always #6.944 pclk = !pclk;
  assign sda = !(m_oe || s_oe);

  strip_defect_top dut (
    .clk_50m, .clk_100m, .clk_25m, .rst_n, .cam_pclk(pclk), .cam_vsync, .cam_href, .cam_data,
    .sccb_scl(scl), .sccb_sda_oe(m_oe), .sccb_sda_i(sda), .cfg_done,
    .sdram_cke(cke), .sdram_cs_n(cs_n), .sdram_ras_n(ras_n), .sdram_cas_n(cas_n), .sdram_we_n(we_n),
    .sdram_ba(ba), .sdram_addr(addr), .sdram_dqm(dqm), .sdram_dq_o(dq_o), .sdram_dq_oe(dq_oe),
    .sdram_dq_i(dq_i), .vga_hsync(hsync), .vga_vsync(vsync), .vga_rgb(rgb));

  iic_slave_model #(.DEV_ADDR(7'b1010_000), .ADDR16(1'b1)) cam_sccb (
    .clk(clk_50m), .scl, .sda, .nack(1'b0), .sda_oe(s_oe));
  ov5640_dvp_model #(.W(W), .H(H), .HB(100), .VS(4), .VB(8), .STILL(1)) cam (
    .cam_pclk(pclk), .enable(cam_en), .cam_vsync, .cam_href, .cam_data);
  sdram_model #(.T_POWER(20_000)) mem (.clk(clk_100m), .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .addr, .dqm,
                                       .dq_in(dq_o), .dq_oe, .dq_out(dq_i));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk_25m) if (dut.rd_req && dut.rd_fifo_empty && cam.frames >= 2) n_underflow++;

  canny_model m;

  initial begin
    m = new(W, H);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) m.gray[r][c] = gray_of(test_rgb565(0, r, c, W, H));
    m.run();
    repeat (3) @(posedge clk_50m);
    rst_n = 1;
    wait (cfg_done);
    check(cam_sccb.wr_count == 9, $sformatf("configuration writes %0d", cam_sccb.wr_count));
    cam_en = 1;
    wait (cam.frames == 2);
    @(negedge vsync);
    capture_frame();
    $display("SDRAM: AREF %0d WRITE %0d READ %0d, edge pixels shown %0d, time %0t",
             mem.n_aref, mem.n_wr, mem.n_rd, n_edge_shown, $time);
    check(mem.n_aref > 0 && mem.n_wr > 0 && mem.n_rd > 0, "refresh, write and read seen");
    check(n_edge_shown > 0, "edges shown");
    check(n_underflow == 0, $sformatf("display FIFO underflows %0d", n_underflow));
    check(mem.errors == 0, "no SDRAM protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic capture_frame();
    automatic int mism = 0, hs_low = 0, vs_bad = 0;
    for (int v = 0; v < VT_ALL; v++)
      for (int h = 0; h < HT; h++) begin
        automatic bit act = (h >= HS + HBK + HL) && (h < HS + HBK + HL + W) &&
                            (v >= VS + VBK + VT) && (v < VS + VBK + VT + H);
        automatic int n = (v - VS - VBK - VT) * W + (h - HS - HBK - HL);
        automatic logic [15:0] exp = (act && m.expect_edge(n) != 0) ? 16'hFFFF : 16'h0000;
        @(negedge clk_25m);
        if (!hsync) hs_low++;
        if (vsync != !(v < VS)) vs_bad++;
        if (rgb != exp) begin
          if (mism < 10) $display("FAIL: pixel line %0d col %0d: %h expected %h", v, h, rgb, exp);
          mism++;
        end
        if (act && rgb == 16'hFFFF) n_edge_shown++;
      end
    check(mism == 0, $sformatf("%0d pixels differ", mism));
    check(hs_low == VT_ALL * HS, $sformatf("hsync low %0d clocks", hs_low));
    check(vs_bad == 0, $sformatf("vsync wrong on %0d clocks", vs_bad));
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
