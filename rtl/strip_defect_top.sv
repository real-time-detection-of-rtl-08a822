// strip_defect_top: real-time strip-steel surface defect edge detector.
//
// Data path (one frame store, four clock domains):
//   clk_50m   ov5640_cfg + iic_ctrl configure the camera over SCCB/IIC.
//   cam_pclk  ov5640_data assembles RGB565 pixels from the DVP bytes,
//             rgb2gray turns them into 8-bit gray, canny_pipe (adaptive
//             median filter, four-direction Sobel, adaptive double
//             threshold, non-maximum suppression, hysteresis) produces a
//             binary edge map, written as 16'hFFFF / 16'h0000 into the
//             write FIFO of sdram_top.
//   clk_100m  sdram_top stores the frame in SDRAM and prefetches it into
//             its read FIFO.
//   clk_25m   vga_ctrl pulls the frame out of the read FIFO and drives the
//             VGA sync signals and RGB565 pixels.
// The clocks come from the FPGA's PLL, outside this module. The block
// chain is the documented system; the edge map is displayed shifted by
// five pixels right and down, the lag of the streaming window stages.
//
// rst_n is asynchronous for all domains. The display side is held in reset
// until the SDRAM is initialised, so the first frame read starts at the
// frame's first word. IMG_W x IMG_H must equal the active VGA area.
// SDA is open drain: sccb_sda_oe = 1 pulls the line low. sdram_cke (1),
// sdram_dqm (0) and sdram_cs_n (0) are constant by design: no power-down,
// no byte masking, and idle SDRAM clocks are NOP.
module strip_defect_top #(
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BACK   = 40,
  parameter int unsigned H_LEFT   = 8,
  parameter int unsigned IMG_W    = 640,
  parameter int unsigned H_RIGHT  = 8,
  parameter int unsigned H_FRONT  = 8,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BACK   = 25,
  parameter int unsigned V_TOP    = 8,
  parameter int unsigned IMG_H    = 480,
  parameter int unsigned V_BOTTOM = 8,
  parameter int unsigned V_FRONT  = 2,
  parameter int unsigned SYS_CLK_FREQ = 50_000_000,
  parameter int unsigned SCL_FREQ     = 250_000,
  parameter int unsigned CFG_WAIT     = 50_000,
  parameter int unsigned T_POWER      = 20_000,
  parameter int unsigned T_REF        = 750,
  parameter int unsigned BURST_LEN    = 512,
  parameter int unsigned FIFO_AW      = 10
) (
  input  logic        clk_50m,
  input  logic        clk_100m,
  input  logic        clk_25m,
  input  logic        rst_n,
  // camera
  input  logic        cam_pclk,
  input  logic        cam_vsync,
  input  logic        cam_href,
  input  logic [7:0]  cam_data,
  output logic        sccb_scl,
  output logic        sccb_sda_oe,
  input  logic        sccb_sda_i,
  output logic        cfg_done,
  // SDRAM
  output logic        sdram_cke,
  output logic        sdram_cs_n,
  output logic        sdram_ras_n,
  output logic        sdram_cas_n,
  output logic        sdram_we_n,
  output logic [1:0]  sdram_ba,
  output logic [12:0] sdram_addr,
  output logic [1:0]  sdram_dqm,
  output logic [15:0] sdram_dq_o,
  output logic        sdram_dq_oe,
  input  logic [15:0] sdram_dq_i,
  // VGA
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic [15:0] vga_rgb
);

  // ---- camera configuration (clk_50m) ------------------------------------
  logic        iic_start, iic_end, ack_err, iic_busy;
  logic [15:0] cfg_addr;
  logic [7:0]  cfg_data, iic_rd_data;
  logic [3:0]  cfg_idx;

  ov5640_cfg #(.POWER_UP_WAIT(CFG_WAIT)) u_cfg (
    .clk(clk_50m), .rst_n, .iic_start, .byte_addr(cfg_addr), .wr_data(cfg_data),
    .iic_end, .ack_err, .cfg_done, .reg_idx(cfg_idx));

  iic_ctrl #(.SYS_CLK_FREQ(SYS_CLK_FREQ), .SCL_FREQ(SCL_FREQ)) u_iic (
    .clk(clk_50m), .rst_n, .iic_start, .wr_en(1'b1), .rd_en(1'b0), .addr_num(1'b1),
    .byte_addr(cfg_addr), .wr_data(cfg_data), .rd_data(iic_rd_data), .iic_end, .ack_err,
    .busy(iic_busy), .scl(sccb_scl), .sda_oe(sccb_sda_oe), .sda_i(sccb_sda_i));

  // ---- capture and edge detection (cam_pclk) -----------------------------
  logic        cap_valid, cap_sof;
  logic [15:0] cap_rgb565;
  ov5640_data u_cap (
    .cam_pclk, .rst_n, .cfg_done, .cam_vsync, .cam_href, .cam_data,
    .pix_valid(cap_valid), .pix_sof(cap_sof), .pix_data(cap_rgb565));

  // RGB565 to RGB888 by repeating the top bits
  logic [23:0] cap_rgb888;
  assign cap_rgb888 = {cap_rgb565[15:11], cap_rgb565[15:13],
                       cap_rgb565[10:5],  cap_rgb565[10:9],
                       cap_rgb565[4:0],   cap_rgb565[4:2]};

  logic       gray_valid, gray_sof;
  logic [7:0] gray;
  rgb2gray u_gray (
    .clk(cam_pclk), .rst_n, .in_valid(cap_valid), .in_sof(cap_sof), .in_rgb(cap_rgb888),
    .out_valid(gray_valid), .out_sof(gray_sof), .gray);

  logic       edge_valid, edge_sof, med_valid;
  logic [7:0] edge_pix, med_pix;
  canny_pipe #(.IMG_W(IMG_W)) u_canny (
    .clk(cam_pclk), .rst_n, .in_valid(gray_valid), .in_sof(gray_sof), .in_gray(gray),
    .out_valid(edge_valid), .out_sof(edge_sof), .edge_pix,
    .med_valid, .med_pix);

  // ---- frame store (clk_100m) ------------------------------------------------
  logic        init_end, wr_fifo_full, rd_fifo_empty, rd_req;
  logic [15:0] rd_data;

  sdram_top #(.FRAME_WORDS(IMG_W * IMG_H), .FIFO_AW(FIFO_AW),
              .T_POWER(T_POWER), .T_REF(T_REF)) u_sdram (
    .sys_clk(clk_100m), .sys_rst_n(rst_n),
    .wr_burst_len(10'(BURST_LEN)), .rd_burst_len(10'(BURST_LEN)),
    .wr_fifo_wr_clk(cam_pclk), .wr_fifo_wr_req(edge_valid),
    .wr_fifo_wr_data({16{edge_pix[7]}}), .sdram_wr_b_addr(24'd0), .wr_fifo_full,
    .rd_fifo_rd_clk(clk_25m), .rd_fifo_rd_req(rd_req), .rd_fifo_rd_data(rd_data),
    .rd_fifo_empty, .sdram_rd_b_addr(24'd0), .read_valid(init_end), .init_end,
    .sdram_cke, .sdram_cs_n, .sdram_ras_n, .sdram_cas_n, .sdram_we_n,
    .sdram_ba, .sdram_addr, .sdram_dqm, .sdram_dq_o, .sdram_dq_oe, .sdram_dq_i);

  // ---- display (clk_25m) -----------------------------------------------------
  logic [1:0] vga_start;
  always_ff @(posedge clk_25m or negedge rst_n)
    if (!rst_n) vga_start <= '0;
    else        vga_start <= {vga_start[0], init_end};

  vga_ctrl #(.H_SYNC(H_SYNC), .H_BACK(H_BACK), .H_LEFT(H_LEFT), .H_VALID(IMG_W),
             .H_RIGHT(H_RIGHT), .H_FRONT(H_FRONT), .V_SYNC(V_SYNC), .V_BACK(V_BACK),
             .V_TOP(V_TOP), .V_VALID(IMG_H), .V_BOTTOM(V_BOTTOM), .V_FRONT(V_FRONT)) u_vga (
    .vga_clk(clk_25m), .sys_rst_n(vga_start[1]), .pix_data(rd_data),
    .hsync(vga_hsync), .vsync(vga_vsync), .pix_data_req(rd_req), .rgb(vga_rgb));

endmodule
