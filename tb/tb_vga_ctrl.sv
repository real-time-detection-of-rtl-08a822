// tb_vga_ctrl: two full 640x480 frames with the standard timing. Per line:
// 800 clocks, hsync low for exactly 96 of them; per frame: 525 lines, vsync
// low for 2 lines; pix_data_req high for exactly 640 x 480 clocks, forming
// 480 runs of 640; rgb equals pix_data (the test colour 16'h5535) while
// requested and 0 elsewhere.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_vga_ctrl;
  logic clk = 0, rst_n = 1, hsync, vsync, req;
  logic [15:0] rgb;
  int checks = 0, failures = 0;
  int cyc = 0, hs_low = 0, vs_low = 0, n_req = 0, run = 0, runs = 0, bad_runs = 0, bad_rgb = 0;
  int hs_fall_last = -1, bad_line = 0, vs_fall_last = -1, n_frames = 0, bad_frame = 0;
  logic hs_q = 0, vs_q = 0;  // the counters start inside both sync pulses

  initial #1 rst_n = 0;
  always #20 clk = !clk;
  vga_ctrl dut (.vga_clk(clk), .sys_rst_n(rst_n), .pix_data(16'h5535), .hsync, .vsync, .pix_data_req(req), .rgb);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (!hsync) hs_low++;
    if (hs_q && !hsync) begin
      if (hs_fall_last >= 0 && cyc - hs_fall_last != 800) bad_line++;
      hs_fall_last = cyc;
    end
    if (vs_q && !vsync) begin
      if (vs_fall_last >= 0 && cyc - vs_fall_last != 800 * 525) bad_frame++;
      vs_fall_last = cyc;
      n_frames++;
    end
    if (!vsync) vs_low++;
    hs_q = hsync; vs_q = vsync;
    if (req) begin n_req++; run++; if (rgb != 16'h5535) bad_rgb++; end
    else begin
      if (rgb != 0) bad_rgb++;
      if (run != 0) begin runs++; if (run != 640) bad_runs++; run = 0; end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (cyc == 2 * 800 * 525);
    #1;
    check(cyc == 2 * 800 * 525, $sformatf("clock count %0d", cyc));
    check(hs_low == 2 * 525 * 96, $sformatf("hsync low clocks %0d", hs_low));
    check(vs_low == 2 * 2 * 800, $sformatf("vsync low clocks %0d", vs_low));
    check(n_req == 2 * 640 * 480, $sformatf("requests %0d", n_req));
    check(runs == 2 * 480 && bad_runs == 0, $sformatf("request runs %0d, wrong length %0d", runs, bad_runs));
    check(bad_rgb == 0, $sformatf("rgb wrong on %0d clocks", bad_rgb));
    check(bad_line == 0 && hs_fall_last > 0, $sformatf("line period 800, wrong %0d", bad_line));
    check(bad_frame == 0 && n_frames >= 1, $sformatf("frame period, wrong %0d frames %0d", bad_frame, n_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
