// tb_canny_pipe: streams test images through the edge-detection pipeline
// and compares every output pixel with the reference model.
// Images: a bright rectangle and a diagonal bar on a textured background
// with salt-and-pepper noise; two frames back to back with random input
// gaps. Also checks one output per input, the frame marker position and
// that each adaptive-median branch and the hysteresis promotion occurred.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_canny_pipe;
  import canny_ref_pkg::*;
  localparam int W = 40, H = 30;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  logic [7:0] in_gray = 0;
  logic out_valid, out_sof, med_valid;
  logic [7:0] edge_pix, med_pix;
  int checks = 0, failures = 0, nout = 0, frame = 0, mism = 0;
  int sel_seen [4] = '{0, 0, 0, 0};
  int promoted = 0;
  canny_model m;

  always #5 clk = !clk;

  canny_pipe #(.IMG_W(W)) dut (.clk, .rst_n, .in_valid, .in_sof, .in_gray,
                               .out_valid, .out_sof, .edge_pix, .med_valid, .med_pix);

  always @(posedge clk) if (dut.u_amf.out_valid && dut.u_amf.out_ok) sel_seen[dut.u_amf.sel]++;
  always @(posedge clk) if (dut.u_hys.promoted) promoted++;

  function automatic int pixel(int f, int r, int c);
    int v = 60 + ((r * 7 + c * 3 + f * 11) % 23);          // texture
    if (r >= 8 && r < 20 && c >= 10 && c < 26) v = 190 + (c % 5);  // rectangle
    if (c - r == 5 || c - r == 6) v = 140;                  // diagonal bar
    if ((r * 31 + c * 17 + f) % 29 == 0) v = 255;           // salt
    if ((r * 13 + c * 37 + f) % 31 == 0) v = 0;             // pepper
    return v;
  endfunction

  // output checker
  always @(posedge clk) if (out_valid && rst_n && m != null) begin
    automatic int n = nout % (W * H);
    automatic int e = m.expect_edge(n);
    checks++;
    if ((n == 0) != out_sof) begin failures++; $display("FAIL: out_sof at %0d", n); end
    if (edge_pix != 8'(e)) begin
      failures++; mism++;
      if (mism < 10) $display("FAIL: frame %0d pix %0d (r%0d c%0d) got %0d exp %0d",
                              nout / (W*H), n, n / W, n % W, edge_pix, e);
    end
    nout++;
  end

  int edges_in_frame;
  initial begin
    m = new(W, H);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (frame = 0; frame < 2; frame++) begin
      // the checker uses m for the frame being output; frames are only
      // started once the previous one has fully come out
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) m.gray[r][c] = pixel(frame, r, c);
      m.run();
      edges_in_frame = 0;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) if (m.edg[r][c] != 0) edges_in_frame++;
      if (edges_in_frame < 20) begin failures++; $display("FAIL: test image has few edges"); end
      for (int n = 0; n < W * H; n++) begin
        @(posedge clk);
        in_valid <= 1; in_sof <= (n == 0); in_gray <= 8'(pixel(frame, n / W, n % W));
        if ($urandom_range(3) == 0) begin @(posedge clk); in_valid <= 0; in_sof <= 0; end
        @(posedge clk); in_valid <= 0; in_sof <= 0;
        #0;
      end
      repeat (20) @(posedge clk);
      checks++;
      if (nout != (frame + 1) * W * H) begin failures++; $display("FAIL: output count %0d", nout); end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (sel_seen[s] == 0) begin failures++; $display("FAIL: AMF branch %0d never taken", s); end
    end
    checks++;
    if (promoted == 0) begin failures++; $display("FAIL: no weak edge promoted"); end
    $display("AMF branches %0d %0d %0d %0d, promoted %0d", sel_seen[0], sel_seen[1], sel_seen[2], sel_seen[3], promoted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
