// tb_hysteresis: every one of the 3**9 class windows is driven once and
// the edge output compared with the reference rule (strong, or weak with a
// strong neighbour); checks the one-clock latency and the promotion count.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_hysteresis;
  import canny_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0, in_ok = 1;
  logic [2:0][2:0][1:0] win;
  logic out_valid, out_sof, promoted;
  logic [7:0] edge_pix;
  int checks = 0, failures = 0, nprom = 0, eprom = 0;

  always #5 clk = !clk;
  hysteresis dut (.clk, .rst_n, .in_valid, .in_sof, .in_ok, .win, .out_valid, .out_sof, .edge_pix, .promoted);

  initial begin
    int k [3][3];
    int e, v;
    bit snb;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 19683; n++) begin
      v = n;
      snb = 0;
      for (int i = 0; i < 9; i++) begin
        k[i/3][i%3] = v % 3;
        v = v / 3;
        win[i/3][i%3] = 2'(k[i/3][i%3]);
        if (i != 4 && k[i/3][i%3] == 2) snb = 1;
      end
      e = hyst_ref(k);
      if (k[1][1] == 1 && snb) eprom++;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || edge_pix != 8'(e)) begin
        failures++; if (failures < 10) $display("FAIL: n %0d got %0d exp %0d", n, edge_pix, e);
      end
      if (promoted) nprom++;
    end
    checks++;
    if (nprom != eprom || nprom == 0) begin failures++; $display("FAIL: promoted %0d exp %0d", nprom, eprom); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
