// tb_async_fifo: writer at 10 ns, reader at 7 ns (and then 23 ns), both
// with random enables. Every word read must be the next one written (a
// scoreboard queue), rd_data must be valid while empty is low (show-ahead),
// a write is never accepted while full, the counts never exceed the depth,
// and full and empty must each have been seen.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_async_fifo;
  localparam int AW = 4;
  logic wclk = 0, rclk = 0, rst_n = 1, wr_en = 0, rd_en = 0, full, empty;
  logic [15:0] wr_data = 0, rd_data;
  logic [AW:0] wr_count, rd_count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_rd = 0, n_wr = 0;
  int rper = 7;
  bit stop = 0;
  logic [15:0] q [$];

  initial #1 rst_n = 0;
  always #5 wclk = !wclk;
  always #(rper) rclk = !rclk;
  async_fifo #(.DW(16), .AW(AW)) dut (.rst_n, .wr_clk(wclk), .wr_en, .wr_data, .full, .wr_count,
                                      .rd_clk(rclk), .rd_en, .rd_data, .empty, .rd_count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // writer: decide on negedge, the FIFO samples on posedge
  always @(negedge wclk) if (rst_n) begin
    check(wr_count <= 2**AW, "write count within depth");
    if (full) n_full++;
    wr_en   <= !stop && ($urandom_range(0, 99) < ($time < 40000 ? 80 : 30));
    wr_data <= 16'($urandom);
  end
  always @(posedge wclk) if (rst_n && wr_en && !full) begin q.push_back(wr_data); n_wr++; end

  always @(negedge rclk) if (rst_n) begin
    check(rd_count <= 2**AW, "read count within depth");
    if (empty) n_empty++;
    rd_en <= ($urandom_range(0, 99) < ($time < 40000 ? 30 : 80));
  end
  always @(posedge rclk) if (rst_n && rd_en && !empty) begin
    if (q.size() == 0) check(0, "read with nothing written");
    else begin
      automatic logic [15:0] exp = q.pop_front();
      check(rd_data == exp, $sformatf("data %h expected %h", rd_data, exp));
    end
    n_rd++;
  end

  initial begin
    repeat (3) @(posedge wclk);
    rst_n = 1;
    #60000 rper = 23;
    #60000 stop = 1;
    #20000;
    wait (empty == 1);
    #1000;
    $display("written %0d read %0d, full seen %0d, empty seen %0d", n_wr, n_rd, n_full, n_empty);
    check(n_full > 0 && n_empty > 0 && n_rd > 1000, "full, empty and traffic seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
