// tb_sdram_arbit: random requests and end pulses drive the arbiter; a
// reference state machine in the testbench predicts the grant every clock.
// Checks: nothing granted before init_end and the init bus is passed through,
// priority refresh > write > read from idle, a grant is held until its end
// pulse, the buses are taken from the owner (NOP otherwise), dq_oe only in a
// write grant. Counts how often each priority case was seen.
//
// The expected values are computed in the testbench itself, from the
// behaviour described for the block and from this design's stated choices.
module tb_sdram_arbit;
  import sdram_pkg::*;
  logic clk = 0, rst_n = 1, init_end = 0;
  logic aref_req = 0, aref_end = 0, wr_req = 0, wr_end = 0, rd_req = 0, rd_end = 0, wr_dq_oe = 0;
  logic aref_en, wr_en, rd_en, dq_oe;
  sdram_cmd_t cmd;
  logic [1:0] ba;
  logic [12:0] addr;
  logic [15:0] dq_o;
  int checks = 0, failures = 0, n_aref = 0, n_wr = 0, n_rd = 0, n_wait = 0;
  int ref_st = 0;  // 0 init, 1 idle, 2 aref, 3 write, 4 read

  initial #1 rst_n = 0;
  always #5 clk = !clk;
  sdram_arbit dut (.clk, .rst_n, .init_end,
    .init_cmd(CMD_PRE), .init_ba(2'd0), .init_addr(13'h0400),
    .aref_req, .aref_end, .aref_cmd(CMD_AREF), .aref_ba(2'd1), .aref_addr(13'h0001),
    .wr_req, .wr_end, .wr_cmd(CMD_WRITE), .wr_ba(2'd2), .wr_addr(13'h0002), .wr_dq(16'hA5A5), .wr_dq_oe,
    .rd_req, .rd_end, .rd_cmd(CMD_READ), .rd_ba(2'd3), .rd_addr(13'h0003),
    .aref_en, .wr_en, .rd_en, .cmd, .ba, .addr, .dq_o, .dq_oe);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      // outputs for the current state
      check(aref_en == (ref_st == 2) && wr_en == (ref_st == 3) && rd_en == (ref_st == 4),
            $sformatf("grant, expected state %0d", ref_st));
      case (ref_st)
        0: check(cmd == CMD_PRE && ba == 0 && addr == 13'h0400, "init bus");
        1: check(cmd == CMD_NOP && !dq_oe, "idle bus");
        2: check(cmd == CMD_AREF && ba == 1 && addr == 1 && !dq_oe, "refresh bus");
        3: check(cmd == CMD_WRITE && ba == 2 && addr == 2 && dq_oe == wr_dq_oe && dq_o == 16'hA5A5, "write bus");
        4: check(cmd == CMD_READ && ba == 3 && addr == 3 && !dq_oe, "read bus");
        default: ;
      endcase
      // new inputs
      if (c == 40) init_end = 1;
      aref_req = ($urandom_range(0, 9) == 0);
      wr_req   = ($urandom_range(0, 2) == 0);
      rd_req   = ($urandom_range(0, 1) == 0);
      aref_end = (ref_st == 2) && ($urandom_range(0, 3) == 0);
      wr_end   = (ref_st == 3) && ($urandom_range(0, 5) == 0);
      rd_end   = (ref_st == 4) && ($urandom_range(0, 5) == 0);
      wr_dq_oe = 1'($urandom);
      // reference next state
      case (ref_st)
        0: if (init_end) ref_st = 1;
        1: begin
          if (aref_req) begin ref_st = 2; n_aref++; if (wr_req || rd_req) n_wait++; end
          else if (wr_req) begin ref_st = 3; n_wr++; if (rd_req) n_wait++; end
          else if (rd_req) begin ref_st = 4; n_rd++; end
        end
        2: if (aref_end) ref_st = 1;
        3: if (wr_end) ref_st = 1;
        4: if (rd_end) ref_st = 1;
        default: ;
      endcase
    end
    $display("grants: refresh %0d write %0d read %0d, lower priority made to wait %0d", n_aref, n_wr, n_rd, n_wait);
    check(n_aref > 0 && n_wr > 0 && n_rd > 0 && n_wait > 0, "every grant and priority case seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
