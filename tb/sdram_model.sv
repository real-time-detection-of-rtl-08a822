// sdram_model: behavioural model of a 256 Mbit x16 SDR SDRAM (4 banks,
// 8192 rows, 512 columns) as used for the frame store.
//
// Behavioural model, not synthesizable; it models only what the controller
// uses. Commands are sampled on the rising clock edge. It supports LOAD
// MODE REGISTER (CAS latency 2/3, any burst length incl. full page), ACTIVE,
// READ and WRITE bursts (a burst runs until BURST TERMINATE or another
// READ/WRITE/PRECHARGE; a full-page burst wraps inside the row), PRECHARGE
// (one bank, or all with A10) and AUTO REFRESH. Read data for the word
// accessed at edge t is driven after edge t+CL-1, so it is sampled at edge
// t+CL. Storage is sparse. It counts protocol errors (command to a closed
// or already open bank, tRCD/tRP/tRFC/tWR violations, commands before the
// power-up wait, refreshes falling more than 8 behind one per MAX_REF_GAP
// clocks, as JEDEC allows 8 to be postponed) in errors, and counts the
// commands it has seen.
//
// Commands and the mode register follow the SDRAM description; the timing
// limits are data-sheet values chosen for 100 MHz.
module sdram_model #(
  parameter int T_POWER     = 20_000,
  parameter int MAX_REF_GAP = 781,     // 64 ms / 8192 rows at 100 MHz
  parameter int T_RCD = 2, T_RP = 2, T_RFC = 7, T_WR = 2
) (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [12:0] addr,
  input  logic [1:0]  dqm,
  input  logic [15:0] dq_in,
  input  logic        dq_oe,
  output logic [15:0] dq_out
);
  logic [15:0] mem [int];
  bit          open_b [4];
  int          row_b [4], act_t [4], pre_t [4], wlast_t [4];
  int          t = 0, errors = 0, cl = 3, blen = 512;
  int          n_act = 0, n_rd = 0, n_wr = 0, n_pre = 0, n_aref = 0, n_lmr = 0, n_bst = 0;
  int          last_aref = -1, aref_t = -100, max_ref_gap = 0, first_cmd_t = -1;
  bit          init_done = 0;
  int          n_ref_run = 0, init_t = 0;
  // burst state
  int          b_mode = 0;         // 0 none, 1 read, 2 write
  int          b_bank, b_row, b_col, b_left;
  logic [16:0] rpipe [4];          // {valid, data}

  function automatic int key(int b, int r, int c);
    return (b << 22) | (r << 9) | c;
  endfunction

  task automatic err(string s);
    errors++;
    if (errors < 20) $display("SDRAM model: %s at cycle %0d", s, t);
  endtask

  initial begin
    dq_out = 0;
    for (int i = 0; i < 4; i++) begin open_b[i] = 0; act_t[i] = -100; pre_t[i] = -100; wlast_t[i] = -100; end
    for (int i = 0; i < 4; i++) rpipe[i] = '0;
  end

  always @(posedge clk) begin
    logic [3:0] cmd;
    logic [16:0] rword;
    t++;
    cmd = cs_n ? 4'b1111 : {1'b0, ras_n, cas_n, we_n};
    rword = '0;
    // command decode
    if (cmd != 4'b0111 && cmd != 4'b1111) begin
      if (first_cmd_t < 0) begin
        first_cmd_t = t;
        if (t < T_POWER) err("command before power-up wait");
      end
      if (t - aref_t < T_RFC) err("tRFC violated");
    end
    case (cmd)
      4'b0011: begin  // ACT
        n_act++;
        if (open_b[ba]) err("ACT to open bank");
        if (t - pre_t[ba] < T_RP) err("tRP violated");
        open_b[ba] = 1; row_b[ba] = addr; act_t[ba] = t;
      end
      4'b0101, 4'b0100: begin  // READ / WRITE
        if (!open_b[ba]) err("READ/WRITE to closed bank");
        if (t - act_t[ba] < T_RCD) err("tRCD violated");
        b_mode = (cmd == 4'b0101) ? 1 : 2;
        b_bank = ba; b_row = row_b[ba]; b_col = addr[8:0];
        b_left = (blen == 512) ? 1 << 30 : blen;
        if (cmd == 4'b0101) n_rd++; else n_wr++;
      end
      4'b0110: begin b_mode = 0; n_bst++; end
      4'b0010: begin  // PRE
        n_pre++;
        for (int i = 0; i < 4; i++) if (addr[10] || i == ba) begin
          if (t - wlast_t[i] < T_WR) err("tWR violated");
          open_b[i] = 0; pre_t[i] = t;
        end
        b_mode = 0;
      end
      4'b0001: begin  // AREF
        n_aref++;
        for (int i = 0; i < 4; i++) if (open_b[i]) err("AREF with open bank");
        if (init_done && last_aref >= 0 && t - last_aref > max_ref_gap) max_ref_gap = t - last_aref;
        if (init_done) n_ref_run++;
        last_aref = t; aref_t = t;
      end
      4'b0000: begin  // LMR
        n_lmr++;
        cl = addr[6:4];
        blen = (addr[2:0] == 3'b111) ? 512 : (1 << addr[2:0]);
        init_done = 1;
        init_t = t;
        last_aref = t;
      end
      default: ;
    endcase
    // refresh debt: at most 8 refreshes may be postponed (JEDEC)
    if (init_done && (t - init_t) / MAX_REF_GAP - n_ref_run > 8) begin
      err("more than 8 refreshes behind");
      n_ref_run++;
    end
    // data transfer of the active burst
    if (b_mode != 0 && b_left > 0) begin
      automatic int k = key(b_bank, b_row, b_col);
      if (b_mode == 2) begin
        if (!dq_oe) err("write data not driven");
        mem[k] = dq_in;
        wlast_t[b_bank] = t;
      end else begin
        rword = {1'b1, mem.exists(k) ? mem[k] : 16'hDEAD};
        if (dq_oe) err("bus contention on read");
      end
      b_col = (b_col + 1) % 512;
      b_left--;
      if (b_left == 0) b_mode = 0;
    end
    // read pipeline: word accessed now is driven after edge t + cl - 1
    for (int i = 3; i > 0; i--) rpipe[i] = rpipe[i-1];
    rpipe[0] = rword;
    dq_out <= rpipe[cl - 1][15:0];
  end
endmodule
