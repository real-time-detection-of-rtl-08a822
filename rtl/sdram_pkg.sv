// sdram_pkg: command encodings and timing defaults shared by the SDRAM
// controller sub-modules (init, refresh, write, read, arbiter).
// A command is the 4-bit value {cs_n, ras_n, cas_n, we_n} as defined by the
// JEDEC SDR SDRAM truth table. The timing defaults assume a 100 MHz
// controller clock and the -6 speed grade of a 256 Mbit x16 SDRAM
// (4 banks, 8192 rows, 512 columns); they are this design's choice.
package sdram_pkg;

  typedef enum logic [3:0] {
    CMD_NOP   = 4'b0111,
    CMD_ACT   = 4'b0011,
    CMD_READ  = 4'b0101,
    CMD_WRITE = 4'b0100,
    CMD_BST   = 4'b0110,
    CMD_PRE   = 4'b0010,
    CMD_AREF  = 4'b0001,
    CMD_LMR   = 4'b0000
  } sdram_cmd_t;

  // Address split of the 24-bit linear word address: {bank, row, column}.
  localparam int unsigned BA_W   = 2;
  localparam int unsigned ROW_W  = 13;
  localparam int unsigned COL_W  = 9;
  localparam int unsigned ADDR_W = BA_W + ROW_W + COL_W;   // 24
  localparam int unsigned PAGE_WORDS = 1 << COL_W;          // 512

  // Mode register: write burst mode = burst (A9=0), CAS latency 3 (A6..A4),
  // sequential (A3=0), full-page burst (A2..A0 = 111).
  localparam int unsigned CAS_LATENCY = 3;
  localparam logic [12:0] MODE_REG = {3'b000, 1'b0, 2'b00, 3'(CAS_LATENCY), 1'b0, 3'b111};

endpackage
