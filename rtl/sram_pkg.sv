// sram_pkg: sizes and shared types of the 1 KB sub-threshold 8T SRAM macro.
//
// The array holds 64 rows of 128 bit-cells. A row carries eight 16-bit
// words, so a 9-bit word address splits into a 6-bit row address (upper
// bits) and a 3-bit column (word-in-row) address ADR[2:0]. The row and
// column counts and the word width follow the document; the split of the
// address into row and column fields, and the encoding of the power modes,
// are this design's choices.
package sram_pkg;

  localparam int unsigned ROWS        = 64;   // bit-cell rows
  localparam int unsigned COLS        = 128;  // bit-cell columns
  localparam int unsigned WORD_W      = 16;   // bits per word
  localparam int unsigned WORDS_ROW   = COLS / WORD_W;          // 8
  localparam int unsigned COL_ADDR_W  = $clog2(WORDS_ROW);       // 3
  localparam int unsigned ROW_ADDR_W  = $clog2(ROWS);            // 6
  localparam int unsigned ADDR_W      = ROW_ADDR_W + COL_ADDR_W; // 9

  // Operating mode of the macro, as reported by the power gating control.
  //   PM_ACTIVE   : ENABLE high, accesses are served
  //   PM_HOLD     : ENABLE low, everything powered, no access
  //   PM_STANDBY  : peripherals power gated, bit-cells and drivers retain
  //   PM_SHUTDOWN : the whole macro power gated, contents lost
  typedef enum logic [1:0] {
    PM_ACTIVE   = 2'd0,
    PM_HOLD     = 2'd1,
    PM_STANDBY  = 2'd2,
    PM_SHUTDOWN = 2'd3
  } power_mode_e;

endpackage
