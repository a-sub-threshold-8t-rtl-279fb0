// bitcell_array: ROWS x COLS array of 8T SRAM bit-cells.
//
// Each 8T cell is a cross-coupled storage pair with two decoupled ports:
//  - write port: while the row's write word line WWL is high, each cell of
//    the row stores 1 if its column has BL high and BLB low, and 0
//    otherwise. The macro always writes a whole row (read before write), so
//    every column is driven differentially while a WWL is on; the
//    half-select pseudo-read of undriven columns is not modelled.
//  - read port: a two-transistor stack from the read bit line RBL to the
//    row's footer VVSS, gated by the read word line RWL and by the stored
//    value. A cell holding 0 discharges RBL when its RWL is high and its
//    VVSS is low; a cell holding 1 leaves RBL high. Unselected rows keep VVSS
//    high, so they never pull RBL down.
// RBL is precharged high while rbl_pre is high; with rbl_pre low each column
// reads 1 unless some enabled row holding 0 discharges it, so RBL carries
// the true stored value (full swing, no sense amplifier).
//
// array_on low models the shutdown mode: the array is power gated and its
// contents are lost; this model clears them to 0.
//
// Timing: the cells are level-sensitive storage, written while WWL is high;
// the read is combinational from RWL/VVSS/rbl_pre to RBL. The storage is
// written as latches on purpose: a bit-cell is a latch, and the macro's write
// is a word-line pulse, not a clock edge. Analog effects (boosted word lines,
// leakage, read disturb) are outside this logic model.
module bitcell_array #(
  parameter int unsigned ROWS = sram_pkg::ROWS,
  parameter int unsigned COLS = sram_pkg::COLS
) (
  input  logic            array_on,
  input  logic [ROWS-1:0] rwl,
  input  logic [ROWS-1:0] wwl,
  input  logic [ROWS-1:0] vvss,
  input  logic [COLS-1:0] bl,
  input  logic [COLS-1:0] blb,
  input  logic            rbl_pre,
  output logic [COLS-1:0] rbl
);

  logic [ROWS-1:0][COLS-1:0] store;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    always_latch begin
      if (!array_on)   store[r] = '0;
      else if (wwl[r]) store[r] = bl & ~blb;
    end
  end

  always_comb begin
    logic [COLS-1:0] discharge;
    discharge = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      if (rwl[r] && !vvss[r]) discharge |= ~store[r];
    rbl = rbl_pre ? '1 : ~discharge;
  end

endmodule
