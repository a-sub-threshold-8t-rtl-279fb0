// column_driver: the column drivers (CDx) of all COLS columns.
//
// Read side: the read bit lines RBL are precharged high whenever no read is
// in progress (rbl_pre high), and released for the row to discharge while
// REN is high. Write side: while WEN is high each column drives the row data
// word d onto its write bit-line pair, BL = d and BLB = ~d; otherwise both
// are held low. Because the macro writes a whole row at a time (read before
// write), every column is driven during a write. With iso high (standby or
// shutdown) BL/BLB are held low and RBL is held high, as the document gives.
//
// Interface and timing: combinational from d, ren, wen and iso. The document
// says RBL is precharged during the low clock phase; precharging whenever
// REN is low is this design's equivalent, since REN is high exactly during
// the high phase of a row read.
module column_driver #(
  parameter int unsigned COLS = sram_pkg::COLS
) (
  input  logic [COLS-1:0] d,
  input  logic            ren,
  input  logic            wen,
  input  logic            iso,
  output logic [COLS-1:0] bl,
  output logic [COLS-1:0] blb,
  output logic            rbl_pre
);

  always_comb begin
    rbl_pre = iso || !ren;
    if (wen && !iso) begin
      bl  = d;
      blb = ~d;
    end else begin
      bl  = '0;
      blb = '0;
    end
  end

endmodule
