// row_driver: the row drivers (RDx) of all ROWS rows.
//
// For the selected row the driver raises the read word line RWL and pulls
// the row's read-port footer VVSS low while REN is high, and raises the write
// word line WWL while WEN is high. Every other row keeps RWL and WWL low and
// its VVSS high, so unselected cells on a read bit line cannot leak it down.
// With iso high (standby or shutdown) all rows are forced to the safe state
// the document gives: RWL and WWL low, VVSS high, so the power gated
// peripherals cannot disturb the retained cells.
//
// Interface and timing: combinational from row_sel (one-hot, from the row
// decoder), ren, wen and iso. In the real macro RWL and WWL are boosted above
// VDD by a charge pump and the VVSS pull-down is overdriven; those are analog
// levels and appear here only as logic 1 / logic 0.
module row_driver #(
  parameter int unsigned ROWS = sram_pkg::ROWS
) (
  input  logic [ROWS-1:0] row_sel,
  input  logic            ren,
  input  logic            wen,
  input  logic            iso,
  output logic [ROWS-1:0] rwl,
  output logic [ROWS-1:0] wwl,
  output logic [ROWS-1:0] vvss
);

  always_comb begin
    if (iso) begin
      rwl  = '0;
      wwl  = '0;
      vvss = '1;
    end else begin
      rwl  = ren ? row_sel : '0;
      wwl  = wen ? row_sel : '0;
      vvss = ren ? ~row_sel : '1;
    end
  end

endmodule
