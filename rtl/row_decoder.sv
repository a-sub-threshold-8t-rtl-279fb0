// row_decoder: binary row address to one-hot row select.
//
// The row field of the latched address (the upper address bits above the
// 3-bit column field) selects one of the ROWS rows of the bit-cell array.
// With en low no row is selected. The decoder is combinational; its output
// is steady from a rising clock edge to the next, because its address comes
// from the input latches.
//
// The document names a row decoder; its implementation here is the plain
// one-hot decode, and the enable is this design's choice.
module row_decoder #(
  parameter int unsigned ROWS       = sram_pkg::ROWS,
  parameter int unsigned ROW_ADDR_W = $clog2(ROWS)
) (
  input  logic                  en,
  input  logic [ROW_ADDR_W-1:0] row_addr,
  output logic [ROWS-1:0]       row_sel
);

  always_comb begin
    row_sel = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      if (en && row_addr == ROW_ADDR_W'(r)) row_sel[r] = 1'b1;
  end

endmodule
