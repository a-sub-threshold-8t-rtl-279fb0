// dmu: data management unit.
//
// Holds the data path between the read bit lines and the macro's ports:
//  - output buffer: the full-swing read bit lines are buffered without a
//    sense amplifier; RBL high reads 1, a discharged RBL reads 0.
//  - data latches (COLS bits): on the falling clock edge that ends a row
//    read (the L_CLK edge) the whole row is saved. They serve later reads of
//    the same row in read burst mode and supply the unchanged words of the
//    row for read-before-write.
//  - column select: ADR[2:0] picks one of the COLS/WORD_W words of the row,
//    either from the bit lines (row just read) or from the latches (burst
//    hit), into the output registers.
//  - output registers (WORD_W bits): loaded on the falling clock edge of a
//    read cycle (the FF_CLK edge); not loaded during a write.
//  - write merge: d, the row written back, is the latched row with the
//    selected word replaced by DIN.
//
// Interface and timing: rbl must be steady before the falling edge of clk
// (the row read happens in the high phase); dout changes on the falling edge
// of a read cycle, half a cycle after the request was sampled; d is valid in
// the low phase that follows a row read, when the write word line is on. rst
// (RESET or peripheral power gating) clears the latches and dout.
//
// The structure (buffer, latches, eight-way word select, output registers,
// write muxes) follows the document. Placing word w in columns
// w*WORD_W .. w*WORD_W+WORD_W-1, a multiplexer in place of tristate buffers,
// and falling-edge enables in place of separate L_CLK/FF_CLK clock nets are
// this design's choices.
module dmu #(
  parameter int unsigned COLS       = sram_pkg::COLS,
  parameter int unsigned WORD_W     = sram_pkg::WORD_W,
  parameter int unsigned COL_ADDR_W = $clog2(COLS / WORD_W)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [COLS-1:0]       rbl,
  input  logic [WORD_W-1:0]     din,
  input  logic [COL_ADDR_W-1:0] col,
  input  logic                  lat_en,
  input  logic                  out_en,
  input  logic                  out_from_latch,
  output logic [WORD_W-1:0]     dout,
  output logic [COLS-1:0]       d
);

  logic [COLS-1:0] rd_row;    // output buffer
  logic [COLS-1:0] row_lat;   // data latches
  logic [COLS-1:0] src_row;

  assign rd_row  = rbl;
  assign src_row = out_from_latch ? row_lat : rd_row;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) begin
      row_lat <= '0;
      dout    <= '0;
    end else begin
      if (lat_en) row_lat <= rd_row;
      if (out_en) dout    <= src_row[col*WORD_W +: WORD_W];
    end
  end

  always_comb begin
    d = row_lat;
    d[col*WORD_W +: WORD_W] = din;
  end

endmodule
