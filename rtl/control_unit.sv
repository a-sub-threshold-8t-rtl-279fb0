// control_unit: read/write control of the macro.
//
// From the latched request (ENABLE, RD_WR) and the burst decision of the BCU
// it generates the four array control signals of the document:
//   REN    high during the high clock phase whenever the row must be read:
//          for a read that is not a burst hit, and for every write (read
//          before write: the whole row is read first).
//   L_CLK  low while the row is read, rising at the end of the read (the
//          falling clock edge) so the DMU latches save the row; it stays high
//          for the low phase and is not toggled for a burst hit.
//   FF_CLK high when idle, low during the high phase of a read (burst hit or
//          not), rising at the falling clock edge to load the output
//          register; never toggled for a write.
//   WEN    high during the low clock phase of a write, after the row has been
//          read and merged with the new word.
// A clock cycle is one access: rising edge = request sampled, high phase =
// row read, falling edge = latch/output register load, low phase = write.
//
// The phase is tracked by two toggle flops, one on each clock edge; their XOR
// is high exactly during the high phase. Deriving the strobes from flops
// rather than from CLK itself keeps every strobe steady across the edge that
// samples it. lat_en, out_en and out_from_latch tell the DMU, on the falling
// edge, whether to load the latches, whether to load the output register, and
// whether the word comes from the latches (burst hit) or from the bit lines.
//
// The strobe sequence follows the document's description of the read and
// write cycles; the toggle-flop phase tracker and the use of falling-edge
// enables in place of separate L_CLK/FF_CLK clock nets are this design's
// choices.
module control_unit (
  input  logic clk,
  input  logic rst,
  input  logic enable_q,
  input  logic rd_wr_q,
  input  logic burst_hit,
  output logic ren,
  output logic wen,
  output logic l_clk,
  output logic ff_clk,
  output logic lat_en,
  output logic out_en,
  output logic out_from_latch
);

  logic tog_rise, tog_fall, phase_hi;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) tog_rise <= 1'b0;
    else     tog_rise <= ~tog_rise;
  end

  always_ff @(negedge clk or posedge rst) begin
    if (rst) tog_fall <= 1'b0;
    else     tog_fall <= tog_rise;
  end

  assign phase_hi = tog_rise ^ tog_fall;

  logic op_read, op_write, row_read;

  always_comb begin
    op_read        = enable_q && rd_wr_q;
    op_write       = enable_q && !rd_wr_q;
    row_read       = (op_read && !burst_hit) || op_write;
    ren            = phase_hi && row_read;
    l_clk          = !phase_hi && row_read;
    ff_clk         = !(phase_hi && op_read);
    wen            = !phase_hi && op_write;
    lat_en         = row_read;
    out_en         = op_read;
    out_from_latch = op_read && burst_hit;
  end

  // A row is never read and written at the same time.
  a_ren_wen_exclusive: assert property (@(negedge clk) !(ren && wen));

endmodule
