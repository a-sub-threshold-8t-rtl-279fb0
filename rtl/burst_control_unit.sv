// burst_control_unit (BCU): detects reads that can be served from the DMU
// row latches instead of a new row read (read burst mode).
//
// A row read loads the whole 128-bit row into the data latches of the DMU.
// The BCU remembers which row the latches hold and whether they still match
// the array. When a new access is a read, read burst mode (RBM) is on, and
// the previous access was a read of the same row, burst_hit is raised for
// that cycle: the control unit then leaves REN and L_CLK untoggled and the
// word comes from the latches. A write clears the record (the latches then
// hold the row as it was before the write), and so does rst (RESET or the
// peripherals being power gated, which loses the latches). Cycles with
// ENABLE low (hold mode) leave the record as it is.
//
// Interface and timing: the inputs are the latched request of the current
// cycle (from the input latches); burst_hit is combinational from them and
// from the record, so it is steady for the whole cycle. The record is updated
// on the rising edge that ends the cycle.
//
// The document gives what the BCU decides ("two consecutive addresses in the
// same row are read"); reading "consecutive" as "back-to-back accesses to
// the same row", and clearing the record on a write, are this design's
// choices.
module burst_control_unit #(
  parameter int unsigned ROW_ADDR_W = sram_pkg::ROW_ADDR_W
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  enable_q,
  input  logic                  rd_wr_q,
  input  logic                  rbm_q,
  input  logic [ROW_ADDR_W-1:0] row_q,
  output logic                  burst_hit
);

  logic                  held_valid;
  logic [ROW_ADDR_W-1:0] held_row;

  assign burst_hit = enable_q && rd_wr_q && rbm_q && held_valid && (row_q == held_row);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      held_valid <= 1'b0;
      held_row   <= '0;
    end else if (enable_q) begin
      held_valid <= rd_wr_q;
      held_row   <= row_q;
    end
  end

endmodule
