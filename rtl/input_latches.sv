// input_latches: capture of the macro's access inputs.
//
// Every input of the macro except STDBY, CLK and RESET passes through this
// stage, so that the request stays steady for the whole clock cycle in which
// it is served (read in the high phase, write in the low phase). The stage
// is transparent while CLK is low and closes when CLK rises; it is written
// here as registers loaded on the rising edge, which behave the same at the
// cycle level.
//
// Interface: enable/rd_wr/rbm/adr/din are the raw inputs; the *_q outputs
// are valid from a rising edge of clk to the next. rst (RESET, or the
// peripherals being power gated) clears the stage, so a macro that wakes up
// from standby starts with no request pending.
//
// The document names these latches and the inputs they hold; their edge and
// their reset are this design's choices.
module input_latches #(
  parameter int unsigned ADDR_W = sram_pkg::ADDR_W,
  parameter int unsigned WORD_W = sram_pkg::WORD_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  logic              rd_wr,
  input  logic              rbm,
  input  logic [ADDR_W-1:0] adr,
  input  logic [WORD_W-1:0] din,
  output logic              enable_q,
  output logic              rd_wr_q,
  output logic              rbm_q,
  output logic [ADDR_W-1:0] adr_q,
  output logic [WORD_W-1:0] din_q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      enable_q <= 1'b0;
      rd_wr_q  <= 1'b1;
      rbm_q    <= 1'b0;
      adr_q    <= '0;
      din_q    <= '0;
    end else begin
      enable_q <= enable;
      rd_wr_q  <= rd_wr;
      rbm_q    <= rbm;
      adr_q    <= adr;
      din_q    <= din;
    end
  end

endmodule
