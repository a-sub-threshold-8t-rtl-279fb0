// sram_macro: 1 KB sub-threshold 8T SRAM macro (64 rows x 128 columns,
// 16-bit words) for battery-less IoT systems-on-chip.
//
// One access per clock cycle. The request (ENABLE, RD_WR, RBM, ADR, DIN) is
// sampled on the rising edge of CLK. ADR[8:3] selects the row, ADR[2:0] the
// 16-bit word within the row.
//  - Read (RD_WR = 1): the row is read during the high phase (REN), saved in
//    the DMU latches on the falling edge (L_CLK) and the selected word is
//    loaded into OUT on the same falling edge (FF_CLK). OUT is valid half a
//    cycle after the request was sampled and holds until the next read.
//  - Read burst (RBM = 1): a read of the same row as the read just before it
//    skips the row read (no REN, no L_CLK); OUT is loaded from the latches.
//  - Write (RD_WR = 0): read before write. The whole row is read in the high
//    phase and latched; in the low phase the latched row, with the addressed
//    word replaced by DIN, is written back to the whole row (WEN, WWL). This
//    keeps the other cells of the row from being half-selected.
//  - STDBY = 1: peripherals power gated, bit-cells and drivers keep the data;
//    SHTDWN = 1: everything power gated, data lost. Leaving either mode
//    restarts the peripherals from reset (OUT = 0, no burst pending).
// REN, WEN, L_CLK, FF_CLK, BURST_HIT and MODE are brought out for
// observation.
//
// The organisation, the strobes and the modes follow the document. The
// SHTDWN pin, the address split and everything marked as a choice in the
// sub-blocks are this design's own. The charge pumps that boost RWL, WWL and
// the VVSS driver are analog and appear only as logic levels.
module sram_macro #(
  parameter int unsigned ROWS   = sram_pkg::ROWS,
  parameter int unsigned COLS   = sram_pkg::COLS,
  parameter int unsigned WORD_W = sram_pkg::WORD_W,
  parameter int unsigned ROW_ADDR_W = $clog2(ROWS),
  parameter int unsigned COL_ADDR_W = $clog2(COLS / WORD_W),
  parameter int unsigned ADDR_W     = ROW_ADDR_W + COL_ADDR_W
) (
  input  logic                  CLK,
  input  logic                  RESET,
  input  logic                  STDBY,
  input  logic                  SHTDWN,
  input  logic                  ENABLE,
  input  logic                  RD_WR,
  input  logic                  RBM,
  input  logic [ADDR_W-1:0]     ADR,
  input  logic [WORD_W-1:0]     DIN,
  output logic [WORD_W-1:0]     OUT,
  output logic                  REN,
  output logic                  WEN,
  output logic                  L_CLK,
  output logic                  FF_CLK,
  output logic                  BURST_HIT,
  output sram_pkg::power_mode_e MODE
);

  // power gating
  logic periph_on, array_on, iso, periph_rst;

  power_gating_ctrl u_pgc (
    .reset(RESET), .stdby(STDBY), .shtdwn(SHTDWN), .enable(ENABLE),
    .periph_on, .array_on, .iso, .periph_rst, .mode(MODE)
  );

  // input latches
  logic              enable_q, rd_wr_q, rbm_q;
  logic [ADDR_W-1:0] adr_q;
  logic [WORD_W-1:0] din_q;

  input_latches #(.ADDR_W(ADDR_W), .WORD_W(WORD_W)) u_in (
    .clk(CLK), .rst(periph_rst),
    .enable(ENABLE), .rd_wr(RD_WR), .rbm(RBM), .adr(ADR), .din(DIN),
    .enable_q, .rd_wr_q, .rbm_q, .adr_q, .din_q
  );

  // burst control unit
  logic burst_hit;

  burst_control_unit #(.ROW_ADDR_W(ROW_ADDR_W)) u_bcu (
    .clk(CLK), .rst(periph_rst),
    .enable_q, .rd_wr_q, .rbm_q,
    .row_q(adr_q[ADDR_W-1:COL_ADDR_W]),
    .burst_hit
  );

  // read/write control
  logic ren, wen, lat_en, out_en, out_from_latch;

  control_unit u_ctl (
    .clk(CLK), .rst(periph_rst),
    .enable_q, .rd_wr_q, .burst_hit,
    .ren, .wen, .l_clk(L_CLK), .ff_clk(FF_CLK),
    .lat_en, .out_en, .out_from_latch
  );

  // row path
  logic [ROWS-1:0] row_sel, rwl, wwl, vvss;

  row_decoder #(.ROWS(ROWS), .ROW_ADDR_W(ROW_ADDR_W)) u_dec (
    .en(periph_on), .row_addr(adr_q[ADDR_W-1:COL_ADDR_W]), .row_sel
  );

  row_driver #(.ROWS(ROWS)) u_rdx (
    .row_sel, .ren, .wen, .iso, .rwl, .wwl, .vvss
  );

  // column path
  logic [COLS-1:0] d, bl, blb, rbl;
  logic            rbl_pre;

  column_driver #(.COLS(COLS)) u_cdx (
    .d, .ren, .wen, .iso, .bl, .blb, .rbl_pre
  );

  bitcell_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .array_on, .rwl, .wwl, .vvss, .bl, .blb, .rbl_pre, .rbl
  );

  dmu #(.COLS(COLS), .WORD_W(WORD_W), .COL_ADDR_W(COL_ADDR_W)) u_dmu (
    .clk(CLK), .rst(periph_rst),
    .rbl, .din(din_q), .col(adr_q[COL_ADDR_W-1:0]),
    .lat_en, .out_en, .out_from_latch,
    .dout(OUT), .d
  );

  assign REN       = ren;
  assign WEN       = wen;
  assign BURST_HIT = burst_hit;

endmodule
