// tb_row_decoder: exhaustive check of the row decoder at its default size.
// Every row address with en high must select exactly that row; with en low
// no row may be selected. Expected values are built by shifting a 1.
module tb_row_decoder;
  localparam int unsigned ROWS = 64;
  localparam int unsigned RAW  = $clog2(ROWS);

  logic            en;
  logic [RAW-1:0]  row_addr;
  logic [ROWS-1:0] row_sel;
  int checks = 0, failures = 0;

  row_decoder dut (.en, .row_addr, .row_sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < ROWS; a++) begin
        logic [ROWS-1:0] exp;
        en = e[0]; row_addr = RAW'(a);
        #1;
        exp = e ? (ROWS'(1) << a) : '0;
        checks++;
        if (row_sel !== exp) begin
          failures++;
          $display("FAIL en=%0d addr=%0d sel=%h exp=%h", e, a, row_sel, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
