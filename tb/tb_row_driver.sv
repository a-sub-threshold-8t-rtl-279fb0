// tb_row_driver: random one-hot row selects under every combination of
// REN, WEN and the isolation input. The expected word-line and footer levels
// are computed here from the rules: selected row RWL=REN, WWL=WEN,
// VVSS=!REN; other rows RWL=WWL=0, VVSS=1; iso forces RWL=WWL=0, VVSS=1.
module tb_row_driver;
  localparam int unsigned ROWS = 64;

  logic [ROWS-1:0] row_sel, rwl, wwl, vvss;
  logic            ren, wen, iso;
  int checks = 0, failures = 0;

  row_driver dut (.row_sel, .ren, .wen, .iso, .rwl, .wwl, .vvss);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      int r;
      r = $urandom_range(ROWS - 1);
      row_sel = ROWS'(1) << r;
      {iso, wen, ren} = 3'(n % 8);
      #1;
      for (int k = 0; k < ROWS; k++) begin
        logic e_rwl, e_wwl, e_vvss;
        e_rwl  = !iso && ren && (k == r);
        e_wwl  = !iso && wen && (k == r);
        e_vvss = !e_rwl;
        checks++;
        if (rwl[k] !== e_rwl || wwl[k] !== e_wwl || vvss[k] !== e_vvss) begin
          failures++;
          if (failures < 10)
            $display("FAIL row %0d sel=%0d ren=%0d wen=%0d iso=%0d: rwl=%0d wwl=%0d vvss=%0d",
                     k, r, ren, wen, iso, rwl[k], wwl[k], vvss[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
