// tb_column_driver: random row data under every combination of REN, WEN and
// isolation. Expected: BL=d and BLB=~d only while writing and not isolated,
// both low otherwise; RBL precharge on unless a read is in progress, and
// always on while isolated.
module tb_column_driver;
  localparam int unsigned COLS = 128;

  logic [COLS-1:0] d, bl, blb;
  logic            ren, wen, iso, rbl_pre;
  int checks = 0, failures = 0;

  column_driver dut (.d, .ren, .wen, .iso, .bl, .blb, .rbl_pre);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic drive;
      d = {$urandom, $urandom, $urandom, $urandom};
      {iso, wen, ren} = 3'(n % 8);
      #1;
      drive = wen && !iso;
      checks++;
      if (bl !== (drive ? d : '0) || blb !== (drive ? ~d : '0)) begin
        failures++;
        $display("FAIL bit lines ren=%0d wen=%0d iso=%0d", ren, wen, iso);
      end
      checks++;
      if (rbl_pre !== (iso || !ren)) begin
        failures++;
        $display("FAIL precharge ren=%0d iso=%0d pre=%0d", ren, iso, rbl_pre);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
