// tb_power_gating_ctrl: all 16 input combinations against the mode table:
// shutdown (SHTDWN) turns everything off; standby (STDBY) turns the
// peripherals off and isolates the drivers but keeps the array on; with
// neither, ENABLE selects active or hold. The peripherals are in reset while
// they are off or RESET is high.
module tb_power_gating_ctrl;
  import sram_pkg::*;
  logic reset, stdby, shtdwn, enable;
  logic periph_on, array_on, iso, periph_rst;
  power_mode_e mode;
  int checks = 0, failures = 0;

  power_gating_ctrl dut (.reset, .stdby, .shtdwn, .enable,
                         .periph_on, .array_on, .iso, .periph_rst, .mode);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic e_pon, e_aon, e_iso, e_rst;
      power_mode_e e_mode;
      {reset, stdby, shtdwn, enable} = 4'(v);
      #1;
      e_aon  = (shtdwn == 1'b0);
      e_pon  = (stdby == 1'b0) && (shtdwn == 1'b0);
      e_iso  = !e_pon;
      e_rst  = reset || !e_pon;
      e_mode = shtdwn ? PM_SHUTDOWN : stdby ? PM_STANDBY : enable ? PM_ACTIVE : PM_HOLD;
      checks++;
      if ({periph_on, array_on, iso, periph_rst} !== {e_pon, e_aon, e_iso, e_rst} || mode !== e_mode) begin
        failures++;
        $display("FAIL in=%b out=%b mode=%0d exp=%b mode=%0d", v[3:0],
                 {periph_on, array_on, iso, periph_rst}, mode, {e_pon, e_aon, e_iso, e_rst}, e_mode);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
