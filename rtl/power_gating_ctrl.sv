// power_gating_ctrl: power mode decode and gating controls of the macro.
//
// Four modes:
//   active   - ENABLE high, accesses served;
//   hold     - ENABLE low (the SoC also gates CLK), everything stays powered;
//   standby  - STDBY high: the peripherals (input latches, decoder, control
//              unit, BCU, DMU) are power gated, while the row and column
//              drivers and the bit-cells stay on and retain the data;
//   shutdown - SHTDWN high: the whole macro, bit-cells included, is power
//              gated and the data is lost.
// Outputs: periph_on (peripheral power switch), array_on (bit-cell power
// switch), iso (row/column drivers hold their safe levels), periph_rst
// (state of the gated peripherals is lost: held in reset while they are off
// and while RESET is high) and the decoded mode.
//
// Interface and timing: combinational; STDBY and SHTDWN are not latched and
// act at once, as the document keeps them out of the input latches. Shutdown
// wins over standby. The document names the modes and what each keeps
// powered; the SHTDWN input, its priority and the reset of the peripherals
// on power-down are this design's choices.
module power_gating_ctrl (
  input  logic                 reset,
  input  logic                 stdby,
  input  logic                 shtdwn,
  input  logic                 enable,
  output logic                 periph_on,
  output logic                 array_on,
  output logic                 iso,
  output logic                 periph_rst,
  output sram_pkg::power_mode_e mode
);

  import sram_pkg::*;

  always_comb begin
    array_on   = !shtdwn;
    periph_on  = !(stdby || shtdwn);
    iso        = stdby || shtdwn;
    periph_rst = reset || !periph_on;
    if (shtdwn)      mode = PM_SHUTDOWN;
    else if (stdby)  mode = PM_STANDBY;
    else if (enable) mode = PM_ACTIVE;
    else             mode = PM_HOLD;
  end

endmodule
