// tb_rf_schmitt: behavioural model of the clock-recovery Schmitt trigger, for
// simulation only (an analog circuit, not synthesizable).
//
// The output goes high when the coil voltage rises above VTH_HI and low when it
// falls below VTH_LO; in between it holds. This turns the sinusoidal carrier into
// a clean pulse train at the carrier frequency. The thresholds are this model's
// own values; they are placed off centre so that the pulse train does not have a
// 50% duty cycle, which the divide-by-two flip-flop behind it must correct.
`timescale 1ns/1ps
module tb_rf_schmitt #(
  parameter real VTH_HI = 1.5,
  parameter real VTH_LO = 0.5
) (
  input  real  vin,
  output logic vout
);

  initial vout = 1'b0;

  always @(vin) begin
    if (vin > VTH_HI)      vout = 1'b1;
    else if (vin < VTH_LO) vout = 1'b0;
  end

endmodule
