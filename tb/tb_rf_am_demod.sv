// tb_rf_am_demod: behavioural model of the AM demodulator, for simulation only
// (an analog circuit, not synthesizable).
//
// Its four stages follow the structure of the original demodulator: a
// pre-filter that attenuates the coil voltage by ATTEN, an envelope detector
// (instant attack on the rectified input, exponential decay with ENV_TAU), a
// low-pass filter with AVG_TAU that finds the average of the envelope, and a
// comparator with a small hysteresis HYST that outputs 1 while the envelope is
// above its average. All constants are this model's own values. The model
// is evaluated on every change of vin, using the time since the last change.
`timescale 1ns/1ps
module tb_rf_am_demod #(
  parameter real ATTEN   = 0.07,
  parameter real ENV_TAU = 4000.0,     // ns
  parameter real AVG_TAU = 400000.0,   // ns
  parameter real HYST    = 0.005       // V
) (
  input  real  vin,
  output logic data
);

  real     env = 0.0, avg = 0.0, v;
  realtime t_last = 0;
  bit      started = 1'b0;

  initial data = 1'b0;

  always @(vin) begin
    real dtn;
    dtn = $realtime - t_last;
    t_last = $realtime;
    v = ATTEN * (vin < 0.0 ? -vin : vin);
    env = env * (1.0 - dtn / ENV_TAU);
    if (v > env) env = v;
    if (!started) begin
      avg = env;
      started = 1'b1;
    end else avg = avg + (env - avg) * dtn / AVG_TAU;
    if (env > avg + HYST)      data = 1'b1;
    else if (env < avg - HYST) data = 1'b0;
  end

endmodule
