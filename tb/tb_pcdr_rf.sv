// tb_pcdr_rf: test of the clock and data recovery from the amplitude-modulated
// power waveform, with behavioural models of the analog front end.
//
// The testbench builds the voltage on the pickup coil: a 2.64 MHz sine, sampled
// 16 times per cycle, whose peak amplitude switches between 8.0 V ("high") and
// 5.7 V ("low"), a modulation depth of 29%. Each change of amplitude is a 10 us
// linear ramp. tb_rf_schmitt squares the sine into carrier_sq and
// tb_rf_am_demod recovers demod_data from the envelope. Bits are sent with the
// low time equal to the high time (0: 30 us + 30 us, 1: 75 us + 75 us), so the
// envelope spends half its time high and its average sits halfway, which the
// demodulator needs. The recovery is held in reset for the first 2.5 ms while
// the demodulator's averaging filter settles on a preamble of 0 bits.
//
// Then two frames are sent, each two 0s, the header of four 1s, 128 random bits
// and two 0s. Checks: clk_330k period of eight carrier periods; every sample
// carries the bit sent; exactly one update per frame; cfg[i] after each update
// equal to the frame bit sent i bits before the last; no sample pulse that does
// not belong to a sent bit.
`timescale 1ns/1ps
module tb_pcdr_rf;

  localparam int N  = pcdr_pkg::CFG_BITS;
  localparam int FB = pcdr_pkg::FRAME_BITS;
  localparam realtime T_CAR  = 1000.0 / 2.64;  // ns
  localparam realtime T_STEP = T_CAR / 16.0;
  localparam realtime US     = 1000.0;
  localparam real     A_HI   = 8.0;
  localparam real     A_LO   = 5.7;
  localparam real     RAMP   = (A_HI - A_LO) / (10.0 * US);  // V per ns
  localparam real     PI     = 3.14159265358979;

  real  vcoil = 0.0;
  real  amp = A_LO, amp_target = A_LO;
  logic carrier_sq, demod_data;
  logic rst_n = 1'b1;
  logic clk_1m32, clk_330k, armed, sample, rx_bit, shift, update, header_found, cfg_sout;
  logic [N-1:0] cfg;

  tb_rf_schmitt  u_schmitt (.vin(vcoil), .vout(carrier_sq));
  tb_rf_am_demod u_demod   (.vin(vcoil), .data(demod_data));

  pcdr_top dut (
    .carrier_sq  (carrier_sq),
    .rst_n       (rst_n),
    .demod_data  (demod_data),
    .clk_1m32    (clk_1m32),
    .clk_330k    (clk_330k),
    .armed       (armed),
    .sample      (sample),
    .rx_bit      (rx_bit),
    .shift       (shift),
    .update      (update),
    .header_found(header_found),
    .cfg         (cfg),
    .cfg_sout    (cfg_sout)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %t", what, $time);
    end
  endtask

  // Coil voltage.
  initial begin
    longint k;
    k = 0;
    forever begin
      #(T_STEP);
      k++;
      if (amp < amp_target) amp = (amp + RAMP * T_STEP > amp_target) ? amp_target : amp + RAMP * T_STEP;
      if (amp > amp_target) amp = (amp - RAMP * T_STEP < amp_target) ? amp_target : amp - RAMP * T_STEP;
      vcoil = amp * $sin(2.0 * PI * real'(k % 16) / 16.0);
    end
  end

  // Clock period.
  realtime s_r = 0;
  int n_s = 0;
  always @(posedge clk_330k) if (rst_n) begin
    if (n_s > 0) check($time - s_r > 8 * T_CAR - 1.0 && $time - s_r < 8 * T_CAR + 1.0, "clk_330k period");
    s_r = $time; n_s++;
  end

  // Sent bits after reset, and the reference frames.
  bit           sent[$];
  logic [N-1:0] exp_cfg[$];
  int           n_samples = 0, n_updates = 0;
  bit           upd_prev = 1'b0;

  always @(negedge clk_330k) if (rst_n) begin
    if (sample) begin
      if (n_samples < sent.size()) check(rx_bit == sent[n_samples], "sampled bit");
      else check(1'b0, "sample without a sent bit");
      n_samples++;
    end
    if (upd_prev) begin
      if (n_updates <= exp_cfg.size()) check(cfg == exp_cfg[n_updates - 1], "cfg after update");
      else check(1'b0, "update without a frame");
    end
    if (update) n_updates++;
    upd_prev = update;
  end

  task automatic send(input bit b, input bit record);
    realtime w;
    w = b ? 75 * US : 30 * US;
    if (record) sent.push_back(b);
    amp_target = A_HI; #(w);
    amp_target = A_LO; #(w);
  endtask

  initial begin
    #(60_000 * US);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit frame[FB];
    logic [N-1:0] c;
    #5 rst_n = 1'b0;
    // Preamble while the demodulator's average settles.
    repeat (40) send(1'b0, 1'b0);
    rst_n = 1'b1;
    #(20 * US);
    for (int f = 0; f < 2; f++) begin
      send(1'b0, 1'b1); send(1'b0, 1'b1);
      repeat (4) send(1'b1, 1'b1);
      for (int i = 0; i < FB; i++) frame[i] = 1'($urandom_range(0, 1));
      for (int i = 0; i < N; i++) c[i] = frame[FB - 1 - i];
      exp_cfg.push_back(c);
      for (int i = 0; i < FB; i++) send(frame[i], 1'b1);
      send(1'b0, 1'b1); send(1'b0, 1'b1);
    end
    #(200 * US);
    $display("sent=%0d samples=%0d updates=%0d modulation depth=%0.1f%%",
             sent.size(), n_samples, n_updates, 100.0 * (A_HI - A_LO) / A_HI);
    check(n_samples == sent.size(), "sample count");
    check(n_updates == 2, "two frames loaded");
    check(cfg == exp_cfg[1], "final configuration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
