// tb_pcdr_top: end-to-end test of the clock and data recovery at full size.
//
// The testbench plays the analog front end. It drives carrier_sq with a
// 2.64 MHz pulse train of 40% duty (150 ns high, 229 ns low) and demod_data with
// pulse-width-coded bits timed in real time: a 0 is a 15..30 us pulse, a 1 a
// 60..90 us pulse, and the space between pulses varies. Three configuration
// frames are sent, each a few idle bits (including three ones followed by a
// zero, which must not start a frame), the header of four ones and 128 random
// bits: frame 0 at about 10 kbit/s with random gaps, frame 1 at a fixed
// 6.5 kbit/s, frame 2 again with random gaps. Some pulses carry a glitch on
// their leading edge (7 us high, 7 us low, then the pulse), which must not
// change the bit. Some long pulses carry a glitch after their trailing edge
// (8 us low, 8 us high), which, as in the original circuit, is sampled again
// as an extra 0; the reference stream includes that extra bit.
//
// Checks, all against values worked out here from the stimulus:
//   clk_1m32 high and low time one carrier period each (50% duty at 1.32 MHz),
//   clk_330k period eight carrier periods;
//   every sample pulse 17..18 clk_330k periods after the rising edge that
//   started it (delta-t = 16 periods plus the input synchronizer), carrying the
//   expected bit;
//   the number of shift pulses per frame (128) and one update per frame;
//   after each update, cfg[i] equal to the frame bit shifted in i shifts before
//   the last one, and cfg unchanged at all other times.
// Each mechanism is counted (header found, frame update, near-header rejected,
// spacer bits dropped, leading-edge glitch ignored, trailing-edge extra sample,
// both bit rates) and one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_pcdr_top;

  localparam int N  = pcdr_pkg::CFG_BITS;    // 95
  localparam int FB = pcdr_pkg::FRAME_BITS;  // 128
  localparam int DT = pcdr_pkg::DT_CYCLES;   // 16
  localparam realtime T_HI  = 150.0;
  localparam realtime T_LO  = 229.0;
  localparam realtime T_CAR = T_HI + T_LO;   // 379 ns, 2.64 MHz
  localparam realtime T_CLK = 8 * T_CAR;     // 3.032 us, 330 kHz
  localparam realtime US    = 1000.0;

  logic carrier_sq = 1'b0, rst_n = 1'b1, demod_data = 1'b0;
  logic clk_1m32, clk_330k, armed, sample, rx_bit, shift, update, header_found, cfg_sout;
  logic [N-1:0] cfg;

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

  // ---------------------------------------------------------------- carrier
  initial forever begin
    carrier_sq = 1'b1; #(T_HI);
    carrier_sq = 1'b0; #(T_LO);
  end

  // ------------------------------------------------------------ clock checks
  realtime h_r = 0, h_f = 0, s_r = 0;
  int n_h = 0, n_s = 0;
  always @(posedge clk_1m32) if (rst_n) begin
    if (n_h > 0) check($time - h_f > T_CAR - 0.5 && $time - h_f < T_CAR + 0.5, "clk_1m32 low time");
    h_r = $time; n_h++;
  end
  always @(negedge clk_1m32) if (rst_n && n_h > 0) begin
    check($time - h_r > T_CAR - 0.5 && $time - h_r < T_CAR + 0.5, "clk_1m32 high time");
    h_f = $time;
  end
  always @(posedge clk_330k) if (rst_n) begin
    if (n_s > 0) check($time - s_r > T_CLK - 0.5 && $time - s_r < T_CLK + 0.5, "clk_330k period");
    s_r = $time; n_s++;
  end

  // --------------------------------------------------------------- stimulus
  bit      exp_bits[$];    // bits the recovery must sample, in order
  realtime exp_rise[$];    // time of the rising edge that starts each sample
  int n_lead = 0, n_trail = 0, n_sent = 0;

  // One pulse-coded bit followed by a space. With period > 0 the space is
  // chosen so that the bit takes exactly that long.
  task automatic send_bit(input bit b, input realtime space, input bit lead, input bit trail,
                          input realtime period = 0.0);
    realtime w;
    w = b ? real'($urandom_range(60, 90)) * US : real'($urandom_range(15, 30)) * US;
    if (period > 0.0) space = period - w;
    exp_bits.push_back(b);
    exp_rise.push_back($realtime);
    n_sent++;
    if (lead) begin
      demod_data = 1'b1; #(7 * US);
      demod_data = 1'b0; #(7 * US);
      n_lead++;
    end
    demod_data = 1'b1; #(w);
    demod_data = 1'b0;
    if (trail && b) begin
      #(8 * US);
      exp_bits.push_back(1'b0);
      exp_rise.push_back($realtime);
      demod_data = 1'b1; #(8 * US);
      demod_data = 1'b0;
      n_trail++;
      #(60 * US);
    end
    #(space);
  endtask

  // Random space for about 10 kbit/s; fixed bit period of 154 us for 6.5 kbit/s.
  task automatic send_rand(input bit b, input bit lead, input bit trail);
    send_bit(b, real'($urandom_range(40, 80)) * US, lead, trail);
  endtask

  // --------------------------------------------------------- reference model
  bit [3:0]     m_hdr = '0;
  bit           m_in_frame = 1'b0;
  int           m_count = 0, m_frames = 0;
  bit           m_shifted[$];
  logic [N-1:0] m_cfg = '0;
  int n_hdr = 0, n_near = 0, n_spacer = 0;

  task automatic model_bit(input bit b);
    if (!m_in_frame) begin
      m_hdr = {m_hdr[2:0], b};
      if (m_hdr == 4'b1110) n_near++;
      if (&m_hdr) begin
        m_in_frame = 1'b1;
        m_count = 0;
        n_hdr++;
      end
    end else begin
      m_shifted.push_back(b);
      m_count++;
      if (m_count == FB) begin
        for (int i = 0; i < N; i++) m_cfg[i] = m_shifted[m_shifted.size() - 1 - i];
        n_spacer += FB - N;
        m_in_frame = 1'b0;
        m_hdr = '0;
        m_frames++;
      end
    end
  endtask

  // ---------------------------------------------------------------- monitor
  int n_samples = 0, n_shifts = 0, n_updates = 0, frame_shifts = 0;
  bit upd_prev = 1'b0;
  logic [N-1:0] cfg_seen = '0;

  always @(posedge sample) if (rst_n) begin
    realtime lat;
    if (n_samples < exp_rise.size()) begin
      lat = $realtime - exp_rise[n_samples];
      check(lat >= (DT + 1) * T_CLK - 1.0 && lat <= (DT + 2) * T_CLK + 1.0, "sample latency");
    end else check(1'b0, "unexpected sample pulse");
  end

  always @(negedge clk_330k) if (rst_n) begin
    if (sample) begin
      if (n_samples < exp_bits.size()) begin
        check(rx_bit == exp_bits[n_samples], "sampled bit");
        model_bit(exp_bits[n_samples]);
      end
      n_samples++;
    end
    if (shift) begin
      n_shifts++;
      frame_shifts++;
    end
    if (upd_prev) begin
      check(cfg == m_cfg, "cfg after update");
      check(n_updates == m_frames, "update matches a completed frame");
      cfg_seen = cfg;
    end else check(cfg == cfg_seen, "cfg stable between updates");
    if (update) begin
      n_updates++;
      check(frame_shifts == FB, "shifts per frame");
      frame_shifts = 0;
    end
    upd_prev = update;
  end

  // --------------------------------------------------------------- watchdog
  initial begin
    #(150_000 * US);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------- main
  int n_fast = 0, n_slow = 0;
  initial begin
    bit b;
    #5 rst_n = 1'b0;
    #(2 * US) rst_n = 1'b1;
    #(20 * US);
    check(cfg == '0, "cfg reset value");
    for (int f = 0; f < 3; f++) begin
      // Idle: a long 1 with a trailing glitch (1, extra 0), then 1, 1, 1, 0.
      send_rand(1'b1, 1'b0, 1'b1);
      send_rand(1'b1, 1'b0, 1'b0);
      send_rand(1'b1, 1'b1, 1'b0);
      send_rand(1'b1, 1'b0, 1'b0);
      send_rand(1'b0, 1'b0, 1'b0);
      // Header.
      repeat (4) send_rand(1'b1, 1'b0, 1'b0);
      // Frame.
      for (int i = 0; i < FB; i++) begin
        b = (i == FB - 1) ? 1'b0 : 1'($urandom_range(0, 1));
        if (f == 1 && i == 50) begin
          // A trailing-edge glitch inside a frame adds a bit to it.
          send_rand(1'b1, 1'b0, 1'b1);
        end else if (f == 1) begin
          // 6.5 kbit/s: fixed 154 us bit period.
          send_bit(b, 0.0, 1'b0, 1'b0, 154 * US);
          n_slow++;
        end else begin
          send_rand(b, $urandom_range(0, 9) == 0, 1'b0);
          n_fast++;
        end
      end
      send_rand(1'b0, 1'b0, 1'b0);
      #(200 * US);
    end
    #(200 * US);
    $display("sent=%0d samples=%0d shifts=%0d updates=%0d headers=%0d near_headers=%0d",
             n_sent, n_samples, n_shifts, n_updates, n_hdr, n_near);
    $display("lead_glitches=%0d trail_glitches=%0d spacer_bits=%0d fast_bits=%0d slow_bits=%0d",
             n_lead, n_trail, n_spacer, n_fast, n_slow);
    check(n_samples == exp_bits.size(), "sample count");
    check(n_updates == 3 && m_frames == 3, "three frames loaded");
    check(n_shifts == 3 * FB, "total shifts");
    check(n_hdr == 3, "mechanism: header found");
    check(n_near >= 3, "mechanism: near-header rejected");
    check(n_lead > 0, "mechanism: leading-edge glitch ignored");
    check(n_trail > 0, "mechanism: trailing-edge glitch resampled");
    check(n_spacer > 0, "mechanism: spacer bits dropped");
    check(n_fast > 0 && n_slow > 0, "mechanism: both bit rates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
