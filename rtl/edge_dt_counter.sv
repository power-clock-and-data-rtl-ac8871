// edge_dt_counter: edge detection and input length (delta-t) counter.
//
// Bits arrive as pulses on the demodulated data line: a pulse shorter than
// delta-t is a 0, a pulse longer than delta-t is a 1, and the gap between
// pulses may be of any length. An "armed" flip-flop waits for a rising edge of
// the data while it is clear. The edge sets it, which releases the counter from
// reset; while it is set, further edges (glitches on the leading edge of the
// pulse) are ignored. When the counter's top bit rises, after 2**(DT_BITS-1)
// clocks (16 clocks = 48.5 us at 330 kHz), the sample pulse dt is issued and fed
// back to clear the armed flip-flop and the counter, so the block waits for the
// next rising edge. The data value at the dt pulse is the recovered bit.
//
// Interface: clk is the 330 kHz local clock, rst_n an asynchronous active-low
// reset, data the asynchronous comparator output of the AM demodulator.
// data_sync is data after a two-flip-flop synchronizer; every decision is made
// on it, so the recovered bit is data_sync in the cycle where dt is high.
// busy is the armed flip-flop (Q in the published schematic).
//
// Timing (counting rising clock edges): if data is first high at edge 0,
// data_sync is high from edge 1, busy from edge 2, dt is high for one clock
// from edge 1+2**(DT_BITS-1) (edge 17 by default) and busy falls at the edge
// after that. The bit recovered with dt is the data level at edge
// 2**(DT_BITS-1), i.e. delta-t after the first edge that saw the pulse. A new
// pulse is accepted if it is first high at edge 2**(DT_BITS-1)+1 or later.
//
// The counter width, the arm/count/clear loop and its feedback follow the
// published circuit. In the original the data AND not-Q clocks the flip-flop
// and a delay stage clears it asynchronously; here the whole loop runs on clk
// with a synchronizer and synchronous clear, which is this design's own choice.
// As in the original, once the flip-flop is cleared a new rising edge re-arms
// it, so a glitch on the trailing edge of a long pulse produces an extra sample.
module edge_dt_counter #(
  parameter int unsigned DT_BITS = pcdr_pkg::DT_BITS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic data,
  output logic data_sync,
  output logic busy,
  output logic dt
);

  logic               meta_q;
  logic               data_prev;
  logic [DT_BITS-1:0] cnt;
  logic               rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta_q    <= 1'b0;
      data_sync <= 1'b0;
      data_prev <= 1'b0;
    end else begin
      meta_q    <= data;
      data_sync <= meta_q;
      data_prev <= data_sync;
    end
  end

  assign rise = data_sync & ~data_prev;

  // Delta-t is the counter's top bit.
  assign dt = cnt[DT_BITS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else begin
      if (dt)        busy <= 1'b0;  // feedback from delta-t
      else if (rise) busy <= 1'b1;  // edge; ignored while already set
      // The counter is held in reset while the flip-flop is clear; it counts
      // from the clock edge that sets the flip-flop.
      if (dt)                cnt <= '0;
      else if (busy || rise) cnt <= cnt + 1'b1;
      else                   cnt <= '0;
    end
  end

  // dt is a single-cycle pulse that only happens while armed.
  a_dt_pulse: assert property (@(posedge clk) disable iff (!rst_n) dt |=> !dt);
  a_dt_busy:  assert property (@(posedge clk) disable iff (!rst_n) dt |-> busy);

endmodule
