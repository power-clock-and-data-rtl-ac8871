// header_bitcount: frame synchronization (header check) and frame bit counter.
//
// Every sample pulse (dt) shifts the recovered bit into a HDR_LEN-stage header
// shift register while the header has not been found. When all stages hold a
// one (the output of the HDR_LEN-input NAND goes low) the header is found. The
// found signal passes through a two-stage delay and then (a) gates off the
// header shift register's clock enable, so it is blind to further data, and
// (b) takes the bit counter out of reset and routes the sample pulses to it and
// to the shift-load chain as shift. The bit counter has BC_BITS flip-flops and
// its top bit rises after 2**(BC_BITS-1) shifts (128 by default). That bit,
// through a delay stage, is the update pulse: it loads the working registers
// across the chip and clears the header register, which after the two-stage
// delay puts the bit counter back into reset. Everything then waits for the
// next header.
//
// Interface: clk is the 330 kHz local clock, rst_n an asynchronous active-low
// reset, dt the one-clock sample pulse and data the recovered bit valid with it.
// shift = dt while a frame is being received. update is high for one clock, the
// clock after the last shift of the frame. header_found is the delayed found
// signal that enables the frame.
//
// Timing (counting rising clock edges): if the fourth header one is shifted in
// at edge k, header_found is high from edge k+2. If bit 128 of the frame is
// shifted at edge j, update is high from edge j+1 to edge j+2 and header_found
// is low from edge j+4. Sample pulses must be at least 4 clocks apart, which
// the delta-t counter guarantees (they are at least 17 clocks apart).
//
// Header length, counter width, the gating, the two-stage delay and the reset
// of the header by update follow the published circuit. Clock gating is
// realised as clock enables on one clock, and update is made a single-clock
// pulse by the delay stage; these are this design's own choices.
module header_bitcount #(
  parameter int unsigned HDR_LEN = pcdr_pkg::HDR_LEN,
  parameter int unsigned BC_BITS = pcdr_pkg::BC_BITS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic dt,
  input  logic data,
  output logic shift,
  output logic update,
  output logic header_found
);

  logic [HDR_LEN-1:0] hdr_sr;
  logic               nand_out;
  logic               found_d1;
  logic [BC_BITS-1:0] bit_cnt;

  assign nand_out = ~&hdr_sr;
  assign shift    = dt & header_found;

  // Header shift register, clocked by dt only while no header was found.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   hdr_sr <= '0;
    else if (update)              hdr_sr <= '0;
    else if (dt && !header_found) hdr_sr <= {hdr_sr[HDR_LEN-2:0], data};
  end

  // Two-stage delay on the inverted NAND output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      found_d1     <= 1'b0;
      header_found <= 1'b0;
    end else begin
      found_d1     <= ~nand_out;
      header_found <= found_d1;
    end
  end

  // Bit counter, held in reset while no header was found.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  bit_cnt <= '0;
    else if (!header_found || update) bit_cnt <= '0;
    else if (shift)              bit_cnt <= bit_cnt + 1'b1;
  end

  // Delay stage from the counter's top bit to update.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) update <= 1'b0;
    else        update <= bit_cnt[BC_BITS-1] & ~update;
  end

  a_update_pulse: assert property (@(posedge clk) disable iff (!rst_n) update |=> !update);
  a_shift_gated:  assert property (@(posedge clk) disable iff (!rst_n) shift |-> header_found);

endmodule
