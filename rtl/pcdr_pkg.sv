// pcdr_pkg: constants shared by the clock and data recovery blocks of the
// implant front end.
//
// The local clock of the data recovery logic is the 2.64 MHz power carrier
// divided by 8 (330 kHz). A bit is sampled 16 local clocks (48.5 us) after the
// rising edge of its pulse, which a 5-bit counter marks with its top bit. A frame
// starts after a header of four ones and holds 128 bits, counted by an 8-bit
// counter; about 95 of them are configuration bits, the rest are spacer bits
// that are shifted out of the far end of the chain. All of these numbers follow
// the published circuit. The reset value of the working registers is this
// design's own choice.
package pcdr_pkg;

  // Further division of the 1.32 MHz half-rate clock down to 330 kHz.
  localparam int unsigned SLOW_DIV  = 4;
  // Flip-flops in the delta-t counter; delta-t = 2**(DT_BITS-1) local clocks.
  localparam int unsigned DT_BITS   = 5;
  // Ones in the frame header.
  localparam int unsigned HDR_LEN   = 4;
  // Flip-flops in the frame bit counter; frame = 2**(BC_BITS-1) bits.
  localparam int unsigned BC_BITS   = 8;
  // Shift-load configuration cells on the chip.
  localparam int unsigned CFG_BITS  = 95;

  localparam int unsigned DT_CYCLES  = 2 ** (DT_BITS - 1);
  localparam int unsigned FRAME_BITS = 2 ** (BC_BITS - 1);

endpackage
