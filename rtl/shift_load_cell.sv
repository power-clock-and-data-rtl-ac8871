// shift_load_cell: one configuration bit of the shift-load register chain.
//
// Two flip-flops per bit: a shift stage, which takes the previous cell's shift
// stage when shift is high, and a working stage, which copies the shift stage
// when load is high and otherwise holds. The working stage is what the rest of
// the chip reads, so it does not ripple while a frame is being shifted in.
//
// Interface: clk, rst_n (asynchronous, active low, both stages reset to 0),
// shift and load are one-clock enables, sin is the previous cell's sout.
//
// The two-flip-flop structure follows the published circuit; enables on a
// common clock instead of separate shift and load clocks, and the reset value,
// are this design's own choices.
module shift_load_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic load,
  input  logic sin,
  output logic sout,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sout <= 1'b0;
    else if (shift) sout <= sin;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= 1'b0;
    else if (load) q <= sout;
  end

endmodule
