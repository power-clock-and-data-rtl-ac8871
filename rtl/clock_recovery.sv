// clock_recovery: clock generation from the squared-up power carrier.
//
// The Schmitt trigger in front of this block turns the 2.64 MHz carrier into a
// digital pulse train whose duty cycle is not 50%. A D flip-flop with its
// inverted output fed back to its input toggles on every rising edge of that
// train, giving clk_half at 1.32 MHz with an exact 50% duty cycle. A counter
// clocked by clk_half divides further by SLOW_DIV (4 by default), and its top
// bit is clk_slow, the 330 kHz local clock of the ADC and data recovery logic.
// SLOW_DIV must be a power of two of at least 2 so that clk_slow is also 50%.
//
// Interface: carrier (Schmitt output), rst_n (asynchronous, active low; both
// outputs are low during reset). clk_half changes on the rising edges of
// carrier, clk_slow on the rising edges of clk_half.
//
// The toggle flip-flop and the 1.32 MHz and 330 kHz rates follow the published
// circuit, which does not say how the further division is done; the binary
// counter used here and the reset are this design's own choices.
module clock_recovery #(
  parameter int unsigned SLOW_DIV = pcdr_pkg::SLOW_DIV
) (
  input  logic carrier,
  input  logic rst_n,
  output logic clk_half,
  output logic clk_slow
);

  localparam int unsigned CW = $clog2(SLOW_DIV);

  logic [CW-1:0] div_cnt;

  // Divide-by-two toggle flip-flop: D = not Q.
  always_ff @(posedge carrier or negedge rst_n) begin
    if (!rst_n) clk_half <= 1'b0;
    else        clk_half <= ~clk_half;
  end

  always_ff @(posedge clk_half or negedge rst_n) begin
    if (!rst_n) div_cnt <= '0;
    else        div_cnt <= div_cnt + 1'b1;
  end

  assign clk_slow = div_cnt[CW-1];

  initial begin
    assert (SLOW_DIV >= 2 && (SLOW_DIV & (SLOW_DIV - 1)) == 0)
      else $error("SLOW_DIV must be a power of two >= 2");
  end

endmodule
