// tb_clock_recovery: self-checking test of the carrier clock divider.
//
// Drives a 2.64 MHz carrier whose duty cycle is deliberately not 50% (150 ns
// high, 229 ns low) and counts its rising edges in the testbench. After every
// carrier edge it checks clk_half against (edges mod 2) and clk_slow against
// the count of clk_half periods, and measures the high and low times of both
// outputs: each must be an equal number of carrier periods (50% duty) with
// clk_half at carrier/2 (1.32 MHz) and clk_slow at carrier/8 (330 kHz). It also
// checks that reset holds both outputs low.
`timescale 1ns/1ps
module tb_clock_recovery;

  localparam realtime T_HI = 150.0;
  localparam realtime T_LO = 229.0;
  localparam realtime T_CAR = T_HI + T_LO;

  logic carrier = 1'b0;
  logic rst_n   = 1'b1;
  logic clk_half, clk_slow;

  int checks = 0, failures = 0;
  int edges = 0;

  clock_recovery dut (.carrier(carrier), .rst_n(rst_n), .clk_half(clk_half), .clk_slow(clk_slow));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %t", what, $time);
    end
  endtask

  // Edge time measurement.
  realtime half_rise = 0, half_fall = 0, slow_rise = 0, slow_fall = 0;
  int half_meas = 0, slow_meas = 0;

  always @(posedge clk_half) begin
    if (half_meas > 0) check(($time - half_fall) > T_CAR - 1 && ($time - half_fall) < T_CAR + 1, "clk_half low time");
    half_rise = $time; half_meas++;
  end
  always @(negedge clk_half) if (rst_n) begin
    check(($time - half_rise) > T_CAR - 1 && ($time - half_rise) < T_CAR + 1, "clk_half high time");
    half_fall = $time;
  end
  always @(posedge clk_slow) begin
    if (slow_meas > 0) check(($time - slow_fall) > 4*T_CAR - 1 && ($time - slow_fall) < 4*T_CAR + 1, "clk_slow low time");
    slow_rise = $time; slow_meas++;
  end
  always @(negedge clk_slow) if (rst_n) begin
    check(($time - slow_rise) > 4*T_CAR - 1 && ($time - slow_rise) < 4*T_CAR + 1, "clk_slow high time");
    slow_fall = $time;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Reset asserted with a falling edge and held across a few carrier cycles.
    #1 rst_n = 1'b0;
    repeat (3) begin
      carrier = 1'b1; #(T_HI);
      carrier = 1'b0; #(T_LO);
      check(clk_half == 1'b0 && clk_slow == 1'b0, "outputs low in reset");
    end
    rst_n = 1'b1;
    repeat (200) begin
      carrier = 1'b1; edges++;
      #1;
      check(clk_half == (edges % 2 == 1), "clk_half level");
      // clk_half has risen (edges+1)/2 times; clk_slow is bit 1 of that count.
      check(clk_slow == ((((edges + 1) / 2) % 4) >= 2), "clk_slow level");
      #(T_HI - 1);
      carrier = 1'b0; #(T_LO);
    end
    check(half_meas == 100, "clk_half rising edges");
    check(slow_meas == 25, "clk_slow rising edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
