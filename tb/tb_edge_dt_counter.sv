// tb_edge_dt_counter: self-checking test of the edge detector and delta-t
// counter.
//
// The stimulus is a list of data levels, one per clock, built up front from
// pulses of random width and random gaps: short pulses (3..16 clocks, read as
// 0), long pulses (17..30 clocks, read as 1; 16 and 17 are the exact boundary),
// pulses with a glitch on the leading edge and long pulses with a glitch after
// the trailing edge. Each pulse starts at least 18 clocks after the previous
// one. A reference model, written from the timing rule of the
// block and not from its code, walks the list: a rising edge first seen at edge
// t starts a count if t is at least 17 edges after the last accepted one; the
// sample pulse is then due in the cycle after edge t+17 and carries the level
// at edge t+16. Every cycle the testbench compares dt, and at every dt the
// recovered bit, with the model, and counts how many leading-edge glitches were
// ignored and how many trailing-edge glitches produced an extra sample.
`timescale 1ns/1ps
module tb_edge_dt_counter;

  localparam int DT = pcdr_pkg::DT_CYCLES;  // 16
  localparam int NCYC = 6000;

  logic clk = 1'b0, rst_n = 1'b1, data = 1'b0;
  logic data_sync, busy, dt;

  edge_dt_counter dut (.clk(clk), .rst_n(rst_n), .data(data), .data_sync(data_sync),
                       .busy(busy), .dt(dt));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit lv     [NCYC];   // data level at each clock edge
  bit exp_dt [NCYC+40];
  bit exp_bit[NCYC+40];
  bit blip   [NCYC];   // rising edge of a trailing-edge glitch
  bit relead [NCYC];   // second rising edge of a leading-edge glitch
  int n_zero = 0, n_one = 0, n_lead_glitch = 0, n_trail_glitch = 0, n_extra = 0;
  int n_dt = 0, n_ignored = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %t", what, $time);
    end
  endtask

  task automatic put(inout int p, input int len, input bit v);
    for (int i = 0; i < len && p < NCYC; i++) lv[p++] = v;
  endtask

  initial begin
    #(10 * (NCYC + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, kind, ready, cyc, last;
    // Build the stimulus.
    p = 20;
    last = 0;
    while (p < NCYC - 80) begin
      // A pulse may only start once the previous sample has been taken.
      if (p < last + DT + 2) put(p, last + DT + 2 - p, 1'b0);
      last = p;
      kind = $urandom_range(0, 5);
      case (kind)
        0: put(p, $urandom_range(3, 16), 1'b1);                     // short
        1: put(p, $urandom_range(17, 30), 1'b1);                    // long
        2: put(p, 16, 1'b1);                                        // boundary 0
        3: put(p, 17, 1'b1);                                        // boundary 1
        4: begin                                                    // leading glitch
          put(p, 1, 1'b1); put(p, $urandom_range(1, 2), 1'b0);
          relead[p] = 1'b1;
          put(p, $urandom_range(3, 28), 1'b1); n_lead_glitch++;
        end
        default: begin                                              // trailing glitch
          put(p, $urandom_range(19, 28), 1'b1); put(p, $urandom_range(2, 3), 1'b0);
          blip[p] = 1'b1; last = p;
          put(p, $urandom_range(2, 4), 1'b1); n_trail_glitch++;
        end
      endcase
      put(p, $urandom_range(2, 25), 1'b0);                          // gap of any length
    end
    // Reference model.
    ready = 0;
    for (int t = 1; t < NCYC - DT - 2; t++) begin
      if (relead[t] && t < ready) n_ignored++;
      if (blip[t] && t >= ready) n_extra++;
      if (lv[t] && !lv[t-1] && t >= ready) begin
        exp_dt[t+DT+1]  = 1'b1;
        exp_bit[t+DT+1] = lv[t+DT];
        ready = t + DT + 1;
        if (lv[t+DT]) n_one++; else n_zero++;
      end
    end

    // Reset, with a falling edge.
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    @(negedge clk);
    // Drive: edge index cyc is the rising edge after the negedge where the
    // level lv[cyc] is applied.
    cyc = 0;
    data = lv[0];
    while (cyc < NCYC - 1) begin
      @(negedge clk);
      // Outputs in the cycle after edge cyc.
      check(dt == exp_dt[cyc], "dt timing");
      if (dt) begin
        n_dt++;
        check(data_sync == exp_bit[cyc], "sampled bit");
        check(busy, "busy during dt");
      end
      cyc++;
      data = lv[cyc];
    end
    $display("samples=%0d zeros=%0d ones=%0d lead_glitches=%0d (ignored %0d) trail_glitches=%0d (extra samples %0d)",
             n_dt, n_zero, n_one, n_lead_glitch, n_ignored, n_trail_glitch, n_extra);
    check(n_dt == n_zero + n_one, "sample count");
    check(n_zero > 20 && n_one > 20, "both bit values seen");
    check(n_ignored == n_lead_glitch && n_lead_glitch > 5, "leading-edge glitches ignored");
    check(n_extra == n_trail_glitch && n_trail_glitch > 5, "trailing-edge glitches resample");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
