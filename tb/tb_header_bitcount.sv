// tb_header_bitcount: self-checking test of the header check and frame bit
// counter.
//
// Sample pulses (dt, one clock wide) are applied 17..40 clocks apart, each with
// a recovered bit. The bit stream holds random idle bits (including runs of
// three ones that must not start a frame), headers of four ones and 128-bit
// frames. A pulse-level reference model follows the rule of the block: outside
// a frame the last four bits are kept and four ones start a frame; inside a
// frame every pulse is a shift, the 128th ends it and clears the header. Every
// clock the testbench compares shift with the model, checks that update is
// high for exactly the one clock that follows the clock edge after the 128th
// shift, and at every pulse checks
// header_found against the model.
`timescale 1ns/1ps
module tb_header_bitcount;

  localparam int HL = pcdr_pkg::HDR_LEN;     // 4
  localparam int FB = pcdr_pkg::FRAME_BITS;  // 128

  logic clk = 1'b0, rst_n = 1'b1, dt = 1'b0, data = 1'b0;
  logic shift, update, header_found;

  header_bitcount dut (.clk(clk), .rst_n(rst_n), .dt(dt), .data(data), .shift(shift),
                       .update(update), .header_found(header_found));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_frames = 0, n_updates = 0, n_shifts = 0, n_false_hdr = 0;

  // Reference state.
  bit [HL-1:0] m_hdr = '0;
  bit          m_in_frame = 1'b0;
  int          m_count = 0;
  bit          m_update_next = 1'b0;  // update due in the next clock
  bit          m_update_nn   = 1'b0;  // update due in two clocks

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %t", what, $time);
    end
  endtask

  // One clock with the given inputs; checks the outputs of that clock.
  task automatic cycle(input bit d, input bit b);
    bit exp_shift;
    @(negedge clk);
    dt = d; data = b;
    #1;
    check(update == m_update_next, "update timing");
    if (update) n_updates++;
    m_update_next = m_update_nn;
    m_update_nn   = 1'b0;
    exp_shift = d && m_in_frame;
    check(shift == exp_shift, "shift");
    if (d) begin
      check(header_found == m_in_frame, "header_found");
      if (!m_in_frame) begin
        m_hdr = {m_hdr[HL-2:0], b};
        if (&m_hdr) begin
          m_in_frame = 1'b1;
          m_count = 0;
        end
      end else begin
        n_shifts++;
        m_count++;
        if (m_count == FB) begin
          m_in_frame = 1'b0;
          m_hdr = '0;
          m_update_nn = 1'b1;
          n_frames++;
        end
      end
    end
  endtask

  task automatic pulse(input bit b);
    repeat ($urandom_range(16, 39)) cycle(1'b0, 1'b0);
    cycle(1'b1, b);
  endtask

  initial begin
    #(10 * 40 * 1200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      // Idle bits: a near-header (three ones, then a zero), then random zeros/ones
      // without four ones in a row.
      pulse(1'b0); pulse(1'b1); pulse(1'b1); pulse(1'b1); pulse(1'b0);
      check(!m_in_frame, "no frame from three ones");
      for (int i = 0; i < 6; i++) pulse((i % 3) != 2 ? 1'($urandom_range(0, 1)) : 1'b0);
      if (m_in_frame) n_false_hdr++;
      // Header, then the frame.
      while (!m_in_frame) pulse(1'b1);
      for (int i = 0; i < FB; i++) pulse(1'($urandom_range(0, 1)));
      repeat (6) cycle(1'b0, 1'b0);
      check(!header_found, "header cleared after update");
    end
    $display("frames=%0d updates=%0d shifts=%0d", n_frames, n_updates, n_shifts);
    check(n_frames == 4 && n_updates == 4, "four frames completed");
    check(n_shifts == 4 * FB, "frame length");
    check(n_false_hdr == 0, "no false header in idle bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
