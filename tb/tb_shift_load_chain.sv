// tb_shift_load_chain: self-checking test of the shift-load configuration chain.
//
// Shifts frames of 128 random bits into the 95-cell chain with gaps between the
// shift pulses, and checks that the working registers (cfg) do not change while
// a frame is shifted in, that after the load pulse cfg[i] holds the bit shifted
// in i shifts before the last one (the first 33 bits of a frame fall out of the
// far end), and that sout carries each bit out N shifts after it went in. A
// further load without new shifts must leave cfg unchanged.
`timescale 1ns/1ps
module tb_shift_load_chain;

  localparam int N  = pcdr_pkg::CFG_BITS;    // 95
  localparam int FB = pcdr_pkg::FRAME_BITS;  // 128

  logic clk = 1'b0, rst_n = 1'b1, shift = 1'b0, load = 1'b0, din = 1'b0;
  logic [N-1:0] cfg;
  logic sout;

  shift_load_chain dut (.clk(clk), .rst_n(rst_n), .shift(shift), .load(load), .din(din),
                        .cfg(cfg), .sout(sout));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit hist[$];          // every bit shifted in, oldest first
  logic [N-1:0] cfg_exp;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    @(negedge clk);
    check(cfg == '0, "reset value");
    cfg_exp = '0;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < FB; i++) begin
        din = 1'($urandom_range(0, 1));
        shift = 1'b1;
        hist.push_back(din);
        @(negedge clk);
        shift = 1'b0;
        check(cfg == cfg_exp, "cfg holds while shifting");
        if (hist.size() >= N) check(sout == hist[hist.size() - N], "serial out");
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int i = 0; i < N; i++) cfg_exp[i] = hist[hist.size() - 1 - i];
      check(cfg == cfg_exp, "cfg after load");
      for (int i = 0; i < N; i++) check(cfg[i] == hist[hist.size() - 1 - i], "cfg bit");
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      check(cfg == cfg_exp, "repeated load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
