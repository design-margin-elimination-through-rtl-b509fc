// tb_transition_detector - exhaustive check of the transition detector.
// For every combination of master latch input and output rails the edge output
// must be high exactly when (d, dd_n) or (d_n, dd) are both high. A short
// timed sequence then emulates a rising and a falling data transition through
// a latch with 1 ns delay and checks that each yields one pulse of that width.
`timescale 1ns / 1ps
module tb_transition_detector;
  logic d, d_n, dd, dd_n, edge_o;
  int checks = 0, failures = 0;
  int pulses = 0;

  transition_detector dut (.d, .d_n, .dd, .dd_n, .edge_o);

  task automatic check(input logic exp, input string what);
    checks++;
    if (edge_o !== exp) begin
      failures++;
      $display("FAIL %s: d=%b d_n=%b dd=%b dd_n=%b edge=%b exp=%b", what, d, d_n, dd, dd_n, edge_o, exp);
    end
  endtask

  always @(posedge edge_o) pulses++;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {d, d_n, dd, dd_n} = 4'(v);
      #1;
      check(((v >> 3) & 1 & v) != 0 || (((v >> 2) & 1) & ((v >> 1) & 1)) != 0, "table");
    end
    // steady states: no pulse
    d = 0; d_n = 1; dd = 0; dd_n = 1; #5 check(0, "steady 0");
    pulses = 0;
    // rising data transition, latch output follows after 1 ns
    d = 1; d_n = 0; #0.5 check(1, "rise in flight");
    #0.5 dd = 1; dd_n = 0; #0.5 check(0, "rise settled");
    // falling transition
    #2 d = 0; d_n = 1; #0.5 check(1, "fall in flight");
    #0.5 dd = 0; dd_n = 1; #0.5 check(0, "fall settled");
    checks++;
    if (pulses != 2) begin failures++; $display("FAIL pulse count %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
