// tb_error_latch - timed check of the error latch.
// A clock with a 1 ns later copy sclk is generated; a window is opened for
// 5 ns after each sclk rise. Edge pulses inside the window must set the flag
// until the next rising clock edge, pulses outside it must be ignored, and rst
// must clear the flag.
`timescale 1ns / 1ps
module tb_error_latch;
  logic edge_i = 0, window = 0, clock = 0, sclk = 0, rst = 1;
  logic error, error_n;
  int checks = 0, failures = 0;

  error_latch dut (.edge_i, .window, .clock, .sclk, .rst, .error, .error_n);

  always #50 clock = ~clock;
  always @(clock) sclk <= #1 clock;
  always @(posedge sclk) begin
    window = 1;
    #5 window = 0;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (error !== exp || error_n !== ~exp) begin
      failures++;
      $display("FAIL %0t %s: error=%b error_n=%b exp=%b", $time, what, error, error_n, exp);
    end
  endtask

  task automatic pulse();
    edge_i = 1; #1 edge_i = 0;
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10 check(0, "reset");
    rst = 0;
    // cycle 1: clock rises at 50, sclk at 51, window 51..56
    #42;            // t = 52
    pulse();        // t = 53, inside window
    #1 check(1, "set in window");
    #40 check(1, "held mid cycle");
    #50 check(1, "held before next edge");   // t=144
    #6.5 check(0, "cleared after next edge"); // t=150.5 (clock high, sclk low)
    // pulse in the low phase: ignored
    #30 pulse(); #1 check(0, "pulse outside window (high phase)");
    #40 pulse(); #1 check(0, "pulse outside window (low phase)");
    // next window: t=250 clock, 251 sclk, window to 256
    #(251.5 - $realtime) ;
    pulse(); #1 check(1, "second set");
    // reset clears
    #10 rst = 1; #1 check(0, "rst clears"); rst = 0;
    // a pulse inside the window while rst was released still sets
    #(352 - $realtime) pulse(); #1 check(1, "third set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
