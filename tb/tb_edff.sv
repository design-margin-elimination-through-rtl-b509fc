// tb_edff - end-to-end check of one error-detection flip-flop cell.
// With window_control = 4 the window lasts 1 ns (sclk) to 11 ns after each
// rising edge. Each cycle the testbench changes the data at a chosen delay
// after the previous edge and then checks at the next edge(s):
//   early arrival         -> captured, no error flag;
//   arrival in the window -> captured in the same cycle (masked), flag set
//                            for the rest of that cycle, sampled at the next
//                            edge and then cleared;
//   arrival after window  -> captured one cycle late, no flag;
//   no transition         -> no flag.
// It also changes window_control to 0 and checks that a transition at 5 ns
// then falls outside the (3 ns) window.
`timescale 1ns / 1ps
module tb_edff;
  localparam real PERIOD = 100.0;
  logic clock = 0, rst = 1;
  logic [2:0] window_control = 3'd4;
  logic d = 0, d_n = 1;
  logic q, q_n, error, error_n;
  logic err_sampled;
  int checks = 0, failures = 0;

  edff dut (.clock, .rst, .window_control, .d, .d_n, .q, .q_n, .error, .error_n);

  always #(PERIOD / 2) clock = ~clock;
  always @(posedge clock) err_sampled <= error;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b exp %b", $time, what, got, exp);
    end
  endtask

  // launch a new value `v` at `dly` ns after the next rising edge
  task automatic launch(input logic v, input real dly);
    @(posedge clock);
    #(dly) d = v; d_n = ~v;
  endtask

  initial begin
    #(PERIOD * 200);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    err_sampled = 0;
    #(PERIOD * 2.25) rst = 0;
    // early arrival
    launch(1, 40);
    @(posedge clock) #20;
    chk(q, 1, "early: captured"); chk(q_n, 0, "early: q_n");
    chk(error, 0, "early: no flag");
    // in-window arrival, 5 ns after the edge
    @(posedge clock) #5 d = 0; d_n = 1;
    #10 chk(q, 0, "window: masked, Q updated this cycle");
    chk(error, 1, "window: flag set"); chk(error_n, 0, "window: error_n");
    #70 chk(error, 1, "window: flag held");
    @(posedge clock) #0.1 chk(err_sampled, 1, "window: flag sampled at next edge");
    #5 chk(error, 0, "window: flag cleared after next edge");
    // late arrival after the window, 30 ns after the edge
    #25 d = 1; d_n = 0;
    #10 chk(q, 0, "after window: not captured");
    chk(error, 0, "after window: no flag");
    @(posedge clock) #20 chk(q, 1, "after window: captured next cycle");
    chk(error, 0, "after window: still no flag");
    // no transition
    @(posedge clock) #20 chk(error, 0, "quiet: no flag");
    // smaller window: 5 ns arrival now outside
    window_control = 3'd0;
    @(posedge clock) #5 d = 0; d_n = 1;
    #10 chk(error, 0, "wc=0: 5 ns is outside window");
    chk(q, 1, "wc=0: not captured");
    @(posedge clock) #20 chk(q, 0, "wc=0: captured next cycle");
    chk(error, 0, "wc=0: no flag for the late value");
    // window 0: 1..3 ns; a 2 ns arrival is inside
    @(posedge clock) #2 d = 1; d_n = 0;
    #10 chk(error, 1, "wc=0: 2 ns inside window");
    chk(q, 1, "wc=0: masked");
    // reset clears flag and q
    #5 rst = 1; #1 chk(error, 0, "rst clears flag"); chk(q, 0, "rst clears q");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
