// tb_soft_edge_ff - checks the soft-edge flip-flop with hand-made clocks.
// sclk follows the clock by 1 ns, mclk follows sclk by 10 ns, so both latches
// are transparent from 1 ns to 11 ns after each rising edge. The testbench
// checks normal capture, capture of data that arrives inside that window
// (masking), that data arriving after the window waits for the next edge, the
// master latch delay on dd, complementary rails and asynchronous reset.
`timescale 1ns / 1ps
module tb_soft_edge_ff;
  logic clock = 0, sclk = 1, mclk = 1, rst = 1;
  logic d = 0, d_n = 1;
  logic dd, dd_n, q, q_n;
  int checks = 0, failures = 0;

  soft_edge_ff #(.T_ML(1.0)) dut (.d, .d_n, .mclk, .sclk, .rst, .dd, .dd_n, .q, .q_n);

  always #50 clock = ~clock;
  always @(clock) sclk <= #1 clock;
  always @(sclk)  mclk <= #10 sclk;

  task automatic expect_q(input logic exp, input string what);
    checks++;
    if (q !== exp || q_n !== ~exp) begin
      failures++;
      $display("FAIL %0t %s: q=%b q_n=%b exp=%b", $time, what, q, q_n, exp);
    end
  endtask

  task automatic set_d(input logic v);
    d = v; d_n = ~v;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20 expect_q(0, "reset");
    @(negedge clock) rst = 0;
    // on-time data: change mid low phase (master open), visible after the next edge
    #20 set_d(1);
    #0.5 checks++; if (dd !== 0) begin failures++; $display("FAIL dd too early"); end
    #1   checks++; if (dd !== 1 || dd_n !== 0) begin failures++; $display("FAIL dd after delay"); end
    expect_q(0, "slave closed before edge");
    @(posedge clock) #3 expect_q(1, "on-time capture");
    // late data inside the window (5 ns after the edge): masked, visible in Q
    @(posedge clock) #5 set_d(0);
    #2 expect_q(0, "late data in window reaches Q");
    #30 expect_q(0, "late data held");
    // data after the window (20 ns after edge): not captured this cycle
    @(posedge clock) #20 set_d(1);
    #5 expect_q(0, "data after window not captured");
    @(posedge clock) #3 expect_q(1, "captured one cycle later");
    // data changing during clock-high after the window does not corrupt Q
    #20 set_d(0);
    #20 expect_q(1, "Q stable while master closed");
    // async reset
    #5 rst = 1; #1 expect_q(0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
