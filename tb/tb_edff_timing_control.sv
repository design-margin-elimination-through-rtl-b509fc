// tb_edff_timing_control - measures the clocks made by the timing/control model.
// For every window_control code the testbench timestamps the rises of clock,
// sclk and mclk and the window pulse, and checks: sclk lags the clock by T_BUF,
// mclk lags sclk by (1 + code) * T_TAP, the window is high exactly from the sclk
// rise to the mclk rise, and rst holds both clocks high with the window closed.
`timescale 1ns / 1ps
module tb_edff_timing_control;
  localparam real T_BUF = 1.0;
  localparam real T_TAP = 2.0;
  logic clock = 0, rst = 1;
  logic [2:0] window_control = '0;
  logic sclk, mclk, window;
  int checks = 0, failures = 0;
  realtime t_clk, t_sclk, t_mclk, t_win_r, t_win_f;

  edff_timing_control #(.T_BUF(T_BUF), .T_TAP(T_TAP), .WC_W(3)) dut (
    .clock, .rst, .window_control, .sclk, .mclk, .window
  );

  always #50 clock = ~clock;
  always @(posedge clock)  t_clk   = $realtime;
  always @(posedge sclk)   t_sclk  = $realtime;
  always @(posedge mclk)   t_mclk  = $realtime;
  always @(posedge window) t_win_r = $realtime;
  always @(negedge window) t_win_f = $realtime;

  task automatic near(input real got, input real exp, input string what);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: got %0.3f exp %0.3f", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30;
    checks++;
    if (!(sclk && mclk && !window)) begin failures++; $display("FAIL reset state"); end
    #200 rst = 0;
    for (int wc = 0; wc < 8; wc++) begin
      @(negedge clock) window_control = 3'(wc);
      @(negedge clock);            // one full cycle with the new code
      #40;                         // just after the following rising edge's window
      near(t_sclk - t_clk, T_BUF, $sformatf("sclk delay wc=%0d", wc));
      near(t_mclk - t_sclk, T_TAP * (1 + wc), $sformatf("mclk delay wc=%0d", wc));
      near(t_win_r, t_sclk, $sformatf("window open wc=%0d", wc));
      near(t_win_f, t_mclk, $sformatf("window close wc=%0d", wc));
    end
    // mid low phase: window closed, both clocks low
    @(negedge clock) #20;
    checks++;
    if (sclk || mclk || window) begin failures++; $display("FAIL low phase"); end
    rst = 1; #20;
    checks++;
    if (!(sclk && mclk && !window)) begin failures++; $display("FAIL rst hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
