// tb_running_mean_error - random error streams against an integer model.
// The model keeps the mean as an integer and applies
// mean += floor((target - mean) / 2^alpha) with target 65535 or 0, and counts
// cycles and errors. Several alpha values, error densities, enable gaps and
// clears are exercised; after a long all-error run the mean must be within
// 2^alpha of full scale and after a long error-free run it must reach zero.
`timescale 1ns / 1ps
module tb_running_mean_error;
  logic clk = 0, rst = 1, en = 0, clr = 0, err = 0;
  logic [3:0]  alpha_shift = 4'd4;
  logic [15:0] mean;
  logic [31:0] err_count, cycle_count;
  int checks = 0, failures = 0;
  longint m_mean, m_err, m_cyc;

  running_mean_error #(.MEAN_W(16), .CNT_W(32)) dut (
    .clk, .rst, .en, .clr, .alpha_shift, .err, .mean, .err_count, .cycle_count
  );

  always #5 clk = ~clk;

  function automatic longint floordiv(longint a, int sh);
    longint p = longint'(1) << sh;
    if (a >= 0) return a / p;
    return -((-a + p - 1) / p);
  endfunction

  task automatic step(input logic e, input logic ena, input logic c);
    @(negedge clk);
    err = e; en = ena; clr = c;
    @(posedge clk);
    if (c) begin m_mean = 0; m_err = 0; m_cyc = 0; end
    else if (ena) begin
      m_mean = m_mean + floordiv((e ? 65535 : 0) - m_mean, int'(alpha_shift));
      m_cyc++;
      if (e) m_err++;
    end
    #1;
    checks++;
    if (longint'(mean) != m_mean || longint'(err_count) != m_err || longint'(cycle_count) != m_cyc) begin
      failures++;
      $display("FAIL %0t mean %0d/%0d err %0d/%0d cyc %0d/%0d", $time, mean, m_mean, err_count, m_err, cycle_count, m_cyc);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_mean = 0; m_err = 0; m_cyc = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int a = 1; a <= 8; a += 1) begin
      alpha_shift = 4'(a);
      for (int k = 0; k < 300; k++) step(($urandom_range(99) < (a * 10)), ($urandom_range(9) != 0), 1'b0);
    end
    alpha_shift = 4'd4;
    for (int k = 0; k < 400; k++) step(1'b1, 1'b1, 1'b0);
    checks++;
    if (mean < 16'(65535 - 16)) begin failures++; $display("FAIL mean did not saturate: %0d", mean); end
    for (int k = 0; k < 400; k++) step(1'b0, 1'b1, 1'b0);
    checks++;
    if (mean != 0) begin failures++; $display("FAIL mean did not decay: %0d", mean); end
    step(1'b1, 1'b1, 1'b1);
    step(1'b1, 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
