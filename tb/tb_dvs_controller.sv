// tb_dvs_controller - cycle-accurate check of the voltage scaling controller.
// A reference model tracks code, settle counter and strobes for random
// err_high/err_low/enable stimuli and is compared every cycle. Directed parts
// check the settling time between steps (a step up or down takes effect only
// SETTLE + 1 cycles after the previous one), saturation at both ends of the
// range and that err_high wins over err_low.
`timescale 1ns / 1ps
module tb_dvs_controller;
  localparam int W = 4, VMIN = 2, VMAX = 13, RSTV = 12, SETTLE = 3;
  logic clk = 0, rst = 1, enable = 0, err_high = 0, err_low = 0;
  logic [W-1:0] vdd_code;
  logic step_up, step_down, settling;
  int checks = 0, failures = 0, n_up = 0, n_down = 0;
  int m_code, m_cnt;
  logic m_up, m_down;

  dvs_controller #(.VCODE_W(W), .VCODE_MIN(VMIN), .VCODE_MAX(VMAX), .VCODE_RST(RSTV),
                   .STEP(2), .SETTLE(SETTLE)) dut (
    .clk, .rst, .enable, .err_high, .err_low, .vdd_code, .step_up, .step_down, .settling
  );

  always #5 clk = ~clk;

  task automatic cyc(input logic en, input logic hi, input logic lo);
    @(negedge clk);
    enable = en; err_high = hi; err_low = lo;
    @(posedge clk);
    m_up = 0; m_down = 0;
    if (en && m_cnt == 0 && hi) begin
      m_code = (m_code + 2 > VMAX) ? VMAX : m_code + 2; m_up = 1; m_cnt = SETTLE;
    end else if (en && m_cnt == 0 && lo && m_code > VMIN) begin
      m_code = (m_code - 2 < VMIN) ? VMIN : m_code - 2; m_down = 1; m_cnt = SETTLE;
    end else if (m_cnt > 0) m_cnt--;
    #1;
    checks++;
    if (int'(vdd_code) != m_code || step_up !== m_up || step_down !== m_down || settling !== (m_cnt != 0)) begin
      failures++;
      $display("FAIL %0t code %0d/%0d up %b/%b down %b/%b settling %b/%0d", $time, vdd_code, m_code,
               step_up, m_up, step_down, m_down, settling, m_cnt);
    end
    if (step_up) n_up++;
    if (step_down) n_down++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_code = RSTV; m_cnt = 0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (vdd_code != RSTV) begin failures++; $display("FAIL reset code"); end
    rst = 0;
    cyc(0, 1, 0); cyc(0, 0, 1);                        // disabled: no step
    cyc(1, 1, 1);                                      // high wins, 12 -> 13 (saturate)
    repeat (SETTLE) cyc(1, 0, 1);                      // ignored while settling
    for (int k = 0; k < 30; k++) cyc(1, 0, 1);         // walk down to VMIN
    checks++;
    if (vdd_code != VMIN) begin failures++; $display("FAIL not at VMIN: %0d", vdd_code); end
    for (int k = 0; k < 400; k++) cyc($urandom_range(7) != 0, $urandom_range(3) == 0, $urandom_range(1) == 0);
    checks++;
    if (n_up == 0 || n_down == 0) begin failures++; $display("FAIL no steps: %0d %0d", n_up, n_down); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
