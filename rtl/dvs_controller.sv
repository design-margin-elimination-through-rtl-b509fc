// dvs_controller - closed-loop dynamic voltage scaling towards the point of
// first failure.
//
// The controller holds the supply code sent to the off-chip DC/DC converter.
// While the loop is enabled it lowers the code by STEP whenever the error
// processor reports a low error rate and raises it by STEP whenever it reports
// a high one (raising wins if both are reported). After every step it waits
// SETTLE cycles for the supply to settle before it accepts another request, and
// it pulses step_up or step_down for one cycle so that the error statistics
// can be restarted. The code stays within [VCODE_MIN, VCODE_MAX] and starts at
// VCODE_RST, the safe top of the range. The loop therefore walks the supply
// down until late transitions start to be detected inside the flip-flops'
// window and then dithers at that point (the point of first failure).
//
// Interface: clk, rst (synchronous, active high), enable, err_high, err_low in;
// vdd_code, step_up, step_down, settling out. Timing: a request is acted on in
// the cycle it is seen (code updated on the next edge).
// The publication places the voltage scaling loop on the board and states only
// that error information controls it; the stepping policy, code width and
// settling time are this design's choices.
`timescale 1ns / 1ps
module dvs_controller #(
  parameter int unsigned VCODE_W   = 8,
  parameter int unsigned VCODE_MIN = 0,
  parameter int unsigned VCODE_MAX = (1 << VCODE_W) - 1,
  parameter int unsigned VCODE_RST = VCODE_MAX,
  parameter int unsigned STEP      = 1,
  parameter int unsigned SETTLE    = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic               err_high,
  input  logic               err_low,
  output logic [VCODE_W-1:0] vdd_code,
  output logic               step_up,
  output logic               step_down,
  output logic               settling
);
  localparam int unsigned SW = $clog2(SETTLE + 1) + 1;

  logic [SW-1:0] settle_cnt;
  logic          can_step;

  assign settling = (settle_cnt != '0);
  assign can_step = enable && !settling;

  always_ff @(posedge clk) begin
    if (rst) begin
      vdd_code   <= VCODE_W'(VCODE_RST);
      settle_cnt <= '0;
      step_up    <= 1'b0;
      step_down  <= 1'b0;
    end else begin
      step_up   <= 1'b0;
      step_down <= 1'b0;
      if (settling) settle_cnt <= settle_cnt - 1'b1;
      if (can_step && err_high) begin
        if (32'(vdd_code) + STEP <= VCODE_MAX) vdd_code <= VCODE_W'(32'(vdd_code) + STEP);
        else                                   vdd_code <= VCODE_W'(VCODE_MAX);
        step_up    <= 1'b1;
        settle_cnt <= SW'(SETTLE);
      end else if (can_step && err_low && (32'(vdd_code) > VCODE_MIN)) begin
        if (32'(vdd_code) >= VCODE_MIN + STEP) vdd_code <= VCODE_W'(32'(vdd_code) - STEP);
        else                                   vdd_code <= VCODE_W'(VCODE_MIN);
        step_down  <= 1'b1;
        settle_cnt <= SW'(SETTLE);
      end
    end
  end
endmodule
