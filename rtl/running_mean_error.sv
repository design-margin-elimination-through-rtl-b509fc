// running_mean_error - running mean error register with its adder and counters.
//
// Once per enabled cycle the register moves towards the current error flag by
// a fraction 2^-alpha_shift of the distance:
//     mean <- mean + ((err ? 2^MEAN_W - 1 : 0) - mean) >>> alpha_shift
// so `mean` is an exponentially weighted running mean of the fraction of
// cycles with a timing error, in units of 2^-MEAN_W. The same cycle also
// counts observed cycles and erroneous cycles in saturating counters. `clr`
// restarts the measurement (all three registers to zero), which is used after
// every supply step.
//
// Interface: clk, rst (synchronous, active high), en, clr, alpha_shift, err in;
// mean, err_count, cycle_count out. Timing: one update per clock, results
// visible the cycle after the flag. The publication lists a running mean error
// register and an adder; the exponential form of the mean, the widths and the
// counters are this design's choices.
`timescale 1ns / 1ps
module running_mean_error #(
  parameter int unsigned MEAN_W = 16,
  parameter int unsigned CNT_W  = 32
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              clr,
  input  logic [3:0]        alpha_shift,
  input  logic              err,
  output logic [MEAN_W-1:0] mean,
  output logic [CNT_W-1:0]  err_count,
  output logic [CNT_W-1:0]  cycle_count
);
  logic signed [MEAN_W+1:0] target, diff, step;

  always_comb begin
    target = err ? $signed({2'b00, {MEAN_W{1'b1}}}) : '0;
    diff   = target - $signed({2'b00, mean});
    step   = diff >>> alpha_shift;
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      mean        <= '0;
      err_count   <= '0;
      cycle_count <= '0;
    end else if (en) begin
      mean <= MEAN_W'($signed({2'b00, mean}) + step);
      if (~&cycle_count)      cycle_count <= cycle_count + 1'b1;
      if (err && ~&err_count) err_count   <= err_count + 1'b1;
    end
  end
endmodule
