// transition_detector - in-latch transition detector of the error-detection flip-flop.
//
// The detector compares the input of the master latch (d/d_n) with its output
// (dd/dd_n). While a new value travels through the transparent master latch the
// input already carries the new level and the output still the old one, so for
// the latch's propagation delay one of the pairs (d, dd_n) or (d_n, dd) is 1-1
// and `edge` pulses. A rising edge on either rail is thereby turned into a
// pulse without any extra logic in the data path: the master latch itself is
// the delay element. Whether the pulse counts as an error is decided later by
// the error latch, which only listens inside the detection window.
//
// Interface: differential master-latch input and output, one pulse output.
// Timing: purely combinational; pulse width equals the master latch delay.
// The function (pulse on a 1-1 overlap of input and inverted output) follows
// the published description; the two-term sum-of-products form is this
// design's own logical reading of the transistor-level circuit.
`timescale 1ns / 1ps
module transition_detector (
  input  logic d,
  input  logic d_n,
  input  logic dd,
  input  logic dd_n,
  output logic edge_o
);
  always_comb edge_o = (d & dd_n) | (d_n & dd);
endmodule
