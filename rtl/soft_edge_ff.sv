// soft_edge_ff - behavioural model of the differential soft-edge master-slave
// flip-flop of the error-detection cell (transistor-level cell; the model
// carries the master latch delay that the transition detector relies on).
//
// The master latch is transparent while the master clock mclk is low and the
// slave latch while the slave clock sclk is high. Since mclk is a delayed copy
// of sclk, both latches are transparent together for a short time after the
// rising clock edge (the detection window): data that arrives in that time
// still propagates to Q, which masks the timing error instead of corrupting the
// pipeline. The master latch outputs dd/dd_n are brought out for the transition
// detector; the master latch's propagation delay T_ML is the delay element that
// makes a transition visible as a 1-1 overlap of input and output.
// rst clears the stored value asynchronously (q = 0, q_n = 1).
//
// Interface: differential d/d_n, mclk, sclk, rst; master outputs dd/dd_n and
// differential q/q_n. Timing: master latch delay T_ML ns, slave latch modelled
// without delay. Latch polarities follow the published description (master
// kept transparent during the window); the delay value is assumed.
`timescale 1ns / 1ps
module soft_edge_ff #(
  parameter real T_ML = 1.0  // master latch propagation delay (ns)
) (
  input  logic d,
  input  logic d_n,
  input  logic mclk,
  input  logic sclk,
  input  logic rst,
  output logic dd,
  output logic dd_n,
  output logic q,
  output logic q_n
);
  initial begin
    dd = 1'b0; dd_n = 1'b1; q = 1'b0; q_n = 1'b1;
  end

  // master latch: transparent while mclk is low
  always @(d or d_n or mclk or rst) begin
    if (rst) begin
      dd   <= 1'b0;
      dd_n <= 1'b1;
    end else if (!mclk) begin
      dd   <= #(T_ML) d;
      dd_n <= #(T_ML) d_n;
    end
  end

  // slave latch: transparent while sclk is high
  always @(dd or dd_n or sclk or rst) begin
    if (rst) begin
      q   <= 1'b0;
      q_n <= 1'b1;
    end else if (sclk) begin
      q   <= dd;
      q_n <= dd_n;
    end
  end
endmodule
