// edff - behavioural model of one timing-error-aware soft-edge flip-flop cell.
//
// The cell joins four parts: the local timing/control block (sclk, delayed
// master clock mclk and detection window from the clock), the soft-edge
// master-slave flip-flop, the in-latch transition detector and the error latch.
// Data that reaches d/d_n before the rising clock edge is stored as in any
// flip-flop. Data that arrives inside the window after the edge still passes
// the transparent master latch to Q (the error is masked), and its passage
// through the master latch produces an edge pulse that sets the error latch.
// The flag stays set until the next rising clock edge, so the error processor
// samples it on that edge. Data that arrives after the window is not captured
// until the next cycle and is not flagged: the window must cover the range the
// supply can drift in.
//
// Interface: clock, rst, window_control; differential d/d_n in, q/q_n out;
// error/error_n flag. Timing: error rises shortly after a late transition in the
// window and falls T_OUT after the next rising clock edge. The structure
// follows the published cell; the output buffer delay T_OUT (which lets the
// error processor capture the flag on the same edge that clears it) and all
// delay values are assumed.
`timescale 1ns / 1ps
module edff #(
  parameter real         T_BUF = 1.0,   // clock buffer delay (ns)
  parameter real         T_TAP = 2.0,   // window delay-line tap (ns)
  parameter real         T_ML  = 1.0,   // master latch delay (ns)
  parameter real         T_OUT = 0.5,   // error output buffer delay (ns)
  parameter int unsigned WC_W  = 3
) (
  input  logic            clock,
  input  logic            rst,
  input  logic [WC_W-1:0] window_control,
  input  logic            d,
  input  logic            d_n,
  output logic            q,
  output logic            q_n,
  output logic            error,
  output logic            error_n
);
  logic sclk, mclk, window;
  logic dd, dd_n, edge_p;
  logic err_l, err_l_n;

  edff_timing_control #(.T_BUF(T_BUF), .T_TAP(T_TAP), .WC_W(WC_W)) u_tc (
    .clock, .rst, .window_control, .sclk, .mclk, .window
  );

  soft_edge_ff #(.T_ML(T_ML)) u_ff (
    .d, .d_n, .mclk, .sclk, .rst, .dd, .dd_n, .q, .q_n
  );

  transition_detector u_td (
    .d, .d_n, .dd, .dd_n, .edge_o(edge_p)
  );

  error_latch u_el (
    .edge_i(edge_p), .window, .clock, .sclk, .rst, .error(err_l), .error_n(err_l_n)
  );

  assign #(T_OUT) error   = err_l;
  assign #(T_OUT) error_n = err_l_n;
endmodule
