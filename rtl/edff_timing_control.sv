// edff_timing_control - behavioural model of the local timing/control block of
// one error-detection flip-flop (analog delay line; not synthesizable logic).
//
// From the incoming clock the block derives three signals:
//   sclk   - the slave latch clock: the clock after a buffer delay T_BUF;
//   mclk   - the master latch clock (clk_d): sclk delayed further by a
//            programmable delay line of (1 + window_control) taps of T_TAP;
//   window - the timing detection window, high from the rise of sclk until the
//            rise of mclk.
// Because the master latch stays transparent until mclk rises, data arriving in
// the window still reaches Q; the window length is the time that can be
// borrowed and the time in which late data is flagged as an error.
// While rst is high both clocks are held high, which keeps the flip-flop in its
// reset state and the window closed.
//
// Interface: clock, rst, window_control in; sclk, mclk, window out.
// Timing: transport delays in ns (timescale 1 ns). The delay-line structure,
// the derivation of the window from the two clocks and the window control
// input follow the published circuit; T_BUF, T_TAP and the number of taps are
// assumed values (the publication gives none), and holding the clocks high in
// reset is this model's reading of the rst input shown on the clock gates.
`timescale 1ns / 1ps
module edff_timing_control #(
  parameter real         T_BUF = 1.0,  // clock buffer delay to sclk (ns)
  parameter real         T_TAP = 2.0,  // one delay-line tap (ns)
  parameter int unsigned WC_W  = 3     // width of window_control
) (
  input  logic            clock,
  input  logic            rst,
  input  logic [WC_W-1:0] window_control,
  output logic            sclk,
  output logic            mclk,
  output logic            window
);
  localparam int unsigned NTAP = 1 << WC_W;

  logic            clk_g;
  logic [NTAP-1:0] tap;  // tap[k]: sclk delayed by (k + 1) * T_TAP

  assign clk_g = clock | rst;

  initial sclk = 1'b1;
  always @(clk_g) sclk <= #(T_BUF) clk_g;

  for (genvar k = 0; k < NTAP; k++) begin : g_tap
    initial tap[k] = 1'b1;
    if (k == 0) begin : g_first
      always @(sclk) tap[k] <= #(T_TAP) sclk;
    end else begin : g_next
      always @(tap[k-1]) tap[k] <= #(T_TAP) tap[k-1];
    end
  end

  assign mclk = tap[window_control];

  assign window = sclk & ~mclk;
endmodule
