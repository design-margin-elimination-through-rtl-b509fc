// error_latch - set/reset latch that turns a transition pulse into a timing error flag.
//
// A pulse on `edge_i` sets the latch only while `window` is high, i.e. in the
// detection window right after the rising clock edge: a data transition there
// arrived late and is therefore a timing error. The flag is held for the rest
// of the cycle so that the error processor can collect it, and is cleared at
// the next rising clock edge by the short interval in which `clock` is already
// high but the buffered slave clock `sclk` is still low. `rst` clears it too.
//
// Interface: edge_i/window set inputs, clock/sclk reset pair, rst; error and
// its complement. Timing: level sensitive (a latch by intent; the latch that
// lint reports here is the circuit's storage element). Set and clear are
// mutually exclusive because the window is only open while sclk is high.
// Set/reset conditions follow the published circuit; giving reset priority is
// this design's choice.
`timescale 1ns / 1ps
module error_latch (
  input  logic edge_i,
  input  logic window,
  input  logic clock,
  input  logic sclk,
  input  logic rst,
  output logic error,
  output logic error_n
);
  logic clr;
  logic set;

  assign clr = rst | (clock & ~sclk);
  assign set = edge_i & window;

  always_latch begin
    if (clr)      error = 1'b0;
    else if (set) error = 1'b1;
  end

  assign error_n = ~error;
endmodule
