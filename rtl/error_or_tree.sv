// error_or_tree - timing-slack prioritised OR-tree of the error processor.
//
// The error flags of all monitored flip-flops are gathered here. The inputs are
// ordered by the timing slack of their endpoints, index 0 being the endpoint
// with the least slack, and split into N_GROUPS equal slack groups. Each group
// is reduced to one flag by an OR; the group flags are ORed into the global
// error flag, and a priority encoder reports the most critical group (lowest
// index) that flagged. The processor thus knows both that an error happened
// and how critical the failing path was.
//
// Interface: err_in[N_ERR] in; group_err[N_GROUPS], any_err, top_group out.
// Timing: purely combinational. The publication names a "timing slack
// prioritized OR-tree" of variable size; the grouping into equal slack classes
// and the priority encoder are this design's reading of "prioritized".
`timescale 1ns / 1ps
module error_or_tree #(
  parameter int unsigned N_ERR    = 32,
  parameter int unsigned N_GROUPS = 4,
  localparam int unsigned GW      = (N_GROUPS > 1) ? $clog2(N_GROUPS) : 1
) (
  input  logic [N_ERR-1:0]    err_in,
  output logic [N_GROUPS-1:0] group_err,
  output logic                any_err,
  output logic [GW-1:0]       top_group
);
  localparam int unsigned GSIZE = N_ERR / N_GROUPS;

  if (GSIZE * N_GROUPS != N_ERR) begin : g_bad_size
    $error("error_or_tree: N_ERR must be a multiple of N_GROUPS");
  end

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_grp
    assign group_err[g] = |err_in[g*GSIZE +: GSIZE];
  end

  assign any_err = |group_err;

  always_comb begin
    top_group = '0;
    for (int g = N_GROUPS - 1; g >= 0; g--) begin
      if (group_err[g]) top_group = GW'(g);
    end
  end
endmodule
