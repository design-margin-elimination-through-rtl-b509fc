// tb_error_or_tree - random and directed vectors against a loop-based model.
// The reference walks the inputs bit by bit to build the group flags and finds
// the lowest-index group with a set bit; sparse vectors (one or two set bits)
// are favoured so that the priority encoding is exercised.
`timescale 1ns / 1ps
module tb_error_or_tree;
  localparam int N = 32, G = 4;
  logic [N-1:0] err_in;
  logic [G-1:0] group_err;
  logic         any_err;
  logic [1:0]   top_group;
  int checks = 0, failures = 0;

  error_or_tree #(.N_ERR(N), .N_GROUPS(G)) dut (.err_in, .group_err, .any_err, .top_group);

  task automatic check_vec();
    logic [G-1:0] eg;
    int top;
    eg = '0; top = -1;
    for (int i = 0; i < N; i++) if (err_in[i]) eg[i / (N / G)] = 1'b1;
    for (int g = G - 1; g >= 0; g--) if (eg[g]) top = g;
    #1;
    checks++;
    if (group_err !== eg || any_err !== (top >= 0) || (top >= 0 && top_group !== 2'(top))) begin
      failures++;
      $display("FAIL in=%h groups=%b/%b any=%b top=%0d/%0d", err_in, group_err, eg, any_err, top_group, top);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    err_in = '0; check_vec();
    for (int i = 0; i < N; i++) begin err_in = '0; err_in[i] = 1'b1; check_vec(); end
    for (int k = 0; k < 500; k++) begin
      case (k % 3)
        0: err_in = $urandom;
        1: begin err_in = '0; err_in[$urandom_range(N-1)] = 1'b1; err_in[$urandom_range(N-1)] = 1'b1; end
        default: err_in = $urandom & $urandom & $urandom;
      endcase
      check_vec();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
