// tb_error_processor - register, statistics and interrupt checks of the error
// processor through its AHB-Lite port.
// An AHB master task pair performs single word writes and reads (address phase,
// then data phase, no wait states). The testbench checks reset values and
// read-back, then streams random error vectors while a reference model
// (OR-tree, running mean, counters, sticky group flags) follows the same
// cycles, and compares the statistics registers. It then provokes each of the
// three interrupt events, checks the IRQ lines, masking, write-1-to-clear and
// the raw events for the voltage loop, and checks the hardware clear input.
`timescale 1ns / 1ps
module tb_error_processor;
  import edm_pkg::*;
  localparam int N = 32, G = 4;
  logic hclk = 0, hresetn = 0;
  logic hsel = 0, hwrite = 0, hready = 1;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0]  htrans = HTRANS_IDLE;
  logic [2:0]  hsize = 3'b010;
  logic hreadyout, hresp;
  logic [N-1:0] err_in = '0;
  logic stat_clr = 0;
  logic [2:0] irq, window_control;
  logic dvs_en, ev_high, ev_low;
  int checks = 0, failures = 0;

  // reference model
  bit     model_on = 0;
  longint m_mean, m_err, m_cyc;
  logic [G-1:0] m_sticky;
  int     m_last;
  int     alpha = 4;

  error_processor #(.N_ERR(N), .N_GROUPS(G)) dut (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hrdata, .hreadyout, .hresp, .err_in, .stat_clr, .irq, .window_control, .dvs_en,
    .ev_high, .ev_low
  );

  always #5 hclk = ~hclk;

  always @(posedge hclk) if (model_on) begin
    logic [G-1:0] g;
    longint t, dlt, p;
    g = '0;
    for (int i = 0; i < N; i++) if (err_in[i]) g[i / (N / G)] = 1'b1;
    t = (g != 0) ? 65535 : 0;
    dlt = t - m_mean; p = longint'(1) << alpha;
    m_mean += (dlt >= 0) ? dlt / p : -((-dlt + p - 1) / p);
    m_cyc++;
    if (g != 0) begin
      m_err++;
      m_sticky |= g;
      for (int k = G - 1; k >= 0; k--) if (g[k]) m_last = k;
    end
  end

  task automatic ahb_write(input logic [7:0] a, input logic [31:0] v);
    @(posedge hclk); #1;
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 1; haddr = {24'h0, a};
    @(posedge hclk); #1;
    hsel = 0; htrans = HTRANS_IDLE; hwrite = 0; hwdata = v;
    @(posedge hclk); #1;
  endtask

  task automatic ahb_read(input logic [7:0] a, output logic [31:0] v);
    @(posedge hclk); #1;
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 0; haddr = {24'h0, a};
    @(posedge hclk); #1;
    hsel = 0; htrans = HTRANS_IDLE;
    #3 v = hrdata;
    checks++;
    if (hreadyout !== 1'b1 || hresp !== 1'b0) begin failures++; $display("FAIL bus response"); end
  endtask

  task automatic expect_reg(input logic [7:0] a, input logic [31:0] exp, input string what);
    logic [31:0] v;
    ahb_read(a, v);
    checks++;
    if (v !== exp) begin
      failures++;
      $display("FAIL %0t %s: reg %h = %h exp %h", $time, what, a, v, exp);
    end
  endtask

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %0t %s: got %b exp %b", $time, what, got, exp); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge hclk);
    hresetn = 1;
    // reset values
    expect_reg(REG_CTRL, 32'((ALPHA_RST << 4) | (WINDOW_CTRL_RST << 8)), "CTRL reset");
    expect_reg(REG_IRQ_EN, 0, "IRQ_EN reset");
    expect_reg(REG_IRQ_STAT, 0, "IRQ_STAT reset");
    expect_reg(REG_THR_HI, THR_HI_RST, "THR_HI reset");
    expect_reg(REG_THR_LO, THR_LO_RST, "THR_LO reset");
    expect_reg(REG_OBS_CYCLES, OBS_CYCLES_RST, "OBS reset");
    expect_reg(REG_CNT_THR, 0, "CNT_THR reset");
    expect_reg(REG_ERR_COUNT, 0, "ERR_COUNT reset");
    expect_reg(REG_MEAN, 0, "MEAN reset");
    chk(window_control == 3'(WINDOW_CTRL_RST), 1, "window_control reset");
    // read-back
    ahb_write(REG_THR_HI, 32'h0001_2345); expect_reg(REG_THR_HI, 32'h2345, "THR_HI rw");
    ahb_write(REG_THR_LO, 32'h0000_0123); expect_reg(REG_THR_LO, 32'h0123, "THR_LO rw");
    ahb_write(REG_OBS_CYCLES, 32'hdead_beef); expect_reg(REG_OBS_CYCLES, 32'hdead_beef, "OBS rw");
    ahb_write(REG_CNT_THR, 32'h0000_1000); expect_reg(REG_CNT_THR, 32'h1000, "CNT_THR rw");
    ahb_write(REG_IRQ_EN, 32'hffff_ffff); expect_reg(REG_IRQ_EN, 32'h7, "IRQ_EN rw");
    ahb_write(REG_CTRL, 32'h0000_0724); expect_reg(REG_CTRL, 32'h0000_0724, "CTRL rw");
    chk(window_control == 3'd7 && dvs_en, 1, "CTRL drives window_control and dvs_en");
    expect_reg(8'h3C, 0, "unmapped reads zero");

    // statistics: no interrupts, thresholds out of reach
    ahb_write(REG_IRQ_EN, 0);
    ahb_write(REG_THR_HI, 32'hffff);
    ahb_write(REG_THR_LO, 0);
    ahb_write(REG_CNT_THR, 0);
    alpha = 3;
    m_mean = 0; m_err = 0; m_cyc = 0; m_sticky = '0; m_last = 0;
    ahb_write(REG_CTRL, 32'h0000_0031);   // EN, alpha 3
    model_on = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge hclk);
      case ($urandom_range(3))
        0: err_in = '0;
        1: begin err_in = '0; err_in[$urandom_range(N-1)] = 1'b1; end
        2: err_in = $urandom & $urandom & $urandom & $urandom;
        default: err_in = '0;
      endcase
    end
    @(negedge hclk) err_in = '0;
    ahb_write(REG_CTRL, 32'h0000_0030);   // stop counting
    model_on = 0;
    expect_reg(REG_ERR_COUNT, 32'(m_err), "ERR_COUNT");
    expect_reg(REG_CYCLES, 32'(m_cyc), "CYCLES");
    expect_reg(REG_MEAN, 32'(m_mean), "MEAN");
    expect_reg(REG_GROUPS, 32'(m_sticky) | (32'(m_last) << 16), "GROUPS");
    chk(irq == 0, 1, "no irq while disabled");

    // software clear
    ahb_write(REG_CTRL, 32'h0000_0032);
    expect_reg(REG_ERR_COUNT, 0, "clear ERR_COUNT");
    expect_reg(REG_MEAN, 0, "clear MEAN");
    expect_reg(REG_GROUPS, 0, "clear GROUPS");

    // IRQ0: high error rate
    ahb_write(REG_THR_HI, 32'h0000_2000);
    ahb_write(REG_IRQ_EN, 32'h1);
    ahb_write(REG_CTRL, 32'h0000_0041);   // EN, alpha 4
    chk(irq[0], 0, "irq0 idle");
    @(negedge hclk) err_in = 32'h0000_0100;   // group 1
    repeat (4) @(negedge hclk);
    err_in = '0;
    @(negedge hclk);
    chk(ev_high, 1, "ev_high after errors");
    chk(irq[0], 1, "irq0 raised");
    expect_reg(REG_GROUPS, 32'h0001_0002, "group 1 flagged");
    // let the mean decay below THR_HI, then clear
    repeat (80) @(negedge hclk);
    chk(ev_high, 0, "ev_high gone");
    chk(irq[0], 1, "irq0 sticky");
    ahb_write(REG_IRQ_STAT, 32'h1);
    chk(irq[0], 0, "irq0 cleared by w1c");

    // IRQ1: low error rate after OBS cycles; hardware clear restarts observation
    ahb_write(REG_THR_LO, 32'h0000_0100);
    ahb_write(REG_OBS_CYCLES, 20);
    @(negedge hclk) stat_clr = 1;
    @(negedge hclk) stat_clr = 0;
    chk(ev_low, 0, "ev_low not before OBS cycles");
    repeat (21) @(negedge hclk);
    chk(ev_low, 1, "ev_low after OBS cycles");
    expect_reg(REG_IRQ_STAT, 32'h2, "IRQ_STAT low bit");
    chk(irq[1], 0, "irq1 masked");
    ahb_write(REG_IRQ_EN, 32'h2);
    chk(irq[1], 1, "irq1 enabled");
    ahb_write(REG_OBS_CYCLES, 32'hffff_ffff);
    ahb_write(REG_IRQ_STAT, 32'h2);
    chk(irq[1], 0, "irq1 cleared");

    // IRQ2: error count threshold
    ahb_write(REG_CNT_THR, 3);
    ahb_write(REG_IRQ_EN, 32'h4);
    ahb_write(REG_CTRL, 32'h0000_0043);   // EN + clear (clear acts on the following edge)
    @(negedge hclk);
    @(negedge hclk) err_in = 32'h8000_0000;
    @(negedge hclk) err_in = '0;
    @(negedge hclk) err_in = 32'h0000_0001;
    @(negedge hclk) err_in = '0;
    @(negedge hclk);
    chk(irq[2], 0, "irq2 not at 2 errors");
    err_in = 32'h0001_0000;
    @(negedge hclk) err_in = '0;
    @(negedge hclk);
    chk(irq[2], 1, "irq2 at 3 errors");
    expect_reg(REG_GROUPS, 32'h0002_000d, "groups 0,2,3; last 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
