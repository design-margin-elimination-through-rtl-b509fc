// tb_edm_mcu_top - closed-loop run of the whole error-aware design at its
// default parameters.
//
// The testbench plays three roles:
//  * the critical logic stage: every cycle it launches a random new value on
//    each of the 32 monitored endpoints. The value arrives after a path delay
//    that grows as the supply code falls,
//        delay_i = 40 ns + (255 - vdd_code) * 0.5 ns - (i / 8) * 2 ns,
//    so endpoint group 0 has the least slack (clock period 100 ns);
//  * the processor: it programs the error processor over AHB (thresholds,
//    interrupt enables, window, loop enable) and services the interrupts by
//    reading and clearing the status register;
//  * the checker: half a cycle after each capture edge it compares every Q with
//    the value launched one cycle earlier and the error flag with the arrival
//    time of that value relative to the detection window.
// Starting at the top of the supply range, the loop must walk the code down
// until late arrivals appear, then hold it at the point of first failure.
// Every late value must be masked (Q still correct) and flagged, and no value
// may be lost. Each mechanism is counted and must occur: on-time capture,
// masked and flagged late arrival, step down, step up, each interrupt line,
// a window_control change, AHB reads and writes.
`timescale 1ns / 1ps
module tb_edm_mcu_top;
  import edm_pkg::*;
  localparam real T = 100.0;
  localparam int  N = 32;
  localparam int  CYCLES = 5000;

  logic clock = 0, rst = 1;
  logic [N-1:0] d = '0, d_n, q, q_n;
  logic hsel = 0, hwrite = 0, hready = 1;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0]  htrans = HTRANS_IDLE;
  logic [2:0]  hsize = 3'b010;
  logic hreadyout, hresp;
  logic [2:0] irq;
  logic [7:0] vdd_code;
  logic step_up, step_down;

  int checks = 0, failures = 0;
  int n_ontime = 0, n_masked = 0, n_lost = 0, n_up = 0, n_down = 0, n_ahb_rd = 0, n_ahb_wr = 0;
  int n_irq[3] = '{0, 0, 0};
  int n_wc_change = 0;
  int wc = 4;
  int cycle = 0;

  assign d_n = ~d;

  edm_mcu_top dut (
    .clock, .rst, .d, .d_n, .q, .q_n,
    .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready, .hrdata, .hreadyout, .hresp,
    .irq, .vdd_code, .step_up, .step_down
  );

  always #(T / 2) clock = ~clock;

  // ---------------- critical logic stage ----------------
  logic [N-1:0] cur_val = '0, chk_val = '0, chk_old = '0;
  real          cur_dly[N] = '{default: 40.0}, chk_dly[N] = '{default: 40.0};
  bit           chk_valid = 0;

  function automatic real path_delay(int i, logic [7:0] code);
    return 40.0 + real'(255 - int'(code)) * 0.5 - real'(i / 8) * 2.0;
  endfunction

  always @(posedge clock) begin
    cycle++;
    chk_valid = !rst;
  end

  // one launching process per endpoint; each delayed arrival is its own thread
  for (genvar i = 0; i < N; i++) begin : g_launch
    always @(posedge clock) begin
      chk_old[i] = chk_val[i];
      chk_val[i] = cur_val[i];
      chk_dly[i] = cur_dly[i];
      cur_val[i] = rst ? 1'b0 : 1'($urandom);
      cur_dly[i] = path_delay(i, vdd_code);
      fork
        automatic logic v   = cur_val[i];
        automatic real  dly = cur_dly[i];
        begin
          #(dly) d[i] = v;
        end
      join_none
    end
  end

  // ---------------- checker ----------------
  // window after each edge: from sclk (1 ns) to mclk (1 + 2 * (1 + wc) ns)
  always @(posedge clock) if (chk_valid) begin
    logic [N-1:0] prev;
    #45;
    prev = chk_old;
    for (int i = 0; i < N; i++) begin
      real late;
      logic changed;
      late    = chk_dly[i] - T;   // arrival relative to the capture edge
      changed = (chk_val[i] != prev[i]);
      if (late < 1.0 + 2.0 * (1 + wc) - 1.0) begin
        checks++;
        if (q[i] !== chk_val[i] || q_n[i] !== ~chk_val[i]) begin
          failures++; n_lost++;
          $display("FAIL %0t bit %0d: q=%b exp %b (late %0.1f ns)", $time, i, q[i], chk_val[i], late);
        end
      end
      if (changed && late < -0.25) begin
        checks++; n_ontime++;
        if (dut.error[i] !== 1'b0) begin failures++; $display("FAIL %0t bit %0d: flag on on-time data", $time, i); end
      end else if (changed && late > 0.25 && late < 2.0 * (1 + wc)) begin
        checks++; n_masked++;
        if (dut.error[i] !== 1'b1) begin failures++; $display("FAIL %0t bit %0d: late data not flagged (%0.1f ns)", $time, i, late); end
      end else if (late > 2.0 * (1 + wc) + 2.0) begin
        checks++; failures++; n_lost++;
        $display("FAIL %0t bit %0d: arrival %0.1f ns after the window", $time, i, late);
      end
    end
  end

  always @(posedge clock) begin
    if (step_up) n_up++;
    if (step_down) n_down++;
  end
  for (genvar k = 0; k < 3; k++) begin : g_irqcnt
    always @(posedge irq[k]) n_irq[k]++;
  end

  // ---------------- processor ----------------
  task automatic ahb_write(input logic [7:0] a, input logic [31:0] v);
    @(posedge clock); #1;
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 1; haddr = {24'h0, a};
    @(posedge clock); #1;
    hsel = 0; htrans = HTRANS_IDLE; hwrite = 0; hwdata = v;
    n_ahb_wr++;
  endtask

  task automatic ahb_read(input logic [7:0] a, output logic [31:0] v);
    @(posedge clock); #1;
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 0; haddr = {24'h0, a};
    @(posedge clock); #1;
    hsel = 0; htrans = HTRANS_IDLE;
    #3 v = hrdata;
    n_ahb_rd++;
  endtask

  function automatic logic [31:0] ctrl_word(int w);
    return 32'h0000_0045 | (32'(w) << 8);  // EN, DVS_EN, alpha 4, window
  endfunction

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    #(T * (CYCLES + 2000));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clock);
    #1 rst = 0;
    ahb_write(REG_THR_HI, 32'h0400);
    ahb_write(REG_THR_LO, 32'h0040);
    ahb_write(REG_OBS_CYCLES, 16);
    ahb_write(REG_CNT_THR, 1);
    ahb_write(REG_IRQ_EN, 32'h7);
    ahb_write(REG_CTRL, ctrl_word(wc));
    ahb_read(REG_CTRL, v);
    checks++;
    if (v !== ctrl_word(wc)) begin failures++; $display("FAIL CTRL readback %h", v); end
    while (cycle < CYCLES) begin
      @(posedge clock);
      if (irq != 0) begin
        ahb_read(REG_IRQ_STAT, v);
        checks++;
        if ((v[2:0] & irq) != irq) begin failures++; $display("FAIL IRQ_STAT %b irq %b", v[2:0], irq); end
        ahb_write(REG_IRQ_STAT, v);
      end
      if (cycle > CYCLES / 2 && wc == 4) begin
        wc = 6;                         // change the window half way
        ahb_write(REG_CTRL, ctrl_word(wc));
        n_wc_change++;
      end
    end
    // the loop must have settled at the point of first failure: the most
    // critical path arrives at the edge for codes 134..136
    checks++;
    $display("final vdd_code %0d", vdd_code);
    if (vdd_code < 8'd130 || vdd_code > 8'd140) begin failures++; $display("FAIL vdd_code %0d not at PoFF", vdd_code); end
    need(n_ontime, "on-time captures");
    need(n_masked, "late arrivals masked+flagged");
    need(n_down, "supply steps down");
    need(n_up, "supply steps up");
    need(n_irq[0], "IRQ0 high error rate");
    need(n_irq[1], "IRQ1 low error rate");
    need(n_irq[2], "IRQ2 error count");
    need(n_wc_change, "window_control changes");
    need(n_ahb_wr, "AHB writes");
    need(n_ahb_rd, "AHB reads");
    checks++;
    if (n_lost != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
