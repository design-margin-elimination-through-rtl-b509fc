// tb_edm_freq_sweep - the closed loop at every target frequency from 5 to
// 30 MHz, the operating range over which the design was evaluated.
//
// The design runs at its default parameters. For each clock frequency the
// testbench resets the design, configures the error processor over AHB and
// lets the voltage loop search for the point of first failure. The monitored
// paths follow a delay model that rises steeply as the supply code falls,
//     delay_i = 8000 / (vdd_code + 20) * (1 - 0.02 * (i / 8))  ns,
// so slow clocks need low codes and fast clocks high ones. For each frequency
// it checks that:
//   * the code ends within 2 steps of the lowest code at which the least-slack
//     path still meets the clock period (worked out from the model);
//   * late arrivals were flagged and masked;
//   * no value was ever lost: every Q equals the value launched one cycle
//     earlier, even when the supply step changes delays by several ns at the
//     slowest frequencies.
`timescale 1ns / 1ps
module tb_edm_freq_sweep;
  import edm_pkg::*;
  localparam int N  = 32;
  localparam int NF = 10;
  localparam real FREQ_MHZ[NF] = '{5.0, 7.5, 10.0, 12.5, 15.0, 17.5, 20.0, 22.5, 25.0, 30.0};

  real T = 200.0;
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
  int n_masked = 0, n_lost = 0;
  int total_cycles = 0;

  assign d_n = ~d;

  edm_mcu_top dut (
    .clock, .rst, .d, .d_n, .q, .q_n,
    .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready, .hrdata, .hreadyout, .hresp,
    .irq, .vdd_code, .step_up, .step_down
  );

  always begin
    #(T / 2) clock = ~clock;
  end

  function automatic real path_delay(int i, int code);
    return 8000.0 / real'(code + 20) * (1.0 - 0.02 * real'(i / 8));
  endfunction

  // lowest code at which the least-slack path meets the period
  function automatic int poff_code(real period);
    for (int c = 0; c < 256; c++) if (path_delay(0, c) <= period) return c;
    return 255;
  endfunction

  // ---------------- critical logic stage ----------------
  logic [N-1:0] cur_val = '0, chk_val = '0;
  real          cur_dly[N] = '{default: 40.0}, chk_dly[N] = '{default: 40.0};

  always @(posedge clock) total_cycles++;

  for (genvar i = 0; i < N; i++) begin : g_launch
    always @(posedge clock) begin
      chk_val[i] = cur_val[i];
      chk_dly[i] = cur_dly[i];
      cur_val[i] = rst ? 1'b0 : 1'($urandom);
      cur_dly[i] = path_delay(i, int'(vdd_code));
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
  always @(posedge clock) if (!rst) begin
    #(T * 0.45);
    for (int i = 0; i < N; i++) begin
      real late;
      late = chk_dly[i] - T;
      if (late < 9.0) begin
        checks++;
        if (q[i] !== chk_val[i]) begin
          failures++; n_lost++;
          $display("FAIL %0t bit %0d lost (late %0.2f ns, T %0.1f)", $time, i, late, T);
        end
        if (dut.error[i]) begin
          if (late >= -0.01) n_masked++;
          else if (late < -0.5) begin
            checks++; failures++;
            $display("FAIL %0t bit %0d flagged although on time (%0.2f ns)", $time, i, late);
          end
        end
      end else begin
        checks++; failures++; n_lost++;
        $display("FAIL %0t bit %0d arrived %0.2f ns after the edge, past the window", $time, i, late);
      end
    end
  end

  // ---------------- processor ----------------
  task automatic ahb_write(input logic [7:0] a, input logic [31:0] v);
    @(posedge clock); #1;
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 1; haddr = {24'h0, a};
    @(posedge clock); #1;
    hsel = 0; htrans = HTRANS_IDLE; hwrite = 0; hwdata = v;
  endtask

  initial begin
    #(1.0e9);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      int exp_code, budget, masked0;
      T = 1000.0 / FREQ_MHZ[f];
      exp_code = poff_code(T);
      budget = (255 - exp_code) * 20 + 600;
      rst = 1;
      repeat (4) @(posedge clock);
      #1 rst = 0;
      masked0 = n_masked;
      ahb_write(REG_THR_HI, 32'h0400);
      ahb_write(REG_THR_LO, 32'h0040);
      ahb_write(REG_OBS_CYCLES, 16);
      ahb_write(REG_CTRL, 32'h0000_0445);   // EN, DVS_EN, alpha 4, window 4
      repeat (budget) @(posedge clock);
      checks++;
      $display("%5.1f MHz: final code %0d, expected %0d, masked late arrivals %0d",
               FREQ_MHZ[f], vdd_code, exp_code, n_masked - masked0);
      if (int'(vdd_code) < exp_code - 2 || int'(vdd_code) > exp_code + 2) begin
        failures++; $display("FAIL %0.1f MHz: loop did not reach the PoFF", FREQ_MHZ[f]);
      end
      checks++;
      if (n_masked == masked0) begin failures++; $display("FAIL %0.1f MHz: no masked late arrival", FREQ_MHZ[f]); end
    end
    checks++;
    if (n_lost != 0) failures++;
    $display("cycles simulated: %0d", total_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
