// edm_mcu_top - timing-error-aware part of an ultra-low-voltage microcontroller.
//
// The idea: instead of adding timing margin for slow corners and on-die
// variation, the critical endpoints of the logic get flip-flops that tolerate
// and report late data. Data arriving within a short window after the clock
// edge still passes to Q (the error is masked, the pipeline state is not
// corrupted) and raises an error flag. The flags are gathered by the error
// processor, whose statistics steer a closed voltage scaling loop: the supply
// is lowered while no errors are seen and raised when they become frequent,
// so the chip runs at the point of first failure with no margin.
//
// This top holds N_EDFF error-detection flip-flops (edff, one per monitored
// endpoint; d/d_n come from the critical logic stage and q/q_n go to the next
// one), the error processor with its AHB-Lite slave port and IRQ[2:0], and the
// voltage scaling controller whose vdd_code goes to the off-chip DC/DC
// converter. The processor core, the other peripherals, the SRAM and the bus
// interconnect are not part of this RTL; the AHB port and the interrupt lines
// are brought out where they would connect.
//
// Interface: clock, rst (active high); d/d_n, q/q_n [N_EDFF]; AHB-Lite slave;
// irq[2:0]; vdd_code; step_up/step_down strobes of the scaling loop.
// Timing: error flags of the window after edge k are sampled at edge k+1; the
// statistics and the scaling loop react one and two cycles later.
// Which endpoints are monitored and how many is not given in the publication;
// N_EDFF, N_GROUPS and VCODE_W are this design's defaults.
// rst is used asynchronously inside the flip-flop cells (as in the published
// cell) and synchronously in the error processor and voltage controller, so a
// lint note that it is flopped both ways is expected.
`timescale 1ns / 1ps
module edm_mcu_top #(
  parameter int unsigned N_EDFF    = 32,
  parameter int unsigned N_GROUPS  = 4,
  parameter int unsigned VCODE_W   = 8,
  parameter int unsigned SETTLE    = 16,
  parameter int unsigned WC_W      = 3
) (
  input  logic               clock,
  input  logic               rst,
  // monitored endpoints
  input  logic [N_EDFF-1:0]  d,
  input  logic [N_EDFF-1:0]  d_n,
  output logic [N_EDFF-1:0]  q,
  output logic [N_EDFF-1:0]  q_n,
  // AHB-Lite slave port (to the processor bus)
  input  logic               hsel,
  input  logic [31:0]        haddr,
  input  logic [1:0]         htrans,
  input  logic               hwrite,
  input  logic [2:0]         hsize,
  input  logic [31:0]        hwdata,
  input  logic               hready,
  output logic [31:0]        hrdata,
  output logic               hreadyout,
  output logic               hresp,
  // interrupts and supply control
  output logic [2:0]         irq,
  output logic [VCODE_W-1:0] vdd_code,
  output logic               step_up,
  output logic               step_down
);
  logic [N_EDFF-1:0] error;
  logic [WC_W-1:0]   window_control;
  logic              dvs_en, ev_high, ev_low;

  for (genvar i = 0; i < N_EDFF; i++) begin : g_edff
    edff #(.WC_W(WC_W)) u_edff (
      .clock, .rst, .window_control,
      .d(d[i]), .d_n(d_n[i]), .q(q[i]), .q_n(q_n[i]),
      .error(error[i]), .error_n()
    );
  end

  error_processor #(.N_ERR(N_EDFF), .N_GROUPS(N_GROUPS), .WC_W(WC_W)) u_ep (
    .hclk(clock), .hresetn(~rst),
    .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hrdata, .hreadyout, .hresp,
    .err_in(error), .stat_clr(step_up | step_down),
    .irq, .window_control, .dvs_en, .ev_high, .ev_low
  );

  dvs_controller #(.VCODE_W(VCODE_W), .SETTLE(SETTLE)) u_dvs (
    .clk(clock), .rst, .enable(dvs_en), .err_high(ev_high), .err_low(ev_low),
    .vdd_code, .step_up, .step_down, .settling()
  );
endmodule
