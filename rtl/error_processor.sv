// error_processor - collects the timing error flags of the whole chip, keeps
// error statistics and raises programmable interrupts; an AHB-Lite slave.
//
// Every error-detection flip-flop holds its flag until the next rising clock
// edge; on that edge this block samples all flags at once. They pass the
// slack-prioritised OR-tree (error_or_tree), whose global flag drives the
// running mean error register and its counters (running_mean_error), and whose
// group flags are kept as sticky bits together with the most critical group
// that failed last. Three events are derived from the statistics and latched
// as interrupt status bits (see edm_pkg): mean above THR_HI, mean below THR_LO
// after OBS_CYCLES observed cycles, and the error count reaching CNT_THR.
// An enabled status bit drives its IRQ line until software writes 1 to clear
// it. The raw high/low events are also given to the voltage scaling loop,
// which restarts the statistics through `stat_clr` after every supply step.
// The CTRL register further holds the window_control code for the flip-flops'
// detection window and the enable of the voltage scaling loop.
//
// Interface: AHB-Lite slave (32-bit, single transfers, word accesses only, no
// wait states, always OKAY); err_in[N_ERR]; stat_clr; irq[2:0];
// window_control; dvs_en; ev_high/ev_low. Timing: statistics are updated one
// clock after the edge that samples the flags; register writes take effect at
// the end of the AHB data phase.
// The publication gives the parts (OR-tree, running mean register, adder,
// interrupts on IRQ[2:0], AHB connection) but no register map, event
// definitions or widths; those are this design's.
`timescale 1ns / 1ps
module error_processor
  import edm_pkg::*;
#(
  parameter int unsigned N_ERR    = 32,
  parameter int unsigned N_GROUPS = 4,
  parameter int unsigned MEAN_W   = 16,
  parameter int unsigned WC_W     = 3
) (
  input  logic              hclk,
  input  logic              hresetn,
  // AHB-Lite slave
  input  logic              hsel,
  input  logic [31:0]       haddr,
  input  logic [1:0]        htrans,
  input  logic              hwrite,
  input  logic [2:0]        hsize,
  input  logic [31:0]       hwdata,
  input  logic              hready,
  output logic [31:0]       hrdata,
  output logic              hreadyout,
  output logic              hresp,
  // error flags and control
  input  logic [N_ERR-1:0]  err_in,
  input  logic              stat_clr,
  output logic [2:0]        irq,
  output logic [WC_W-1:0]   window_control,
  output logic              dvs_en,
  output logic              ev_high,
  output logic              ev_low
);
  localparam int unsigned GW = (N_GROUPS > 1) ? $clog2(N_GROUPS) : 1;

  logic rst;
  assign rst = ~hresetn;

  // ---------------- registers ----------------
  logic              en;
  logic [3:0]        alpha;
  logic [2:0]        irq_en;
  logic [2:0]        irq_stat;
  logic [MEAN_W-1:0] thr_hi, thr_lo;
  logic [31:0]       obs_cycles, cnt_thr;
  logic              sw_clr;

  // ---------------- statistics ----------------
  logic [N_GROUPS-1:0] group_err, group_sticky;
  logic                any_err;
  logic [GW-1:0]       top_group, last_group;
  logic [MEAN_W-1:0]   mean;
  logic [31:0]         err_count, cycle_count;
  logic                clr;
  logic [2:0]          ev;

  assign clr = sw_clr | stat_clr;

  error_or_tree #(.N_ERR(N_ERR), .N_GROUPS(N_GROUPS)) u_tree (
    .err_in, .group_err, .any_err, .top_group
  );

  running_mean_error #(.MEAN_W(MEAN_W), .CNT_W(32)) u_mean (
    .clk(hclk), .rst, .en, .clr, .alpha_shift(alpha), .err(any_err),
    .mean, .err_count, .cycle_count
  );

  always_ff @(posedge hclk) begin
    if (rst || clr) begin
      group_sticky <= '0;
      last_group   <= '0;
    end else if (en && any_err) begin
      group_sticky <= group_sticky | group_err;
      last_group   <= top_group;
    end
  end

  always_comb begin
    ev               = '0;
    ev[IRQ_ERR_HIGH] = en && (mean > thr_hi);
    ev[IRQ_ERR_LOW]  = en && (cycle_count >= obs_cycles) && (mean < thr_lo);
    ev[IRQ_ERR_CNT]  = en && (cnt_thr != '0) && (err_count >= cnt_thr);
  end

  assign ev_high = ev[IRQ_ERR_HIGH];
  assign ev_low  = ev[IRQ_ERR_LOW];
  assign irq     = irq_stat & irq_en;

  // ---------------- AHB-Lite slave ----------------
  logic       dp_valid, dp_write;
  logic [7:0] dp_addr;
  logic       wr;

  always_ff @(posedge hclk) begin
    if (rst) begin
      dp_valid <= 1'b0;
      dp_write <= 1'b0;
      dp_addr  <= '0;
    end else if (hready) begin
      dp_valid <= hsel && htrans[1];
      dp_write <= hwrite;
      dp_addr  <= haddr[7:0];
    end
  end

  assign wr        = dp_valid && dp_write;
  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;

  always_ff @(posedge hclk) begin
    if (rst) begin
      en             <= 1'b0;
      sw_clr         <= 1'b0;
      dvs_en         <= 1'b0;
      alpha          <= 4'(ALPHA_RST);
      window_control <= WC_W'(WINDOW_CTRL_RST);
      irq_en         <= '0;
      irq_stat       <= '0;
      thr_hi         <= MEAN_W'(THR_HI_RST);
      thr_lo         <= MEAN_W'(THR_LO_RST);
      obs_cycles     <= OBS_CYCLES_RST;
      cnt_thr        <= '0;
    end else begin
      sw_clr   <= 1'b0;
      irq_stat <= irq_stat | ev;
      if (wr) begin
        unique case (dp_addr)
          REG_CTRL: begin
            en             <= hwdata[0];
            sw_clr         <= hwdata[1];
            dvs_en         <= hwdata[2];
            alpha          <= hwdata[7:4];
            window_control <= hwdata[8 +: WC_W];
          end
          REG_IRQ_EN:     irq_en     <= hwdata[2:0];
          REG_IRQ_STAT:   irq_stat   <= (irq_stat & ~hwdata[2:0]) | ev;
          REG_THR_HI:     thr_hi     <= hwdata[MEAN_W-1:0];
          REG_THR_LO:     thr_lo     <= hwdata[MEAN_W-1:0];
          REG_OBS_CYCLES: obs_cycles <= hwdata;
          REG_CNT_THR:    cnt_thr    <= hwdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    hrdata = '0;
    if (dp_valid && !dp_write) begin
      unique case (dp_addr)
        REG_CTRL: begin
          hrdata[0]             = en;
          hrdata[2]             = dvs_en;
          hrdata[7:4]           = alpha;
          hrdata[8 +: WC_W]     = window_control;
        end
        REG_IRQ_EN:     hrdata[2:0]        = irq_en;
        REG_IRQ_STAT:   hrdata[2:0]        = irq_stat;
        REG_THR_HI:     hrdata[MEAN_W-1:0] = thr_hi;
        REG_THR_LO:     hrdata[MEAN_W-1:0] = thr_lo;
        REG_OBS_CYCLES: hrdata             = obs_cycles;
        REG_CNT_THR:    hrdata             = cnt_thr;
        REG_ERR_COUNT:  hrdata             = err_count;
        REG_CYCLES:     hrdata             = cycle_count;
        REG_MEAN:       hrdata[MEAN_W-1:0] = mean;
        REG_GROUPS: begin
          hrdata[N_GROUPS-1:0] = group_sticky;
          hrdata[16 +: GW]     = last_group;
        end
        default: ;
      endcase
    end
  end

  // only single 32-bit word transfers are supported
  a_word_size: assert property (@(posedge hclk) disable iff (rst)
    (hsel && hready && htrans[1]) |-> (hsize == 3'b010 && haddr[1:0] == 2'b00));
  a_no_burst: assert property (@(posedge hclk) disable iff (rst)
    (hsel && hready) |-> (htrans != 2'b11 && htrans != 2'b01));

  if (N_GROUPS > 16 || MEAN_W > 32 || WC_W > 8) begin : g_bad
    $error("error_processor: register fields too narrow for the parameters");
  end
endmodule
