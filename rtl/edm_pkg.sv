// edm_pkg - constants shared by the error-detection blocks.
//
// Register map of the error processor (32-bit AHB-Lite words, byte offsets),
// the meaning of the three interrupt lines and the reset values of the
// programmable settings. The register map, interrupt assignment and reset
// values are choices of this design; the publication states only that the
// error processor has a running mean register, an adder, an OR-tree and
// "several interrupts" on IRQ[2:0] reachable over AHB.
`timescale 1ns / 1ps
package edm_pkg;

  // Register byte offsets
  localparam logic [7:0] REG_CTRL       = 8'h00;  // [0] EN, [1] CLR (w1, self clearing), [2] DVS_EN, [7:4] ALPHA, [10:8] WINDOW_CTRL
  localparam logic [7:0] REG_IRQ_EN     = 8'h04;  // [2:0] interrupt enables
  localparam logic [7:0] REG_IRQ_STAT   = 8'h08;  // [2:0] sticky interrupt status, write 1 to clear
  localparam logic [7:0] REG_THR_HI     = 8'h0C;  // high error-rate threshold on MEAN
  localparam logic [7:0] REG_THR_LO     = 8'h10;  // low error-rate threshold on MEAN
  localparam logic [7:0] REG_OBS_CYCLES = 8'h14;  // cycles to observe before the low-rate event may fire
  localparam logic [7:0] REG_CNT_THR    = 8'h18;  // error-count event threshold (0 = off)
  localparam logic [7:0] REG_ERR_COUNT  = 8'h1C;  // read only: cycles with at least one error
  localparam logic [7:0] REG_CYCLES     = 8'h20;  // read only: cycles observed
  localparam logic [7:0] REG_MEAN       = 8'h24;  // read only: running mean error rate
  localparam logic [7:0] REG_GROUPS     = 8'h28;  // read only: [15:0] sticky group flags, [23:16] last most-critical group

  // Interrupt lines
  typedef enum logic [1:0] {
    IRQ_ERR_HIGH = 2'd0,  // running mean above THR_HI
    IRQ_ERR_LOW  = 2'd1,  // running mean below THR_LO after OBS_CYCLES cycles
    IRQ_ERR_CNT  = 2'd2   // error count reached CNT_THR
  } irq_e;

  // Reset values
  localparam int unsigned ALPHA_RST      = 4;
  localparam int unsigned WINDOW_CTRL_RST = 4;
  localparam int unsigned THR_HI_RST     = 32'h0000_0800;  // 1/32 with a 16-bit mean
  localparam int unsigned THR_LO_RST     = 32'h0000_0040;  // 1/1024
  localparam int unsigned OBS_CYCLES_RST = 64;

  // AHB-Lite transfer types
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;

endpackage
