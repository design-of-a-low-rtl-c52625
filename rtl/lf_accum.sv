// Saturating loop-filter accumulator with dropped LSBs.
//
// On every enabled clock edge the accumulator adds +STEP, -STEP or nothing,
// according to a three-valued correction request, and saturates at the ends
// of its two's-complement range instead of wrapping. The DAC is driven only
// by the top OUT_W bits (offset binary, mid-scale = 0), so the lowest
// ACC_W-OUT_W bits are dropped: dithering of a few LSBs caused by loop
// latency then does not reach the oscillator while the DAC resolution is
// kept (this is the technique the document describes for both designs).
//
// The document gives the widths: 14-bit integral and 18-bit double-integral
// accumulators in the PLL feeding 13-bit DACs. STEP, INIT, saturation and
// the offset-binary DAC code are this design's choices.
//
// Interface: en   - update enable (clock-enable for decimated paths)
//            corr - CORR_UP adds STEP, CORR_DN subtracts it
//            acc  - accumulator value (signed), valid one cycle after update
//            code - unsigned DAC code, top OUT_W bits of acc, mid-scale at 0
`timescale 1ps/1fs
module lf_accum
  import clk_pkg::*;
#(
  parameter int unsigned ACC_W = 14,
  parameter int unsigned OUT_W = 13,
  parameter int unsigned STEP  = 1,
  parameter int          INIT  = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  corr_t                   corr,
  output logic signed [ACC_W-1:0] acc,
  output logic        [OUT_W-1:0] code
);

  localparam logic signed [ACC_W:0] MAXV = (ACC_W+1)'((1 << (ACC_W-1)) - 1);
  localparam logic signed [ACC_W:0] MINV = -(ACC_W+1)'(1 << (ACC_W-1));

  logic signed [ACC_W:0] nxt;

  always_comb begin
    nxt = {acc[ACC_W-1], acc};
    unique case (corr)
      CORR_UP: nxt = nxt + (ACC_W+1)'(STEP);
      CORR_DN: nxt = nxt - (ACC_W+1)'(STEP);
      default: ;
    endcase
    if (nxt > MAXV) nxt = MAXV;
    if (nxt < MINV) nxt = MINV;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= ACC_W'(INIT);
    else if (en) acc <= nxt[ACC_W-1:0];
  end

  // Offset binary: invert the sign bit of the kept MSBs.
  assign code = {~acc[ACC_W-1], acc[ACC_W-2 -: OUT_W-1]};

endmodule
