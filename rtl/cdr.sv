// TDC-less linear digital CDR, closed loop (contains behavioural models).
//
// Connects the synthesizable core (cdr_digital) to behavioural models of the
// two delta-sigma current DACs with their low-pass post filters (FLL coarse
// DAC and integral fine DAC) and of the current-controlled ring oscillator,
// whose 3-level proportional DAC is driven by the Hogge detector's DE/DR
// pulses. Oscillator numbers are this design's: a 0.4-3.6 GHz coarse range
// (covering the document's 0.5-3.2 Gb/s), a fine range of +-1% (well above
// the FLL's +-0.1% residual error) and a proportional gain KP_FRAC = 0.02,
// which with a transition density of 1/2 at 2.5 Gb/s gives a
// jitter-transfer bandwidth of about KP_FRAC * 1.25 GHz / (2*pi) = 4 MHz,
// the figure the document reports.
//
// Interface: ref_clk - 1 MHz FLL reference; din - serial data
//            clk_out - recovered clock; dout - retimed data
//            fll_done, int_acc, fll_code, de, dr, el_corr - observability
`timescale 1ps/1fs
module cdr
  import clk_pkg::*;
#(
  parameter int unsigned KI_STEP    = 4,
  parameter int unsigned TARGET     = 2500,
  parameter real         F_MIN_HZ   = 0.4e9,
  parameter real         F_MAX_HZ   = 3.6e9,
  parameter real         FINE_RANGE = 0.01,
  parameter real         KP_FRAC    = 0.02
) (
  input  logic               ref_clk,
  input  logic               rst_n,
  input  logic               din,
  output logic               clk_out,
  output logic               dout,
  output logic               fll_done,
  output logic signed [17:0] int_acc,
  output logic [13:0]        fll_code,
  output logic               de,
  output logic               dr,
  output corr_t              el_corr
);

  logic [DAC_CELLS-1:0] fll_therm, int_therm;
  logic                 clk_half;
  real                  fll_level, int_level;

  cdr_digital #(.KI_STEP(KI_STEP), .TARGET(TARGET)) u_core (
    .clk(clk_out), .rst_n, .ref_clk, .din, .de, .dr, .dout, .fll_therm, .int_therm,
    .clk_half, .fll_done, .int_acc, .fll_code, .el_corr);

  current_dac_lpf u_fdac (.clk(clk_half), .en(1'b1), .therm(fll_therm), .level(fll_level));
  current_dac_lpf u_idac (.clk(clk_half), .en(1'b1), .therm(int_therm), .level(int_level));

  cco_model #(.F_MIN_HZ(F_MIN_HZ), .F_MAX_HZ(F_MAX_HZ), .FINE_RANGE(FINE_RANGE), .KP_FRAC(KP_FRAC)) u_dco (
    .coarse(fll_level), .fine(int_level), .pos(de), .neg(dr), .clk_out);

endmodule
