// Double-integral digital PLL, closed loop (contains behavioural models).
//
// Connects the synthesizable core (dpll_digital) to behavioural models of
// the analog parts: the two delta-sigma current DACs with switched-RC
// filters (IDAC fine, CDAC coarse), the current-controlled oscillator, and
// the divide-by-N feedback divider (synthesizable). The oscillator's
// proportional and fine gains are proportional to its coarse current, which
// is how the document makes the loop bandwidth (K_P) and the integral
// frequency step (K_I) track the reference frequency.
//
// With the default oscillator gains the loop bandwidth is about F_REF/40
// (KP_FRAC = 2*pi/40: each reference cycle the proportional path removes
// KP_FRAC of the phase error), the figure the document gives for its
// prototype. N = 4, as in the document (2.5 GHz from a 625 MHz reference).
//
// Interface: ref_clk - reference clock; rst_n - asynchronous reset
//            clk_out - oscillator output; fb_clk - divided clock
//            up, dn, int_acc, dint_acc, dint_corr - loop observability
`timescale 1ps/1fs
module dpll
  import clk_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned KI_STEP    = 1,
  parameter int unsigned KC_STEP    = 16,
  parameter int unsigned DZ_K       = 16,
  parameter int unsigned DINT_DIV   = 32,
  parameter real         F_MIN_HZ   = 0.6e9,
  parameter real         F_MAX_HZ   = 3.6e9,
  parameter real         FINE_RANGE = 0.25,
  parameter real         KP_FRAC    = 0.157
) (
  input  logic         ref_clk,
  input  logic         rst_n,
  output logic         clk_out,
  output logic         fb_clk,
  output logic         up,
  output logic         dn,
  output logic signed [13:0] int_acc,
  output logic signed [17:0] dint_acc,
  output corr_t        dint_corr
);

  logic [DAC_CELLS-1:0] idac_therm, cdac_therm;
  logic                 dsm_en;
  real                  idac_level, cdac_level;

  dpll_digital #(.KI_STEP(KI_STEP), .KC_STEP(KC_STEP), .DZ_K(DZ_K), .DINT_DIV(DINT_DIV)) u_core (
    .ref_clk, .fb_clk, .rst_n, .up, .dn, .idac_therm, .cdac_therm, .dsm_en,
    .int_acc, .dint_acc, .dint_corr);

  current_dac_lpf u_idac (.clk(ref_clk), .en(dsm_en), .therm(idac_therm), .level(idac_level));
  current_dac_lpf u_cdac (.clk(ref_clk), .en(dsm_en), .therm(cdac_therm), .level(cdac_level));

  cco_model #(.F_MIN_HZ(F_MIN_HZ), .F_MAX_HZ(F_MAX_HZ), .FINE_RANGE(FINE_RANGE), .KP_FRAC(KP_FRAC)) u_cco (
    .coarse(cdac_level), .fine(idac_level), .pos(up), .neg(dn), .clk_out);

  feedback_divider #(.N(N)) u_div (.clk_in(clk_out), .rst_n, .clk_out(fb_clk));

endmodule
