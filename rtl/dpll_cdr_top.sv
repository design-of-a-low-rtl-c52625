// Top level: the double-integral digital PLL and the linear digital CDR,
// side by side.
//
// The two designs share ideas but not signals: both split the loop filter
// into a linear proportional path that drives the oscillator with
// unquantised phase-detector pulses (PFD in the PLL, Hogge detector in the
// CDR) and a low-rate digital integral path fed by a bang-bang detector,
// with delta-sigma current DACs into a current-controlled ring oscillator.
// Each keeps its own ports here. Both contain behavioural models of their
// analog parts (DACs, filters, oscillators), so this top simulates the
// closed loops but is not synthesizable as a whole; dpll_digital and
// cdr_digital are the synthesizable cores.
//
// The two loop structures follow the document; putting them in one top
// with a shared reset is this design's choice (the two are separate chips).
//
// Interface (PLL):  pll_ref_clk (625 MHz for 2.5 GHz), pll_clk_out,
//                   pll_fb_clk, pll_int_acc, pll_dint_acc
// Interface (CDR):  cdr_ref_clk (1 MHz), cdr_din, cdr_clk_out, cdr_dout,
//                   cdr_fll_done, cdr_int_acc
`timescale 1ps/1fs
module dpll_cdr_top
  import clk_pkg::*;
(
  input  logic               rst_n,
  // digital PLL
  input  logic               pll_ref_clk,
  output logic               pll_clk_out,
  output logic               pll_fb_clk,
  output logic               pll_up,
  output logic               pll_dn,
  output logic signed [13:0] pll_int_acc,
  output logic signed [17:0] pll_dint_acc,
  output corr_t              pll_dint_corr,
  // digital CDR
  input  logic               cdr_ref_clk,
  input  logic               cdr_din,
  output logic               cdr_clk_out,
  output logic               cdr_dout,
  output logic               cdr_fll_done,
  output logic signed [17:0] cdr_int_acc,
  output logic [13:0]        cdr_fll_code,
  output logic               cdr_de,
  output logic               cdr_dr,
  output corr_t              cdr_el_corr
);

  dpll u_dpll (
    .ref_clk(pll_ref_clk), .rst_n, .clk_out(pll_clk_out), .fb_clk(pll_fb_clk),
    .up(pll_up), .dn(pll_dn), .int_acc(pll_int_acc), .dint_acc(pll_dint_acc),
    .dint_corr(pll_dint_corr));

  cdr u_cdr (
    .ref_clk(cdr_ref_clk), .rst_n, .din(cdr_din), .clk_out(cdr_clk_out), .dout(cdr_dout),
    .fll_done(cdr_fll_done), .int_acc(cdr_int_acc), .fll_code(cdr_fll_code),
    .de(cdr_de), .dr(cdr_dr), .el_corr(cdr_el_corr));

endmodule
