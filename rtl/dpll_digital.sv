// Digital core of the double-integral digital PLL.
//
// Three control paths drive the oscillator:
//  * proportional: a three-state PFD compares reference and feedback edges;
//    its UP/DN pulses leave this block unquantised and modulate the
//    oscillator current directly (3-level DAC), like the resistor path of an
//    analog PLL. No time-to-digital converter is used.
//  * integral: a bang-bang detector gives the sign of the phase error each
//    reference cycle; a 14-bit accumulator integrates it with a small step
//    and its top 13 bits drive the fine DAC (IDAC).
//  * double integral: every 128 reference cycles (the DSM rate F_REF/4
//    decimated by 32) a dead-zone comparator looks at the integral
//    accumulator and steps an 18-bit accumulator up or down; its top 13 bits
//    drive the coarse DAC (CDAC). The coarse path thus takes over whatever
//    frequency offset the integral path carries, the integral accumulator
//    is driven back near zero, and the tuning range belongs to the coarse
//    path while the fine path sets the frequency resolution.
// Each 13-bit DAC word is truncated to 4 bits by a second-order
// error-feedback delta-sigma modulator clocked at F_REF/4 and decoded to 15
// thermometer cells.
//
// Follows the document: path structure, PFD and bang-bang detector, the
// 14/18-bit accumulators, 13-bit DACs, DSM order/width/rate, decimation by
// 32. This design's choices: step sizes KI_STEP and KC_STEP, dead zone
// DZ_K, the bang-bang detector sampling DN with the
// reference, reset values (integral at zero, coarse at mid-scale).
//
// Interface: ref_clk, fb_clk - reference and divided oscillator clock
//            up, dn          - PFD pulses to the proportional DAC
//            idac_therm, cdac_therm - DAC cell enables, change on dsm_en
//            dsm_en          - one-cycle enable of the DSM/DAC clock
//            int_acc, dint_acc - accumulator values (observability)
//            dint_corr       - the comparator decision (observability)
// All registers except the PFD run on ref_clk.
`timescale 1ps/1fs
module dpll_digital
  import clk_pkg::*;
#(
  parameter int unsigned INT_W    = 14,
  parameter int unsigned DINT_W   = 18,
  parameter int unsigned DAC_W    = 13,
  parameter int unsigned KI_STEP  = 1,
  parameter int unsigned KC_STEP  = 16,
  parameter int unsigned DZ_K     = 16,
  parameter int unsigned DSM_DIV  = 4,
  parameter int unsigned DINT_DIV = 32
) (
  input  logic                     ref_clk,
  input  logic                     fb_clk,
  input  logic                     rst_n,
  output logic                     up,
  output logic                     dn,
  output logic [DAC_CELLS-1:0]     idac_therm,
  output logic [DAC_CELLS-1:0]     cdac_therm,
  output logic                     dsm_en,
  output logic signed [INT_W-1:0]  int_acc,
  output logic signed [DINT_W-1:0] dint_acc,
  output corr_t                    dint_corr
);

  corr_t             bb_corr;
  logic              dint_en;
  logic [DAC_W-1:0]  idac_code, cdac_code;
  logic [DAC_BITS-1:0] idac_q, cdac_q;

  pfd u_pfd (.ref_clk, .fb_clk, .rst_n, .up, .dn);

  bbpd u_bbpd (.ref_clk, .rst_n, .dn, .corr(bb_corr));

  lf_accum #(.ACC_W(INT_W), .OUT_W(DAC_W), .STEP(KI_STEP), .INIT(0)) u_int (
    .clk(ref_clk), .rst_n, .en(1'b1), .corr(bb_corr), .acc(int_acc), .code(idac_code));

  clk_enable_gen #(.DSM_DIV(DSM_DIV), .DINT_DIV(DINT_DIV)) u_en (
    .clk(ref_clk), .rst_n, .dsm_en, .dint_en);

  dz_comparator #(.W(INT_W), .REF(0), .K(DZ_K)) u_cmp (.value(int_acc), .corr(dint_corr));

  lf_accum #(.ACC_W(DINT_W), .OUT_W(DAC_W), .STEP(KC_STEP), .INIT(0)) u_dint (
    .clk(ref_clk), .rst_n, .en(dint_en), .corr(dint_corr), .acc(dint_acc), .code(cdac_code));

  dsm2_ef #(.IN_W(DAC_W), .OUT_W(DAC_BITS)) u_dsm_i (
    .clk(ref_clk), .rst_n, .en(dsm_en), .x(idac_code), .y(idac_q));
  dsm2_ef #(.IN_W(DAC_W), .OUT_W(DAC_BITS)) u_dsm_c (
    .clk(ref_clk), .rst_n, .en(dsm_en), .x(cdac_code), .y(cdac_q));

  therm_dec #(.BITS(DAC_BITS)) u_th_i (.bin(idac_q), .therm(idac_therm));
  therm_dec #(.BITS(DAC_BITS)) u_th_c (.bin(cdac_q), .therm(cdac_therm));

endmodule
