// Digital core of the TDC-less linear digital CDR.
//
// The recovered clock from the oscillator clocks everything; a toggle
// flip-flop makes the half-rate clock of the integral path. Three paths:
//  * frequency lock (start-up): the FLL measures the oscillator against a
//    1 MHz reference and sets a 14-bit coarse word. Until it is done, the
//    two phase paths are held off (proportional pulses gated to zero,
//    integral accumulator frozen at mid-scale).
//  * proportional (linear): a Hogge detector's DE/DR pulses go straight to
//    the oscillator's 3-level DAC. Its gain does not depend on input jitter,
//    so the jitter-transfer bandwidth is fixed by the DAC current alone.
//  * integral (bang-bang): an Alexander detector gives early/late decisions
//    and the retimed data; a decimator halves their rate; an 18-bit
//    accumulator integrates them and its top 14 bits (the dropped LSBs
//    absorb dithering caused by the decimator's latency) feed the fine DAC.
// Each 14-bit DAC word is truncated to 4 bits by a second-order
// error-feedback delta-sigma modulator on the half-rate clock and decoded
// to 15 thermometer cells.
//
// Follows the document: the path structure, both phase detectors, the
// half-rate decimator, 14-bit DACs with second-order DSM to 15 levels,
// the 1 MHz FLL reference. This design's choices: the 18-bit accumulator
// width and KI_STEP, the DSM clock (half rate), gating the phase paths until
// the FLL is done, and the FLL's search method.
//
// Interface: clk - recovered clock; ref_clk - 1 MHz reference; din - data
//            de, dr - gated proportional pulses; dout - retimed data
//            fll_therm, int_therm - DAC cell enables (change on clk_half)
//            clk_half - DSM/DAC clock; fll_done; int_acc, fll_code - state
//
// Lint notes: the FLL's cycle count and the Hogge detector's first flop are
// observation outputs of those blocks. Their own testbenches read them; this
// core does not, so it collects them in hogge_q and fll_count, which lint
// reports as unused.
`timescale 1ps/1fs
module cdr_digital
  import clk_pkg::*;
#(
  parameter int unsigned DAC_W   = 14,
  parameter int unsigned INT_W   = 18,
  parameter int unsigned KI_STEP = 4,
  parameter int unsigned TARGET  = 2500
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ref_clk,
  input  logic                    din,
  output logic                    de,
  output logic                    dr,
  output logic                    dout,
  output logic [DAC_CELLS-1:0]    fll_therm,
  output logic [DAC_CELLS-1:0]    int_therm,
  output logic                    clk_half,
  output logic                    fll_done,
  output logic signed [INT_W-1:0] int_acc,
  output logic [DAC_W-1:0]        fll_code,
  output corr_t                   el_corr
);

  logic                de_raw, dr_raw, hogge_q;
  corr_t               dec_corr;
  logic [DAC_W-1:0]    int_code;
  logic [DAC_BITS-1:0] fll_q, int_q;
  logic [15:0]         fll_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clk_half <= 1'b0;
    else        clk_half <= ~clk_half;
  end

  fll #(.CODE_W(DAC_W), .CNT_W(16), .TARGET(TARGET)) u_fll (
    .clk, .rst_n, .ref_clk, .code(fll_code), .done(fll_done), .count(fll_count));

  hogge_pd u_hogge (.clk, .rst_n, .din, .de(de_raw), .dr(dr_raw), .q1(hogge_q));
  assign de = de_raw & fll_done;
  assign dr = dr_raw & fll_done;

  alexander_pd u_alex (.clk, .rst_n, .din, .corr(el_corr), .dout);

  cdr_decimator u_dec (.clk_half, .rst_n, .corr_in(el_corr), .corr_out(dec_corr));

  lf_accum #(.ACC_W(INT_W), .OUT_W(DAC_W), .STEP(KI_STEP), .INIT(0)) u_int (
    .clk(clk_half), .rst_n, .en(fll_done), .corr(dec_corr), .acc(int_acc), .code(int_code));

  dsm2_ef #(.IN_W(DAC_W), .OUT_W(DAC_BITS)) u_dsm_f (
    .clk(clk_half), .rst_n, .en(1'b1), .x(fll_code), .y(fll_q));
  dsm2_ef #(.IN_W(DAC_W), .OUT_W(DAC_BITS)) u_dsm_i (
    .clk(clk_half), .rst_n, .en(1'b1), .x(int_code), .y(int_q));

  therm_dec #(.BITS(DAC_BITS)) u_th_f (.bin(fll_q), .therm(fll_therm));
  therm_dec #(.BITS(DAC_BITS)) u_th_i (.bin(int_q), .therm(int_therm));

endmodule
