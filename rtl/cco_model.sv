// Behavioural model (not synthesizable): current-controlled ring oscillator
// with three summed control currents.
//
// The real part is a three-stage current-starved pseudo-differential ring
// whose supply current is the sum of a coarse DAC current (the
// double-integral path of the PLL, or the frequency-locked loop of the CDR),
// a fine DAC current (the integral path) and a 3-level proportional DAC
// driven straight by phase-detector pulses. Summing in the current domain
// means no digital adder is needed. The fine and proportional DACs are
// biased from the coarse DAC current, so their gains scale with the
// operating frequency: this is what makes loop bandwidth and integral
// resolution track the reference frequency in the PLL.
//
// The model computes
//   f_c = F_MIN_HZ + (F_MAX_HZ - F_MIN_HZ) * coarse
//   f   = f_c * (1 + FINE_RANGE * (2*fine - 1) + KP_FRAC * (pos - neg))
// where coarse and fine are the normalised (0..1) filtered DAC levels and
// pos/neg the proportional pulses (PLL: UP/DN of the PFD, mapped to
// 2*I_B / I_B / 0; CDR: DE/DR of the Hogge detector). With fine at mid-scale
// the fine path spans +-FINE_RANGE of f_c. The output phase is integrated
// exactly: whenever an input changes, the part of the half period already
// elapsed is accounted at the old frequency and the rest re-timed at the
// new one, so pulse widths act with full time resolution. The ring's noise
// is not modelled. Frequency range and gains are this design's numbers,
// chosen from the document's operating ranges and loop bandwidths.
//
// Interface: coarse, fine - real, 0.0 .. 1.0
//            pos, neg     - proportional pulses
//            clk_out      - oscillator output
`timescale 1ps/1fs
module cco_model #(
  parameter real F_MIN_HZ   = 0.6e9,
  parameter real F_MAX_HZ   = 3.6e9,
  parameter real FINE_RANGE = 0.25,
  parameter real KP_FRAC    = 0.157
) (
  input  real  coarse,
  input  real  fine,
  input  logic pos,
  input  logic neg,
  output logic clk_out
);

  real f_hz;
  real rem;          // fraction of the current half period still to run
  real t0, dt;

  function automatic real freq(real c, real fi, logic p, logic n);
    real fc, k;
    fc = F_MIN_HZ + (F_MAX_HZ - F_MIN_HZ) * c;
    k  = 1.0 + FINE_RANGE * (2.0 * fi - 1.0) + KP_FRAC * (real'(p) - real'(n));
    if (k < 0.05) k = 0.05;
    return fc * k;
  endfunction

  initial begin
    clk_out = 1'b0;
    rem     = 1.0;
  end

  always begin
    f_hz = freq(coarse, fine, pos, neg);
    t0   = $realtime;
    dt   = rem * 0.5e12 / f_hz;                 // ps to the next toggle
    fork
      #(dt);
      @(coarse or fine or pos or neg);
    join_any
    disable fork;
    if ($realtime - t0 >= dt - 1.0e-3) begin
      clk_out = ~clk_out;
      rem     = 1.0;
    end else begin
      rem = rem - ($realtime - t0) * 2.0e-12 * f_hz;
      if (rem < 0.0) rem = 0.0;
    end
  end

endmodule
