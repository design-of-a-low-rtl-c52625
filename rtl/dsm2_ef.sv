// Second-order error-feedback delta-sigma modulator.
//
// Truncates an IN_W-bit unsigned word to a 4-bit word for the 15-element
// thermometer current DAC. The truncation error e (the dropped low bits) is
// fed back through a two-delay filter: y[n] = x[n] + 2 e[n-1] - e[n-2], the
// output is the top 4 bits of y, and e[n] = y[n] - out[n]*2^(IN_W-4). The
// output is then x - (1 - z^-1)^2 e, i.e. the noise transfer function has
// two zeros at DC, and the only coefficients are 2 and 1, so no multiplier
// is needed. The architecture and the 13-bit (PLL) / 14-bit (CDR) input
// widths are the document's.
//
// This design's choices: the output is clamped to 0..15 near the ends of the
// input range, and the fed-back error is clamped to the range it has when the
// output does not clamp, so the modulator cannot run away at full scale.
// Because 2e[n-1] - e[n-2] spans (-2^F, 2^(F+1)), the output never clamps,
// and the noise shaping is exact, for inputs from 1/16 to 13/16 of full
// scale (output codes 1..13); outside that band the output still tracks the
// input on average but the shaping degrades.
//
// Interface: en - update enable (the PLL runs it at F_REF/4)
//            x  - input word, sampled when en is high
//            y  - 4-bit output, registered, one enabled update after x
`timescale 1ps/1fs
module dsm2_ef #(
  parameter int unsigned IN_W  = 13,
  parameter int unsigned OUT_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [IN_W-1:0]  x,
  output logic [OUT_W-1:0] y
);

  localparam int unsigned F  = IN_W - OUT_W;    // dropped bits
  localparam int unsigned SW = IN_W + 3;        // signed internal width
  localparam logic signed [SW-1:0] QMAX = SW'((1 << OUT_W) - 1);
  localparam logic signed [SW-1:0] EMAX = SW'((1 << F) - 1);
  localparam logic signed [SW-1:0] EMIN = '0;

  logic signed [SW-1:0] e1, e2;                 // e[n-1], e[n-2]
  logic signed [SW-1:0] sum, q, err;

  always_comb begin
    sum = $signed({3'b000, x}) + (e1 <<< 1) - e2;
    q   = sum >>> F;
    if (q > QMAX)       q = QMAX;
    if (q < 0)          q = '0;
    err = sum - (q <<< F);
    if (err > EMAX)     err = EMAX;
    if (err < EMIN)     err = EMIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1 <= '0;
      e2 <= '0;
      y  <= '0;
    end else if (en) begin
      e1 <= err;
      e2 <= e1;
      y  <= q[OUT_W-1:0];
    end
  end

endmodule
