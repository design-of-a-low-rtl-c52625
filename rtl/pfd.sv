// Three-state phase-frequency detector.
//
// A rising edge of the reference clock sets UP, a rising edge of the
// feedback clock sets DN, and as soon as both are set the two flip-flops are
// cleared together. The width of the UP (or DN) pulse therefore equals the
// phase lead of the reference (or feedback) edge, with no quantisation. In
// the PLL these pulses drive the 3-level proportional DAC directly
// (UP / both low / DN map to 2*I_B / I_B / 0 in the oscillator model).
//
// The three-state state machine is the document's; its pass-transistor
// implementation is a circuit detail not modelled here, so the reset path
// has zero delay in simulation (a real PFD has a short reset pulse).
// The combinational reset loop (up & dn clears up and dn) is the defining
// structure of this circuit and is intentional.
//
// Interface: ref_clk, fb_clk  - clocks compared at their rising edges
//            rst_n            - asynchronous active-low reset
//            up, dn           - pulse-width-modulated outputs
`timescale 1ps/1fs
module pfd (
  input  logic ref_clk,
  input  logic fb_clk,
  input  logic rst_n,
  output logic up,
  output logic dn
);

  logic clr;
  assign clr = (up & dn) | ~rst_n;

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge fb_clk or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end

endmodule
