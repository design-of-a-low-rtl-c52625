// Bang-bang phase detector of the PLL integral path.
//
// The integral path quantises the PFD output to one bit: which of the PFD's
// UP and DN outputs is active. This detector samples the PFD's DN output on
// each rising reference edge, just before that edge clears it. DN high means
// the feedback edge came first (oscillator ahead or too fast), so the
// integral path is told to lower the frequency; DN low means the reference
// led, so it is told to raise it. Because the PFD stays in its UP state
// while the oscillator is too slow (and in DN while too fast), the decision
// also carries the sign of a frequency error, which gives the loop its wide
// pull-in range. The document gives the function (sign of UP versus DN);
// sampling DN with the reference edge is this design's realisation. The
// flip-flop stands for the document's sense-amplifier flip-flop.
//
// Interface: ref_clk - sampling clock (rising edge)
//            dn      - PFD DN output
//            corr    - CORR_DN if DN was high, else CORR_UP; registered
//                      (CORR_NONE only during reset)
`timescale 1ps/1fs
module bbpd
  import clk_pkg::*;
(
  input  logic  ref_clk,
  input  logic  rst_n,
  input  logic  dn,
  output corr_t corr
);

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n)  corr <= CORR_NONE;
    else if (dn) corr <= CORR_DN;
    else         corr <= CORR_UP;
  end

endmodule
