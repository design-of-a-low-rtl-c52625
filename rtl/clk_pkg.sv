// Shared types and constants of the digital PLL and the digital CDR.
//
// A loop-filter decision is a three-valued signal: raise the oscillator
// frequency, lower it, or leave it alone. Both designs pass such decisions
// between phase detectors, decimators, comparators and accumulators, so the
// encoding lives here. The frequency-control DACs of both designs are
// 15-element thermometer current DACs driven by a 4-bit delta-sigma output.
//
// Contents: corr_t (CORR_NONE / CORR_UP / CORR_DN), DAC_BITS = 4 and
// DAC_CELLS = 15. The 4-bit, 15-level DACs follow the document; the
// two-bit encoding of a decision is this design's choice.
`timescale 1ps/1fs
package clk_pkg;

  // Three-valued correction request.
  typedef enum logic [1:0] {
    CORR_NONE = 2'b00,
    CORR_UP   = 2'b01,   // raise frequency / advance phase
    CORR_DN   = 2'b10    // lower frequency / retard phase
  } corr_t;

  // Delta-sigma output width and number of unit cells of the current DAC.
  localparam int unsigned DAC_BITS  = 4;
  localparam int unsigned DAC_CELLS = (1 << DAC_BITS) - 1;   // 15

endpackage
