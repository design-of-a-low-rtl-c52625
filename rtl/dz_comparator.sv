// Dead-zone comparator between the integral and double-integral paths.
//
// Compares the integral accumulator value with a reference digit. Above
// REF+K it requests a higher double-integral word, below REF-K a lower one,
// and inside the window +-K it requests nothing. The dead zone stops the
// slow double-integral path from limit-cycling around lock, and with it the
// integral accumulator settles near the reference digit. The comparator and
// its dead zone are the document's; the values of REF and K are not given
// and are this design's choice.
//
// Interface: value - signed integral accumulator value (combinational path)
//            corr  - CORR_UP / CORR_DN / CORR_NONE
`timescale 1ps/1fs
module dz_comparator
  import clk_pkg::*;
#(
  parameter int unsigned W   = 14,
  parameter int          REF = 0,
  parameter int unsigned K   = 16
) (
  input  logic signed [W-1:0] value,
  output corr_t               corr
);

  localparam logic signed [W:0] HI = (W+1)'(REF + int'(K));
  localparam logic signed [W:0] LO = (W+1)'(REF - int'(K));

  logic signed [W:0] v;
  assign v = {value[W-1], value};

  always_comb begin
    if (v > HI)      corr = CORR_UP;
    else if (v < LO) corr = CORR_DN;
    else             corr = CORR_NONE;
  end

endmodule
