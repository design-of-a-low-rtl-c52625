// Decimator of the CDR integral path.
//
// The early/late decisions arrive at the full data rate. The decimator runs
// on a half-rate clock CK: D_P is the decision sampled on the rising edge of
// CK and D_N the one sampled on its falling edge, so together they hold
// every full-rate decision. On each rising edge of CK the pair collected in
// the previous CK period (the D_P from the edge before and the D_N from the
// falling edge between) is added (each decision is -1, 0 or +1) and only the
// sign of the sum is passed on, at half the rate. The structure (two
// samplers, 2-bit adder, sign) is the document's; the decision table was not
// available, so this design takes: sum > 0 -> CORR_UP, sum < 0 -> CORR_DN,
// sum = 0 -> CORR_NONE.
//
// Interface: clk_half - half-rate clock; corr_in - full-rate decisions
//            corr_out - half-rate decision, registered on the rising edge
`timescale 1ps/1fs
module cdr_decimator
  import clk_pkg::*;
(
  input  logic  clk_half,
  input  logic  rst_n,
  input  corr_t corr_in,
  output corr_t corr_out
);

  corr_t dp, dn_s;
  logic signed [2:0] sum;

  function automatic logic signed [2:0] val(corr_t c);
    unique case (c)
      CORR_UP: return 3'sd1;
      CORR_DN: return -3'sd1;
      default: return 3'sd0;
    endcase
  endfunction

  always_ff @(negedge clk_half or negedge rst_n) begin
    if (!rst_n) dn_s <= CORR_NONE;
    else        dn_s <= corr_in;
  end

  assign sum = val(dp) + val(dn_s);

  always_ff @(posedge clk_half or negedge rst_n) begin
    if (!rst_n) begin
      dp       <= CORR_NONE;
      corr_out <= CORR_NONE;
    end else begin
      dp <= corr_in;
      if (sum > 0)      corr_out <= CORR_UP;
      else if (sum < 0) corr_out <= CORR_DN;
      else              corr_out <= CORR_NONE;
    end
  end

endmodule
