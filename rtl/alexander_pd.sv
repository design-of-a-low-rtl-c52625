// Alexander (early/late) bang-bang phase detector and data retimer.
//
// The input data is sampled at every rising clock edge (data samples) and at
// every falling edge (edge samples, which at lock fall on the data
// transitions). After each rising edge the three samples of one bit window
// are held: S1 the previous data sample, S2 the edge sample between, S3 the
// current data sample. Then
//   S1^S2 = 1, S2^S3 = 0 : the edge sample already saw the new bit - clock late
//   S1^S2 = 0, S2^S3 = 1 : the edge sample still saw the old bit - clock early
//   otherwise            : no transition - no decision
// A late clock requests a higher frequency (CORR_UP), an early clock a lower
// one (CORR_DN). With no transition the output is CORR_NONE, so long runs of
// identical bits do not disturb the loop. The retimed data is S3. All of
// this is the document's; the flip-flops stand for its sense-amplifier
// flip-flops.
//
// Interface: clk  - recovered full-rate clock
//            din  - serial input data
//            corr - decision for the bit window ending at the last rising
//                   edge, valid from that edge to the next
//            dout - retimed data (S3)
`timescale 1ps/1fs
module alexander_pd
  import clk_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  din,
  output corr_t corr,
  output logic  dout
);

  logic edge_s;          // sampled on the falling edge
  logic s1, s2, s3;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) edge_s <= 1'b0;
    else        edge_s <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      s3 <= 1'b0;
    end else begin
      s3 <= din;
      s2 <= edge_s;
      s1 <= s3;
    end
  end

  always_comb begin
    if ((s1 ^ s2) && !(s2 ^ s3))      corr = CORR_UP;   // clock late
    else if (!(s1 ^ s2) && (s2 ^ s3)) corr = CORR_DN;   // clock early
    else                              corr = CORR_NONE;
  end

  assign dout = s3;

endmodule
