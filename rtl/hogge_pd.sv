// Full-rate Hogge linear phase detector.
//
// A flip-flop retimes the data on the rising clock edge (Q1) and a second
// one delays Q1 by half a period on the falling edge (Q2). After each data
// transition
//   DE = DATA xor Q1 is high from the transition to the next rising edge:
//        its width grows linearly with the phase error;
//   DR = Q1 xor Q2 is high for exactly half a clock period: a reference
//        pulse that makes the average DE - DR independent of the transition
//        density (run lengths) of the data.
// DE - DR averages to zero when the rising edge sits half a bit after the
// transition, i.e. in the middle of the eye. The pulses drive the 3-level
// proportional DAC of the oscillator directly, with no charge pump, so the
// proportional path has no quantisation and no charge-pump mismatch
// offset. The circuit is the document's; the delay buffer it places in the
// data path to match the flip-flop clock-to-Q delay is not needed in a
// zero-delay model.
//
// Interface: clk - recovered clock; din - input data
//            de, dr - error and reference pulses (combinational from din)
//            q1 - data retimed on the rising edge
`timescale 1ps/1fs
module hogge_pd (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic de,
  output logic dr,
  output logic q1
);

  logic q2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q1 <= 1'b0;
    else        q1 <= din;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q2 <= 1'b0;
    else        q2 <= q1;
  end

  assign de = din ^ q1;
  assign dr = q1 ^ q2;

endmodule
