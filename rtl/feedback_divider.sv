// Feedback divider: divides the oscillator clock by N.
//
// A counter of the oscillator's rising edges toggles the output every N/2
// edges, giving a 50% duty cycle for even N (the bang-bang detector relies
// on it). The document uses N = 4; the counter logic is this design's.
//
// Interface: clk_in - oscillator clock; rst_n - asynchronous reset
//            clk_out - divided clock, first rising edge N/2 input edges
//                      after reset is released
`timescale 1ps/1fs
module feedback_divider #(
  parameter int unsigned N = 4          // even division ratio
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);

  localparam int unsigned HALF = N / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt     <= '0;
      clk_out <= ~clk_out;
    end else begin
      cnt     <= cnt + 1'b1;
    end
  end

endmodule
