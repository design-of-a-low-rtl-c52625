// Binary-to-thermometer decoder of the 15-element current DAC.
//
// Turns the 4-bit delta-sigma output into 15 unit-cell enables: cell i is on
// when the code is greater than i, so the number of cells on equals the code.
// The thermometer-coded DAC is the document's; the decoder is the simplest
// circuit that produces its control word. Purely combinational.
//
// Interface: bin - 4-bit code; therm - 15 unit-cell enables (LSB = cell 0)
`timescale 1ps/1fs
module therm_dec #(
  parameter int unsigned BITS = 4
) (
  input  logic [BITS-1:0]          bin,
  output logic [(1<<BITS)-2:0]     therm
);

  always_comb begin
    for (int i = 0; i < (1 << BITS) - 1; i++)
      therm[i] = bin > BITS'(i);
  end

endmodule
