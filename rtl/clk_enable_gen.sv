// Rate divider of the PLL's reference-clock domain.
//
// All digital logic of the PLL runs on the reference clock. This block
// produces two one-cycle enables: dsm_en every DSM_DIV reference cycles (the
// delta-sigma modulators run at F_REF/4) and dint_en every DSM_DIV*DINT_DIV
// cycles (the double-integral path is the DSM rate decimated by 32, i.e.
// F_REF/128). The document gives both rates; generating them as clock
// enables of one counter, rather than as divided clocks, is this design's
// choice. dint_en always coincides with a dsm_en.
//
// Interface: clk - reference clock; dsm_en, dint_en - registered enables
`timescale 1ps/1fs
module clk_enable_gen #(
  parameter int unsigned DSM_DIV  = 4,
  parameter int unsigned DINT_DIV = 32
) (
  input  logic clk,
  input  logic rst_n,
  output logic dsm_en,
  output logic dint_en
);

  localparam int unsigned TOTAL = DSM_DIV * DINT_DIV;
  localparam int unsigned CW    = (TOTAL > 1) ? $clog2(TOTAL) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      dsm_en  <= 1'b0;
      dint_en <= 1'b0;
    end else begin
      cnt     <= (cnt == CW'(TOTAL - 1)) ? '0 : cnt + 1'b1;
      dsm_en  <= (cnt % CW'(DSM_DIV)) == CW'(DSM_DIV - 1);
      dint_en <= cnt == CW'(TOTAL - 1);
    end
  end

endmodule
