// Start-up frequency-locked loop of the CDR.
//
// Brings the oscillator to within +-0.1% of the expected data rate before the
// phase-locking paths take over, using a low-frequency (1 MHz) reference
// clock. The oscillator clock itself clocks this block. The reference is
// brought into that domain through a two-flip-flop synchroniser; between two
// reference edges the block counts oscillator cycles, which gives the
// oscillator frequency in units of F_REF (2500 at 2.5 GHz).
// The coarse DAC word is found by successive approximation, MSB first: a
// trial bit is set, one reference period is left for the DAC filter and the
// oscillator to settle, the next period is counted, and the bit is kept if
// the count did not exceed TARGET. After CODE_W trials the word is the
// largest one whose frequency is not above the target, and done is raised;
// the word then stays fixed.
//
// The document gives the function (a digital FLL with a 1 MHz reference
// reaching +-0.1% over 0.5-3.2 Gb/s, driving a 14-bit DAC); the
// successive-approximation search is this design's choice, the simplest
// search that meets it in CODE_W*2 reference periods. The count resolution
// of 1/TARGET (0.04% at 2.5 Gb/s) plus one DAC step sets the final error.
//
// Interface: clk     - oscillator clock; ref_clk - 1 MHz reference
//            code    - coarse DAC word
//            done    - search finished (stays high until reset)
//            count   - last measured count (observability)
`timescale 1ps/1fs
module fll #(
  parameter int unsigned CODE_W = 14,
  parameter int unsigned CNT_W  = 16,
  parameter int unsigned TARGET = 2500     // F_data / F_ref
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ref_clk,
  output logic [CODE_W-1:0] code,
  output logic              done,
  output logic [CNT_W-1:0]  count
);

  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_MEASURE, S_DONE} state_t;

  state_t                    state;
  logic [2:0]                ref_sync;
  logic                      ref_rise;
  logic [$clog2(CODE_W)-1:0] bit_idx;
  logic [CNT_W-1:0]          cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ref_sync <= '0;
    else        ref_sync <= {ref_sync[1:0], ref_clk};
  end
  assign ref_rise = ref_sync[1] & ~ref_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      code    <= CODE_W'(1) << (CODE_W - 1);
      bit_idx <= $bits(bit_idx)'(CODE_W - 1);
      cnt     <= '0;
      count   <= '0;
      done    <= 1'b0;
    end else begin
      if (cnt != '1) cnt <= cnt + 1'b1;
      if (ref_rise) begin
        cnt <= '0;
        unique case (state)
          S_IDLE:   state <= S_SETTLE;
          S_SETTLE: state <= S_MEASURE;
          S_MEASURE: begin
            count <= cnt + 1'b1;          // cycles in the window
            if (cnt >= CNT_W'(TARGET)) code[bit_idx] <= 1'b0;
            if (bit_idx == '0) begin
              state <= S_DONE;
              done  <= 1'b1;
            end else begin
              code[bit_idx - 1'b1] <= 1'b1;
              bit_idx              <= bit_idx - 1'b1;
              state                <= S_SETTLE;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
