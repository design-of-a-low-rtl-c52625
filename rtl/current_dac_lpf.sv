// Behavioural model (not synthesizable): thermometer-coded current DAC
// followed by the tunable switched-RC low-pass post filter.
//
// The real part is analog: 15 unit current cells (about 5 uA each in the
// document) summed into a node, and a passive RC filter whose resistor is in
// series with a CMOS switch. The switch is closed for a fixed time T_D after
// each rising edge of the delta-sigma clock, so the filter's duty cycle is
// D = T_D * F_CK and its bandwidth scales with F_CK; the oversampling ratio
// F_CK / F_LPF = 2*pi*R*C / T_D is then the same at every clock rate.
//
// The model: on each enabled clock edge it waits T_D (the switch pulse), by
// which time the new delta-sigma word is on the cells, and moves the
// capacitor voltage towards the DAC level by the exact RC step
// 1 - exp(-T_D / (R*C)). The output is normalised: 0.0 with no cell on,
// 1.0 with all 15 on. Cell mismatch, glitches and clock feed-through are not
// modelled. T_D and R*C are not given in the document; the defaults give an
// oversampling ratio of 32.
//
// Interface: clk, en - delta-sigma clock and its enable
//            therm   - unit-cell enables from the thermometer decoder
//            level   - filtered DAC output, 0.0 .. 1.0
`timescale 1ps/1fs
module current_dac_lpf
  import clk_pkg::*;
#(
  parameter real TD_PS      = 100.0,     // switch pulse width T_D
  parameter real RC_PS      = 509.3,     // R_LPF * C_LPF (OSR = 2*pi*RC/TD = 32)
  parameter real INIT_LEVEL = 0.5        // capacitor voltage at power-up
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic [DAC_CELLS-1:0] therm,
  output real                  level
);

  localparam real ALPHA = 1.0 - $exp(-TD_PS / RC_PS);

  real target;

  initial level = INIT_LEVEL;

  always begin
    @(posedge clk iff en);
    #(TD_PS);
    target = real'($countones(therm)) / real'(DAC_CELLS);
    level  = level + ALPHA * (target - level);
  end

endmodule
