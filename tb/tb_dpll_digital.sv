// Open-loop testbench of the PLL digital core. The feedback clock comes from
// the testbench, first slower than the reference, then faster, then equal
// in frequency with the feedback edge lagging or leading.
// Checked: the PFD only ever enters UP (DN) for a slow (fast) feedback clock;
// the bang-bang detector drives the 14-bit integral accumulator up (down) by
// one per reference cycle; once the accumulator leaves the +-16 dead zone the
// 18-bit double-integral accumulator steps by 16 once every 128 reference
// cycles, and not otherwise; the fine DAC's thermometer code follows the
// accumulator's top bits through the delta-sigma modulator (mean of the
// cells on over 64 updates equals the DAC word / 512 within 1).
`timescale 1ps/1fs
module tb_dpll_digital;
  import clk_pkg::*;
  logic ref_clk = 0, fb_clk = 0, rst_n = 1;
  logic up, dn, dsm_en;
  logic [14:0] idac_therm, cdac_therm;
  logic signed [13:0] int_acc;
  logic signed [17:0] dint_acc;
  corr_t dint_corr;
  int checks = 0, failures = 0;
  real fb_half = 800.0;
  int n_ref = 0, up_ref = 0, dn_ref = 0, dint_steps = 0;
  logic signed [17:0] dint_prev = 0;

  initial #10 rst_n = 0;

  dpll_digital dut (.*);

  always #800 ref_clk = ~ref_clk;
  always #(fb_half) fb_clk = ~fb_clk;

  // PFD state sampled in the middle of each reference cycle
  always @(negedge ref_clk) if (rst_n) begin
    if (up) up_ref++;
    if (dn) dn_ref++;
  end
  always @(posedge ref_clk) if (rst_n) begin
    n_ref++;
    if (dint_acc != dint_prev) dint_steps++;
    dint_prev = dint_acc;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic signed [13:0] a0;
    logic signed [17:0] d0;
    int cells, m0;
    #100 rst_n = 1;
    // slow feedback clock: 1700 ps period
    fb_half = 850.0;
    repeat (20) @(posedge ref_clk);
    #1 a0 = int_acc; n_ref = 0; up_ref = 0; dn_ref = 0;
    repeat (1000) @(posedge ref_clk);
    #1;
    chk(up_ref > 300 && dn_ref == 0, $sformatf("slow fb: UP %0d DN %0d of 1000", up_ref, dn_ref));
    chk(int_acc - a0 > 800 && int_acc - a0 <= 1000, $sformatf("integral rose by %0d", int_acc - a0));
    chk(dint_acc > 0 && dint_acc % 16 == 0, $sformatf("double integral %0d", dint_acc));
    // steps: one every 128 cycles once outside the dead zone
    d0 = dint_acc; dint_steps = 0; n_ref = 0;
    repeat (1280) @(posedge ref_clk);
    #1;
    chk(dint_steps == 10 && dint_acc - d0 == 160, $sformatf("double-integral steps %0d (+%0d)", dint_steps, dint_acc - d0));
    // fine DAC: mean thermometer count over 64 DSM updates
    cells = 0; m0 = (int'(int_acc) + 8192) / 2;
    repeat (64) begin @(posedge dsm_en); @(posedge ref_clk); #1 cells += $countones(idac_therm); end
    chk(cells >= (m0 * 64) / 512 - 64 && cells <= (m0 * 64) / 512 + 64,
        $sformatf("IDAC mean %0d/64, word %0d", cells, m0));
    // fast feedback clock: 1500 ps period
    fb_half = 750.0;
    repeat (20) @(posedge ref_clk);
    #1 a0 = int_acc; n_ref = 0; up_ref = 0; dn_ref = 0;
    repeat (1000) @(posedge ref_clk);
    #1;
    chk(dn_ref > 300 && up_ref == 0, $sformatf("fast fb: DN %0d UP %0d of 1000", dn_ref, up_ref));
    chk(a0 - int_acc > 800 && a0 - int_acc <= 1000, $sformatf("integral fell by %0d", a0 - int_acc));
    // equal frequency, zero phase offset is not needed: check the dead zone.
    // Drive the integral accumulator near zero, then hold it there with an
    // alternating lead/lag: the double integral must not move.
    while (int_acc > 0) begin
      @(posedge ref_clk);
    end
    fb_half = 800.0;
    repeat (4) @(posedge ref_clk);
    #1 d0 = dint_acc;
    chk(int_acc >= -16 && int_acc <= 16, $sformatf("integral %0d inside the dead zone", int_acc));
    dint_steps = 0;
    repeat (600) @(posedge ref_clk);
    #1;
    chk(dint_corr == CORR_NONE || int_acc < -16 || int_acc > 16, "comparator idle inside the dead zone");
    $display("end: int=%0d dint=%0d", int_acc, dint_acc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
