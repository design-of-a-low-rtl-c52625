// Range testbench of the double-integral digital PLL at its default
// parameters (N = 4): the two ends of the intended output range.
//   875 MHz -> 3.5 GHz (top of the range)
//   175 MHz -> 0.7 GHz (bottom of the range; the coarse word sits close to
//                       the bottom of its DAC, where the delta-sigma output
//                       is coarser)
// Each is locked from reset. From the mid-scale reset value the coarse
// word moves by 16 LSB per 128 reference cycles, so reaching the top of the
// range takes about 7e5 reference cycles. Checked as in the single-point test: frequency
// lock, the integral accumulator driven back inside the +-16 dead zone (the
// coarse path carries the frequency), exactly N * F_REF over 8192 cycles, a
// stable coarse word and short PFD pulses. The cycle counts to lock are
// printed.
`timescale 1ps/1fs
module tb_dpll_range;
  import clk_pkg::*;
  logic ref_clk = 0, rst_n = 1;
  logic clk_out, fb_clk, up, dn;
  logic signed [13:0] int_acc;
  logic signed [17:0] dint_acc;
  corr_t dint_corr;
  int checks = 0, failures = 0;
  real ref_half = 800.0;
  int n_ref = 0, n_fb = 0;
  longint n_up = 0, n_dn = 0, n_cmp_up = 0, n_cmp_dn = 0, n_cmp_none = 0, n_bb_up = 0, n_bb_dn = 0;
  real t_up, t_dn, sum_w = 0.0;

  dpll dut (.*);

  always #(ref_half) ref_clk = ~ref_clk;
  always @(posedge ref_clk) if (rst_n) begin
    n_ref++;
    if (dut.u_core.bb_corr == CORR_UP) n_bb_up++;
    if (dut.u_core.bb_corr == CORR_DN) n_bb_dn++;
    if (dut.u_core.dint_en) begin
      if (dint_corr == CORR_UP) n_cmp_up++;
      else if (dint_corr == CORR_DN) n_cmp_dn++;
      else n_cmp_none++;
    end
  end
  always @(posedge fb_clk) n_fb++;
  always @(posedge up) begin n_up++; t_up = $realtime; end
  always @(negedge up) sum_w += $realtime - t_up;
  always @(posedge dn) begin n_dn++; t_dn = $realtime; end
  always @(negedge dn) sum_w += $realtime - t_dn;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic lock(input real half_ps, input int max_cycles);
    int r0, f0, t_lock, cyc, quiet;
    logic signed [17:0] d0;
    rst_n = 0;
    ref_half = half_ps;
    #(10 * half_ps) rst_n = 1;
    // frequency lock, in 1024-cycle windows
    t_lock = -1; cyc = 0; quiet = 0;
    while (cyc < max_cycles) begin
      r0 = n_ref; f0 = n_fb;
      repeat (1024) @(posedge ref_clk);
      cyc += 1024;
      if (t_lock < 0 && n_fb - f0 == n_ref - r0) t_lock = cyc;
      // done once the coarse path has taken over: the integral accumulator
      // found inside the dead zone at 8 window ends in a row
      if (t_lock >= 0 && int_acc >= -16 && int_acc <= 16) quiet++;
      else quiet = 0;
      if (quiet == 8) break;
    end
    $display("F_REF %0.1f MHz: frequency lock after %0d cycles, settled after %0d, int=%0d dint=%0d",
             0.5e6 / half_ps, t_lock, cyc, int_acc, dint_acc);
    chk(t_lock >= 0, "frequency lock reached");
    // steady state
    d0 = dint_acc; r0 = n_ref; f0 = n_fb; sum_w = 0.0;
    repeat (8192) @(posedge ref_clk);
    chk(n_fb - f0 - (n_ref - r0) <= 1 && n_ref - r0 - (n_fb - f0) <= 1, $sformatf("edge counts fb %0d ref %0d", n_fb - f0, n_ref - r0));
    chk(int_acc >= -24 && int_acc <= 24, $sformatf("integral %0d near zero", int_acc));
    chk(dint_acc - d0 <= 64 && d0 - dint_acc <= 64, $sformatf("coarse word moved by %0d", dint_acc - d0));
    chk(sum_w / 8192.0 < 0.05 * 2.0 * half_ps, $sformatf("mean PFD pulse %f ps", sum_w / 8192.0));
  endtask

  initial begin
    lock(571.4, 1200000);
    lock(2857.0, 2000000);
    $display("counts: up=%0d dn=%0d bb_up=%0d bb_dn=%0d cmp_up=%0d cmp_dn=%0d cmp_none=%0d",
             n_up, n_dn, n_bb_up, n_bb_dn, n_cmp_up, n_cmp_dn, n_cmp_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
