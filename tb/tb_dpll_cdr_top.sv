// End-to-end testbench of the top level at its default parameters (no
// parameter overrides): both closed loops run at the same time from one
// reset.
//  PLL: 625 MHz reference, N = 4, so the output must reach 2.5 GHz. The
//       loop must reach frequency lock, then hand the frequency over to the
//       double-integral (coarse) path so the integral accumulator is driven
//       back inside the +-16 dead zone; the output then runs at exactly
//       4 * F_REF (feedback and reference edges counted over 8192 cycles).
//       The reference then steps down to 581 MHz without a reset: the loop
//       must track it the same way, with the coarse word moving down.
//  CDR: 1 MHz FLL reference and 2.5 Gb/s PRBS-7 data with bounded +-20 ps
//       edge jitter. The FLL must finish within 30 us with the oscillator
//       within +-0.1% of 2.5 GHz; after phase lock the retimed data must be
//       error-free over 20 us and the recovered clock must run at the data
//       rate.
// Every mechanism of the two designs is counted and must occur at least
// once: PFD UP and DN pulses, bang-bang up and down decisions, comparator
// up, down and dead-zone results, the FLL search and its hand-over, Hogge
// DE and DR pulses, Alexander early and late decisions.
`timescale 1ps/1fs
module tb_dpll_cdr_top;
  import clk_pkg::*;
  logic rst_n = 1;
  logic pll_ref_clk = 0, pll_clk_out, pll_fb_clk, pll_up, pll_dn;
  logic signed [13:0] pll_int_acc;
  logic signed [17:0] pll_dint_acc;
  corr_t pll_dint_corr;
  logic cdr_ref_clk = 0, cdr_din = 0;
  logic cdr_clk_out, cdr_dout, cdr_fll_done, cdr_de, cdr_dr;
  logic signed [17:0] cdr_int_acc;
  logic [13:0] cdr_fll_code;
  corr_t cdr_el_corr;

  int checks = 0, failures = 0;
  // PLL counters
  int n_ref = 0, n_fb = 0;
  longint n_up = 0, n_dn = 0, n_bb_up = 0, n_bb_dn = 0;
  longint n_cmp_up = 0, n_cmp_dn = 0, n_cmp_none = 0;
  // CDR counters
  logic [6:0] lfsr = 7'h5a;
  logic [127:0] hist = '0;
  int n_bits = 0, n_clk = 0, n_early = 0, n_late = 0, n_de = 0, n_dr = 0, n_done = 0;
  int err [0:15];
  bit cdr_ok = 0;

  initial #10 rst_n = 0;

  dpll_cdr_top dut (.*);

  real pll_half = 800.0;
  always #(pll_half) pll_ref_clk = ~pll_ref_clk;
  always #500000 cdr_ref_clk = ~cdr_ref_clk;

  // ---------------- PLL monitors ----------------
  always @(posedge pll_ref_clk) if (rst_n) begin
    n_ref++;
    if (dut.u_dpll.u_core.bb_corr == CORR_UP) n_bb_up++;
    if (dut.u_dpll.u_core.bb_corr == CORR_DN) n_bb_dn++;
    if (dut.u_dpll.u_core.dint_en) begin
      if (pll_dint_corr == CORR_UP) n_cmp_up++;
      else if (pll_dint_corr == CORR_DN) n_cmp_dn++;
      else n_cmp_none++;
    end
  end
  always @(posedge pll_fb_clk) n_fb++;
  always @(posedge pll_up) n_up++;
  always @(posedge pll_dn) n_dn++;

  // ---------------- CDR source and monitors ----------------
  initial begin
    real j, jprev;
    jprev = 0.0;
    forever begin
      j = real'($urandom_range(0, 40)) - 20.0;
      #(400.0 + j - jprev);
      jprev = j;
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
      cdr_din = lfsr[0];
      hist = {hist[126:0], lfsr[0]};
      n_bits++;
    end
  end
  always @(posedge cdr_clk_out) begin
    n_clk++;
    if (cdr_el_corr == CORR_UP) n_late++;
    if (cdr_el_corr == CORR_DN) n_early++;
    for (int d = 0; d < 16; d++) if (cdr_dout != hist[d]) err[d]++;
  end
  always @(posedge cdr_de) n_de++;
  always @(posedge cdr_dr) n_dr++;
  always @(posedge cdr_fll_done) n_done++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pll_lock(input string what);
    int r0, f0, t_lock, cyc, quiet;
    t_lock = -1; cyc = 0; quiet = 0;
    while (cyc < 400000) begin
      r0 = n_ref; f0 = n_fb;
      repeat (1024) @(posedge pll_ref_clk);
      cyc += 1024;
      if (t_lock < 0 && n_fb - f0 == n_ref - r0) t_lock = cyc;
      if (t_lock >= 0 && pll_int_acc >= -16 && pll_int_acc <= 16) quiet++;
      else quiet = 0;
      if (quiet == 8) break;
    end
    $display("PLL %s: frequency lock after %0d cycles, coarse hand-over after %0d, int=%0d dint=%0d",
             what, t_lock, cyc, pll_int_acc, pll_dint_acc);
    chk(t_lock >= 0, {"PLL frequency lock, ", what});
    chk(quiet == 8, {"PLL integral back inside the dead zone, ", what});
    r0 = n_ref; f0 = n_fb;
    repeat (8192) @(posedge pll_ref_clk);
    chk(n_fb - f0 - (n_ref - r0) <= 1 && n_ref - r0 - (n_fb - f0) <= 1,
        $sformatf("PLL edge counts fb %0d ref %0d", n_fb - f0, n_ref - r0));
  endtask

  task automatic run_pll();
    logic signed [17:0] d0;
    pll_lock("625 MHz from reset");
    // reference step down by 7% while locked: the loop tracks it, and the
    // coarse path must now step down
    d0 = pll_dint_acc;
    pll_half = 860.0;
    pll_lock("step to 581 MHz");
    chk(pll_dint_acc < d0, $sformatf("coarse word moved down %0d -> %0d", d0, pll_dint_acc));
  endtask

  task automatic run_cdr();
    int c0, b0, best;
    real f;
    #30us;
    chk(cdr_fll_done, "CDR FLL finished within 30 us");
    c0 = n_clk; #2us;
    f = real'(n_clk - c0) / 2.0e-6;
    $display("CDR: after FLL %f GHz, code %0d", f / 1e9, cdr_fll_code);
    chk(f > 2.5e9 * 0.999 && f < 2.5e9 * 1.001, $sformatf("CDR FLL frequency %f", f));
    #20us;
    c0 = n_clk; b0 = n_bits;
    for (int d = 0; d < 16; d++) err[d] = 0;
    #20us;
    chk((n_clk - c0) - (n_bits - b0) <= 2 && (n_bits - b0) - (n_clk - c0) <= 2,
        $sformatf("CDR clock edges %0d for %0d bits", n_clk - c0, n_bits - b0));
    best = 0;
    for (int d = 1; d < 16; d++) if (err[d] < err[best]) best = d;
    $display("CDR: bit errors at best delay %0d: %0d of %0d", best, err[best], n_bits - b0);
    chk(err[best] == 0, "CDR error-free retimed data");
  endtask

  initial begin
    for (int d = 0; d < 16; d++) err[d] = 0;
    #100 rst_n = 1;
    fork
      run_pll();
      run_cdr();
    join
    $display("PLL counts: up=%0d dn=%0d bb_up=%0d bb_dn=%0d cmp_up=%0d cmp_dn=%0d cmp_none=%0d",
             n_up, n_dn, n_bb_up, n_bb_dn, n_cmp_up, n_cmp_dn, n_cmp_none);
    $display("CDR counts: fll_done=%0d de=%0d dr=%0d early=%0d late=%0d",
             n_done, n_de, n_dr, n_early, n_late);
    chk(n_up > 0 && n_dn > 0, "PFD UP and DN pulses");
    chk(n_bb_up > 0 && n_bb_dn > 0, "bang-bang up and down decisions");
    chk(n_cmp_up > 0 && n_cmp_dn > 0 && n_cmp_none > 0, "comparator up, down and dead zone");
    chk(n_done == 1, "one FLL search and hand-over");
    chk(n_de > 0 && n_dr > 0, "Hogge DE and DR pulses");
    chk(n_early > 0 && n_late > 0, "Alexander early and late decisions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
