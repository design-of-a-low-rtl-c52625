// Closed-loop testbench of the linear digital CDR at its default parameters:
// 2.5 Gb/s PRBS-7 data with random edge jitter (uniform +-20 ps), 1 MHz FLL
// reference. Checked:
//  * the FLL finishes within 30 us and leaves the oscillator within +-0.1%
//    of 2.5 GHz (the document's figure);
//  * after lock, the recovered clock runs at exactly the data rate (clock
//    edges counted against bits over 20 us, within 2);
//  * the retimed data equals the sent data (bit-error-free over 20 us, the
//    pipeline delay found by correlation);
//  * the bang-bang integral path dithers (both early and late decisions
//    occur) and the Hogge detector's DE and DR pulses both occur.
`timescale 1ps/1fs
module tb_cdr;
  import clk_pkg::*;
  logic ref_clk = 0, rst_n = 1, din = 0;
  logic clk_out, dout, fll_done, de, dr;
  corr_t el_corr;
  logic signed [17:0] int_acc;
  logic [13:0] fll_code;
  int checks = 0, failures = 0;
  logic [6:0] lfsr = 7'h5a;
  logic [127:0] hist = '0;           // last sent bits, newest in bit 0
  int n_bits = 0, n_clk = 0, n_early = 0, n_late = 0, n_de = 0, n_dr = 0;
  int err [0:15];
  real t_done = -1.0;

  initial #10 rst_n = 0;

  cdr dut (.*);

  always #500000 ref_clk = ~ref_clk;

  // data source: PRBS-7, 400 ps bits, each edge moved by up to +-20 ps
  initial begin
    real j, jprev;
    jprev = 0.0;
    forever begin
      // edge k at k*400 ps + j_k: bounded jitter, no drift
      j = real'($urandom_range(0, 40)) - 20.0;
      #(400.0 + j - jprev);
      jprev = j;
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
      din  = lfsr[0];
      hist = {hist[126:0], lfsr[0]};
      n_bits++;
    end
  end

  always @(posedge clk_out) begin
    n_clk++;
    if (el_corr == CORR_UP) n_late++;
    if (el_corr == CORR_DN) n_early++;
    // compare the retimed bit with the sent bits at 16 candidate delays
    for (int d = 0; d < 16; d++) if (dout != hist[d]) err[d]++;
  end
  always @(posedge de) n_de++;
  always @(posedge dr) n_dr++;
  always @(posedge fll_done) t_done = $realtime;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int c0, b0, best;
    real f;
    #100 rst_n = 1;
    #30us;
    chk(fll_done && t_done > 0.0, "FLL finished within 30 us");
    c0 = n_clk; #2us;
    f = real'(n_clk - c0) / 2.0e-6;
    $display("after FLL: %f GHz, code %0d", f / 1e9, fll_code);
    chk(f > 2.5e9 * 0.999 && f < 2.5e9 * 1.001, $sformatf("FLL frequency %f", f));
    #20us;                                   // phase lock and integral settling
    c0 = n_clk; b0 = n_bits;
    for (int d = 0; d < 16; d++) err[d] = 0;
    n_early = 0; n_late = 0; n_de = 0; n_dr = 0;
    #20us;
    chk((n_clk - c0) - (n_bits - b0) <= 2 && (n_bits - b0) - (n_clk - c0) <= 2,
        $sformatf("clock edges %0d for %0d bits", n_clk - c0, n_bits - b0));
    best = 0;
    for (int d = 1; d < 16; d++) if (err[d] < err[best]) best = d;
    $display("bit errors at best delay %0d: %0d of %0d", best, err[best], n_bits - b0);
    chk(err[best] == 0, "error-free retimed data");
    chk(n_early > 0 && n_late > 0, $sformatf("early %0d late %0d", n_early, n_late));
    chk(n_de > 0 && n_dr > 0, "Hogge DE and DR pulses");
    $display("int_acc=%0d early=%0d late=%0d", int_acc, n_early, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
