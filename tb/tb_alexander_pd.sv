// Testbench of the Alexander early/late detector. Data runs at 400 ps per
// bit (64 random bits per run) and the clock at the same rate, with its
// rising edge a fixed skew after each data transition. A skew of 50 ps
// means the clock is early (it samples just after the transition), and 300 ps
// means late. Checked for each skew: every transition gives exactly one
// decision, of the right kind (DN for early, UP for late); a run of equal
// bits gives none; the retimed output equals the sent bits.
`timescale 1ps/1fs
module tb_alexander_pd;
  import clk_pkg::*;
  logic clk = 0, rst_n = 1, din = 0;
  corr_t corr;
  logic dout;
  int checks = 0, failures = 0;
  bit bits [0:63];
  real skew;            // rising edge position after the bit start (ps)

  initial #10 rst_n = 0;

  alexander_pd dut (.*);

  // one bit: data changes at t=0 of the bit, rising clock edge at skew,
  // falling edge half a period later
  task automatic run(input real s, input corr_t on_trans);
    int n_up = 0, n_dn = 0, n_none = 0, n_tr = 0, bad_data = 0;
    for (int k = 0; k < 64; k++) begin
      din = bits[k];
      if (s < 200.0) begin
        #(s) clk = 1; #200 clk = 0; #(200.0 - s);
      end else begin
        #(s - 200.0) clk = 0; #200 clk = 1; #(400.0 - s);
      end
      #0.01;
      // decision for the window that ended at this rising edge
      if (k >= 2) begin
        if (bits[k] != bits[k-1]) n_tr++;
        if (corr == CORR_UP) n_up++;
        else if (corr == CORR_DN) n_dn++;
        else n_none++;
      end
      if (k >= 1 && dout != bits[k]) bad_data++;
    end
    checks++;
    if (on_trans == CORR_UP && (n_up == 0 || n_dn != 0)) failures++;
    if (on_trans == CORR_DN && (n_dn == 0 || n_up != 0)) failures++;
    checks++;
    if (n_none == 0) failures++;                    // runs give no decision
    checks++;
    if (n_up + n_dn != n_tr) begin failures++; $display("FAIL decisions %0d for %0d transitions", n_up + n_dn, n_tr); end
    checks++;
    if (bad_data != 0) begin failures++; $display("FAIL retimed data, skew %f", s); end
    $display("skew %0.1f: up=%0d dn=%0d none=%0d transitions=%0d", s, n_up, n_dn, n_none, n_tr);
  endtask

  initial begin
    for (int k = 0; k < 64; k++) bits[k] = 1'($urandom);
    bits[10] = 0; bits[11] = 0; bits[12] = 0; bits[13] = 0; bits[14] = 1; bits[15] = 0;
    #100 rst_n = 1;
    // rising edge 50 ps into each bit: the falling edge (edge sample) comes
    // 250 ps into the same bit, before the next transition -> clock early
    run(50.0, CORR_DN);
    // rising edge 300 ps into each bit: the falling edge comes 100 ps into
    // the next bit, after the transition -> clock late
    run(300.0, CORR_UP);
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
