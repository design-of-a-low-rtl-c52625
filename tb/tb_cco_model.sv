// Testbench of the oscillator model: the measured frequency follows
// f = f_c * (1 + FINE_RANGE*(2*fine-1) + KP_FRAC*(pos-neg)) with
// f_c = F_MIN + (F_MAX-F_MIN)*coarse, and a proportional pulse of width W
// advances the output phase by KP_FRAC*f*W cycles (exact phase integration,
// not rounded to oscillator edges).
`timescale 1ps/1fs
module tb_cco_model;
  real coarse = 0.5, fine = 0.5;
  logic pos = 0, neg = 0;
  logic clk_out;
  int checks = 0, failures = 0;
  int n = 0;
  real t_last = 0.0;

  cco_model dut (.*);

  always @(posedge clk_out) begin n++; t_last = $realtime; end

  function automatic real fexp(real c, real fi, int p);
    return (0.6e9 + 3.0e9 * c) * (1.0 + 0.25 * (2.0 * fi - 1.0) + 0.157 * p);
  endfunction

  // frequency from the time of 200 rising edges
  task automatic measure(input real fe, input string what);
    real t0, f;
    int n0;
    @(posedge clk_out); #0.001;
    t0 = t_last; n0 = n;
    wait (n == n0 + 200);
    f = 200.0 / ((t_last - t0) * 1e-12);
    checks++;
    if (f < fe * 0.9999 || f > fe * 1.0001) begin
      failures++;
      $display("FAIL %s: f=%f expected %f", what, f, fe);
    end
  endtask

  initial begin
    #1000;
    measure(fexp(0.5, 0.5, 0), "mid-scale");
    coarse = 0.0; #1000; measure(fexp(0.0, 0.5, 0), "coarse 0");
    coarse = 1.0; #1000; measure(fexp(1.0, 0.5, 0), "coarse 1");
    coarse = 0.633; fine = 0.9; #1000; measure(fexp(0.633, 0.9, 0), "fine 0.9");
    fine = 0.1; #1000; measure(fexp(0.633, 0.1, 0), "fine 0.1");
    pos = 1; #1000; measure(fexp(0.633, 0.1, 1), "pos held");
    pos = 0; neg = 1; #1000; measure(fexp(0.633, 0.1, -1), "neg held");
    neg = 0;
    // phase advance of a 137.5 ps pulse, compared with an idle run
    begin
      real f0, t_ref, t_pulse, adv_exp;
      int n0;
      coarse = 0.5; fine = 0.5; #2000;
      f0 = fexp(0.5, 0.5, 0);
      @(posedge clk_out); #0.001;
      n0 = n; t_ref = t_last;
      #13.0 pos = 1; #137.5 pos = 0;
      wait (n == n0 + 50);
      t_pulse = t_last - t_ref;
      adv_exp = 0.157 * f0 * 137.5e-12;              // cycles gained
      checks++;
      if ((50.0 / f0 * 1e12 - t_pulse) < adv_exp / f0 * 1e12 - 0.05 ||
          (50.0 / f0 * 1e12 - t_pulse) > adv_exp / f0 * 1e12 + 0.05) begin
        failures++;
        $display("FAIL phase advance %f ps, expected %f ps", 50.0 / f0 * 1e12 - t_pulse, adv_exp / f0 * 1e12);
      end
    end
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
