// Testbench of the decimator: random full-rate decisions (changing just
// after each full-rate clock edge, as the Alexander detector's do) are
// paired; each half-rate output must be the sign of the sum of one pair,
// and every decision must be used exactly once.
`timescale 1ps/1fs
module tb_cdr_decimator;
  import clk_pkg::*;
  logic clk_half = 0, rst_n = 1;
  corr_t corr_in = CORR_NONE, corr_out;
  corr_t c [0:399];
  int checks = 0, failures = 0;

  initial #10 rst_n = 0;

  cdr_decimator dut (.*);

  function automatic int v(corr_t x);
    return x == CORR_UP ? 1 : (x == CORR_DN ? -1 : 0);
  endfunction

  initial begin
    for (int i = 0; i < 400; i++) begin
      int r;
      r = $urandom_range(0, 2);
      c[i] = r == 0 ? CORR_UP : (r == 1 ? CORR_DN : CORR_NONE);
    end
    #100 rst_n = 1; #100;
    // full-rate edge i: clk_half toggles (rising on even i), then c[i] appears
    for (int i = 0; i < 400; i++) begin
      clk_half = (i % 2 == 0);
      #10 corr_in = c[i];
      #190;
      if (i % 2 == 0 && i >= 4) begin
        int s;
        corr_t e;
        s = v(c[i-3]) + v(c[i-2]);
        e = s > 0 ? CORR_UP : (s < 0 ? CORR_DN : CORR_NONE);
        checks++;
        if (corr_out != e) begin
          failures++;
          $display("FAIL edge %0d: got %s expected %s", i, corr_out.name(), e.name());
        end
      end
      #200;
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
