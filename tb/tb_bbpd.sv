// Testbench of the bang-bang detector: the decision registered on each
// reference edge is CORR_DN exactly when the PFD's DN output was high.
`timescale 1ps/1fs
module tb_bbpd;
  import clk_pkg::*;
  logic ref_clk = 0, rst_n = 1, dn = 0;
  corr_t corr;
  int checks = 0, failures = 0;

  initial #10 rst_n = 0;          // falling edge: asynchronous reset
  logic exp_dn;

  bbpd dut (.*);

  always #800 ref_clk = ~ref_clk;

  initial begin
    #100;
    checks++; if (corr != CORR_NONE) failures++;
    rst_n = 1;
    repeat (200) begin
      @(negedge ref_clk);
      dn = 1'($urandom);
      exp_dn = dn;
      @(posedge ref_clk); #1;
      checks++;
      if (corr != (exp_dn ? CORR_DN : CORR_UP)) begin
        failures++;
        $display("FAIL: dn=%0d corr=%s", exp_dn, corr.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
