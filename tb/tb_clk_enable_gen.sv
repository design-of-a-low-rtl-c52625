// Testbench of the rate divider: dsm_en is high one cycle in 4 (F_REF/4),
// dint_en one cycle in 128 (F_REF/128) and always together with dsm_en.
`timescale 1ps/1fs
module tb_clk_enable_gen;
  logic clk = 0, rst_n = 1;
  logic dsm_en, dint_en;
  int checks = 0, failures = 0;

  initial #10 rst_n = 0;          // falling edge: asynchronous reset
  int last_dsm = -1, last_dint = -1, n_dsm = 0, n_dint = 0;

  clk_enable_gen dut (.*);

  always #800 clk = ~clk;

  initial begin
    #100 rst_n = 1;
    for (int cyc = 0; cyc < 1280; cyc++) begin
      @(posedge clk); #1;
      if (dsm_en) begin
        if (last_dsm >= 0) begin
          checks++;
          if (cyc - last_dsm != 4) begin failures++; $display("FAIL dsm spacing %0d", cyc - last_dsm); end
        end
        last_dsm = cyc; n_dsm++;
      end
      if (dint_en) begin
        checks++;
        if (!dsm_en) begin failures++; $display("FAIL dint_en without dsm_en"); end
        if (last_dint >= 0) begin
          checks++;
          if (cyc - last_dint != 128) begin failures++; $display("FAIL dint spacing %0d", cyc - last_dint); end
        end
        last_dint = cyc; n_dint++;
      end
    end
    checks++; if (n_dsm != 320) begin failures++; $display("FAIL n_dsm=%0d", n_dsm); end
    checks++; if (n_dint != 10) begin failures++; $display("FAIL n_dint=%0d", n_dint); end
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
