// Testbench of the DAC + switched-RC filter model: after each enabled clock
// edge the output moves towards (cells on)/15 by the step
// 1 - exp(-T_D/RC), T_D after the edge; nothing changes without enable.
// The expected values are computed here from that formula.
`timescale 1ps/1fs
module tb_current_dac_lpf;
  logic clk = 0, en = 0;
  logic [14:0] therm = '0;
  real level, expv, a;
  int checks = 0, failures = 0;

  current_dac_lpf dut (.*);

  always #3200 clk = ~clk;        // F_CK = F_REF/4 at 625 MHz

  task automatic chk(input real e, input string what);
    checks++;
    if (level < e - 1e-6 || level > e + 1e-6) begin
      failures++;
      $display("FAIL %s: level=%f expected=%f", what, level, e);
    end
  endtask

  initial begin
    a    = 1.0 - $exp(-100.0 / 509.3);
    expv = 0.5;
    #1 chk(expv, "power-up level");
    // 12 cells on, enabled
    @(negedge clk); therm = 15'h0fff; en = 1;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk); #50;
      chk(expv, "before the switch pulse ends");
      #60;
      expv = expv + a * (12.0 / 15.0 - expv);
      chk(expv, "after the switch pulse");
    end
    // disabled: holds
    @(negedge clk); en = 0; therm = '0;
    repeat (5) @(posedge clk);
    #200 chk(expv, "held while disabled");
    // 3 cells on
    @(negedge clk); therm = 15'h0007; en = 1;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk); #150;
      expv = expv + a * (3.0 / 15.0 - expv);
      chk(expv, "settling to 3/15");
    end
    checks++;
    if (level > 0.2 + 0.01 || level < 0.2 - 0.01) begin failures++; $display("FAIL not settled"); end
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
