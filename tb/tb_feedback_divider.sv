// Testbench of the feedback divider: the output period is N input periods
// with a 50% duty cycle, checked for the default N = 4 and for N = 6.
`timescale 1ps/1fs
module tb_feedback_divider;
  logic clk_in = 0, rst_n = 1;
  logic out4, out6;
  int checks = 0, failures = 0;

  initial #10 rst_n = 0;          // falling edge: asynchronous reset
  int hi4 = 0, lo4 = 0, hi6 = 0, lo6 = 0, r4 = 0, r6 = 0;

  feedback_divider dut4 (.clk_in, .rst_n, .clk_out(out4));
  feedback_divider #(.N(6)) dut6 (.clk_in, .rst_n, .clk_out(out6));

  always #200 clk_in = ~clk_in;

  // count input cycles spent high / low between output rising edges
  always @(posedge clk_in) if (rst_n) begin
    if (out4) hi4++; else lo4++;
    if (out6) hi6++; else lo6++;
  end
  always @(posedge out4) begin
    if (r4 > 0) begin
      checks++;
      if (hi4 != 2 || lo4 != 2) begin failures++; $display("FAIL N=4 hi=%0d lo=%0d", hi4, lo4); end
    end
    r4++; hi4 = 0; lo4 = 0;
  end
  always @(posedge out6) begin
    if (r6 > 0) begin
      checks++;
      if (hi6 != 3 || lo6 != 3) begin failures++; $display("FAIL N=6 hi=%0d lo=%0d", hi6, lo6); end
    end
    r6++; hi6 = 0; lo6 = 0;
  end

  initial begin
    #1000 @(negedge clk_in) rst_n = 1;
    repeat (240) @(posedge clk_in);
    checks++; if (r4 != 60) begin failures++; $display("FAIL: %0d edges of /4 in 240 cycles", r4); end
    checks++; if (r6 != 40) begin failures++; $display("FAIL: %0d edges of /6 in 240 cycles", r6); end
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
