// Testbench of the start-up FLL with a simple oscillator model
// (f = 0.4 GHz + 3.2 GHz * code / 2^14) and a 1 MHz reference: the search
// ends after 2*14 reference periods plus one, and the final frequency is
// within +-0.1% of TARGET * 1 MHz, for 2.5 GHz (default) and 0.8 GHz.
`timescale 1ps/1fs
module tb_fll;
  logic ref_clk = 0, rst_n = 1;
  logic clk_a = 0, clk_b = 0;
  logic [13:0] code_a, code_b;
  logic done_a, done_b;
  logic [15:0] count_a, count_b;
  int checks = 0, failures = 0;
  real t_done_a = 0.0, t_done_b = 0.0;

  initial #10 rst_n = 0;

  fll dut_a (.clk(clk_a), .rst_n, .ref_clk, .code(code_a), .done(done_a), .count(count_a));
  fll #(.TARGET(800)) dut_b (.clk(clk_b), .rst_n, .ref_clk, .code(code_b), .done(done_b), .count(count_b));

  function automatic real fosc(logic [13:0] c);
    return 0.4e9 + 3.2e9 * real'(c) / 16384.0;
  endfunction

  always #(0.5e12 / fosc(code_a)) clk_a = ~clk_a;
  always #(0.5e12 / fosc(code_b)) clk_b = ~clk_b;
  always #500000 ref_clk = ~ref_clk;

  always @(posedge done_a) t_done_a = $realtime;
  always @(posedge done_b) t_done_b = $realtime;

  initial begin
    #100 rst_n = 1;
    #35us;
    checks++;
    if (!done_a || !done_b) begin failures++; $display("FAIL not done"); end
    checks++;
    // 29th reference edge (at 28.5 us): start, then settle + measure per bit
    if (t_done_a < 27.9e6 || t_done_a > 29.1e6) begin failures++; $display("FAIL done at %f", t_done_a); end
    checks++;
    if (fosc(code_a) < 2.5e9 * 0.999 || fosc(code_a) > 2.5e9 * 1.001) begin
      failures++; $display("FAIL a: code %0d -> %f Hz", code_a, fosc(code_a));
    end
    checks++;
    if (fosc(code_b) < 0.8e9 * 0.999 || fosc(code_b) > 0.8e9 * 1.001) begin
      failures++; $display("FAIL b: code %0d -> %f Hz", code_b, fosc(code_b));
    end
    // the word stays fixed after done
    begin
      logic [13:0] ca;
      ca = code_a;
      #5us;
      checks++;
      if (code_a != ca || !done_a) begin failures++; $display("FAIL word moved after done"); end
    end
    $display("final: %f GHz, %f GHz", fosc(code_a) / 1e9, fosc(code_b) / 1e9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
