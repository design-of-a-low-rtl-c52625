// Testbench of the second-order error-feedback delta-sigma modulator.
// Property checked: with NTF = (1 - z^-1)^2 the running sum of
// (output*2^F - input) equals e[n] - e[n-1] plus a start-up term, so it
// stays within 2*2^F at every sample (F = number of dropped bits). This
// bound, the output range and the exact long-run mean are checked for
// several constant inputs within the shaped range (1/16 .. 13/16 of full
// scale) and a slow ramp, on the 13-bit (PLL) and
// 14-bit (CDR) widths. The enable is toggled to check the modulator holds
// when not enabled. Because a first-order loop also keeps that running sum
// bounded, the 13-bit output is first compared cycle by cycle, from reset,
// with a reference model of the recurrence q = floor((x + 2e[n-1] -
// e[n-2]) / 2^F), e = sum - q*2^F, under random inputs and random enables.
`timescale 1ps/1fs
module tb_dsm2_ef;
  logic clk = 0, rst_n = 1, en = 0;
  logic [12:0] x13;  logic [3:0] y13;
  logic [13:0] x14;  logic [3:0] y14;
  int checks = 0, failures = 0;

  initial #10 rst_n = 0;          // falling edge: asynchronous reset

  dsm2_ef dut13 (.clk, .rst_n, .en, .x(x13), .y(y13));
  dsm2_ef #(.IN_W(14)) dut14 (.clk, .rst_n, .en, .x(x14), .y(y14));

  always #500 clk = ~clk;

  task automatic run(input int v13, input int v14, input int n, input bit ramp);
    longint s13 = 0, s14 = 0;
    int bad = 0, in13, in14;
    logic [3:0] held;
    in13 = v13; in14 = v14;
    x13 = 13'(in13); x14 = 14'(in14);
    // flush the previous input's state: two updates
    repeat (2) begin @(negedge clk); en = 1; @(posedge clk); end
    s13 = 0; s14 = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (ramp) begin in13 = 1000 + i / 4; in14 = 2000 + i / 2; end
      x13 = 13'(in13); x14 = 14'(in14);
      en = 1;
      @(posedge clk); #1;
      s13 += longint'(y13) * 512 - in13;
      s14 += longint'(y14) * 1024 - in14;
      if (s13 > 2 * 512 + 512 || s13 < -(2 * 512 + 512)) bad++;
      if (s14 > 2 * 1024 + 1024 || s14 < -(2 * 1024 + 1024)) bad++;
      // hold: one cycle without enable must not change the output
      if (i % 7 == 3) begin
        held = y13;
        @(negedge clk); en = 0; @(posedge clk); #1;
        if (y13 != held) bad++;
      end
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL x13=%0d x14=%0d ramp=%0d: %0d violations (s13=%0d s14=%0d)", v13, v14, ramp, bad, s13, s14);
    end
  endtask

  initial begin
    int m_e1, m_e2, m_sum, m_q, m_err, m_bad;
    logic [3:0] y_ref;
    #200 rst_n = 1;
    m_e1 = 0; m_e2 = 0; m_bad = 0; y_ref = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x13 = 13'(600 + $urandom_range(0, 6000));
      x14 = 14'(8192);
      en  = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (en) begin
        m_sum = int'(x13) + 2 * m_e1 - m_e2;
        m_q   = m_sum / 512;
        if (m_q > 15) m_q = 15;
        m_err = m_sum - m_q * 512;
        if (m_err > 511) m_err = 511;
        m_e2  = m_e1;
        m_e1  = m_err;
        y_ref = 4'(m_q);
      end
      if (y13 != y_ref) m_bad++;
    end
    checks++;
    if (m_bad != 0) begin failures++; $display("FAIL reference model: %0d mismatches", m_bad); end
    run(4096, 8192, 2000, 0);     // mid-scale
    run(600, 1100, 2000, 0);      // low end of the shaped range
    run(777, 12345, 2000, 0);
    run(5000, 1111, 2000, 0);
    run(6600, 13200, 2000, 0);    // top end of the shaped range
    run(1000, 2000, 2000, 1);     // slow ramp
    // exact mean over a whole pattern period: x = 4096 + 128 -> 8.25
    begin
      int sum = 0;
      x13 = 13'd4224;
      repeat (4) begin @(negedge clk); en = 1; @(posedge clk); end
      for (int i = 0; i < 1024; i++) begin @(negedge clk); en = 1; @(posedge clk); #1; sum += y13; end
      checks++;
      if (sum < 8448 - 3 || sum > 8448 + 3) begin failures++; $display("FAIL mean sum=%0d", sum); end
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
