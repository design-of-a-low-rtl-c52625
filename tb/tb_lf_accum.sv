// Testbench of the loop-filter accumulator: random up/down/hold requests
// with random enables, checked against a saturating integer model, for the
// default 14/13-bit configuration and for an 18/13-bit one with a large
// step that reaches both saturation limits. The DAC code is checked as the
// offset-binary top bits.
`timescale 1ps/1fs
module tb_lf_accum;
  import clk_pkg::*;
  logic clk = 0, rst_n = 1, en = 0;
  corr_t corr = CORR_NONE;
  logic signed [13:0] acc_a;  logic [12:0] code_a;
  logic signed [17:0] acc_b;  logic [12:0] code_b;
  int checks = 0, failures = 0;

  initial #10 rst_n = 0;          // falling edge: asynchronous reset
  longint ma = 0, mb = 100;
  int hit_max = 0, hit_min = 0;

  lf_accum dut_a (.clk, .rst_n, .en, .corr, .acc(acc_a), .code(code_a));
  lf_accum #(.ACC_W(18), .OUT_W(13), .STEP(5000), .INIT(100)) dut_b (
    .clk, .rst_n, .en, .corr, .acc(acc_b), .code(code_b));

  always #500 clk = ~clk;

  function automatic longint sat(longint v, int w);
    longint hi = (longint'(1) << (w - 1)) - 1;
    longint lo = -(longint'(1) << (w - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  initial begin
    #200 rst_n = 1;
    checks++; if (acc_a != 0 || acc_b != 100) failures++;
    checks++; if (code_a != 13'h1000) failures++;      // mid-scale
    for (int i = 0; i < 3000; i++) begin
      int r, d;
      @(negedge clk);
      r    = $urandom_range(0, 99);
      // long runs of one direction to reach saturation
      corr = (i % 1000 < 450) ? (r < 80 ? CORR_UP : CORR_DN)
           : (i % 1000 < 900) ? (r < 80 ? CORR_DN : CORR_UP)
           : (r < 50 ? CORR_NONE : CORR_UP);
      en   = ($urandom_range(0, 9) != 0);
      @(posedge clk); #1;
      if (en) begin
        d  = (corr == CORR_UP) ? 1 : (corr == CORR_DN) ? -1 : 0;
        ma = sat(ma + d, 14);
        mb = sat(mb + d * 5000, 18);
      end
      if (mb == 131071) hit_max++;
      if (mb == -131072) hit_min++;
      checks++;
      if (acc_a != ma || acc_b != mb) begin
        failures++;
        $display("FAIL %0d: a=%0d/%0d b=%0d/%0d", i, acc_a, ma, acc_b, mb);
      end
      checks++;
      if (code_a != 13'((ma + 8192) >> 1) || code_b != 13'((mb + 131072) >> 5)) begin
        failures++;
        $display("FAIL code %0d: %0h %0h", i, code_a, code_b);
      end
    end
    checks++;
    if (hit_max == 0 || hit_min == 0) begin failures++; $display("FAIL: saturation not reached"); end
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
