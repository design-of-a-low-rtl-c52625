// Testbench of the Hogge detector: with the rising clock edge s ps after
// each data transition, DE is high for s ps and DR for half a clock period
// (200 ps at 2.5 Gb/s) after every transition, and neither pulses without a
// transition. Checked for s = 50, 120 and 180 ps.
`timescale 1ps/1fs
module tb_hogge_pd;
  logic clk = 0, rst_n = 1, din = 0;
  logic de, dr, q1;
  int checks = 0, failures = 0;
  real t_de, t_dr, w_de, w_dr;
  int n_de = 0, n_dr = 0;

  initial #10 rst_n = 0;

  hogge_pd dut (.*);

  always @(posedge de) t_de = $realtime;
  always @(negedge de) begin w_de = $realtime - t_de; n_de++; end
  always @(posedge dr) t_dr = $realtime;
  always @(negedge dr) begin w_dr = $realtime - t_dr; n_dr++; end

  task automatic run(input real s);
    bit b, prev;
    int n_tr = 0;
    prev = din;
    n_de = 0; n_dr = 0;
    for (int k = 0; k < 100; k++) begin
      b = (k % 5 == 0) ? prev : 1'($urandom);   // some runs of equal bits
      din = b;
      if (b != prev) n_tr++;
      w_de = -1; w_dr = -1;
      #(s) clk = 1; #200 clk = 0; #(200.0 - s);
      if (b != prev) begin
        checks++;
        if (w_de < s - 0.01 || w_de > s + 0.01 || w_dr < 199.99 || w_dr > 200.01) begin
          failures++;
          $display("FAIL s=%f: DE %f DR %f", s, w_de, w_dr);
        end
      end
      checks++;
      if (q1 != b) begin failures++; $display("FAIL retimed bit"); end
      prev = b;
    end
    checks++;
    if (n_de != n_tr || n_dr != n_tr) begin
      failures++;
      $display("FAIL pulses: DE %0d DR %0d transitions %0d", n_de, n_dr, n_tr);
    end
  endtask

  initial begin
    #100 rst_n = 1; #100;
    run(50.0);
    run(120.0);
    run(180.0);
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
