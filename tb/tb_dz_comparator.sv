// Testbench of the dead-zone comparator: every 14-bit input value is
// compared with the expected window decision, for the default window
// (reference 0, K = 16) and for an offset window (reference 100, K = 3).
`timescale 1ps/1fs
module tb_dz_comparator;
  import clk_pkg::*;
  logic signed [13:0] value;
  corr_t c0, c1;
  int checks = 0, failures = 0;

  dz_comparator dut0 (.value, .corr(c0));
  dz_comparator #(.W(14), .REF(100), .K(3)) dut1 (.value, .corr(c1));

  function automatic corr_t model(int v, int r, int k);
    if (v > r + k) return CORR_UP;
    if (v < r - k) return CORR_DN;
    return CORR_NONE;
  endfunction

  initial begin
    for (int v = -8192; v < 8192; v++) begin
      value = 14'(v);
      #1;
      checks++;
      if (c0 != model(v, 0, 16) || c1 != model(v, 100, 3)) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d c0=%s c1=%s", v, c0.name(), c1.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
