// Testbench of the thermometer decoder: all 16 codes; the number of cells
// on equals the code and the cells on are the lowest ones.
`timescale 1ps/1fs
module tb_therm_dec;
  logic [3:0]  bin;
  logic [14:0] therm;
  int checks = 0, failures = 0;

  therm_dec dut (.*);

  initial begin
    for (int b = 0; b < 16; b++) begin
      bin = 4'(b);
      #1;
      checks++;
      if (therm != 15'((32'd1 << b) - 1)) begin
        failures++;
        $display("FAIL bin=%0d therm=%b", b, therm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
