// Testbench of the three-state PFD: pulse widths equal the edge offset, a
// missing feedback edge leaves UP asserted (frequency detection), both
// outputs clear once both edges have arrived, and reset clears the state.
`timescale 1ps/1fs
module tb_pfd;
  logic ref_clk = 0, fb_clk = 0, rst_n = 1;
  logic up, dn;
  int checks = 0, failures = 0;

  initial #10 rst_n = 0;          // falling edge: asynchronous reset
  real t_up, t_dn, w_up, w_dn;

  pfd dut (.*);

  always @(posedge up) t_up = $realtime;
  always @(negedge up) w_up = $realtime - t_up;
  always @(posedge dn) t_dn = $realtime;
  always @(negedge dn) w_dn = $realtime - t_dn;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic edges(input real ref_at, input real fb_at);
    fork
      begin #(ref_at) ref_clk = 1; #(300) ref_clk = 0; end
      begin #(fb_at)  fb_clk  = 1; #(300) fb_clk  = 0; end
    join
    #1000;
  endtask

  initial begin
    #100 rst_n = 1; #100;
    check(up == 0 && dn == 0, "idle after reset");
    w_up = -1; w_dn = -1;
    edges(100, 250);                     // reference leads by 150 ps
    check(w_up > 149.9 && w_up < 150.1, $sformatf("UP width %f, expected 150", w_up));
    check(w_dn <= 0.01, $sformatf("DN width %f, expected 0", w_dn));
    check(up == 0 && dn == 0, "both cleared after lead");
    w_up = -1; w_dn = -1;
    edges(330, 100);                     // feedback leads by 230 ps
    check(w_dn > 229.9 && w_dn < 230.1, $sformatf("DN width %f, expected 230", w_dn));
    check(w_up <= 0.01, $sformatf("UP width %f, expected 0", w_up));
    // frequency detection: two reference edges, no feedback edge
    #100 ref_clk = 1; #300 ref_clk = 0; #300 ref_clk = 1; #300 ref_clk = 0; #100;
    check(up == 1 && dn == 0, "UP held while feedback is missing");
    #50 fb_clk = 1; #10;
    check(up == 0 && dn == 0, "feedback edge clears the held UP");
    fb_clk = 0; #100;
    // reset clears a pending state
    fb_clk = 1; #10 fb_clk = 0; #10;
    check(dn == 1, "DN set by lone feedback edge");
    rst_n = 0; #10;
    check(up == 0 && dn == 0, "reset clears DN");
    rst_n = 1; #10;
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
