// Jitter-transfer testbench of the double-integral digital PLL at its
// default parameters, 625 MHz reference (2.5 GHz output). After lock, the
// reference edges are phase-modulated by A*sin(2*pi*fm*t), A = 40 ps, and
// the phase of the feedback clock is measured edge by edge. Correlating it
// with sin and cos over whole modulation periods gives the amplitude that
// passes the loop. Checked, against the loop bandwidth of about F_REF/40
// (15.6 MHz):
//   fm = 1.95 MHz  (well inside): transfer between 0.8 and 1.4
//   fm = 15.6 MHz  (at the bandwidth): printed, must lie between the two
//   fm = 78 MHz    (well outside): transfer below 0.5
`timescale 1ps/1fs
module tb_dpll_jtran;
  import clk_pkg::*;
  localparam real T = 1600.0;         // reference period, ps
  localparam real A = 40.0;           // modulation amplitude, ps
  logic ref_clk = 0, rst_n = 1;
  logic clk_out, fb_clk, up, dn;
  logic signed [13:0] int_acc;
  logic signed [17:0] dint_acc;
  corr_t dint_corr;
  int checks = 0, failures = 0;
  real fm_per = 0.0;                  // modulation period in reference cycles, 0 = off
  real ph_amp = 0.0;                  // current modulation amplitude
  longint k_ref = 0;

  // measurement state
  bit meas = 0;
  int n_meas = 0;
  longint k_fb = 0;
  real t0, acc_s, acc_c;

  dpll dut (.*);

  initial #10 rst_n = 0;

  // reference: rising edge k at k*T + ph_amp*sin(2*pi*k/fm_per)
  initial begin
    real t_next, m;
    #200 rst_n = 1;
    forever begin
      k_ref++;
      m = (fm_per > 0.0) ? ph_amp * $sin(2.0 * 3.14159265358979 * real'(k_ref) / fm_per) : 0.0;
      t_next = real'(k_ref) * T + m;
      #(t_next - $realtime - T / 2.0) ref_clk = 1'b0;
      #(t_next - $realtime) ref_clk = 1'b1;
    end
  end

  always @(posedge fb_clk) if (meas) begin
    real dev, w;
    if (n_meas == 0) begin t0 = $realtime; k_fb = 0; end
    dev = $realtime - t0 - real'(k_fb) * T;
    w = 2.0 * 3.14159265358979 * real'(k_fb) / fm_per;
    acc_s += dev * $sin(w);
    acc_c += dev * $cos(w);
    k_fb++;
    n_meas++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic transfer(input real per, input int periods, output real h);
    fm_per = per; ph_amp = A;
    repeat (int'(per) * 4) @(posedge ref_clk);       // let the response settle
    acc_s = 0.0; acc_c = 0.0; n_meas = 0;
    @(negedge ref_clk); meas = 1;
    wait (n_meas == int'(per) * periods);
    meas = 0;
    h = 2.0 * $sqrt(acc_s * acc_s + acc_c * acc_c) / real'(n_meas) / A;
    $display("fm = %0.2f MHz: transfer %0.3f", 625.0 / per, h);
  endtask

  initial begin
    real h_lo, h_bw, h_hi;
    // lock: coarse hand-over takes about 180k reference cycles
    repeat (260000) @(posedge ref_clk);
    $display("locked: int=%0d dint=%0d", int_acc, dint_acc);
    transfer(320.0, 8, h_lo);
    transfer(40.0, 40, h_bw);
    transfer(8.0, 200, h_hi);
    chk(h_lo > 0.8 && h_lo < 1.4, $sformatf("in-band transfer %f", h_lo));
    chk(h_hi < 0.5, $sformatf("out-of-band transfer %f", h_hi));
    chk(h_bw < h_lo && h_bw > h_hi, $sformatf("transfer at the bandwidth %f", h_bw));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
