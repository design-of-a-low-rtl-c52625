// Range testbench of the linear digital CDR: the two ends of the intended
// data-rate range, 0.5 Gb/s and 3.2 Gb/s, each with its own CDR instance.
// The only parameter set is the FLL target, which is the data rate over the
// 1 MHz reference (500 and 3200). Data: PRBS-7 with bounded edge jitter of
// +-5% of a bit. Checked for each rate: the FLL finishes within 30 us and
// leaves the oscillator within +-0.1% of the rate; after lock the recovered
// clock runs at the data rate and the retimed data is error-free over
// 20 us; both early and late decisions occur.
`timescale 1ps/1fs
module tb_cdr_range;
  import clk_pkg::*;
  logic ref_clk = 0, rst_n = 1;
  int checks = 0, failures = 0;

  initial #10 rst_n = 0;
  always #500000 ref_clk = ~ref_clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one CDR with its data source and monitors
  `define CDR_CASE(NAME, TGT, UI) \
    logic NAME``_din = 0, NAME``_clk, NAME``_dout, NAME``_done, NAME``_de, NAME``_dr; \
    corr_t NAME``_el; \
    logic signed [17:0] NAME``_acc; \
    logic [13:0] NAME``_code; \
    logic [6:0] NAME``_lfsr = 7'h5a; \
    logic [127:0] NAME``_hist = '0; \
    int NAME``_bits = 0, NAME``_clks = 0, NAME``_early = 0, NAME``_late = 0; \
    int NAME``_err [0:15]; \
    cdr #(.TARGET(TGT)) u_``NAME (.ref_clk, .rst_n, .din(NAME``_din), .clk_out(NAME``_clk), \
      .dout(NAME``_dout), .fll_done(NAME``_done), .int_acc(NAME``_acc), .fll_code(NAME``_code), \
      .de(NAME``_de), .dr(NAME``_dr), .el_corr(NAME``_el)); \
    initial begin \
      real j, jprev; \
      jprev = 0.0; \
      forever begin \
        j = (real'($urandom_range(0, 100)) - 50.0) * (UI) / 1000.0; \
        #((UI) + j - jprev); \
        jprev = j; \
        NAME``_lfsr = {NAME``_lfsr[5:0], NAME``_lfsr[6] ^ NAME``_lfsr[5]}; \
        NAME``_din = NAME``_lfsr[0]; \
        NAME``_hist = {NAME``_hist[126:0], NAME``_lfsr[0]}; \
        NAME``_bits++; \
      end \
    end \
    always @(posedge NAME``_clk) begin \
      NAME``_clks++; \
      if (NAME``_el == CORR_UP) NAME``_late++; \
      if (NAME``_el == CORR_DN) NAME``_early++; \
      for (int d = 0; d < 16; d++) if (NAME``_dout != NAME``_hist[d]) NAME``_err[d]++; \
    end \
    task automatic NAME``_run(); \
      int c0, b0, best; \
      real f; \
      #30us; \
      chk(NAME``_done, `"NAME: FLL finished within 30 us`"); \
      c0 = NAME``_clks; #4us; \
      f = real'(NAME``_clks - c0) / 4.0e-6; \
      $display(`"NAME: after FLL %f GHz, code %0d`", f / 1e9, NAME``_code); \
      chk(f > 1.0e6 * (TGT) * 0.999 && f < 1.0e6 * (TGT) * 1.001, $sformatf(`"NAME: FLL frequency %f`", f)); \
      #30us; \
      c0 = NAME``_clks; b0 = NAME``_bits; NAME``_early = 0; NAME``_late = 0; \
      for (int d = 0; d < 16; d++) NAME``_err[d] = 0; \
      #20us; \
      chk((NAME``_clks - c0) - (NAME``_bits - b0) <= 2 && (NAME``_bits - b0) - (NAME``_clks - c0) <= 2, \
          $sformatf(`"NAME: clock edges %0d for %0d bits`", NAME``_clks - c0, NAME``_bits - b0)); \
      best = 0; \
      for (int d = 1; d < 16; d++) if (NAME``_err[d] < NAME``_err[best]) best = d; \
      $display(`"NAME: bit errors %0d of %0d, int_acc %0d`", NAME``_err[best], NAME``_bits - b0, NAME``_acc); \
      chk(NAME``_err[best] == 0, `"NAME: error-free retimed data`"); \
      chk(NAME``_early > 0 && NAME``_late > 0, `"NAME: early and late decisions`"); \
    endtask

  `CDR_CASE(lo, 500, 2000.0)
  `CDR_CASE(hi, 3200, 312.5)

  initial begin
    #100 rst_n = 1;
    fork
      lo_run();
      hi_run();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
