// Open-loop testbench of the CDR digital core with an ideal 2.5 GHz clock
// (rising edges at 200 + k*400 ps) and 2.5 Gb/s PRBS-7 data at a fixed
// phase. TARGET is set one above the true count (2500 per 1 MHz period),
// so the successive-approximation FLL must keep every bit: its word ends at
// all ones. Checked:
//  * before the FLL is done the proportional pulses are gated off and the
//    integral accumulator is frozen at zero, while the FLL word is searched;
//  * the FLL word after the search (16383) and the done time;
//  * with the clock late (rising edge 300 ps after each transition) DE is
//    wider than DR and the integral accumulator rises; with the clock early
//    (50 ps) DR is wider and the accumulator falls;
//  * the fine DAC cells follow the accumulator (more cells when it is high);
//  * the retimed data equals the sent data.
`timescale 1ps/1fs
module tb_cdr_digital;
  import clk_pkg::*;
  logic clk = 0, rst_n = 1, ref_clk = 0, din = 0;
  logic de, dr, dout, clk_half, fll_done;
  logic [14:0] fll_therm, int_therm;
  logic signed [17:0] int_acc;
  logic [13:0] fll_code;
  corr_t el_corr;
  int checks = 0, failures = 0;
  logic [6:0] lfsr = 7'h33;
  logic [15:0] hist = '0;
  real shift = 0.0;
  real t_de, t_dr, w_de = 0.0, w_dr = 0.0;
  int n_de_early = 0, data_err = 0, n_cmp = 0;

  initial #10 rst_n = 0;

  cdr_digital #(.TARGET(2501)) dut (.*);

  always #200 clk = ~clk;
  always #500000 ref_clk = ~ref_clk;

  initial begin
    #300;                                  // transitions at 300 + k*400
    forever begin
      real d;
      d = 400.0 + shift;
      shift = 0.0;
      #(d);
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
      din  = lfsr[0];
      hist = {hist[14:0], lfsr[0]};
    end
  end

  always @(posedge de) t_de = $realtime;
  always @(negedge de) w_de += $realtime - t_de;
  always @(posedge dr) t_dr = $realtime;
  always @(negedge dr) w_dr += $realtime - t_dr;
  always @(posedge clk) if (fll_done) begin
    n_cmp++;
    if (dout != hist[1]) data_err++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic signed [17:0] a0;
    int cells_hi, cells_lo;
    #150 rst_n = 1;
    #10us;
    chk(!fll_done, "FLL still searching at 10 us");
    chk(w_de == 0.0 && w_dr == 0.0, "proportional pulses gated during the search");
    chk(int_acc == 0, "integral frozen during the search");
    wait (fll_done);
    $display("FLL done at %0t, word %0d", $realtime, fll_code);
    chk($realtime > 28.0e6 && $realtime < 29.2e6, "FLL done time");
    chk(fll_code == 14'h3fff, $sformatf("FLL word %0d", fll_code));
    // clock late
    #1us;
    a0 = int_acc; w_de = 0.0; w_dr = 0.0;
    #4us;
    chk(int_acc > a0 + 100, $sformatf("late clock: integral %0d -> %0d", a0, int_acc));
    chk(w_de > 1.3 * w_dr, $sformatf("late clock: DE %f DR %f", w_de, w_dr));
    cells_hi = 0;
    repeat (256) begin @(posedge clk_half); cells_hi += $countones(int_therm); end
    // clock early: move the data 250 ps later
    shift = 250.0;
    #1us;
    a0 = int_acc; w_de = 0.0; w_dr = 0.0;
    #8us;
    chk(int_acc < a0 - 100, $sformatf("early clock: integral %0d -> %0d", a0, int_acc));
    chk(w_dr > 2.0 * w_de, $sformatf("early clock: DE %f DR %f", w_de, w_dr));
    cells_lo = 0;
    repeat (256) begin @(posedge clk_half); cells_lo += $countones(int_therm); end
    chk(cells_hi > cells_lo, $sformatf("fine DAC cells %0d then %0d", cells_hi, cells_lo));
    chk(data_err <= 4, $sformatf("retimed data errors %0d of %0d", data_err, n_cmp));
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
