# A double-integral digital PLL and a linear digital CDR

Two clock circuits that follow one idea. A digital loop filter is attractive because it is
small, portable and immune to leakage. But the usual way of feeding it, a time-to-digital
converter (TDC) that turns phase error into a number, adds quantisation noise, and the
loop dynamics then depend on that converter's resolution. Here the **proportional** part
of the loop does not go through a TDC at all. The phase detector's output pulses switch a
three-level current source straight into the oscillator, so this path is linear and has
no quantisation. Only the slow **integral** part is digital, and that part needs just
one bit of phase information per cycle: early or late.

The repository holds both circuits built on this idea:

* **A frequency-synthesis PLL** (`dpll`). A PFD drives the proportional current. A bang-bang
  detector drives a 14-bit integral accumulator. An 18-bit "double-integral" accumulator
  re-centres that integral path, which keeps the fine tuning range free for tracking. The
  divider is N = 4: a 625 MHz reference gives 2.5 GHz. The intended range is 0.7–3.5 GHz,
  with a loop bandwidth of about F_REF/40.
* **A clock-and-data-recovery loop** (`cdr`). A digital frequency-locked loop (FLL) first
  sets the oscillator near the data rate from a 1 MHz reference. A linear Hogge detector
  then drives the proportional current. A bang-bang Alexander detector, through a half-rate
  decimator, drives the integral accumulator. It is built for 2.5 Gb/s NRZ data, with
  an intended range of 0.5–3.2 Gb/s and a jitter-transfer bandwidth near 4 MHz.

Both loops are modelled down to the oscillator. The digital parts are synthesizable RTL.
The current DACs, the post-filter and the current-controlled oscillator are behavioural
models that use `real` signals and delays. `dpll_cdr_top` places the two loops side by
side, each with its own ports.

## The PLL loop

```
            +-----+  UP/DN pulses                   3-level current (2I, I, 0)
 ref_clk -->| PFD |------------------------------------------------+
   +------->|     |--+                                             |
   |        +-----+  | DN                                          v
   |              +------+  early/late  +--------------+   +---------------+
   |              | BBPD |------------->| integral acc |-->| DSM -> IDAC   |---> +--------+
   |              +------+              |   14 bit     |   | -> RC filter  |     |  CCO   |--> clk_out
   |                                    +------+-------+   +---------------+     | (sum of|
   |                          +---------------+|                                 | three  |
   |                          | comparator +-K|<                                 | curr.) |
   |                          +-------+-------+   every 128 ref cycles           +---+----+
   |                                  v                                              |
   |                          +---------------+    +---------------+                 |
   |                          | double-int.   |--->| DSM -> CDAC   |---> coarse ---->|
   |                          | acc, 18 bit   |    | -> RC filter  |                 |
   |                          +---------------+    +---------------+                 |
   +------------------------------------ / N (4) <-----------------------------------+
```

### Proportional path: PFD straight into the oscillator

`pfd` is the classic three-state detector: two flops clocked by the reference and by
the feedback, and cleared together once both are set. The oscillator model reads UP and DN
as a three-level current. UP gives two units, the reset state one unit, and DN none, so the
net effect is ±1 unit around the nominal current. In frequency terms, the output speeds up
by `KP_FRAC` of the coarse frequency while UP is high, and slows by the same amount while DN
is high.

The phase correction in one reference cycle is proportional to the pulse width. The path
is therefore a linear proportional gain, with no resolution limit. `KP_FRAC = 0.157`
(2π/40) makes one cycle correct about 1/40·2π of the phase error. That puts the
bandwidth at F_REF/40, or about 16 MHz at a 625 MHz reference.

The step is relative to the coarse frequency. The bandwidth therefore follows the
reference frequency by itself: the oscillator's own current biases the proportional DAC.

### Integral path: one bit per cycle

`bbpd` decides at each reference edge whether the feedback is still behind. It samples the
PFD's DN flop. If DN is set, the feedback edge came first and the oscillator is too fast,
so the decision is DN. Otherwise it is UP. `lf_accum` adds ±1 to a 14-bit saturating
accumulator. Its top 13 bits go to a delta-sigma DAC.

The integral current is biased from the coarse current, so its tuning range is ±25% of the
coarse frequency at every setting. `FINE_RANGE = 0.25` sets this in the oscillator model.
As a result, the frequency step of one integral LSB also scales with frequency:
quantisation-error tracking.

### Double-integral path: re-centring with a dead zone

A single integral path would need both a wide range and a fine step. Instead, the
**double-integral** accumulator (18 bits, steps of 16) drives the coarse current. It does
not look at phase. Instead, `dz_comparator` looks at the integral accumulator:

* above +K (16), the coarse word steps up;
* below −K, it steps down;
* inside ±K, it holds.

It runs only once every 128 reference cycles. That is the delta-sigma clock (F_REF/4)
decimated by 32. The effect is that, in steady state, the coarse path carries the
frequency and the integral accumulator sits near mid-scale. The integral path keeps its
full ±25% available for tracking.

The dead zone stops the two integrators from chasing each other in a limit cycle. It works
because one coarse step is smaller than 2K integral steps.

In simulation at 625 MHz, the PLL behaves as follows:

* Frequency lock comes within the first 1024 cycles.
* The integral accumulator is back inside ±16 after about 180 k reference cycles.
* After a step to 581 MHz, it is back inside ±16 after about 120 k cycles.
* A step from reset to 250 MHz needs the coarse path to acquire. It settles after about
  800 k cycles.

The coarse word moves 16 LSB every 128 reference cycles. From its mid-scale reset value,
the ends of the range therefore take longest to reach: about 820 k cycles at 3.5 GHz
(875 MHz reference) and 1.07 M cycles at 0.7 GHz (175 MHz reference). A faster start-up
would need a larger `KC_STEP` during acquisition. This design does not do that.

### Delta-sigma DACs and the switched-RC filter

Each of the 13-bit words, integral and coarse, is cut to 4 bits by `dsm2_ef`. This is a
second-order error-feedback modulator with y = Q(x + 2e[n−1] − e[n−2]). It shapes the
truncation error by (1 − z⁻¹)², and needs only a shift and a subtract. The modulators run
at F_REF/4, using clock enables from `clk_enable_gen`.

`therm_dec` turns each 4-bit value into 15 unary cells. `current_dac_lpf` sums the cells
and filters them through a switched RC. At each DSM update, the capacitor is connected for
a fixed pulse T_D and moves by `1 − exp(−T_D/RC)` of the way to the new DAC value. The
oversampling ratio 2π·RC/T_D (32 here) therefore stays the same at every reference
frequency. The filter corner follows the DSM clock, and so does the loop.

One limit of the modulator: the quantiser is clamped to 0..15. Inputs below about 1/16 or
above 13/16 of full scale therefore lose the exact second-order shaping. The average stays
right, but it becomes coarser at the rails.

### Oscillator model

`cco_model` is a behavioural ring oscillator. Its frequency is:

    f = f_coarse · (1 + FINE_RANGE·(2·fine − 1) + KP_FRAC·(pos − neg))

where `f_coarse` spans 0.6–3.6 GHz with the coarse input. It integrates phase exactly: when
an input changes in the middle of a half period, the part already elapsed is kept and the
rest continues at the new frequency. Proportional pulses only a few picoseconds wide
therefore move the phase by the right amount.

## The CDR loop

```
 din --+--> Hogge PD --DE/DR--> 3-level current ---------------------------+
       |                                                                   v
       +--> Alexander PD --E/L--> half-rate decimator --> accumulator --> DSM --> DAC --> CCO --> clk
       |        |                                                                   ^
       |        +--> retimed data (dout)                                            |
 1 MHz ref ---------------------> FLL (counter + successive approximation) --> DSM --> DAC
```

### Start-up: the FLL

`fll` counts oscillator cycles over one 1 MHz reference period and compares the count with
`TARGET` (2500 for 2.5 Gb/s). It sets the 14-bit coarse word by successive approximation:

1. Each bit gets one reference period to settle and one to be measured.
2. It starts at the MSB. The bit is kept if the count stays below `TARGET`.
3. After 14 bits, which takes about 29 µs, the FLL raises `fll_done`.

At that point the oscillator is within one LSB of the target: 2.500000 GHz in simulation,
well inside ±0.1%. Until `fll_done`, the Hogge pulses are gated off and the integral
accumulator is held. The FLL word then stays fixed.

### Proportional path: Hogge detector

`hogge_pd` retimes the data twice:

* `q1` on the rising edge;
* `q2` on the falling edge.

Its two pulses are:

* `DE = din ⊕ q1`, which runs from the data transition to the next rising edge. Its width
  therefore measures the phase.
* `DR = q1 ⊕ q2`, which is always half a clock period.

The difference DE − DR drives the oscillator's three-level current. Because DR appears only
on transitions, the average correction does not depend on how many transitions there are.
The gain is set by the DAC current, not by the input jitter. That is what keeps the CDR's
bandwidth near 4 MHz whatever the jitter. `KP_FRAC = 0.02` gives that bandwidth at 50%
transition density.

### Integral path: Alexander detector and decimator

`alexander_pd` samples the data at each rising edge (the bit centre) and at each falling
edge (the expected transition). From three consecutive samples it reports:

* **late** if the edge sample already equals the new bit;
* **early** if it still equals the old bit;
* **nothing** if there was no transition.

The rising-edge sample is the retimed data.

`cdr_decimator` collects the decisions of both edges of a half-rate clock, adds them with
a 2-bit adder, and passes on only the sign. This halves the rate at which the accumulator
and its delta-sigma modulators are clocked.

The 18-bit accumulator uses only its top 14 bits. Dropping the low bits keeps the dither
that the decimator's extra latency causes out of the DAC word.

Near lock, the bang-bang detector has a dead band: its output is zero when the phase error
is smaller than the sampler uncertainty. The linear Hogge path still has gain there. It
keeps driving the phase to zero, so the dead band causes no phase wander.

## Synthesizable cores and models

| module | kind | role |
|---|---|---|
| `dpll_digital` | RTL | PFD, bang-bang PD, both accumulators, comparator, enables, two DSMs, two thermometer decoders |
| `cdr_digital` | RTL | FLL, Hogge and Alexander detectors, decimator, accumulator, two DSMs and decoders, half-rate clock |
| `pfd`, `bbpd`, `lf_accum`, `dz_comparator`, `clk_enable_gen`, `dsm2_ef`, `therm_dec`, `feedback_divider`, `fll`, `hogge_pd`, `alexander_pd`, `cdr_decimator` | RTL | building blocks |
| `current_dac_lpf` | behavioural model | 15-cell current DAC and switched-RC filter |
| `cco_model` | behavioural model | current-summing oscillator, used by both loops |
| `dpll`, `cdr`, `dpll_cdr_top` | closed-loop models | cores plus models |

`clk_pkg` holds the shared 2-bit decision type `corr_t` (NONE/UP/DN) and the DAC size.

The following are not modelled, because they are circuits rather than logic:

* the sense-amplifier flip-flops (their logic function is a D flop);
* the front-end samplers;
* the oscillator output buffer.

## Where this design makes its own choices

These points are not fixed by the circuit description the design follows. Each was chosen
here:

* **What the bang-bang PD samples.** It samples the PFD's DN flop at the reference edge.
  A plain sample of the feedback clock carries no frequency information, and the loop did
  not acquire with it.
* **Double-integral rate.** The description gives "decimated by 32" and "F_REF/128".
  Both hold if the divide-by-32 is applied to the DSM clock (F_REF/4). That is how it is
  built.
* **Loop gains.**
  * Integral and coarse steps of 1 and 16 LSB.
  * Dead zone K = 16.
  * `KP_FRAC` values derived from the stated bandwidths.
  * Switched-RC with OSR 32.
* **The FLL search method.** Successive approximation, one bit per two reference periods.
* **Hand-over in the CDR.** The integral and proportional paths are held off until the
  FLL is done.
* **Reset.** All registers reset asynchronously (active low). Accumulators reset to
  mid-scale.
* **Oscillator ranges.** They are slightly wider than the intended operating ranges, so
  that those ranges sit inside them.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=… failures=…`. Build one with Verilator 5 like this:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -y rtl \
    rtl/clk_pkg.sv tb/tb_dpll_cdr_top.sv --top-module tb_dpll_cdr_top
./obj_dir/Vtb_dpll_cdr_top | grep TB_RESULT
```

`-y rtl` lets Verilator find each module in `rtl/<module>.sv`. Only the package has to be
named.

All files carry `timescale 1ps/1fs`. Asynchronous resets need a real falling edge of
`rst_n` in Verilator, so the testbenches start with `rst_n = 1` and pull it low at 10 ps.

| testbench | what it shows | run time |
|---|---|---|
| `tb_dpll_cdr_top` | Both loops at default parameters, together. PLL locks 2.5 GHz from 625 MHz, hands over to the coarse path, tracks a step to 581 MHz. CDR's FLL reaches 2.5 GHz, then 50 000 jittered PRBS-7 bits are retimed without error. Every detector output and comparator decision is counted. | ~1 min |
| `tb_dpll` | PLL from reset at 625 MHz and at 250 MHz (coarse acquisition): exact N·F_REF, integral back in the dead zone, short PFD pulses. | ~20 s |
| `tb_cdr` | CDR alone, PRBS-7 with ±20 ps edge jitter. | ~30 s |
| `tb_dpll_jtran` | PLL jitter transfer at 625 MHz: reference phase-modulated at 1.95, 15.6 and 78 MHz, transferred amplitude measured by correlation. | ~10 s |
| `tb_dpll_range` | PLL at both ends of its range: 3.5 GHz from 875 MHz and 0.7 GHz from 175 MHz, each from reset. | ~50 s |
| `tb_cdr_range` | CDR at 0.5 Gb/s and 3.2 Gb/s (FLL target 500 and 3200), PRBS-7 with ±5% UI jitter. | ~75 s |
| `tb_dpll_digital`, `tb_cdr_digital` | Cores open loop: rates, gating, directions of the paths. | seconds |
| others | Each building block against independently computed values. | seconds |

## How far the models go

The simulations show that the loops work:

* lock and hand-over at the documented operating points;
* exact frequency multiplication;
* error-free retiming of jittered PRBS-7 data.

The following were not simulated, or cannot be shown with these models:

* **Operation between the range ends.** The PLL was run at 0.7, 1.0, 2.33, 2.5 and
  3.5 GHz. The CDR was run at 0.5, 2.5 and 3.2 Gb/s; rates other than 2.5 Gb/s need
  `TARGET` set to the rate divided by 1 MHz. Points between these were not run.
* **The CDR's jitter transfer.** Its bandwidth is set by derivation only. The PLL's was
  measured by phase-modulating the reference (`tb_dpll_jtran`). The transfer was:
  * 1.10 at 1.95 MHz;
  * 0.66 at 15.6 MHz;
  * 0.19 at 78 MHz.

  That places the −3 dB point near 14–16 MHz, close to the intended 16 MHz.
* **Long PRBS patterns and very low bit-error rates.** Nothing in the logic limits the
  run of identical bits: without transitions the detectors simply make no correction.
  But only PRBS-7 was simulated.
* **Jitter, phase noise and power.** Device noise, supply effects and power are outside
  what the models represent.

## Tool messages that remain

* `pfd`: the clear of both flops is formed from their own outputs. This combinational
  loop through asynchronous clears is how a three-state PFD works, and it is intended.
* `cco_model`: Verilator notes that a delay computed at run time might be zero. The delay
  is always positive.
* `cdr_digital`: two observation outputs of its sub-blocks (the FLL cycle count and the
  Hogge first flop) are not used in the core and are reported as unused.
* `clk_pkg`: `DAC_CELLS` is reported as unused by the modules that do not need it.
