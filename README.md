# On-chip gain-step and output-swing test for an automatic gain control amplifier

An automatic gain control (AGC) amplifier with a 5-bit digital gain set has 32
gain configurations. The conventional production test measures the gain in
every one of them with a sine input and an off-chip FFT, which is slow. This
design replaces that test with a small, purely digital circuit placed next to
the AGC and its 6-bit flash ADC. The circuit checks the gain steps on chip:

* A **DC level** is applied to the AGC input. The circuit steps the gain set
  from low to high, one step per sample window. For each gain set it sums
  2^N ADC codes, which averages out noise. Each new sum must exceed the
  previous sum plus a threshold J. A missing or too-small gain step, which is
  how a defect in the switched feedback network shows itself, fails that
  comparison.
* For a **ramp test**, the gain set is held and a slow ramp is applied to the
  input. The circuit counts the time slots in which the ADC output moved by at
  least J. That count, times J, is a measure of the output voltage swing
  (OVS) of the AGC.

The result of either test is a 5-bit **signature** L: the number of
comparisons that passed. The tester only has to set a few parameters, start
the run, and read L (or a single pass/fail bit) through a scan chain. No
analogue measurement is needed. At 64 codes per sample, the gain-step test
takes 32 × 64 = 2048 ADC clocks plus two clocks of pipeline.

The RTL is written in synthesizable SystemVerilog. The AGC and the ADC are
behavioural models, so that the whole test can be simulated end to end.

## Block structure

```
              in1/in2, vref                           test_mode
                  |                                       |
             +----v-----+   out    +-----------+  D<5:0>  |
  s_agc ---->| agc_model|--------->|flash_adc_ |-------+--|-----------> adc_code
   ^         | (decoder)|          |  model    |       |  |            (to control loop)
   |         +----------+          +-----------+       |  |
   |                                                   v  v
   |   +------------------- agc_partial_bist --------------------------------+
   |   |  sample_div --first/last--> sampling_circuitry --F<11:0>-->          |
   |   |                              (6-bit adder, 6-bit buffer,            |
   |   |                               6-bit carry counter)                  |
   |   |  test_evaluation: BUF1 (G) -> BUF2 (H), K = H + J, G >?< K, count L |
   +---|- gainset_incr: S = S0, S0+GI, S0+2GI, ...                            |
   mux |  test_control: run, step, load, eval, done, stop, pass/fail        |
       |  bist_scan_chain: configuration (N, GI, S0, J, MinMax, ...) in,     |
       |                   results (L, G, H, S, flags) out                    |
       +---------------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `agc_bist_top` | AGC model, ADC model, BIST, and the multiplexer that gives the gain set to the BIST in test mode |
| `agc_partial_bist` | the complete test circuit |
| `sample_div` | window counter: marks the first and last clock of every window of 2^N codes |
| `sampling_circuitry` | sums 2^N six-bit codes into a 12-bit sample F |
| `test_evaluation` | sample buffers G and H, threshold adder, comparator, signature counter L |
| `gainset_incr` | gain-set counter, adds GI per window |
| `test_control` | run sequencer, early stop on failure, pass/fail window |
| `bist_scan_chain` | serial configuration and result register |
| `gain_decoder` | 5-bit gain set to 32 tap selects (inside the AGC) |
| `agc_model`, `flash_adc_model` | behavioural analogue models; voltages are integers in µV |
| `bist_pkg` | widths and the packed configuration and result types |

## The sampling circuitry: a 12-bit sum from a 6-bit adder

Only a 6-bit adder is used. The adder adds the ADC code D to a 6-bit buffer
that holds the low half of the running sum. Each adder carry advances a
separate 6-bit counter, which therefore holds the high half. The pair
{counter, buffer} is the exact sum of up to 64 codes (at most 64 × 63 = 4032).
On the first clock of a window the adder's second input reads zero and the
counter clears. The new window therefore starts with the first code and no
clock is lost. N is clamped to the range 1 to 6.

## How one run is sequenced

Clock numbers are counted from the clock edge that takes `start` (edge 0).
The run has W windows of 2^N clocks each.

| Edge | Event |
|---|---|
| 0 | `clr`: the sum, G, H and L are emptied; S is loaded with S0; `run` rises |
| 1 … W·2^N | one ADC code is added per edge |
| k·2^N (end of window k) | S steps by GI, except after the last window |
| k·2^N + 1 | `load`: G takes the finished sum, H takes the old G |
| k·2^N + 2 | `eval`, from the second window on: if the comparison passes, L = L + 1 |
| W·2^N + 2 | `done` rises (it is visible after this edge) |

The gain set changes on the same edge that closes a window. The ADC model is
combinational, so the first code of the next window already belongs to the
new gain set. A real converter with latency would need the window start
delayed by that latency.

The comparison is strict. With `minmax` = 1 a step passes when G > H + J,
which is the minimum-step test. With `minmax` = 0 a step passes when
G < H + J, which is the maximum-step test. The adder keeps its carry, so
H + J is never truncated.

The first window only primes H, so W windows give at most W − 1 passes.
Examples:

* 32 gain sets with GI = 1 give at most L = 31.
* The two GI = 2 runs (0, 2, …, 30 and 1, 3, …, 31) have 16 windows each and
  give L = 15 each.

With `stop_on_fail` set, the first failing comparison ends the run
immediately. G and H then still hold the two samples of the failing step and
can be read out for diagnosis. `test_pass` is high when the run finished
without such a stop and lmin ≤ L ≤ lmax.

## Choosing N, J and GI

J is compared with a sum of 2^N codes. A threshold of "x LSB average
increase" is therefore J = x · 2^N.

* Because the comparison is strict, J = 2^N − 1 demands an average increase
  of at least one code per step.
* Noise spreads the sums. With 64 codes and noise of about ¾ LSB, a threshold
  of about 0.8 LSB (J = 50) is a workable value.
* If one gain step moves the AGC output by less than an ADC LSB, use GI = 2
  with two runs (S0 = 0 and S0 = 1). Another remedy is to lower the AGC
  reference, so that the 32 gain sets spread over most of the ADC range.
* Ramp test: use GI = 0 and S0 = 31. Pick the ramp so that it starts and ends
  outside the ADC range. If the ramp crosses the range in s slots, the ideal
  per-slot difference is 64/s LSB. Thresholds of 6, 3 and 1 LSB for 8, 16 and
  32 slots are reasonable, with L = s − 1 or s as the passing values.
* Reading the ramp signature:
  * L = 0: the output is stuck, or outside the ADC range.
  * L too low: the output covers only part of the range, or the gain is too
    high.
  * L too high: the gain is too low.

## Configuration and result: the scan chain

The chain has 78 bits: the 41-bit configuration `cfg_t` above the 37-bit
result `res_t`. With `scan_en` high it shifts by one bit per clock, from
`scan_in` towards `scan_out` (chain bit 0), so all bits leave and enter least
significant bit first. To load a configuration C, shift in the 78-bit word
{C, 37'b0} LSB first. A `capture` pulse with `scan_en` low copies the live
result into the lower 37 bits. The result then comes out first on the next
shift.

The configuration drives the circuit directly. Do not shift while a run is
in progress.

| cfg_t bits | Field | Meaning |
|---|---|---|
| 40:36 | lmax | highest passing L |
| 35:31 | lmin | lowest passing L |
| 30 | stop_on_fail | end the run at the first failing step |
| 29:24 | nwin | windows per run; 0 or more than 32 means 32 |
| 23 | minmax | 1: G > H + J, 0: G < H + J |
| 22:11 | thr | threshold J (the 12-bit threshold register) |
| 10:6 | s0 | first gain set |
| 5:3 | gi | gain-set increase per window; 0 holds S |
| 2:0 | n | 2^N codes per window, clamped to 1…6 |

| res_t bits | Field |
|---|---|
| 36:25 | h: previous sample |
| 24:13 | g: newest sample |
| 12:8 | s: gain set |
| 7 | pass |
| 6 | stopped |
| 5 | done |
| 4:0 | l: signature |

`done`, `test_pass` and `l` are also available as ports. `start` is honoured
only when no run is in progress. At the top it is also ignored when
`test_mode` is low.

## Behavioural AGC and ADC

`agc_model` has the following parts:

* an input multiplexer (`in1`, `in2`, `sel`);
* a non-inverting stage about `vref`, whose gain comes from the decoded gain
  set: gain = (G0_MILLI + tap · GSTEP_MILLI) / 1000, by default 1.0 + 0.1 · S;
* a high-pass filter. With `hpb` = 1 the filter is disabled and the signal
  passes. With the filter active, a DC input yields `vref`;
* a level-shifting output stage.

An optional output offset is a parameter. `flash_adc_model` is an ideal
6-bit quantiser between its two references. Both models are combinational
integer arithmetic. They are stand-ins for the analogue circuits, not
descriptions of them.

The testbenches use:

* an ADC range of 0.5 V to 1.9 V (LSB 21.9 mV);
* vref = 111 mV and a DC input of 540 mV. The AGC output then runs from
  about 0.54 V at S = 0 to 1.87 V at S = 31, about 43 mV per step.

## Relation to the original design, and what is this design's own

The following follow the published structure:

* the cells and their widths: 6-bit adder, buffer and carry counter; 12-bit
  sample buffers, adder, register and comparator; 5-bit signature counter and
  gain set; 3-bit N and GI;
* their wiring;
* the MinMax selection;
* the use of a scan chain for parameters and result;
* the test procedures and their test times.

The following are choices of this design:

* **Synchronous pipeline.** Delay elements on the clock and strobe lines of
  the original are replaced by one clock and a two-stage strobe pipeline. A
  run is therefore 2 clocks longer than 2^N × windows.
* **Signature range.** Only comparisons between two real samples count. A
  full 32-gain-set run gives at most 31. The original text speaks of a
  signature of 32 for 32 gain sets, which a 5-bit counter cannot hold, and
  of 15 for a 16-gain-set run. The second statement is the one followed.
* **N up to 6.** The original gives 1 ≤ N ≤ 5 for the exponent, but uses
  64-code samples throughout, so 6 is accepted.
* **Added configuration fields.** S0, nwin, stop_on_fail, lmin/lmax, and
  GI = 0 for the ramp test are additions. They are what the described test
  procedures need: a second run starting at gain set 1, a limited number of
  time slots, stopping at the first failure, a pass/fail bit, and a constant
  gain set.
* **Test control.** The whole test control sequencer is this design's own;
  the original only names the block.
* **Gain-set multiplexer.** The multiplexer between the control loop's gain
  set and the BIST's is assumed.
* **Gain decoder.** The decoder is one-hot.
* **Threshold adder.** The threshold adder keeps its carry.
* **Converter width.** The converter is 6 bits wide, as used by the test
  circuit. One block diagram of the AGC shows 8 bits.

Not built:

* the AGC's digital control loop, whose algorithm is not given. Its gain set
  enters as `s_loop` and it reads `adc_code`;
* a standard test access port to reach the scan chain. The serial pins are
  ports of the top;
* a programmable ADC sampling rate;
* any on-chip computation of OVS = L · J, which is left to the tester;
* a 32-slot ramp test that starts and ends outside the ADC range. That would
  need more than 32 windows.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=… failures=…`
and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/bist_pkg.sv tb/tb_agc_bist_top.sv --top-module tb_agc_bist_top -o sim
./obj_dir/sim
```

Replace `tb_agc_bist_top` with any other testbench in `tb/`:

* `tb_agc_bist_top` runs the complete design at its default sizes, in
  test mode and in normal mode. Its runs are:
  * the minimum- and maximum-step tests;
  * both GI = 2 runs;
  * an offset that pushes the low gain sets out of the ADC range (the
    signature drops);
  * noise with J = 50;
  * an early stop with G/H read-out;
  * ramp tests over 8 and 16 slots (L = 7 and 15).

  It checks every ADC code, every gain set, every signature, and every run
  length against its own arithmetic.
* `tb_test_workloads` runs the evaluation scenarios on the complete design:
  * 15 mV gain steps, where GI = 1 misses steps (L = 22) and both GI = 2
    runs give L = 15;
  * 16, 32 and 64 codes per sample with a one-LSB threshold (L = 31);
  * 15 mV noise with J = 50 (L = 31);
  * ramps over 8 and 16 slots.
* `tb_agc_partial_bist` drives codes directly, as random staircases with
  missing steps. It checks random configurations, including the 2048- and
  1024-clock runs.
* One testbench per cell: `tb_sample_div`, `tb_sampling_circuitry`,
  `tb_test_evaluation`, `tb_gainset_incr`, `tb_test_control`,
  `tb_bist_scan_chain`, `tb_gain_decoder`, `tb_agc_model` and
  `tb_flash_adc_model`.

All simulations finish in seconds.

To change a width, edit `bist_pkg`. The modules take their widths from it,
and the scan-chain layout follows the packed structs.
