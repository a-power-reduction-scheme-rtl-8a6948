# Qubit-state estimation DSP with floating-point integration

Reading out a superconducting qubit means irradiating it with microwaves,
digitising the reflected wave, and deciding from that stream whether the
qubit was in |0> or |1>. This RTL is the digital part of such a read-out
chain, written with a cryogenic (4 K) implementation in mind, where every
milliwatt counts. The chain is: low-pass filtering, a two-level
accumulation, and a classifier.

The main idea is where the number format changes. A straightforward
implementation keeps everything as exact integers. The filter output is then
89 bits wide, the first accumulation (*sum*) gives 101 bits, and the second
(*integration*) 121 bits. Integration must keep one partial result per sum
section, over 1,000 of them, so a 121-bit-wide SRAM ends up dominating power
and area. This design converts each 101-bit sum to IEEE-754 single precision
*before* integration, and integrates with floating-point adders. The
integration SRAM word thus shrinks from 121 to 32 bits. The design this RTL
follows reports that this roughly halves power (-47.7 %) and area (-54.3 %),
with identical qubit-state decisions on random tests. Those figures come from
a 22 nm place-and-route, not from this RTL.

```
 adc_re/adc_im (16b)  ┌──────────────┐ 89b ┌─────┐ 101b ┌───────────┐ 32b ┌─────────────┐ 32b ┌────────────┐
 sum_sec, int_sec ───►│ lowpass_     ├────►│ sum ├─────►│ int2float ├────►│ integration ├────►│ classifier ├─► state
                      │ filters      │gates│unit │ tag  │  (I and Q)│ tag │ FP add+SRAM │     └────────────┘
                      └──────────────┘  │  └──▲──┘      └───────────┘     └─────────────┘
                                        └─►section_ctrl (strobes, SRAM word, first/last pass)
```

Each arrow carries both I and Q.

## Sum sections, integration sections and the SRAM word

This is the part most worth understanding before changing anything. The
samples are grouped by two gate signals that arrive with the samples, one
sample per clock:

* `int_sec`, the **integration section** gate, is high for a long window.
  An estimation is made of `n_pass` such windows, separated by gaps.
* `sum_sec`, the **sum section** gate, is high for short runs inside each
  integration section.

*Sum* adds all samples of one run (gates both high), in full precision. The
k-th run of an integration section belongs to SRAM word k. *Integration*
then adds the k-th sums of all `n_pass` integration sections together. The
result is one integrated complex value per word: up to 1024 words per
estimation.

```
int_sec  ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\___
sum_sec  ___/‾‾‾‾‾\__/‾‾‾‾‾\__/‾‾‾‾‾\_____/‾‾‾‾‾\__/‾‾‾‾‾\__/‾‾‾‾‾\___
             k=0      k=1      k=2          k=0      k=1      k=2
             pass 0: written to SRAM      pass 1 (last): added, put out
```

`section_ctrl` turns the gates into strobes and a tag for every sum:

* `sum_start` marks the first sample of a run.
* `sum_en` marks every sample of a run.
* `sum_emit` is raised on the clock after a run's last sample. A run
  therefore ends when `sum_sec` drops for at least one clock.
* The tag is `{addr, first, last}`. `addr` = k restarts at each rising edge
  of `int_sec`. `first`/`last` mark the first and last integration section of
  the estimation. The pass counter advances on each falling edge of `int_sec`
  and wraps after `n_pass` sections. `n_pass` = 0 acts as 1.

A `sum_sec` pulse outside an integration section is ignored. A run that is
still open when `int_sec` falls is tagged with the pass that is ending.

On the **first** pass integration writes the sum into word k as it is. Stale
contents from an earlier estimation never need clearing. On later passes it
reads word k, adds the sum and writes the result back. On the **last** pass
it also puts the result out (`int_valid`) and hands it to the classifier.

The gates pass through the filters beside the data (`side_in`/`side_out`),
so they mark the filtered samples exactly as they marked the raw ones.

## Number formats and their limits

| point                   | format                       | limit that follows                         |
|-------------------------|------------------------------|--------------------------------------------|
| A/D samples             | signed 16-bit I and Q        |                                            |
| after the filters       | signed 89-bit, exact         | 16 + 32 + 4 (stage 1), + 32 + 5 (stage 2)  |
| after sum               | signed 101-bit, exact        | at most 4096 samples per sum section       |
| after `int2float`       | IEEE-754 single              | rounded to nearest, ties to even           |
| integration, classifier | IEEE-754 single              | at most 2^20 passes (`n_pass` is 20 bits)  |

The floating-point units (`fp_add`, `fp_mul`) behave like a library unit
built without full IEEE compliance. Subnormal inputs read as zero, subnormal
results flush to zero, and an exponent of 255 is infinity. Overflow gives a
signed infinity, and inf-inf and 0*inf give the quiet NaN `7fc00000`.
Rounding is always to nearest, ties to even. Integer-valued sums never get
near the subnormal range, so flushing never affects the data path.

A 101-bit integer always fits the single-precision exponent range. The
largest is about 2^100, and single precision reaches 2^127. The conversion
can lose precision but never overflows.

## Blocks

| module            | role                                                                    | latency  |
|-------------------|-------------------------------------------------------------------------|----------|
| `qdsp_pkg`        | widths, `int_tag_t`, constants                                          |          |
| `fir_stage`       | direct-form FIR, real programmable coefficients on I and Q, exact       | 1        |
| `lowpass_filters` | two `fir_stage`s (16 taps, then 32 taps, 32-bit coefficients)           | 2        |
| `section_ctrl`    | gates → `sum_start`/`sum_en`/`sum_emit` and the sum tag                 | 0 (comb.)|
| `sum_unit`        | 101-bit accumulator per component, registered result with tag           | 1        |
| `int2float`       | 101-bit signed integer → single, RNE                                    | 1        |
| `fp_add`          | single-precision adder                                                  | comb.    |
| `fp_mul`          | single-precision multiplier (classifier only)                           | comb.    |
| `int_sram`        | 1024 × 32 array, synchronous read, read-before-write                    | 1 (read) |
| `integration`     | read-modify-write of one word per sum; two SRAMs and two adders (I, Q)  | 2        |
| `classifier`      | d = w_re·I + w_im·Q + bias in single precision; state = (d > 0)         | 1        |
| `qubit_dsp_top`   | the whole chain                                                         |          |

End to end: `int_valid` rises 7 clocks after the last sample of a sum section
(of the last pass) enters `adc_re`/`adc_im`. `state_valid` rises 8 clocks
after it. The chain accepts a sample every clock without stalls. Sums are at
least two clocks apart, because a run ends only when `sum_sec` drops.
`integration` on its own still accepts a sum every clock. When two sums in a
row go to the same word, a bypass register supplies the value just written.

### Top-level interface

* Stream, every clock: `adc_re`, `adc_im` (signed 16-bit), `sum_sec`,
  `int_sec`.
* Filter coefficients: set `coef_we`, `coef_stage` (0 = first stage,
  1 = second), `coef_idx` and `coef_data` (signed 32-bit). One coefficient is
  written per clock. All coefficients are zero after reset, so the filters
  pass nothing until they are loaded.
* Static configuration: `n_pass`, and the classifier's `w_re`, `w_im` and
  `bias` (single-precision bit patterns). Change them only between
  estimations.
* Results: `int_valid`/`int_re`/`int_im`/`int_addr`, and
  `state_valid`/`state`/`state_addr` (1 = |1>). There is one of each per SRAM
  word on the last pass.
* `rst_n` is an asynchronous, active-low reset. It clears every register
  except the SRAM contents.

## Departures from the source design, and how far to trust this RTL

What comes from the source design:

* the order of the processing steps;
* the data widths: 16, 89, 101 and 32 bits;
* conversion to single precision *before* integration;
* floating-point adders in integration, fed back through an SRAM of over
  1,000 words of 32 bits;
* the two-gate section timing.

This design's own choices, each made because the source does not give it:

* **Filters.** The source only gives the filter bank's input and output
  widths. Two cascaded FIR stages with real programmable coefficients were
  picked so that an exact result is exactly 89 bits wide. The real filter
  may differ in structure, e.g. complex coefficients or demodulation.
* **Classifier.** The source names it and says it takes single-precision
  input. The linear discriminator is a stand-in. Each SRAM word is
  classified on its own. How the words combine into one decision is not
  known.
* **Gates and configuration.** The section gates and all configuration are
  top-level inputs. The source mentions "parameter control circuits" without
  describing them.
* **Number formats and SRAM organisation.** The rounding mode and the
  handling of subnormals are not given. Neither is the SRAM port arrangement
  nor the use of one SRAM per component.
* **Timing.** All latencies, the bypass and the reset behaviour are not
  given.
* **Scope.** The analog front end (the A/D converter) is not included. The
  all-integer flow that serves as the comparison baseline (121-bit
  integration before the converter) is not included either.

The SRAM is a plain array. In silicon it would be a compiled macro with the
same one-read, one-write behaviour.

What has been verified: every module has a self-checking testbench against
an independent reference model.

* The floating-point references work in double precision and round once,
  using operand ranges for which the double is exact.
* The FP adder, FP multiplier and converter are checked on tens of thousands
  of random operands plus rounding ties, cancellation, overflow and
  underflow.
* The end-to-end test loads random coefficients and streams about 4,500
  random samples through four estimations. The last one uses all 1024 words.
  It checks every integration result and state bit-exactly, with its cycle.
* `tb_param_sets` repeats at small scale the accuracy experiment behind the
  design: 125 random parameter sets. Each set has full-range 32-bit
  coefficients, random section sizes, a random pass count and a random
  classifier, plus random full-scale input. Every result is checked
  bit-exactly. The testbench also models an all-integer flow: exact
  integration first, one conversion at the end. In a typical run, rounding
  changes about 60 % of the integrated values. The state
  decision still agrees with the all-integer flow in every word (1013 of
  1013).
* No comparison was made against the source design's own circuits, whose
  filter and classifier details are not available.

## Simulating

Every testbench in `tb/` prints `TB_RESULT checks=N failures=M` and stops
itself; a watchdog ends a stuck run. With Verilator 5, which finds the
modules a file uses in `rtl/` and `tb/` by name:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/qdsp_pkg.sv tb/tb_fp_pkg.sv tb/tb_qubit_dsp_top.sv \
  --top-module tb_qubit_dsp_top -o sim && ./obj_dir/sim
```

Substitute another testbench for a unit, or `tb_param_sets` for the
workload test: `tb_lowpass_filters`,
`tb_section_ctrl`, `tb_sum_unit`, `tb_int2float`, `tb_fp_add`, `tb_fp_mul`,
`tb_int_sram`, `tb_integration` or `tb_classifier`.

`tb_qubit_dsp_top` runs the top at its default size and takes well under a
minute. It also prints how often each mechanism occurred, and fails if one
never does:

* coefficient loads, in each stage;
* sums;
* converter rounding;
* first-pass writes;
* accumulations;
* last-pass outputs;
* both states;
* gates outside an integration section;
* a single-pass estimation.

To change sizes, edit `qdsp_pkg`. The filter widths are derived from the
tap counts and `COEF_W`; `FLT_W` and `SUM_W` must be kept consistent with
them. For the widths the rest of the chain uses, see the table above.
