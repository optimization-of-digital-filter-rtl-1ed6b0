# A time-shared IIR filter engine for evaluating filter candidates

An optimiser that searches for a good IIR filter produces thousands of candidate
coefficient sets, and each one has to be simulated before it can be scored. This
RTL is the simulation side of that loop, moved into hardware. A host streams one
candidate at a time. The engine applies the candidate to a fixed pseudo-random
test sequence of 2048 samples and streams back the 2048 filtered samples, which
the host then scores (for example from their spectrum).

The main idea is that one hardware biquad, a second-order IIR section, is reused
for every section of the candidate. A candidate of up to 20th order is written
as a gain g and up to ten second-order sections (SOS):

    H(z) = g * prod_{k=0..9} (b0k + b1k z^-1 + b2k z^-2) / (1 + a1k z^-1 + a2k z^-2)

For each test sample, the engine walks the single biquad through stages 0..9,
taking 8 clocks per stage. That makes a fixed **80-clock frame per test
sample**, whatever the candidate's order. Each stage's state and coefficients
live in small RAMs addressed by the stage number. Sections the candidate does
not use are idled.

The architecture follows the System Generator design in G. Liang's 2007 thesis,
*Optimization of Digital Filter Design Using Hardware Accelerated Simulation*:
- the six-module partition;
- the frame format;
- the 8-step biquad schedule;
- the number formats;
- the LFSR;
- the sizes.

This is an independent SystemVerilog implementation of that design. Where the
thesis does not pin the behaviour down, the choices made here are listed under
[Departures and own choices](#departures-and-own-choices).

## Structure

```
 coef_in ──► init_ctrl ──coef_out, coef_feed_en──────────────────► biquad ──dout──┐
  (host)     │  frame parser, UID filter, 50x32 coef cache          ▲  ▲  ▲        │
             │  g multiplier (test sample * g)                      │  │  │        │
             │ mod_num   coef_ini          data_out (x*g)           │  │  │        │
             ▼           │                      │                   │  │  │        │
          bypass ◄───────┼── addr_creator       ▼                   │  │  │        │
   (stage used?)──mod_bypass─┼──────────► biquad_io_ctrl ──din──────┘  │  │        │
                         │   │ mod_address,    ▲  in_sel/out_sel       │  │        │
                         │   │ step_ctrl ──────┼───────────────────────┴──┘        │
                         │   └─────────────────┘                                   │
                         ▼                      ◄──── biquad_fb ───────────────────┘
                    datagen_out ◄── result (fix_34_29) from biquad_io_ctrl
       LFSR test data ──► init_ctrl;   2048x34 output cache ──► data_out, out_en, out_end
```

| Module | Role |
|---|---|
| `iir_accel_top` | Wires the six blocks together. Its ports are `clk`, `rst`, `coef_in[31:0]`, `data_out[33:0]`, `out_en` and `out_end`. |
| `init_ctrl` | Parses the candidate frame, ignores a repeated UID, caches the 50 coefficients with the padding words dropped, and streams them to the biquad. It also multiplies each test sample by g. |
| `datagen_out` | Holds the run control. It contains the 32-bit LFSR test generator (`lfsr32`) and the 2048×34 result cache that drives the outputs. |
| `addr_creator` | Contains the stage counter (0..9) and the step counter (0..7). It produces the RAM address, the step, and the "take the test sample" and "capture the result" strobes. |
| `bypass` | Compares the stage number with the section count. |
| `biquad_io_ctrl` | Picks the biquad input: the test sample in stage 0, otherwise its own last output. It also captures the final result and re-times it to a fixed point of the frame. |
| `biquad` | One Direct Form I section with ten RAMs: five for state and five for coefficients. It has 4-clock multipliers and a two-level adder tree (`adder_tree`). |
| `iir_pkg` | Holds the shared types, formats and sizes. |

## The candidate frame

The host sends one 32-bit word per clock on `coef_in`. A frame is 84 words long:

| Word | Content |
|---|---|
| 0 | start flag `0xAAAAAAAA` |
| 1 | UID of the candidate |
| 2 | number of sections, as an integer in the low 4 bits |
| 3 | gain g, fix_32_29 |
| 4 + 8k .. 8 + 8k | b0 b1 b2 a1 a2 of section k, fix_32_29 (k = 0..9) |
| 9 + 8k .. 11 + 8k | three padding words, ignored |

All ten slots are always sent. Slots beyond the section count should hold zeros,
but they are never used in any case.

The padding exists because the biquad consumes one coefficient per clock during
the first five steps of each 8-step stage. With padding, the slot stream can be
fed through the cache straight into the biquad's coefficient RAMs, at the same
pace as the stage sequencing.

Words that arrive while the parser is hunting for a flag are ignored, so the
host may idle with any data that is not the flag. Some frames are ignored
entirely:
- A frame whose UID equals the currently loaded candidate's is skipped, and the
  running response continues undisturbed.
- A flag that arrives while a frame is still being cached is ignored.

A new frame with a new UID can arrive at any time, including in the middle of a
response. It restarts the engine cleanly.

The section count saturates: a count of 10 or more behaves as 10 sections. A
count of 0 is not meaningful.

## The 80-clock frame: stages and steps

Everything in the engine is paced by the two counters of `addr_creator`:

```
clock   0 ..  7 |  8 .. 15 | ... | 72 .. 79 |  0 ..  7 (next sample)
stage   0       |  1       | ... |  9       |  0
step    0..7    |  0..7    | ... |  0..7    |  0..7
```

The stages run as follows:
- **Stage 0.** The biquad input is the new test sample, already multiplied by g
  (`in_address` high).
- **Stages 1..9.** The input is the output of the previous stage.
- **Unused stages** (stage ≥ section count). `mod_bypass` is low. The biquad
  writes no state and its pipelines hold, so those sections stay at rest.
- **Result capture.** The result of the last used section is captured in step 0
  of stage `mod_num` (`out_address`). At that point the biquad output still
  shows the y(n) that section has just written. For a 10-section candidate,
  stage `mod_num` is stage 0 of the next frame, so the capture falls into the
  next sample's frame.

Because the capture time depends on the section count, `biquad_io_ctrl` holds
the captured value in a register. It copies that register to its output at one
fixed point, the end of step 1 of stage 0. Every candidate therefore produces
results with the same timing.

## Inside the biquad

The biquad computes

    y(n) = b0 x(n) + b1 x(n-1) + b2 x(n-2) - a1 y(n-1) - a2 y(n-2)

It keeps the five state words of each stage in five status RAMs named after the
coefficient they meet: b0 holds x(n), b1 holds x(n-1), b2 holds x(n-2), a1 holds
y(n-1) and a2 holds y(n-2). All ten RAMs are read at the current stage address.
One stage takes eight steps:

| Step | Action |
|---|---|
| 0 | `din` (the stage input x(n)) is written into status RAM b0. All RAMs are read. |
| 1 | The RAM outputs are valid, and the five multiplications start. Each takes 4 clocks. |
| 2 | The taps shift: b1 ← x(n), b2 ← old x(n-1), a2 ← old y(n-1). |
| 5 | The five products are valid. The adder tree takes 2 clocks. |
| 7 | y(n) is written into status RAM a1. |

The RAMs read in write-first mode. So in step 0 of the next stage, the a1 RAM
output, which is `dout`, already shows the y(n) just written. That is exactly
what the next stage needs as its input.

The shift in step 2 reads the words of the current stage before the step-7 write
changes them. It therefore moves the old values one tap along, and after eight
clocks every delay line of that section has advanced by one sample.

Coefficients load while `coef_feed_en` is high, which lasts for one 80-clock
frame. In step k of each stage (k = 0..4), the word on `coef_in` goes into
coefficient RAM k of that stage. During the same frame, every stage's state is
cleared, so a new candidate starts from rest.

The adder tree (`adder_tree`) works in two levels. First it registers
(in1+in2), (in3+in4) and a delayed in5. Then it adds those three. The two
feedback products enter it negated.

## Number formats

| Signal | Format | How it is formed |
|---|---|---|
| coefficients, g, test samples | fix_32_29 (range ±4) | from the host or the LFSR |
| test sample × g | fix_64_58 | full-precision product, 6-clock multiplier |
| biquad input | fix_64_56 | the value above with 2 fraction bits truncated |
| products | fix_64_56 | 96-bit product with 29 fraction bits truncated |
| adder tree output | fix_67_56 | full precision |
| stored y(n) | fix_64_56 | the sum with its top 3 bits dropped (wraps) |
| result | fix_34_29 | y with 27 fraction bits truncated (wraps beyond ±16) |

Truncation always rounds toward −∞. Overflow wraps rather than saturating. The
8 integer bits of fix_64_56 leave ample headroom for stable filters driven by
the ±4 test data. A candidate whose intermediate signals exceed about ±128
wraps, and its response is garbage. Whether that happens depends on the overall
response, and also on how the host pairs poles with zeros and orders the
sections (see [Verification](#verification)).

## Timing and throughput

All of the following are measured from the clock `t0` in which the start flag is
on `coef_in`:

- **t0+3.** `coef_ini` pulses. This restarts the stage and step counters and the
  data generator.
- **t0+5 .. t0+84.** Coefficients and state clearing run (`coef_feed_en`).
- **Frames.** Frame m+1 presents test vector m (an LFSR word). Frame m+2
  filters it, after the 6-clock g multiplier. The result reaches the output
  cache at the end of frame m+3.
- **Output.** `out_en` is high for one clock per result, on the first clock
  after frame m+3. For vector 0 that is **t0+324**, and after that every 80
  clocks. `data_out` is zero except when `out_en` is high.
- **End of response.** `out_end` rises together with the last (2048th) result
  and stays high until the next candidate is loaded.

One candidate therefore takes about (2048 + 4) × 80 ≈ 164,000 clocks from flag
to last result.

The LFSR restarts from the same seed for every candidate, so every candidate
sees exactly the same test sequence. The generator is a 32-bit XNOR LFSR with
taps 32, 22, 2 and 1. Stage i is bit i-1, and the feedback enters bit 0. The
seed is 0.

## Departures and own choices

The points below are where this RTL either fills a gap in the original
description or deliberately differs from it.

- **Single clock.** The original is a two-rate design: the test-data rate is
  1/80 of the clock, with up- and down-samplers between the rates. Here
  everything runs on one clock. The slow rate is a once-per-frame strobe.
- **Output re-timing.** The original aligns results through fixed delay lines
  and an 80× down-sampler. Here one register is loaded at a fixed point of
  stage 0, derived from the rising edge of `in_sel`. The outcome is the same:
  identical output timing for every section count.
- **Sign of the feedback terms.** The original's adder tree shows only adders.
  Here the a1 and a2 products are subtracted, so the frame carries the
  coefficients of the usual denominator 1 + a1 z^-1 + a2 z^-2.
- **Product width.** The original states full-precision arithmetic but draws
  the multipliers with fix_64_56 outputs. The drawn format is used, and the
  products are truncated.
- **Section-count word.** It is read as a plain integer, because a fix_32_29
  value cannot hold 10.
- **Comparison direction of the bypass.** This RTL uses "stage used when
  section count > stage". The original's prose states the comparison the other
  way round.
- **Result strobe for 10 sections.** The original's pseudocode would never flag
  the result of a 10-section candidate. The capture at stage 0 used here follows
  the original's block structure.
- **State clearing.** It is done for all ten stages while coefficients load.
  The original only warns that stale state disturbs the next candidate.
- **Write-first RAM mode and reset.** The RAMs use write-first mode, and the
  control logic has a synchronous active-high reset. The original specifies
  neither.
- **The `END` input of `init_ctrl`.** The original names it without saying what
  it does. Here it zeroes the g-scaled test data after the run.
- **Outputs.** `out_end` is brought out as a port. Each result is written into
  the output cache at its vector's index. It leaves the cache through the
  write-first read port in that same clock, with `out_en`, and is not replayed.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/iir_tb_pkg.sv`, a sample-by-sample reference model that runs the whole
cascade with the same fixed-point rules. It has none of the time-sharing, so it
does not share the RTL's schedule.

| Testbench | What it covers |
|---|---|
| `tb_iir_accel_top` | Five frames at full size (2048 vectors): a 10-section candidate; the same UID again, which must be ignored; a 3-section FIR interrupted after 100 results by a candidate with section count 12; and a 1-section candidate. Every result is checked bit for bit. It also checks the 324-clock latency and the 80-clock spacing. Each mechanism (repeat ignored, reload, mid-run restart, over-range count, padding, bypass, 10-section capture) is counted and must occur. |
| `tb_workload_filters` | Classic designs computed in the testbench: a 14th-order Butterworth high-pass (cutoff 0.5), an 18th-order Butterworth low-pass (cutoff 0.6), a 6th-order Chebyshev I band-pass (0.4–0.6, 0.5 dB ripple), and a 10th-order elliptic band-stop (0.3–0.5, 0.5 dB ripple, 40 dB attenuation). The last two are also run with 6 and 10 as prototype orders, which gives 6 and 10 sections. It checks bit-exact agreement and also the difference to a floating-point model. |
| `tb_workload_candidates` | 100 random Butterworth low-pass candidates back to back, as in the evaluation loop. |
| `tb_biquad`, `tb_init_ctrl`, `tb_datagen_out`, `tb_addr_creator`, `tb_biquad_io_ctrl`, `tb_bypass`, `tb_adder_tree`, `tb_lfsr32` | Each block in isolation. `tb_datagen_out` shortens the run to 40 vectors. The others use the default sizes. |

In `tb_workload_filters`, the hardware results differ from floating-point
filtering with unquantised coefficients by:

| Filter | Sections | Max difference | Mean difference |
|---|---|---|---|
| Butterworth HP, 14th order | 7 | 2.32e-5 | 6.8e-6 |
| Butterworth LP, 18th order | 9 | 2.49e-5 | 6.2e-6 |
| Chebyshev BP, 6th order | 3 | 3.5e-7 | 9.9e-8 |
| Elliptic BS, 10th order | 5 | 5.2e-8 | 1.2e-8 |
| Chebyshev BP, 12th order (prototype 6) | 6 | 3.1e-5 | 7.2e-6 |
| Elliptic BS, 20th order (prototype 10) | 10 | 3.1e-7 | 6.3e-8 |

For the two Butterworth filters, these match the numbers reported for the
original hardware closely: about 2.4e-5 maximum and 6.5e-6 mean. For the
Chebyshev and elliptic filters, the original's ripple, attenuation and section
ordering are not known, so their numbers are not directly comparable. The
original reports 8.1e-8 and 4.6e-6 as the maximum differences.

The 20th-order elliptic filter also shows how section pairing matters. With
poles and zeros simply paired in order of angle, one intermediate signal
reached about 180. That wraps in fix_64_56, and the output was garbage, even
though it still matched the fixed-point model bit for bit. Pairing each
high-Q pole with its nearest zero, and ordering the sections by pole radius,
keeps every intermediate signal below 6. A host should build its sections in
the same way.

`tb_workload_candidates` runs the evaluation loop itself. It sends 100 random
Butterworth low-pass candidates back to back, each with an order of 2 to 18 and
a cutoff of 0.2 to 0.8, and every run lasts 164,084 clocks.
- All results are bit-exact.
- All results are within one output LSB of floating-point filtering with the
  same quantised coefficients.
- The timing is identical for every section count.

The candidate run exposes one real limit of the formats: g itself is a fix_32_29
number. A narrow, high-order low-pass can have g below 1e-6. Such a g is
represented only to within a few percent, and the whole response scales by
that error: up to 1.5 % among these candidates. A host that needs better than
that should pre-scale the section numerators instead of relying on g.

The testbenches have also been run against deliberately broken copies of each
module, and every one of them then reports failures.

## Simulating

Verilator 5 with `--timing` is enough. From the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/iir_pkg.sv tb/iir_tb_pkg.sv tb/iir_design_pkg.sv \
    $(ls rtl/*.sv | grep -v iir_pkg) tb/tb_iir_accel_top.sv \
    --top-module tb_iir_accel_top
./obj_dir/Vtb_iir_accel_top
```

To run another testbench, replace `tb_iir_accel_top` with its name. Each
testbench finishes in about a second, except `tb_workload_candidates`, which
takes about 15 seconds. The packages must come first on the command line.
`tb/iir_design_pkg.sv` is only needed by the two workload testbenches.

To change the engine, start with the sizes in `rtl/iir_pkg.sv`:
- `MAX_SOS`, `MOD_DELAY` and `N_VECTORS`. The frame length is
  MAX_SOS × MOD_DELAY.
- The formats.
- `START_FLAG`.

`iir_accel_top` takes `N_VEC` as a parameter.

The schedule inside `biquad` assumes 8 steps with `MULT_LAT` = 4 and a 2-clock
adder tree. If you change the latencies, re-check its step comparisons. The
`datagen_out` parameter `RES_LAT` (2 frames) must match the data path of the
top.

## Size

A generic Yosys synthesis of `iir_accel_top` gives about 670 flip-flop bits and
81.5 kbit of memory:
- 2048 × 34 bits of output cache;
- 50 × 32 bits of coefficient cache;
- the biquad's ten stage RAMs: 5 × 10 × 64 bits of state and 5 × 10 × 32 bits of
  coefficients.

There are six multipliers: five 64×32-bit ones in the biquad and one 32×32-bit
one for g.
