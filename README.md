# MRMDF FFT: a four-path 64/128-point FFT/IFFT for one to four MIMO streams

A MIMO-OFDM receiver such as IEEE 802.11n has up to four antennas. Each one
delivers one OFDM symbol every 4 us, and each symbol needs a 64-point (20 MHz
channel) or 128-point (40 MHz channel) FFT. Four separate pipelined FFTs would
work, but they multiply the cost. This design instead runs the four streams
through one pipeline four samples wide. The pipeline is a *mixed-radix
multi-path delay-feedback* (MRMDF) pipeline. It combines two ideas:

* **Multi-path.** Four lanes carry four samples per clock, as in a
  multi-path delay commutator (MDC) FFT.
* **Delay feedback.** Each butterfly stores its first operand and its
  difference output in one shared delay line, as in a single-path delay
  feedback (SDF) FFT. This keeps storage to the minimum of N words per
  stream.

The trick that makes this cheap is the **input reorder** (Module 1). After it,
each clock cycle carries four *consecutive* samples of *one* stream, and the
streams take turns. From then on, four streams look like one stream processed
four samples at a time. Because of this order, the four lanes never need the
same non-trivial twiddle factor in the same cycle. So the 64-point twiddle
multiplication can use one shared bank of constant multipliers instead of four
general complex multipliers.

The 128-point transform is split as `n = 64*n1 + n2`, `k = k1 + 2*k2`:

    X(2k2 + k1) = sum_{n2=0..63} { sum_{n1=0..1} x(64n1+n2) (-1)^(n1 k1) } W128^(n2 k1) W64^(n2 k2)

This gives a radix-2 stage (Module 2), the twiddle `W128^(n2 k1)`, and a 64-point
FFT (Modules 3 and 4). The 64-point FFT is itself split into two radix-2^3
(8-point) DFTs with a `W64` twiddle between them. In 64-point mode Module 2 is
skipped. The IFFT conjugates the input and the output and divides by N.

```
 in_data ─►[conj if IFFT]─► Module 1 ─┬─► Module 2 ─┐
                            reorder   │  radix-2,   ├─►mode MUX─► Module 3 ─► Module 4 ─►[conj, >>log2N if IFFT]─► reg ─► out
                                      │  256-word   │             4 x BU_8 +   8-point
                                      │  memory     │             modified     across lanes
                                      └─────────────┘             multiplier
```

## Data order and time labels

Everything in the pipeline is driven by one counter. `c1` counts accepted
input samples modulo 128. Each module gets the **time label** of the data at
its input. That label is `c1` minus the latency of everything before it. The
bits of a label say exactly which sample a lane holds, so every mux select
and twiddle index is a slice of a label. This is the key to reading the RTL.

### Module 1 (`module1_reorder`)

The input lanes hold streams A, B, C, D, all at sample `n`. The module works
in three steps:

1. Lane `i` is delayed by `i`.
2. A 4x4 rotating switch sends input lane `(t - p) mod 4` to output lane `p`.
3. Lane `p` is delayed by `3 - p`.

The result, three cycles later:

```
lane 0: A0 B0 C0 D0 A4 B4 C4 D4 ...
lane 1: A1 B1 C1 D1 A5 B5 C5 D5 ...
lane 2: A2 B2 C2 D2 A6 ...
lane 3: A3 B3 C3 D3 A7 ...
```

After it, label `u` has these fields: `u[1:0]` is the stream and `u[6:2]` is
the group `m`. Lane `p` holds sample `n = 4m + p`. This module holds 12 words
of delay.

### Module 2 (`module2_r2`): radix-2 stage with scheduled multipliers

In this order, `x(n2)` and `x(n2+64)` of the same stream sit on the same lane
64 cycles apart. The memory holds 64 x 4 complex words (256). It is read and
written at address `u[5:0]` every cycle, so it acts as a 64-cycle delay
feedback line. Its use depends on label bit `u[6]`:

| `u[6]` | memory read gives | module output | memory write |
|---|---|---|---|
| 0 (first half) | `Y` of the previous frame | `Y`, lanes 2 and 3 multiplied by their twiddle | incoming `x(n2)` |
| 1 (second half) | stored `x(n2)` | `X = x(n2) + x(n2+64)` | `Y = x(n2) - x(n2+64)`, lanes 0 and 1 multiplied by their twiddle first |

A four-lane radix-2 stage would normally need four complex multipliers, each
busy only half the time. Here two multipliers serve lanes 0 and 1 on the way
into the memory and lanes 2 and 3 on the way out, so they are busy every
cycle. The twiddle of lane `p` in group `m` is `W128^(4m+p)`. Each multiplier
has a 32-entry ROM.

The output is a continuous series of 64-point frames. The label is `v = u - 64`,
and `v[6] = k1` tells which half (sums or twiddled differences) a frame is.

### Module 3 (`module3_r2x3`): four BU_8 lanes and the modified multiplier

Module 3 sees a 64-point frame with label `w = {a, b, c, n2, s}`. Lane `p`
holds sample `32a + 16b + 8c + 4n2 + p` of stream `s`. Each lane (`bu8_sdf`) is
a three-stage SDF pipeline with delays 32, 16 and 8. The stages pair samples
on `a`, `b` and `c` in turn. Between the stages sit the trivial factors of the
radix-2^3 algorithm:

* after stage 1: `-j` when `k0 = 1` and `b = 1`;
* after stage 2: `W8^(c(k0 + 2k1))`, which is 1, W8^1, -j or W8^3.

`W8^1` and `W8^3` take one add/subtract pair and two multiplications by
`1/sqrt2`. After 56 cycles the label is `{k0, k1, k2, n2, s}`. The four lanes
then need `W64^((4n2 + p) k')`, where `k' = k0 + 2k1 + 4k2`, so the exponents
run from 0 to 49.

**Modified complex multiplier (`mod_cmult`).** Any `W64^e` is `(-j)^q` times
one of two forms:

* `cos a_i - j sin a_i`, or
* `sin a_i - j cos a_i` (real and imaginary parts swapped),

where `a_i = 2*pi*i/64`, `i = 0..8` and `e = 16q + r`. If `r <= 8` then `i = r`
and there is no swap; otherwise `i = 16 - r` with the swap.

The hardware works like this:

* **Constant bank.** Units for `i = 1..8` each form `v*cos a_i` and
  `v*sin a_i`. There are two banks, one for the real and one for the
  imaginary parts.
* **Input mux.** Each lane is steered to the unit of its constant.
* **Output mux.** The four products are brought back to the lane.
* **Per-lane stage.** Sign and swap, two adders, one rounding, then the
  `(-j)^q` rotation.

Thanks to the Module 1 order, the only constant two lanes ever need at the
same time is `i = 4`. This happens when `k' = 4`: the exponents are 0, 4, 8
and 12. So the bank has a second constant-4 unit. The `conflict` output flags
any other collision, and an assertion in Module 3 checks it on every clock.

### Module 4 (`module4_r2x3`): the last 8-point DFT, across lanes

The last 8-point DFT runs over `n_lo = 4n2 + 2p1 + p0`. Here `n2` is a time
bit, four cycles apart, and `p1 p0` is the lane number. It has three stages:

1. A BU_2 per lane with a 4-word delay feedback, then `-j` on lanes 2 and 3
   when `k0 = 1`.
2. Combinational butterflies on lane pairs (0,2) and (1,3), then `W8^k0` on
   lane 1 and `W8^(k0+2)` on lane 3.
3. Butterflies on lane pairs (0,1) and (2,3).

### Output order

Results come out in the pipeline's order, not in natural order. Each
`out_valid` cycle gives four bins of stream `out_stream`, and `out_bin[q]`
says which bin lane `q` holds. The bin is built from the output label
`o = c1 - latency` and the lane `q`:

    k'  = o[5] + 2*o[4] + 4*o[3]
    k'' = o[2] + 2*q[1] + 4*q[0]
    64-point:  k = k' + 8*k''
    128-point: k = 2*(k' + 8*k'') + o[6]        (all even bins first, then odd)

No reorder buffer is included. A consumer that needs natural order can write
by `out_bin`.

## Interface and timing (`mrmdf_fft`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of the counters and `out_valid` |
| `mode128` | in | 1: 128-point, 0: 64-point (Module 2 bypassed and held) |
| `ifft` | in | 1: inverse transform |
| `num_streams` | in | 1..4 active streams; lanes of inactive streams are computed but never flagged valid |
| `in_valid` | in | one sample of every stream is on `in_data` |
| `in_data[4]` | in | lane `s` = stream `s`, 12-bit two's complement real and imaginary parts |
| `out_valid` | out | `out_data` holds four results of an active stream |
| `out_stream` | out | stream of those results |
| `out_bin[4]` | out | bin index of each lane (sample index for an IFFT) |
| `out_data[4]` | out | 20-bit real and imaginary parts |

* **Throughput.** Four samples per clock: one sample of every stream per
  `in_valid` cycle, so a 128-point symbol of four streams takes 128 cycles.
* **Stalls.** The whole pipeline advances only on `in_valid` cycles. Gaps,
  such as a removed guard interval, simply stall it.
* **Framing.** The first valid sample after reset is sample 0 of a frame, and
  frames follow without gaps in the sample count.
* **Latency.** 63 (64-point) or 127 (128-point) accepted samples. The output
  register loads on the enabled cycle that carries the result, so the result
  of sample 0 is visible after 64 or 128 samples have been taken.
* **Flushing.** The pipeline only moves when samples are pushed. To get the
  last symbol's results out, push one more frame (zeros will do).
* **Configuration.** `mode128`, `ifft` and `num_streams` must not change
  while frames are in flight. Change them, then reset.
* **Reset.** Hold `rst_n` low over at least one rising clock edge. In a
  two-state simulator a reset that is already low at time zero produces no
  edge, so `out_valid` is only cleared by that first clock edge.

## Number format

The architecture does not fix the word lengths. These are the choices made
here, all in `fft_pkg`:

* **Input.** 12-bit input words are sign-extended to a 20-bit datapath word.
* **No scaling.** No stage scales its output. 20 bits hold the worst-case
  growth of a 128-point transform of full-scale 12-bit complex input:
  `128 * 2047 * sqrt2 < 2^19`.
* **Twiddles.** Twiddle factors are Q1.14 in 16 bits. Every multiplication
  rounds once, to nearest.
* **IFFT scaling.** The IFFT's division by N is an arithmetic right shift by
  6 or 7 of the conjugated result, which rounds towards minus infinity.

Measured accuracy against a double-precision DFT, with random full-scale
input: about 10 LSB of 20-bit output error at worst for the FFT (mostly from
the Q1.14 rounding of the twiddles), and under 3 LSB for the IFFT. The
testbenches allow 20 and 3.

## What the hardware costs

For a 128-point transform:

* **Delay storage.** 12 words in Module 1, 256 in Module 2, 224 in Module 3 (4 x (32 + 16 + 8)) and 16 in Module 4: **508 complex
  words**.
* **Multipliers.** Two general complex multipliers, plus one shared
  constant-multiplier bank for the 64-point twiddles.
* **Adders.** 24 BU_2 butterflies, which are **48 complex adders and
  subtractors**.

The delay lines are plain register arrays, and the Module 2 memory is an array
with a combinational read. A real implementation would map them to
register-file or SRAM macros. No macro is modelled here.

## Where this RTL departs from or adds to the architecture

* **Interface.** Word lengths, the stall/enable scheme, reset, framing, the
  output tags (`out_stream`, `out_bin`) and the static configuration are this
  design's own. So is the absence of an output reorder buffer.
* **Factor placement.** The placement of the trivial factors inside the
  radix-2^3 stages, and the lane pairing in Module 4, are derived here from
  the algorithm. The architecture only names the factor set (1, -j, W8^1,
  W8^3).
* **Constant units.** They are written as multiplications by constants.
  Synthesis reduces these to shifts and adds. No hand-optimised adder trees
  are given.
* **Inactive streams.** Their lanes are still computed, just marked invalid.
  No clock gating or operand isolation is done for fewer than four streams.
* **Twiddle ROMs.** They are filled at elaboration from `cos`/`sin`.
* **Test module not included.** The chip this architecture was built for also
  had a test module that fed the core from a few pins. It is not included: its
  interface is unknown. The core's parallel input ports stand in its place.

## Files

`rtl/`:

* `fft_pkg.sv`: formats, complex arithmetic, trivial-twiddle and twiddle-table
  functions.
* `mrmdf_fft.sv`: top level: conjugation, the mode mux, output scaling,
  counters and tags.
* `module1_reorder.sv`: the input reorder.
* `module2_r2.sv`: the radix-2 stage with its memory and two multipliers.
* `module3_r2x3.sv`: four `bu8_sdf` lanes and `mod_cmult`.
* `bu8_sdf.sv`: one lane of the 8-point DFT, built from `sdf_stage` and `bu2`.
* `mod_cmult.sv`: the shared constant-bank multiplier.
* `module4_r2x3.sv`: the last 8-point DFT, across the lanes.
* `sdf_stage.sv`: one delay-feedback radix-2 stage.
* `bu2.sv`: the butterfly.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus:

* `tb_mrmdf_fft.sv` runs the whole processor at its default size. It covers
  128 and 64 points, FFT and IFFT, one to four streams, random stalls and
  full-scale input (including the largest possible DC bin). It
  checks every output against a floating-point DFT, checks that each bin
  appears exactly once per frame, and checks the latency.
* `tb_wl_80211n.sv` runs back-to-back 802.11n symbols at a 40 MHz clock, with
  the 32-cycle guard interval as stall cycles. It checks that each symbol
  finishes exactly one 160-cycle symbol period after the previous one.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fft_pkg.sv tb/tb_mrmdf_fft.sv --top tb_mrmdf_fft -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_mrmdf_fft` with its name.
`-Irtl` lets Verilator find each module in `rtl/<name>.sv`. Every testbench
finishes in well under a second.

To change the word lengths, edit `IN_W`, `DW`, `CW` and `FRAC` in `fft_pkg`.
Keep `DW >= IN_W + 8` so that a 128-point transform of full-scale input
cannot overflow, and `CW >= FRAC + 2` so that the coefficient 1.0 fits. All
coefficients, including 1/sqrt2, are computed from `FRAC` at elaboration.
