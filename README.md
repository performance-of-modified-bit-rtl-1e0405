# 16-point radix-4 pipelined FFT with single-path delay commutators and multiplierless twiddles

This is a streaming 16-point FFT for OFDM-style receivers. It takes one
complex sample per clock and returns one frequency bin per clock, with no
gaps between frames. It uses a radix-4 decimation-in-frequency algorithm, so
16 points need only two butterfly stages. Each stage is a *single-path delay
commutator* (SDC): the samples travel on one path, and a small set of delay
registers turns that serial stream into the four operands a radix-4 butterfly
needs. The twiddle factors between the two stages are applied without a
multiplier or a coefficient ROM. Each factor is a few shifts and
additions/subtractions. The 1/sqrt(2) factor uses a *modified bit parallel
multiplier* (MBPM) with only three shifters and two adders.

```
 real_in/imag_in ──► stage 1 (R4SDC, span 4) ──► twiddle ×W16^(n·k) ──► stage 2 (R4SDC, span 1) ──► real_out/imag_out
                     commutator → butterfly      shift/add, MBPM 0.707     commutator → butterfly       out_bin, out_valid
```

## The algorithm in two stages

For a frame x[0..15], stage 1 forms, for every n = 0..3 and k1 = 0..3,

    y[k1][n] = ( x[n] + (-j)^k1 x[n+4] + (-j)^2k1 x[n+8] + (-j)^3k1 x[n+12] ) · W16^(n·k1)

with W16 = exp(-j·2π/16). Stage 2 then takes, for each k1, the 4-point DFT of
y[k1][0..3] over n. Its output k2 is bin X[4·k2 + k1]. Only seven twiddle
exponents occur, n·k1 ∈ {0, 1, 2, 3, 4, 6, 9}. Of these, W^0 = 1 and
W^4 = -j cost nothing, and the factor is 1 for every k1 = 0 sample, so one
sample in four passes through unrotated.

## How a single-path delay commutator stage works

This is the core of the design (`delay_commutator`, `r4_butterfly`,
`r4sdc_stage`). A stage with span L (4 in stage 1, 1 in stage 2) reads its
input in blocks of 4L samples and splits each block into four quarters.
Butterfly n of a block needs x[n], x[n+L], x[n+2L] and x[n+3L], one sample
from each quarter.

* **Delay line (3L samples).** While the fourth quarter streams in, the taps
  at delays 3L, 2L and L, together with the live input, hold exactly the four
  operands of butterfly n. Here n is the position inside the quarter.
* **Direct path, k = 0.** During that fourth quarter the butterfly forms output
  k = 0 directly from the taps.
* **Hold registers (4 × L samples).** At the same time the four operands are
  copied into four circulating registers. In quarters 0, 1 and 2 of the next
  block, each register turns once per quarter and offers the same operands
  again for outputs k = 1, 2 and 3.
* **Programmable butterfly.** It computes one of the four outputs per clock,
  selected by k. The adders are therefore busy on every clock, and the stage
  keeps the rate of one sample in and one out. It uses three complex
  add/subtract steps and no multiplier:
  `p = a0 ± a2`, `r = a1 ± a3` (subtract when k is odd), then `p + r`,
  `p − j·r`, `p − r` or `p + j·r` for k = 0, 1, 2, 3. Multiplying by ±j only
  swaps the real and imaginary parts and flips an adder between adding and
  subtracting. Every adder is a carry-select adder (`csla`, 4-bit blocks).

Outputs leave in the order k·L + n, one per accepted input. That is exactly
the grouping the next stage reads. For stage 1 (L = 4) the schedule of one
block is:

| input quarter | samples accepted | butterfly output formed          | operands from   |
|---------------|------------------|----------------------------------|-----------------|
| 3 of block b  | x[12..15]        | k = 0, n = 0..3 of block b       | delay-line taps |
| 0 of block b+1| x'[0..3]         | k = 1, n = 0..3 of block b       | hold registers  |
| 1 of block b+1| x'[4..7]         | k = 2, n = 0..3 of block b       | hold registers  |
| 2 of block b+1| x'[8..11]        | k = 3, n = 0..3 of block b       | hold registers  |

A stage holds 7L samples. For the whole FFT that is 28 + 7 = 35 complex
words. Published R4SDC variants with merged delay commutators get down to
2N − 2 = 30 words. That merged form is not implemented here.

## Twiddle factors without a multiplier

`twiddle_mult` rotates each stage-1 output a + jb by W16^e, with e = n·k1:

| e | factor             | computed as                         |
|---|--------------------|-------------------------------------|
| 0 | 1                  | (a, b)                              |
| 4 | −j                 | (b, −a)                             |
| 2 | 0.707·(1 − j)      | (M(a+b), M(b−a))                    |
| 6 | −0.707·(1 + j)     | (M(b−a), −M(a+b)), i.e. −j·W^2      |
| 1 | C − jS             | (C·a + S·b, C·b − S·a)              |
| 3 | S − jC             | (S·a + C·b, S·b − C·a)              |
| 9 | −(C − jS)          | negated e = 1 result                |

**M is the modified bit parallel multiplier** (`mbpm_0707`). It feeds x
through three right shifters in a chain, >>1, >>1 and >>2, which gives x/2,
x/4 and x/16. One adder sums the first two, and a second adder subtracts the
third:

    M(x) = x/2 + x/4 − x/16 = 0.6875 · x

That is 0.707 approximated by −2.8 %, which buys a multiplier of only three
shifters and two adders. The exact coefficient needs more terms: the series
2^-1 + 2^-3 + 2^-4 + 2^-6 + 2^-8 + 2^-14 (four adders and more), or the
factored form 1 + (1 + 2^-2)(2^-6 − 2^-2) = 0.70703 (three adders). To trade
area for accuracy, change `mbpm_0707` to one of those. No other file depends
on how it is built.

**C = cos(π/8) and S = sin(π/8)** use this design's own shift/add
approximations:

    C ≈ 1 − 2^-4 − 2^-6 + 2^-9 = 0.923828   (exact 0.923880)
    S ≈ 2^-2 + 2^-3 + 2^-7     = 0.382813   (exact 0.382683)

All shifts are arithmetic and round toward minus infinity. No fraction bits
are kept: stage outputs are integers.

## Numbers, widths and accuracy

* Input: `DATA_W`-bit two's-complement integers (default 16).
* The butterflies add two bits each, and the twiddle rotation adds one, since
  a rotation can grow a component by up to √2. So the widths are 16 → 18
  → 19 → 21 bits. The output is the **unscaled** DFT sum, `DATA_W + 5` bits,
  and cannot overflow even for full-scale inputs. (The testbench checks
  frames at ±2^15.)
* Error against the exact DFT: about 3 % of the summed input magnitude. Most
  of it comes from the 0.6875 coefficient, plus a few LSBs from truncation.

Example: the ramp x[i] = i + j·i, which has been used to show this
architecture in simulation before:

| bin | this design | exact DFT        |  | bin | this design | exact DFT        |
|-----|-------------|------------------|--|-----|-------------|------------------|
| 0   | 120 + 120j  | 120 + 120j       |  | 8   | −8 − 8j     | −8 − 8j          |
| 1   | −49 + 33j   | −48.2 + 32.2j    |  | 9   | −5 − 11j    | −6.4 − 9.6j      |
| 2   | −27 + 11j   | −27.3 + 11.3j    |  | 10  | −5 − 11j    | −4.7 − 11.3j     |
| 3   | −19 + 3j    | −20.0 + 4.0j     |  | 11  | −3 − 13j    | −2.7 − 13.3j     |
| 4   | −16 + 0j    | −16 + 0j         |  | 12  | 0 − 16j     | 0 − 16j          |
| 5   | −13 − 3j    | −13.3 − 2.7j     |  | 13  | 3 − 19j     | 4.0 − 20.0j      |
| 6   | −11 − 5j    | −11.3 − 4.7j     |  | 14  | 11 − 27j    | 11.3 − 27.3j     |
| 7   | −11 − 5j    | −9.6 − 6.4j      |  | 15  | 33 − 49j    | 32.2 − 48.2j     |

An earlier published simulation of this architecture gave
−47 + 31j, −28 + 12j, −9 − 7j, … for the same frame. Every bin of this design
is within ±2 of those published values, and the end-to-end testbench checks
this.

## Interface and timing (`r4sdc_fft16`)

| port                    | dir | width      | meaning                                        |
|-------------------------|-----|------------|------------------------------------------------|
| `clk`                   | in  | 1          | clock, all flops on the rising edge            |
| `rst_n`                 | in  | 1          | synchronous reset, active low                  |
| `in_valid`              | in  | 1          | a sample is present; the pipeline advances     |
| `real_in`, `imag_in`    | in  | DATA_W     | time sample                                    |
| `out_valid`             | out | 1          | a new bin is on the output this cycle          |
| `real_out`, `imag_out`  | out | DATA_W+5   | frequency bin, unscaled                        |
| `out_bin`               | out | 4          | index k of that bin                            |

* **Framing.** After reset, the accepted samples form frames 0, 1, 2, … of 16
  samples each, back to back. There is no frame-start input.
* **Data-driven pipeline.** `in_valid` is the clock enable of the whole
  pipeline. On a cycle with `in_valid` low nothing moves and no bin is
  emitted. The last frame's bins therefore come out only while further
  samples are fed in: feed the next frame, or zeros, to flush.
* **Latency.** Bin slot 0 of a frame appears right after the clock that
  accepts the 17th sample after that frame's first one (sample 17 of the
  stream for frame 0). In general, 17 accepted samples
  (`r4sdc_pkg::LATENCY` = 3·4 + 1 + 1 + 3·1). With `in_valid` held high, one
  bin leaves per clock.
* **Output order.** The bins leave in radix-4 digit-reversed order:
  0, 4, 8, 12, 1, 5, 9, 13, 2, 6, 10, 14, 3, 7, 11, 15. `out_bin` gives the
  index. Add a 16-word reorder buffer if natural order is needed.

## Where this implementation makes its own choices

The following parts come from the source design: the two-stage R4SDC
structure (commutator, multiplexer, adder/subtractor and twiddle multiplier
per stage), carry-select adders, a twiddle multiplier built from shifts and
adds with no ROM, and the three-shifter/two-adder 0.707 multiplier. Everything
below is this implementation's choice:

* word widths, unscaled integer arithmetic and truncating shifts;
* the data-driven `in_valid` handshake, `out_bin`, and the active-low
  synchronous reset;
* how the commutator is built (a delay line plus circulating hold registers,
  35 words), not the merged 2N − 2 form;
* the output order. The earlier published run showed bins in the order
  0, 8, 2, 10, 4, 12, 6, 14, 1, 9, 3, 11, 5, 13, 7, 15. This design emits the
  stages' natural digit-reversed order and labels each bin instead;
* the shift/add forms of cos(π/8) and sin(π/8), and W^6, W^9 derived from W^2,
  W^1;
* pipeline registers after each butterfly and after the twiddle rotation;
* no twiddle multiplier after stage 2: in the last stage of a 16-point FFT
  every twiddle factor is 1.

The reported FPGA figures for the original (Spartan-3, 38.2 MHz, 1037
slices, 1756 LUTs) were not reproduced. The carry-select adders and the
shift/add multipliers are there for speed and area, but this RTL has been
simulated and linted only, not timed.

## Files

| file | contents |
|------|----------|
| `rtl/r4sdc_pkg.sv` | sizes, latency, `twiddle_exp`, `slot_to_bin` |
| `rtl/r4sdc_fft16.sv` | top level: stage 1, twiddle, stage 2, output bin counter |
| `rtl/r4sdc_stage.sv` | one R4SDC stage: commutator + butterfly + register |
| `rtl/delay_commutator.sv` | delay line, hold registers, operand multiplexer, k/n sequencing |
| `rtl/r4_butterfly.sv` | programmable radix-4 butterfly |
| `rtl/csla.sv` | carry-select adder/subtractor |
| `rtl/twiddle_mult.sv` | multiplierless rotation by W16^(n·k) |
| `rtl/mbpm_0707.sv` | modified bit parallel multiplier, ×0.6875 ≈ ×0.707 |
| `tb/tb_ref_pkg.sv` | reference arithmetic (floor division, reference FFT, exact DFT) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog that counts a failure if the test hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/r4sdc_pkg.sv tb/tb_ref_pkg.sv tb/tb_r4sdc_fft16.sv --top-module tb_r4sdc_fft16
./obj_dir/Vtb_r4sdc_fft16
```

Replace the last file and the top module to run another testbench.
`tb_r4sdc_fft16` runs the top at its default parameters. It sends 40 frames
(the ramp, random frames, full-scale frames, and a stretch with random idle
cycles), then two zero frames to flush the pipeline. Each bin is checked bit
for bit against a reference FFT that rounds the way the hardware does, and
against the exact DFT within tolerance. The test also checks the bin labels,
the 17-sample latency and the rate of one bin per clock. It counts that every
mechanism occurred: idle cycles, the commutators' direct and hold paths in
both stages, and all seven twiddle exponents. The module testbenches check
the stage schedule (including latency 3L + 1), the commutator operands under
random stalls, the butterfly for all k at full scale, each twiddle exponent,
the MBPM exhaustively over 12-bit inputs, and the carry-select adder at two
widths.
