# A triple-mode pipeline: 256-point FFT, IFFT and 8×8 2-D DCT on one datapath

An OFDM receiver (such as 802.16e WiMAX, which uses a 256-point FFT) and a
video codec (which uses the 8×8 2-D DCT) both need a fast transform. This
design runs both on one streaming pipeline. It takes one complex sample per
clock and returns one result per clock. It has three modes:

* **FFT**: a 256-point forward DFT.
* **IFFT**: a 256-point inverse DFT.
* **DCT**: two independent 8×8 2-D DCT-II blocks at once. One block rides in
  the real part of each input word and the other in the imaginary part.

The pipeline is a *radix-4² single-delay-feedback* (R4²SDF) design. The
256-point DFT is split into two radix-16 steps. Each radix-16 step is split
again into two radix-4 butterflies with a fixed "W16" rotation between them.
So there are four radix-4 butterfly stages, which need no multipliers
(rotations by ±1 and ±j are sign changes and swaps). Between them sit:

* two **constant multipliers** built from shifts and adds;
* one **general complex multiplier**, fed by a 32-word twiddle ROM.

The DCT is computed by the same stages. It reuses the fact that an 8×8 2-D
DCT is a 2-D DFT of a reordered block, followed by a rotation and a short
post-processing step.

```
             FFT/IFFT path (solid), DCT path (via the * units)

 din ─┬─────────────────────┐
      └─> *input reorder ───┴─> stage I ─> const mult I ─> stage II ──┐
                                  3x64        W16^(n2*k1)    3x16     │
      ┌───────────────────────────────────────────────────────────────┘
      ├─────────────────────────────> complex mult ─> stage III ─> const mult II ─┬─> stage IV ─> dout
      │                        ┌──>   W256^H           3x4          W16 / W8      │     3x1
      └─> (DCT) ─> stage III ──┘ (DCT: fed by the extra radix-2 stage) <──────────┤
                                                                                  └─> *radix-2 ─┘
                          DCT: complex mult output ─> *post computation ─> dout
```

The sketch is not exact. The precise wiring is in the muxes at the bottom of
`rtl/r42sdf_top.sv`:

| Unit input | FFT / IFFT | DCT |
|---|---|---|
| stage I | `din` | reorder buffer |
| complex multiplier | stage II | extra radix-2 stage |
| stage III | complex multiplier | stage II |
| output | stage IV | post computation |

## The radix-4² index map (FFT/IFFT)

Write the input index as n = 64·n1 + 16·n2 + 4·n3 + n4 and the output index as
k = k1 + 4·k2 + 16·k3 + 64·k4, with every digit in 0..3. The DFT kernel
W256^(nk) then factors into these pieces:

| Step | Unit | What it computes |
|---|---|---|
| 1 | stage I | radix-4 butterfly over n1 |
| 2 | const mult I | W16^(n2·k1) |
| 3 | stage II | radix-4 over n2 |
| 4 | complex mult | W256^(n3·(k1 + 4·k2)) |
| 5 | stage III | radix-4 over n3 |
| 6 | const mult II | W16^(n4·k3) |
| 7 | stage IV | radix-4 over n4 |

Steps 1–3 form a 16-point DFT. Step 4 is the only general twiddle. Steps 5–7
form a second 16-point DFT.

The result leaves in base-4 digit-reversed order. The pipeline does not
reorder it. Instead, `out_index` gives k for each output word:

```
out_index = {p[1:0], p[3:2], p[5:4], p[7:6]}    (p = output position)
```

The IFFT uses the same hardware with every rotation conjugated. The butterflies
use +j where the FFT uses -j. The constant and complex multipliers apply
W^(-m).

## One single-delay-feedback stage (`sdf_stage`)

A radix-4 SDF stage over a span of L words has three L-word shift registers.
The data chain runs din → c → b → a → dout. It works in four sub-periods of L
samples each (`sub = phase / L`):

* **Sub-periods 0, 1 and 2.** The incoming words are only shifted into the
  registers. At the same time the results held from the previous butterfly are
  shifted out.
* **Sub-period 3.** The butterfly fires. The register heads hold x0, x1 and x2,
  and `din` is x3. X0 goes straight out. X1, X2 and X3 are written back into
  registers a, b and c.

So each stage needs 3·L words and produces outputs in natural order within the
stage. The four stages use L = 64, 16, 4 and 1, which is 255 words in all.

In DCT mode, stages I–III use a shorter span LS = 32, 8 and 2:

* The shift registers are tapped at word LS-1.
* The words beyond the tap are not clocked (`short_len`). This is the power
  saving the architecture calls for.
* Stage I also switches to radix-2 (`radix2`). It then uses only register c,
  as a plain radix-2 SDF stage over a span of 32.

## Twiddles without a table per stage

**Constant multipliers (`const_mult`).** Every W16^m is a trivial rotation
(-j)^q times one of four cases, where m = 4q + r:

| r | Multiply by |
|---|---|
| 0 | 1 |
| 1 | A − jB |
| 2 | C − jC |
| 3 | B − jA |

Here A = cos(π/8), B = sin(π/8) and C = cos(π/4). The r = 3 case reuses the
r = 1 datapath by swapping the input parts and negating the imaginary result.
Only two real constant pairs are needed, (A, B) and (C, C). They are wired as
signed sums of powers of two:

| Constant | Shift-and-add form | Value |
|---|---|---|
| A | 1 − 2⁻⁴ − 2⁻⁷ − 2⁻⁸ − 2⁻⁹ | 0.92383 |
| B | 2⁻² + 2⁻³ + 2⁻⁷ + 2⁻¹² − 2⁻¹³ | 0.38293 |
| C | 2⁻¹ + 2⁻³ + 2⁻⁴ + 2⁻⁶ + 2⁻⁸ + 2⁻¹² | 0.70728 |

In DCT mode the same unit applies W8^m = W16^(2m).

**Complex multiplier (`complex_mult`, `twiddle_rom`).** W256^H for H in 0..255
comes from a 32-word ROM holding cos and sin of 2πs/256 for s = 0..32 (the
value at s = 32 is formed without a ROM word). With s = H mod 64:

* s ≤ 32: the ROM is read at s directly.
* s > 32: the ROM is read at 64 − s, and cos and sin are swapped.
* A final rotation by (-j)^(H/64) covers the other three quadrants.

That folding gives all 256 twiddles. The ROM contents are
round(2048·cos(2πs/256)) and round(2048·sin(2πs/256)), with 11 fractional
bits, written out as a `case` table.

The product uses three real multiplications instead of four:

```
t  = wr·(xr + xi)
re = t − xi·(wr + wi)
im = t + xr·(wi − wr)
```

## DCT mode

This is the least obvious part of the design. It takes four steps.

**1. Packing two blocks.** The 2-D DCT of a real block can be computed from
the 2-D DFT of a reordered copy of it. A real input wastes half a complex DFT,
so two real blocks are packed as y = y1 + j·y2. Pixel n of block 1 goes in the
real part and pixel n of block 2 in the imaginary part, both in raster order.
The two DCTs are separated again at the end.

**2. Reordering (`dct_reorder`).** Each dimension is permuted the same way:
even index 2i goes to position i, and odd index 2i+1 goes to position 7 − i.
For a row that gives

```
v = x0 x2 x4 x6 x7 x5 x3 x1
```

The unit is a single 64-word memory used in place. In every slot, the word
for the previous block is read out and the incoming word is written to the
same address.

For that to work, the address pattern changes from block to block. Block b
uses address inv^b(t) in slot t, with each 3-bit half of t passed b times
through the inverse map

```
inv(i) = 2i  (for i < 4)
inv(i) = 15 − 2i  (for i ≥ 4)
```

This permutation has order 4, so the block number mod 4 (bits 7:6 of the
counter) is all the state it needs. Latency is 65 samples.

**3. 8×8 2-D DFT on the FFT stages.** A 64-point linear position
p = 8·i1 + i2 can be split so that one 2-D 8×8 DFT runs on the existing
stages:

| Unit | Role in the 2-D DFT |
|---|---|
| stage I (radix-2, span 32) | splits i1 by its top bit |
| const mult I | applies W8^(n12·k12) |
| stage II (span 8) | radix-4 over the rest of i1, giving the 8-point column DFT |
| stage III (span 2) | radix-4 over the top of i2 |
| const mult II | applies W8^(e·k2') |
| extra radix-2 stage (`r2_bf`) | finishes the row DFT |

The extra radix-2 stage has a one-word feedback register. Stage IV is idle in
DCT mode.

After that, the complex multiplier applies the quarter-sample time shift
W256^(8·(k1 + k2)) = W32^(k1 + k2), giving Ys(k1, k2).

**4. Post computation (`dct_post`).** With Ys(8, k) = −j·Ys(0, k) (and the
same in the other index), the two DCTs are

```
X1(k1,k2) = ( Re Ys(k1,k2) − Re Ys(8−k1,8−k2) − Im Ys(8−k1,k2) − Im Ys(k1,8−k2) ) / 4
X2(k1,k2) = ( Im Ys(k1,k2) − Im Ys(8−k1,8−k2) + Re Ys(8−k1,k2) + Re Ys(k1,8−k2) ) / 4
```

Each output needs four words from anywhere in the block, so the unit stores a
whole block (2×64 words, double-buffered) and reads it in raster order. Output
word k = 8·k1 + k2 is the unnormalised DCT-II of each block, divided by 64:

```
X(k1,k2) = (1/64) · Σ x(n1,n2) · cos(π(2n1+1)k1/16) · cos(π(2n2+1)k2/16)
```

The usual c(k1)·c(k2)/4 normalisation is left to the user. Block 1 appears on
`dout.re` and block 2 on `dout.im`.

## Control and timing (`r42sdf_ctrl`)

There is no handshake beyond `in_valid`. The whole pipeline advances only on
an accepted sample. One 8-bit counter numbers the accepted samples. Every unit
sees `counter − offset`, where the offset is the number of samples in front of
it. From that position each unit derives its butterfly sub-period, its twiddle
exponent or its buffer address.

| Unit | FFT/IFFT offset | DCT offset |
|---|---|---|
| reorder buffer | — | 0 |
| stage I | 0 | 65 |
| const mult I | 193 | 98 |
| stage II | 194 | 99 |
| complex mult | 243 | 134 |
| stage III | 244 | 124 |
| const mult II | 257 | 131 |
| radix-2 | — | 132 |
| stage IV | 258 | — |
| post | — | 135 |
| output | **262** | **200** |

Other rules:

* **Latency.** An output for sample position p appears when sample p + latency
  is accepted. Because the pipeline stalls with `in_valid`, the last frame is
  flushed by the next frame's samples or by dummy samples.
* **Output valid.** `out_valid` rises once a full latency's worth of samples
  of the current mode has been accepted.
* **Mode switch.** When `mode` changes on an accepted sample, that sample
  starts frame 0 of the new mode. The counter and fill count restart, and
  whatever was in flight is discarded.
* **Reset.** `rst_n` is asynchronous and active low. It clears the counter,
  the fill count and the mode. The data registers are not reset: anything they
  hold before the pipeline has filled is never marked valid.
* **Mode encoding.** 0 = FFT, 1 = IFFT, 2 = DCT.

## Numbers

* **Word format.** Every internal word is 13-bit two's complement. A complex
  word is a packed struct `cplx_t` {re, im} of 26 bits.
* **FFT scaling.** Each radix-4 butterfly divides by 4, so the FFT output is
  DFT/256 and cannot overflow. The IFFT output is the exact inverse DFT.
* **Rounding.** All rounding is round-half-to-even, and all results saturate.
  Round-half-up was tried first. Over the many rounding points of the DCT path
  it left a mean error of +0.34 LSB. Rounding ties to even brings that to about
  0.002.

Measured against a double-precision model (`tb/tb_workload_accuracy.sv`):

| Test | Input | Result |
|---|---|---|
| FFT, 12 frames | full-scale random | SNR 52.0 dB, worst error 1 LSB |
| IFFT, 12 frames | full-scale random | SNR 50.2 dB, worst error 3 LSB |
| DCT, 500 blocks | pixels in [−128, 127], ×16 at the input | MSE 0.18, peak MSE 0.32, overall mean error 0.002, worst error 1 LSB (no error above 1) |
| DCT, 16 blocks | constant blocks | every AC coefficient exactly 0 |
| FFT, 4 frames per channel | QPSK OFDM symbol, inverse DFT, Gaussian channel noise at 20 / 40 / 60 dB | output SNR 19.9 / 38.8 / 41.9 dB against the sent symbols |

The last row shows where 13 bits stop being enough. Up to a 40 dB channel
the output SNR follows the channel, within about 1 dB. Beyond that it levels
off near 42 dB, set by the datapath's own rounding.

## Where this RTL departs from the published architecture

* **Input reordering.** The original folds the DCT input reordering into stage
  I's shift registers. It uses a segmented register with a swapping and a
  storage segment and a set of dedicated switch settings. This RTL uses a
  separate 64-word in-place buffer, and stage I runs a plain radix-2 pass. The
  result is the same, at the cost of 64 extra words.
* **Post computation.** The original does this around stage IV, with an
  8-word register whose order is flipped for the pairs that arrive the wrong
  way round. This RTL stores a whole block (2×64 words) instead, and stage IV
  is idle in DCT mode.
* **Power saving.** Only what the clock enable gives: unused shift-register
  words in DCT mode simply do not shift. There is no clock gating cell.
* **Output order.** The FFT output is not put back in natural order; use
  `out_index`.
* **Own choices.** The handshake, the mode encoding, the restart-on-switch
  rule, reset, rounding and saturation are this design's own choices.
* **Frame rate.** For DCT video, the original quotes 505 and 1042 thousand
  frames/s (176×144 and 128×96) at 100 MHz. This pipeline takes one block pair
  every 64 clocks. That is about 7.9 and 16.3 thousand frames/s at 100 MHz,
  64 times fewer. The counting behind the quoted figures is not clear.

## Files

| File | Contents |
|---|---|
| `rtl/r42sdf_pkg.sv` | word types, complex helpers, rounding |
| `rtl/r4_butterfly.sv` | combinational radix-4 butterfly (FFT/IFFT direction) |
| `rtl/sdf_stage.sv` | radix-4 / radix-2 single-delay-feedback stage |
| `rtl/const_mult.sv` | shift-add W16 / W8 multiplier |
| `rtl/twiddle_rom.sv` | 32-word folded twiddle ROM |
| `rtl/complex_mult.sv` | three-multiplier complex multiplier |
| `rtl/r2_bf.sv` | extra radix-2 stage of the DCT path |
| `rtl/dct_reorder.sv` | DCT input permutation buffer |
| `rtl/dct_post.sv` | DCT post computation |
| `rtl/r42sdf_ctrl.sv` | counter, schedule, twiddle exponents, output index |
| `rtl/r42sdf_top.sv` | the processor |

Every unit has a self-checking testbench `tb/tb_<unit>.sv`. Each compares the
unit against values it computes itself and ends by printing
`TB_RESULT checks=… failures=…`. There are two system-level testbenches:

* `tb/tb_r42sdf_top.sv` streams FFT, IFFT and DCT frames with idle cycles and
  mode switches. It checks every output and the latency, and counts each
  mechanism (stall, mode switch, each mode).
* `tb/tb_workload_accuracy.sv` collects the accuracy statistics above.

Simulate with Verilator 5, for example:

```
verilator --binary --timing -Irtl -y rtl rtl/r42sdf_pkg.sv tb/tb_r42sdf_top.sv --top-module tb_r42sdf_top
./obj_dir/Vtb_r42sdf_top
```
