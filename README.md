# 256-point radix-2^4 SDF FFT with multiplier-less twiddles

This is a streaming 256-point FFT for the OFDM physical layer of IEEE 802.16a
(WiMAX). It takes one complex sample per clock and returns one frequency bin
per clock. It is built to be small in two ways:

* **Radix-2^4 on a single-path delay feedback (SDF) pipeline.** The data
  path is eight radix-2 butterflies. Each has a feedback delay line, so the
  whole FFT needs only 255 words of storage. With the radix-2^4 split,
  non-trivial twiddle factors appear after only three of the seven stage
  boundaries: W16 after stages 2 and 6, and W256 after stage 4. The other
  four boundaries only need a factor of -j, which is a swap and a negation.
* **No general multipliers and no coefficient ROM.** Every twiddle factor is
  applied by constant multipliers built from shifts and adds on the
  canonical-signed-digit (CSD) form of the constants. The W16 multiplier
  covers its seven factors with three constants. The W256 multiplier uses
  the eighth-circle symmetry of the unit circle and a two-step (cascade)
  product to cover its 256 factors with 9 + 4 constant pairs.

The word length is 12 bits per real component throughout.

## Pipeline

```
 x(n) ─► fft_ctrl ─► BF1 ─► BF2 ─► ×W16 ─► BF1 ─► BF2 ─► ×W256 ─► BF1 ─► BF2 ─► ×W16 ─► BF1 ─► BF2 ─► X(k)
         position    D=128  D=64          D=32   D=16           D=8    D=4           D=2    D=1
```

| stage boundary after butterfly | 1  | 2   | 3  | 4    | 5  | 6   | 7  |
|--------------------------------|----|-----|----|------|----|-----|----|
| twiddle                        | -j | W16 | -j | W256 | -j | W16 | -j |

The -j factors are not separate hardware. Each one is folded into the
following BF2 butterfly, which rotates its incoming operand by -j when needed.

### Where the factors come from

Write the input index as n = 16·q + m. Write the output index as
k = k' + 16·K, with k' and K in 0..15. The 256-point DFT then splits into:

1. a 16-point DFT over q, done by butterflies 1 to 4;
2. a multiplication by W256^(m·k');
3. a 16-point DFT over m, done by butterflies 5 to 8.

Each 16-point DFT is itself two radix-2^2 pairs with a W16 factor between
them. Take q = 8a1 + 4a2 + 2a3 + a4 and k' = k1 + 2k2 + 4k3 + 8k4. The factors
W16^(q·k') then fall into three kinds:

* the butterfly signs (-1)^(a_i·k_i);
* the trivial rotations (-j)^(a2·k1) and (-j)^(a4·k3);
* the factor W16^((2a3+a4)·(k1+2k2)).

The exponent of that last factor is a product of two numbers from 0..3, so it
is always one of 0, 1, 2, 3, 4, 6 or 9.

### Position sideband and control

The pipeline has no central sequencer. `fft_ctrl` numbers the input samples
0..255 within each frame. That 8-bit position travels with every sample
through the pipeline, and each stage decodes its own control from it:

| stage | control decoded from the position `p` of the sample it receives |
|-------|------------------------------------------------------------------|
| butterfly with delay D | compute half when bit log2(D) is 1 |
| BF2 | apply -j when bits log2(D)+1 and log2(D) are both 1 |
| W16 after stage 2 | e = p[5:4] · {p[6],p[7]} |
| W16 after stage 6 | e = p[1:0] · {p[2],p[3]} |
| W256 after stage 4 | e = p[3:0] · {p[4],p[5],p[6],p[7]} |

In the table, {..} is a bit-reversed 2-bit or 4-bit number. A butterfly
passes on its results in the order of its own output stream: the result at
output position p is produced when input position p + D arrives. Every stage
therefore renumbers the positions as `out_pos = in_pos - D`.

After the last stage, output position p holds bin k = bitrev8(p). Results
leave in bit-reversed order, and `out_k` gives the natural index. There is no
reorder buffer.

## Butterflies (`sdf_butterfly`)

A stage with delay D works on blocks of 2D samples:

* **Fill half.** The incoming sample goes into the delay line. The word that
  leaves the line goes to the output: it is the difference computed during
  the previous block.
* **Compute half.** The word u leaving the line meets the incoming sample v.
  The stage outputs (u + v)/2 and writes (u − v)/2 back into the line.

A BF2 stage first replaces v with −j·v when its control bit says so.

Every butterfly halves its result with an arithmetic (truncating) shift. The
data therefore stays 12 bits wide without ever overflowing, and the FFT
delivers **X(k)/256**.

The delay line (`delay_buffer`) is a circular buffer: an array plus one
pointer. This lets the long lines map to RAM. All eight lines together hold
255 complex words, which is 6120 bits.

## W16 multiplier (`csd_w16_mult`)

Let c1 = cos(π/8), c2 = cos(π/4) and c3 = cos(3π/8). The seven factors are
then built from these three constants:

| e | W16^e | e | W16^e |
|---|-------|---|-------|
| 0 | 1 | 4 | −j |
| 1 | c1 − j·c3 | 6 | −c2 − j·c2 |
| 2 | c2 − j·c2 | 9 | −c1 + j·c3 |
| 3 | c3 − j·c1 | | |

Each input component d is multiplied by the three constants. The
multiplications share the sub-expression s = d + d/4:

```
d·c1 = d − s/16 + d/512        1892/2048 = 0.923828
d·c2 = d − s/4  + s/64         1448/2048 = 0.707031
d·c3 = d/2 − d/8 + d/128        784/2048 = 0.382813
```

That costs seven adders; the shifts are only wiring. The exponent is decoded
into two sets of selects:

* **Coefficient selects:** a 4-way choice among d, d·c1, d·c2 and d·c3 for
  each of the four partial products.
* **Sign and zero selects** for each partial product. The zero select makes
  the trivial factors 1 and −j exact.

One adder per output component combines the two partial products. The sums
are formed exactly, with 9 guard bits, then rounded to nearest once. Finally
they are saturated to 12 bits, because a 45° rotation can grow one component
by up to √2. Exponents outside the seven give the product by 1. An assertion
in the twiddle stage checks that they never occur.

## Cascade W256 multiplier (`csd_w256_mult`)

To apply W256^e, the multiplier first reduces the exponent and then
multiplies in two steps:

1. **Eighth-circle symmetry.** Write e = 64·Q + s with s in 0..63.
   * If s ≤ 32, the reduced exponent is p = s.
   * Otherwise p = 64 − s, and W^s = −j·conj(W^p). The input is conjugated
     before the multiplication and the result conjugated after it.

   The quadrant factor (−j)^Q and the extra −j of a mirrored exponent form a
   single trivial rotation at the output.
2. **Cascade.** Split p (0..32) as p = 4·p1 + p2, with p1 in 0..8 and p2 in
   0..3. The multiplier applies W256^(4·p1) and then W256^p2. Only 9 + 4
   (cos, sin) pairs are needed.
3. **Constant products.** The constants are
   K = round(2048·cos(2π·j/256)) and round(2048·sin(2π·j/256)), with
   j = 4·p1 or j = p2. `fft_pkg` holds them as integers and finds their CSD
   digits at elaboration. It then covers the digits with three shared
   patterns, trying them from the most significant digit in this order:

   | pattern | value |
   |---------|-------|
   | 1 0 1 | 5·d |
   | 1 0 −1 | 3·d |
   | 1 0 0 0 −1 | 15·d |

   Digits that fit no pattern stay single terms. For example,
   1960 = 15·2^7 + 5·2^3, and 1806 = 2^11 − 15·2^4 − 2.

   `cse_block` forms 3d, 5d and 15d once per input component, with one adder
   each. Every constant product (`csd_const_mult`) then only shifts these
   terms into place and adds them. The 21 non-trivial constants take 34
   adders per operand on top of the shared terms.

   A multiplexer indexed by p1 (9 ways) or p2 (4 ways) picks the needed
   product. Each cascade step rounds to an integer with two spare high bits,
   and the final result is saturated to 12 bits.

The products are exact up to the 11-fraction-bit constants and the rounding:
over all 256 exponents, the error stays within 2 LSB of the ideal product.

## Interface and timing (`fft256_sdf`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a sample is offered and accepted this cycle |
| `in_re`, `in_im` | in | 12 | x(n), signed, natural order |
| `in_frame_start` | out | 1 | the sample offered now is n = 0 of a frame |
| `out_valid` | out | 1 | a result is present |
| `out_pos` | out | 8 | position of the result within its output frame |
| `out_k` | out | 8 | bin index, bitrev8(`out_pos`) |
| `out_re`, `out_im` | out | 12 | X(k)/256, signed |

* **Frames.** Frames follow each other back to back from reset; sample 256·f
  starts frame f. The only parameter is `W`, the word length, which defaults
  to 12.
* **Rate.** The FFT accepts and produces one sample per clock.
* **Stalls.** When `in_valid` is low, nothing is accepted. The gap then moves
  down the pipeline as a bubble, and every stage advances only on valid data.
* **Latency.** The first result of a frame is X(0). It appears 11 cycles
  after the last sample of that frame was accepted: the delay lines account
  for 255 samples, and 8 butterfly registers plus 3 multiplier registers add
  the 11 cycles.
* **Flushing.** The remaining 255 results of a frame are pushed out by the
  next frame's samples. After the last frame, feed 255 more samples (zeros,
  for example).

## Accuracy

Compared with a double-precision DFT divided by 256, the results stay within
3 LSB per component in the tests. The test inputs were full-scale random
data and tones. The test allows 6 LSB.

Most of the error comes from the truncating shift in the butterflies. That
truncation also biases results slightly towards −∞. Halving at every stage
keeps the hardware small, but it costs dynamic range for small inputs: a
single tone of amplitude A comes out as A, but a white-noise input of RMS σ
comes out at σ/16.

## Files

| file | content |
|------|---------|
| `rtl/fft_pkg.sv` | sizes, enums, CSD digit function, twiddle constant tables, exponent decoders |
| `rtl/fft256_sdf.sv` | top: the pipeline above |
| `rtl/fft_ctrl.sv` | frame position counter |
| `rtl/sdf_butterfly.sv` | BF1/BF2 butterfly stage with its delay line |
| `rtl/delay_buffer.sv` | circular-buffer delay line |
| `rtl/twiddle_stage.sv` | registered stage choosing the exponent and the multiplier |
| `rtl/csd_w16_mult.sv` | W16 constant complex multiplier |
| `rtl/csd_w256_mult.sv` | cascade W256 constant complex multiplier |
| `rtl/csd_const_mult.sv` | CSD shift-and-add constant multiplier using the shared terms |
| `rtl/cse_block.sv` | shared sub-expressions 3d, 5d, 15d of one operand |
| `tb/tb_*.sv` | one self-checking testbench per module above (except the helpers) |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-WIDTH -Irtl -y rtl +libext+.sv \
    rtl/fft_pkg.sv tb/tb_fft256_sdf.sv --top-module tb_fft256_sdf -o sim
./obj_dir/sim
```

Replace `tb_fft256_sdf` with any other testbench name. What the testbenches
cover:

* **`tb_fft256_sdf`** runs the full-size FFT at its default parameters. It
  streams five checked frames (a tone, an impulse, two random frames, one of
  them with random input stalls, and a two-tone frame) plus a flush frame. It
  compares every bin with a DFT and checks the output order, the rate and the
  11-cycle latency. It also counts that each mechanism occurs: stalls, the −j
  of each BF2, every W16 exponent at both W16 stages, every W256 quadrant and
  mirrored exponents.
* **`tb_fft256_ofdm`** uses the FFT as an OFDM demodulator. The symbols
  follow the 256-subcarrier IEEE 802.16 layout: 200 used QPSK subcarriers,
  with DC and the guard bands empty. The test checks every subcarrier
  decision and value over eight back-to-back symbols.
* **`tb_sdf_butterfly`** checks BF1 and BF2 against a reference.
* **`tb_csd_w16_mult`** tests all seven exponents against the exact rotation.
* **`tb_csd_w256_mult`** tests all 256 exponents against the exact rotation.
* **`tb_delay_buffer`** and **`tb_fft_ctrl`** check the storage and the
  counter.
* **`tb_cse_block`** checks the shared terms for every 14-bit operand.

## What follows the original architecture and what does not

**Taken from the published architecture:**

* the transform size;
* the radix-2^4 stage plan and the BF1/BF2 SDF pipeline with delays 128 to 1;
* the 12-bit word length;
* the W16 multiplier with its three CSD constants, the shared term d + d/4,
  and its selection by two control signals;
* the W256 multiplier with symmetry reduction, the p = 4·p1 + p2 cascade and
  CSD constants.

**Choices made in this implementation:**

* scaling by 1/2 in every butterfly, truncation in the butterflies, rounding
  to nearest in the multipliers, and saturation;
* the valid/stall handshake and the position sideband in place of a central
  controller;
* the register placement, and with it the 11-cycle latency;
* bit-reversed output with an index port instead of a reorder buffer;
* the exact multiplexer arrangement of both multipliers.

**Possible departure:** the original W256 multiplier shares common
sub-expressions across its 12 constant values (patterns 101, 10−1 and
1000−1), but which pattern covers which digits of each constant is not
recoverable. Here a fixed greedy rule decides that. The arithmetic result is
the same, but the adder count may differ from the original.

**Not verified:** timing closure. The FFT must accept 32 MSample/s for WiMAX,
so it needs a clock of at least 32 MHz. No synthesis to a target was done.
The combinational path through the cascade W256 multiplier (symmetry, two
constant products with rounding, rotation, saturation) is the longest one. If
timing requires it, a register can be inserted between the two cascade steps.
