# 16-point radix-4 FFT processor with reduced multiplications

This is synthesizable SystemVerilog for a small FFT processor meant as the
demodulation block of an OFDM receiver. It converts 16 complex time-domain
samples into 16 frequency bins. The target is a low-area, low-power ASIC. The
reference implementation is a 0.18 µm CMOS chip with a 1.8 V supply and a
40 MHz clock.

The design uses a radix-4 algorithm and removes every multiplication it can:

- The radix-4 butterfly needs no multipliers at all. Its twiddles inside the
  butterfly are 1, −j, −1 and +j, which are sign changes and swaps.
- The butterfly computes four partial sums once, keeps them in a register and
  reuses each of them for two outputs. This takes 8 complex additions where a
  direct 4-point DFT takes 12.
- Only three real constants are stored: cos(π/8), sin(π/8) and cos(π/4).
  Every twiddle W16^e comes from one of these by a quarter-turn rotation.
- A twiddle that is a pure rotation (1, −j, −1, +j) bypasses the multipliers.
  Of the 12 twiddle products per transform, 4 are rotations and 8 need real
  multiplications. The textbook radix-2 count, (N/2)·log2 N, is 32 complex
  multiplications for N = 16.

A second, independent processor is included next to it: an 8-point radix-2
decimation-in-time FFT. It corresponds to a smaller test chip made in the same
process. The two share the twiddle arithmetic but no state.

## The radix-4 decomposition

Write N = 16 = L·M with L = M = 4. Time index n and frequency index k are each
split into two base-4 digits:

    n = l + 4m        (l, m = 0..3)
    k = 4p + q        (p, q = 0..3)

The 16-point DFT X(k) = Σ x(n)·W16^(nk), with W16 = exp(−j2π/16), then becomes
three steps:

    F(l,q) = Σ_m x(l+4m) · W4^(mq)        stage 1: four 4-point DFTs, one per l
    G(l,q) = W16^(l·q) · F(l,q)           twiddle, applied as stage 1 writes back
    X(4p+q) = Σ_l G(l,q) · W4^(lp)        stage 2: four 4-point DFTs, one per q

W4 = −j, so both stages are plain 4-point DFTs. Only the step between them
multiplies.

### In-place addressing

The 16 words live in one register memory. Each butterfly reads four words and
writes its four results back to the same four addresses:

| stage | butterfly | reads / writes addresses | holds afterwards |
|-------|-----------|--------------------------|------------------|
| 1     | l = 0..3  | l, l+4, l+8, l+12        | G(l,q) at l+4q   |
| 2     | q = 0..3  | 4q, 4q+1, 4q+2, 4q+3     | X(4p+q) at 4q+p  |

After stage 2, bin k = 4p+q sits at address 4q+p: the two base-4 digits of k
are swapped. The unload counter swaps them back, so bins come out in natural
order. Data are loaded in natural order (x(n) at address n), so no input
reordering is needed.

### The twiddles

Stage 1 butterfly l multiplies its output q by W16^(l·q):

| l \ q | 1 | 2 | 3 |
|-------|---|---|---|
| 0     | 0 | 0 | 0 |
| 1     | 1 | 2 | 3 |
| 2     | 2 | 4 | 6 |
| 3     | 3 | 6 | 9 |

The table shows exponents e. `twiddle_mult` splits e into a quadrant
e[3:2] and a residue r = e[1:0], using W16^e = (−j)^(e[3:2]) · W16^r:

- r = 0: the product is x itself, with no multiplier. This gives the bypass.
- r = 1, 2, 3: four real products using (cos, sin) = (c1, s1), (c2, c2) or
  (s1, c1). Here c1 = cos(π/8), s1 = sin(π/8) and c2 = cos(π/4).
- The quadrant then rotates the result by 1, −j, −1 or +j with swaps and
  negations.

For example, e = 6 is −j·W16^2, and e = 9 is −1·W16^1.

## Radix-4 butterfly

For operands a, b, c, d, the butterfly (`r4_butterfly`) registers the partial
sums in its first clock:

    s0 = a + c    s1 = a − c    s2 = b + d    s3 = b − d

In the second clock it combines them with adders only:

    y0 = s0 + s2        y2 = s0 − s2
    y1 = s1 − j·s3      y3 = s1 + j·s3

The unit has one clock of latency and accepts a new operand set every clock.
Storing the shared partial sums is this design's reading of "reusing
precomputed values". The register between the two adder levels also breaks the
long path through adders, multiplier and adders.

## Schedule and interface of the radix-4 processor

`fft16_r4_ctrl` is a six-state machine:

| state  | clocks   | action |
|--------|----------|--------|
| LOAD   | 16 + gaps | `in_ready` high; each accepted sample is written to address n |
| STAGE1 | 4        | issue butterfly l = 0..3 |
| DRAIN1 | 1        | idle, so the last stage-1 result is written before stage 2 reads it |
| STAGE2 | 4        | issue butterfly q = 0..3 |
| DRAIN2 | 1        | idle, for the last stage-2 write-back |
| OUTPUT | 16       | read bin k = 0..15 and register it onto the output |

Ports of `fft16_r4` (widths at the defaults):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in, out | 1 | a sample is taken on a clock where both are high |
| `in_re`, `in_im` | in | 16 | x(n), two's complement, x(0) first |
| `out_valid`, `out_idx` | out | 1, 4 | bin k is on the outputs |
| `out_re`, `out_im` | out | 21 | X(k), two's complement, unscaled |
| `busy` | out | 1 | computing or unloading |

Timing:

- The first bin appears 12 clocks after the clock that accepts the 16th sample.
- Bins then follow on 16 consecutive clocks. There is no back-pressure on the
  output.
- `in_ready` rises again on the clock that presents the last bin, so the next
  frame can start loading at once.
- A transform takes 16 + 10 + 16 = 42 clocks, which is 1.05 µs at 40 MHz.

Samples offered while `busy` are not taken. Hold them until `in_ready` is high.

## Word widths and accuracy

- **Inputs.** 16-bit signed.
- **Internal and output words.** DATA_W + 5 = 21 bits. This holds any result
  without scaling or overflow: a component of X(k) is at most
  16·√2·2^15 < 2^20.
- **Twiddle constants.** TW_W = 16 bits, scaled by 2^14 and rounded to nearest.
- **Products.** Rounded to nearest, by adding half an LSB before the shift.

The error against an exact floating-point DFT is set by the constant
quantization. With full-scale random inputs, the testbench saw at most 5.2 LSB
on the 21-bit outputs, and it accepts 8. For the 8-point processor
(DATA_W + 4 = 20-bit outputs) the worst error seen was 2.8 LSB.

`DATA_W` and `TW_W` are parameters of every module. Changing them scales the
widths consistently.

## The 8-point radix-2 processor

`fft8_r2` computes the 8-point DFT by decimation in time:

- **Butterfly.** `r2_butterfly` multiplies the lower operand by the twiddle
  first, then adds it to and subtracts it from the upper one:
  X(k) = G1(k) + W8^k·G2(k) and X(k+4) = G1(k) − W8^k·G2(k).
- **Loading.** The input is written in bit-reversed order (x(n) at address
  bitrev3(n)).
- **Stages.** Stage s (s = 0, 1, 2) pairs addresses top and top + 2^s, where
  top = (j div 2^s)·2^(s+1) + (j mod 2^s) for butterfly j = 0..3.
- **Twiddles.** Stage s uses twiddle W8^((j mod 2^s)·4/2^s), applied as
  W16^e with e twice that exponent, through the same `twiddle_mult`.
- **Output.** The results end in natural order.

One butterfly runs per clock, combinationally, and is written back on the same
edge. A transform takes 8 load + 12 compute + 8 unload clocks. The first bin
comes 14 clocks after the 8th sample. Only W8^1 and W8^3 need the multipliers,
twice per transform.

Its ports mirror those of `fft16_r4`. The only differences are the 3-bit
`out_idx` and the 20-bit outputs.

## Top level

`fft_top` places both processors side by side. They share only `clk` and
`rst_n`. The radix-4 ports carry the prefix `r4_` and the radix-2 ports the
prefix `r2_`.

## What follows the reference design and what is this design's own

**Taken from the reference:**

- the 16-point radix-4 FFT;
- the divide-and-conquer decomposition above;
- the aim of cutting multiplications by storing precomputed values and
  improving twiddle use;
- the 8-point radix-2 DIT processor;
- the 40 MHz clock.

**Chosen here**, where the reference leaves the details open:

- the iterative single-butterfly architecture with an in-place register
  memory;
- the serial load and unload ports and the valid/ready handshake;
- the state machine and its drain clocks;
- all word widths, the twiddle format and rounding;
- the three-constant twiddle scheme;
- the asynchronous active-low reset.

The circuit you get is therefore a faithful implementation of the algorithm and
of the multiplication-saving idea. It is not a gate-for-gate copy of the
original chip, and its area and power will differ.

**Not included:**

- the rest of an OFDM transceiver (mapper, serial/parallel conversion, cyclic
  prefix, IFFT, converters);
- the pad ring;
- the conventional radix-2 and radix-4 designs that the reference compares
  against.

The design is fixed at 16 points. An OFDM system with 64 subcarriers, such as
802.11a wireless LAN, would need a third radix-4 stage and a larger memory.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_twiddle_rom` | the three constants against cos/sin to within half an LSB; the trivial flag |
| `tb_twiddle_mult` | all 16 exponents on random operands against a floating-point product; exactness and bypass for rotations |
| `tb_r4_butterfly` | 500 random operand sets, with gaps, against a direct 4-point DFT; one-clock latency |
| `tb_r2_butterfly` | random operands with each W8^k against a floating-point butterfly |
| `tb_fft16_r4_ctrl` | the state sequence clock by clock over three transforms, including refused input while busy |
| `tb_fft16_r4` | 40 frames (impulses, constants, tones, full-scale extremes, random) against a floating-point DFT; bin order; 12-clock latency |
| `tb_fft8_r2` | the same for the 8-point processor; 14-clock latency |
| `tb_fft_top` | both processors at once, at default parameters, 30 frames each |

`tb_fft_top` also counts each mechanism and fails if one never happens:

- refused input;
- idle clocks during loading;
- butterflies in both stages;
- drain clocks;
- bypassed and multiplied twiddles;
- back-to-back frames.

It checks the exact per-transform counts: 4 + 4 butterflies, 2 drain clocks,
4 bypassed and 8 multiplied twiddles.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fft_pkg.sv tb/tb_fft_top.sv --top-module tb_fft_top -o sim
    ./obj_dir/sim

Replace `tb_fft_top` with any other testbench name. Each run takes well under a
second.

## Files

- `rtl/fft_pkg.sv`: default widths, twiddle constants, controller state type
- `rtl/twiddle_rom.sv`, `rtl/twiddle_mult.sv`: twiddle constants and multiplier
- `rtl/r4_butterfly.sv`, `rtl/fft16_r4_ctrl.sv`, `rtl/fft16_r4.sv`: the
  16-point radix-4 processor
- `rtl/r2_butterfly.sv`, `rtl/fft8_r2.sv`: the 8-point radix-2 processor
- `rtl/fft_top.sv`: both processors
- `tb/tb_*.sv`: the testbenches above
