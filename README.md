# Fully parallel 64-point radix-4 FFT (with a 32-point radix-2 companion)

This RTL computes a 64-point discrete Fourier transform of complex 8-bit
samples in one combinational pass. The whole 64-sample frame enters on
parallel ports and all 64 frequency bins leave on parallel ports. There is no
clock, no memory and no control.

The transform uses the radix-4 decimation-in-time (DIT) FFT. A length-N DFT
is split into four length-N/4 DFTs. Each one takes every fourth input
sample: n = 4m, 4m+1, 4m+2, 4m+3. The four partial results are then combined
by radix-4 butterflies. Each butterfly has at most three twiddle-factor
multiplies and one length-4 DFT. The length-4 DFT needs no multiplier,
because its only factors are 1, -j, -1 and +j. For N = 64 = 4^3 this gives
three stages of 16 butterflies, 48 in all. A radix-2 FFT of the same size
would need six stages of 32 butterflies, with more non-trivial multiplies.

A 32-point radix-2 DIT FFT, built the same way, sits next to it in the top
level as a smaller reference design.

## Block structure

```
fft_top
 ├─ fft64_r4        64-point radix-4 DIT FFT (main design)
 │   ├─ input split: base-4 digit-reversed wiring
 │   └─ 3 stages × 16 × { 4 × twiddle_mult → bfly4 }
 └─ fft32_r2        32-point radix-2 DIT FFT
     ├─ input split: bit-reversed wiring
     └─ 5 stages × 16 × { twiddle_mult → bfly2 }
fft_pkg             twiddle constants, index permutations, round/saturate
```

| module         | does                                                                  |
|----------------|-----------------------------------------------------------------------|
| `fft_pkg`      | elaboration-time twiddle constants, digit reversal, rounding, clamping |
| `twiddle_mult` | multiplies a sample by the constant W_N^K = exp(-j·2πK/N)               |
| `bfly4`        | 4-point DFT of four twiddled samples, ÷4, round, saturate              |
| `bfly2`        | sum and difference of a twiddled pair, ÷2, round, saturate             |
| `fft64_r4`     | the 64-point radix-4 FFT (N is a parameter: any power of 4)            |
| `fft32_r2`     | the 32-point radix-2 FFT (N is a parameter: any power of 2)            |
| `fft_top`      | both FFTs side by side, each with its own ports                        |

## How the radix-4 index map works

This is the part that is easiest to get wrong, so here it is in full.

**Input split.** The input at position i of the first stage is sample
`digit_rev4(i)`, where the base-4 digits of i are reversed. For N = 64, i has
three base-4 digits. For example, position 1 (digits 0,0,1) takes sample 16
(digits 1,0,0), and position 4 takes sample 4. After this reordering, each
run of four neighbouring positions holds samples spaced N/4 apart. Those are
exactly the inputs of a 4-point DFT. The split is pure wiring.

**Stages.** Stage s (s = 0, 1, 2) builds DFTs of length L = 4^(s+1) from four
DFTs of length Q = L/4. Butterfly b (0..15) of that stage works on:

```
j    = b mod Q                  (index inside the length-Q sub-DFTs)
base = (b div Q)·L + j
in/out positions: base, base+Q, base+2Q, base+3Q
```

Input q of the butterfly is multiplied by W_L^(q·j), which equals
W_N^(q·j·N/L). The butterfly then takes the length-4 DFT and writes output p
back to position base + p·Q. The results stay in place. After the last stage
the bins are in natural order: output k is X[k].

The twiddle exponents q·j·N/L for each stage:

| stage | L  | Q  | j range | exponents used (q = 1, 2, 3)             |
|-------|----|----|---------|------------------------------------------|
| 0     | 4  | 1  | 0       | none: all factors are 1                  |
| 1     | 16 | 4  | 0..3    | 4j, 8j, 12j (multiples of 4, up to 36)   |
| 2     | 64 | 16 | 0..15   | j, 2j, 3j (0 … 45)                       |

Every instance of `twiddle_mult` gets its exponent as a parameter, so each
one is a constant multiplier. Exponents 0, N/4, N/2 and 3N/4 (factors 1, -j,
-1, +j) need no multiplier and are exact. In the 64-point FFT, 76 of the 192
twiddle positions are non-trivial.

**Radix-4 butterfly.** `bfly4` computes the length-4 DFT as two levels of
radix-2 butterflies: first on the even pair, then on the odd pair.

```
a0 = x0 + x2     a1 = x0 - x2     b0 = x1 + x3     b1 = x1 - x3
y0 = a0 + b0     y1 = a1 - j·b1   y2 = a0 - b0     y3 = a1 + j·b1
```

Multiplying by -j is a swap of the real and imaginary parts plus a negation.

**Radix-2 version.** `fft32_r2` follows the same scheme with radix 2. The
input order is bit-reversed. In stage s, L = 2^(s+1) and Q = L/2, and
butterfly b pairs positions base and base+Q. Only the lower input is
multiplied, by W_N^(j·N/L). `bfly2` writes back (a+b)/2 and (a−b)/2.

## Number format, scaling and accuracy

* Samples and bins: DATA_W = 8-bit two's complement, with separate real and
  imaginary arrays.
* Twiddles: TW_W = 10-bit two's complement with 8 fraction bits, so 1.0 is
  256. The value is round(cos(2πK/N)·256), and round(−sin(2πK/N)·256) for the
  imaginary part. The package computes these with `$cos`/`$sin` at
  elaboration time, so no table file is needed.
* `twiddle_mult` returns DATA_W+1 bits. Rotating a full-scale sample can push
  one component up to √2 times full scale, so no overflow is possible there.
  The product is rounded to the nearest integer, with halves rounded up.
* Every butterfly divides by its radix, rounds to nearest (halves up), and
  saturates each component to DATA_W bits. As a result, both FFTs return
  **X[k]/N**, not X[k].
* `sat` goes high when any butterfly clamped a value. This needs inputs near
  full scale whose energy gathers in few bins, in a stage result or in the
  final bins. An over-driven tone is the typical case: its bin then exceeds
  127. Random full-scale data rarely saturates.
* Measured error against a double-precision DFT/N on unsaturated frames is
  at most about 1.4 LSB for the 64-point FFT and 2.2 LSB for the 32-point FFT.
  The radix-2 version has more rounding stages.

## Interface and timing

`fft_top` ports. All words are DATA_W bits, and arrays are unpacked and
indexed by sample or bin number.

| port                  | dir | size    | meaning                          |
|-----------------------|-----|---------|----------------------------------|
| `r4_x_re`, `r4_x_im`  | in  | 64 × 8  | time samples of the 64-point FFT |
| `r4_y_re`, `r4_y_im`  | out | 64 × 8  | X[k]/64, k = 0..63               |
| `r4_sat`              | out | 1       | a butterfly saturated            |
| `r2_x_re`, `r2_x_im`  | in  | 32 × 8  | time samples of the 32-point FFT |
| `r2_y_re`, `r2_y_im`  | out | 32 × 8  | X[k]/32                          |
| `r2_sat`              | out | 1       | a butterfly saturated            |

Both FFTs are purely combinational. An output is valid one combinational
delay after its input changes. The critical path runs through three
(radix-4) or five (radix-2) twiddle multipliers and butterflies in series.
There is no reset and no state. To run these at a clock rate, register the
ports in the surrounding design, or add pipeline registers between the
generate stages in `fft64_r4` / `fft32_r2`.

The design is large in I/O: the top has 3074 port bits. It is meant to be
embedded, with the frames coming from on-chip buffers, not to be placed on
pins directly.

## What follows the published design and what is this design's own

Taken from the published design:
* the 64-point radix-4 decimation-in-time algorithm
* three twiddle multiplies plus a length-4 DFT per butterfly
* the 4-point DFT built as two levels of 2-point butterflies with a −j
  factor
* a data-split stage that reorders the inputs in front of the butterflies
* 8-bit data words
* whole-frame parallel input and output
* a 32-point radix-2 FFT as a second processor

This design's own choices:
* the twiddle word width
* per-stage scaling by the radix, so the output is X[k]/N
* rounding to nearest and saturation, with a `sat` flag
* separate real and imaginary ports, as unpacked arrays of 8-bit words. The
  published top packed its inputs into two 256-bit buses, and how samples
  were laid out in them is not known.
* purely combinational datapath with no registers. The published timing
  report shows one combinational path of about 20 ns on the target FPGA; no
  clocking or pipelining was described.
* the exact handling of trivial twiddles
* everything about the 32-point design beyond its size and radix, because
  its architecture was not published
* the stage structure: it is written as generate loops over stages and
  butterflies. The published hierarchy shows a split block followed by four
  "Topbutter" sub-blocks, whose contents are unknown, so that split was not
  copied.

## Files

* `rtl/fft_pkg.sv`, `rtl/twiddle_mult.sv`, `rtl/bfly2.sv`, `rtl/bfly4.sv`,
  `rtl/fft32_r2.sv`, `rtl/fft64_r4.sv`, `rtl/fft_top.sv`: the synthesizable
  design.
* `tb/tb_fft_ref_pkg.sv`: the reference models.
  * `dft_ref` is a double-precision DFT taken straight from its definition.
  * `fft_model` is a bit-true loop model of the fixed-point datapath. It
    computes each radix-R DFT by its defining sum rather than by the
    hardware's butterfly structure.
* `tb/tb_*.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

| testbench          | checks                                                                                   |
|--------------------|------------------------------------------------------------------------------------------|
| `tb_twiddle_mult`  | 8 exponents, including the 4 trivial ones; random and extreme inputs; exact and ≤1.5 LSB from ideal |
| `tb_bfly4`         | random 9-bit inputs against the 4-point DFT definition; `sat` set when expected and only then |
| `tb_bfly2`         | the same for the radix-2 butterfly                                                        |
| `tb_fft64_r4`      | impulses, DC, a tone in every bin, random and over-driven frames; bit-exact match and DFT tolerance |
| `tb_fft32_r2`      | the same for the 32-point FFT                                                             |
| `tb_fft_top`       | both FFTs at default size together, end to end. Requires unsaturated frames, saturated frames and non-trivial-twiddle tones on each processor |

## Simulating

Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_fft_top rtl/fft_pkg.sv tb/tb_fft_ref_pkg.sv tb/tb_fft_top.sv
./obj_dir/Vtb_fft_top
```

To run another testbench, replace `tb_fft_top` with its name. The
testbenches for the butterflies and the twiddle multiplier do not need
`tb/tb_fft_ref_pkg.sv`. Each run takes well under a second.

## Changing it

* **Size:** set `N` on `fft64_r4` to any power of 4 (16, 64, 256, …), or on
  `fft32_r2` to any power of 2. The stage count and the twiddle exponents
  follow from N.
* **Precision:** `DATA_W` sets the sample and bin width, and `TW_W` the
  twiddle width (fraction bits = TW_W − 2). The testbenches' reference model
  takes the same two numbers.
* **No scaling:** to get X[k] rather than X[k]/N, let the stage width grow by
  2 bits per radix-4 stage and drop the `round_shift` in `bfly4`. That change
  is not provided here.
