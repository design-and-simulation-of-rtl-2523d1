# 64-sample radix-4 transform datapath (4-bit in, 8-bit out)

This is a purely combinational radix-4 transform unit. It was designed as the
front end of an FFT-based compressor for medical images. One 256-bit word
carries 64 signed 4-bit samples. A second 256-bit word carries 64 signed
4-bit twiddle coefficients. The unit returns 64 signed 8-bit results in one
combinational pass, with no clock, registers or handshake. The design aims
at short input-to-output delay: it uses radix-4 units instead of radix-2
butterflies, so fewer stages and fewer complex multiplications are needed.

The 64 samples are handled as four independent groups of 16. Each group
goes through two arithmetic steps:

1. **DFT four.** Four 4-point DFTs, one for each class of sample index
   modulo 4.
2. **Twiddle multiplication.** Each 4-point result is multiplied by four
   coefficients from the twiddle word.

The 16 twiddled values of each group are the outputs `x`. A compression
stage follows. It zeroes the small coefficients (output `xc`) and counts
how many it dropped, which gives the compressor's drop ratio. Read the
next section before you use the outputs.

## What the outputs are, and what they are not

The unit does **not** compute the 64-point DFT of its input. Its hierarchy
has no stage that combines the four 16-sample groups. Inside a group, each
twiddle unit sees the result of a single 4-point DFT. It does not see one
bin from each of the four DFTs, as a full 16-point radix-4 stage would. The
outputs are exactly "4-point DFTs of the index classes, weighted by the
supplied coefficients". They become a useful transform only when the
surrounding system picks the coefficients and combines the results. The
structure matches the original design's block hierarchy. Adding the
missing combining stages would be a different design.

### Packed 4-point DFT

The samples are real, so a 4-point DFT has only four real degrees of
freedom. `X(0)` and `X(2)` are real, and `X(3) = conj X(1)`. A DFT-four
unit with inputs `x1..x4` therefore returns four real numbers:

| output | value      | formula             |
|--------|------------|---------------------|
| xx[0]  | X(0)       | x1 + x2 + x3 + x4   |
| xx[1]  | Re X(1)    | x1 - x3             |
| xx[2]  | X(2)       | x1 - x2 + x3 - x4   |
| xx[3]  | Im X(1)    | x4 - x2             |

Example: `[1, 0, 1, 1]` has the spectrum `[3, j, 1, -j]` and is returned as
`[3, 0, 1, 1]`.

### Twiddle multiplication (Butter R4)

Each Butter R4 takes one packed DFT `(X0, ReX1, X2, ImX1)` and four
coefficients `Tf1..Tf4`:

    y[0] = X(0) * Tf1
    y[2] = X(2) * Tf3
    y[1] + j*y[3] = X(1) * (Tf2 + j*Tf4)

`Tf1` and `Tf3` are real weights on the real bins. `Tf2 + j*Tf4` is the
complex twiddle of `X(1)`. The coefficients are plain signed integers. To
use twiddles of magnitude up to 1, read them as Q1.2 numbers, where 4
means 1.0 and the 4-bit range is -2.0 to 1.75. The outputs then carry two
fraction bits. For example, `Tf = (4, 4, 4, 0)` passes the packed DFT
through scaled by 4. `Tf2 = 0, Tf4 = -4` rotates `X(1)` by -j.

## Compression stage

`coeff_compress` compares every output lane with a tolerance relative to
the largest magnitude in the 64-lane block:

    keep lane i  iff  |x[i]| >= (tol / 2^16) * max_j |x[j]|

Dropped lanes read 0 on `xc`. Each lane is a real number: a real bin, or
the real or imaginary part of `X(1)`. Real and imaginary parts are
therefore thresholded separately. The stage has two count outputs:

- `n_nonzero`: the number of nonzero lanes of `x`.
- `n_dropped`: the number of those lanes that were zeroed.

The drop ratio is `n_dropped / n_nonzero`. For a whole image, add up both
counts over its blocks before dividing. The comparison is exact integer
arithmetic: `|x| * 2^16` is compared with `tol * max`. The compression
study the design comes from used the tolerances 0.0007625, 0.003246,
0.013075 and 0.03924, which are 50, 213, 857 and 2572 as Q0.16 values.
`tol = 0` keeps everything.

## Word layout and port map

Samples and coefficients are numbered from the most significant end of the
word. Sample `n` is `a[255-4n -: 4]`, and coefficient `n` is
`tf[255-4n -: 4]`.

| samples / coefficients | group (Topbutter) | outputs                                   |
|------------------------|-------------------|-------------------------------------------|
| 0-15                   | M2                | x[0..7] odd part, x[8..15] even part      |
| 16-31                  | M3                | x[16..23] odd part, x[24..31] even part   |
| 32-47                  | M4                | x[32..39], x[40..47]                      |
| 48-63                  | M5                | x[48..55], x[56..63]                      |

Within a group, local sample `s0..s15` and local coefficients
`Tf1..Tf16` are used as follows:

| output lanes (in group) | DFT four input            | coefficients |
|-------------------------|---------------------------|--------------|
| 0-3   (odd part)        | s1, s5, s9, s13           | Tf1-Tf4      |
| 4-7   (odd part)        | s3, s7, s11, s15          | Tf5-Tf8      |
| 8-11  (even part)       | s0, s4, s8, s12           | Tf9-Tf12     |
| 12-15 (even part)       | s2, s6, s10, s14          | Tf13-Tf16    |

Each run of four output lanes is `y[0..3]` of one Butter R4, in the order
given above.

## Module hierarchy

    fft64_r4_top            a[255:0], tf[255:0], tol[15:0]
                            -> x[64], xc[64] (8-bit signed), n_nonzero, n_dropped
      datasplit256  (M1)    four 64-bit group words
      topbutter     (M2-M5) one 16-sample group
        comutator           first stage
          datasplit16       64-bit word -> 16 samples
          odd_even_part     reorder by index mod 4
          dft_four  x4      packed 4-point DFTs
        butter_r8   x2      even part (Tf9-16), odd part (Tf1-8)
          butter_r4 x2      twiddle multiplication
      coeff_compress        tolerance threshold, drop counts

`fft_r4_pkg` holds the default sizes. Every module is a separate file
`rtl/<module>.sv`.

## Widths, overflow and parameters

| parameter (top) | default | meaning                                  |
|-----------------|---------|------------------------------------------|
| `W`             | 4       | sample width                             |
| `TFW`           | 4       | twiddle coefficient width                |
| `D4W`           | 4       | DFT-four result width                    |
| `OW`            | 8       | output width                             |
| `TOLW`          | 16      | tolerance width (fraction bits)          |

The first four are the original design's widths. The tolerance format is
this implementation's choice. At these widths the arithmetic
**wraps around** (two's complement) and does not saturate:

- **DFT-four results.** A sum of four 4-bit samples needs 6 bits, but the
  DFT-four result keeps 4 bits. In the end-to-end test, about a
  quarter of the random DFT-four results wrapped.
- **Outputs.** The 8-bit output holds any single 4x4 product. The complex
  product can still wrap: `(-8)(-8) + (-8)(-8) = 128`.

For exact results, set `D4W = 6` and `OW = 11`. The sum of two 6x4-bit
products needs 11 bits. `tb_fft64_r4_wide` checks this configuration.
Internally every sum and product is formed at full precision and only cut
to the port width at the end. Wider widths therefore change nothing except
the wrap point. `N_POINTS` and `GROUP_PTS` in the package are fixed at 64
and 16, because the top splits the input into exactly four groups.
Elaboration stops with an error if they disagree.

## Timing and size

The unit has no clock, reset or state. Every output is a function of
`a`, `tf` and `tol` alone, and a result is valid one propagation delay after the
inputs settle. To use it in a clocked system, register the inputs and
outputs around it. The original targets a Spartan-3E FPGA and reports about
19 ns from input to output. That figure has not been reproduced here.

In generic word-level cells, the transform part of the default build
synthesizes to 96 adders or subtractors (six per DFT four) and 64
multiply-accumulate cells (one per Butter R4 output). Together these hold
the 96 products of the design: six 4x4 multipliers per Butter R4. The
original design maps onto 16 hard multipliers, which suggests it shares or
simplifies products in a way that is not documented. This implementation
writes the complex product out directly. The compression stage is larger
than the transform: about 1,300 word-level cells. Most of them are the
64-input maximum search and the 64 magnitude comparisons.

## Where this implementation makes its own choices

The block hierarchy, port names, widths and the way the blocks are wired
follow the original design. The following points are not fully specified
there and are choices of this implementation:

- **Packed DFT outputs.** The 4-point DFT of real data is packed as
  `X(0), Re X(1), X(2), Im X(1)`.
- **Twiddle use.** In each Butter R4, `Tf1` and `Tf3` are real weights and
  `Tf2 + j*Tf4` is the complex twiddle.
- **Lane order in `odd_even_part`.** The split by index modulo 4 is the
  original's. The order of the four classes across the lanes is not.
- **Groups M3-M5.** Their twiddle slices and output positions repeat the
  pattern given for M2.
- **No overflow handling.** Overflow wraps, as the original's fixed port
  widths imply.
- **Compression in hardware.** The original runs the compression step in
  software. Here it is a block after the transform. The relative tolerance,
  its format and the `>=` keep rule are this implementation's choices.
- **Input subtraction not reproduced.** The original twiddle unit contains
  an input subtraction (`x2 - x1`) whose role could not be determined, so
  it is left out.

Not included: the decompression and the inverse FFT that rebuild the
image. The original names them but gives no structure or sizes. The image
input and output are also left out, as is the loop over the blocks of an
image.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The reference
arithmetic is in `tb/fft_ref_pkg.sv`. It evaluates the 4-point DFT from its
definition, with an integer cos/sin table, and models the wrap-around by
masking to the port width.

| testbench             | what it covers                                                 |
|-----------------------|----------------------------------------------------------------|
| tb_dft_four           | all 65,536 inputs, 4-bit (wrapping) and 6-bit (exact) outputs  |
| tb_butter_r4          | exhaustive data with unit and -j twiddles, full scale, random  |
| tb_butter_r8, tb_comutator, tb_topbutter | random operands against the reference   |
| tb_datasplit16/256, tb_odd_even_part | bit and lane placement                          |
| tb_coeff_compress     | the four study tolerances plus 0 and ~1 on random, sparse and full-scale blocks |
| tb_fft64_r4_top       | whole unit at default widths, compression included; counts DFT-four wraps, output wraps, complex rotations, dropped coefficients and the worked example in all four groups, and fails if any never occurs |
| tb_fft64_r4_wide      | whole unit at exact widths (D4W=6, OW=11)                      |

To run one, for example the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fft_r4_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft64_r4_top.sv \
        --top-module tb_fft64_r4_top
    ./obj_dir/Vtb_fft64_r4_top

Each testbench finishes in well under a second.
