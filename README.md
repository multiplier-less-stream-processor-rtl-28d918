# Multiplier-less FP32 2D convolution stream processor

This design filters an image with a K x K kernel of IEEE-754 single-precision
coefficients and produces FP32 results, one per input pixel, without a single
multiplier and without a frame buffer. Pixels arrive in raster order straight
from a source such as a camera sensor. The default build is the configuration
the architecture was designed around: 8-bit pixels, a 3x3 Gaussian kernel and
640-pixel (VGA) rows.

Two ideas make it work.

1. **Radix-3 pixel code.** Every pixel value is rewritten as a signed sum of a
   small, fixed set of *parts*, with each digit in {-1, 0, +1}. The product
   `F * pixel` then becomes a sum of constants `+/- F * part`. Because F is
   known when the hardware is built, those constants are stored in small tables
   and the multiplier turns into a handful of additions.
2. **A stripe buffer instead of a frame buffer.** Only K-1 image rows are kept,
   in dual-port RAMs addressed as circular buffers. With K x K registers on
   top, the RAMs behave like one long shift register, so the window to filter
   always sits in the same registers.

## The radix-3 pixel code

For m-bit pixels (range 0..r, r = 2^m - 1) the parts are

    lambda_i = 3^i        for i = 0 .. n-1
    lambda_n = r - (1 + 3 + ... + 3^(n-1))       with n = floor(log3(2r))

This is the smallest set of weights from which every value in 0..r can be
formed with digits in {-1, 0, +1} (the Bachet weighing problem). For m = 8 the
parts are **1, 3, 9, 27, 81, 134**: six digits instead of eight binary bits.
Each digit takes two bits (`00` = 0, `01` = +1, `11` = -1), so a coded pixel
is 12 bits. Examples:

| pixel | C0 (1) | C1 (3) | C2 (9) | C3 (27) | C4 (81) | C5 (134) |
|------:|---:|---:|---:|---:|---:|---:|
| 2     | -1 | +1 | 0 | 0 | 0 | 0 |
| 5     | -1 | -1 | +1 | 0 | 0 | 0 |
| 23    | -1 | -1 | 0 | +1 | 0 | 0 |
| 255   | +1 | +1 | +1 | +1 | +1 | +1 |

Some values have more than one digit string. The coder (`coeff_gen`) uses
the last part only when the powers of three alone cannot reach the value, that
is above 121. The remainder is written in balanced ternary. The table is built
at elaboration by `mlsf_pkg::ternary_code()`, so no data file is needed. Once a
pixel is coded, its binary value is never used again.

## Replacing multiplications by table look-ups

A K x K convolution is

    O(x0, y0) = sum over h, j of  F(h, j) * I(x0 + h - c, y0 + j - c),   c = (K-1)/2

With the pixel code this becomes

    sum over h, j, i of  C_i(pixel) * (F(h, j) * lambda_i)

Each kernel tap has its own table (`premult_lut`) of 2(n+1) words. The first
n+1 words hold `F * lambda_i` and the rest hold their two's complements. A
digit of -1 therefore selects a stored negative value, and no subtractor is
needed. A multiplexer bank reads all six digits of a coded pixel at once. An
adder tree of n = 5 adders, 3 levels deep, sums the selected words
(`equiv_mult`, the "equivalent multiplier"). A second adder tree sums the K*K
products.

### Fixed point with a common exponent

If the adders worked on FP32 numbers, every addition would need alignment and
normalisation. Instead, all table words of a kernel share one exponent. Each
word is a signed integer, and its LSB has weight 2^Q. Q is chosen at
elaboration so that the largest `|F| * lambda` in the kernel just fits below
the sign bit of an LS-bit word:

    Q = (exponent of the top bit of max |F| * max lambda) - (LS - 2)

With LS = 44 the words cover the whole dynamic range of the default Gaussian.
Its corner and centre coefficients differ by a factor of e^9, and with the
part 134 on top, products span about 2^20. Even the smallest product keeps
about 22 significant bits. The products are exact integers
(24-bit significand times part) shifted into place. A product finer than 2^Q
is rounded to the nearest word. Words grow by ceil(log2 6) = 3 bits in a
multiplier and by ceil(log2 9) = 4 bits in the window sum, so nothing can
overflow. `fp32_normalizer` is the only place where an exponent is handled.
It finds the leading one of the 51-bit sum, rounds to nearest even into 23
fraction bits, and sets the biased exponent to `p + Q + 127`.

The kernel is passed as FP32 bit patterns in `COEFS`, with index `r*K + c`:
row r counted from the top of the window, column c from the left. All table
contents are computed from this parameter at elaboration. The K*K tables of
the default build hold 9 x 12 words of 44 bits, 594 bytes in all; the coder
ROM holds 256 x 12 bits.

The default kernel is the sampled Gaussian `(2 pi)^-1 sigma^-2 exp(-(x^2+y^2)/(2 sigma^2))`
with sigma = 1/3. It is not normalised to sum 1. This sigma makes the corner
coefficient e^-9 times the centre one, which is the ratio the 44-bit word
length was sized for. Other kernels, such as a weighted average with real
weights, only need a different `COEFS`.

## Stripe buffer

`stripe_buffer` behaves like a K x W shift register folded into K rows.
Every accepted word moves the whole stripe by one position, so the
newest K x K words are always in the right-most K columns, and no row
shuffling is needed. It is built as follows:

* The newest row is K registers.
* Each older row starts with a dual-port RAM of W - K words (`dp_sram`),
  followed by K-1 registers. The RAM's registered read port counts as the
  row's first window register.
* All RAMs share one pointer. On each shift it is both the read and the write
  address, and it then advances modulo W - K. The word read out is the one
  written W - K shifts earlier. With the read register, the path from the end
  of one row to the start of the next is W - K + 1 stages, so a whole row is
  exactly W stages.

Only K-1 RAMs are used. Words that leave the oldest row are never needed
again. For the default build the storage is 2 x 637 x 12 bits in RAM plus
9 x 12 register bits, against 640 x 480 x 8 bits for a frame buffer.

`win[r][c]` presents the window in image orientation: r = 0 is the oldest
row (top) and c = 0 the oldest column (left).

## Stream interface and timing

Top module: `mlsf_filter2d`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (valid flags, counters, RAM pointer only) |
| `in_valid` | in | 1 | `in_pix` holds a pixel this cycle |
| `in_sof` | in | 1 | this pixel is the first of a frame (only together with `in_valid`; an assertion checks this) |
| `in_pix` | in | M | unsigned pixel, raster order, rows of W pixels |
| `out_valid` | out | 1 | a result is present |
| `out_x`, `out_y` | out | XW, YW | output position (window centre) |
| `out_fp` | out | 32 | IEEE-754 single-precision result |

* The source may pause at any cycle by lowering `in_valid`. The coder and the
  stripe buffer then hold their contents; results already inside the filter
  stages still come out on time. There is no back-pressure: the filter always
  keeps up with one pixel per clock.
* `in_sof` restarts the column and row count. After reset, the first pixel is
  also taken as the start of a frame. The design does not need the frame
  height. The row counter is YW = 16 bits wide and saturates.
* Only windows that lie wholly inside the image produce results: columns and
  rows K-1 onwards of the newest pixel. A frame of W x H pixels gives
  (W-K+1) x (H-K+1) results at positions (1..W-2, 1..H-2) for K = 3. Windows
  that would wrap from the end of one row to the start of the next are
  suppressed.
* Latency: the result for the window completed by a pixel accepted in cycle t
  is valid in cycle t + 5. The stages are the coder ROM read (1), the stripe
  shift (1), the registered products (1), the registered window sum (1) and
  the normaliser (1).

## Module map

    mlsf_filter2d                 top
      memory_module               coder + stripe + position/valid tracking
        coeff_gen                 2^M x 2(n+1) ROM, registered read
        stripe_buffer             K rows, K-1 x dp_sram + K x K registers
          dp_sram                 1 write + 1 registered read port, read-before-write
      filtering_module            computes Q, three pipeline stages
        equiv_mult  (K*K)         F * pixel from the digit code
          premult_lut             2(n+1)-word table + mux bank
          adder_tree              n adders, ceil(log2(n+1)) deep
        adder_tree                K*K-input window sum
        fp32_normalizer           fixed point -> FP32, round to nearest even
    mlsf_pkg                      digit type, parts, coder, FP32 helpers, default kernel

Top-level parameters (defaults): `M = 8` pixel bits, `K = 3`, `W = 640`,
`LS = 44` table word bits, `YW = 16`, `EW = 8` and `FW = 23` (output exponent
and fraction bits, i.e. FP32), `COEFS` = 3x3 Gaussian, `XW = $clog2(W)`.
Derived values: n+1 = 6 parts, a 12-bit code and a 47-bit product. For the
default Gaussian, the window sum is 51 bits wide and Q = -35.

## Design choices beyond the original description

The architecture follows the published multiplier-less filter. The following
points are this implementation's own reading or choice:

* **Range.** The parts are computed with r = 2^m - 1 (255 for 8 bits), which
  gives the part 134.
* **Digit encoding and table choice.** The 2-bit digit encoding and the choice
  among equivalent digit strings (described above) are this design's own.
* **One table per kernel tap.** K*K tables, rather than one per distinct
  coefficient. This works for kernels that are not symmetric. A symmetric
  kernel could share tables between taps with equal coefficients.
* **Table words.** LS = 44 bits is the full two's-complement word, sign
  included, and the table words are rounded to nearest.
* **Default Gaussian.** The kernel uses sigma = 1/3 and is not normalised (see
  above).
* **Stripe buffer.** It uses K-1 RAMs, the RAM read register doubles as the
  first window register, and a single circular pointer addresses all RAMs.
* **Pipelining and interface.** The pipeline depth (3 stages in the filter,
  5 cycles in all), the `in_valid`/`in_sof` interface, the border policy
  (valid windows only), the rounding mode and the reset scope are all this
  design's choices.
* **Overflow and underflow.** The normaliser saturates overflow to infinity
  and flushes results below the FP32 normal range to zero. Neither can happen
  with 8-bit pixels and a kernel whose coefficients are normal FP32 numbers
  within a reasonable range.

Reduced-precision builds: `EW`/`FW` select a narrower IEEE-style result
format and `LS` a shorter table word. A half-precision build (`EW = 5`,
`FW = 10`, `LS = 32`) is tested end to end. A 24-bit format can be chosen the
same way, but no particular FP24 layout is assumed.

Not built:

* the conventional FP32 and Booth-multiplier filters, which are only reference
  points;
* custom ROM macros for an ASIC. The tables here are constant logic, and the
  stripe RAMs are plain arrays that synthesis maps to block RAM or to an SRAM
  macro.

## Accuracy

Apart from the output rounding, the only approximation is the rounding of
table words that are finer than 2^Q. A result can therefore differ from the
exactly rounded FP32 value of the true convolution by at most one FP32 ulp
plus 27 x 2^Q, since 54 table words each contribute at most half an LSB. For
the default Gaussian, 2^Q = 2^-35. The testbenches check every output against
a double-precision convolution with exactly this bound.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_coeff_gen` | all 256 codes decode to their pixel, match an independent coder and the example rows; 1-cycle latency |
| `tb_dp_sram` | random simultaneous read/write against a model, read-before-write |
| `tb_stripe_buffer` | 3x3/W=8 and 5x5/W=11 stripes: every window word after every shift, holding during pauses |
| `tb_memory_module` | window contents, centre coordinates, 2-cycle latency, counts per frame, frame restart |
| `tb_premult_lut` | every selected term for three coefficients, including a negative one, within half an LSB |
| `tb_equiv_mult` | F * q for all 256 pixels and three coefficients |
| `tb_fp32_normalizer` | bit-exact against an independent round-to-nearest-even conversion, ties and exponent carry; FP32 and FP16 |
| `tb_filtering_module` | Gaussian and a signed, asymmetric kernel on random windows; 3-cycle latency |
| `tb_mlsf_filter2d` | end to end at W = 16: three frames, pauses, an unfinished row before a frame start, two kernels and an FP16 build; counts pauses, suppressed wrap windows, frame starts, negative digits and uses of the largest part |
| `tb_mlsf_filter2d_full` | default build, one complete 640 x 480 frame: all 304,964 results, positions, latency and the one-result-per-pixel rate |
| `tb_mlsf_filter2d_wavg` | weighted-average kernel with real FP32 weights over a 640 x 12 frame |
| `tb_mlsf_filter2d_k5` | K = 5 over 20-pixel rows, signed binomial kernel, two frames with pauses |
| `tb_mlsf_filter2d_k25` | K = 25 over 640-pixel rows (24 row RAMs, 625 tables), one 640 x 27 frame; building it takes about 1.5 minutes |

The reference values come from `tb/tb_util_pkg.sv`, which shares no code with
the RTL. To run a testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/mlsf_pkg.sv tb/tb_util_pkg.sv tb/tb_mlsf_filter2d_full.sv \
        --top-module tb_mlsf_filter2d_full -o sim
    ./obj_dir/sim

The full-frame test runs in about ten seconds, including the build. To lint
the design:

    verilator --lint-only -Wall -y rtl rtl/mlsf_pkg.sv rtl/mlsf_filter2d.sv

To change the kernel, pass `COEFS` as a packed array of K*K FP32 bit patterns.
For other kernel sizes, set `K` and supply K*K coefficients. For other pixel
depths, set `M`: parts, code width and tables follow automatically.
