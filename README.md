# Sloppy arithmetic for low-power image processing

Image filters and image decoders can tolerate small errors in the least
significant bits of their arithmetic. This design trades that slack for
hardware. Adders drop the carries in their low bits. Multipliers simplify the
partial products of their low multiplier digits. Both units get shorter critical
paths and fewer gates. The cost is an error that is bounded, known in advance and
mostly small compared with the pixel values.

The RTL has two "sloppy" operators and two image-processing engines built on them:

* `sloppy_adder`: an adder whose K low bits are formed without carries.
* `r4_sloppy_mult_cs` / `r4_sloppy_mult`: a 12 x 12 two's-complement radix-4
  (Booth) multiplier with *sloppy rows* or *sloppy columns*.
* `image_filter`: a streaming 3x3 smoothing / sharpening / edge-detection filter
  for 256-pixel lines. All of its additions are sloppy, with K = 4.
* `idct8x8`: an 8x8 inverse DCT, as used in JPEG decoding. It runs on one
  multiply-accumulate unit (`mac_unit`) whose multiplier has two sloppy rows
  ("sloppy-row-2") and whose accumulation is exact.

`imprecise_imgproc_top` places the two engines side by side, together with a
stand-alone copy of the 12 x 12 multiplier (ports `mult_x`, `mult_y`,
`mult_p`), the operator characterised on its own. The three units share only
clock and reset.

The arithmetic follows the paper *Imprecise Arithmetic for Low Power Image
Processing*. The paper describes the adder and the partial-product generators at
gate level, so these modules follow it closely. For the multiply-accumulate unit,
the IDCT and the filters, the paper gives only what they compute. Their
structure, formats and interfaces are this design's own. Each case is listed
under "Where this design goes its own way" below.

## Sloppy addition

Take an N-bit unsigned adder and a position K. Below K, no carry is generated or
propagated:

    bit i < K  : s[i] = a[i] | b[i]          (no carry out of the bit)
    bit i >= K : ordinary carry-propagate addition, carry into bit K = 0

The carry chain now spans only N-K bits. The K low columns are single OR gates.

XOR would be the obvious choice for the low bits. It loses 2·2^i whenever both
operand bits are 1. OR loses only 2^i in that case, so the error is halved. The
result is never larger than the exact sum. For example, with N = 8 and K = 4:

    103 + 70 = 173 exact,  161 with XOR low bits,  167 with OR low bits

Over all 65 536 operand pairs, the mean error is exactly 3.75 with OR and 7.5
with XOR. The testbench checks both values exhaustively.

As a word-level formula, which is also how the testbenches model it:

    s = (((a >> K) + (b >> K)) << K) | ((a | b) mod 2^K)

Parameters: `N` (default 8), `K` (default 4), `OR_LOW` (1 = OR, 0 = XOR). With
K = 0 the unit is an exact adder. The output is N+1 bits wide and includes the
carry-out.

The upper part's carries come from `cla_carry_network`, a radix-4
carry-lookahead network. Going up, each level combines four groups into one
group generate/propagate pair (G = g3 | p3·g2 | p3·p2·g1 | p3·p2·p1·g0,
P = p3·p2·p1·p0). Going down, the carry into each group is spread to its four
sub-groups by the same lookahead equations. A W-bit carry therefore crosses
about 2·log4(W) two-level stages. Widths that are not a power of four are
padded with g = p = 0.

## Sloppy radix-4 multiplication

A radix-4 multiplier recodes the multiplier `y` into N/2 digits. Row k of the
partial-product array is generated from the bits {y[2k+1], y[2k], y[2k-1]}. Each
row is then one of 0, ±x or ±2x, shifted left by 2k. The rows are reduced without
carry propagation to two vectors, and a final adder produces the product. Only
the first step, recoding and partial-product generation, is made imprecise.

### One row: `booth_rec_ppgen`

A row is N+1 bits. Its MSB is the sign, and its value is `signed(pp) + neg_out`.

* **Error-free (Booth) row.** The recoder produces:
  * `one = y2k ^ y2k-1`
  * `two = (y2k+1 & ~y2k & ~y2k-1) | (~y2k+1 & y2k & y2k-1)`
  * `neg = y2k+1`

  Each bit is `pp[j] = ((one & x[j]) | (two & x[j-1])) ^ neg`. The correction
  bit `neg` completes the two's complement of negative rows.
* **Sloppy row.** The digit (y2k+1, y2k) is read as an unsigned radix-4 digit.
  The row is 2x for any non-zero digit and 0 otherwise:
  `pp[j] = (y2k+1 | y2k) & x[j-1]`, `pp[0] = 0`. The row has no recoder, no
  inversion and no correction bit. y2k-1 is not used.

      digit  exact  sloppy  error
        0      0      0       0
        1      x     2x      +x
        2     2x     2x       0
        3     3x     2x      -x

  The mean error over the four digits is zero. When a digit 1 and a digit 3 lie in
  adjacent rows, their errors partly cancel.
* **Sloppy columns.** A row can also be a Booth row except in its lowest
  `SLOPPY_BITS` bits, which are generated the sloppy way. The correction bit lies
  in bit 0, inside the sloppy part, so it is dropped.

### The array: `r4_sloppy_mult_cs`

`SLOPPY_ROWS = k` makes the k lowest rows sloppy. `SLOPPY_COLS = t` makes the t
lowest product columns sloppy, so row k gets max(0, t − 2k) sloppy bits. With
t = 6, rows 0, 1 and 2 have 6, 4 and 2 sloppy bits. Both parameters at 0 give the
exact radix-4 multiplier.

A Booth row normally borrows y[2k-1] from the row below. A sloppy row, however,
reads its digit as unsigned, so it has already counted y[2k-1] with its full
weight. The first Booth row above the sloppy rows is therefore fed y[2k-1] = 0.
With this rule the multiplier is exact whenever every sloppy digit is 0 or 2. It
also reproduces the classic worked example: 21 x 45 gives 882 with two sloppy
rows, against 945 exact.

Each row is sign-extended to `OUT_W` bits. The rows and one vector of correction
bits go through a chain of 3:2 carry-save adders. The outputs `ps` and `pc` sum
(mod 2^OUT_W) to the approximate product. `r4_sloppy_mult` adds the final exact
adder and returns the 2N-bit product.

Defaults: N = 12, SLOPPY_ROWS = 2, SLOPPY_COLS = 0 (the IDCT configuration).
Other schemes are set by parameter: 1 to 3 sloppy rows, or 2 to 8 sloppy columns.

## Multiply-accumulate and the 8x8 IDCT

`mac_unit` accepts one product per cycle (`en`). The product arrives from the
multiplier array already in carry-save form. It is merged with the carry-save
accumulator by two rows of 3:2 adders, so accumulation never propagates a carry.
`clr` with `en` starts a new sum. `acc`, the exact sum of the two accumulator
registers, is valid one cycle after the last product. Only the multiplier is
imprecise: a sloppy accumulator would mix the two error sources. The accumulator
is 30 bits (2N + 6 guard bits).

`idct8x8` computes the inverse transform directly, in two passes over one MAC:

    pass 1:  G[i][v] = Σ_u A[i][u] · F[u][v]
    pass 2:  f[i][j] = Σ_v A[j][v] · G[i][v],  pixel = clamp(f + 128, 0, 255)

Here `A[i][u] = c(u)/2 · cos((2i+1)uπ/16)`, with c(0) = 1/√2 and c(u > 0) = 1,
stored as 12-bit Q11 constants. `sloppy_pkg::idct_coef` computes them from
`round(1024·cos(kπ/16))`, k = 0..8. The cosine constant is the multiplicand and
the data word is the multiplier, whose low digits are the sloppy ones. G is kept
with two fractional bits and saturated to 12 bits, so both passes are 12 x 12
multiplications.

Using the block:

1. Write the 64 coefficients, address 8u + v, while the block is idle.
2. Pulse `start`.
3. `done` pulses 1026 clock edges later (2 passes x 64 outputs x 8 products,
   plus 2). Each result is written one cycle after its last product, while the
   next output's first product is already entering the MAC.
4. Read the 64 pixels combinationally through `out_addr` (address 8i + j).

## Streaming 3x3 filter

`image_filter` takes one pixel per cycle at most (`in_valid`), in raster order.
`in_sof` marks the first pixel of a frame.

* Two line buffers of `IMG_W` pixels (default 256) and the incoming pixel supply
  one new window column per pixel to a 3x3 window register.
* A window is complete from row 2, column 2 onwards. Its result appears on
  `out_pix` / `out_valid` two cycles after the pixel that completed it.
* Border pixels produce no output, so an H x W frame gives (H−2) x (W−2)
  results.
* `mode` can change at any pixel. It applies to the windows that reach the
  kernel from then on.

`filter3x3_kernel` sums nine shifted terms with a tree of eight K = 4 sloppy
adders, in the fixed order ((s0+s1)+(s2+s3)) + ((s4+s5)+(s6+s7)), then + s8:

| mode | mask | output |
|---|---|---|
| `FILT_SMOOTH` | 1 2 1 / 2 4 2 / 1 2 1 | sum >> 4 |
| `FILT_SHARPEN` | 0 −1 0 / −1 5 −1 / 0 −1 0 | clamp(5c − sum, 0, 255); 5c = (c<<2) + c on a ninth sloppy adder |
| `FILT_EDGE` | 8-neighbour Laplacian | min(\|8c − sum\|, 255) |
| `FILT_PASS` | — | centre pixel |

The sloppy adder is meant for unsigned operands. Negative mask weights are
therefore handled by summing the negative part on its own and subtracting it
exactly at the end.

## Files

| file | contents |
|---|---|
| `rtl/sloppy_pkg.sv` | filter-mode enum, IDCT cosine constants |
| `rtl/sloppy_adder.sv` | sloppy adder |
| `rtl/cla_carry_network.sv` | radix-4 carry-lookahead carry network |
| `rtl/booth_rec_ppgen.sv` | one radix-4 recoder + partial-product row |
| `rtl/r4_sloppy_mult_cs.sv` | multiplier array, carry-save output |
| `rtl/r4_sloppy_mult.sv` | array + exact final adder |
| `rtl/mac_unit.sv` | carry-save multiply-accumulate |
| `rtl/idct8x8.sv` | 8x8 IDCT engine |
| `rtl/filter3x3_kernel.sv` | combinational 3x3 sloppy filter kernel |
| `rtl/image_filter.sv` | streaming filter with line buffers |
| `rtl/imprecise_imgproc_top.sv` | top level |
| `tb/sloppy_ref_pkg.sv` | word-level reference models used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_top` for the whole design |

## Simulating

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`. For example, to run the whole design at its
default size:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/sloppy_pkg.sv tb/sloppy_ref_pkg.sv tb/tb_top.sv --top-module tb_top
    ./obj_dir/Vtb_top

Replace `tb_top` with any other testbench to test one block. All testbenches
finish in a few seconds.

What the testbenches establish:

* **`tb_sloppy_adder`:** all 65 536 operand pairs, for OR, XOR and exact
  variants. Mean errors are exactly 3.75 (OR) and 7.5 (XOR).
* **`tb_booth_rec_ppgen`, `tb_r4_sloppy_mult`, `tb_r4_sloppy_mult_full`:**
  every row form, and the exact, 1/2/3-sloppy-row and 2/4/6/8-sloppy-column
  multipliers, against an integer model on corners and 20 000 random pairs. The
  error table above is checked product by product.
* **`tb_mac_unit`:** 2000 random accumulation sequences with idle cycles.
* **`tb_idct8x8`:** bit-exact against a fixed-point model built from `$cos`. The
  exact configuration is within ±2 of the real-valued inverse DCT. The cycle
  count is checked. On the test blocks, sloppy-row-2 changes pixels by 1.0 on
  average.
* **`tb_adder16_sweep`:** 16-bit adders with K = 4, 8 and 12. The mean error
  matches (2^K − 1)/4, i.e. 3.75, 63.75 and 1023.75, within sampling noise.
* **`tb_r4_sloppy_mult`** also reports the mean absolute error over random
  12-bit operands. Values are about 505, 2300 and 9400 for 1, 2 and 3 sloppy
  rows, and 1.2, 8.5, 45 and 216 for 2, 4, 6 and 8 sloppy columns. A sloppy row
  errs by ±x, so its error scales with the multiplicand.
* **`tb_idct_image`:** decodes a synthetic 256 x 256 image block by block
  (1024 blocks, about 1.1 M cycles). Every pixel is checked against the model.
  The decoded image has a PSNR of about 38 dB with sloppy-row-2, against 58 dB
  with an exact multiplier.
* **`tb_image_filter`, `tb_filter3x3_kernel`:** output order, latency and
  count, and kernel values in all modes. `tb_image_filter` also runs a K = 6
  filter, the variant suggested for edge detection.
* **`tb_top`:** three full 256 x 256 frames, one per mode, while six IDCT blocks
  and 5000 stand-alone products run. It counts mode switches, inexact
  products, sloppy-induced filter errors, saturations, IDCT pixels changed by
  the sloppy multiplier, and IDCT clamping, and requires each to occur. On its synthetic test image, the max / mean error against exact
  arithmetic was about 7 / 3.5 (smoothing), 45 / 9.5 (sharpening) and 90 / 28
  (edge detection). These numbers depend on the masks and the image (see below).

## Where this design goes its own way

These points are not fixed by the paper:

* The filter masks, the output scaling and clamping, and the exact final
  subtraction for negative weights. The paper says only that the filters use
  additions and shifts with K = 4 sloppy adders. Its reported errors (max around
  26 / 60 / 64 for smoothing / sharpening / edge detection on photographs) are
  therefore not expected to match this design's numbers.
* The streaming structure of the filter and its border rule.
* The first Booth row above sloppy rows is fed y[2k-1] = 0.
* In sloppy-column rows, the correction bit is dropped.
* Rows are sign-extended plainly. Reduction uses a linear 3:2 chain, not a tree.
* The MAC's accumulator width, its 4:2 carry-save organisation and its
  handshake. The paper fixes only that accumulation is carry-save and exact.
* The IDCT organisation: row-column order, fixed-point formats, buffers and
  interface. Which operand is recoded is also a choice made here.
* Resets are asynchronous and active low, and cover control state only. Data
  buffers are not reset.
* Test images are synthetic and generated by the testbenches. The IDCT is fed
  unquantised DCT coefficients. Error figures here are therefore measured on
  different inputs from the published ones.

Not built: the truncated adders and multipliers, and the radix-2 multipliers.
The paper only compares against them. The power, area and delay figures come from
gate-level synthesis and cannot be reproduced by RTL simulation.
