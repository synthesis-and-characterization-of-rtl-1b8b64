# Approximate arithmetic in place of a timing guard-band

A chip that gets hot, or gets old, gets slow: transistor delay grows with
temperature and with wear-out. A design clocked for its fresh 25 °C delay will
then fail timing, so designers normally add a guard-band, a margin in the
clock period that is paid for all the time. This design takes the other
route. It accepts a small, bounded arithmetic error instead. Each accurate
adder or multiplier on the critical path is replaced by an approximate circuit
whose shorter logic depth is just enough to absorb the extra delay at the hot
corner (70 °C here). The clock stays at the fresh, accurate design's
frequency and no guard-band is needed.

Two parts make up the RTL:

* **A library of 16-bit approximate adders and multipliers.** Each circuit
  has one precision parameter (`K`, `T`, `M`, ...) that trades error for
  delay.
* **Three image-processing accelerators built from that library.** The
  multiplier limits the clock in all three, so it is the part that gets
  approximated:

| accelerator | multipliers | default circuit (70 °C, high-performance) |
|---|---|---|
| `idct_8x8`: 8x8 inverse DCT | 8 signed | TBM-7, radix-4 Booth with 7 operand LSBs truncated |
| `img_smooth`: 5x5 Gaussian smoothing | 25 unsigned | TAM1-16, approximate multiplier with error recovery and 16 truncated columns |
| `img_sharpen`: 5x5 unsharp masking | 25 unsigned | TAM1-16 |

`approx_image_top` places the three accelerators and the whole library side
by side. They share only clock and reset.

The low-power configuration uses the same RTL, except that smoothing and
sharpening use TAM2-16 (`SCHEME = 2`).

Delay, power and area can only be measured with a standard-cell library and
an aging/temperature-aware timing flow. That flow is outside the RTL. What
the RTL fixes is the function of each circuit, and therefore its error and
the output image quality. Those are what the testbenches check.

## The approximate multipliers

These are the part that decides output quality, and the least obvious part
of the design. All are combinational, with a 16x16 → 32-bit product.
`umult_sel` (unsigned) and `smult_sel` (signed) pick one through a `mult_kind_e`
parameter from `approx_pkg`. The accelerators instantiate their multipliers
only through these selectors, so any accelerator can be rebuilt with another
multiplier by changing one parameter. `MK_ACC` gives the accurate `*`.

### AM1, AM2, TAM1, TAM2 (`am_mult`)

The 16 partial-product rows `a * b[j] << j` are reduced in a binary tree of
four levels. Each node of the tree is a *carry-free* adder. For inputs `x`
and `y` it produces

    S = (x ^ y) | ((x & y) << 1)
    E = (x ^ y) & ((x & y) << 1)

`S` needs no carry chain. The identity `x + y = S + E` is exact, so the error
of the node is exactly the vector `E` it drops.

The product is the tree's final `S`, plus a *recovery* term that puts back
an approximation of all the dropped `E` vectors. The recovery term covers
only the `M` most significant product bits, which is where errors are
expensive:

* **AM1 (`SCHEME = 1`).** All `E` vectors are ORed into one vector, which is
  added once. It is cheap. It under-counts when two `E` vectors have a one
  in the same column.
* **AM2 (`SCHEME = 2`).** The `E` vectors of each tree level are ORed
  together, and the per-level vectors are added accurately. It costs more
  and loses less.

With `TCOLS > 0`, the partial-product bits in the `TCOLS` lowest columns are
never generated. These are the truncated variants TAM1 and TAM2; the default
is `TCOLS = 16`.

Every choice of `M`, `SCHEME` and `TCOLS` gives a product that is never
above the exact one. `tb_approx_mults` checks this bound on every vector.

Mean relative error distance (MRED) on uniform random operands, as measured
by `tb_approx_mults`:

| circuit | MRED |
|---|---|
| ICM | 0.0032 |
| TAM2-16 | 0.0032 |
| TAM1-16 | 0.0103 |
| TruM-7 | 0.0165 |

### Booth multipliers (`tbm_mult`, `bbm_mult`, helper `booth4_rows`)

Both are signed radix-4 Booth multipliers. `booth4_rows` makes the nine
recoded rows `{0, ±a, ±2a} << 2i` of a 16-bit multiplier, with the
two's-complement `+1` of each negated row kept as a separate bit.

* **TBM-T** zeroes the `T` least significant bits of both operands before
  recoding.
* **BBM-VBL** recodes the exact operands. It then drops every partial-product
  bit below column `VBL`, the vertical break line, including the `+1`
  negation bits that fall there.

### Other multipliers

* **`trum_mult` (TruM-T).** Drops the `T` least significant bits of each
  operand, then multiplies accurately.
* **`ppam_mult` (PPAM).** A partial-product perforation multiplier: rows
  `J .. J+K-1` of the partial-product array are left out.
* **`udm_mult` (UDM).** Built recursively from 2x2 blocks that return 7 for
  3x3, so the 2x2 block needs three output bits instead of four.
* **`icm_mult` (ICM).** Reduces the partial-product rows in a Wallace-style
  tree of approximate 4:2 counters. The rows are taken four at a time, so
  16 rows become 8, then 4, then 2, and one accurate adder sums the last
  two. Each counter returns a parity bit and a carry bit (weight 2) that is
  set when at least two of its four inputs are 1. Counts 0 to 3 are
  therefore exact, and the count 4 comes out as 2. The product is never
  above the exact one.

## The approximate adders

All adders take 16-bit `a` and `b` and return a 17-bit `sum`. They are
combinational and parameterized by a block or window size `K`. When `K`
does not divide 16, the operands are zero-extended to whole blocks inside
the module.

**Adders that drop or simplify low bits:**

* **`loa_adder` (LOA-10).** The lower `K` bits are ORed, and the AND of the
  top lower-part pair is the carry into the accurate upper part.
* **`trua_adder` (TruA-9).** The lower `K` sum bits are zero.

**Adders that cut the carry chain into independent segments:**

* **`esa_adder` (ESA-6).** Each `K`-bit block is an accurate adder with no
  carry in.
* **`etaii_adder` (ETAII-3).** Each block's carry-in comes from a carry
  generator over the previous block only.
* **`scsa_adder` (SCSA-3).** Same carry rule as ETAII. Each block computes
  carry-0 and carry-1 sums and selects one with that carry, so its function
  equals ETAII's; the testbench checks this.
* **`aca_adder` (ACA-4).** The carry into every sum bit comes from its own
  `K`-bit sub-adder over the `K` bits just below it, with carry-in 0.
* **`acaa_adder` (ACAA-3).** Overlapping `2K`-bit sub-adders, each giving
  its upper `K` bits.

**Speculative-carry adders.** Each block computes carry-0 and carry-1 sums.
The block's carry is then speculated from a short look-back:

* **`csa_adder` (CSA-5).** Uses the previous block's generate. If that block
  fully propagates, it uses the block below it.
* **`gcsa_adder` (GCSA-6).** Selected by the block's own propagate signal:
  a 2K-bit look-back when the block fully propagates, otherwise K bits.
* **`cspa_adder` (CSPA-5).** A carry predictor over the upper `ceil(K/2)`
  bits of the previous block.
* **`cca_adder` (CCA-6).** The previous block's generate, forced to 1 when
  both the previous block and the current block fully propagate.

`approx_arith_lib` holds one instance of each adder and multiplier, all at
the precision that fits the 70 °C corner. The top exposes them on
`lib_a`/`lib_b` → `lib_sum[0..10]` and `lib_prod[0..8]`. The sums follow
the order of the list above. The products are, in index order: TruM-7,
AM1-11, TAM1-16, TAM2-16, PPAM, UDM, TBM-7, BBM-8 and ICM.

## The IDCT accelerator (`idct_8x8`)

`idct_8x8` computes

    f[m][n] = Σu Σv c[u] c[v] F[u][v] cos((2m+1)uπ/16) cos((2n+1)vπ/16)

with `c[0] = 1` and `c[k] = 2` otherwise, the inverse of a DCT scaled by
1/64. It works in two 1-D passes over a 64-word block buffer:

* the row pass computes `T[u][n] = Σv C[v][n] F[u][v]`;
* the column pass computes `f[m][n] = Σu C[u][m] T[u][n]`.

Eight multiplier slots and an adder tree give one 1-D result per cycle.

**Number formats.**

* The cosine constants `C[k][x] = c[k] cos((2x+1)kπ/16)` are signed Q1.14.
* Coefficients and the intermediate `T` are signed Q8.7 (16 bits, range
  ±256), with saturation after the row pass.
* Output pixels are rounded and clamped to 0..255.

Q8.7 rather than a wider integer part matters for TBM-7. Truncating 7 LSBs
of an operand costs far less when the data fills the top of the 16-bit word:
with 6 fraction bits (Q9.6) instead of 7, the TBM-7 IDCT reaches only
about 25 dB.

**Interface and timing.**

* `in_ready` is high while the buffer is being filled.
* 64 coefficients are taken in u-major order.
* The row pass takes 64 cycles and the column pass 64 more.
* The column pass emits one pixel per cycle on `out_valid`, in m-major
  order, with `out_last` on the 64th.
* The first pixel comes 66 cycles after the last coefficient.
* A block takes 192 cycles when the input never stalls.
* Holding `in_valid` low stalls the load phase. The output has no
  back-pressure.

## The filter accelerators (`img_smooth`, `img_sharpen`, `win5x5`)

Both filters take one 8-bit pixel per `in_valid` cycle in raster order.

`win5x5` keeps four line buffers of `IMG_W` pixels and a 5x5 register
window. It also tracks the column and row of the newest pixel.

**Smoothing** computes `Y = (1/960) Σ G·I` with the kernel

    16 16  16 16 16
    16 64  64 64 16
    16 64 192 64 16
    16 64  64 64 16
    16 16  16 16 16

**Sharpening** computes `S = 2I − Y`. Here `Y` uses the kernel with rows
`16 64 112 64 16 / 64 256 416 256 64 / 112 416 656 416 112 / ...`
(sum 4368), and `S` is clamped to 0..255.

**Datapath.** 25 multiplier slots, one per tap, feed an accurate adder tree.
Each multiplier gets `pixel << 8` and the integer weight. Placing the pixel
at the top of the 16-bit operand means that truncating multipliers lose
low-order product bits rather than pixel bits.

**Division.** Dividing by `D = 256 · (kernel sum)` is a multiply by
`R = ceil(2^SH / D)`, where SH is 44 for smoothing and 49 for sharpening.
`SH` is large enough that `x · (R·D − 2^SH) < 2^SH` for every reachable sum
`x`. The result is therefore exactly `floor((x + D/2) / D)`.

**Output.** An output appears two cycles after the pixel that completes its
window, with `out_x`/`out_y`. Only pixels whose whole 5x5 window is inside
the frame are produced: `(IMG_W−4)·(IMG_H−4)` per frame. There is no
back-pressure.

## Where this design departs from the document it follows, and what it assumes

* **Not built.** These circuits are not included:
  * the adders and multipliers produced by genetic programming, which are
    evolved netlists from an external library;
  * the approximate-compressor multipliers (ACM), whose compressor designs
    and placement schemes are only cited.
* **ICM tree.** The counter function follows the published description. The row grouping of
  the tree is this design's simplest choice.
* **Adders given only by name.** For GCSA, CCA and the CSPA carry predictor,
  the document gives a one-sentence description. The exact select rules above
  are this design's reading of it.
* **Adder error rates.** For random 16-bit inputs:
  * CCA-6 errs on 0.85% of inputs; the published figure is 1.49%.
  * ACA-4 errs on 17.7%; the published figure is 16.65%. A `K`-bit window
    that ends at the sum bit, the other possible reading of "sub-adders of
    length k", would give 35.8%. The carry is therefore taken from the `K`
    bits below the sum bit.
  * CSA-5 errs on 0.07%; the published figure is 0.62%. Under the skip rule
    an error needs two fully propagating blocks in a row.
  * CSPA-5 errs on 16%; the published figure is 11.3%. The predictor size
    is this design's guess.
* **Multiplier details.** These are concrete choices made where the
  description is brief:
  * the AM tree shape;
  * the two recovery accumulation rules;
  * `TCOLS = 16` for TAM.

  With them, TruM-2 reproduces the published mean squared error exactly.
  PPAM, TruM and the AM2 variants land close to the published MRED values;
  for example PPAM-J0K13 gives 0.2446 against 0.2460. The AM1 variants lose
  more than published: TAM1-16 gives 0.0103 against 0.0065, and AM1-15
  gives 0.0087 against 0.0038. Their single OR accumulation is evidently
  coarser than the published one, whose details are not given.
* **IDCT.** The row-column organisation, the number formats, saturation,
  clamping and the handshake are this design's choices.
  With these formats, BBM-8 (`MKIND = MK_BBM`) reconstructs the test blocks
  without error: its dropped columns lie below the product bits the datapath
  keeps. The published figure is 31.6 dB, which points to a different,
  unstated fixed-point format. TBM-7 is not affected in the same way,
  because it truncates operand bits rather than product columns.
* **Filters.**
  * The kernel index in one equation is read as `G(i+3, j+3)`.
  * The following are this design's own: operand alignment, border handling
    (interior pixels only), reciprocal division with round-half-up, clamping
    of the sharpened pixel, and the 512x512 frame default.
* **Measured quality.** The testbenches print image quality against the
  accurate datapath. The test images are random 20x12 frames with flat
  patches, not the published photographs. Smoothing and the IDCT land close
  to the published figures:

  | accelerator and multiplier | measured | published |
  |---|---|---|
  | smoothing, TAM1-16 | 37.30 dB | 37.27 dB |
  | smoothing, TAM2-16 (low power) | 37.30 dB | 37.17 dB |
  | smoothing, TruM-7 | 5.7 dB | 6.8 dB |
  | smoothing, TruM-5 (low power) | 16.4 dB | 17.1 dB |
  | sharpening, TAM1-16 | 56.7 dB | 45.6 dB |
  | sharpening, TruM-7 | 25.2 dB | 18.6 dB |
  | sharpening, TruM-5 (low power) | 43.1 dB | 35.6 dB |
  | IDCT, TBM-7, random blocks | 30.4 dB | 30.2 dB |

  Sharpening scores higher here than in the published results, which
  average ten photographs. The ranking of the multipliers is the same. The
  test frames are small and synthetic, so read the sharpening figures as a
  ranking, not as a prediction for real images.

  The TruM-7 result shows why TruM-7 was rejected for the filters even
  though its delay is best.
* **Timing figures.** Delay, power and area are not modelled.

## Verification

Each testbench is self-checking, has a watchdog, and ends with a
`TB_RESULT checks=... failures=...` line.

* **`tb_approx_adders`.** Compares every adder with an independent
  bit-level model on random and corner vectors. It does this at two sets of
  precisions: the high-performance defaults, and the low-power set (LOA-6,
  TruA-5, ESA-8, ETAII-6, SCSA-6, ACA-8, ACAA-6, CSA-5, GCSA-6, CSPA-6,
  CCA-6). It also checks that SCSA equals ETAII and that `a + 0` is exact
  where the scheme guarantees it. It prints each adder's error rate. Most
  land within a fraction of the published rates, for example ESA-8 at 49.4%
  against 49.8%; the exceptions are listed above.
* **`tb_approx_mults`.** Checks every multiplier against a model, checks
  the bound `p ≤ a·b` for the AM family, and prints error statistics.
* **`tb_idct_8x8`.** Checks three instances:
  * the accurate one, against a floating-point IDCT (±1);
  * the TBM-7 one, for PSNR ≥ 28 dB and worst error ≤ 80;
  * the BBM-8 one, for PSNR ≥ 28 dB.

  It also checks the 66-cycle latency, input stalls, saturation and both
  output clamps.
* **`tb_img_smooth`, `tb_img_sharpen`.** Run 20x12 frames through five
  instances: accurate, TAM1-16, TruM-7, and the low-power TAM2-16 and
  TruM-5.
  * The accurate instance must match a reference model exactly, including
    output positions and timing.
  * The TAM1-16 and TAM2-16 instances must stay within a PSNR and
    worst-error bound.
* **`tb_approx_image_top`.** Runs the top at its default parameters
  (512x512 frames) end to end. It drives three IDCT blocks, one full
  512x512 frame through both filters at once, and random library vectors,
  and checks each output stream. It also counts stalls,
  clamps, saturation, frame wrap and library approximation events; every
  one must occur. It takes a few seconds in Verilator.

**Running a test with plain Verilator (5.x).** From the repository root:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/approx_pkg.sv tb/tb_approx_image_top.sv \
        --top-module tb_approx_image_top -o sim
    ./obj_dir/sim

Use the same pattern for any other testbench: change the `tb/` file and the
top-module name. `approx_pkg.sv` must come first.

**Changing the design.** To try another multiplier, change `MKIND` and its
precision parameters on an accelerator (`T`, `M`, `SCHEME`, `TCOLS`, `VBL`).
For example, `MKIND = MK_TRUM, T = 7` turns the smoothing filter into the
TruM-7 version.
