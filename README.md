# 8x8 2-D DCT processor with carry look-ahead / carry-save arithmetic

This is a block transform engine for JPEG-style image compression. An image
is cut into 8x8 pixel blocks. The processor turns each block into 64 DCT
coefficients and can divide them by the JPEG quantisation table (the
encoder). In the other direction it multiplies quantised coefficients back
by the table and transforms them into pixels (the decoder). Both directions
share one datapath. All operands are 16-bit two's-complement words. The
arithmetic is built from a small set of fast units:

* a 4-bit carry look-ahead (CLA) block,
* a 16-bit adder made of cascaded CLA blocks,
* a subtractor that adds the two's complement of its second operand,
* a multiplier that reduces its partial products with a chain of 3-2
  (carry-save) adders and finishes with a CLA adder.

The design follows a published description of an FPGA DCT chip with an
"enhanced ALU". That description gives the arithmetic units in detail, but
says little about the transform datapath. The datapath here (eight
multiply-accumulate lanes, two block stores, a five-phase sequencer) is this
design's own. The section [Departures and open points](#departures-and-open-points)
lists where it differs from the original.

## The transform

The 2-D DCT used here is the orthonormal DCT-II:

    Z = M X M^T           (forward, X = 8x8 pixels, Z = coefficients)
    X = M^T Z M           (inverse)
    M[k][n] = a(k) cos((2n+1) k pi / 16),  a(0) = 1/sqrt(8), a(k>0) = 1/2

A flat block of value v gives DC = 8v and 63 zero AC terms. The inverse is
the exact inverse of the forward transform. The original design computes the
same coefficients through a 2-D FFT. This design evaluates the two matrix
products directly, because that needs only the adder and multiplier
described above.

The 64 entries of M take only eight distinct magnitudes:
`0.5*cos(j*pi/16)` for j = 0..7. They are stored in Q14 format, so
8192 = 0.5. The table in `dct_pkg` keeps those eight numbers, and
`dct_pkg::dct_matrix` derives every entry from them by the symmetries of the
cosine. `a(0) = 1/sqrt(8)` equals `0.5*cos(pi/4)`, so the DC row uses the
j = 4 entry.

## How a block flows through the datapath

This is the part that takes the most care to follow. There are two 8x8 block
stores (`block_buffer`):

* **A** (the input block, instance `u_in_block`) receives the input rows and
  later holds the result.
* **B** (`u_mid_block`) holds the row-pass result.

Eight lanes (`dct_mac_lane`) each compute one inner product of 8 terms. In
every working cycle one element of a store is broadcast to all eight lanes,
together with eight different cosine entries, one per lane.

| phase | cycles | what happens |
|-------|--------|--------------|
| LOAD  | 8 accepted rows | `in_ready`=1; each `in_valid` cycle writes row `r` of A (de-quantised first when decoding with `quant_en`) |
| ROW   | 64 | for r = 0..7, n = 0..7: lanes get A[r][n] and M[k][n] (forward) or M[n][k] (inverse); lane k ends with row r, column k of the row-pass result, written as **row** r of B |
| COL   | 64 | for j = 0..7, n = 0..7: lanes get B[n][j] and the same cosine entries; lane k ends with element [k][j] of the result, written as **column** j of A (quantised first when encoding with `quant_en`) |
| DRAIN | 1  | write-back of the last column |
| OUT   | 8  | `out_valid`=1, row 0..7 of A on `dout` |

Points that are easy to miss:

* **Write-back lags by one cycle.** A lane's sum is complete in the cycle
  after its 8th term. In that same cycle the lane already takes the first term
  of the next sum: `clear` makes the accumulator load the product instead of
  adding it. The controller therefore registers the write-back signals
  (`wb_valid`, `wb_is_col`, `wb_idx`). The lane's output scaling is selected
  by `wb_is_col`, not by the current phase. This matters because the last
  row-pass write-back happens in the first column-pass cycle.
* **No transpose memory.** The row pass writes rows of B, and the column
  pass reads B by column (element B[n][j]). The column pass writes its
  results back into A as columns, so A ends up holding the final block in
  row order.
* **Inverse = transposed coefficients.** The inverse transform only swaps
  the cosine ROM's indices. The data movement is identical.
* **Mode per block.** `dir` and `quant_en` are taken with the first row of a
  block and held for that block.

Timing: with rows offered back to back, one block takes 145 cycles, and the
first output row comes 130 cycles after the last input row was accepted.
`in_valid` is ignored outside LOAD. The output has no back-pressure.

## Fixed-point arithmetic

| quantity | format |
|----------|--------|
| pixels, coefficients, stores, `din`/`dout` | 16-bit signed integer |
| cosine entries | 16-bit signed, Q14 |
| products and accumulator | 32-bit signed |
| row-pass result (store B) | 16-bit signed, 2 fraction bits: `(acc + 2^11) >>> 12` |
| column-pass result | 16-bit signed integer: `(acc + 2^15) >>> 16` |

Both shifts round half up and saturate to the 16-bit range. For 8-bit pixels
the forward result is within 1 of the exact real-valued DCT. A forward then
inverse round trip returns the pixels within 2. Store B saturates when
inverse-transforming coefficient blocks whose row sums exceed about ±8000,
far outside what quantised image data produce.

## The arithmetic units

* **`cla4`**: `g = a & b`, `p = a | b`. Every carry is expanded from the
  carry-in:
  `c1 = g0 + p0 cin`, `c2 = g1 + p1 g0 + p1 p0 cin`, and so on up to the
  carry-out. Sum = `a ^ b ^ c`. The block generate and propagate are exposed
  too, but nothing uses them yet.
* **`cla_adder`** (WIDTH = 16, a multiple of 4): a cascade of `cla4`
  slices. Carries look ahead inside a slice and ripple between slices.
* **`cla_subtractor`**: `a + ~b + 1`. The +1 is the adder's carry-in. It
  outputs no-borrow (the carry-out) and a signed overflow flag.
* **`fast_multiplier`** (signed WIDTH x WIDTH, WIDTH even):
  * Summand i is the sign-extended multiplicand shifted by i, gated by
    multiplier bit i.
  * The sign bit of the multiplier weighs −2^(WIDTH−1). Its summand is
    therefore the inverted shifted multiplicand, plus one extra "+1" summand.
  * A chain of WIDTH−1 3-2 stages folds each new summand into a running
    sum/carry pair.
  * A 2·WIDTH-bit `cla_adder` adds the last pair.
* **`alu`**: the three units side by side. `op` (`ALU_ADD`, `ALU_SUB`,
  `ALU_MUL`) selects the result. The result is 2·WIDTH bits wide: the exact
  sign-extended sum or difference, or the full product. `overflow` flags an
  add/sub result that does not fit WIDTH bits.
* **`dct_mac_lane`**: an `alu` in multiply mode feeding a 32-bit
  `cla_adder` accumulator, followed by the rounding/saturating output shift.

## Quantisation

`quantizer` uses the JPEG luminance table (ITU-T T.81, Annex K.1). Division
is replaced by multiplication with `R = round(2^16/Q)`:

    quantise:     q = sign(v) * ((|v| * R + 2^15) >> 16)
    de-quantise:  v = q * Q, saturated to 16 bits

Both operations use one 18-bit `fast_multiplier`: 18 bits so that |−32768|
is a positive operand. The top has eight quantisers. During LOAD they
de-quantise the incoming row (table row = input row). Afterwards they
quantise the column write-back (table row = lane, column = `wb_idx`). Within
about |v|/2^16 of a rounding boundary, the result can differ by one step
from exact rounding of v/Q.

## Interface of `dct2d_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `dir` | in | `dct_dir_e` | `DCT_FORWARD` or `DCT_INVERSE` |
| `quant_en` | in | 1 | quantise after the forward transform / de-quantise before the inverse |
| `in_valid`, `in_ready` | in/out | 1 | a row is transferred when both are high |
| `din[0:7]` | in | 8 x 16 signed | one block row, element 0 = column 0 |
| `out_valid` | out | 1 | high for 8 consecutive cycles per block |
| `dout[0:7]` | out | 8 x 16 signed | one result row, rows 0..7 in order |
| `block_done` | out | 1 | with the last output row |

Forward input is raw pixel values. No level shift by 128 is applied; shift
the pixels yourself if you want the JPEG convention.

## Files

`rtl/`:

* `dct_pkg.sv`: types, formats, cosine and JPEG tables.
* `cla4.sv`, `cla_adder.sv`, `cla_subtractor.sv`, `fast_multiplier.sv`,
  `alu.sv`: arithmetic.
* `dct_mac_lane.sv`, `dct_coef_rom.sv`, `block_buffer.sv`, `quantizer.sv`,
  `dct_controller.sv`: datapath and control.
* `dct2d_top.sv`: the processor.

`tb/` has one self-checking testbench per module (`tb_<module>.sv`) plus
`tb_image_workload.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_dct2d_top` runs the processor at its default configuration:
  * a flat block;
  * forward transforms with and without quantisation;
  * inverse transforms with and without de-quantisation, plus round trips;
  * a back-to-back pair with `in_valid` held high while the processor is
    busy.

  Every output is compared with a floating-point DCT computed in the
  testbench. It also checks the 130-cycle latency and the 145-cycle block
  period, and counts each mechanism (forward, inverse, quantise, de-quantise,
  ignored busy requests, input gaps).
* `tb_image_workload` encodes and then decodes a generated 512x512 8-bit
  image: 4096 blocks, about 1.2 M cycles, a few seconds of simulation. It
  checks every coefficient and pixel and prints the average compression ratio
  64/(non-zero coefficients) and the PSNR. On the generated image (smooth
  shading, a disc, a textured quarter, noise) these come to about 16 and
  34.5 dB.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
              -Irtl -Itb rtl/dct_pkg.sv tb/tb_dct2d_top.sv --top-module tb_dct2d_top
    ./obj_dir/Vtb_dct2d_top

Replace `tb_dct2d_top` with any other testbench name. The testbenches
initialise or reset everything they read, so they also pass with
`+verilator+rand+reset+2`.

## Departures and open points

* **FFT vs matrix products.** The original computes the DCT through a 2-D
  FFT. Here the same coefficients come from direct row-column matrix
  products. Results agree with the DCT-II definition within one unit.
* **Latency and size.** The original reports about 140 ns from input to
  output, 140 MHz on a Stratix II EP2S60, 128 ALMs and 638.84 mW. This RTL
  takes 130 cycles from the last input row to the first output (about 0.93
  µs at 140 MHz). With eight 16x16 MAC lanes and eight quantiser multipliers
  it is far larger than 128 ALMs. Neither its clock rate nor its area has
  been measured on an FPGA. The combinational multiplier (a 15-stage 3-2
  chain plus a 32-bit CLA) would probably need pipelining to reach 140 MHz.
* **Interface.** The original waveform shows eight integer inputs and eight
  outputs per batch next to a clock. Its netlist shows a 16-bit `Din` bus,
  `InBlock` cells and latched `Dout` cells. The row-wide interface was
  followed. The handshake, reset and per-block mode sampling are this
  design's own.
* **Quantisation.** Quantisation by the JPEG table is part of the described
  encoder, and multiplication by the table is part of the decoder. The choice
  of the luminance table, the reciprocal method and the switch `quant_en` are
  this design's own. DC coefficients get no special treatment beyond their
  own table entry; there is no DPCM and no entropy coding.
* **Compression figures.** The original's compression ratios (3.08 for the
  plain DCT, 6.26 for its improved algorithm) were measured on the Lena image
  with an algorithm change that is not described. They are not reproduced.
* **Not modelled.** The FPGA fabric and its clock-control buffer; the clock
  is a plain input. The "conventional" adder, subtractor and multiplier the
  original compares against are not built either.

## Changing the design

* Word length: `dct_pkg::DATA_W`. The adders need multiples of 4. The
  multiplier needs an even width.
* Precision between the passes: `MID_FRAC`.
* Cosine precision: `COEF_FRAC`, together with `HALF_COS_Q14`.
* Quantisation table: `JPEG_LUMA_Q`. Reciprocals follow automatically, and
  the quantiser assumes Q >= 2 so that R fits 16 bits.
* Phase lengths are fixed by N = 8 in `dct_controller`.
