# 2-D 9/7 wavelet transform with NEDA filters

This design computes one level of the two-dimensional 9/7 discrete wavelet
transform (the transform JPEG2000 uses for lossy coding) without a single
multiplier, ROM or subtractor. Each filter output is an inner product of fixed
coefficients with input samples. It is computed with NEDA ("new distributed
arithmetic"). The coefficients are spread out bit by bit into a fixed 0/1
matrix. The inputs that meet a one in each bit row are added. The row sums
are then combined by a shift-and-add loop that handles one row per clock.
All arithmetic is built from one-bit full adders.

A 16 x 16 image of 4-bit signed pixels goes in row by row. Four subbands come
out as 20-bit signed values: LL, LH, HL and HH.

## How a NEDA filter output is formed

A filter output is

    Z = C_1 r(1) + C_2 r(2) + ... + C_N r(N)

where the C_k are constant two's complement numbers of B bits and the r(k) are
data. Write each coefficient in bits, C_k = -c_k[B-1] 2^(B-1) + sum_i c_k[i] 2^i,
and regroup the sum by bit position instead of by coefficient:

    Z = sum_{i=0}^{B-2} m(i+1) 2^i  +  m(B) 2^(B-1)
    m(i+1) = sum over k with c_k[i] = 1 of r(k)          (i < B-1)
    m(B)   = -(sum over k with c_k[B-1] = 1 of r(k))     (sign row)

The 0/1 matrix c_k[i] (rows = bit positions, columns = coefficients) is the
DA matrix. Because it is fixed, every m is a fixed set of additions, found at
elaboration time from the coefficient parameter. A row with one entry is a
wire. A row of zeros is a constant. The only negation is the sign row, and it
is done with an inverter and an adder whose carry-in is 1. The inputs are
sign-extended before the adder array so that no row sum can overflow.

The row sums are then weighted by powers of two without a multiplier. A
multiplexer picks m(1), m(2), ... one per clock. An adder adds the pick to a
running value P. P is shifted right by one bit, and the bit that falls out
is kept in a low-order register L. After B clocks the concatenation {P, L}
is exactly Z. The adder therefore never needs to be wider than a row sum
plus one bit.

### Worked example

This example uses the six-bit coefficient patterns 111100, 011010, 001001,
000011 and 000010, with the top bit as the sign. Take r = 1, 2, 3, 4, 5. The
rows are

    m(1) = r3 + r4      = 7       m(4) = r1 + r2 + r3 = 6
    m(2) = r2 + r4 + r5 = 11      m(5) = r1 + r2      = 3
    m(3) = r1           = 1       m(6) = -r1          = -1

and 7 + 2*11 + 4*1 + 8*6 + 16*3 + 32*(-1) = 97. The same inputs give 97 with
the default coefficients 60, 26, -7, -1, 2 as well. Both cases are checked in
`tb_neda_adder_array` and `tb_neda_unit`.

## Coefficients

The 9/7 analysis taps are scaled by 100 and rounded to integers:

| filter    | taps | coefficients (outer pair first, centre last) |
|-----------|------|----------------------------------------------|
| low pass  | 9    | 60, 26, -7, -1, 2                            |
| high pass | 7    | 55, -29, -2, 4                               |

They are stored as 7-bit two's complement values (`neda_pkg::LP_COEFS`,
`HP_COEFS`). Seven bits is the least that holds 60 and 55 as signed numbers,
so each NEDA unit has seven bit rows and takes seven accumulation steps.

Coefficient k multiplies the folded input r(k+1). The filters are symmetric,
so each pair of taps that share a coefficient is added first:

    low pass : r(1) = X(n)+X(n-8), r(2) = X(n-1)+X(n-7), r(3) = X(n-2)+X(n-6),
               r(4) = X(n-3)+X(n-5), r(5) = X(n-4)
    high pass: r(1) = X(n)+X(n-6), r(2) = X(n-1)+X(n-5), r(3) = X(n-2)+X(n-4),
               r(4) = X(n-3)

This pairing gives the largest coefficient (60 or 55) to the outer tap pair,
not to the centre tap as in the textbook 9/7 filter. It is kept as specified.
As a result, the DC gain of the low-pass filter is 158, not 100. The pairing
lives only in `symmetric_preadder` and in the coefficient order, so moving
the centre coefficient is a parameter change.

`neda_pkg` also has `LP_COEFS_6B` and `HP_COEFS_6B`, the six-bit patterns of
the example above. Read as signed numbers they are (-4, 26, 9, 3, 2) and
(-9, -29, 6, 4), which are not 9/7 taps. They exist only so that the
six-row matrix and its example can be reproduced (`COEF_W = 6`). Do not use
them for filtering.

## The 1-D stage (`dwt_1d`)

One 8-stage delay line holds X(n-1) .. X(n-8). X(n) comes straight from the
input. Both NEDA units read these taps: a 9-tap low-pass unit with 5 folded
inputs and a 7-tap high-pass unit with 4. They run side by side.

* **Decimation.** On every second accepted sample of a line (n = 1, 3, 5, ...)
  both units start on the same clock edge. Each captures its folded inputs in
  a register, so the delay line can keep shifting while they work.
* **Timing.** A result pair (`out_lo`, `out_hi`) appears with `out_valid` 8
  clocks (COEF_W + 1) after the start cycle. A new pair can start in the cycle
  a result appears. At full input rate a line therefore moves at 2 samples per
  8 clocks. `in_ready` drops only for a sample that would start a pair while
  the units are busy. `out_valid` has no back-pressure.
* **Lines.** A sample marked `in_last` clears the delay line and the pair
  phase instead of shifting. Each line therefore starts from zero history,
  with samples before the line taken as 0. Lines must have an even length.
  No symmetric extension is applied at the edges.
* **Widths.** A D-bit input gives (D+1)-bit folded inputs, row sums of
  D+4 bits and results of D+11 bits: 15 bits for 4-bit pixels, 26 bits for
  the 15-bit row results.

## The 2-D frame (`dwt2d_top`)

A frame goes through two phases.

1. **Row phase.** Pixels are taken row-major on `pix_valid`/`pix_ready`. The
   row stage writes each (L, H) pair it produces into `transpose_buffer` as
   one 30-bit word at address row*8 + pair. After the last pixel of the frame,
   `pix_ready` stays low until the frame's last output has left.
2. **Column phase.** Once all 16 x 8 words are stored, the column feeder reads
   the columns of the row-transformed image. The 8 L columns come first, then
   the 8 H columns, each from the top row down. The feeder passes them to a
   second `dwt_1d` with a one-word holding register and the right half of each
   word. Each column yields 8 outputs:

| `band_sel` | column came from | `yl` | `yh` |
|------------|------------------|------|------|
| 0          | row low pass (L) | LL   | LH   |
| 1          | row high pass (H)| HL   | HH   |

`out_col` (0 .. 15, L columns first) and `out_row` (0 .. 7) locate each
output. `frame_done` pulses with the last one. `yl`/`yh` are the low 20 bits
of the 26-bit column results. For 4-bit pixels and the default coefficients
the largest possible magnitude is 1520 * 190 = 288800, below 2^19, so the 20
bits lose nothing. A different coefficient set or pixel width needs this
bound redone.

A frame takes about 16 rows x 8 pairs x 8 clocks for the row phase and the
same again for the columns: roughly 2,050 clocks. This is one complete
operation.

For a constant image of ones, the outputs away from the line starts are
LL = 158 * 158 = 24964, LH = HL = 158 * 52 = 8216 and HH = 52 * 52 = 2704.
Here 158 and 52 are the DC gains of the two filters with the tap pairing
above.

## What is specified, and what was chosen here

The following come from the specification of this design:

* the NEDA decomposition and the DA matrix;
* the sign row made with an inverter and +1;
* the one-row-per-clock multiplexer, adder and shift register;
* the symmetric folding r(1) .. r(5);
* the integer 9/7 coefficients;
* the 8-stage, 4-bit delay line;
* the full-adder cell;
* 4-bit pixels and 20-bit outputs.

The following were chosen here:

* **Coefficient width.** 7 bits, so that the stated integer coefficients are
  exact. The six-bit bit patterns that go with the worked example do not
  encode them.
* **High-pass folding.** The 7-tap folding and the use of the same n for both
  filters.
* **Line handling.** Decimation phase, zero history at every line start, no
  boundary extension.
* **Control.** All handshakes (valid/ready, start/ready/done), the input
  register of each NEDA unit and the asynchronous active-low reset.
* **Frame structure.** The 2-D organisation: one level, rows then columns,
  one frame buffer without ping-pong, input stalled during the column phase,
  L columns before H columns.
* **Image size.** 16 x 16 (`IMG_W`, `IMG_H`).
* **Adders.** Ripple-carry adders; the sign-extension width of the adder
  array.

Not built:

* **Multi-level or sub-tree scheduling.** The design is described as able to
  compute a whole 2-D wavelet tree and any chosen sub-tree. No schedule,
  buffer or configuration for that is specified, so only one level is built.
  Further levels can be run by feeding LL back in as a new image, which needs
  a wider `DATA_W`.
* **A reference waveform.** A published simulation of a constant input
  shows the products 64*64, 64*201 and 201*201. This implies row gains of 201
  and 64, which no reading of the coefficient set reproduces. This design
  gives 158 and 52. What the signal `sel` shown there selects is not stated.
  `band_sel` here is this design's own.
* **Resource counts.** Published counts of adders (60), shift registers (24)
  and multiplexers (9) for the 2-D design were not matched. The unit of count
  is not stated, and this design has separate row and column stages with 7
  coefficient bits. It has no ROM and no multiplier, as specified.

## Modules

| file | role |
|------|------|
| `rtl/neda_pkg.sv` | widths, tap counts, coefficient sets |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/ripple_adder.sv` | W-bit adder made of `full_adder` |
| `rtl/shift_register.sv` | 8-stage tap delay line with clear |
| `rtl/symmetric_preadder.sv` | tap folding r(k) |
| `rtl/neda_adder_array.sv` | sign extension and DA-matrix row sums m(i) |
| `rtl/neda_accumulator.sv` | multiplexer and right-shift accumulator |
| `rtl/neda_unit.sv` | input register + adder array + accumulator |
| `rtl/dwt_1d.sv` | delay line, two folders, low- and high-pass units |
| `rtl/transpose_buffer.sv` | frame RAM, registered read |
| `rtl/dwt2d_top.sv` | row stage, buffer, column feeder, column stage |

Every module has a testbench `tb/tb_<module>.sv` (except `ripple_adder`,
which is covered by all the others). Each testbench checks against values
computed independently of the design. `tb/tb_ref_pkg.sv` is the integer
reference model. It computes the filters as plain sums of products.
`tb_dwt2d_top` runs three default-size frames end to end:

* random pixels;
* all ones;
* all -8.

It uses random input gaps and checks every output, its position and the
frame timing. It also counts that back-pressure, the input hold during the
column phase, both bands, the line clears and the frame switch all happened.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/neda_pkg.sv tb/tb_ref_pkg.sv tb/tb_dwt2d_top.sv --top-module tb_dwt2d_top
    ./obj_dir/Vtb_dwt2d_top

Each testbench ends by printing `TB_RESULT checks=N failures=M`. Replace
`tb_dwt2d_top` with any other `tb_<module>` to run a single block. The whole
run takes well under a second.

## Changing it

* **Image size.** Set `IMG_W` and `IMG_H` on `dwt2d_top`. Both must be even.
  The buffer depth follows.
* **Coefficients.** Set `LP_COEFS`/`HP_COEFS` and `COEF_W` on `dwt_1d`. The
  adder array rebuilds itself from the bit patterns. Element k multiplies
  r(k+1). Recheck the 20-bit output bound.
* **Pixel width.** Set `DATA_W`. Internal widths follow. `OUT_W` may need to
  grow.
