# 4x4 Dadda multipliers: ripple-carry rows and carry-save rows

This RTL holds two gate-level 4x4 unsigned multipliers that follow the Dadda
scheme. Sixteen AND gates form the partial products a_i·b_j. Rows of one-bit
full adders then reduce those products to the 8-bit product. The two
multipliers differ only in where each full adder sends its carry:

* **`dadda4x4_rca`: ripple-carry rows.** In each row, a full adder's carry goes
  sideways into the next adder of the same row, one weight up. Each row is
  therefore a small ripple-carry adder. Sums drop into the row below.
* **`dadda4x4_csa`: carry-save rows.** In the first two rows no carry moves
  sideways. Each carry is *saved* and handed down to the next row, one weight
  up. The two rows leave two numbers, and a ripple-carry adder adds them in
  the last stage.

Both are purely combinational: no clock, no reset and no handshake. A new
product appears one combinational delay after the operands change. The top,
`dadda4x4_top`, feeds the same operands to both and brings out both products.
Its `p_match` output shows whether they agree.

The full-adder cells were meant to be made in pass-transistor circuit styles.
These styles are SR-PL (swing-restored pass-transistor logic) and DPL (double
pass-transistor logic). Only the logic function of the cells is modelled
here. Nothing about voltage, timing variation or power is modelled.

## Files

| file | contents |
|---|---|
| `rtl/dadda_pkg.sv` | `N = 4`, `PW = 8`, and the types `operand_t`, `product_t`, `pp_array_t` |
| `rtl/full_adder.sv` | one-bit full adder, the only arithmetic cell |
| `rtl/pp_gen4x4.sv` | 16 ANDs; `pp[j][i] = a[i] & b[j]`, weight i+j |
| `rtl/ripple_carry_adder.sv` | `WIDTH` full adders in a carry chain (default 4) |
| `rtl/dadda4x4_rca.sv` | multiplier with ripple-carry rows, 15 full adders |
| `rtl/dadda4x4_csa.sv` | multiplier with carry-save rows and a final ripple adder, 15 full adders |
| `rtl/dadda4x4_top.sv` | both multipliers side by side |
| `tb/*_tb.sv` | one self-checking testbench per module |

The product bits are called p1 (LSB) to p8 in the structural descriptions
below. In the RTL, `p[k]` holds p(k+1).

## Partial products and their names

Partial product a_i·b_j has weight i+j. The ripple-carry multiplier names
the products as in its AND-array drawing. The columns are a3..a0, and the
rows from top to bottom are b0..b3:

```
        a3   a2   a1   a0
  b0:   m2   m1   m0   p1
  b1:   m3   m8   m7   m6
  b2:   m4   m9   m12  m11
  b3:   m5   m10  m13  m14
```

So, by weight:

| weight | products |
|---|---|
| 0 | p1 |
| 1 | m0, m6 |
| 2 | m1, m7, m11 |
| 3 | m2, m8, m12, m14 |
| 4 | m3, m9, m13 |
| 5 | m4, m10 |
| 6 | m5 |

The drawing does not label its rows with b indices. The order above was
chosen because it is the only one under which every full adder adds bits of
a single weight.

## The ripple-carry multiplier (`dadda4x4_rca`)

Inputs are written `FA(x, y, z)`. A 0 is a constant, used for adders drawn
with two inputs. Each carry goes one weight up.

```
row 1   fa1  FA(m6,  m0,  0 ) -> p2 , d1     row 2  fa7  FA(m11, s2, 0  ) -> p3 , d7
        fa2  FA(m7,  m1,  d1) -> s2 , d2            fa8  FA(m12, s3, d7 ) -> s8 , d8
        fa3  FA(m8,  m2,  d2) -> s3 , d3            fa9  FA(m13, s4, d8 ) -> s9 , d9
        fa4  FA(m9,  m3,  d3) -> s4 , d4            fa10 FA(s5,  0,  d9 ) -> s10, d10
        fa5  FA(m10, m4,  d4) -> s5 , d5            fa11 FA(s6,  d13,d10) -> p7 , d14
        fa6  FA(m5,  0,   d5) -> s6 , d6
row 3   fa12 FA(m14, s8,  0 ) -> p4 , d11    last   fa15 FA(d6,  d14, 0 ) -> p8
        fa13 FA(s9,  0,  d11) -> p5 , d12
        fa14 FA(s10, 0,  d12) -> p6 , d13
```

The source drawing fixes the rows, the nets and where each product enters.
It leaves two connections open, and this design closes them:

* **d13 into fa11.** The carry of the p6 adder has nowhere to go in the
  drawing. Without it, 9 of the 256 products are wrong.
* **fa15.** The drawing takes p8 straight from fa6, but fa11's carry also has
  weight 7. fa15 adds the two carries. They are never both 1, because
  a·b ≤ 225, and an assertion checks that fa15's carry stays 0.

## The carry-save multiplier (`dadda4x4_csa`)

Here `a_i b_j` is written `aibj`.

```
row 1   fa1  FA(a0b1, a1b0, 0   ) -> s1, d1     weight 1   p2 = s1
        fa2  FA(a0b2, a1b1, a2b0) -> s2, d2     weight 2
        fa3  FA(a0b3, a1b2, a2b1) -> s3, d3     weight 3
        fa4  FA(a1b3, a2b2, a3b1) -> s4, d4     weight 4
        fa5  FA(a2b3, a3b2, 0   ) -> s5, d5     weight 5
row 2   fa6  FA(s2,   d1,   0   ) -> s6, d6     weight 2   p3 = s6
        fa7  FA(s3,   d2,   a3b0) -> s7, d7     weight 3
        fa8  FA(s4,   d3,   0   ) -> s8, d8     weight 4
        fa9  FA(s5,   d4,   0   ) -> s9, d9     weight 5
        fa10 FA(a3b3, d5,   0   ) -> s10, d10   weight 6
final   {p8..p4} = {d10, s10, s9, s8, s7} + {0, d9, d8, d7, d6}   (ripple_carry_adder, WIDTH 5)
p1 = a0b0
```

The source drawing has four adders in the last row and takes d10 straight
to p8. That leaves the carry out of the p7 adder unconnected, and 16 of the
256 products come out wrong. Here the final adder is one bit wider, and d10
enters it in the top bit. The extra top adder (d10, 0, carry) produces p8.
Its carry out is always 0, which an assertion checks.

The operand labels of the carry-save drawing only make sense with the index
of b mirrored: a printed b_j means b_(3-j). Read literally, they would put
bits of different weights into one adder. The table above shows the
corrected labels.

## What the design does not contain

* **The borrow-save adder.** The low-voltage variability study behind this
  design compares ripple-carry adders with borrow-save (redundant
  signed-digit) adders. No structure is given for the borrow-save adder, so
  none is provided.
* **An 8x8 multiplier built from 4:2 compressors.** This variant, with
  ports `a[7:0]`, `b[7:0]` and `p[16:0]`, is known only by name. Its
  reduction tree and its compressor cell are not described, so it is not
  built.
* **Transistor-level SR-PL/DPL cells.** `full_adder` gives only their logic.
* **Timing, power and area.** Nothing here models the delay variation under
  threshold-voltage changes. For scale: the top synthesises to about 140
  generic gates and has 25 I/O bits. A 4x4 multiplier fits easily in a small
  FPGA, such as a Spartan-3E xc3s100e with 1920 LUTs and 66 IOBs.

The top (shared operands and the `p_match` flag) is this design's own way of
putting the two multipliers in one place. Signedness, the width of the final
adder and the two closed connections described above are also choices made
here.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

* `full_adder_tb`: all 8 input patterns.
* `pp_gen4x4_tb`: all 256 operand pairs. Every product bit is checked, and
  the weighted sum of the array is compared with a·b.
* `ripple_carry_adder_tb`: all 512 cases of x, y and cin at WIDTH 4. It also
  requires at least one full-length ripple and one carry out.
* `dadda4x4_rca_tb`, `dadda4x4_csa_tb`: all 256 operand pairs against integer
  multiplication. The sample 6 × 7 = 42 is also checked on its own.
* `dadda4x4_top_tb`: all 256 pairs on both products and on `p_match`. It uses
  hierarchical references to count how often each carry path fires. These
  are the carry out of row 1 (rca), d13 and d14 (rca), the saved carries into
  the final adder (csa), d10 (csa) and a carry into the final adder's top bit
  (csa). A path that never fires counts as a failure.

All of them run at the default sizes in well under a second. To run one with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/dadda_pkg.sv rtl/full_adder.sv rtl/pp_gen4x4.sv rtl/ripple_carry_adder.sv \
    rtl/dadda4x4_rca.sv rtl/dadda4x4_csa.sv rtl/dadda4x4_top.sv \
    tb/dadda4x4_top_tb.sv --top-module dadda4x4_top_tb -o sim
./obj_dir/sim
```

To lint a module: `verilator --lint-only -Wall -Irtl rtl/dadda_pkg.sv rtl/<module>.sv`.
