# Radix-4 Booth and Wallace tree multipliers, with low-power recoders

Every parallel multiplier does three things. It generates partial products,
reduces them to two rows, and adds those two rows with a carry-propagate adder.
This RTL builds the three steps several ways, so that they can be compared:

* **`booth_mult_r4`**: the main design. It is an 8x8 two's complement radix-4
  (modified) Booth multiplier. Recoding the multiplier into radix-4 digits
  halves the number of partial products from eight to four. A hand-placed
  three-stage Wallace tree adds the four rows and ends in a 13-bit carry
  look-ahead adder.
* **`wallace_mult`**: a generic N x N unsigned Wallace tree multiplier. It
  builds an AND array of bit products, then a tree of carry-save adders, then
  a carry look-ahead adder.
* **`r4_recoded_mult`**: a signed radix-4 multiplier whose recoder and
  partial-product generator come from one of six schemes. The schemes differ
  in the control signals a digit sends to its partial-product row, and in
  whether a zero digit gives a clean all-zero row. A zero row saves switching
  power. The proposed scheme is `NEW_THREE_SIGNAL_1`. It keeps the cheapest
  row generator, of the `THREE_SIGNAL_1` scheme, and moves the zero handling
  into the recoder. There is one recoder per digit but one generator cell per
  bit of every row, so the extra logic costs little.
* **`rca_adder`, `csla_adder`, `cla_adder`**: the three adder styles the
  multipliers are built from. They are a ripple carry adder, a one-level
  carry select adder and a two-level carry look-ahead adder.

Everything is combinational: there are no clocks, registers or resets.
`mult_top` places all of these side by side, each with its own ports.

## Radix-4 Booth digits

The multiplier `b` gets a 0 appended below its LSB. It is then cut into four
overlapping groups of three bits, `(b1 b0 0)`, `(b3 b2 b1)`, `(b5 b4 b3)` and
`(b7 b6 b5)`. Each group is one digit of value Z = -2·B(n+1) + B(n) + B(n-1),
with weight 4^i:

| B(n+1) B(n) B(n-1) | Z  | row        | `m_n` | `m2_n` | `m3` |
|--------------------|----|------------|-------|--------|------|
| 000                | 0  | 0          | 1     | 1      | 0    |
| 001, 010           | +1 | A          | 0     | 1      | 0    |
| 011                | +2 | 2A         | 1     | 0      | 0    |
| 100                | -2 | -2A        | 1     | 0      | 1    |
| 101, 110           | -1 | -A         | 0     | 1      | 1    |
| 111                | 0  | 0          | 1     | 1      | 0    |

`booth_mbe` produces the three selects: `m_n` and `m2_n` are active low, and
`m3` is the sign. `booth_prodgen` forms the five multiples 0, A, -A, 2A and
-2A once, as 9-bit values. For each digit, `booth_pp_mux` (a 5-to-1
multiplexer) picks one of them.

## The sign bit E and the row encoding

This part of the design is the least obvious. A 9-bit row cannot always hold
its own sign. For example, -2·(-128) = +256 has bit 8 set. So each row comes
with a separate sign bit E from `booth_sign_corr`:

    E = (A7 xor B(n+1)) and not(digit is zero) and (A != 0)

The value of row i is then `pp_i - E_i·2^9`. Sign-extending four such rows
would add many bits to every column. Instead, each row carries a few constant
and inverted sign bits. Their constants add up to exactly 2^17:

    column:  16 15 14 13 12 11 10  9  8 ... 0
    row 0:                  ~E0 E0 E0 pp0[8:0]
    row 1:               1 ~E1 pp1[8:0]             (shifted by 2)
    row 2:         1 ~E2 pp2[8:0]                   (shifted by 4)
    row 3:   1 ~E3 pp3[8:0]                         (shifted by 6)

The sum of all columns is the product plus 2^17. Bits 16..0 are therefore the
product modulo 2^17, and `yout` takes bits 15..0.

The `A != 0` term is this design's addition. The plain rule (sign of A xor
sign of digit, zero for a zero digit) sets E = 1 for a zero multiplicand
under a negative digit. That row's value is 0, so the product would be off
by 2^9·4^i. There are 240 such operand pairs out of 65536. The term costs one
8-input OR gate for the whole multiplier.

## The three-stage Wallace tree adder (`booth_wallace_adder`)

Before stage 1, two groups of bits move up into emptier rows. The top of
row 3 (pp3[8:6], ~E3 and its 1) moves into row 0. ~E2 and its 1 move into
row 1. This leaves three rows over columns 2..14, plus pp3[5:0] on its own.

| stage | columns 2-3 | 4-5 | 6-11 | 12 | 13-14 | 15 | 16 |
|-------|-------------|-----|------|----|-------|----|----|
| 1: rows 0-2 | HA | FA | FA | FA | HA | - | - |
| 2: stage-1 sum, carry, pp3[5:0] | col 2 passes, col 3 HA | HA | FA | HA | HA | HA (~E3 with carry) | - |
| 3 | - | 13-bit carry look-ahead adder over columns 4..16 |||||

Stage 1 uses four half adders and nine full adders. Stage 2 uses seven half
adders and six full adders. Bits 0 and 1 of row 0 reach the output without
passing through any gate. The same holds for the stage-1 sum in column 2 and
the stage-2 sum in column 3. The carry out of the look-ahead adder (column 17)
is brought out as `cout`. For this encoding it is 1 exactly when the product
is zero or positive.

Worked example, 34 x -42. The digits are -2, +2, +1, -1. The rows are
110111100, 001000100, 000100010 and 111011110. The result is
1111101001101100, which is -1428. The testbench checks both the rows and the
result.

## The six recoding schemes (`r4_recoder`, `r4_ppg`, `r4_recoded_mult`)

In these schemes a negative digit inverts the bits of the multiple. A
correction bit `cor` then adds the missing +1 at the LSB of the row. Row j
bits are built from x(j) and x(j-1), with x(-1) = 0 and x(M) = x(M-1).

| scheme | recoder signals | row bit PP(i,j) | digit 111 |
|--------|-----------------|-----------------|-----------|
| THREE_SIGNAL_1 | neg = y2i+1, one, two, cor = y2i+1 | neg xor (one·x(j) + two·x(j-1)) | all ones + cor (no clean zero) |
| THREE_SIGNAL_2 | neg = y2i+1·(y2i·y2i-1)', two, zero, cor = neg | ((two ? x(j-1) : x(j)) xor neg)·zero' | 0 |
| THREE_SIGNAL_3 | neg, pos = y2i+1'·(y2i + y2i-1), two = (y2i xor y2i-1)', cor = neg | nx(j) = x(j) ? pos : neg; two ? nx(j-1) : nx(j) | 0 |
| FOUR_SIGNAL_1 | neg = y2i+1, one, two = tmp1·tmp2, zero = (tmp1 + tmp2)', cor = y2i+1·zero' | nx(j) = x(j) xor neg; two ? nx(j-1) : one ? nx(j) : 0 | 0 |
| SERIES_SIGNAL_1 | neg = y2i+1·(y2i + C), one = y2i xor C, zero, cor = y2i+1·one, C(i+1) = neg | (neg ? x(j)' : (one ? x(j) : x(j-1)))·zero' | 0 |
| **NEW_THREE_SIGNAL_1** | neg = y2i+1·(y2i·y2i-1)', one, two, cor = neg | same as THREE_SIGNAL_1 | 0 |

The terms above are defined as follows:

* `one = y2i xor y2i-1`
* `two = y2i+1'·y2i·y2i-1 + y2i+1·y2i'·y2i-1'`
* `tmp1 = y2i+1 xor y2i-1` and `tmp2 = y2i+1 xor y2i`

The serial scheme replaces y(2i-1) with a carry C(i) passed from digit to
digit. Its digit set is {0, 1, 2, -1}, so pattern 100 means +2 there. That
set has no negative digit large enough for the top of a signed multiplier.
`r4_recoded_mult` therefore sign-extends y by two bits and uses one extra
digit for this scheme (N/2 + 1 rows). The parallel schemes use N/2 rows.

The original description does not say how the multiplier around the
recoders reduces its rows. Here the rows are sign extended and summed with
one adder expression, so the synthesis tool picks the adder structure.

## Adders

* `rca_adder` chains W full adders (`full_adder`: g = ab, p = a xor b,
  s = p xor c, co = g + pc).
* `csla_adder` adds the low W/2 bits with one ripple adder. It adds the high
  bits twice, with carry in 0 and with carry in 1, and the middle carry
  selects the right high sum and carry out.
* `cla_adder` builds 4-bit groups with `cla_gen4`. Each group gets every
  carry as a sum of products, plus a group generate and propagate. A second
  level then computes the carry into every group directly from those signals.
  It uses p = a OR b as propagate and s = a xor b xor c. A short last group
  is padded with p = 1, g = 0. W = 8 gives two groups under a two-group
  generator. The Booth multiplier uses W = 13 (groups of 4+4+4+1).

For 8-bit adders, the published delays were:

| adder | delay |
|-------|-------|
| RCA | 20.8 ns |
| CSLA | 12.8 ns |
| CLA, one level | 17.6 ns |
| CLA, two 4-bit levels | 14.8 ns |

The ripple adder is the smallest and the carry select adder the largest. The
look-ahead adder has the best area-delay product, which is why it finishes
both multipliers.

## Generic Wallace tree (`wallace_mult`)

Row i of the bit-product matrix holds a[j]&b[i] at column i+j. Each layer
feeds every full group of three rows through a `csa_row`. It keeps the sum
word and the carry word shifted left by one, and passes the one or two
leftover rows on unchanged. The layers continue until two rows remain. For
N = 8 the row count goes 8, 6, 4, 3, 2, which takes six carry-save adders in
four layers. The final adder is `cla_adder` with W = 2N. Rows are 2N bits
wide; any carry shifted past bit 2N-1 is always zero.

## Files and hierarchy

    mult_top
    ├── booth_mult_r4
    │   ├── booth_prodgen
    │   ├── booth_mbe x4, booth_pp_mux x4, booth_sign_corr x4
    │   └── booth_wallace_adder ── half_adder, full_adder, cla_adder(13) ── cla_gen4
    ├── wallace_mult ── csa_row ── full_adder; cla_adder(2N)
    ├── r4_recoded_mult x6 (one per scheme) ── r4_recoder, r4_ppg
    └── rca_adder, csla_adder (── rca_adder), cla_adder

`mult_pkg` holds the shared types: `recode_scheme_e`, `recode_ctl_t` and
`booth_sel_t`.

| parameter | module | default | meaning |
|-----------|--------|---------|---------|
| `W` | adders, `booth_prodgen`, `booth_pp_mux`, `csa_row` | 8 (16 for `csa_row`) | width |
| `N` | `wallace_mult` | 8 | operand width |
| `SCHEME` | `r4_recoder`, `r4_ppg`, `r4_recoded_mult` | `NEW_THREE_SIGNAL_1` | recoding scheme |
| `M`, `N` | `r4_recoded_mult` | 8, 8 | multiplicand and multiplier widths (N even) |
| `WAL_N`, `REC_M`, `REC_N`, `ADD_W` | `mult_top` | 8 | sizes of the side-by-side units |

`booth_mult_r4` has no size parameter. Its Wallace adder is laid out column
by column for 8-bit operands.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Most of them are
exhaustive over 8-bit operands. For example:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/mult_pkg.sv tb/tb_booth_mult_r4.sv --top-module tb_booth_mult_r4
    ./obj_dir/Vtb_booth_mult_r4

`tb/tb_mult_top.sv` runs the whole top at its default sizes, on all 65536
operand pairs plus the published waveform pairs. It counts how often each
mechanism occurs:

* each Booth digit value;
* a zero multiplicand under a negative digit;
* digit 111 (the clean-zero case);
* a serial recoding carry;
* each carry select path;
* an adder carry out.

A mechanism that never occurs counts as a failure. It runs in a few seconds.

`tb/tb_r4_switching.sv` drives one recoded multiplier per scheme with the
same fixed-seed operand stream. It counts how many partial-product row bits
and cor bits toggle from one product to the next, which stands in for
dynamic power. Typical result, in toggles per product:

| scheme | toggles |
|--------|---------|
| THREE_SIGNAL_1 | 16.3 |
| SERIES_SIGNAL_1 | 16.6 |
| all parallel schemes with a clean zero row, including NEW_THREE_SIGNAL_1 | 14.6 |

The clean-zero schemes produce identical rows. They differ only in their
recoder and generator gates, which this count does not see. The bench checks
that the proposed scheme switches less than THREE_SIGNAL_1 and less than the
serial scheme.

## Where this RTL departs from, or fills in, the original description

* The `A != 0` term in the Booth sign bit, explained above.
* The published Booth waveforms also show a signal `ovf`. Its function is not
  described, and its values do not follow from the product or from the adder
  carry, so it is not built.
* The published synthesis runs list 32 input and 32 output pins for every
  multiplier, which suggests 16-bit operands. The Booth multiplier is
  described, and built, as 8x8. `wallace_mult` and `r4_recoded_mult` reach
  16x16 by parameter.
* The Wallace tree block diagram shows input and output flip-flops and a
  ripple-carry final adder. The text describes a combinational multiplier
  with a carry look-ahead final adder, and that is what is built.
* The carry select adder's block diagram ties the low carry in to 0. Here it
  is a port (`ci`).
* For THREE_SIGNAL_2, the recoder drawing wires y(2i+1) straight to neg. The
  equation and the truth table clear neg for 111, and this RTL follows them.
  With cor = neg, that is needed for a correct product.
* The serial scheme's extra sign digit and the plain row sum in
  `r4_recoded_mult` are this design's own choices. So is the 8x8 default
  size of the recoded multiplier.
* Gate-level drawings (AOI, XNOR, multiplexer cells) are written as the
  Boolean functions they compute. Synthesis chooses the gates, so the
  published power and delay differences between schemes are not reproduced
  by construction. The reported figures were 27.32 mW and 10.31 ns for
  NEW_THREE_SIGNAL_1, against 29.72 mW and 11.00 ns for THREE_SIGNAL_1.
