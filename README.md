# Four-point FFT butterfly with signed-compressor multipliers

This is a pipelined radix-2, decimation-in-time, four-point FFT butterfly for
signed integer data. Each of its 32 multipliers works on two's-complement
operands directly. In such a multiplier the partial-product bits that involve
exactly one sign bit have negative weight. Most multipliers remove them with
correction constants (Baugh-Wooley) or recoding (Booth). Here they are added
as they are, by small compressor cells that accept inputs of negative weight
and produce outputs of negative weight. The butterfly's additions and
subtractions are done by rows of 5-3 compressors, which add three words at
once. A three-stage pipeline takes one new set of inputs per clock.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). Results are
exact: there is no rounding and no overflow.

## What the butterfly computes

The inputs are four complex samples A, B, C, D and two complex twiddle
factors W1, W2. All components are `DW`-bit signed integers (default 8). The
outputs are:

```
E = A + B*W1 + C*W1 + D*W1^2        G = A + B*W1 - C*W1 - D*W1^2
F = A - B*W1 + C*W2 - D*W1*W2       H = A - B*W1 - C*W2 + D*W1*W2
```

This is the two-stage radix-2 flow graph multiplied out:

- The first stage forms the butterflies (A,B) and (C,D) with W1.
- The second stage combines their sums with W1 (giving E and G) and their
  differences with W2 (giving F and H).

Set A=x0, B=x2, C=x1, D=x3, W1=1 and W2=-j. Then E, F, G and H are X[0..3],
the 4-point DFT of x. The end-to-end testbench checks exactly this.

Every output is written as a sum of products of *inputs*. W1^2 and W1*W2 are
never formed as complex numbers. Their real and imaginary parts come from
multipliers and are then multiplied by Dr and Di. For example, the E/G half
computes:

```
Pr = Ar + Br*W1r - Bi*W1i            Pi = Ai + Br*W1i + Bi*W1r
Qr = Cr*W1r - Ci*W1i + Dr*Re(W1^2)   Qi = Cr*W1i + Ci*W1r + Di*Re(W1^2)
Er = Pr + Qr - Di*Im(W1^2)           Gr = Pr - Qr + Di*Im(W1^2)
Ei = Pi + Qi + Dr*Im(W1^2)           Gi = Pi - Qi - Dr*Im(W1^2)
with Re(W1^2) = W1r*W1r - W1i*W1i,   Im(W1^2) = (2*W1r)*W1i
```

Each line is one three-operand 5-3 row, which makes eight rows per half. The
F/H half has the same shape:

- P = A - B*W1.
- Q = C*W2 - D*Re/Im(W1*W2).
- Re(W1*W2) = W1r*W2r - W1i*W2i.
- Im(W1*W2) = W1i*W2r + W1r*W2i.

Each half has 16 multipliers, 32 in all. The two halves are separate
datapaths that share only the inputs, so B*W1 is computed once in each half.
The factor 2 in Im(W1^2) is a one-bit shift.

## Signed compressors

A compressor adds bits of one column and outputs a sum bit `s` (weight 1) and
carries `c0` (weight 2) and `c1` (weight 4). In the signed versions some
inputs count -1 instead of +1. The output weights are chosen so that the
whole input range fits into three bits:

| cell        | inputs (−: weight −1)   | identity                       | range   |
|-------------|-------------------------|--------------------------------|---------|
| `comp32_u`  | a b c                   | a+b+c = s + 2co                | 0..3    |
| `comp32_s`  | a b, c of other sign    | a+b−c = −s + 2co               | −1..2   |
| `comp43_u`  | a b c d                 | = s + 2c0 + 4c1                | 0..4    |
| `comp43_s1` | a− b c d                | b+c+d−a = −s + 2c0 + 4c1       | −1..3   |
| `comp43_s2` | a− b− c d               | c+d−a−b = s − 2c0 + 4c1        | −2..2   |
| `comp53_u`  | a b c d e               | = s + 2c0 + 4c1                | 0..5    |
| `comp53_s1` | a− b c d e              | b+c+d+e−a = −s + 2c0 + 4c1     | −1..4   |
| `comp53_s2` | a− b− c d e             | c+d+e−a−b = s − 2c0 + 4c1      | −2..3   |

The rules for the signed cells are:

- In all of them, `s` is the parity of the inputs.
- The carries come from a multiplexer selected by the two leading inputs
  `{a,b}`.
- Its data inputs are simple functions of the remaining bits: AND, OR, NAND
  and NOR of c and d, or majority, all-high and none-high of c, d and e.

`comp32_s` covers both of its cases with the same logic. With one negative
input, c is negative and so is s. With two negative inputs, a and b are
negative and so is co. The second case is the first one negated.

The sum bits, the `c1` of the 4-3 cells and the `c1` of the two-negative 5-3
cell follow the source design's equations. Every other carry was derived
here from the identities in the table.

Each cell's testbench checks its identity for all input patterns. Because the
three output weights give eight distinct values, this fixes every output bit.

## The signed multiplier (`pezaris_mult`)

`p = a * b` with `a` of `AW` bits and `b` of `BW` bits, both signed
(default 8 × 8). It is purely combinational.

**Partial products.** Every a[i]&b[j] is used as it is. It has negative
weight when exactly one of i, j is a sign position. a[AW−1]&b[BW−1] is
positive. From column AW−1 upward, columns therefore hold two negative bits.

**Reduction.** The array is linear and carry-save. Per column it keeps three
state bits: a sum bit, the c0 from the column below and the c1 from two
columns below.

- Stage 0 compresses partial-product rows 0–4.
- Each later stage compresses the three state bits plus the next two rows.

So no column ever has more than five bits, and one cell per column is
enough. With 8×8 there are three stages.

**Choosing the cell.** The cell for each column is chosen at elaboration.
The choice depends on the number of bits n and the number k of bits of the
minority polarity:

| n   | cell                                 |
|-----|--------------------------------------|
| 1   | a wire                               |
| 2–3 | a full adder or `comp32_s`           |
| 4   | a 4-3 cell: unsigned, `_s1` or `_s2` |
| 5   | a 5-3 cell: unsigned, `_s1` or `_s2` |

If the negative bits are the majority, the cell is used *mirrored*. Its
"signed" inputs get the positive bits, and every output is read with the
opposite polarity. This is exact, because the mirrored column is the
negation of the modelled one.

**Elaboration tables.** Constant functions inside the module replay the
array. For every state bit they record whether it exists and its polarity.
The generate loops read these tables.

**Final merge.** The three rows that remain go through one word-level adder.
It adds the positive-weight bits and subtracts the negative-weight bits.
Carries out of the top column are dropped. That is exact modulo
2^(AW+BW), which is all a full-width product needs.

**Cell counts.** For 8×8 the array uses:

- 9 full adders;
- 3 signed 3-2 cells;
- 2 unsigned and 9 signed 4-3 cells;
- 4 unsigned and 5 signed 5-3 cells.

`sig_compressor` is the small selector that instantiates the right cell for
a column.

## The 5-3 multicolumn row (`mc53_adder`)

`y = ±x0 ± x1 ± x2 (mod 2^W)`. The build-time mask `SUB` picks the sign of
each operand.

Column k holds five bits:

- the three operand bits;
- the `c0` from column k−1;
- the `c1` from column k−2.

One unsigned 5-3 compressor per column turns these into `y[k]` and two
carries. So the row adds three words without a separate carry-propagate
adder.

A subtracted operand enters inverted. The +1 of each subtracted operand goes
into carry slots that are free at the bottom of the row:

- bit 0 of the subtracted-operand count goes into the c0 slot of column 0;
- bit 1 goes into the c1 slot of column 1.

So up to three operands can be subtracted.

## Pipeline and interface

`fft4_butterfly` (top), `bfly_eg` and `bfly_fh` take these parameters:

| parameter | default      | meaning                                        |
|-----------|--------------|------------------------------------------------|
| `DW`      | 8            | width of each input component                  |
| `PIPE`    | 1            | 1: three register stages; 0: purely combinational |
| `OW`      | 3*DW+3 (27)  | width of each output component                 |

The stages, with registers after each one, are:

| stage | work                                                                       |
|-------|----------------------------------------------------------------------------|
| 1     | first multiplier layer: B*W1, C*W1 (or C*W2), and the twiddle-by-twiddle products |
| 2     | adders for Re/Im of W1^2 (or W1*W2), the four D multipliers, the two P rows |
| 3     | the two Q rows and the four output rows                                    |

The ports are:

| port | meaning |
|------|---------|
| `clk`, `rst_n` | Clock, and active-low asynchronous reset of all pipeline registers. |
| `in_valid` | An input set is presented this cycle. No back-pressure. |
| `a_re` … `d_im`, `w1_re`, `w1_im`, `w2_re`, `w2_im` | Signed inputs, `DW` bits each. |
| `out_valid` | The outputs belong to the input set presented 3 cycles earlier. |
| `e_re` … `h_im` | Signed outputs, `OW` bits each, exact. |

Timing: one input set per clock. An input set presented in cycle n gives its
results, with `out_valid`, in cycle n+3. With `PIPE=0` the outputs follow the
inputs in the same cycle. That is the non-pipelined form of the same
datapath.

An assertion in the top checks that the two halves' valid flags always
agree.

## How far it follows the source design, and where it departs

Taken from the source:

- the signed 3-2, 4-3 and 5-3 cells, with their input and output polarities,
  sum equations and multiplexer structure;
- the use of conventional cells where a column has no negative bits;
- Pezaris-style partial products with no correction term;
- the 32-multiplier expanded butterfly, including which products feed which
  sums;
- 5-3 compressors for the additions, with subtraction by two's complement;
- a three-stage pipeline.

Choices made here:

- **Carry logic.** Several carry equations of the cells were derived from the
  arithmetic; see the table above.
- **Reduction.** The order of reduction in the multiplier (linear array,
  5 + 2 + 2 … rows per stage) and the final merge adder are this design's
  own. The source shows a tree for its 8×8 multiplier without saying which
  cell covers which bits. Its cell counts are 26 full adders + 32
  compressors for 8×8, and 4 + 10 for 4×4. This design uses fewer, larger
  cells.
- **Multicolumn row.** The internal arrangement of the 5-3 row (a ripple of
  two carries) and where the +1 terms go are this design's own.
- **Widths.** The data width of 8 bits and the full-precision output width
  are this design's own; the source gives neither.
- **Pipeline.** The stage boundaries, the valid flag and the reset are this
  design's own.
- **Signs.** The sign of each term is taken from the radix-2 flow graph
  rather than read off the block diagrams.
- **Row count.** Each half uses eight 5-3 rows, sixteen in all. The source
  states that eight 5-3 compressors replace the butterfly's ten adders and
  six subtractors. The adder/subtractor that forms Re/Im of W1^2 or W1*W2 is
  a plain word-level adder, as in the source's diagrams. In the F/H half a
  single adder forms Im(W1*W2), and both D multipliers use it.

Not built:

- the "tri-section" arrangement of the Pezaris array, which is only cited;
- the baseline butterflies (conventional multipliers and/or adders).

Power, delay and area figures are not modelled.

## Verification

Every module except the two helpers has a self-checking testbench in `tb/`.
The helpers, `sig_compressor` and `pipe_reg`, are exercised through the
multiplier and butterfly tests. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_comp*` | Each compressor cell exhaustively, against its weighted identity. |
| `tb_pezaris_mult` | All 65,536 products of the 8×8 multiplier and all 256 products of a 4×4 one. Also 3×5 exhaustively, and 9×8 and 8×17 (the shapes used inside the butterfly) on random and extreme operands. |
| `tb_mc53_adder` | All eight sign patterns at 16 bits on random and corner operands. Also a 4-bit row exhaustively. |
| `tb_bfly_eg`, `tb_bfly_fh` | 3,000 random input sets, including extreme values, with random gaps. The pipelined instance must give each result exactly 3 cycles after its input and in order. A `PIPE=0` instance is checked in the same cycle. The reference is a factored complex model. |
| `tb_fft4_butterfly_nopipe` | The top built with `PIPE=0`, next to the default build. 2,000 random input sets, one per clock. The `PIPE=0` outputs must match a term-by-term reference in the same cycle, and the pipelined outputs must match them 3 cycles later. |
| `tb_fft4_butterfly` | The top at its default parameters. It runs 4,000 general input sets against a term-by-term reference, 1,000 back-to-back 4-point DFTs against the DFT definition, and a reset in the middle of a burst. It counts pipeline fill, back-to-back results, bubbles, the reset flush, DFT sets, negative results and most-negative operands, and fails if any of them never occurred. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv -Irtl \
          tb/tb_fft4_butterfly.sv --top-module tb_fft4_butterfly
./obj_dir/Vtb_fft4_butterfly
```

Every testbench finishes in well under a second. The design's only stored
state is its pipeline registers, and the testbenches read nothing before
reset or before its first valid output. So the results do not depend on
Verilator's random initialisation.

## Files

| file | contents |
|------|----------|
| `rtl/fft4_butterfly.sv` | Top: both halves side by side. |
| `rtl/bfly_eg.sv`, `rtl/bfly_fh.sv` | The E/G and F/H halves, 16 multipliers and eight 5-3 rows each. |
| `rtl/pezaris_mult.sv` | Signed compressor multiplier. |
| `rtl/sig_compressor.sv` | Per-column cell selector. |
| `rtl/mc53_adder.sv` | Three-operand 5-3 row. |
| `rtl/comp32_u.sv`, `rtl/comp32_s.sv` | Unsigned and signed 3-2 cells. |
| `rtl/comp43_u.sv`, `rtl/comp43_s1.sv`, `rtl/comp43_s2.sv` | Unsigned and signed 4-3 cells. |
| `rtl/comp53_u.sv`, `rtl/comp53_s1.sv`, `rtl/comp53_s2.sv` | Unsigned and signed 5-3 cells. |
| `rtl/pipe_reg.sv` | Pipeline register that can be built as a plain wire. |
| `tb/tb_*.sv` | The testbenches listed above. |
