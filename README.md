# Compressor-based Urdhva Tiryakbhyam 8x8 multiplier

This is an unsigned 8-bit by 8-bit multiplier with a 16-bit result. It is
purely combinational. It forms the partial products the way the Vedic
*Urdhva Tiryakbhyam* ("vertically and crosswise") rule does: product bit k
collects every A_i·B_j with i + j = k. It then adds each column with
multi-input **compressors** (3:2, 4:2 and 7:2) rather than a tree of
separate full and half adders. The reduction has two stages:

1. One compressor per column, all columns working at once.
2. A final stage of half adders and compressors that turns the two rows left
   by stage 1 into the product.

The approach follows the paper "Design and Implementation of Vedic
Multiplier using Compressors". That paper gives:

- the operand width;
- the Urdhva column equations;
- the three compressor types and how each is built from 3:2 compressors;
- the two-stage idea.

It does not spell out which compressor sits in which column. The column plan
below is therefore this design's own. It was checked exhaustively against
`a * b`.

```
 a[7:0] ─┐   ┌───────────┐ pp: 15 columns  ┌─────────────────┐ row_a,row_b  ┌──────────────┐
         ├──►│ urdhva_pp ├────────────────►│ stage1_compress ├─────────────►│ stage2_final ├──► p[15:0]
 b[7:0] ─┘   └───────────┘ heights 1..8..1 └─────────────────┘ + extra7     └──────────────┘
```

## The vertically-and-crosswise matrix (`urdhva_pp`)

All 64 AND terms are formed in parallel. Column k (k = 0…14) holds the terms
whose indices add up to k, so the column heights are
1, 2, 3, 4, 5, 6, 7, 8, 7, 6, 5, 4, 3, 2, 1. In `vedic_pkg::pp_cols_t`,
bit j of column k is `a[k-i] & b[i]` with `i = j + max(0, k-7)`. A column
lists its terms from A_k·B_0 toward A_0·B_k. Bits above a column's height are
zero.

In the classic Urdhva formulation, P_k is the sum of column k plus the carries
from lower columns. Each column also produces carries C1…C32 that move up.
The equation for the top bit is P15 = C31 + C32. The remaining blocks carry
out that addition with compressors.

## Compressors

Each compressor adds bits of one weight. It reports the result as a sum bit
of that weight and carry bits of higher weights. *Lateral* carries (`cout`)
go to the next compressor in the row, not to the next stage. What matters for
speed is that no lateral carry depends on a carry-in. A row of compressors
therefore has the delay of a single compressor, with no ripple.

| block | adds | outputs | built from |
|---|---|---|---|
| `compressor_3_2` | a, b, c | sum (×1), carry (×2) | XOR/AND/OR gates (a full adder) |
| `half_adder` | a, b | sum (×1), carry (×2) | XOR, AND |
| `compressor_4_2` | x1…x4, cin | sum (×1), carry (×2), cout (×2) | two 3:2: FA0(x1,x2,x3) → cout; FA1(s0,x4,cin) → sum, carry |
| `compressor_7_2` | x1…x7, cin1, cin2 | sum (×1), carry (×2), cout1 (×2), cout2 (×4) | five 3:2, see below |

The 7:2 compressor takes nine bits, so its sum can reach 9. Four output bits
can only represent that if one of them weighs 4. The arrangement is:

- FA1 and FA2 add x1–x3 and x4–x6.
- FA3 adds their two sums and x7.
- FA4 adds the three carries of FA1–FA3. Its sum is `cout1` (weight 2) and
  its carry is `cout2` (weight 4).
- FA5 adds FA3's sum and the two carry-ins, giving `sum` and `carry`.

In a row, `cout1` of column k feeds `cin1` of column k+1, and `cout2` of
column k feeds `cin2` of column k+2. A carry-in passes through only one 3:2
(FA5).

## Stage 1: one compressor per column (`stage1_compress`)

Each column's load is its products plus the lateral carries arriving from
below. A 3:2 takes 3 bits, a 4:2 takes 5 and a 7:2 takes 9. The compressors
are placed as follows:

| column | products | lateral carries in | compressor |
|---|---|---|---|
| 0 | 1 | – | wire (P0) |
| 1 | 2 | – | wires, added in stage 2 |
| 2 | 3 | – | 3:2 |
| 3 | 4 | – | 4:2 (cin = 0) |
| 4 | 5 | 4:2 cout of col 3 | 7:2 |
| 5 | 6 | cout1 of col 4 | 7:2 |
| 6 | 7 | cout1 col 5, cout2 col 4 | 7:2 (full: 9 bits) |
| 7 | 8 | cout1 col 6, cout2 col 5 | 7:2, **one product left over** |
| 8–11 | 7…4 | cout1 of k−1, cout2 of k−2 | 7:2 |
| 12 | 3 | cout1 col 11, cout2 col 10 | 4:2 (cout1 as x4, cout2 as cin) |
| 13 | 2 | cout2 col 11, 4:2 cout col 12 | 4:2 |
| 14 | 1 | 4:2 cout col 13 | half adder |

Every compressor's sum stays in its own column (`row_a`). Its carry moves one
column up (`row_b`).

Column 7 is the tall one. It has eight products plus two lateral carries,
which is ten bits for a nine-bit compressor. With one compressor per column this cannot be avoided.
Columns 5 and 6 each need a 7:2 (6 and 7 products), and they send cout2 and
cout1 into column 7. The eighth product (A0·B7) therefore skips stage 1 as
`extra7`.

The stage output `vedic_pkg::s1_rows_t` keeps an invariant:
`row_a + row_b + extra7·2^7` equals the value of the matrix. Also,
`row_a[15]`, `row_b[0]` and `row_b[2]` are always zero.

The stage's depth is one 7:2 compressor plus the lateral path into the next
column's last 3:2. That is about four full-adder delays.

## Stage 2: final addition (`stage2_final`)

Stage 2 adds the two rows and `extra7`:

- **Columns 1–2:** half adders.
- **Columns 3–6:** 3:2 compressors with a single running carry.
- **Column 7:** four bits, namely `row_a`, `row_b`, `extra7` and the running
  carry. These go to a 4:2 compressor, which produces *two* carries.
- **Columns 8–14:** 4:2 compressors carry both upward. The 4:2 carry enters
  the next column as x3 and the cout enters as cin.
- **Column 15:** P15 is the XOR of `row_b[15]` and the two incoming carries.
  The product of two 8-bit numbers is below 2^16, so at most one of those
  three bits can be set. No carry leaves column 15. This is the
  P15 = C31 + C32 of the Urdhva equations.

An immediate assertion in `stage2_final` flags any input that breaks the
stage-1 invariant.

This stage is a carry chain. Its delay grows with the number of columns, and
it sets the critical path of the whole multiplier. "Two stages" here means two
levels of structure, not two gate delays.

## Files

| file | content |
|---|---|
| `rtl/vedic_pkg.sv` | widths, `pp_cols_t`, `s1_rows_t`, column-height helpers |
| `rtl/compressor_3_2.sv`, `half_adder.sv`, `compressor_4_2.sv`, `compressor_7_2.sv` | adder cells |
| `rtl/urdhva_pp.sv` | partial-product matrix |
| `rtl/stage1_compress.sv`, `rtl/stage2_final.sv` | the two reduction stages |
| `rtl/vedic_mul8.sv` | top: `a`, `b` in, `p` out |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares against values it computes itself. Each one prints
`TB_RESULT checks=N failures=M` and has a time-out watchdog.

- `tb_vedic_mul8`: all 65,536 operand pairs against `a * b`. It also counts
  how often each mechanism was active and fails if one never was. The
  mechanisms are the 7:2 cout1 and cout2 chains, the stage-1 4:2 cout, the
  column-7 leftover, the stage-2 4:2 cout chain and P15. It runs the top at
  its only size.
- `tb_urdhva_pp`: every column bit for all 65,536 pairs, plus the weighted
  column sum.
- `tb_stage1_compress`, `tb_stage2_final`: 200,000 random legal inputs each,
  checked against the arithmetic invariant.
- `tb_compressor_*`, `tb_half_adder`: exhaustive checks. The 4:2 and 7:2
  tests also check that the lateral carries do not depend on the carry-ins.

Run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/vedic_pkg.sv \
          tb/tb_vedic_mul8.sv --top-module tb_vedic_mul8
./obj_dir/Vtb_vedic_mul8
```

The top testbench reads internal nets of the stages by hierarchical name to
count the mechanisms. If you rename them, update the testbench too.

## How far it follows the paper

- **From the paper:**
  - the 8-bit operand width;
  - the Urdhva column formation;
  - the use of 3:2, 4:2 and 7:2 compressors and half adders;
  - the 4:2 compressor as two 3:2 compressors;
  - the 7:2 compressor as five 3:2 compressors with two carry-ins and four
    outputs;
  - the two-stage structure.
- **This design's own choices:**
  - the 3:2 gate form;
  - the exact wiring inside the 7:2 compressor. cout2 weighs 4 and travels
    two columns.
  - the column-by-column compressor plan of both stages;
  - the handling of column 7's extra product;
  - unsigned operands;
  - no registers.
- **A fix to the paper:** the printed equation for bit 12 lists A5·B6 where
  the column needs A6·B6. The indices of every term must add up to 12, and
  the RTL uses A6·B6.
- **Results:** the paper reports 506 ps and 27,541 µm² (554 cells) for its
  version in a 45 nm library. The figures here are not comparable. A generic
  Yosys synthesis of `vedic_mul8` gives 342 single-bit gates (AND/OR/XOR)
  with no technology mapping, and this plan has a ripple in stage 2. No
  timing or area in a real library has been measured.

## Changing it

The width lives in `vedic_pkg::N`, but the column plans in `stage1_compress`
and `stage2_final` are written out by hand for N = 8. A 16- or 32-bit version
needs a new plan. The columns grow to 16 or 32 bits, so more than one
compressor level per column is required. `urdhva_pp` and the compressor cells
already generalise. To add pipelining, the natural cut is the `s1_rows_t`
bundle between the two stages (33 bits).
