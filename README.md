# Regular-array significand multiplier: (9,2) counter family and (27,5)/(5,5,4) reduction

An IEEE double-precision multiplication spends most of its time multiplying two
53-bit significands. The fast way to do that in one step has three parts:

1. Make the partial products.
2. Reduce them with a tree of counters until only two rows are left.
3. Add those two rows with a carry-lookahead adder.

A Wallace tree of (3,2) counters has the fewest stages, but its wiring is
irregular. Wire delay then dominates in a large array, and the layout does not
tile.

This RTL implements the two regular reduction arrays proposed in the article
*Circuit and Architecture Trade-offs for High-Speed Multiplication*. Every
column of the array is the same slice, and the slices abut side by side:

* **(9,2) counter family.** Each of the 106 columns holds three (9,2) counters
  feeding one (6,2) counter. The counters trade carries with their neighbours
  sideways. The depth is 7 full-adder stages, the same as a Wallace tree, and
  the layout is fully regular.
* **(27,5) + (5,5,4).** A (27,5) counter counts each column into a 5-bit
  number. The bits of that number fan out diagonally to the next four columns.
  A (5,5,4) counter then merges each pair of columns. There are 53 two-column
  slices, 11.5 full-adder stages deep.

Both arrays are fed by one modified (radix-4) Booth partial-product generator.
It uses an encoding chosen so that the per-bit decoder stays narrow. The top
level builds both arrays side by side and gives out both products. In an actual
chip you would keep one of them.

```
 multiplier y ──► booth_encoder ×27 ──(NZ+,NZ-,D)──┐
 multiplicand x ───────────────────────────────────┴► booth_decoder ×27×54
                                                       │  (booth_pp_generator)
                                     27 rows × 106 columns│
                     ┌─────────────────────────────────┴───────────────────┐
             reduction_array_9_2                              reduction_array_27_5
        106 × column_9_2 (3×(9,2) + (6,2))               53 × slice_27_5 (2×(27,5) + (5,5,4))
                     │ 2 rows                                            │ 2 rows
                 cla_adder (106 b)                                  cla_adder (106 b)
                     ▼                                                   ▼
               product_9_2                                         product_27_5
```

Everything is combinational. There is no clock or reset, and the product
settles within the cycle in which the operands are applied. The source design
quotes single-cycle latency for both schemes.

## Booth encoding with NZ+, NZ-, D

The multiplier is cut into overlapping 3-bit groups (y[2i+1], y[2i], y[2i-1]),
with y[-1] = 0 and bits above the top read as 0. Each group selects one of
+0, +X, +2X, -2X, -X or -0. This gives 27 rows for 53 bits, or 5 rows for
8 bits.

The usual code (sign, C1, C0) needs a decoder that looks at four pairs of
inputs at once. That decoder becomes the widest cell in the column slice.
This design uses a different code instead:

| y[2i+1] y[2i] y[2i-1] | row | NZ+ | NZ- | D |
|---|---|---|---|---|
| 000 | +0  | 0 | 0 | (1) |
| 001, 010 | +X  | 1 | 0 | 0 |
| 011 | +2X | 1 | 0 | 1 |
| 100 | -2X | 0 | 1 | 1 |
| 101, 110 | -X  | 0 | 1 | 0 |
| 111 | -0  | 0 | 0 | (1) |

D does not matter for the two zero rows. This design sets D = NOT(y[2i] XOR
y[2i-1]), which happens to be 1 for both.

With this code the decoder for bit j of a row is two small stages in cascade
(`booth_decoder`):

* Stage 1 computes `t = D ? x[j-1] : x[j]`, which selects X or 2X.
* Stage 2 computes `z = NZ+ ? t : NZ- ? ~t : 0`.

A negative row comes out as a one's complement. The +1 that completes the
two's complement is added as a separate bit.

## The partial-product matrix and its sign bits

`booth_pp_generator` places each row's N+1 decoded bits at columns 2i .. 2i+N.
Sign extension would add long runs of copies of each row's sign. The generator
replaces them with a few bits per row. Write s_i = NZ- for the row's sign and
n_i = NOT s_i:

| where | bits |
|---|---|
| column 2i, one slot below row i | s_i (the +1 of the two's complement) |
| row 0, columns N+1, N+2, N+3 | s0, s0, n0 |
| rows 1 .. R-2, columns N+1+2i, N+2+2i | n_i, constant 1 |

The last row is never negative: its group has y[2i+1] = 0. Constants that land
at or above column 2N vanish modulo 2^(2N).

Why this works:

* The sign of a negative row weighs -s·2^(N+1+2i).
* For row 0, -s = s + 2s - 4s, which gives the s0, s0 bits and moves the
  negative part two columns up as n0 - 1.
* For the other rows, -s = n - 1.
* All the -1 terms add up to exactly the constant ones listed above, modulo
  2^(2N).

For N = 8 this gives the familiar 5-row matrix with 56 bits:

```
            n0 s0 s0 z08 z07 ... z00
      1  n1 z18 ... z10     s0
   1 n2 z28 ... z20   s1
 n3 z38 ... z30  s2
z47 ... z40  s3
```

The matrix is stored by slot × column, not by "row". Row i sits in slot i. Its
sign bit s_i goes into slot i+1, which is still empty at column 2i because
row i+1 only starts at column 2i+2. So no column ever holds more than N/2+1
bits: 27 for N = 53. That is exactly the input height of both arrays.

For N = 53 the layout has 1537 bit positions. The last row needs 54 bits
because its group can select +2X. The source quotes 1536 bits for this case;
the product is exact either way. The function `mult_pkg::pp_slot_used()`
describes the layout, and the testbenches use it to check it.

## The (9,2) counter family: sideways carries without rippling

The whole family is built from (3,2) counters (full adders). The trick is
that each counter passes some weight-2 signals straight to the counter of the
same kind in the next column to the left. In the same way, it takes the ones
arriving from the right as weight-1 inputs:

| counter | built from | carries out / in | (3,2) stages |
|---|---|---|---|
| (4,2) `counter_4_2` | (3,2) on x0..x2: carry goes left; (3,2) on x3, t0, carry from right | 1 | 2 |
| (6,2) `counter_6_2` | (3,2) on x0..x2 and on x3..x5: both carries go left; a (4,2) on t0, T1, t2, T3 | 3 | 3 |
| (9,2) `counter_9_2` | (3,2) on x0..x2, x3..x5, x6..x8: three carries go left; a (6,2) on t0, T1, t2, T3, t4, T5 | 6 | 4 |

Each counter obeys

    sum(x) + sum(carries in) = 2·sum(carries out) + 2·y1 + y0.

A carry that leaves a column never depends on a carry that enters the same
column at the same stage. The stage-1 carries depend on the column's own
inputs only. The stage-2 carries depend only on the neighbour's stage-1
carries, and so on. So in every stage the columns work in parallel, and
nothing ripples across the 106 columns. `tb_column_9_2` checks this stage by
stage.

One column of the array (`column_9_2`) works like this:

1. Three (9,2) counters take partial-product bits 0-8, 9-17 and 18-26 of the
   column.
2. Each (9,2) counter leaves y0 in its own column and sends y1 one column
   left. That reduces 27 bits to 6 per column.
3. A (6,2) counter takes the three local y0 bits and the three y1 bits from
   the right neighbour.
4. The (6,2) counter produces the `sum` of the column and a `carry` into the
   next column. These are the two rows for the adder.

All 24 signals that a column passes left travel in one packed struct,
`mult_pkg::col92_link_t`:

* 3 × 6 carries of the (9,2) counters,
* 3 y1 bits,
* 3 carries of the (6,2) counter.

The array (`reduction_array_9_2`) chains 106 of these columns. Column 0
receives zeros. What leaves column 105 has weight 2^106 and is dropped.

The depth is 4 + 3 = 7 (3,2) stages. For comparison, these schemes are not
built here:

* a Wallace tree: 7 stages,
* (7,3) followed by (3,2) counters: 8 stages,
* a tree of (4,2) counters: 8 stages.

## The (27,5) + (5,5,4) scheme: diagonal routing

`counter_27_5` counts the 27 bits of one column into y[4:0]. Inside, it has:

* four (7,3) counters on x0-6, x7-13, x14-20 and x21-26 (the last one with an
  unused input),
* then (3,2) and (2,2) counters, in the stages 4, 5, 5.5, 6.5 and 7.5 of the
  source's dot diagram.

This is 7.5 (3,2) stages if a half adder counts as half a stage.

Bit k of the count of column c has weight 2^(c+k), so it is routed k columns to
the left. After this routing every column holds five bits: y0 of its own
counter, y1 of column c-1, and so on up to y4 of column c-4.

`counter_5_5_4` then adds the five bits of an even column (weight 1) and of the
odd column beside it (weight 2) into 4 bits. It uses six (3,2) counters in four
stages.

`slice_27_5` is one two-column slice: two (27,5) counters above one (5,5,4).
The diagonal routing lives in `reduction_array_27_5`. The two final rows are:

| column | row_a | row_b |
|---|---|---|
| 2j | bit 0 of slice j | bit 2 of slice j-1 |
| 2j+1 | bit 1 of slice j | bit 3 of slice j-1 |

## Final adder

`cla_adder` is a 106-bit carry-lookahead adder. The source names a CLA but does
not give its structure, so this design uses a Kogge-Stone parallel-prefix
network: 7 levels for 106 bits.

## Modules

| file | content |
|---|---|
| `mult_pkg.sv` | widths (53, 27, 106), `booth_code_t`, `col92_link_t`, `pp_slot_used()` |
| `counter_3_2.sv`, `counter_2_2.sv` | full adder, half adder |
| `counter_7_3.sv`, `counter_5_5_4.sv`, `counter_27_5.sv` | counters of the (27,5) scheme |
| `counter_4_2.sv`, `counter_6_2.sv`, `counter_9_2.sv` | the (9,2) family |
| `booth_encoder.sv`, `booth_decoder.sv`, `booth_pp_generator.sv` | partial products |
| `column_9_2.sv`, `reduction_array_9_2.sv` | (9,2)-family array |
| `slice_27_5.sv`, `reduction_array_27_5.sv` | (27,5)/(5,5,4) array |
| `cla_adder.sv` | final adder |
| `booth_multiplier_top.sv` | top: `multiplicand`, `multiplier` in; `product_9_2`, `product_27_5` out |

The top has one parameter, `N` (significand width, default 53). `N` may be at
most 53, because the arrays take 27 rows. Smaller values pad the unused rows
with zeros; `N = 8` reproduces the textbook example. The arrays take `COLS`
(default 106), and the adder takes `WIDTH`. `reduction_array_27_5` needs an even
`COLS`.

## Where this departs from the source design

* **Both arrays built side by side.** The source proposes both schemes for the
  same multiplier. Here both are driven from one partial-product generator.
* **Placement of the Booth decoders.** In the source, the decoders sit inside
  each column slice, or inside the (27,5) circuits. Here they sit in
  `booth_pp_generator`, which is logically the same.
* **Choices the source leaves open:**
  * the order of the six inputs of the column's (6,2) counter,
  * which nine bits go to which (9,2) counter,
  * D for the zero rows,
  * the adder's structure,
  * the dropping of carries above bit 105.
* **Circuit-level content not modelled.** The folded-transistor and
  cross-coupled-load (3,2) cells, the dual-rail outputs, the CMOS and BiCMOS
  output buffers and the bipolar drivers of the Booth lines are circuit
  techniques with no logic content beyond what is here.
* **Not built:** the 53-row variant without Booth encoding, and the rounding,
  exponent and sign logic of a full floating-point multiplier.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_counter_*` | exhaustive, or random for (27,5): counts, sideways-carry identities, no carry depending on a same-stage carry input |
| `tb_booth_encoder`, `tb_booth_decoder` | the code table above, all cases |
| `tb_booth_pp_generator` | sum of slots = x·y: all 8-bit pairs, 3000 random 53-bit pairs; layout (5 rows / 56 bits, ≤ 27 per column) |
| `tb_column_9_2` | column identity and no same-stage carry dependence |
| `tb_reduction_array_9_2`, `tb_reduction_array_27_5` | two output rows = sum of 27 random rows mod 2^106 |
| `tb_slice_27_5` | one slice, and two slices wired as the four-column prototype |
| `tb_cla_adder` | all 8-bit pairs; random and full-propagation 106-bit pairs |
| `tb_booth_multiplier_top` | full 53-bit design: both products = x·y within one clock period, over corner and 2000 random operands. It also counts that every Booth operation, sideways carries at both levels, a (27,5) weight-16 output and an adder carry across the middle all occurred |
| `tb_booth_multiplier_8b` | N = 8 multiplier, all 65536 pairs |

Example with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_booth_multiplier_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/mult_pkg.sv tb/tb_booth_multiplier_top.sv
./obj_dir/Vtb_booth_multiplier_top
```

The full-size end-to-end test runs in about a second.
