# Fused add-multiply unit with radix-8 sum recoding, 4:2/5:2 compressors and a Ladner-Fischer adder

Many DSP kernels compute `Z = X * (A + B)`. The obvious circuit adds `A + B`
with a carry-propagate adder and then multiplies. This unit does not. The
addends go straight into a **sum-to-modified-Booth (S-MB) recoder**, which gives
the radix-8 Booth digits of `A + B`. A Booth multiplier then uses those digits.
The only carry-propagate adder on the main path is the final one of the
multiplier.

```
          A  B
          |  |
   +------v--v-------+  Booth digits of Y = A + B
   | smb_recoder_r8  |---------------------+
   +-----------------+                     |
                                 X         |
                           +-----v---------v--+
                           |  booth_ppg_r8     |  D partial products + 1 correction row
                           +--------+---------+
                                    | D+1 rows
                           +--------v-----------+
                           | pp_compressor_tree |  5:2 and 4:2 compressor rows
                           +----+----------+----+
                                | S        | C
                           +----v----------v----+
                           | ladner_fischer_adder|
                           +---------+----------+
                                     v
                              Z = X * (A + B)
```

The unit is purely combinational. It has no clock, no registers and no reset.
`z` is valid one propagation delay after `x`, `a`, `b` or `tc` change.

## Interface of `fam_top`

| port | dir | width  | meaning |
|------|-----|--------|---------|
| `x`  | in  | N      | multiplicand X |
| `a`  | in  | N      | addend A |
| `b`  | in  | N      | addend B |
| `tc` | in  | 1      | 1: X, A and B are two's complement; 0: all three are unsigned |
| `z`  | out | 2N+1   | exact product X*(A+B): two's complement if `tc`=1, unsigned if `tc`=0 |

The parameter `N` defaults to 16. Odd widths work as well; 17 bits is tested.
Derived sizes:

| N  | bits of Y=A+B handled | Booth digits D | rows into the tree | product width |
|----|-----------------------|----------------|--------------------|---------------|
| 16 | 18                    | 6              | 7                  | 33            |
| 17 | 21 (19 used)          | 7              | 8                  | 35            |

Why 2N+1 output bits:
- The largest unsigned result, (2^N-1)(2^(N+1)-2), is below 2^(2N+1).
- The signed extremes, such as -2^(N-1) * -2^N, fit in 2N+1 bits of two's complement.

So every internal row is computed modulo 2^(2N+1), and all carries out of the
top column are dropped.

## Radix-8 sum recoding (`smb_recoder_r8`)

`A + B` needs N+1 bits: N+1 bits signed when `tc`=1, N+1 bits unsigned when
`tc`=0. Both fit in N+2 bits of two's complement. The recoder extends A and B
(by sign or by zero, as `tc` selects) to 3·D bits, with D = ceil((N+2)/3). A
full-adder chain forms Y. Each overlapping 4-bit group then gives one digit:

```
d[j] = -4*y[3j+2] + 2*y[3j+1] + y[3j] + y[3j-1]      (y[-1] = 0)
Y    = sum_j d[j] * 8^j,   d[j] in {-4 .. +4}
```

| y[3j+2..3j-1] | digit | | y[3j+2..3j-1] | digit |
|---|---|---|---|---|
| 0000 | 0  | | 1000 | -4 |
| 0001, 0010 | +1 | | 1001, 1010 | -3 |
| 0011, 0100 | +2 | | 1011, 1100 | -2 |
| 0101, 0110 | +3 | | 1101, 1110 | -1 |
| 0111 | +4 | | 1111 | 0 |

Each digit travels as `fam_pkg::booth_digit_t`: a sign flag `neg` plus a one-hot
magnitude (`one`, `two`, `three`, `four`). A zero digit has all magnitude bits
low and `neg` low.

The adder and the encoder sit in one block, so a separate adder never has to
finish before Booth encoding begins. The bit-level structure (a plain
full-adder chain, then a table encoder per group) is this implementation's own.
It is the simplest circuit that does the job. It is not one of the published
optimized S-MB gate structures.

## Partial products (`booth_ppg_r8`)

Radix-8 needs the multiples 0, X, 2X, 3X and 4X. 2X and 4X are wired shifts.
The "hard" multiple 3X = X + 2X is computed once, with a second
`ladner_fischer_adder` of the product width.

Row j is the selected multiple, shifted up by 3j bits. For a negative digit the
row is also bit-inverted. The +1 that completes each two's complement negation
goes into bit 3j of one extra **correction row**. The compressor tree then adds
that +1 at no extra cost. Every row is fully sign-extended to 2N+1 bits. This
costs some area, but it keeps the arithmetic simple and exact.

## Reduction with 5:2 and 4:2 compressors (`pp_compressor_tree`)

The compressor cells are column slices. Each cell passes its lateral carries to
the next higher column:

- `compressor_4_2`: a1+a2+a3+a4+cin = sum + 2·(carry + cout). It is built from
  two full adders.
- `compressor_5_2`: a1+…+a5+cin1+cin2 = sum + 2·(carry + cout1 + cout2). It is
  built from three full adders.

In both cells the lateral carry-outs depend only on the column's own inputs, so
a row of cells does not ripple. `compressor_4_2_row` and `compressor_5_2_row`
lay the cells across the word and return the carry row already shifted into
place.

The tree picks its schedule from the number of rows. It never needs more than
two compressor levels:

| rows | schedule | used by |
|------|----------|---------|
| 2–4  | one 4:2 row | — |
| 5–7  | 5:2 on rows 0–4, then 4:2 on (its S, its C, row 5, row 6) | N = 16 (7 rows) |
| 8    | 5:2 on rows 0–4, then 5:2 on (S, C, rows 5–7) | N = 17 (8 rows) |
| 9–10 | two 5:2 rows side by side, then one 4:2 | N up to 25 |

Missing rows are tied to zero. More than 10 rows stops elaboration with an
error. This schedule is a choice made here: the design names the two compressor
types but does not say how rows are assigned to them.

## Final adder (`ladner_fischer_adder`)

A W-bit parallel prefix adder with carry-in and carry-out, in three stages:

1. **Pre-processing:** `p = a ^ b`, `g = a & b`. `cin` is folded into bit 0 as
   `g0 | p0 & cin`.
2. **Carry generation:** the prefix operator is
   `G(i:k) = G(i:j) | P(i:j) & G(j-1:k)` and `P(i:k) = P(i:j) & P(j-1:k)`.
   - The first level combines each odd bit with the even bit below it.
   - A Sklansky (divide-and-conquer) tree over the odd bits follows. It has
     ceil(log2(W/2)) levels.
   - One last level gives each even bit its prefix from its odd neighbour.
3. **Post-processing:** `sum[i] = p[i] ^ G(i-1:0)`, `cout = G(W-1:0)`.

In this shape the prefix cells of the middle levels have half the fanout of a
plain Sklansky tree. The price is one extra level. The same module computes 3X
in the partial product generator.

## Simulating

Each testbench checks its results on its own and ends with the line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fam_pkg.sv tb/fam_top_tb.sv \
          --top-module fam_top_tb -Mdir obj_fam
./obj_fam/Vfam_top_tb
```

Substitute any other testbench name:

| testbench | what it covers |
|-----------|----------------|
| `fam_top_tb` | whole unit at the default N=16. Covers edge operands and 50,000 random sets in both modes. Fails if any of these never occurred: a mode, a digit value −4…+4, an A+B wider than N bits, a product that needs all 2N+1 bits |
| `fam_top_n17_tb` | the same checks at N=17 (odd width, 5:2 + 5:2 schedule) |
| `smb_recoder_r8_tb` | digits against the table formula and Σ d·8^j = A+B, at N=16 and N=17 |
| `booth_ppg_r8_tb` | each row, the correction row and the total, for every digit value |
| `pp_compressor_tree_tb` | all four schedules (3, 7, 8 and 10 rows) |
| `compressor_4_2_tb`, `compressor_5_2_tb` | exhaustive check of one column |
| `ladner_fischer_adder_tb` | exhaustive at 8 bits, plus random and carry-chain cases at 17 and 33 bits |

Every testbench runs in well under a minute. The RTL lints cleanly with
`verilator --lint-only -Wall`. The only warnings left are about carries of
weight 2^W that are dropped on purpose (the top carry of each row, `cout` of
the final adder and of the 3X adder).

## How far to trust it, and where it departs

- **Functionally exact:** `z` matched a 64-bit reference for every vector run,
  signed and unsigned, at N = 16 and N = 17.
- **Following the design:**
  - the recoder → generator → compressor → Ladner-Fischer chain;
  - the radix-8 digit table;
  - the port sets of the 4:2 and 5:2 compressors;
  - the three stages and the prefix equations of the final adder.
- **Choices made here:**
  - how the mode is chosen (a single `tc` input for all operands);
  - the output width;
  - the gate structure inside the recoder;
  - how 3X is formed;
  - the correction row and full sign extension;
  - the compressor-to-row schedule;
  - the inner structure of the compressor cells;
  - the exact Ladner-Fischer tree shape;
  - fully combinational operation.
- **Not reproduced:** the FPGA results published for the original design (Spartan-3E
  xc3s500e-4pq208: 298 slices, 690 LUTs, 49.26 ns). This RTL makes no timing
  or area claim of its own. Its gate structure differs in the places listed
  above, and that will change such numbers.
- **Not built:** the baseline the design is compared against (radix-4 S-MB
  recoder, carry-save adder tree, carry-lookahead final adder).

## Changing it

- Width: set `N` on `fam_top`. D, the number of rows and the product width
  follow from it. The tree accepts up to 10 rows (N ≤ 25); for wider units add
  a schedule branch in `pp_compressor_tree`.
- Pipelining: the natural register points are after the recoder (the digits),
  after the compressor tree (S and C), and at `z`.
