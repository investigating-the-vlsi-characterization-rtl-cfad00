# Two parallel signed multipliers: Baugh-Wooley array and radix-4 Modified Booth

Multiplying two's-complement numbers in one combinational pass comes down to
two jobs: generating the partial products, and adding them. The sign bits are
what make this awkward, because the most significant bit of each operand
carries a *negative* weight. This design holds two classic answers to that
problem, side by side, as fully parameterised SystemVerilog:

- **Baugh-Wooley** (`bw_mult`) keeps one partial-product row per multiplier bit
  (N rows of N bits) but rewrites the negative cross terms so that every row
  can be added as an unsigned number. Each partial-product bit is a single
  AND or NAND gate.
- **Modified Booth Encoding, radix 4** (`booth_mult`) recodes the multiplier
  into base-4 digits from {-2,-1,0,+1,+2}, which halves the number of rows
  (N/2 rows of N+1 bits). Each row is 0, ±A or ±2A of the multiplicand A.

Both produce the exact 2N-bit signed product of two N-bit signed operands and
both are purely combinational. Baugh-Wooley adds its rows in a trimmed
carry-save array of N(N-1) full adders; Booth adds its rows in a generic
carry-save array (`pp_array_adder`). Each ends in a ripple-carry adder.
The default strength is N = 64; the strengths 4, 8, 16 and 32 are the same RTL
with `N` overridden and are all exercised by the testbenches.

The multipliers are meant as building blocks, for example for the modular
channels of a residue number system (RNS) processor, where many small signed
multipliers work in parallel, and as a pair for comparing area, delay and
switching activity of the two schemes on the same stimulus.

## Module map

| module | what it is |
|---|---|
| `signed_mult_top` | the two multipliers side by side, each with its own operand and product ports |
| `bw_mult` | modified Baugh-Wooley multiplier: N² AND/NAND gates, N-1 carry-save rows of N full adders, N-bit ripple adder |
| `booth_mult` | radix-4 Booth multiplier: N/2 × (`mbe_encoder` + `mbe_pp_gen`), correction row, `pp_array_adder` |
| `mbe_encoder` | one three-bit multiplier group → select lines `one`, `two`, `neg` |
| `mbe_pp_gen` | Booth decoder: multiplicand + select lines → one (N+1)-bit row and its +1 bit |
| `pp_array_adder` | carry-save array that reduces the Booth rows to two, then a ripple-carry adder |
| `full_adder` | the one-bit cell of both adder structures |
| `mbe_pkg` | `mbe_sel_t`, the struct of select lines, and `mbe_digit()` to read it back as an integer |

## Baugh-Wooley: turning subtractions into additions

Write X = -x[N-1]·2^(N-1) + Σ x[i]·2^i and Y likewise. Expanding X·Y gives
four groups of terms: the sign-times-sign term x[N-1]y[N-1]·2^(2N-2) and the
unsigned core Σ x[i]y[j]·2^(i+j) are positive, but the two cross terms
x[i]·y[N-1] and x[N-1]·y[j] (i, j < N-1) are subtracted. Replacing each
subtracted bit group by its two's complement turns every bit into an added bit
and leaves two constants behind:

```
P =  x[N-1]y[N-1]·2^(2N-2)
   + Σ_{i,j<N-1} x[i]y[j]·2^(i+j)
   + 2^(N-1) · Σ_{i<N-1} ~(x[i]y[N-1])·2^i
   + 2^(N-1) · Σ_{j<N-1} ~(x[N-1]y[j])·2^j
   + 2^N - 2^(2N-1)
```

Working modulo 2^(2N), the constant -2^(2N-1) is the same as +2^(2N-1). So in
hardware:

- row j (j = 0..N-1) holds bit `x[i] & y[j]` in column i+j;
- the bits where exactly one of i, j is N-1 are inverted (NAND); the corner bit
  x[N-1]y[N-1] stays an AND;
- the constants are ones in columns N and 2N-1.

All rows are then simply added and the carry out of column 2N-1 is
discarded. For N = 4 this is the familiar 4×4 array with NAND gates along the
left column and the bottom row, plus a 1 in columns 4 and 7.

### The Baugh-Wooley adder array

`bw_mult` adds its rows in the classic trimmed array, so the cell count is
exactly N² gates and N(N-1) full adders, plus an N-bit final adder:

- Row 0 is the bare first partial product; it needs no adders.
- Adder row j (1..N-1) has N full adders covering columns j..j+N-1. Cell k of
  row j adds the sum that the row above left in the same column, the gate
  output x[k]&y[j] (or its NAND), and the carry that the row above sent into
  this column. Its own carry goes one column left, to row j+1.
- The lowest column of each row is then final: product bit p[j] is the sum
  out of cell 0 of row j (p[0] is the gate x[0]&y[0]).
- The constant in column N enters as an extra carry into row 1's column-N
  cell, whose third input would otherwise be empty.
- After row N-1, a sum vector and a carry vector remain over columns
  N..2N-1. An N-bit ripple-carry adder adds them; its top cell has no sum
  bit to add, and takes the constant in column 2N-1 instead.

The critical path runs diagonally through the N-1 array rows and then along
the N ripple stages.

## Modified Booth: recoding the multiplier

The multiplier y is read in overlapping three-bit groups
{b3,b2,b1} = {y[2k+1], y[2k], y[2k-1]}, with y[-1] = 0. Group k stands for
the digit d_k = -2·b3 + b2 + b1 with weight 4^k, and Y = Σ d_k·4^k exactly.

| b3 b2 b1 | digit | row |
|---|---|---|
| 000 | 0 | nothing |
| 001, 010 | +1 | A |
| 011 | +2 | 2A |
| 100 | -2 | -2A |
| 101, 110 | -1 | -A |
| 111 | 0 | nothing |

**Encoder.** `mbe_encoder` does not output the digit as a number but as three
select lines (`mbe_pkg::mbe_sel_t`):

```
one = b2 ^ b1                  |digit| = 1
two = (b3 ^ b2) & ~(b2 ^ b1)   |digit| = 2
neg = b3 & ~(b2 & b1)          digit < 0
```

`neg` is masked for 111 so that this group gives a true zero row rather than
"inverted zero plus one", which is arithmetically the same but toggles every
bit of the row.

**Decoder.** `mbe_pp_gen` sign-extends A to N+1 bits (so 2A fits) and forms
each bit as `((one & A[j]) | (two & A[j-1])) ^ neg`, with A[-1] = 0: 2A is A
moved one column left with a zero entering at the bottom. For a negative digit
this yields the one's complement; the missing +1 is handed on as `neg_lsb`.
The row value is therefore `signed(pp) + neg_lsb = d_k · A`.

**Row placement.** Row k is sign-extended to 2N bits and shifted left by 2k
columns, so each row sits two columns above the previous one with its sign
bit copied out to the left edge. The N/2 correction bits land in columns
0, 2, 4, …, N-2, never on top of each other, so they share a single extra row.
That gives N/2 + 1 rows in total, against N rows for Baugh-Wooley.

Worked examples, both checked by the testbenches: for -3 × 5 with N = 4,
y = 0101 gives the groups 010 (+1) and 010 (+1), so P = -3 + 4·(-3) = -15;
for -3 × -4, y = 1100 gives 000 (0) and 110 (-1), so P = 4·(-1)·(-3) = 12.

## Adding the Booth rows

`pp_array_adder` adds the N/2 + 1 Booth rows. It is organised like the array
of an array multiplier, but generic, for any number of pre-shifted rows:

1. Rows 0 and 1 form the initial (sum, carry) pair.
2. Each further row passes through one row of W full adders used as 3:2
   compressors; each column's carry moves one column to the left. After the
   last row two vectors remain.
3. A W-bit ripple-carry adder built from the same cell adds the two.

Carries out of the top column are dropped (the `UNUSED` lint warnings on
`co[W-1]` and `rc[W]`, and on `rc[N]` in `bw_mult`, are exactly these), which
is correct because every row is already sign-extended to the full width.
Every carry-save row spans all W columns even where a row is known to be
zero; constant cells fold away in synthesis. The critical path is
(rows - 2) carry-save stages plus W ripple stages, so Booth's halved row count
shortens the array part directly.

## Interfaces and timing

All ports are plain vectors; operands and products are two's complement.

| module | ports |
|---|---|
| `signed_mult_top #(N=64)` | `bw_x, bw_y [N-1:0]` in, `bw_p [2N-1:0]` out; `mbe_x, mbe_y [N-1:0]` in, `mbe_p [2N-1:0]` out |
| `bw_mult #(N=64)`, `booth_mult #(N=64)` | `x, y [N-1:0]` in, `p [2N-1:0]` out |
| `mbe_encoder` | `grp [2:0]` = {b3,b2,b1} in, `sel` (`mbe_sel_t`) out |
| `mbe_pp_gen #(N=64)` | `a [N-1:0]`, `sel` in; `pp [N:0]`, `neg_lsb` out |
| `pp_array_adder #(W=128, ROWS=33)` | `rows [ROWS-1:0][W-1:0]` in, `sum [W-1:0]` out |

There are no clocks, resets or handshakes: a product is valid one
combinational delay after the operands settle. To run one at a clock rate,
register the operands and the product around it. `booth_mult` requires an
even N (checked by an elaboration-time assertion); `bw_mult` requires N ≥ 2.

## Design choices beyond the textbook schemes

The partial-product equations of both multipliers and the Booth operation
table are standard and followed as stated above. The following are choices of
this implementation:

- The exact encoder gate equations, including the masked `neg` for group 111.
- Negative Booth rows as one's complement plus a separate +1 bit, gathered in
  one extra row, instead of any other two's-complement scheme.
- Full sign extension of Booth rows rather than a sign-extension-prevention
  constant. This costs adder cells in the upper columns but keeps every row a
  plain signed number.
- Where the Baugh-Wooley constants enter the array (a carry into column N,
  the free input of the top final-adder cell).
- The Booth row adder: a linear carry-save array and a ripple-carry final
  adder. A Wallace/Dadda tree or a fast final adder would change delay, not
  function, and is a drop-in replacement for `pp_array_adder`.
- Ripple-carry final adders in both multipliers.
- No pipelining anywhere.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`; each has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `mbe_encoder_tb` | all 8 groups against the digit table; `one` and `two` never both set; no `neg` on a zero digit |
| `mbe_pp_gen_tb` | `signed(pp) + neg_lsb == digit · a` for all five digits, all 256 multiplicands at N = 8, corners and random values at N = 64 |
| `pp_array_adder_tb` | random and all-ones rows against plain addition, at W = 16 / 5 rows and at the default 128 / 33 |
| `bw_mult_tb`, `booth_mult_tb` | one instance each at N = 4, 8, 16, 32, 64: every operand pair at N = 4 and 8, corner × corner and 3000 random pairs above that |
| `signed_mult_top_tb` | the top at its defaults (N = 64): both products against a 128-bit reference and against each other, on the worked examples, 21845 × -21846 = -477225870, 4199068790813088450 × -2390644373132781435, corner values, 20 samples 5 ns apart and 5000 random pairs with narrow operands mixed in; it counts each Booth digit (including group 111) and each operand-sign combination and fails if any never occurred |

The reference products come from the simulator's own wide signed
multiplication, independent of the RTL.

## Simulating

All files are in `rtl/` (design) and `tb/` (testbenches and the helper
`mult_size_check`). The package must be read first. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mbe_pkg.sv rtl/*.sv tb/mult_size_check.sv tb/booth_mult_tb.sv \
    --top-module booth_mult_tb -Mdir obj_booth
./obj_booth/Vbooth_mult_tb
```

Replace `booth_mult_tb` by any other testbench name; only `bw_mult_tb` and
`booth_mult_tb` need `tb/mult_size_check.sv`. Each run takes seconds. To build
another strength, override `N` on `signed_mult_top`, `bw_mult` or
`booth_mult`, e.g. `-GN=16` when one of them is the top.

## Limits

- Only function is modelled. Area, delay and power depend on the target
  technology and synthesis tool; the RTL is written for clarity of structure
  (explicit full-adder cells), not for a particular FPGA's carry chains or
  DSP blocks, which a synthesis tool may or may not infer from it.
- The Booth adder's carry-save rows span the full 2N-bit width, so before
  synthesis removes the cells with constant inputs it holds more adders than a
  hand-trimmed Booth array would.
