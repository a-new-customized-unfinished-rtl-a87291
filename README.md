# Redundant binary Booth multiplier with a modified partial product generator

This is a combinational N x N two's complement multiplier, 32 x 32 by default.
Its partial products are summed as redundant binary (RB) numbers. Each RB digit
is -1, 0 or +1, so two RB numbers can be added with no carry travelling more
than one column. The tree that adds the partial products then has a depth that
depends only on how many rows it adds, not on the word length.

The design centres on its partial product generator. A radix-4 Booth RB
multiplier makes N/4 RB rows, plus corrections for the Booth negations and for
the RB conversion. Normally those corrections form one more row, the
*error-correcting word* (ECW) row. With N a power of two, that extra row costs a
whole adder stage: 8 + 1 rows need 4 stages instead of 3. This generator
(RBMPPG-2) leaves no correction row:

* each row's ECW goes into the empty low columns of the next row, and
* the last row's ECW is folded into the top digits of the first row and the
  low negative bits of the last row.

So N/4 rows enter the tree, which has log2(N/4) stages.

```
 a, b ──► rbmppg ───────────────► rbpp_tree ─────────► rb2nb ──► p = a*b
          Booth encode/select     log2(N/4) stages     RB → two's complement
          N/4 RB rows, no ECW     of carry-free RB     (prefix / carry-select
          row (ECWs absorbed)     adders               adder)
```

| N  | RB rows | adder stages | converter width |
|----|---------|--------------|-----------------|
| 8  | 2       | 1            | 16              |
| 16 | 4       | 2            | 32              |
| 32 | 8       | 3            | 64 (default)    |
| 64 | 16      | 4            | 128             |

## RB digits

An RB digit travels on two wires, `p` and `n` (`rbm_pkg::rb_digit_t`), and its
value is `p - n`. So (0,0) and (1,1) mean 0, (1,0) means +1 and (0,1) means -1.
An RB number is then just two bit vectors, X+ and X-, with value X+ - X-. This
is why a pair of ordinary binary rows can become one RB row at almost no cost.

## From Booth rows to RB rows (`mbe_encoder`, `mbe_decoder`, `rbbe2_row`)

The multiplier `b` is split into overlapping groups `b[2k+1] b[2k] b[2k-1]`,
with `b[-1] = 0`. Each group becomes a Booth digit in {-2..2} (000 and 111 →
0, 001 and 010 → +1, 011 → +2, 100 → -2, 101 and 110 → -1). `neg` is set only
for 100, 101 and 110. For each digit, `mbe_decoder` selects A or 2A as an
(N+1)-bit row and inverts the row when the digit is negative. It leaves out
the "+1" of the negation: the row plus `neg` equals digit × A.

`rbbe2_row` makes one RB row from two neighbouring Booth rows: X (weight 1)
and Y (weight 4). X goes into the positive bits and the inverted Y into the
negative bits. This works because X + 4Y = X − 4·~Y − 4 in two's complement.
Relative to the row's column 0, the row has these digits (X+ / X-):

| column    | X+      | X-                      |
|-----------|---------|-------------------------|
| 0 .. 1    | x[j]    | 0                       |
| 2 .. N-1  | x[j]    | ~y[j-2]                 |
| N, N+1    | sx, sx  | ~y[N-2], ~y[N-1]        |
| N+2       | ~sy     | sx                      |

Here `sx` and `sy` are the sign bits of the two Booth rows. The sign bit of X
has weight −2^N, and it is written as +2^N + 2^(N+1) − 2^(N+2). So the row
needs no sign-extension digits and no constant, and it ends at column N+2.

The only corrections left are the two negation bits and the −4 from the
inversion. They make a 4-digit word "0 E 0 F", with F = negx at column 0 and
E = negy − 1 at column 2. This is the row's ECW.

## Where the correction words go (`rbmppg`, `ecw_merge`)

Row r starts at product column 4r, so row r+1 has nothing in columns 4r to
4r+3. Those are exactly the columns of row r's ECW. `rbmppg` writes ECW r into
row r+1 at those columns: F into X+ at column 4r, E into X- at column 4r+2.

The last row has no row below it. Its ECW lies in columns N-4..N-1. Here is
the 8 x 8 case (two rows, `+` marks X+ and `-` marks X-):

```
column          14  13  12  11  10   9   8   7   6   5   4   3   2   1   0
row 0   +                      ~sy  a1  a0   x   x   x   x   x   x   x   x
        -                       qc  ~y  ~y  ~y  ~y  ~y  ~y  ~y  ~y        
row 1   +      ~sy  sx  sx   x   x   x   x   x   x   x   x              F0
        -       sx  ~y  ~y  ~y  ~y  ~y  ~y  b3  b2  b1  b0      E0        
last ECW                                     0  E1   0  F1                
```

F0 and E0 are row 0's ECW, now inside row 1. Row 1's own ECW sits in columns
4..7. Below it, row 1 has two free negative bits (columns 4 and 5). Its two
lowest negative bits (~y0 and ~y1 of its Y row, columns 6 and 7) can be
rewritten. Just above it are the top digits of row 0: sx, sx in X+ at columns
N and N+1, and sx in X- at column N+2.

`ecw_merge` adds up the value of all these digits together with the last ECW.
In units of 2^(N-4), the total is

    T = -16·sx0 - 4·~y0 - 8·~y1 + negx - 4·~negy,   which lies in [-32, +1].

It writes T back into the same slots:

    T = 16·a - b - 64·qc
    a  = new row-0 X+ at columns N, N+1   (2 bits)
    b  = new last-row X- at columns N-4..N-1   (4 bits)
    qc = new row-0 X- at column N+2

with `qc = (T < -15)`, `U = T + 64·qc`, `a = ceil(U/16)` and `b = 16·a − U`.
Every T in [−32, 1] has such a form, so the last ECW disappears with no extra
row. For any N the window is at the same place relative to N: the last row's
ECW always ends at column N-1, directly below row 0's top digits. The block is
a 5-input function (sx0, y0 and y1 of the last row, negx and negy of the last
row). An assertion in `ecw_merge` checks the range of T.

## Carry-free accumulation (`rbfa`, `rbha`, `rba`, `rbpp_tree`)

At column i, the full adder cell splits x + y ∈ [−2, 2] into 2·c + w. For a
sum of ±1 it picks c and w from one flag: whether both digits of column i−1
are non-negative (`h`). If they are, the carry coming up from column i−1 is 0
or +1, and the cell picks w ∈ {−1, 0}. If not, that carry is −1 or 0, and it
picks w ∈ {0, +1}. Either way, s = w + c_in is always a valid digit. The half
adder is the same cell with y = 0, used in columns where only one operand has
digits.

`rba` is one row of these cells. Its parameters `A_LO..A_HI` and
`B_LO..B_HI` give the columns each operand can occupy. Columns where both
operands are present get full adders; all other columns get half adders. The
carry out of the top column is dropped, because the product is needed modulo
2^(2N).

`rbpp_tree` adds rows (0,1), (2,3), … and then the pairs of results, in a
heap-numbered array of `rba` blocks. It works out each node's column range at
elaboration time: row r spans 4r−4 .. 4r+N+2, and a sum spans the union plus
one carry column, capped at 2N−1. From these ranges it sets the full/half
adder mix of each block.

## Back to two's complement (`rb2nb`)

The RB sum is converted as X+ + ~X- + 1 by a hybrid adder:

* 4-bit blocks each compute their sum for carry-in 0 and for carry-in 1;
* a Kogge-Stone prefix network over the blocks' generate and propagate
  signals finds every block's carry-in (the +1 enters at block 0);
* each block's carry-in then selects one of its two sums.

This is the only carry-propagating step in the multiplier.

## Interface and timing

`rb_multiplier #(N = 32)`: inputs `a[N-1:0]` and `b[N-1:0]` (two's complement),
output `p[2N-1:0] = a*b` (exact). There is no clock and no register. The result
is valid one combinational delay after the operands change. For pipelining,
registers go between `rbmppg`, the tree stages and `rb2nb`.

N must be a power of two, at least 8. A different N is rejected at elaboration.

## What follows the original scheme and what is this design's own

Taken from the RBMPPG-2 scheme:

* radix-4 Booth recoding into N/2 rows, and the RB digit coding;
* each RB row made from two adjacent Booth rows by inverting one of them;
* the ECW of each row moved into the next row;
* the last ECW folded into the first row's MSBs and the last row's LSBs, for
  N/4 rows;
* a tree of RB full and half adders;
* an RB-to-binary converter built from a parallel-prefix / carry-select
  adder.

Chosen here:

* **Sign handling of a row and the ECW values.** In the original scheme,
  F ∈ {−1, 0}. Here F = negx ∈ {0, 1} and E = negy − 1, because the row's sign
  digits are arranged differently (table above).
* **The fold window.** It also rewrites row 0's negative bit at column N+2,
  besides the two MSBs of row 0 and the four low negative bits of the last
  row. The original fold touches only two first-row digits. Here, with the
  sx, sx / sx row ending, the window's value range does not fit without the
  third slot.
* **`ecw_merge` is written as arithmetic** (sum, then re-encode), not as
  hand-minimised gate equations.
* **The adder cell equations.** These are the classic two-column carry-free
  rules.
* **The number of full adders per adder block.** Rows are not sign-extended
  to the full word, so a block has full adders only in the columns where its
  two operands overlap, and half adders elsewhere. The original 32 x 32 design
  gives every adder block 64 full adders. Here, for example, the first block
  of the 32 x 32 tree has 35 full adders.
* **The gate-level cost of the fold.** The original scheme says the fold adds
  one transmission-gate delay to the generator. This RTL is not
  transistor-level and makes no such claim.
* **The converter's block size (4) and its prefix network (Kogge-Stone).**
* **Two's complement operands only.** There is no unsigned mode.

## How it was verified

Each module has a self-checking testbench in `tb/`. Each was also run against
a copy of its module with one deliberate bug, and each one failed against that
copy.

* `tb_rb_multiplier` runs N = 8 for all 65 536 operand pairs, and N = 16, 32
  and 64 on extreme and random operands. Every product must be exact. It also
  counts how often each mechanism fired: moved ECWs, the three kinds of
  last-ECW fold, negative digits in the RB sum, converter carry-select, and
  ±2 Booth digits in the last group. It fails if any count is zero.
* `tb_rb_multiplier_full` runs the default 32 x 32 multiplier, with no
  parameter overrides, on 100 corner-value pairs and 100 000 random pairs.
* `tb_rbmppg` checks, for N = 8 (exhaustively), 16, 32 and 64, that:
  * the N/4 rows add up to a·b modulo 2^(2N);
  * no row has a digit outside its columns.
* The cell and block testbenches check:
  * `rbfa` and `rbha` exhaustively, over all legal carry and flag inputs;
  * `rba` with partly overlapping operands;
  * `rbpp_tree` at every size;
  * `rb2nb` at 64 and 13 bits;
  * the encoder, the selector, a single row and the fold.

Timing, area and power were not evaluated.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Any testbench runs with plain Verilator;
the package must come first:

```
verilator --binary --timing --assert --top-module tb_rb_multiplier \
    -y rtl -y tb +libext+.sv rtl/rbm_pkg.sv tb/tb_rb_multiplier.sv
./obj_dir/Vtb_rb_multiplier
```

To build another word length, instantiate `rb_multiplier #(.N(16))`, for
example. `tb/mul_chk.sv` is a reusable driver that checks any N.

## Files

| file | contents |
|------|----------|
| `rtl/rbm_pkg.sv` | RB digit and Booth code types, digit helpers |
| `rtl/mbe_encoder.sv` | Booth encoder for one 3-bit group |
| `rtl/mbe_decoder.sv` | Booth selector: one (N+1)-bit row |
| `rtl/rbbe2_row.sv` | one RB row and its ECW from two Booth rows |
| `rtl/ecw_merge.sv` | fold of the last row's ECW |
| `rtl/rbmppg.sv` | the partial product generator (N/4 rows) |
| `rtl/rbfa.sv`, `rtl/rbha.sv` | RB full / half adder cells |
| `rtl/rba.sv` | RB adder block |
| `rtl/rbpp_tree.sv` | reduction tree |
| `rtl/rb2nb.sv` | RB to two's complement converter |
| `rtl/rb_multiplier.sv` | top level |
| `tb/tb_*.sv` | testbenches; `mul_chk`, `rbmppg_chk`, `tree_chk` are parameterised drivers |
