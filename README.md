# Redundant-binary Booth multiplier without an extra correction row

This is a combinational N x N two's-complement multiplier (N = 32 by default,
64-bit product). It uses radix-4 (modified) Booth encoding and accumulates the
partial products as **redundant-binary (RB)** numbers, whose additions are
carry-free. It is built around one idea: a partial-product generator that
produces **N/4 RB rows instead of N/4 + 1**.

A conventional RB Booth multiplier needs one more row than that. Every RB row
carries a small *error-correcting word* (ECW). This word holds the "+1" that
completes each negated Booth multiple and the "-1" that RB encoding of the row
needs. Conventionally all these words are gathered into one extra row. For a
power-of-two row count, that extra row costs one more level in the
reduction tree. Here each row's ECW goes into free low bits of the next row.
The last row's ECW is folded into four existing partial-product bits. The
row count is then a power of two again:

| operands | RB rows, here | RB rows, with an extra ECW row | accumulation stages, here | stages, with an extra ECW row |
|---|---|---|---|---|
| 8 x 8   | 2  | 3  | 1 | 2 |
| 16 x 16 | 4  | 5  | 2 | 3 |
| 32 x 32 | 8  | 9  | 3 | 4 |
| 64 x 64 | 16 | 17 | 4 | 5 |

## Datapath

```
 a[N-1:0] b[N-1:0]
     |        |
 +---v--------v------------------------------------------------+
 | rbmppg2  N/4 x rbbe2_row (each 2 x mbe_encoder/mbe_decoder) |  N/4 RB rows,
 |          q_merge; modified encoder on Booth row N/2-2       |  2N digits each
 +----------------------------+--------------------------------+
                              |
 +----------------------------v--------------------------------+
 | rbpp_tree  log2(N/4) levels of rb_accum_stage               |  one RB number
 |            (rb_full_adder / rb_half_adder digit cells)      |
 +----------------------------+--------------------------------+
                              |
 +----------------------------v--------------------------------+
 | rb_nb_converter  x_p - x_m: carry-select blocks + prefix    |  p[2N-1:0]
 +-------------------------------------------------------------+
```

There is no clock, register or reset. `p` settles one combinational delay
after `a` and `b` change. Add registers around `rb_multiplier` if you need a
pipeline.

## Redundant-binary numbers

An RB number is a pair of equal-width bit vectors, `plus` and `minus`, with
value `plus - minus`. Digit i is `(plus[i], minus[i])`: `(1,0)` is +1, `(0,1)`
is -1, and both `(0,0)` and `(1,1)` are 0. A sum of two normal binary numbers
X + Y turns into an RB number for free: X + Y = X - (~Y) - 1. So one Booth row
goes into `plus` as it is, the next goes into `minus` inverted, and a -1 has to
be accounted for. All RB vectors in the design are 2N bits wide and are
exact modulo 2^(2N). Bits that would fall above the product width are
dropped.

## The partial-product generator (`rbmppg2`)

This is the part that needs the most care. The other blocks are
conventional.

### Booth rows

Multiplier bits are grouped as `{b[2j+1], b[2j], b[2j-1]}` (b[-1] = 0),
j = 0 .. N/2-1, and encoded by `mbe_encoder`:

| group | digit | one | two | neg |
|---|---|---|---|---|
| 000 | 0 | 0 | 0 | 0 |
| 001, 010 | +1 | 1 | 0 | 0 |
| 011 | +2 | 0 | 1 | 0 |
| 100 | -2 | 0 | 1 | 1 |
| 101, 110 | -1 | 1 | 0 | 1 |
| 111 | 0 | 0 | 0 | 0 |

`mbe_decoder` produces an (N+1)-bit row
`pp[i] = ((one & a[i]) | (two & a[i-1])) ^ neg` (with a[-1] = 0 and
a[N] = a[N-1]). The row's value is `signed(pp) + neg = digit * A`, so `neg` is
the row's missing "+1" correction bit.

### RB rows

Each RB row comes from one `rbbe2_row` block (two encoders, two decoders).
RB row r (r = 0 .. N/4-1) combines Booth row 2r (call it X) and Booth row
2r+1 (call it Y) at weight 2^(4r). Its bits, relative to bit 4r:

| bits (relative to 4r) | plus vector | minus vector |
|---|---|---|
| 0, 1 | X[0], X[1] | 1, 1 (the inverted zeros shifted in under Y); `b[N-3]` in the last row |
| 2 .. N-1 | X[2 .. N-1] | ~Y[0 .. N-3] |
| N | s = X's sign bit | ~Y[N-2] |
| N+1 | ~s | ~Y[N-1] |
| N+2 | - | Y's sign bit, not inverted |

The pair `{~s, s}` on top of X is the usual sign-extension trick. Its offset
of +2^(N+1) per row is added back as a constant (see below).

### Correction words

With this layout, row r is exact once a correction word ECW_r is added:

* F = negX - 1 at bit 4r (a digit in {-1, 0}),
* E = negY at bit 4r+2 (a digit in {0, 1}).

Row r+1 starts four bits higher, so bits 4r .. 4r+3 are still empty there.
**ECW_r is placed in row r+1**: F as the minus bit `~negX` at 4r, E as the
plus bit `negY` at 4r+2. Row 0 therefore contains no correction at all. Row r
contains the correction of row r-1.

The **last row** (r = N/4-1) has no successor. Its correction disappears in
three steps:

1. **Modified encoder.** Booth row N/2-2 (X of the last row) uses
   `mbe_encoder` with `MODIFIED = 1`. One extra three-input OR detects the
   pattern 111 and encodes it as "-0": the decoder then outputs all ones and
   `neg` = 1, which still has value 0. Now negX is simply `b[N-3]`, so F is -1
   when b[N-3] = 0 and 0 otherwise.
2. **F into the shifted-in bits.** A -1 at bit 4r equals -1 at bit 4r+2 plus
   +1 at bits 4r+1 and 4r. The two minus bits at 4r and 4r+1 are therefore
   set to `b[N-3]` instead of 1, and the remaining -1 joins E. That leaves one
   digit at bit N-2:

   | b[N-1] b[N-2] b[N-3] | E2 |
   |---|---|
   | 000, 010 | -1 |
   | 101 | +1 |
   | others | 0 |

3. **E2 into four existing bits (`q_merge`).** Read the bits
   `{p19, p18, p21, p20}` as one 4-bit binary number at bit N-2:
   * p19 = ~s and p18 = s are the two sign-extension bits of row 0 (at N+1 and N).
   * p21 and p20 are the two low bits of the last Y (at N-1 and N-2, held
     inverted in the minus vector, so they too count with positive weight).

   Because p19 = ~p18, this field always lies in 0100..1011. Adding or
   subtracting 1 can neither overflow nor underflow. `q_merge` outputs the
   field plus E2 as `{Q19, Q18, Q21, Q20}`, with one AND-OR term per bit for
   keep / increment / decrement. These four bits replace the originals.

   `q_merge` has to wait for the decoders. The default path,
   `q_direct` (`rbmppg2` parameter `DIRECT_Q = 1`), computes the same four bits
   straight from `a[N-1]`, `a[1]`, `a[0]`, `b[1]`, `b[0]` and `b[N-1:N-3]`, in
   parallel with the decoders:

   ```
   S   = ~b1 b0 a[N-1] | b1 ~a[N-1]          first row's sign bit (p18)
   cy  = b7 ~b6 b5 ~a1 ~a0                   E2 = +1 carries into S
   bw  = ~b7 ~b5 (~b6 | ~a1 ~a0)             E2 = -1 borrows from S
   Q19 = cy | ~S ~bw        Q18 = S ^ (cy | bw)
   Q20 = ~b6 ~b5 | ~b6 b5 a0 | b6 ~b5 ~a0
   Q21 = one product term per top pattern (see q_direct.sv)
   ```

   Here b7, b6, b5 stand for b[N-1], b[N-2], b[N-3]. `DIRECT_Q = 0` selects
   `q_merge`, which is easier to follow. Both are tested.

### Sign-extension constants

The `{~s, s}` pairs leave a constant 2^(N+1+4r) for each row. No extra row
absorbs them. They are pre-added in row 0:

* The r = 0 term is merged into row 0's top: `{Q19, ~Q19, Q18}` at bits
  N+2, N+1, N. This equals `{Q19, Q18}` + 2 at bit N.
* The other terms are constant ones in row 0's plus vector at bits N+5, N+9,
  ..., 2N-3.

These constants are this design's own bookkeeping. The Q merge itself stays
the 4-bit operation described above.

## Reduction tree (`rbpp_tree`, `rb_accum_stage`)

Each accumulation stage is a 2N-digit carry-free RB adder. An RB full adder
(`rb_full_adder`) is two full adders:

* FA1 adds `ap`, `~am` and `bp`. Its carry `c` goes one digit up.
* FA2 adds FA1's sum, `~bm` and the `c` from the digit below. Its carry `d`
  goes one digit up.

The result digit is `(d_from_below, ~FA2_sum)`. The chain starts at digit 0
with c = 0 and d = 1, and carries out of the top digit are dropped. Each
digit depends only on the two digits below it, so a stage costs two full-adder
delays at any width.

`rb_half_adder` is the same cell with a zero second operand. It is used in
the first tree level on the low digits of the second row of each pair, which
are empty by construction. Later levels use full adders throughout: low
digits of an RB sum are zero in value, but not necessarily coded `(0,0)`.
Rows are added pairwise (0+1, 2+3, ...). An odd row passes to the next level
unchanged.

## Conversion to binary (`rb_nb_converter`)

The final RB number becomes `p = x_p + ~x_m + 1` through a hybrid
parallel-prefix / carry-select adder:

* Each BLK-bit block (default 8) computes its sum for carry-in 0 and for
  carry-in 1.
* A block generates a carry if its carry-in-0 sum overflows. It propagates one
  if only its carry-in-1 sum does.
* A Kogge-Stone prefix over the blocks gives each block's carry-in. The +1
  enters as block 0's carry-in. That carry-in selects one of the two sums.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `rb_multiplier` | `N` | 32 | operand width; a power of two, at least 8 |
| `rb_multiplier`, `rb_nb_converter` | `BLK` | 8 | carry-select block width, must divide 2N |
| `rbmppg2`, `rbbe2_row`, `mbe_decoder` | `N` | 32 | operand width |
| `rbbe2_row` | `MODIFIED_X` | 0 | 1: modified encoder for X (last row only) |
| `rbmppg2` | `DIRECT_Q` | 1 | 1: Q from operand bits (`q_direct`); 0: from decoder outputs (`q_merge`) |
| `rbpp_tree` | `ROWS`, `W` | 8, 64 | RB rows (N/4) and digits (2N) |
| `rb_accum_stage` | `W`, `HALF_LSBS` | 64, 0 | digits; low digits of operand b known to be empty |
| `mbe_encoder` | `MODIFIED` | 0 | 1: the 111 "-0" encoding for the last row's X |

Shared types and sizing functions (`mbe_code_t`, `rbpp_rows`,
`accum_stages`, `row_lsb`) are in `rtl/rbm_pkg.sv`. Read it before the other
files.

## What follows the method and what is this design's own

Follows the method:
* radix-4 Booth rows, paired into RB rows with the second row inverted
* the RB digit encoding
* moving each ECW into the next row
* the modified encoder with its three-input OR
* the `b[N-3]`-driven bits below the last row
* the E2 table
* the 4-bit Q merge with its keep / increment / decrement terms
* generating Q directly from operand bits, in parallel with the decoders
* N/4 rows and log2(N/4) accumulation stages
* a hybrid parallel-prefix / carry-select final converter

This design's own choices:
* The exact bit layout of the rows, and the handling of the sign-extension
  constants.
* The encoder and decoder gate structure.
* The internals of the RB full and half adders.
* The converter's block size and prefix network.
* The direct Q equations in `q_direct` were derived for this design from the
  digit and correction tables.
* Transistor-level choices, such as transmission-gate multiplexers in the
  Q logic, have no RTL counterpart.

## Verification

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and ends with `$finish`:

| testbench | what it checks |
|---|---|
| `tb_mbe_encoder` | all 8 groups, standard and modified encoder, against the digit table |
| `tb_mbe_decoder` | `signed(pp) + neg == digit * A` for all digits and "-0", random and extreme A |
| `tb_q_merge` | all 64 reachable inputs: Q equals field + E2 |
| `tb_q_direct` | all 256 inputs against Booth-digit arithmetic |
| `tb_rbbe2_row` | one RB row plus its correction word equals (digitX + 4 digitY) * A, all 64 group pairs, standard and modified |
| `tb_rbmppg2` | sum of all rows equals A*B mod 2^(2N): 20 000 random 32-bit pairs and all 65 536 8-bit pairs, with both Q paths; row counts |
| `tb_rb_full_adder`, `tb_rb_half_adder` | exhaustive, bit by bit and by value |
| `tb_rb_accum_stage` | 64-digit RB sums, with and without half-adder low digits |
| `tb_rbpp_tree` | 8-, 2- and 5-row trees on random RB rows; stage counts |
| `tb_rb_nb_converter` | W = 64 and W = 128, random values and full-length carry chains |
| `tb_rb_multiplier` | 32 x 32 at default parameters (details below) |
| `tb_rb_multiplier_sizes` | 8 x 8 exhaustive, 16 x 16 and 64 x 64 random |

`tb_rb_multiplier` uses 200 064 operand pairs. The top five multiplier bits
cycle through all 32 patterns. The testbench counts, from the operand bits,
how often each mechanism occurred: every Booth pattern, E2 = -1/0/+1, the
"-0" pattern 111 on the modified row, and a correction word moved to the next
row. Any count of zero is a failure.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rbm_pkg.sv \
    tb/tb_rb_multiplier.sv --top-module tb_rb_multiplier -o sim
./obj_dir/sim
```

The same command works for every other `tb/tb_*.sv`. Each testbench runs in
seconds.

## Limits

* The design is verified by simulation only, against the simulator's own
  multiplication. No timing or area figures come with it.
* N must be a power of two, at least 8. The row layout assumes at least two
  RB rows.
* Operands are two's complement. For an unsigned multiply, zero-extend both
  operands into the next larger instance (for example 32-bit unsigned
  operands into N = 64).
