# Redundant-binary Booth multiplier with a modified partial-product generator

This is a signed N x N multiplier. It uses radix-4 modified Booth encoding
(MBE) and sums the partial products in redundant-binary (RB) form. A
multiply-accumulate stage sits on its output. The default size is 64 x 64 bits.

Booth encoding halves the partial products to N/2 rows. Pairing two Booth
rows into one RB row halves them again, to N/4. Earlier RB Booth multipliers
leave some stray bits behind when they do this: the negation bits of negative
Booth digits, and a -1 for each RB row. They gather these bits into an extra
*error-correction word* (ECW), which becomes an (N/4+1)-th row. For the usual
power-of-two sizes, that extra row costs a whole extra level of RB adders.

This design generates the RB rows so that no extra row is needed. The N/4 rows
go into a balanced tree of carry-free RB adders with log2(N/4) levels. A
parallel-prefix / carry-select adder then converts the result to two's
complement.

| N  | Booth rows | RB rows | RB adder levels |
|----|-----------:|--------:|----------------:|
| 8  | 4          | 2       | 1               |
| 16 | 8          | 4       | 2               |
| 32 | 16         | 8       | 3               |
| 64 | 32         | 16      | 4               |

## Datapath

```
 b ──► mbe_encoder ──► N/2 x {neg,one,two}
                               │
 a ──────────────────► mbe_pp_row x N/2 ──► rbmppg pairing ──► N/4 RB rows ─► rbpp_tree ─┐
                                                        └──► corr (constant + 1 bit) ─────┤
                                                                                           ▼
                                                               rb2nb_converter (CSA + ppcs_adder)
                                                                                           │
                                                                       product (2N bits) ◄─┘
                                                                                           │
                                                         mac_accumulator ──► acc (2N+GUARD bits)
```

Everything up to `product` is combinational. The only registers are in the
accumulator.

## The partial products

**Booth digits.** `mbe_encoder` reads the multiplier b in overlapping
triplets (b[2j+1], b[2j], b[2j-1]), with b[-1] = 0. Each triplet gives a
digit d_j = -2·b[2j+1] + b[2j] + b[2j-1] in {-2..2}, so that b = Σ d_j·4^j.
The digit leaves as three lines: `one`, `two` and `neg`.

**A Booth row.** `mbe_pp_row` selects 0, A (sign-extended) or 2A (shifted) as
an N+1-bit word. It inverts that word for a negative digit, then inverts the
sign bit. With U() the unsigned value of the row:

    d_j·A = U(row_j) + neg_j − 2^N

The +1 that completes the negation is not added here. It stays a separate bit,
`neg_j`.

**Pairing rows into RB rows.** An RB digit is a pair of bits (p, m) with value
p − m. An RB number is therefore a positive vector X+ minus a negative vector
X−.

RB row k, with base weight 2^4k, holds Booth rows 2k and 2k+1:

* X+ = row_{2k+1}, shifted 2 places;
* X− = ~row_{2k}, the lower Booth row bit-inverted.

For an (N+1)-bit Y we have Y = 2^(N+1) − 1 − ~Y, so this pair is exact apart
from constants and the two negation bits. Together:

    row_2k·4^2k + row_2k+1·4^(2k+1) = 2^4k·[4·U(row_2k+1) − U(~row_2k) + neg_2k]
                                       + neg_2k+1·2^(4k+2) + 2^4k·(−1 − 3·2^N)

**Where the stray bits go.** This is the core of the design.

* `neg_2k` goes into X+ at the RB row's own LSB. The 2-place shift leaves that
  slot empty.
* `neg_2k+1` has weight 2^(4k+2). That is two places *below* the LSB of RB
  row k+1, whose vectors start at 2^(4k+4). The slot is empty there, so the
  bit goes into X+ of row k+1.
* The −1 and −3·2^N terms are constants. They add up, at elaboration, to one
  constant K = Σ_k 2^4k·(−1 − 3·2^N) mod 2^2N.

Only the negation bit of the top Booth row has no empty slot above it. The
correction word is therefore

    corr = K + neg_top · 2^(N−2)

This is a choice between two constants, so it needs no adder, and it is known
as soon as b's top three bits are. It is never an RB row. The converter adds
it in its carry-save level (see below).

As a result: Σ_k RBrow_k + corr = a·b (mod 2^2N), with N/4 rows.

## Carry-free RB addition (`rbfa`, `rb_adder`, `rbpp_tree`)

Each `rbfa` cell adds two digits into s in [−2, 2]. It splits s into a
transfer t and an interim digit w, with s = 2t + w:

* s = ±2 gives t = ±1 and w = 0.
* s = ±1 is split according to the position below. If both digits there are
  ≥ 0, the transfer coming up can only be 0 or +1, so w = −1. Otherwise it can
  only be 0 or −1, so w = +1.

The sum digit is z = w + t_in, which always stays in {−1, 0, 1}. Digit i
depends only on positions i and i−1, so the adder delay does not depend on the
width.

`rb_adder` chains W cells. It drops the transfer out of the top digit, which
keeps every result modulo 2^W. `rbpp_tree` adds its rows in pairs, level by
level. An odd row passes through unchanged.

## Conversion (`rb2nb_converter`, `ppcs_adder`)

The converter works out X+ − X− + corr as X+ + ~X− + corr + 1:

1. One row of full adders reduces the three vectors to a sum vector and a
   carry vector.
2. The +1 goes into the carry vector's empty LSB.
3. `ppcs_adder` adds the two vectors.

`ppcs_adder` is a hybrid adder. A Kogge-Stone prefix tree over 4-bit groups
finds the carry into each group. Each group precomputes its sum for carry-in 0
and for carry-in 1, and the group carry picks one.

## Multiply-accumulate top (`rb_mac`)

| port        | dir | width        | meaning                                          |
|-------------|-----|--------------|--------------------------------------------------|
| `clk`       | in  | 1            | clock                                            |
| `rst_n`     | in  | 1            | asynchronous reset, active low; clears `acc`     |
| `a`, `b`    | in  | N            | two's complement operands                        |
| `acc_en`    | in  | 1            | add `product` to the sum at the next edge        |
| `acc_clr`   | in  | 1            | clear the sum; with `acc_en`, restart it at `product` |
| `product`   | out | 2N           | a·b, combinational, same cycle                   |
| `acc`       | out | 2N+GUARD     | running sum, updated one clock after the request |

Parameters: `N` = 64 (a multiple of 4; use a power of two for a balanced tree)
and `GUARD` = 8. The sum wraps modulo 2^(2N+GUARD). The guard bits allow 2^GUARD
full-scale products to be summed before that can happen.

## Files

`rtl/`, one unit per file:

- `rbm_pkg`: the `booth_sel_t` and `rb_digit_t` types
- `mbe_encoder`
- `mbe_pp_row`
- `rbmppg`: the Booth rows, the pairing and the correction word
- `rbfa`
- `rb_adder`
- `rbpp_tree`
- `ppcs_adder`
- `rb2nb_converter`
- `rb_multiplier`: the complete combinational multiplier
- `mac_accumulator`
- `rb_mac`: the top

`tb/` has one self-checking testbench per unit, `tb_<unit>.sv`. Each prints
`TB_RESULT checks=… failures=…`.

* `tb_rb_multiplier` checks the multiplier against integer multiplication:
  * N = 8: all 65,536 operand pairs;
  * N = 16 and N = 32: random pairs;
  * N = 64: random pairs plus extreme ones.
* `tb_rb_mac` runs the top at its default size for 20,000 cycles. It checks the
  product and the accumulated sum every cycle. It fails if any of these never
  happened: each Booth digit value, a negative top digit, extreme operands,
  accumulate, clear, restart, hold, or a wrap of the sum.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert --top-module tb_rb_mac \
    rtl/rbm_pkg.sv $(ls rtl/*.sv | grep -v rbm_pkg) tb/tb_rb_mac.sv
./obj_dir/Vtb_rb_mac
```

The package must come first. Any other testbench runs the same way with its
own name. Each one finishes in seconds.

## How far this follows the source design, and where it departs

The following are taken from the published design:

* the four-step multiply-accumulate structure;
* radix-4 MBE, with its digit set and the 0 reference bit;
* negation by inversion plus a separate 1;
* inverting each row's sign bit;
* building one RB row from two Booth rows by inverting one of them;
* N/4 RB rows with no extra correction row;
* an RB adder tree;
* a hybrid parallel-prefix / carry-select converter;
* an unregistered multiplier.

The following are this implementation's own choices:

* **Where the stray bits go, and the carry-save merge of the correction word
  (`rbmppg`, `rb2nb_converter`).** The source reaches N/4 rows with its own
  "modified partial product" equations, which are not reproduced here. The
  construction above also reaches N/4 rows and adds no RB adder level.
  Instead, the converter has one extra full-adder level. Most of that level is
  constant inputs, which synthesis simplifies.
* **The RB full-adder logic.** `rbfa` uses the classic two-step carry-free
  rule. The source takes its RB adder cells from earlier work and does not
  describe them. There is no separate RB half-adder cell. Where one operand
  digit is constant zero, synthesis reduces `rbfa` to that case.
* **The converter's internals.** The group size and the prefix network of
  `ppcs_adder` are this implementation's choices.
* **Signed operands only.** Operands are two's complement. Unsigned operands
  would need one more Booth digit.
* **The accumulator.** Its width, guard bits, clear/enable behaviour and reset
  style are not given by the source.
* **Full-width rows.** Every RB row is carried at the full 2N digits. The
  digits outside a row's slots are constant zero, and synthesis removes them.

The source reports its results at gate level and on FPGAs. None of its area,
delay or power figures has been reproduced with this RTL.
