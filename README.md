# Carry-save / carry-lookahead multi-operand adders

Adding more than two numbers with ordinary two-input adders puts a full
carry chain on the path for every operand. Carry-save addition avoids that:
a row of independent full adders reduces three numbers to two (a sum vector
and a carry vector) in the delay of one full adder, whatever the width. Only
at the very end are the last two vectors combined by a carry-propagating
adder, here a carry-lookahead adder (CLA) whose carries are computed in two
gate levels instead of rippling.

This RTL builds that idea twice:

* **`xyzw_adder`** – a combinational adder of four 4-bit unsigned operands,
  `X + Y + Z + W`, made of two 5-bit carry-save rows and one 4-bit CLA.
* **`csa_accumulator`** – a clocked repeated-summation unit that adds a
  stream of `k` words, absorbing one word per clock in carry-save form and
  resolving the total with a CLA at the end.

`csa_cla_top` places both side by side; they share no signals.

## Building blocks

### Full adder (`full_adder`)

Gate-level: half sum `h = x ^ y`, sum `s = h ^ c_in`, carry
`c_out = (h & c_in) ^ (x & y)`. The two carry terms are never 1 together,
so the XOR merging them is equivalent to an OR.

### Carry-save row (`csa`, `WIDTH` = 5)

`WIDTH` full adders side by side, bit `i` adding `x[i] + y[i] + c_in[i]`.
Nothing passes between bits. The outputs satisfy

    x + y + c_in = s + 2 * c_out

so `c_out[i]` carries the weight of bit `i+1`. Whoever uses `c_out` has to
shift it left by one; forgetting that shift is the classic mistake with
these circuits.

### Carry-lookahead adder (`cla`, `WIDTH` = 4)

Per bit a generate `g = x & y` and a propagate `p = x | y` (the OR form;
the XOR form would work equally well). Every carry is a flat sum of
products, e.g. for the 4-bit adder

    c1 = g0 | p0 c0
    c2 = g1 | p1 g0 | p1 p0 c0
    c3 = g2 | p2 g1 | p2 p1 g0 | p2 p1 p0 c0
    c4 = g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0 | p3 p2 p1 p0 c0

and `s[i] = x[i] ^ y[i] ^ c[i]`. The carry into bit 0, `c0`, is the constant
0; there is no carry-in port. `c4` is `c_out`. The module generates these
terms with loops for any `WIDTH`, so the same module serves as the 8-bit
final adder of the accumulator; at larger widths the product terms grow
quadratically, which is the usual reason to build wide CLAs in blocks
instead.

## The four-operand adder (`xyzw_adder`)

```
 X Y Z (5 bit, zero-extended)
   |            W (5 bit)
 [CSA row 0]    |
  s01  c01 --<<1--+
   |            | |
   +------->[CSA row 1]
             s12     c12
   s12[0] ---------------------------> S[0]
   s12[4:1], c12[3:0] -> [4-bit CLA] -> S[4:1], C_out
```

1. Row 0 reduces `X, Y, Z` (each zero-extended to 5 bits) to `s01`, `c01`.
2. `c01` is shifted left one bit (its weight), giving `{c01[3:0], 0}`.
3. Row 1 reduces `s01`, `W` and the shifted `c01` to `s12`, `c12`.
   Now `X+Y+Z+W = s12 + 2*c12`.
4. Bit 0 of the result needs no addition: `S[0] = s12[0]`, because the
   shifted carry vector has a 0 there. The upper bits are
   `s12[4:1] + c12[3:0]`, added by the 4-bit CLA; its carry-out is the
   sixth result bit.

The result is 6 bits, `{C_out, S[4:0]}`, enough for the largest sum
`4 × 15 = 60`. Two carry bits are dropped on the way (`c01[4]` and
`c12[4]`); both are provably 0 for 4-bit operands, since the top bit of
every input to the rows is 0 (for row 1, only the shifted `c01[3]` can be
1 there). Lint tools report these as unused bits. For that reason the
operand width is a package constant (`csa_cla_pkg::OPERAND_W`), not a
module parameter: the wiring is exact only for the layout shown.

## The repeated-summation accumulator (`csa_accumulator`)

To compute `S = w_1 + ... + w_k`, the running total is kept in redundant
form in two registers: a sum vector `X` and a carry vector `Y` of weight 2,
total `X + 2Y`. The procedure:

    X <- 0, Y <- 0
    for each word w_i:
        X <- sum bits   of (X + 2Y + w_i)    -- one carry-save row
        Y <- carry bits of (X + 2Y + w_i)
    S = X + 2Y                               -- carry-lookahead adder

The carry-save row sets the clock period, not the word width, so one word
is absorbed per clock. The CLA sits after the registers and only its final
output is used.

**Widths.** `OPERAND_W` (default 4) is the word width, `K_MAX` (default
16) the largest count. The accumulator has
`ACC_W = OPERAND_W + clog2(K_MAX)` bits (8 by default), enough for
`16 × 15 = 240`. All arithmetic is modulo `2^ACC_W`, so dropping the top bit
of `Y` when forming `2Y` does not change the result as long as the true
sum fits, which `K_MAX` guarantees. An assertion checks that the CLA never
carries out when the result is presented.

**Interface and timing** (rising edge of `clk`, asynchronous active-low
`rst_n`):

| signal | meaning |
|---|---|
| `start`, `k` | In the idle or finished state, `start` clears `X`, `Y` and loads the count `k` (0..`K_MAX`). Ignored while a summation runs. `k = 0` finishes at once with sum 0. |
| `w_valid`, `w`, `w_ready` | While `w_ready` (= `busy`) is high, each edge with `w_valid` high absorbs `w`. Idle cycles between words are allowed. |
| `done`, `sum` | `done` rises on the edge that absorbs the `k`-th word and stays high, with `sum` valid, until the next `start`. Words offered while `done` is high are ignored. |

With words back to back the result is valid `k` clocks after the first word
is presented (plus the one clock of `start`). An assertion flags a `k`
above `K_MAX`.

## What follows the source design and what is chosen here

Follows it: the full-adder gate equations; the 5-bit carry-save row of
full adders; the 4-bit CLA with OR-propagate, flat lookahead equations and
carry-in fixed at 0; the four-operand adder's structure, bit widths, the
one-bit shift of the first carry vector and the split of the result into
`S[0]` and the CLA's 4-bit sum; the repeated-summation procedure (CSA
iteration on `X`, `2Y`, `w_i`, then CLA on `X + 2Y`).

Chosen here: everything about the accumulator's hardware beyond the
procedure — one iteration per clock, registers for `X` and `Y`, the
start/count/valid/done handshake, asynchronous reset, the 4-bit word width
and `K_MAX = 16`. The CSA and CLA are written as parameterised loops rather
than fixed 5- and 4-bit netlists, with the same defaults. The top that
places both adders side by side is also this design's own.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_full_adder`, `tb_csa`, `tb_cla`, `tb_xyzw_adder` – exhaustive over
  all inputs (8; 32,768; 256; 65,536 cases), `tb_cla` also random 8-bit
  cases.
* `tb_csa_accumulator` – 63 streams: empty, full scale (16 × 15), random,
  with random gaps; checks the sum, that `done` comes exactly after the
  `k`-th word, the `k`-clock latency, and that the result holds.
* `tb_csa_cla_top` – the whole design at its default parameters: a fresh
  operand set for the four-operand adder on every clock while 102
  accumulator streams run. It counts carry-outs of the four-operand adder,
  its largest result 60, empty, gapped and full-scale streams and restarts
  from the finished state, and fails if any never occurred.

## Simulating

With Verilator 5 (the package must come first):

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/csa_cla_pkg.sv tb/tb_csa_cla_top.sv --top-module tb_csa_cla_top
    ./obj_dir/Vtb_csa_cla_top

Replace `tb_csa_cla_top` by any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/csa_cla_pkg.sv rtl/<module>.sv`.
Verilator warns that `rst_n` is used both as an asynchronous reset and in
the assertions' `disable iff`; this is intended.
