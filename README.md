# Level-index addition and subtraction by partial table look-up

Level-index (li) arithmetic represents a positive number X as x = l + f, where the
integer l is the *level* and f in [0, 1) is the *index*, with

    X = phi(x) = exp(exp(...exp(f)...))      (l exponentiations; phi(f) = f at level 0)

The representation never overflows or underflows in practice: level 5 is already far beyond
any floating-point range. The cost is that addition and subtraction become a sequence of
exponentials and logarithms. This RTL computes z with phi(z) = phi(x) +- phi(y). It uses
the partial-table approach of *Implementation of Level-Index Arithmetic Using Partial Table
Look-Up*, which rests on two ideas:

* **exp by seven look-ups.** An exponential exp(-t) of a 42-bit argument is split into seven
  6-bit packets. Because the packets hold disjoint bit ranges,
  exp(-t) = exp(-t_1) ... exp(-t_7). One shared table of 7 x 64 words gives all seven
  factors at once.
* **Carry-save arithmetic throughout.** Reciprocals and logarithms are short power series.
  The series are evaluated as many parallel products that stay "double numbers" (a sum
  word plus a carry word). The slow carry-propagate add is used only once per quantity.

## The algorithm

The operands are ordered so that x = l + f >= y = m + g. The unit then evaluates three
sequences (Clenshaw-Olver):

    a_j = 1/phi(x-j):   a_{l-1} = exp(-f),            a_{j-1} = exp(-1/a_j)
    b_j = phi(y-j)/phi(x-j):
                        b_{m-1} = exp(-(f-g))          if m = l
                        b_{m-1} = exp(-(1/a_m - g))    if m < l
                        b_{j-1} = exp(-(1-b_j)/a_j),   b_0 = g a_0 if m = 0
    c_j = phi(z-j)/phi(x-j):
                        c_0 = 1 +- b_0,                c_{j+1} = 1 + a_{j+1} ln c_j

The c recursion ends in one of three ways:

* **Division.** At the first j with c_j < a_j, phi(z-j) = c_j/a_j is below 1, so
  z = j + c_j/a_j. This happens only when a subtraction loses levels.
* **One logarithm.** At j = l-1, H = f + ln c_{l-1} equals phi(z-l). If H < 1, then z = l + H.
* **Two logarithms.** If H >= 1 at that point, z = l + 1 + ln H.

Special cases:

* Level-0 operands skip straight to H = f +- g.
* If x is at level 6 or above, phi(y) is below the working precision of phi(x), so z = x.
* Equal operands subtract to z = 0.

Every exp(-t) above is one pass through the table and its product tree. A reciprocal
1/a_j comes first when needed. An argument t >= 32 returns 0, because exp(-32) < 2^-46.
This is the rule "a_{j-1} = 0 when a_j <= 2^-5". Small values of a_j occur all the time
from level 4 upward.

## Number formats

| quantity | format | note |
|---|---|---|
| li operand / result | 3-bit level, 28-bit index | `{level, index}` read as a fixed-point number *is* z, so rounding carries move into the level |
| a_j, b_j, table words | Q1.41, 42 bits | 1.0 is exact |
| t, t' (table argument) | Q5.37, 42 bits | packets t_1 (bits 41:36) .. t_7 (bits 5:0) |
| 1/a' (reciprocal) | Q2.50 plus shift k | 1/a = r * 2^k, k up to 41 |
| c_j, H | Q2.41, 43 bits | c_0 = 1 + b_0 reaches 2 |
| ln c_j | signed Q6.41, 48 bits | |

All formats are in `rtl/li_pkg.sv`. The 42-bit word, the 5 integer bits of t and the 6-bit
packets come from the method. The operand format and the internal guard bits are choices of
this design.

## The datapath units

### Reciprocal (`recip_unit`)

1. **Normalise.** a_j is shifted left by k into [1/2, 1), giving a'. Then delta = 1 - a',
   which lies in (0, 1/2].
2. **Sum the series.** 1/a' = 1 + delta + ... + delta^41. 42 terms are enough because
   delta^42 <= 2^-42.
3. **Form the powers by doubling.** delta^2 is formed first. Then, for s = 1 .. 5, the powers
   delta^(2^s+1) .. delta^(2^(s+1)) are built in parallel as delta^(2^s) x delta^i. In
   hardware, delta^(2^s) is broadcast to all the multipliers of its stage.
4. **Add once.** Every power from delta^2 up is a double number, formed by a carry-save
   multiplier (`cs_mul`). One carry-save tree (`csa_tree`) reduces the 2 single and
   40 double numbers. One final `+` then resolves the carries.

The unit returns r = 1/a' and k rather than the shifted t. This serves two callers:

* The a step saturates r * 2^k at 32.
* The b step forms t' = (1 - b_j) r 2^k. That value can be small even when 1/a_j is huge,
  whenever b_j is close to 1.

### Exp table and product (`exp_table`, `exp_product`)

* **Table.** Sub-table i (0-based) holds exp(-v 2^(-1-6i)) for v = 0..63, rounded to Q1.41.
  That is 7 x 64 x 42 = 18,816 bits. The entries are computed at elaboration from this
  formula.
* **One copy.** There is a single read port: a table this size would not be duplicated on
  chip. The read is registered.
* **Product.** `exp_product` multiplies the seven factors in the method's order:
  * three pair products (single x single);
  * (01)(23) as double x double, and (45)(6) as double x single;
  * one last double x double product;
  * then one carry-propagate add and rounding.

### Logarithm (`ln_unit`, `ln_table`)

1. **Normalise.** c = c' 2^-p with c' in [1, 2). The signed p allows c >= 2.
2. **Split.** c' = s'(1 + sigma). s' is the six leading bits 1.b1..b5 of c', and
   sigma < 2^-5.
3. **Look up ln s'.** It comes from a 32-entry table (`ln_table`).
4. **Divide by s'.** s'/2 = 1 - delta, where delta is a 6-bit number. So
   c'/s' = (c'/2)(1 + delta + ... + delta^31). The 32 terms are built in five carry-save
   stages:
   * delta^2 and (c'/2)delta;
   * then (c'/2)delta^2..3 and delta^4;
   * then ..4..7 and delta^8, ..8..15 and delta^16, and ..16..31.

   One tree and one carry-propagate add sum the 32 terms. Subtracting 1 gives sigma.
5. **Log series.** ln(1 + sigma) = sigma - sigma^2/2 + sigma^3/3 - sigma^4/4 + sigma^5/5.
   The constants 1/3 and 1/5 are stored. The products are formed in the order sigma^2,
   sigma/3 and sigma/5; then sigma^3/3 and sigma^4; then sigma^5/5.
6. **Final sum.** One signed carry-save tree adds the five series terms, ln s' and -p ln 2.

The error is up to about 2^-31, slightly above the 2^-32 the method aims at. The cause is
the 32-term division series: it stops at delta^31, and delta reaches 1/2 when s' = 1.

### Carry-save building blocks (`csa_tree`, `cs_mul`)

`csa_tree` reduces N operands to a sum word and a carry word. It uses Wallace-style layers
of 3:2 adders, for example 8 layers for 42 operands.

`cs_mul` multiplies single or double numbers:

* Each set bit of each word of one operand selects a shifted copy of each word of the
  other. A 42-bit double x double product therefore has 168 rows.
* One `csa_tree` reduces the rows.
* The result stays a double number, truncated word by word to F fraction bits.

For non-negative operands no carry is ever lost, so the truncation is the only error, at
most 2 units.

## Sequencing and latency (`li_addsub`)

`li_addsub` is the top. It holds:

* one copy of each unit;
* an 8-entry store for a_0 .. a_{l-1};
* b_j and c_j registers;
* a one-state-per-clock controller.

The controller runs these steps:

| phase | states |
|---|---|
| accept | IDLE: order operands, take the shortcut (level >= 6, x = y), or go to level 0 |
| step j = l | LOOKA (t = f), then PRODA, or LOOKB (t' = f - g) and PRODB when m = l |
| step j < l | RECIP, LOOKA, then PRODA, or LOOKB and PRODB when j <= m |
| b_0 when m = 0 | B0 |
| c phase | C0; per j: CTEST, then LN and CUPD, or the final stage |
| final stage | DRECIP, DMUL (division) or LNF, HADD, FTEST [, LN2] |
| result | DONE |

In a step that advances both sequences, the b look-up follows the a look-up by one clock,
because the table has one port. The two look-ups then share the product unit, which that
delay leaves free.

Measured latency runs from the clock that takes `start` to the clock with `done`. The
estimates in the last column are the method's own, in CSA delays (a), shift delays (b),
carry-propagate delays (c) and table delays (e):

| case | clocks | the method's estimate |
|---|---|---|
| worst case, l = m = n = 5 | 37 | 1006a + 120b + 14c + 9e + max(c, e) |
| l = 3, m = 2, n = 4 | 23 | 666a + 79b + 9c + 6e |
| l = n = 2, m = 2 / m = 1 | 16 / 15 | about 17c + 4e |

One clock here is one complete reciprocal, look-up, product or logarithm. This design
therefore trades clock rate for simplicity. Splitting the carry-save trees into pipeline
stages would follow the method's timing more closely.

### Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | start; taken when `busy` is low |
| `op` | in | 1 | 0 add, 1 subtract |
| `x`, `y` | in | 31 | li operands `{level[2:0], index[27:0]}` |
| `busy` | out | 1 | operation in progress |
| `done` | out | 1 | one-clock pulse; `z` and `z_neg` valid |
| `z` | out | 31 | li result for the magnitude of phi(x) +- phi(y), index rounded to nearest |
| `z_neg` | out | 1 | result negative (subtraction with y > x) |

`z` and `z_neg` stay valid until the next `start`.

## Accuracy

The testbenches compare every result with a double-precision model of the same recurrences,
in `tb/li_ref_pkg.sv`. For results up to level 3, they also compare with phi(x) +- phi(y)
computed directly. Over about 500 operations at all levels, the largest difference in z is
2.1e-9, close to the 2^-28 resolution of the index. A subtraction of nearly equal large
operands is ill-conditioned in any representation, and the model and the hardware can
differ more there.

## Where this design departs from the method, or fills gaps

Departures from the method:

* **Product words.** Products inside the units are truncated to 48-50 fraction bits rather
  than the method's 42-bit words. The extra bits absorb truncation over 40 products.
* **Product sharing.** a_j and b_j share one product unit, and the whole operation shares
  one ln unit.
* **sigma.** It is resolved by a carry-propagate add before the log series, and the series
  uses ordinary signed multiplies. The method keeps sigma as a double number. Truncation can
  leave sigma a few units below zero, which unsigned carry-save words cannot hold.
* **delta.** It is formed as the exact 1 - a' (the one's complement plus a carry-in). In
  the ln unit, delta lies in (0, 1/2], not [0, 1/2).
* **b_0 for m = 0.** It is computed as g a_0, from the definition
  b_0 = phi(y)/phi(x) with phi(g) = g.

Filled in by this design where the method is silent:

* **Large 1/a_j.** The reciprocal shift reaches 2^-41, so t' = (1 - b_j)/a_j can be formed
  even when 1/a_j exceeds the table range.
* **Operand handling.** Operand ordering, the sign output, level-0 operands, the zero
  result, the handshake and the reset.

Not built:

* **Symmetric level-index (sli) arithmetic.** The method only says that its extension is
  straightforward.
* **Multiplication and division of li numbers.**

## Files

| file | contents |
|---|---|
| `rtl/li_pkg.sv` | formats, constants, `to_targ` helper |
| `rtl/li_addsub.sv` | top: operand ordering, sequencing, a_j store |
| `rtl/recip_unit.sv` | reciprocal by the 42-term series |
| `rtl/exp_table.sv` | 7 x 64 x 42-bit exp(-t_i) table |
| `rtl/exp_product.sv` | product of the seven factors |
| `rtl/ln_unit.sv`, `rtl/ln_table.sv` | logarithm |
| `rtl/cs_mul.sv`, `rtl/csa_tree.sv` | carry-save multiplier and adder tree |
| `tb/li_ref_pkg.sv` | double-precision reference model |
| `tb/tb_li_addsub.sv` | end-to-end test: random and directed operands, latency, coverage of every path |
| `tb/tb_li_workloads.sv` | the three timing cases above |
| `tb/tb_<unit>.sv` | one self-checking test per unit |

Every testbench prints `TB_RESULT checks=N failures=M` at the end.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/li_pkg.sv tb/li_ref_pkg.sv tb/tb_li_addsub.sv --top-module tb_li_addsub
    ./obj_dir/Vtb_li_addsub

For the other testbenches, replace the testbench name. The unit testbenches need only
`rtl/li_pkg.sv`. The top takes one to two minutes to build, because the carry-save trees
are large. It simulates about 500 operations in a few seconds.

To change the precision, use the `RF` parameter of `li_addsub` (reciprocal fraction bits)
and the `LF` and `GF` parameters of the units. The word formats live in `li_pkg`.
