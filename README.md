# 16x16 approximate multiplier with parallel prefix adders

This design is an unsigned 16x16 multiplier that gives up a little accuracy
for speed and area. It is built from four 8x8 *approximate* multipliers. Three
16-bit parallel prefix adders and a single OR gate combine their products into
the 32-bit result. Two versions are provided, and both are built:

- one with **Brent-Kung** adders, the smaller version;
- one with **Ladner-Fischer** adders, the shallower and faster version.

Both versions compute exactly the same product. They differ only in the
structure of the three adders.

The whole circuit is combinational. It has no clock, no registers and no
reset: `y` follows `a` and `b` after the logic delay.

## Splitting the product

Write the operands as `a = {aH, aL}` and `b = {bH, bL}`, with 8-bit halves:

```
a*b = aL*bL  +  (aH*bL + aL*bH) << 8  +  aH*bH << 16
        L1          L2      L3              L4
```

The four partial products come from four 8x8 multipliers, named L1 to L4. The
three adders, L5 to L7, combine them:

| adder | a input | b input | result used for |
|---|---|---|---|
| L5 | L3 (aL*bH) | L2 (aH*bL) | middle sum, carry `c5` |
| L6 | L5.sum | `{8'b0, L1[15:8]}` | `y[15:8]` = L6.sum[7:0]; carry `c6` |
| L7 | L4 (aH*bH) | `{7'b0, c5 \| c6, L6.sum[15:8]}` | `y[31:16]` |

`y[7:0]` is `L1[7:0]` directly. All three carry inputs are tied to 0. The carry
out of L7 is unused, because the product fits in 32 bits.

### Why one OR gate is enough

`c5` and `c6` both carry weight 2^24. Adding them would normally take another
adder stage. They can never both be 1, however:

- every 8x8 product is at most 255*255 = 65025, because the approximation
  below never *raises* a product;
- so L2 + L3 + (L1 >> 8) ≤ 2*65025 + 254 < 2^17;
- the middle sum therefore has only one bit above bit 15. Either L5 produces
  that bit or L6 does, never both.

So `c5 | c6` equals `c5 + c6`. A simulation assertion in
`approx_multiplier_16bit` checks this rule. The rule depends on the 8x8 blocks
never overestimating. If you change the approximation so that it can round
up, you must also replace the OR gate with an adder.

## The 8x8 approximate multiplier

`approximate_multiplier_8bit` has two stages:

1. **Approximate tree compressor (`approx_tree_compressor`).** It forms the
   64 partial products `a[j] & b[i]` as eight shifted rows. It then reduces
   them to two rows with a Wallace-style carry-save tree: 8 → 6 → 4 → 3 → 2
   rows, using bitwise 3:2 compressors.
   - In the upper columns (bit ≥ `APPROX_COLS`), each compressor is an exact
     full adder.
   - In the lower columns, each compressor is an *incomplete adder*: its sum
     is the OR of its inputs, and it has no carry output.

   As a result, no carry ever leaves the low part of the product. Each low
   output bit is simply the OR of all the partial products in its column.
2. **Carry maskable adder (`carry_maskable_adder`).** This is a ripple-carry
   adder that adds the two rows. A mask can force to zero the carry out of
   any bit. In the multiplier, the mask is the parameter `CARRY_MASK`, which
   defaults to 0, so no carry is cut. Each set bit shortens the carry chain
   and removes at most one carry's worth of value, always downwards.

The resulting product can be stated exactly, column by column. A low column
contributes `2^col` if any of its partial products is 1. A high column
contributes `2^col` times its number of ones. The testbenches use this formula
as their reference model.

Accuracy at the defaults (`APPROX_COLS = 8`, `CARRY_MASK = 0`):

| | 8x8 (all pairs) | 16x16 (100k random pairs) |
|---|---|---|
| results that differ from exact | 52401 of 65536 (80 %) | about 98 % |
| mean relative error | 2.9 % | 2.9 % |
| worst relative error | 47 % | 45 % |
| worst absolute error (8x8) | 1538 | – |

The error is always an underestimate. The largest relative errors occur for
small products whose ones crowd into the same low columns. Products in which
every low column holds at most one 1 are exact, for example 8*3, 15*8 and
9*16. That includes every product where one operand has a single bit set.
Setting `APPROX_COLS = 0` makes the whole multiplier exact, which is useful as
a check.

## The prefix adders

Both adders, `bka_16bit` and `lfa_16bit`, take the (generate, propagate) pair
of each bit and join pairs with the associative operator
`(G,P)hi ∘ (G,P)lo = (Ghi | Phi&Glo, Phi&Plo)`. The carry in is folded into
the generate of bit 0. The group generate of bits i..0 is then the carry into
bit i+1, and `sum[i] = p[i] ^ carry_in(i)`. The package `ppa_pkg` holds the
pair type, the operator and the enum that selects the adder.

- **Brent-Kung** builds a binary tree upwards. Prefixes ending at bits 1, 3, 7
  and 15 are ready after 4 levels. A mirror tree of 3 levels then fills in the
  other bits. That is 7 levels and 26 operator nodes for 16 bits: few wires
  and low fan-out.
- **Ladner-Fischer** first joins bit pairs. It then runs a Sklansky
  divide-and-conquer tree over the 8 odd bits, and finishes the even bits in
  one more level. That is 5 levels, with fan-out doubling at each level of
  the Sklansky part.

Both adders are written as loops over one array that is updated in place, one
level after another. Each level reads only entries that it does not write, so
the loops unroll into the same node network as a drawn tree. `WIDTH` may be
any power of two. The multiplier uses 16.

## Modules and parameters

| module | role | parameters (default) |
|---|---|---|
| `approx_multiplier_top` | both versions side by side: inputs `a`, `b`; outputs `y_bka`, `y_lfa` | `APPROX_COLS` (8), `CARRY_MASK` (0) |
| `approx_multiplier_16bit` | one 16x16 multiplier | `ADDER` (`PPA_BKA` or `PPA_LFA`), `APPROX_COLS`, `CARRY_MASK` |
| `approximate_multiplier_8bit` | 8x8 approximate multiplier | `APPROX_COLS`, `CARRY_MASK` |
| `approx_tree_compressor` | partial products and approximate tree | `APPROX_COLS` |
| `carry_maskable_adder` | final adder of the 8x8 block, with a `mask` port | `WIDTH` (16) |
| `bka_16bit`, `lfa_16bit` | 16-bit prefix adders with `cin` and `cout` | `WIDTH` (16) |
| `ppa_pkg` | operator, pair type and adder enum | – |

## What follows the source and what is this design's own

These parts follow the published design:

- four 8x8 approximate multipliers, three 16-bit prefix adders and one OR gate;
- instance names L1 to L7;
- L5 adding the outputs of L3 and L2;
- the carries of L5 and L6 going into the OR gate, and L7's carry out left
  unused;
- Brent-Kung and Ladner-Fischer as the two adder choices;
- an 8x8 block made of an approximate tree compressor and a carry maskable
  adder, using incomplete adders next to half and full adders;
- the test products 8*3 = 24, 15*8 = 120 and 9*16 = 144.

These parts are this design's own choices:

- Which operand halves feed L1 to L4, and the exact bit slices on the inputs
  of L6 and L7. They follow from the arithmetic above.
- Everything inside the 8x8 block: the definition of the incomplete adder
  (OR, no carry), the grouping of the tree, the use of 8 approximate columns,
  and the ripple structure and per-bit mask of the carry maskable adder. The
  source names these parts but does not give their logic. Other published
  ATC/CMA multipliers will give different error figures.
- The internal node structure of both prefix adders. It is the textbook form
  of each.
- Unsigned operands and purely combinational timing.

Kogge-Stone and Han-Carlson adders are alternatives that the designers
compared but did not use, so they are not included. FPGA area and delay
figures (LUTs, ns) were not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end, and each has a watchdog.

- `tb_bka_16bit`, `tb_lfa_16bit`: directed carry chains, random operands,
  and an exhaustive check of an 8-bit instance against `a + b + cin`.
- `tb_carry_maskable_adder`: random masks, checked against a model that adds
  the segments between cuts separately.
- `tb_approx_tree_compressor`, `tb_approximate_multiplier_8bit`: all 65536
  operand pairs, checked against the column model in `tb_ref_pkg`. They also
  check an exact instance (`APPROX_COLS = 0`) against `a*b`, and check that no
  result exceeds `a*b`. The 8x8 testbench also checks one instance with a cut
  carry.
- `tb_approx_multiplier_16bit`: both adder versions and an exact instance.
  It counts the operand pairs in which each middle carry (`c5` or `c6`)
  reaches the OR gate.
- `tb_approx_multiplier_top`: end to end at the default parameters. It uses
  the three example products and 50000 random pairs. It requires both
  versions to agree with the model and with each other, and it requires every
  mechanism (approximation, `c5`, `c6`, a non-zero middle sum into L7) to
  have occurred.

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ppa_pkg.sv tb/tb_ref_pkg.sv tb/tb_approx_multiplier_top.sv \
  --top-module tb_approx_multiplier_top -o sim
./obj_dir/sim
```

Substitute any other `tb_*.sv` file and its top module in the same command.
All testbenches finish within a few seconds.
