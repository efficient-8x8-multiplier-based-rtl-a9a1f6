# 8x8 Wallace-tree multiplier from Gate Diffusion Input cells

This multiplier takes two unsigned 8-bit numbers and produces their 16-bit
product. It works in three steps. An array of 64 AND gates forms the partial
products. A Wallace tree of multi-input compressors reduces them to two rows,
in three stages. A final adder sums those two rows.

The design is aimed at low area and low power. Every gate in it is a
*Gate Diffusion Input* (GDI) cell or a small network of such cells. A GDI cell
has two transistors: one PMOS and one NMOS with a common gate. Their diffusion
terminals are driven by signals instead of by the supply rails. In logic terms
the cell is a 2:1 multiplexer:

    y = g ? n : p          (g: shared gate, p: PMOS side, n: NMOS side)

Tying `p` and `n` to constants or to other signals turns this one cell into
AND, OR, NOT, A'B, A'+B or a full multiplexer. The RTL is written the same
way. Every arithmetic cell is built from `gdi_cell` instances, so the
synthesised netlist is 383 such cells: one per two-transistor GDI cell.

The RTL models logic only. Voltage swing, body biasing, power and delay are
properties of the transistor-level circuit, which this code does not describe.

## Cell library

| module | function | GDI cells | transistors (2 per cell) |
|---|---|---|---|
| `gdi_cell` | `y = g ? n : p` | 1 | 2 |
| `gdi_and` | `a & b` (g=a, p=0, n=b) | 1 | 2 |
| `gdi_xor` | `a ^ b`: inverter for `b'`, then a mux selecting `b` or `b'` by `a` | 2 | 4 |
| `gdi_half_adder` | sum = XOR, carry = AND | 3 | 6 |
| `gdi_full_adder` | see below | 5 | 10 |

The full adder is built around `H = a ^ b`:

* **sum** = `H ? cin' : cin`. This is a GDI mux plus an inverter for `cin'`.
  Together with the XOR that makes H, the sum path is 8 transistors.
* **carry** = `H ? cin : a`. This is a single GDI mux, 2 transistors. When
  `a` and `b` differ, the carry equals `cin`. When they agree, it equals `a`.

The 10-transistor count, split into 8 for the sum and 2 for the carry, is the
adder's defining property. At transistor level, a GDI AND gate is often given
4 transistors (a 2-transistor cell plus restoring logic). Logically it is the
single cell used here.

## Compressors: exact counters with three outputs

The tree uses two compressors. Both take several bits of one weight *j*. Both
return an exact binary count of their ones on three wires: `sum` (weight j),
`carry` (weight j+1) and `cout` (weight j+2).

* **`compressor_4_2`**, also called a 4:3 compressor. It takes five inputs:
  `i1..i4` plus `cin`. It is built from two full adders and a half adder:

      fa0: i1+i2+i3 -> s0,c0    fa1: s0+i4+cin -> sum,c1    ha: c0+c1 -> carry,cout

* **`compressor_5_2`**, also called a 5:3 compressor. It takes seven inputs:
  `i1..i5` plus `cin1` and `cin2`. It is built from four full adders:

      fa0: i1+i2+i3 -> s0,c0    fa1: i4+i5+cin1 -> s1,c1
      fa2: s0+s1+cin2 -> sum,c2 fa3: c0+c1+c2 -> carry,cout

The names count the inputs and outputs in different ways, which can be
confusing. "4:2" refers to the four same-weight inputs plus a carry-in.
"4:3" refers to the three outputs. These compressors are **not** the
classic carry-chained 4:2 compressor, whose `cout` goes sideways into the
next column's `cin`. Here every output is a plain bit one or two columns up.
Nothing ripples between compressors in the same stage. The `cin`, `cin1` and
`cin2` inputs are ordinary bits of column j in the tree.

In transistor terms, a `compressor_4_2` is 2 x 10 + one half adder. A
`compressor_5_2` is 4 x 10 = 40.

## The reduction tree (`wallace_tree`)

Column *j* of the 8x8 partial-product matrix holds every `a[c] & b[r]` with
`r + c = j`. The column heights are 1, 2, ..., 8, ..., 2, 1 (column 15 is
empty). In each stage, every column is reduced at the same time, from its
lowest bit upward, by this rule:

1. If the column already has 2 bits or fewer and no carries arrive from
   below, it passes through unchanged.
2. Otherwise, it gets as many 7-input compressors (`compressor_5_2`) as fit.
3. If 4 to 6 bits remain, one 5-input compressor (`compressor_4_2`) takes
   them. With only 4 bits, its fifth input is tied low.
4. If 3 bits remain, a full adder takes them.
5. If 2 bits remain, a half adder takes them, but only if lower columns
   send carries into this column in the same stage. Otherwise the 2 bits
   pass through.
6. A single leftover bit is promoted unchanged to the next stage.

Rule 5 keeps half adders to the places where they stop a column from growing
back to three bits. In the next stage, column *j* holds four groups of bits,
in this order:

1. The bits it passed through.
2. The sums of its own counters.
3. The carries from column j-1.
4. The `cout` bits from column j-2.

For 8x8, these rules produce the schedule below. In the table, `5:2` and
`4:2` are the compressors, `FA` and `HA` are full and half adders, and `kp`
means k bits passed through.

| stage | column heights in (col 0 ... 15) | cells |
|---|---|---|
| 1 | 1 2 3 4 5 6 7 **8** 7 6 5 4 3 2 1 0 | col 2 FA; 3-5 `4:2` (col 3 with 4 inputs, col 5 +1p); 6 `5:2`; **7 `5:2` + 1p**; 8 `5:2`; 9 `4:2`+1p; 10-11 `4:2`; 12 FA; 13 HA |
| 2 | 1 2 1 2 2 4 3 4 3 4 3 3 3 3 2 0 | col 5, 7, 9 `4:2` (col 5 with 4 inputs); 6, 8, 10-13 FA; 14 HA |
| 3 | 1 2 1 2 2 1 2 3 2 3 2 3 2 2 2 1 | col 7, 9, 11 FA; 8, 10, 12-14 HA |
| out | 1 2 1 2 2 1 2 1 2 2 2 2 2 2 2 2 | two rows to the final adder |

The eight-bit middle column (column 7) in stage 1 shows the main idea.
Covering it with two 4:2 compressors would leave six outputs. Instead, one
7-input compressor takes seven bits and leaves three. The eighth bit moves up to stage 2 unchanged.

In total the tree uses 3 seven-input compressors, 9 five-input compressors,
11 full adders and 7 half adders.

The schedule is not written out by hand. `wallace_tree` computes it at
elaboration time from the per-column rule in `wallace_pkg::allocate`. It
stores the result in a table `PLAN[stage][column]` and uses generate loops to
instantiate and wire the counters. The localparams `NSTAGES`, `NUM_C73`,
`NUM_C53`, `NUM_FA` and `NUM_HA` report the result. Because of this, the
parameter `N` also works for other sizes: the testbench runs 4x4 and 12x12
trees as well. Only 8x8 is the intended design point.

Some counter outputs would land at column 16 or above. They are left
unconnected. The tree keeps the exact weighted sum of its inputs, and an
8x8 product is below 2^16, so these outputs are always 0.

## Final adder (`final_adder`)

The final adder is a ripple-carry adder built from the same cells. Bit 0 is a
half adder and bits 1 to 15 are GDI full adders. Its carry out is always 0
in the multiplier. The adder type is a free choice: any two-operand adder
fits here. Ripple-carry was chosen because it reuses the 10-transistor full
adder and keeps the cell count low. To cut delay, replace this module with a
faster adder of the same ports.

## Interface and timing

```
module gdi_multiplier #(parameter int unsigned N = 8) (
  input  logic [N-1:0]   a,   // multiplicand, unsigned
  input  logic [N-1:0]   b,   // multiplier, unsigned
  output logic [2*N-1:0] p    // a * b
);
```

The multiplier is purely combinational: no clock, reset or registers. `p`
is valid one propagation delay after `a` or `b` changes. If you need a
registered multiplier, add flops around it.

## Cost cross-check

The published per-cell transistor counts are:

* AND gate: 4.
* Full adder: 10.
* Half adder: 8. This figure is inferred, not published: it is what makes a
  28-transistor 4:3 compressor, given that the compressor is 2 full adders
  plus 1 half adder.

This netlist has 64 AND gates, 56 full adders and 17 half adders. At those
counts that comes to 952 transistors, against the 960 published for the
original 8x8 GDI multiplier. The small gap suggests a slightly different cell
allocation in a few columns. The published power and delay figures (180 nm,
3 V, 100 MHz) cannot be checked with this RTL.

## How far it can be trusted

All of these pass:

* `tb_gdi_multiplier` checks all 65,536 operand pairs at the default size.
  It also counts how often each tree mechanism actually fires, and fails if
  any never does:
  * the middle column's 7-input compressor reaching `cout` (4,624 times);
  * the promoted bit being 1;
  * a full 5-input compressor reaching `cout`;
  * a 4-input use of a 5-input compressor reaching `cout`;
  * a tree half adder producing a carry;
  * a carry rippling 8 or more bits in the final adder;
  * a product using bit 15.
* `tb_wallace_tree` feeds random, all-zero and all-one partial-product
  matrices to 8x8, 4x4 and 12x12 trees, not just matrices that come from a
  real product. It checks that the two output rows sum to the weighted
  matrix sum. It also checks that the 8x8 tree has three stages and that
  column 7 is one 7-input compressor plus one promoted bit.
* The cell, compressor, partial-product and adder testbenches are exhaustive,
  except for `tb_final_adder`, which tries corner cases and 20,000 random
  pairs.

## Where this RTL makes its own choices

* **Operand type.** Operands are unsigned. Nothing about signed operation is
  specified.
* **Two stage counts.** The original description gives both three and five
  reduction stages. This tree uses three, the number stated for the final
  architecture, and it reaches two rows in three.
* **Allocation rule.** The rule is chosen so that it reproduces the one
  column allocation that is spelled out, the middle column. The allocation
  in other columns may differ from the original schematic.
* **Compressor wiring.** The internal wiring of the two compressors is the
  natural one for the stated building blocks: 2 full adders + 1 half adder,
  and 4 full adders.
* **Final adder.** It is a ripple-carry adder, where the original calls only
  for "a high-speed adder".
* **Start-up behaviour.** The transistor circuit is reported to produce an
  invalid first output pulse after start-up. This is an analog effect. The
  RTL has no such effect and needs no corresponding workaround.

## Files

```
rtl/gdi_cell.sv          GDI primitive (2:1 mux)
rtl/gdi_and.sv           AND from one cell
rtl/gdi_xor.sv           XOR from two cells (the adders' H function)
rtl/gdi_half_adder.sv    half adder
rtl/gdi_full_adder.sv    10-transistor full adder
rtl/compressor_4_2.sv    5-input -> 3-output compressor
rtl/compressor_5_2.sv    7-input -> 3-output compressor
rtl/pp_gen.sv            N x N AND array
rtl/wallace_pkg.sv       per-column reduction rule and plan type
rtl/wallace_tree.sv      schedule table + generated compressor tree
rtl/final_adder.sv       ripple-carry final adder
rtl/gdi_multiplier.sv    top level
tb/tb_<module>.sv        one self-checking testbench per module
```

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/wallace_pkg.sv \
    tb/tb_gdi_multiplier.sv --top-module tb_gdi_multiplier -o sim
./obj_dir/sim
```

Replace `tb_gdi_multiplier` with any other testbench name. Each testbench
ends by printing `TB_RESULT checks=<n> failures=<m>`. The full exhaustive run
takes well under a second.

To try a different size, set `N` on `gdi_multiplier`. To try a different
reduction policy, edit `wallace_pkg::allocate`. The tree regenerates its
wiring from that rule, and `tb_wallace_tree` checks any rule for arithmetic
correctness.
