# Domino parallel-prefix adder tree, 32-bit, radix 4

A parallel-prefix adder gets its speed from a tree that computes carries in logarithmic depth.
In a *sparse* radix-4 tree the carries are computed only at every fourth bit position
(c4, c8, ..., c28), and small 4-bit sum modules finish the addition locally. This RTL describes
such an adder whose carry tree is built, as a dynamic-logic (domino) circuit, from three kinds
of module:

| module | role | style modelled |
|---|---|---|
| LEV1 (`lev1_newcd`) | group propagate `GP` and generate `GG` of 4 operand bits | domino-compound, "New_CD" |
| LEV3 (`lev3_convcd`) | 16-bit group propagate plus three carries from four (GP, GG) pairs | domino-compound, "Conv_CD" |
| LEV2 (`lev2_convdom`) | 16-bit (GGP, GGG) from four (GP, GG) pairs, Han-Carlson tree only | domino, "Conv_Dom" |

The main idea is in LEV1, the most frequent module of any sparse tree. A conventional LEV1
forms eight single-bit signals `p_i = a_i | b_i`, `g_i = a_i & b_i` and then groups them.
LEV1 here never forms single-bit signals. It builds one propagate and one generate per *pair*
of bits straight from the operands, in only four dynamic nodes. A static compound gate then
merges the two pairs. Fewer dynamic nodes means less precharge energy. Shorter pull-down
stacks mean faster evaluation. In the circuit this work is based on, the two choices halve the
energy and area of LEV1 and make it about 20 % faster.

The RTL is a **logic model** of that circuit. It reproduces each gate's Boolean function, the
split into dynamic nodes and static gates, and the precharge/evaluate behaviour of domino
logic. It does not model transistor sizes, keepers, delays or energy.

## Adder structure (default: Brent-Kung)

```
 bits   31..28   27..24  23..20  19..16  15..12  11..8   7..4    3..0
 LEV1            L1[6]   L1[5]   L1[4]   L1[3]   L1[2]   L1[1]   L1[0]     (GP_k, GG_k)
                   \       |       /       \       |       |     /
 LEV3             LEV3 high: GP/GG 4..6      LEV3 low: GP/GG 0..3
                  + (PP15, c16) at pos 0     -> c8, c12, c16, PP15
                  -> c20, c24, c28, PP27
 carries  c28     c24     c20     c16     c12     c8      c4=GG_0  cin
 SUM      sum4    sum4    sum4    sum4    sum4    sum4    sum4     sum4  -> cout = c32
```

- LEV1 number k groups bits 4k+3..4k. Bits 31..28 do not enter the tree; the top sum module
  handles them with c28.
- The low LEV3 gives c8, c12, c16 and PP15, the propagate of bits 15..0.
- The high LEV3 uses (PP15, c16) as its lowest position. It yields c20, c24, c28 and PP27.
- Each `sum4` adds its 4 bits with the carry into its group.

`TREE = TREE_HAN_CARLSON` builds the other sparse tree from the same modules. It keeps the
low LEV3 (c8, c12, c16). Three LEV2 modules group the 16-bit spans 4..19, 8..23 and 12..27.
A last row of AND-OR carry cells gives `c20 = GGG1 | GGP1&c4`, `c24 = GGG2 | GGP2&c8` and
`c28 = GGG3 | GGP3&c12`. The measured reference design is the Brent-Kung one. The circuit of
the Han-Carlson last-row cells is this design's choice.

## LEV1 in detail

For a group of bits i+3..i, with bit pairs `10` = (i+1, i) and `32` = (i+3, i+2), the four
dynamic nodes are active low:

```
P10_n = ~((a1|b1) & (a0|b0))            P32_n = ~((a3|b3) & (a2|b2))
G10_n = ~(a1&b1 | (a1|b1)&a0&b0)        G32_n = ~(a3&b3 | (a3|b3)&a2&b2)
```

The two static gates that merge them are:

```
GP = NOR(P32_n, P10_n)                   = P32 & P10
GG = NOT(G32_n & (P32_n | G10_n))        = G32 | P32 & G10
```

The propagate used is the inclusive OR `a|b`. This is correct for carry computation, because a
position with a = b = 1 generates anyway. The sum modules, which need the XOR, compute their own.

## LEV3 and its slow middle carry

LEV3 pairs its inputs in four dynamic nodes, the same as LEV1, but working on (GP, GG):

- `~(GP1&GP0)` and `~(GG1 | GP1&GG0)`
- `~(GP3&GP2)` and `~(GG3 | GP3&GG2)`

Static compound gates turn these into the group propagate and the top carry (c16 or c28). An
inverter on `~(GG1 | GP1&GG0)` gives the lowest carry (c8 or c20). The middle carry (c12 or
c24) needs one more domino gate, `GG2 | GP2&c8`, which waits for c8. So in this LEV3 the
*middle* carry is the slowest output: in the real circuit c16 settles before c12, and c28 before
c24. The worst path of the Brent-Kung adder therefore ends at c24, not at c28. The logic model
has the same structure but no delays, so this shows only in the netlist.

## Domino timing model

Every tree module has a clock input `phi`. At the top level it is the port `clk`. The real
clock buffers are two inverters in series, so the buffered clock has the same polarity as
`clk`.

- **Precharge, `clk = 0`.** Every dynamic node is high, so every tree output (GP, GG, PP, all
  carries) reads 0. Apply `a`, `b` and `cin` in this phase.
- **Evaluate, `clk = 1`.** Nodes discharge where their pull-down function is true. The
  carries, `sum` and `cout` are valid in the same high phase.

The adder does one addition per clock cycle. It has no registers, no reset and no state. A
dynamic node is modelled as `~(phi & f(inputs))`. Like real domino logic, this is only right if
the inputs stay stable, or only rise, while `phi = 1`. The model does not check that rule.

## Carry-in

The tree has no carry-in of its own: `c4 = GG_0`. So that `cin` reaches every group carry, the
top replaces bit 0 of the tree operands with

```
a0' = a0&b0 | (a0|b0)&cin      b0' = a0 | b0
```

The tree then sees generate `a0'&b0' = g0 | p0&cin` and propagate `a0'|b0' = p0`. The lowest
`sum4` receives `cin` directly. This fold is not part of the reference tree; it is this design's
addition. With `cin = 0` it changes nothing.

## Interfaces

`pp_adder32 #(parameter pp_tree_pkg::tree_e TREE = TREE_BRENT_KUNG)`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | domino clock: 0 = precharge, 1 = evaluate |
| `a`, `b` | in | 32 | operands |
| `cin` | in | 1 | carry-in |
| `sum` | out | 32 | a + b + cin, valid while clk = 1 |
| `cout` | out | 1 | c32 |
| `carry` | out | 7 | `carry[k]` = c_{4k}, k = 1..7; all 0 while clk = 0 |

`pp_tree_pkg` holds `WIDTH = 32` and `RADIX = 4`. The tree modules are written for exactly this
configuration: their wiring is the specific 32-bit radix-4 arrangement, not a generator. To
change the width or radix, rewrite the trees.

## Files

- `rtl/pp_tree_pkg.sv`: constants and the `tree_e` type.
- `rtl/lev1_newcd.sv`, `rtl/lev3_convcd.sv`, `rtl/lev2_convdom.sv`: the three prefix modules.
- `rtl/bk_tree32.sv`, `rtl/hc_tree32.sv`: the two 32-bit carry trees.
- `rtl/sum4.sv`: 4-bit sum module. The reference design gives only its role; here it is a
  plain ripple of the incoming carry through four bits.
- `rtl/pp_adder32.sv`: the top.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/tb_pp_adder32_full.sv`: the top at its default configuration.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. All reference values
come from plain integer arithmetic, never from the design's own equations.

- `tb_lev1_newcd`, `tb_lev2_convdom`, `tb_lev3_convcd` try all 256 input combinations, in both
  precharge and evaluate.
- `tb_sum4` tries all 512 combinations.
- `tb_bk_tree32` and `tb_hc_tree32` apply the following, each in both phases:
  - the critical operation `a = 1, b = all ones`, a carry generated at bit 0 that propagates
    through every position;
  - a single generate under an all-propagate field, at every bit position;
  - 2000 long-propagate patterns;
  - 2000 random pairs.
- `tb_pp_adder32` runs both topologies side by side on one clock. It checks `sum`, `cout` and
  `carry` in the same evaluate phase and the precharged carries just before it. It counts, and
  requires at least once, each of: precharge, evaluate, the critical operation, a carry-in that
  reaches c4 through the bit-0 fold, and a carry out of bit 31.
- `tb_pp_adder32_full` uses the default top. It runs the critical operation (every carry must be
  1), then 1000 random additions, the length of the sequence used for the reference energy
  measurements.

Each testbench has also been run against a copy of its module with one deliberate error (for
example, LEV1's GG gate losing its P32 input), and each reported failures.

Run one testbench with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_pp_adder32 \
    rtl/pp_tree_pkg.sv tb/tb_pp_adder32.sv -o sim
./obj_dir/sim
```

## What is not modelled

- **Electrical behaviour.** Transistor widths, the 1.5 tapering, keepers, clock-buffer sizing,
  delay, energy and process variation are not modelled. The clock buffers are plain wires
  here, because their logic function is the identity.
- **Reference figures.** These belong to the transistor-level 45 nm, 1 V circuit, not to this
  RTL. For the Brent-Kung tree with New_CD LEV1 and Conv_CD LEV3, post-layout at 75 °C:
  - mean delay 162 ps, sigma 12.3 ps;
  - 144 fJ typical energy;
  - 139 µm² area;
  - about 30 % faster, 41 % less energy and 51 % less area than an all-domino tree.
- **Other gate styles.** The conventional domino, limited-stack-height domino and "New_Dom"
  variants of the modules are alternative implementations and are not included. They would
  have the same logic functions as the modules here.
- **Input timing.** The rule that operands are stable during evaluate is assumed, not checked.
