# Hybrid parallel prefix adder (32-bit, inverting-cell prefix network)

A combinational N-bit adder (32 bits by default) whose carry network is a
sparse parallel-prefix graph built only from *inverting* CMOS-style cells.
Two ideas shape it:

1. **A thin, diagonal prefix graph.** The word is split into 4-bit groups.
   Each group forms its own group generate/propagate in two stages. The group
   carries then step from one group to the next, one stage per group, along
   the main diagonal of the graph. The 32-bit network has only 23 dot nodes
   and 31 semi-dot nodes. The cost is a logic depth of 9 stages, where
   Kogge-Stone or Sklansky reach 5.
2. **Alternating polarity instead of inverters.** A CMOS gate is naturally
   inverting, so a dot cell that maps active-low inputs to active-high outputs
   (an *odd* cell), followed by one that maps active-high to active-low (an
   *even* cell), needs no inverters between them. Odd stages use odd cells and
   even stages use even cells. An explicit pair of inverters is needed only
   where an edge skips an even number of stages.

The RTL is a functional model of that gate-level structure. Every cell is a
small module with the inverting equations written out. The graph is
elaborated from a node table, so the netlist keeps the structure of the
published graph, not just the function `a + b`.

## Interface

```
module hybrid_ppa #(
  parameter int               N      = 32,                 // multiple of 4, >= 8
  parameter ppa_pkg::scheme_e SCHEME = ppa_pkg::SCHEME_I   // I, II or III
) (
  input  logic [N-1:0] a, b,
  output logic [N-1:0] sum,    // (a + b) mod 2^N
  output logic         cout    // carry out of bit N-1
);
```

There is no clock and no carry-in. The result is valid one combinational
delay after `a` and `b` settle. Carry `c0` is simply the generate of bit 0.

## The prefix graph

Notation: `(G,P)[i:j]` is the group generate/propagate of bits i..j, and
`c_i = G[i:0]` is the carry out of bit i. A *dot* node combines two adjacent
groups, `(G,P)[i:k] = (G[i:j] + P[i:j]·G[j-1:k], P[i:j]·P[j-1:k])`. A
*semi-dot* node is the generate half only. It is the last node in every
column, and it turns a group term plus the carry from below into `c_i`.

For a group of bits b..b+3 (group index k = b/4 ≥ 1):

| stage | node | makes |
|---|---|---|
| 1 | dot | `(b+1:b)` and `(b+3:b+2)` |
| 2 | dot | `(b+3:b)` |
| k+2 | semi-dot, using `c(b-1)` from stage k+1 | `c(b+3)`, `c(b+1)`, `c(b)` |
| k+3 | semi-dot, using `c(b+1)` | `c(b+2)` |

Group 0 is special. It makes `c1` in stage 1 from bits 1 and 0, and `c3` and
`c2` in stage 2 from `c1`. The top group has one more dot, `(b+2:b)`, in
stage 2. It uses this to make all four of its carries in the last stage, so
`c(b+2)` does not need an extra stage. For N = 32 the node map is as follows.
`d` is a dot, `s` is a semi-dot, `*` marks an inverter pair on the node's
upper input, and columns run from bit 31 down to bit 0:

```
stage 1:  d  .  d  .  d  .  d  .  d  .  d  .  d  .  d  .  d  .  d  .  d  .  d  .  d  .  d  .  s  .
stage 2:  d d*  .  .  d  .  .  .  d  .  .  .  d  .  .  .  d  .  .  .  d  .  .  .  d  .  .  .  s s*  .  .
stage 3:  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  s  . s*  s  .  .  .  .
stage 4:  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  . s*  .  s s*  . s*  .  .  .  .  .  .
stage 5:  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  s  . s*  s  .  s  .  .  .  .  .  .  .  .  .  .
stage 6:  .  .  .  .  .  .  .  .  .  .  .  . s*  .  s s*  . s*  .  .  .  .  .  .  .  .  .  .  .  .  .  .
stage 7:  .  .  .  .  .  .  .  .  s  . s*  s  .  s  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .
stage 8:  .  .  .  . s*  .  s s*  . s*  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .
stage 9:  s  s s*  s  .  s  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .  .
```

Totals: 23 dots, 31 semi-dots, 15 inverter pairs, depth 9. The table lives in
`ppa_pkg::node()`, one line per rule above. `ppa_prefix_tree` walks it in a
`generate` loop.

## Polarity: the part that is easy to get wrong

Every signal is stored in the polarity of the stage that made it:

* stage 0 (pre-processing) and every even stage: **active low**;
* every odd stage: **active high**.

A cell in stage s expects inputs in the polarity of stage s-1. An input from
stage t is therefore correct when s-t is odd. When s-t is even, the input
passes through `ppa_inv_pair`, which inverts both the generate wire and the
propagate wire. In this graph the lower input of a node always comes from
the stage just before, so only upper (same-column) inputs ever need an
inverter pair.

The carries leave the network in mixed polarity too. `c_i` is true if its
column ends in an odd stage and complemented if it ends in an even stage.
`c0 = G0-bar` is always complemented. `ppa_pkg::carry_active_low(N, i)` gives
the polarity. The sum stage does not restore polarity with inverters.
Instead it picks XOR or XNOR for each bit. `cout` is returned in true form.

## The three signal schemes

`SCHEME` selects what the network carries besides generate. The graph and
the cells are the same for all three.

| scheme | pre-processing per bit | second network signal | half-sum used for the sum |
|---|---|---|---|
| I | `G-bar = NAND`, `P-bar = XNOR` | `P-bar` (propagate) | `P-bar` |
| II | `G-bar = NAND`, `K = NOR`, `P-bar = XNOR` | `K` (kill, i.e. NOT(a OR b)) | `P-bar` |
| III | `G-bar = NAND`, `K = NOR`, `P = NOR(K, G)` | `K` | `P` (active high) |

With kill, the network really combines "transmit" terms `K-bar = a OR b`.
The carries are unchanged, because a bit that generates also transmits.
Scheme III saves the XNOR gate: a bit propagates exactly when it neither
kills nor generates. In the published 180 nm transistor-level comparison,
Scheme I gave the lowest power-delay product and Scheme III the lowest power.
That is why Scheme I is the default here.

## Blocks

| module | role |
|---|---|
| `ppa_pkg` | scheme enum, node table, depth, carry polarity, node counts |
| `ppa_preproc` | stage 0: bit generate, propagate or kill, and half-sum, per scheme |
| `ppa_odd_dot`, `ppa_even_dot` | dot cells: active-low in / active-high out, and the reverse |
| `ppa_odd_semi_dot`, `ppa_even_semi_dot` | last node of a column, giving a true or complemented carry |
| `ppa_inv_pair` | inverter pair on an edge that skips an even number of stages |
| `ppa_prefix_tree` | the carry network elaborated from the node table |
| `ppa_postproc` | sum bits with per-bit XOR/XNOR, and `cout` |
| `hybrid_ppa` | top level: preproc, then the network, then postproc |

## How far it follows the source design, and where it departs

Taken from the published design:
* the 32-bit graph: node placement, the stage of every node, the extra dot
  in column 30, and 23 dots, 31 semi-dots and depth 9;
* the odd and even dot and semi-dot equations;
* the rule for where inverter pairs go;
* the three pre-processing schemes;
* the sum formed from P and the carry in either polarity.

Choices made here:
* **Widths other than 32.** Only the 32-bit graph was published (8- and
  16-bit versions exist but are not shown). For other N, the same group rule
  is applied, giving depth N/4+1: 3 for 8 bits and 5 for 16 bits. These
  graphs are an extrapolation and may differ from the original 8- and 16-bit
  adders.
* **No carry-in.** The published graph starts from `c0 = G0`.
* **`cout` port and default scheme.** Both are choices made here.
* **Sum gates.** The XOR/XNOR choice per bit is not drawn in the source and
  is chosen here.
* **Fan-out.** The source quotes a maximum fan-out of 6. The graph as
  built here has a largest fan-out of 4 inside the network (`c27` into the
  four stage-9 semi-dots), or 5 counting its sum gate. The node placement,
  which reproduces the published node counts and depth exactly, was kept.
* **Scheme II/III even cells.** They are built as inverting cells with
  active-low outputs, the same as in Scheme I, as the alternating-polarity
  rule requires.
* **Power, delay and area** come from transistor-level simulation and cannot
  be reproduced from this RTL. Synthesis will restructure the gates: the
  polarity-alternating structure is visible in the RTL hierarchy, but it is
  not preserved unless the cells are kept as hard instances.

## Verification

Each block has a self-checking testbench in `tb/`, and each testbench ends
by printing `TB_RESULT checks=<n> failures=<n>`.

* The cell testbenches apply every input combination.
* `tb_ppa_preproc` and `tb_ppa_postproc` check all three schemes against bit
  counts and independently derived carry polarities.
* `tb_ppa_prefix_tree` compares every carry with integer addition at 32, 16
  and 8 bits, fed with both propagate and kill. It also checks the node
  counts (23 dots, 31 semi-dots) and the depth (9).
* `tb_hybrid_ppa` checks all three schemes at 32 and 16 bits with random and
  corner operands, and every scheme at 8 bits exhaustively.
* `tb_hybrid_ppa_full` drives only the default configuration, with a new
  operand pair every 10 ns.

Both end-to-end benches count carry-outs, a carry rippling from bit 0 to
bit 31, a carry crossing each 4-bit group, and both values of every carry.
They fail if any of these never happens.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ppa_pkg.sv \
          tb/tb_hybrid_ppa.sv --top-module tb_hybrid_ppa
./obj_dir/Vtb_hybrid_ppa
```

Change the width or scheme with the `N` and `SCHEME` parameters of
`hybrid_ppa`. To change the graph itself, edit `ppa_pkg::node()`. The
network re-derives the inverter pairs and carry polarities from the table,
and the post-processing adapts on its own.
