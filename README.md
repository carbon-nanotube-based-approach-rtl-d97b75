# Ternary magnitude comparator (CNFET-style, prefix based)

This design compares two unsigned base-3 numbers, A and B, of N trits each
(a trit is a ternary digit: 0, 1 or 2). It raises exactly one of three flags:
`gt` (A > B), `eq` (A = B) or `lt` (A < B).

The circuit it models targets carbon-nanotube FETs. In those transistors the
threshold voltage depends on the tube diameter, so three voltage levels
(0, Vdd/2, Vdd) can carry one trit on one wire. The main idea is to use
ternary logic only where the operands enter. A ternary decoder turns each
trit into three one-hot binary lines at once. Everything after that is
ordinary two-level (0 / Vdd) logic: a per-trit greater/equal stage, a binary
prefix tree and one NOR gate.

The RTL describes the circuit at logic level. It is purely combinational:
no clock, no reset and no delays. Transistor sizing, power and analog timing
are out of its scope.

## Signal representation

| Quantity | RTL type | Meaning |
|---|---|---|
| trit (operand digit, ternary gate in/out) | `ternary_pkg::trit_t`, 2-bit enum `T0`, `T1`, `T2` | logic values 0, 1, 2 = 0, Vdd/2, Vdd |
| binary line (decoder outputs, g/e, tree, flags) | `logic` | 1 = level 2 (Vdd), 0 = level 0 |

The 2-bit code `2'b11` cannot occur in a real circuit. The ternary gates treat
it as logic 2. Operands are packed arrays `trit_t [N-1:0]`, and index N-1 is
the most significant trit.

## The four stages

```
 a[i], b[i] ──► ternary_decoder ×2 ──► ge_gen ──► g[i], e[i]     (tcmp1, one per trit)
 g[N-1:0], e[N-1:0] ──► prefix_tree ──► gt, eq ──► lesser_nor ──► lt
```

### 1. Ternary decoder (`ternary_decoder`)

The decoder produces X_k = 1 when x = k and 0 otherwise. It uses two kinds of
single-input ternary inverters:

| x | NTI (`tnti`) | PTI (`tpti`) |
|---|---|---|
| 0 | 2 | 2 |
| 1 | 0 | 2 |
| 2 | 0 | 0 |

The outputs are built from them as follows:

- X0 = NTI(x).
- X2 = NTI(PTI(x)): the PTI output is low only for x = 2.
- X1 = NOR(X0, X2): a plain binary NOR.

Only the NTI and PTI need three-level inputs, so in hardware the decoder is
the only place that depends on multi-threshold devices. The NTI puts the
low-threshold tube in the n-type device and the high-threshold tube in the
p-type device. The PTI does the opposite.

### 2. Per-trit greater / equal (`ge_gen`, `tcmp1`)

The decoder lines A^k and B^k of one position give:

    g_i = A^1 B^0 + A^2 B^0 + A^2 B^1      (A_i > B_i)
    e_i = A^0 B^0 + A^1 B^1 + A^2 B^2      (A_i = B_i)

`tcmp1` is the complete one-trit comparator: two decoders plus `ge_gen`. For
A_i < B_i, both g_i and e_i are 0.

### 3. Prefix grouping (`prefix_tree`, `aoi_group`, `oai_group`)

This stage is the hardest to follow. Two adjacent groups merge as shown
below, where j is the more significant group:

    G[j:i] = g_j + e_j · g_i
    E[j:i] = e_j · e_i

A balanced binary tree of these merges reduces the N pairs to G[N-1:0] and
E[N-1:0]. The tree needs no inverters between levels, because the levels
alternate between two cell types. Levels are counted from the leaves.

- **Odd levels use `aoi_group`.** It takes true-polarity inputs and returns
  the merged pair inverted: `~G = AOI21(g_j, e_j, g_i)` and
  `~E = NAND(e_j, e_i)`.
- **Even levels use `oai_group`.** It takes inverted inputs and returns true
  polarity: `G = OAI21(~g_j, ~e_j, ~g_i)` and `E = NOR(~e_j, ~e_i)`.

For N = 4 (two levels) the root therefore comes out in true polarity with no
extra gate. Two choices here are this design's own:

- **Odd level count (N = 2, 8, …).** The root pair is inverted, so one
  inverter per output restores it.
- **N not a power of two.** The operand is padded below its least significant
  trit with neutral positions (g = 0, e = 1), up to the next power of two.
  Neutral positions change neither result.

In the RTL the tree is built as a heap-numbered node array. Node k combines
node 2k+1 (more significant) with node 2k. The leaves are nodes NP … 2NP-1,
where NP is the padded width.

### 4. Lesser (`lesser_nor`)

    L = NOR(G, E)

A is less than B exactly when it is neither greater nor equal.

## Top module and parameters

`ternary_comparator #(parameter int N = 16)` has these ports:

| Port | Dir | Type | Meaning |
|---|---|---|---|
| `a` | in | `trit_t [N-1:0]` | operand A |
| `b` | in | `trit_t [N-1:0]` | operand B |
| `gt` | out | `logic` | A > B |
| `eq` | out | `logic` | A = B |
| `lt` | out | `logic` | A < B |

About N:

- The default is 16, the widest operand length in the published evaluation.
  That evaluation also covers 2, 4 and 8 trits.
- Any N ≥ 1 elaborates.
- The logic depth is 3 gate levels in the decoder, 2 for g/e, log2(N) in the
  tree, plus the NOR. The tree also has an output inverter when log2(N) is
  odd.

Assertions (simulation only) check two rules. Each decoder's outputs are
one-hot, and exactly one of `gt`, `eq`, `lt` is high.

## Reported figures of the transistor-level circuit (not modelled)

These come from SPICE simulation at 0.9 V, with three tubes per device and a
20 nm pitch. A single trit (the one-trit comparator) draws 0.65 µW and has a
21 ps delay.

| Operand length (trits) | Delay (ps) | Power (µW) |
|---|---|---|
| 2 | 24.33 | 1.336 |
| 4 | 26.76 | 2.71 |
| 8 | 29.2 | 5.45 |
| 16 | 31.6 | 10.9 |

The RTL reproduces the logic function at every one of these lengths. It says
nothing about their delay or power.

## Where the RTL departs from, or adds to, the reference design

- The RTL is logic-level only. CNFET devices, chirality and threshold
  voltages appear only in comments.
- The per-trit g/e logic is written as a two-level AND-OR. The reference
  gives a single transistor-level network for g_i instead.
- The cell type at each tree node (AOI21/NAND on odd levels, OAI21/NOR on
  even levels) is this design's reading of "AOI or OAI gates only, no
  inverter after each gate". The reference gives the gate-level picture only
  for N = 4.
- The output inverters for odd tree depth and the padding for other lengths
  are additions. They let the design scale to any N.
- The standard ternary inverter (STI) and the multi-input ternary NAND/NOR
  belong to the same gate family. The comparator does not use them, so they
  are not provided.
- Code `2'b11` on a trit input is read as logic 2.

## Files

- `rtl/ternary_pkg.sv`: the `trit_t` type.
- `rtl/tnti.sv`, `rtl/tpti.sv`: the ternary inverters.
- `rtl/ternary_decoder.sv`: stage 1.
- `rtl/ge_gen.sv`, `rtl/tcmp1.sv`: stage 2 and the one-trit comparator.
- `rtl/aoi_group.sv`, `rtl/oai_group.sv`, `rtl/prefix_tree.sv`: stage 3.
- `rtl/lesser_nor.sv`: stage 4.
- `rtl/ternary_comparator.sv`: the top.
- `tb/tb_<module>.sv`: self-checking testbenches, one per module. Each prints
  `TB_RESULT checks=… failures=…`. They check against tables written out
  independently, or against integer comparison of the operand values.
- `tb/tb_ternary_comparator.sv`: runs the top at its default N = 16. It uses
  20,000 random operand pairs with shared leading trits, plus directed
  cases. It also requires each outcome, and a decision at both the top and
  the bottom trit, to occur at least once.
- `tb/tb_comparator_lengths.sv`: covers N = 1, 2, 3 and 4 exhaustively, and
  N = 8 with random operands.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/ternary_pkg.sv tb/tb_ternary_comparator.sv \
        --top-module tb_ternary_comparator -y rtl -y tb +libext+.sv
    ./obj_dir/Vtb_ternary_comparator

To run any other testbench, replace the testbench file and top module name.
To change the operand width, override `N` on `ternary_comparator`. Each
testbench finishes in well under a second.
