# Parallel prefix adders built from a structure matrix

A parallel prefix adder computes every carry of an N-bit addition in about log2(N) levels of
two-input logic rather than the N steps of a ripple-carry adder. Kogge-Stone, Ladner-Fischer,
Brent-Kung, Han-Carlson and Knowles each wire the carry network in their own fixed way. They
trade depth (delay), node count (area and leakage), fanout and wire length against each other.

This RTL implements a set of less regular prefix networks. An exhaustive search over all 8-bit
networks of up to four levels turned them up, and some were then extended to 16 bits. They
include:

- minimum-depth networks with fewer nodes or smaller fanout than comparable Knowles adders;
- Brent-Kung-class networks with one node fewer;
- variants of Ladner-Fischer and of the new structures that lower the branch effort on the
  critical path. They do this by moving low-order nodes further down and putting buffers in
  their place.

Every adder here is built by one generic module from a small table, the *source-column matrix*.
New structures can therefore be tried by writing a table, without writing any logic.

## The three stages

For operands `a`, `b` and carry input `cin`:

1. **Pre-processing** (`gp_generate`): bit generate `g_i = a_i & b_i` and bit propagate
   `p_i = a_i ^ b_i`.
2. **Prefix computation** (`prefix_network`, built from `prefix_node`): M levels of prefix
   operators turn the bit signals into group signals `G[i] = g_{i:0}` and `P[i] = p_{i:0}` for
   every column.
3. **Post-processing** (`sum_generate`): `c_0 = cin`, `c_i = G[i-1] | (P[i-1] & cin)`,
   `s_i = p_i ^ c_i` and `cout = c_N`.

The prefix operator (`prefix_node`) joins a high group `i:k` with a lower group `k-1:j`:

    g_{i:j} = g_{i:k} | (p_{i:k} & g_{k-1:j})
    p_{i:j} = p_{i:k} & p_{k-1:j}

The operator is associative, so any split point `k` gives the same result. That freedom is the
whole design space: each structure is one way of choosing the splits.

## The source-column matrix

A structure with N columns and M levels is an M x N table. Row `r` describes level `r+1`.
Within a row, the entries run from column N-1 on the left to column 0 on the right, the same
way the dot diagrams of prefix adders are drawn. For column `i` the entry `k` means:

- `k == i`: column `i` passes its group signals down unchanged. This is a *buffer*, and here it
  is a plain wire.
- `k < i`: a prefix node in column `i` joins column `i`'s current group (the high part) with
  column `k`'s current group from the level above (the low part).

Example, an 8-bit Kogge-Stone network:

    '{6,5,4,3,2,1,0,0},   // level 1: every column i joins column i-1
    '{5,4,3,2,1,0,1,0},   // level 2: joins column i-2 (columns 1, 0 are buffers)
    '{3,2,1,0,3,2,1,0}    // level 3: joins column i-4

`prefix_network` checks the table while it elaborates. It tracks the low end `lo[i]` of every
column's group through the levels. A node in column `i` fed from column `k` is legal only if all
of these hold:

- `k < i`;
- the low group reaches up to the high one, `k + 1 >= lo[i]`, so there is no gap;
- the low group starts below the high one, `lo[k] < lo[i]`.

After the last level every column must cover `i:0`. A table that breaks these rules stops
elaboration with `$fatal`. Overlapping groups (idempotent use of the operator) pass this check
and give correct sums, but none of the tables here has any.

The same analysis yields figures of the network as localparams of `prefix_network`:

| localparam    | meaning                                                                         |
|---------------|---------------------------------------------------------------------------------|
| `NODES`       | number of prefix nodes                                                          |
| `LEVELS`      | number of levels M                                                              |
| `WIRE_LENGTH` | sum of `i - k` over all nodes: total horizontal wire length in columns          |
| `MAX_FANOUT`  | largest number of other-column nodes that one source feeds within one level     |
| `BRANCH_EFFORT` | worst product, over a path from the bit-0 input down through the levels, of the branches leaving each point it passes (the vertical wire plus one per node fed) |

`BRANCH_EFFORT` feeds a simple logical-effort delay estimate, `LEVELS * BRANCH_EFFORT^(1/LEVELS)`.
It ignores wire load, and it treats buffers and nodes as having the same input capacitance and
parasitic delay. The estimate is useful for ranking structures. It is not a timing result.

These localparams describe the netlist and do not change it. The testbenches compare them with
the published figures of each structure.

## The structures

All tables are in `rtl/ppa_pkg.sv`.

### 16-bit

| module              | table               | levels | nodes | wire length | max fanout | branch effort | idea |
|---------------------|---------------------|--------|-------|-------------|------------|---------------|------|
| `ppa16_structure_a` | `STRUCT_A_SRC`      | 4 | 39 | 95 | 4 | 60 | Minimum depth with *staggered* groupings. After level 1, pairs of neighbouring columns join another pair 2, then 4, then 8 columns lower. The two columns of each pair use different sources, so fanout stays at 4 with 39 nodes (Kogge-Stone needs 49). |
| `ppa16_modified_a`  | `STRUCT_MOD_A_SRC`  | 4 | 39 | 95 | 4 | 40 | Structure A with the nodes forming 5:0 and 4:0 moved from level 3 to level 4. This lowers the branch effort on the critical path. |
| `ppa16_structure_d` | `STRUCT_D_SRC`      | 5 | 39 | 95 | 4 | 40 | Columns 13, 12, 5 and 4 build their groups early. Level 4 then forms 7:0 and 6:0 together with 15:8 and 14:7, and level 5 finishes the upper byte. Same node count as Structure A, one level deeper, smaller branch effort. |
| `ppa16_modified_lf` | `STRUCT_MOD_LF_SRC` | 4 | 32 | 76 | 8 | 72 | Ladner-Fischer with the node forming 2:0 moved one level down and the nodes forming 6:0..4:0 moved to the last level. The source 3:0 then feeds one node in level 3 instead of four. Minimum depth, and a much smaller branch effort than plain Ladner-Fischer. |
| `ppa16_structure_c` | `STRUCT_C_SRC`      | 6 | 25 | 41 | 2 | 96 | Brent-Kung with one node saved. Column 15 joins 15:12 with 11:0 directly and never forms 15:8. |

Published figures for comparison, in the same units. The branch efforts computed from the tables
match the published values for all five structures.

| structure         | nodes | wire length | levels | branch effort | delay |
|-------------------|-------|-------------|--------|---------------|-------|
| Structure A       | 39 | 89 | 4 | 60  | 11.13 |
| Modified A        | 39 | 89 | 4 | 40  | 10.06 |
| Structure D       | 39 | 95 | 5 | 40  | 10.45 |
| Modified L-F      | 32 | 76 | 4 | 72  | 11.65 |
| Structure C       | 25 | 41 | 5 | 96  | 12.46 |
| Kogge-Stone       | 49 | 155 | 4 | 16 | 8.00  |
| Ladner-Fischer    | 32 | 76 | 4 | 270 | 16.21 |
| Brent-Kung        | 26 | 49 | 5 | 96  | 12.46 |

### 8-bit search results

`ppa8_found #(.SEL(...))` builds one of eighteen 8-bit structures chosen by the enum
`ppa_pkg::ppa8_e`. Some are named by the first study's pair (fanout metric, nodes). The fanout
metric is max fanout x nodes / branches. The others are named by the second study's pair
(delay, area x power), where area x power is nodes x wire length.

| enum value            | levels | nodes | note |
|-----------------------|--------|-------|------|
| `S8_FO2P5_N14_1/2`    | 3 | 14 | only three sources with fanout 2 (Knowles (1,2,2) has five) |
| `S8_FO4P3_N13_1..3`   | 3 | 13 | structure 2 is also the (7.56, 299) point |
| `S8_FO2P3_N15_1..3`   | 3 | 15 | structure 2 is also (6.87, 405); it is the 8-bit form of Structure A |
| `S8_D8P14_AP240`      | 3 | 12 | 8-bit modified Ladner-Fischer (branch effort 20 instead of 30) |
| `S8_FO1_N11_1..6`     | 4 | 11 | every source feeds one node per level; one node fewer than Han-Carlson. Structure 3 is also (8.00, 176) |
| `S8_FO2P2_N10_1`      | 4 | 10 | one node fewer than Brent-Kung; also (8.85, 130); the 8-bit form of Structure C |
| `S8_D6P73_AP405`      | 4 | 15 | lower branch effort than the 3-level (6.87, 405) structure |
| `S8_D7P44_AP286`      | 4 | 13 | hybrid |

`ppa_top` instantiates all of the above side by side. The five 16-bit adders share `a16`, `b16`
and `cin16`, and each brings out its own sum and carry. The eighteen 8-bit adders share `a8`,
`b8` and `cin8`, and their results come out as the arrays `sum8[k]` and `cout8[k]`, indexed by
`ppa8_e`. Every output is the sum of its operands. The top serves to compare the structures
after synthesis and to check them all in one simulation.

## Where this RTL departs from, or had to interpret, the published structures

- **Structure B is missing.** It is a 16-bit, 4-level, 42-node structure with maximum fanout 3.
  Only its diagram defines it, and the description of how it extends its 8-bit pattern is not
  precise enough to rebuild it.
- **Structure C has six rows, not five.** Its published level count is 5, but its diagram places
  the 25 nodes in six rows: 8, 4, 1, 1, 4 and 7 nodes. The nodes forming 7:0 and then 11:0 are in
  series, so they cannot share a row. The table follows the diagram. The published Brent-Kung
  figures have the same mismatch. With six levels the delay estimate is 12.84 instead of 12.46.
- **Wire length of Structure A and modified A.** The drawn connections sum to 95 columns; the
  published table says 89. The node and fanout counts agree. For every other structure with a
  published value, the wire length matches exactly.
- **(7.44, 286).** One connection is drawn so that it would overlap two groups. It is taken from
  the only column that gives a valid network. The wire length then comes out at 21, where the
  label implies 22.
- **Not built:**
  - (2.2, 10) structure 2, because its diagram is not available;
  - the baseline adders (Kogge-Stone, Ladner-Fischer, Brent-Kung, Han-Carlson, Knowles), which
    serve only as comparisons. Any of them can be built by writing its table.
- **Carry input and carry out.** The carry input enters only in the post-processing stage, as in
  the equations above. Bringing out `cout` is this design's addition.
- **Buffers are wires.** In a delay model, a buffer costs as much as a node. Logically it passes
  the signals unchanged, so no cell is instantiated. If buffers are needed for timing or sizing,
  synthesis can place them.
- **Purely combinational.** There are no registers and no reset. Prefix adders pipeline well,
  but no pipelined version is described, so none is built.

## Files

| file | contents |
|------|----------|
| `rtl/ppa_pkg.sv` | structure tables and the `ppa8_e` enum |
| `rtl/gp_generate.sv`, `rtl/prefix_node.sv`, `rtl/prefix_network.sv`, `rtl/sum_generate.sv` | the three stages |
| `rtl/prefix_adder.sv` | generic adder: `#(N, M, SRC)`. The default is the 16-bit Structure A |
| `rtl/ppa16_*.sv` | the five 16-bit structures as fixed modules |
| `rtl/ppa8_found.sv` | the eighteen 8-bit structures, chosen by `SEL` |
| `rtl/ppa_top.sv` | all of them side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with `$finish`. For example:

    verilator --binary --timing --assert rtl/*.sv tb/tb_ppa_top.sv --top-module tb_ppa_top
    ./obj_dir/Vtb_ppa_top

Verilator resolves the package wherever it sits in the file list. For a tool that needs
packages to come first, put `rtl/ppa_pkg.sv` at the front of the list.

What the testbenches cover:

| testbench | what it checks |
|-----------|----------------|
| `tb_ppa8_found` | all 2^17 operand and carry combinations on all eighteen 8-bit structures, plus each network's node count, depth, fanout, wire length and branch effort against the published labels |
| `tb_ppa16_*`, `tb_prefix_adder` | corner cases (full-width propagate, a carry born at every bit, a carry-in killed at every bit) and 20,000 random additions |
| `tb_ppa_top` | the whole top at its defaults. It counts how often the carry mechanisms occur: full-width propagate, bit-0 generate reaching the carry out, carry-in killed, top-column generate. A mechanism that never occurs counts as a failure |

## Adding a structure

1. Write its M x N table in `ppa_pkg`. List rows from the first level down, with entries running
   from column N-1 to column 0.
2. Instantiate `prefix_adder #(.N(N), .M(M), .SRC(your_table))`.

Elaboration rejects a table that does not form every group `i:0`. To check the shape of the
network, read `NODES`, `LEVELS`, `WIRE_LENGTH`, `MAX_FANOUT` and `BRANCH_EFFORT` from the `u_net`
instance.
