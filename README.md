# Hybrid Han-Carlson / Knowles prefix-adder multiplier

An N x N unsigned multiplier (N = 8 by default) in which every addition is done by
a parallel prefix adder, and two prefix families share the work:

* **Han-Carlson** (HC) networks, which are sparse (only every second bit enters the
  prefix tree), have few nodes and short wires, and are used where the carry
  computation starts: on the first reduction level and in the first prefix levels
  of the final adder;
* **Knowles** networks, which are dense trees with a chosen fan-out per level, and
  are used deeper down: on the later reduction levels and in the deepest prefix
  level of the final adder.

The aim is a short critical path through the final carry-propagate adder. That
stage is usually what limits a multiplier. The design also keeps the wiring and
node count below that of a pure Kogge-Stone design.

```
            +-------------------+   +--------------+   +--------------------+   +-----------------+   +-----------------+
 a, b  ---> | input_register_   |-->| pp_generator |-->| pp_reduction_tree  |-->| hybrid_adder    |-->| output_register |--> product
 start ---> | bank              |   | N x N ANDs   |   | N rows -> 2 rows   |   | 2N-bit final    |   |                 |
            +-------------------+   +--------------+   | HC adders level 1, |   | HC skeleton,    |   +-----------------+
                  ^ load_in                            | Knowles deeper     |   | Knowles inside  |         ^ load_out
                  |                                    +--------------------+   +-----------------+         |
            +-------------------------------------------- control_unit -------------------------------------+--> done, busy
```

`hybrid_mul_core` is the combinational part (AND array, reduction tree, final
adder): 8 + 8 inputs and 16 outputs, no clock. `hybrid_mul_top` puts it between
the two register stages and adds the control unit.

## Prefix addition in one paragraph

Each bit i forms a generate `g_i = a_i & b_i` and a propagate `p_i = a_i ^ b_i`
(`mul_pkg::gp_t`). A prefix node merges two spans of bits with the operator

```
(G, P)[i:k] = ( G[i:j] | P[i:j] & G[j-1:k],  P[i:j] & P[j-1:k] )      (mul_pkg::gp_combine)
```

Once bit i holds `G[i:0]`, the carry into bit i+1 is known, and `sum_i = p_i ^ c_i`.
The operator is associative and also *idempotent*. Two spans that overlap, for
example `[7:4]` and `[5:0]`, still merge to the correct `[7:0]`. The Knowles
networks below depend on this. In every adder here the carry in is folded into
`g_0`, so `c_0 = cin` and `cout = G[WIDTH-1:0]`.

## Han-Carlson adder (`hc_adder`)

There are three stages:

1. **Sparse first row.** Each odd bit 2m+1 merges with the even bit below it,
   giving `[2m+1 : 2m]`. Only these WIDTH/2 odd nodes go on.
2. **Tree on the odd nodes.** A Kogge-Stone tree runs over the WIDTH/2 odd nodes.
   On level l, node m merges with node m - 2^(l-1), so the fan-out is 1. After
   log2(WIDTH/2) levels every odd bit holds `[2m+1 : 0]`.
3. **Last row.** Each even bit 2m merges its own (g, p) with the finished prefix of
   bit 2m-1.

Depth: log2(WIDTH) + 1 prefix levels. No node drives more than two others. For
WIDTH = 16 the adder has 32 prefix nodes, against 49 for Kogge-Stone.

## Knowles adder (`knowles_adder`) and the fan-out list

This section is the least obvious part of the design.

A Knowles network has the depth of Kogge-Stone, log2(WIDTH) levels. Every node
i >= 2^(l-1) works on every level l. What changes is which node it reads. With
s = 2^(l-1) and f the fan-out of level l, node i reads the node

```
j = floor((i - s) / f) * f + (f - 1)                                    (mul_pkg::knowles_src)
```

* With f = 1 this gives j = i - s, which is Kogge-Stone.
* With f > 1, f neighbouring nodes read the same source node. Their spans then
  overlap, which the idempotent operator allows. The source node drives f long
  wires instead of f different source nodes driving one each. That gives fewer
  distinct long wires, at the price of higher fan-out on those few nodes.

The `fanout_t` parameter lists the fan-outs in Knowles' own notation, **last
level first**: element `[0]` is the fan-out of the last level. Some examples for
16 bits:

| list        | network                                         |
|-------------|-------------------------------------------------|
| `[1,1,1,1]` | Kogge-Stone (`mul_pkg::FANOUT_ALL_ONE`)         |
| `[2,1,1,1]` | classic Knowles; the default (`mul_pkg::KNOWLES_2_1_1`) |
| `[4,1,1,1]` | fan-out 4 on the last level                      |
| `[8,4,2,1]` | Sklansky                                         |

The default 8-bit `[2,1,1]` network has these sources:

| level | span | fan-out | sources (node <- source)                                  |
|-------|------|---------|-----------------------------------------------------------|
| 1     | 1    | 1       | 1<-0, 2<-1, 3<-2, 4<-3, 5<-4, 6<-5, 7<-6                   |
| 2     | 2    | 1       | 2<-0, 3<-1, 4<-2, 5<-3, 6<-4, 7<-5                         |
| 3     | 4    | 2       | 4<-1, 5<-1, 6<-3, 7<-3                                     |

On level 3, node 4 holds `[4:1]` and node 1 holds `[1:0]`, so they merge to
`[4:0]`. Node 5 holds `[5:2]` and merges with `[1:0]`.

Not every list is legal. The fan-out of a level may not exceed its span, and the
spans must still reach bit 0 at the end. `mul_pkg::knowles_valid()` replays the
network at elaboration time. Each adder calls `$error` if its list fails, so a
bad parameter cannot build a wrong adder without warning.

## Hybrid final adder (`hybrid_adder`)

The final carry-propagate adder keeps the Han-Carlson outline: the sparse first
row and the last row. Those rows halve the number of nodes in the tree. The tree
over the WIDTH/2 odd nodes is a Knowles network with list `FANOUT`. With the
default `[2,1,1]` (16-bit adder, 8 odd nodes):

* inner levels 1 and 2 have fan-out 1, so they are exactly the Han-Carlson
  levels;
* inner level 3, the deepest, uses Knowles sharing: odd nodes 4 and 5 both read
  node 1, and nodes 6 and 7 both read node 3.

Depth: 1 + 3 + 1 = 5 prefix levels (log2(16) + 1), with 32 prefix nodes. Setting
`FANOUT = FANOUT_ALL_ONE` turns the block into a plain Han-Carlson adder, which
gives a reference point with the same structure.

## Partial products and the reduction tree

`pp_generator` is a plain N x N AND array, `pp[r][c] = a[c] & b[r]`. There is no
Booth recoding, so the operands are unsigned.

`pp_reduction_tree` does not use carry-save compressors (Wallace/Dadda). It shifts
row r left by r, zero-extends it to 2N bits, and adds the rows in pairs with
2N-bit prefix adders until two rows remain:

| level | adders (N = 8) | type                                     |
|-------|----------------|------------------------------------------|
| 1     | 4              | `hc_adder` (levels 1 .. `HCA_LEVELS`)    |
| 2     | 2              | `knowles_adder`, list `KA_FANOUT`        |
| final | 1              | `hybrid_adder` (in `hybrid_mul_core`)    |

Every partial sum is bounded by the full product, so no adder can carry out of
bit 2N-1. Assertions in `pp_reduction_tree` and `hybrid_mul_core` check this in
simulation. N must be a power of two and at least 4. For N = 16, set
`HCA_LEVELS = 2` to keep HC on the first two of the three tree levels.

The critical path is one AND, then log2(N) - 1 tree adders, then the final
adder. For N = 8 that is one AND and three prefix adders of 5, 4 and 5 prefix
levels.

## Registers, control and timing

`input_register_bank` and `output_register` are registers with a load enable, an
asynchronous active-low reset, and a reset value of zero. `control_unit` keeps
one valid bit per register stage:

| clock edge | what happens                                         | strobes             |
|------------|------------------------------------------------------|---------------------|
| E0         | `start` = 1 is sampled; a, b go into the input registers | `load_in` = `start` |
| E0 .. E1   | AND array, reduction tree and final adder settle (one cycle) | `busy` = 1, `load_out` = 1 |
| E1         | the product goes into the output register            |                     |
| after E1   | `product` is valid; `done` = 1 for one cycle         | `done`              |

* Latency is 2 clock edges from the sampling of `start` to a valid `product`.
* Throughput is one operation per cycle, because `start` may be high on
  consecutive cycles.
* Between results, `product` holds its value.
* The registers load only when they hold a new operation, so the datapath does
  not switch on idle cycles.
* A concurrent assertion in `control_unit` checks that every `done` follows a
  `start` two cycles earlier.

The whole multiplier is one combinational stage between the two registers. The
clock period must cover it. No pipeline registers are placed inside the
datapath.

## Parameters

| module            | parameter    | default   | meaning                                          |
|-------------------|--------------|-----------|--------------------------------------------------|
| `hybrid_mul_top`, `hybrid_mul_core` | `N` | 8 | operand width (power of two, >= 4)       |
|                   | `HCA_LEVELS` | 1         | reduction levels built from Han-Carlson adders   |
|                   | `KA_FANOUT`  | `[2,1,1,...]` | Knowles list of the deeper reduction adders  |
|                   | `CPA_FANOUT` | `[2,1,1,...]` | Knowles list inside the final hybrid adder   |
| `hc_adder`        | `WIDTH`      | 8         | even                                             |
| `knowles_adder`   | `WIDTH`, `FANOUT` | 8, `[2,1,1]` |                                         |
| `hybrid_adder`    | `WIDTH`, `FANOUT` | 16, `[2,1,1]` | `FANOUT` applies to the WIDTH/2-node inner tree |

`fanout_t` is a packed `[8][8]` array, so networks of up to 256 nodes can be
built. The 8-bit size and the block structure (operand registers, AND partial
products, HC-then-Knowles reduction, hybrid final adder, result register, control
unit) come from the original design description. The items below are choices
made here, because that description does not fix them:

* the fan-out lists;
* how many levels count as "early" (`HCA_LEVELS`);
* building the reduction from two-input prefix adders at 2N bits;
* the way HC and Knowles are joined inside the final adder;
* carry-in ports;
* the reset style;
* the start/done handshake.

## Departures and limits

* **Timing, area and power.** The original work compares delay, power and area
  with an earlier hybrid multiplier on an FPGA. That comparison is not repeated
  here, and this RTL has not been timed. Only its function has been verified.
* **Reduction by prefix adders.** The original text does not say whether the
  reduction layer adds rows with full prefix adders or only uses prefix logic
  inside a compressor tree. This design adds rows pairwise with full adders, which
  is the simplest reading that uses HC early and Knowles deeper. A carry-save
  (Wallace/Dadda) tree in front of the hybrid final adder would be smaller and
  faster.
* **Registered vs combinational.** The published synthesis result has 32 I/O
  pins (a, b, product) and no clock. `hybrid_mul_core` matches that. The
  registered `hybrid_mul_top` follows the description of the operand and result
  registers and the control unit.
* **Knowles drawing.** The drawing that comes with the Knowles adder shows a
  sparse first row (spans 7:6, 5:4, 3:2, 1:0), which is not a standard Knowles
  network. `knowles_adder` builds the textbook dense Knowles family instead.
  Sparse first rows appear in this design only in `hc_adder` and
  `hybrid_adder`.
* **Unsigned only.** There is no signed (two's-complement) mode.
* **Gate-level optimisations not modelled.** The partial product layer is
  described as optimised ("minimised gates, balanced distribution"). It is
  modelled as a plain AND array, and synthesis does the rest.

## Verification

Each module has a self-checking testbench in `tb/`. Each one:

* compares the module with reference values computed with `+` and `*`;
* prints `TB_RESULT checks=<n> failures=<n>`;
* has a watchdog that ends the run with a failure if it hangs.

| testbench                | what it covers                                              |
|--------------------------|-------------------------------------------------------------|
| `tb_hc_adder`            | 8-bit exhaustive (a, b, cin); 16- and 32-bit random and carry chains |
| `tb_knowles_adder`       | 8-bit `[2,1,1]` exhaustive; 16-bit `[2,1,1,1]`, `[4,1,1,1]`, Sklansky, Kogge-Stone |
| `tb_hybrid_adder`        | 8-bit exhaustive; 16-bit default on shifted and random operands; 32-bit all-ones list |
| `tb_pp_generator`        | every matrix bit for all 65536 operand pairs                 |
| `tb_pp_reduction_tree`   | all 8x8 product matrices, random matrices, a 16-row tree     |
| `tb_hybrid_mul_core`     | all 65536 8x8 products; random 16x16                         |
| `tb_input_register_bank`, `tb_output_register` | load, hold, reset against a model      |
| `tb_control_unit`        | strobes and 2-cycle latency under bursts and random starts   |
| `tb_hybrid_mul_top`      | end to end at default parameters (see below)                |

`tb_hybrid_mul_top` runs the full design at its defaults:

* it issues all 65536 operand pairs in a scrambled order, with back-to-back starts
  and idle gaps, and changes a and b on idle cycles;
* it checks each product and the 2-cycle latency with a scoreboard;
* it checks that `product` holds between results;
* it applies one reset in the middle of the run.

It also counts, and requires at least one of, each of the following: operand
loads, back-to-back operations, idle holds, products with the top bit set, and
the mid-run reset. It takes well under a second.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/mul_pkg.sv tb/tb_hybrid_mul_top.sv \
          --top-module tb_hybrid_mul_top -Mdir obj_top
./obj_top/Vtb_hybrid_mul_top
```

Replace the testbench name to run any other one. `-Irtl` lets Verilator find the
modules by file name. For lint, use
`verilator --lint-only -Wall -Irtl rtl/mul_pkg.sv rtl/hybrid_mul_top.sv`. The
remaining lint warnings are:

* unused package constants;
* `rst_n` flagged as both an asynchronous reset and a synchronous signal. This
  comes from the `disable iff` clause of the control-unit assertion.

## Files

* `rtl/mul_pkg.sv`: `gp_t`, `gp_combine`, `fanout_t`, the Knowles source rule and
  validity check
* `rtl/hc_adder.sv`, `rtl/knowles_adder.sv`, `rtl/hybrid_adder.sv`: the three
  prefix adders
* `rtl/pp_generator.sv`, `rtl/pp_reduction_tree.sv`, `rtl/hybrid_mul_core.sv`: the
  datapath
* `rtl/input_register_bank.sv`, `rtl/output_register.sv`, `rtl/control_unit.sv`,
  `rtl/hybrid_mul_top.sv`: the clocked wrapper
* `tb/tb_*.sv`: one testbench per module
