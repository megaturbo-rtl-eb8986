# A pipelined decision-forest classifier for Open vSwitch MegaFlow rules

Open vSwitch keeps a cache of wildcard flow rules, the MegaFlow cache, and
looks every packet up in it. In software that lookup walks one hash table
per distinct wildcard mask and gets slow as the cache grows. This RTL
does the lookup in hardware instead. It is a purely pipelined engine that
classifies **two packet headers per clock cycle** against about 100K rules.
Rules can be inserted and deleted while traffic flows, and no packet is ever
stalled.

The engine relies on one property of MegaFlow rules: **no two rules overlap**.
Any packet matches at most one rule, so no priorities have to be resolved.
Host software exploits this by splitting the rule set into a small *forest*
of binary decision trees. The trees are built HyperSplit-style: each node
splits the rules it holds on one header field at one threshold. A rule that
would have to be copied into both children of a split is not copied. It is
"kicked" out and placed in a later tree instead. So is a rule that does not
fit into a leaf that is already full. As a result every rule lives in exactly
one leaf of exactly one tree. An insert or delete therefore touches only a few
memory words.

The hardware maps each tree onto its own fixed-length pipeline. The headers
are broadcast to all pipelines. Because of the non-overlap property, the
per-tree results can be merged by a plain OR selector.

```
 cmd lane 0 ─┐   ┌──────────────┐  search lane 0/1 (broadcast)
 cmd lane 1 ─┴──►│ command_split├──────────┬──────────┬─── ... ──┬──────────┐
                 │   + update   │ update   ▼          ▼          ▼          ▼
                 │     FIFO     ├──bus──►tree 0    tree 1  ...  tree N-1  guarantee
                 └──────────────┘        pipeline  pipeline     pipeline  pipeline
                                            │          │          │          │
                                            └──────────┴─► result_mux ◄──────┘
                                                              │
                                                    res lane 0 / res lane 1
```

## One tree pipeline

A tree of depth `DEPTH` becomes `DEPTH+1` stages:

| stage | module | storage | work |
|---|---|---|---|
| 0 | `root_stage` | one node in a register | compare, give the level-1 address |
| 1 … DEPTH-1 | `inter_stage` | level *k*: 2^k nodes in a dual-port RAM | read node, compare, give the next address |
| DEPTH | `leaf_stage` | 2^DEPTH leaves × BINTH rules, one RAM per rule slot | read leaf, match all rules at once, give the rule id |

**Node format** (`node_t`): a field identifier, a 32-bit threshold and a
pointer. The node logic picks the field from the header and compares it,
unsigned, with the threshold. If field ≤ threshold the packet goes to the
left child at `pointer`, otherwise to the right child at `pointer + 1`. The
two children of a node are always stored next to each other, so a node needs
only one pointer. A field identifier of 5 or more selects a constant zero,
which always goes left. Such a *pass-through node* carries a branch that has
already reached its leaf down the remaining levels. Every packet therefore
walks all stages, and every packet has the same latency.

**Rule format** (`rule_t`): a valid bit, plus a 32-bit value and a 6-bit
prefix length for each of the five header fields, plus a 17-bit rule id. A
rule matches when it is valid and every field agrees with its value on the
top *len* bits. A length of 0 is a full wildcard; 32 is an exact match. The
header is five 32-bit slots: source IP, destination IP, source port,
destination port and protocol. Ports and protocol sit MSB-aligned in their
slots. The same layout is used for thresholds, so comparisons keep their
order.

**Worked example.** Take ten rules on two 4-bit fields X and Y, with depth 2
and binth 2. The first tree splits on X ≤ 7 at the root, then X ≤ 3 and
X ≤ 11. Its root register holds `{field 0, value 7, ptr 0}`. Its stage-1 RAM
holds `{0, 3, ptr 0}` and `{0, 11, ptr 2}`, and its four leaves hold the
seven rules that split cleanly. Three rules were kicked out: two span the
root's cut and one overflows a leaf. They form a second tree that splits on
Y ≤ 13, then Y ≤ 7 and X ≤ 9. `tb_tree_pipeline` loads exactly these two
trees and checks all 256 packets against a direct scan of the rule table.

**Two lanes per memory.** Every RAM is true dual-port. Port A serves search
lane 0 and port B serves search lane 1. Two packets therefore go through
the same tree in the same cycle, and no memory is duplicated. At the 250 MHz
target clock that gives 500 Mpackets/s.

## Timing

| path | cycles |
|---|---|
| `command_split` register | 1 |
| root stage | 1 |
| each inter stage (RAM read, then compare) | 2 |
| leaf stage (RAM read, then match and select) | 2 |
| `result_mux` register | 1 |
| **command → result** (`top_latency(DEPTH)`) | **2·DEPTH+3 = 25** at DEPTH = 11 |

Each lane takes one search per cycle and returns one result per cycle, in
order, exactly 25 cycles later. Results carry no tag; the fixed latency is
what links a result to its packet.

## Updates without stalls

The host computes how a rule change alters the trees and sends the result
as plain memory writes, one per command:

```
cmd_t = { op: SEARCH | INSERT | DELETE,  hdr,  upd: {tree, stage, addr, slot, del, node, rule} }
```

`stage` selects the level: 0 is the root, 1 … DEPTH-1 are inter stages and
`DEPTH` is the leaf stage. An insert writes `node`, or writes `rule` into
leaf slot `slot`. A delete writes a zero node, or clears that rule slot. The
initial trees are loaded the same way.

1. **`command_split`** sends searches straight on. Inserts and deletes go
   into a FIFO (16 deep) that drives one update bus shared by every stage of
   every pipeline. The FIFO takes one write per cycle. When both lanes carry
   an update, lane 0 goes first and lane 1 sees `cmd_ready` low. When the
   FIFO is full, updates see `cmd_ready` low. Searches are always accepted.
2. **`update_engine`** sits in every stage and claims the commands whose
   tree, stage and address fall inside its own memory. It holds one command
   at a time. Its `ready` output is high for commands it does not claim, so
   the bus simply ANDs the `ready` outputs of all engines.
3. The engine writes through **port B**, and only in a cycle when search
   lane 1 has no packet at that stage. Searches are never blocked. A write
   just waits for an idle port-B cycle. A lane that carries an update
   command leaves an empty search slot in that cycle. That empty slot
   travels down the pipeline alongside its write, which lets the write take
   effect with little delay.

Consequences an integrator must know:

* **If lane 1 is busy every cycle, writes below the root never happen.**
  Writes then pile up in the engines and the FIFO, and `cmd_ready` drops for
  updates. Leave gaps in lane 1, or send updates on lane 1 itself. To get
  the maximum update rate, keep lane 1 idle. The engine then writes one word
  per cycle: 200 writes took 202 cycles in simulation.
* **A write becomes visible when its stage performs it.** The stages of one
  tree may perform their writes in different cycles. A packet in flight may
  therefore see part of a multi-word change. The host should order the
  writes of one change so that every intermediate state is valid, for
  example rules before the nodes that lead to them, or the reverse for
  removal. The hardware does not order them for you.
* Port A may read a word in the same cycle that port B writes it. Port A then
  gets the old word (read-first).

Status outputs: `upd_busy` (a command is on the bus), `upd_wait` (some stage
is holding a write until port B is free) and `upd_fifo_full`.

## The guarantee pipeline

Besides the `NUM_TREES` tree pipelines, there is one more pipeline with tree
index `NUM_TREES`. It starts empty. It is a fallback: a rule that cannot be
placed in any tree, during the initial build or during a later insert, is
placed here. This keeps the classifier correct while the other trees are
full. It is an ordinary `tree_pipeline`. Only its use by the host software
differs.

## Files

| file | role |
|---|---|
| `rtl/megaturbo_pkg.sv` | widths, `node_t`, `rule_t`, `upd_t`, `cmd_t`, `tok_t`, `result_t`, latency functions |
| `rtl/megaturbo_top.sv` | top: split, `NUM_TREES+1` pipelines, selector |
| `rtl/command_split.sv` | search/update separation, update FIFO |
| `rtl/tree_pipeline.sv` | root + inter stages + leaf for one tree |
| `rtl/root_stage.sv` | stage 0, root node in a register |
| `rtl/inter_stage.sv` | one tree level: dual-port node RAM + node logic per lane |
| `rtl/leaf_stage.sv` | leaf RAMs (one per rule slot), match units, one-hot selector |
| `rtl/node_logic.sv` | field select, compare, pointer / pointer+1 |
| `rtl/match_unit.sv` | prefix match of one rule |
| `rtl/update_engine.sv` | claim, hold, and write in an idle port-B cycle |
| `rtl/tdp_ram.sv` | dual-port RAM, 1-cycle read, read-first, zero-initialised |
| `rtl/result_mux.sv` | OR selector over the pipelines, one register |

## Parameters and size

| parameter | default | meaning |
|---|---|---|
| `NUM_TREES` | 8 | tree pipelines; a guarantee pipeline is added |
| `DEPTH` | 11 | internal levels; leaves sit at level 11 |
| `BINTH` | 8 | rules per leaf |
| `UPD_FIFO_DEPTH` | 16 | update FIFO entries |

The package fixes five 32-bit fields, a 16-bit pointer (so DEPTH ≤ 16), a
17-bit rule id and up to 16 pipelines.

At the defaults each pipeline holds 2,047 nodes of 51 bits and
2,048 × 8 = 16,384 rule slots of 208 bits (about 3.4 Mbit). The eight trees
together have 131,072 rule slots, and the guarantee pipeline has 16,384
more. That is room for a 100K-rule cache, provided the tree builder fills
the leaves to about 76 %.

All nine pipelines together store about 31.6 Mbit (9 × (2,047 × 51 +
16,384 × 208) bits), about 860 block RAMs of 36 Kbit if each memory maps
perfectly. The published implementation reports 630 block RAMs for the
same depth, binth and tree count, so its node and rule formats must be
narrower than the five full 32-bit fields with 6-bit lengths used here.
Narrowing `FIELD_W` or the per-field lengths in the package is the place
to recover that.

## Simulating

Every testbench checks itself and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/megaturbo_pkg.sv tb/tb_tree_pipeline.sv \
          --top-module tb_tree_pipeline -Mdir obj -o sim && obj/sim
```

Replace `tb_tree_pipeline` with any testbench in `tb/`.
`tb_megaturbo_top` and `tb_workload_100k` run the full default configuration. Building each takes a
few minutes; running takes under a second for the first and about 2 s for the second.

| testbench | what it shows |
|---|---|
| `tb_megaturbo_top` | full size. Loads random trees and about 400 rules through both lanes, and computes every expected result by walking its own model of the memories. Phases: two searches per cycle with fixed latency; searches mixed with inserts and deletes; an update burst against a busy lane 1 until the FIFO fills; a re-check of inserted and deleted rules; the update rate. It counts and requires: dual-lane cycles, lane-1 update held back, writes waiting for a gap, FIFO full, guarantee-pipeline hits, hits in several trees, pass-through nodes, both branch directions, deleted rules missing. |
| `tb_workload_100k` | full size, 100,000 rules. Every pipeline gets a complete depth-11 tree that halves the source-IP range at each level; each rule has an exact source IP and random prefixes on the other four fields, at most 49 rules per leaf spread over the eight trees. Results are checked against a hash of the rules, not against the trees. Measured: 2.00 packets per cycle over 20,000 cycles, fixed latency, and 2,000 rule replacements (4,000 writes) in 4,002 cycles with lane 1 idle. |
| `tb_tree_pipeline` | the two-tree worked example, all 256 packets on both lanes, then delete and re-insert during traffic |
| `tb_leaf_stage`, `tb_inter_stage`, `tb_root_stage` | one stage each: results, 2- or 1-cycle latency, writes deferred while lane 1 is busy |
| `tb_update_engine`, `tb_command_split`, `tb_result_mux`, `tb_node_logic`, `tb_match_unit`, `tb_tdp_ram` | unit rules of each block |

## Design choices beyond the source design

The overall structure comes from the published design:

* one pipeline per tree plus a guarantee pipeline;
* a root register, then one RAM stage per level and a leaf stage;
* two search lanes on the two ports of each RAM;
* a node holding a field, a value and a pointer, with children at pointer
  and pointer+1;
* leaves of several rules, each with a valid bit and a value and prefix
  length per field, matched in parallel;
* an update engine per stage that writes in idle port cycles;
* a plain selector instead of priority logic.

These are choices made here, where the source is silent:

* five 32-bit header fields, MSB-aligned, and a 17-bit rule id as the result
  (the action is looked up elsewhere);
* the pass-through encoding (field identifier ≥ 5);
* the internal node picks one field with a multiplexer and then compares it.
  The published inter module compares all fields against the threshold in
  parallel and selects the result afterwards. Both give the same next
  address;
* the command format, the 16-deep update FIFO, lane-0-first arbitration, and
  the one-entry buffer per update engine;
* the leaf memory split into one RAM per rule slot, so that one write
  changes one rule;
* the cycle split and the resulting 25-cycle latency;
* synchronous active-low reset of valid bits and buffers; the memories start
  at zero instead of being reset;
* the two selectors assume at most one hit. An assertion flags a violation;
  in hardware the ids would be ORed together.

Not included: the software that builds the trees and computes the update
writes, Open vSwitch itself, and the NIC or host interface that carries
commands and results. Timing closure at 250 MHz has not been checked on an
FPGA; only simulation and lint have been run.
