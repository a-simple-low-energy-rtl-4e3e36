# Multi-block instruction queue with block-mapped wakeup

In an out-of-order core, every result tag that comes back from the functional
units is normally compared against every source tag waiting in the instruction
queue. Almost all of those comparisons miss, yet each one precharges and
discharges a CAM match line. This design cuts most of them out.

The queue is split into `NBLK` blocks whose CAM comparators are off by default.
A small table, the **block mapping table (BT)**, remembers for every physical
register which blocks hold instructions that are still waiting for it. When an
instruction completes, its destination tag reads one BT row, the **block enable
vector (BE)**, and only the blocks named there compare the tag. Inside an
enabled block only *active* operands compare: the entry must be occupied and
the operand must still be not ready. No prediction and no monitoring are
involved. The queue wakes up exactly the same instructions in the same cycle as
a conventional queue, so performance is unchanged; only the comparisons are
fewer.

The RTL implements the mechanism as described in M. A. Ramírez, A. Cristal,
A. V. Veidenbaum, L. Villa and M. Valero, *A Simple Low-Energy Instruction
Wakeup Mechanism*. The main configuration there is also the default here: a 32-entry queue in 8 blocks,
128 physical registers (7-bit tags), and 4 instructions dispatched, woken and
issued per cycle. Separate integer and floating-point queues sit side by side,
each with its own BT.

## The block mapping table

The BT is a `128 x NBLK` bit array, one row per physical register. Three kinds
of access happen to it.

| when | access | effect |
|---|---|---|
| an instruction with destination `Ri` is dispatched | **BE allocation** | row `BT[i]` is cleared |
| an instruction with a not-ready source `Rs` is placed in block `j` | **BE entry modification** | bit `j` of `BT[s]` is set |
| an instruction with destination `Rd` completes | **wakeup read** | `BT[d]` gates the comparators of each block |

Clearing at allocation is always safe. A physical register is reallocated only
after every reader of its previous value has left the queue, so no waiting
instruction can still need the old row.

Example: register 4 is read by one instruction in block 0 and one in block 2,
so `BT[4] = 0000_0101`. When the producer of register 4 completes, only
blocks 0 and 2 compare its tag. The other six blocks do nothing.

The BT has 4 read ports (one per completing instruction) and 8 set ports
(two sources for each of 4 dispatched instructions). It also has 4 row-clear
ports for BE allocation. It is a flip-flop array (`block_table.sv`), because an
SRAM macro with that many ports is not a realistic target.

### Same-cycle cases

These cases are the hardest to get right. Each is handled explicitly.

* **The producer and the consumer are in the same dispatch group.** Both the clear of
  `BT[r]` (from the producer) and a set in `BT[r]` (from the consumer) arrive
  in one cycle. The set wins.
* **A source tag is broadcast in the consumer's dispatch cycle.** The BT read
  for that broadcast happens before the consumer's BT bit is written. The CAM
  comparison also happens before the entry exists. Without help, the wakeup
  would be lost. The queue therefore compares each dispatched source tag
  against the tags broadcast in the same cycle. A match is written as
  already ready, and the BT bit is not set (the *dispatch bypass*).
* **A BT read and a BT write hit the same row in one cycle.** The read returns
  the contents before the write. The dispatch bypass covers the only case where
  this matters.

### Branch mispredictions

`flush_valid` deletes every queue entry that is younger than the mispredicted
branch. Each entry stores its 8-bit ROB index (256-entry ROB). Age is
measured from `rob_head`, so an entry is deleted when
`(entry.rob - rob_head) mod 256 > (flush_rob - rob_head) mod 256`.

The BT is deliberately left alone. Bits set by squashed instructions stay behind
until their registers are reallocated. They can enable a block that holds no
real consumer, which costs energy but never affects correctness. The
testbenches count such "block activated without a match" events.

## One cycle in the queue

All of the following happens in one clock cycle. Results are visible from the
next cycle.

1. **Dispatch** (`block_assign`). A rotating pointer names the next block.
   Each offered instruction goes, in program order, to the first block from the
   pointer onward that still has a free entry, and takes the lowest free entry
   there. The pointer then moves past the last block used. Dispatch stops at the
   first instruction that finds no room, and `disp_accept` is always an in-order
   prefix. The instruction is written with its ready flags, and the BT is
   updated as above.
2. **Wakeup** (`block_table`, `iq_block`, `iq_entry`). Each valid `wb_tag[w]`
   reads `BT[wb_tag[w]]`. Bit `b` of that row enables the comparators of block `b`
   for broadcast `w`. Every entry has `2 x WB_W` = 8 comparators. A match sets
   the operand's ready flag at the clock edge.
3. **Select** (`select_logic`). An age matrix records which entry was dispatched
   first. The up to `ISS_W` oldest ready entries are granted and removed.
   Issue port 0 carries the oldest.
4. **Squash** if `flush_valid` is high. No dispatch and no issue take place in
   that cycle.

Latency: a consumer whose last operand is broadcast in cycle *t* can issue in
cycle *t+1*. With the default `BT_PIPE = 0`, the BT read lies in the same cycle
as the comparison. See below for `BT_PIPE = 1`.

## Modules

| file | role |
|---|---|
| `rtl/iq_pkg.sv` | tag, opcode and ROB widths; `disp_instr_t`, `iq_data_t`, `issue_instr_t` |
| `rtl/iq_entry.sv` | one entry. RAM part: opcode, destination tag, ROB index, busy. CAM part: 2 source tags, Op1Rdy/Op2Rdy, 8 gated comparators |
| `rtl/iq_block.sv` | `EPB = IQS/NBLK` entries sharing one block enable per broadcast |
| `rtl/block_table.sv` | the BT |
| `rtl/block_assign.sv` | round-robin block and entry choice |
| `rtl/select_logic.sv` | oldest-ready-first select with an age matrix |
| `rtl/wakeup_stats.sv` | saturating totals of comparisons, matches ("necessary"), non-matches ("unnecessary"), block activations and broadcasts |
| `rtl/multiblock_iq.sv` | one complete queue: all of the above, plus dispatch bypass, squash and per-cycle counts |
| `rtl/wakeup_top.sv` | integer queue (`int_*` ports) and f.p. queue (`fp_*` ports); the squash inputs are shared |

### Parameters (`multiblock_iq`, `wakeup_top`)

| parameter | default | meaning |
|---|---|---|
| `IQS` | 32 | queue entries; must be a multiple of `NBLK` |
| `NBLK` | 8 | blocks. 1 gives a single-CAM queue with the BT still filtering broadcasts. `IQS` gives one entry per block |
| `DISP_W` | 4 | instructions dispatched per cycle |
| `WB_W` | 4 | result tags broadcast per cycle |
| `ISS_W` | 4 | instructions issued per cycle |
| `BT_PIPE` | 0 | 1 = result tags arrive one cycle before the CAM search; the BT is read early and the BE latched |

Tag width (7 bits, 128 registers), opcode width (8 bits) and ROB index width
(8 bits) are set in `iq_pkg`.

### Interface of `multiblock_iq`

* `disp_valid[DISP_W]`, `disp_instr[DISP_W]`. Each instruction carries an opcode,
  `dst_valid`/`dst`, `src_valid[2]`/`src[2]`, `src_rdy[2]` (the operand is
  already available in the register file) and `rob`. The outputs
  `disp_accept`, `disp_blk` and `disp_ent` are combinational in the same cycle.
* `wb_valid[WB_W]`, `wb_tag[WB_W]`: destination tags of completing
  instructions. An instruction without a destination simply does not
  broadcast, and no block is enabled for it.
* `iss_valid[ISS_W]`, `iss_instr[ISS_W]`: opcode, destination and ROB index of
  the issued instructions. These are combinational.
* `flush_valid`, `flush_rob`, `rob_head`: squash, as described above.
* `cyc_cmp`, `cyc_match`, `cyc_blk_act`, `cyc_bcast`, `occupancy`: this cycle's
  activity. `total_*` are running totals, and `stats_clr` zeroes them.

The queue checks three rules with assertions:

* dispatch never writes a busy entry;
* an entry is never written and freed in the same cycle;
* the accepted instructions form an in-order prefix.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_iq_entry` | gated comparison counts, one-cycle wakeup, no comparison when the block is disabled or the operand is ready |
| `tb_iq_block` | per-block comparison and match totals against a model of every entry under random traffic |
| `tb_block_table` | random clears, sets and reads against a reference table; the register-4 example; the set-wins rule |
| `tb_block_assign` | the round-robin order, skipping of full blocks, in-order acceptance, acceptance count = min(offered, free) |
| `tb_select_logic` | the granted entries are exactly the `ISS_W` oldest requesters, with the k-th oldest on port k |
| `tb_wakeup_stats` | the totals, No-Match = comparisons − matches, clear, saturation |
| `tb_multiblock_iq` | the whole queue under a random dependent instruction stream with mispredictions, with `BT_PIPE` = 0 and 1 |
| `tb_wakeup_top` | both queues at the default parameters with one shared ROB numbering |
| `tb_iq_configs` | 32-entry queues with 1/2/4/8/16/32 blocks and 64-entry queues with 1/4/8/64 blocks |

The last three tests use `tb/iq_core_model.sv`, a behavioural model of the
core around the queues. It generates instructions with real dependences,
renames onto a free list, executes with 1–3 cycle latency, limits broadcasts to
`WB_W` per cycle and mispredicts branches at random. It also keeps its own copy
of the queue contents and of the BT. Every cycle it checks:

* the comparison and match counts;
* that no wakeup is lost;
* that the issued instructions are the oldest ready ones;
* that dispatch acceptance is correct.

It fails the test if any of these mechanisms never occurred:

* a dispatch stall;
* the dispatch bypass;
* more ready instructions than issue slots;
* a squash;
* a broadcast with blocks gated off;
* an unneeded block activation;
* an instruction without a destination, or without sources;
* with `BT_PIPE = 1`, a BT bit merged into a latched BE.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/iq_pkg.sv rtl/*.sv \
    tb/iq_core_model.sv tb/tb_wakeup_top.sv --top-module tb_wakeup_top -o sim
./obj_dir/sim
```

For the unit tests, replace the last files with the testbench of interest. The
full default-size test, `tb_wakeup_top`, takes about 3000 cycles plus drain
and finishes in well under a second of simulation time.

### Results

The comparison counts are for a synthetic instruction stream: random dependences
on the last 12 results, about 10 % of instructions without a destination, and
a misprediction every ~150 cycles. Compare them with each other, not with
published benchmark numbers. Per issued instruction, `tb_iq_configs` reports:

| queue | 1 block | 4 blocks | 8 blocks | one entry per block | all active entries, no BT |
|---|---|---|---|---|---|
| 32 entries | 20.8 | 8.2 | 4.7 | 1.4 | 29.4 |
| 64 entries | 41.4 | 17.1 | 9.3 | 1.5 | ~59 |

Matching ("necessary") comparisons stay at about 1.2 per instruction in every
configuration. Two trends from the published evaluation appear here as well:

* more blocks give fewer comparisons;
* even a single block beats comparing all active entries, because
  broadcasts nobody waits for are filtered out entirely.

Because the stream is synthetic, the absolute numbers are higher than those
reported for SPEC2000: the queue here is kept full and most operands wait.

## Limits and departures

* **Pipelined BT read (`BT_PIPE = 1`).** The original description allows the BT
  to be read one cycle ahead of the CAM, with the BE latched, for use when the BT
  access cannot share a cycle with the comparison. Setting `BT_PIPE = 1` builds
  that form. The result tags must then be presented one cycle before the cycle
  in which the CAM should search them. The BE read in that early cycle is
  latched. BT bits set by dispatches in the same early cycle are merged into
  the latched BE, since their writes land after the read. Without that merge, a
  consumer dispatched in that cycle would never wake up. Both forms are tested
  in `tb_multiblock_iq`. The default is the unpipelined form.
* **One entry per block still uses comparators.** With `NBLK = IQS`, a BE bit
  already names the waiting entry, so in principle the CAM could be dropped.
  This RTL keeps the comparators in that configuration. It is offered only as a
  parameter setting for studying the trend.
* **The load/store queue, the rename logic, the ROB and the functional units are
  not included.** In the original evaluation the load/store queue is unchanged and
  compares every entry. The core around the queues exists only as the
  testbench model.
* **No energy figures.** The precharge gating of the CAM is modelled as a logic
  enable of each comparator. Energy estimates need RAM and CAM energy models;
  the comparison and activation counters provide the activity they would be
  multiplied by.
* **This design's own choices:**
  * the dispatch bypass;
  * the set-wins rule in the BT;
  * skipping full blocks during round-robin assignment;
  * the age-matrix select;
  * the ROB-index squash interface;
  * the counter ports;
  * the 8-bit opcode field;
  * asynchronous active-low reset, which clears the busy bits, the BT, the
    pointer, the age matrix and the counters.
