# D-KIP back-end: a decoupled kilo-instruction processor in SystemVerilog

A processor hides memory latency by keeping many instructions in flight. To hide
a 400-cycle memory it needs a window of about a thousand instructions. Scaling a
normal out-of-order core's ROB, issue queues and register file to that size is
far too expensive. This design uses a different fact: an instruction's wait time
between decode and issue tends to fall into clear groups. Most instructions issue
within a few cycles. The others wait for one L2 miss, or two, and then issue
together. This is called *execution locality*.

The **decoupled kilo-instruction processor** (D-KIP) exploits it with two cores:

* The **cache processor (CP)** is a small, fast out-of-order core whose
  structures are sized for cache hits only (a 92-entry ROB).
* The **memory processor (MP)** is a simple, wide back-end. It handles the
  instructions that depend on an L2 miss. They wait, in program order, in a
  1024-entry **long-latency instruction buffer (LLIB)** until the miss returns.

An instruction at the CP's ROB head that has executed is simply dropped. An
instruction that depends on a miss moves to the LLIB. No instruction ever blocks
the small ROB for the length of a memory access, so the pair behaves like one
processor with a window of more than a thousand instructions.

This repository holds the RTL of the D-KIP back-end: the CP reorder buffer and
the whole memory processor, wired together in `dkip_top`. The CP front end and
execution core, the load/store processor, the caches and the checkpoint recovery
are not included. They connect through ports (see "What is outside").

The structure, sizes and rates come from the published D-KIP design ("Exploiting
Execution Locality with a Decoupled Kilo-Instruction Processor", Pericàs,
Cristal, González, Jiménez, Valero). That publication describes the machine at
the level of a block diagram and a table of sizes. Every detail below that level
in this RTL is this design's own choice. Each such choice is pointed out below
and in the opening comment of each file.

## How an instruction travels

```
  CP front end (outside)                      load/store processor (outside)
        | dispatch, executed / long-latency marks,     ^ xfer_*      | ldret_*
        v flush                                         |             v
   +---------+  long-latency, in order   +------+  in order, <=4/cycle  +-------------+
   | cp_rob  |-------------------------->| llib |---------------------->| future_file |
   | 92 ent. |  READY value (CP RF read) +------+  stops at an          +-------------+
   +---------+------------------+        | mprf |  unreturned load            |
        | executed: dropped     +------->| 1024 |------- READY operand ------+|
                                         +------+                            vv
                                          IRS0*  IRS1   FPRS0*  FPRS1   (mp_rs, 32 entries each)
                                           |      |      |       |
                                          FU     FU     FU      FU     (mp_fu; * = has multiplier)
                                           +------+------+-------+---> 4 result buses (wb)
```

1. **Dispatch.** The CP puts up to 4 instructions per cycle into `cp_rob`. Later
   it marks each one either *executed* (`cmp_*`) or *long-latency* (`ll_*`). An
   instruction is long-latency when it is a load that missed in L2, or when it
   reads a register whose newest producer is long-latency.
2. **ROB head.** Up to 4 instructions per cycle are examined in order. An
   executed instruction is discarded. A long-latency instruction is handed to the
   MP. Its operation and logical register numbers go into the next LLIB slot.
   The value of its READY source, read from the CP register file through
   `rf_raddr`/`rf_rdata`, goes into the MPRF slot with the same index. An
   instruction that is neither stops the head.
3. **Waiting.** The LLIB is a plain FIFO. A load that missed takes one slot as a
   *marker* (`OP_LDRET`). The load/store processor later returns the data by slot
   number (`ldret_*`). The data goes into the marker's MPRF slot and marks it done.
4. **Extraction.** Each cycle, up to 4 instructions leave the LLIB head in
   program order. Extraction stops at a marker whose data has not returned, or at
   an instruction that finds no free reservation-station entry.
5. **Renaming in the future file.** The leaving instructions look up their NOT
   READY sources in the future file. The lookup gives either a value or the tag
   of the station entry that will produce it. The READY source comes from the
   MPRF. Each instruction then writes its own tag into its destination entry. A
   marker instead writes the returned value.
6. **Execution.** Four reservation stations wake their operands by comparing
   tags on the four result buses. Each station issues one instruction per cycle
   to its unit. The result is on the unit's bus one cycle later. The bus fills
   the future file and wakes waiting operands.

## The LLIB and the load markers

In the published design, the LLIB drains strictly in order. When the oldest
outstanding miss returns, the instructions behind it drain up to the next load
that has not finished. Strict order is what makes the MP simple:

* A single future file, updated at extraction, always holds the correct producer
  of every logical register. This is because extraction sees instructions in
  program order.
* No register is shared between LLIB entries. The MPRF is therefore indexed by
  LLIB slot, and a register is freed when its slot is extracted. There is no free
  list and no reference counting.

The published text keeps the missing load itself in the load/store processor,
not in the LLIB. It also speaks of the next unfinished load "in the LLIB". This
design does both. The load stays in the load/store processor, and a one-slot
marker carrying only its destination register sits in the LLIB. The marker gives
extraction a place to stop. It also makes the returned value enter the future
file in program order, at the right point between older and younger writers of
the same register.

`llib.sv` shows the rule in one line: `hd_valid[k]` is set while every entry from
the head through slot k is present and *done*. A compute entry is done from
insertion on. A marker is done once its data has returned.

## Register management

A source register of a long-latency instruction is in one of two states:

* **READY**: the CP has its value. At most one source can be READY, or the
  instruction would not have been long-latency. That value is copied into the
  MPRF when the instruction leaves the ROB. Two LLIB instructions that read the
  same READY register each get their own copy.
* **NOT READY**: its producer is itself in the MP. Only the logical register
  number travels in the LLIB. The future file resolves it at extraction.

The **MPRF** (`mprf.sv`) has 1024 registers, as many as the LLIB has slots. It is
split into 4 banks on the low index bits, so the 4 consecutive slots written or
read in one cycle always fall in different banks. Each bank has one read port and
one write port for the instruction stream. It also has a second write port for
returning load data. That port is this design's addition: the published design
mentions one read/write port per bank.

The **future file** (`future_file.sv`) has one entry per logical register (32
integer + 32 floating-point, as in the Alpha ISA). Each entry holds a value or a
producer tag. A group of up to 4 instructions is handled in one cycle, as if in
sequence:

* A source written by an older instruction of the same group takes that
  instruction's tag, or the value if the writer is a marker.
* A result bus that carries a waited-for tag in the same cycle is forwarded into
  the lookup.

The future file therefore hands out only current information. Stations never
compare tags at allocation time.

## Reservation stations, units and tags

The memory processor has two integer stations (IRS) and two floating-point
stations (FPRS), each with one unit. The published configuration lists four
adders and one multiplier for the memory processor. Here that means four units
in all, one per station, and every unit can add. There is one multiplier per
class, behind station 0 of that class. The steering
logic in `memory_processor.sv` follows these rules:

* A multiply always goes to station 0 of its class.
* Any other operation goes to station 1 if it has room, and otherwise to
  station 0.
* A station takes at most 2 instructions per cycle.
* The first instruction that cannot be placed ends the cycle's extraction.

A tag is `{station number, entry}`, 7 bits for 32-entry stations. An entry is
freed when it issues. Its tag can be reused in the next cycle. That is safe:
every consumer of the old result either is already waiting in a station, and
sees the result on the bus in that cycle, or gets the value through the future
file's forwarding. Each station issues its lowest-numbered entry whose operands
are both present.

The operation set is this design's abstraction: `ADD, SUB, AND, OR, XOR, MUL` on
64-bit words, plus the `LDRET` marker. Floating-point stations use the same
integer operations, because no floating-point format is specified. They differ
from the integer stations only in routing (`is_fp`).

## Timing

Everything is synchronous to `clk`, with an active-low asynchronous reset
`rst_n`. Reset empties every buffer and sets all 64 future-file registers to
value 0.

| step | cycle |
|---|---|
| instruction at the ROB head, handed to the MP | t |
| in the LLIB and the MPRF; can be extracted and enter a station | t+1 |
| earliest issue from the station | t+2 |
| result on the bus, future file updated at the end of that cycle | t+3 |

A dependent instruction already waiting in a station issues the cycle after the
result bus shows its operand. The LLIB, the ROB head and extraction each handle 4
instructions per cycle.

## Parameters

| parameter | default | origin |
|---|---|---|
| `ROB_DEPTH` (cp_rob `DEPTH`) | 92 | published CP configuration |
| `WIDTH` (dispatch/commit, LLIB insertion) | 4 | published fetch/issue/commit width |
| `LLIB_DEPTH` (also MPRF size) | 1024 | published |
| `EXT_W` (LLIB extraction per cycle) | 4 | published |
| `RS_ENTRIES` | 32 | this design (the tag format assumes 32) |
| MPRF banks | 4 | this design |
| `XLEN`, `NLREG` (in `dkip_pkg`) | 64, 64 | Alpha ISA |
| `CP_PREG_W` | 8 | 128 integer + 128 FP CP physical registers (published) |

`LLIB_DEPTH` must be a power of two. The ROB depth need not be one.

## Interface of `dkip_top`

| group | ports | meaning |
|---|---|---|
| dispatch | `disp_valid[4]`, `disp_op[4]` (`llop_t`), `disp_preg[4]` → `disp_idx[4]`, `rob_free` | up to 4 per cycle, contiguous from index 0. `disp_preg` is the CP physical register of the READY source |
| CP marks | `cmp_valid/cmp_idx[4]`, `ll_valid/ll_idx[4]` | ROB slot executed / long-latency |
| branch flush | `flush_valid`, `flush_idx` | keep slots up to `flush_idx`, drop the rest; no dispatch and no commit in that cycle |
| CP register read | `rf_raddr[4]` → `rf_rdata[4]` | combinational read of READY values at hand-over |
| hand-over | `xfer_valid[4]`, `xfer_rob_idx[4]`, `xfer_llib_idx[4]` | which ROB slot went to which LLIB slot; the load/store processor uses it to address returned data |
| load return | `ldret_valid`, `ldret_idx`, `ldret_data` | one missing load per cycle, in any order |
| rollback | `rb_valid`, `rb_tail` | discard LLIB entries from slot `rb_tail` on (for checkpoint recovery) |
| results | `wb[4]` (`wb_t`), `arch_val[64]`, `arch_rdy` | result buses, future file contents |
| activity | `drop_cnt`, `head_stall`, `llib_full_stall`, `ext_cnt`, `llib_blocked`, `rs_stall`, `intra_fwd`, `llib_count`, `rob_count`, `mp_idle` | for measurement and tests |

`llop_t` (in `dkip_pkg.sv`) is `{op, is_fp, dst, src1, src2, rdy}`. Here `rdy`
says which source, if any, is READY.

## What is outside, and where this RTL departs from the published design

* **CP core.** The CP's front end, rename, 92-entry integer and FP queues,
  128+128-register file and units are not included. They form a conventional
  R10000-style core. The test of a long-latency dependence is also not included;
  the design takes it as an input.
* **Load/store processor, caches, memory.** Not included. The published LSQ is
  unbounded. The testbench models a fixed 400-cycle memory.
* **Checkpoints.** The published design replaces an MP reorder buffer with 16
  checkpoints, but does not say when they are taken or what they save. Only the
  LLIB tail rollback exists here. Restoring the future file on recovery is not
  implemented.
* **CP registers and the future file.** A register that the CP rewrites after
  the MP wrote it keeps the MP's older value in the future file. Merging the two
  register states for recovery belongs to the checkpoint mechanism above.
* **Design choices.** These are this design's own, as described above: the MPRF's
  extra write port, the load markers, the station size and steering, the
  one-cycle units, and the floating-point stations running integer operations.
* **Flow control.** The ROB hands over long-latency instructions only when the
  LLIB has room for a full group of 4.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
with an independent model, counts the mechanisms it is meant to exercise, and
ends with `TB_RESULT checks=<n> failures=<n>`:

| testbench | what it checks |
|---|---|
| `tb_llib` | 16-entry LLIB against a queue model: slot numbers, free count, extractable prefix, load returns, rollback, full buffer |
| `tb_mprf` | banked reads and writes, including load-data writes into a bank that the stream also writes |
| `tb_future_file` | lookups and updates against a sequential model, with forwarding inside a group and from the buses |
| `tb_mp_rs` | allocation tags, wake-up, lowest-index issue, full station |
| `tb_mp_fu` | all operations, with and without multiplier, one-cycle latency |
| `tb_cp_rob` | drop / hand-over / stall decisions at the head, READY value read, flush, LLIB-full stall |
| `tb_memory_processor` | directed checks of the timing table (result 3 edges after insertion, 4 extractions in one cycle, release in the cycle after a load returns), then 4800 long-latency instructions with out-of-order load returns; all 64 registers compared with a sequential model after each phase |
| `tb_dkip_top` | the whole back-end at its default sizes: 20,000 instructions, a 400-cycle memory, branch flushes; final registers and result count compared with a sequential model |

At the default sizes, `tb_dkip_top` fills the LLIB to its 1024 entries. It
exercises every stall and forwarding path listed under "activity".

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/dkip_pkg.sv tb/tb_dkip_top.sv \
          --top-module tb_dkip_top -o sim
./obj_dir/sim
```

Replace `tb_dkip_top` with any other testbench name. `-y rtl` lets Verilator
find each module in `rtl/<name>.sv`. The package must be listed first. To lint
the RTL alone: `verilator --lint-only -Wall -y rtl rtl/dkip_pkg.sv rtl/dkip_top.sv`.

## Changing the design

* **Sizes.** Change them through the parameters of `dkip_top`. `LLIB_DEPTH`
  sizes the LLIB and the MPRF together. A different `RS_ENTRIES` needs `TAG_W` in
  `dkip_pkg` changed to `2 + log2(RS_ENTRIES)`. An assertion checks this.
* **Operations.** The operation set is `op_e` in `dkip_pkg`. The units decode it
  in `mp_fu.sv`.
* **Steering.** The station choice is the `always_comb` block under "steering" in
  `memory_processor.sv`.
