# A centralized instruction window for a four-way superscalar processor

A superscalar processor finds instructions it can run in parallel by keeping
many decoded instructions in flight and issuing each as soon as its operands
exist. This RTL implements the *centralized instruction window* approach: a
single 32-row structure that holds every waiting instruction together with its
opcode, operands, tags and status bits, decides every cycle which instructions
go to which functional unit, and hands them out with their operands already
attached. (The alternative, distributed reservation stations, needs a buffer
per unit; the point of a central window is one compact scheduler and operand
buses shared between units.)

What the window does, in one paragraph: four decoded instructions enter per
clock; up to five leave per clock on four issue ports, oldest first and out of
order; results come back on four write-back ports and are captured by tag;
results are announced one cycle early so that a dependent instruction issues
in the very cycle its operand appears and gets it through a bypass mux; loads
are assumed to hit the cache so their consumers can be scheduled early, and a
miss undoes those issues; conditional branches are checked inside the window
the moment their condition value arrives.

The sizes follow the original design: 32 rows, blocks of four, 5-bit tags,
four issue ports and four write-back ports. Data (32 bits) and opcode (8 bits)
widths are this implementation's own.

## The window is a FIFO, and position is age

Rows are numbered from the top. A block of four new instructions always enters
rows 0..3; the oldest instruction sits at the bottom (row 31). Within a block
the first instruction in program order goes to row 3, so physical order is
program order everywhere. Because of this, "find the oldest ready instruction
of a kind" is a search for the lowest requesting row, and every scheduling
decision below is a *lookup array* search (`iw_lookup_array`): a parallel
prefix over the 32 rows in lg 32 = 5 levels that returns the oldest requester
and, for every row, whether an older row requests.

Rows are grouped in eight blocks of four. A block is *free* when each of its
rows is empty, already issued, or a branch whose prediction turned out right.
Every cycle the lowest free block is squeezed out: it and all blocks above it
move down by one block, and block 0 takes the newly decoded instructions
(`iw_shift_ctrl`). With no free block the window is full and decoding stalls
(`in_ready_o` low). The original only says that new instructions shift in at
the top while old ones shift out; this compaction rule is an assumption.

## Issue ports and the scheduling rules

There are four issue ports, and port 4 carries two instructions at once,
because a load needs only its src2 operand (the address) and a control
transfer only its src1 (the condition):

| slot | port | takes |
|---|---|---|
| 0 | 1  | ALU (first ALU sweep) |
| 1 | 2  | ALU (second sweep) or MUL, whichever is older |
| 2 | 3  | ALU (third sweep) or STORE, whichever is older |
| 3 | 4a | control transfer (src1 only) |
| 4 | 4b | LOAD (src2 only) |

`iw_scheduler` stores one valid bit and five type bits per row and computes:

* **ALU**: three serial sweeps. Port 1 gets the oldest ready ALU instruction,
  port 2 the oldest of what is left (plus any ready MUL while the multiplier
  signals `mul_avail_i`), port 3 the oldest of what is left after that (plus
  the eligible store). Port 3's ALU and store candidates share one lookup
  array, so a store may take the port from the third ALU instruction; age
  order is still respected. Treating port 2 (ALU vs. MUL) the same way is an
  assumption.
* **STORE**: strictly in order. Only the oldest *pending* store (not yet issued,
  ready or not) may issue, and only when no older load is pending.
* **LOAD**: any ready load that has no pending store older than itself, oldest
  first. Loads therefore reorder freely between two stores but never pass
  one.
* **Control transfer**: the oldest ready one (see branches below).

"Ready" means both source fields report ready. Selection is combinational on
the stored state; the chosen instructions are registered into `iss_o`, so an
instruction selected in cycle t reaches its functional unit in cycle t+1.

## Results ahead of data: announcement, write-back and bypass

This is the part that takes the most care. The scheduler must select a
consumer *before* its producer's result exists, or back-to-back dependent
instructions would be impossible. So every result tag is announced one cycle
before its data appears:

```
cycle t    : producer P selected; P's destination tag announced (ann)
             rows whose source tag matches set their ready bit (at the edge)
cycle t+1  : P on iss_o, executes; its result is on write-back port w
             consumer C (now ready) is selected; C's source field matches
             the tag on port w -> write line raised -> the value is stored
             AND the bypass control for C's slot selects port w
cycle t+2  : C on iss_o with P's value, though C never saw it in storage
```

`iw_src_control` holds the tag CAM (`iw_cam_row`, four search ports for
announcements and four for results), the ready and issued bits and the
"operand present" bit; it produces the write lines and the 16 bypass controls
(4 read slots x 4 write-back ports). `iw_src_data` holds the operands and the
bypass muxes at the bottom of the field. There are two copies of each, one per
source operand; the src1 control copy also does the branch check.

Which port a result returns on is fixed by `iw_wb_ctrl`:

* ALU results and load hits: one cycle after issue, on the write-back port of
  the issue port (ALU1 -> 1, ALU2 -> 2, ALU3 -> 3, load -> 4).
* Multiply: two cycles after issue. It has no port of its own. In the cycle
  after the multiply issued, if no ALU instruction issues on port 3, the
  product takes write-back port 3; otherwise it takes port 4, and a load
  result due there that cycle is held back one cycle (no new load issues
  while one is held).

The announcement follows the same routing, so a consumer of a held-back load
simply becomes ready a cycle later. `plan_o` tells the functional units which
tag each write-back port must carry in the current cycle.

## Loads are assumed to hit: false issue

A load's consumers are readied by its announcement as if it will hit. If the
load unit reports a miss (`wb_i[3].miss` with the load's tag, in the cycle the
data was due):

* every row waiting for that tag clears its ready bit;
* a row selected in that same cycle (the one that expected the bypass) does
  not get its issued bit; its slot appears on `iss_o` with
  `operand_invalid` set, which tells the unit to discard it, and its own
  result is not announced;
* when the load unit later returns the data on port 4 (any cycle in which
  `plan_o[3]` is empty) the rows are written and become ready again, and the
  consumer issues a second time.

## Branches are resolved inside the window

A conditional branch sits in the window with its condition as src1 and a copy
of the prediction bit. As soon as the condition value is stored, its LSB is
XORed with the prediction:

* correct: the branch never appears ready, never issues, and counts as done,
  so its block can be squeezed out;
* wrong: every row above it (younger) is invalidated in the same cycle and is
  not selected, new blocks are refused, and the branch issues on port 4a so
  the fetch unit can be redirected. After it has issued, blocks are accepted
  again.

A branch needs its condition *stored*, not only announced, because the XOR
needs the value; it is therefore never issued through the bypass.

## Interface of `iw_window`

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | | clock (one cycle = one full window cycle), asynchronous active-low reset |
| `in_i[4]` | in | `inst_t` | decoded block, `in_i[0]` first in program order: valid, type bits, opcode, destination tag, prediction bit, and per source: tag, ready, data (from the reorder buffer) |
| `in_ready_o` | out | | the block on `in_i` is taken at the next rising edge |
| `mul_avail_i` | in | | the multiplier can accept a multiply this cycle |
| `wb_i[4]` | in | `wb_t` | results this cycle: valid, tag, data; `miss` on port 4 only |
| `iss_o[5]` | out | `issue_t` | registered issue slots (table above): valid, operand_invalid, type, opcode, destination tag, src1, src2 |
| `plan_o[4]` | out | `tagbus_t` | tag due on each write-back port this cycle |

A source operand that an instruction does not use (src1 of a load, src2 of a
branch) must be presented as ready. Tags must be unique among instructions in
flight; a tag may be reused once its previous owner's result has been written
(in an earlier cycle). All types are in `rtl/iw_pkg.sv`.

Latencies at the interface: an instruction with both operands available,
accepted at edge t, is selected in cycle t+1 and appears on `iss_o` in cycle
t+2. A chain of dependent ALU instructions, or loads that hit, issues one per
cycle; a multiply's consumer issues two cycles after the multiply.

## Files

| file | content |
|---|---|
| `rtl/iw_pkg.sv` | sizes, slot numbering, record types |
| `rtl/iw_window.sv` | top level: wiring of the fields, false-issue gathering, issue registers |
| `rtl/iw_scheduler.sv` | valid/type bits, the port rules, mispredict invalidation |
| `rtl/iw_lookup_array.sv` | oldest-first search over the rows |
| `rtl/iw_src_control.sv` | tag CAM, ready/present/issued bits, bypass control, branch check, false issue |
| `rtl/iw_cam_row.sv` | one row's four-port tag compare |
| `rtl/iw_src_data.sv` | operand storage and bypass muxes |
| `rtl/iw_op_field.sv` | opcode and destination-tag columns, five read ports |
| `rtl/iw_shift_ctrl.sv` | block compaction of the FIFO |
| `rtl/iw_wb_ctrl.sv` | write-back port policy and result announcement |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/iw_pkg.sv tb/tb_iw_window.sv --top-module tb_iw_window -o sim
./obj_dir/sim
```

Replace `tb_iw_window` by any other testbench name. `tb_iw_window` is the
end-to-end test, at the default size: it plays the decoder, reorder buffer and
all functional units. Seven directed programs check an ALU dependence chain
(one issue per cycle), a load/ALU chain, a multiply and its consumer (two
cycles), a sustained four instructions accepted and four issued per cycle, a
branch and a load leaving together on port 4, a window filling up behind a
stalled multiply, and a product on write-back port 4 holding a load back.
Eleven random programs follow, with random cache misses, multiplier stalls
and mispredicted branches, and last a random trace of 3000 instructions whose
branches are all predicted correctly; it runs for about 1350 cycles, about
2.2 instructions issued per cycle. A program that stops making progress
counts as a failure. Throughout, every delivered operand is compared
with values computed in program order, and the port rules, store/load
ordering, the write-back plan and the latencies above are checked; every
mechanism (out-of-order issue, three ALU issues in a cycle, port 4 carrying
two instructions, bypass, load bypass, false issue, product on port 3 and on
port 4, held-back load, mispredict and correct prediction, window full,
killed instructions) must occur at least once. It runs in well under a second.

The module testbenches compare each block against an independent reference
written as plain loops (`tb_iw_scheduler`, `tb_iw_src_control`,
`tb_iw_wb_ctrl`, ...).

## Departures from the original circuit

The original is a full-custom dynamic-logic layout on a four-phase clock:
tags are matched in one phase, operands written in another, and the scheduler
starts its ALU and multiply searches a phase earlier than the rest. This RTL
is single-edge synchronous; one clock cycle stands for one complete
four-phase cycle, and everything the original does within that cycle happens
between two rising edges. In particular:

* The two sets of transparent latches that hold match results between phases
  are replaced by the one-cycle gap between announcement and result; the
  read and write drivers that share one `match_local` wire between the read
  and write phases are replaced by separate read lines (`grant`) and write
  lines (`wr`).
* The original writes a returning result using the tag match it latched
  when the result was announced. Here the returning tag is compared again by
  a second set of CAM search ports (one per write-back port). The effect is
  the same; it also keeps a held-back load or a late cache refill simple.
* The write-once dynamic data cell (preset to 1, only 0 written) is an
  ordinary register written once.
* The lookup arrays are a parallel-prefix OR rather than the
  precharge/discharge circuit; same function, same lg n levels.
* Reset, the FIFO compaction rule, the exact cycle of the announcement, the
  write-back port numbering, refusing new blocks while a mispredicted branch
  waits, holding new loads while a load result is held back, and the
  handling of a load refill are this implementation's choices.
* The 100 MHz timing target is a property of the custom layout and is not
  claimed for this RTL.

Not included: the reorder buffer, the functional units, and the decoder,
which are separate units; the end-to-end testbench models them.
