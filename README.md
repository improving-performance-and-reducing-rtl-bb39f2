# Adaptive resource resizing for a 2-wide out-of-order embedded core

When a load misses in the cache, the instructions behind it keep arriving but
cannot retire, and many of them cannot issue. In a small out-of-order core the
reorder buffer (ROB), the issue queue (IQ) or the rename register file (RF)
then fills up and dispatch stops until the miss returns. Larger structures
would hide more of the miss. But a larger register file has longer bitlines
and a slower access, and the RF access sets the clock period. Making
everything larger all the time costs more in frequency, or in extra pipeline
stages, than it gains.

This design resizes the window only while it is stalled on memory. It runs at
its base size during normal execution. During a **cache-miss period** it
switches in an extension part of each resource:

| resource | base part | extension | upsized | access when upsized |
|---|---|---|---|---|
| reorder buffer | 32 | +16 | 48 | single cycle (fits the clock) |
| issue queue | 12 | +12 | 24 | single cycle (fits the clock) |
| rename register file | 32 | +32 | 64 | **two cycles**, pipelined |

Two policies decide when a cache-miss period is in force:

* **L2RS**: at least one L2 miss is pending.
* **L2ML1RS**: at least one L2 miss is pending, or at least two L1 data-cache
  misses are pending.

A resource goes back to its base size once the misses are serviced and its
extension holds no data. Outside miss periods the extensions are power gated.
The RF's upper segment is also cut off from the bitline, so the RF keeps its
short access time.

The RTL models the window at the register-transfer level: renaming, the ROB,
the IQ, the segmented RF with its two access modes, the two-level bypass and
the resize controller. It also has a behavioural model of one bit column of
the segmented register file, with the circuit's read delays. The front end,
the execution units, the caches and the load/store queue are not part of it.
The top module exposes their signals as ports.

## The segmented register file

The 64 registers form two 32-row segments that share one bitline pair per bit.
The sense amplifier and pre-charge circuit sit at the end next to the lower
segment. A pass gate on each bitline ("segment select") joins the upper
segment to the lower one. Bitline delay grows with the diffusion capacitance
hung on it, which is roughly proportional to the number of connected rows.
That gives two cases:

* **Gate off**: only the lower 32 rows load the bitline. A read takes 1.79 ns,
  against 1.76 ns for a plain 32-entry file, so it fits the 560 MHz clock. The
  upper segment floats and is powered down, and its contents are lost.
* **Gate on**: all 64 rows load the bitline. A read takes 1.93 ns, which the
  pipeline spreads over two cycles.

Each register of the upper segment has an extra "taken" bit. It is set when the
register is allocated and cleared when its instruction retires. The OR of these
bits says whether the upper segment is empty, which is when it may be cut off
again.

`rf_bitline_column` models one such column with real delays. It is a
behavioural model, not logic. `seg_regfile` is the cycle-level equivalent used
in the design:

| mode (`upper_en`) | read issued in cycle t | write issued in cycle t |
|---|---|---|
| 0, segment cut off | data valid in t+1 | in the array at the end of t |
| 1, segment joined | array sampled in t+1, data valid in t+2 | in the array at the end of t+1 |

While the upper segment is cut off, its registers read as 0 and writes to it
are lost. The assertions in `seg_regfile` check that nothing addresses it
then.

Going from two-cycle access back to one-cycle access needs care. A read that
entered the first stage of the two-cycle pipeline in the last upsized cycle
would collide with a new one-cycle read. `rd_ready` is therefore low for that
one cycle and the issue stage holds (`issue_hold` on the top).

## Bypass: why two levels

A result is broadcast on the writeback bus in cycle w. In cycle w a consumer
can wake up and be selected, since the IQ wakes entries in the cycle of the
broadcast. Its operand leaves the register-read stage in cycle e:

* With one-cycle access, e = w + 1. The array was read in cycle w, before the
  write landed.
* With two-cycle access, e = w + 2. The array was read in w + 1, before the
  pipelined write landed at the end of w + 1.

A single bypass level would leave a "hole" in two-cycle mode: a cycle where
the value is neither on the bypass nor in the array. `bypass_net` therefore
keeps registered copies of the result bus for the last two cycles. It compares
every rename-register operand against both. Level 1 (previous cycle) serves
one-cycle mode, and level 2 (two cycles back) serves two-cycle mode. In
two-cycle mode a level-1 match cannot happen: the producer would have had to
broadcast after its consumer had issued. So, in effect, only the last level
is used there.

## Renaming and retirement

The rename register file holds results only while their instructions are in
flight. At retirement a value is copied into the 32-entry architectural
register file (`arch_regfile`) and its rename register is freed. That fits
the upper segment's taken bits, which are cleared when their instruction
retires. Renaming itself never reads the register file, so the rename stage
keeps the same timing in both RF modes. This organisation has one consequence: an instruction waiting in the IQ may outlive
the rename register it names. To handle that, every retirement is broadcast to
the IQ, and waiting sources that name the retiring register switch to reading
the architectural file (`src_t.in_arf`). `rename_map` keeps the newest
in-flight producer of each architectural register and a ready bit per rename
register. It also handles a dependence on the first instruction of the same
dispatch group.

## Resizing without losing order

`resize_ctrl` counts pending L2 and L1 data misses from one-cycle start/done
pulses. It computes `miss_period` and keeps an up/down state per resource:

* **up** is set in the cycle after a miss period begins. It is cleared once
  the period is over *and* that resource's extension is empty. Each resource
  shrinks on its own.
* **grow** = up AND miss_period. Only while grow is set may new entries go
  into an extension. After the period ends the extension only drains, so
  "empty" is guaranteed to arrive.

The ROB is a circular buffer, and its size cannot change simply by moving a
wrap pointer while it holds data. In `rob`, the entry after 31 is 32 if `grow`
was set when the tail left entry 31, and 0 otherwise. One flag records that
choice, and the head follows the same path when it reaches entry 31, so
program order is kept. Both pointers wrap to 0 after entry 47. The extension
counts as empty when none of entries 32–47 is valid and neither pointer is
inside it.

The IQ (`issue_queue`) and the free list (`rf_freelist`) have no ordering
problem. They simply hand out entries from the extension only while `grow` is
set, and report the OR of the extension's occupancy.

## Top level: `rr_core`

| group | signals | notes |
|---|---|---|
| dispatch | `disp_valid[1:0]`, `disp_inst[1:0]` (`inst_t`), `disp_ready` | group of 1–2 instructions, packed from slot 0, taken whole or held; `stall_rob/iq/rf` name the full resource |
| issue | `iss_valid[1:0]`, `iss_op[1:0]` (`issued_t`) | op, immediate, ROB index, destination, both operand values |
| writeback | `wb_valid`, `wb_rob`, `wb_wr`, `wb_preg`, `wb_data` | up to 2 per cycle; `wb_wr` writes and broadcasts a result |
| memory events | `l2_miss_start/done`, `dl1_miss_start/done` | one-cycle pulses, at most one of each per cycle |
| retirement | `cm_valid`, `cm_has_dst`, `cm_areg`, `cm_data` | up to 2 per cycle, program order |
| policy | `policy` (`POLICY_L2RS`, `POLICY_L2ML1RS`) | may change at run time |
| status | `miss_period`, `rob_up`, `iq_up`, `rf_up`, `issue_hold`, `byp_l1`, `byp_l2`, occupancy counts, `l2_pending`, `dl1_pending`, `rf_upper_busy` | `*_up` also drive the power gates and the RF segment select |

Latency from dispatch to issue for an instruction whose operands are ready:

* 2 cycles at base size: IQ write, then select and RF read.
* 3 cycles when the RF is upsized.

Sizes are constants in `rr_pkg` (`ROB_SIZE/ROB_BASE`, `IQ_SIZE/IQ_BASE`,
`RF_SIZE/RF_BASE`, `WIDTH`, `XLEN`, `NUM_AREG`). The block modules take them
as parameter defaults and can be built at other sizes on their own.

## Where this RTL departs from, or goes beyond, the described scheme

* **Base sizes.** The ROB is 32 + 16, following the partitioning of the
  adaptive design. The non-adaptive reference core it is compared with has a
  24-entry ROB. The upsized register file is 64 entries (two 32-row segments).
  That is larger than the 48-entry "intermediate" configuration the scheme is
  said to scale to, but it is the size the circuit is built for.
* **Choices made here** where nothing is specified:
  * 32-bit data and 32 architectural registers.
  * Lowest-index-first issue select.
  * Lowest-free-first register allocation.
  * The drain-only rule for extensions after a miss period.
  * The ROB's moving wrap point.
  * Pipelined writes in two-cycle mode.
  * The one-cycle issue hold.
  * Combinational retirement read ports on the RF that forward from the write
    stage.
  * Miss events as start/done pulses, with 4-bit counters.
* **Not modelled.**
  * Branch prediction and misprediction recovery: there is no flush path.
  * Loads and stores beyond their latency: the load/store queue and the caches
    are outside.
  * Power gating as a circuit.
  * The four operation codes in `op_e` exist only so that a testbench can
    execute something. The window never interprets them.
* `rf_bitline_column` is not instantiated in `rr_core`. The synthesizable top
  uses `seg_regfile`; the bit-column model is the circuit-level view of the
  same register file.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares against a
reference model written independently in the testbench and ends with a
`TB_RESULT checks=N failures=M` line:

| testbench | what it checks |
|---|---|
| `tb_resize_ctrl` | pending counts, miss-period rule of both policies, up/grow state, every cycle under random events |
| `tb_rob` | slot order across size changes, in-order retirement and payload, 48 entries used while growing, ≤ 32 after draining |
| `tb_issue_queue` | slot allocation within the enabled size, same-cycle wakeup, retirement redirect, select order |
| `tb_rf_freelist` | lowest-free allocation, upper-segment taken bits and their OR |
| `tb_seg_regfile` | data and latency in both modes (1 and 2 cycles measured), write pipeline, retirement reads, issue hold |
| `tb_bypass_net` | level-1/level-2 selection and precedence |
| `tb_rename_map` | renamed sources, in-group dependences, retirement that must not clear a re-renamed register |
| `tb_arch_regfile` | reset, two write ports, program-order priority |
| `tb_rf_bitline_column` | read delay 1.79 ns cut off / 1.93 ns joined, isolated rows unreadable, upper contents lost at power-down |
| `tb_rr_core` | end to end at full size (below) |
| `tb_rr_policies` | one program under both policies with identical misses (below) |

`tb_rr_core` runs a 6000-instruction random program, split over the two
policies. The testbench acts as execution units: ALU 1 cycle, load hit 2,
L1 miss 12, L2 miss 60. Every retired value is checked against an in-order
reference. The dispatch-to-issue latency is measured in both RF modes. Every
mechanism must occur at least once:

* stalls on each resource;
* upsizing and downsizing of each resource;
* occupancy above base size;
* a miss period caused by L1 misses alone;
* two-cycle reads;
* both bypass levels;
* the issue hold.

A typical run retires 6000 instructions in about 6800 cycles. It sees about 75
upsizing episodes per resource, with all three extensions fully used.

`tb_rr_policies` runs one 4000-instruction program twice: once under L2RS
and once under L2ML1RS. Each load's miss kind is a hash of its address, so
both runs see exactly the same misses. In every cycle it checks that the
miss-period signal follows the selected rule, and it checks every retired
value. In a typical run the window is upsized for about 44 % of the cycles
under L2RS and about 75 % under L2ML1RS. On that program L2ML1RS is about
1 % slower. The extra upsized time adds two-cycle register reads, and the
12-cycle L1 misses that trigger it are too short to pay for them. Which
policy wins depends on the program's miss mix, so the testbench reports the
speed and does not check it.

To run a testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_rr_core -y rtl -y tb +libext+.sv rtl/rr_pkg.sv tb/tb_rr_core.sv
./obj_dir/Vtb_rr_core
```

Replace `tb_rr_core` with any other testbench name. To lint the design:
`verilator --lint-only -Wall rtl/rr_pkg.sv -y rtl +libext+.sv rtl/rr_core.sv`.

Lint warnings that remain, and why they stand:

* `SYNCASYNCNET`: the reset is used both asynchronously and in assertion
  `disable iff` clauses.
* Unused package constants in modules that do not need them.
* `PINCONNECTEMPTY`: the unused latency flag of the RF read port.

## Files

* `rtl/rr_pkg.sv`: sizes and types.
* `rtl/rr_core.sv`: top.
* `rtl/resize_ctrl.sv`, `rtl/rob.sv`, `rtl/issue_queue.sv`, `rtl/rf_freelist.sv`,
  `rtl/seg_regfile.sv`, `rtl/bypass_net.sv`, `rtl/rename_map.sv`,
  `rtl/arch_regfile.sv`: blocks.
* `rtl/rf_bitline_column.sv`: behavioural bit-column model.
* `tb/tb_*.sv`: one testbench per module.
