# Register queues: a register file for software-pipelined loops

A software-pipelined loop overlaps several iterations of the original loop, so a
variable such as a loaded array element has several instances alive at once, one
per iteration in flight. A conventional machine needs one architected register per
live instance, and the loop must be unrolled so each copy of the code can name its
own register. Both costs grow with operation latency.

Register queues break that link. A register queue is a small circular buffer of
physical registers outside the architected name space, with a tail pointer
(`Qtail`). Software *connects* an architected register to a queue at a read offset
with one new instruction, `rq-connect`. From then on:

* every **write** to that architected register goes to the next queue slot
  (`Qtail` is decremented first), so successive iterations write successive
  registers without any renaming in the code;
* every **read** returns the slot `ro` positions behind the tail: offset 0 is the
  newest instance, offset 1 the one before, and so on. Reads do not remove data.

The loop kernel therefore needs neither unrolling nor more architected registers
when latency grows. Only the read offsets in the `rq-connect` instructions change.

This repository holds synthesizable SystemVerilog for the register-file side of
the scheme: the map table, the queue tail logic, the queue and ordinary register
storage, and the access logic that executes `rq-connect` and turns architected
register names into physical ones. It follows the Register Queue design published
in *Evaluating the Use of Register Queues in Software Pipelined Loops*. Where that
description is silent, the choices made here are listed below.

## Name space and configuration

All sizes live in `rtl/rq_pkg.sv`.

| constant     | value | origin |
|--------------|-------|--------|
| `NUM_ARCH`   | 32    | published configuration (R0..R31) |
| `NUM_PHYS`   | 256   | published configuration (pr0..pr255) |
| `QUEUE_LEN`  | 4     | published configuration (2-bit offsets) |
| `NUM_QUEUES` | 16    | this design's choice; the published text leaves *n* open |
| `DATA_W`     | 64    | this design's choice |
| `ISSUE_W`    | 4     | this design's choice (instruction slots per bundle) |

The 256 physical registers form one name space:

```
pr0   .. pr3     queue 1          queue q = pr[4(q-1)] .. pr[4(q-1)+3]
pr4   .. pr7     queue 2
...
pr60  .. pr63    queue 16
pr64  .. pr255   ordinary physical register file
```

Queues are numbered from 1. Queue number 0 in `rq-connect` means "disconnect".
After reset, architected register Ri is mapped to pr[224+i] (R31 to pr255), no
register is connected to a queue, every `Qtail` is 0, and pr64..pr223 are on the
free list.

## The map table

Each architected register has one entry `{is_q, pri, ro}` (`map_entry_t`):

* `is_q = 0`: `pri` is an ordinary physical register index;
* `is_q = 1`: `pri` is a queue number and `ro` the read offset.

The published description stores either kind of value in `pri` and does not say
how they are told apart, so `is_q` is added here.

## Resolving an access

For a register connected to queue *q* with offset *ro*:

```
read : pr = 4(q-1) + ((Qtail_q + ro) mod 4)
write: Qtail_q <- Qtail_q - 1 (mod 4);   pr = 4(q-1) + new Qtail_q
```

Because a queue is a power-of-two block of the name space, the queue part of the
address is fixed and only a 2-bit adder is needed. The access logic produces
physical specifiers only. Once a specifier exists, the rest of the machine treats
queue registers like any other physical register.

## `rq-connect`

| instruction             | effect on the map entry of `ar` | free list |
|-------------------------|----------------------------------|-----------|
| `rq-connect q, ar, imm` (q ≥ 1) | `{is_q=1, pri=q, ro=imm}` (connect or re-connect) | if `ar` held an ordinary register, it is returned |
| `rq-connect 0, ar, 0`   | if connected: `{is_q=0, pri=<free register>, ro=0}` | one register taken |
| `rq-connect 0, ar, 0` on an unconnected register | unchanged (this design's choice) | — |

One bundle may carry several connects, but at most one per architected register.
An assertion checks this.

## Same-cycle rules

This part is the hardest to get right. A software-pipelined kernel routinely
reads, writes and re-connects the same queue in a single cycle. The rules below
are what make the worked schedules in the testbench come out right.

1. **Reads see the start of the cycle.** Every queue read uses `Qtail` as it was
   at the start of the cycle, and the register arrays return pre-write data. A
   read and a write of the same queue in one cycle therefore read the old
   contents. The queue-overflow schedule depends on this: in one cycle it reads
   queue 2 at offset 1 and copies a new element into queue 2.
2. **Connects are forwarded, in program order.** The slots of a bundle are in
   program order (slot 0 oldest). An `rq-connect` takes effect for the slots
   *after* it in the same bundle: they use its queue and offset instead of the
   map table. Slots *before* it still see the old mapping. The published
   description shows both cases: a read in the same cycle as a re-connect that
   uses the new offset, and one that uses the old offset. Program order is the
   only rule that satisfies both.
3. **Several writes to one queue** in a bundle take successive slots
   (`Qtail-1`, `Qtail-2`, ...) in slot order. `Qtail` then drops by the number
   of writes. This is this design's extension. The published description
   never issues two writes to one queue in a cycle.
4. **Two write-backs to one register** in a cycle: the higher-numbered port
   wins.

## Joining queues

A variable with more live instances than a queue holds is spread over two or
more queues in software. An extra instruction copies the oldest element of the
first queue, read through a register connected at offset 3, into the second
queue just before it would be overwritten. The hardware needs nothing special for
this beyond rule 1. The end-to-end testbench runs such a schedule (load latency
11, six live instances, two queues).

## Modules

| file | role |
|------|------|
| `rq_pkg.sv` | constants, `map_entry_t`, `slot_t`, `renamed_t`, `queue_preg()` |
| `rq_map_table.sv` | 32-entry map table, 16 combinational read ports, 4 write ports |
| `rq_queue_ctrl.sv` | `Qtail` registers, read and write address arithmetic |
| `rq_free_list.sv` | circular list of free ordinary physical registers |
| `rq_reg_array.sv` | multi-ported register array (queue registers, ordinary file) |
| `rq_rename.sv` | access logic: connects, forwarding, specifier generation |
| `rq_regfile.sv` | top: `rq_rename` plus the two arrays behind one name space |

### Top-level interface (`rq_regfile`)

| port | dir | meaning |
|------|-----|---------|
| `bundle_v`, `bundle[ISSUE_W]` | in | one bundle per cycle; each `slot_t` is NOP, an op (2 sources, 1 destination) or a connect (`rq`, `ar`, `imm`) |
| `ren[ISSUE_W]` | out | physical source/destination specifiers, combinational, same cycle |
| `src_data[ISSUE_W][2]` | out | source register contents at the start of the cycle |
| `wb_v`, `wb_preg`, `wb_data` | in | write-back by physical specifier, written at the clock edge |
| `qtail`, `free_count` | out | observation |

Timing: the bundle is translated and its sources are read combinationally. Map
table, `Qtail` pointers and free list update at the rising edge of each cycle with
`bundle_v` high. There is no back-pressure. At most 32 registers can each hold one
ordinary register, so the free list never runs dry, and an assertion watches for
it. Reset is synchronous and active low.

The write-back ports and the same-cycle read stand in for the reservation
stations and forwarding network of an out-of-order core. Those stay unchanged in
the original scheme because they only ever see physical specifiers. Writes to
unconnected registers go to the register they are currently mapped to. Per-write
renaming of ordinary registers is the host pipeline's job and is not modelled.

## Verification

Each module has a self-checking testbench in `tb/` that compares the module with
a model written separately. The testbenches are:

* `tb_rq_map_table`: reset mapping, random writes and reads.
* `tb_rq_queue_ctrl`: `Qtail` sequence and address arithmetic, including several
  writes to one queue per cycle.
* `tb_rq_free_list`: hand-out order, returns, and count.
* `tb_rq_reg_array`: read-before-write behaviour and write collisions.
* `tb_rq_rename`: exact physical specifiers for the array-sum loop, and random
  bundles against a model of the map table, `Qtail` and free list.
* `tb_rq_regfile`: end to end at full size. The testbench acts as the execution
  units (iadd, fload from a synthetic memory, fadd, fmove). It runs three
  software-pipelined schedules cycle by cycle:
  * the array-sum loop at II = 2;
  * the same loop with an 11-cycle load, overflowing into a second queue;
  * a kernel that re-connects its only free register every cycle.

  It checks every value read, `Qtail` after each step, the final sums, and that
  the bundles issue back to back. It then runs 3000 random bundles against an
  architectural model. It counts each mechanism (queue write and read, `Qtail`
  wrap, connect forwarding, same-cycle read+write of a queue, multiple writes per
  queue, disconnect, register return, queue joining, ordinary accesses) and fails
  if any never happens.

* `tb_rq_latency_sweep`: the array-sum loop scheduled onto register queues for
  load latencies 1 to 45, 40 iterations each. A list scheduler in the testbench
  copies elements into further queues as they would be overwritten, and
  re-connects the reader register to wherever each element sits. It checks
  every value read and the sums. For each latency it reports the queues and
  architected registers used. At latency 45 the chain uses 7 queues and 10
  architected registers, and the loop body itself is unchanged.

  | load latency | 1-6 | 7-13 | 14-20 | 21-27 | 28-34 | 35-40 | 41-45 |
  |--------------|-----|------|-------|-------|-------|-------|-------|
  | queues used  | 1   | 2    | 3     | 4     | 5     | 6     | 7     |

  The copy rule is deliberately simple: it moves every unread element that
  reaches offset 3. The chain can therefore be one queue longer than the live
  instances strictly need. When a bundle is full, the schedule also stretches
  a little beyond two cycles per iteration (138 cycles for 40 iterations at
  latency 45).

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/rq_pkg.sv \
  rtl/rq_map_table.sv rtl/rq_reg_array.sv rtl/rq_queue_ctrl.sv \
  rtl/rq_free_list.sv rtl/rq_rename.sv rtl/rq_regfile.sv \
  tb/tb_rq_regfile.sv --top-module tb_rq_regfile
./obj_dir/Vtb_rq_regfile
```

All testbenches run at the default sizes in well under a second.

## Limits

* Context switches are not supported. Queue contents, `Qtail` and the map table
  are processor state that would have to be saved, but no save/restore path is
  specified and none is built.
* The processor around the register file is not included: fetch, issue,
  reservation stations, execution units, retirement and ordinary register
  renaming.
* `NUM_QUEUES`, the register width and the bundle width are this design's
  choices (see the table above). They are package constants, so changing them
  changes every module consistently.
