# Real-Time Task Manager (RTM)

An RTOS spends much of its time on three chores: picking the highest-priority
ready task, counting down the delays of sleeping tasks at every clock tick, and
finding which task to wake when a semaphore or message is released. Done in
software, each is a walk over a list, so its cost grows with the number of
tasks, and it runs often: at every tick and at every system call that changes
a task's state.

The RTM moves the data those chores work on, the task table, into a small
on-chip peripheral. It keeps one record per task and evaluates all records in
parallel, so each chore takes one clock cycle however many tasks there are.
The RTOS keeps its own policies. It writes task records as if they were an
ordinary array of structures in memory, and asks the RTM three questions
through a command register:

* **schedule**: which ready task has the highest priority?
* **event query**: which task pending on event *e* has the highest priority?
* **tick**: *t* clock ticks have passed; count down every delay.

## Task records

The default configuration has 64 records. Each has four fields:

| field     | width | meaning |
|-----------|-------|---------|
| status    | 4 flags | `valid` (record in use), `delayed` (sleeping for `delay` ticks), `event` (pending on `event ID`), `suspended` |
| priority  | 8 bits | smaller value = higher priority |
| event ID  | 8 bits | the event (semaphore, queue, ...) the task waits on |
| delay     | 16 bits | remaining clock ticks while `delayed` is set |

A task is **ready** when `valid` is set and `delayed`, `event` and `suspended`
are all clear. A record stores 36 flip-flops, 2304 for 64 records. The status
byte on the bus shows the flags in bits 3:0; its upper four bits read as zero.

## How one cycle answers a query

```
 records ──► Ready Test cell  ─┐
   (64)                        ├─ select ─► 64 leaves ─► tree of 63 Priority Test cells ─► RESULT
        ──► Event Test cell  ──┘  (by command)            (6 levels, order 1 … 6)
        ──► Delay Decrement cell ─► back into the records on a tick
```

* **Ready Test cell** (`rtm_ready_test_cell`): `valid & ~delayed & ~event & ~suspended`.
* **Event Test cell** (`rtm_event_test_cell`): `event & (event ID == queried ID)`.
  The valid bit is not tested, so the RTOS must clear the event bit of a
  task it deletes.
* **Priority Test tree** (`rtm_priority_tree`). This is the part that needs
  the most care. It is a binary tree. Each cell (`rtm_priority_test_cell`)
  takes two candidates: a flag, a priority and an index inside its subtree.
  It passes on the better one, and the output flag is the OR of the two
  input flags. A cell on level *N* (order *N*) gets (N−1)-bit indices from
  its children. It puts one bit in front of the winner's index: 0 if the
  left candidate won, 1 if the right one won. So after log2(64) = 6 levels,
  the root holds the full 6-bit index of the winning record, with no
  encoder needed. The right candidate wins when

      b_flag AND NOT (a_flag AND a_prio <= b_prio)

  so the left candidate, the one with the lower index, wins ties. The tree
  has 63 cells and its delay grows as log2(records). The Ready Test and
  Event Test flags share one tree: a 2:1 select on each leaf follows the
  command being written.
* **Delay Decrement cell** (`rtm_delay_decrement_cell`): on a tick, computes
  `delay − t` for every delayed record. If the result is zero or would go
  below zero, the delay becomes 0 and `delayed` is cleared, which makes the
  task ready if nothing else holds it. Records that are not delayed keep
  their delay as it is.

All of this logic is combinational, between the record flip-flops and the
RESULT register.

## Bus interface and register map

A 32-bit request bus with byte enables and no wait states. A request is
accepted in the cycle `bus_req` is high. Read data come back registered in
the next cycle, with `bus_rvalid`.

| byte address      | access | contents |
|-------------------|--------|----------|
| `8r + 0`          | R/W    | record *r*: `[3:0]` status `{suspended, event, delayed, valid}`, `[15:8]` priority, `[23:16]` event ID |
| `8r + 4`          | R/W    | record *r*: `[15:0]` delay |
| `RECORDS*8 + 0`   | W      | CMD: `[1:0]` op (1 schedule, 2 event query, 3 tick), `[15:8]` event ID, `[31:16]` tick count |
| `RECORDS*8 + 4`   | R      | RESULT: `[31]` found, `[15:8]` priority, `[7:0]` index |

Records sit on 64-bit boundaries, which turns the record index into plain
address bits. Each field has its own byte lane, so the RTOS can write one
field with a byte write and leave the other fields alone. Unused bits and
addresses read as zero, and writes to them are ignored. The address is
`clog2(RECORDS*8)+1` bits wide: 10 bits for 64 records.

**Timing.** A command is executed in the clock edge that accepts its write.
A query loads RESULT and a tick loads every delay and `delayed` bit. A read of
RESULT issued in the very next cycle returns the answer. So an RTOS
operation costs one bus write plus one bus read, whatever the number of
tasks. A tick does not change RESULT. A typical RTOS use:

```
tick ISR:        CMD <- {t, 8'h0, 8'h03}; CMD <- 8'h01; read RESULT; switch if needed
sem post(e):     CMD <- {16'h0, e, 8'h02}; read RESULT; if found clear its event bit
task delay(n):   write own delay word, then own status byte with delayed set
```

Reset (`rst_n` low at a clock edge) clears every record and RESULT.

## Files

| file | module | role |
|------|--------|------|
| `rtl/rtm_pkg.sv` | package | field widths, status struct, record struct, command enum, register offsets |
| `rtl/rtm.sv` | `rtm` (top) | bus decode, leaf select, RESULT register, read path, assertions |
| `rtl/rtm_task_records.sv` | `rtm_task_records` | the record flip-flops and one decrement cell per record |
| `rtl/rtm_priority_tree.sv` | `rtm_priority_tree` | the Priority Test tree, built by `generate` for any power-of-two size |
| `rtl/rtm_priority_test_cell.sv` | `rtm_priority_test_cell` | one tree node of order `ORDER` |
| `rtl/rtm_ready_test_cell.sv`, `rtl/rtm_event_test_cell.sv`, `rtl/rtm_delay_decrement_cell.sv` | | the per-record cells |

`RECORDS` (default 64) is the only size parameter of the top. It must be a
power of two, at most 256 because RESULT has an 8-bit index. The field widths
are constants in `rtm_pkg`.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one compares the module with a reference model written independently in the
testbench, and ends by printing `TB_RESULT checks=N failures=M`.

* `tb_rtm` runs the top at its default size (64 records) over the bus. It
  starts with a short RTOS scenario: an idle task, two periodic tasks of
  20 ticks, a noise task of 32 ticks, a task waiting on a semaphore, a
  suspend, and tasks re-arming their delays. Then it runs 6000 random
  operations against a model of the table. It reads every query result in
  the cycle right after the command, and so checks the one-cycle latency.
  It counts how often each mechanism happened and fails if one never did:
  found/empty schedule, event hit/miss, a tick that releases a task and one
  that only shortens a delay, a suspended task passed over, a priority tie,
  a partial field write, and the tree switching between modes.
* `tb_rtm_rtos_workload` plays an RTOS kernel that makes all its
  scheduling decisions through the RTM. Its task set has 30 data channels,
  each with an input task and an output task of 20-tick period. It also has
  a 32-tick noise task, an I/O handler for random events (one every 10
  ticks on average) and an idle task: 63 tasks in all. The set runs for 200
  ticks in two styles:
  * preemptive: the output tasks pend on per-channel semaphores through
    event queries, and an interrupt releases the I/O handler;
  * non-preemptive: there is no IPC, and the I/O handler is polled.

  The testbench checks every RTM answer against the kernel's own task
  state. It also checks that each periodic task completes once per period,
  that every I/O event is served, and that no RTM operation takes more than
  one command write and one result read.
* The cell and tree testbenches are exhaustive where that is cheap (the
  Ready Test cell) and random with many ties elsewhere.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/rtm_pkg.sv tb/tb_rtm.sv --top-module tb_rtm -o sim
./obj_dir/sim
```

The top-level simulation takes well under a second.

## Departures from the reference architecture and open points

* **Status storage.** The reference record is described both as 40 bits
  (four 8-bit and 16-bit fields) and as 36 flip-flops (2304 for 64 records).
  This design stores the four flags only, which matches the 36. On the bus
  the status field still takes a full byte.
* **Priority order and ties.** It is not specified whether a larger or a
  smaller number means higher priority. Here a smaller value is the higher
  priority, as in uC/OS-II. On equal priorities the lower index wins.
* **Bus, register map, command encoding, one-cycle timing and reset** are
  this design's own. The reference architecture only says that the RTM is
  memory-mapped and is driven through a set of registers.
* **Delay underflow** saturates at zero. A tick does not change the delay of
  a record that is not delayed.
* **No release command.** An event query only reports the task. The RTOS
  clears that task's event bit itself with a one-byte write.
* **Not built:** the variant that time-shares fewer Delay Decrement cells
  when the CPU clock is slower than the system tick clock. It is mentioned
  only as an option. The host processor and the system tick timer sit
  outside the RTM. The testbench stands in for the processor, and the tick
  count reaches the RTM through the CMD register.
* **Sizing.** 64 records with 8-bit priorities covers any uC/OS-II
  application of the classic version, which allows at most 64 tasks with
  priorities 0–63. At a 1 kHz tick, a 16-bit delay reaches about 65 s.
