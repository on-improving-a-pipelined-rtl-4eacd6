# Dependence Level Scheduler: a two-cycle issue queue that still issues back to back

An out-of-order core keeps waiting instructions in an issue queue. Every cycle
the queue *wakes up* the instructions whose operands have become available and
*selects* the oldest ready ones for the issue ports. Wakeup and selection form a
loop: an instruction has to be selected before it can wake its consumers. If the
loop takes one cycle, a one-cycle ALU instruction and its consumer can issue in
consecutive cycles. To make the queue larger or the clock faster, designers split
the loop over two cycles. Then every one-cycle producer costs its consumer an
idle cycle, and integer code suffers.

The Dependence Level Scheduler (DLS) keeps the two-cycle loop and gets the
back-to-back issue back, without speculation:

* **Wakeup in advance.** A one-cycle instruction wakes its consumers while it is
  still *competing* for selection, not after it has been selected. Its request
  line drives the wakeup through a second, one-cycle loop.
* **Holding the consumer level.** Consumers woken this way may not compete yet.
  Their producer might lose selection this cycle, and issuing a consumer
  together with its producer would be speculative. They are held until every
  one-cycle instruction that was competing (the *producer level*) has been
  selected, and they compete from the next cycle on.

If a producer level issues in one cycle, its consumers issue in the very next
cycle. The behaviour is then the same as a one-cycle scheduler. If the producer
level needs several cycles, for example because there are more one-cycle
instructions than issue ports, the consumers wait for all of them. Some issue
slots may then go unused. That is the cost of staying non-speculative.
Multi-cycle producers (loads, multiplies, divides) wake their consumers after
selection, as in any pipelined scheduler. Their own latency hides the loop.

## Structure

```
                 +--------- two-cycle loop: sel -> register -> (latency-2 countdown) ----+
                 |   +----- one-cycle loop: req (one-cycle instructions only) -------+   |
                 v   v                                                               |   |
 dispatch -> [classify] -> [Wakeup Logic] --ready--> [D-Logic] --req--> [Selection] -+-> sel -> issue ports
                   (matrix)      ^                 (register)          (oldest)      |
                                 |                      ^ load                       |
                            [wakeup muxes]              +-------- [ZDL] <-- req, sel, sel_prev
```

| file | block | role |
|---|---|---|
| `rtl/dls_pkg.sv` | package | default sizes, the evaluated latencies, the two class enums |
| `rtl/dls_classify.sv` | classification | at dispatch: own class, producer class, wakeup-matrix row |
| `rtl/wakeup_logic.sv` | Wakeup Logic | N x N dependence-bit matrix, `ready` per entry |
| `rtl/wakeup_muxes.sv` | wakeup muxes | picks the one-cycle or the two-cycle loop per entry; holds the `sel` register |
| `rtl/d_logic.sv` | D-Logic | request register; holds woken-in-advance entries until `load` |
| `rtl/zdl.sv` | ZDL | zero detection: `load` when no one-cycle request is left unselected |
| `rtl/selection_logic.sv` | Selection Logic | oldest-first choice of up to W requests, port assignment |
| `rtl/age_matrix.sv` | (helper) | program order of the entries for the selection logic |
| `rtl/dls_scheduler.sv` | top | entry state and the wiring above |

## The two classifications

Every entry carries two bits, both fixed when it is dispatched:

* **Own class**, from the instruction's latency. A latency of 1 means *wakeup in
  advance*: the entry's wakeup signal is its request. Anything longer means
  *wakeup in selection*: the wakeup comes from the registered selection, delayed
  by `latency - 2` more cycles. A consumer can then be selected exactly
  `latency` cycles after its producer.
* **Producer class**, from the producers. The entry is *woken in advance* if at
  least one producer is a one-cycle instruction that has not issued yet. This
  includes a producer dispatched in the same cycle from an earlier slot.
  Otherwise it is *woken in selection*. That covers operands already available
  at dispatch, and producers that are all multi-cycle. Encoding: 0 = woken in
  advance, 1 = woken in selection.

Only the producer class matters in the D-Logic. Only the own class matters in
the muxes and in the ZDL.

## Timing of the loop

Registers: the request register (D-Logic) between wakeup and selection, and the
selection register that feeds the two-cycle loop. Everything else in a cycle is
combinational:

```
req (reg) -> muxes -> wakeup matrix -> ready -> D-Logic input
req (reg) -> selection -> sel -> ZDL -> load -> D-Logic input
```

Per entry:

```
req(t+1) = ready(t) & (woken_in_selection | load(t) | req(t))
load(t)  = no entry with req & !sel_prev & one_cycle & !sel(t)
```

An entry selected in cycle t still shows its request in t+1, because the
request register was loaded before the selection was known. That cycle is
masked with `sel_prev`, both for selection and in the ZDL.

The example below has four ALU instructions and one issue port. Instructions 1
and 2 are independent, 3 uses 1, and 4 uses 3. All four are dispatched in cycle
d:

| cycle | d+1 | d+2 | d+3 | d+4 | d+5 |
|---|---|---|---|---|---|
| 1 | wakes | **selected** | | | |
| 2 | wakes | competes | **selected** | | |
| 3 | | woken in advance by 1's request | ready, held (`load` low in d+2) | **selected** | |
| 4 | | | | woken in advance by 3 | **selected** |

In d+3 the last one-cycle request (instruction 2) is selected, so `load` rises.
Instruction 3 competes in d+4. In d+4, instruction 3 is the whole producer level
and is selected at once, so instruction 4 issues back to back in d+5.

## Interface of `dls_scheduler`

Parameters: `N` entries (32), `W` issue ports (4), `D` dispatch slots (4),
`LAT_W` latency bits (5).

* **Dispatch.** Up to D instructions per cycle. Slot order is program order. For
  each slot the front end gives:
  * `disp_entry`: a free entry, taken from `free_entries`;
  * `disp_lat`: the execution latency, at least 1;
  * `disp_dep`: a bit vector of the entries that hold its producers. Any
    number of producers may be named. For example, a load can be made to wait
    for every older store-address operation. A store split into address and
    data parts takes two entries.

  The front end should name a producer only while that producer is in the
  queue. A producer dispatched by an earlier slot of the same cycle may be
  named too. Assertions check that entries are free and distinct, and that
  latencies are not zero. A dispatched instruction can be selected two cycles
  later at the earliest.
* **Issue.** `port_avail[p]` says whether port p can take an instruction this
  cycle. `issue_valid[p]` and `issue_entry[p]` name the entry issued on it. The
  oldest selected instruction goes to the lowest available port. All ports are
  treated as equal.
* **Release.** An entry becomes free in the cycle after it has been issued and
  has broadcast its wakeup. For a multi-cycle instruction that is
  `latency - 1` cycles after issue. The payload (opcode, registers) stays with
  the front end and is indexed by entry number.

Reset (`rst_n`, active low, asynchronous) empties the queue.

## Where this RTL goes beyond or departs from the published mechanism

The mechanism (both loops, the two classifications, D-Logic, ZDL) follows the
published description. The following choices are this implementation's own:

* **Which instructions the ZDL counts.** The description is not consistent.
  One passage says that the ZDL waits for the requesting *one-cycle*
  instructions. The slice drawing and its caption talk about the
  *producer* classification. This RTL counts the one-cycle instructions (own
  class). The worked example needs that: instruction 3 is held in d+3 by
  instructions 1 and 2, which have no one-cycle producers. Without it,
  a consumer could issue together with its producer.
* **A released request is kept.** Once `load` has let a woken-in-advance entry
  request, the entry keeps requesting until it issues. It is not held back again
  when `load` falls.
* **Latencies above two cycles.** A per-entry countdown delays the two-cycle
  loop by `latency - 2` cycles. The published drawing shows only the two-cycle
  path.
* **Age and ports.** An age matrix keeps program order. Selection ranks
  requests by age and fills the available ports. How age is kept is not
  specified in the published description.
* **Wakeup matrix rather than tags.** Producers are named by entry, in the
  style of a dependence matrix.
* **No replay.** The evaluated processor keeps entries until loads are known
  to hit, and replays mis-scheduled instructions. Loads here are scheduled at
  their predicted hit latency (3), and entries are released right after issue.
  There is no cancel input.
* **Dispatch width 4** is assumed, equal to the fetch and decode width.

The queue size (32), issue width (4) and latencies (ALU 1, load 3,
integer multiply 10 and divide 15, FP add 4, FP divide 15, square root 24) are
those of the evaluated integer machine. The rest of that processor is not
included: front end, re-order buffer, load/store queue, caches, functional
units, scoreboard and replay, and the 20-entry floating-point queue.

## Verification

Every block has a self-checking testbench in `tb/` that compares against
values computed in the testbench. Each ends with a `TB_RESULT checks=.. failures=..` line.

* `tb_dls_scheduler` runs the full design at its default sizes. The testbench
  acts as the front end. Next to the design it keeps a reference model of the
  scheduling rules, written over instruction records. It compares selections,
  port assignment and free entries every cycle. Independently of that model, it
  checks that no instruction issues before its producers' results exist
  (`issue(consumer) >= issue(producer) + latency`), and that every instruction
  issues once and the queue drains. Its phases are:
  * the four-instruction example above, with exact cycles;
  * an 8-long ALU chain issuing one per cycle;
  * load-use, divide-use and multiply-use distances of exactly 3, 15 and 10;
  * about 6000 random instructions, with random port outages and bursts of
    long-latency chains that fill the queue;
  * 1600 instructions with the integer mix of the evaluated programs: 44.3%
    one-cycle results, 32.0% multi-cycle results, 23.7% without a register
    result. They are arranged as two dependence chains with cross links, so
    that at most four instructions request at once. Every producer level then
    issues in one cycle. Each instruction must issue exactly at its dataflow
    limit, `max(dispatch + 2, issue(producer) + latency)`, as under an
    unpipelined scheduler.

  It counts and requires: wakeups in advance, held consumer levels, cycles with
  `load` low, back-to-back issues, delayed multi-cycle wakeups, port contention,
  unavailable ports, a full queue, producers in the same dispatch group, and
  issues at the dataflow limit. A run takes well under a second.
* `tb_wakeup_logic`, `tb_wakeup_muxes`, `tb_d_logic`, `tb_zdl`,
  `tb_selection_logic` and `tb_dls_classify` test each block with directed
  cases plus random stimulus. Some of them use smaller N.

Running one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/dls_pkg.sv tb/tb_dls_scheduler.sv \
          --top-module tb_dls_scheduler -o sim
./obj_dir/sim
```

## Changing it

* Size: override `N`, `W`, `D` on `dls_scheduler`, or the defaults in
  `dls_pkg`. The selection logic counts, for every entry, its older requesting
  entries. That is O(N^2) and is the block to restructure first for large
  queues. `LAT_W` must hold the longest latency.
* A cancel/replay path would clear `issued_q` and `woke` of the affected entries.
  It would also have to restore their dependence bits.
