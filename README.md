# Replica-level scheduling directives for a many-core task dispatcher

This is the hardware dispatcher of a shared-memory many-core processor whose
programs are task graphs. A program is a set of serial tasks. Many of them are
*duplicable*: one piece of code runs as `n` replicas, replica `i` working on
element `i` of some data. A hardware scheduler tracks the tasks and hands
replicas to idle cores within a few cycles. It can send a burst of consecutive
replicas of one task in a single cycle.

Classic precedence applies to whole tasks: every replica of A must finish
before any replica of B starts. That hides parallelism when B_i needs only
A_i and A_i-1. It also lets two tasks that read the same data drift so far
apart that the data leaves the shared cache between the two uses. This design
adds *directives* that relate the replicas of two tasks. To keep the hardware
small, every directive reduces to a closed-form count: how many more replicas
of a task may start now. That count is computed from four numbers per task.

| state | meaning |
|-------|---------|
| `n`   | replicas in the task (1 for a regular task) |
| `s`   | replicas started (dispatched) |
| `c`   | replicas completed |
| `es`  | lowest index that has started but not completed (`s` if none is running) |

Replicas of a task always start in index order. Completion can come in any
order, so `es` can jump by any amount. `es` is the only number that needs
real hardware. It comes from the *thread re-order buffer*: a min-tree over
what the cores are running.

## The directives

Each task slot holds up to `N_CONS` constraint entries
(`sched_pkg::constraint_t`: kind, partner slot, signed argument). Each entry
yields a count. The task may dispatch `min(all counts, n - s)`, clamped at 0.
In the table, X is the task holding the entry and P is its partner.

| kind (`dir_kind_e`) | meaning | permitted count |
|---|---|---|
| `DIR_SAC` (l) | X_j starts only after P_0 .. P_(j+l) have all completed (Start-After-Complete with a sliding offset) | `P.es - X.s - l` |
| `DIR_SAS_LO` (lmin) | X_j starts only after P_(j+lmin) has started (X trails P by at least lmin) | `(P.s - X.s) - lmin` |
| `DIR_SAS_HI` (lmax) | X stays at most lmax replicas ahead of P | `lmax - (X.s - P.s)` |
| `DIR_LNAR` (K) | at most K replicas of X run at once | `K - (X.s - X.c)` |
| `DIR_ACF` | X and P share the free cores evenly | `ceil(((P.s-P.c) - (X.s-X.c) + free) / 2)` |
| `DIR_LNR` (K) | X_i starts only after X_(i-K) completed (a window of K past `es`) | `K - (X.s - X.es)` |
| `DIR_SAMC` (M) | X_j starts only after P_(Mj) .. P_(Mj+M-1) completed (merge) | `P.es / M - X.s` |

Start-After-Start between two duplicable tasks, SAS(B, A, lmin, lmax), takes
two entries: `DIR_SAS_LO` with `lmin` on B and `DIR_SAS_HI` with `lmax` on A.
Setting `lmin` and `lmax` close together keeps the two tasks in near-lockstep.
This keeps their shared data in cache. Leaving a range lets the faster task
send bursts.

Whole-task precedence is a mask per slot (`cfg_prec`): the slot waits until
every masked slot has `c == n`. Priority is a number per slot; a larger number
wins. Start-After-Start between two *regular* tasks needs no extra hardware.
Give B the union of A's and B's predecessors and give A the higher priority.

The SAC rule is conservative, and this is what keeps it cheap. If B_j really
depends on a scattered set of A replicas, the rule waits for every A replica
up to the highest one in that set. That only needs `es`, not a
per-replica scoreboard. A SAC offset can be negative: B_j then waits for
A_(j-|l|).

Two rules about the ends of tasks are this design's own:

- A constraint stops binding once its partner can no longer move. For SAC and
  SAMC that is when P has completed every replica. For the SAS forms and ACF
  it is when P has started every replica. Without this, the last `lmin`
  replicas of a trailing task could never start.
- A task whose constraint names a slot that is not loaded does not run.

## How es is computed: the thread re-order buffer

`thread_rob` is a binary tree of two-input minimum nodes over the `N_CORES`
cores. Each leaf takes the core's replica index if the core is busy with a
replica of the requested task. Otherwise the leaf gives the null value
(all ones). The root therefore holds the lowest running replica of that task.
The default 64-core tree has 6 levels and 3 register ranks, one after every
second level. It accepts a new task ID every cycle and returns its result
3 cycles later.

The tree sees only replicas that are running on a core. That has two
consequences, and the design handles both:

1. **No replica running.** Then every started replica has completed, and `es`
   should equal `s`. A replica on its way down the dispatch tree, however, has
   started but is not on a core yet. So the request carries the task's
   *arrived* count, the number of its replicas that had reached a core when the
   leaves were sampled. The result is `es = min(tree, arrived)`. Replicas go out
   in order, so every index below `arrived` is either on a core, and seen by the
   tree, or completed. The dispatch tree reports each burst's arrival in the
   same cycle in which the cores get it.
2. **Latency.** The scheduler receives `es` a few cycles late. `es` never
   decreases, so an old value is a lower bound. Every directive then gives a
   smaller or equal count, which is safe. The system testbenches check that the
   scheduler's `es` never exceeds the true value and that it reaches `n` at
   the end.

With `N_ROB = N_SLOTS` (the default), each slot has its own tree. With fewer
trees, each tree is time-multiplexed round-robin over its share of the slots.
`N_ROB = 1` is a single shared tree. Each request carries a one-bit
generation tag of its slot. A result for a slot that was reloaded in the
meantime is dropped.

## Dispatch tree

`dispatch_network` is a binary tree from the scheduler to the cores with a
register at every node. Its top is cut off: the tree has `N_PORTS` root ports
(default 4), each feeding its own subtree of `N_CORES / N_PORTS` cores. Every
port takes one burst (slot, first index, count) per cycle, so up to
`N_PORTS` different tasks can start in the same cycle, and each burst can
carry as many replicas as its subtree has free cores. A burst is split at
every node. The lower indices go left, as many as the left subtree has free
cores, and the rest go right. A burst therefore lands in the same cycle on
`count` cores, with indices ascending by core number. It lands
`log2(N_CORES / N_PORTS) + 1` cycles after issue: 5 cycles for 64 cores and
4 ports.

Each node keeps a credit counter for each child: the free cores in that
subtree that the node has not yet promised. A node subtracts what it sends
down. It adds the completions that the subtree's cores report in the same
cycle. Each port's counter is its `free_cores` entry, and the scheduler never
issues more than that on the port. So a burst always fits and no node needs a
queue.

## Scheduler

`task_scheduler` holds the slot table. It counts `s` at issue, `c` from the
cores' completion pulses, and the arrived count from the tree's arrival
reports, and writes `es` from the ROB results. Each slot has its own
`directive_eval`, which is purely combinational. Every cycle, the scheduler
looks at the slots that are loaded, have replicas left, have their
predecessors done and have a non-zero count. It fills the ports in order. The
slot with the highest priority goes first (on a tie the lower slot number
wins): it takes `min(count, free_cores[p])` replicas on each port until its
count is used up, with consecutive indices starting at `s`. A port it leaves
free goes to the next slot in priority order, one slot per port. A slot whose
directive names a slot already chosen in that cycle, or is named by one,
waits for the next cycle: its count was computed before that cycle's
dispatches. The ACF fair share uses the free cores of all ports together.

## Interface and timing (`hypercore_sched_top`)

- **Configuration.** Pulse `cfg_clear` to unload every slot; do this only when
  no replica is running. Pulse `cfg_we` with `cfg_slot`, `cfg_n`, `cfg_prio`,
  `cfg_prec`, `cfg_cons` and `cfg_addr` to load a slot; its `s`, `c` and `es` restart from
  0. Reload a slot only when none of its replicas is running.
- **Cores.** `core_disp_valid[j]` pulses for one cycle with `core_disp_task[j]`
  (slot number), `core_disp_rep[j]` (replica index, starting at 0) and
  `core_disp_addr[j]` (the task's start address, given as `cfg_addr` when the
  slot was loaded). When
  the replica finishes, the core pulses `core_done[j]` for one cycle. This may
  not happen in the cycle of the dispatch pulse.
- **Latencies.**
  - A burst issued in cycle t reaches the cores in cycle
    t + log2(N_CORES / N_PORTS) + 1.
  - A completion in cycle t counts in `c` and in the tree's credits from cycle
    t + 1.
  - `es` lags the core states by `ROB_STAGES` cycles. With fewer trees than
    slots, add up to `ceil(N_SLOTS / N_ROB)` cycles for the round-robin turn.
- **Status.** The outputs are each slot's state (`slot_state`: n, s, c, es) and
  the loaded, done, runnable and blocked flags. They also include each port's
  issued burst (`issue_*[p]`) and `free_cores[p]`.

Assertions check these rules:

- A burst fits the free cores.
- A core receives one replica at a time.
- A completion comes only from a busy core.
- `c <= s <= n`.
- A slot is cleared or reloaded only when idle.

### Parameters

| parameter | default | source |
|---|---|---|
| `N_CORES` | 64 | the reference system (a power of two) |
| `ROB_STAGES` | 3 | the quoted 3-cycle es tree for 64 cores |
| `N_SLOTS` | 4 | design choice |
| `N_ROB` | 4 | design choice (one tree per slot) |
| `N_PORTS` | 4 | design choice (root subtrees of the dispatch tree, a power of two) |
| `N_CONS` | 2 | design choice |
| `PRIO_W` | 4 | design choice |
| `sched_pkg::REP_W` | 24 | design choice: up to 16,777,214 replicas per task |

## What is not here, and where this design departs

- The cores, the banked shared cache and its interconnect, and DRAM belong to
  the processor around this dispatcher. They are not part of this RTL.
  Testbenches model the cores as replicas of random length.
- Both dispatch modes of the tree are combined: one task per root subtree per
  cycle, with as many replicas as that subtree has free cores. Favouring
  tasks by how many replicas they could dispatch is not built.
- Priorities are per task; there are no per-replica priorities. Perfect
  lockstep between two tasks still works: SAS with range (0, 1) alone forces
  the order A, B, A, B, because at every point only one of the two may start
  a replica.
- For SAC, the formula `es - s - l` was chosen over the rule form that makes B_j
  wait for A_(j-l). The two differ only in the sign of `l`, and `l` is signed
  here.
- The fair-share rule for ACF and the rounding of SAMC at the end of the
  partner task are this design's choices. So are the credit-based splitting in
  the tree, the `arrived` correction of `es`, the configuration port and the
  tie-break.
- Cache behaviour under SAS (miss rate and run time against gap size) depends
  on the memory system. This RTL cannot reproduce it.

## Files

| file | content |
|---|---|
| `rtl/sched_pkg.sv` | widths, `constraint_t`, `task_state_t`, `dir_kind_e` |
| `rtl/directive_eval.sv` | permitted-count logic for one slot |
| `rtl/thread_rob.sv` | pipelined, task-filtered min-tree giving es |
| `rtl/dispatch_network.sv` | burst-splitting dispatch tree with credits |
| `rtl/task_scheduler.sv` | slot table, selection, burst issue, ROB sequencing |
| `rtl/hypercore_sched_top.sv` | the system: scheduler, tree, core status, ROBs |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

| testbench | what it does |
|---|---|
| `tb_directive_eval` | 20,000 random states and constraints against a 64-bit reference; the two-core SAS example (lmin 2, lmax 4) |
| `tb_thread_rob` | random core states, a new task every cycle; value and the 3-cycle latency; the 8-core example with pairs (A,4) (B,1) (A,7) (A,9) (A,6) (A,10) (B,3) (B,4) gives es 4 for A and 1 for B |
| `tb_dispatch_network` | random bursts on all four ports at once against a model; arrival cycle, one replica per idle core of the port's subtree, index order, free-core count per port |
| `tb_task_scheduler` | scheduler with a behavioural tree and ideal es (`sched_env_model`), 16 cores, 2 shared es channels |
| `tb_hypercore_sched_top` | the whole system at default size (all parameters at their defaults) |
| `tb_hypercore_sched_shared_rob` | the whole system with one time-multiplexed ROB, 2 stages, 16 cores |
| `tb_sas_image_workload` | x and y gradient of a 2000 x 2000 image: 2 x 4,000,000 replicas paced by SAS with lmin = 2 x cores = 128 and lmax = 192, at full size (about 1.7 million cycles, some seconds) |

`tb_task_scheduler` and the two `tb_hypercore_sched_*` benches use
`sched_harness`. It runs four workloads:

- SAC with offset 1, LNAR with K 5, and a regular task behind a precedence
  mask;
- SAS (2, 8), LNR with K 4, and SAMC with M 3;
- ACF, and two regular tasks of different priority;
- perfect lockstep: SAS (0, 1) between two tasks of equal priority, behind a
  regular task and joined by another. The issue order must alternate
  A, B, A, B, one replica at a time.

`tb_sched_check_pkg` checks every burst at replica level: which replicas had
started or completed. It does not reuse the count formulas. The harness also
checks the priority rule (the best eligible slot is always issued), that a
task's bursts on several ports carry consecutive indices, and the bound on
`es`. It counts how often each mechanism occurred: bursts, core-limited
bursts, arbitration, precedence waits, `es` jumps, several tasks starting in
one cycle, one task spread over several ports, and each directive holding a
task. A mechanism that never
occurs is a failure.

To build and run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/sched_pkg.sv tb/tb_sched_check_pkg.sv tb/tb_hypercore_sched_top.sv \
    --top-module tb_hypercore_sched_top
./obj_dir/Vtb_hypercore_sched_top
```

Always list `rtl/sched_pkg.sv` first. Add `tb/tb_sched_check_pkg.sv` for the
benches that use `sched_harness`. For a smaller image run, lower `N_PIX` in
`tb_sas_image_workload`.
