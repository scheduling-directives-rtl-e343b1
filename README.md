# Scheduling directives for duplicable tasks: dispatch hardware in SystemVerilog

In a shared-cache many-core processor programmed as a task graph, a hardware
scheduler dispatches tasks to cores as soon as their predecessors have
finished. Data-parallel work is written as *duplicable tasks*: one task with
`n` replicas, dispatched in bursts, replica 0 first. The usual precedence
rule works on whole tasks only ("all of A before any of B"). That throws away
parallelism, and it cannot pace two tasks that read the same data so that the
second one finds the data still in the cache.

This RTL builds the dispatch side of such a processor, extended with
*scheduling directives*. A directive constrains the replicas of one task
against the progress of another. Each directive becomes a simple count
formula over four per-task counters:

| counter | meaning |
|---|---|
| `n`  | number of replicas |
| `s`  | replicas started (dispatched) |
| `c`  | replicas completed |
| `es` | lowest replica index that has started but not completed (`s` when none is running) |

The one hard part is `es`. Replicas complete out of order, so `es` can jump
by any amount. It is computed by a *thread re-order buffer*: a tree of
minimum units over what the cores are running.

The design follows the paper "Scheduling directives: Accelerating
shared-memory many-core processor execution", which proposes the directives,
their formulas and the re-order buffer. The paper states only what the
scheduler and the distribution tree do. Their internals here are this
design's own, and so are all widths and table sizes. The section
[Departures and open points](#departures-and-open-points) lists where the RTL
departs from the paper or fills a gap in it.

## Block structure

```
             cfg (task table, directive table), run
                          |
                 +-----------------+  dup_id[k]   +----------------+
                 |  hc_scheduler   |------------->| thread_rob x4  |
                 | directive_eval  |<-------------| (min trees)    |
                 |   x NUM_DIR     |  es[k]       +----------------+
                 +-----------------+                     ^
                   | one burst (task, base, count)       | (busy, task, replica) per core
                   | per sub-tree, x ROOT_FANOUT         |
                   v                                     |
                 +-----------------------------------------+
                 | dispatch_network: ROOT_FANOUT binary    |
                 |   sub-trees of dispatch_node            |
                 |   leaves hold each core's task/replica  |
                 +-----------------------------------------+
                   | core_start / core_tid / core_rep   ^ core_done
                   v                                    |
                          cores (outside this design)
```

| file | role |
|---|---|
| `rtl/sched_pkg.sv` | widths, directive kinds, configuration and request structs |
| `rtl/hc_sched_top.sv` | top: scheduler, distribution tree, `NUM_ROB` re-order buffers |
| `rtl/hc_scheduler.sv` | task table, directive table, `es` handling, task selection, one burst per sub-tree |
| `rtl/directive_eval.sv` | allowance formula of one directive (combinational) |
| `rtl/dispatch_network.sv` | distribution tree from the scheduler to the cores: `ROOT_FANOUT` binary sub-trees |
| `rtl/dispatch_node.sv` | one tree node: splits a burst between its two sub-trees |
| `rtl/thread_rob.sv` | re-order buffer: filtered, pipelined minimum tree giving `es` |

The defaults are 64 cores in 4 sub-trees of 16, 4 re-order buffers, 8
directive entries and 16 tasks. Replica counters are 24 bits wide, enough for 16.7 million replicas per
task.

## The directives

Replicas are numbered from 0. For each directive, `directive_eval` computes
an *allowance*: how many more replicas of the constrained task B (and, for
SAS and ACF, of task A) may be dispatched now. A value of 0 or less means
none. If several directives name a task, its allowance is the smallest of
them, further capped by its remaining replicas `n - s`.

| kind | parameters | rule | allowance |
|---|---|---|---|
| SAC (start after complete) | `l` | B_j starts only after A_0 .. A_{j+l} have all completed | `A.es - B.s - l` |
| SAS (start after start) | `lmin, lmax` | keeps the gap `A.s - B.s` between `lmin` and `lmax` | B: `(A.s - B.s) - lmin`; A: `lmax - (A.s - B.s)` |
| SAMC (start after merged completion) | `M` | B_j needs A_{Mj} .. A_{M(j+1)-1} completed | `floor(A.es / M) - B.s` |
| LNAR (limit active replicas) | `K` | at most K replicas of B running | `K - (B.s - B.c)` |
| LNR (limit span after earliest) | `K` | B's running replicas lie within K indices of `B.es` | `K - (B.s - B.es)` |
| ACF (assign cores fairly) | — | neither task runs more replicas than the other, plus one | `(A.s-A.c) - (B.s-B.c) + 1`, and the mirror for A |

SAC is deliberately conservative. If B_j really depends on a scattered set of
A replicas, you give `l` so that the highest of them is A_{j+l}, and B_j then
waits for every A replica up to that one. A negative `l` lets the first
replicas of B start with no dependence at all.

All of SAC, SAMC and LNR need `es`. SAS, LNAR and ACF use only the counters.

Two further constraints exist between whole tasks:
- **Task-level SAC:** a 16-bit prerequisite mask per task. The task is not
  dispatched until every task in its mask has completed.
- **Priority:** a larger number wins, and on a tie the lower task ID wins.

"SAS between regular tasks" needs no hardware of its own. Give B the
prerequisites of A and a lower priority than A; a regular task is simply a
task with `n = 1`.

## Computing `es`: the thread re-order buffer

Every leaf of the distribution tree holds what its core is running:
`(busy, task ID, replica index)`. A `thread_rob` works as follows:

1. It keeps only the leaves whose task ID equals its `dup_id` input.
2. It takes the minimum of their replica indices in a binary tree.
3. At 64 cores the tree has 6 levels, with a pipeline register after every
   second level and after the root. The result is therefore 3 cycles old.
   It also carries the `dup_id` it was computed for (`es_tid`), so one buffer
   could be time-multiplexed over several tasks.

In the top, each buffer serves one task at a time. The scheduler assigns a
buffer to a task when that task's first replica is dispatched, but only if a
directive needs the task's `es`. The buffer is freed when all of the task's
replicas have completed. While all buffers are in use, such a task waits.

**Latency correction.** This is the subtle point of the design. A replica
enters the `s` count when it is dispatched. It only becomes visible to the
buffer after two delays:
- the distribution tree: `log2(cores / ROOT_FANOUT) + 1` cycles (5 at the
  defaults);
- the buffer pipeline: 3 cycles at 64 cores.

During that window the buffer can miss a replica that is in flight, and would
then report an `es` that is too high. That is unsafe: SAC could release B too
early. So for every buffer the scheduler keeps a short history of the task's
`s` and uses

```
es = min(buffer result, s as it was ES_LAG cycles ago),   ES_LAG = log2(cores / ROOT_FANOUT) + buffer latency + 1
```

Any replica the buffer cannot yet see has an index of at least that old `s`,
so this `es` is never above the true one. Once a task has completed, its `es`
counts as infinite, so later dependants are free to start. The end-to-end
testbench shows that shortening `ES_LAG` to 2 lets replicas start before
their predecessors have finished.

## Dispatch: bursts down a tree

The scheduler is itself the root of the distribution tree. It drives
`ROOT_FANOUT` sub-trees (4 by default), and each sub-tree reports how many of
its cores are idle. Each cycle the scheduler does the following:
1. A task is eligible if it is valid, its prerequisites are done, its
   allowance is positive and, if it needs `es`, it has or can get a buffer.
2. It walks the sub-tree ports in order. A port with idle cores gets one
   request `(task, base, count)` for the current task: `count` is the smaller
   of what is left of that task's allowance and the port's idle cores, and
   `base` continues where the previous port's burst ended.
3. When the current task's allowance is used up, the next port gets the
   eligible task with the next-highest priority (the lower task ID wins a
   tie).

So in one cycle a large duplicable task can fill several sub-trees, and
different tasks can go to different sub-trees. A regular task is a burst of
one. Replicas of a task are always dispatched in index order.

All allowances are computed from the state at the start of the cycle. Two
tasks linked by a directive can both be dispatched in the same cycle, because
each directive only loosens its hold on one task when the other task moves
on. At most one buffer is handed out per cycle.

Each sub-tree of `dispatch_network` is a binary tree of `dispatch_node`s. Each
node keeps a credit count of idle cores for each child. It sends as much of
the burst left as the left child has room for, sends the rest right with
`base` advanced, and registers both halves. So every level costs one cycle,
and a replica reaches its core `log2(NUM_CORES / ROOT_FANOUT) + 1` cycles
after the request. When a core finishes, the number of completions in each
sub-tree flows back up combinationally and refills the credits.
`NUM_CORES / ROOT_FANOUT` must be a power of two from 2 to 128.

## Core interface and configuration

**Cores.** When a replica arrives, the top raises `core_start[k]` for one
cycle. At the same time `core_tid[k]` and `core_rep[k]` become valid, and
`core_busy[k]` goes high. The core answers with a one-cycle `core_done[k]`
when it finishes. Any number of cores may finish in the same cycle.

**Configuration.** Load the tables while `run` is low:
- *Task entry:* write `cfg_task = {valid, n, prio, prereq}` to entry
  `cfg_task_idx` with `cfg_task_we`. Writing an entry clears its `s` and `c`.
- *Directive entry:* write `cfg_dir = {valid, kind, b, a, p1, p2}` to entry
  `cfg_dir_idx` with `cfg_dir_we`. The parameters are `p1 = l, lmin, M` or
  `K`, and `p2 = lmax`. They are signed, 25 bits wide.

Then raise `run`. The outputs `task_s` and `task_c` show progress, and
`all_done` rises when every valid task has completed.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line.

| testbench | what it checks |
|---|---|
| `tb_thread_rob` | the 8-core worked example: cores running (A,4) (B,1) (A,7) (A,9) (A,6) (A,10) (B,3) (B,4) give `es` 4 for A and 1 for B. Also 2000 random cycles on 64 cores against a reference minimum, including the 3-cycle latency. |
| `tb_directive_eval` | the SAS pacing example (`lmin=2, lmax=4`), a SAMC case, and 20 000 random entries against an integer model |
| `tb_dispatch_node` | burst split, right-hand base, credit and free count against a model |
| `tb_dispatch_network` | 8 cores in 2 sub-trees, random bursts on both ports: every replica reaches exactly one core of its own sub-tree, exactly `log2(4)+1` cycles after its request |
| `tb_hc_scheduler` | the scheduler with two modelled sub-trees, cores and buffers. A scoreboard checks each dispatched replica against the definition of every directive (ACF included), and the test requires cycles in which the two ports carry different tasks. |
| `tb_hc_sched_top` | end to end on 8 cores (2 sub-trees) and 2 buffers: SAMC (`M=2`, 5+3 replicas, two priority orders), SAC, SAS, LNAR/LNR/ACF, buffer shortage, prerequisites, SAS between regular tasks (B must not start before A). It counts 18 mechanisms and fails if one never acted: bursts, bursts cut by idle cores, all cores busy, each directive holding a task, `es` from the tree, `es` from the history, buffer waits, prerequisite waits, priority decisions, several completions in one cycle, several tasks dispatched in one cycle, one task spread over several sub-trees. |
| `tb_hc_sched_top_full` | default parameters (64 cores in 4 sub-trees). First a SAC/SAMC/LNR graph. Then the image-derivative workload: two tasks of 4 000 000 replicas each (a 2000 × 2000 image), paced by SAS with `lmin = 80 000`, `lmax = 80 128`. It completes in about 1.39 million cycles with replicas lasting 2 to 8 cycles, and the gap stays within range. It runs in well under a minute. |

The end-to-end testbenches share `tb/tb_top_common.svh`. It holds the
behavioural cores and the scoreboard, which checks every replica at the moment
it starts on a core. The scoreboard does not check ACF at core start, because
in-flight replicas make the balance there ill-defined; `tb_hc_scheduler`
checks ACF at dispatch instead.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hc_sched_top \
    -y rtl -y tb rtl/sched_pkg.sv tb/tb_hc_sched_top.sv
./obj_dir/Vtb_hc_sched_top
```

Use the same command for any other testbench, naming it as the top module.
The testbenches use only `$urandom`. Every register that is read is reset.

## Departures and open points

- **Several tasks per cycle.** The paper says that each sub-tree can take
  one task per cycle, but elsewhere also speaks of one regular task per
  cycle; this design follows the first and sends up to `ROOT_FANOUT` tasks
  per cycle. The paper does not say how the dispatcher chooses them. The
  priority-ordered fill of the ports described above is this design's own.
  A sub-tree whose burst runs out of allowance part-way leaves its other
  idle cores unused until the next cycle.
- **Tree fan-out and credits.** The root fan-out of 4 follows the paper's
  sketch; the text leaves it open. The nodes below the root are binary. The
  credit scheme that tells a node where the idle cores are is this design's
  own.
- **ACF.** The paper's two formulas for ACF disagree when both tasks have the
  same number of running replicas: one allows a replica, the other allows
  none. The RTL follows the per-replica rule and allows it.
- **Example 4 arithmetic.** In the paper's SAS worked example one step prints
  an allowance of 2 where the formula gives 0. The RTL uses the formula.
- **End of the reference task.** A dependence on a replica beyond the last
  one of A counts as met once A has fully completed (SAC, SAMC) or fully
  started (SAS, ACF). Without this rule, the last replicas of B could wait
  forever.
- **SAMC division.** SAMC uses a real divider (`es / M`) with `M` set at run
  time. An implementation that only needs power-of-two `M` would use a shift.
- **Start addresses.** Cores receive the task ID, not a start address; a core
  would look the address up itself.
- **Choices of this design.** The following are not taken from the paper: the
  table sizes (16 tasks, 8 directives, 4 buffers), the widths, asynchronous
  active-low reset, the configuration port and `run`, the tie-break, the
  buffer allocation policy and the `es` latency correction.
- **Not modelled.** The cores, the multistage memory interconnect, the
  shared-cache banks and off-chip memory are outside this design. So are the
  buffer's power, area and frequency figures for 64 cores at 65 nm. Cache
  effects of SAS pacing, such as miss rate against gap size, cannot be seen
  here, because no memory system is modelled.
