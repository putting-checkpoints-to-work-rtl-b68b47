# Checkpointed thread-level speculation for a 4-processor CMP

Thread-level speculation (TLS) runs the pieces of a sequential program, called
*tasks*, in parallel on several processors. Each task is speculative until
every task before it in program order has committed. When a less speculative
task stores to a word that a more speculative task has already read (an
*exposed read*), the reader consumed a stale value and must be squashed.
Plain TLS restarts the reader from its beginning and throws away everything it
did before the bad load.

This RTL cuts that waste by placing **checkpoints** inside running tasks. A
dependence predictor watches the loads of each processor. When it flags a load
as likely to be violated, and the insertion policy agrees, the hardware splits
the running task right before that load. The new piece is an ordinary
speculative task that is:

- the immediate successor of the task it split;
- pinned to the same processor;
- given a snapshot of the register file.

A later violation of that load rewinds only to the checkpoint. Kills and
restarts are also made selective:

- Only tasks spawned by squashed execution are killed.
- Of the remaining successors, only those that overlap in time with squashed
  execution are restarted.

The system modelled has 4 out-of-order cores with private 16 KB 4-way
multiversioned L1 data caches and a shared L2. Tasks are spawned out of order:
a child is placed right after its parent, ahead of the parent's older
children. The cores and the caches' data arrays are outside this RTL. The core
interface is brought out as ports.

## Task slots and identifiers

Every task, spawned or checkpoint, lives in a global *slot*. Processor `c` owns
slots `c*9 .. c*9+8` (`TPC = 9`), 36 in all (`NT`):

- Local slot 0 holds the task that was spawned onto the processor.
- Local slots 1..8 hold up to `CP_MAX = 8` checkpoints of it.

The running task is always the newest local slot (`cur`). A checkpoint of a
checkpoint is allowed, so a processor runs a chain 0, 1, ..., `cur`. Each
element of the chain is the parent and immediate predecessor of the next.

`task_order_list` holds the global speculation order as a precedence matrix
over the 36 slots. For each live slot it also keeps:

- the parent;
- a start timestamp (the system cycle counter when the task began);
- an end timestamp;
- a *done* flag, set by the task's commit instruction or when the task is
  checkpointed.

The head commits when it is done. An inserted task goes directly after its
parent.

## Dependence prediction (`dep_predictor`)

Three predictors are combined:

- **Address predictor.** `critical_buffer` is used as a 32-entry Critical
  Address Buffer. It is fully associative with FIFO replacement and holds the
  addresses of words that have been violated. A load to one of these addresses
  is predicted dependent.
- **PC predictor.** `pc_predictor` combines a 32-entry Critical PC Table
  (another `critical_buffer`) with a 64-entry `pc_xlate_table`. A violation
  reports an address, not a PC, so every exposed load records (address, PC) in
  the translation table. On a violation the address is translated to the PC of
  the violating load, and that PC is marked critical.
- **Hybrid bimodal selection.** `meta_predictor` is a direct-mapped table of
  128 five-bit counters, indexed by PC bits [8:2]. The counter's MSB chooses
  between the two predictors. It is trained only when they disagree. The
  training is biased towards catching violations:
  - if the load really was violated, the counter is *saturated* towards the
    predictor that was right;
  - otherwise it moves one step towards the predictor that said "no
    dependence".

  `MODE` can also select a plain OR or AND of the two predictors.

## When a checkpoint is placed (`ckpt_policy`)

A checkpoint is placed before a predicted load only if both of these hold:

- the chain still has a free checkpoint, i.e. `CP < CP_MAX`;
- the task has grown large enough: `size * CP_MAX > C * (CP + 1)`, with
  `C = 100`.

Here `size` counts retired instructions since the task started or since the
latest checkpoint. The threshold therefore rises from 12.5 instructions for
the first checkpoint to 100 for the last one. Cheap early checkpoints are
allowed; scarce late ones need more work to protect.

## The checkpoint itself (`ckpt_controller`, `shadow_regfile`)

In the cycle the predicted load is presented, the controller does all of the
following:

- switches the task tag of the load, and of everything after it, to slot
  `cur+1`;
- copies the register file into shadow copy `cur` (one cycle, flash copy);
- marks slot `cur` done;
- inserts `cur+1` into the order right after it.

On a squash, the lowest own slot named in the restart or kill mask decides:

- **Restart of slot k ≥ 1 (a rewind).** Drop slots above k. Restore the
  registers from shadow copy k-1. Redirect the core to the load where the
  checkpoint was placed.
- **Restart of slot 0.** Redirect to the spawn PC and SP only. Spawned tasks
  receive no live-in registers.
- **Kill of slot 0.** The processor becomes idle.

A task that has been restarted three times stalls (`stall`) until it is the
head. A failed allocation in the L1 requests a restart of the running task,
which is the most speculative one on the processor.

## Selective kill and restart (`squash_unit`)

This is the subtle part. Every store goes over a one-store-per-cycle bus. Each
L1 reports the slots that hold an exposed read of the stored word. Those more
speculative than the storer are violated.

Each request waits so that its kill/restart chain is applied exactly 12 cycles
after the store, the violation-to-restart latency of the evaluated system.
Requests are served least speculative first.

The chain is computed in one cycle over the ordered task list. Walking from
the violated task towards more speculative tasks:

1. The violated task is restarted. Its start time becomes the *earliest squash
   time* `E`.
2. A later task whose parent was killed or restarted in this chain is
   **killed**: it was spawned by wrong execution. `E` becomes the minimum of
   `E` and its start time.
3. Any other later task is **restarted** only if it overlaps the squashed
   work, that is, if it is not done or its end time is later than `E`. `E` is
   then updated the same way. Otherwise it is left running and keeps its
   results.

`E` covers every squashed task, not only the violated one. A later task may
have taken a forwarded value from any of them.

For comparison, `MODE = RST_PARENT` restarts every task that is not killed,
and `RST_BASE` kills everything after the violated task.

Example: a checkpoint 1.1 of task 1 is rewound. Task 2 was spawned by 1.0,
before the checkpoint, so it is not killed. If task 2 finished before 1.1
started, task 2 is left alone.

## Speculative cache state and the checkpoint memory optimisation (`spec_line_state`)

Each L1 set holds up to 4 versions. A version is (tag, owner slot, per-word
exposed bits, per-word written bits). A word the task wrote first is
protected, so its later reads are not exposed. A task's first access to a
line allocates a version. If every way holds a live version, allocation fails.

With `MEM_OPT = 1`, a checkpoint *load* of a word its parent already read
exposed does not allocate (`ev_shared`). A violation of that word would
restart the parent anyway, which kills the checkpoint. Stores always
allocate. Commit frees a task's versions; a kill or restart discards them.

Only this state is modelled. Line data, forwarding between versions and
write-back to L2 are not.

## Top level (`tls_ckpt_cmp`)

The top contains four `cpu_ckpt_unit`s, the order list, the squash unit, the
store bus and spawn logic:

- A spawn takes the lowest idle processor.
- The child is ordered at once and starts `SPAWN_LAT = 12` cycles later.
- A spawn is refused (`spawn_ack` low) if no processor is idle, or if the same
  processor places a checkpoint in that cycle.
- `boot_valid` starts the first task on processor 0.

Per-processor core ports are unpacked arrays `[NCPU]`:

- `ret_count`, `mem_*`, `commit_instr`, `spawn_*`, `rf_*`;
- `start_*` and `redirect_*` outputs;
- `stall`, `running`, `idle`, `cur_tid`;
- `ev_*` event strobes.

Global outputs: `commit_*`, `squash_*`, `violation`, `task_count`.

Timing conventions:

- Loads and predictions are combinational within the cycle.
- A store completes when `mem_ready` is high (bus granted).
- `redirect_valid` is a one-cycle pulse. The register file is already restored
  on the following cycle.

Shared constants and types are in `tls_ckpt_pkg`: `NCPU`, `CP_MAX`, `TPC`,
`NT`, widths, `VIOL_LAT`, `task_entry_t`, and the mode enums.

## Where this RTL departs from, or adds to, the described scheme

- **Register snapshot timing.** The snapshot is taken when the checkpoint is
  placed. The scheme describes a snapshot when the first instruction of the
  checkpoint commits. This is equivalent if the core presents loads in program
  order at retirement, which is what this interface assumes.
- **Squash chain.** The chain is one combinational pass, not a token passed
  task to task.
- **Overlap test.** It uses the earliest start time among squashed tasks, as
  the prose rule states. A pseudocode description of the same mechanism keeps
  the maximum instead; the prose rule was followed.
- **Own choices, not given by the scheme:**
  - line size (32 B) and word-granular tracking;
  - FIFO translation table with in-place update;
  - selector index bits and reset to the midpoint;
  - a 20-bit saturating size counter;
  - store bus arbitration;
  - spawn target choice and refusal;
  - slot numbering and boot;
  - one chain per 12-cycle window, served least speculative first.
- **Not built:** the cores, the L1 data arrays and forwarding, the L2, and the
  branch predictor.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing -Wno-fatal -Wno-lint -Wno-style -y rtl -y tb \
        rtl/tls_ckpt_pkg.sv tb/tb_tls_ckpt_cmp.sv --top-module tb_tls_ckpt_cmp
    ./obj_dir/Vtb_tls_ckpt_cmp

`tb_tls_ckpt_cmp` runs the top at its default parameters. It drives four
behavioural cores through a speculatively parallelised loop with a
loop-carried variable and counts every mechanism. It fails if any of them
never happens:

- spawns; predictions; checkpoints; violations;
- rewinds with register restore; kills;
- selective restarts; successors spared by the timestamp test;
- shared checkpoint loads; failed allocations;
- the restart-limit stall; in-order commit.

It also checks:

- the 12-cycle spawn latency;
- the register values after every rewind.

The workloads the scheme was evaluated with are SPEC CPU2000/2006 integer
programs compiled for TLS. They cannot be run without the cores. The loop in
`tb_tls_ckpt_cmp` stands in for them: it has the same loop-level task
structure and a loop-carried dependence. The default sizes match the evaluated
configuration:
- 32-entry critical tables;
- a 64-entry translation table;
- a 128 x 5-bit selector;
- 8 checkpoints per task;
- 16 KB 4-way L1s;
- 12-cycle spawn and squash latencies.

The unit testbenches compare against reference models. They use `$urandom`
traffic where the block allows it, and directed cases elsewhere, for example
the squash cases and the 12-cycle squash latency.

All testbenches pass. Verilator lint warnings remain, none of them
functional. One is a comparison that is always true when `CPU_ID = 0`.
