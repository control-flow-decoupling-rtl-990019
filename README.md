# Control-flow decoupling front end

Some branches are mispredicted by any predictor because their outcome depends
on data, and no history pattern helps: for example a test like
`if (a[i] > threshold)` inside a loop over random data. When such a branch
guards a large block of code it cannot be replaced by predicated
(if-converted) code. It can, however, often be *separated*. The compiler (or
the programmer) splits the loop into two loops with the same trip count:

* the first loop computes only the branch condition of each iteration and
  pushes it, one bit per iteration, onto an architectural **branch queue**
  (instruction `Push_BQ`);
* the second loop does the real work. In place of the original branch it has
  a `Branch_on_BQ`, which pops the next bit from the queue and branches on it.

By the time the second loop runs, the first loop has usually executed all of
its pushes. The fetch unit therefore reads each condition straight from the
queue while it fetches the `Branch_on_BQ`. The branch is not predicted: it is
already resolved at fetch, and the misprediction disappears. Loops that run
longer than the queue is deep are strip-mined into chunks of at most 128
iterations.

An optional extension (called CFD+ below) adds a **value queue** (VQ). The
first loop can pass values it has already computed to the second loop
instead of recomputing them. The VQ costs no storage of its own: it lives in
the physical register file, and a small renamer maps queue slots to physical
registers.

This repository holds synthesizable SystemVerilog for the hardware that
makes this work in an out-of-order superscalar core:
- the branch queue with its synchronisation bits;
- the queue-length counters that stall fetch of a push;
- the per-checkpoint snapshots and roll-back repair;
- a BTB that caches `Branch_on_BQ`;
- the fetch-bundle logic that resolves `Branch_on_BQ` at fetch;
- the VQ renamer.

The core around it is not included: the predictor, the rename map and free
list, the reorder buffer, the issue queues and the caches. It appears as
ports.

## Blocks

| File | Block |
|---|---|
| `rtl/cfd_pkg.sv` | sizes and shared types (BQ entry, BTB branch kind) |
| `rtl/bq.sv` | branch queue: 128 entries × {predicate, pushed, popped, checkpoint id} |
| `rtl/bq_length.sv` | `net_push_ctr` + `pending_push_ctr` = BQ length; full / free entries |
| `rtl/bq_ckpt_table.sv` | BQ head/tail snapshot per branch checkpoint (8) |
| `rtl/btb.sv` | 4096-entry, 4-way BTB, looked up per fetch bundle |
| `rtl/fetch_select.sv` | slot walk of a 4-wide bundle: pushes, pops, taken branches, next PC |
| `rtl/vq_renamer.sv` | CFD+ VQ renamer: 128 physical-register mappings of 8 bits |
| `rtl/cfd_top.sv` | the front end: PC register, misfetch handling, all of the above |

## How a predicate travels through the branch queue

The branch queue is a circular buffer with a speculative head and tail,
advanced at fetch, and a committed head and tail (`arch_head`, `arch_tail`),
advanced at retirement. Pointers carry one extra wrap bit. Each entry holds
six bits:

| field | meaning |
|---|---|
| `pred` | the predicate: the pushed value, or the value a speculative pop guessed |
| `pushed` | the push has executed and `pred` is the real value |
| `popped` | a pop consumed this entry before its push executed |
| `ckpt` (3 bits) | checkpoint of that speculative pop |

Instructions use the queue as follows:
- **Push fetched.** The push is allocated the tail entry, which clears
  `pushed` and `popped`. The push carries its entry index (`fe_slot_bq_idx`)
  down the pipeline.
- **Push executes** (`ex_valid`, `ex_idx`, `ex_pred`). It writes `pred` and
  sets `pushed`. If `popped` was already set, the push is *late*
  (`ex_late`). If the guessed predicate then differs from the real one,
  `ex_mispredict` is raised with the pop's checkpoint id (`ex_mp_ckpt`), and
  the core rolls back to that checkpoint.
- **Pop fetched.** The pop takes the head entry. Pops are resolved in fetch
  order, so the k-th pop of a bundle uses head entry k, and the bundle's
  four head entries are read in parallel with the BTB.
  - If `pushed` is set (the common case, an *early push*), the pop branches
    on the pushed predicate. Nothing is predicted.
  - Otherwise the pop is *speculative*. It branches the way the ordinary
    branch predictor says (`bp_dir` of its slot). Its guess goes into `pred`
    and `popped` is set.
- **Speculative pop renamed.** The core takes a branch checkpoint for it and
  writes the checkpoint id into the entry (`rn_bq_*`).

A push that executes in the very cycle its pop is fetched is forwarded to
the pop. The pop is then not speculative and the push is not late.

## Queue length and the push stall

A push may be fetched only if the queue has room. The room is measured
against the committed head, because a popped entry can be reused only after
its pop retires. The length is the sum of two counters in `bq_length`:

* `net_push_ctr`: pushes retired minus pops retired;
* `pending_push_ctr`: pushes fetched but not yet retired.

`free_slots = 128 − length`. In a bundle, pushes are delivered while they
fit. The bundle is cut just before the first push that does not fit
(`fe_bq_stall`), and fetch retries at that push every cycle. In a correct
program the stall always ends: at least 128 older pops are in flight, and
the first of them to retire frees an entry.

## Roll-back

The core rolls back to a branch checkpoint on a misprediction (including a
late-push mispredict), or to the committed state on an exception. In both
cases the queue is repaired in one cycle:

* Head and tail come from the checkpoint's snapshot (`bq_ckpt_table`,
  written when the checkpoint is taken with `ck_*`), or from
  `arch_head`/`arch_tail` on an exception (`rec_exception`).
* Every `popped` bit between the restored head and tail is cleared. Those
  pops are squashed and will be fetched again.
* `pending_push_ctr` drops by the distance between the tail before and
  after the roll-back: the number of squashed pushes.

Fetch restarts at `rec_pc` in the next cycle. The roll-back cycle fetches
nothing.

## Fetch bundles, the BTB and the misfetch

Fetch reads four aligned instructions per cycle. Slots before the fetch
address are not delivered. The instruction cache returns two predecode bits
per slot, one marking `Push_BQ` and one marking `Branch_on_BQ`. Pushes and
pops are therefore always counted exactly, even for a branch the BTB does
not know. `fetch_select` walks the slots in order:
- A push is allocated, or stalls as described above.
- A `Branch_on_BQ` takes its predicate from the queue window, or from the
  predictor for a speculative pop.
  - If it is taken and its BTB entry (kind `BR_BQ`) hits, fetch goes to the
    cached target in the next cycle, with no penalty.
  - If it is taken and misses in the BTB, the bundle ends at it and
    `fe_misfetch` is raised. In the next cycle nothing is fetched. Decode
    supplies the branch target on `dec_bq_target`; the branch is written into
    the BTB and fetch continues at the target. The penalty is one cycle.
- Other branches that hit in the BTB follow the predictor (conditional) or
  are taken (jump). A taken branch ends the bundle.

The BTB has 1024 sets of 4 ways. The set is selected by the bundle address.
An entry stores its tag, its slot in the bundle, its branch kind and its
target (without the two zero low bits). Up to four ways can hit at once, one
per slot. An update overwrites the entry of the same branch if there is
one, else an invalid way, else the way under a per-set round-robin pointer.
Branch-resolution updates enter on `bu_*`. A misfetch install takes priority
in its cycle.

## The VQ renamer (CFD+)

A VQ push is renamed like any instruction with a destination: it gets a
free physical register. That register number is written at the renamer's
tail. A VQ pop reads the number at the head and uses it as its source
register. From then on the pop simply waits for the push in the issue
queue, like any consumer for its producer. No value is stored in the
renamer.

Up to four lanes rename per cycle, in order. A pop whose push is in an
earlier lane of the same bundle receives the mapping directly. The core
checkpoints head and tail and restores them through `vq_rec_*`. Freeing the
register when the pop retires is the core's job.

## Contract with the core

`cfd_top` relies on the core for the following:

* **Rename before acting on a late-push mispredict.** The checkpoint id
  reported by a late push is the one the pop recorded at rename. The core
  must not act on `ex_mispredict` for a pop that has not yet been renamed,
  or must rename it in the same cycle (that value is forwarded).
* **Report retirements.** Report retired pushes and pops on
  `rt_npush`/`rt_npop`, and never more than are in flight.
* **No retirement on an exception roll-back cycle.** Do not retire in the
  cycle of an exception roll-back (`rec_valid` with `rec_exception`).
* **Take a checkpoint at every speculative pop** (`fe_slot_spec`). Give the
  snapshot the BQ head and tail as they stand after the pop: per slot on
  `fe_slot_head`/`fe_slot_tail`.
* **Follow the ISA ordering rules.** A pop never precedes its push, and
  never more than 128 pushes are unmatched by retired pops. Assertions in
  `bq`, `bq_length` and `cfd_top` check the queue invariants in simulation.

All state changes at the rising clock edge. `rst_n` is an asynchronous,
active-low reset that empties both queues, invalidates the BTB and sets the
PC to `RESET_PC`.

## Sizes

| parameter | default | where |
|---|---|---|
| BQ entries | 128 (6 bits each) | `BQ_SIZE`, `cfd_top.BQ_N` |
| VQ renamer entries | 128 × 8 bits | `VQ_SIZE`, `PREG_W` |
| branch checkpoints | 8 | `NUM_CKPT` |
| fetch width | 4 | `FETCH_W`, `cfd_top.W` |
| physical registers | 236 | `NUM_PREG` (used by the testbench) |
| BTB | 4096 entries, 4 ways | `BTB_ENTRIES`, `BTB_WAYS` |
| address width | 64 | `PC_W` |

These are the sizes of a 4-wide core with a 168-entry reorder buffer. Cores
with 324 or 452 physical registers would need `PREG_W = 9`. The
fetch-to-execute depth of that core is 10 cycles. It is not a parameter
here, but the end-to-end testbench executes pushes no earlier than 10
cycles after fetch.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Build any
of them with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/cfd_pkg.sv rtl/*.sv tb/tb_cfd_top.sv --top-module tb_cfd_top -o sim
./obj_dir/sim +verilator+seed+1
```

* `tb_bq`: directed early push, late push (right and wrong guess),
  push-to-pop forwarding and roll-back, then 4000 random cycles against a
  reference model. Uses a 16-entry queue so wrap-around is frequent.
* `tb_bq_length`: random fetch, retire and roll-back against a model,
  including the full condition.
* `tb_bq_ckpt_table`: random snapshots and roll-backs, exception
  roll-backs, and same-cycle forwarding.
* `tb_btb`: slot separation, eviction order, refresh, and random installs
  into colliding sets. Checks hit data and checks that nothing uninstalled
  hits.
* `tb_fetch_select`: directed cases plus 20,000 random bundles against a
  reference slot walk.
* `tb_vq_renamer`: random push/pop streams with same-bundle forwarding and
  snapshot restore.
* `tb_cfd_top`: the whole front end at its default sizes, with no parameter
  overridden. The testbench plays the instruction cache, a random predictor
  and an in-order-retiring core. It runs a strip-mined decoupled loop of
  three 128-iteration chunks, about 2,300 instructions in about 1,300
  cycles.
  - It checks that every retired instruction is the next one on the correct
    path, and that pops are resolved from pushed predicates.
  - It checks that mispredicts carry the right checkpoint and that VQ pops
    get their push's register.
  - It checks fetch timing. A misfetch costs exactly one fetch cycle. A
    taken `Branch_on_BQ` that hits in the BTB redirects fetch in the next
    cycle.
  - It fails unless each of these happened at least once: BQ-full stall,
    early push, speculative pop, late push, late-push mispredict with
    roll-back, exception roll-back, misfetch, taken `Branch_on_BQ` with a
    BTB hit, and VQ same-bundle forwarding.

## Own choices and limits

Several parts are choices made for this RTL:
- predecode marks for the two new instructions;
- aligned 4-instruction bundles;
- wrap-bit pointers;
- the bundle-indexed BTB with slot tags and round-robin replacement;
- the bubble-then-redirect misfetch;
- push-to-pop forwarding in the same cycle;
- forwarding inside a VQ rename bundle;
- the VQ restore port.

The following are not modelled here:
- the conditional branch predictor;
- the return address stack;
- checkpoint allocation and its confidence estimator;
- the out-of-order core;
- the memory hierarchy.

`btb.sv` holds 4096 entries of about 120 bits in plain arrays. Synthesis
tools take a long time to map it; simulation is fast.
