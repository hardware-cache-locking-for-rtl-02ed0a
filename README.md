# CLAU: cache locking for every read-modify-write

On x86, a non-atomic read-modify-write instruction (RMW, e.g. `add [mem], reg`) reads its
cache line with write permission, computes, and later writes the line from the store
buffer. Between the read and the write, another core may invalidate the line. False
sharing makes this common. Two things can then go wrong:

* If the RMW has not yet committed, the invalidation squashes it and flushes the pipeline
  (x86-TSO forbids the load from being observed out of order).
* If it has committed, its store finds the line without write permission and misses.

CLAU (Cache Locking for All Updates) gives every non-atomic RMW the line lock that atomic
RMWs already use. The line is locked in the L1D from the moment the RMW's load reads it
until its store writes it. Invalidations and downgrades from other cores wait during that
window, so the RMW is neither squashed nor left without permission.

Unlike an atomic RMW, a locking RMW keeps every out-of-order freedom. It runs
speculatively, many can hold locks at once, and it adds no fences. Any lock can be
dropped at any time without breaking correctness, because the RMW then just behaves as
it would without CLAU. Two further ideas make this safe and fast:

* **Lock chaining.** Several RMWs to the same line share one lock, up to eight of them.
* **A watchdog.** It releases every lock when no store has made progress for 5000
  cycles. This breaks the rare deadlocks that speculative locking can cause.

This repository holds synthesizable SystemVerilog for the per-core CLAU logic. The
out-of-order core itself is not included: its ROB, the data parts of its load and store
queues, its store buffer and the L2/L3/directory hierarchy are outside. The RTL exposes
their interfaces as ports.

## Life of a cache-locking RMW

1. **Decode** (`clau_uop_xform`). The load part of a non-atomic RMW becomes `ldstl`
   (load, ask for write permission, lock) instead of `ldst`. The store part becomes `stul`
   (store and unlock) instead of `st`. A flag per lane marks these micro-ops as
   non-atomic, so they can be demoted later. Atomic RMWs use the same opcodes and never
   carry the flag.
2. **Execute** (`clau_top` → `clau_sq_chain` + `clau_l1d_state`). When the `ldstl` reads
   its data, it looks for a store queue entry on the same line that currently holds the
   unlock responsibility (see lock chaining below). There are three outcomes:
   * No such entry: the L1D moves the line from E or M to **L** (Locked). The RMW's own
     store becomes responsible for unlocking it. This is `exe_new_lock`.
   * An entry with room left in its chain: the RMW joins the chain (`exe_chained`).
   * A full chain: the RMW runs unlocked (`exe_overflow`).

   If the data came by store-to-load forwarding, the RMW does not lock at all. Setting
   `LOCK_ON_FWD = 1` instead makes a forwarded RMW lock when the line already has write
   permission. The default of 0 was the faster choice in the original evaluation.
3. **While Locked.** The L1D refuses invalidations and downgrades of the line
   (`ext_stall`), and the requester retries. Local loads and stores still access the
   line. Replacement never picks a Locked way.
4. **Store write.** When the `stul` leaves the store buffer and writes the L1D, a store
   that holds the responsibility returns the line to M. That is the unlock. A store of an
   earlier chain member writes and leaves the line Locked.
5. **Squash or re-execution.** If a branch mispredicts or a memory dependence is
   violated, the RMW gives up its lock. The line returns to E, or to M if it was already
   dirty.

## Lock chaining

Take a loop that updates several fields of one line (`x.a += 1; x.b += 1; …`). Its RMWs
hit a line that is already locked by the previous RMW. Releasing and re-acquiring the
lock for each one would expose every gap to other cores. Instead, the lock is passed
along the chain of RMWs, and only the *last* store releases it.

The state lives in the store queue (`clau_sq_chain`). Each entry holds:

| field | bits | meaning |
|---|---|---|
| line address | 42 | cache line of the RMW, recorded when its `ldstl` executes |
| unlock responsibility | 1 | this store must unlock the line when it writes |
| CL (chain length) | 3 | position of this RMW in its chain, 0–7 |

When an `ldstl` executes, the unit snoops **all** store-queue entries, older and younger.
It compares cache-line address bits only and ignores program order, because the RMWs are
speculative. At most one entry per line holds the responsibility; an assertion checks
this. If a holder is found whose CL is below 7, the new RMW's store takes CL + 1 and the
responsibility, and the holder loses it. If the holder's CL is 7, the chain is full. The
new RMW then runs as a plain RMW: its load stays safe only while the line happens to
stay locked, and its store does not unlock. So chains cover at most eight RMWs
(`CHAIN_LEN`). This cap stops one core from keeping a hot line from the others for too
long.

A chain does not count down: stores write in program order, and each one either holds
the responsibility or does not. If the tail of a chain is squashed, it still releases the
line. The older members then write without the lock. This is always allowed, because
locking only improves performance.

## Deadlock freedom: the watchdog

Many locks held by speculative instructions can deadlock. For example, an older store in
the store buffer waits for a line that another core has locked, while that core waits for
ours. A younger RMW cannot unlock until the store ahead of it drains. CLAU does not try
to prevent such cycles. `clau_watchdog` is a 13-bit timer that:

* counts while any L1D line is Locked;
* restarts on every L1D store write, which is the sign of progress;
* stays at zero while nothing is locked.

After `WD_THRESH` = 5000 progress-free cycles, it pulses `wd_fire`. In that same cycle,
every Locked line returns to E or M and every unlock responsibility in the store queue is
cleared. No pipeline flush is needed: the affected RMWs simply continue as baseline RMWs.

## Which snoops squash

Losing a line squashes loads whose line address matches (`clau_lq_snoop`). A loss means
an invalidation or downgrade that was carried out, or an eviction caused by a fill. A
load that has sent its address is squashed, with one CLAU exception. A cache-locking
`ldstl` that has **not yet received its data** is spared (`lq_spared`): when it does
read the line it will lock it, so no other core can change the data between its read and
its write.

An `ldstl` that has executed but whose line is no longer locked is squashed as usual. The
line can be unlocked because the watchdog fired, the chain overflowed, or the data was
forwarded. The output names the oldest squashed entry, counted from `lq_head`.

## The L1D state array

`clau_l1d_state` holds the tag, state and dirty bit of every line. States are I, S, E, M
and L. With the defaults that is 48 KB, 12 ways and 64-byte lines, so 64 sets. Data and
access latency are not modelled; CLAU changes neither. It performs one operation per
cycle:

| op | effect |
|---|---|
| `L1_LOCK` | E/M → L, unless that would leave no unlocked way in the set |
| `L1_WRITE` | needs E, M or L; → M, or stays L for a chain member; else store miss |
| `L1_UNLOCK` | L → E (clean) or M (dirty) |
| `L1_INV` / `L1_DOWN` | refused (`ext_stall`) if L; else → I / → S, reporting dirty data |
| `L1_FILL` | upgrade in place, or victim = first invalid way, else round robin over unlocked ways |

Each set keeps one unlocked way. A fill therefore always finds a victim, so ordinary
loads and stores can always make progress.

## Top level: `clau_top`

`clau_top` wires the five blocks together for one core. Each request from the core or
the memory system is a valid/ready channel, and its results are combinational in the
cycle it is accepted. One L1D tag access happens per cycle, granted in this fixed
priority order:

1. squash / re-execution (`sq_*`);
2. store write (`wr_*`);
3. load execution (`exe_*`);
4. external invalidation or downgrade (`ext_*`);
5. fill (`fill_*`).

Other ports do not use the L1D and are always accepted:

* decode (`dec_*`);
* LQ/SQ allocation (`ld_alloc_*`, `st_alloc_*`);
* load address issue (`ld_issue_*`);
* load commit (`ld_commit_*`).

The core addresses entries by its own LQ and SQ indices. For an RMW, `exe_sq_idx` names
the store paired with the executing load.

An `ldstl` that is not forwarded and finds no write permission returns `exe_miss`. The
core fetches the line (a fill with E or M) and replays the execution, which then locks.
A store without permission returns `wr_miss` and is retried the same way.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `DECODE_W` | 6 | decode lanes |
| `L1D_BYTES`, `L1D_WAYS` | 49152, 12 | L1D geometry (64-byte lines) |
| `LQ_ENTRIES`, `SQ_ENTRIES` | 192, 114 | load and store queue sizes |
| `CHAIN_LEN` | 8 | RMWs per lock chain; 1 disables chaining |
| `WD_W`, `WD_THRESH` | 13, 5000 | watchdog width and threshold |
| `LOCK_ON_FWD` | 0 | lock on store-to-load forwarding when write permission is held |

The defaults model an Alderlake-like core. The CLAU-specific storage is the 13-bit timer
plus a 3-bit CL for each of the 114 store-queue entries: 355 bits, about 45 bytes. The
unlock-responsibility bit reuses the cache-locking flag that a core with atomic-RMW
locking already keeps in its store queue. Both `clau_sq_chain` and `clau_lq_snoop` keep
their own copy of each entry's line address, so that they stand alone. In a real core
those addresses already exist in the LSQ.

## Choices made here that the CLAU proposal leaves open

* 64-byte lines and 48-bit physical addresses.
* The lock counter drawn in the proposal's chaining illustration is implemented as the
  store-queue responsibility bit and CL counter of its hardware description. There is no
  per-line counter in the L1D.
* A "stalled" invalidation is refused, and the requester retries it. It is not queued
  inside the L1D.
* Released lines go back to M when dirty, rather than always to E. A dirty bit is kept
  per line for this.
* The base replacement policy is round robin per set.
* A lock that would take the last unlocked way of a set is refused, and the RMW runs
  unlocked.
* The channel structure, the arbiter and its priority order, and the single-cycle
  responses.
* Baseline load-queue snooping squashes every matching load whose address was sent,
  whether or not its data has returned. Only cache-locking loads get the exception.
* The squashed tail of a lock chain releases the line, even though older members are
  still in the store queue.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle-limit watchdog.

* `tb_clau_uop_xform`: random bundles on six lanes against a reference mapping.
* `tb_clau_watchdog`: default sizes. The pulse comes exactly 5000 cycles after the last
  progress, store writes restart the count, and the count is held at zero while
  unlocked.
* `tb_clau_sq_chain`:
  * a directed chain of nine RMWs: a new lock, seven joins with CL 1–7, then an
    overflow; only the tail's store unlocks;
  * about 6000 random operations checked against a reference model every cycle.
* `tb_clau_lq_snoop`: random allocation, issue, execution, commit, squash, re-execution
  and snoops, checked against a reference model.
* `tb_clau_l1d_state`: directed checks of every state rule on a 4-set, 4-way array.
* `tb_clau_top`: runs the whole unit at its default parameters. It drives each
  mechanism through scenarios and fails if any never happened:
  * decode transformation, new lock, chain join, chain overflow;
  * refused invalidation and downgrade with a later retry;
  * a spared not-yet-executed `ldstl`;
  * a squash after the lock was lost;
  * the watchdog firing (checked against 5000 cycles);
  * release on squash and on re-execution;
  * forwarding without a lock;
  * a store miss;
  * refusal of the last unlocked way, and an eviction that skips locked ways.
* `tb_clau_config_sweep`: eight `clau_top` instances at the default structure sizes, one
  per sensitivity configuration. Together they cover chain caps of 1, 2, 4, 8, 16, 32 and
  64 RMWs, and watchdog thresholds of 1, 10, 50, 100, 500, 1000, 5000 and 10000 cycles.
  The 10000-cycle threshold needs `WD_W = 14`. Both forwarding policies are covered too.
  Each instance (`clau_cfg_probe`) checks three things:
  * the chain takes exactly `CHAIN_LEN` RMWs and the next one overflows;
  * the watchdog fires exactly `WD_THRESH` cycles after the lock was taken;
  * a forwarded RMW locks only when `LOCK_ON_FWD` is set.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/clau_pkg.sv tb/tb_clau_top.sv --top-module tb_clau_top
./obj_dir/Vtb_clau_top
```

Not covered: the core and cache hierarchy around the unit, multi-core interaction beyond
the external-request port, and the data array. The performance claims of the proposal
come from full-system simulation and cannot be reproduced with this RTL. Synthesis of the
full-size L1D state array (768 lines of flip-flops with per-line enables) is slow with
open-source tools. Yosys generic synthesis of `clau_l1d_state` with 12 ways took about
2 s for 4 sets, 10 s for 8 sets and 53 s for 16 sets, growing faster than the line
count, so the 64-set default takes tens of minutes. The smaller blocks synthesize in
seconds.
