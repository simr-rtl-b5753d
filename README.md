# SIMT additions for a request-processing out-of-order core

Data-center microservices serve thousands of small requests that each run
the same code on different data. A conventional out-of-order (OoO) core runs
them one thread at a time, so for every request it pays again for fetch,
decode, renaming, scheduling and branch prediction. The Request Processing
Unit (RPU) idea is to group 32 similar requests into a *batch* and run the
batch in lock step, SIMT style, on one OoO core. The front end and OoO engine
then work once per batch instruction instead of once per thread. This
repository holds synthesizable SystemVerilog for the parts that turn an OoO
core into such a SIMT core:

* choosing which threads of the batch run next after they diverge, without a
  reconvergence stack, and escaping spin-lock deadlocks;
* reducing 32 per-thread branch outcomes to one outcome for the batch branch
  predictor;
* issuing a 32-thread instruction over 8 lanes in sub-batches;
* the memory path: stack interleaving, coalescing, lane-wide load/store
  queues, an 8x8 crossbar, and 8 L1 data banks, each with its own TLB bank.

The architecture follows the RPU described in *SIMR: Single Instruction
Multiple Request Processing for Energy-Efficient Data Center Microservices*.
Where that description gives only a function or a size, the circuits here are
this design's own, and each file's opening comment says which is which. The
sizes are those of its main configuration:

| parameter | value |
|---|---|
| batch size | 32 threads |
| SIMT lanes | 8 |
| load / store queue | 128 / 64 rows, 8 slots per row |
| L1 data cache | 8 banks × 32 KB, 8-way, 32 B lines, 8-cycle hit |
| data TLB | 8 banks × 32 entries |

## Block map

```
                 commit_* ─► simt_optimizer ─► sel_* (PC, SP, active mask to fetch)
                 br_*     ─► majority_vote  ─► bp_* (batch branch predictor update)

 mi_* (32 thread addresses/data)
   └► subbatch_issue ─► stack_agu ─► mcu ─┬► store_queue ─┐ (drain after st_commit)
        (8 lanes/cycle)  (remap,fault)     └► load_queue  ─┤ (issue oldest row)
                                                           ▼
                                       8 lane ports ─► l1_xbar ─► 8 × (tlb_bank + l1_bank) ─► l2_*
                                           ▲                                    │
                           rsp_*, ld_done_* ◄────────── line returns ◄──────────┘
```

`rpu_simr_core` is the top. It wires all of these together. It brings out as
ports whatever belongs to the surrounding core and to the memory system
behind L1: commit, fetch, branch resolution, TLB refill and the L2 port.

## Control flow: MinSP-PC instead of a reconvergence stack

GPUs keep a stack of reconvergence points per warp. The RPU cannot do that
cheaply for arbitrary x86 code, so it keeps only a PC and an SP per thread
(`simt_optimizer`). Each cycle it picks the threads to run:

1. Among live threads, find the lowest SP. Stacks grow down, so this is the
   deepest function call.
2. Among threads with that SP, find the lowest PC.
3. Run every thread whose SP and PC both match; that is the active mask.

On an if/else, the path with the lower PC runs first. Threads that arrive at
the join point wait there, because it is a higher PC, until the others catch
up. When some threads call a function, the callee runs first whatever its
address. The per-thread PCs and SPs are written from the commit stage
(`commit_*`), after mispredicted threads have been flushed. The choice
appears on `sel_*` one cycle after the update.

**Deadlock escape.** If one path spins on a lock held by a thread that
MinSP-PC never selects, the batch would hang. The optimizer watches for this
situation:

* no waiting thread has moved for `K_CYC` cycles, and
* at least `B_ATOM` atomics were decoded in that window.

When both hold, it sets the spinning threads aside and runs the best of the
others for `T_CYC` cycles, with `sel_switched` high. The three numbers are
parameters (64, 4 and 32 by default). They are this design's choice; the
source gives only the mechanism.

**Majority vote.** The batch has one branch predictor entry. `majority_vote`
does three things:

* It counts taken against not-taken among active threads. A tie counts as
  not taken.
* Among taken threads, it finds the most popular target.
* It reports which threads agree with the result.

The result is registered, so it adds one cycle to the predictor update path.

## Memory path, step by step

### Sub-batch interleaving (`subbatch_issue`)
A 32-thread instruction runs on 8 lanes as four sub-batches. Threads 8s to
8s+7 form sub-batch s, and thread 8s+l always uses lane l. Sub-batches with no
active thread take no cycle, so a batch that has shrunk (for example a batch
of 8) costs one cycle, not four. The top splits one memory instruction at a
time and accepts the next when the last sub-batch leaves.

### Stack interleaving (`stack_agu`)
Every thread has its own stack, so the same local variable lives at the same
offset in 32 different stacks. That is 32 different cache lines for what is
logically one access. The stack AGU changes where stack words are stored.
The batch's stacks occupy one region that starts at `ss0`, one stack of
`2^stack_log2` bytes per thread. For an address in that region:

```
owner  t = (va - ss0) >> stack_log2          (TargetTID)
offset o = (va - ss0) mod 2^stack_log2
mapped   = ss0 + ((o >> 2) * batch_size + t) * 4 + (o mod 4)
```

So word k of every thread's stack sits in one contiguous run of 4-byte words:
thread 0, then thread 1, and so on. Eight threads of a sub-batch touching the
same local variable now touch 8 consecutive words of one 32-byte line. For
example, an 8-byte push by all 32 threads becomes 8 line writes instead of
32; the end-to-end test measures exactly 8.

An access whose owner `t` is not the accessing thread is a cross-thread stack
access. Unless `xstack_allow` is set, the lane is dropped and `stack_fault`
is raised with the instruction tag, so the core can take an exception.
Addresses outside the region pass through unchanged.

### Coalescing (`mcu`)
To keep hit latency low, the MCU looks only for two patterns among a
sub-batch's active lanes:

| mode | pattern | queue slots used |
|---|---|---|
| `MCU_UNIFORM` | every lane reads or writes the same 4-byte word, such as a shared global | slot 0 |
| `MCU_CONSEC` | lane l uses word w0 + (l − first active lane), all in one 32-byte line; stack accesses after interleaving look like this | slot 0 |
| `MCU_DIVERGENT` | anything else | one slot per active lane |

It takes one registered cycle and works on one sub-batch, not on the whole
32-thread batch.

### Lane-wide load and store queues (`load_queue`, `store_queue`)
A queue row belongs to one sub-batch instruction. All its lanes share one
age, one tag and one PC, and the row has an address slot per lane. A
coalesced access uses slot 0 only.

* **Store queue** (64 rows): data is kept per lane.
  * *Forwarding:* a load looks into a separate CAM for each lane. Lane l of a
    load is compared only with lane l of older stores, which is the same
    thread. The youngest store that matches the same word wins. A coalesced
    store answers every lane through slot 0.
  * *Draining:* when `st_commit_valid` marks the oldest row committed, each
    used slot becomes one whole-line write with a word mask. A coalesced row
    becomes a single write. Drain writes take the lane ports ahead of
    loads.
* **Load queue** (128 rows): values are not stored; only a valid bit per
  slot is kept. Loaded lines go straight to the register-file side (`rsp_*`),
  and forwarded words go to it at allocation (`fwd_*`). Forwarded slots start
  out valid. Each cycle the oldest row with unsent slots offers them to the
  crossbar. When every slot of a row is valid, the row broadcasts its tag and
  sub-batch on `ld_done_*` and is freed.

Forwarding only ever looks at the same thread's older stores. Other threads
see a store only after it drains. This is the weak, non-multi-copy-atomic
ordering the RPU adopts, in which ordering between threads is only
guaranteed at fences and barriers.

### Crossbar, TLB banks and L1 banks (`l1_xbar`, `tlb_bank`, `l1_bank`)
* **Bank selection:** lines are spread over the 8 banks by address bits
  [7:5] (32-byte interleave).
* **Crossbar:** it connects the 8 lane ports to the 8 banks. Each bank
  arbitrates round-robin among the ports that want it, and losers retry;
  `conflicts` counts them. On the return side, the lowest-numbered bank wins
  a lane port.
* **TLB bank:** each bank has its own fully associative 32-entry TLB bank,
  so translation keeps up with the cache. One page spans several banks, so
  its entry may exist in several TLB banks. An invalidation therefore goes
  to all of them.
* **TLB miss:** a miss holds the request and is reported on `tlb_miss*`.
  The outside refills it through `tlb_fill*`.
* **L1 bank:** each bank is 32 KB, 8-way, with round-robin replacement. A
  load hit answers exactly 8 cycles after the bank accepts it. A miss
  stalls the bank until the line comes back on `l2_*`. Stores are
  write-through and do not allocate a line on a miss.

### Timing of a load sub-batch (no conflicts, hits)
| cycle | step |
|---|---|
| 0 | the sub-batch leaves `subbatch_issue`; stack remapping is combinational |
| 1 | the MCU decision is registered |
| 2 | the queue row is allocated and the forwarding lookup happens |
| ≥ 2 | the crossbar and TLB pass the request, and the bank accepts it |
| +8 | the line returns on `rsp_*`; the slot becomes valid |
| +1 | `ld_done_*` |

The source gives 8 cycles as the L1 hit latency including the MCU. Here the
bank alone takes 8 cycles, so a load takes a few cycles more than that.

## Where this design departs from, or adds to, the described RPU

* Coalescing works per 8-lane sub-batch. The described unit is costed as a
  32-way structure over the whole batch.
* The L1 write policy, the replacement policy, one outstanding miss per
  bank, TLB organisation inside a bank, the page size (4 KB), the word size
  (4 bytes) and 48-bit addresses are not given by the source. They are
  choices made here.
* The deadlock-escape constants and the tie rules of the majority vote are
  choices made here.
* The memory front end takes one batch instruction at a time. A sub-batch
  is accepted only if both queues have two free rows.

## Not included

These parts stay outside; the top brings out their interfaces:

* the OoO core itself: x86 front end, renaming and reorder buffer with the
  active-mask fields, scheduler, execution lanes and register file;
* the branch predictor, which gets `bp_*`;
* the page walker, which drives `tlb_fill*`;
* L2, L3 with its atomics, the chip crossbar, the relaxed coherence protocol
  and DRAM;
* the 20-core chip.

The batch split (a software mechanism) and the memory allocator are not
hardware and are not included either.

## Files

| file | what it is |
|---|---|
| `rtl/rpu_pkg.sv` | shared sizes, the coalescing-mode enum, address helpers |
| `rtl/simt_optimizer.sv` | MinSP-PC selection and the deadlock escape |
| `rtl/majority_vote.sv` | batch branch majority vote |
| `rtl/subbatch_issue.sv` | 32 threads over 8 lanes; skips empty sub-batches |
| `rtl/stack_agu.sv` | stack interleaving and cross-thread check |
| `rtl/mcu.sv` | coalescing unit |
| `rtl/load_queue.sv`, `rtl/store_queue.sv` | lane-wide LD/ST queues |
| `rtl/l1_xbar.sv` | 8×8 lane-to-bank crossbar |
| `rtl/tlb_bank.sv`, `rtl/l1_bank.sv` | one TLB bank, one L1 data bank |
| `rtl/rpu_simr_core.sv` | the top |
| `tb/tb_<block>.sv` | a self-checking testbench per block |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. Each one compares the
block with a reference model written independently in the testbench, and each
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_rpu_simr_core \
    rtl/rpu_pkg.sv $(ls rtl/*.sv | grep -v rpu_pkg) tb/tb_rpu_simr_core.sv
./obj_dir/Vtb_rpu_simr_core
```

Swap in another `tb_<block>` to test one block. `tb_rpu_simr_core` runs the
top with every parameter at its default; it takes about one second.

**End-to-end memory test.** It sends about 1400 batch memory instructions:

* stack pushes and pops;
* private consecutive and scattered heap accesses;
* uniform loads and stores;
* cross-thread stack loads that must fault;
* full, sparse and half-empty masks.

It keeps a program-order model of memory. Every returned load lane is
checked against it, whether the value was forwarded or read from an L1 line.
A next-level model with random latency serves the banks. TLB misses are
refilled from a fixed page map after a delay, and pages are invalidated now
and then.

**Batch of 8.** A second phase runs with `batch_size` = 8 and 8 active threads.
It checks that every instruction costs exactly one sub-batch and that all
values stay correct.

**End-to-end control test.** At the same time, it takes the control side
through if/else divergence and reconvergence, calls with MinSP priority, a
spin lock that needs the deadlock escape, majority votes and thread exit.

The test counts every mechanism and fails if one never happens:

* divergence, reconvergence, MinSP, the deadlock switch and split votes;
* empty sub-batches, stack remapping and faults;
* the three coalescing modes and forwarding;
* bank conflicts, TLB refills and invalidations;
* L1 hits and misses, and write-through drains.

The per-block testbenches also check:

* the 8-cycle hit latency;
* one sub-batch per cycle with empty ones skipped;
* the interleaving formula on random addresses;
* round-robin fairness of the crossbar;
* queue ordering, forwarding and draining against reference queues.
