# Task-lifetime prefetching and cache management for a private L2

Task-based dataflow runtimes know, before a task starts, exactly which
memory ranges it will read and write, and they know when one task ends and
the next begins. Ordinary caches and hardware prefetchers see none of this.
This RTL gives the runtime two small hardware hooks into a core's private L2:

* **Explicit Bulk Prefetcher (EBP)**: a user-level, memory-mapped prefetch
  engine. Software describes a task argument as a 2D range: a start virtual
  address, a block size, a number of blocks and a stride. EBP then pulls every
  cache line of it into the L2 with the right coherence permission. The
  runtime uses it to load the *next* task's data while the current task runs,
  which is double buffering.
* **Epoch-based Cache Management (ECM)**: each task's lifetime is an
  *epoch*. Each L2 line carries a 3-bit epoch number that says which task last
  used or prefetched it. The replacement policy evicts lines of finished tasks
  first. It keeps the two live tasks (current and next) from evicting each
  other, using per-epoch quotas of cache ways that software assigns from the
  task footprints. It also stops prefetching into sets where the next task has
  already used its share.

The design is one core's L2 subsystem, `ebp_ecm_top`. It runs with the
evaluated configuration as default parameters: 256 KB, 8 ways, 64-byte lines,
NRU, 16 MSHRs, 8-cycle hits, a 32-command queue, 8 outstanding prefetches and
8 epochs. The core/L1, the core's TLB and the coherence directory sit outside
it and connect through ports.

```
             register window (0x00-0x7F)
                 |                      |
        +--------v--------+     +-------v-------+
        | ebp_cmd_regs    |     | ecm_regs      |  epoch E, quota(E), quota(E+1) in ways
        +--------+--------+     +-------+-------+
                 | Opcode write         |
        +--------v--------+             |
        | sync_fifo (32)  |             |
        +--------+--------+             |
                 |                      |
        +--------v----------+  TLB      |
        | ebp_request_engine|<-------> tlb_*
        +--------+----------+           |
                 | pf_* probe/issue     |
        +--------v----------------------v------------+
core_* -> l2_cache  tags+epoch+NRU | data | 16 MSHR |--> mem_* (directory)
        |          ecm_victim_sel (fill)  ecm_victim_sel (probe/throttle)
        |                                            |<-- snp_* (recalls)
        +--------------------------------------------+
```

## Software view

All registers are 64 bits wide at byte offsets of an 8-bit local address.
Offset bit 6 selects ECM.

| offset | name | access | meaning |
|---|---|---|---|
| 0x00 | EBP_ADDR   | RW | start virtual address (48 bits) |
| 0x08 | EBP_BSIZE  | RW | bytes per block |
| 0x10 | EBP_BNUM   | RW | number of blocks |
| 0x18 | EBP_STRIDE | RW | signed bytes from one block start to the next |
| 0x20 | EBP_EPOCH  | RW | epoch the lines will belong to (0-7) |
| 0x28 | EBP_OPCODE | W  | bit 0: 0 Read-Only (Shared), 1 Read-Write (Exclusive); the write enqueues the command |
| 0x30 | EBP_STATUS | R  | [7:0] commands queued, [8] engine busy (command in progress or prefetches in flight) |
| 0x40 | ECM_EPOCH  | RW | current epoch |
| 0x48 | ECM_ADV    | W  | any write: advance the epoch by one |
| 0x50 | ECM_QCUR   | W bytes / R ways | quota of the current epoch |
| 0x58 | ECM_QNEXT  | W bytes / R ways | quota of the next epoch |

The Opcode write copies all six fields into the queue at once. The field
registers keep their values, so a series of similar commands only rewrites
what changes. When the queue is full, the Opcode write is held (`ready` low)
until an entry frees, so no command is ever lost.

A runtime using double buffering does this at each task boundary:

1. write `ECM_ADV`: the task about to run gets epoch E (the old next epoch),
   its quota (the old next quota) becomes the current quota, and the next
   quota is 0;
2. write `ECM_QNEXT` with the footprint of the next task in the queue;
3. post one EBP command per argument of that next task, with
   `EBP_EPOCH` = E+1 and Read-Write for `inout`/`output` arguments;
4. run the current task; its loads and stores reach the L2 tagged with E.

The epoch field holds an absolute epoch number, not a current/next flag, so a
command that waits in the queue across an epoch advance still tags its lines
correctly. Epochs wrap from 7 to 0 with no special handling. A line last
touched 8 tasks ago therefore looks current again, which only affects its
replacement priority, not correctness.

## Request Engine: from a 2D range to line requests

`ebp_request_engine` takes commands from the queue in order. Block *b* starts
at `addr + b*stride`, and its lines run from `start/64` to
`(start+size-1)/64`. Unaligned blocks and negative strides work, and a range
may cross page boundaries because it is given in virtual addresses. Each line:

1. **Translation.** The engine keeps the last page translation (cleared for
   each new command). A line on a new page first sends its page number to the
   TLB port, and asks for write permission on Read-Write commands. A fault
   drops the line and every other line of that page.
2. **Probe and issue** on the L2 prefetch port, one valid/ready handshake.
   The L2 returns one of four outcomes in the accepting cycle:
   `PF_ISSUED` (a miss, or an upgrade of a Shared line for a Read-Write
   command, sent to the directory); `PF_SKIP_HIT` (present with enough
   permission); `PF_SKIP_PENDING` (a miss to that line is already in flight);
   `PF_SKIP_THROTTLE` (ECM refuses, see below).
3. **Credits.** At most 8 issued prefetches may be in flight. `pf_done` from
   the L2 returns one credit per completed prefetch fill.

A line takes 2 cycles when its translation is held, plus the TLB round trip
on a new page. A block costs one more cycle to compute its line range.

## ECM: how the replacement decision is made

Every L2 line has a valid bit, an NRU reference bit and an epoch. For the
current epoch E, the **active** epochs are E and E+1 (mod 8), and all others
are **old**. Demand accesses always use E. A hit re-marks the line with E and
sets its reference bit. Prefetches use their command's epoch. A prefetch that
finds its line present in an old epoch moves it to the prefetch's epoch, so
data reused by the next task is not evicted as stale.

**Quotas.** Software writes bytes. `ecm_regs` converts them at once to ways
of `CACHE_BYTES/WAYS` bytes (32 KB by default), rounding up:
`ways = ceil(bytes / 32768)`. The two quotas may never add up to more than
the number of ways: a quota that would over-book is cut to what the other
active epoch leaves. Quotas guarantee a minimum per set; they are not fixed
partitions.

**Victim choice** (`ecm_victim_sel`, used on every fill for the epoch the
miss was made in). The candidates are, in order:

1. invalid ways;
2. lines of old epochs (finished tasks' data goes first);
3. a request of a non-active epoch uses plain NRU over the whole set;
4. the set is full of active lines. Let *n* be the lines the requesting epoch
   R holds in the set and *q* its quota. If *n < q*, or *n = 0*, the other
   active epoch must be over its own quota (the quotas add up to at most 8), so
   R takes one of its lines. Otherwise R replaces one of its own lines.

Within the candidates, NRU picks the lowest way with a clear reference bit.
If all are set, it picks the lowest candidate and clears the bits of all
candidates. When every line in a set belongs to the current epoch, this is
plain NRU. Freshly filled lines get their reference bit set.

**Throttle.** The prefetch probe runs the same logic for the prefetch's
epoch. It reports `throttle` when the set holds no invalid and no old line and
the requesting epoch already holds at least its quota there. A new line is
then skipped instead of displacing data that was just prefetched, or data the
current task is still using. Lines already present, and upgrades, are never
throttled.

## The L2 cache

`l2_cache` keeps tags, MESI state, epoch, valid and reference bits per way,
and the 64-byte data per way. There are `CACHE_BYTES/64/WAYS` sets (512 by
default). The line index is the low 9 bits of the physical line number. Three
request streams share the tag state:

* **Core port** (`core_*`, requests from the L1 side, one at a time). The
  request is a line read, or a full-line write such as an L1 write-back. A read
  needs the line valid; a write needs E or M and leaves it M. A hit answers
  exactly `HIT_LAT` = 8 cycles after the request was accepted. On a miss the
  cache allocates an MSHR (GETS for a read, GETX for a write or an upgrade
  from S), or joins a miss already outstanding for the line, for example one
  started by a prefetch. It then looks the request up again every cycle until
  the fill turns it into a hit.
* **Prefetch port** (`pf_*`), as described above. It is answered in the
  cycle it is made, which models the L2's second access port.
* **Fill** (`mem_resp_*`). The line is installed in the way chosen by ECM, or
  in its own way for an upgrade, in state E when the directory grants
  exclusivity, otherwise S. A dirty victim goes to a one-entry write-back
  buffer and leaves as PUTX ahead of any new request. `evict_valid/evict_line`
  name each line that leaves, for an inclusive L1. A fill waits while the
  write-back buffer is full, or in the one cycle a core hit is updating the
  same set.
* **Directory requests** (`snp_*`). The directory may invalidate a line
  (`snp_inv`=1) or downgrade it to Shared (`snp_inv`=0). The answer comes the
  next cycle: whether the line was present, whether it was dirty, and its
  data. An invalidation is also reported on `evict_*`. A request waits while a
  fill is being installed, while a core hit touches the same set, and while a
  write-back of the same line is still in the buffer, so the PUTX reaches the
  directory first.

Directory port: `mem_req_valid/ready` carries op (GETS, GETX, PUTX), line,
MSHR id and write-back data. `mem_resp_valid/ready` carries the MSHR id, an
exclusive-grant bit and the line data. Responses may come in any order.

## Interfaces of `ebp_ecm_top`

* `mmio_*`: register window. The access completes in the cycle `ready` is
  high; `rdata` is valid in that cycle.
* `core_*`, `evict_*`: the L1 side, as above, with physical line numbers
  (34 bits).
* `tlb_*`: a request (page number, write flag) with valid/ready, then one
  response (`tlb_resp_valid`, physical page, fault) some cycles later. Only
  one translation is outstanding.
* `mem_*`, `snp_*`: the coherence directory, as above.

Reset is asynchronous and active low (`rst_n`). It clears valid and reference
bits, the MSHRs, the queue and all registers. Tag, state, epoch and data
arrays are not reset, because they are only read under a set valid bit.

## Parameters

| parameter | default | where |
|---|---|---|
| `CACHE_BYTES` | 262144 | `ebp_ecm_top`, `l2_cache`, `ecm_regs` |
| `WAYS` | 8 | same |
| `MSHRS` | 16 | `l2_cache` |
| `HIT_LAT` | 8 | `l2_cache` |
| `CMD_DEPTH` | 32 | Command FIFO |
| `MAX_OUT` | 8 | Request Engine |
| `EPOCH_W`, `VA_W`, `PA_W`, `PAGE_OFF_W` | 3, 48, 40, 12 | `ebp_pkg` |

Line size (64 bytes) is fixed in `ebp_pkg`. The set count must be a power of
two.

## What is this design's own, and what is missing

These follow the description of the mechanism: the six command registers and
enqueue on Opcode; the 2D range with constant stride; line splitting,
translation and probing; skipping of present lines; Shared vs. Exclusive
requests; 32 queued commands and 8 outstanding prefetches; a 3-bit epoch in
every tag; demand marking with the current epoch; byte quotas for the current
and next epochs, rounded up to ways and never over-booked; old lines first;
own-epoch victims when full; best-effort quotas; throttling of prefetches to
full sets. The cache geometry and timing come from the evaluated system.

The following are choices made here, where no detail was available: address
widths, the 4 KB page, the register offsets, STATUS and ECM_EPOCH; holding
the Opcode write when the queue is full; the absolute epoch field; handing the
next quota over on an advance; cutting an over-booked quota; the one-entry
translation buffer and dropping faulting lines; the NRU details and
reference-bit insertion; re-marking of old lines on a prefetch hit; the
blocking, replaying core port; the single write-back buffer; the recall
port; all port protocols.

Not built: the processor cores, L1 caches, TLB, directory, network and DRAM.
The TLB and the directory exist only as simulation models in `tb/`. The
invalidate/downgrade port is the minimum a directory needs to recall a line.
It has no forwarding of data to another cache and no handling of protocol
races between a recall and a fill in flight. The directory is expected to
order those.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs:

| testbench | what it checks |
|---|---|
| `tb_sync_fifo` | order, count, full/empty and push-while-full-and-popping against a queue model |
| `tb_ebp_cmd_regs` | read-back, atomic enqueue on Opcode, fields kept between commands, hold while full, STATUS |
| `tb_ecm_regs` | byte-to-way rounding, over-booking cut, quota hand-over, epoch wrap |
| `tb_ecm_victim_sel` | directed cases and 20 000 random sets against a reference model |
| `tb_ebp_request_engine` | exact line sequence for 24 commands (negative strides, page crossings, faults), the 8-credit limit |
| `tb_l2_cache` | data against a reference memory with evictions, write-backs and random directory invalidations/downgrades; 8-cycle hits; all four probe outcomes; quota, throttle and old-epoch behaviour; epoch marking |
| `tb_ebp_ecm_top` | 12 double-buffered tasks at the default parameters; counts every mechanism and requires at least 80% of prefetched task reads to hit |
| `tb_workloads` | task sequences shaped like six kernels, each run without and with EBP+ECM; data against a reference memory, miss reduction, throttling |

`tb/dir_model.sv` (directory with memory, random latency, out-of-order
responses, optional random recalls) and `tb/tlb_model.sv` (fixed mapping, configurable faulting pages)
are behavioural models used by the last three testbenches.

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ebp_pkg.sv tb/tb_ebp_ecm_top.sv --top-module tb_ebp_ecm_top -o sim
./obj_dir/sim
```

To run another testbench, change the top-module name and the testbench file.
All of them finish within a few seconds. In the `tb_ebp_ecm_top` run, all 12 tasks
complete. About 90% of reads to prefetched task data hit in 8 cycles, with the
directory recalling lines now and then.
Throttling, dropped faulting lines, queue-full stalls and the 8-outstanding
limit each occur.

### Kernel-shaped task sequences

`tb_workloads` drives the default-size top with the first 12 tasks of six
kernels. The tasks use real array sizes and tiles of about 32 KB per task.
The task shapes are a model of how each kernel splits into tasks, not
traces. Every kernel runs twice on separate copies of its arrays: once
without prefetch commands or quotas, and once with double-buffered EBP
prefetching and ECM quotas. A read answered later than the 8-cycle hit
latency counts as an L2 miss.

| kernel | task arguments | reads | misses, no prefetch | misses, EBP+ECM |
|---|---|---|---|---|
| matrix multiply, 1000x1000 doubles | A, B tiles in; C tile inout (36x36) | 6480 | 4284 | 0 |
| Jacobi, 1000x1000 doubles | 46x46 input with halo; 44x44 output | 6840 | 6032 | 0 |
| FFT transpose, 1024x1024 x 16 B | two 32x512-byte tiles, inout | 6144 | 6144 | 4756 |
| bitonic merge, 1M 8-byte keys | two 16 KB runs, inout | 6144 | 6144 | 16 |
| Cholesky update, 1280x1280 doubles | two tiles in, one inout | 6480 | 4118 | 23 |
| sparse LU block update, 1280x1280 | two tiles in, one inout | 6480 | 6276 | 263 |

In the FFT transposition the 16 KB row stride maps a whole tile onto a few
sets. The two active tasks then fill those sets, and ECM throttles most of
the next task's prefetches instead of evicting the current task's lines. The
remaining misses in the other kernels are also throttled prefetches, to sets
that the two active tiles happen to fill.
