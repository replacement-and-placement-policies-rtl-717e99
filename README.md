# Prefetch-aware replacement and placement in a data cache

Prefetching hides memory latency, but every prefetched line that is never used
pushes a useful line out of the cache (cache pollution). And a prefetched line that is
used only once stays on as the most-recently-used line long after it has served its
purpose. This design is a data-cache subsystem that treats prefetched lines differently
from demand-fetched ones. It uses three policies, which can be switched on and off at
run time:

* **Instant Zero (IZ).** A prefetched line that is expected to be used once drops to
  the lowest priority the moment it is referenced. It is then the first line replaced.
* **Priority Pre-Updating with a victim cache (PPUVC).** Prefetched lines are
  remembered in the order they were fetched. When one of them is used, the older
  prefetched lines that have still not been used are demoted. Unused prefetched lines
  that are evicted get a second chance in a small victim cache.
* **Prefetch cache.** Lines brought in by the instruction-driven prefetcher go into a
  separate small cache instead of the data cache. The two caches are searched at the
  same time.

The prefetcher is driven by the instruction: Instruction Opcode and Addressing Mode
prefetching (IAP). A LOAD-UPDATE or STORE-UPDATE instruction (for example the POWER
`lwzu`) adds a displacement or a register to its base register and writes the sum
back. Such instructions walk through arrays. The address of the next access is
therefore known at the time of the current one: `EA + Disp` or `EA + Ry`.

## Organisation

```
                 req_* (address, store, UPDATE flag, stride)
                        |
            +-----------v-------------------------------+
            |        iap_cache_system (controller)      |
            |                                           |
            |  set_assoc_cache  data cache 16 KB 4-way  |<-- hot_bits_update
            |  set_assoc_cache  prefetch cache 1 KB FA  |    (per-set priorities)
            |  victim_cache     4 lines, FIFO           |
            |  ppu_unit         8 prefetch records      |
            |  iap_prefetch_unit -> prefetch_queue (8)  |
            +-------------------+-----------------------+
                                | l2_* (whole 32-byte lines, write-backs)
                     second-level memory (not part of the design)
```

| File | Contents |
|---|---|
| `rtl/cache_pkg.sv` | Line geometry, request and flag structs, policy switches `cfg_t`, event pulses `events_t` |
| `rtl/hot_bits_update.sv` | Combinational next-priority logic of one set: LRU, IZ, fill, decrement, victim choice |
| `rtl/set_assoc_cache.sv` | Tag, flag, priority and data arrays; access, probe, fill and decrement ports. FIFO variant by parameter |
| `rtl/iap_prefetch_unit.sv` | Works out which block to prefetch for each reference |
| `rtl/prefetch_queue.sv` | 8-entry request FIFO; drops duplicates and requests that arrive when it is full |
| `rtl/ppu_unit.sv` | Ordered record of prefetched lines and the demotions they owe |
| `rtl/victim_cache.sv` | 4-line fully-associative FIFO buffer |
| `rtl/iap_cache_system.sv` | Top: request FSM, miss handling, prefetch issue and placement, write-back |

## Line state and the hot bits

Each data-cache line holds:

* D, the dirty bit;
* H, the hot bits, 2 bits for 4 ways;
* I, the IAP bit;
* a flag that is set while a prefetched line has not yet been referenced;
* the tag and the 32-byte data.

The hot bits of a set always form a permutation of 0..WAYS-1: 0 is the next victim and
WAYS-1 is the most recently used line. `hot_bits_update` computes the new permutation
for one operation on way `w`, whose old priority is `p`:

| Operation | Way `w` | Other lines |
|---|---|---|
| LRU reference | becomes WAYS-1 | lines above `p` move down by one |
| fill | victim (priority 0) is replaced, new line gets WAYS-1 | all others move down by one |
| IZ reference (line has I set, IZ enabled) | becomes 0 | lines below `p` move up by one |
| PPU decrement | swaps with the line whose priority is `p-1` | — |

Worked example: a set holds 10, 11, 01, 00 for ways 0..3. Way 0 is an IAP line and is
referenced with IZ on. The set becomes 00, 11, 10, 01, so way 0 will be evicted next
instead of way 3. The testbench checks this exact case.

The victim is the first invalid way if there is one, otherwise the way with priority 0.

The FIFO variant, used for the prefetch cache, applies only the fill operation.
References leave the order unchanged.

## Which prefetch, and where it goes

`iap_prefetch_unit` decides this for each accepted reference:

| Reference | Target of `EA + stride` | Prefetch | Marked IZ |
|---|---|---|---|
| UPDATE instruction, IAP on | another block | that block | no (ordinary LRU line) |
| UPDATE instruction, IAP on | same block | block +1 (block −1 if stride < 0) | yes |
| anything else that misses | — | block +1 (prefetch-on-miss) | no |

Requests go into `prefetch_queue`. The controller sends the head of the queue to the
second-level memory only when all of these hold:

* it is idle;
* no demand miss is starting;
* no other prefetch is in flight.

A head whose block is already in the data cache, prefetch cache or victim cache is
discarded.

A returned prefetched line waits in a one-line buffer and is placed in the next idle
cycle:

* An IAP line goes to the **prefetch cache** when it is enabled.
* Any other line goes to the **data cache**, with its I bit set to the IZ mark and the
  not-yet-referenced flag set.

## PPU and the victim cache

`ppu_unit` keeps up to 8 records `{set, way, owed}`, oldest first. Every prefetched line
placed in the data cache is appended. When the oldest record has to make room, it is
dropped.

When a recorded line is referenced:

1. Every older record gains one owed decrement (at most 3).
2. The referenced record is removed.

A record is also removed when its line is evicted. The records later than the
referenced one are not touched.

Owed decrements are paid one per cycle, oldest record first, through the data cache's
decrement port. The data cache refuses a decrement in a cycle when a reference or fill
updates the same set; the PPU then keeps it. One decrement swaps the line with the line
one priority below it, so the set stays a valid permutation.

When a fill evicts a line whose not-yet-referenced flag is still set, that line goes
into `victim_cache`. The victim cache is a 4-line FIFO, and a line pushed out of it is
dropped: it is unreferenced, hence clean. After a data-cache miss, the victim cache is
searched one cycle later. On a hit, the line moves back into the data cache as an
ordinary referenced line.

## Timing and interfaces

The cache is idle when a request is accepted at cycle t (`req_valid_i && req_ready_o`).

| Case | Response |
|---|---|
| data-cache or prefetch-cache hit | `resp_valid_o` at t+1 |
| victim-cache hit | `resp_valid_o` at t+2 |
| miss | demand request `l2_req_valid_o` at t+1 (t+2 when the victim cache is searched); the response comes one cycle after `l2_rvalid_i` |
| partial hit (the missing block is the prefetch now in service) | no demand request; the prefetch finishes and its line answers, one cycle after `l2_rvalid_i` |

Other rules of the interfaces:

* Only one reference is outstanding at a time.
* `req_ready_o` is low while a miss is handled and for the cycle in which a prefetched
  line is placed.
* The memory side moves whole 256-bit lines. A request is a one-cycle pulse, with
  `l2_req_pf_o` marking a prefetch.
* A new request made while another is in service aborts it. Only demand requests do
  that, and never the prefetch of the block they need.
* Write-backs of dirty victims are posted on `l2_wb_*` without a handshake.
* `ev_o` pulses once per event. The events are: hit in each cache, miss, IZ reference,
  PPU decrement, victim-cache insert, victim-cache displacement, prefetch issued,
  prefetch skipped, prefetch aborted, partial hit, prefetch-queue overflow, prefetch placed in the data cache, prefetch placed in the prefetch cache, and
  write-back.

`cfg_i` selects the policies:

| Field | Switches on |
|---|---|
| `iap_en` | IAP prefetching (otherwise prefetch-on-miss only) |
| `iz_en` | Instant Zero |
| `ppu_en` | priority pre-updating |
| `vc_en` | the victim cache |
| `pfc_en` | the prefetch cache |

The four evaluated cache models are:

* IAP + IZ;
* prefetch-on-miss with PPUVC;
* IAP with PPUVC;
* IAP with the prefetch cache.

Other combinations work, but they were not part of the evaluation the design follows.

Parameters of `iap_cache_system` and their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `DC_SETS` | 128 | data-cache sets |
| `DC_WAYS` | 4 | data-cache ways |
| `PFC_SETS` | 1 | prefetch-cache sets; 1 means fully associative (a 4-way version is `PFC_SETS=8, PFC_WAYS=4`) |
| `PFC_WAYS` | 32 | prefetch-cache ways |
| `PFC_REPL` | `PFC_FIFO` | prefetch-cache replacement: `PFC_FIFO`, or `PFC_LRU` / `PFC_IZ` (a referenced line drops to the lowest priority) |
| `PQ_DEPTH` | 8 | prefetch-queue entries |
| `PPU_DEPTH` | 8 | PPU records |
| `VC_ENTRIES` | 4 | victim-cache lines |

The line size (32 bytes) is the package constant `LINE_BYTES`; all widths follow from
it. With it set to 8, 16 or 64, `tb_config_sweep` also passes its data and hit-latency
checks at all its sizes. (In the 64-byte direct-mapped instance its traffic produces
no prefetch-cache hit, which that instance reports as a failure.)

## Where this design departs from, or adds to, the evaluated scheme

* **Which lines get IZ.** Only a line prefetched as the next block of a same-block IAP
  stride is marked for IZ. A line that is itself the target of the stride follows LRU.
* **What happens on a fill.** A fill evicts the priority-0 line and moves the others
  down by one. This keeps the priorities a permutation.
* **What the PPU records.** It records every prefetched line placed in the data cache,
  not only prefetch-on-miss lines.
* **How demotions are applied.** A PPU demotion is a swap with the next-lower line,
  applied one per cycle. The capacity of 8 records, the saturation at 3 owed
  decrements, and dropping the oldest record are choices of this design.
* **Lines returned from the victim cache** re-enter as ordinary LRU lines. So does the
  line of a partial hit.
* **One request at a time** goes to the memory. Overlapping a prefetch of the next
  block with a transfer still on the bus is left to the memory side.
* **The prefetch queue** drops duplicate requests and requests that arrive when it is
  full.
* **Memory arrays** are flip-flop arrays with combinational read, not SRAM macros.
* **Reset** is synchronous and active low. It invalidates all lines and records.
* **Not built:** the processor and its instruction cache, and the second-level memory.
  A timing model of the memory is in `tb/l2_mem_model.sv`:
  * a line costs 6 + 1 × 7 cycles;
  * a request for the next block, made in the cycle after the previous line arrived,
    costs 8 cycles, because the interleaved banks hide the startup;
  * an abort adds one cycle.
* **Prefetch-cache replacement** is FIFO by default. LRU and IZ, which were only
  compared against FIFO, can be selected with `PFC_REPL`.

## Simulating

Every block has a self-checking testbench in `tb/`. Each testbench:

* compares against a behavioural model;
* prints `TB_RESULT checks=N failures=M`;
* stops through a watchdog if it hangs.

To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/cache_pkg.sv rtl/*.sv \
    tb/l2_mem_model.sv tb/tb_iap_cache_system.sv --top-module tb_iap_cache_system
./obj_dir/Vtb_iap_cache_system
```

`tb_config_sweep` (add `tb/cache_sys_harness.sv` to the file list) runs nine
instances side by side at the other evaluated sizes: 8 KB and 32 KB 4-way,
16 KB direct-mapped and 2-way, prefetch caches of 256 B, 4 KB and 1 KB 4-way,
and the 1 KB prefetch cache with LRU and with IZ replacement.
Each instance checks its loads and hit latency, and checks that a region of half its
data-cache size stays resident.

Substitute `tb_hot_bits_update`, `tb_set_assoc_cache`, `tb_iap_prefetch_unit`,
`tb_prefetch_queue`, `tb_ppu_unit` or `tb_victim_cache` for the unit tests. Only the
two system tests need `tb/l2_mem_model.sv`.

`tb_iap_cache_system` runs the top at its default sizes. It drives loads, stores and
UPDATE references through these phases, without resetting in between:

* directed IZ-on and IZ-off victim checks, and directed partial-hit checks;
* sequential sweeps, conflict patterns and random traffic with IAP + IZ;
* the same traffic with PPUVC, with both kinds of prefetcher;
* the same traffic with the prefetch cache.

Directed pre-update checks run in the PPUVC phases.

A reference memory checks every load. The test also checks that hits answer in one
cycle and victim-cache hits in two. Every event in `ev_o` must occur at least once. The
memory model's abort count must equal the abort events. The test runs about 210,000
cycles.
