# Griffin: page placement and migration hardware for a four-GPU system

When several GPUs share one unified address space, every page starts in host
memory and ends up on the GPU that touched it first. Two problems follow.
First, one GPU often wins most of the first touches, so it collects far more
pages than the others. Second, a page stays where it first landed even after
another GPU has become its main user, so that GPU pays for remote accesses for
the rest of the run. Moving pages fixes both problems, but each move costs a
host or GPU flush, a TLB shootdown and a pipeline drain. Done naively, those
costs eat the gain.

Griffin spreads the first placement more evenly. It then moves pages between
GPUs only when the access history shows the move pays off, and it makes each
move cheap. This RTL implements its four mechanisms:

| Mechanism | What it does | Modules |
|---|---|---|
| Delayed first touch | If the most occupied GPU faults on a host page, that GPU reads the page remotely once. The page moves only on its next touch. | `dftm_unit`, `page_state_table` |
| Cooperative scheduling | Host-to-GPU moves wait until 8 page walks complete, then share one host flush. GPU-to-GPU moves happen once per period, grouped by source GPU, so each source is drained once. | `cpms_cpu_batcher`, `cpms_gpu_scheduler` |
| Dynamic page classification | Each Shader Engine counts accesses per page. Every 1000 cycles the counts are collected, smoothed and used to sort pages into five classes. Only some classes move. | `acc_count_monitor`, `acc_count_collector`, `dpc_unit`, `dpc_filter`, `dpc_classifier` |
| Asynchronous CU draining | Each CU of the source GPU waits only for its own in-flight transactions to the migrating pages. Then only those pages' TLB entries and L2 blocks are invalidated. The CUs resume before the data is copied. | `acud_controller`, `acud_cu_drain` |

`griffin_top` connects all of these for 4 GPUs. Each GPU has 4 Shader Engines and 36 CUs. Pages are 4 KB and page IDs are 36 bits wide. Shared types and constants are in `griffin_pkg`.

The design does not include the page-table walkers, the GPU pipelines, the TLBs and L2 caches, the host, or the engine that copies page data. `griffin_top` reaches each of these through a request/done handshake on its ports.

## The life of a page

Every page has a record in `page_state_table`. The record holds the page's home (host, or one of the GPUs) and an "accessed once" bit. The table has NUM_PAGES = 16384 entries, which is 64 MB of 4 KB pages. It is indexed by the low bits of the page ID.

The table has no reset network. After reset it clears itself with one write per cycle, and `init_busy` stays high for 16384 cycles while it does so. Do not send requests until `init_busy` falls.

A translation that reaches the IOMMU arrives as `xlat_valid/gpu/page`. The answer `xlat_kind` comes back in the same cycle:

- **`XL_LOCAL`**: the page is already on the requesting GPU.
- **`XL_REMOTE_GPU`**: the page is on another GPU. The requester reads it remotely (direct cache access, DCA). GPU-to-GPU moves are never made on demand. They happen only at period ends (see below).
- **`XL_HOST_DCA`**: the page is in host memory and this is its first touch. The requesting GPU is *strictly* the most occupied GPU (holds more pages than every other GPU). So the page stays on the host, the GPU reads it remotely, and the accessed-once bit is set.
- **`XL_MIGRATE`**: the page is in host memory, and either the requester is not the most occupied GPU or the page was touched before. `dftm_unit` sends a move request to the host batcher.

At start-up all GPUs hold zero pages. Nobody is strictly most occupied, so the first faults all migrate.

The per-GPU page counts (`occupancy`) and the page homes change only when a copy's `done` arrives. They do not change when the copy is requested. The host copy path and the GPU copy path can both finish in the same cycle. The table then writes both results. If both are for the same page, the GPU-to-GPU result wins.

## Counting accesses and the period

### Monitors

Every Shader Engine has an `acc_count_monitor`. It sees one post-coalescing L1 transaction per cycle. The monitor is a 100-entry content-addressed table. Each entry holds a 36-bit page ID and an 8-bit count that saturates at 0xFF, so one table is 100 × 44 bits = 550 bytes, and 2200 bytes for a GPU's four tables.

- A hit increments the count.
- A miss takes the lowest free entry.
- If the table is full, the access is dropped and `acc_dropped` pulses.

### Collector

The `acc_count_collector` has a free-running timer with a period of T_ac = 1000 cycles. At each period end it pulses `period_tick` and reads the 16 monitors one after another. Each record goes to `dpc_unit` as (page, GPU, count). Reading a record clears that entry, so each period starts from zero.

**Timing budget.** Reading 16 tables must fit inside one 1000-cycle period.

- If a monitor stepped over all 100 entries, the read-out alone would take 1600 cycles.
- So a monitor does not step over its entries. Each cycle it presents its lowest valid entry and clears it. A monitor with k live pages therefore reads out in about k + 1 cycles.
- Accesses that arrive during a monitor's own read-out are dropped (and flagged).
- If the timer expires while a collection is still running, `period_missed` pulses and that tick is skipped.
- With typical page counts, collection takes a few hundred cycles.

## Classifying pages (the hard part)

`dpc_unit` is the IOMMU-side table. It has 256 entries. Each entry holds a page, a raw count per GPU for the current period, and a filtered count per GPU.

- **Merging records.** Incoming records add into the raw count of their GPU with saturation, so the four Shader Engines of a GPU are summed.
- **Sweep.** After the last record (`collect_done`), a sweep visits one entry per cycle. For each entry it runs the filter and the classifier and may hand a candidate to the scheduler. The sweep stalls while the scheduler is not ready.
- **Freeing entries.** An entry is freed when all of its filtered counts have decayed to zero.

### Filter (`dpc_filter`)

The filter is combinational. For each GPU:

    C_new = (1 - α)·C_old + α·N        α = 0.03

In hardware:

- α is held as 1966 / 65536 (0.029999).
- `C` has 10 integer bits and 16 fraction bits, and the result is truncated.
- The filter therefore forgets slowly. A page that stops being used keeps a non-zero filtered count for hundreds of periods.
- Consequently, entries in the 256-entry table are freed slowly. When the table is full, new pages are dropped (`rec_dropped`) until entries free up.

### Classifier (`dpc_classifier`)

The classifier works on the new filtered counts. "max" is the highest count, "second" is the highest count on any other GPU, and the "holder" is the GPU the page is on now. Thresholds are compared in integers with ×1000 scaling, so no divider is needed. The tests run in this order and the first match wins:

1. **Streaming**: max < λt·T_ac, where λt = 0.03 accesses per cycle, i.e. under 30 per period. It never moves. This test runs first because a trickle of accesses from one GPU would otherwise also look dedicated.
2. **Mostly dedicated**: max ≥ 2.0 × second. It moves to the max GPU unless it is already there.
3. **Shared**: max < 1.3 × second. It moves only if the holder's own count is very low, which this design takes as holder × 2 < max.
4. **Owner-shifting**: the holder's filtered count fell since the last period, and some other GPU's count rose. The page moves to the rising GPU with the highest new count.
5. **Out of interest**: everything else. It does not move.

Details:

- Ties go to the lowest GPU number.
- Pages whose home is the host never become candidates, because the host-to-GPU path owns them.
- The published scheme lists the classes in the order dedicated, shared, streaming, owner-shifting. It defines owner-shifting as "none of the other three" and does not fix the order of the first three. Testing streaming first is this design's choice.
- Because of the slow filter, a new access pattern takes a few periods to change a page's class. The end-to-end test sees a dedicated page classified at the fourth period and an owner change at the third.

## Scheduling migrations

### Host to GPU (`cpms_cpu_batcher`)

Migrate requests from the delayed-first-touch unit collect in an 8-entry batch. A second fault on a page that is already queued is absorbed.

The batcher counts the `ptw_walk_done` pulses of the 8 page-table walkers. The batch closes when any of these happens:

- 8 walks have completed since it opened;
- it is full;
- 1000 cycles have passed since it opened, so a lone fault is not stranded.

A closed batch issues one `cpu_flush_req` and waits for `cpu_flush_done`. It then issues the copies one at a time on `pmc_h_*`. `batch_closed` pulses when a batch closes.

### GPU to GPU (`cpms_gpu_scheduler`)

During the sweep the scheduler takes candidates, with at most 16 pages from at most 2 source GPUs per period. It drops the rest and pulses `cand_dropped`. At the end of the sweep, for each source GPU it:

1. sends that GPU's `acud_controller` one drain request listing all of its pages;
2. waits for Continue;
3. copies the pages one at a time on `pmc_g_*`.

## Draining a GPU

Each GPU has an `acud_controller`, and each CU has an `acud_cu_drain`. The sequence follows the drain timeline of the scheme.

1. **Drain.** The controller raises `cu_drain` to all 36 CUs, together with up to 16 page addresses, a valid mask and the page-size shift (12 for 4 KB).
2. **Per-CU scan.** Each CU immediately pauses its workgroup scheduler (`cu_wg_pause`), so no new transactions are accepted. It then scans its in-flight buffer with a single 64-bit comparator. Each cycle it compares one (valid entry, drain page) pair after shifting both addresses right by the page shift. Invalid entries are stepped over in one cycle each. A pass takes at most INFLIGHT × (number of pages) cycles, and INFLIGHT = 16 cycles for an empty buffer. A pass that finds a match starts over.
3. **CU done.** A pass with no match raises that CU's done. Transactions to other pages do not hold the drain, even ones that never finish.
4. **Invalidate.** When all CUs are done, the controller requests the selective TLB shootdown and the selective L2 flush together (`tlb_shoot_req`, `l2_flush_req`, with `shoot_addr/mask/shift`) and waits for both.
5. **Continue.** The controller pulses Continue. The CUs resume, and the scheduler starts the page copies on the next cycle, so the copies never overlap the drain.

## Top-level interface summary

| Group | Direction | Notes |
|---|---|---|
| `xlat_*` | in/out | One lookup per cycle, answered combinationally. |
| `ptw_walk_done[8]` | in | Walk-complete pulses from the IOMMU walkers. |
| `se_acc_valid/page[4][4]` | in | One access per Shader Engine per cycle. |
| `cu_issue_*`, `cu_complete_*`, `cu_wg_pause` `[4][36]` | in/out | The CUs' in-flight memory transactions, with tags. |
| `cpu_flush_req/done` | out/in | Host flush before a host-to-GPU batch. |
| `pmc_h_*`, `pmc_g_*` | out/in | Page copies. Request held until `done`. One outstanding on each path. |
| `tlb_shoot_*`, `l2_flush_*`, `shoot_*` `[4]` | out/in | Selective invalidation per GPU. |
| `occupancy`, `period_tick`, `batch_closed`, `cls_valid/class`, `acud_continue`, `cand_dropped` | out | Observation. |

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| GPUs / Shader Engines per GPU / CUs per GPU | 4 / 4 / 36 | published configuration |
| N_PTW (walks per host batch) | 8 | published |
| T_ac (period) | 1000 cycles | published |
| α, λd, λs, λt | 0.03, 2.0, 1.3, 0.03 | published |
| Monitor entries, count width | 100, 8 bits | published |
| Page ID width, page size | 36 bits, 4 KB | published |
| NUM_PAGES | 16384 | chosen: 64 MB, the largest footprint evaluated |
| DPC table entries | 256 | chosen |
| In-flight buffer per CU | 16 | chosen |
| Pages per drain, GPUs per period | 16, 2 | chosen; the scheme caps both but gives no numbers |
| Host batch depth, host batch timeout | 8, 1000 cycles | chosen |

## Where this design goes beyond the published scheme

The published scheme describes what each mechanism does, but not its structure. Everything below is this design's own choice:

- the table organisations and the freeing rule;
- all handshakes;
- the read-out that skips empty entries;
- the batch timeout;
- the per-period limits;
- the classifier's test order;
- the threshold for "very low" holder counts.

Some published parts are not modelled, or are modelled only as ports:

- The driver software path for access counts (a message of about 20 pages per transfer) becomes a hardware sequencer.
- Translations return a kind and a home, not physical addresses.
- The copy engine, host flush, TLBs and caches are external.

## Simulating

Every module has a self-checking testbench in `tb/`. Each testbench prints `TB_RESULT checks=N failures=M` and contains a watchdog. With Verilator 5:

    verilator --binary --timing --assert --top-module tb_dpc_unit \
        -y rtl -y tb +libext+.sv -Irtl rtl/griffin_pkg.sv tb/tb_dpc_unit.sv
    ./obj_dir/Vtb_dpc_unit

`tb_griffin_top` runs the whole design at its default sizes, about 24 000 cycles and a few seconds of simulation. The run has these phases:

1. It waits for the table initialisation.
2. It closes one host batch on the 8th walk. That batch has four pages and a single flush.
3. It shows a delayed first touch followed by a second-touch migration, and a batch that closes on its timeout.
4. It drives six periods of Shader Engine traffic. The traffic produces streaming, mostly-dedicated, shared and owner-shifting pages.
5. It drains GPU 0 once for two pages. A CU with a transaction to one of those pages holds the drain for 300 cycles. Another CU with an unrelated transaction that never finishes does not.

The test counts each mechanism and fails if one never occurs. It also checks the final page homes and the occupancies.

The unit testbenches compare each block against its own reference model. Examples:

- the exact filter arithmetic;
- the classifier over thousands of random count vectors;
- randomised move and touch traffic on the page table and the first-touch unit.

## Limits to keep in mind

- The page state table is directly indexed by the low 14 bits of the page ID. Two live pages whose IDs differ only above bit 13 share a record. A wider table, or a hashed or associative one, is needed for address spaces larger than 64 MB.
- Traffic from 16 Shader Engines can exceed what 100 entries per Shader Engine and 256 entries in the DPC table can track in one period. Extra pages are simply not counted that period (see the drop flags).
- One copy at a time per path keeps the control simple. It serialises a batch's transfers.
