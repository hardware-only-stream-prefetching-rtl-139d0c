# Stream prefetching with an access-ordering Rambus memory controller

Programs that walk arrays with a constant stride get little from caches, but
their addresses are predictable. This design uses that in two places:

1. A **reference prediction table (RPT)** beside the L2 cache watches every
   load and store, learns the stride of each instruction's operand addresses,
   and prefetches the L2 lines the instruction will touch next.
2. An **access-ordering memory controller** in front of a Direct Rambus
   (RDRAM) channel takes the demand misses, write-backs and prefetches, and
   always starts the request that the DRAM can accept soonest. Prefetches give
   it more requests to choose from. It can then hide bank conflicts and
   read/write turnarounds behind work for other banks.

Neither part needs help from the compiler or the program. Everything is
SystemVerilog (IEEE 1800-2017) and builds with Verilator 5.

```
 CPU loads/stores ──► rpt_prefetcher ──prefetch lines──► probe L2 ─► pf_mshr ─┐
 (ref_pc, ref_addr)   (64 entries, 4-way)                 (drop hits)  (32 max) │
                                                                               ▼
 L2 demand misses / write-backs (dm_*) ──────────────────────────► reorder_mc ──► Direct RDRAM channel
 L2 fills (fill_*) ◄──────────────────────────────────────────────┘  (40-entry    (row_*, col_*, dq_*)
                                                                      queue)
```

## 1. The reference prediction table (`rpt_prefetcher`, `rpt_state_next`)

The table is a 64-entry, 4-way set-associative cache. Its index and tag come
from the **instruction** address (bits 5:2 index 16 sets; bits 31:6 are the
tag). Each entry holds:

| field | meaning |
|---|---|
| `prev_addr` | operand address of this instruction's last execution |
| `stride` | difference between its last two operand addresses |
| `state` | 2-bit history: initial, transient, steady, irregular |
| `lo`, `hi` | the prefetch window [L, R], offsets from `prev_addr` in strides |
| `pdist` | current prefetch distance d |
| `last_line` | line of this entry's most recent prefetch request |

A reference is *correct* when `addr - prev_addr == stride`. The state moves
as follows (`rpt_state_next`). Every incorrect reference also loads the new
difference into `stride`.

| state | correct | incorrect |
|---|---|---|
| initial | steady | transient |
| transient | steady | irregular |
| steady | steady, **prefetch hit** | initial |
| irregular | transient | irregular |

A new instruction gets the round-robin victim way of its set. It starts in
initial, with stride 0.

### The prefetch window

This is the least obvious part. A prefetch hit is a correct reference by an
entry that is already steady. On a prefetch hit the entry does not queue any
addresses. It only moves its window:

* the base becomes the referenced address, so offsets drop by one: `L ← max(L−1, 1)`;
* the distance grows: with `ADAPTIVE=1` d goes 1, 2, 4, 8, 16, 16, … on
  successive hits; with `ADAPTIVE=0` d is `MAX_DIST` from the first hit;
* `R ← d`.

A prefetch engine then works on the entries whose window is open (`L ≤ R`).
It takes them in round-robin order, one entry per cycle. For the chosen
entry it forms `prev_addr + L × stride`, requests that line and increments L.
Once a stream runs steadily, each hit therefore adds exactly one request, d
elements ahead. A burst comes only when d grows. There is no request buffer:
the window itself holds what remains to be sent. An offset whose line is the
same as the entry's previous request is consumed without a request. With
8-byte elements, eight offsets share one line, so this filter matters.

A misprediction by a steady entry ends the stream. The window empties and
the distance falls back to zero.

Requests leave through a one-entry output register (`pf_valid/pf_ready`).
References are never stalled. If requests back up, the window simply stays
open longer.

## 2. Outstanding prefetches (`pf_mshr`) and the L2 probe

`stream_mem_top` filters each prefetch before it reaches memory:

1. The L2 is probed (`pf_probe_line` → `pf_probe_hit`, in the same cycle).
   The L2 answers hit when it holds the line or is already fetching it. Hits
   are dropped.
2. `pf_mshr` holds the lines of up to 32 prefetches sent to memory and not
   yet returned. A line that is already outstanding is dropped.
3. When the table is full, the prefetcher waits.

An L2 demand read for a line that is still outstanding as a prefetch is
accepted at once (`dm_ready`) and not sent to memory again. Its data arrives
with the prefetch fill. Every read fill goes to the L2 on `fill_*`, marked
`fill_prefetch` if it was a prefetch, and frees the `pf_mshr` entry. Demand
requests have priority over prefetches at the controller input.

## 3. The access-ordering controller (`reorder_mc`)

### Memory system

There are eight 64 Mbit Direct RDRAM devices on one channel. Each device has
16 banks of 512 rows × 1 KB. Neighbouring banks share sense amplifiers
("double banks"), so two adjacent banks may not be open at the same time.
Each 64-byte L2 line is four 16-byte dualocts of one row. `rdram_addr_map`
offers two mappings (parameter `INTERLEAVE`):

| mode | device | bank | line within row | row |
|---|---|---|---|---|
| `INTERLEAVE_LINE` (default) | line[2:0] | line[6:3] | line[10:7] | line[19:11] |
| `INTERLEAVE_PAGE` | line[6:4] | line[10:7] | line[3:0] | line[19:11] |

Here `line` is the byte address divided by 64. Bits above 64 MB are ignored.

### Command sequence of one line

The policy is closed-page: every access opens its row, moves the line and
closes the row. All offsets below are in 400 MHz memory cycles, counted from
the ROW ACT packet. They are derived from the timing set in `stream_pkg`
(tPACK 4, tRC 28, tRAS 20, tRP 8, tRR 8, tRCD 9, tCAC 8, tCWD 6, tCC 4, tRDP 4):

| cycle | event |
|---|---|
| 0 | ROW ACT |
| 9, 13, 17, 21 | COL RD / COL WR, one per dualoct (tRCD, then tCC apart) |
| 15 … 30 | write data, 32 bits per cycle (COL + tCWD) |
| 17 … 32 | read data, 32 bits per cycle (COL + tCAC) |
| 25 | ROW PRER (max(tRAS, last COL + tRDP)) |
| 33 | read completes (`resp_valid`); same bank may be activated again (max(tRC, PRER + tRP)) |

The COL wires are busy for 16 cycles per line. The channel therefore peaks
at one line per 16 cycles, which is 1.6 GB/s at 400 MHz. Up to four lines
are in flight at once.

### Choosing the next request

Queued requests wait in a 40-entry queue kept in arrival order. Entry 0 is
the oldest, and the queue closes up when an entry leaves. Count-down timers
record when each resource frees up:

* each bank (33 cycles after its ACT);
* both neighbours of an activated bank, which wait just as long;
* each device (tRR after its last ACT);
* the COL wires;
* the data wires;
* a bit map that reserves the ROW wires for pending PRER packets.

From the timers, each queued request gets a **soonest-issue time**: the
largest of its bank wait, its device wait, the COL-wire wait and the
data-wire wait. The COL-wire wait has tRCD subtracted. The data-wire wait
has 17 (read) or 15 (write) subtracted. Bus turnaround needs no timer of its
own. It follows from the different read and write data offsets: a write
right after a read waits two more cycles.

With `REORDER=1` the controller selects, in every cycle, the request with
the smallest soonest-issue time, taking the oldest on a tie. That request
starts when its time is zero, the ROW wires are free for four cycles and an
in-flight slot is free. A request may not pass an older request to the same
line if either of the two is a write. So a read never returns stale data,
and a write never changes data an older read has yet to fetch. With
`REORDER=0` the controller is a plain FIFO. That mode is only a baseline for
comparison.

The published mechanism keeps one running candidate and compares it with
each arriving request. Here the full minimum over the queue is recomputed
every cycle. This picks the same request, and it stays correct as the timers
count down.

**Limit of the greedy rule.** Greedy is not optimal. In a test with a long
chain of requests to one bank, interleaved with requests to other devices,
it served the easy requests first and finished later than FIFO (975 against
811 cycles). On pairs of conflicting requests spread over many banks, which
is the typical strided pattern, it cut the time from 1196 to 788 cycles.

## 4. Top level (`stream_mem_top`)

| port group | direction | meaning |
|---|---|---|
| `ref_valid, ref_pc, ref_addr` | in | one CPU load/store per cycle (instruction and operand address) |
| `pf_probe_valid, pf_probe_line` / `pf_probe_hit` | out / in | L2 probe for a prefetch candidate, answered in the same cycle |
| `dm_valid, dm_ready, dm_line, dm_write, dm_data` | in/out | L2 demand misses and dirty write-backs (valid/ready) |
| `fill_valid, fill_line, fill_prefetch, fill_data` | out | line fills to the L2 (one-cycle strobe) |
| `row_op, row_dev, row_bank, row_row` | out | ROW packet (ACT/PRER), strobe at the packet's first cycle |
| `col_op, col_dev, col_bank, col_col` | out | COL packet (RD/WR), strobe at the packet's first cycle |
| `dq_oe, dq_out` / `dq_in` | out / in | channel data, 32 bits per memory cycle |
| `events` | out | `stream_ev_t`: one strobe per mechanism, for performance counters |
| `pf_outstanding, mc_queued` | out | occupancy of `pf_mshr` and of the controller queue |

| parameter | default | meaning |
|---|---|---|
| `RPT_ENTRIES`, `RPT_WAYS` | 64, 4 | table size and associativity |
| `MAX_DIST` | 16 | largest prefetch distance |
| `ADAPTIVE` | 1 | grow the distance 1, 2, 4, … (0: fixed at `MAX_DIST`) |
| `PF_OUTSTANDING` | 32 | prefetches in flight |
| `QDEPTH` | 40 | controller queue (8 L2 misses + 32 prefetches) |
| `REORDER` | 1 | soonest-first ordering (0: FIFO) |
| `INTERLEAVE` | `INTERLEAVE_LINE` | address mapping |

Reset is asynchronous and active low. Everything runs on one clock. The
published system clocks the CPU side four times faster than the 400 MHz
channel. Here the prefetcher runs at the memory clock, so a design with two
clocks needs a clock-domain crossing at the `ref_*` and `dm_*`/`fill_*`
ports.

## 5. What this RTL does not contain

* The CPU, the L1 caches and the L2 cache (256 KB, 4-way, 64-byte lines,
  8 MSHRs, write-allocate/write-back in the modelled system). They connect
  through the ports above.
* The RDRAM devices. `tb/rdram_model.sv` is a behavioural model of them for
  simulation only. The channel is modelled at packet level. The serial
  packet encoding on the Rambus pins and the DRAM write buffers are not
  modelled.
* A running-candidate comparator. The full minimum is computed instead, as
  explained above.

Design choices of this RTL that other implementations might make
differently:

* the index/tag bits and replacement policy of the RPT;
* moving the window on each prefetch hit, rather than when prefetched data
  arrives;
* the one-entry line filter;
* the queue depth;
* the bit order of the address mappings;
* the fixed per-line command sequence, with precharge after writes also
  timed by tRDP;
* the write-after-read ordering rule.

## 6. Files

| file | content |
|---|---|
| `rtl/stream_pkg.sv` | shared types, RDRAM geometry, timing set and derived offsets, event struct |
| `rtl/rpt_state_next.sv` | RPT entry state transitions |
| `rtl/rpt_prefetcher.sv` | reference prediction table and prefetch engine |
| `rtl/pf_mshr.sv` | outstanding-prefetch table |
| `rtl/rdram_addr_map.sv` | line address → device/bank/row/column |
| `rtl/reorder_mc.sv` | access-ordering memory controller |
| `rtl/stream_mem_top.sv` | the whole system |
| `tb/rdram_model.sv` | behavioural RDRAM channel with timing checker (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/stream_sys_harness.sv` | parameterised system (CPU and L2 stand-ins, top, RDRAM model) used by the sweep |
| `tb/tb_stream_sweep.sv` | copy kernel in eleven prefetch/ordering/mapping configurations |

## 7. Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each
has a watchdog. To build and run one, for example the whole system:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    --top-module tb_stream_mem_top rtl/stream_pkg.sv tb/tb_stream_mem_top.sv
./obj_dir/Vtb_stream_mem_top
```

| testbench | what it checks |
|---|---|
| `tb_rpt_state_next` | all eight state/outcome pairs against the transition table |
| `tb_rdram_addr_map` | both mappings against a division/remainder reference, 2000 addresses each |
| `tb_pf_mshr` | random allocate/fill/lookup traffic against a queue model; reaches full |
| `tb_rpt_prefetcher` | lines prefetched for stride-64, unit-stride (two interleaved streams, random back-pressure) and negative-stride streams equal the set the window rule predicts, each line once; fixed distance gives 16 requests on the first hit and one per hit after; no prefetch for irregular addresses; stream end; replacement |
| `tb_reorder_mc` | isolated read: ACT 1 cycle after the request, completion 33 cycles after ACT; 32 consecutive lines at exactly one ACT per 16 cycles; 400 random reads and writes return the last written data; zero timing violations in the RDRAM model; reordering beats FIFO on bank-conflict pairs (788 against 1196 cycles) |
| `tb_stream_mem_top` | the whole system at its default parameters. An in-order CPU stand-in runs copy, daxpy, swap and vaxpy at unit stride and stride ten, 10,000 iterations each, with an L2 stand-in (4096 lines, FIFO replacement, write-back) and the RDRAM model. Checks all fill data, zero timing violations, that at least half of the unit-stride misses are removed, and that every mechanism occurs at least once. |
| `tb_stream_sweep` | the copy kernel in eleven configurations (see below): correct data, no timing violations, reordering never slower than FIFO |

### Results of the end-to-end run

`tb_stream_mem_top` runs each kernel for 10,000 iterations of 8-byte
elements, with fresh arrays for every run. A unit-stride vector then spans
1250 lines. The CPU stand-in issues one reference per cycle at most and
waits for every miss, so the cycle counts measure the memory side only.

| kernel | stride 1: cycles | stride 1: demand misses | stride 10: cycles | stride 10: demand misses |
|---|---|---|---|---|
| copy  | 47,616  | 420   | 467,753 | 7,800  |
| daxpy | 65,122  | 269   | 483,910 | 7,693  |
| swap  | 82,254  | 4     | 628,357 | 3,765  |
| vaxpy | 125,269 | 1,213 | 647,015 | 11,578 |

Demand misses are the misses still sent to memory. A miss to a line whose
prefetch is already in flight is merged with that prefetch and is not
counted. At unit stride almost every line arrives by prefetch. A stride-ten
stream needs a new line for every element. There the limit of 32
prefetches in flight and the channel bandwidth bound the gain.

### Configuration sweep

`tb_stream_sweep` runs the unit-stride and stride-ten copy kernel (2000
iterations) through `tb/stream_sys_harness.sv` in eleven configurations. It
checks that every run returns correct data, and that reordering is never
slower than FIFO for the same prefetcher. Times are normalised to the
baseline of the same address mapping: no prefetching, FIFO controller.

| configuration | line map, stride 1 | line map, stride 10 | page map, stride 1 | page map, stride 10 |
|---|---|---|---|---|
| adaptive distance, reordering | 0.37 | 0.42 | 0.59 | 0.43 |
| adaptive distance, FIFO | 0.48 | 0.64 | 0.63 | 0.85 |

The sweep also runs fixed distances 1, 2, 4, 8 and 16 with reordering on
the line mapping, and prints their times. The gain from reordering is
largest at stride ten, where each element needs its own line and the
queue holds the most requests to choose from.
