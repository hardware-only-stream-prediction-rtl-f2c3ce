# Stream prefetching with an access-ordering Direct RDRAM controller

Vector-style code (copy, daxpy, stencil sweeps) walks through memory with a
fixed stride. Caches help it little: the data is touched once, and at large
strides only one element of each line is used. The pattern is predictable,
though, and this design uses that in two places, entirely in hardware, with
no help from compiler or programmer:

1. A **reference prediction table (RPT)** watches the processor's loads and
   stores. It learns, per instruction, the stride between successive operand
   addresses. Once a stride has repeated, it asks the L2 cache to fetch lines
   further along the stream.
2. An **access-ordering memory controller** receives the resulting L2 line
   requests (demand misses, prefetches and write-backs) and drives a Direct
   Rambus (RDRAM) channel of eight devices. It always issues next the queued
   request that can start soonest. The prefetcher supplies many requests that
   are ready at once. The controller can then overlap work in different banks
   and devices, and avoid waiting on busy banks and on read/write turnarounds
   of the data bus.

Prefetching alone hides latency. With reordering added, the channel is also
kept busy more of the time.

```
 processor ──refs──► RPT prefetcher ──line prefetches──► L2 cache
                                                          │  misses, prefetches,
                                                          ▼  write-backs
                          Direct RDRAM ◄──packets── access-ordering controller
                        (8 devices x 16 banks)
```

The processor, the L1 caches and the L2 cache are ordinary components and are
not part of this RTL. The top module `stream_memory_system` contains the RPT
(processor clock) and the controller (memory clock). It brings the L2-side
connections of both out as ports.

## Files

| file | contents |
|---|---|
| `rtl/smp_pkg.sv` | state and packet types, RDRAM timing constants, channel geometry, line address mapping (`map_line`) |
| `rtl/rpt_state_next.sv` | next-state function of one RPT entry |
| `rtl/rpt_prefetcher.sv` | the RPT: table, stride detection, prefetch windows, outstanding limit |
| `rtl/reorder_mem_ctrl.sv` | request queue, soonest-issue selection, packet sequencing |
| `rtl/stream_memory_system.sv` | top: RPT and controller side by side |
| `tb/rdram_channel_model.sv` | behavioural RDRAM channel that checks every timing rule (simulation only) |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## The reference prediction table

### Entries and states

The table has 64 entries, organised as 16 sets of 4 ways. It is indexed by
instruction address bits [5:2], and the rest of the instruction address is the
tag. Each entry holds:

* `prev`: the operand address of the instruction's last reference,
* `stride`: the last difference between two of its operand addresses,
* `state`: a two-bit history,
* the prefetch state of the stream: distance `pdist` and window `[wl, wr]`.

A reference is *correct* when `addr - prev == stride`. The state moves as
follows (`rpt_state_next`):

| state | correct | incorrect (stride reloaded) |
|---|---|---|
| initial | steady | transient |
| transient | steady | irregular |
| steady | steady, **prefetch** | initial |
| irregular | transient | irregular |

A new instruction takes a free way, or the set's round-robin victim. It
starts in *initial* with stride 0. A stream therefore needs four references
before its first prefetch: allocate, learn the stride, confirm it, and then
predict correctly while steady.

### Prefetch window and distance

This is the subtle part. A stream with distance *d* should keep requests
outstanding for the elements at `addr + 1·stride … addr + d·stride`. It must
do so without requesting any element twice, and without buffering addresses.
Each entry therefore keeps a window `[wl, wr]` of stride offsets, counted from
its most recent address `prev`, that are still to be requested:

* **Issuing** the request for offset `wl` moves the window to `[wl+1, wr]`.
* **A correct steady-state reference** moves `prev` forward by one stride.
  Every offset then drops by one: `wl ← max(wl−1, 1)`. The far end is set to
  the current distance: `wr ← d`.
* `wl > wr` means nothing is left to request.

With the adaptive distance (`ADAPTIVE=1`, the default) *d* is 1 on the first
correct steady reference. It doubles on each further one, up to `MAX_DIST`
(16). A unit-stride-in-lines stream therefore requests offset 1, then 1–2,
then 2–4, 4–8 and 8–16. After that it requests exactly one new line (offset
16) per reference. Short or spurious streams thus cost few prefetches, while
long streams end up 16 elements ahead. With `ADAPTIVE=0` the distance is
`FIXED_DIST` from the start. A wrong prediction ends the stream: the window is
emptied and the distance reset.

If the prefetcher is held back, for example at the outstanding limit,
references keep moving `prev` forward. Offsets that have fallen behind the
processor are then simply never requested.

### One request per line

Elements are usually smaller than a 64-byte line. A window step whose target
lies in the same line as the previous offset (or, for offset 1, the referenced
element itself) is skipped without a request, so each line is asked for once.
A stride-8 stream therefore makes one request per line. A stride-80 stream
makes one per element.

### Issue and the outstanding limit

Each cycle, the lowest-numbered entry with a non-empty window takes one step:
either a skip, or a request on `pf_valid_o`/`pf_ready_i`. The request address
is `prev + wl·stride`, aligned to the line. A counter tracks accepted requests
whose line has not yet arrived (`pf_done_i`, one pulse per arrival). At 32,
requests stop until a line arrives. `flush_i` invalidates the whole table, for
use on a context switch.

Timing: a reference is looked up and its entry updated in the cycle
`ref_valid_i` is high (one per cycle). The first request for it can be offered
in the next cycle.

## The access-ordering controller

### A line on the channel

The controller clock is the 400 MHz RDRAM interface clock (2.5 ns). All
channel traffic is in packets of 4 cycles, on three buses: ROW (ACT,
precharge), COL (read/write column commands) and DATA (16 bytes per packet).
Pages are closed after every access. A 64-byte line is one ACT, four column
commands, four data packets and one precharge, at fixed offsets from the ACT:

| event | read | write |
|---|---|---|
| ROW ACT | 0 | 0 |
| COL k (k = 0..3), every tCC = 4 | 9, 13, 17, 21 | 9, 13, 17, 21 |
| DATA k, tCAC = 8 / tCWD = 6 after its COL | 17 … 29 | 15 … 27 |
| ROW PRER | 25 = last COL + tRDP | 31 = end of last write data |
| bank free again (PRER + tRP, at least tRC) | 33 | 39 |
| completion (`rsp_valid_o`) | 30 | 28 |

The other timing values (tRAS 20, tRR 8 between ACTs to one device, tRCD 9)
are in `smp_pkg`. The RDRAM core shares sense amplifiers between neighbouring
banks, so a bank cannot open while either neighbour is open.

### Choosing the next request

Requests wait in a queue (40 entries) kept in arrival order. For every queued
request the controller computes, each cycle, how many cycles remain before
its ACT could go out. That figure is the largest of:

* the wait of its bank and of both neighbouring banks,
* its device's wait since the last ACT (tRR),
* the wait until the COL bus is free tRCD cycles after the ACT,
* the wait until the DATA bus is free when this line's data would move. A
  write issued right after a read waits two extra cycles here: this is the
  read-to-write bus turnaround.

The request with the smallest wait wins, and ties go to the oldest. A request
is not eligible while an older request to the same line is queued if either
of the two is a write, so a read never overtakes the write-back of its line.
The winner is sent when its wait is zero, an in-flight slot is free, and a
64-cycle ROW bus reservation map shows both its ACT and its later PRER slot
free. From then on, the in-flight slot emits the rest of the schedule above.
At most one line completes per cycle, because lines on the channel are at
least 16 cycles apart.

Reads to different banks stream at one line per 16 cycles (1.6 GB/s). An
idle read completes 31 cycles after the request is accepted. `REORDER=0`
restricts the choice to the oldest request, which gives a plain in-order
controller for comparison.

The original scheme describes this as one running candidate, compared
against each arriving request. Here the minimum is recomputed over the whole
queue every cycle, which gives the same choice and stays correct as banks
free up.

### Address mapping

Memory is eight 64 Mbit devices (64 MB, 26-bit byte address). Each device has
16 banks, and each bank has 512 rows of 1 KB. The package function
`map_line` places a line when it is queued. Line address bits map as:

| `INTERLEAVE` | line address, high to low |
|---|---|
| `ILV_CACHE_LINE` (default) | row[8:0], line-in-row[3:0], bank[3:0], device[2:0] |
| `ILV_PAGE` | row[8:0], bank[3:0], device[2:0], line-in-row[3:0] |

The column of data packet k of a line is `{line-in-row, k}`.

## Interfaces

`stream_memory_system` ports, by side:

* **Processor side** (`cpu_clk`): `ref_valid_i`, `ref_pc_i`, `ref_addr_i`
  carry every load/store. `flush_i`.
* **Prefetch port to the L2** (`cpu_clk`): `pf_valid_o`, `pf_ready_i`,
  `pf_addr_o` (line aligned; may change while not accepted if the same
  instruction is referenced again), `pf_done_i`, and `pf_outstanding_o`.
* **L2 miss port** (`mem_clk`): `mem_req_valid_i`/`mem_req_ready_o` with
  write flag, byte address, 6-bit id and 512-bit write data.
  `mem_rsp_valid_o` pulses once per request with id, write flag and read
  data. It has no back-pressure.
* **RDRAM channel** (`mem_clk`): `row_valid_o`/`row_pkt_o`,
  `col_valid_o`/`col_pkt_o` and `wdata_valid_o`/`wdata_o` are one-cycle
  strobes at the first cycle of each packet. `rdata_valid_i`/`rdata_i` are
  expected exactly tCAC after a COL RD (an assertion checks this).

The L2 cache must report each arrival of a prefetched line on `pf_done_i`. It
must also report a prefetch it drops because the line is already present or
pending. Otherwise the outstanding count never falls. All state resets
asynchronously on `rst_n` low.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `RPT_ENTRIES`, `RPT_WAYS` | 64, 4 | table size and associativity |
| `ADAPTIVE`, `MAX_DIST`, `FIXED_DIST` | 1, 16, 16 | distance policy |
| `MAX_OUTSTANDING` | 32 | outstanding prefetch limit |
| `QDEPTH` | 40 | controller queue (8 L2 misses + 32 prefetches) |
| `REORDER` | 1 | soonest-issue ordering (0: in order) |
| `INTERLEAVE` | `ILV_CACHE_LINE` | address mapping |
| `ID_W`, `ADDR_W` | 6, 32 | tag and processor address widths |

## What follows the original scheme, and what is this design's own

Taken from the scheme:

* the RPT organisation, entry fields and state diagram;
* the sliding window and the adaptive doubling to 16;
* the 32-request limit and the flush;
* the greedy soonest-issue policy with FIFO ties and no read-over-write
  bypass;
* closed pages, the RDRAM timing values, 16 double-banked banks, eight
  devices;
* both interleavings, and the 4:1 clock ratio.

Chosen here, because the scheme leaves them open:

* the RPT index bits, the replacement policy and the fixed-priority window
  service;
* the same-line skip. This matches the published prefetch counts of about
  one per line for unit stride.
* how the window's base moves. It moves on each correct reference. One
  description of the scheme ties the move to arrivals instead; arrivals here
  only free outstanding slots.
* queue depth 40, 4 lines in flight and the request/response handshakes;
* the precharge point for writes. No write-recovery time is given, so it
  comes after the last write data.
* the exact field order of the address maps;
* expressing bus turnaround through DATA bus occupancy instead of a separate
  penalty;
* recomputing the candidate every cycle instead of on each arrival.

Not modelled: the RDRAM write buffer, and any priority of demand misses over
prefetches, which the original study found to change execution time by less
than 1%.

Synthesis notes: the six low bits of `pf_addr_o` are constant zero (line
aligned). The controller's parallel minimum search over 40 entries is the
largest logic. After generic synthesis it comes to about 9,000 word-level
cells and 27,000 flip-flops, mostly queued write data.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

* `tb_rpt_state_next`: all eight state/outcome pairs.
* `tb_line_mapping`: both maps against divide/modulo arithmetic.
* `tb_rpt_prefetcher`: exact request sequences for strides +64 and −128
  (distance 1, 2, 4, 8, 16). Also: one request per line at stride 8, none for
  an irregular pattern, the one-cycle latency, stalling at 32 outstanding and
  resuming, re-learning after a flush, and a fixed-distance-4 instance.
* `tb_reorder_mem_ctrl`: runs against the RDRAM model, with read data checked
  against a shadow memory. It checks the 31-cycle idle latency, write-then-read
  of one line, a busy bank passed by a later request (and not passed with
  `REORDER=0`), 32 lines in 31·16 cycles, a full queue, and 300 random
  reads/writes over a few lines, all with zero timing violations.
* `tb_stream_memory_system`: the full default configuration, end to end. A
  reference driver replays copy, daxpy, vaxpy (unit stride) and swap, copy
  (stride ten), 10,000 iterations each. Then come an irregular phase and a
  context switch with a burst of write-backs. A behavioural L2 (unbounded,
  write-allocate, dirty-line eviction) and the RDRAM model complete the
  system. It checks read data, timing violations and completion of all
  requests. It also counts every mechanism and fails if one never occurred:
  each RPT state, prefetch, line skip, distance at 16, outstanding limit,
  replacement, flush, out-of-order issue, same-line hold, bank wait,
  read/write switch, ROW bus hold and full queue. It runs in a few seconds.
* `tb_kernels_page_fixed`: the same kernels (2,000 iterations each) on the
  other configuration: page interleaving and a fixed distance of eight. It
  uses the same checks, except that here the 32-request limit must *not* be
  reached, because three streams at most eight elements ahead stay below it.

The end-to-end test measures behaviour, not the published speed-ups. Those
depend on the processor and caches, which are not part of this RTL.

## Simulating

With Verilator 5 (all files are plain SystemVerilog-2017):

```
verilator --binary --timing --assert --top-module tb_stream_memory_system \
  rtl/smp_pkg.sv rtl/rpt_state_next.sv rtl/rpt_prefetcher.sv \
  rtl/reorder_mem_ctrl.sv rtl/stream_memory_system.sv \
  tb/rdram_channel_model.sv tb/tb_stream_memory_system.sv
./obj_dir/Vtb_stream_memory_system
```

Other testbenches work the same way with the files their module uses. Use
`-Wall` for lint. Remaining warnings are unused bits of shared structures and
package constants.
