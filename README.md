# Two-level instruction cache for an ultra-low-power 8-core cluster

In a cluster of small processors that run the same parallel program, the
instruction cache costs a lot of energy. There are two usual ways to build it,
and each has a drawback:

* **Private caches** (one per core) are small and fast. But every core keeps its
  own copy of the same code. A loop that does not fit in one core's cache makes
  every core miss.
* **A shared cache** gives all cores the whole capacity. But the path from the
  core's fetch stage through a crossbar to a cache bank and back is long. That
  long path sets the clock and forces the use of fast, leaky cells.

This RTL builds both levels at once. Each core has a **small private cache
(L1)**. All private caches refill from a **shared cache (L1.5)** that sits one
clock cycle away, behind a read-only interconnect. A **response buffer** (a
pipeline register) cuts the path from the shared banks back to the cores. An
optional **request buffer** can cut the forward path too. Most fetches are
served by the cheap private cache. Code that all cores run is held once in the
shared level. No timing path runs from a core through the interconnect and back.

The design is the hierarchical ("HIER") instruction cache described in
*Energy-Efficient Two-level Instruction Cache Design for an Ultra-Low-Power
Multi-core Cluster*. That description gives the structure, the sizes, the line
format, the buffer configuration and the latencies. It also names the main
behaviours: pseudo-random replacement, round-robin arbitration, non-blocking
shared banks with several pending refills, and merged refills. The internal
micro-architecture below is this implementation's own. The section
[Departures and own choices](#departures-and-own-choices) lists where it departs
from or adds to that description.

## Structure

```
 core 0..7 (16-byte fetch port)
     |
 pri_icache  x8        512 B, 4-way, 16-byte lines, pseudo-random replacement
     |   ^
 req_buffer  resp_buffer   x8   request stage off, response stage on (parameters)
     |   ^
 ro_log_interconnect    8 cores -> 2 banks, round-robin per bank
     |   ^
 sh_icache_bank  x2     4 KiB each, 4-way, non-blocking, merges refills
     |   ^
 axi_refill_bus         round-robin over banks, AXI4 read master, 64-bit
     |
   L2 (not part of this RTL)
```

| File | What it is |
|---|---|
| `rtl/icache_hier_top.sv` | the whole cache; top level |
| `rtl/pri_icache.sv` | private L1 cache of one core |
| `rtl/req_buffer.sv`, `rtl/resp_buffer.sv` | pipeline stages between the L1 and the interconnect |
| `rtl/ro_log_interconnect.sv` | read-only interconnect to the shared banks |
| `rtl/sh_icache_bank.sv` | one bank of the shared L1.5 cache |
| `rtl/axi_refill_bus.sv` | refill path from the banks to the AXI4 port |
| `rtl/scm_array.sv` | tag/data array (standard-cell memory) |
| `rtl/prand_lfsr.sv` | pseudo-random source for replacement |
| `rtl/rr_tree_arbiter.sv` | tree-shaped round-robin arbiter of the interconnect |
| `rtl/rr_arbiter.sv` | flat round-robin arbiter of the refill bus |
| `rtl/icache_pkg.sv` | shared enums and AXI constants |

## How a fetch travels, cycle by cycle

All request ports use **request/grant**. The requester holds `req` and `addr`
until `gnt` is high in the same cycle. Every granted request gets exactly one
`rvalid` pulse later, with the 128-bit line. Cycle numbers below count from the
cycle in which the core's request is granted (cycle 0). They assume the default
buffers and no contention.

**L1 hit: data in cycle 1.** In cycle 0 the L1 reads the tag and data arrays of
all four ways. In cycle 1 it compares the tags and returns the hit line. In that
same cycle it can grant the next request, so hits stream at one line per cycle.

**L1 miss, L1.5 hit: data in cycle 4.**

| cycle | what happens |
|---|---|
| 1 | The L1 tag check misses. The L1 stops granting. |
| 2 | The L1 raises its refill request. The interconnect routes it to the bank chosen by address bit 4 (lines alternate between the two banks). The bank grants it if no other core wins that bank. |
| 3 | The bank checks its tags and drives the line. |
| 4 | The line leaves the response buffer. The L1 writes it into the victim way and passes it to the core in the same cycle. |

In short, the L1 check takes one cycle, reaching the L1.5 takes one, and the
L1.5 access takes two: one in the bank, one in the response buffer. Enabling the
request buffer adds one cycle (5). Disabling the response buffer removes one (3).

**L1.5 miss: data in cycle 19 with the test L2.** The bank does not stall. It
puts the miss in a pending-refill slot (described below). The instruction bus
sends a two-beat AXI4 burst. When the line is complete the bank writes it and
returns it. With an L2 that sends its first beat 10 cycles after accepting the
address, and no wait on `ARREADY`, the core gets the line 19 cycles after its
grant. In general the time is L + 9 for an L2 latency of L.

## The shared bank: non-blocking refills and merging

This is the most involved part of the design (`sh_icache_bank.sv`).

**Pipeline.** A bank has two stages:

* **Grant stage.** The bank grants one request and reads the set from all four
  tag and data arrays.
* **Check stage.** One cycle later the bank compares the tags.
  * A **hit** is answered in that cycle, so the bank takes one request per cycle.
  * A **miss** goes to the pending-refill slots.

**Pending-refill slots.** There are `SH_NB_MSHR` slots (4 by default). Each slot
holds:

* the line address;
* the victim way chosen at allocation;
* a bit mask of the cores waiting for the line;
* a 128-bit buffer that fills with the AXI beats.

A slot moves through four states:

`FREE` → `ISSUE` (asking the bus) → `WAIT` (collecting beats) → `DONE` (line
complete) → `FREE`.

**What a miss in the check stage does:**

* **Merge.** If a slot already holds the same line, in any state, the miss only
  sets its core's bit in that slot's waiter mask. There is no second L2 refill.
  This is the "merged refill" that saves L2 energy when eight cores run the
  same code.
* **Allocate.** Otherwise the miss takes a free slot. The victim is the first
  way of the set that is invalid and not already claimed by another pending
  refill of the same set. If there is none, the LFSR picks a way.

**Returning a completed line.** A `DONE` slot is written into the arrays only in
a cycle when the check stage is empty. The bank grants nothing in that cycle.
This has three effects:

* The write never collides with a tag read.
* A request never sees a half-updated set.
* The hit response and the refill response never compete for the output.

The line goes to every waiting core in that one cycle. The bank's `rvalid_o` is
a per-core vector for this reason, and the interconnect steers the line to each
core whose bit is set.

**When the bank withholds its grant:**

* while a `DONE` slot waits to be written;
* when there might be no free slot for a miss. A grant needs one free slot, or
  two if the check stage is busy.

With this rule a miss always finds a slot, so the check stage never stalls.

**While refills are outstanding**, hits for other lines keep being served. The
end-to-end test counts these "hits under a refill" and requires at least one.

## The private cache

`pri_icache.sv` is a blocking cache with one miss at a time. Its states are
`RUN` (hits, one tag check per cycle), `REFILL_REQ` and `REFILL_WAIT`.

* **Arrays.** Tags and data are kept in one `scm_array` per way. Valid bits are
  flip-flops, cleared at reset.
* **Victim.** The first invalid way, otherwise an LFSR way.
* **Forwarding.** The refilled line is written and forwarded to the core in the
  same cycle.
* **Counters.** Hits and misses are counted in 32-bit counters.

## Interconnect, buffers and refill bus

* **`ro_log_interconnect`.**
  * Selects the bank with the address bits just above the 4-bit line offset.
  * Has one round-robin arbiter per bank. A core that loses keeps its request
    and stalls. Requests to different banks are granted in the same cycle.
  * Each arbiter is a binary tree of two-input nodes, three levels for eight
    cores. A node passes on the request its priority bit points at when both
    children request. After a granted transfer, every node on the winner's
    path points its bit at its other child. A core that keeps requesting is
    served after at most seven other grants.
  * The request path is combinational.
  * Responses are OR-ed per core from the banks' valid vectors. A core has at
    most one request in flight, so only one bank ever answers it.
* **`req_buffer`.** A one-entry register slot. It accepts a new request in the
  same cycle its stored one is granted, so it keeps one transfer per cycle.
  With `ENABLE = 0` it is a wire.
* **`resp_buffer`.** Registers `rvalid` and the line. There is no back-pressure.
* **`axi_refill_bus`.**
  * Picks one bank refill per cycle, round-robin.
  * Loads it into a register that drives AR. `ARVALID` and its payload stay
    stable until `ARREADY`.
  * Every refill is one burst: `ARLEN = 1` (two beats), `ARSIZE = 3` (8 bytes),
    `ARBURST = INCR`.
  * `ARID = {bank, slot}`. L2 may return bursts in any order. Beats go back to
    the bank named by the high ID bits.
  * `RREADY` is always high.
  * Only the read channels exist, because the cache never writes.

## Parameters (top level)

| Parameter | Default | Meaning |
|---|---|---|
| `NB_CORES` | 8 | cores, one private cache each |
| `PRI_CACHE_SIZE` | 512 | bytes per private cache |
| `SH_NB_BANKS` | 2 | shared banks (power of two) |
| `SH_BANK_SIZE` | 4096 | bytes per shared bank (2048 gives the 4 KiB shared configuration) |
| `NB_WAYS` | 4 | associativity of both levels |
| `LINE_BYTES` | 16 | line size (4 words) |
| `AXI_DATA_W` | 64 | refill bus width |
| `SH_NB_MSHR` | 4 | pending refills per bank |
| `USE_REQ_BUF` | 0 | request buffer stage |
| `USE_RESP_BUF` | 1 | response buffer stage |
| `ADDR_W` | 32 | address width |

With the defaults:

* each private cache has 8 sets, with a 25-bit tag;
* each bank has 64 sets, with a 21-bit tag (the bank-select bit is not stored);
* the AXI ID is 3 bits.

## Top-level ports

* **Fetch ports.** Per core:
  * `fetch_req_i`, `fetch_addr_i[c]` (byte address; bits 3:0 ignored);
  * `fetch_gnt_o`;
  * `fetch_rvalid_o`, `fetch_rdata_o[c]` (128 bits, the word at the lowest
    address in bits 31:0).
* **AXI4 read master.**
  * AR channel: `axi_ar_valid_o`, `axi_ar_ready_i`, `axi_ar_addr_o`,
    `axi_ar_id_o`, `axi_ar_len_o`, `axi_ar_size_o`, `axi_ar_burst_o`.
  * R channel: `axi_r_valid_i`, `axi_r_ready_o`, `axi_r_data_i`, `axi_r_id_i`,
    `axi_r_last_i`, `axi_r_resp_i`.
  * `RRESP` is not acted on. An assertion flags a non-OKAY response.
* **Counters** (32 bits):
  * `pri_hit_cnt_o`, `pri_miss_cnt_o`: per core;
  * `sh_hit_cnt_o`, `sh_miss_cnt_o` (refills started), `sh_merge_cnt_o`
    (misses merged into a pending refill): per bank.
* **Clock and reset.** One clock, `clk_i`, and an active-low asynchronous reset,
  `rst_ni`. Reset invalidates both levels.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The reference line at byte address `a` is
computed from the address alone (`tb_icache_pkg.sv`): each 8-byte word holds
`{~a, a}`. `l2_axi_model.sv` is a behavioural L2 with these features:

* random `ARREADY`;
* a fixed latency;
* bursts returned out of order.

| Testbench | Main checks |
|---|---|
| `tb_icache_hier_top` | Full design at default parameters. Checks:<br>• latencies of 1 / 4 / 19 cycles (L1 hit / L1.5 hit / L1.5 miss; the last may grow only by `ARREADY` waits);<br>• data of every fetch;<br>• exact miss counts for a loop that fits the L1 and one that fits the L1.5;<br>• more than half of the fetches missing in L1 for loops between the two capacities;<br>• that each mechanism occurs: L1 and L1.5 hit and miss, merged refill, multi-core response, bank conflict, hit under a refill, several bursts in flight, AXI back-pressure. |
| `tb_icache_hier_cfg` | 4 KiB shared level with both buffers on. Checks the 5-cycle L1.5 hit and the same loops. |
| `tb_icache_hier_16c` | 16 cores on the 8 KiB shared level with both buffers on, the scaled-up case the request buffer is meant for. Same checks as above, 5-cycle L1.5 hit. |
| `tb_icache_hier_apps` | Code footprints of six embedded applications, fetched as straight-line code by all cores, twice, from a reset cache. Checks that a footprint that fits the shared level is refilled exactly once per line. |
| `tb_pri_icache` | hit latency, one hit per cycle, refill timing, replacement, counters |
| `tb_sh_icache_bank` | merging (one refill for two cores), two refills in flight, hits while a refill is pending, random traffic with out-of-order refills, counters |
| `tb_ro_log_interconnect` | routing, one grant per bank, round-robin fairness (no core waits more than 7 grants), response steering |
| `tb_rr_tree_arbiter` | 8-line and 5-line trees: one-hot grant to a requester, index matches grant, no requester passed over more than 7 times |
| `tb_axi_refill_bus` | AR encoding and stability, per-bank/slot steering of beats, both banks served, several bursts in flight |
| `tb_req_buffer`, `tb_resp_buffer`, `tb_scm_array`, `tb_prand_lfsr` | cycle-exact comparison with a reference; LFSR period 65535 |

**Synthetic loops.** The top-level test runs the synthetic benchmark shape used
to evaluate this cache. All eight cores fetch the same loop body four times.
The core models fetch one line after another and do no other work, so the
cycle counts measure the fetch path only. They are not program run times.
Results at the default configuration (8 × 512 B L1, 2 × 4 KiB L1.5):

| Loop body | Cycles | L1 misses (all cores) | L1.5 refills |
|---|---|---|---|
| 0.375 KiB | 729 | 192 | 24 |
| 0.75 KiB | 1 740 | 1 126 | 48 |
| 1.5 KiB | 3 754 | 2 992 | 96 |
| 3 KiB | 7 596 | 6 144 | 194 |
| 6 KiB | 17 366 | 12 288 | 532 |
| 12 KiB | 53 833 | 24 576 | 2 308 |

The pattern matches the one the cache was designed around:

* Once the loop outgrows the 512-byte private cache, most fetches miss in L1
  (73 % at 0.75 KiB), and from 1.5 KiB on nearly all of them do. The test
  requires more than half for every loop between the two capacities.
* Up to 6 KiB the shared level still holds the loop, and its merging means each
  line costs L2 about one refill for all eight cores.
* At 12 KiB the shared level thrashes as well.

With the 4 KiB shared configuration, the 6 KiB loop already takes 28 000 cycles.
With 16 cores and both buffers on, the 0.375 KiB loop takes 773 cycles for
twice the work, and the 3 KiB loop 9 073 with 194 refills: each shared line
still costs L2 about one refill, now serving sixteen cores.

**Application footprints.** The programs of the benchmark applications are not
available. `tb_icache_hier_apps` stands in for each one by its code size alone.
Refills are counted over two passes from a reset cache:

| Application (code size) | Lines | L1.5 refills |
|---|---|---|
| CNN, CIFAR-10 (7.1 KiB) | 455 | 455 |
| CNN, keyword spotting (3.5 KiB) | 224 | 224 |
| colour tracking (2.9 KiB) | 186 | 186 |
| image segmentation, SLIC (26.1 KiB) | 1 671 | 3 270 |
| HOG (31.1 KiB) | 1 991 | 3 947 |
| SRAD (31.7 KiB) | 2 029 | 4 030 |

The first three fit the 8 KiB shared level and cost one refill per line. The
last three refill nearly every line in both passes, because a straight pass
over more than the capacity leaves little for any replacement policy to keep.
A real program that loops inside its code would reuse more lines than this.

**Running a test** with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/icache_pkg.sv tb/tb_icache_pkg.sv tb/tb_icache_hier_top.sv \
    --top-module tb_icache_hier_top
./obj_dir/Vtb_icache_hier_top
```

The same pattern works for any other testbench: put its name in place of
`tb_icache_hier_top`. The `-Irtl -Itb` options let Verilator find the modules by
file name. The full-size test runs in well under a second.

## Departures and own choices

What follows the described design:

* one private cache per core and shared banks, a single cycle apart;
* 8 cores;
* 512 B private caches;
* two 4 KiB shared banks (the "8 KiB" configuration; 2 KiB banks give the
  4 KiB one);
* 4-way associativity and 16-byte lines;
* 128-bit fetch and L1.5 ports, and a 64-bit AXI4 refill bus;
* pseudo-random replacement;
* round-robin arbitration;
* non-blocking shared banks with several pending refills, and merged refills;
* request and response buffers that can be switched on by a parameter, with
  only the response buffer on by default;
* latencies of 1 cycle (L1) and 2 + 1 cycles (L1.5 plus the hop to it);
* hardware hit/miss counters.

What this implementation chose, where the description gives no detail:

* **Bank count.** The two-bank organisation follows the stated sizes (two banks
  of 4 KiB or 2 KiB, a "banking factor of 2"). The block diagram of the same
  design draws one shared box per core. `SH_NB_BANKS` can be raised.
* **Latency split.** The 2-cycle L1.5 access is read as one cycle in the bank
  plus one in the response buffer.
* **Refill time.** The described configurations quote a refill time of 19
  cycles for this design and 15 for private caches alone. That time includes
  the cluster bus and the L2, which are not part of this RTL. Here an L1.5 miss
  reaches the core L + 9 cycles after its grant, where L is the number of
  cycles the L2 takes from accepting the address to its first beat. The test
  L2 has L = 10 and so gives the quoted 19, but that match depends on the L2
  and is not evidence by itself. The 4-cycle gap between the quoted numbers is
  this design's 4-cycle path through the shared level.
* **Slots and grants.** The slot count is 4. Writing a refill only in an empty
  check stage, and the conservative grant rule, are this design's own.
* **Victim choice.** Invalid ways are used first, and ways claimed by pending
  refills are avoided. The replacement policy of the shared banks is not given;
  the private caches' pseudo-random policy is reused.
* **Interconnect.** Line-interleaved bank selection. The arbiters are trees of
  two-input nodes, as the name "logarithmic interconnect" suggests. The
  per-node priority rule is this design's own.
* **Blocking L1.** The private cache handles one miss at a time and forwards the
  refilled line directly.
* **Standard-cell memories** are modelled as flip-flop arrays with a registered
  read, not as latches with clock gating.
* **No flush or enable input.** No software invalidation is provided.

**Not part of this RTL:**

* the RISC-V cores and their one-line prefetch buffer (the fetch ports are
  their interface);
* L2 memory (only a testbench model);
* the rest of the cluster: data memory, DMA, buses, clock-domain FIFOs, FLLs.

**Not measured here:**

* the real-application results (CNN, colour tracking, image segmentation,
  HOG, SRAD), because their programs are not available; only their code sizes
  are exercised;
* power, area and timing.
