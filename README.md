# Shared instruction cache with hybrid prefetching for an ultra-low-power cluster

A cluster of small in-order cores running from a tiny shared instruction
cache loses most of its time to misses. The code sits in an L2 memory at
least 20 cycles away, and a 1 KB cache cannot hold the loop body of an
unrolled kernel. Making the cache bigger is expensive in area and power.
This design keeps the cache at 1 KB and hides the L2 latency with a cheap
prefetcher built into the cache.

The prefetcher combines three schemes in one small state machine:

* **SWP, software prefetch.** The program writes a start address and a size
  into two registers just before calling a function. The function's lines
  are then fetched while the caller is still running.
* **NLP, next-line prefetch.** When a core's miss goes out on the L2 bus,
  the next *N* lines are fetched too.
* **STP, stream prefetch.** After an NLP burst ends, the prefetcher waits a
  set number of cycles and then fetches the next burst of the same
  sequential stream. It keeps doing this, so lines arrive before the miss
  rather than after it.

The three schemes have fixed priorities: SWP first, then NLP, then STP. A
new request drops the burst in progress, so the prefetcher never keeps
fetching for a stream the program has already left. Prefetched lines go
into the cache itself; there is no separate buffer. They are inserted
without touching the pseudo-LRU state, so a prefetched line that no core
uses is the first to be evicted.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, and passes
Verilator lint and the slang front end of Yosys.

## Block structure

```
 core 0..3 fetch ports
      │
 ┌────▼──────┐  hit: 1 cycle   ┌───────────┐ ┌────────────┐ ┌────────────┐
 │pcache_ctrl├────────────────►│ tag_array │ │ data_array │ │ plru_table │
 │  (x4)     │                 └─────▲─────┘ └─────▲──────┘ └─────▲──────┘
 └────┬──────┘                       │ read-only   │ refill       │ victim
      │ miss (line, way)             │ tag port    │              │
      │          ┌───────────────────┴──┐          │              │
      │          │ prefetch_pcache_ctrl │◄─ line requests ─┐      │
      │          └──────────┬───────────┘                  │      │
 ┌────▼─────────────────────▼──┐                    ┌──────┴──────┴─┐
 │      miss_interconnect      │                    │ prefetch_fsm  │◄── prefetch_regs
 └─────────────┬───────────────┘                    └──────▲────────┘    (register bus)
        ┌──────▼────────────┐   demand miss on AXI         │
        │ master_cache_ctrl ├──────────────────────────────┘
        └──────┬────────────┘
               │ AXI4 read (AR/R) to L2
```

| module | role |
|---|---|
| `icache_prefetch_top` | wires everything; the top level |
| `pcache_ctrl` | private cache controller of one core: hit in one cycle, miss to the master |
| `tag_array` | shared tag banks: NB_CORES+1 read ports, one refill write port |
| `data_array` | shared data banks: NB_CORES read ports, one refill write port |
| `plru_table` | tree pseudo-LRU per set, updated only by the cores |
| `miss_interconnect` | round-robin funnel of all miss/prefetch requests to the master |
| `master_cache_ctrl` | MSHRs, request merging, AXI bursts, refills, miss events |
| `prefetch_fsm` | the hybrid SWP/NLP/STP state machine |
| `prefetch_pcache_ctrl` | prefetcher's controller: tag check, victim choice, request |
| `prefetch_regs` | memory-mapped SWP and configuration registers |
| `icache_pkg` | shared constants, prefetch-source enum, register offsets |

## The fetch path

**Hits.** Each core has its own controller and its own read port on the tag
and data banks, so the four cores hit in parallel without arbitration. A
request (`fetch_req_i`, `fetch_addr_i`) is looked up in the cycle it is
presented. On a hit it is granted (`fetch_gnt_o`) in that cycle, and the
instruction comes back with `fetch_rvalid_o` in the next one. Back-to-back
hits therefore stream one instruction per cycle. The hit way is recorded in
the pseudo-LRU table.

**Misses.** On a miss the request is also granted. The controller picks a
way: the first invalid way of the set, or else the pseudo-LRU victim. It
sends (line address, way) through the miss interconnect and waits.
Meanwhile it grants nothing else, so each core has one fetch in flight, as
an in-order core without branch prediction does. When the line arrives the
word is returned and the way is recorded in the pseudo-LRU table.

**Master controller.** All misses and prefetches meet here, one per cycle.
Each line being fetched holds a miss-status entry (MSHR): its line address,
its way, and a bitmask of the cores waiting for it.

* A request for a line that already has an entry is **merged**: the core's
  bit is added and no second burst is sent. With four cores running the
  same code this happens constantly.
* A request for a new line takes a free entry and issues one AXI4 INCR
  burst. With a 64-bit bus a 16-byte line is 2 beats. The AXI ID is the
  entry index.
* With no free entry, the request waits (`ready` low).

Up to `NB_MSHR` bursts are outstanding at once. This is what lets
prefetching hide latency: a core waits on one line while several prefetched
lines are already on their way. On the last beat of a burst the line is
written into the tag and data banks. It is also handed to every waiting
core in the same cycle. A core whose request merges in the very cycle of
the last beat is answered in that cycle too.

## The prefetcher

### State machine (`prefetch_fsm`)

| state | meaning |
|---|---|
| `S_IDLE` | no burst |
| `S_PREFETCH` | issue the current burst, one line per accepted handshake on `pf_valid_o`/`pf_ready_i` |
| `S_WAIT` | stream wait: count `wait_cycles`, then start an STP burst |

The FSM holds only the next line address, the number of lines left, the
source of the burst (`PF_SWP`, `PF_NLP`, `PF_STP`) and the wait counter.

Triggers, checked every cycle:

1. **SWP.** A write to the SWP size register pulses `swp_valid`. The burst
   covers every line touched by `[addr, addr+size)`; for example 40 bytes
   from `0x1008` is 3 lines. This trigger is always accepted.
2. **NLP.** A demand miss sent on AXI raises `miss_evt_valid` with its line.
   If NLP is enabled and the burst size is non-zero, the burst is
   `ceil(burst_bytes/16)` lines, starting at the line after the miss. (The
   miss line itself is already in flight.) The trigger is ignored while an
   SWP burst is being issued.
3. **STP.** An NLP or STP burst has just finished and STP is enabled. The FSM
   enters `S_WAIT` and holds it for exactly `wait_cycles` cycles. It then
   starts a burst of the same length at the line after the last one issued.
   The first line of the new burst goes out `wait_cycles + 1` cycles after
   the last line of the old one. With 0 wait cycles the bursts run back to
   back.

**Preemption.** A trigger of the same or higher priority replaces the burst
in progress at once, and `preempt_o` pulses. The lines not yet issued are
dropped. A lower-priority trigger never interrupts a higher-priority burst.
The reason: a newer miss or an explicit software request is a better guide
than an old stream, and continuing the old burst would only pollute the
cache.

`wait_cycles` decides how far ahead of the cores the stream runs:

* at 0, STP can run so far ahead of slow cores that it evicts lines they
  still need;
* around 50–60 (with 256-byte bursts and cores that stall now and then),
  the stream stays just ahead of the code. The sweeps under Verification
  show both effects, and how the best wait shrinks when the cores fetch
  faster.

A burst size of 0 turns NLP and STP off.

### Prefetch cache controller (`prefetch_pcache_ctrl`)

This controller has a tag read port but no data port: the prefetcher never
reads the lines it brings in. For each line from the FSM it checks the tags
in the cycle the line is accepted.

* A line already in the cache is dropped (`drop_o`), and the next line can
  be accepted in the next cycle.
* A missing line gets a way (the first invalid way, else the pseudo-LRU
  victim) and becomes a prefetch request through the miss interconnect.

The controller does not wait for the refill.

### Pollution control

Only the core controllers drive the pseudo-LRU update ports. A prefetched
line therefore arrives looking "least recently used". If a core uses it,
the hit marks it as used like any other line. If no core uses it, it is the
next victim in its set. Badly aimed prefetches thus mostly evict each other
rather than the working set.

### Programming model (`prefetch_regs`)

| offset | register | fields |
|---|---|---|
| 0x0 | SWP_ADDR | start byte address |
| 0x4 | SWP_SIZE | bits 15:0 size in bytes; **writing starts the software prefetch** |
| 0x8 | NLP_CFG | bit 16 enable, bits 15:0 burst size in bytes |
| 0xC | STP_CFG | bit 16 enable, bits 15:0 wait cycles |

A software prefetch is two stores: address, then size. Place them a little
before a call, with the callee's address and length. After reset NLP and
STP are off, the burst size is 256 bytes and the wait is 50 cycles. All
registers read back. The register bus is single-cycle: `cfg_rdata_o`
reflects `cfg_addr_i` in the same cycle, and writes take effect at the
clock edge.

## Top-level interface and parameters

`icache_prefetch_top` ports:

* clock `clk_i`, asynchronous active-low reset `rst_ni`;
* per-core fetch ports: `fetch_req_i`, `fetch_addr_i`, `fetch_gnt_o`,
  `fetch_rvalid_o`, `fetch_rdata_o`;
* the register bus: `cfg_*`;
* an AXI4 read master: `axi_ar_*` and `axi_r_*`. `axi_r_ready_o` is always
  1; the cache never writes;
* observation outputs `pf_*`: FSM busy, source, preemption, wait state,
  dropped line, and prefetch request sent.

| parameter | default | meaning |
|---|---|---|
| `NB_CORES` | 4 | cores sharing the cache |
| `CACHE_BYTES` | 1024 | capacity |
| `NB_WAYS` | 2 | associativity (power of two) |
| `LINE_BYTES` | 16 | line size |
| `NB_MSHR` | 8 | outstanding line fetches |
| `AXI_DATA_W` | 64 | L2 bus width |

The first four defaults are the evaluated cluster configuration. The defaults
give 32 sets and a 23-bit tag. Addresses are 32 bits and instructions are
32-bit words.

## What is this implementation's own choice

The following behaviour follows the published scheme this design
implements:

* the overall organisation;
* single-cycle hits in private controllers over shared banks;
* miss merging in a master controller;
* pseudo-LRU with prefetches that do not update it;
* the three schemes, their priorities and preemption;
* the wait state;
* line-by-line issue of 16-byte lines;
* the read-only tag port;
* two registers per software prefetch.

These details are not specified there and were chosen here:

* the fetch handshake (req/gnt plus rvalid);
* one fetch in flight per core;
* the first-invalid-way rule for the core controllers;
* round-robin arbitration in the miss interconnect;
* `NB_MSHR = 8` and a 64-bit AXI bus. With a 20-cycle L2, 8 lines in
  flight deliver about 0.35 lines per cycle. A core fetching one
  instruction per cycle consumes 0.25 lines per cycle. With 4 entries
  (0.17 lines per cycle) the prefetcher could not get ahead of even one
  core;
* the register map, bus and reset values;
* NLP starting at the line after the miss;
* STP continuing the stream after NLP/STP bursts only, not after SWP;
* only *demand* bursts (not pure prefetch bursts) count as misses for NLP,
  so the prefetcher does not trigger itself;
* rounding sizes up to whole lines;
* tag and data banks built as flip-flop arrays with combinational reads,
  standing in for the standard-cell memories the real cache uses.

Known limitations:

* There is no flush or invalidate port.
* A core may look up a line in the cycle its refill is being written. If
  so, it misses and fetches the line again. The copy can land in the other
  way of the set; this is harmless, because both copies hold the same data.
* Two outstanding fetches may choose the same way of the same set. The
  later refill then wins. The waiting cores still get their data, because
  it is forwarded from the refill.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_tag_array`, `tb_data_array` | random reads on all ports against a reference copy |
| `tb_plru_table` | 2-way and 4-way victims against an independent model of tree PLRU |
| `tb_miss_interconnect` | payload integrity, no loss or duplication, strict round-robin under full load |
| `tb_pcache_ctrl` | data, one-cycle hit timing, hit/miss and chosen way against a reference cache |
| `tb_master_cache_ctrl` | miss latency, merging, 8 outstanding bursts, back-pressure when full, prefetch entries, random traffic from all five sources |
| `tb_prefetch_fsm` | SWP/NLP line ranges, NLP disable, STP gap of `wait+1` cycles, back-to-back bursts at wait 0, preemption rules |
| `tb_prefetch_pcache_ctrl` | drops at one line per cycle, requests and way choice |
| `tb_prefetch_regs` | reset values, read-back, one-cycle SWP trigger, random bus traffic against a reference copy |
| `tb_icache_prefetch_top` | whole design at default size, four cores, L2 model |
| `tb_prefetch_sweep` | whole design, NLP burst-size and STP wait-cycle sweeps at full and half core speed, cold misses removed by SWP |

`tb/l2_mem_model.sv` is a behavioural L2: every burst is answered 20
cycles after its address, beats in order. Word address `a` holds
`{a[31:2],2'b00} ^ 32'h5A5AA5A5`, so checkers compute the expected data
without a memory image.

The end-to-end test runs two programs on four cores from reset, under
several settings:

* **LOOP:** a 1.5 KB loop body, three iterations. This is the pattern of
  unrolled kernels, which overflow the cache.
* **CALLS:** a short loop calling one of three 192-byte functions in turn.
  Core 0 issues an SWP for the next callee from the middle of the loop.

Every instruction is checked. The runs must be faster with prefetching, and
every mechanism listed in the testbench header must occur at least once.
Typical results at a seed of 1:

| program | setting | cycles |
|---|---|---|
| LOOP | no prefetch | 7778 |
| LOOP | NLP, 256 B | 1982 |
| LOOP | NLP+STP, 256 B bursts, wait 20 | 1261 |
| CALLS | no prefetch | 4362 |
| CALLS | SWP + NLP 64 B | 2072 |

To run a testbench with plain Verilator, from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_icache_prefetch_top \
  -y rtl -y tb rtl/icache_pkg.sv tb/tb_icache_prefetch_top.sv
./obj_dir/Vtb_icache_prefetch_top
```

Replace the top module name to run another testbench. Lint a module with
`verilator --lint-only -Wall -Wno-fatal -y rtl rtl/icache_pkg.sv rtl/<module>.sv`.
`tb_prefetch_sweep` repeats LOOP for a range of NLP burst sizes and STP
wait cycles, and prints the hit rate and cycle count of each run. The hit
rate counts instructions; with no prefetching, 3 of the 4 words of every
line hit. Results:

| setting | hit rate | cycles |
|---|---|---|
| no prefetch | 75.0 % | 7778 |
| NLP 64 B | 91.7 % | 3362 |
| NLP 128 B | 94.8 % | 2534 |
| NLP 256 B | 96.9 % | 1982 |
| NLP 288 B | 97.4 % | 1844 |
| NLP 256 B + STP wait 0 | 99.2 % | 1347 |
| NLP 256 B + STP wait 20 | 99.5 % | 1261 |
| NLP 256 B + STP wait 50 | 97.7 % | 1730 |
| NLP 256 B + STP wait 60 | 96.9 % | 1982 |

These stand-in cores fetch one instruction every cycle, so they eat the
stream as fast as it can arrive, and a short wait is best. Real cores also
stall on data accesses. The testbench therefore repeats the STP sweep with
the cores at half speed, with one idle cycle after every instruction:

| setting, half-speed cores | hit rate | cycles |
|---|---|---|
| NLP 256 B only | 98.4 % | 2701 |
| + STP wait 0 | 97.1 % | 2919 |
| + STP wait 10 | 97.2 % | 2940 |
| + STP wait 20 | 98.3 % | 2676 |
| + STP wait 40 | 99.0 % | 2569 |
| + STP wait 50 | 99.5 % | 2437 |
| + STP wait 60 | 99.5 % | 2438 |
| + STP wait 100 | 98.4 % | 2560 |

Here the stream runs ahead of the cores. With no wait it evicts lines of
the loop before they run, and the result is worse than NLP alone. A wait
of 50–60 cycles keeps the stream just ahead of the cores and gives the
best time. The testbench checks this trend.

Last, the sweep runs SMALL, a 768-byte loop that fits the cache, three
times. Without prefetching, every line misses once: 1682 cycles. With one
SWP command for the whole loop, written just before the cores start, there
is no miss at all: 752 cycles, including the time to fill the cache.
