# LEOPARD: a time-predictable memory system for a four-core LEON3-class processor

Safety-critical software needs an upper bound on its execution time that still holds once it is
deployed. In a multicore with caches, that bound depends on many things that are hard to control:
- where the linker put code and data;
- which cache lines a previous task left behind;
- what the other cores do on the shared bus;
- the operand values fed to a variable-latency divider.

This design changes the processor so that a test campaign can bound all of these by measurement.
The approach is measurement-based probabilistic timing analysis: each run of a program draws a new
random cache layout and a new bus arbitration order.
- Jitter sources that cannot be randomised are forced to their worst case during analysis.
- The contention from the other cores can be forced to the worst the bus allows, so the bound
  does not depend on what they run (this is called *time-composable*, or TC, mode).

The RTL implements the parts of the processor that carry these mechanisms:
- first-level caches and TLBs with randomised placement and replacement;
- a worst-latency floating-point divide/square-root unit;
- a pseudo-random number generator;
- a bus arbiter that combines random permutations with credit-based arbitration;
- a partitioned, hash-placed L2;
- a constant-latency memory controller front end;
- a trace path that does not disturb the bus.

The integer pipelines, the MMU table walker, the IOMMU, the DDR2 controller and DRAM, and the
Ethernet trace link are not included. Their connections are ports of the top module `leopard_top`.

Every mechanism is switched by one configuration word, `leopard_pkg::cfg_t`. With all switches
off, the system behaves like the baseline: modulo placement, round-robin arbitration, shared L2
ways and variable latencies.

## Structure

```
            per core (x4)                                shared
 fetch --> ITLB --> IL1 (16KB, 4-way, 32B lines) --\
                                                    +--> bus port --> cba_arbiter --> l2_cache --> mem_ctrl --> DRAM port
 load/ --> DTLB --> DL1 (16KB, 4-way, 16B lines) --/        ^            (4 x 32KB ways)
 store                                                      |
 FP div/sqrt --> fpu_divsqrt                       snoop: every bus write invalidates the other cores' L1 copies
 trace record --> trace_unit (per-core FIFOs) --> DRAM trace-region port (not on the bus)
 prng --> 16 random bits per core per cycle + arbiter bits
```

| File | Contents |
|---|---|
| `rtl/leopard_pkg.sv` | shared types: bus request bundle, arbitration mode, configuration word |
| `rtl/leopard_top.sv` | four core slices, the shared bus, L2, memory controller and trace unit |
| `rtl/l1_cache.sv` | IL1/DL1 with random modulo placement, snoop-safe physical tags, freeze, no miss under speculation |
| `rtl/rm_index.sv` | random modulo set-index function |
| `rtl/tlb.sv` | 64-entry fully associative TLB with random replacement |
| `rtl/fpu_divsqrt.sv` | iterative FDIVD/FSQRTD with early termination and a worst-latency mode |
| `rtl/prng.sv` | LFSR pool with programmable seeds |
| `rtl/cba_arbiter.sv` | round-robin or random-permutation credit-based bus arbiter, TC mode |
| `rtl/l2_cache.sv` | shared L2, per-way partitioning, hash placement, random replacement, flush |
| `rtl/mem_ctrl.sv` | one-at-a-time memory front end with fixed per-type response latency |
| `rtl/trace_unit.sv` | per-core trace buffers drained into a circular DRAM trace region |

## Random modulo placement in the L1 caches

Each L1 way is 4KB, exactly one page. The set index therefore comes entirely from the page offset,
and the virtual and physical index agree.

Random modulo (`rm_index`) keeps this property while randomising the layout:
- It XORs the modulo index with a mask.
- It then passes the result through an odd-even transposition network of conditional bit swaps.
- The mask and the swap controls come from the address tag XORed with a per-run seed.

For one seed and one 4KB segment, the map from index to set is a permutation, so two lines of the
same page never collide. Lines of different pages collide at random, with a distribution that
changes with the seed. The hardware cost on the access path is the XOR and the swap network ahead
of the tag and data arrays.

With `rm_en` low the index passes unchanged, which is modulo placement.

Geometry:
- DL1: 16-byte lines, so 256 sets.
- IL1: 32-byte lines, so 128 sets.

## Snooping when the placement is random

LEON3-style caches keep coherent by snooping: every write on the bus is checked against a second
copy of the tags, which holds the *physical* tags, and a hit invalidates the line. With random
placement, a physical address no longer tells which set a line went to, because the set depends on
the virtual tag and the seed.

To solve this, every physical-tag entry also stores the random set its line was placed in:
- The physical-tag array is indexed by the physical modulo index.
- A snoop hit reads the stored set and invalidates the line there.
- A physical-tag slot holds one line per way, so filling a line whose slot is already taken first
  invalidates the older line. This keeps snoops exact.

The operating system must flush the L1s on every context switch (`l1_flush`). Then only one
address space is cached at a time, and virtual tags are unambiguous.

Other L1 features:
- **Write policy.** The DL1 is write-through and does not allocate on a write miss.
- **Freeze.** `l1_freeze` serves misses without allocating, so an interrupt handler leaves the
  cache state untouched.
- **No miss under speculation.** With `no_spec_miss`, a miss on a speculated fetch waits until the
  speculation resolves instead of going to the bus.

## Bus arbitration: random permutations with credits

The shared bus carries one transfer at a time. In this design a transfer holds the bus for:
- 5 cycles on an L2 hit;
- 28 cycles on an L2 miss;
- 50 cycles on a miss that also writes back a dirty line.

The longest possible hold is MaxL = 56 cycles.

### Random permutations alone

Random-permutation arbitration grants the cores in the order of a random permutation of their
ids, redrawn for every round. Every core gets its turn within two rounds. A request therefore
waits at most L·(2·Nc − 1) cycles, where L is the slot length and Nc is the number of cores.

If every slot must be long enough for the longest request, short requests waste most of their
slot. Credit-based arbitration removes that waste.

### Credit-based arbitration

Each core has a budget, held in integer form so that no fractions are needed:
- It is capped at MaxL·Nc.
- It grows by 1 every cycle.
- It shrinks by Nc every cycle the core holds the bus.

A core may be granted only with a full budget. On average, a core therefore uses the bus no more
than 1/Nc of the time, yet it can issue a short request as soon as its budget is back.

The arbiter searches the permutation stream from its current position for the first core that has
a request and a full budget:
- That core is granted.
- The entries skipped before it are consumed.
- The arbiter keeps two permutations, the current one and the next, so every core can always be
  found by the search.

Example: three cores issue 28-cycle requests and one core issues 6-cycle requests. Over 336
cycles, round-robin serves the short requester 3 times and this arbiter serves it 7 times. The
arbiter's testbench checks this.

### TC mode

In TC mode (`tc_mode`, with `tc_mask` selecting the cores), a masked core that is not requesting
behaves as if it always had a MaxL-cycle request pending. When it wins, the bus is held idle for
MaxL cycles. A core measured in this mode therefore sees the worst contention the policy allows,
whatever the other cores really run.

## Worst-latency floating point

`fpu_divsqrt` computes double-precision division and square root iteratively:
- It produces 4 result bits per cycle, 14 iterations in all.
- It rounds to nearest even.
- It terminates early when the partial remainder becomes zero, i.e. when the result is exact.

Latencies, counted in clock edges from the edge that samples `start`:

| Operation | Exact result | Otherwise |
|---|---|---|
| FDIVD | 15 | 18 |
| FSQRTD | 23 | 26 |

In analysis mode (`cfg.fpu_wc`), early termination is inhibited and every operation takes the
long latency, whatever its operands.

Limitations: denormal operands and results are flushed to zero, and NaN and infinity operands are
not handled.

## Random number source

`prng` holds one 32-bit Galois LFSR per core plus one for the arbiter. Each can be reseeded through
`prng_seed_*`.

Each core receives 16 bits every cycle:
- 2 bits for DL1 replacement;
- 2 bits for IL1 replacement;
- 6 bits for the DTLB;
- 6 bits for the ITLB.

The arbiter gets 24 bits for its permutations and 2 bits for L2 replacement.

The TLBs place a refill in the first free entry. When none is free, the victim is chosen by the
random bits (or by a FIFO pointer in baseline mode). The caches choose victims the same way.

## Shared L2 and memory

**Structure.** The L2 has 4 ways of 32KB with 64-byte lines and is write-back with
write-allocate. It serves one bus transfer at a time.

**Partitioning.** With `l2_part_en`, core *i* allocates only into way *i*, so no core can evict
another core's lines. Lookups still hit in any way.

**Hash placement.** With `l2_hrp_en`, the set is a hash of the line address and a seed: an XOR,
a rotation by seed bits, and an XOR fold into the index width. Random modulo is not used here
because an L2 way is much larger than a page.

**Flush.** `l2_flush` writes back every dirty line and invalidates all lines. It must be used
whenever the L2 seed or placement mode changes, because lines placed under the old hash cannot be
found under the new one.

**Memory controller.** The front end `mem_ctrl` forwards one line request at a time. With
`mem_const_en` it holds every response until a fixed number of cycles after the request: LAT_RD
for reads and LAT_WR for writes, 22 cycles in the top. The response time therefore no longer
depends on the DRAM state or on earlier requests. If the DRAM ever answers later than that,
`mem_late` pulses, which means the latency parameters are set too low for that DRAM.

## Tracing

**Trace buffers.** Every traced core pushes one 16-byte record per instruction into its own
16-entry FIFO. A record holds a time stamp, the PC, the instruction word and the data address.

**Draining.** A round-robin drainer writes the records into a circular region of DRAM through a
port of its own, so the bus sees no trace traffic. An external trace controller empties the region
and reports its read pointer back.

**Stalls.** A core is stalled (`tr_stall`) only when both the region and that core's FIFO are
full. Only then does tracing change execution timing.

## Interfaces and timing at the top

| Interface | Protocol |
|---|---|
| Core fetch (`if_*`) | Request held until `ready`. A read hit answers in the request cycle. |
| Core data (`ld_*`) | Same as fetch. A store completes after its write-through transfer. |
| TLB refill | A TLB miss raises `itlb_miss` or `dtlb_miss`. The walker answers with `*_fill` and `tlb_fill_vpn`/`tlb_fill_ppn`. |
| DRAM (`dram_*`) | Line requests, held until `dram_done`. |
| Trace region (`trace_*`) | 16-byte writes, held until `trace_wdone`. |

Outputs for observation:
- `bus_gnt` and `bus_budgets`;
- `bus_phantom`, which marks a TC-mode contender holding the bus;
- `l2_done`, `l2_hit` and `l2_wb`;
- the L1 miss pulses.

## Where this design departs from the processor it models

- **Bus transfers.** A transfer is one request plus one 32-byte response, not an AMBA AHB burst
  sequence. IL1 and DL1 of a core share one master port, and the DL1 is served first.
- **Scaled size.** The trace region defaults to 2^20 records (16MB) instead of 512MB. Only the
  pointer width depends on it.
- **Replacement.** The baseline LRU replacement of the L1s and TLBs is not built. The baseline uses
  first-free-then-FIFO instead.
- **Memory latencies.** The fixed latencies are chosen so that the worst bus hold (50 cycles) fits
  within MaxL = 56.
- **TC mode.** Emulating the absent contenders inside the arbiter is this design's way of
  producing the worst-case contention. The DL1 seed is the IL1 seed XOR a constant.
- **No slot-only mode.** Random permutations with fixed-length slots and no credits are not
  offered as a separate mode. Arbitration is either round-robin or credit-based.

Results quoted for the full processor are not reproduced here, because they need the cores, an
operating system and the application. These include:
- the tracing rate for 1–4 cores;
- the space case-study execution times;
- the FPGA occupancy.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and ends.

`tb/tb_leopard_top.sv` runs the whole system at its default parameters, with behavioural models
of the DRAM, the trace controller, the page-table walker and four simple cores. It runs three
phases:
1. baseline;
2. all features on, with one core's L1s frozen for a while and a slow trace port that forces
   trace stalls;
3. TC mode with one real core, three emulated contenders and worst-latency FP.

Checks in every phase:
- all loaded data, fetched instructions and FP results;
- bus hold times, the constant memory latency and the TC-mode waiting time;
- that each of 18 mechanisms happened at least once.

Build and run it with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/leopard_pkg.sv \
    tb/tb_leopard_top.sv --top-module tb_leopard_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one, for example `tb_cba_arbiter` or `tb_l1_cache`. The
top test takes about a minute.
