# Probabilistically analysable L1 caches

Conventional caches make a program's execution time depend on its exact
memory layout and access history. Two addresses that map to the same set
collide in every run, and an LRU cache can fall into pathological eviction
patterns that are rare but hard to find by testing. Worst-case timing analysis
then has to model the cache in detail, or it ends up very pessimistic.

This cache subsystem does the opposite: it makes cache timing *random in a
controlled way*. The set an address goes to comes from a hash of the address
and a random seed, and the way evicted on a miss is chosen at random. Run the
same program many times, with a fresh seed and an empty cache each time, and
the execution times become independent, identically distributed samples.
Measurement-based probabilistic timing analysis (extreme value statistics on
the measured run times) can then bound the worst case at a chosen exceedance
probability, such as 10^-3 per run, without any model of the cache's internals.

The RTL provides a 32-bit instruction cache and a write-back data cache
for a single in-order core, with the randomisation hardware and a shared
memory port. The processor and main memory are not included. Their
connections are ports of the top module.

## Block structure

```
                    new_run_i
                        |
         +--------------v--------------+
         |  mt19937  (random source)   |---- rnd[1:0] ----> icache victim way
         |  + placement seed register  |---- rnd[17:16] --> dcache victim way
         +--------------+--------------+
                        | seed (constant during a run)
            +-----------+-----------+
            v                       v
     hash_function            hash_function
       (I side)                 (D side)
            | set index             | set index
 ic_in ---> icache             dcache <--- dc_in
 ic_out <---   |                  |   ---> dc_out
               +---> mem_arbiter <+
                          |
                 mem_out / mem_in  (main memory)
```

| File | Role |
|---|---|
| `rtl/prob_cache_top.sv` | Top: generator, seed register, two hashes, two caches, arbiter |
| `rtl/icache.sv` | Read-only instruction cache controller and arrays |
| `rtl/dcache.sv` | Data cache controller and arrays (write-back by default, write-through optional) |
| `rtl/set_lookup.sv` | Tag match, victim choice (random or LRU), LRU age update |
| `rtl/hash_function.sv` | Parametric placement hash |
| `rtl/barrel_shifter.sv` | Rotator used by the hash |
| `rtl/mt19937.sv` | Mersenne Twister MT19937 generator |
| `rtl/mem_arbiter.sv` | Shares the memory port between the two caches |
| `rtl/pcache_pkg.sv` | Request/response structs, policy enums, widths |

## Random placement: the parametric hash

This is the least conventional part. In a normal cache the set index is a
slice of the address, so placement is fixed by the program's layout. Here
the index is computed from the 27-bit line address (a 32-bit address without
its 5 offset bits) and a 32-bit seed:

1. `rot_rnd`: the line address rotated left by `seed[9:0] mod 27`.
2. `rot_self`: the line address rotated left by `addr[9:0] mod 27`. This is
   a rotation by the address's own bits, so that neighbouring lines are
   scrambled differently from each other.
3. The four vectors `{rot_rnd, addr, seed, rot_self}` (113 bits) are
   concatenated and zero-extended to `INDEX_BITS * 2^k` bits.
4. `k` XOR stages fold the vector. Each stage XORs its upper half into its
   lower half, until `INDEX_BITS` bits remain. With 32 sets this is five
   stages.

The seed changes only when `new_run_i` is pulsed. Within a run every line
therefore has one fixed set, and the cache behaves like an ordinary
set-associative cache with a scrambled index. Across runs the mapping
changes, so two lines that collide in one run usually do not collide in the
next. Because the set no longer identifies any address bits, **each way
stores the whole 27-bit line address as its tag**. The tag is wider than in
a modulo-indexed cache of the same size.

The hash is purely combinational: two rotators and an XOR tree sit in the
lookup path. Each cache has its own hash instance, so both caches can look
up in the same cycle.

## Random replacement and the random source

On a miss, the victim is the way named by `log2(WAYS)` random bits. It is
chosen even if another way of the set is invalid, so every way is evicted
with probability exactly 1/WAYS, whatever happened before. This
"evict-on-miss" property is what makes hit probabilities analysable.

The random bits come from an MT19937 Mersenne Twister (32-bit words, period
2^19937-1). The 624-word state is kept in an array. After reset it is seeded
with the standard recurrence in 624 cycles. After that it produces one
tempered word per cycle on demand: `next_i` advances it. The generator
advances when:

- a cache consumed random bits for a replacement. The instruction cache uses
  bits [1:0] and the data cache bits [17:16], so a simultaneous miss in both
  caches gets independent bits from one word;
- a new placement seed is loaded into the seed register. This happens once
  after reset and again on each `new_run_i`.

With the default seed 5489 the sequence is the reference MT19937 sequence
(first outputs 3499211612, 581869302, 3890346734). Change `SEED` to get a
different but reproducible campaign.

## Cache controllers

Both controllers are Mealy machines: hit responses come out in the same
cycle as the lookup.

**Instruction cache**

- FLUSH clears the valid bits of one set per cycle. It is entered at reset
  and on `flush_i`; a new flush request restarts the sweep.
- COMPARE looks up the fetch address.
- MEMORY refills the victim way one word at a time, then returns to COMPARE,
  where the waiting fetch now hits.

**Data cache** (write-back, write-allocate)

- FLUSH works as in the instruction cache.
- IDLE waits for `rd` or `wr`.
- COMPARE looks up the address. A read hit completes here. A write hit goes
  to UPDATE. On a miss the controller picks a victim: a dirty victim goes to
  WRITEBACK, a clean one goes to MEMORY.
- WRITEBACK writes the victim line to memory, then goes to MEMORY.
- MEMORY refills the line, then goes to UPDATE.
- UPDATE after a refill installs the tag (clean) and returns to COMPARE.
  After a write hit it writes the masked word, sets the dirty bit and
  returns to IDLE.

With `WRITE = WP_WT_WA` or `WP_WT_NWA` the data cache is write-through.
Every write first goes to memory in the WTHRU state, and the cached copy is
updated after that. Lines are never dirty, so WRITEBACK is never used. With
`WP_WT_NWA`, a write miss only writes memory; the cache is left unchanged
and no victim is drawn.

A flush clears valid and dirty bits **without writing dirty data back**. A
flush marks the start of a new, independent run that begins from an empty
cache. Anything the previous run left dirty in the cache is lost. Do not
pulse `new_run_i` if memory contents must survive the flush.

Wait cycles seen by the processor, with `L` the memory's stall cycles per
word and `W = LINE_BYTES/4` words per line, and no contention from the
other cache:

| Access | Wait cycles |
|---|---|
| Instruction hit | 0 |
| Instruction miss | 1 + W(L+1) |
| Data read hit | 1 |
| Data write hit | 2 |
| Data read miss, clean victim | 3 + W(L+1) |
| Data write miss, clean victim | 4 + W(L+1) |
| Dirty victim | add W(L+1) |
| Write-through: any write that updates the cache | add L+1 |
| Write-through without allocate: write miss | 2 + L |

## Interfaces and handshake

All ports use packed structs from `pcache_pkg`:

- `ic_in_t` has `addr`, `rd` and `stall`.
- `ic_out_t` has `data` and `stall`.
- `dc_in_t` has `addr`, `data`, `mask`, `rd` and `wr`.
- `dc_out_t` has `data` and `stall`.
- `mem_out_t` has `addr`, `data`, `mask`, `rd` and `wr`.
- `mem_in_t` has `data` and `stall`.

Every link uses one rule. The requester raises `rd` or `wr` and holds the
address and data stable. The responder drives `stall` high until the cycle
in which the transfer happens. Read data is valid in that cycle. Assertions
in the caches check that a stalled memory request is held.

`ic_in.stall = 1` tells the instruction cache not to start a fetch.

`mem_arbiter` gives the memory port to one cache for as long as that cache
keeps its strobe high. A line write-back plus refill is therefore never
interleaved with the other cache's traffic. When both caches request a free
port, priority alternates between them. `new_run_i` resets this priority, so
a deterministic configuration gives exactly the same run time on every run.

Top-level extras:

- `ready_o`: the placement seed is loaded, about 626 cycles after reset
  (624 cycles of generator seeding). The reset is asynchronous, but a
  simulation that starts with `rst_n` already low sees no falling edge: hold
  it low for at least one clock edge and only trust `ready_o` after release.
- `placement_seed_o`: the current placement seed.
- One-cycle event pulses for counting: `ic_hit_o`, `ic_miss_o`, `dc_hit_o`,
  `dc_miss_o`, `dc_writeback_o` (one per write-back word) and `reseed_o`.

## Parameters

| Parameter | Default | Notes |
|---|---|---|
| `CACHE_BYTES` | 4096 | per cache |
| `LINE_BYTES` | 32 | power of two, at least 8 |
| `WAYS` | 4 | power of two; 1 gives a direct-mapped cache |
| `REPL` | `REPL_RANDOM` | `REPL_LRU`: deterministic LRU, invalid ways filled first |
| `PLACE` | `PLACE_HASH` | `PLACE_MODULO`: index = low line-address bits |
| `WRITE` | `WP_WB_WA` | data cache: `WP_WT_WA` write-through, `WP_WT_NWA` write-through without write-allocate |
| `SEED` | 5489 | MT19937 seed |

`PLACE_MODULO` with `REPL_LRU` is the conventional, time-deterministic
reference cache. Mixed settings are allowed.

## How faithful this is, and where it departs

The cache size, line size, 27-bit hashed line address, rotate amounts taken
from 10 random or address bits, the MT19937 generator, random replacement,
write-back data cache and the controller states follow the design this RTL
implements. The following are choices made here:

- **Associativity 4** is the default. The design was evaluated
  direct-mapped and with 2, 4 and 8 ways, and 4 to 8 ways are recommended.
- **Handshake signals and timing.** `ic_in.rd` and `ic_out.stall` are added,
  and the one-word memory transfers and all latencies are this design's own.
- **Hash details.** The source does not fix the rotation direction, the
  concatenation order or the exact folding. The fold uses five XOR stages at
  32 sets, where the source describes four.
- **Generator organisation.** One word per cycle, on demand. The original
  used a third-party MT19937 core of lower throughput (about 30 Msamples/s
  at 147 MHz).
- **Sharing.** One generator serves both caches, using separate bit fields.
  The memory port is shared through `mem_arbiter`, which is entirely this
  design's own.
- **Write-through variants.** The source names write-through and
  no-write-allocate as options. Their state (WTHRU) and timing are this
  design's own.
- **Bus widths are fixed.** The source makes the address, data and memory
  bus widths configurable. Here they are 32 bits, set once in
  `pcache_pkg` (`ADDR_W`, `DATA_W`), and memory transfers are one 32-bit
  word each.
- **Flush** discards dirty lines, as described above.
- **Power-up clearing.** The source clears every bit at power-up. Here only
  the valid (and dirty) bits are cleared, one set per cycle in FLUSH. Tags
  and data of invalid lines are never read, so their contents do not matter.
- The processor, its bus interface and main memory are outside this RTL.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT` line.

- `tb/icache_tb.sv`: 3000 fetches over 16 KiB. The testbench supplies the
  set mapping and random way itself and keeps a reference model. It checks
  instruction data, exact hit/miss, wait cycles, flush, `ic_in.stall` and
  memory traffic.
- `tb/dcache_tb.sv` with `tb/dcache_check.sv`: 4000 random reads and masked
  writes for each of the three write policies, against a reference model and
  a shadow memory image. It checks data, hit/miss, which victims get written
  back, exact wait cycles and memory traffic.
- `tb/mt19937_tb.sv`: compares the generator with a software MT19937 and
  the published first outputs, for two seeds, over more than 2700 words.
  Also checks the ready time and hold behaviour.
- `tb/hash_function_tb.sv`: compares the hash with an independently written
  reference. Checks that a fixed seed spreads lines over the sets and that
  varying the seed reaches all 32 sets.
- `tb/prob_cache_top_tb.sv`: the whole subsystem at default parameters. A
  processor stand-in runs one synthetic program (a 6 KiB code loop and 8 KiB
  of data accesses) six times, with a new run each time. It checks all data
  and memory traffic. It requires that every mechanism occurs: hits and
  misses in both caches, dirty write-backs, reseeding, memory contention,
  and run times that differ between runs.
- `tb/config_sweep_tb.sv` with `tb/cache_driver.sv`: the same kind of
  program on nine configurations. These are 4 KiB with 1, 2 and 8 ways;
  2 KiB with 2, 4 and 8 ways; 8 KiB 2-way; 4 KiB 4-way with 16-byte lines;
  and the modulo/LRU reference. Each runs the program 20 times.
  Randomized configurations must show varying run times. The deterministic
  one must give identical run times. At 2 ways, the mean run time must fall
  as capacity grows; it goes from 17917 cycles at 2 KiB to 16078 at 4 KiB
  and 13776 at 8 KiB. About 16 seconds in Verilator.
- `tb/mem_model.sv` is the behavioural main memory. Each word takes
  `LATENCY` stall cycles and then one transfer cycle. Its initial contents
  are `{a[17:2] ^ 16'h5a3c, ~a[17:2]}` for byte address `a`.

- `tb/iid_runs_tb.sv`: the statistical property the design exists for. The
  default subsystem runs the synthetic program 1000 times, each with a new
  placement seed. The run times must pass a Wald-Wolfowitz runs test about
  the median (|z| < 1.96) for independence. They must also pass a two-sample
  Kolmogorov-Smirnov test between the first and second 500 runs (p > 0.05)
  for identical distribution. With the default seed the result is |z| = 0.063
  and p = 0.283, with 629 distinct run times between 14525 and 16425 cycles.
  A modulo/LRU copy runs the same program in 13938 cycles every time, so the
  worst randomized run is 1.18 times the deterministic one. A Gumbel fit
  (method of moments, maxima of blocks of 20 runs) gives a pWCET of 16417
  cycles at 10^-3 exceedance per run. The largest observed run is 16425. This test takes
  about two minutes in Verilator.

Not verified: synthesis timing, any real processor or benchmark binary, and
any extreme-value fit better than the simple moment fit above.

## Simulating

All files are plain SystemVerilog 2017. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/pcache_pkg.sv tb/prob_cache_top_tb.sv --top-module prob_cache_top_tb
./obj_dir/Vprob_cache_top_tb
```

Replace the testbench file and top-module name to run another testbench.
Each takes a few seconds, except `iid_runs_tb` (1000 runs, about two
minutes). To lint the design:
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/pcache_pkg.sv rtl/prob_cache_top.sv`.
Verilator reports `SYNCASYNCNET`: the reset is asynchronous in the
registers and also appears in the `disable iff` of the assertions. This
warning is harmless.
