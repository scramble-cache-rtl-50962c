# Scramble Cache — a level-1 data cache with a periodically re-seeded set mapping

Cache timing attacks (PRIME+PROBE, EVICT+TIME, FLUSH+RELOAD and their
relatives) work because an address always lands in the same cache set, so an
attacker who fills a set and times it later learns which sets a victim used.
The Scramble Cache breaks that fixed mapping while staying cheap enough for
the first-level cache of an embedded core:

* The set index of every address goes through a seeded permutation
  `pi_r(s)` built from an XOR and a few layers of conditional bit swaps — a
  handful of gates in the index path.
* The seed `r` is replaced regularly (by default every 8192 accesses, on
  request, and on every change of process), so set conflicts an attacker
  observes are only valid for a short epoch.
* To avoid a storm of misses after every seed change, the cache remembers
  the last few seeds. A miss under the current seed looks for the line at
  the places older seeds would have put it and moves it to its new place.
* Every line carries the *generation* (seed epoch) it was placed in, so an
  old copy is never mistaken for current data, and dirty lines whose
  generation is about to be reused are written back before the seed
  changes.

This repository holds synthesizable SystemVerilog for the cache, its
permutation, seed generator, history table, storage and write-back queue,
and self-checking testbenches for each.

## Main configuration

| Parameter (`scramble_cache`) | Default | Meaning |
|---|---|---|
| `WAYS` | 8 | lines per set |
| `S` | 6 | set-index bits (64 sets) |
| `LINE_BYTES` | 64 | line size; 8 × 64 × 64 B = 32 KiB |
| `R` | 8 | generations tracked (history table depth) |
| `REFRESH` | 8192 | accepted requests between seed changes |
| `REFRESH_CYCLES` | 0 | clock cycles between seed changes; 0 turns this trigger off |
| `ADDR_W`, `WORD_W` | 32, 32 | byte address and CPU word width |
| `PID_W` | 8 | process identifier width |
| `WBQ_DEPTH` | 4 | write-back queue entries |
| `LFSR_W` | 32 | pseudo-random generator width |
| `REKEY_ON_PID` | 1 | change the seed when the requesting process changes |

The 32 KiB, 8-way, R = 8, 8192-access point is the configuration the
Scramble Cache was evaluated in. The 64-byte line, the widths, the queue
depth and the process-change trigger are choices of this implementation.
Smaller caches (4, 8 and 16 KiB) are obtained with `S` = 3, 4, 5.

## The set permutation `pi_r(s) = f(s xor r0, r1)`

`rtl/scramble_perm.sv`. The seed is `{r1, r0}` with `S` bits of `r0` and
`floor(S/2)` bits of `r1` (9 bits for 64 sets).

1. XOR layer: `x = s xor r0`. On its own this reaches only `2^S` of the
   `(2^S)!` possible permutations, and an attacker could search it
   exhaustively.
2. Swap layer `f(x, r1)`: split the `n` bits in a low half and a high half;
   for `i < n/2` exchange bit `i` and bit `i + n/2` when `r1[i]` is 1
   (a "conditional swap"). Then apply `f` again, with the same `r1`, to the
   low half and to the high half, down to single bits.

Example for `S` = 4, `r1 = 2'b01`: the first level swaps bits 0 and 2, the
second level swaps bit 0 with bit 1 and bit 2 with bit 3. Each level is one
2:1 multiplexer per bit, so the whole permutation is `ceil(log2 S)`
multiplexer levels after an XOR.

For odd segment widths (64 sets gives halves of 3 bits) the top bit of the
segment is left unpaired at that level and the segment splits into its low
`floor(n/2)` and high `ceil(n/2)` bits. One control bit drives both outputs
of a pair, so every seed gives a bijection. The published formula indexes
the control bit of the upper output differently, which as written would not
always be a permutation; the bijective reading is implemented.

The module unrolls the recursion into levels whose wiring is computed by
constant functions during elaboration.

## Generations and the history table

`rtl/history_table.sv`. A global generation counter `c_glob` counts seed
changes modulo `R`. Table entry `g` holds the seed and the process
identifier of generation `g`, plus a valid bit (after reset only
generation 0 exists). The entry at `c_glob` is the current seed; the other
`R-1` entries are the history.

Every line in `rtl/cache_arrays.sv` stores, next to valid, dirty and tag
bits, the generation in which it was placed. The tag is the full line
address (set bits included), because after scrambling a line may sit in any
set. A lookup hits only on a valid line whose tag matches **and** whose
generation is the current one.

## Request flow and timing

All in `rtl/scramble_cache.sv`. One request is in flight at a time.

| Case | What happens | Cycles from acceptance to `resp_valid` |
|---|---|---|
| Hit | cycle 1: `s_new = pi_cur(s)`, read the set; cycle 2: compare, answer | 2 |
| History hit | on a miss, scan generations `c_glob-1, c_glob-2, …` (newest first), one per cycle (pipelined: read set `pi_{r_c}(s)` in one cycle, compare in the next); first entry whose process matches and whose set holds the line with generation `c` wins | 4 + k for entry k (1 ≤ k ≤ R-1), plus any wait for the write-back queue |
| Miss | scan finds nothing; write back the victim if dirty, wait until the write-back queue is empty, read the line from memory, install it | at least R + 6, plus queue drain and memory latency |

On a history hit the found line is written into the victim way of `s_new`
with the current generation, its old slot is invalidated and a dirty victim
is queued for write-back. If the old set happens to be `s_new` itself the
line is only re-stamped in place. Stores are write-back and write-allocate
and merge their bytes into the line; the response of a store returns the
merged word.

The victim is the first invalid way of `s_new`, otherwise a way chosen by
the LFSR (the evaluated baseline used random replacement).

### Process isolation

The history scan only considers generations whose recorded process
identifier equals that of the request. A process therefore can never pull a
line that was placed under another process's seed into view; it misses
instead. This assumes, as the targeted systems do, that processes live in
disjoint regions of one address space: data shared between processes is
not kept coherent across generations owned by different processes.

## Seed change

A seed change is started from IDLE when

* `REFRESH` requests have been accepted since the last change,
* (`REFRESH_CYCLES` > 0) another `REFRESH_CYCLES` clock cycles have
  passed on a free-running counter, whether the cache was busy or idle,
* a `rekey_req` pulse arrived (hook for interrupts), or
* (`REKEY_ON_PID`) a request arrives whose `req_pid` differs from the owner
  of the current generation — the request waits until the change is done
  and the new generation belongs to its process.

The sweep FSM then reads every set in order. Lines whose generation equals
`(c_glob + 1) mod R` — the generation number about to be reused — are
removed; the dirty ones are pushed to the write-back queue first (one per
cycle, waiting while the queue is full). Finally `c_glob` advances and the
new seed from the LFSR and the process identifier are written into the
table. Cost: `2 + 2^S` cycles plus one per written-back line plus queue
stalls (66 cycles for a clean 64-set cache).

The sweep also drops *clean* lines of the expiring generation; otherwise
they would be taken for current-generation lines after the counter wraps.

## Interfaces

CPU side (valid/ready): `req_valid`, `req_ready`, `req_addr` (byte
address), `req_we`, `req_wdata`, `req_be`, `req_pid`; answer
`resp_valid` (one-cycle pulse) and `resp_rdata`. `req_ready` may drop in
the cycle a request with a new process identifier is presented.

Memory side: one line-wide request channel `mem_req_valid/ready`,
`mem_req_we`, `mem_req_addr` (line address), `mem_req_wdata`; read data on
`mem_resp_valid`/`mem_resp_rdata`, any number of cycles later. Queued
write-backs have priority; the cache issues a line read only when the queue
is empty, so memory always holds every older write.

`rng_seed` is sampled during reset to seed the LFSR and generation 0; tie it
to a true random source. `generation` shows `c_glob`. `events`
(`scramble_pkg::cache_events_t`) gives one-cycle pulses for hits, history
moves, misses, write-backs, seed changes with their cause, and write-back
queue stalls, for performance counters.

## Modules

| File | Role |
|---|---|
| `rtl/scramble_pkg.sv` | default sizes, seed width function, event struct |
| `rtl/scramble_cache.sv` | top: lookup, history-lookup FSM, sweep FSM, refresh triggers, memory-port arbitration |
| `rtl/scramble_perm.sv` | `pi_r(s)` (two instances: current seed, history seed) |
| `rtl/history_table.sv` | seeds and owners of the last `R` generations, `c_glob` |
| `rtl/cache_arrays.sv` | valid/dirty/generation/tag/data storage, one read, one write and one invalidate port |
| `rtl/wb_queue.sv` | FIFO of dirty lines towards memory |
| `rtl/lfsr_prng.sv` | 32-bit LFSR, new value every cycle |

The storage is written as plain arrays (about 272 Kbit at the default size);
a silicon implementation would map `cache_arrays` onto SRAM macros with the
same one-cycle read timing.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/scramble_pkg.sv tb/tb_mem_pkg.sv tb/scramble_cache_tb.sv \
  --top-module scramble_cache_tb -o sim && ./obj_dir/sim
```

Replace the testbench name for the others (`scramble_perm_tb`,
`lfsr_prng_tb`, `history_table_tb`, `cache_arrays_tb`, `wb_queue_tb`).

| Testbench | What it establishes |
|---|---|
| `scramble_cache_tb` | default configuration end to end against `tb/mem_model.sv` with random back-pressure: about 45 000 random loads/stores from three processes with process switches and external seed requests, every read compared with a shadow memory, a final read-back of every written word; hit latency exactly 2, history-hit latency 5…4+R-1, miss latency above that; a directed check that another process cannot use a line placed under a different owner's generation while the owner can; a directed burst of 300 dirty lines swept out after R seed changes and re-read from memory; every mechanism (hit, history move, in-place move, miss, victim write-back, sweep write-back, the three seed-change causes, queue stall) must occur |
| `scramble_perm_tb` | all seeds and all indices for 4, 6 and 7 set bits against an independent reference; bijection per seed; `r1 = 0` reduces to XOR |
| `lfsr_prng_tb` | reset seeding, zero-seed guard, step/hold behaviour against a reference, no short cycle |
| `history_table_tb` | generation counting and table contents for R = 8 and R = 5 |
| `cache_arrays_tb` | read/write/invalidate semantics, read-before-write, write-over-invalidate precedence, reset |
| `wb_queue_tb` | ordering, full/empty, simultaneous push and pop when full |
| `scramble_cache_configs_tb` | 14 cache instances on one synthetic stream (`tb/cache_env.sv`): 4/8/16/32 KiB, R = 2/4/8/16, intervals 512…32768, each against a fixed-mapping cache of the same size (seed changes disabled); data of every read checked, exactly one seed change per interval |
| `scramble_cache_cycles_tb` | the cycle-count trigger on a small cache: seed changes every 600 cycles under traffic and while idle, data intact throughout |
| `scramble_cache_primeprobe_tb` | a PRIME+PROBE attack on the default cache and on a fixed-mapping copy (see below) |

The end-to-end test runs in about two seconds, the PRIME+PROBE test in
about 25 seconds and the configuration sweep in about a minute and a half.

### What the sweeps show

On the synthetic stream (70 % of accesses to 64 hot lines, 25 % to 1024
warm lines, 5 % streaming, 30 % stores) the hit rate of the Scramble Cache
stays within about half a percentage point of the fixed-mapping cache at
the default interval for all four sizes (sometimes slightly above it). It
drops by about 0.7 points at an interval of 512 accesses, where a
fifth of the hits are history moves. Deeper histories lengthen a miss by one
cycle per entry, which shows in the cycle count (R = 16 takes about a third
more cycles than R = 2 on this stream) while barely changing the hit rate.

PRIME+PROBE, 1000 rounds of 1026 accesses: with a fixed mapping the
victim's two sets are the two slowest in every round (mean probe time 72
cycles against 16 for the other sets). In the Scramble Cache, with a seed
change every 8192 accesses, the seed changes add noise to every set (mean
about 24 cycles), but the victim's sets still stand out (mean 74 cycles)
and are the two slowest in 839 of 1000 rounds. The published evaluation
reports that the access pattern is hidden completely; this experiment,
run on the RTL at the default interval, does not reproduce that. The reason
is structural: the permutation acts on the set index only, so within one
seed epoch the attacker's lines and the victim's lines with the same set
bits still share a physical set. Only a seed change between PRIME and
PROBE (64 of the 1000 rounds here) breaks that. The interval is therefore
the security knob, and it has to be short compared with one attack round.

## Where this implementation departs from, or adds to, the published design

* **Move instead of swap.** The published lookup algorithm swaps the found
  line with the line at its new place. Here the displaced line is evicted
  (written back if dirty) instead, because at the old place no seed would
  ever find it again.
* **Generation of a moved line.** The algorithm's listing stamps the moved
  line with the old generation; the accompanying text wants it found
  directly next time. It is stamped with the current generation.
* **History lookup cost.** One cycle per history entry, as in the
  evaluated model; the description also mentions multiples of the hit
  latency, which is not followed.
* **Clean lines** of the expiring generation are removed at a seed change,
  not only dirty ones.
* **Seed-change triggers.** Access count, cycle count, external pulse and
  process change are all built in. The default enables the access count
  (the evaluated configuration) and the process change; the cycle count is
  off until `REFRESH_CYCLES` is set.
* Line size, widths, handshakes, victim choice, queue depth and the rule
  that a read waits for an empty write-back queue are this implementation's
  own.
* **Evaluation.** The published numbers come from full benchmark runs in
  a system simulator. The testbenches here use a synthetic access stream of
  30 000 accesses per configuration and 1000 PRIME+PROBE rounds, which is
  enough to compare configurations against each other but not to reproduce
  the published percentages.
* Not included: the processor, the instruction cache and main memory
  (the testbench models memory behaviourally), and the software side
  (operating-system hooks that would drive `req_pid` and `rekey_req`).
