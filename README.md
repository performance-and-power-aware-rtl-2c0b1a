# Power-aware partitioned shared L2 cache

When two cores that run unrelated programs share one last-level cache, each
program's misses evict the other program's lines. The core with the bigger
or less local working set takes most of the cache, and the other core
slows down. Meanwhile, ways that neither program needs still leak static
power. This design addresses both problems with one mechanism in a
32-way, 1 MB shared L2:

* **Way allocation.** Every way belongs to exactly one core. A core
  replaces lines only in its own ways, so the two programs stop evicting
  each other. At the end of every sampling interval, the core that needs
  more cache takes one way from the other.
* **Power control.** A core's ways are switched on or off (power-gated)
  one at a time, depending on how much cache that core actually uses.
  Before a way is switched off, its dirty lines are written back.

Both decisions come from one inexpensive ratio that is measured for each
core over each interval.

## The demand measure D

For each access that hits, the cache knows where the line sits in the
requesting core's LRU stack. Two counters per core count the hits on the
most recently used line (stack position 1) and on the least recently used
line (the last position). At the end of the interval

    D = LRU hits / MRU hits

If the hits crowd at the top of the stack, D is small: the program would do
as well with fewer ways. If a good share of the hits reach the bottom of
the stack, D is large: the program is using every way it has, and more
ways would probably turn some misses into hits. Computing D needs only two
counters per core and a divider. Its cost therefore does not grow with the
associativity, unlike a full stack-distance histogram.

Hardware details:

* An interval is 2^`SAMPLE_BITS` L2 accesses, counting both cores
  together. The default is 2^16 = 65,536; 8, 12 and 20 are the other
  sizes the design is meant for. Counters are `SAMPLE_BITS+1` bits wide,
  so a count of exactly 2^N fits.
* D is an unsigned fixed-point number with `FRAC_BITS` = 16 fraction bits.
  Its total width is `DW = SAMPLE_BITS + 1 + FRAC_BITS` (33 by default).
  The thresholds `t1_i` and `t2_i` use the same format. Thresholds from
  0.001 to 0.5 are the useful range:

  | T | encoding |
  |---|---|
  | 0.001 | 66 |
  | 0.005 | 328 |
  | 0.01 | 655 |
  | 0.05 | 3277 |
  | 0.1 | 6554 |
  | 0.5 | 32768 |

* `d_divider` is a restoring divider that produces one quotient bit per
  clock. A result is ready `DW+1` clocks after start, which is negligible
  against an interval of tens of thousands of accesses.
* Special cases:
  * No MRU hits and no LRU hits give D = 0.
  * LRU hits with no MRU hits give the largest value, meaning "needs
    more".
* A miss counts toward the interval length but toward neither counter.
* The LRU position is the last place in the core's stack, at a depth equal
  to the number of ways in its mask. While the core still has empty ways
  in a set, no hit there can be an LRU hit.

## From D to decisions (`partition_ctrl`)

When an interval closes, the circuit divides both cores' counts at the
same time. Then three comparisons are made.

**Allocation (`d_comp`).** If D0 > D1, core 0 should gain a way from core
1. If D0 < D1, the reverse. If they are equal, nothing moves.

**Local request per core (`t_comp`).**

* D < T1 gives `dec` (fewer ways).
* D > T2 gives `inc` (more ways).
* Otherwise, including D equal to a threshold, it gives `keep`.

Small thresholds favour performance, since ways are added readily. Large
thresholds favour energy.

**Global filter per core (`resize_fsm`).** A request passes through an
n-bit saturating state machine before it becomes a command (`RS_INC`,
`RS_KEEP` or `RS_DEC`). This damps reactions to one noisy interval, in
the same way that a 2-bit branch predictor damps mispredictions.

| machine | on `inc` | on `dec` | on `keep` |
|---|---|---|---|
| asymmetric (default) | command INC, go to state 0 from any state | step toward the top state; DEC from the top two states | stay |
| symmetric | step toward state 0; INC from states 0 and 1 | same as asymmetric | stay |

With 3 bits, a core must ask for fewer ways in 7 intervals in a row (from
state 0) before one of its ways is switched off. A request for more ways is
granted at once. This bias accepts a little wasted power to avoid slowing
a program down. `SM_ASYM = 0` selects the symmetric machine.

The circuit registers the move, both commands and both D values, and
pulses `done`. The top exports them as `interval_o`, `cmd_o` and `d_o`.

### Cost of the control circuit

The sequential control circuit grows slowly with the interval size. The
figures below come from generic synthesis of `partition_ctrl` (yosys,
mapped to two-input gates and muxes), with `FRAC_BITS` = 16:

| N | gates incl. flip-flops | flip-flops | clocks from start to decision |
|---|---|---|---|
| 8 | 1297 | 217 | 27 |
| 12 | 1544 | 257 | 31 |
| 16 | 1807 | 299 | 35 |
| 20 | 2061 | 339 | 39 |

For comparison, the original proposal sized a combinational version in
a 0.18 µm process:

| N | area (µm²) | delay (ns) |
|---|---|---|
| 8 | 27,221 | 21 |
| 20 | 149,831 | 85 |

Both versions are negligible next to the cache arrays.

## Carrying a decision out (`way_manager`)

The way manager keeps two bit vectors:

* the owner of every way;
* the power state of every way, `way_power_o`, which drives the per-way
  power switches.

It applies each decision in three steps.

**1. Move a way.** The losing core gives one way to the gaining core, with
two exceptions:

* No way moves if both cores already have switched-off ways. Neither core
  is short of cache then, so a move would only cost misses.
* No way moves if the losing core would drop below `MIN_WAYS` (2) ways.

If the loser has a switched-off way, that way is given. It is empty and
changes owner at once. Otherwise a powered way is given. It is first
flushed like a way that is being switched off, and then changes owner
still powered.

The flush has two effects:

* The old owner cannot reach its lines in a way it no longer owns.
* The new owner's LRU stack does not start with foreign lines in it. Such
  lines, kept fresh by the other core's hits, would push its own lines
  off the MRU position and corrupt its D.

**2. Core 0's power command.**

* INC switches on one of core 0's switched-off ways, if it has one.
* DEC switches off one of core 0's powered ways, but only if it has more
  than `MIN_WAYS` of them. D needs an MRU line and a different LRU line
  to mean anything.

**3. Core 1's power command,** with the same rules.

The particular way is chosen at random. A free-running 16-bit LFSR gives
the starting point of a circular search through the candidates.

Switching a way off is a four-phase handshake with the cache:

1. The way is removed from its owner's replacement mask at once.
2. `flush_req` is raised, with `flush_way`.
3. The cache walks all sets. It writes back every dirty line of that way
   and invalidates every line of it.
4. The cache raises `flush_done` and holds it until `flush_req` falls.
5. Only then does the power bit clear.

While a decision is being carried out, the manager is busy. Any decision
that arrives in that time is dropped. This cannot happen with intervals of
thousands of accesses.

## Per-core LRU stacks inside one shared set (`way_adaptable_cache`)

Each set stores one age per way. The ages are always a permutation of
0..WAYS-1, with 0 meaning most recently used. A hit or fill moves the
touched way to age 0 and ages every younger way by one.

This ordering is global across both cores. Restricting it to the ways in
one core's mask gives that core's own LRU stack. So the MRU and LRU
positions of each core, and its replacement victim, come out of the same
state, with no per-partition bookkeeping:

* An MRU hit is a hit on the youngest valid way in the mask.
* An LRU hit is a hit on a way with as many valid, younger mask ways as the
  mask has ways minus one. It is the last position of a full stack.
* The victim is the first invalid way in the mask, otherwise the oldest.

### Lookup versus replacement

Each core has a replacement mask: the ways it owns, that are powered, and
that are not being switched off. Only ways in this mask can receive the
core's fills and count toward its MRU/LRU statistics.

A lookup, however, compares the tag in **every powered way**. In
partitioned operation this changes nothing, because a way is emptied
before it changes owner, so a core only ever finds its own lines in its
own ways. It matters after a switch between conventional and partitioned
operation. Lines that landed in the other core's ways while sharing stay
reachable, and are never fetched a second time, so the switch needs no
flush of the whole cache. Until they are replaced, they can disturb the
statistics for a few intervals.

### Cache organisation

* The cache blocks: one request is in flight at a time.
* Two cores share it through a round-robin arbiter (`req_arbiter`).
* Writes allocate and lines are written back.
* A hit answers exactly `HIT_LAT` (14) clocks after the request is
  accepted.
* A miss first writes back a dirty victim, then fetches the line from
  memory. It never answers sooner than `HIT_LAT`.
* During a flush walk, requests wait.
* After reset, the cache spends `SETS` clocks clearing its tags, with
  ready held low.

Tags, ages and data are plain register arrays. A real implementation
would put tags and data into SRAM macros with per-way power switches.
Those switches are the analog part that `way_power_o` controls.

## Top-level interface (`pa_shared_l2`)

| port | meaning |
|---|---|
| `part_en_i` | 1: partitioned, power-aware operation. 0: conventional shared cache. Every way is powered, both cores may replace anywhere, and decisions are ignored. Software (the OS scheduler) sets this bit. |
| `t1_i`, `t2_i` | thresholds T1 < T2, in the fixed-point format of D |
| `c_req_valid_i/ready_o/we_i/addr_i/wdata_i[2]` | per-core request. Byte address (32 bits); data is one 32-byte L1 line. Accepted on valid && ready. |
| `c_rsp_valid_o[2]`, `c_rsp_hit_o`, `c_rsp_rdata_o` | response: one-cycle valid to the requesting core; read data is one L1 line |
| `mem_req_*`, `mem_rsp_*` | 64-byte-line memory port: valid/ready requests, write-backs carry data, fills return one valid pulse with data |
| `way_power_o` | per-way power enable |
| `way_owner_o` | per-way owner (0 = core 0) |
| `d_o[2]`, `cmd_o[2]`, `interval_o` | D values and power commands of the latest decision; `interval_o` pulses when a decision is taken |
| `events_o` | pulses: a way moved, a move was skipped, a way was switched on, a way was switched off |

The reset state has all ways powered, with the lower half owned by core 0
and the upper half by core 1.

Default parameters:

| parameter | default |
|---|---|
| `WAYS` | 32 |
| `SETS` | 512 |
| `LINE_BYTES` | 64 |
| `PORT_BYTES` | 32 |
| `HIT_LAT` | 14 |
| `SAMPLE_BITS` | 16 |
| `FRAC_BITS` | 16 |
| `SM_BITS` | 3 |
| `SM_ASYM` | 1 |
| `MIN_WAYS` | 2 |

## Files

| file | content |
|---|---|
| `rtl/wac_pkg.sv` | shared types: resize command, move decision, event bundle |
| `rtl/pa_shared_l2.sv` | top level |
| `rtl/req_arbiter.sv` | two-core round-robin request arbiter |
| `rtl/way_adaptable_cache.sv` | tags, data, LRU ages, per-core masks, flush walk, MRU/LRU hit flags |
| `rtl/access_monitor.sv` | per-core MRU/LRU hit counters and interval counter |
| `rtl/partition_ctrl.sv` | two dividers, D comparator, two threshold comparators, two state machines |
| `rtl/d_divider.sv`, `rtl/d_comp.sv`, `rtl/t_comp.sv`, `rtl/resize_fsm.sv` | the parts of the control circuit |
| `rtl/way_manager.sv` | owner and power vectors, random way choice, flush sequencing |
| `tb/tb_<block>.sv` | self-checking testbench per block |
| `tb/tb_pa_shared_l2.sv` | end-to-end test at a reduced size |
| `tb/tb_pa_shared_l2_full.sv` | end-to-end test at the default size |
| `tb/tb_pa_shared_l2_thresholds.sv` | the three threshold settings side by side |
| `tb/tb_partition_ctrl_sizes.sv` | control circuit at interval sizes 2^8, 2^12, 2^16 and 2^20 |
| `tb/l2_mix_driver.sv` | behavioural core with a tunable share of LRU hits |
| `tb/mem_model.sv` | behavioural main memory, 100-clock latency |
| `tb/l2_core_model.sv` | behavioural core issuing L2 traffic and checking read data against a shadow copy |

## Simulating

Any testbench builds with plain Verilator 5. The package goes first;
`-y` lets Verilator find the other modules by name:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        --top-module tb_pa_shared_l2 rtl/wac_pkg.sv tb/tb_pa_shared_l2.sv
    ./obj_dir/Vtb_pa_shared_l2

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

### What the tests cover

* **Block tests** compare the outputs with independent models in the
  testbench:
  * the state tables;
  * exact quotients;
  * a reference LRU stack per core;
  * a shadow of memory contents.
* **`tb_pa_shared_l2`** uses a small cache: 8 ways, 8 sets, 64-access
  intervals. Two core models run contrasting patterns:
  * a "hot" pattern that hits only the MRU line;
  * a cyclic pattern that sweeps as many lines per set as the core has
    ways, so every hit is an LRU hit.

  The test checks every read and every hit latency. It counts how often
  each mechanism happened: way moves, skipped moves, power-ups,
  power-downs, flush write-backs, eviction write-backs, INC and DEC
  commands, and the switch from partitioned to conventional mode. Any
  mechanism that never happened counts as a failure.
* **`tb_pa_shared_l2_full`** runs the default 1 MB configuration with
  T1/T2 = 0.001/0.005 for eight intervals, about 524,000 accesses. It
  takes about 30 seconds. Core 1 gains a way every interval. Each moved
  way is a powered way of core 0, so it is first flushed across all 512
  sets. After seven "fewer ways" intervals, core 0 receives DEC, and a way
  is flushed and switched off.
* **`tb_pa_shared_l2_thresholds`** runs three copies of a small top with
  the same traffic and the three threshold pairs
  (0.1, 0.5), (0.01, 0.05) and (0.001, 0.005). Core 0's D is about 0.032.
  The test checks that its requests are dec, keep and inc respectively.
  Only the energy-oriented setting switches core 0 down to 2 ways.
* **`tb_partition_ctrl_sizes`** checks the control circuit's quotients,
  decisions and latency at N = 8, 12, 16 and 20.

## Departures from the original proposal and open points

* **Hit lookup and moves.** Hits are looked up in all powered ways, not
  only in the requester's own ways, and a powered way is flushed before
  it changes owner (see above). The proposal says a core accesses only its
  allocated, active ways, and requires write-back only before a way is
  switched off. It does not say what happens to the lines of a reassigned
  way.
* **Interval length.** The interval is a power of two. The proposal's
  evaluation quotes roughly 100,000 accesses; the default 65,536 is the
  nearest power of two.
* **Divider.** The divider is sequential. The reference circuit's quoted
  delays, tens of nanoseconds for N = 8 to 20, suggest a combinational
  array divider. Either is fast enough against an interval, and the
  sequential one is much smaller.
* **Own choices.** The following are choices of this design, not part of
  the proposal:
  * behaviour in conventional mode;
  * reset state;
  * choice between powered and switched-off ways when moving;
  * the order move, then core 0, then core 1;
  * dropping a decision while busy;
  * handling of D0 = D1 ties and the zero-division cases.
* **Private-cache variant.** The proposal first applies the same D /
  threshold / state-machine control to a single core's private 64 KB,
  32-way L1 cache. That variant is not built as its own top. The same
  blocks cover it: `way_adaptable_cache` with 32 ways, 64 sets and 32-byte
  lines, with only one core's mask in use.
* **Not modelled:**
  * the power-gating transistors;
  * energy;
  * the processor cores;
  * the time cost of switching a way's power.

  The flush write-back traffic is modelled.
