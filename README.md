# Shepherd-cache replacement for a shared last-level cache

Large shared last-level caches running commercial server workloads miss far
more often under LRU than they would under Belady's optimal policy, which
evicts the line whose next use lies furthest in the future. The Shepherd
cache idea gets closer to optimal by putting off the eviction decision. A
newly allocated line is not placed among the ordinary lines of its set. It
waits in a small FIFO of *Shepherd ways*, and while it waits the hardware
watches which lines of the set are used again. When the line reaches the head
of the FIFO and room is needed, that history shows which line was worth
keeping.

This repository holds synthesizable SystemVerilog for two low-cost versions
of that idea:

* **SC-L** (lightweight). Each Shepherd entry keeps one *known* flag for every
  line of the set.
* **SC-XL** (extra-lightweight). Each Shepherd entry keeps a single known bit.
  The recency order of the baseline policy stands in for the rest.

Either version runs on top of one of three baseline policies for the
remaining ways: true **LRU**, a tree **pseudo-LRU** in the IBM 3033 style, or
**Clock**. Both the version and the baseline are parameters. The default is
SC-XL over Clock, which needs only 40 bits of replacement state per 16-way
set.

The top module, `shepherd_l3_cache`, is a complete cache directory for a
shared L3. It holds the tags, the valid bits and the replacement state of
every set, and it answers lookups. By default the cache is 4 MB, 16-way, with
64-byte lines, 4 Shepherd ways per set and 50-bit physical addresses. The
data array is not included. Each response names the way and the evicted line
address, so a data array and a memory interface can be driven from it.

## Shepherd ways and main ways

The ways of a set are not split into two physical regions. Any way can hold a
Shepherd line, and per-set metadata records which ways do. In a full 16-way
set, at any moment:

* 4 ways hold **Shepherd lines**, the four most recently allocated lines, in
  FIFO order;
* 12 ways hold **main lines**, which are ordered by the baseline policy.

The baseline policy ignores Shepherd ways when it chooses a victim. A line
leaves the FIFO in one of two ways:

* it is evicted;
* it *graduates* to the main ways. It then enters at the least-recently-used
  position. With Clock it enters with its touched bit cleared, as if it were a
  new line.

### Imminence: what "known" means

Take the line at the head of the FIFO. Since that line was allocated, some
lines of the set have been accessed again and some have not. The lines that
have been accessed are *known*: an optimal policy would keep them in
preference to the others, because their next use has been seen to come
sooner. A line that has not been accessed is of *unknown* imminence, and is
the better candidate for eviction.

* **SC-L** records this exactly. Each Shepherd slot owns a row of known flags,
  one per way. The row is cleared when the slot's line is allocated, and the
  flag of a way is set whenever that way is accessed afterwards.
* **SC-XL** records only whether the Shepherd line itself has been re-used
  since it was allocated: one bit per entry. The baseline's recency order
  does the rest. Any main line that has not been touched since the head line
  arrived is older than every main line that has, so the baseline's LRU
  choice is already a line of unknown imminence whenever one exists.

### The replacement decision

On a miss in a full set, let `H` be the line at the head of the FIFO:

| condition | SC-L | SC-XL | `resp_decision_o` |
|---|---|---|---|
| `H` not re-used since it was allocated | evict `H` | evict `H` | `DEC_EVICT_SC` |
| `H` re-used; some main line unknown to `H` | evict one of those lines (see below); `H` graduates | — | `DEC_EVICT_UNK` |
| `H` re-used; otherwise | the baseline picks among all main lines; `H` graduates | same as SC-L | `DEC_EVICT_BASE` |

With LRU or pseudo-LRU, the line chosen among the unknown main lines is the
least recent one in the baseline's order. With Clock it is the lowest-numbered
way, because Clock has no usable order for this. Clock's own sweep, which
skips the Shepherd ways, is used only in the last row.

In every case the new line goes into the victim way and becomes the youngest
Shepherd entry.

A hit sets the known state:

* **SC-L:** the flag for the hit way, in every slot's row.
* **SC-XL:** the known bit of the hit line, if it is a Shepherd line.

**The baseline tracks only main lines.** A hit on a main line updates the
baseline. Hits on Shepherd lines and fills do not, since a new line is always
a Shepherd line.

* For LRU and Clock this changes nothing: a graduating line is put at the LRU
  position, or has its touched bit cleared, whatever its earlier history.
* For pseudo-LRU it matters. Ignoring Shepherd traffic keeps it from
  disturbing tree bits that the main lines share.

**Start-up.** While a set still has invalid ways, a miss fills the
lowest-numbered invalid way and evicts nothing (`DEC_FILL_FREE`). The first
four lines of the set become Shepherd lines. After that, every further fill
into a free way makes the head line graduate, so the FIFO always holds the
four youngest lines. Lines are never invalidated one at a time. The number of
occupied FIFO entries is therefore `min(4, valid lines)`, and no count needs
to be stored.

**Order of the checks.** The head line is checked before the main lines. The
original Shepherd cache design checks them the other way round, and the
difference amounts to about one Shepherd way. This design checks the head
line first.

The SC-L decision also covers the case where every line of the set is known.
That is the only case in which SC-L decides differently from a Shepherd cache
that keeps full imminence counters, and it is counted as `DEC_EVICT_BASE`.

## Baseline policies and how they serve the Shepherd logic

Each baseline module is pure next-state logic for one set. In one cycle it
applies three operations to the stored state, in this order:

1. **select:** the victim among a candidate mask. For Clock, `sweep_i` also
   applies the sweep's side effects.
2. **demote:** a graduating Shepherd line goes to the LRU position, or has its
   touched bit cleared.
3. **touch:** a main line that was hit goes to the MRU position, or has its
   touched bit set.

The three modules share one port list, so the cache can choose a baseline
with a `generate` on `BASE`.

* **`lru_policy`** stores the recency stack in its minimal form: 45 bits, the
  smallest width that can number all 16! orders of 16 ways.
  * The stored number is the Lehmer code of the ages, where age 0 is MRU and
    age 15 is LRU: `code = Σ c[w]·(15−w)!`, with `c[w]` the number of higher
    ways `w' > w` that are younger than way `w`.
  * Code 0 is the reset order, way 0 MRU through way 15 LRU.
  * Each cycle the code is expanded to one age per way. Each digit is found
    with constant comparisons, and way `w` takes the `c[w]`-th smallest age
    still free.
  * The update works on the ages, and the result is packed again.
  * Selecting from a subset is a search for the largest age among the
    candidates.
  * Every 45-bit value decodes to a valid order.
* **`plru_policy`** splits the 16 ways into four subtrees of four ways.
  * The order of the four subtrees is exact. It is stored as a 5-bit index of
    the 24 possible orders, a Lehmer code: `d0*6 + d1*2 + d2`, where `di` is
    the position of the i-th most recent subtree among the subtrees not yet
    listed.
  * Each subtree is a 3-bit binary tree. At each node, 1 means the right half
    was used more recently.
  * The whole tree is read as a total order: `rank = subtree_rank*4 +
    rank_in_subtree`. Selection, demotion and touch all work on that order.
  * 17 bits per set.
* **`clock_policy`** keeps a touched bit per way and a 4-bit hand. The sweep
  that would step the hand one way at a time is done in a single cycle:
  * The victim is the first candidate, counting from the hand, whose touched
    bit is clear.
  * Every candidate passed on the way has its touched bit cleared.
  * If all candidates are touched, they are all cleared and the first
    candidate from the hand is taken.
  * The hand then points just past the victim.
  * Ways outside the mask, the Shepherd ways, are neither examined nor
    cleared.

## Replacement state per set (16 ways, 4 Shepherd ways)

| part | this design | with a full FIFO-order field |
|---|---|---|
| SC-XL: 4 way pointers in FIFO order + 4 known bits | 20 | 20 |
| SC-L: known rows 4×16 + slot pointer 16×2 + SC flag 16 + FIFO order | 114 (2-bit oldest-slot pointer) | 117 (5-bit full order) |
| LRU | 45 | 45 (⌈log2 16!⌉) |
| pseudo-LRU | 17 | 17 |
| Clock | 20 | 20 |
| **SC-XL + Clock (default)** | **40** | 40 |
| SC-L + pseudo-LRU | 131 | 131 |
| SC-XL + LRU | 65 | 65 |
| SC-L + LRU | 159 | 162 |

The SC-L rows are 3 bits smaller than with a full FIFO-order field. SC-L slots
are always refilled oldest-first, so a rotating pointer to the oldest slot
carries the same information as a full FIFO order.

Decoding and re-encoding the 45-bit LRU code takes much more logic than a
plain age field would. That is the practical cost of true LRU at 16 ways, and
the reason the pseudo-LRU and Clock baselines exist.

## The cache block: interface and timing

`shepherd_l3_cache` parameters:

| parameter | default | meaning |
|---|---|---|
| `CACHE_BYTES` | 4 MB | capacity; `SETS = CACHE_BYTES / (LINE_BYTES*WAYS)` |
| `LINE_BYTES` | 64 | line size |
| `WAYS` | 16 | associativity (pseudo-LRU needs a multiple of 4) |
| `SC_WAYS` | 4 | Shepherd ways per set (a power of two for SC-L) |
| `ADDR_W` | 50 | physical address width |
| `SC_MODE` | `SC_XL` | `SC_XL` or `SC_L` |
| `BASE` | `BASE_CLOCK` | `BASE_LRU`, `BASE_PLRU` or `BASE_CLOCK` |

An address is split as `{tag, set index, line offset}`, using ordinary modulo
indexing.

Storage is three instances of `set_ram`, each with one word per set,
synchronous read and one write port:

* tags and valid bits (`WAYS*(TAG_W+1)` bits);
* baseline state;
* Shepherd state.

Timing:

* **Reset.** `rst_n` is asynchronous and active low. After reset the
  controller writes the reset value into every set, one set per cycle.
  `req_ready_o` stays low for those `SETS` cycles (4096 by default).
* **Request.** A request is accepted on a clock edge where `req_valid_i &&
  req_ready_o`. The set's three words are read at that edge.
* **Lookup.** In the next cycle the tags are compared and the Shepherd and
  baseline logic decide, all combinationally. The new state and, on a miss,
  the new tag are written back at the end of that cycle, and the response is
  registered.
* **Response.** `resp_valid_o` is high for the one cycle after the lookup,
  i.e. two edges after acceptance. It carries `resp_hit_o`, `resp_way_o` (the
  hit way, or the way now holding the new line), `resp_evict_o`,
  `resp_evict_addr_o` (the evicted line's address, offset bits zero) and
  `resp_decision_o`.
* **Throughput.** `req_ready_o` is high only while idle, so the block accepts
  one request every two cycles. Because of that, a request that immediately
  follows another to the same set always sees the updated state, and no
  forwarding is needed.
* **Counters.** `access_cnt_o` and `miss_cnt_o` count requests and misses.
  Their ratio is the miss ratio that the policies are judged by.

Three concurrent assertions in the cache check the invariants of the
decision:

* a baseline pick always has at least one candidate;
* a line is never evicted while a way is free;
* a full set always has main lines.

## Files

| file | contents |
|---|---|
| `rtl/repl_pkg.sv` | enums for variant, baseline and decision kind; state-width and reset-value functions |
| `rtl/shepherd_l3_cache.sv` | top: controller, tag match, the policy `generate`s, storage |
| `rtl/sc_xl_policy.sv`, `rtl/sc_l_policy.sv` | Shepherd decision logic for one set |
| `rtl/lru_policy.sv`, `rtl/plru_policy.sv`, `rtl/clock_policy.sv` | baseline next-state logic for one set |
| `rtl/set_ram.sv` | per-set storage array |
| `tb/ref_model_pkg.sv` | reference models written with lists and step-by-step loops |
| `tb/tb_cache_checker.sv` | request generator and scoreboard for one cache instance |
| `tb/tb_*.sv` | testbenches, listed below |

## Verification

Every testbench is self-checking and ends with a line `TB_RESULT checks=N
failures=M`.

* **`tb_lru_policy`, `tb_plru_policy`, `tb_clock_policy`.** 20,000 random
  select, demote and touch steps, compared with a recency list, with a
  subtree list plus explicit pair bits, and with a hand that moves one way
  per step. The Clock test also compares the whole next state.
* **`tb_sc_xl_policy`, `tb_sc_l_policy`.** 30,000 accesses to one set,
  paired with the LRU baseline. The traffic is a skewed mix of re-used and
  one-off lines. Every decision kind must occur.
* **`tb_set_ram`.** Random reads and writes, checking the one-cycle read
  latency and that a same-cycle write returns the old data.
* **`tb_shepherd_l3_cache`** (end to end). All six variant/baseline
  combinations at 16 sets, 6,000 requests each. The checks:
  * every response against the reference model: hit, way, evicted address,
    decision and exact latency;
  * the clearing time after reset;
  * the counters;
  * that every mechanism occurred: hits, free fills, each eviction kind,
    requests held while the cache is busy, and idle gaps.
* **`tb_shepherd_l3_cache_full`.** The cache with every parameter at its
  default (4096 sets), running 20,000 requests over eight sets spread across
  the index range.
* **`tb_shepherd_l3_cache_sizes`.** SC-L+LRU, SC-XL+LRU, SC-L+pseudo-LRU and
  SC-XL+Clock, each at 4, 8, 16 and 32 MB (up to 32,768 sets).

The reference models share the reading of the policy that the RTL was written
from. They catch encoding and implementation errors, not a misreading of the
policy itself.

No real workload traces are included. The traffic is synthetic, so these
tests say nothing about miss ratios on server workloads.

To run a testbench with Verilator 5 from the repository root:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/repl_pkg.sv tb/ref_model_pkg.sv tb/tb_shepherd_l3_cache.sv \
  --top-module tb_shepherd_l3_cache -Mdir obj_tb
./obj_tb/Vtb_shepherd_l3_cache
```

Replace the testbench name to run another one. Each runs in well under a
second.

## Where this design makes its own choices

The policy rules described above are the Shepherd-cache rules. The following
points are filled in by this design:

* **Clock hand.** After a victim is found, the hand points just past it.
* **Start-up fills and graduation into free ways.** The FIFO holds the four
  youngest lines, as described under Start-up.
* **SC-L fill.** In SC-L, a fill marks the filled way as accessed in the
  other slots' known rows.
* **Encodings.**
  * the Lehmer numbering of the LRU stack;
  * the SC-L oldest-slot pointer;
  * the pseudo-LRU Lehmer code and node polarity.
* **Cache interface.**
  * the request/response interface and the two-cycle schedule;
  * the reset clearing sweep;
  * the counters;
  * the absence of a data array, invalidation or write-back.

Not included:

* the original Shepherd cache with full imminence counters;
* dynamic or bimodal insertion policies;
* prime-modulo set indexing;
* random, not-MRU and LFU replacement.

These are alternatives to the design, not parts of it.
