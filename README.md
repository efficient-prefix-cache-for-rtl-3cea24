# Reverse Routing Cache: a prefix cache for route lookup

A route cache normally remembers destination addresses: one entry per address
seen, so it has to be large. Yet the forwarding decision depends only on the
route prefix that the address matches, and every address under that prefix
leaves through the same next hop. The Reverse Routing Cache (RRC) therefore
caches **route prefixes**. One cached prefix serves every address it covers,
so a much smaller cache (tens to a few hundred lines) can reach the hit ratio
of an address cache with thousands of lines. Being small, it can be fully
associative, built as a small ternary CAM, and use an LRU-like replacement.

This repository holds synthesizable SystemVerilog for the cache and for two
systems built around it:

* **`rrc_system`**: a 128-line cache with *minimal expansion* (RRC-ME),
  used as the level-one route cache of a network processor, in front of a
  binary-trie routing table.
* **`rrc_tcam_system`**: a 64-line cache with *parent restriction* (RRC-PR)
  placed in front of a large (26,786-entry) TCAM routing table. Keys that hit
  the small cache never activate the large TCAM, which cuts its average
  dynamic power.

`rrc_top` instantiates both side by side.

## The catch: parent prefixes

Prefixes nest. For example, 129.110/16 is the *parent* of 129.110.128/17.
Longest-prefix match sends 129.110.150.1 along the /17 route. If the cache
held only the /16, that address would hit the /16 and be misrouted. A parent
prefix must therefore never be cached. The cache may hold only prefixes that
nest nothing else in the routing table. As a result:

* Cached prefixes are pairwise **disjoint**, so a key matches at most one
  line.
* The cache needs **no priority encoder** and no ordering of its lines. The
  matching line's next hop is the OR of all lines' next hops, each gated by
  its match bit. A new prefix can go into any free line in one cycle.

There are two ways to handle keys whose longest match is a parent:

* **RRC-PR (parent restriction).** Such keys are never cached. They always
  take the slow path. Parents are a small minority of real routing tables, a
  few per cent.
* **RRC-ME (minimal expansion).** The cache stores the *minimal expansion
  prefix* (MEP) instead: the shortest prefix under the parent that contains
  the key and nests no other route. Take the bits the trie walk traversed
  before it ran out of branches, and append the key's next bit. No route lies
  under that prefix, so it is disjoint from everything in the table, and every
  key inside it has the parent as its longest match. Over time a popular
  parent comes to be represented by several such children.

Worked example on 5-bit keys: the routes include `10*` and a longer route
under `100`, so `10*` is a parent. Key `10110` walks `1`, `10`, `101` and
stops, because there is no node `1011`. The longest match is `10*`, a parent.
The expansion is the walked bits `101` plus the next key bit `1`, giving
`1011*`. `1011*` is cached with the next hop of `10*`. The trie itself is
never modified.

The trie walk already yields the walked depth and whether the matched node
has descendants. `mep_unit` forms the expansion in the same cycle the search
result arrives, so a parent costs no second search.

## The cache array (`rrc_cache`)

Each line holds a value, a care mask, the prefix length, a next hop and a
valid bit. Line *i* matches when `((key ^ value_i) & care_i) == 0`. The index,
next hop and prefix of the single matching line are ORed out. An assertion
checks that at most one line matches. The search result is registered: one
cycle. Writes and invalidations take one cycle at any index. A combinational
*overlap probe* reports every line whose prefix nests, or is nested by, a
given prefix. Coherence removal uses it, and so does the duplicate check of
the TCAM front end.

## Replacement (`semi_lru`)

Every line has a descending age counter with range 0..N-1. A line's counter
is set to N-1 when the line is placed and whenever it hits. Each cache miss
decrements every other non-zero counter. The victim is the lowest-numbered
empty line, or else the lowest-numbered line at age 0. If the cache is full
and no counter has reached 0, the replacement **fails**: the new prefix is
not cached at all, and the lines in active use are protected.

The counters age once per *miss*, not once per search. With one touch per
search, ageing per search would always leave at least one line at zero, and
the failure case could never occur.

## Coherence with route updates (`coherence_ctrl`)

A route change can make cached lines wrong:

* **Insert.** A new route may fall under a cached prefix, which then becomes
  a parent. It may also fall between a parent and one of its cached
  expansions, which then no longer gives the longest match.
* **Delete.** The deleted route's mirror goes stale, and so does every
  expansion made from it.

After every insert or delete, the coherence unit removes every cache line
that overlaps the updated prefix, **one line per cycle**. A task that finds
*k* lines takes *k*+1 cycles. This removes a superset of the lines that are
actually wrong: longer routes under a deleted parent are removed too, even
though they were still valid. Few lines overlap any single route, so the cost
is normally a handful of cycles.

## Network-processor system (`rrc_system`)

```
lookup ──► rrc_cache ──hit──────────────────────────────► result (2 cycles)
               │miss
               ▼
          trie_engine ──► mep_unit ──► semi_lru victim ──► rrc_cache write
          (1 bit/cycle)   (ME or PR)                       result (depth+4 cycles)

route insert/delete ──► trie_engine ──► coherence_ctrl ──► upd_done
```

* Lookups use `lk_valid`/`lk_ready`/`lk_key` and return `res_valid`,
  `res_hit`, `res_found` and `res_nh`. A hit answers 2 cycles after the
  lookup is accepted. A miss whose trie walk stops at depth *d* answers after
  *d*+4 cycles.
* Route updates use `upd_valid`/`upd_ready`, `upd_op` (insert or delete),
  `upd_prefix` and `upd_nh`. `upd_done` pulses once both the trie and the
  cache are consistent again.
* `me_enable` selects RRC-ME (1) or RRC-PR (0). It can change between
  operations.
* One operation is in flight at a time. Updates take priority over lookups.
* The `stat_*` outputs count hits, misses, direct fills, expansion fills,
  parent skips (RRC-PR), evictions, failed replacements and coherence
  removals. `stat_trie_nodes` gives the trie's node usage.

`trie_engine` is a plain binary trie. Node 0 is the root. Each node holds
two child pointers, a "route ends here" flag, a "has descendants" flag and a
next hop. A search visits one node per cycle and remembers the last route
seen. It reports the next hop, the match length, whether the match is a
parent and the walk depth. An insert allocates nodes from a bump pointer and
sets the descendant flag on every node it passes. A delete clears only the
route flag: nodes are not reclaimed and descendant flags stay set. A stale
descendant flag only makes a later expansion longer than necessary; it never
makes it wrong. The trie is one possible routing table. The cache needs only
the longest match, the parent flag and the walk depth.

## TCAM power front end (`rrc_tcam_system`)

```
          stage 1                       stage 2
key ──► rrc_cache (RRC-PR) ──hit──► [reg] ─────────────────► result
            │ miss gates the key                                ▲
            └─────────────────────► lpm_tcam (26,786) ─────────┘
                  popular prefix (non-parent, not already cached) ──► rrc_cache write
```

* One key per cycle. Each result leaves exactly 2 cycles after its key, in
  order. `out_from_rrc` marks results answered by the cache.
* The large TCAM is searched only when the cache misses. `stat_tcam_searches`
  counts its activations, and `stat_rrc_hits` counts the searches it was
  spared.
* A TCAM result that is not a parent is written back into the cache. The
  overlap probe first checks whether the prefix is already there, since two
  keys in flight can miss on the same prefix. Parents are never cached
  (RRC-PR). Here the goal is power, not search time, so the expansion logic
  is not needed.
* `lpm_tcam` behaves like a conventional TCAM routing table. The loader keeps
  the entries sorted longest first, together with a parent flag per entry,
  and the lowest-numbered match wins. The table is built from 1024-entry
  `tcam_bank`s; the last bank holds the remainder. Each bank picks its
  lowest match, and the lowest bank with a match wins.
* A TCAM entry write (`upd_*`) waits until the pipeline is empty. It stalls
  the key input while the coherence unit removes overlapping cache lines.

## Files

| file | contents |
|---|---|
| `rtl/rrc_pkg.sv` | widths (`W`=32, `NH_W`=8), `prefix_t`, op enums, prefix mask/cover/overlap functions |
| `rtl/rrc_cache.sv` | cache array |
| `rtl/semi_lru.sv` | age counters and victim choice |
| `rtl/coherence_ctrl.sv` | overlap removal after route updates |
| `rtl/trie_engine.sv` | binary-trie routing table |
| `rtl/mep_unit.sv` | choose matched route, expansion or nothing |
| `rtl/rrc_system.sv` | network-processor system |
| `rtl/tcam_bank.sv`, `rtl/lpm_tcam.sv` | large TCAM routing table |
| `rtl/rrc_tcam_system.sv` | two-stage TCAM front end |
| `rtl/rrc_top.sv` | both systems, ports prefixed `np_` and `pw_` |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_workload_table.sv` | full-size run with a 26,786-route table |

Default parameters: 128 cache lines and 131,072 trie nodes on the
network-processor side; 64 cache lines and 26,786 TCAM entries on the TCAM
side. The cache sizes and the table size come from the configurations that
motivate the design. The trie size is a local choice: 131,072 nodes is ample
for a table of that size (a synthetic 26,786-route table needs about 69K).
All sizes are parameters. The cache line count may be any value from 2
upward (for example 16 to 2048).

## Simulating

Each testbench is self-contained. It prints `TB_RESULT checks=N failures=M`
and stops through a cycle watchdog if something hangs. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/rrc_pkg.sv rtl/*.sv tb/tb_rrc_top.sv --top-module tb_rrc_top
./obj_dir/Vtb_rrc_top
```

| testbench | what it establishes |
|---|---|
| `tb_rrc_cache` | hits, line index, next hop, one-cycle response, invalidation, overlap probe against a reference model |
| `tb_semi_lru` | victim choice, empty-line preference, ageing, failure when all counters are non-zero |
| `tb_coherence_ctrl` | exactly the overlapping lines removed, one per cycle |
| `tb_trie_engine` | longest match, parent flag, walk depth and latency (depth+1) on random nested routes; deletes; out-of-nodes error |
| `tb_mep_unit` | the 5-bit example above, and random cases |
| `tb_rrc_system` | every answer correct under inserts, deletes and mode switches; hit latency 2, miss latency depth+4; a freshly placed prefix hits; every mechanism occurs |
| `tb_lpm_tcam` | priority across banks, including a partial last bank |
| `tb_rrc_tcam_system` | in-order results at 2 cycles, TCAM searched exactly on misses, parents kept out, duplicate check, coherence under traffic, input stalls |
| `tb_rrc_top` | both systems at full default size, 3,000 routes each, all mechanisms counted (about 6 s) |
| `tb_workload_table` | full size with a 26,786-route table in both the trie and the TCAM; reports trie nodes, hit ratios and the share of keys kept away from the TCAM (about 30 s) |

The hit ratios printed by `tb_workload_table` come from synthetic traffic.
They are not a reproduction of measurements on real router traces.

## How far it follows the original scheme

Taken from the scheme:

* caching of prefixes only;
* disjoint lines with no priority encoder;
* one-cycle hit and one-cycle placement;
* the parent-restriction and minimal-expansion policies, and the way the
  expansion is formed;
* a semi-LRU with counter range equal to the cache size and a failing
  replacement;
* coherence removal at one line per cycle;
* the two uses (level-one cache; power saver for a large TCAM) and their
  sizes.

Chosen here, where the scheme leaves the detail open:

* all widths, handshakes and latencies beyond the one-cycle hit;
* ageing once per miss;
* the trie as the routing table, its node format and its update algorithm;
* removing *all* overlapping lines on an update;
* the registers and fixed latency of the TCAM front end;
* the duplicate check;
* the banked TCAM organisation;
* the trie size.

Not built:

* the address cache and the earlier range cache, which serve only as
  comparisons;
* a transistor-level TCAM (the lines here are flip-flops and comparators);
* the real routing tables and packet traces.
