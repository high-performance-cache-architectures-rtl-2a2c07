# Route-lookup caches for IPv6 forwarding

A router must map every packet's destination address to an output port. The full
routing table is large and sits in slow memory, but destination addresses show
strong temporal locality: a few thousand distinct IPv6 destinations make up a
stream of millions of packets. A small cache in front of the table therefore
answers most lookups. This RTL holds two cache engines built on that idea. They
stand side by side in the top level `ip_route_cache_top`, each with its own
lookup port and its own port to an external routing table.

1. **Pipelined address cache** (`vc_rsi_pipeline`). This engine caches whole
   128-bit destination addresses. It has a 512-set direct-mapped cache, a 16-entry
   victim cache and *randomly selected indexing*, which moves the addresses of
   the set with the most conflicts to other sets. The design is a three-stage
   pipeline that accepts one lookup per cycle. Misses wait in a miss buffer.
2. **Set-partitioned TCAM route cache** (`tcam_route_system`). This engine caches
   *routing entries*, which are prefixes with don't-care bits, in a 128-entry
   ternary CAM. The CAM is split into sets by how many other table entries an
   entry overlaps. Each set chooses victims with one of three replacement
   policies (LRU, LAR, RLAI). The engine also has a sampler that re-checks cache
   hits against the table to catch *port errors*.

Both engines use 128-bit addresses and 8-bit port numbers. Every size is a
parameter, and the defaults are the configuration described below.

## Engine 1: direct-mapped cache with victim cache and random index

### Pipeline

| stage | work |
|---|---|
| IS | `rsi_index_select` forms the 9-bit set index from the address |
| CA | compares the direct-mapped entry of that set, which has the full address as its tag, and all 16 victim ways in parallel |
| PT | returns the port on a hit; on a miss, puts the lookup into `miss_buffer` |

Each lookup carries an id (`in_id`). A result comes out on `out_*` with the
same id and one of four kinds:

- **hit**: found in the direct-mapped cache.
- **victim hit**: found in the victim cache. The victim entry and the
  direct-mapped entry of the set swap places in the same cycle.
- **miss**: the routing table is searched.
- **pseudo-miss**: the address is already being searched, so the lookup waits
  for that answer and starts no search of its own.

Hits come out two cycles after they enter. A stream of hits runs at one lookup
per cycle: the testbench pushes 200 hits in 201 cycles. Misses come back later,
after younger hits, so results are out of order.

When an answer returns from the table, the entry is written into the set chosen
at IS. A valid entry it displaces goes into the victim cache, which is LRU
and prefers a free way. That displacement counts as a *conflict miss* for the
predictor. If a swap writes the main cache in the same cycle, the answer waits
one cycle.

The pipeline stalls (`in_ready` low) in three cases:

- a miss finds the buffer full;
- the routing table refuses a search;
- a buffered result and a PT-stage hit want the one result port in the same
  cycle. The older buffered result goes first.

### Miss buffer

`miss_buffer` is an in-order queue of 64 slots.

- A real miss takes a *primary* slot and sends one search to the table.
- A pseudo-miss takes a *secondary* slot.
- The table is assumed to answer in request order. Each answer is broadcast to
  every waiting slot with the same address, including a slot allocated in that
  same cycle, and is written into the cache once.
- Completed slots retire from the head in lookup order, with the kind (miss or
  pseudo-miss) marked.

Two assertions cover the handshake rules.

### Randomly selected index

Some sets attract far more conflict misses than others. The random index moves
the lookups of the worst set somewhere else:

- `rsi_predictor` keeps a 16-bit saturating counter per set and increments it on
  each conflict miss.
- `end_period` starts a scan that reads and clears one counter per cycle. The
  set with the highest count wins, and the lower set wins a tie. That set
  becomes the *predictor* for the next period.
- The pulse that ends the scan (SETS+1 cycles after `end_period`) does three
  things: it loads the predictor, draws new random bit positions, and flushes
  both caches.
- `rsi_index_select` builds four candidate indexes:
  - candidate 1 is the original index, address bits 127..119;
  - candidates 2–4 each take 9 bit positions drawn at random from address bits
    89–118, 30–88 and 0–29.
- If the original index equals the predictor, the first candidate that differs
  from it is used. The positions come from a 32-bit LFSR seeded by `seed`, and
  stay fixed for the whole period.
- The predictor counters are a RAM-style array. After reset the block spends 512
  cycles clearing them. Conflicts in that time are not counted, and an
  `end_period` that arrives then is held until the clearing ends.

Because an address can land in a set other than its original one, the
direct-mapped tag is the full address.

## Engine 2: TCAM route cache with sets, replacement and sampling

### The cache

`tcam_array` stores, per entry, a value, a care mask (1 = compare), a port, a
priority and a valid bit. A search compares all entries in parallel, and a
binary tree picks the highest priority among the matches, the lower index on a
tie.

`tcam_route_cache` splits the 128 entries into sets by an entry's overlap count
N, which says how many other routing-table entries overlap its address space:

| set | N | entries |
|---|---|---|
| 0 | 0 | 70 |
| 1 | 1 | 42 |
| 2 | 2 | 9 |
| 3 | ≥3 | 7 |

These sizes follow the share of hits each group receives (55/33/7/5 %).
`SET_SIZE` is a 32-element array parameter, so other partitions are a parameter
change. That includes a 21-set IPv4 layout. `NUM_SETS=1` gives one fully
associative set.

The match priority is `{hp, NUM_SETS-1-set, popcount(mask)}`, compared in this
order:

1. Entries the table marks as high priority come first. These are entries that
   must override a compacted entry covering them.
2. Lower sets come next, so priority runs opposite to N.
3. Longer prefixes come last.

A fill goes to a free entry of its set, or else replaces the victim that set's
replacement logic names. If a fill has the same value and mask as a cached
entry, it overwrites that entry instead of creating a duplicate. This is how a
port correction is written.

### Replacement policies (`repl_policy`, one per set)

Each entry has:

- a recency rank (a permutation, 0 = most recent);
- an access count;
- the lookup number of its last access;
- an average access interval, updated on every access as `(old + new) / 2`.

Time is counted in lookups. The policy is chosen at run time with `repl_mode`:

- **LRU**: evict the entry with the largest rank.
- **LAR** (least access and recently used): within the window of the N_WIN
  least recently used entries (N_WIN = a quarter of the set), evict the entry
  with the fewest accesses. The less recent entry wins a tie.
- **RLAI** (relatively least average interval): within the same window, look at
  the entries idle for longer than their own average interval and evict the one
  that exceeds it most. If there are none, fall back to LRU.

An invalid entry is always used first.

### Port errors and sampling

A cached short prefix can answer for an address whose longest match in the
full table is a longer prefix that is not cached. The cached answer then has the
wrong port: a port error. On a hit, `port_error_sampler` decides whether to also
search the table. If the table's answer gives a different port, the correct
entry is written into the cache. The cached port has already been returned, so a
check only repairs later lookups.

`samp_mode` selects the technique:

| mode | searches the table on |
|---|---|
| 0 none | never |
| 1 interval | every M-th lookup, if it hits (M = 3) |
| 2 selective | every M-th hit on an entry labeled error-prone |
| 3 adaptive | a hit on a labeled entry whose countdown C is 0 |
| 4 every hit | every hit |

Adaptive sampling keeps a per-entry level L and countdown C:

- A clean check sets L ← L+1 and C ← L.
- A found error sets both to 0.
- A hit that is not checked decrements C.
- A fill clears both.

So an entry that keeps checking clean is checked less and less often.

`tcam_route_system` is the controller. It handles one lookup at a time:

- a hit that needs no check takes one cycle, and the next lookup is taken in
  that same cycle;
- a miss or a checked hit waits for the table.

The routing table answers with the longest matching entry's value, mask, port,
N, label and high-priority mark. These are properties of the compacted table,
worked out before entries reach the cache.

## What is not here

- **The routing table** (in DRAM, or a large TCAM) is outside both engines.
  Its search interfaces are ports of the top level. The testbenches use
  behavioural models of it: `tb/rt_port_model.sv` is a fixed-latency table
  that answers in order with a port computed from the address, and
  `tb/rt_lpm_model.sv` is a longest-prefix-match table with one search in
  flight.
- **Routing-table compaction** merges same-port and nearby entries using don't
  care bits. With it goes the **computation of N, the labels and the
  high-priority marks**. These are offline transformations of the table, not
  lookup hardware, and they are not built. The cache takes their results as
  inputs on the table interface.

## Design choices beyond the published scheme

These are decisions made in this RTL, where the scheme itself leaves the
detail open:

- All handshakes are ready/valid. Lookup ids, out-of-order results and the
  result-port priority are this design's.
- The routing table is assumed to answer in order. The miss buffer's
  primary/secondary organisation and its depth of 64 are sized above the
  largest occupancy the scheme reports (57).
- Conflict misses are counted when a fill displaces a valid entry. The
  predictor counts with counters and a sequential scan, the index positions
  come from an LFSR, and the original index is the top 9 address bits.
- A period change flushes both caches.
- RLAI is read as "the entry that exceeds its average idle interval the most,
  within the N_WIN least recently used". The average interval is halved each
  update.
- The TCAM priority encoding, the identical-entry overwrite, and the blocking,
  one-at-a-time controller of engine 2 are this design's.
- Widths not fixed by the scheme are parameters: 8-bit ports, 16-bit ids,
  16-bit counters and a 32-bit time base.
- The large arrays have no reset: the direct-mapped tags and ports, the
  predictor counters and the TCAM entry storage. Each is guarded by a reset
  valid bit or by the clearing pass.

## Files

`rtl/`: one module per file, plus the package `rc_pkg`, which holds the
result-kind, replacement-mode and sampling-mode enums.

| module | role |
|---|---|
| `ip_route_cache_top` | both engines side by side; counters as arrays `p_stat[7]`, `t_stat[5]` |
| `vc_rsi_pipeline` | engine 1 |
| `rsi_index_select`, `rsi_predictor` | random index and its predictor |
| `victim_cache` | 16-way fully associative LRU victim cache with swap port |
| `miss_buffer` | in-order buffer for misses and pseudo-misses |
| `tcam_route_system` | engine 2 controller |
| `tcam_route_cache` | set-partitioned cache over `tcam_array` and `repl_policy` |
| `tcam_array` | ternary match and priority encoder |
| `repl_policy` | LRU / LAR / RLAI bookkeeping |
| `port_error_sampler` | sampling decisions |

The counters in `p_stat`, in order: hits, victim hits, misses, pseudo-misses,
stall cycles, redirected lookups, swaps. The counters in `t_stat`, in order:
lookups, hits, table searches, port errors found, evictions.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by
printing `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rc_pkg.sv rtl/*.sv \
    tb/tb_vc_rsi_pipeline.sv --top-module tb_vc_rsi_pipeline -o sim
./obj_dir/sim
```

For testbenches that use a routing-table model, the model is found through
`-Itb`. Some block tests shrink the parameters, for example an 8-entry TCAM with
16-bit addresses. `tb_ip_route_cache_top` runs the whole design at its default,
full size. It drives both engines at once:

- The first engine gets about 5,000 trace-like lookups: a skewed hot set of
  destinations, some sets shared by several of them, new destinations, a
  conflict burst and a prediction period.
- The second engine gets a 229-entry IPv6 table with nested prefixes and a
  labeled default route. It runs all three replacement policies and all five
  sampling techniques.

It checks every port the design returns where a correct answer is defined. It
counts each mechanism and fails if any of them never happened: hit, victim hit,
miss, pseudo-miss, stall, redirect, swap, period change, TCAM hit, miss and
eviction, port error found, each policy, and each sampling technique finding
errors.

A typical run of that test gives:

| engine | result |
|---|---|
| 1 | 5,182 lookups: 4,060 hits, 189 victim hits, 921 misses, 12 pseudo-misses, 628 stall cycles |
| 2, no sampling | 841 wrong ports in 1,000 lookups |
| 2, every hit checked | 248 wrong ports in the same traffic |
| 2, adaptive | 262 checks instead of 1,000, 254 wrong ports |

`tb_ipv6_trace_workload` runs engine 1 alone at full size on a generated
trace. The trace is 40,000 lookups over 3,700 distinct IPv6 destinations, with
85 % re-use of recent destinations and a skewed choice otherwise. It uses two
prediction periods and a 20-cycle table latency. It checks every port and
reports the hit rate and cycles per lookup; a typical run gives 85.8 % and 1.14.

## Known limits

- Engine 2 is blocking, so its throughput on misses is one lookup per table
  latency. Engine 1 is fully pipelined.
- Sampling checks run after the cached port has been returned. The wrong answer
  that reveals an error is not retracted.
- The routing table must answer searches in the order they were issued.
- `tcam_route_cache` needs every set to have at least 2 entries.
