# DCPT: a delta-correlating data prefetcher in SystemVerilog

Many loads in a program walk through memory in a pattern that repeats: a
fixed stride, or a short cycle of strides such as +1, +9, +1, +9 when a loop
touches two fields of each record in an array. This prefetcher learns such
patterns per load instruction and fetches the lines the load will miss on
next, before it asks for them.

It keeps, for each load PC, the line address of its last miss and a short
history of the *differences* (deltas) between its successive miss addresses.
On each miss it appends the new delta, then looks back through the history
for an earlier place where the two newest deltas occurred in the same order.
If it finds one, it assumes that what followed back then will follow again:
it adds those later deltas, one after another, to the current miss address,
and prefetches the lines it arrives at. Storing small deltas instead of full
addresses is what makes the table cheap: the default configuration (98 loads,
19 deltas of 12 bits each) fits in about 32 Kbit.

The design is a Delta Correlating Prediction Table (DCPT) prefetcher. It takes
its table format, update rule, correlation rule, candidate rule, filter
order and default sizes from the published DCPT scheme. Its organisation in
hardware is this design's own: the controller, the timing, the handshakes
and the bit widths that the scheme leaves open. Those choices are listed
below.

## What happens on a miss

### The table entry

| field | width (default) | meaning |
|---|---|---|
| PC | 32 | the load instruction that owns the entry (full tag) |
| last address | 32 | line address of that load's last miss |
| last prefetch | 32 | the last line prefetched for that load |
| delta 0 .. delta 18 | 19 x 12 | circular buffer of the load's last 19 non-zero deltas |
| delta pointer | 5 | head of the circular buffer: the oldest delta, the next slot written |

98 entries x 329 bits = 32 242 bits. The table is fully associative. A PC
that is not in the table takes the slot allocated longest ago (FIFO
replacement). A new entry has all deltas 0, the pointer at delta 0 and last
prefetch 0. Nothing is predicted on the miss that allocates an entry.

### 1. Training (`dcpt_delta_update`)

`delta = miss address - last address`, in line units.

* A delta of 0 (the same line missed again) leaves the history alone.
* A non-zero delta is written at the delta pointer, and the pointer advances
  (19 wraps to 0).
* A delta outside the signed 12-bit range -2048 .. +2047 is written as **0**.
  The 0 marks "too far to predict". It is never produced by a real
  update, because zero deltas are not stored.
* Last address becomes the miss address.

### 2. Correlation (`dcpt_correlator`)

The circular buffer is read out oldest first, as `c[0] .. c[18]`. The pair
to look for is `(c[17], c[18])`, the two newest deltas. Every earlier position
`i = 0 .. 16` compares `(c[i], c[i+1])` with that pair, all in the same cycle
(17 pairs of 12-bit comparators). When several positions match, the **oldest**
(smallest `i`) wins. That choice replays the longest run of deltas, so the
prefetches reach furthest ahead. The cost is that more of them duplicate
earlier prefetches, and step 3 removes those duplicates.

### 3. Candidates (`dcpt_candidate_gen`, `dcpt_candidate_buffer`)

Starting from the miss address, the deltas `c[i+2] .. c[18]` are added one at
a time. Each partial sum is a candidate line and is pushed into a small FIFO.
If a sum equals the entry's *last prefetch*, the FIFO is cleared, that
candidate included. Everything up to there was requested by an earlier
prediction of the same load. Only the lines beyond it remain.

Worked example: a load misses on lines 10, 11, 20, 21, 30. The history ends
`1, 9, 1, 9`. The newest pair (1, 9) also occurs two deltas earlier, and the
deltas after that earlier occurrence are 1 and 9. So the candidates are
30+1 = **31** and 31+9 = **40**. If the last prefetch had been 31, only 40
would remain.

### 4. Filtering and issue (`dcpt_issue_filter`, `dcpt_pf_queue`)

Each candidate, in order, is dropped if any one of these holds, checked in
this order:

1. the line is already in the cache (`probe_in_cache`);
2. a demand miss for the line is already outstanding in the MSHRs
   (`probe_in_mshr`);
3. a prefetch for the line is already in flight (the 32-entry in-flight
   buffer);
4. the in-flight buffer is full (32 prefetches outstanding).

A candidate that survives is issued. It enters the in-flight buffer, is
offered to memory on `pf_req_*`, and becomes the entry's new last prefetch.
The in-flight entry is freed when memory reports the prefetch done on
`pf_done_*`.

## Timing

One miss is processed at a time. A controller in `dcpt_prefetcher` steps
through these states:

| state | cycles | work |
|---|---|---|
| IDLE | - | `trig_ready` high; a miss is accepted |
| UPDATE | 1 | table lookup, training, write-back; a new PC ends here |
| CORR | 1 | parallel pair search; starts the generator |
| GEN | N_DELTAS-3 | one adder, one history position per cycle |
| ISSUE | max(1, candidates) + stalls | one candidate decided per cycle |
| WB | 1 | last prefetch written to the table |

The generator steps over every position `2 .. N_DELTAS-1`, whether or not it
follows the match. This makes the calculation take the same time for every
miss: `done` comes `N_DELTAS-2` cycles after `start`. With the defaults, a
miss that hits the table keeps the prefetcher busy for
`19 + 1 + max(1, candidates decided) + stall cycles` cycles. A miss from a
new PC takes 1 cycle. A miss offered while the prefetcher is busy waits on
`trig_ready`. This suits misses that reach this level of the hierarchy
rarely. If misses arrive faster, the miss source needs its own buffer or
must drop misses.

This is one of the cheaper ways to build the scheme: fully parallel
comparators with a single adder. A bigger design could add deltas with
several pipelined adders. A smaller one could search with a single
comparator, at the cost of more cycles.

## Interfaces

All addresses are cache-line addresses. There is one clock and an
asynchronous active-low reset, `rst_n`.

| port | dir | width | meaning |
|---|---|---|---|
| `trig_valid` / `trig_ready` | in / out | 1 | a load miss; taken when both high |
| `trig_pc`, `trig_addr` | in | 32, 32 | its PC and line address |
| `probe_valid`, `probe_addr` | out | 1, 32 | a candidate being checked |
| `probe_in_cache`, `probe_in_mshr` | in | 1 | answers for `probe_addr`, **in the same cycle** |
| `pf_req_valid` / `pf_req_ready` | out / in | 1 | prefetch request; valid and address stay stable until ready |
| `pf_req_addr` | out | 32 | line to prefetch |
| `pf_done_valid`, `pf_done_addr` | in | 1, 32 | a prefetch has completed; frees its in-flight entry |
| `busy` | out | 1 | a miss is being processed |
| `stat_*` | out | | one-cycle event strobes for counters: training, table hit, eviction, zero delta, overflow, search, match, discard, candidate outcome (`pf_outcome_e`), prefetches in flight |

Memory back-pressure is taken through `pf_req_ready`. For example, a memory
that accepts one request per 10 cycles is attached by raising ready once
every 10 cycles. While an issued request waits, the next surviving candidate
waits too.

## Parameters

| parameter | default | notes |
|---|---|---|
| `TABLE_ENTRIES` | 98 | loads tracked |
| `N_DELTAS` | 19 | history length; at least 3 |
| `DELTA_W` | 12 | bits per delta, two's complement, at most `ADDR_W` |
| `PFQ_ENTRIES` | 32 | prefetches in flight |
| `PC_W`, `ADDR_W` | 32, 32 | this design's choice |

The defaults live in `rtl/dcpt_pkg.sv`. The same scheme was also studied at
256 entries and 16 deltas, with delta widths from 2 to 31 bits, history
lengths from 2 to 31 and table sizes from 10 to 1000. All of these are
reachable through the parameters, except history lengths below 3, and the
extremes have been simulated. Reported results put the useful range at about 7 or more delta bits, about 14 or more
deltas and about 100 entries, which is why the defaults sit where they do.

## Choices made where the scheme is not specific

* **Search order.** The scheme describes walking the history newest to
  oldest, but its own example finds the pattern at the oldest position. It
  also says that longer histories give a larger prefetch distance, which
  points the same way: with the newest match, a longer history would not
  reach further. This design uses the oldest match.
* **Zero deltas in the history** (the initial state, and overflow markers)
  are compared and added like any other value. After a run of overflows the
  history is all zeros. The pair (0, 0) then matches, and the candidates equal
  the miss line itself, which the MSHR check drops. These junk candidates
  cost ISSUE cycles but issue nothing.
* **Prediction on every table hit**, including misses with a zero delta: the
  history is searched again and usually yields only lines already
  prefetched.
* **Last prefetch** is the last *issued* candidate. Candidates dropped as
  cached or outstanding do not update it.
* **Table organisation**: full-PC tags, fully associative, FIFO replacement,
  only valid bits and the FIFO pointer reset.
* **Candidate FIFO depth** is `N_DELTAS-2`, the most one match can produce.
* **Cache and MSHR lookups** are outside the design and must answer
  combinationally. A host with a slower tag lookup needs a wait state added
  to `dcpt_issue_filter`.
* **Which misses drive training** (L1 or L2 misses, hits to prefetched lines)
  is up to the integration. The design trains on whatever arrives on
  `trig_*`.

The host itself is not part of this RTL: the cache, its MSHRs, the processor
and main memory. The testbenches contain small behavioural stand-ins for
them.

## Files

`rtl/`

| file | contents |
|---|---|
| `dcpt_pkg.sv` | default sizes, `pf_outcome_e` |
| `dcpt_prefetcher.sv` | top: controller and wiring |
| `dcpt_table.sv` | prediction table, PC lookup, FIFO replacement |
| `dcpt_delta_update.sv` | delta, overflow, circular-buffer insert |
| `dcpt_correlator.sv` | time-order unroll and parallel pair search |
| `dcpt_candidate_gen.sv` | single-adder candidate generation and discard |
| `dcpt_candidate_buffer.sv` | candidate FIFO |
| `dcpt_issue_filter.sv` | filter order, request register |
| `dcpt_pf_queue.sv` | 32-entry in-flight prefetch buffer |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
compares the module with a model written independently in the testbench. Each
ends by printing `TB_RESULT checks=N failures=M`.

* `tb_dcpt_prefetcher` runs the whole prefetcher at its default size. It
  drives 4000 misses from a mix of stride, repeating-pattern, random,
  overflowing and repeated-line loads, plus one-off PCs that force evictions.
  The host is modelled too: a pseudo-random cache, four MSHRs, random memory
  back-pressure, and bursts of completions with long pauses that fill the
  in-flight buffer. Every candidate decision, every accepted request and the
  busy time of every miss are compared with a reference model of the
  algorithm. The test also fails if any mechanism never occurred: allocation,
  eviction, zero delta, overflow, match, no match, discard, each filter
  outcome, issue stall or completion.
  Misses are offered back to back, so most of them also wait on
  `trig_ready`.
* `tb_dcpt_bw_limited` runs the same test with memory accepting one request
  every 10 cycles.
* `tb_dcpt_bw_unlimited` runs it with memory accepting a request every
  cycle. There, no issue stall may occur.
* `tb_dcpt_sweep` runs it side by side at five sizes from the parameter
  studies (entries / deltas / bits): 256/16/16, 256/16/7, 256/31/16, 10/3/2
  and 1000/31/31. `tb/dcpt_e2e_env.sv` holds the test as a parameterised
  block for this purpose.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/dcpt_pkg.sv \
    tb/tb_dcpt_prefetcher.sv --top-module tb_dcpt_prefetcher -o sim
./obj_dir/sim
```

Each run takes well under a second of simulation time.

## How far to trust it

The module-level and end-to-end tests pass. They show that the RTL matches
the reference model of the algorithm as described above. They cannot show
that the algorithm matches the original simulator, which was not available.
No real benchmark traces were run. The design has not been synthesised for a
target technology, and the table is built from flip-flops. A 98-way PC
compare and a 32-way in-flight compare sit in single-cycle paths; at high
clock rates, pipelining the table lookup would be the first change to make.
