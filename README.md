# A gather-apply-scatter graph accelerator with hardware sequential consistency

Iterative graph algorithms (shortest paths, PageRank, belief propagation) converge faster when a
vertex can use its neighbours' newest values right away (asynchronous execution) and when
vertices that have converged stop being rescheduled (asymmetric convergence). On CPUs and GPUs
both are costly: asynchronous updates need fine-grained locks, and per-vertex convergence breaks
SIMD lock-step. This design does both in hardware. Vertices are scheduled from an active list,
run through a gather / apply / scatter pipeline that keeps hundreds of memory requests in flight,
and are kept *sequentially consistent* by ranks. No vertex ever sees a result that a serial
execution in rank order could not have produced, and no locks are involved.

The RTL is a template: the data movement, synchronisation and scheduling are generic, and the
application is a handful of functions in `rtl/gas_pkg.sv`. Two applications are built in. The
host picks one per run in `graph_cfg_t.app`:

* **Single-source shortest path (SSSP)**. A vertex value is a distance and an edge value is a
  weight. Gather takes the minimum over in-edges of (neighbour distance + weight). Apply keeps
  the smaller of the old and gathered distance. Scatter activates all out-neighbours of a vertex
  whose distance dropped.
* **PageRank**. A vertex value is a rank in unsigned 16.16 fixed point. The edge value of an
  in-edge u→v is 1/outdeg(u) in 0.16 fixed point, written by the host. Gather sums
  rank(u)·(1/outdeg(u)), and apply computes 0.15 + 0.85·sum. A vertex whose rank moved by more
  than 16/65536 writes its new rank and activates its out-neighbours. A smaller change is
  dropped, and that vertex converges.

The default configuration is four accelerator units (AUs), as in the published architecture this
RTL follows. All other sizes are this implementation's choices.

## Structure

```
graph_accel_top
├── accel_unit  x NUM_AU           (one per AU, vertex v belongs to AU v mod NUM_AU)
│   ├── active_list_manager        active list in memory, one 256-bit segment held locally
│   ├── runtime                    schedules vertices, counts them, detects "AU idle"
│   ├── sync_unit                  ranks, vertex table, RAW / WAR / activation rules
│   ├── gather_unit                NV vertex contexts, NE edge slots, credit allocation
│   ├── apply_unit                 pipelined apply function
│   ├── scatter_unit               WAR handshake, activations, value write-back
│   ├── object_cache x3            Vertex Info, Edge Info, Edge Data (read-only objects)
│   └── mem_arb x2                 Edge Info sharing, and the AU's single memory port
├── global_rank_counter            keeps all rank counters in step
├── act_xbar                       delivers activations to the owning AU
└── global_termination_detector    "done" to the host
```

Types, sizes and the application functions are in `gas_pkg`. Every file starts with a comment
giving the block's behaviour, interface and timing, and which parts are the reference
architecture's and which are choices made here.

## The life of a vertex

1. The **active-list manager** (ALM) offers a vertex whose active bit is set.
2. The **runtime** takes it when the gather unit has a free context. It registers the vertex with
   the **sync unit**, which gives it the next rank. The runtime then tells the ALM the vertex is
   registered, so the ALM may clear its bit, and dispatches `{vertex, rank}` to the gather unit.
3. The **gather unit** reads the vertex's four Vertex Info words and its own value. It then walks
   the in-edges: Edge Info (source vertex), Edge Data (weight), permission from the sync unit,
   neighbour value, and a fold into the accumulator. When the last edge is folded it reports
   *gather done* to the sync unit.
4. The **apply unit** computes the new value in a 4-stage pipeline, with no memory access.
5. The **scatter unit** does nothing more for a vertex whose value did not change. For a changed
   vertex it walks the out-edges. Each edge gets a WAR acknowledgement from the sync unit, then
   an activation of the neighbour. When every edge is acknowledged, the scatter unit writes the
   new value, reports *scatter done* and the vertex leaves the sync unit's table.
6. Activations pass the sync unit's filter and go to the ALM of the AU owning the target.

## Ranks and the three ordering rules

This is the part that makes asynchronous execution safe, and the part to read first when
changing anything.

A rank is `{32-bit counter, 2-bit AU number}`. Lower means logically earlier. Every sync unit has
its own copy of the counter. Whenever any AU hands out a rank, the global rank counter raises one
increment line to all of them in the same cycle, so the copies never diverge. Two AUs that assign
in the same cycle share a counter value; the AU number below it keeps their ranks distinct.

Each sync unit keeps a table of the vertices executing in its AU: index, rank, and whether the
vertex's gather has finished. A row lives from registration to scatter done. All sync units see
all tables. A vertex can only be executing in the AU that owns it, so each lookup searches one
table. Three rules are checked combinationally against the table of the vertex's owner. A
request that fails is simply not granted, and the requester retries it later.

| request | from | held / dropped when |
|---|---|---|
| **RAW**: v reads neighbour u's value | gather unit of v | u is executing with rank(u) < rank(v). v must see u's new value, which exists only after u's scatter. |
| **WAR**: u will write its value; edge u→w | scatter unit of u | w is executing with rank(w) < rank(u) and has not finished gathering. w must still read u's *old* value. |
| **activation** u→w | scatter unit of u | *dropped* if w is executing with rank(w) > rank(u). By the RAW rule, w will read u's new value anyway. |

Also:
* A vertex is not registered a second time while it is still in the table, which keeps lookups
  unambiguous. Registration waits instead.
* An activation is absorbed by the ALM if the vertex was offered to the runtime but not yet
  registered. It will be registered after the activating vertex, so it reads the new value.

**Why it cannot deadlock.** Take the executing vertex with the globally lowest rank, m.
* RAW and WAR only ever wait for lower-ranked vertices, so m is never held by a rule.
* The gather and scatter units each reserve their last free edge slot for their lowest-ranked
  vertex, so m always gets a slot.
* Gather done is reported when accumulation finishes, not when the vertex leaves the gather unit.
  Scatter-side WAR waits therefore never depend on the apply pipeline draining.
* m finishes, and by induction every vertex does.

Note that WAR holds can only happen on directed graphs. On an undirected graph, the RAW rule on
the reverse edge already orders the pair.

## Edge slots and credits

The gather unit has `NV`=16 vertex contexts and `NE`=128 edge slots. The scatter unit has the same
by default. The number of free slots is the credit. Each cycle, one free slot goes to the context
with the lowest rank that still has unassigned edges. A hub vertex can hold all 128 slots; many
small vertices can share them. Each slot keeps its own progress flags, so up to 128 reads per unit
are outstanding at once. Each memory port issues one request per cycle, chosen by fixed
priority. The RAW permission port is polled round robin, so one blocked slot does not stop the
others.

## The active list in memory

Each AU has its own active list covering its local vertices. Local index `l = v / NUM_AU`, and
`v = l*NUM_AU + AU_ID`. It consists of three arrays in memory, located by `al_cfg_t`:

* `bv_base`: bit vector, bit `l % 32` of word `l / 32`. A 256-bit segment is 8 consecutive
  words.
* `q_base`: circular queue of segment indices, `q_size` entries. At start, `q_count` entries from
  index 0 are valid.
* `qf_base`: one bit per segment, "segment is in the queue". It prevents queueing a segment twice.

With no segment held, the ALM pops a segment index and loads its 8 words. It writes zeros back,
clears the queued bit, and offers the set bits lowest first. A bit stays set while its vertex is
between being offered and being registered. The segment is released when no bits remain.

An activation inside the held segment just sets the bit. Any other activation is a
read-modify-write of the bit-vector word, then of the queued-bit word, then, if the segment was
not queued, a push of its index. The ALM does one memory operation at a time and activations wait
meanwhile, so a bit-vector word is never in flight twice.

## Host interface and memory map

The host writes the graph and the active lists into memory, drives `gcfg` (including the
application, `gcfg.app`) and `acfg[]`, pulses
`start` for one cycle and waits for `done`. All addresses are 32-bit *word* addresses, and all
words are 32 bits.

| array (`graph_cfg_t`) | contents |
|---|---|
| `vinfo_base` | word `2v` = first in-edge of v, word `2v+1` = first out-edge of v, for v = 0..N (N+1 pairs) |
| `einfo_base` | in-edges, grouped by destination: source vertex of each |
| `edata_base` | in-edges: weight of each |
| `oinfo_base` | out-edges, grouped by source: destination vertex of each |
| `vdata_base` | one value per vertex; the result is read back from here |

For an undirected graph, the in-edge and out-edge arrays may be the same data.

Each AU has one memory port (`mem_*[i]`): valid/ready requests `{addr, we, wdata, tag}`, and
valid-only responses `{addr, rdata, tag}` for reads. The memory system behind the ports is shared.
It must apply each request when it accepts it, so that a write is visible to every request
accepted later on any port. Responses may come back in any order and cannot be refused: every
requester has room reserved.

`done` rises when all AUs have been idle (no vertex in flight, active list empty) for two
consecutive cycles. It stays high until the next `start`. `rank_issued` counts vertex
executions.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_AU` | 4 | accelerator units (power of two, at most 4) |
| `GU_NV`, `GU_NE` | 16, 128 | gather vertex contexts and edge slots |
| `SCU_NV`, `SCU_NE` | 16, 128 | scatter vertex contexts and edge slots |
| `SYU_ENTRIES` | 32 | rows of each sync unit's vertex table |
| `APU_STAGES` | 4 | apply pipeline depth |
| `CACHE_LINES` | 512 | lines per object cache (direct mapped, one word per line) |
| `gas_pkg::SEG_BITS` | 256 | active-list segment |

The reference architecture fixes only the AU count and the 256-bit segment. It describes tens of
vertices and hundreds of edges in flight per unit, and leaves cache sizes to the application.

## Plugging in another application

Add a value to `app_t`, and a case for it in each function at the end of `gas_pkg`:
* `gather_identity`, `gather_edge(neighbour, edge)` and `gather_reduce`
* `apply_fn` and `apply_changed`

Each function takes the application as its first argument. The gather unit reads it from
`graph_cfg_t.app` and passes it on in every gather result, so the apply unit needs no
configuration of its own. PageRank's constants are the localparams `PR_BASE`, `PR_DAMP` and
`PR_EPS`.

The scatter unit activates all out-neighbours of a changed vertex. An application with edge state
to write, or a per-edge activation test, needs the scatter unit extended. Loopy belief
propagation and SGD, the other two applications the template was evaluated with, are not
included. LBP needs per-edge messages, and SGD needs vector-valued vertex data.

## Simulation

Testbenches are self-checking and print `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/gas_pkg.sv tb/tb_graph_pkg.sv tb/tb_graph_accel_top.sv --top-module tb_graph_accel_top
./obj_dir/Vtb_graph_accel_top
```

Replace the testbench name for any other block. `tb/dram_model.sv` is a behavioural memory with
fixed latency and random back-pressure. `tb/tb_graph_pkg.sv` builds skewed random directed
graphs, their memory image and a Bellman-Ford reference.

* `tb_graph_accel_top` runs the full design at default parameters. The graph has 2048 vertices and
  about 8,800 edges, including a hub with 400 in-edges. The memory has 20-cycle latency. The run
  finishes in about 210,000 cycles with roughly 11,800 vertex executions. The testbench checks
  every distance, and that `done` comes only with all units idle. It also requires each mechanism
  to fire at least once:
  * RAW and WAR holds, and filtered activations
  * activations absorbed by a local segment, written to the in-memory list, and sent across AUs
  * cache hits and misses
  * slots shared between vertices, and one vertex holding all 128 gather slots
* `tb_pagerank` runs PageRank on a 1024-vertex graph at default parameters. It compares every
  rank with a floating-point reference computed with the same quantised weights, with a
  tolerance of 0.01 + 1%; the largest error seen is about 0.009. The run takes about 2.5 million
  cycles and about 290 executions per vertex, because every rank keeps moving in small steps
  until it falls under the threshold.
* `tb_accel_unit` runs one AU alone on a 600-vertex graph.
* Each of the other blocks has its own testbench, which checks it against values worked out in
  the testbench: ordering rules, credit allocation, active-list bookkeeping, caches, arbitration
  and termination.

## Where this departs from, or adds to, the reference architecture

* **Applications**: SSSP and PageRank only. The fixed-point formats, damping factor and
  change threshold are this implementation's choices.
* **Vertex Data is not cached.** Several AUs write it, and per-AU caches would not be coherent.
  The three read-only object types are cached.
* **Cross-AU ordering**: every sync unit reads the other AUs' tables directly. Activations use an
  unbuffered crossbar. Neither mechanism is described in the reference.
* **Stalled requests** are retried by the requester rather than stored in the sync unit's table.
* **Offsets** for the scatter stage are read once by the gather unit and passed along.
* **Active list**: the "queued" bit array and the serialised memory operations are additions.
* **Memory system**: one port per AU. The DRAM, its banking and the host are outside the RTL.
* **No wrap-around** handling for the rank counter: 2^32 vertex executions per run at most.
* `NUM_AU` is limited to 4 by the 2-bit AU field in the rank.

## How far to trust it

The rank rules, the credit allocation and the active list are checked by unit tests and by
end-to-end SSSP and PageRank runs against references. Both applications tolerate stale
reads: they converge to the right answer even with some ordering errors. The end-to-end result therefore shows that the design is
live and that the work is scheduled completely. It does not on its own prove that every ordering
rule holds. The sync unit's own testbench checks each rule directly. Performance has not been
tuned, and no timing or area figures are given.
