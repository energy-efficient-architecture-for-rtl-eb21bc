# A vertex-centric graph analytics accelerator in SystemVerilog

This is RTL for an accelerator that runs asynchronous, vertex-centric graph
algorithms in the gather-apply-scatter style. Each active vertex:

- gathers its in-neighbours' values;
- computes a new value of its own;
- writes that value back;
- re-activates its out-neighbours if the value changed enough.

The design follows the architecture template of "Energy Efficient Architecture
for Graph Analytics Accelerators". The application built here is
PageRank. The other three applications studied there (SSSP, LBP, SGD) would
need their own gather/apply/scatter functions; they are not part of this RTL.

The hard part of this kind of machine is not the arithmetic. It is the
bookkeeping:

- keeping dozens of vertices and hundreds of edge reads in flight, so that
  DRAM latency is hidden;
- still producing a result that is equivalent to running the vertices one
  after another (sequential consistency).

Most of this document is about that bookkeeping.

## The algorithm as the hardware sees it

For every active vertex `v` (PageRank, damping `alpha`):

```
sum   = Σ over in-edges u->v of  rank(u) * invdeg(u)     // gather
rnew  = (1-alpha)/|V| + alpha * sum                      // apply
scatter = |rnew - rank(v)| > eps                         // apply
write rank(v) = rnew; if scatter, activate every out-neighbour   // scatter
```

Numbers are unsigned fixed point, Q4.28. Each vertex has one 64-bit
VertexData word, `{invdeg[63:32], rank[31:0]}`. The reciprocal of the
out-degree is stored so that gather needs a multiply, not a divide. The
constant `(1-alpha)/|V|` is supplied precomputed in `cfg.pr_base`.

## Memory image

Every table lives in one word-addressed, 64-bit DRAM. The host fills it, and
the base addresses arrive in `cfg` (type `cfg_t`):

| table | contents |
|---|---|
| `vi_in_base` | V+1 in-edge offsets (CSR) |
| `ei_in_base` | in-neighbour ids |
| `vi_out_base` | V+1 out-edge offsets |
| `ei_out_base` | out-neighbour ids |
| `vd_base` | VertexData, one word per vertex |
| `al_bv_base` | active-list bit vector, 64 vertices per word |
| `al_flag_base` | one word per 256-vertex segment: "segment is queued" |
| `al_q_base` | per-unit circular queue of segment numbers, `al_q_cap` entries each |

**Ownership.** Vertex `v` belongs to unit `(v >> 8) mod NUM_AU`, so 256-vertex
segments are dealt out round-robin. That unit's Sync Unit is the only place
where `v`'s data is read or `v` is activated. At start, each unit is told how
many segments its queue holds (`q_init`).

## Block structure

`gx_top` holds:

- `NUM_AU` accelerator units (`gx_au`);
- four crossbars (`gx_xbar`), one per message type:
  - neighbour-data request;
  - neighbour-data response;
  - activation;
  - activation acknowledgement;
- the global rank counter (`gx_grc`);
- the termination detector (`gx_gtd`);
- one round-robin memory interface (`gx_mem_if`) that merges the four caches
  of every unit onto the single DRAM port.

Inside a unit, a vertex flows

```
ALM -> Runtime -> Sync Unit -> Gather Unit -> Apply Unit -> Scatter Unit
```

Two memory request handlers connect the units to the caches:

- The local handler (`gx_local_mrh`) puts the Gather and Scatter Units onto
  the VertexInfo cache and the EdgeInfo buffer.
- The global handler (`gx_global_mrh`) puts the Sync Unit's reads and the
  Scatter Unit's writes onto the VertexData cache, and the ALM onto the
  ActiveList cache.

All caches are one module (`gx_cache`): direct-mapped, one word per line,
write-through with allocate, one request at a time.

**Handshakes.** Every interface is valid/ready. Every memory request gets
exactly one response, and that includes writes. Responses are matched by a
16-bit tag. Each level of arbitration stores its source index in a fixed
tag field and routes the response back with it.

## Ranks and the Sync Unit (`gx_syu`)

**Ranks.** When the Runtime admits a vertex, the Sync Unit gives it a rank:

    rank = (global counter << log2(NUM_AU)) | unit id

All Sync Units keep a copy of the counter. `gx_grc` ORs the units'
"assigned" strobes into one increment that every copy sees in the same
cycle. Ranks are therefore unique and grow with admission time. The
machine's contract is that the result equals running the vertices one at a
time in rank order.

**The table.** Each Sync Unit keeps a table of the vertices it owns that are
in flight: vertex id, rank, and whether gather has finished. Three rules
follow from it.

- **RAW (read after write).** A Gather Unit on behalf of `v` asks to read
  `u`'s data. If `u` is in `u`'s owner's table with `rank(u) < rank(v)`,
  the read is parked in the RAW pool. It is released when `u` reports
  scatter-done, that is, after `u`'s new value is in memory. Otherwise the
  read goes to the VertexData cache at once. The response travels back
  through the crossbar to the requesting unit.
- **WAR (write after read).** For every out-edge `u -> v`, the Scatter Unit
  of `u` sends an activation message to `v`'s owner. If `v` is in the table
  with `rank(v) < rank(u)` and has not finished gathering, `v` must still
  see `u`'s old value. The message is parked in the WAR pool, and the
  acknowledgement goes out only after `v`'s gather-done. The Scatter Unit
  writes `u`'s new value only when all its acknowledgements are back.
- **Filter.** If an activation carries the "value changed" flag, `v` is
  activated through the ALM, unless `v` is in the table with
  `rank(v) > rank(u)`: `v` will read `u`'s new value anyway, so a second
  execution would be redundant.

A vertex that is admitted while an older execution of the same vertex is
still in the table is held back until the old one leaves ("duplicate
hold"). The RAW and WAR pools have one entry per edge slot of every unit, so
a parked request is never refused.

## Deadlock freedom

Rank-ordered waiting is free of cycles on its own: every wait points to a
smaller rank. Finite slots can still close a cycle. The design breaks the
two cycles found in simulation:

1. **Edge slots.**
   - The problem: Gather Unit edge slots can all be held by reads of
     higher-rank vertices that are parked behind a lower-rank vertex `u`.
     Meanwhile, `u` may be waiting for a vertex in the same Gather Unit
     that needs an edge slot.
   - The fix: the last free edge slot only goes to the lowest-rank vertex
     in the unit.
   - Gather-done is reported as soon as a vertex's reads are complete, not
     when the Apply Unit takes it.
2. **Scatter slots.**
   - The problem: Scatter Unit slots can all be held by higher-rank vertices
     whose acknowledgements wait for a lower-rank vertex `w` to finish
     gathering. `w` in turn waits, through a RAW stall, for a vertex stuck
     in front of the full Scatter Unit.
   - The fix: the Runtime admits at most `NT = SV` vertices in flight
     (gathering plus scattering). A vertex leaving the Apply Unit then
     always finds a slot.
   - The cost: at the default sizes, no more than 16 of the Gather Unit's 32
     vertex slots are used at once. The paper does not give the Runtime's
     admission rule. This is the main place where the RTL departs from what
     the paper's parameters suggest.

## Gather and Scatter Units

Both units keep a set of vertex slots (`GV`, `SV`) and a pool of edge slots
(`GE`, `SE`). Edge slots are handed out one per cycle as credits, to the
lowest-rank vertex that still has edges. That way, a vertex with many edges
cannot block a slot pool indefinitely, and short vertices get through.

**Gather Unit, per vertex:**

1. It reads the two CSR offsets.
2. It reads its own VertexData through its owner's Sync Unit.
3. For each edge slot, it reads the neighbour id from the EdgeInfo buffer,
   then reads the neighbour's data through that neighbour's owner's Sync
   Unit. This read is where RAW stalls happen.
4. It adds `rank * invdeg` into the vertex's accumulator.

**Apply Unit.** A three-stage pipeline that accepts one vertex per cycle.

**Scatter Unit, per vertex:**

1. It reads the out-edge offsets.
2. For each out-edge, it sends an activation and counts it as outstanding.
3. When every acknowledgement has arrived, it writes VertexData.
4. When the write is acknowledged, it reports scatter-done to the vertex's
   Sync Unit.

## Active List Manager (`gx_alm`)

The active list has two parts:

- a bit per vertex in memory;
- a queue, per unit, of 256-vertex segments that have at least one set bit.

A segment's flag word records that it is queued, so it is never queued twice.

**Extraction.** The ALM:

1. pops a segment from its queue;
2. reads the segment's four bit-vector words into a 256-bit register;
3. clears the words in memory;
4. clears the segment's flag.

It then hands out set bits, lowest first. A bit is cleared when the
Runtime accepts the vertex.

**Activations.** An activation for the loaded segment sets a bit in the
register, and if the same bit is being cleared in the same cycle, the set
wins. Any other activation does a read-modify-write of the bit-vector word
in memory, and if the segment's flag was clear it also sets the flag and
appends the segment to its owner's queue.

Memory operations are done one at a time. The list is empty when the queue
is empty, no segment is loaded, and no operation is pending.

**Termination.** A unit is idle when:

- its active list is empty;
- no vertex is in flight;
- no message is outstanding.

An activation counts as in flight until its acknowledgement is back, so
`&idle` across all units means the run is finished. `gx_gtd` raises `done`
then.

## Parameters

Defaults are the PageRank row of the paper's parameter table.

| parameter | default | meaning |
|---|---|---|
| `NUM_AU` | 4 | accelerator units |
| `GV` / `GE` | 32 / 128 | Gather Unit vertex / edge slots |
| `SV` / `SE` | 16 / 128 | Scatter Unit vertex / edge slots |
| `VI_LINES`, `EI_LINES`, `VD_LINES`, `AL_LINES` | 256, 256, 512, 256 | cache lines of 8 bytes |

The cache lines add up to 10 KiB per unit, against 9.9 KB in the paper. The
split between the caches is this design's choice. Everything else is also
this design's choice where the paper is silent:

- Q4.28 arithmetic;
- the active-list layout;
- the tag fields;
- the crossbar (one registered output per destination, round-robin);
- direct-mapped caches.

`gx_pkg` holds the shared types, the event bit numbering (`EV_*`) and the
PageRank functions.

## Simulating

Plain Verilator 5 works. For example, for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/gx_pkg.sv tb/tb_gx_top.sv \
          --top-module tb_gx_top -Mdir obj_top -o sim
./obj_top/sim
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it runs |
|---|---|
| `tb_gx_top` | 2 units, small slot counts and 16-line caches, 600-vertex random graph with a 40-edge hub |
| `tb_gx_top_full` | every parameter at its default, 512-vertex graph with a 160-edge hub (about 30 s) |
| `tb_gx_au` | one unit with its crossbar ports looped back, 200 vertices |
| `tb_gx_cache`, `tb_gx_apply`, `tb_gx_runtime`, `tb_gx_xbar`, `tb_gx_mem_if`, `tb_gx_local_mrh`, `tb_gx_global_mrh`, `tb_gx_grc`, `tb_gx_gtd` | block-level random or directed tests |

**How the end-to-end tests check results.** They use `eps = 0` and start all
ranks at zero. The update is then monotone, and its least fixed point is
reached whatever order the vertices run in. A Gauss-Seidel reference in the
testbench therefore gives the exact expected ranks. The tests check:

- every rank and `invdeg`;
- that the active list is empty at the end;
- that every mechanism happened at least once: RAW and WAR stalls,
  filtering, duplicate hold, local, in-memory and queued activations,
  Runtime throttling, edge-credit waits in both units, cache hits and
  misses.

The Sync, Gather and Scatter Units and the ALM are only tested
inside a unit (`tb_gx_au`) and the full system. There are no separate
directed tests for them.

`tb/gx_dram_model.sv` is a behavioural DRAM model: fixed latency, in order,
with random back-pressure.

## Known limits

- Only PageRank is implemented. There is no EdgeData cache, because
  PageRank has no edge data.
- Ranks are 32 bits wide, with the unit number in the low bits. A run can
  therefore start at most 2^30 vertex executions before the ordering breaks.
  That is enough for all but the largest graphs evaluated in the paper.
- Caches are blocking, with one outstanding request each. Latency is hidden
  by the number of vertices and edges in flight, not by the caches.
- The largest graph simulated is the 512-vertex one in `tb_gx_top_full`.
