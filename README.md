# Preload load/store unit for a CISC superscalar processor

x86 code is full of memory operations. Instructions read and write memory
directly, and the register set is small, so the same address is often
touched again a few instructions later. In an out-of-order core the usual
rule is that a load may bypass an older store, or take its data by
forwarding, only once the addresses of *all* older stores are known. On an
x86 machine the address takes its own pipeline stage (segment + base +
scaled index + displacement). As a result, loads often sit idle behind a
store whose address is still being computed.

This load/store unit uses a more aggressive rule called **preload**. A load
goes to the data cache as soon as its own address is known, whatever the
older stores are doing. The check against older stores is moved to *after*
the cache access. Once the data is back and every older store address is
known, the load is compared with all of them at once:

* no older store touches the load's bytes: the cache data is the result;
* the youngest older store that touches them holds all of them: that store's
  data is forwarded instead;
* it holds only some of them: the load is sent to the cache again once all
  older stores have written the cache.

A wrong guess therefore costs one wasted cache access. A right guess saves
the time a load would have spent waiting for unrelated store addresses.
Checking late also removes the scheduling step between address generation
and cache access, so the pipeline can lose a stage (the *reduced pipeline*,
parameter `REDUCED`).

The RTL is the unit itself: reservation station, address generators, the
ordering buffer, scheduling, dependency check, forwarding and result bus
request. The caches, the reorder buffer and the other execution units are
outside it. Their signals are ports of the top module `lsu`.

## Pipeline

| stage | what happens | module |
|-------|--------------|--------|
| R | up to 8 loads/stores per cycle are written, in program order, into the reservation station (RS) and into the Unified Memory Access Buffer (UMAB) | `lsu_rs`, `lsu_umab` |
| A | the RS issues up to 3 operations whose operands are all present, out of order and oldest first; one address generator (AGU) per port computes the linear address | `lsu_rs`, `lsu_agu` |
| S | up to 3 executable accesses go to the 3 data cache ports, oldest first | `lsu_sched` |
| I | data cache access, one cycle | (outside) |
| B | dependency check, forwarding, result bus request, or re-issue | `lsu_dep_check`, `lsu_rb_arb` |

A load with its operands present when it is dispatched, meeting no
conflict and a free result bus, is dispatched in cycle 0 and appears on
the result bus in cycle 4. With `REDUCED = 1` the S-stage disappears: an
address coming out of an AGU can go to the cache in the same cycle, and
the same load appears in cycle 3. Both testbenches check these numbers.

Issue rules in the S-stage:

* **load:** its linear address is known. That is all.
* **store:** its linear address is known, it is the oldest entry of the
  UMAB, and the reorder buffer has given it permission to retire. Stores
  therefore write the cache in program order and never speculatively. At
  most one store writes per cycle.

If more accesses qualify than there are ports, the oldest win.

## The UMAB: one ordered buffer for loads and stores

The UMAB (`lsu_umab`) is a circular buffer of 32 entries. Every load and
store of the unit is registered there at dispatch, in program order.
"Older" anywhere in the unit means closer to the UMAB head. The RS and the
schedulers also use the distance from the head as the age for their
oldest-first choices.

An entry holds the tag, the kind, the size (1, 2 or 4 bytes), the linear
address, the data (store data, or the data a load read), a
retirement-permission bit for stores, a stale bit for loads, and a state:

```
            address generated          issued to cache         data back
WAIT_ADDR ------------------> ADDR_RDY ---------------> ISSUED ----------> LOADED
                                ^   ^                                       |  |  |
                                |   |  stale: re-issue now                  |  |  |
                                |   +---------------------------------------+  |  |
                                |      partial overlap                         |  |
                                +-- WAIT_REISSUE <-----------------------------+  |
                     (no older store left)         result delivered on the bus   v
                                                                               DONE
```

A store goes from `WAIT_ADDR` to `ADDR_RDY`. It leaves the buffer in the
cycle it writes the cache. A load leaves once its result is delivered and
everything older has left. A load in `LOADED` stays there while any older
store address is unknown, or while the result bus refuses it. It is
checked again every cycle.

Two summary values drive most decisions. Both are zero-based distances from
the head, and equal 32 when there is no such store:

* `oldest_unsolved_age`: the oldest store whose address is unknown. A
  loaded load younger than this cannot be checked yet.
* `oldest_store_age`: the oldest store of any kind. A load waiting after a
  partial overlap goes back to `ADDR_RDY` when it is older than this,
  i.e. when no older store is left.

## Dependency check and forwarding (B-stage)

This is the heart of the unit and the part most worth reading in the code
(`lsu_dep_check`). Each port has its own checker. A checker compares the
byte range of one loaded load with the byte range of every UMAB entry in
parallel, one comparator per entry, and takes the youngest older store
that shares a byte. Outcomes, in priority order:

| outcome | condition | action |
|---------|-----------|--------|
| `DC_STALE` | the load's cache data was overwritten (see below) | back to `ADDR_RDY`, re-issue at once |
| `DC_WAIT` | some older store address is unknown | stay `LOADED` (never selected for checking in this case) |
| `DC_NONE` | no older store shares a byte | cache data goes to the result bus |
| `DC_FORWARD` | youngest sharing store holds every load byte | store data, shifted by the byte offset, goes to the result bus |
| `DC_PARTIAL` | youngest sharing store holds only some bytes | `WAIT_REISSUE`, then re-issue when no older store is left |

Only the youngest sharing store matters. When it covers the whole load,
any older store's bytes are overwritten by it anyway. When it does not,
forwarding from it alone would be wrong, so the load waits and re-reads
the cache.

`lsu_rb_arb` picks up to 3 loaded loads that can be checked (oldest first)
and gives slot *p* to checker *p*. From the outcomes it drives result bus
slot *p*: a multiplexer picks cache data or forwarded data. Selection,
check and bus request all happen in the same cycle, so the checking adds no
stage of its own. The result bus owner grants each slot in the same cycle
(`rb_grant`). A refused load simply tries again next cycle. Results that are
granted also go back to the RS, to wake up loads and stores that wait for
them as operands.

## Stores that write while a load reads

The data cache is expected to return, for a read, the contents from
*before* any write at the same clock edge. A load can therefore read a
location in the very cycle an older store writes it, and get the old
value. Worse, a load may read the cache while an older store is still
waiting for its permission to retire. When that store writes later, the
load already holds old data. The B-stage check only sees stores that are
still in the UMAB, and this store has left by then.

To close this hole, every store write is snooped (`lsu_umab`). Any load
that is in the cache or has data back, and whose bytes overlap the store,
gets its stale bit set. So does a load issued in that very cycle. A stale
load is re-issued as soon as it is selected for checking (`DC_STALE`).
This rule is this design's own addition; the preload rule as stated does
not say how a load learns of a store that completed after the load read
the cache.

## Address generation

`lsu_agu` computes `seg + base + (index << scale) + disp`, 32 bits,
wrapping. `base`, `index` and the store data are RS operands, each either
present at dispatch or captured from the result bus by tag. `scale`,
`disp` and the segment base come with the micro-operation. A store reports
to the reorder buffer on `st_done` in the cycle its address is generated.
From then on it can retire. It writes the cache only after the reorder
buffer returns the permission on `commit_valid/commit_tag`.

## Top-level interface (`lsu`)

| port | dir | meaning |
|------|-----|---------|
| `disp_valid[8]`, `disp_op[8]` | in | micro-operations in program order (lane 0 oldest) |
| `disp_accept[8]` | out | lanes taken this cycle: the valid lanes in order, as many as fit in the free RS and UMAB entries; depends on `disp_valid`. The dispatcher offers the rest again. |
| `rb_ext[4]` | in | result bus slots of the other units (3 ALUs, 1 branch unit) for operand wakeup |
| `rb_out[3]`, `rb_grant[3]` | out/in | load results, granted per slot in the same cycle |
| `st_done_valid[3]`, `st_done_tag[3]` | out | store address and data are in |
| `commit_valid[3]`, `commit_tag[3]` | in | retirement permission for a store |
| `dc_req_valid/we/addr/size/wdata[3]` | out | data cache requests, taken at the clock edge |
| `dc_rdata[3]` | in | read data, one cycle after the request |
| `perf` | out | per-cycle counts: preloads, forwards, partial and stale re-issues, result bus refusals, RS issues, dispatch stall |

`lsu_pkg` holds the types: `mop_t` (a micro-operation: store flag, 6-bit tag,
size, base/index/store-data operands, scale, displacement, segment base),
`rb_slot_t`, the UMAB entry and the enums. Loads return data zero-extended
and little-endian in the low bytes of 32 bits. A "preload" in `perf` is a
load sent to the cache while an older store address was still unknown:
exactly the case that a conventional unit would have held back.

Reset (`rst_n`, active low, asynchronous) empties the RS and the UMAB. There
is no flush: the unit assumes perfect branch prediction and never needs to
squash work.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `UMAB_N` | 32 | UMAB entries (any size, not only powers of two) |
| `RS_N` | 16 | RS entries |
| `NP` | 3 | ports: AGUs, cache ports, checkers, result bus slots, commit slots |
| `DISP_W` | 8 | micro-operations dispatched per cycle |
| `RB_EXT` | 4 | external result bus slots |
| `REDUCED` | 0 | 1 merges the S-stage into the A-stage |

Address and data are 32 bits. Tags are 6 bits, for a 64-entry reorder
buffer. All are set in `lsu_pkg`.

## What follows the source design and what does not

Taken from the design this RTL implements: the preload policy (issue on own
address, check after the cache access, forward whole data from a
conflicting store, otherwise re-issue after all older stores complete); the
R/A/S/I/B stages and the reduced variant; a single ordered buffer for loads
and stores; the store rules (address, head of the buffer, retirement
permission); oldest-first use of the cache ports; one comparator per buffer
entry; forwarding and result bus arbitration in parallel in the B-stage;
one-cycle cache access with no misses; and the main configuration: 32-entry
UMAB, 3 ports, 16-entry RS, 8 micro-operations per cycle, 3 ALUs and 1
branch unit beside the unit.

This design's own choices: the widths and the tag size; byte-range overlap
for 1/2/4-byte accesses, with the youngest overlapping store deciding; the
snooping of store writes and the stale re-issue; one result bus slot per
port with an external same-cycle grant; partial in-order dispatch acceptance; reporting
store completion at address generation; oldest-first issue from the RS;
the x86 address formula with the segment base as an input; the reset. The
RS waits for a store's data operand as well as its address operands, so a
store's address is not generated before its data is present.

Not built: the data cache, reorder buffer, fetcher, decoder, dispatcher and
the other execution units. The source design treats them as a given
environment. The cache is assumed never to miss, so there is no miss
handling.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
values worked out in the testbench. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it does |
|-----------|--------------|
| `tb_lsu` | whole unit at default sizes: a random 6000-operation program of ALU operations, loads and stores over a 48-byte region; models the reorder buffer (64 entries), ALU latencies, random result bus refusals and a read-first cache (`dcache_model`). Every load value and tag is checked against an in-order reference, as is the final memory image and that everything retires. Also checks the 4-cycle latency of a lone load, and that every mechanism (preload, forwarding, partial re-issue, stale re-issue, result bus refusal, dispatch stall) happened. |
| `tb_lsu_reduced` | the same with `REDUCED = 1`, latency 3 |
| `tb_lsu_sweep` | one program on twelve configurations side by side (see below), each fully checked through `lsu_env` |
| `tb_lsu_umab` | directed sequences through every entry state, snooping, in-order release |
| `tb_lsu_dep_check` | random UMAB contents against a byte-level reference; all five outcomes occur |
| `tb_lsu_sched` | random UMAB contents against a reference selection, both pipeline variants |
| `tb_lsu_rb_arb` | random UMAB contents and outcomes against a reference |
| `tb_lsu_rs` | random dispatch and wakeup against a reference issue order |
| `tb_lsu_agu` | random operands against the formula |

In one run of `tb_lsu`: 5285 cycles, 3033 preloads, 349 forwards, 594 partial
and 1238 stale re-issues, 2635 checks, no failures. The program is
synthetic. It is dense in conflicts on purpose and says nothing about
performance on real x86 code. 

### Configuration sweep

`tb_lsu_sweep` runs the same sizes that the source design was evaluated
with: UMAB sizes from 4 to 40 entries with 3 ports, 1, 2 and 4 ports with a
32-entry UMAB, and the reduced pipeline. They all run one synthetic program
of 3000 micro-operations. About half of the program is loads and stores,
over a 160-byte region. ALUs take 1-2 cycles, and many addresses depend on
earlier results. This is the bench's own program, not the source design's
benchmarks, which are x86 traces and need a whole processor. One run gave:

| UMAB | ports | reduced | cycles | speedup vs UMAB 4 | cache reads per load |
|-----:|------:|--------:|-------:|------------------:|---------------------:|
| 4  | 3 | no  | 2346 | 1.00 | 1.015 |
| 8  | 3 | no  | 1488 | 1.58 | 1.032 |
| 12 | 3 | no  | 1221 | 1.92 | 1.047 |
| 16 | 3 | no  | 1123 | 2.09 | 1.055 |
| 20 | 3 | no  | 1100 | 2.13 | 1.087 |
| 32 | 3 | no  | 1180 | 1.99 | 1.143 |
| 40 | 3 | no  | 1192 | 1.97 | 1.166 |
| 32 | 1 | no  | 1554 | 1.51 | 1.061 |
| 32 | 2 | no  | 1166 | 2.01 | 1.134 |
| 32 | 4 | no  | 1169 | 2.01 | 1.145 |
| 32 | 3 | yes | 1164 | 2.02 | 1.150 |

Performance levels off at about 20 entries. Past that it drops a little.
A larger buffer lets loads run further ahead of stores, so more of them
read data that a store later overwrites and must be re-issued. That shows
in the reads per load column. The bench checks only the trends that hold
for any program: 32 entries beat 4, 3 ports beat 1, 2 ports are no worse
than 1, and the reduced pipeline is no slower.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/lsu_pkg.sv rtl/lsu_agu.sv \
  rtl/lsu_rs.sv rtl/lsu_umab.sv rtl/lsu_sched.sv rtl/lsu_dep_check.sv \
  rtl/lsu_rb_arb.sv rtl/lsu.sv tb/dcache_model.sv tb/tb_lsu.sv \
  --top-module tb_lsu
./obj_dir/Vtb_lsu
```

For a unit testbench, list `lsu_pkg.sv`, the module and its testbench. The
top module carries two assertions: at most one store write per cycle, and
no UMAB overflow.

## Files

`rtl/lsu_pkg.sv` types and helpers · `rtl/lsu.sv` top · `rtl/lsu_rs.sv`
reservation station · `rtl/lsu_agu.sv` address generator · `rtl/lsu_umab.sv`
ordering buffer · `rtl/lsu_sched.sv` scheduling control ·
`rtl/lsu_dep_check.sv` dependency check and forwarding ·
`rtl/lsu_rb_arb.sv` result bus arbitration and multiplexer ·
`tb/dcache_model.sv` behavioural multi-port cache used by the testbenches ·
`tb/lsu_env.sv` parameterized processor environment used by the sweep.
