# Macro data load: a load store queue that reuses whole cache-port words

A load that asks for one byte still occupies the data cache port, which could
have delivered eight. Most loads in integer and embedded code are narrow, so
most of the cache port's bandwidth goes unused. The idea here is to use that
bandwidth. Every load brings in the whole 64-bit word of its aligned 8-byte
block (the *macro data*). It keeps that word in its load store queue (LSQ)
entry. A later load whose bytes fall anywhere inside the saved word takes its
value from the LSQ and never accesses the cache. The same lookup also serves
loads from earlier stores (store-to-load forwarding). A load served from the
LSQ saves a cache access, and with it cache energy. The cache itself is not
changed: it already returns a full port-wide word, and the core already
selects the bytes it needs.

This repository holds synthesizable SystemVerilog for two structures:

* `macro_lsq`: the LSQ with macro data reuse. It sits between a processor's
  load/store units, its result buses and a dual-ported L1 data cache.
* `mvrt`: a *memory value reuse table*. It is an idealised FIFO of recent
  memory instructions that measures how many loads could reuse a value, and
  of which kind. It is the measuring instrument behind the idea, not part of
  the LSQ.

`mdl_top` places both side by side. The processor and the cache are outside
the design. Their signals are top-level ports.

## Reuse kinds

For every load, reuse falls into one of three classes. These classes appear
throughout the RTL and the testbenches:

| class | the load's bytes are found in | needs macro data load |
|---|---|---|
| S2L | the bytes written by an earlier store | no |
| L2L | the bytes an earlier load itself read | no |
| ML  | the rest of the 8-byte word an earlier load brought in | yes |

For example, a byte load at `0x1003` after a word load at `0x1000` is L2L.
A byte load at `0x1005` after the same word load is ML: only the macro word
holds byte 5.

## The LSQ entry and the partial-match search

Each entry has an address tag in a CAM (`lsq_tag_cam`) and a 64-bit data word
(`lsq_data_array`). The tag holds:

* `blk`: the 8-byte block address. This is the byte address without its
  three low bits.
* `mask`: 8 bits, one per byte lane, giving which bytes of the data word are
  meaningful.
  * A store entry holds its own lanes.
  * A load entry holds all eight lanes. This is the macro word.
  * A load served from the LSQ copies the lanes of the entry it reused.
* `V`: the entry's data is up to date. Unlike a conventional LSQ, V is not
  cleared when the instruction completes. The entry stays usable for reuse
  until it is overwritten or made stale by a store.
* `P`: the data is present. A load entry waits with P clear until its cache
  word arrives.
* `SL`: 1 for a store entry, 0 for a load entry.

A load hits an entry when all of the following hold:

* V and P are set.
* The block addresses are equal.
* The entry's mask contains every lane of the load.

This containment test is the *partial match*: the load may differ from the
entry in its three low address bits and in size. When a store is allocated,
it clears V on every other entry of its block whose lanes it overlaps. As a
result, every valid entry always agrees with memory, and any hit is correct.
When several entries hit, the one with the lowest index is used.

Entries are allocated in program order from a circular head pointer. The
oldest entry is overwritten once the queue has wrapped.

## Timing through the LSQ

The LSQ accepts one memory instruction per cycle, in program order, with no
back-pressure. The cache is accessed only after the LSQ lookup has missed.
This serialisation is what removes cache traffic, at the price of one extra
cycle for a load that misses.

| cycle | store | load, hit in LSQ | load, miss |
|---|---|---|---|
| 0 | allocate, write lane-placed data, invalidate overlapping entries | search, allocate, copy the reused word into the new entry | search, allocate with P = 0 |
| 1 | write to cache (port 1) | value on the reuse result bus `rr_*` | cache read of the 8-byte block (port 0) |
| 2 | | | |
| 3 | | | cache word on `dc_rd_data_i`, value on the cache result bus `cr_*`, word written into the entry, P set |

The default cache latency is 2 (`CACHE_LAT`). A load served by the LSQ
therefore takes 1 cycle, and a load that misses takes 1 + `CACHE_LAT` = 3
cycles. The two result buses are separate and can both be busy in the same
cycle. Results carry the instruction's tag (`TAG_W` bits) and may complete
out of order. `rr_src_o` tells whether a reused value came from a store entry
or from a load entry.

Each result bus has its own alignment unit (`data_align`). It shifts the
load's bytes down from the 64-bit word and sign- or zero-extends them. Store
data is placed on its byte lanes before it is written to the entry and to the
cache.

The cache must answer every read exactly `CACHE_LAT` cycles after the
request. An assertion checks this. A read and a write in the same cycle must
return the old data. Stores reach the cache one cycle after acceptance, so a
younger load that misses the LSQ always reads after the older store has been
written.

## The memory value reuse table

`mvrt` records every memory instruction, in FIFO order, in a table of
`ENTRIES` slots (256 by default). Each slot holds the block, the lanes held,
the lanes the instruction itself touched, the value and the type.

* A store first clears every valid entry it overlaps, then records itself.
* A load searches for a valid entry that holds all its bytes, then records
  itself.

One cycle after a load, the table reports whether the load could have reused
a value (`out_hit_o`). It also reports the class (`out_s2l_o`, `out_l2l_o`,
`out_ml_o`) and the value, zero-extended. When more than one class applies,
S2L takes precedence over L2L, and L2L over ML.

`macro_en_i` selects between two behaviours:

* Low: a load entry holds only its own bytes, and ML never occurs.
* High: a load entry holds its whole 8-byte word. A store to any byte of that
  word then invalidates it.

Reset the table before changing `macro_en_i`. For a load, the input value is
the whole aligned word from memory.

## Sizes

| parameter | default | where |
|---|---|---|
| macro word | 64 bits (`mdl_pkg::MACRO_W`) | all |
| `LSQ_ENTRIES` / `ENTRIES` | 64 | `mdl_top`, `macro_lsq`, `lsq_tag_cam`, `lsq_data_array` |
| `CACHE_LAT` | 2 cycles | `macro_lsq` |
| `MVRT_ENTRIES` / `ENTRIES` | 256 (sizes from 16 up are meaningful) | `mdl_top`, `mvrt` |
| `ADDR_W` | 32 bits | all |
| `TAG_W` | 7 bits | `macro_lsq` |

These defaults match the intended setting: a 4-issue out-of-order core with
a 128-entry instruction window and a 32 kB, 2-way, 64-byte-block L1 data
cache of 2-cycle latency. Only the LSQ size and the cache latency enter the
RTL.

## Where this design makes its own choices

The reuse mechanism, the tag bits, the partial match, keeping entries valid
after completion, the serialised lookup and the latencies follow the
published description. The following are choices made here:

* **Non-speculative, in-order stream.** The LSQ sees one memory instruction
  per cycle in program order and treats each as final. There is no flush,
  no out-of-order issue and no retirement interface. A real core's
  speculation and memory reordering would lose some reuse, and a core that
  can squash instructions would need an invalidate-on-flush input.
* **One memory instruction per cycle.** The cache is dual-ported. Here
  port 0 carries the reads of loads that missed, and port 1 carries the
  store writes. Two loads per cycle would need a second search port on the
  tag CAM and a second allocation port.
* **Stores write the cache when accepted**, one cycle later, instead of at
  retirement.
* **Staleness is handled by invalidation.** An overlapping store clears
  older entries instead of merging its bytes into them. This rule is the
  same in the LSQ and the table.
* **A load served from the LSQ records the reused word** in its own entry,
  which keeps the word alive in the FIFO longer.
* **Accesses must be naturally aligned.** An assertion checks this. Access
  sizes are byte, half, word and double (`mem_size_e`).
* **Two result buses.** The reuse bus and the cache bus are separate, so no
  arbitration is needed.
* **Hit priority** goes to the lowest entry index.
* **Reset** is asynchronous and active low. It clears all valid bits.
* **Address width** is 32 bits.

The baseline processor, which reads the LSQ and the cache in parallel, is not
built. Neither are the variants that forward only from stores, or from loads
without macro words. Neither is the prediction scheme that would let likely
misses skip the serialised lookup, which was only suggested.

## What the design does not contain

* The data cache, L2 and memory. `tb/dcache_model.sv` is a behavioural
  perfect cache with fixed latency, for simulation only.
* The load/store units and the out-of-order core. Effective addresses and
  tags enter as ports, and results leave on the two buses.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_data_align` covers every size, offset and extension against a
  byte-by-byte reference.
* `tb_lsq_data_array` tests random two-port writes and reads.
* `tb_lsq_tag_cam` compares random allocations, fills, searches and store
  invalidations with a reference model, using 8 entries so that the queue
  wraps.
* `tb_macro_lsq` runs random loads and stores of all sizes over a few blocks
  with 16 entries. For every load it checks the value, the bus, the reuse
  source and the latency (1 or 3 cycles). It also checks the cache read and
  write counts.
* `tb_mvrt` runs random streams in both modes with 16 entries. It checks
  every verdict and reused value, and that ML never occurs without macro
  loads.
* `tb_mdl_top` runs the whole design at its default sizes. The same random
  stream drives the LSQ and the table, first without and then with macro
  loads, with a reset in between.
* `tb_mdl_pkg` checks the shared mask, alignment and lane-placement
  functions.
* `tb_mvrt_sweep` runs ten tables side by side on one stream: 16, 32, 64,
  128 and 256 entries, each with and without macro loads. The stream mixes
  narrow sequential scans with random accesses. The test checks every
  verdict. It also checks, load by load, that a larger table never misses a
  reuse that a smaller one finds. This must hold, because a FIFO table of N
  entries holds exactly the last N instructions. The test prints the reuse
  counts per size. On this synthetic stream, a 16-entry table with macro
  loads finds more reuse than a 256-entry table without them.

`tb_macro_lsq` and `tb_mdl_top` count every mechanism and fail if any never
happened:

* store-to-load reuse
* exact load-to-load reuse
* macro (partial) load-to-load reuse
* cache access with LSQ update
* store invalidation
* queue wrap
* both result buses in one cycle
* each class of the reuse table

The reference models live in `tb/tb_util_pkg.sv`. On the synthetic stream of
`tb_mdl_top`, about a third of the loads still go to the cache. This number
says nothing about real programs. No program traces are included, so the
traffic reductions measured on benchmark programs cannot be reproduced here.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_mdl_top \
  -y rtl -y tb +libext+.sv rtl/mdl_pkg.sv tb/tb_util_pkg.sv tb/tb_mdl_top.sv
./obj_dir/Vtb_mdl_top
```

Replace `tb_mdl_top` with any other testbench name. The packages must come
first on the command line. The testbenches use only `$urandom`, so any
two-state simulator seed works. `tb_mdl_top` runs in well under a second.

## Files

* `rtl/mdl_pkg.sv`: sizes, `mem_size_e`, `reuse_src_e`, byte-mask and
  lane-placement functions.
* `rtl/data_align.sv`: load alignment and extension.
* `rtl/lsq_tag_cam.sv`: LSQ tags with V/P/SL, partial-match search,
  invalidation and fill.
* `rtl/lsq_data_array.sv`: LSQ data words.
* `rtl/macro_lsq.sv`: the LSQ pipeline and its data paths.
* `rtl/mvrt.sv`: the memory value reuse table.
* `rtl/mdl_top.sv`: top level.
* `tb/`: testbenches, reference models (`tb_util_pkg.sv`) and the cache model
  (`dcache_model.sv`).
