# Way-tagged L2 for a fault-tolerant, write-through L1

This is a two-level data cache whose L1 is write-through. Every store therefore also
writes the L2, and a conventional set-associative L2 would fire all of its ways for each one.
The design removes most of that cost with **way tags**:

* The L2 is **inclusive**: every line in the L1 is also in the L2. It stays in the same L2
  way until the L2 evicts it, and an eviction also invalidates the L1 copy.
* When the L2 sends a line to the L1, it also sends the 2-bit tag of the way the line sits in.
  The L1 keeps that tag next to the line, in the **way-tag array**.
* A later store that hits in the L1 carries the tag to the L2. The L2 then enables only that
  one way, accessing the cache as if it were direct-mapped.

The L1 is also **performance-degradation tolerant (PDT)**. A fault map marks L1 words that are
known to be faulty, for example as found by BIST or ECC. A load of such a word is handled as a
miss and served from the L2, which is assumed fault-free. A chip with bad L1 cells stays
correct and only gets slower.

| L1 operation | L2 access | L2 ways enabled |
|---|---|---|
| load hit (good word) | none | 0 |
| load miss, or load of a faulty word | set-associative | 4 (plus 1 for a fill from memory) |
| store hit | direct-mapped, by way tag | 1 |
| store miss | set-associative | 4 |

## Structure

```
 processor ──► pdt_l1_controller ──► l1_cache_array   (tags, valid, 512-bit lines)
                   │   │   │     └──► fault_map        (FMOut, one bit per word)
                   │   │   └────────► way_tag_array    (2-bit L2 way per L1 line)
                   │   │                   │ (one cycle later)
                   │   └► write_buffer ────┼──────────┐  {addr, data}
                   │      way_tag_buffer ◄─┘          │  {way, write-miss}
                   │           │ (bypass mux)         ▼
                   └── line read ────────────────► l2_cache ──► memory
                                                   ├ way_decoder
                                                   ├ way_register
                                                   └ 4 × l2_way_array
```

`way_tag_cache_top` wires these blocks together. The processor and main memory are outside it.
The fault map's write port is brought out for whatever BIST or ECC engine fills it.

Default sizes are set in `rtl/cache_pkg.sv`:

| item | value | origin |
|---|---|---|
| address, data | 32 bits | taken from the design's reference waveforms |
| line | 512 bits (16 words) | taken from the design's reference waveforms |
| L2 | 4 ways × 256 sets (64 KiB) | 4 ways and the way tags "00".."11" are given; the set count is a choice |
| L1 | direct-mapped, 64 lines (4 KiB) | choice |
| write buffer / way-tag buffer | 4 entries each | choice; the two buffers must have the same depth |

Address fields: bits [5:2] select the word; [11:6] are the L1 index and [31:12] the L1 tag;
[13:6] are the L2 index and [31:14] the L2 tag.

## The way-tag path for a store (the subtle part)

In cycle N a store reaches the L1 (controller state `WRITE_DATA`). Three things happen in that
cycle:

1. On a hit, the word is written into the L1.
2. `{addr, data}` is pushed into the write buffer.
3. The way-tag array is read (`WRITEH_W=1`, `UPDATE=0`).

The array is synchronous, so the way tag only appears in cycle N+1. The way-tag buffer is
therefore written with the write buffer's write signal delayed by one clock. The store's
write-miss status bit is delayed with it.

The write buffer's entry is visible from cycle N+1. If the L2 is idle, it pops the entry in
that same cycle, using one read signal for both buffers. At that moment the way-tag buffer is
still empty: the tag is only being written. Reading the way-tag buffer now would hit the
entry that is being written, a read/write hazard. Instead, the buffer's EMPTY flag blocks its
read port. A multiplexer passes the tag straight from the way-tag array output to the L2 (the
**bypass**), and the bypassed tag is not stored. When the L2 is busy, tags queue in the buffer
and always leave together with their store. Neither the write buffer nor the L2 ever waits for
a tag.

The status bit tells the L2 whether the tag means anything. For a store that missed in the
L1, the way is unknown: the tag read for it is ignored and all four ways are enabled.

`l2_cache` takes a store from the two buffer heads and handles it like this:

* The way decoder enables one way or all ways.
* The word is written into whichever enabled way hits.
* The store is then written through to memory.
* A store miss is not allocated, in the L2 or in the L1.

The assertion `a_inclusive` checks that a direct-mapped store always finds its line in the
way its tag names.

Correctness of the tags rests on two rules:

* **Inclusion.** When the L2 fills a line from memory into a valid victim way, it sends
  `inv_en`/`inv_addr` to the L1, which drops that line if it holds it. An L1 line's way tag
  therefore never outlives the L2 copy it points to.
* **Stores before reads.** The L2 starts a line read only when the write buffer is empty.
  A refill therefore includes every earlier store. Evictions happen only on refills, so no
  line is evicted while a tag for it waits in the way-tag buffer.

## L1 controller (PDT state machine)

`pdt_l1_controller` handles one request at a time. In `IDLE` it looks up the L1 tag and the
fault map (FMOut) combinationally on the incoming address, then takes one of these paths:

* **Load hit, good word** (`READ_HIT`): returns the word and goes back to `IDLE`.
  It takes 2 cycles.
* **Load miss, or load of a faulty word** (`READ_MISS` → `WAIT_READ` → `READ_DATA`):
  1. The controller asks the L2 for the line and waits.
  2. When the L2 answers, the line is written into the L1 and its way tag into the way-tag
     array (`WRITEH_W=1`, `UPDATE=1`).
  3. The word is returned from the line the L2 sent, never from the L1 copy, which may be
     the faulty one.

  It takes the L2 time plus 2 cycles.
* **Store** (`WRITE_HIT`/`WRITE_MISS` → `WAIT_WRITE` → `WRITE_DATA`): `WAIT_WRITE` waits
  while the write buffer is full (the "ready" condition). `WRITE_DATA` performs the three
  actions described above. It takes 4 cycles when the buffer has room.

A store to a word marked faulty counts as a hit. The L2 copy and the way tag stay correct,
and later loads of that word still go to the L2.

Every request ends with a one-cycle `ready_p`, which comes with `hit_p` or `miss_p` and, for a
load, `rdata_p`.

## L2

`l2_cache` is a small controller with these states:

| state | what happens |
|---|---|
| `S_IDLE` | waits for a store (taken first) or a line read |
| `S_WRITE` | store in the arrays |
| `S_MEMW` | store written through to memory |
| `S_RLOOK` | set-associative lookup for a line read |
| `S_MEMR` | line read from memory |
| `S_FILL` | line written into the victim way; valid victim back-invalidated in the L1 |

When the lookup hits, the line goes back to the L1 in `S_RLOOK`. On a miss, it goes back in
`S_FILL`, in the same cycle that it is written into the L2, so the L1 and the L2 are filled
together.

The victim is the first invalid way, or else the set's round-robin pointer. The way register
supplies the 2-bit tag of the way that hit or was filled. Each way (`l2_way_array`) reports a
hit and drives data only while its enable is set. The top exports the enables as `l2_way_en`,
and the testbenches count them as a measure of L2 activity.

Memory port: `mem_req` stays high until a one-cycle `mem_ready`. With `mem_we=1` the port
writes one word; with `mem_we=0` it reads a whole 512-bit line.

## Where this departs from, or goes beyond, the published scheme

* **Parallel L1/L2 lookup.** The PDT scheme describes the L2 being searched in parallel with
  the L1 on every load. This conflicts with the way-tagged access table, in which a load hit
  does not touch the L2. The table is followed here, so the L2 is read only on a miss or a
  faulty word.
* **Not specified by the scheme; chosen here:**
  * L1 organisation and size, and the L2 set count.
  * Buffer depth.
  * L2 replacement: invalid way first, then round-robin.
  * L2 write policy towards memory: write-through, no allocation on a store miss.
  * The stores-before-reads ordering.
  * The processor and memory handshakes.
  * Reset behaviour: asynchronous, active low. Reset clears valid bits, the fault map,
    pointers and state; data and tag arrays are not reset.
* **Fault map.** The fault map is a per-word flip-flop array. How faults are found (BIST or
  ECC) is outside this RTL.
* **Way decoder fill input.** The decoder's `fill` input enables one way for a line fill.
  This is an addition.
* **No power model.** Power is not modelled. The way-activation count stands in for the L2
  energy saving.

## Simulation

Each block has a self-checking testbench, `tb/tb_<block>.sv`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/mem_model.sv` is a behavioural main
memory: a word never written reads as a fixed hash of its address, and its latency is a
parameter.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/cache_pkg.sv tb/tb_way_tag_cache_top.sv --top-module tb_way_tag_cache_top
./obj_dir/Vtb_way_tag_cache_top
```

* `tb_way_tag_cache_top` runs the whole design at its default sizes.
  * Directed cases: cold miss, load hit, store hit and store miss, a faulty word, an L2
    eviction with back-invalidation, an L2 read hit, and write-buffer stalls.
  * Then 3000 random loads and stores, about 40 % of them stores, with occasional fault-map
    changes.

  Every load is checked against a reference model, and every stored word must reach memory.
  A load of a word marked faulty must be reported as a miss.
  The bench also predicts from the L1 hit/miss whether each store should enable one L2 way or
  four, and checks it. It counts each mechanism and fails if any never occurs. In one run,
  L2 stores enabled 2407 ways against 4852 without way tags.
* `tb_fig52_miss_fill` covers the basic miss operation. The line is read from memory and
  written into the L1 and the L2 in one cycle; both levels then hold it.
* `tb_l2_cache` tests the L2 alone. It feeds stores with way tags, tracks which way each line
  was placed in, and checks the ways enabled, the line data and back-invalidation.
* The remaining benches test each small block against a reference model or an exhaustive
  table: controller timing per request type, FIFO order, bypass versus buffered tag reads,
  the WRITEH_W/UPDATE table, and the access-mode table.

Sizes are changed in `cache_pkg` or through the top's parameters (`L1_N`, `L2_N`, `N_WAYS`,
`WB_N`). Powers of two are assumed, and the buffer depth must be at least 2.
