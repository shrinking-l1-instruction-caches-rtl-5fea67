# iLP-NUCA: a small L1 instruction cache backed by a tiled, low-latency second level

An SMT core fetches from several threads at once, so its L1 instruction cache is both
busy and power-hungry. Making the L1-I smaller saves energy per access, but a
conventional L2 behind it is slow enough that the extra misses cost a lot of
performance. iLP-NUCA replaces the L1-I/L2-I pair with a *root tile* (RT), which is an
ordinary 8 KB 2-way L1-I as far as the core can tell, surrounded by two levels of
small 32 KB cache tiles. Blocks that fall out of the RT are kept in the nearby tiles
and come back in 3 or 5 cycles instead of an L2 access. The idea comes from
Ferrerón-Labari et al., "Shrinking L1 Instruction Caches to Improve Energy–Delay in SMT
Embedded Processors". There, an 8 KB RT with iLP-NUCA matches a conventional 16 KB
L1-I and uses less energy. This RTL implements the cache structure. It does not model
energy or the core.

## Floorplan and levels

```
   Le3   Le3   Le3   Le3   Le3        level 3: 9 tiles, 32 KB 2-way each
   Le3  [L2c] [L2d] [L2e]  Le3        level 2: 5 tiles, 32 KB 2-way each
   Le3  [L2a] ( RT  ) [L2b] Le3       root tile: 8 KB 2-way = the core's L1-I
                  |
               fetch port
```

In total the tiles hold 448 KB (14 x 32 KB) behind the 8 KB RT. All blocks are 32
bytes. Three networks connect the tiles:

| network     | carries                         | shape in this RTL                                      |
|-------------|---------------------------------|--------------------------------------------------------|
| search      | miss requests, outwards         | bufferless broadcast, one level per cycle              |
| transport   | hit blocks, back to the RT      | tree: every Le2 tile has its own link into the RT; every Le3 tile has a link into one Le2 tile |
| replacement | victim blocks, outwards         | RT → Le2 tiles (round-robin); Le2 tile → its Le3 children (round-robin); Le3 → out |

The transport tree is what makes this an *instruction* NUCA. A 2-D mesh gives more
bandwidth. Instruction misses are few, though: at most one per stalled thread. A tree
gives each level one fixed, short distance instead. Every Le2 tile is one hop from the
RT, so the RT's block multiplexer has five transport inputs. Every Le3 tile is two hops
away. The tree used here (`ilp_pkg::LE3_PARENT`) is:

| Le2 tile             | its Le3 children                 |
|----------------------|----------------------------------|
| 0 bottom-left (L2a)  | left column, bottom and middle   |
| 1 bottom-right (L2b) | right column, middle and bottom  |
| 2 middle-left (L2c)  | top-left two                     |
| 3 middle-centre (L2d)| top-centre                       |
| 4 middle-right (L2e) | top-right two                    |

No Le2 tile has more than two children, because a tile has two input transport buffers.
The replacement network follows the same tree, outwards.

## Life of a fetch

Cycle numbers count from the fetch request (cycle 0). Every number below is checked
by the end-to-end testbench with one thread running.

| case                 | what happens                                                                 | answer at |
|----------------------|------------------------------------------------------------------------------|-----------|
| RT hit               | two-stage lookup, `resp_*`                                                   | cycle 2   |
| hit in level 2       | miss found at 1, search injected at 2, Le2 lookup at 3 (the block is removed from the tile and sent on its link), RT link buffer at 4, `fresp_*` | cycle 5 |
| hit in level 3       | Le3 lookup at 4, Le2 link buffer at 5, RT link buffer at 6, `fresp_*`        | cycle 7   |
| miss everywhere      | the search leaves level 3 unanswered at 4 and is queued on `nl_req_*`. The next level's block (`nl_fill_*`) goes straight into the RT. | next-level latency + 6 |

So once a search has been injected, a level-2 hit arrives 3 cycles later and a level-3
hit 5 cycles later. This assumes a one-cycle tile access and one cycle per transport
hop.

Every block written into the RT displaces one. That victim moves into an Le2 tile's
replacement buffer. When the Le2 tile places it, the block the tile displaces moves on
to one of its Le3 children. A victim displaced from level 3 leaves on `ev_*`.
Instruction blocks are never dirty, so the next level may simply drop it.

## Keeping exactly one copy

Content moves between levels; it is not copied. A hit removes the block from its tile,
and victims move outwards. So a search must never find a block twice, or miss a block
that is only in transit. The cases are handled like this:

- **Replacement buffers are searched.** A victim waiting in a tile's replacement buffer
  is still cache content. The buffer is compared in the same cycle as the array.
- **One atomic view per tile.** A tile places a waiting victim only in a cycle when it
  is not searching. Lookups see the state from before the clock edge.
- **No outward move across a search.** Level 2 is searched one cycle before level 3. A
  block moving from an Le2 tile to an Le3 tile in that cycle would be found in both.
  While level 2 is being searched, the search network raises `hold_repl`, and no tile
  places a victim.
- **Blocks on the transport network are already claimed.** The RT's miss registers
  (MSHRs) merge a second miss to the same block (a *secondary miss*). So no second
  search goes out for a block that is on its way back.
- **Fill/lookup race.** A lookup can hit the same cycle in which its block is being
  written into the RT. The fill data is then forwarded as a hit, so no new miss is
  opened for a block that is already arriving.

The RTL checks the invariant with assertions: at most one tile per level hits, no
block hits in two levels, and no block hits in both a tile's array and its replacement
buffer.

## Flow control

Transport links are one block wide and use store-and-forward with on/off
back-pressure. The receiving two-entry buffer (`ilp_tbuf`) raises `off` when it is
full, and the sender then holds its block. `off` depends only on stored state. With
two entries, a stream still moves one block per cycle.

The search network is bufferless and cannot be stalled. A tile whose hit cannot leave
at once (parent buffer off, or the switch busy) keeps the hit in a small local queue.
The queue has one entry per thread, the most misses that can be in flight.

The replacement buffers (`ilp_rbuf`, two entries) also signal `off`. A tile does not
place a victim until the outward neighbour chosen for the displaced block can take it.
The RT likewise takes a returning block only when a level-2 replacement buffer has
room. Otherwise the block waits in its link buffer, and back-pressure travels outwards.

## The core interface

The RT keeps the interface of a plain L1-I with one fetch port:

| signal                                           | dir | meaning |
|--------------------------------------------------|-----|---------|
| `req_valid`, `req_tid[1:0]`, `req_addr[31:0]`    | in  | fetch of the block holding `req_addr` for a thread |
| `req_ready`                                      | out | low for a thread that is stalled on a miss (and for the thread whose miss is detected in this cycle) |
| `resp_valid`, `resp_tid`, `resp_addr`, `resp_data[255:0]` | out | hit answer, 2 cycles after the request |
| `fresp_valid`, `fresp_tmask[3:0]`, `fresp_addr`, `fresp_data` | out | a missed block returned to every thread in the mask |
| `nl_req_valid/_id/_addr`, `nl_req_ready`         | out/in | miss of the whole structure to the next level |
| `nl_fill_valid/_blk`, `nl_fill_ready`            | in/out | block from the next level |
| `ev_valid[8:0]`, `ev_blk[9]`                     | out | victims leaving level 3 |
| `stat_*`                                         | out | one-cycle event pulses (RT hit, primary/secondary miss, forwarded fill, per-tile hits) |

Addresses on the block side (`*_addr` of type `baddr_t`) are block addresses: byte
address bits 31:5. A block (`blk_t`) is `{addr, data}`.

## Modules

| file | role |
|------|------|
| `ilp_pkg.sv` | sizes, `blk_t`/`search_t`, the level-3 attachment table and helper functions |
| `ilp_nuca.sv` | top: RT, search network, 5 + 9 tiles and all links |
| `ilp_root_tile.sv` | RT: 2-stage lookup, MSHRs, search injection, 6-source fill multiplexer, victim eviction |
| `ilp_mshr.sv` | 8 miss registers with thread masks and secondary-miss merging |
| `ilp_search_net.sv` | search broadcast, hit collection, next-level miss queue, `hold_repl` |
| `ilp_tile.sv` | tile: array + replacement buffer + two input buffers + switch + local hit queue |
| `ilp_cache_array.sv` | set-associative array with true LRU, lookup/extract/insert |
| `ilp_tbuf.sv` | two-entry transport buffer with on/off |
| `ilp_rbuf.sv` | searchable replacement buffer |
| `ilp_tswitch.sv` | tile switch: local hit first, then the input buffers round-robin |
| `ilp_repl_route.sv` | round-robin choice of the outward neighbour for a victim |

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `RT_SETS`, `RT_WAYS` (top) | 128, 2 | RT geometry. 256/4 gives the 32 KB 4-way RT, 256/2 the 16 KB 2-way RT and 64/2 the 4 KB 2-way RT. These are the other RT sizes the design was evaluated with. |
| `TILE_SETS`, `TILE_WAYS` (top) | 512, 2 | tile geometry (32 KB 2-way) |
| `NTHREADS` (pkg) | 4 | hardware threads |
| `MSHR_N` (pkg) | 8 | RT miss registers |
| `TBF_DEPTH` (pkg) | 2 | entries per transport link buffer |
| `LE3_PARENT` (pkg) | see above | transport/replacement tree |

## What follows the source design and what is this design's own

Taken from the source design:
- the three levels and the tile counts and sizes;
- the 8 KB 2-way RT as the preferred configuration;
- the five direct Le2 → RT links and the two-hop Le3 paths;
- the round-trip latencies of 3 and 5 cycles;
- the bufferless broadcast search;
- store-and-forward transport with on/off back-pressure and two-entry link buffers;
- one transport output per tile, with two input buffers;
- searching the replacement buffers;
- the 2-cycle RT, 8 MSHRs and 4 threads.

This design's own choices:
- the exact Le3 → Le2 attachment;
- the replacement network following the transport tree, with round-robin distribution (the source uses an irregular topology that is not specified here);
- one replacement buffer per tile;
- LRU replacement everywhere;
- block-wide links;
- modelling the broadcast as one register per level;
- how an all-miss is detected (at the level-3 stage);
- the `hold_repl` rule;
- the local hit queue;
- switch and multiplexer arbitration;
- fill forwarding;
- separate hit and miss answer ports;
- 32-bit addresses;
- asynchronous active-low reset.

Not modelled:
- instruction prefetching;
- the data side;
- energy;
- a write-back buffer between level 3 and the next level. Instruction blocks are
  clean, so level-3 victims simply leave on `ev_*` and may be dropped.

Smaller points:
- Each MSHR entry can serve at most four threads, one bit per thread. This matches the
  limit of four secondary misses per entry, because a stalled thread has only one miss.
- The RT array does one lookup and one fill per cycle. These are its two ports.
  Instruction fetch never writes, so write policies do not apply.

The arrays are written as plain SystemVerilog memories with asynchronous read. A real
implementation would map them onto SRAM macros and retime the lookup.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb_ilp_nuca` runs the whole structure at its full
default size, in five phases:

1. One thread walks blocks of a single set. This checks the exact latencies and that a
   small working set never leaves iLP-NUCA.
2. Two threads run private loops plus shared code.
3. Four threads do the same.
4. Four threads compete for twelve blocks of one set.
5. A second thread asks for a block just as it is being filled.

The next cache level is modelled as a 14-cycle memory with address-derived data, so
every answer is checked. The test also counts every mechanism and fails if one never
occurs:

- RT hits;
- primary and secondary misses;
- forwarded fills;
- stalls;
- level-2, level-3 and replacement-buffer hits;
- next-level fills;
- victims at every level;
- back-pressure;
- held placements.

`tb_ilp_nuca_cfg` runs the same four-thread traffic through the four RT sizes side by
side: 32 KB 4-way, 16 KB 2-way, 8 KB 2-way and 4 KB 2-way. The traffic is private loops
of 30 to 90 blocks per thread, plus shared and scattered code. Every answer is checked.
As the RT shrinks, the tiles take over the work. In one run the RT answered 95%, 94%,
68% and 26% of the fetches. Misses to the next level stayed almost the same, about
1,300 to 1,700. The test checks that a smaller RT never has a larger hit share.

With plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/ilp_pkg.sv tb/tb_ilp_nuca.sv --top-module tb_ilp_nuca
./obj_dir/Vtb_ilp_nuca
```

The full-size end-to-end run takes about fifteen seconds, and the four-size run about
thirty.
