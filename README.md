# A-index: a texture cache that picks its index from the span direction

Texture mapping fetches texels much faster than external memory can deliver
them, so a texture unit relies on a small texture cache. The usual cache
takes its set index from the low bits of the texel address. A texture is
stored row by row, so the address is `{v, u}` and the index comes from the
horizontal coordinate `u` only. A rasterizer walks the screen in horizontal
spans, and each span maps to a straight line in texture space that can point
in any direction. When that line runs mostly vertically (along `v`),
consecutive texel blocks differ only in their `v` bits. They all fall into the
same few sets and evict each other, even though most of the cache is empty.

The **A-index** (adaptive index) removes that conflict. The texture unit
watches how the sampling point moves from one fragment to the next. If the
step is mostly along `u` (u-major), the cache is indexed with `u` bits
(u-index). If it is mostly along `v` (v-major), the cache is indexed with `v`
bits (v-index). Either way, the texels of one span spread over many sets.

This repository holds synthesizable SystemVerilog for a complete texture
mapping pipeline built around such a cache. It has five stages (Fetch,
AddrGen, TexelRead, Filter, Blend). It also holds self-checking testbenches
for every block and for the whole pipeline.

## The cache (`rtl/aindex_cache.sv`)

Organisation, as in the reference configuration:

| item | value |
|---|---|
| capacity | 16 KB |
| line | 64 bytes = a 4x4 block of 32-bit RGBA8888 texels |
| associativity | 2 ways, 128 sets per way (`SETS` parameter) |
| replacement | LRU, one bit per set; invalid ways are filled first |

### Address split

A request carries a texture/mip-level identifier `tid` (8 bits), integer
texel coordinates `u`, `v` (10 bits each) and a direction bit `dir`. With
`ub = u >> 2` and `vb = v >> 2` as the block coordinates and `IDXW =
log2(SETS)`, the address splits as follows:

| | u-index (`dir = 0`) | v-index (`dir = 1`) |
|---|---|---|
| set index | `ub[IDXW-1:0]` | `vb[IDXW-1:0]` |
| tag | `{tid, vb, ub[7:IDXW]}` | `{tid, ub, vb[7:IDXW]}` |
| offset | `{v[1:0], u[1:0]}` | same |

Both tags have the same width (17 bits at the default size).

### The direction bit and the four-slot hit check

A block fetched under u-index sits in a different set than it would under
v-index. A later request may arrive with the other direction while the block
is still cached. So the hit check cannot look only at the set of the current
direction. Three things make it work:

* Every line has a 1-bit register that records the index it was written
  with, set when the line is filled.
* A lookup compares tags in **both** candidate sets: the two ways of the
  u-index set and the two ways of the v-index set, four slots in all.
* A slot in the u-index set counts as a hit only if its direction bit says
  u-index, and likewise for v. Without this rule, a tag that happens to look
  alike under the other split would give a false hit.

A block is never cached twice: it is installed only after it has missed in
both places. An assertion checks that at most one of the four slots ever
hits.

The four comparisons do not need a second read port on the data array. The
tag compare runs first and selects one set and one way. The data array is
then read once, at that address, in the same clock cycle. The compare and the
read therefore run in series, not in parallel as in a conventional cache.
This makes the hit path deeper but keeps a single read port.

On a miss the new line goes into the set of the request's **own** direction.
The direction bit is written with that direction, and the LRU way of that set
is replaced.

### Timing and interface

* `req_valid`/`req_ready`: the cache takes one lookup per cycle while idle.
  A hit returns `rsp_texel` with `rsp_valid` one cycle after acceptance.
* A miss holds `mem_req_blk = {tid, vb, ub}` with `mem_req_valid` until
  `mem_req_ready` is seen. The memory then returns 16 texels in row-major
  order (beat = 4*row + column), one per `mem_rsp_valid`. The requested
  texel is returned the cycle after the last beat. `req_ready` stays low
  from the miss until then. The cache is blocking: one miss at a time.
* Miss latency is 1 (request) + memory latency + 16 beats + 1 (response)
  cycles. With the testbench memory model (first beat LAT + 1 cycles after
  the request is accepted), that is 3 + LAT + 16 cycles.
* `ev_hit`, `ev_miss`, `ev_victim_valid` and `ev_victim_span` describe each
  accepted lookup for the statistics block.

Each line also stores the number of the span that filled it (16 bits). Only
the miss statistics use this field; the cache itself does not need it.

## Direction decision (`rtl/dir_decision.sv`)

The unit keeps the previous sampling point `(u, v)` in 10.4 fixed point. For
the current fragment it forms `du`, `dv` modulo 2^14 as signed values and
outputs:

* `DIR_U` if `|du| > |dv|`;
* `DIR_V` otherwise, which includes `|du| == |dv|`.

The first fragment of a span has no predecessor on the same texture-space
line, so it keeps the previous decision. After reset the decision is
`DIR_U`, the conventional index. The result is combinational. History is
updated only when the fragment is accepted (`take`). The logic is two
subtractors, two absolute values and one comparator.

## Pipeline (`rtl/texture_unit.sv`)

```
 fragments -> Fetch -> AddrGen -> TexelRead -> Filter -> Blend -> pixels
                       (dir)        |   ^
                                    v   |
                              A-index cache <-> texture memory (block port)
```

All stages use valid/ready handshakes. A miss stops TexelRead, and
back-pressure stalls the stages before it.

| stage | module | what it does | latency |
|---|---|---|---|
| Fetch | `frag_fetch` | FIFO of `FETCH_DEPTH` (4) fragments | 1 cycle |
| AddrGen | `addr_gen` | 2x2 bilinear footprint `(u0,v0)..(u1,v1)` in the fragment's mip level and in the next coarser one, wrapped to the power-of-two level size (repeat); weights `fu`, `fv` from the 4 fraction bits; direction decision; span numbering | 1 cycle |
| TexelRead | `texel_read` | four lookups, (u0,v0) (u1,v0) (u0,v1) (u1,v1), issued back to back, then four more in the coarser level for a trilinear fragment; responses counted into place | 5 cycles with hits (9 trilinear) |
| Filter | `bilinear_filter` | per channel and level `((t00*(16-fu)+t10*fu)*(16-fv) + (t01*(16-fu)+t11*fu)*fv + 128) >> 8`; trilinear: `(b0*(16-lod_f) + b1*lod_f + 8) >> 4` | 1 cycle |
| Blend | `blend_unit` | modulate: `round(tex*col/255)`, done exactly with a multiply, add and shift | 1 cycle |

With all hits, a bilinear fragment leaves TexelRead every 6 cycles: 4
lookups, the response of the last one, and one cycle to hand over the
texels. A trilinear fragment takes 10 cycles. TexelRead is the throughput
limit.

### Mip levels and trilinear filtering

Mip level n+1 of a texture is addressed as identifier `tid + 1`, with half
the width and height of level n. For a fragment with `trilin` set, AddrGen
also forms the footprint at `(u/2, v/2)` in level `tid + 1`. The Filter
stage mixes the two bilinear results with the weight `lod_f`. The two ways
of the cache let a block of level n and a block of level n+1 that fall into
the same set stay resident together. All eight lookups of a fragment use the
direction decided from the finer level's sampling points. The
level-of-detail computation itself (choosing `tid` and `lod_f`) happens
before the unit.

### Fragment format (`tex_pkg::frag_t`)

| field | bits | meaning |
|---|---|---|
| `x`, `y` | 10 each | screen position, passed to the pixel |
| `u`, `v` | 14 each | texture coordinate in texels, 10.4 fixed point, already perspective-corrected |
| `tid` | 8 | texture and (finer) mip level; part of the cache tag |
| `log2w`, `log2h` | 4 each | size of that level, up to 1024x1024 |
| `trilin` | 1 | also sample level `tid + 1` and mix |
| `lod_f` | 4 | weight of the coarser level, in 1/16 |
| `color` | 32 | interpolated fragment colour (RGBA8888) |
| `span_start` | 1 | first fragment of a horizontal span |

### Texture memory port

The memory port fetches whole blocks. `mem_req_blk` = `{tid, vb, ub}` (24
bits) names a 4x4 block. How that maps to a physical address is left to the
memory system. In a row-major image, the block's rows are four 16-byte
pieces, one texture row apart.

## Miss statistics (`rtl/miss_classifier.sv`)

Every miss is counted in exactly one class:

    misses = cold misses + intra-span replacements + inter-span replacements

* A **cold miss** fills an empty line.
* An **intra-span replacement** evicts a line filled by the same span. A
  span longer than the sets it can use evicts its own texels.
* An **inter-span replacement** evicts a line filled by an earlier span.

The count of intra-span replacements is the part that tracks span length
against the number of usable sets. It gives a cheap way to estimate the miss
count of a scene. The A-index makes that estimate tighter: a span's
projection onto the indexing axis is never shorter than 1/sqrt(2) of its
length, whereas with u-index only it can shrink to nothing. The estimate
itself is an offline calculation and is not part of the hardware.

The top also counts busy cycles (`n_cycles`: any fragment inside the
pipeline) and stall cycles (`n_stall`: a lookup waiting for a line fill). All
counters are 32 bits and are cleared by `stat_clear` or reset.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `SETS` | 128 | `texture_unit`, `aindex_cache` | sets per way. 64 gives an 8 KB cache. The index must fit in the 8 block-coordinate bits, so `SETS` can be at most 256 |
| `FETCH_DEPTH` | 4 | `texture_unit`, `frag_fetch` | fragment queue depth |
| `UW`, `VW`, `FW` | 10, 10, 4 | `tex_pkg` | integer and fraction bits of the texture coordinates |
| `TIDW`, `SPANW`, `CNTW` | 8, 16, 32 | `tex_pkg` | texture id, span number and counter widths |

The cache is written for exactly two ways, with one LRU bit per set.

## What follows the reference design and what does not

Taken from the reference design:

* the five-stage structure;
* 16 KB, 64-byte 4x4 lines, 2 ways;
* u-index and v-index, with the u-major/v-major rule on consecutive sampling
  points, decided in AddrGen;
* the per-line direction bit, written at fill time;
* the four-slot hit check with a final hit only when the direction bit
  matches;
* compare first, then one read, with a single read port;
* the cold/intra/inter split of misses.

Choices made here, because the reference leaves them open:

* texel format RGBA8888;
* which exact bits form the index;
* `tid` in the tag;
* LRU replacement;
* blocking, single-miss operation and the 16-beat fill protocol;
* handshakes and reset (synchronous, active low);
* the Fetch stage as a FIFO;
* bilinear filtering at texel corners with repeat wrapping;
* trilinear filtering, with mip level n+1 stored as identifier `tid + 1`;
* modulate as the blend function;
* the span-number field used to classify replacements;
* the first fragment of a span keeping the previous decision.

Known departures and limits:

* **Perspective correction and level-of-detail selection are outside the
  unit.** Fragments arrive with final texel coordinates and a chosen level.
* **Gate counts are not reproduced.** The reference quotes about 1,500 gates
  for the direction logic and 18,500 for the cache changes. This RTL has not
  been mapped to a standard-cell library.
* **The data array is a plain SystemVerilog array**, written once and read
  once per cycle. It maps to a single-port-read SRAM or to registers. The
  span-number field adds 16 bits per line that a production cache without
  statistics would drop.
* **Span numbers wrap at 65536.** A line filled exactly 65536 spans earlier
  would be counted as an intra-span replacement.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares against
values computed independently in the testbench and ends with a `TB_RESULT
checks=N failures=M` line.

| testbench | what it shows |
|---|---|
| `tb_aindex_cache` | A column walk over 200 blocks: all hits on the second pass with v-index, but all misses on both passes with u-index (the conflict). A block filled under one index is found by a lookup using the other. 4,000 random lookups agree with a behavioural model (`tb_pkg::cache_model`). Every texel is checked, hit latency is 1 cycle and miss latency is 3 + LAT + 16 cycles. |
| `tb_dir_decision` | Lines of random slope; the rule, the span-start hold and the history hold when `take` is low. |
| `tb_frag_fetch` | Order, and full/empty flags under random traffic. |
| `tb_addr_gen` | Footprints of both levels, wrapping (including 1-texel levels), weights, direction and span numbers under back-pressure. |
| `tb_texel_read` | Lookup order and fields for 4 and 8 lookups, texel assembly, the stall flag, the 5- and 9-cycle latencies, and 6-cycle streaming. |
| `tb_bilinear_filter` | Bilinear and trilinear, random and corner weights, and flat quads. |
| `tb_blend_unit` | All 65,536 channel pairs against `(2ab+255) div 510`. |
| `tb_miss_classifier` | Random event streams and clear. |
| `tb_texture_unit` | The whole pipeline at default parameters (see below). |
| `tb_index_workload` | The index comparison on synthetic scenes (see below). |

`tb_texture_unit` renders 40 synthetic triangles. Their spans walk texture
space at eight angles, and every third triangle is trilinear. A typical run
has about 15,000 fragments; the exact count depends on the random seed. It
checks:

* every pixel, against a reference computed in the testbench;
* every cache lookup, against the behavioural model;
* counter consistency: hits + misses = 4 per level read, and
  cold + intra + inter = misses = memory requests.

It also requires each mechanism to occur at least once: bilinear and
trilinear fragments, hit, miss, stall, u-index and v-index lookups, a hit
under the other index, each of the three miss classes, a full fragment
queue, and output back-pressure. In one run of 14,876 fragments (4,080
trilinear) the cache missed 2,412 times. A u-index-only model run on the
same lookups missed 3,713 times.

`tb_index_workload` feeds three synthetic scenes to four cache instances:
8 KB and 16 KB, each with u-index only and with the A-index. The scenes are
mostly u-major, mostly v-major, and mixed, and they stand in for scenes
dominated by one direction or by none. Spans are up to about 360 pixels long, so
that capacity matters. Miss counts from one run:

| scene | 8 KB u-index | 8 KB A-index | 16 KB u-index | 16 KB A-index |
|---|---|---|---|---|
| u-major | 2,755 | 2,755 | 2,672 | 2,672 |
| v-major | 11,300 | 2,910 | 11,300 | 2,807 |
| mixed | 7,202 | 3,197 | 7,153 | 3,048 |

Cycles the cache spent on those lookups (hits and fills, memory latency 10):

| scene | 8 KB u-index | 8 KB A-index | 16 KB u-index | 16 KB A-index |
|---|---|---|---|---|
| u-major | 318,996 | 318,996 | 316,672 | 316,672 |
| v-major | 581,488 | 346,568 | 581,488 | 343,684 |
| mixed | 485,752 | 373,612 | 484,380 | 369,440 |

On the v-major and mixed scenes the A-index removes most conflict misses. A
cache of half the size with the A-index misses less than the full-size
conventional one. On the u-major scene both indexes behave alike. The
cycle saving is smaller than the miss saving, because hits still take one
cycle each. The testbench checks these relations, not the exact numbers.

### Simulating

Verilator 5 is used with timing support. Packages are listed first, and
`-y` lets the tool find the other modules:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tex_pkg.sv tb/tb_pkg.sv tb/tb_texture_unit.sv \
    --top-module tb_texture_unit -o sim
./obj_dir/sim
```

Replace `tb_texture_unit` with any other testbench name. `tb_pkg.sv` is
needed by the testbenches that use the texel hash or the cache model:
`tb_aindex_cache`, `tb_texel_read`, `tb_texture_unit` and
`tb_index_workload`. `tb/tex_mem_model.sv` is a behavioural model of the
texture memory. It is not synthesizable design logic. Its texel contents are
a fixed hash of `{tid, v, u}` (`tb_pkg::texel_of`), so no image files are
needed.
