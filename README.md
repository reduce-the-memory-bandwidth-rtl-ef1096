# Visibility driven rasterizer with a two-level hierarchical Z-buffer

Most Z-buffer traffic in a 3D pipeline is spent on pixels that turn out to be hidden. This
design removes much of that traffic before the Z-buffer is touched. It keeps a small on-chip
*hierarchical Z-buffer* (HZ-buffer) that holds, for every 4x4 and every 8x8 pixel block of the
screen, the farthest depth currently stored in that block. Three tests use it:

1. a **triangle test** before lighting, which drops a small triangle that lies inside one block
   and is behind it;
2. a **rasterizer** that walks each triangle tile by tile and tests every **tile** and every
   **scan-line of a tile** before generating any of its pixels;
3. a **pixel test** that drops single pixels behind their 4x4 block.

The HZ-buffer is kept up to date without reading the Z-buffer back. A **bit-mask cache** follows
the depth writes and notices when a block has been completely overwritten. A **management unit**
then raises that block's entry.

The architecture is the visibility driven rasterizer of C.-H. Chen and C.-Y. Lee (J. Circuits,
Systems and Computers, 2002). The RTL here is an independent implementation. Where that
description is silent, the choices made are listed under "Departures and choices" below.

Default configuration: 1600x1200 screen, "8x8-4x4" HZ (high-level blocks of 8x8 pixels,
low-level blocks of 4x4), 8-bit HZ entries, 16-bit depth, a 64-entry bit-mask cache and four
parallel span processors. The "16x16-8x8" configuration is selected with `HIGH=16, LOW=8`.

## Pipeline

```
 triangles ─► tri_vis_test ─► (lighting, external) ─► tri_setup ─► tile_rasterizer ─► pixel_vis_test ─► (Z-buffer, colour, external)
                  │ read                                              │ read               │ read                  │ depth writes
                  ▼                                                   ▼                    ▼                       ▼
               ┌──────────────────────────── hz_buffer ◄── hz_manager ◄── bitmask_cache ◄──┘
```

| module | role |
|---|---|
| `vdr_top` | the whole design; external stages appear as ports |
| `hz_buffer` | two arrays of 8-bit entries (400x300 low, 200x150 high), 4 read ports, 1 write port per level, frame clear |
| `tri_vis_test` | triangle-level test, one register stage |
| `tri_setup` | vertex sort, slopes of Z/R/G/B, edge slopes (sequential divider `seq_div`) |
| `tile_rasterizer` | tile-order traversal, tile-size choice, tile and scan-line tests |
| `maxz_estimator` | nearest-depth bound of a tile and of each scan-line, and the HZ compare |
| `span_processor` | one scan-line: four DDAs (Z, R, G, B) and the coverage compare |
| `pixel_vis_test` | per-pixel test against the low level, one register stage |
| `bitmask_cache` | per-block coverage mask and temporal farthest depth, 64 entries |
| `hz_manager` | writes the low and high levels when a block is fully covered |
| `vdr_pkg` | types (`tri_t`, `setup_t`, `pix_group_t`, `zwrite_t`, `stats_t`), widths, helpers |

Everything outside the design is reached through ports. This covers geometry and lighting
(`lit_out_*` and `lit_in_*`), and the Z-buffer with its colour and texture memories (`pix_*`
out, `zw_*` back). `zw_*` must report the pixels whose depth the external Z test actually
wrote, together with the depths written.

## Depth convention (read this first)

**A larger depth value is nearer to the viewer.** The external Z test passes when
`z_new > z_old`. Both buffers clear to 0. An HZ entry holds the *minimum* depth of its block,
which is its farthest pixel.

This convention makes the group test a comparison of the group's *maximum* depth with the HZ
entry: the group is hidden when its maximum (its nearest point) is still below the block's
minimum. The conservative estimates below are upper bounds of a maximum. They are only safe in
this orientation.

HZ entries are the upper 8 bits of the 16-bit depth, truncated. Truncation can only move an
entry farther, so every test stays conservative. A group or pixel with depth `z` (Q.16 or
16-bit) is hidden when `z < hz << 8` in 16-bit units.

## Tile-order scan-line traversal

`tile_rasterizer` processes a triangle in **bands** of T scan-lines. Within a band it moves
**tile by tile** from left to right. Within a tile the four span processors handle four
scan-lines in parallel, one pixel column per clock.

* **Tile size.** If the triangle covers more than `2*LOW` scan-lines (`y_bot - y_top > 8`), T is
  the high-level block size (8). Otherwise T is the low-level block size (4). A large tile is
  tested against the high-level entry, a small tile against the low-level entry. Large
  triangles are therefore rejected in big steps, and small triangles do not waste work on
  empty 8x8 tiles.
* **Band setup, T cycles.** Three edge DDAs step one line per cycle: the long edge, and the upper
  or lower short edge. Each line's span goes into the boundary registers LB/RB as
  `xs = ceil(x_left)` and `xe = ceil(x_right)`. Pixel `(x, y)` is covered when `xs <= x < xe`.
  Vertices lie on integer pixel positions.
* **Attribute origin.** Once per band, the Z/R/G/B values at the first tile corner come from the
  plane equation (one multiply per attribute). Each following tile adds `T * d/dx`, a shift.
* **Tile test, 1 cycle.** See the next section. A hidden tile costs this one cycle and nothing
  more. In a visible tile, each scan-line whose maximum is behind the entry is disabled.
* **Rasterize.** For each group of four lines there is one load cycle, then T column cycles.
  Lane *p* of an output group is pixel `(x, y0+p)`. All four lanes of a group are in the same
  4x4 block, so the pixel test and the bit-mask cache each need only one lookup per group.
  Cycles in which all lanes are empty emit nothing.

The costs are these. A visible 4x4 tile takes 1 test + 1 load + 4 column cycles. A visible 8x8
tile takes 1 + 2x(1 + 8) cycles. A band adds T setup cycles plus one origin cycle.

## Group visibility test (`maxz_estimator`)

The rasterizer knows `dz/dx` and `dz/dy` from setup. It also knows, for each row of the tile,
the covered columns `[cs, ce)` relative to the tile corner.

* **Fully covered tile:** the maximum is a corner. With `z0` the depth at column 0, row 0:
  `max = z0 + (dz/dx >= 0 ? (T-1)dz/dx : 0) + (dz/dy >= 0 ? (T-1)dz/dy : 0)`.
* **Partly covered tile:** finding the exact maximum would cost about as much as rasterizing
  the tile. Instead, take LL and LH, the left-end pixels of the covered rows with the smallest
  and the largest y. Then
  `maxL = (dz/dy >= 0) ? LH : LL` and `estimate = maxL + T * |dz/dx|`.
  This is never below the true maximum. Every covered pixel lies fewer than T columns right of
  the tile's left edge, and the row chosen by the sign of `dz/dy` bounds the vertical term.
  `T*|dz/dx|` is a shift. A looser estimate only lets a few hidden tiles through. It never
  drops a visible pixel.
* **Scan-line:** the maximum is the right end of the span if `dz/dx >= 0`, else the left end.
  It is exact.

Each scan-line is compared with the same HZ entry as its tile.

## Keeping the HZ-buffer current

When the Z-buffer writes a pixel, the pixel's depth can only increase. For a block that has had
*all* of its pixels written since some moment, the smallest depth written since then is a safe
new farthest value. `bitmask_cache` tracks this per 4x4 block with a 16-bit coverage mask and a
running minimum. The cache is fully associative with 64 entries. On a miss it opens a free
entry. If none is free, it evicts the entry at a round-robin pointer and forgets that entry's
partial coverage, which only delays an update.

When a mask becomes all ones, the block goes to `hz_manager`. The manager:
1. raises the low-level entry to the new value; entries are never lowered;
2. reads the four low-level entries of the enclosing 8x8 block, one per cycle, and writes their
   minimum to the high level.

An update takes 3 + (HIGH/LOW)^2 = 7 cycles. While the manager is busy, the cache holds
`zw_ready` low.

`frame_clear` clears both HZ levels, one address per cycle (120,000 cycles at 1600x1200). It
also empties the cache. New triangles are held back until the clear is done.

## Number formats and interfaces

* Coordinates: unsigned 12 bits. Vertices must be on screen; clipping happens upstream.
* Attributes and edge positions: signed 64-bit, 16 fraction bits (`fx_t`).
* Setup: slopes are quotients truncated toward zero. They come from one 48-cycle divider, with
  11 divisions per triangle, so about 540 cycles per triangle. Setup runs in parallel with
  rasterization of the previous triangle.
* Output depth and colour: the integer part of the accumulators, clamped to 16 bits and 8 bits.
* Every stream uses valid/ready. Data is accepted on a clock edge where both are high.
* `stats` counts the following: triangles offered, tested, discarded and degenerate; large and
  small tiles tested and hidden; hidden scan-lines; pixels tested and discarded; HZ updates;
  cache evictions.

## Departures and choices

* **Maximum versus farthest.** The original text calls the value compared with the HZ-buffer
  the "maximum (or farthest)" depth. Its triangle test compares "the farthest vertex". Its
  conservative estimate, however, is an upper bound of the maximum, which protects only the
  nearest depth. This design follows the formulas: maximum = nearest, and the triangle test
  uses the vertex with the largest depth.
* **Estimate formula.** As printed, the formula chooses both terms on the sign of `dz/dy`. The
  accompanying proof and text add or subtract `T*dz/dx` according to the sign of `dz/dx`. The
  design uses `maxL + T*|dz/dx|`, which is the bound the proof derives.
* **Cache size.** 64 entries are used, the size of the reported simulations. The text also says
  16 blocks are enough; set `CACHE_ENTRIES=16` for that.
* **Dynamic bi-level compression** of the HZ-buffer (about 40 % smaller) is not implemented. Its
  encoding is not specified. The buffer is stored uncompressed: 150,000 bytes at 1600x1200 in
  8x8-4x4, and 37,500 bytes in 16x16-8x8. The published size table gives 31.88 KB for the
  latter. Its accounting is not stated.
* HZ reads are combinational (register-file style). Large arrays would normally be synchronous
  SRAM, which would add a pipeline stage to each test.
* The setup hardware, the replacement policy, the way the high level is refreshed, coverage
  sampling at integer positions, the fixed-point formats and all handshakes are choices of this
  design.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vdr_pkg.sv tb/tb_vdr_top.sv --top-module tb_vdr_top
./obj_dir/Vtb_vdr_top
```

`tb_vdr_top` runs the whole design at its default size, a 1600x1200 screen, in under a second.
It models the lighting stage and a full-screen Z-buffer. It also renders every triangle,
without any culling, into a reference image, using the same edge and plane equations evaluated
per pixel. The two images must be bit-identical; this is the check that culling is
conservative. The test must also see each mechanism at least once: triangle discard, hidden
large and small tiles, hidden scan-lines, pixel discards, HZ updates, cache evictions and
back-pressure. It prints the Z-buffer reads saved (about 37 % on its scene). `tb_vdr_top_16x8`
runs the same test in the 16x16-8x8 configuration.

The unit testbenches:

* `tb_maxz_estimator` checks, by brute force over 20,000 tiles, that the tile estimate is never
  below the true maximum, and that corner and line maxima are exact.
* `tb_tile_rasterizer` checks every emitted pixel and its attributes. It checks that every
  covered pixel not emitted is behind its block, and it checks the tile-size rule.
* The remaining unit testbenches compare against small reference models.

The workloads of the original evaluation are scenes of 0.29 to 0.62 million triangles at
1600x1200. The design holds that screen size at its defaults and streams any number of
triangles. The scenes themselves are not available here.
