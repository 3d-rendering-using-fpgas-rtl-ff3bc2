# Tile-based deferred 3D renderer core in SystemVerilog

This is the rasterisation half of a small 3D accelerator for handheld-size
screens (about 320x200). Instead of shading every triangle pixel and then
testing it against an external Z buffer, the screen is processed one
**32x16-pixel tile** at a time. All triangles touching a tile are first run
through a **hidden surface removal (HSR) unit** that works entirely in
on-chip memory and finds, for every pixel, the single visible triangle and
its depth. Only after that are pixels shaded, once each, in an order that
keeps all pixels of one triangle together. This removes both the wasted
shading of hidden pixels and the Z-buffer traffic to external memory.

The RTL covers everything from the per-tile triangle stream to the input of
the pixel shader:

```
 triangles of a tile ──► hsr_unit ──► grouping_unit ──► feeder + plane cache ◄── attr_setup
   (tri_*)              16 Z cells     2x2 blocks,          │                          ▲
                        + line buffers  grouped by triangle │     vertex data (attr_*) ┘
                                                            ▼
                                         interpolators (s,t,r | RHW | 8 colours)
                                                │
                                         cube_max (MAX unit) ──► fp_recip (divisor)
                                                │                        │
                                         Compute U / Compute V (fp_mul_fix) ◄┘
                                                │
                                         pix_* ──► pixel shader (not included)
```

The interpolators work from plane equations. The **attribute setup** unit
(`attr_setup`) computes them in hardware from each triangle's vertex data.
They are then kept in an on-chip **plane cache**. A triangle that spans
several tiles is therefore usually read and set up only once.

The pixel shader (a Pixel Shader 1.4 unit), the texture memory, the frame
buffer, the vertex memory and the display controller are **not** part of
this RTL. The top brings out the ports where they connect.

## The hidden surface removal unit

Everything hard in this design is here, so it gets the most room.

### One cell per tile line, lock-step triangle pipeline

`hsr_unit` holds a chain of 16 `hsr_zcell`s, one for each line of the tile.
Each cell owns a `hsr_line_buffer` with the line's 32 Z values and 32
triangle indices. The chain moves in lock step, one **step** every 34
clocks:

* At the start of a step every cell takes the triangle record that its
  predecessor finished in the previous step. Cell 0 takes a new triangle
  from the front end.
* During the step each cell visits the 32 pixels of its line, one per clock.
* Triangle *n* is on line *k* while triangle *n+1* is on line *k-1*. Up to
  16 triangles are in flight, and one triangle enters per step.

A triangle therefore needs 16 steps to cross the tile. A tile of N
triangles finishes about N + 17 steps after its first triangle entered.

### What a cell does per pixel

A pixel passes through a three-clock pipeline:

1. Read the stored Z of the pixel.
2. Run the cover test and compare Z.
3. Write the Z and the triangle index if the pixel is covered and nearer.

Each memory access has its own clock. The Z buffer is dual-ported, so the
read for pixel *j* and the write for pixel *j-2* happen in the same clock.
The 32 pixels of a line take 32 + 2 = **34 clocks**, which sets the step
length.

No multiplier is used per pixel. Z is a plane, `z = E·x + F·y + G`, so one
step along a line is a single add of E. The cells walk a **serpentine**:

* Even cells walk left to right and add E.
* Odd cells walk right to left and subtract E.

At the end of its line a cell adds F to its last Z and passes the result
on. That value is exactly the Z of the pixel where the next cell starts.
Edge intersections work the same way. The record carries the x of all three
edges on the current line, and each cell adds the edge slopes to get the
next line's values.

### Cover test and `mode_y`

The host sorts each triangle's vertices by y (v0 at the top). The three
edges are:

* edge 0: v0–v1
* edge 1: v0–v2, the long edge
* edge 2: v1–v2

Each record carries `mode_y`, which says which edges bound the current line.
A cell computes the `mode_y` of the next line for its successor:

| mode_y | line y | covered pixels x |
|---|---|---|
| 0 | outside [y0, y2] | none |
| 1 | y0 < y ≤ y1 | between edges 0 and 1: left ≤ x < right |
| 2 | y1 < y < y2 | between edges 1 and 2: left ≤ x < right |
| 3 | y = y0 | x = x0, or the whole top edge (both ends) if y0 = y1 |
| 4 | y = y2 | x = x2 |

This is a top-left fill rule. Left edges and horizontal top edges are
included, right edges are excluded, and both v0 and v2 are always drawn.
Pixels are sampled at integer coordinates.

To keep the exact cases exact, each edge's intersection is evaluated from an
anchor vertex, `x = x_anchor + A·(y − y_anchor)`:

* edge 0 is anchored at v1
* edge 1 is anchored at v0
* edge 2 is anchored at v2

On the anchor's own line the Q16.16 value is therefore exactly the vertex x.
The incremental additions in the cells are modulo-2³² sums of the same
products, so they reproduce that formula bit for bit.

### Formats

| quantity | format |
|---|---|
| screen coordinates, vertices | signed 16-bit integers |
| edge intersections and slopes (dx per line) | signed Q16.16 |
| Z, and the plane coefficients E, F, G | signed Q8.24 |
| Z buffer word | 24 bits (the fraction) |
| triangle index | 12 bits; all ones (`NO_TRI`) means "no triangle" |

Inside a triangle Z lies in [0, 1). The 8 integer bits let the cells carry
Z across pixels the triangle does not cover without overflowing. The host
computes the slopes and E, F, G. The hardware derives only the tile's first
line: `hsr_compute_m0` gives the three intersections and `mode_y`, and
`hsr_compute_z0` gives Z at the tile origin.

### Double buffering and clearing

Every line buffer has two banks:

* While the cells fill bank *b* with one tile, the grouping unit reads the
  previous tile from the other bank.
* The next tile's first triangle can enter as soon as its bank is free. It
  does not wait for the previous tile to drain out of the chain, so two
  tiles overlap in the chain.
* A bank is free once the reader has released it with `tile_release`.
* Finished tiles are offered in order on `tile_valid` / `tile_bank` /
  `tile_x` / `tile_y`.

There is no clear pass. The record of a tile's first triangle carries a
`first` flag, and that triangle writes every pixel. Where it does not cover
a pixel, it writes the farthest Z and `NO_TRI`. A tile with no triangles is
sent as a single record with the `empty` flag set.

## Grouping unit

Shading reads each triangle's data from external memory. Texture level
selection also works on 2x2 pixel blocks. The grouping unit therefore hands
out the tile as 2x2 blocks ordered by triangle:

1. It copies the finished tile's indices and Z into registers, one column
   of all 16 lines per clock, and releases the HSR bank.
2. It makes passes over the 128 blocks of the tile. A pass emits every block
   that holds a not-yet-emitted pixel of the current triangle. The block
   carries a 4-bit mask of those pixels, and they are marked done.
3. While scanning, it remembers the first block that holds a pixel of
   another triangle. That block starts the next pass, because all earlier
   blocks are already done.

A block shared by k triangles comes out k times with disjoint masks. A pass
costs at most 128 clocks, so a tile costs about 33 + 128 × (visible
triangles) clocks at worst.

## Shading front end

In `r3d_top` a small feeder takes each block:

* It first gets the planes of the block's triangle from the first place
  that has them:
  * **The current-triangle register.** It serves consecutive blocks of one
    triangle, which the grouping order makes the common case.
  * **The plane cache.** It holds `CACHE_N = 32` entries, is direct mapped
    on the triangle index, and answers in one clock. A triangle that spans
    several tiles is found here in the later tiles.
  * **A miss.** The feeder reads the triangle's vertex data (`attr_*`, one
    clock read latency): the vertex positions, and for each of the 12
    attributes its value at each vertex. It issues the 12 attributes to
    `attr_setup` one per clock and collects the planes. About 43 clocks
    later it writes them into the cache.
* It then issues the block's four pixels, one per clock. Uncovered block
  members are issued too, flagged `covered = 0`, because the shader works on
  whole 2x2 blocks.

All arithmetic here is IEEE single precision:

* **Interpolators**, one `interpolator` instance each for s, t, r (3
  channels), RHW (1) and colours (8: diffuse and specular RGBA). Each
  channel evaluates `a·x + b·y + c` with two float×integer multipliers
  (`fp_mul_int`, 3 clocks) and two adders (`fp_add`, 5 clocks): 13 clocks.
* **MAX unit** (`cube_max`, 1 clock). In cube-map mode it picks the
  largest-magnitude component of (s, t, r), swaps and negates the other two
  following the usual OpenGL face table, and sends |major| to the divisor.
  Otherwise it passes RHW, s and t through, so the same divisor serves both
  modes.
* **Divisor** (`fp_recip`, 8 clocks). It starts from a linear estimate of
  1/D with D in [0.5, 1) and runs three Newton–Raphson iterations
  `x ← x(2 − Dx)`, two clocks each, then rounds. The result is within one
  unit in the last place.
* **Compute U / V** (`fp_mul_fix`, 3 clocks) multiply by the reciprocal and
  deliver signed Q16.16, rounded to nearest and saturated.

A pixel leaves on `pix_valid` / `pix` 25 clocks after the feeder issues it.
`pix` carries:

* the triangle index, x, y and Z
* the covered flag
* the cube flag and face (0..5 = +X, −X, +Y, −Y, +Z, −Z)
* u, v
* the 8 colour channels

Special values are kept simple:

* denormal inputs are read as zero, and underflow flushes to zero
* infinities pass through
* NaN is not produced

## Attribute setup

The interpolators need, for each attribute, a plane `p = a·x + b·y + c`.
`attr_setup` derives it from the attribute's values p0, p1, p2 at the three
screen vertices:

```
det = dx1·dy2 − dx2·dy1            (dxk = xk − x0, dyk = yk − y0; exact integers)
a   = ((p1 − p0)·dy2 − (p2 − p0)·dy1) / det
b   = ((p2 − p0)·dx1 − (p1 − p0)·dx2) / det
c   = p0 − (a·x0 + b·y0)
```

The unit is one fixed pipeline built from the same float units:

* `fp_mul_int` converts det to float and multiplies by the coordinate
  differences.
* `fp_recip` gives 1/det.
* `fp_add` forms the differences and sums.
* A plain float multiplier (`fp_mul`) scales the numerators by 1/det.

Timing:

* It takes one attribute per clock and answers 29 clocks later.
* A zero-area triangle gets a constant plane (a = b = 0, c = p0). Such a
  triangle can still own its vertex pixels under the fill rule.

## Files

| file | contents |
|---|---|
| `rtl/r3d_pkg.sv` | sizes, formats, record structs, `mode_y` |
| `rtl/hsr_compute_m0.sv`, `rtl/hsr_compute_z0.sv` | tile-first-line setup |
| `rtl/hsr_zcell.sv`, `rtl/hsr_line_buffer.sv`, `rtl/hsr_unit.sv` | HSR |
| `rtl/grouping_unit.sv` | grouping unit |
| `rtl/fp_add.sv`, `rtl/fp_mul_int.sv`, `rtl/fp_recip.sv`, `rtl/fp_mul_fix.sv` | float units |
| `rtl/interpolator.sv`, `rtl/cube_max.sv`, `rtl/r3d_delay.sv` | shading front end |
| `rtl/attr_setup.sv`, `rtl/fp_mul.sv` | attribute setup |
| `rtl/r3d_top.sv` | top |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_r3d_frame` (a whole frame); `tb_ref_pkg` and `tb_fp_pkg` hold the reference models |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/r3d_pkg.sv tb/tb_ref_pkg.sv tb/tb_fp_pkg.sv tb/tb_r3d_top.sv \
    --top-module tb_r3d_top -o sim && ./obj_dir/sim
```

Replace `tb_r3d_top` with any other testbench name. `-Wno-fatal` is needed
because Verilator's lint warnings would otherwise stop the build. The
warnings that remain are style notes, such as unused struct fields and
unconnected valid outputs of units running in lock step.

`tb_r3d_top` is the end-to-end test, and it runs the top at its default
size. It feeds 8 tiles of random triangles, one of them empty and half of
the triangles cube-mapped, and checks the following:

* every visible pixel comes out exactly once
* each pixel has the reference triangle and Z
* colours equal the plane equations
* u, v equal s/RHW and t/RHW, or the cube face coordinates, within the
  float pipeline's precision

The memory model serves vertex values taken from random planes. Every plane
the design builds must match its generating plane at the triangle's
vertices and centre. Pixels are then checked against the plane the design
actually used.

It also counts these events and fails if any of them never happens:

* tiles overlapping in the HSR chain
* a tile waiting for a bank
* partly covered blocks
* shading data being reused and re-read
* plane setups and plane cache hits (one triangle spans two tiles)
* every cube face being used

`tb_r3d_frame` renders one whole 320x200 frame, the display size the design
targets:

* 160 random triangles, up to about 90 pixels across
* sorted into the 10 × 13 tiles the way a host would
* the same pixel checks as above

One run took 95 240 clocks for 26 057 shaded pixels, with 231 plane setups
and 229 plane cache hits. That is about 210 frames per second at 20 MHz for
such a light scene.

The unit testbenches check the timing claims as well: 34 clocks per line,
one triangle per step, and the pipeline latencies of 3, 5, 8 and 13 clocks.

## Where this departs from, or goes beyond, the original design

* **16 Z cells.** The original describes 16 cells, one per tile line, but
  its FPGA build used only 4. How 4 cells would share 16 lines is not
  described, so this RTL has one cell per line (`N_CELLS = 16`).
* **Step coefficients.** The step along a line adds E and the step to the
  next line adds F, as the plane equation `z = E·x + F·y + G` implies. The
  original prose calls these steps "A" and "B" in places.
* **Not the original's choices.** The following are this design's own:
  * the number formats listed above
  * the edge anchors
  * the clearing done by the first triangle of a tile
  * the bank hand-over protocol
  * all valid/ready handshakes
  * the reset, which is asynchronous and active low
  * the grouping unit's copy-and-scan method
  * the feeder
  * the OpenGL cube face table
  * the Newton–Raphson divisor
* **Attribute setup and plane cache.** The original only says that the
  planes are computed in hardware and cached in Block RAM. The following
  are this design's own:
  * the setup formula and its operation order
  * the cache size and its direct mapping
  * the vertex data layout (`tri_vtx_t`)
  * the constant plane for zero-area triangles
* **Not included.** The pixel shader, including texture sampling, mipmap
  and anisotropic filtering, is not included, because its behaviour is
  defined by the external Pixel Shader 1.4 specification. The external
  SRAMs and the display controller are not included either.
* **Not mapped to hardware.** Nothing here has been mapped to the original
  FPGA (a Virtex 2000E, targeted at 20 MHz), so area and clock rate are
  unverified.
