# Segmenting Unit: exact bucket sorting of triangles into screen segments

A segmented-screen renderer cuts the screen into small rectangles (segments,
e.g. 32 x 16 pixels) and renders each one on its own, so that its depth and
colour buffers fit in on-chip memory. Before rendering, every triangle of the
frame must be filed under each segment it touches. This RTL does that filing
in hardware, and does it *exactly*: a triangle is listed only under segments
its area really reaches, not under every segment of its bounding box. A long
thin diagonal triangle therefore lands in a narrow band of segments rather
than in a large rectangle of them.

The unit takes a stream of screen-space vertices (three per triangle). It
writes each triangle's number into a per-segment list in external memory (the
*Pointer Buffer*). It produces one (triangle, segment) pair per clock.

```
vin ─► vertex_fifo ─► input_pipeline ─► segment_generator ─► address_generator ─► external memory writes
        (16 words)     (1 triangle /     (1 segment / clock,   (1 pointer / clock,
                        3 clocks)         exact walk)            32-word blocks)
```

| file | role |
|---|---|
| `rtl/seg_pkg.sv` | widths, the vertex / setup-record / segment-hit structs, the step encoding |
| `rtl/vertex_fifo.sv` | input FIFO, first-word fall-through |
| `rtl/input_pipeline.sv` | vertex gathering, Y sort, edge-function setup |
| `rtl/seg_control.sv` | combinational step decision (the walk's "brain") |
| `rtl/segment_generator.sv` | the walk: segment coordinates and 12 edge values |
| `rtl/address_generator.sv` | per-segment list append, block chaining, frame init |
| `rtl/segmenting_unit.sv` | top level |

## The idea: walking segments with edge functions

Each triangle side k, from vertex (x_i, y_i) to vertex (x_j, y_j), defines a
linear *edge function*

    A_k(x, y) = (x - x_i)·Dy - (y - y_i)·Dx,   Dx = x_i - x_j,  Dy = y_i - y_j

which is zero on the side's line and has opposite signs on the two sides of
it. The hardware never evaluates this at arbitrary points. It keeps A_k for
all three sides at the four corners of the current segment (TL, TR, BR, BL):
twelve values. Moving one segment to the right adds `dkY = Dy·SW` to each
value, and moving one segment down subtracts `dkX = Dx·SH` (SW and SH are
the segment width and height). A step is therefore only additions. The
twelve new values come from the old ones or from saved copies:

| step | TL | TR | BR | BL |
|---|---|---|---|---|
| Load | TL_in | TR_in | TR_in − dkX | TL_in − dkX |
| Right | TR | TR + dkY | BR + dkY | BR |
| Left | TL − dkY | TL | BL | BL − dkY |
| Jump (to left of row start) | STR_TL − dkY | STR_TL | STR_BL | STR_BL − dkY |
| Row step below current | BL | BR | BR − dkX | BL − dkX |
| Row step below saved point | GP_BL | GP_BR | GP_BR − dkX | GP_BL − dkX |

Only the sign bits of the twelve values feed the decision logic.

### Sign normalisation

Vertices are sorted by Y into A (top), B, C (bottom). The sides are 0 = A–B,
1 = A–C and 2 = B–C. Whether the triangle lies on the positive or negative
side of each line depends on its winding. The input pipeline computes the
orientation value A_1(B) once and flips the sign of each side's function
(sides 0 and 2 when A_1(B) > 0, side 1 when A_1(B) < 0). After this, a point
is inside the closed triangle, boundary included, exactly when all three
values are ≥ 0, i.e. all three sign bits are 0. Zero-area triangles
(A_1(B) = 0) cover no area. They are dropped, but still use up a triangle
number.

### Overlap convention

A segment is the *closed* rectangle [sx·SW, (sx+1)·SW] × [sy·SH, (sy+1)·SH].
The triangle is the closed triangle. A segment is listed when the two share
at least one point. So a triangle with a vertex exactly on a segment corner is
listed in all four segments around that corner. This rule is conservative and
symmetric, and the testbenches compare against it exactly.

### Step decision (`seg_control`)

From the sign bits:

* **inside**: a segment corner is inside when its three sign bits are 0.
* **side meets triangle**: a segment side (two corners P, Q) meets the
  triangle's region when no triangle side has *both* P and Q strictly
  outside. This per-side test is exact for the half-plane intersection. It is
  then limited to the triangle's real extent by comparing the segment column
  with the triangle's leftmost/rightmost columns, and the row with Vertex C's
  row.
* **right needed**: TR or BR inside, or the right side meets the triangle,
  and the current column is left of the rightmost column. **Left needed**
  mirrors this.
* **good step-down point**: the bottom side meets the triangle and this is
  not the last row. The segment below is then certainly overlapped.

Each row is walked right first. When no further right step is needed, the
walk jumps to the segment left of the row's first segment, if that segment
needed a left step there, and walks left. Then it steps down one row. It steps
below the current segment if that segment is a good step-down point, and
otherwise below the last good point it saw in this row (saved as GP_*). The
priority is right > jump > left > row-down-here > row-down-saved > finish.
The walk ends in the row of Vertex C. When a record is waiting, the next
triangle is loaded in the same clock that the last segment is handed on, so
there are no idle clocks between triangles.

The walk starts in the segment of Vertex A, which is the topmost row and
column whose closed rectangle holds it. A vertex lying exactly on a boundary
therefore starts in the upper or left of the two segments. The leftmost and
rightmost columns are computed over all three vertices.

## Input pipeline timing

One vertex is read per clock. After three vertices the triangle is sorted,
and the pipeline computes the vertex segments, the position of the first
segment's top-left corner, the orientation product, and then, one side per
clock, Dx, Dy, A_k at TL and TR, dkX and dkY. Four multipliers are used: two
for the orientation test and two shared by the three sides. A setup record
therefore leaves at most every three clocks. Triangles covering three or more
segments keep the segment generator busy at one segment per clock. Smaller
ones are limited by this three-clock rate. A global enable holds every stage
while the output record waits.

## Pointer Buffer and the Address Memory (`address_generator`)

Each segment's list is a chain of 32-word blocks in external memory. Words 0
to 30 hold triangle pointers, and word 31 holds the address of the next block.
An on-chip Address Memory (SEG_MAX words, one per segment) holds the address
where each segment's next pointer will be written.

For each (pointer, segment) pair:

1. `SEGMENT_NUM = SY·ncols + SX` addresses the Address Memory (one
   multiplier, synchronous read).
2. If the word read is not word 31 of a block, the pointer is written there,
   and the Address Memory word becomes address + 1. This takes one clock.
3. If it is word 31, a fresh block is taken from the `NEXT_BLOCK` register:
   * the pointer goes to the new block's first word;
   * in a second clock, the new block's address goes into word 31 of the old
     block;
   * the Address Memory word becomes `NEXT_BLOCK + 1`;
   * `NEXT_BLOCK` advances by 32.

   The segment generator is held for that extra clock, and whenever
   `ext_ready` is low.

Back-to-back pairs for the same segment are common, because neighbouring
small triangles hit the same segment. For them, the word just written is
forwarded to the next read, so the one-clock read latency costs nothing.

**Frame start.** Every segment's list must begin at word `segment·32`. To set
this up, the two triangles of a full-screen background are sent with
`init_mode` high. Every segment they reach has its Address Memory word set to
`segment·32`, and nothing is written outside. `NEXT_BLOCK` restarts at
`SEG_MAX·32`, just past the first blocks. Pulse `frame_start` to restart
triangle numbering at 0. The background triangles then become triangles 0
and 1 of the frame, unless `frame_start` is pulsed again after them.

## Interface of `segmenting_unit`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `cfg_wl`, `cfg_hl` | in | log2 of segment width and height (5 and 4 give 32 × 16) |
| `cfg_ncols` | in | number of segment columns on screen (20 for 640 at 32 wide) |
| `init_mode` | in | Address Memory initialisation (see above) |
| `frame_start` | in | one-clock pulse: next triangle is number 0 |
| `vin_valid/vin_ready/vin` | in/out/in | vertex stream, `vin = {x[10:0], y[10:0]}`, three per triangle |
| `ext_valid/ext_ready` | out/in | external write handshake; ready low stalls the whole unit |
| `ext_addr`, `ext_data` | out | word address (EXT_AW bits), 32-bit pointer or block link |
| `busy` | out | work in flight |
| `ev_step`, `ev_drop`, `ev_new_block` | out | per-clock events for counters |

Parameters: `FIFO_DEPTH = 16`, `SEG_MAX = 1024` (segments the Address Memory
can hold), and `EXT_AW = 24` (16 M words of Pointer Buffer). The
configuration inputs must be stable while triangles are in flight.
Coordinates are unsigned 11-bit pixels. Clipping is assumed to have happened
upstream.

## Performance

`tb/tb_throughput.sv` measures the rate at the default parameters. It uses a
640 × 480 screen with 32 × 16 segments, a memory that is always ready, and a
vertex every clock. Rates are for a 100 MHz clock.

| load | clocks | rate |
|---|---|---|
| 200 triangles of 90–110 segments | 19,943 pointers + 385 block links in 20,328 clocks | 984 k triangles/s |
| 300 triangles of exactly 3 segments | 923 clocks | 32.5 M triangles/s |
| 300 triangles inside one segment | 898 clocks | 33.4 M triangles/s |

* **Large triangles.** Each new 32-word block costs one clock, so large
  triangles reach 31/32 of one segment per clock.
* **Three segments.** Here the walk exactly keeps pace with the input
  pipeline.
* **Smaller triangles.** Below three segments, the three-clock input rate is
  the limit.
* **Memory.** At 30 frames/s both extremes need about 3.4 M Pointer Buffer
  words per frame (33 k triangles × 100 segments, or 1.1 M × 3), well inside
  the 24-bit word address space.

Whether the logic closes timing at 100 MHz has not been checked here.

## Departures from the source architecture, and choices made here

* **Inside test.** The inside test is the sign-normalised "all three ≥ 0"
  rather than an XOR of sign bits. The XOR form treats points on the edges
  differently depending on the triangle's winding, which would make the walk
  miss segments that a triangle only touches.
* **Extreme columns.** The Vertex B / Vertex C row and column flags are
  replaced by comparisons with the triangle's leftmost and rightmost columns
  and last row. The effect is the same, and it also covers vertices on the
  screen's left edge.
* **Segment sizes** are powers of two, given as log2.
* **Widths** are this design's own choices: coordinates 11 bits, segment
  indices 8 bits, A values 28 bits signed, and 32-bit triangle pointers.
* **Vertex FIFO.** The depth (16) is this design's choice.
* **Init mode** writes nothing to external memory. The zeroth words of the
  first blocks are written by the frame's real triangles.
* **Out of memory.** Running out of Pointer Buffer space is not detected.
* **Outside this RTL.** The host processor, its bus, the memory controller,
  the transform stage and the hidden-surface-removal unit that reads the
  lists are not part of this RTL. Their connections appear as plain ports.

## Verification

Each block has a self-checking testbench in `tb/`. The reference model,
`tb/tb_ref_pkg.sv`, is independent of the RTL. Its overlap test uses the
separating-axis theorem on the closed triangle and closed rectangle (the two
box axes plus the three edge normals). The setup-record model computes the
same quantities straight from the definitions above.

| testbench | what it checks |
|---|---|
| `tb_vertex_fifo` | order, full/empty and level against a queue model |
| `tb_input_pipeline` | every record field against the model; drops; one record per 3 clocks |
| `tb_seg_control` | right/left/good-point decisions against the neighbours' overlap, inside flags against a point test, step priority |
| `tb_segment_generator` | segments emitted equal the overlap set, with no duplicates; N segments in N clocks across triangle boundaries |
| `tb_address_generator` | lists rebuilt from memory, number of new blocks, one write per clock plus one per new block |
| `tb_segmenting_unit` | end to end, at the default parameters (see below) |
| `tb_throughput` | clocks per segment and per triangle on the heavy and light loads (see Performance) |

`tb_segmenting_unit` runs at the default parameters on a 640 × 480 screen. It
runs two frames: 32 × 16 segments with a memory that is ready 80 % of the
time, then 64 × 32 segments with a memory that is always ready. Each frame
starts with the background triangles in init mode. It then sends large,
small, thin, grid-aligned, zero-area and clustered tiny triangles. It
rebuilds every segment's list from the memory model and compares it with the
reference. It also counts each mechanism and fails if one never happened:

* right, left, jump and both kinds of row step;
* drops;
* new blocks;
* memory stalls;
* FIFO full;
* same-segment forwarding.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/seg_pkg.sv rtl/vertex_fifo.sv rtl/input_pipeline.sv rtl/seg_control.sv \
  rtl/segment_generator.sv rtl/address_generator.sv rtl/segmenting_unit.sv \
  tb/tb_ref_pkg.sv tb/tb_segmenting_unit.sv \
  --top-module tb_segmenting_unit -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>` and has
a watchdog. The whole suite runs in seconds. Replace the testbench name to run
another one. `-Wno-fatal` is needed because the testbenches mix integer widths
freely in their reference arithmetic, which Verilator reports as width warnings.
