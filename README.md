# Pixel-planes: a frame buffer that draws its own polygons

Rendering shaded 3-D polygons on a raster display spends most of its time on
per-pixel work: deciding which pixels lie inside a polygon, which of them are
visible (z-buffer), and what colour they get. Pixel-planes moves that work
into the frame-buffer memory itself. Every pixel cell carries two one-bit
adders and a few one-bit registers, and all cells evaluate the same linear
function

    F(x, y) = A*x + B*y + C' + C''

at their own (x, y) at the same time, one bit per clock. The time to draw a
polygon therefore does not depend on its size on the screen, only on the
number of coefficient sets sent for it.

This RTL implements the complete data path from polygon vertices to the
displayed frame buffer: the pre-processor, the bit-serial broadcast, the
multiplier trees, the pixel cells, the chip address chain and the display
read-out.

## How a polygon is drawn

1. **Start of a scene:** a `CLEAR_Z` control word sets every Z register to all
   ones, meaning "infinitely far".
2. **Edges:** the pre-processor splits each convex polygon into triangles that
   share the first vertex. For each triangle it sends three edge
   equations. The coefficients are chosen so that F >= 0 on the inner side
   of the edge. At the last (sign) bit of each edge, a cell with F < 0 clears
   its enable bit En. The first edge of a triangle also sets En in every cell,
   so no extra cycle is needed for that.
3. **Depth:** the triangle's z plane is sent. While F streams in, each enabled
   cell subtracts its stored Z bit by bit (the comparator). If F < Z, the
   cell copies F into Z. Otherwise the cell is hidden and clears En.
4. **Colour:** the red, green and blue planes are sent. Every cell that is
   still enabled stores the low M bits of F into its part of the I
   register.
5. **End of scene:** a `SWAP` word copies I into P in every cell. The refresh
   path reads P independently of drawing, so the display is double-buffered.

Coefficient formulas (integer arithmetic, triangle v1 v2 v3 counter-clockwise
in a y-up frame):

- edge i->j: `A = -(yj - yi)`, `B = xj - xi`, `C' = -xi*A`, `C'' = -yi*B`
- plane for attribute q (z, R, G or B):
  `a = dy1*dq2 - dy2*dq1`, `b = dq1*dx2 - dq2*dx1`, `c = dx1*dy2 - dx2*dy1`
  (d?1 from v1 to v2, d?2 from v2 to v3), then
  `A = -a/c`, `B = -b/c`, `C' = -A*x1`, `C'' = -B*y1 + q1`.
  The value c is the same for all four planes.

## Bit-serial arithmetic and timing

Coefficients travel least significant bit first. The stream length for each
kind of set is:

| set        | clocks   | default (N = 7) |
|------------|----------|-----------------|
| edge       | K + N + 2 | 19 |
| depth      | L + N + 2 | 25 |
| each colour| M + N + 2 | 17 |

Here K = 10, L = 16, M = 8 and N is the number of screen address bits. A
triangle therefore occupies the grid for 3(K+N+2) + (L+N+2) + 3(M+N+2)
clocks. An n-sided polygon takes n-2 times that. Sets follow each other
without gaps. All arithmetic is modulo 2^length, so sending only the low
bits of each coefficient is exact as long as F itself fits.

**The multiplier tree** (`mult_tree`) is the part that takes most thought.
Each node is a one-bit register. Going down one level, the left child copies
its parent and the right child adds A*2^w, where w is the number of levels
below. In bit-serial form, multiplying by 2^w is a delay of w clocks. Each
level also adds one clock of delay, so every adder in the tree uses the same
copy of A, delayed by the tree depth. At the start of each word, the first w
bits of A at each level are masked to zero. Without this mask, the tail of
the previous word would leak into the next one. The leaves hold A*i + C for
i = 0 .. 2^levels - 1, and they lag the inputs by depth + 1 clocks. The
chip's control lines are delayed by the same amount.

**Per-chip trees:** a chip covers only a block of the screen. Its copy of the
tree therefore starts with a chain of stages. Each stage adds A or not,
according to one bit of the chip's x address, most significant bit first. The
chain is an ordinary serial multiplier by that address. A full tree over the
chip's low x bits follows the chain. The y direction works the same way.
Both directions must have the same total depth (5+4 and 4+5 for 16 x 32-cell
chips).

**Addresses:** when `addr_start` is pulsed, each chip takes a serial number
from its left neighbour (for x) and from the neighbour below (for y). It
keeps that number as its address and passes the number plus one onward, one
clock later. The chips at the left and bottom edges receive zeros. The
numbers that leave the right and top edges equal the number of chips in
each direction, so the chain can be checked there.

## Files

| module | role |
|---|---|
| `pp_pkg` | widths K, L, M, N, op codes, vertex / coefficient / control types |
| `pixel_planes` | top: pre-processor, broadcast, chip array, video bus |
| `preprocessor` = `requeue` + `coef_calc` | polygon to triangles to coefficient sets; `serial_divider` computes the slopes |
| `coef_broadcast` | parallel coefficient set to four bit streams plus control lines |
| `memory_chip` | multiplier trees, control delay, pixel array, `addr_init` x/y, `row_scan` |
| `mult_tree`, `serial_adder` | bit-serial multiplier tree and its one-bit adder |
| `pixel_cell` | Z, F, I, P, En, adder, comparator, control decoding |
| `tb/tb_pixel_planes` | end-to-end test |

Host interface: `host_item` (kind = vertex / new scene / end scene, `last`
on the last vertex of a polygon) with valid/ready. Read-out: `scan_load` with
`scan_y` and `scan_xchip` loads one row of one chip. Each `scan_shift` then
moves the next pixel, left to right, onto `video` = {B, G, R}.

## Where this departs from the original design

- **Size:** the parameters accept the 512 x 512 system (32 x 16 chips of
  16 x 32 cells: `CHIP_XBITS=5, CHIP_YBITS=4`). The default is 8 x 4 chips
  (128 x 128), because linting the full array in verilator needs roughly
  70 GB of memory. The chip itself keeps its full 16 x 32 size.
- **Integer slopes:** the plane slopes A = -a/c and B = -b/c are rounded
  toward zero. This makes smooth shading and depth coarse on shallow
  gradients. Colours outside 0..255 wrap; they are not clamped.
- **Ties:** F = Z counts as hidden.
- **Polygons:** every polygon is split into triangles, including flat-shaded
  ones. The faster flat-shaded mode (n edges, then one set of planes) is not
  built. Triangles with c <= 0 (clockwise or degenerate) are dropped.
- **Chip links:** the chip-to-chip address chain is synchronous with a start
  marker. The original design uses self-timed double-rail signalling.
- **Video:** each chip holds a contiguous block of pixels, and a wired-OR bus
  carries the selected chip's row. Interleaving neighbouring x positions
  across chips for refresh bandwidth is not built.
- **B/W mode** of the I/P registers is not built; there is no reset of the
  pixel registers (CLEAR_Z and the first edge set all state that is read).
- **Not included:** the proposed enhancements (no-F-register variant, DRAM
  cell array, min-max rectangle decoders, extra multiplier pairs), the host
  geometry system and the refresh controller.

## Simulating

    verilator --binary --timing --assert -Irtl -Itb rtl/pp_pkg.sv \
        tb/tb_pixel_planes.sv --top-module tb_pixel_planes
    ./obj_dir/Vtb_pixel_planes

The test builds a 4 x 4 screen of 2 x 2 chips. It checks the chip
addresses, renders a quadrilateral partly covered by a nearer triangle, and
swaps buffers. It then reads back every pixel and compares it with a
reference computed independently in the testbench. It also checks the grid
time of one triangle against the formula above and requires that edge
rejection, depth rejection, depth update, Z preset and swap all occur. The
largest size simulated is that 4 x 4 screen; no test runs at the default
size.
