# A fixed-function OpenGL pipeline in SystemVerilog

This design is a small graphics accelerator that draws OpenGL triangles
entirely in hardware. A host sends a stream of OpenGL calls (`glBegin`,
`glColor`, `glVertex`, the matrix calls, `glViewport`, `glEnd`), encoded as
16-bit instructions with 32-bit fixed-point arguments. The pipeline keeps
the model-view and projection matrix stacks in block RAM and transforms
every vertex into window coordinates. It groups the vertices into triangles
and scan-converts them with barycentric colour interpolation into a
double-buffered 320×240 frame. That frame is shown on a 640×480 VGA signal,
with each stored pixel covering a 2×2 block of screen pixels. There is no
CPU in the drawing path: everything from instruction fetch to the sync
pulses is logic.

```
 host ──► instruction memory ──► fetch ──► decode ──► transform unit ──► vertex buffer
          (4096 × 32 bit)        (stage 1)  (stage 2)  (matrix stacks,      (3 vertices +
                                                        shared row array,    3 colours)
                                                        divide, viewport)         │
                                                                                  ▼
 VGA  ◄── vga_ctrl ◄── frame buffer (2 × 320×240×3 bit) ◄──────────────── rasterizer
 640×480   pixel         swap at vblank, clear                  bounding box, edge functions,
 @60 Hz    doubling      before drawing again                   3 dividers, colour threshold
```

Every stage talks to the next over a valid/ready handshake, so
back-pressure reaches all the way to the host. A frame buffer that is
being cleared holds the rasterizer. A busy rasterizer holds the vertex
buffer, which holds the transform unit. A matrix update holds fetch and
decode, and a full instruction memory halts the host. The whole design runs
on one 25 MHz clock, the VGA pixel clock.

## Numbers: Q20.11 fixed point

All geometry and colour values are 32-bit two's-complement fixed point:
1 sign bit, 20 integer bits and 11 fraction bits. One unit is `0x800` and
the resolution is 2⁻¹¹. The arithmetic units are:

| unit | behaviour | latency |
|---|---|---|
| `fxp_add` | a + b, wraps on overflow | combinational |
| `fxp_mul` | 64-bit product shifted right by 11 (rounds toward −∞); wraps on overflow | combinational |
| `fxp_div` | a / b; the quotient is truncated toward zero; saturates to ±max on overflow or divide by zero | 8 clocks, one new division per clock |
| `fxp_from_float` | IEEE single → Q20.11, truncating; saturates | combinational |

The divider has 8 pipeline stages. The first takes the magnitudes of both
operands. Each of the other seven produces 6 bits of a 42-bit restoring
division. Division is the largest and slowest unit: the design uses three
dividers for the perspective divide and three in the rasterizer. The
converter sits on the host write port (see `srv_float` below). Everything
behind it works on fixed-point words.

## The instruction stream

An instruction is 16 bits:

| bits | 15 | 14–8 | 7–0 |
|---|---|---|---|
| field | type (0 immediate, 1 data) | immediate value, or number of 32-bit data words | opcode |

| call | type | data | opcode |
|---|---|---|---|
| glBegin(TRIANGLES) | 0 | 0 | `0x00` |
| glEnd | 0 | – | `0x01` |
| glVertex x, y, z, w | 1 | 4 | `0x80` |
| glColor r, g, b, a | 1 | 4 | `0x40` |
| glLoadIdentity | 0 | – | `0x10` |
| glLoadMatrix m[16] | 1 | 16 | `0x11` |
| glMatrixMode | 0 | 1 model-view, 2 projection, 4 texture | `0x12` |
| glMultMatrix m[16] | 1 | 16 | `0x13` |
| glPopMatrix | 0 | – | `0x14` |
| glPushMatrix | 0 | – | `0x15` |
| glRotate sin θ, cos θ | 1 | 2 | `0x18` |
| glScale sx, sy, sz | 1 | 3 | `0x19` |
| glTranslate tx, ty, tz | 1 | 3 | `0x1A` |
| glViewport x, y, w, h | 1 | 4 | `0x1B` |

The memory is 32 bits wide. The upper half of a word is always an
instruction. The lower half can hold a second immediate instruction, which
saves a fetch. If the lower half is unused, it must hold the filler
`16'h00FF`, an immediate with an unused opcode. It must also be the filler
when the upper instruction carries data. The N data words of a data
instruction follow it in memory, one value per word. Matrices are sent row
by row. `glRotate` carries the sine and cosine of the angle rather than an
angle and an axis, so it always rotates about the z axis.

## Fetch and decode (`fetch_decode`, `instr_bram`)

The instruction memory (`instr_bram`) has 4096 words. It has one write port
for the host and five synchronous read ports. Port `addr`/`dout` is for the
fetch stage. Port `addr2` returns four consecutive words on
`dout1`–`dout4` for the decode stage.

**Filling and draining.** The host writes words in order from address 0.
The memory bound register (MBR) holds the address of the last word
written. The fetch stage never runs past it, so the pipeline simply waits
for the host. The instruction halt register (IHR) is set when the host
writes the last address (4095), and `instr_halt` tells the host to stop.
The fetch stage eventually executes word 4095. PC, MBR and IHR then return
to zero, the halt is lifted, and the host continues writing from address
0. So a program of any length streams through the memory in 4096-word
fills. This refill protocol is this design's own.

**Packed pairs.** When the lower half of a fetched word is a second
instruction, it is buffered and decoded in the next clock while PC stays
put.

**Data fetch.** For a data instruction, the data address register (DAR)
starts at PC+1. Each access returns four words through the second read
port. The data count register (DCR) counts down the words still to come.
Each group of four words becomes one command to the transform unit, and PC
then skips past the data. An immediate instruction costs two clocks. A
data instruction costs two clocks plus two per group of four words, not
counting stalls.

**Registers held in decode:**

| register | width | role |
|---|---|---|
| SPMV | 8 | row address of the top model-view matrix (32 matrices, 128 rows) |
| SPP | 4 | row address of the top projection matrix (2 matrices, 8 rows) |
| MMR | 3 | current matrix mode |
| CSR | 4 | compute select for the shared array; travels with the command |
| viewport X, Y, width, height | 32 each | the viewport |
| colour | 3 × 32 | the current colour, attached to every vertex |

`glPushMatrix` moves the stack pointer up by 4 rows. The copy itself is a
transform-unit command. `glPopMatrix` only moves the pointer down.
A push past the top of a stack or a pop at its bottom is ignored. A
viewport change waits until the transform unit is idle, so vertices already
in flight keep the old viewport. `glMatrixMode(TEXTURE)` is accepted, but
there is no texture stack: matrix commands in that mode are dropped.

Everything that touches a matrix stack or the vertex stream leaves decode
as one `gpu_cmd_t` over valid/ready. While the transform unit refuses a
command, the whole front end freezes (`decode_stalled`).

## Matrix stacks and the shared row array (`transform_unit`, `row_compute`, `matrix_stack`)

This is the most involved part of the design.

**Storage.** Each stack is a block RAM whose entry is one matrix row: four
Q20.11 values, 128 bits. A 4×4 matrix therefore takes four consecutive
addresses. The model-view stack has 128 rows (32 matrices, 2 KB), and the
projection stack has 8 rows (2 matrices). A stack pointer is the row
address of the top matrix. After reset, the transform unit spends 4 clocks
writing the identity into rows 0–3 of both stacks.

**Row convention.** The RAM holds the rows of the current matrix M.
OpenGL multiplies the current matrix on the right, M ← M·T. So every row r
of M is replaced by r·T, and each row can be updated independently of the
others. That is why the hardware can update *one row per clock* with a
single small array.

**The shared array (`row_compute`).** It has four multipliers and an adder
tree of two adders feeding a third. Input multiplexers pick the
multiplier operands from the current row M0..M3 and the instruction data
D0..D3. Output multiplexers pick, per column, the old value or a computed
one:

| select | result |
|---|---|
| SCALE | row′ = (M0·sx, M1·sy, M2·sz, M3) |
| TRANSLATE | row′ = (M0, M1, M2, M0·tx + M1·ty + M2·tz + M3) |
| ROTATE (z) | row′ = (M0·c + M1·s, M1·c − M0·s, M2, M3); the first adder subtracts |
| DOT3 | dot = M0·D0 + M1·D1 + M2·D2 + M3 (a point with w = 1) |
| DOT4 | dot = M0·D0 + M1·D1 + M2·D2 + M3·D3 (a vertex with its w; one element of M·T) |

**Update sequences.** Each operation runs as a short pipeline: a row read
in one clock is computed and written back in the next, while the following
row is read. The stack RAM is synchronous, so the first row must be read
before the operation starts. The idle unit therefore keeps reading row 0
of the top matrix named by whatever command decode is offering. When the
command is accepted, its first row is already on the RAM output.

| call | work | transform unit busy |
|---|---|---|
| glScale / glTranslate / glRotate | 4 rows read → array → written back | 4 clocks |
| glLoadIdentity | 4 rows written | 4 clocks |
| glLoadMatrix | each group of 4 data words is written as a row | 1 clock per row |
| glPushMatrix | 4 rows copied one matrix higher | 4 clocks |
| glMultMatrix | rows 0–2 of T are stored; after row 3, 16 DOT4 products, one element of M·T per clock | 20 clocks |

A row update therefore holds decode for exactly four clocks, one per
row.

## Vertex transformation (`transform_unit`)

A `glVertex` command goes through four steps in three pipeline stages.
Each stage has its own state machine. Registers for the eye and clip
coordinates sit between them.

1. **Model-view.** eye = MV·(x, y, z, w), one row per clock on the shared
   array with DOT4 (4 clocks, with row 0 read while idle).
2. **Projection.** clip = P·eye, on a second, local copy of the array with
   DOT4 (5 clocks).
3. **Perspective division.** ndc = clip.xyz / clip.w in three parallel
   `fxp_div` units (8 clocks plus one to issue). This step and the next
   form the last stage.
4. **Viewport.** x_w = ndc.x·W/2 + (X + W/2), y_w = ndc.y·H/2 + (Y + H/2),
   z_w = ndc.z/2 + 1/2.

The result leaves with the colour that was current when the vertex was
issued. A vertex takes about 20 clocks from entry to exit. The stages
overlap, so back-to-back vertices leave about every 12 clocks; the divider
stage is the bottleneck. A model-view update can run in the front stage while
earlier vertices are still being projected.

Two rules keep the order right:
- `glBegin` and `glEnd` are taken only when the later stages are empty.
  They pass through as markers, in order with the vertices.
- Projection-stack commands wait until the projection stage is idle.

## Triangle assembly (`vertex_buffer`)

A pixel buffer (x, y, z) and a colour buffer (r, g, b) of three entries
each are filled through two address registers, PBAR and CBAR. After the
third vertex, the triangle is offered to the rasterizer, and no further
vertex is accepted until it is taken. `glBegin` resets the address
registers. A triangle left incomplete by `glEnd` is dropped. `glEnd` itself
is forwarded to the rasterizer as the end-of-frame marker.

## Rasterizer (`rasterizer`)

For vertices (x0,y0), (x1,y1), (x2,y2), the rasterizer sets up three edge
functions:

    f12(x,y) = (y1−y2)·x + (x2−x1)·y + x1·y2 − x2·y1      (f20, f01 likewise)

It then scans the bounding box, floor(min) to ceil(max) and clipped to the
screen, one pixel per clock, row by row. For each pixel it computes the
barycentric coordinates

    α = f12(x,y)/f12(x0,y0),  β = f20(x,y)/f20(x1,y1),  γ = f01(x,y)/f01(x2,y2)

with three pipelined dividers. The pixel is inside when α, β and γ are all
greater than zero. Each colour channel is interpolated as
c = α·c0 + β·c1 + γ·c2. The frame buffer keeps one bit per channel, so the
bit is set when c exceeds the threshold `0x170`, which is 0.18 in
Q20.11. Even so, a triangle with different vertex colours shows visible
colour regions.

Timing per triangle: 2 set-up clocks, then one clock per box pixel. A
pixel's write leaves 9 clocks after the pixel was scanned, so the
rasterizer is busy for 2 + (box area) + 9 clocks. A triangle with zero area
or a box entirely off screen draws nothing. There is no depth test.

The rasterizer takes a triangle only while the frame buffer reports
`fb_ready`. When the end-of-frame marker arrives, it pulses `raster_finish`
and waits one clock for `fb_ready` to fall.

## Frame buffer and display (`frame_buffer`, `vga_ctrl`)

**Double buffering.** There are two 320×240×3-bit buffers, one displayed
and one drawn into. `raster_finish` requests a swap, which takes place at
the next vertical blanking so the picture never tears. The buffer that has
just left the display is then cleared at one pixel per clock (76,800
clocks, about 3 ms), so a moving object leaves no trail. `fb_ready` is low
from the swap request until the clear is done. Both buffers are cleared
after reset.

**VGA timing** (one clock = one pixel at 25 MHz):

| | active | sync low | total |
|---|---|---|---|
| horizontal | 0–639 | 659–754 | 800 |
| vertical | 0–479 | 489–490 | 525 |

Both syncs are active low. Each frame-buffer pixel is shown as a 2×2 block.
Row 0 of the buffer is the *bottom* screen line, so y grows upward as in
OpenGL window coordinates. The outputs are registered one clock behind the
counters, to match the one-clock read of the frame buffer. `vblank` is a
one-clock pulse at the first blank line. A frame is 420,000 clocks
(16.8 ms).

## Where this design departs from the original

This RTL follows a published student design for a Xilinx Virtex-II Pro
board. These are the places where it deliberately differs, or where the
original left the choice open:

- **glMultMatrix** takes 20 clocks after its last row of data. The original
  gives no schedule for a full 4×4 product on the shared array.
- **Rotation about z only.** The instruction carries only sin and cos, so
  no axis can be given.
- **No texture matrix stack.**
- **One vertex per stage.** There are no queues between the three
  transform stages.
- **Full-precision divider.** The original reduced the divider's precision
  to save area, without saying by how much.
- **Frame buffer size.** The main configuration, 320×240 with 3-bit colour
  and double buffering, is built. An earlier 640×480 single-bit frame
  buffer, shown in one of the original diagrams, is not.
- **One 25 MHz clock.** The original quotes VGA timing in 100 MHz clock
  cycles.
- **Own choices:** the filler code, the memory refill protocol, the swap
  at vertical blanking, y pointing upward, rounding and overflow rules, and
  the reset values (viewport 0, 0, 320, 240; colour white).

**Not included:** the software on the board's embedded processor that
receives instructions over Ethernet and writes them into the instruction
memory; the Ethernet link itself; and the host-side OpenGL library. The
memory write port and `instr_halt` are top-level ports in their place.

**Float data on the write port.** A word written with `srv_float` high is
taken as a single-precision float. `fxp_from_float` converts it to Q20.11
before it is stored, so a host may send vertex and matrix data as floats.
Instruction words are always written with `srv_float` low. Placing the
converter there is this design's choice.

## Simulating

Each module in `rtl/` has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/gpu_pkg.sv tb/tb_gpu_top.sv --top-module tb_gpu_top
./obj_dir/Vtb_gpu_top
```

Replace `tb_gpu_top` with any other testbench name. `--assert` turns on
the assertions in `gpu_top`. They check that each valid/ready link between
stages holds its valid and data until they are taken. They also check that
no triangle is accepted while the frame buffer is not ready. The testbenches
initialise everything they read, so they also run in a two-state simulator
with random initial values.

`tb_gpu_top` runs the complete design at its default size: a 4096-word
instruction memory, a 320×240 frame and 640×480 VGA. It takes a few
seconds.

- A host model writes a program and honours `instr_halt`. Filler words push
  the program past 4096 words, so the memory fills, halts the host and
  wraps.
- The program sets the viewport and a projection with a z-dependent w. It
  uses push, translate, rotate, scale and multiply on the model-view stack,
  and draws two coloured triangles in frame 1.
- Frame 2 pops the matrix and draws one moved triangle. Its colour and
  vertex data are sent as floats.
- After each swap, the testbench captures the whole VGA frame. It checks
  every 2×2 block and compares each pixel with a floating-point model of
  transform and rasterization. Pixels within rounding distance of an edge
  or of the colour threshold are not compared.
- It also counts decode stalls, packed pairs, halts, wraps, float conversions, row updates,
  matrix multiplies, pushes, divisions, triangles, vertex-buffer
  back-pressure, waits for the clear, clears and swaps, and fails if any
  never happened.

The unit testbenches check the following:

- **Arithmetic units:** compared against real arithmetic, and the divider's
  8-clock latency is checked.
- **Fetch/decode:** runs on a 64-word memory, covering halt and wrap.
- **Transform unit:** checked against a floating-point model (including
  w other than 1), and so is the 4-clock update stall. A burst of random
  vertices under random output back-pressure must come out in order, and
  faster than one vertex at a time would allow.
- **Rasterizer:** random triangles, and two small ones 10 to 14 pixels
  across, are compared against a floating-point model, and so is its busy
  time.
- **VGA controller:** the sync positions of two full frames are measured.

## Trust and limits

All testbenches pass. Each of them also fails against a deliberately
broken copy of its module. The design has been linted and synthesized
with generic open-source tools. It has not been placed on an FPGA, so the
clock rate is unproven. The long combinational paths are the multiplier and
adder chains in the row array and the rasterizer's set-up and
colour stages. They may need extra pipeline registers above about 25 MHz on
older parts. Results are exact to the fixed-point grid, not to real
arithmetic. Expect edge pixels to differ from a floating-point renderer by
one pixel.
