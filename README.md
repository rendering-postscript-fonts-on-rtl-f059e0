# An outline-font rasteriser for an FPGA co-processor

A printer or page renderer spends much of its time turning character outlines into bitmaps. This
design does that job in hardware. A host loads one character, described by PostScript-style path
operators (`moveto`, `lineto`, `curveto`, `closepath`, `fill`). The FPGA then does three things:

1. It draws the outline: straight lines with Bresenham's algorithm, and cubic Bézier curves by
   recursive halving until the pieces are straight.
2. It fills the inside with the even-odd rule, one scanline at a time.
3. It leaves a packed 1-bit-per-pixel bitmap in an SRAM on the same card.

The architecture comes from a published FPGA font processor for Xilinx Virtex parts. This RTL is
an independent SystemVerilog implementation. The published work leaves many details open: widths,
depths, handshakes, memory layout, the curve tolerance. This design makes its own choices for
those. They are marked below and in the opening comment of each file.

## Block structure

```
            host write port (16 bit)                      start / busy / done / error
                   |                                               |
            +-------------+      bytes      +--------------------------------+
            | input_mem   |---------------->| font_ctrl  fetch/decode/execute|
            +-------------+                 +--------------------------------+
                 | start/done handshakes to each element, line-input selection
   +-------------+-------------+------------------+----------------+----------------+
   |             |             |                  |                |                |
moveto_unit  bezier_flatten  point_fifo       line_render     closepath_unit    scan_fill
(current pt, (bez_stack  ---> (points) ----->  (Bresenham) <--- (closing line)      |
 subpath      inside)                              |                                |
 start)                                            |  draw phase          image_cache
                                                   v                      (32 lines)|
                                        external SRAM port  <--- fill phase --------+
```

| File | Role |
|---|---|
| `font_pkg.sv` | Coordinate and point types, op-codes, image address function |
| `input_mem.sv` | 512-byte program memory: 16-bit host writes, 8-bit reads |
| `font_ctrl.sv` | Fetch/decode/execute state machine; drives every element and picks the line renderer's inputs |
| `moveto_unit.sv` | Current point and subpath start registers |
| `line_render.sv` | Bresenham line drawer, one pixel per clock, straight into the SRAM |
| `bezier_flatten.sv` | Recursive subdivision: midpoint network, flatness test, stack control |
| `bez_stack.sv` | On-chip stack of pending half-curves |
| `point_fifo.sv` | Buffer from the curve flattener to the line renderer |
| `closepath_unit.sv` | Closing line back to the subpath start, only when needed |
| `scan_fill.sv` | Even-odd scanline filler with a small edge stack |
| `image_cache.sv` | 32-scanline, 1-bit-per-pixel cache; loads scanlines from the SRAM and writes them back packed |
| `font_processor.sv` | Top level: wires the above together and steers the SRAM port |

## Program format

The program is a byte stream. Each operator has a one-byte one-hot op-code followed by its
operands. Every operand is one 8-bit coordinate.

| Operator | Op-code | Operands | Bytes | Action |
|---|---|---|---|---|
| `moveto x y` | `0x01` | 2 | 3 | Start a subpath at (x, y) |
| `lineto x y` | `0x02` | 2 | 3 | Draw from the current point to (x, y) |
| `curveto x1 y1 x2 y2 x3 y3` | `0x04` | 6 | 7 | Draw a cubic Bézier: current point, two control points, end point |
| `closepath` | `0x08` | 0 | 1 | Draw back to the subpath start, if not already there |
| `fill` | `0x10` | 0 | 1 | Fill the outline and finish the character |

The one-hot codes make decoding a single bit test. Which operator gets which code is this design's
choice: they follow the order above. At these sizes, 9 `moveto`, 45 `lineto`, 15 `curveto` and 9
`closepath` take exactly 276 bytes. That is the size quoted for a complex character with 54
straight segments, 15 curves and 9 subpaths, so one byte per coordinate fits that figure.

The host writes the program as 16-bit words (`host_wr_addr` is a word address). Byte 2k goes in
bits [7:0] of word k. The host then pulses `start`. `done` pulses once the last scanline has been
written back. An op-code outside the table stops the run with `error` set.

## Image memory layout

The external SRAM has an 8-bit data bus and a 16-bit address: 64 KB. During drawing it holds a
256 × 256 image with one byte per pixel: pixel (x, y) is byte `{y, x}`. Black is 1 and white is 0.
The line renderer writes the byte value 1.

The result is packed and written back into the same memory: 32 bytes per scanline, in the first
32 bytes of the scanline's own row. Byte `{y, b}` holds pixels 8b … 8b+7, with the leftmost pixel in
bit 0. Everything else in the row still holds the unpacked outline. The packed location and the bit
order are this design's choices.

The host must clear the image before it starts a character. The hardware never clears it.

The SRAM port is a plain synchronous single-cycle port (`mem_en`, `mem_we`, `mem_addr`,
`mem_wdata`, `mem_rdata`). Read data comes back in the next cycle, and there are no wait states.
The line renderer owns the port while the outline is drawn; the image cache owns it during fill.
`fill` is always the last operator, so the two never compete.

## Curves: recursive subdivision (`bezier_flatten`)

This is the most intricate block. Each iteration works on one curve (P1, P2, P3, P4) held in
registers.

**Flatness test.** Two 2-D cross products measure how far the control points lie from the chord
P1→P4:

```
delta1 = (P2x-P1x)(P4y-P1y) - (P2y-P1y)(P4x-P1x)
delta2 = (P3x-P1x)(P4y-P1y) - (P3y-P1y)(P4x-P1x)
```

Both are zero for a straight curve. The curve counts as flat when `|delta1|` and `|delta2|` are
both below `FLAT_TOL`.

**Split.** If the curve is not flat, the de Casteljau midpoint network halves it in one cycle,
using only adds and shifts:

```
L2 = (P1+P2)/2   H = (P2+P3)/2   R3 = (P3+P4)/2
L3 = (L2+H)/2    R2 = (H+R3)/2
L4 = R1 = (L3+R2)/2
left  = P1, L2, L3, L4        right = R1, R2, R3, P4
```

The right half is pushed onto `bez_stack`, together with its depth. The left half becomes the
current curve. Because the left half is always worked on first, points come out in order along the
curve.

**Emit and pop.** When the curve is flat, or `MAX_DEPTH` halvings deep, its end point is rounded to
a pixel and written to `point_fifo`. The top of the stack is then popped. The curve is finished
when a point is emitted with the stack empty. The last point emitted is always P4 exactly.

**Fixed point.** Coordinates inside the flattener carry `FRAC` = 4 fraction bits. Repeated halving
of plain integers would drift off the curve.

**Feeding the line renderer.** The control logic pops points from the FIFO. For each one it draws a
line from the current point to that point, then moves the current point there. A full FIFO stalls
the flattener.

**Cost.** Splitting takes 1 cycle per level. Emitting takes 1 cycle per flat piece, plus any FIFO
stall, and popping takes 1 more. A curve that is already straight finishes in 3 cycles. Halving and
the flatness test run in the same cycle; that is the long combinational path of the design. The
loop cannot be pipelined without reordering the work, because each step needs the previous
result.

| Parameter | Default | Meaning |
|---|---|---|
| `FRAC` | 4 | Fraction bits below a pixel |
| `FLAT_TOL` | 1024 | Tolerance in (1/16 pixel)² units, which is 4 pixel² |
| `MAX_DEPTH` | 10 | Most halvings of one curve, so at most 1024 pieces |
| `STACK_DEPTH` | 16 | Stack entries; must be at least `MAX_DEPTH` |

All four values are this design's choices.

## Fill: scanline cache and even-odd filler

The fill works on one scanline at a time and needs single-bit access. The SRAM, however, stores a
byte per pixel. `image_cache` bridges the two. It holds 32 scanlines of 256 bits, which is 8192 bits
or two 4-Kbit block RAMs, arranged as a ring: scanline y lives in slot y mod 32. The cache's
controller owns the SRAM port and does one action at a time:

- **Write back** a scanline the filler has finished: 32 cycles, 8 pixels per byte. Write-back goes
  first, because it frees a slot.
- **Load** the next scanline when a slot is free: 256 reads. A pixel is black if its byte is
  non-zero.

The SRAM traffic for a whole image is therefore 256 × (256 + 32) = 73 728 cycles. With a fast
filler, the measured fill phase is 73 728 cycles plus about 740.

`scan_fill` takes the oldest loaded scanline and reads it left to right, one pixel per cycle.
Every run of black pixels is one edge, and the x where the run starts is pushed onto a 16-entry
edge stack. At the end of the line:

- if the edge count is odd, the top entry is dropped;
- pairs are popped, and every pixel from the left edge to the right edge is written black.

A line therefore costs 256 + 5 cycles, plus one per pair of edges, plus one per pixel written.
Where the outline is wide, filling is slower than the cache's 288 cycles per line. The cache can
run up to 32 lines ahead when the filler is slow. When the filler is fast, the filler waits for
loads instead.

**Limits of the even-odd rule as built.** These come from counting drawn pixels rather than path
crossings, and you should know them before trusting a result:

- A local top or bottom of an outline (a vertex where both sides go the same way) shows up as one
  run. It counts as one edge, so the rest of that scanline pairs up wrongly.
- Two edges that touch on a scanline merge into one run.
- More than 16 edges on one scanline: the extra edges are ignored and `edge_overflow` pulses.

The published design gives no rule for these cases. The tests compare the hardware with this
exact rule, not with an ideal fill.

## Control and timing

`font_ctrl` spends two cycles per program byte: one for the address and one for the data. It waits
for each element to finish before fetching the next op-code. Overlapping fetch with execution would
gain little, because lines and curves take far longer than their operands take to fetch.

| Element | Timing |
|---|---|
| `moveto` | 1 cycle |
| `lineto` | max(\|dx\|, \|dy\|) + 1 write cycles, then `done` one cycle later |
| `closepath` | Either an immediate finish or one line |
| `curveto` | Ends when the flattener is done, the FIFO is empty and the last line is drawn |

Reset is asynchronous and active low. Every state register resets; memory arrays do not.

## Parameters of the top (`font_processor`)

| Parameter | Default | Origin |
|---|---|---|
| `IMEM_BYTES` | 512 | One 4-Kbit block RAM; this design's choice |
| `FIFO_DEPTH` | 16 | This design's choice |
| `FRAC`, `MAX_DEPTH`, `STACK_DEPTH`, `FLAT_TOL` | 4, 10, 16, 1024 | This design's choice (see above) |
| `EDGE_DEPTH` | 16 | This design's choice |
| `CACHE_LINES` | 32 | As published |

Image size is fixed at 256 × 256 by the 8-bit coordinates and the 16-bit SRAM address.

## Simulating

Every testbench is self-checking. Each ends with a `TB_RESULT checks=N failures=M` line and has a
cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_font_processor \
    -y rtl -y tb +libext+.sv rtl/font_pkg.sv tb/tb_font_processor.sv
./obj_dir/Vtb_font_processor
```

Substitute any testbench name. `tb/ext_sram_model.sv` is a behavioural model of the card's SRAM,
used by the testbenches that need it.

| Testbench | What it establishes |
|---|---|
| `tb_font_processor` | End to end at the default sizes. A three-subpath character with curves, a hole, and a `closepath` that has nothing to draw. The drawn outline is checked against the true path (curves evaluated in real arithmetic). The packed result is checked bit for bit against an even-odd fill of the drawn outline. Fill time is checked against 73 728 cycles. An unknown op-code must raise `error`. Each mechanism (subdivision, FIFO-full stall, filler waiting on the cache, write-back of all 256 lines, …) must occur at least once. |
| `tb_complex_char` | A generated character with the operator mix and byte count of the complex example (276 bytes), with the same checks |
| `tb_bezier_flatten` | Points lie within 1 pixel of the curve and in curve order; chords stay within 2 pixels; the end point is exact; back-pressure; 3-cycle straight curves |
| `tb_line_render` | All octants: end points, one step per major-axis pixel, within half a pixel of the ideal line, exact cycle count |
| `tb_scan_fill` | The 16-pixel example with edges at 1 and 14, wide runs, odd edge counts, stack overflow, random lines, cycle bounds |
| `tb_image_cache` | Whole-image pass: cached pixels, packed write-back, 73 728-cycle bound, and loader stopping on a full ring |
| `tb_input_mem`, `tb_moveto_unit`, `tb_closepath_unit`, `tb_point_fifo`, `tb_bez_stack` | Unit behaviour against reference models |

The full-size end-to-end run takes well under a second of simulation time.

## How far this follows the published design

Taken from it:

- the operator set and the one-hot op-code values;
- byte-wide operands, and 16-bit host writes into byte-read block RAM;
- the element structure: control logic, MoveTo, Line Render, Bézier Flatten with an on-chip stack
  and an output FIFO, Close-path, Fill and Image Cache;
- Bresenham lines drawn directly into external memory;
- recursive midpoint subdivision with the two-cross-product flatness test, pushing one half and
  continuing with the other;
- the even-odd fill with an edge stack, filling between pairs;
- the 8-bit, 16-bit-address SRAM with one byte per pixel;
- a two-block-RAM cache of 32 one-bit scanlines, with 256-cycle loads and 32-cycle packed
  write-backs.

Chosen here:

- how op-codes map to operators;
- all memory, FIFO and stack depths except the cache;
- the fixed-point format, tolerance and depth cap of the flattener;
- the handshakes between blocks;
- the rule that a run of black pixels is one edge, and the dropping of an unpaired edge;
- where the packed scanlines are stored and their bit order;
- write-back priority in the cache;
- error handling for unknown op-codes;
- reset values.

Not built or not checked:

- The host CPU and PCI card. The top has a plain write port and start/done instead.
- The SRAM chip itself. It is modelled only for simulation.
- The published clock rates (about 55 MHz for the whole processor, 120 MHz for an optimised line
  renderer, 90 MHz for the fill) and its area figures. No FPGA implementation was run.
- The published design also suggests future work: 16-bit coordinates, a circle/arc operator,
  packed storage in external memory during drawing, and overlapped fetch/execute. None of these are
  implemented.
