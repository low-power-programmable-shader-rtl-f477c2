# A vertex shader that also does motion estimation

Mobile devices need both 3-D graphics and video coding, but have little silicon
and little battery for either. This design is a small programmable vertex shader
whose datapath and register memories are reused for the most expensive step of
video encoding, block-matching motion estimation. Three ideas carry it:

* **A SAD instruction with partial distortion elimination (PDE).** One
  instruction computes the sum of absolute differences (SAD) of eight pixel
  pairs. A PDE unit keeps a running SAD for the candidate block and raises a
  flag as soon as it exceeds the best SAD found so far, so the program can drop
  the candidate after its first 8x8 quarter instead of finishing all 256 pixels.
* **Reconfigurable register memories.** The input (V) and constant (C) register
  files hold 128-bit vectors for vertex programs, and the SAD instruction sees
  the same storage as 64-bit words of eight 8-bit pixels. A whole 16x16
  macroblock fits exactly in the 16 input registers.
* **Early rejection after transformation (ERAT).** Right after the vertices of a
  triangle are transformed to clip space, a hardware test decides whether the
  triangle is certainly invisible: outside the view volume, of zero area, or
  back-facing under the current cull mode. The program then branches past
  lighting, which is where most of the per-vertex work is.

Around the core sit a DMA engine that moves blocks between system memory and the
registers, a coprocessor interface through which the host processor drives
everything, and a power manager that gates the shader's clock whenever it has
no work. The same power manager also gates the clocks of the two later pipeline
stages, triangle setup and rasterization/pixel shading. Those two stages are not
part of this RTL.

```
            host CPU (coprocessor commands, cp_valid)
               |                         |
   +-----------v-------- vs_top -------- | -----------------+
   |  +--------+    +-----------------+  |   +------------+ |
   |  | vs_dma |<-->| vs_core         |  +-->| power_mgmt | |
   |  |        |    |  sequencer      |      |  3 clock   | |
   |  +---^----+    |  V/R/O/C regs   |<-gclk|  gates     |--> sclk, pclk
   |      |         |  vec_alu  sad8  |      +------------+ |
   |      |         |  pde_unit erat  |----idle----^        |
   |      |         +-----------------+                     |
   +------|--------------------------------------------------+
          v
     system memory (32-bit words)
```

## Core: registers and instruction set

`vs_core` executes one instruction per cycle. There are no pipeline hazards:
the instruction memory and the register files are read combinationally, and
results are written at the end of the cycle. Every number below is this
design's own choice unless it is named as following the published design.

| Address   | File | Size              | Written by      |
|-----------|------|-------------------|-----------------|
| 0x00-0x0F | V    | 16 x 128 bit      | host / DMA      |
| 0x10-0x1F | R    | 16 x 128 bit      | program         |
| 0x20-0x2F | O    | 16 x 128 bit      | program (read back by host / DMA) |
| 0x80-0xFF | C    | 128 x 128 bit     | host / DMA      |

A register holds four 32-bit lanes: x is in bits 31:0, then y, z and w. The
instruction decides how a lane is read: as signed Q16.16 fixed point, or as a
single-precision float in the IEEE-754 binary32 layout.
In the pixel view, pixel word 2k is the low half of register k and word 2k+1 is
the high half. Pixel i of a word occupies bits 8i+7:8i.

An instruction is 34 bits: `{op[5:0], mask[3:0], dst[7:0], srca[7:0], srcb[7:0]}`.
The type is `vs_pkg::instr_t`. Immediates reuse `{srca, srcb}`.

| Op | Name    | Effect |
|----|---------|--------|
| 1  | MOV     | dst = a (lanes selected by mask) |
| 2  | ADD     | dst = a + b |
| 3  | MUL     | dst = a * b (Q16.16, floor) |
| 4  | MAD     | dst = a * b + dst |
| 5  | DP4     | dst = dot(a, b) in the masked lanes |
| 6  | SAD     | adds SAD(V pixel word srca + vOFFSET, C pixel word (srcb - 0x80) + 8*cBASE) into the PDE accumulator |
| 7  | FSET    | F0 = srcb |
| 8  | SET     | special[dst] = imm16 |
| 9  | INC     | special[dst] += imm16 |
| 10 | LOOP    | marks the loop start for counter dst |
| 11 | LOOPEND | if LPCNT[dst] > 1: decrement it and jump to the loop start |
| 12 | BONE    | if status bit srca is 1: jump to srcb |
| 13 | ERAT    | tests the triangle in registers srca, srca+1 and srca+2 (Q16.16), then sets status bit 13 |
| 14 | FMUL    | dst = a * b, binary32 |
| 15 | FADD    | dst = a + b, binary32 |
| 16 | FMAD    | dst = a * b + dst, binary32 (the product is rounded first) |
| 17 | FDP4    | dst = (a.x b.x + a.y b.y) + (a.z b.z + a.w b.w), binary32, in the masked lanes |

Special registers (`dst` of SET/INC): 0-3 are LPCNT0-3, 4 is vOFFSET (0-31),
5 is cBASE (0-31, in units of 8 pixel words), 6 is the minimum SAD and 7 is the
cull mode (0 none, 1 reject clockwise, 2 reject counter-clockwise). 8 and 9
are the viewport width and height in pixels. They are used only by ERAT's
grid-point test, which is off while either is 0, as after reset.

The status vector tested by BONE holds F0 in bits 7:0. Bit 12 (S12) is the PDE
"partial SAD exceeds minimum" flag. Bit 13 means the last ERAT test rejected
the triangle. In F0, bit 2 switches the PDE controller on. Writing a 1 to bit 0
ends the program.

The published design names the instructions (FSET, SET, LOOP, SAD, BONE, INC,
loop end), the flag register F0, the status flag S12, the loop counter LPCNT3,
the pointers vOFFSET and cBASE, and the PDE-enable and return codes of F0. The
encodings, the register sizes and the units of cBASE are this design's own.

## Motion search with early exit

The macroblock is stored as four 8x8 blocks in the order top-left, top-right,
bottom-left, bottom-right. Each block is 8 pixel words, one per row. The current
block is in V and the candidate block in C. One candidate is evaluated like
this:

```
      FSET  F0, 0x04          ; PDE on: the accumulator restarts
      SET   LPCNT3, 4         ; four 8x8 blocks
      SET   vOFFSET, 0
      SET   cBASE, 0
      LOOP  LPCNT3
      SAD   V0, C0 ... SAD V7, C7     ; one 8x8 block, 8 instructions
      BONE  S12, exit         ; partial SAD already worse: give up
      INC   vOFFSET, 8        ; next block of the current macroblock
      INC   cBASE, 1          ; next block of the candidate
      LOOPEND LPCNT3
exit: FSET  F0, 0x01          ; PDE off, return
```

A full evaluation takes 54 instructions. A candidate dropped after its k-th 8x8
block takes 5 + 12(k-1) + 10 instructions, so as few as 15. When the PDE
controller is switched off and the complete SAD is below the stored minimum,
the SAD becomes the new minimum and `ev_pde_commit` pulses, so the host can note
that candidate's motion vector. `SET MINSAD, 0xFFFF` starts a new macroblock.
The `busy` output stays high for one more cycle after a program that switched
PDE off, so the clock gate cannot cut off that update.

## Early triangle rejection

`erat` reads three clip-space vertices. A triangle is *outside* when all three
vertices lie beyond the same plane of -w <= x, y, z <= w. Area and winding come
from the sign of the 3x3 determinant of the vertices' (x, y, w) columns. That
sign equals the sign of the projected screen area when every w is positive, so
no division is needed. The determinant is computed exactly, at 100 bits. A zero
determinant means *zero area*. A negative one (clockwise) or a positive one
(counter-clockwise) is *back-facing* if the cull mode removes that winding. If
any w is not positive, only the outside test applies.

Zero area also covers a triangle that is too thin or too small to contain a
pixel centre, the grid points of the screen. When a viewport of W x H pixels is
set, `erat` maps each vertex to the screen: `sx = (x/w + 1) * W/2`, and
likewise `sy` with H. It uses one reciprocal `2^32 / w` per vertex. Pixel
centres lie at k + 0.5, for k from 0 to W-1 (rows likewise). If the
triangle's bounding box contains no centre column, or no centre row, the
triangle cannot cover a grid point and is rejected. The bounding box is a
conservative stand-in for the triangle. A thin diagonal triangle that misses
every centre inside a box that holds some will still pass. The reciprocals are
the longest combinational path of the single-cycle ERAT instruction.

In the intended use, a program transforms the three vertices, runs `ERAT`, and
branches past the lighting code on status bit 13.

## Clock gating and the coprocessor interface

`power_mgmt` has one channel per gated module. A channel turns its clock on when
Fire is raised and off when Idle is high and Fire is not:
`en = fire | (on & ~idle)`. The enable is taken in on the falling clock edge and
ANDed with the clock, which gives a glitch-free gated clock. A Fire is effective
in the cycle it is raised. For the shader, Fire is the host's command strobe
`cp_valid`, and Idle means "core stopped and DMA done". DMA, core and register
files all run on that gated clock, and the clock stops the cycle after the last
piece of work.

Host commands (`vs_pkg::cp_cmd_e`) are taken at the rising edge that ends the
cycle in which `cp_valid` is high. Because the clock gate samples `cp_valid`
on the falling edge, the host must raise it in the first half of that cycle.
A `cp_valid` that arrives after the falling edge is lost while the shader
clock is off.

| Command      | Fields |
|--------------|--------|
| CP_IMEM_WR   | instruction memory [cp_addr] = cp_data[33:0] |
| CP_REG_WR    | register cp_addr (V or C) = cp_data; ignored while a DMA runs |
| CP_START     | run the program from pc = cp_addr |
| CP_DMA_LOAD  | memory words from cp_data[31:0] go to cp_data[47:40] registers starting at cp_addr |
| CP_DMA_STORE | registers starting at cp_addr go to memory, same fields |

Wait for `cp_busy` to fall before issuing a new start or DMA command.
`cp_rdata` shows register `cp_addr` whenever no store is running.

Inside the core there is a second level of gating, by instruction. Latch-based
clock-gate cells (`clk_gate`) give the PDE unit a clock only in cycles with a
SAD, a minimum load or a PDE enable change. Each register memory gets a clock
only in cycles that write it. The latch is transparent while the clock is low.
So the cell also works under the stopped module clock: the enable is already
current at the first edge after a restart.

`vs_dma` issues one 32-bit memory request per cycle while `mem_ready` is high.
It puts four words together into one register, lowest lane first, and accepts
read data in order with any latency.

## Performance against the published figures

At 50 MHz the published design reaches 8.3M vertex transforms per second, which
is 6 cycles per vertex. Here a 4x4 transform is four DP4 instructions, 4 cycles
per vertex. The tested independent-triangle program (three transforms, ERAT,
branch) takes 16 cycles when the triangle is rejected and 18 when it is lit.
The published 6.25M polygons per second means 8 cycles per polygon. In a
triangle strip each triangle brings one new vertex. `tb_polygon_rate` runs an
unrolled strip program. Per triangle it has four DP4s, a cull-mode SET (the
winding alternates along a strip), ERAT, a branch and a one-instruction
lighting step. That is 7 cycles for a rejected triangle and 8 for a kept one.
Over 20 random strips of 14 triangles it averages 8.0 cycles per polygon,
about 6.2M polygons per second at 50 MHz. Real lighting code would make kept
triangles longer.

Motion estimation runs candidate by candidate. The host gathers each candidate
block into a buffer, and the DMA loads its 16 registers in about 70 cycles.
`tb_me_search` measures one macroblock with a [-16, 15] search range on a
synthetic picture:

| Search   | Candidates | Cycles per macroblock | Per CIF frame (396 macroblocks) |
|----------|-----------:|----------------------:|--------------------------------:|
| Diamond  | 27         | 2,977                 | 1.18M |
| Full     | 1024       | 94,068                | 37M   |

At 50 MHz and 30 frames per second a CIF frame may take 1.67M cycles, which
is 4,208 per macroblock. Diamond search fits that budget; full search does
not. The published design also reaches real time only with diamond search.
Most of the cycles go to moving candidates in. The SAD program itself takes 16
to 55 cycles per candidate.

## What is not here, and what is assumed

* The floating-point format is assumed to be binary32. Rounding is to nearest
  even. Subnormals are flushed to zero. Infinity and NaN inputs get no special
  handling.
* ERAT reads Q16.16 coordinates. No instruction converts between floats and
  fixed point.
* The published motion-search listing branches with `Bone $F0 "010"&"S12"`.
  Here BONE takes a bit number of the status vector, and S12 is bit 12. The
  listing also does not reset vOFFSET and cBASE before the loop; the program
  here does, with two SET instructions.
* The published datapath shares one floating/fixed-point unit. Here the float
  multipliers and adders sit beside the fixed-point ones, and the opcode
  chooses the result.
* The published cycle counts for motion search (about 5,000 per frame on
  average with full search, and 37 to 148 with diamond search) come from a
  search loop around this program that is not published. No such loop is
  built here. The counts above are for this RTL.
* The grid-point part of the zero-area test uses the triangle's bounding box,
  not its edges. The viewport registers and the pixel-centre grid are this
  design's own choices.
* The ARM host, system memory, the triangle setup engine and the
  raster/pixel shader are outside the RTL. Their clock-gate signals are ports of
  `vs_top`, and `tb/sys_mem.sv` models the memory.
* The published design does not specify register file sizes, instruction
  encoding, memory bus width, DMA descriptor, coprocessor commands, clock-gate
  protocol or reset behaviour. The values here are reasonable choices. All
  resets are asynchronous and active low. The register arrays and the
  instruction memory are not reset.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, the whole subsystem at its default
sizes:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/vs_pkg.sv \
    tb/tb_vs_top.sv --top-module tb_vs_top -o sim && ./obj_dir/sim
```

`tb_vs_top` loads both programs through the coprocessor interface. It runs 40
candidate blocks and 24 triangles through DMA, core and ERAT, and checks every
result and every cycle count against models in the testbench. It also counts
each mechanism: SAD, PDE early exit, minimum update, each ERAT class, lighting,
floating-point mode, DMA load and store, memory stall, gated and running clock,
and instruction-level gating. A mechanism that
never happened is a failure. `tb_vs_core` runs the same programs on the bare
core with random data. `tb_me_search` runs a full search and a diamond
search for one macroblock through the whole subsystem. It checks every
candidate's SAD and cycle count, and each search's motion vector, against a
software model of the same search. `tb_polygon_rate` runs triangle strips
and checks each vertex, each triangle's rejection and each strip's cycle
count. The unit testbenches (`tb_sad8`, `tb_pde_unit`,
`tb_vec_alu`, `tb_erat`, `tb_vs_dma`, `tb_power_mgmt`) compare against
reference models.

## Files

`rtl/vs_pkg.sv` has the shared types. Datapath: `sad8`, `vec_alu` (with
`fp32_mul` and `fp32_add`), `erat`, `pde_unit`. The clock-gate cell is
`clk_gate`. The core is `vs_core`. Around it are `vs_dma`, `power_mgmt` and the
top, `vs_top`. Testbenches are `tb/tb_<module>.sv`, plus the memory model
`tb/sys_mem.sv`.
