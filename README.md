# Low-power H.264 decoder accelerators: inverse transform & quantization and deblocking filter

Two of the most arithmetic-heavy steps of an H.264 baseline decoder moved
out of software into small hardware blocks:

* **IQIT** – inverse quantization, inverse Hadamard transform of the DC
  coefficients and the 4x4 inverse integer transform. It turns one
  macroblock of quantized coefficients into 384 residual samples.
* **DBF** – the in-loop deblocking filter. It computes the boundary
  strength (bS) of every 4x4 block edge and filters a picture in place.

Both are meant to sit next to a small embedded processor that runs the rest
of the decoder (bitstream parsing, prediction) and talks to them through
memories plus a start/done handshake. The processor is not part of this
RTL; the top level `h264_lp_top` brings the host side of both blocks out as
plain ports.

The design aims at low clock rates rather than high throughput: about 130
clocks per macroblock for IQIT and about 300 clocks per macroblock for the
filtering, so CIF at 30 frames/s needs a few MHz.

## Top level

`h264_lp_top` holds `iqit_system` and `dbf_system` side by side. They share
the clock and reset and nothing else.

| ports | use |
|---|---|
| `iq_start`, `iq_done`, `iq_busy` | one macroblock per start |
| `iq_in_*` | host read/write port of the 128-word input memory |
| `iq_out_*` | host read port of the 128-word output memory |
| `db_start`, `db_done`, `db_busy` | one 48x48 picture per start |
| `db_pm_*` | host port of the 4096-word parameter memory |
| `db_fm_*` | host port of the frame memory; use it only while `db_busy` is low |

## IQIT: word map

Both memories are 128 words of 32 bits.

Input memory:

| words | content |
|---|---|
| 0x00–0x3F | luma blocks 0..15 in H.264 transmission order, 4 words per block, row *i* in word *i*, coefficient *j* in bits 8j+7:8j (signed 8-bit) |
| 0x40–0x5F | chroma blocks: Cb 0..3, then Cr 0..3 |
| 0x60–0x67 | 16 luma DC coefficients (intra16x16 only), raster order, two signed 16-bit values per word, low half first |
| 0x68–0x6B | 8 chroma DC coefficients, Cb 2x2 then Cr 2x2 |
| 0x6C | QP in bits 5:0 |
| 0x70 | prediction mode; non-zero means intra16x16 |

Output memory: the same block windows hold the low 8 bits of each 9-bit
residual. The sign bits (bit 8) are packed into the DC windows. The luma sign
of block *b*, row *i*, column *j* is bit 16b+4i+j of words 0x60–0x67. The
chroma signs use words 0x68–0x6B in the same way.

The narrow 8-bit AC and 10-bit DC coefficient fields only hold real data
when QP > 21. Below that, coefficients can be larger than these fields, so
the design supports QP 22..51. The datapath is sized for that range:

* 10-bit Hadamard registers;
* 18-bit scale factors;
* 16-bit transform registers.

## IQIT: how a macroblock flows

`iqit_core` is a chain of four units. Each pair of units is joined by a
valid/ready handshake, so a 4x4 block can move every four clocks.

1. **Input buffering** (`iqit_input_buffer`) has two state machines:
   * The reader reads one word per clock in the order QP, mode, luma DC (in
     intra16x16 mode), luma blocks, chroma DC, chroma blocks.
   * The loader assembles each block in a 160-bit buffer.

   When a DC set is complete, the loader starts the Hadamard unit. When a
   block is complete, the loader swaps in its transformed DC value and hands
   the block on. A new block is only read when the buffer is free, so
   nothing is overwritten.
2. **Inverse Hadamard** (`iqit_hadamard`) computes H·Z·H for the 4x4 luma DC
   matrix in two clocks. In chroma mode it transforms the Cb and Cr 2x2
   matrices in the same pass.
3. **Inverse quantization** (`iqit_iquant`) uses four multipliers and
   handles one 2x2 quadrant per clock. The scalar LUT
   (`iqit_scalar_lut`) gives V·2^(QP/6) for the three position classes, so
   no shifter is needed.
   * The multipliers take V1, V2, V3, V3 for positions (0,0), (1,1), (0,1)
     and (1,0).
   * The luma DC is divided by 4 and the chroma DC by 2. Both divisions are
     exact for QP > 21.
4. **Inverse integer transform** (`iqit_idct`) is combinational:
   butterflies on the columns, then on the rows, with arithmetic halving.
5. **Output access** (`iqit_output_unit`) removes the factor 64 and writes
   one row per clock. It rounds halves away from zero: for x ≥ 0 it adds one
   when the six dropped bits are ≥ 32, for x < 0 when they are > 32. After
   blocks 15 and 23 it writes the collected sign words, and the pipeline
   pauses for those few clocks.

Measured times from start to done:

| mode | measured | target |
|---|---|---|
| intra16x16 | at most 133 clocks | 145 clocks |
| other modes | at most 123 clocks | 135 clocks |

## DBF: memories

`dbf_system` works on a 48x48 4:2:0 picture: 3x3 macroblocks, 12x12 luma
blocks.

**Parameter memory.** 4096 words of 32 bits. It holds one byte per 4x4
block, in raster order of the 12x12 grid:

| byte address | content |
|---|---|
| 0x0000 | motion vector x, signed, quarter samples |
| 0x0100 | motion vector y, signed, quarter samples |
| 0x0200 | intra flag (non-zero means intra) |
| 0x0300 | QP, one 32-bit word per macroblock in raster order |
| 0x2000 | coefficient bytes at the 48x48 pixel positions; a block is "coded" if any of its 16 bytes is non-zero |

**Frame memory.** 1024 words of 32 bits, organized block by block:

* Each word holds one row of four pixels of a 4x4 block.
* Pixel *j* of a row is in bits 8j+7:8j.
* Luma block (by,bx) starts at word 4·(12·by+bx).
* Cb block (cy,cx) starts at word 576+4·(6·cy+cx).
* Cr blocks start at word 720, in the same layout as Cb.

**bS memory.** 72 words of 12 bits, internal. Each word holds the bS of
four blocks: the vertical or the horizontal edges of a group of four
blocks in one block row.

## DBF: boundary strength generator

`dbf_bs_gen` runs first. It reads a group of four blocks in one block row
and finds its four left edges and four top edges. Each group takes 19 word
reads. The previous block row is kept in a line buffer, so every parameter
word is read only once.

A separate writer stores the two bS words of a group while the reader
already works on the next group.

The bS rules are the usual H.264 ones:

| bS | condition |
|---|---|
| 4 | P or Q is intra, and the edge is a macroblock edge |
| 3 | P or Q is intra |
| 2 | P or Q has coded coefficients |
| 1 | the motion vectors differ by at least one luma sample (4 quarter samples) in x or y |
| 0 | all other edges, and edges on the picture border |

There is a single reference picture, so reference indices are not compared.
The whole 48x48 picture takes 759 clocks.

## DBF: the 2-D edge order

This part needs the most care. The standard filters all vertical edges of a
macroblock, then all horizontal ones. That order would need the whole
macroblock, plus its neighbours, on chip.

This design visits the 48 edges of a macroblock in an interleaved order
instead:

* 32 luma edges, then 8 Cb edges, then 8 Cr edges;
* each block row goes V, V, H, V, H, V, H, H;
* each pixel is still filtered in the same order as in the standard, so
  the output is bit-identical.

The order is written out as a table in `h264_pkg::edge_desc`. For each edge
the table names the two blocks and says where each block comes from and
where it goes:

* from or to the frame memory;
* the "direct" register, which holds the result of the previous edge;
* one of five 128-bit registers.

Registers 2–5 carry the bottom blocks of one block row down to the next
row's horizontal edges.

`dbf_dataflow` runs each macroblock like this:

1. Read the macroblock's QP and eight bS words (10 clocks).
2. For each edge, do these steps:
   * **SETUP:** take the on-chip blocks.
   * **LOAD:** read the missing blocks. `dbf_mem_ctrl` reads a block in four
     clocks, and back-to-back block reads overlap.
   * **FILT:** filter in one clock. `dbf_filter_unit` holds four
     `dbf_filter_block`s, one per line, each with its own `dbf_thresh_lut`.
     For horizontal edges the blocks are read and written transposed.
3. Put each result either into a register or into a store buffer. The write
   controller empties the store buffer in the background, four clocks per
   block, on the second port of the frame memory. The next FILT waits only
   if the previous stores have not been taken yet.

Blocks outside the picture are never read or written, and their edges get
bS 0.

Measured time: at most 323 clocks per macroblock, against a target of 336.
A full 48x48 picture takes 2737 filtering clocks.

## Filter equations

`dbf_filter_block` follows H.264. A line is filtered when all of these
hold:

* bS > 0;
* |p0−q0| < α;
* |p1−p0| < β;
* |q1−q0| < β.

Define ap = |p2−p0| < β and aq = |q2−q0| < β.

For bS < 4:

* p0 and q0 move by Δ = clip(±tc, (4(q0−p0) + (p1−q1) + 4) >> 3).
* tc = tc0+ap+aq for luma and tc0+1 for chroma.
* For luma, p1 moves when ap holds and q1 moves when aq holds, each by a
  clipped correction.

For bS = 4:

* A luma side uses the strong 3/4/5-tap filter when its a-flag holds and
  |p0−q0| < (α>>2)+2.
* Otherwise that side only changes p0 (or q0) with (2p1+p0+q1+2)>>2.
* Chroma always uses this short form.

α, β and tc0 are the standard tables, indexed by QP with no offsets.

## Departures and simplifications

* **Frame memory on chip.** The deblocking frame memory is built into the
  chip and sized for a 48x48 picture. A CIF picture would need larger
  memories and wider address counters. The edge datapath and the per-macroblock
  timing do not depend on picture size.
* **One QP for all edges.** Every edge of a macroblock, chroma included,
  uses that macroblock's QP. There is no chroma QP table and no averaging
  with the neighbour's QP. Streams that use different QPs, or QP ≥ 30 with
  chroma, will differ from a conforming decoder.
* **Chroma DC in one pass.** The Cb and Cr DC matrices go through the
  Hadamard unit together.
* **Whole bS buffer per macroblock.** The bS buffer is filled for the whole
  macroblock at its start, not once per block row.
* **No intra16x16 edge map.** The intra16x16 edge-flag area of the
  parameter map is not used. Macroblock edges are found from block
  positions.
* **Plain signed multipliers.** The multipliers use plain signed arithmetic
  instead of sign-magnitude conversion.
* **Sign-bit placement.** Where the IQIT sign bits go in the output memory
  is this design's choice.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_iqit_system`, `tb_iqit_core` | random macroblocks, QP 22..51, both modes, against an equation-level model (`tb/iqit_ref_pkg.sv`); also the clock budget |
| `tb_dbf_system` | random pictures (mixed, all intra, all inter, flat), filtered in the standard order by `tb/dbf_ref_pkg.sv`; compares the bS memory and every pixel, checks the 336-clock budget |
| `tb_h264_lp_top` | both subsystems running at once through the top's ports; each mechanism must occur at least once (intra16x16 and other macroblocks, both Hadamard modes, output stalls, negative half-way rounding, block reads, direct and register reuse, store waits, border edges, strong filtering) |
| unit testbenches | `iqit_idct`, `iqit_scalar_lut`, `iqit_hadamard`, `dbf_thresh_lut`, `dbf_filter_block`, `dp_ram` |

Example run with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/h264_pkg.sv tb/iqit_ref_pkg.sv \
    tb/dbf_ref_pkg.sv tb/tb_h264_lp_top.sv --top-module tb_h264_lp_top
./obj_dir/Vtb_h264_lp_top
```

The input buffering, inverse quantization and output access units, and the
deblocking sub-units (bS generator, memory controllers, filtering unit and
dataflow control), are verified only inside their subsystem testbenches.
