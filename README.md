# H.264 deblocking-filter accelerator: one 8-pixel filter, an 8x4 pixel array, two interleaved SRAMs

H.264 smooths the block edges of every decoded macroblock (MB) with an
adaptive in-loop filter. The filter runs across all vertical 4x4-block edges of
an MB, then across all horizontal ones, and it is needed in both encoder and
decoder. In software it costs many cycles and a lot of bus traffic.

This RTL is a small accelerator that sits on a 32-bit system bus. The host
streams in one MB, together with the strips of its left and top neighbours
that the filter also changes, and streams the filtered pixels back. The main
idea is to use a single 8-pixel-wide filter for both edge directions. Two
things make that possible:

* **Interleaved memory.** The pixels are stored as 4-pixel words in two
  single-port SRAMs. Neighbouring 4-pixel columns always sit in different
  SRAMs, so the 8 pixels across any vertical edge can be read in one cycle.
* **An 8x4 register array with two shift paths.** The array can shift down or
  shift right. Shifting down moves finished lines towards the SRAMs. Shifting
  right turns SRAM words, which are rows, into array columns. This transposes
  a block pair, so that pixels across a horizontal edge end up in one array
  row and can go through the same filter.

The structure, the memory organisation, the edge order and the cycle budget
follow the architecture published as "Architecture Design for Deblocking
Filter in H.264/JVT/AVC" (its "basic" variant with two single-port SRAMs). The
bus protocol, the layout of the coding information, the SRAM read timing and
everything the architecture leaves to the H.264 standard (filter taps,
thresholds) are this implementation's own. The section *Where this RTL departs
or chooses* lists them.

## Block diagram

```
            +-------------------------------------------------------------+
 in stream  |  dbf_bus_interface --> dbf_coding_info_regs --+              |
 ---------->|        |                                      v              |
 out stream |        | bus side             dbf_control_unit (FSM, Bs, QP) |
 <----------|        v                             | addresses, modes       |
            |  dbf_sram_interface <----------------+                       |
            |    |          |   ^  ^ port3/4/5                              |
            |  SRAM0      SRAM1 |  |                                        |
            |  96x32      64x32 |  +--- dbf_pixel_array (8x4 x 8 bit) <-+   |
            |    |          |   |        ^ port0        ^ port1/2     |   |
            |    +--p/q word+---+--------+              |             |   |
            |         |                       dbf_filter_unit --------+   |
            |         +---------------------> (thresholds + edge filter)  |
            +-------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `dbf_top` | Wires the blocks together. Its ports are the streams, `start`/`busy`/`done` and a status bit. |
| `dbf_pkg` | Pixel/word types, array modes, phases, coding-information structs, the memory map, and the H.264 tables as functions. |
| `dbf_bus_interface` | Moves one 32-bit word per cycle between the streams and the coding registers or SRAMs. |
| `dbf_coding_info_regs` | 50 words: QPs, offsets, availability, and per-4x4-block intra/coefficient/reference/MV data. |
| `dbf_sram_sp` | Single-port 32-bit memory. It is used twice: 96 words (SRAM0) and 64 words (SRAM1). |
| `dbf_sram_interface` | Gives the SRAMs to the bus side or to the datapath, and picks write data and read routes. |
| `dbf_pixel_array` | The 8x4 register array, with ports 0..5. |
| `dbf_filter_unit` | The reconfigurable 8-in/8-out filter: input/output ordering per direction, plus the threshold lookup. |
| `dbf_thresholds` | QP averaging, chroma QP mapping, indexA/indexB, and the alpha/beta/tC0 tables. |
| `dbf_edge_filter` | The filter arithmetic for one line p3..p0 \| q0..q3. |
| `dbf_bs_unit` | Boundary strength (Bs) of one block edge, computed from the coding information. |
| `dbf_control_unit` | Sequences the phases and edges. It drives SRAM addresses, array mode, filter mode, Bs and QPs for each line. |

## Memory organisation

The region that gets filtered is split into eleven columns, each 4 pixels wide.
One SRAM word holds 4 horizontally adjacent pixels. Pixel x of the word sits in
bits `8x+7:8x`.

| Column | Contents | Words | SRAM | Addresses |
|---|---|---|---|---|
| c0 | luma, left neighbour, rows 0..15 | 16 | 0 | 80..95 |
| c1 | luma x 0..3, top-neighbour rows -4..-1 then rows 0..15 | 20 | 1 | 44..63 |
| c2 | luma x 4..7 | 20 | 0 | 60..79 |
| c3 | luma x 8..11 | 20 | 1 | 24..43 |
| c4 | luma x 12..15 | 20 | 0 | 40..59 |
| c5 | Cb, left neighbour, rows 0..7 | 8 | 0 | 32..39 |
| c6 | Cb x 0..3, rows -4..7 | 12 | 1 | 12..23 |
| c7 | Cb x 4..7 | 12 | 0 | 20..31 |
| c8 | Cr, left neighbour | 8 | 0 | 12..19 |
| c9 | Cr x 0..3 | 12 | 1 | 0..11 |
| c10 | Cr x 4..7 | 12 | 0 | 0..11 |

Word w of a column with a top strip (c1..c4, c6, c7, c9, c10) is picture row
w-4. In c0, c5 and c8 word w is row w. In total there are 160 words: 16 MB
blocks of luma, 8 of chroma, and 16 neighbour blocks. SRAM0 is exactly full
with 96 words, and so is SRAM1 with 64. Columns next to each other alternate
between the SRAMs. That is the only property the datapath relies on. The
address order inside an SRAM is arbitrary.

## How one 8x4 array serves both directions

Array row 0 is the top row, column 0 the leftmost. Port 0 loads the left
column, ports 1 and 2 load the top row (columns 0..3 and 4..7), ports 3 and 4
show the bottom row, and port 5 shows the right column.

### Horizontal filtering (vertical edges): 8 cycles per block pair

```
cycle 0..3  read line k:  SRAM(p column)[row k] = p3 p2 p1 p0
                          SRAM(q column)[row k] = q0 q1 q2 q3
            filter -> ports 1/2 (top row), array shifts down
cycle 4..7  bottom row -> port 3 to the p column, port 4 to the q column,
            both SRAMs written at once, array shifts down
```

After four downward shifts, line 0 of the pair is in the bottom row, so the
four writes go out in line order. The 24 vertical edges of an MB are done
one column boundary at a time, top to bottom, luma first (the x=0 boundary
between c0 and c1, then x=4, 8, 12), then Cb (c5|c6, c6|c7), then Cr. This
takes 24 x 8 = 192 cycles.

### Vertical filtering (horizontal edges): 12 cycles per block pair

```
load/store phase, 8 cycles, rightward path:
   SRAM(column of this edge)[word k] --> port 0 (pixel x goes to row x)
   port 5 (right column)             --> SRAM(column of the previous edge)
filter phase, 4 cycles, downward path:
   bottom row = q3 q2 q1 q0 | p0 p1 p2 p3  --> filter --> ports 1/2
```

The 8 words above and below the edge (4 rows of the p block, then 4 rows of
the q block) enter through port 0 one per cycle. Once all 8 are in, array row x
holds image column x of the pair, with the oldest word in the rightmost array
column. Each array row is therefore one filter line, reversed: q3..q0 | p0..p3.
The filter unit reverses the order on its way in and again on its way out. In
the filter phase each bottom row goes through the filter back to the top. After
four shifts every row is back where it was, but filtered. In the next
load/store phase, port 5 gives the filtered words back in their original order
(word 0 first). At the same time port 0 takes in the next pair. Load and store
run in the same cycles without conflict because consecutive edges always lie in
neighbouring columns, so they use different SRAMs. An assertion in
`dbf_control_unit` checks this.

Edges go row by row, left to right. For luma, 4 edges at y=0 (the MB's top
edge, against the top neighbour's strip) run through c1..c4, then y=4, 8 and
12. Cb uses c6, c7 at y=0 and y=4, and Cr uses c9, c10. At the end of each
component an 8-cycle store-only phase writes back the last pair:

    luma (8 + 12 x 16) + Cb (8 + 12 x 4) + Cr (8 + 12 x 4) = 312 cycles

A row that was filtered by one edge is later loaded again from the SRAM as the
p block of the edge below. This is why the store of edge n has to land before
edge n+4 loads, and it always does.

### Cycle budget per macroblock

| Phase | Cycles |
|---|---|
| coding information in | 50 |
| pixels in | 160 |
| horizontal filtering | 192 |
| vertical filtering | 312 |
| pixels out | 160 |
| **total** | **874** |

This holds when the streams never stall. `done` pulses one cycle after the
last output word. The reference architecture quotes 878 cycles, with 54 cycles
of coding information. At 100 MHz, 874 cycles per MB give 31.8 frames/s of
1280x720 (3600 MBs/frame), 84 frames/s of 720x480, and more than 250 frames/s
of CIF.

## The filter

`dbf_edge_filter` implements the H.264 edge filter for one line of 8 samples.
A line is filtered only when Bs != 0, |p0-q0| < alpha, |p1-p0| < beta and
|q1-q0| < beta.

* For 0 < Bs < 4, a clipped delta changes p0 and q0. For luma lines, p1 and q1
  also change when |p2-p0| < beta (or |q2-q0| < beta).
* For Bs = 4 on luma, the strong 3/4/5-tap filters replace p0..p2 or q0..q2 on
  each side that is smooth enough. Otherwise, and always for chroma, a 3-tap
  filter changes only p0 and q0.

`dbf_thresholds` averages the QPs of the two blocks. For chroma it first maps
each QP through the chroma table, after adding the chroma QP offset. It then
adds FilterOffsetA/B, clips to 0..51, and looks up alpha, beta and tC0 in the
standard tables. The tables are written out in `dbf_pkg` as constant
arrays inside functions, so the design reads no data file.

`dbf_bs_unit` applies this decision order to the two 4x4 luma blocks:

1. Intra, or SP/SI slice: Bs 4 on an MB edge, otherwise 3.
2. Coded coefficients: Bs 2.
3. Different reference pictures (or a different number of motion vectors), or
   any MV component differing by >= 4 quarter samples, in either list when
   bi-predicted: Bs 1.
4. Otherwise Bs 0.

An MB edge without a neighbour gets Bs 0. A chroma line uses the Bs of the luma
block it overlays: chroma line pair k of an edge takes luma block row or column
k.

All three units are combinational, so one line is filtered per cycle. That
means the path from the SRAM output through the filter into the array is the
critical path.

## Host interface

1. Pulse `start` while idle.
2. Send 50 coding-information words on `in_data` (`in_valid`/`in_ready`), then
   the 160 pixel words in column order c0, c1 .. c10, top to bottom within each
   column, as in the table above.
3. Take 160 words from `out_data` (`out_valid`/`out_ready`) in the same order.
   They include the filtered neighbour strips, which the host must write back
   to the picture too.

Coding-information words:

| Word | Bits |
|---|---|
| 0 | `[30]` SP/SI slice, `[29]` top MB available, `[28]` left MB available, `[27:23]` FilterOffsetB, `[22:18]` FilterOffsetA (signed), `[17:12]` QP top MB, `[11:6]` QP left MB, `[5:0]` QP current MB |
| 1 | `[4:0]` chroma QP index offset (signed) |
| 2+2i, 3+2i | block i (raster order) of the current MB |
| 34+2i, 35+2i | block i (top to bottom) of the left MB's right-hand column |
| 42+2i, 43+2i | block i (left to right) of the top MB's bottom row |

The first word of a block is `{mvy[11:0], mvx[11:0], ref_id[5:0], nz, intra}`.
The second is `{mvy1[11:0], mvx1[11:0], ref_id1[5:0], bipred, 0}`. MVs are in
quarter samples. `ref_id` is any identifier that is equal for the same
reference picture.

## Where this RTL departs or chooses

* **Coding information.** The reference architecture loads coding information
  in 54 cycles but does not say what it contains. Here it is the 50-word layout
  above. Bs is computed on chip from it.
* **Bi-prediction in Bs.** The second vectors are compared list 0 with list 0
  and list 1 with list 1, as the reference decision flow draws it. The H.264
  standard also accepts the crossed pairing of two vectors that point to the
  same pictures in swapped lists. Such blocks can get Bs 1 here where a
  standard decoder gives 0.
* **SRAM timing.** `dbf_sram_sp` reads combinationally: data appear in the
  same cycle as the address. With that timing the 8- and 12-cycle schedules
  above hold exactly. A synchronous-read SRAM macro would need one more
  pipeline stage between SRAM and filter, plus a matching delay in the
  control unit.
* **Bus.** This design uses valid/ready streams with the accelerator as a
  slave, not a bus master that fetches from frame memory itself.
* **Not built.** The variants the architecture only compares with are not
  built: one dual-port SRAM with a reordered edge sequence (814 cycles), and
  two-port SRAMs with one or two arrays (782 and 614 cycles). The external
  frame memory is not built either.
* **Slice-level control.** disable_deblocking_filter_idc, field/MBAFF
  macroblocks, and 4:2:2/4:4:4 chroma are not handled. The host can turn
  filtering off at an MB edge by clearing the availability bit.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `dbf_ref_pkg` is a behavioural reference. It deblocks an MB in picture
  coordinates in the standard order and packs pictures and coding information
  into bus words. It shares no code with the RTL.
* `dbf_tb_addr_pkg` writes out the memory map separately for the
  testbenches.
* `dbf_top_tb` runs 10 MBs through the full design at default size. The MBs
  are inter, bi-predicted, all-intra, mixed, without a left neighbour and
  without a top neighbour, with random QPs and offsets. The test compares all
  160 output words against the reference, and checks the 874-cycle latency
  when the streams never stall. It also counts each mechanism and fails if one
  never occurred: horizontal edges, load/store phases that load and store at
  once, filter phases, store-only phases, every Bs value 1..4, chroma lines,
  and stalls on both streams.
* `dbf_frame_tb` deblocks whole frames the way a host driver would: a
  352x288, a 720x480 and a 1280x720 frame. It processes the MBs in raster
  order. For each MB it cuts the MB and its left and top strips out of the
  frame, which already holds the results of the earlier MBs. It then runs the
  MB through the accelerator and writes the 160 words back. A second copy of
  the frame goes through the reference the same way. The two frames must
  match pixel for pixel. Frame-border MBs have no neighbour on the left or
  top, and QPs change from MB to MB. Measured with streams that never stall:
  875 cycles per MB including the start/done handshake. That gives
  3,150,000 cycles for a 1280x720 frame, or 31.7 frames/s at 100 MHz. The
  test fails below 30 frames/s.
* `dbf_control_unit_tb` checks every cycle of the schedule against an
  independently written edge list: addresses, write enables, array mode, Bs
  and QPs.
* The remaining testbenches check their unit with random stimulus against the
  reference.

Running one with plain Verilator, for example the top:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module dbf_top_tb rtl/dbf_pkg.sv tb/dbf_ref_pkg.sv tb/dbf_top_tb.sv
./obj_dir/Vdbf_top_tb
```

For another unit, replace `dbf_top_tb` with `<module>_tb`. `-Wno-fatal` keeps
the width warnings that the testbenches' integer arithmetic causes from
stopping the build. Every testbench finishes in well under a second, except
`dbf_frame_tb`, which takes a few seconds.
