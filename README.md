# H.264/AVC deblocking filter with row-and-column block memory

H.264 decoders and encoders smooth the visible seams between 4x4 pixel blocks
with an in-loop deblocking filter. Within each 16x16 macroblock (MB) the
filter first works across the vertical block edges, reading pixels along
rows. It then works across the horizontal edges, reading pixels along
columns. Up to three pixels on each side of an edge may change, and every
edge depends on the result of the edge before it. Hardware therefore has to
keep each block nearby while it is read once as rows and once as columns.
Most designs pay for that with a transposition buffer and the cycles needed
to fill and empty it.

This design has no transposition buffer. Each 4x4 block is kept in four
byte-wide SRAM banks with a diagonal placement, so that any row **or** any
column of the block is one 32-bit access in one cycle. A four-stage
pipelined edge filter takes one line of eight pixels (p3..p0 | q0..q3) per
cycle. Its p input can be fed from its own q output four cycles earlier.
That lets a row of blocks run through the filter edge after edge without
being written back in between. The design uses two such memories:

* RAM-0 holds the macroblock being filtered: 2048 bits, 8 dual-port 32x8 banks.
* RAM-1 holds the right column of the previous macroblock: 1024 bits, 8
  two-port 16x8 banks.

The design holds no other pixel storage, so 3072 SRAM bits and the pipeline
registers are the whole pixel store.

| | |
|---|---|
| Picture format | 8-bit 4:2:0 (Y, Cb, Cr), any size, macroblocks in raster order |
| Throughput | one MB every 298 cycles (start pulse to done pulse); flush of the last MB 38 cycles |
| 1280x720 | 3600 MBs -> 1,072,838 cycles per picture -> 93.2 pictures/s at 100 MHz |
| Pixel port | one 32-bit word (four pixels) per cycle; input and output never in the same cycle, so one bidirectional bus can carry both |
| Parameters | five 32-bit words per MB: 32 boundary strengths plus IndexA/IndexB |
| SRAM | 3072 bits |
| Result | bit-exact with the standard's edge order (checked against a reference model on a full 1280x720 picture) |

The top module is `h264_dbf_top`. Every file in `rtl/` starts with a comment
on what it does, how it works and its timing.

## Macroblock map and edge order

The controller names every 4x4 block it touches with a number B0..B39.
The same numbers appear as tags on the pixel port:

```
          luma (Y)                    Cb                 Cr
       B0   B1   B2   B3              B30  B31           B38  B39      <- top neighbours
  B4   B5   B6   B7   B8        B24   B25  B26     B32   B33  B34
  B9   B10  B11  B12  B13       B27   B28  B29     B35   B36  B37
  B14  B15  B16  B17  B18
  B19  B20  B21  B22  B23
  ^ left neighbours (right column of the previous MB)
```

The MB is worked in two planes. The luma plane has 4 block rows of 4
blocks. The chroma plane has 2 block rows of 4 blocks: Cb's two blocks in
columns 0..1 and Cr's two in columns 2..3. Cb and Cr never share an edge,
so putting them side by side simply lets them take turns in every pass.
Each plane is worked through one block row r at a time, top to bottom, with
two passes per block row:

* **H pass**: filter the vertical edges of row r, left to right. That is
  the MB's left edge, then the edges between its blocks (for chroma: Cb's
  two edges, then Cr's two). Each edge takes four lines (rows), so the pass
  runs 16 cycles.
* **V pass**: filter the horizontal edges above row r, between row r-1 and
  row r (for r = 0, between the top neighbour and row 0). This also takes 4
  lines per block, but here the lines are columns.

The passes run in the order H(0) H(1) V(0) V(1) H(2) V(2) H(3) V(3); chroma
stops after V(1). H(1) is pulled ahead of V(0) to keep the pixel port busy
(see the pass schedule).

This order is not the standard's, which does all vertical edges of the MB
first and then all horizontal ones. It gives the same pixels: the
horizontal edge above row r reads and writes only rows r-1 and r. Both of
those rows have had their vertical edges filtered already, and no later
vertical edge touches them. The testbenches compare the output against a
model that uses the standard's order.

## The two-dimensional block memory (`mem2d`)

The way the memory is laid out is what the whole design rests on. A 4x4
block is stored across four 8-bit banks M0..M3. Pixel (x, y) goes into
bank `(x + y) mod 4` at word address `4*slot + y`:

```
            M0   M1   M2   M3        (address 4*slot + y)
  y = 0     x0   x1   x2   x3
  y = 1     x3   x0   x1   x2
  y = 2     x2   x3   x0   x1
  y = 3     x1   x2   x3   x0
```

Every row is the row above it rotated by one bank. Because of that, the
four pixels of any row lie in four different banks, and so do the four
pixels of any column:

* **Row y**: every bank is read at address `4*slot + y`. Bank b returns
  pixel `x = (b - y) mod 4`, so the word comes out rotated by y.
* **Column x**: bank b is read at address `4*slot + ((b - x) mod 4)` and
  returns pixel `y = (b - x) mod 4`. The addresses differ per bank, and the
  word again comes out rotated, this time by x.

In both cases line number L (y for a row, x for a column) fixes the
rotation. Around the banks sit three small pieces of logic and one
register:

1. **Write alignment**: rotates the incoming word so that bank b gets
   element `(b - L) mod 4`.
2. **Address generator**: makes four bank addresses from slot, L and the
   row/column bit.
3. **Delay register**: holds L for the one cycle of read latency.
4. **Read alignment**: rotates the bank outputs back, so that
   `word[j] = bank[(j + L) mod 4]`.

A read word therefore always has element j equal to pixel x = j (row) or
y = j (column), whichever direction it was read in. Writes work the same
way, so a block written as rows can be read as columns and written back as
columns with no conversion.

Port behaviour:

* `mem2d` has two independent ports, A and B, each able to read or write in
  any cycle. Each bank is a plain dual-port SRAM.
* Reads have one cycle of latency.
* Reading and writing the same word in one cycle returns the old data.
* The two ports must not write the same word in one cycle; an assertion
  checks this.
* The storage is a plain array (`bank[4][DEPTH]`) with no reset, so
  synthesis can map it to SRAM macros.

## The recursive pipelined edge filter (`df_pipe_filter`)

The filter takes one line per cycle:

* four p pixels and four q pixels, element 0 next to the edge;
* the edge's BS (0..4), IndexA, IndexB, and a chroma flag.

The filtered line comes out exactly four cycles later. The filter never
stalls. The standard's equations are split so that shared sums are formed
once:

| Stage | Work |
|---|---|
| 1 | threshold look-up (`df_lut`): alpha(IndexA), beta(IndexB), c1 = tC0(IndexA, BS); first partial sums such as p0+q0+1, p1+p2+1, q0-p0 |
| 2 | flag unit (`df_flag_unit`) and second-level sums: p0+q0+p1+p2+2, etc.; the BS 4 values for p1/q1 and the weak p0f/q0f; the unclipped BS 1..3 deltas |
| 3 | the rest of the strong-filter sums (p2, p0, q0, q2), and clipping of the BS 1..3 results to +-c0 and 0..255 |
| out | per-pixel choice between the original and the filtered value |

The flag unit forms six comparisons:

```
FLAG1 = |p0-q0| < alpha          FLAG4 = |p2-p0| < beta
FLAG2 = |p1-p0| < beta           FLAG5 = |q2-q0| < beta
FLAG3 = |q1-q0| < beta           FLAG6 = |p0-q0| < (alpha >> 2) + 2
```

The line is filtered when BS > 0 and FLAG1..3 all hold. What follows
depends on BS:

* **BS 1..3**: p0 and q0 always move, by delta = clip(+-c0, ((q0-p0)*4 +
  (p1-q1) + 4) >> 3). For luma, p1 moves as well when FLAG4 holds, and q1
  when FLAG5 holds. The clip bound is c0 = c1 + FLAG4 + FLAG5 for luma and
  c1 + 1 for chroma.
* **BS 4, luma**: the strong three-pixel filter is used on the p side when
  FLAG4 and FLAG6 hold, and on the q side when FLAG5 and FLAG6 hold.
  Otherwise that side changes only p0 (or q0), to (2p1 + p0 + q1 + 2) >> 2.
* **BS 4, chroma**: always uses the p0/q0-only form.

The threshold tables are the standard's alpha', beta' and tC0 tables. They
are written out in `df_pkg.sv` and indexed by IndexA/IndexB (0..51) and BS.

With BS = 0 no pixel changes, and the filter is a four-cycle delay line. The
controller uses this to move blocks through the datapath ("pass-through"
operations) without a separate path.

**Recursive input.** When `in_recursive` is set, the p side of the new line
is not taken from the input. It is taken from the q side of the line leaving
the filter in that same cycle, in reversed order: p0..p3 = q3'..q0'. An
edge has four lines and the latency is four cycles. So line k of edge e
enters the filter just as line k of edge e-1 leaves it, and the block
between the two edges goes straight from one edge to the next. In an H
pass only the first edge (the MB's left edge) reads its p side from memory.

## RAM-0 and RAM-1: where each block lives

Both memories are built from `mem2d`:

* **RAM-0** (`ram0_module`) has two halves, each a `mem2d` of 32 words per
  bank, which is 8 block slots per half. Each half has its own ports A and B.
* **RAM-1** (`ram1_module`) has two halves of 16 words per bank, 4 slots
  each, with one write port and one read port.

In the table, c is the block column of the plane (0..3, chroma: Cb 0..1,
Cr 2..3). A block is "rightmost" if it is the last block of its component
in the row: column 3 for luma, columns 1 and 3 for chroma.

| Contents | Memory, half, slot |
|---|---|
| block (r, c) of the current plane | RAM-0, half (r mod 2), or the other half if rightmost; slot c |
| top neighbour above column c | RAM-0, half 1, or half 0 if rightmost; slot 4 + c |
| left neighbour after filtering: luma row r, Cb row r, Cr row r | RAM-0, half 0, slot 4 + r, 4 + r, 6 + r (chroma row 1: half 1) |
| right column of the MB, luma row r | RAM-1, half 0, slot r |
| right column, Cb row r / Cr row r | RAM-1, half 1, slot r / slot 2 + r |

Two rules hold in every V pass:

* The block it filters and the block above it (row r-1, or the top
  neighbour) always sit in different halves. The pass reads both on the
  two port A's in the same cycle, and writes its results through port B.
* The rightmost block of each component sits in the other half. Without
  that, the last operations of an H pass would write two blocks of the same
  half at once (the last p block and the q block), which needs both of its
  ports and would block the V pass for five cycles. With it, an H pass
  writes only through port B, and the V pass can follow it immediately.

The rightmost top neighbours also sit in half 0, in slots 4 + c. For luma
that is slot 7, the left-neighbour slot of row 3, which H(3) fills only long
after V(0) has used the top neighbour. For chroma, slots 5 and 7 would be
overwritten by H(1), which runs before V(0) (see the schedule). So the
chroma left neighbours of row 1 go to half 1, slots 5 and 7, which are
free there.

Life of a block:

* **MB blocks** arrive as rows from the pixel port during the H pass. After
  the V pass below them, they go out as columns. Blocks of the bottom row
  go out as rows in the drain pass at the end of the plane.
* **Right-column blocks** (B8, B13, B18, B23, B26, B29, B34, B37) do not
  leave the chip. They are copied into RAM-1 instead. In the next MB they
  are read back as the left neighbours (B4, B9, ...), filtered once more,
  and only then sent out. Their tags then name the left neighbour, which is
  the right column of the MB processed just before.
* **Top neighbours** are read in as rows and sent back out as columns after
  the V pass of row 0.

## The pass schedule (`df_ctrl`)

The controller issues one operation (one line) per cycle.

* **Issue cycle t**: the operation reads RAM-0, RAM-1 or the pixel port.
* **t+1**: the line enters the filter.
* **t+5**: the result is written to RAM-0, RAM-1 or the pixel port.

All operations go through the filter, including pass-through ones, so this
timing holds everywhere. The passes of one MB are:

```
PARAM(5)
luma:    TIN H(0) H(1) V(0) V(1) . H(2) V(2) . H(3) V(3) DRAIN .
chroma:  TIN H(0) H(1) V(0) V(1) DRAIN .
```

H(1) runs before V(0). This is allowed because H(1) touches only block
row 1, and V(0) only the top neighbours and row 0. The order matters for
the pixel port. V(0) sends the top neighbours out until its very last
write-back. If H(1) came right after it, H(1) would have to wait five
cycles for its input words. V(1) needs no input words, so it can follow
V(0) at once.

* **TIN** (16 operations): loads the top neighbours into RAM-0 as
  pass-through rows.
* **H(r) and V(r)** (16 operations each): the passes described above.
* **DRAIN** (32 operations): writes out the left neighbours and the bottom
  row, and copies the rightmost bottom blocks into RAM-1.

A dot marks a point where idle cycles may be needed. They are inserted
only where the next pass would collide with the write-backs that the
previous pass still has in flight:

| Transition | Idle cycles | Reason |
|---|---|---|
| PARAM -> TIN, TIN -> H(0), H(0) -> H(1), H(1) -> V(0), V(0) -> V(1), H(r) -> V(r), last V -> DRAIN | 0 | no shared port or unwritten data |
| V(r) -> H(r+1), luma r = 1, 2 | 1 | V's last block goes to RAM-1, so only one output word is still pending |
| luma DRAIN -> chroma TIN | 1 | same reason |
| end of MB | 1 | done rises after the last output word; the last RAM-1 writes finish in the next cycles, before any later MB or flush can read them |

The cycle count for one MB adds up as follows:

| Part | Cycles |
|---|---|
| leave idle | 1 |
| parameters | 5 |
| luma: 176 operations + 2 idle | 178 |
| gap before chroma | 1 |
| chroma: 112 operations, no idle | 112 |
| end | 1 |
| **total** | **298** |

Of the 288 operations, 256 move a word over the pixel port: 128 words in
and 128 words out. That port is the real limit of the architecture: the
remaining 32 operations are RAM-1 copies and are the main cost above that
limit, along with 5 idle cycles (one of them to leave the idle state).

Assertions in `df_ctrl` check three things in every cycle:

* input and output never share a cycle;
* RAM-0 port A is never asked to read and write at once;
* the p and q reads of a V pass come from different halves.

## Host interface (`h264_dbf_top`)

| Port | Dir | Meaning |
|---|---|---|
| `start` | in | one-cycle pulse while `busy` is low: filter the next MB |
| `flush` | in | one-cycle pulse while `busy` is low, after the last MB of a picture: write out RAM-1 |
| `busy`, `done` | out | `busy` while working; `done` pulses once at the end |
| `param_req`, `param_data[31:0]` | out / in | `param_req` is high for five cycles starting the cycle after `start`; the host drives word i in the same cycle as the i-th `param_req` |
| `pix_in_req`, `pix_in_tag` | out | request for one 32-bit word |
| `pix_in_data` | in | the requested word, in the same cycle as the request |
| `pix_out_valid`, `pix_out_tag`, `pix_out_data` | out | one filtered word |

**Parameter words**:

* **Words 0..2** form a 96-bit vector of 32 three-bit BS values. BS i is
  in bits [3i+2:3i].
  * i = 4*col + row (0..15): the vertical edge at luma block column `col`
    (0 is the MB's left edge) in block row `row`.
  * i = 16 + 4*row + col (16..31): the horizontal edge above luma block
    (`row`, `col`) (row 0 is the MB's top edge).
  * Chroma edges reuse the luma BS at the same place, as the standard
    specifies. Chroma lines 0-1 of a block take the BS of the first luma
    block beside them, and lines 2-3 that of the second.
* **Word 3**: IndexA/IndexB for the internal edges: [23:18] luma IndexA,
  [17:12] luma IndexB, [11:6] chroma IndexA, [5:0] chroma IndexB.
* **Word 4**: the same four fields for the MB's left and top edges. The
  neighbour's QP enters the average there.

Computing BS and the indices (from QP, coding modes, motion vectors and
the slice offsets) is the host's job.

**Pixel tags** are `{blk[5:0], line[1:0], col}`:

* `blk` is the block number from the map above.
* With `col = 0` the word is row `line` of the block, with element j =
  x = j.
* With `col = 1` it is column `line`, with element j = y = j.
* Element j is bits [8j+7:8j].

Input words are always rows of the MB's own blocks or of the top
neighbours; the host returns whatever the frame buffer holds at that
moment. Output words are written back to the same places:

* top neighbours as columns;
* MB blocks as columns or rows;
* left-neighbour tags (B4, B9, B14, B19, B24, B27, B32, B35) as the right
  column of the MB that was processed just before this one.

In raster order that is the left neighbour. At the start of a row it is
the last MB of the row above, which passes through unchanged because its
edge BS is 0.

**Picture borders**: give BS = 0 on the left edge of the first MB column
and on the top edge of the first MB row.

* For the top row, the host may answer the top-neighbour requests with
  anything and must drop the matching output words.
* For the very first MB of a picture, it must also drop the
  left-neighbour outputs, which carry whatever RAM-1 held.
* After the last MB, `flush` writes out the eight blocks still in RAM-1
  (32 words, tagged as B8, B13, ..., B37 of that last MB).

## Departures from the published design

The architecture follows the published design "Hardware Architecture Design
for High-performance H.264/AVC Deblocking Filter". That design gives the
block diagram, the memory sizes, the two-dimensional storage, the four-stage
filter with its flag unit, the recursive filter input, the block-numbered
edge order and the use of RAM-1 for the right column. The following are
this design's own choices or are known to differ:

* **Cycle count.** The published design reports 279 cycles per MB (5 for
  parameters, 274 for pixels) and 301 for the last MB with its flush. That
  corresponds to 98 pictures/s at 720p and 100 MHz. This design takes 298
  cycles per MB plus 38 for the flush (93.2 pictures/s). Its passes follow
  each other with a few idle gaps, where the published timing overlaps
  loads and stores more tightly. The exact published cycle plan is not
  reproduced.
* **Pass-through operations.** Top neighbours are loaded, finished blocks
  drained, and right-column blocks copied into RAM-1, all through the
  filter with BS 0. This keeps one fixed 5-cycle write-back path. The 32
  RAM-1 copies per MB take cycles of their own.
* **Edge order.** The published order filters all chroma vertical edges
  before the chroma horizontal edges. Here chroma follows the same
  row-by-row order as luma, with Cb and Cr side by side. In both planes the
  vertical edges of row 1 come before the horizontal edges above row 0. The
  pixels are the same.
* **Block placement in RAM-0.** Which block sits in which half and slot,
  including the rightmost-block rule, is this design's own.
* **Port protocol.** The tags, the word layout, the five parameter words
  and the two-sided pixel port (separate in and out signals that are never
  active together, instead of one tri-state bus) are this design's own.
  Top neighbours go back out as columns.
* **Separate chroma indices.** IndexA/IndexB are passed separately for luma
  and chroma, and for inner and MB edges. The standard computes chroma QP
  differently from luma QP, so one pair per MB would not be enough.
* **Not included.** The computation of BS and IndexA/IndexB is not
  included, nor is the external frame memory and bus. They are the
  encoder's or decoder's business: the top expects them as parameters and
  as tagged word requests.
* **Size.** Gate counts are not comparable: the published design gives
  19.4 k gates in a 0.18 um process. See "Size" below for this design's
  generic synthesis numbers.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_df_lut` | alpha/beta/tC0 spot values from the standard's tables, zero regions, monotonicity |
| `tb_df_flag_unit` | flags and selections against a direct model, 20,000 random lines |
| `tb_df_pipe_filter` | every output against a line model of the standard (`tb_ref_pkg`), four-cycle latency, recursive chains |
| `tb_mem2d` | diagonal placement in the banks, row/column reads of row/column writes, both ports, latency |
| `tb_ram0_module`, `tb_ram1_module` | both halves, all ports, random row/column traffic against a model |
| `tb_df_ctrl` | parameter cycles, word and RAM-1 access counts, the BS/IndexA sequence given to the filter, the input order, 298 / 38 cycles |
| `tb_h264_dbf_top` | 3x2 MB picture end to end (the full-size run of the top at its defaults) |
| `tb_dbf_720p` | a whole 1280x720 picture (3600 MBs), 1.39 million pixel checks |

The two end-to-end tests share `tb_dbf_harness`:

* It models a frame buffer that answers the tagged requests and takes the
  write-backs.
* It deblocks a copy of the same random picture in the standard's order.
  BS is random (0..4 on MB edges, 0..3 inside, 0 on the picture border), and
  IndexA/IndexB are random in 16..51.
* It requires both pictures to be identical, and checks the cycle count of
  every MB and of the flush.
* It counts how often each mechanism was used, and fails if one was never
  exercised: recursive lines, RAM-1 reads, column reads, the strong filter,
  BS 1..3, p1/q1 changes, chroma, left-neighbour and flush outputs.

To run one with Verilator (5.x), from the top directory:

```
verilator --binary -j 0 --assert --top-module tb_h264_dbf_top \
  rtl/df_pkg.sv rtl/df_lut.sv rtl/df_flag_unit.sv rtl/df_pipe_filter.sv \
  rtl/mem2d.sv rtl/ram0_module.sv rtl/ram1_module.sv rtl/df_ctrl.sv \
  rtl/h264_dbf_top.sv tb/tb_ref_pkg.sv tb/tb_dbf_harness.sv tb/tb_h264_dbf_top.sv
./obj_dir/Vtb_h264_dbf_top
```

Other tests work the same way:

* For `tb_dbf_720p`, swap the last file and the top name. It builds in
  about 20 s and runs in about 2 s.
* The block tests need only `df_pkg.sv`, the modules below them and
  `tb_ref_pkg.sv` for the filter tests.

All testbenches build without warnings under Verilator's default settings.
With `-Wall`, Verilator reports a few unused signals, for example the
unused port-B read data of RAM-0 and the individual flags after the
selection logic.

To try another pixel-port schedule, change the `GAP_*` constants and the
pass logic in `df_ctrl`. Then update `CYC_MB` in `tb_dbf_harness` and the
cycle check in `tb_df_ctrl`. The assertions and the bit-exact comparison
catch any collision the new schedule introduces.

## Size

Generic synthesis with Yosys of `h264_dbf_top`, with the memories kept as
arrays, gives:

* about 4.5 k cells, about 1.2 k flip-flops;
* 4,480 memory bits: 3,072 are the RAM-0/RAM-1 banks, and the rest are the
  threshold tables.

The flip-flops are mostly the filter's pipeline registers and the
controller's five-stage operation delay line.

## Files

| File | Content |
|---|---|
| `rtl/df_pkg.sv` | types (pixel words, tags, memory requests), threshold tables |
| `rtl/df_lut.sv` | threshold look-up |
| `rtl/df_flag_unit.sv` | FLAG1..6 and the filter-mode selections |
| `rtl/df_pipe_filter.sv` | four-stage recursive edge filter |
| `rtl/mem2d.sv` | two-dimensional block memory |
| `rtl/ram0_module.sv`, `rtl/ram1_module.sv` | RAM-0 and RAM-1 |
| `rtl/df_ctrl.sv` | parameter register and pass sequencer |
| `rtl/h264_dbf_top.sv` | top level: controller, filter, memories, multiplexers |
| `tb/tb_ref_pkg.sv` | line filter written from the standard, used by the testbenches |
| `tb/tb_dbf_harness.sv` | frame buffer model and picture reference for the end-to-end tests |
| `tb/tb_*.sv` | the testbenches listed above |
