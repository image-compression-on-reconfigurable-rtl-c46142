# CCSDS 122.0 image coder front end: a three-level DWT on a nine-processor SIMD machine

This RTL takes an image of up to 2048 x 2048 pixels (16 bits each) and runs the
first half of a CCSDS 122.0 image compressor on it as a raster stream. It does
not store the image. The three-level integer 9/7 wavelet transform (DWT) runs on
nine tiny processors that all execute the same 29-instruction program. The
program is broadcast by one control unit. Line buffers between the processors
hold only the rows the filters still need. All three DWT levels run at the same
time. Behind the transform, three units of the Bit Plane Encoder (BPE) run
alongside it:

- a **coefficient buffer** keeps two strip segments of coefficients for the coders;
- a **dynamic-range unit** works out the bit depths of each 8x8 block and each
  segment while the coefficients stream past;
- a **header generator** sends the CCSDS 122.0 header of each segment as
  soon as that segment's bit depths are known.

At the very end of the chain, a **bit-rate control** unit cuts each coded
segment to SegByteLimit bytes.

The design follows the CCSDS-IDC coder built for the SO/PHI instrument of Solar
Orbiter, which ran on a Virtex-4 FPGA. That coder's DWT takes 117 clocks for
every two pixels. At 100 MHz, a 2048 x 2048 image therefore takes about 2.46 s.
The coders that turn the coefficients into the rest of the bitstream are not
included: the DC coder, the AC coder and the bitstream organiser. The top
brings out the coefficient buffer's read port, the segment parameters and the
header byte stream, which is where those coders would connect. The bit-rate
control takes its input from top-level ports, where the organiser would feed
it.

Everything is synthesizable SystemVerilog-2017. Apart from a testbench
reference model, there is no vendor code.

## Blocks

| File | Role |
|---|---|
| `idc_pkg.sv` | coefficient type, instruction format, opcodes, the 1D-DWT program, bit-depth functions |
| `npcu.sv` | the program control unit: broadcasts one instruction per clock and frames the steps |
| `nproc.sv` | one nProcessor: eight registers, an integer ALU, and a low/high result pair per step |
| `sync_fifo.sv` | small first-word-fall-through FIFO used in front of every buffer |
| `row_buffer.sv` | turns a row stream into 9-sample windows for the horizontal filter |
| `col_buffer.sv` | row-to-column buffer: eight line buffers and a register, giving 9-row windows |
| `dwt_level.sv` | one DWT level: a row buffer, a row processor, and two column buffers with their processors |
| `dwt_core.sv` | three levels, one nPCU, and the pixel input and back-pressure chain |
| `coef_buffer.sv` | DWT coefficient buffer: ten memories, one per subband |
| `dyn_range.sv` | BitDepthAC_block, the DC value of each block, and BitDepthDC / BitDepthAC per segment |
| `header_gen.sv` | segment header (CCSDS 122.0 Parts 1 to 4) as a byte stream |
| `bitrate_control.sv` | cuts each coded segment at SegByteLimit bytes |
| `ctrl_regs.sv` | configuration and status registers, and the image-shape check |
| `idc_coder.sv` | top |

## The step: one program, nine processors

Time is divided into **steps** of `STEP_CYCLES` clocks (117 by default). In each
step, the nPCU (`npcu.sv`) walks a program counter from 0 to `STEP_CYCLES-1`.
It broadcasts `dwt_program(pc)` on a single instruction bus.

- `step_start` marks pc 0. In that slot, each buffer decides whether its
  processor can work in this step. If it can, the buffer loads a new 9-sample
  window `w[0..8]` into the processor.
- Slots 1 to 29 hold the program.
- The remaining slots are NOPs. They pad the step to 117 clocks, the step
  length of the original machine, whose ALUs could also run a floating-point
  DWT.
- `step_end` marks the last clock. At that edge, every active processor
  presents its results `lo` (low-pass) and `hi` (high-pass).

The program computes one lifting pair of the CCSDS 9/7 integer transform from
the window `w[k] = x[2j-4+k]`:

```
D(j-1) = w3 - ((9(w2+w4) - (w0+w6) + 8) >>> 4)
D(j)   = w5 - ((9(w4+w6) - (w2+w8) + 8) >>> 4)
C(j)   = w4 + ((D(j-1) + D(j) + 1) >>> 2)
```

The multiplication by 9 is written as `(a << 3) + a`. The ALU therefore needs
only add, subtract, immediate add, shift left and arithmetic shift right. Its
other operations are window load (`LDW`) and the two result moves (`OUTL`,
`OUTH`). The opcode set and encoding are this design's own. The ALU is
integer-only, so the floating-point DWT of the original is not available.

A processor works in a step only if its buffer raised `issue` at `step_start`.
Otherwise it executes the broadcast but keeps its outputs quiet. All nine
processors share one program. The design's schedule is therefore about
*which* processors get a window in a given step, and never about different
code.

## Row buffers: windows, pairs and the virtual flush

Each row buffer (`row_buffer.sv`) takes its input through a 4-word FIFO. The
input is pixels for level 1, and LL coefficients of the previous level for
levels 2 and 3. The buffer moves one **pair** of samples into a 10-register
shift chain per step. Once two pairs are in, every step produces a window
centred on an even sample.

A row of W samples gives W/2 real pairs. Two more **virtual** pairs then flush
the last windows out. No data is read for the virtual pairs; the taps beyond
the row end are mirrored instead. A row therefore takes **W/2 + 2 steps**, and
this fixes the input rate: just under 2 pixels per 117 clocks. The original
overlaps the flush of one row with the start of the next. Here, the two extra
steps per row cost 0.2 % at W = 2048.

Borders use the CCSDS symmetric extension:

- `x[-i] = x[i]`;
- `x[W-1+i] = x[W-1-i]`.

The window is mirrored as it is loaded, so the program never sees a border. This
gives exactly the standard's special formulas for the first and last
coefficients, which the testbench reference model uses.

`room` (FIFO count below 3) is what an upstream stage checks before it issues a
step that would write into this buffer. `in_ready` is low whenever the FIFO is
full or the buffer has not been started.

## Row-to-column buffers

A column filter needs nine rows. `col_buffer.sv` keeps eight **line buffers**
of N words each, plus a register for the newest sample. N is the subband width.
Each line buffer is a separate memory with one write and one read port.

In each step, the buffer does the following with one new sample of row r:

1. It reads the eight older samples of the same column: rows r-1 to r-8.
2. It writes every sample one line further down.

After a filling stage of 8N+1 samples, the nine taps form a vertical window. A
window is issued when r is even and at least 4. The output row is (r-4)/2.
Three **virtual rows** at the bottom of the image flush the last output rows.
Top and bottom borders are mirrored in the same way as the row ends.

Each level has two column buffers:

- **P** takes the horizontal low-pass (L) column and gives **LL** and **LH**.
- **Q** takes the horizontal high-pass (H) column and gives **HL** and **HH**.

The first letter of a subband name is always the horizontal filter. P's LL goes
to the next level's row buffer. At level 3 it is the final LL3 (the DC values).

## Three levels in parallel, and back-pressure

`dwt_core.sv` chains three `dwt_level` instances under one nPCU. The nine
processors are, for each level, one row processor and two column processors.
Every stage issues in a step only if its own input is ready and its
destination has `room`. A stall therefore propagates upstream one step at a
time, and nothing is dropped. Levels 2 and 3 receive a quarter and a sixteenth
as much data as level 1, so they are idle in most steps. They still finish each
row soon after level 1 supplies it, which is what lets all levels run
concurrently without a frame store.

The core is started with `start`, `width`, `height` and `px_signed`.

- Pixels enter with `px_valid` / `px_ready`. They are read as unsigned or
  two's-complement 16-bit values.
- Output is one strobe per subband: `sb_valid[level][band]` with `sb_data`.
  Row and column coordinates are shared by each column buffer pair:
  `sb_row/sb_col[level][0]` for P (LL, LH) and `[level][1]` for Q (HL, HH).
- `done` rises one clock after the step in which level 3 produced its last
  coefficients.

Image width and height must be multiples of 8, from 32 up to `MAX_W` /
`MAX_H`. The multiple of 8 guarantees that every level gets an even length of
at least 4.

## DWT coefficient buffer

`coef_buffer.sv` gives each of the ten subbands its own memory, with the sizes
of the original coder:

| Subband | Word width | Rows x words |
|---|---|---|
| LH1, HL1 | 18 | 17 x 1024 |
| HH1 | 19 | 17 x 1024 |
| LH2, HL2, HH2 | 19 | 7 x 512 |
| LH3, HL3, HH3 | 20 | 2 x 256 |
| LL3 | 21 | 2 x 256 |

Each memory is a ring of subband rows addressed by (row mod depth, column).
A strip segment needs 8 level-1 rows, 4 level-2 rows and 1 level-3 row, and the
buffer holds two segments. The extra level-1 and level-2 rows cover the data
that the faster levels write ahead of level 3, before a segment is complete.
Words are stored at the widths above. The unit asserts that every coefficient
fits its width, and sign-extends words when they are read.

To read, set `rd_en`, `rd_level` (0 to 2), `rd_band` (0 LL, 1 LH, 2 HL, 3 HH),
`rd_row` and `rd_col`. The word appears on `rd_data` in the next clock. A
segment may be read once the dynamic-range unit has announced it with
`seg_valid`. It must have been read before the DWT completes the following
segment. Nothing in the buffer holds the DWT back.

## Dynamic range of strip segments

A **block** is the 64 coefficients that descend from one 8x8 patch of the
image: 1 DC (LL3), 3 from level 3, 12 from level 2 and 48 from level 1. A
**strip segment** is one row of S = W/8 blocks.

`dyn_range.sv` computes the following while the DWT runs:

- **BitDepthAC_block**: the bits of the largest AC magnitude in each block;
- the block's DC value;
- per segment, **BitDepthDC** (two's-complement bits of the DC values) and
  **BitDepthAC** (the largest BitDepthAC_block).

A coefficient of level l at subband position (row, col) belongs to block
(row >> (3-l), col >> (3-l)).

All processors finish at the same clock edge, so up to six results arrive
together. The unit latches them and applies them one per clock to a block
accumulator memory. The memory has four banks, selected by block row mod 4,
because level 1 runs up to three block rows ahead of level 3. A segment is
complete when all 2S level-3 results of its block row have been applied. It
then streams out its S blocks, one per clock, with `blk_valid`, `blk_idx`,
`blk_bitdepth_ac` and `blk_dc`. The segment values come with the last block, on
`seg_valid`, `seg_idx`, `bitdepth_dc` and `bitdepth_ac`. A "written since
cleared" flag per entry avoids clearing the memory between segments.

Only strip segments are supported. Other segment sizes are not.

## Segment headers

`header_gen.sv` is triggered by `seg_valid`. It loads the header of that
segment into a 160-bit shift register and sends it MSB first as bytes on
`hdr_valid` / `hdr_ready` / `hdr_data`. `hdr_last` marks the final byte of
each header. The fields follow the CCSDS 122.0 segment header:

| Part | Bytes | Fields |
|---|---|---|
| 1A | 3, every segment | StartImgFlag, EndImgFlag, SegmentCount (8), BitDepthDC (5), BitDepthAC (5), reserved, Part2/3/4 flags |
| 1B | 1, last segment | PadRows (3, always 0 here), reserved |
| 2 | 5, first segment | SegByteLimit (27), DCStop, BitPlaneStop (5), StageStop (2), UseFill = 0, reserved |
| 3 | 3, first segment | S (20) = W/8, OptDCSelect = OptACSelect = 1, reserved |
| 4 | 8, first segment | DWTtype = 1 (integer), SignedPixels, PixelBitDepth = 16 (coded 0), ImageWidth (20), TransposeImg = 0, CodeWordLength = 001 (16-bit words), no custom weights |

The first header of an image is therefore 19 bytes, and the others are 3 bytes
(plus 1 for the last segment). Sending Parts 2 to 4 only once, and the fixed
values in the table, are choices of this design.

A header must be fully sent before the next segment is announced. Segments are
thousands of clocks apart, and an assertion checks this rule.

## Bit-rate control

`bitrate_control.sv` takes the coded segment as 16-bit words (`in_valid` /
`in_ready` / `in_data`, with `in_last` on the final word). A byte counter
runs per segment. The word that reaches SegByteLimit is passed with
`out_last`, and the rest of the segment is accepted and dropped. When the limit
is odd, that last word is marked `out_half`, and only its upper byte belongs
to the segment. SegByteLimit = 0 disables the limit. `truncated` pulses once
for each segment that was cut.

Valid and ready pass straight through the unit, with no register stage. In
the top, the input is the `org_*` port group and the output is `out_*`.

## Registers

`ctrl_regs.sv` is a bank of 32-bit registers. Writes use `reg_we`, `reg_addr`
and `reg_wdata`. A read uses `reg_re` and returns `reg_rdata` one clock later.

| Addr | Name | Meaning |
|---|---|---|
| 0 | CTRL | W: bit 0 starts a compression |
| 1 | WIDTH | image width |
| 2 | HEIGHT | image height |
| 3 | FORMAT | bit 0: signed pixels |
| 4 | SEGBYTES | SegByteLimit, 27 bits |
| 5 | STOP | bit 0 DCStop, bits 5:1 BitPlaneStop, bits 7:6 StageStop |
| 6 | STATUS | bit 0 busy, bit 1 done, bit 2 shape refused |
| 7 | SEGCOUNT | segments finished since start |

A start with a bad shape is refused, and STATUS bit 2 is set. Configuration
writes are ignored while the coder is busy.

SegByteLimit and the three stop fields are written into the first segment
header. SegByteLimit also drives the bit-rate control. The stop fields are
brought out on ports for the missing AC coder, which would apply them.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `dwt_ref_pkg.sv` is an
independent model of the transform. It is written from the standard's 1D
equations, including the explicit border formulas, and the DWT testbenches
compare every coefficient against it.

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/idc_pkg.sv rtl/sync_fifo.sv rtl/npcu.sv rtl/nproc.sv rtl/row_buffer.sv \
  rtl/col_buffer.sv rtl/dwt_level.sv rtl/dwt_core.sv rtl/coef_buffer.sv \
  rtl/dyn_range.sv rtl/ctrl_regs.sv rtl/header_gen.sv rtl/bitrate_control.sv \
  rtl/idc_coder.sv \
  tb/dwt_ref_pkg.sv tb/tb_idc_coder.sv --top-module tb_idc_coder -o sim
./obj_dir/sim
```

For a single block, compile only the files it needs. For example, `tb_nproc`
needs `idc_pkg.sv`, `nproc.sv` and `npcu.sv`.

| Testbench | What it runs |
|---|---|
| `tb_npcu`, `tb_nproc` | step framing; the DWT program against the equations on random windows |
| `tb_row_buffer`, `tb_col_buffer` | windows and mirrored borders against index arithmetic |
| `tb_dwt_level` | one level at 32x16, with and without random downstream stalls |
| `tb_dwt_core` | three levels at 32x32, signed and unsigned, against the reference |
| `tb_coef_buffer` | every coefficient of a 64x64 image read back, for random and checkerboard images |
| `tb_dyn_range` | block and segment bit depths against values computed from the reference |
| `tb_header_gen` | headers of first, middle, last and single segments, rebuilt field by field, with a stalling consumer |
| `tb_bitrate_control` | about 200 random segments against random limits (including 0, odd, exact fit), with gaps and back-pressure |
| `tb_ctrl_regs` | register map, shape check and frozen configuration |
| `tb_idc_coder` | the whole top at `MAX_W = MAX_H = 128`, with `STEP_CYCLES` shortened to 30 |
| `tb_idc_coder_full` | the top at its default parameters on a 2048 x 2048 image |

`tb_idc_coder` runs a 64x32 unsigned image and a 32x64 signed image under
random input gaps, and makes one start with a refused shape. It checks every
streamed coefficient, the pacing bound, every block and segment parameter, and
every coefficient read back from the coefficient buffer, segment by segment.
It also checks the length and Part 1A of every segment header. A stand-in for
the missing organiser sends random word segments into the bit-rate control,
with SegByteLimit set to 13 and 20 bytes, and the testbench checks the cut
output. It counts stalls, segments, signed and unsigned runs, refusals, header
hold-offs, and cut and uncut segments. It fails if any of them never happens.

`tb_idc_coder_full` does the same for one 2048 x 2048 image at the real
117-clock step, which is about 246 million clocks. With Verilator it takes
roughly 5 minutes.

`STEP_CYCLES` may be reduced for faster simulation, down to the 30 clocks the
program needs. The results are the same; only the timing changes.

## How far it can be trusted, and where it departs from the original

Verified:

- bit-exact DWT output against the independent reference at every level and
  band, for several shapes including the full 2048 x 2048;
- correct borders, correct back-pressure, and no lost samples under random
  stalls;
- correct block and segment bit depths;
- the coefficient buffer returns every coefficient of a segment after the
  segment is announced;
- the pixel rate is within the (W/2+2)/(W/2) bound of 2 pixels per 117 clocks.

It has not been run on an FPGA or timed against a clock target.

Departures from the published coder:

- **No coded data after the header.** The following are not implemented: the
  BPE control unit, the DC coder, the AC coder (bitplane control, stage 0,
  block fetcher, word generator, gaggle buffer and code-option selector, VLC
  and stage buffers, bitplane sorter) and the bitstream organiser. The output
  is coefficients, dynamic-range parameters and segment headers. The
  bit-rate control is present, but it receives its words from ports.
- **Integer DWT only.** The processors have no floating-point unit. The
  117-clock step is kept as padding. The original's integer-only ALU works
  in 20.4 fixed point. Here it works on plain 32-bit integers, which give the
  same integer DWT.
- **Own instruction set.** The original's processor instruction set and
  program are not published. The ones here are this design's own.
- **Two extra steps per row** for the end-of-row flush, as described above.
- **Strip segments only**, with S = W/8 blocks.
- **No network interface.** The original reaches its registers through a
  SocWire link. Here the register bus is a port of the top.
- **Minimum image size.** Image sizes from 32 x 32 are accepted. The original
  states 128 x 128 to 2048 x 2048.

## Changing it

- `MAX_W` and `MAX_H` (default 2048) size the line buffers, the coefficient
  buffer and the coordinate widths. Any value from 32 up, in multiples of 8,
  works.
- `STEP_CYCLES` (default 117) sets the step length. It must be at least 30.
- The DWT program lives in `idc_pkg::dwt_program`. A different filter needs
  only a new program, provided it fits the 9-tap window and the eight
  registers.
- Coefficients travel as 32-bit words (`idc_pkg::COEF_W`). The coefficient
  buffer narrows them to the widths in its table. An assertion fires if an
  input ever produces a coefficient that does not fit.
