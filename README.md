# Streaming video quality metrics: blockiness and interlace, one microblock per clock

This RTL measures two picture artefacts in uncompressed video as it streams
past, frame by frame, fast enough for 8K video:

* **Blockiness** – the visible 8x8 grid left by block-based codecs. For every
  codec block border the design adds up the luminance steps *across* the
  border (InterSum) and the steps right *next to* it, inside the block
  (IntraSum). A strong border against a smooth interior means visible blocks;
  the host turns the two sums into a score.
* **Interlace** – the comb pattern left when a frame is woven from two fields.
  A 4x4 tile counts as interlaced when its rows alternate bright/dark (or
  dark/bright) in every column. The design counts such tiles per frame.

The idea that makes this cheap is in the data order, not in the logic. The
host cuts each frame into 4x4 **microblocks** of 8-bit luminance, one per
128-bit stream word, grouped four at a time into 8x8 blocks. The block grid
the host uses is moved one pixel right and down against the codec grid. Every
codec border then runs *inside* a transferred block, and both pixels of every
pair that the blockiness metric compares arrive in the same word. The hardware
keeps no line buffers and no pixel memory, only a few 32-bit sums, and it
takes one word per clock.

Four independent channels run side by side. Each channel has its own input
stream, result stream and resolution.

## Stream format

Each channel's input stream carries 128-bit words:

1. **Resolution word** (first word after reset): width in bits `[15:0]`,
   height in bits `[31:16]`. The other bits are ignored. A word that gives
   fewer than 16 pixels is ignored, and the channel keeps waiting.
2. **Microblock words**, without end. A frame is `width*height/16` words, and
   width and height must be multiples of 8. Blocks come in raster order. Each
   block is sent as four words, in the order top-left, top-right,
   bottom-left, bottom-right.

Inside a word, the 16 samples are numbered p1..p16 **column by column**, and
pN occupies bits `[8N-1:8N-8]`:

```
           col0 col1 col2 col3
   row0     p1   p5   p9  p13
   row1     p2   p6  p10  p14
   row2     p3   p7  p11  p15
   row3     p4   p8  p12  p16
```

Once a frame's last microblock has been taken, the channel emits one
**result word** (`vq_result_t` in `rtl/vq_pkg.sv`):

| bits     | field       | meaning                                           |
|----------|-------------|---------------------------------------------------|
| 127:96   | `frame_idx` | frame number, counted from 0 after the resolution word |
| 95:64    | `interlace` | interlaced microblocks in the frame               |
| 63:32    | `intra_sum` | blockiness IntraSum                               |
| 31:0     | `inter_sum` | blockiness InterSum                               |

All sums then restart at zero for the next frame. A channel keeps running
frames until reset. Changing the resolution needs a reset.

### The one-pixel shift is the host's job

The host builds the transferred 8x8 blocks from the frame, offset one pixel
right and down against the codec's 8x8 grid. In a transferred block, the
codec's vertical border therefore lies between columns 6 and 7, and its
horizontal border between rows 6 and 7. The hardware does not know the shift
exists: it assumes the border is at 6|7. A host that sends unshifted blocks
gets sums for the wrong pixel pairs. The RTL does not define what the host
puts in the first row and column, or at the frame's right and bottom edges.

## Blockiness unit (`blockiness_unit`)

Take one transferred block, with rows and columns 0..7, and the codec border
at 6|7 in both directions. The unit uses these pixel pairs:

* **horizontal pairs** in rows 0, 1, 2, 3, 4 and 7: InterSum += |p(r,6) − p(r,7)|
  and IntraSum += |p(r,6) − p(r,5)|
* **vertical pairs** in columns 0, 1, 2, 3, 4 and 7: InterSum += |p(6,c) − p(7,c)|
  and IntraSum += |p(6,c) − p(5,c)|

Rows and columns 5 and 6 are left out. So every block adds 12 InterSum terms
and 12 IntraSum terms. Columns 5..7 and rows 5..7 fall in the right and lower
microblocks, so the terms split over the four words of the block like this:

| microblock   | what it adds                                                      |
|--------------|-------------------------------------------------------------------|
| top-left     | nothing                                                           |
| top-right    | horizontal pairs of all 4 rows (its columns 1, 2, 3)              |
| bottom-left  | vertical pairs of all 4 columns (its rows 1, 2, 3)                |
| bottom-right | horizontal pairs of its rows 0 and 3; vertical pairs of its columns 0 and 3 |

No word ever needs more than four Intra terms and four Inter terms. So one
set of eight absolute-difference circuits and two small adder trees serves
every position. A 4-bit row mask and a 4-bit column mask, chosen by the
position, switch the terms on. The position is the two low bits of the
channel's microblock counter. This is why every frame must start on a block
boundary, and why the microblock order inside a block matters.

Each microblock adds at most 4 × 255 = 1020 to each sum. An 8K frame
(2,097,152 microblocks, three quarters of them contributing) stays below
1.6·10⁹, so 32-bit sums do not overflow.

The unit outputs `intra_next`/`inter_next` with no register stage: each is the
frame sum *including* the word present in this cycle. On a valid word the
registers take these values, or clear to zero when `frame_last` is set. The
channel latches the `_next` values in that same cycle as the frame result.

## Interlace unit (`interlace_unit`)

For each of the four columns of a microblock, three comparisons are made:
row0 vs row1, row2 vs row1 and row2 vs row3. That gives twelve comparisons
per tile. A tile is interlaced when all twelve say "greater" (rows 0 and 2
bright) or all twelve say "less" (rows 0 and 2 dark). Equal neighbours break
the pattern in both polarities. It is a pure AND of comparator outputs, and a
32-bit counter adds one for each interlaced tile. Its outputs follow the same
`_next`/`frame_last` pattern as the blockiness unit.

## Channel control (`vq_fpga`)

A two-state controller:

* **S_RES**: waits for the resolution word. It computes
  `width*height/16` once, with a 32-bit product shifted right by 4, and holds
  the result as the frame length.
* **S_RUN**: every accepted word goes to both units in the same cycle. The
  microblock counter gives the position. On the frame's last word the result
  register loads `{frame_idx, interlace, intra, inter}`, the units clear, and
  the frame number goes up by one.

The result register is a one-deep pipeline stage on a valid/ready output.
`in_ready = (state == S_RES) || !out_valid || out_ready`: while a result is
waiting and the consumer is not taking it, the channel accepts no input, so a
later frame end can never overwrite it. An assertion checks that a result offered and not taken stays stable.

Timing: one microblock per clock with no bubbles, including across frame
boundaries. The result is valid in the cycle after the frame's last
microblock.

## Four channels (`vq_top`)

`vq_top` has `N_MODULES` (default 4) copies of

```
in_data[i] -> stream_fifo (InputStream) -> vq_fpga -> stream_fifo (OutputStream) -> out_data[i]
```

The channels share only clock and reset. `stream_fifo` is a 128-bit,
`STREAM_DEPTH`-word (default 16) FIFO with valid/ready on both sides. It
reads its head word straight from the array, so a word written into an empty
buffer can be read one cycle later. If a consumer stops taking results, the
back-pressure runs back through the output buffer and `vq_fpga` to the host
port: first the output buffer fills, then `vq_fpga` holds its input, then the
input buffer fills and `in_ready` falls.

Status outputs per channel: `configured` (the resolution is known) and
`frame_done` (a one-cycle pulse when the channel takes a frame's last
microblock).

### Throughput

Each channel needs exactly `width*height/16` cycles per frame:

| resolution  | microblocks/frame | clock for 30 fps, one channel |
|-------------|------------------:|------------------------------:|
| 320x240     |             4,800 |                     0.144 MHz |
| 640x480     |            19,200 |                     0.58 MHz  |
| 1920x1080   |           129,600 |                      3.9 MHz  |
| 4096x2048   |           524,288 |                     15.7 MHz  |
| 8192x4096   |         2,097,152 |                     62.9 MHz  |

So a single channel runs 8K at 30 fps from about 63 MHz. On the original
FPGA platform the limit was the host link (128-bit streams over PCIe x8),
where about 45 fps at 8K were reported. With the four channels together, a
clock `f` gives `64·f` bytes/s of pixel input.

## How closely this follows the published design

These parts follow the published description:

* the two metrics and the exact pixel pairs and comparisons they use
* the 4x4 microblock in a 128-bit word with column-major pixel numbering
* the block and microblock transfer order
* the one-pixel-shifted block grid
* the resolution-first stream
* per-frame reset of the sums
* 32-bit counters
* four parallel channels

These are choices of this RTL, where the description is silent:

* The header and result word layouts and the byte order of p1..p16.
* The valid/ready handshake and the stream buffers and their depth. The
  original streams were high-level-language FIFO channels with no published
  signal protocol.
* Synchronous active-low reset.
* One microblock per clock with no pipeline registers inside the metric path.
* Ignoring a zero-size resolution word.

These points were read from the published description and are not certain:

* **Microblock position.** The published code keys the three blockiness cases
  on a microblock counter modulo 4 that is already incremented when the metric
  runs. Only one reading makes each case's pixel pairs meet at a single
  border: 1 = top-left, 2 = top-right, 3 = bottom-left, 0 = bottom-right. That
  reading is what is built.
* **Interlace logic.** The prose describes the interlace logic as twelve
  comparators feeding one XNOR. An XNOR of twelve "greater" results would also
  count tiles whose rows are all "less or equal". The published conditions use
  strict comparisons in both polarities, and this RTL follows those.
* **The final blockiness score.** How IntraSum and InterSum are combined into
  a score is not given. The host receives both sums.

Not in the RTL: the host-side producer (file reading, pixel shift,
blocking), the consumer, and the PCIe transport. Their stream ends are the
ports of `vq_top`.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. The reference model (`tb/vq_tb_pkg.sv`) works on picture coordinates.
It cuts an 8x8 block out of a procedurally generated picture and applies the
row/column rules above to it. The mask-per-microblock structure of the RTL is
not used. The test pictures mix noise, interlaced areas of both polarities,
flat areas (equal neighbours) and interlaced areas with one broken sample.

| testbench            | what it covers |
|----------------------|----------------|
| `interlace_unit_tb`  | 12,000 tiles against the reference, idle cycles, frames of random length |
| `blockiness_unit_tb` | 4,000 blocks, sums after every word, frame restart, maximum-difference block |
| `stream_fifo_tb`     | random traffic against a queue model, full/empty, one word per clock |
| `vq_fpga_tb`         | ignored zero header, 16 frames under gaps and back-pressure, one more at full rate checking one word per clock result one cycle after the last word |
| `vq_top_tb`          | four channels at once with small frames and shallow buffers; counts host-port stalls, channel stalls, frame ends, interlaced frames, concurrent activity, ignored header and full-rate frames, and fails if any never happened |
| `vq_top_full_tb`     | default parameters: one 8K frame, two 4K, four Full HD and ten VGA frames at once, then three QVGA frames per channel after a reset; every result checked, every frame exactly `w*h/16` cycles (about 2.2 M cycles, a few seconds) |

`tb/vq_stream_agent.sv` models one host channel (producer and consumer) for the
two top-level tests.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/vq_pkg.sv tb/vq_tb_pkg.sv tb/vq_top_full_tb.sv \
    --top-module vq_top_full_tb -o sim
./obj_dir/sim
```

Replace the last file and the top module name to run another testbench.
Every file in `rtl/` also passes `verilator --lint-only -Wall`, apart from one
warning about the interlace unit's per-tile flag, which `vq_fpga` leaves
unconnected on purpose.

## Files

| file | contents |
|------|----------|
| `rtl/vq_pkg.sv` | widths, pixel/microblock types, position enum, header and result structs, `mb_at`, `abs_diff` |
| `rtl/blockiness_unit.sv` | IntraSum/InterSum |
| `rtl/interlace_unit.sv` | interlace detector and counter |
| `rtl/vq_fpga.sv` | one channel: header, microblock counter, result word |
| `rtl/stream_fifo.sv` | 128-bit stream buffer |
| `rtl/vq_top.sv` | four channels with their stream buffers |
| `tb/` | testbenches, reference model, host channel model |
