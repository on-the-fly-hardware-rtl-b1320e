# On-the-fly image processing for target recognition

A spacecraft camera that must find an asteroid and its moon in every frame
cannot wait seconds for software to scan a 2048 x 2048 picture. This design
does the pixel-level work while the picture is still arriving over the
SpaceWire link: it shrinks the image, removes noise and single-pixel stars,
finds a brightness threshold, separates targets from the black sky, and gives
every bright object its own label. Software then only has to merge labels
and measure the objects.

Everything is streaming. No frame buffer is used: each stage keeps at most a
few image rows, and the finished label map goes straight to SDRAM over AHB.

## The pixel chain

```
 pix_valid/pix_data (16-bit words, pixel in bits 11:0)
   |
 binning ──> sync_fifo #1 ──> lpf (3x3 kernel, /9, 12 -> 8 bit) ──┬──> histogram ──> threshold
                                                                   └──> binarization (P > T)
                                                                          │
                                              sync_fifo #2 <──────────────┘
                                                   │
                                               mti_label ──labels──> serializer ──> ahb_master ──> SDRAM
                                                   └────label pairs──> adj_vector <── AHB slave (host)
 APB ──> apb_slave ──> reg_bank ──> configuration of every stage, status, histogram read-back
```

| stage | what it does | rate | latency |
|---|---|---|---|
| `binning` | mean of each 2x2 square, R x C -> R/2 x C/2, 12-bit | 1 word/cycle | 2 cycles |
| `sync_fifo` #1 | absorbs the filter's end-of-frame flush | | |
| `lpf` | zero-padded 3x3 convolution with a programmable kernel, divided by 9, saturated, top 8 of 12 bits kept | 1 pixel/cycle | 6 cycles after the window is complete |
| `histogram` | 256 bins, background threshold at end of frame | 1 pixel/cycle | 256-cycle scan after the frame |
| `binarization` | white if P > T | combinational | 0 |
| `sync_fifo` #2 | 1-bit pixels waiting for the labeling core | | |
| `mti_label` | first labeling pass, 16-bit labels | 5 cycles/pixel | |
| `serializer` | two labels per 32-bit word | | |
| `ahb_master` | word writes to consecutive SDRAM addresses | up to 1 word/cycle | |
| `adj_vector` | table of label pairs that belong to the same object | | |

All stages share one clock. The input stream has no back-pressure. Binning
passes on one pixel for every four words, so the labeling core, at 5 cycles per
binned pixel, keeps up as long as words arrive no faster than one every 1.25
cycles on average. A SpaceWire link at about 8 Mword/s with a 50 MHz clock
gives one word every 6 cycles. FIFO #2 absorbs the bursts inside a row:
binned pixels only appear on odd input rows. If a FIFO overflows, a sticky
status bit is set.

## The hard parts

### Low-pass filter: window, borders and flush

`lpf` keeps two line buffers that delay the stream by one row and by two
rows. The current word and the two delayed ones shift into a 3x3 register
window whose centre is the pixel `C+1` positions back. Outside the image the
neighbours count as zero. The design does this with a 4-bit border mask stored
with the window, so the line buffers never need clearing.

The last row can only be filtered once the row below it would have arrived.
After the frame's last word is accepted, the filter therefore runs `C+1`
flush steps on its own. During those steps `in_ready` is low, and FIFO #1
holds any words that arrive in the meantime.

The arithmetic is a six-stage pipeline that follows the order of additions
of the original design:

1. nine products M0..M8
2. four pair sums, with M8 carried along
3. two sums
4. one sum
5. add M8
6. divide by 9, saturate to 4095, keep bits 11:4

The kernel coefficients are 8-bit unsigned. With all ones the filter is a 3x3
mean. With `K11 = 9` and the rest zero it passes the image through unchanged,
apart from the compression.

### Labeling: one pass in hardware, the merge in software

`mti_label` scans the binary image in raster order. For each pixel it looks at
the four neighbours already visited: W, NW, N and NE (8-connectivity).

- If none of them is labeled, the white pixel takes a new label. Labels count
  up from 1, and 0 means background.
- Otherwise the pixel copies a neighbour's label, trying N first, then NE, W
  and NW.

Sometimes NE belongs to one label and W (or NW) to another. The two objects
then meet at this pixel, and the pair `{NE label, other label}` is sent to
`adj_vector`. With this neighbour order, no other case can join two labels
that are not already known to be equal.

After the frame, software merges the pairs (for example with union-find) to
get one class per object. The testbenches do exactly this and compare the
result with a flood fill.

Each pixel goes through a five-state FSM, so a pixel takes 5 cycles:

1. FETCH pops the pixel.
2. RETRIEVE reads the NE label of the row above and shifts N and NW along.
3. ANALYZE chooses the label.
4. UPDATE writes it into the line buffer.
5. EMIT hands the label and any pair downstream, and waits if the bus is busy.

`adj_vector` skips a pair that equals the one it just stored. Comb-shaped
objects produce the same pair on many rows, and this keeps them from filling
the table.

### Threshold: same frame or next frame

Binarization runs in parallel with the histogram. That means the histogram
of a frame is complete only after the frame has already been binarized. Each
frame is binarized with register `THR`:

- In manual mode the host writes `THR`.
- In auto mode (`CTRL[1]`), `THR` is loaded with the histogram threshold as
  soon as a frame ends, so each frame uses the threshold of the frame before.

The histogram threshold is the first luminance at which the cumulative
count, from 0 upwards, reaches `BGCOUNT`. `BGCOUNT` is the number of pixels
expected to be background.

## Register map (APB, byte offsets)

| offset | name | fields |
|---|---|---|
| 0x000 | CTRL | [0] start (write 1), [1] auto threshold |
| 0x004 | STATUS | [0] done, [1] busy, [2] threshold valid, [3] FIFO1 overflow, [4] FIFO2 overflow, [5] label overflow, [6] adjacency overflow, [7] AHB error |
| 0x008 | SIZE | [11:0] input columns, [27:16] input rows (even; reset 2048 x 2048) |
| 0x00C-0x014 | KERNEL0..2 | K00 K01 K02 K10 / K11 K12 K20 K21 / K22, byte 0 first (reset: all 1) |
| 0x018 | THR | [7:0] binarization threshold (reset 32) |
| 0x01C | BGCOUNT | [20:0] background pixel count |
| 0x020 | DSTADDR | SDRAM byte address of the label image |
| 0x024 | HISTTHR | [7:0] threshold found in the last frame |
| 0x028 | LABELS | labels handed out in the last frame |
| 0x02C | ADJCOUNT | entries in the adjacency table |
| 0x400-0x7FC | HIST | bin i at 0x400 + 4i |

To run a frame:

1. Write the size, the kernel, `BGCOUNT` and `DSTADDR`.
2. Write `CTRL = 1`, or `3` for auto mode.
3. Stream `rows x cols` words in.
4. Wait for `done`.

The results are then in place:

- Label `i` of the binned image is in SDRAM at `DSTADDR + 4*(i/2)`: bits 15:0
  for even `i` and bits 31:16 for odd `i`.
- Pair `j` is at AHB offset `4*j` of the `adj_vector` slave port, as
  `{kept label, other label}`.

## Top-level ports of `image_processing_module`

- `pix_valid`, `pix_data[15:0]`: words from the SpaceWire interface.
- `psel penable pwrite paddr[11:0] pwdata prdata pready pslverr`: APB slave.
- `m_h*`: AHB-Lite master, point-to-point to the SDRAM controller.
- `s_h*`: AHB-Lite read-only slave exposing the adjacency table.
- `done`: the last label word of the frame has been written.

Parameters: `MAX_IN_COLS` (2048), `FIFO1_DEPTH` (1024), `FIFO2_DEPTH` (2048),
`ADJ_DEPTH` (4096). At these values the design holds a 2048 x 2048 frame, the
size the design was made for.

## What is taken from the original design and what is not

Taken from the original design:

- the order of the stages and the three bus ports
- the 2x2 binning formula and its two-adder, 2-cycle datapath
- the 3x3 kernel convolution divided by 9, with its 6-stage adder pipeline
- the truncation from 12 to 8 bits
- the 256-bin histogram compared with a user threshold
- binarization by `P > T`
- 16-bit labels that only grow, and the Retrieve-Analyze-Update labeling FSM
  at 5 cycles per pixel
- the split between a first labeling pass in hardware and the merge in
  software

Choices made in this RTL, where no details were available:

- Border handling (zero padding) and the flush.
- The 8-bit kernel width and the saturation.
- Where the compression happens: after the filter.
- How the histogram result is turned into a threshold, and the auto mode.
- The neighbourhood and the pair rule of the labeling pass.
- FIFO depths, the adjacency table size and the de-duplication.
- The serializer word format.
- The AHB and APB transfer details and the whole register map.
- Binning uses one line buffer of pair sums, where the original design uses
  four FIFOs indexed by row and column. The result is the same.

The processing times and FPGA resources reported for the original RTG4
implementation are not reproduced here.

Not included, because they are outside this module:

- the SpaceWire interface
- the AHB-to-APB bridge
- the AHB bus and the SDRAM controller
- the host processor and its software: second labeling pass, feature
  extraction and target selection

## Verification

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Each one compares the module's outputs with values computed inside the
testbench, checks the stated latencies and rates, and prints
`TB_RESULT checks=N failures=M`.

- `tb_image_processing_module` runs three 32 x 40 frames end to end through
  `ipm_bench`:
  - a mean kernel, a random kernel, and an identity kernel with a comb object
  - manual and auto threshold
  - an SDRAM model (`tb/ahb_mem_model.sv`) that inserts wait states 85% of the
    time

  It checks every filtered pixel, all 256 histogram bins, the threshold, the
  label map against a flood fill after merging the reported pairs, and the
  status. It also checks that each mechanism happened at least once: filter
  flush, back-pressure on the labeling core, label output stalls, bus wait
  states, new labels, merges and skipped repeated pairs.
- `tb_full_frame` runs the same checks on one 2048 x 2048 frame with every
  parameter at its default. Words arrive at 8 Mword/s with a 50 MHz clock (4
  words every 25 cycles), the rate of the SpaceWire link.
  - The frame takes 26.2 million cycles, 524 ms of real time, and about 25 s
    in Verilator.
  - `done` rises 5143 cycles after the last word: the processing keeps up with
    the link.

To simulate a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_image_processing_module \
    -Irtl -Itb -y rtl -y tb rtl/ip_pkg.sv tb/tb_image_processing_module.sv
./obj_dir/Vtb_image_processing_module
```

Swap in the name of any other testbench in `tb/` to run it.

## Limits worth knowing

- The labeling pass hands out at most 65535 labels. After that, new objects
  share the last label and STATUS[5] is set.
- Pairs beyond `ADJ_DEPTH` are dropped and STATUS[6] is set. The label map is
  still complete, but software cannot merge those objects.
- The input must not run faster than the labeling core on average (one word
  per 1.25 cycles). Past that, FIFO #2 overflows and pixels are lost.
- A new frame may only be started once `done` is high. Starting earlier
  abandons the frame in flight.
