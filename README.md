# Streaming SVM classifier for HOG pedestrian detection

A linear SVM decides "pedestrian or not" for a detection window by computing
the confidence `y = w·x + b`, where `x` is the window's HOG feature vector and
`w`, `b` are the trained model. In software the classifier slides a window
over the finished HOG feature map of the frame and recomputes a 3780-element
dot product at each of thousands of positions, after waiting for the whole
map.

This design turns the loop inside out. HOG blocks come out of the feature
extractor one at a time in raster order. The moment a block arrives, the
hardware multiplies it with the weights of **every window that contains it**
and adds the result into those windows' running sums. The block is then
discarded. A window's confidence is ready as soon as its last
(bottom-right) block has arrived. So only the running sums of the windows
still open need storage, not the feature map and not all confidence values.

Default geometry, for a 640×480 image:

| quantity | value |
|---|---|
| cell | 8×8 pixels |
| HOG block | 2×2 cells, 36 elements, blocks overlap by one cell |
| HOG frame | 79×59 blocks |
| detection window | 7×15 blocks = 105 blocks = 3780 elements |
| window positions | 73×45 = 3285 per frame, step of one block |
| windows containing one block | 1 (corner) up to 105 (interior) |

## Block-to-window bookkeeping

This is the part that needs the most care. A block at column `bx`, row `by`
lies in every window `(wx, wy)` with

```
max(0, bx-6) <= wx <= min(bx, 72)
max(0, by-14) <= wy <= min(by, 44)
```

For each such window the block sits at relative position
`(bx-wx, by-wy)` inside it. That position selects which 36 weights it meets.
The weight ROM holds one 360-bit word per relative position, 105 words in all,
in row-major order inside the window:
`rom_addr = (by-wy)*7 + (bx-wx)`.

The controller (`svm_main_ctrl`) keeps the position of the next block. It
takes the block, then issues the windows containing it one per cycle,
row by row and left to right within a row. A block therefore costs
(number of its windows) + 1 cycles: one fetch cycle, then one cycle per window.
An interior block costs 106 cycles. A whole frame costs
73·45·105 + 79·59 = 349,586 cycles when the source never stalls, which is
5.1 ms at 68 MHz.

The first window issued for a block at `bx ≥ 6, by ≥ 14` is window
`(bx-6, by-14)`, and this block is that window's last block. So every window
completes on the first issue of a block. Its result leaves exactly
6 cycles after that block was taken.

## Partial-sum RAM and row reuse

Each open window has one 19-bit word in the partial-sum RAM:

- a 12-bit running sum, signed Q4.8;
- a 7-bit count of the blocks added so far.

When the count reaches 105 the window is finished. Its word is written back
as zero, ready for the next window that maps there.

Block row `by` touches window rows `by-14 … by`, so at most 15 window rows are
open at any time. The RAM has 30 rows of 73 words, 2190 words in all. Window
row `wy` uses RAM row `wy mod 30`, and the controller steps this row index as
a wrapping counter. A window row is always finished before the window row 30
below it opens, so the 2190 words serve all 3285 windows. The RAM depth is
the parameter `ROWS`. Any value of 15 or more works, and the classifier
testbench runs with 15.

The RAM contents must start at zero. After reset the controller spends 2190
cycles (`busy_clear`) writing zero to every word, and only then takes
blocks. After that, finished windows keep the words at zero, frame after
frame.

The RAM has one read port and one write port. A window's word is read 2
cycles after the window is issued and written back 1 cycle later. Two
consecutive blocks share many windows. The fetch cycle between them makes
sure the last write-back of one block lands before the next block can read
the same word, so no forwarding path is needed.

## Datapath and number formats

```
 HOG block ──► [hold] ──► MULTIPLY ──► ADD ──► ACC ──► BIAS ──► FIX2FLOAT ──► conf_value
                  ▲          ▲ 36 weights        ▲ │ write-back (0 when done)
     controller ──┴─rom_addr─► weight ROM        │ ▼
               └── RAM read / write addresses ──► partial-sum RAM
```

| stage | module | operation | format out |
|---|---|---|---|
| MULTIPLY | `svm_multiply` | 36 products per cycle, keeps 8 fractional bits (floor) | 36 × 12-bit Q4.8 |
| ADD | `svm_add` | exact sum of the 36 products | 18-bit Q10.8 |
| ACC | `svm_acc` | stored sum + block sum, clamped to 12 bits; count + 1; `win_done` at 105 | 12-bit Q4.8 |
| BIAS | `svm_bias` | + bias (Q4.8) | 13-bit Q5.8 |
| FIX2FLOAT | `svm_fix2float` | exact conversion to IEEE-754 single | 32-bit float |

The formats are as follows:

- HOG elements and weights are both 10-bit signed Q2.8.
- The multiplier drops the low 8 of the 16 fractional bits of each product.
- The running sum is clamped (saturated) at every step. The clamp is visible
  on `sat_event`.

Pipeline in cycles after a window is issued:

- cycle 0: ROM address;
- cycle 1: MULTIPLY;
- cycle 2: ADD, RAM read address;
- cycle 3: ACC and RAM write-back;
- cycle 4: BIAS;
- cycle 5: `conf_value` with `conf_valid`.

## Interfaces

**HOG side.** `blk_available` says a block is on `blk_feature`: 36 elements,
element 0 in the low 10 bits. The classifier takes it in the cycle in which
it raises `blk_req`, like a read from a show-ahead FIFO. `blk_req` depends
combinationally on `blk_available`. Blocks must come in raster order. After
block (78,58) the next block is taken to be (0,0) of the next frame.

**Model.** `bias` is a Q4.8 value. The weights are loaded through
`w_ld_en / w_ld_addr / w_ld_data`, one 36-weight word per cycle; word `r` is
for window row `r/7`, column `r%7`. Reload the weights only between frames.
At power-up the ROM holds placeholder weights from a fixed hash, or the
contents of the file named by the `INIT_FILE` parameter. These are not a
trained model.

**Results.** Each finished window raises `conf_valid` for one cycle, with its
float on `conf_value` and `{wy[5:0], wx[6:0]}` on `window_position`. A result
comes at most once per block, so at least 16 cycles apart in steady state.
The classifier never stalls its output.

**SDRAM writer.** In the top, `svm_avalon_writer` is an Avalon-MM write master
for one FPGA-to-HPS bridge. It writes each result as one 32-bit word to
`conf_base + 4·(wy·73 + wx)`, so software finds a 73×45 array of floats per
frame. It holds a stalled write steady while `avm_waitrequest` is high and
buffers 4 results. If the bus stalls longer than that, results are dropped
and the sticky `conf_overflow` flag is set.

**Camera path.** The top also stores the camera image, so that software and
the display can draw the detections over it. It has two parts:

- `svm_pixel_fifo` is a 16-entry FIFO. It takes one 8-bit pixel per
  `pix_valid` cycle, with `pix_sof` on the first pixel of a frame.
- `svm_pixel_writer` is a second Avalon-MM write master. It packs four pixels
  per 32-bit word, first pixel in the low byte, and writes word `n` of a frame
  to `pix_base + 4·n`.

A start-of-frame pixel restarts the word count. A partly filled word left
from the previous frame is flushed first, with byte enables for the filled
lanes only. The writer gathers the next word while the previous one is on the bus. So it
takes one pixel per cycle unless the bus stalls, and the FIFO absorbs short
stalls. If the FIFO fills, pixels are
dropped and `pix_overflow` is set. This path is independent of the
classifier.

## Files

| file | contents |
|---|---|
| `rtl/svm_pkg.sv` | geometry defaults, number formats, types, placeholder weights |
| `rtl/svm_main_ctrl.sv` | controller FSM, window enumeration, addresses, RAM clear |
| `rtl/svm_weight_rom.sv` | 105 × 360-bit weight store with load port |
| `rtl/svm_psum_ram.sv` | 2190 × 19-bit partial-sum RAM |
| `rtl/svm_multiply.sv`, `svm_add.sv`, `svm_acc.sv`, `svm_bias.sv`, `svm_fix2float.sv` | datapath stages |
| `rtl/svm_classifier.sv` | the classifier |
| `rtl/svm_avalon_writer.sv` | Avalon-MM result writer |
| `rtl/svm_pixel_fifo.sv`, `rtl/svm_pixel_writer.sv` | camera path to SDRAM |
| `rtl/svm_detection_fpga.sv` | top: classifier, result writer, camera path |
| `tb/svm_ref_pkg.sv` | integer reference arithmetic and a whole-frame model |
| `tb/tb_*.sv` | one self-checking testbench per module |

The frame geometry can be changed through the parameters `FRAME_W`, `FRAME_H`,
`WIN_W`, `WIN_H` and `ROWS`. The number formats are constants in `svm_pkg`.

## Where this design makes its own choices

The structure is taken from a published design: the block-at-a-time
processing, the counter-tagged partial sums, the 30×73 reused RAM, the
10-bit Q2.8 weights, the 8-fractional-bit products and the float output.
That design does not specify the following, so this RTL chooses them:

- signed formats, a 10-bit feature width, and truncation of products;
- saturation of the 12-bit running sum;
- the bias format and the 13-bit width after the bias;
- the pipeline register placement;
- the HOG handshake and the window issue order;
- the weight-word layout and the load port;
- the RAM clear after reset;
- the Avalon writer's FIFO, result layout and overflow flag;
- the 8-bit pixel, the FIFO depth, the pixel packing and the frame restart
  of the camera path;
- the fetch cycle per block. An interior block takes 106 cycles, where the
  bare count of windows is 105.

A 12-bit running sum covers only [-8, 8). Real HOG features, which are
L2-normalised and mostly below 0.2, and trained weights normally stay within
that range. Features near 1.0 with large weights of one sign saturate
quickly.

The rest of the detection system is not part of this RTL: the HOG extractor,
the display path (frame reader, video output, VGA) and the processor system
with its SDRAM. The top's ports are where they attach.

Expected on-chip memory for the classifier is 37,800 ROM bits plus 41,610 RAM
bits, 79,410 bits in all. The result writer adds 176 FIFO bits and the pixel
FIFO 144. The published resource report gives 67 kbit in one place and
97 kbit in another for the classifier. This build follows the RAM and ROM
dimensions it states instead. No DSP blocks are needed if the synthesis tool
is told to build the 36 10×10 multipliers from logic.

## Verification

Every module has a self-checking testbench that compares against values
computed independently: integer arithmetic, and reals for the float encoding.
The top testbench, `tb/tb_svm_detection_fpga.sv`, uses the full default
size. It runs two complete 79×59 frames, with a new random model loaded
before each, a randomly stalling block source, and a bus that asserts
waitrequest at random. For every one of the 2×3285 windows it checks:

- the float value against a whole-frame model;
- the window position;
- the 6-cycle latency from the completing block;
- the word that lands in the modelled SDRAM.

It also checks the following:

- one issue cycle per window of each block;
- no idle cycle while a block is available;
- saturation events equal to the model's clamps.

It counts each mechanism and fails if any never happened: stalls, the RAM
clear, completions in reused RAM rows, 105-window and 1-window blocks,
saturation, model reload, frame restart and bus stalls. At the same time a
640×480 camera stream runs through the pixel path, and every packed word is
checked in order, across a pixel frame restart. It takes about 2 s of simulation.

`tb_svm_main_ctrl` checks every address the controller produces on a small
geometry with RAM-row reuse. It also checks that no RAM word is ever shared
by two open windows, and that no read overtakes a pending write.

To simulate with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/svm_pkg.sv tb/svm_ref_pkg.sv tb/tb_svm_detection_fpga.sv --top-module tb_svm_detection_fpga
./obj_dir/Vtb_svm_detection_fpga
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.
