# Streaming Canny edge detector for live 720p video

This RTL detects edges in grayscale video frames as they stream past, one
pixel per clock, without ever holding a frame. It is the programmable-logic
half of a video-server system on a Zynq UltraScale+ SoC:

- Cameras send H.264 video over Wi-Fi to the SoC.
- The ARM cores decode each frame, convert it to 8-bit grayscale and store it
  in DRAM.
- The ARM core then starts this block.
- A DMA engine streams the frame from DRAM through the block and writes the
  edge map back to DRAM.
- The block interrupts the processor, which re-encodes the edge map and sends
  it to a monitoring station.

Canny edge detection is four neighbourhood operations in a row: blur, gradient,
thinning, and edge tracking. Each one needs the 3x3 neighbourhood of every pixel.
Fetching neighbourhoods from DRAM would be slow, and a 1280x720 frame does not
fit in on-chip RAM. So each phase keeps only the last two image rows on chip.
The four phases run at once, each a little more than one row behind the one
before it.

```
 image_in (32-bit beats, pixel in bits 7:0)
    |
    v  byte select, gated by the control slave
 +---------------+   8b   +----------------+  16b {mag,dir}  +---------------+  8b   +------------+
 | gaussian_blur |------->| sobel_gradient |---------------->| nms_threshold |------>| hysteresis |--+
 +---------------+        +----------------+                 +---------------+       +------------+  |
                                                                                                     |
 image_out (32-bit beats, edge pixel in bits 7:0, tlast on the last pixel) <--- zero extend <--------+
                                                                                     |
 s_axil_* (AXI4-Lite) <--> canny_ctrl: start / done / idle / auto-restart / IRQ <----+ frame done
```

## Files

| File | Role |
|---|---|
| `rtl/canny_top.sv` | Top level: control slave, 32-bit stream ports, pipeline |
| `rtl/canny_ctrl.sv` | AXI4-Lite register block, input gating, interrupt |
| `rtl/canny_pipeline.sv` | The four phases chained |
| `rtl/gaussian_blur.sv`, `rtl/sobel_gradient.sv`, `rtl/nms_threshold.sv`, `rtl/hysteresis.sv` | The phases |
| `rtl/line_window.sv` | Row buffers and 3x3 window, shared by all phases |
| `rtl/axis_skid.sv` | Two-entry register slice at each phase output |
| `rtl/canny_pkg.sv` | Pixel and gradient types, orientation codes, constants |
| `tb/` | Self-checking testbenches, a frame-level reference model (`canny_ref_pkg.sv`) and AXI4-Lite master tasks |

## The row-buffer window (`line_window`)

All four phases use this block. It is where the timing of the whole design
comes from.

**Building the window.** Pixels arrive in raster order. The block keeps two
row memories of `WIDTH` entries. For each incoming pixel at column `c` it
does three things in the same cycle:

1. It reads entry `c` of the row memories, which holds the pixels one and two
   rows above.
2. It writes back the pixel from one row above and the new pixel, which moves
   the stored rows down the frame by one.
3. It shifts the three pixels of column `c` into a 3x3 register window as
   its new right-hand column.

Each pixel is stored once per phase, not three times. The third row of the
window is the pixel now arriving.

**Lag.** The window around pixel `q` is complete only when pixel
`q + WIDTH + 1` has arrived. Each phase therefore runs `WIDTH + 1` pixels
behind its input.

**Frame end.** After the last pixel of a frame has arrived, the window still
owes the last row and one more pixel. The block then makes `WIDTH + 1` flush
steps on its own. During the flush it holds its input not-ready and feeds
zeros. When the flush ends it is ready for the next frame; no reset or
start-of-frame signal is needed.

**Borders.** The block counts rows and columns of the window centre. Taps that
fall outside the frame come with a cleared `tap_ok` bit and read as zero, so
the row memories never need clearing. What a border pixel produces is up to
each phase:

| Phase | Border pixels |
|---|---|
| Blur | Pass through unchanged |
| Gradient | Magnitude 0 |
| Non-maximum suppression, hysteresis | Out-of-frame neighbours count as 0 |

**Handshake.** Both sides use valid/ready. The window advances only when its
previous window has been taken, so back-pressure stops the row memories too.
Each phase puts its combinational result through `axis_skid`, a two-entry
register slice. This keeps the ready path from running through all four
phases, and the chain still moves one pixel per clock.

**Frame boundaries.** These come from counting `WIDTH*HEIGHT` pixels. The
input `tlast` is ignored. `win_last`, and from it the output `tlast`, marks
the window centred on the frame's last pixel.

## The four phases

**Gaussian blur.** Kernel `[1 2 1; 2 4 2; 1 2 1] / 16`, rounded (+8 before
the shift).

**Gradient** (`sobel_gradient`).

- Sobel `gx` and `gy`, each 12 bits signed. `gy` is positive when the image
  gets brighter downward.
- Magnitude is `floor(sqrt(gx^2 + gy^2))`, saturated to 255. The root is an
  8-step restoring integer square root of the low 16 bits. Any sum of 65,536
  or more saturates to 255.
- Orientation is the angle rounded to the nearest 45 degrees and folded into
  0, 45, 90 or 135. It is carried as that number of degrees in one byte.
- No arctangent is computed. `|gy|*256` is compared with `|gx|*106` (the
  boundary at 22.5 degrees) and with `|gx|*618` (67.5 degrees). Equal signs of
  `gx` and `gy` then select 45, unequal signs 135.
- Output is one 16-bit beat `{magnitude[15:8], orientation[7:0]}`. The two
  results share one beat, so they cannot drift apart on the way to the next
  phase.

**Non-maximum suppression and double threshold** (`nms_threshold`). A pixel
keeps its magnitude only if that magnitude is not smaller than both neighbours
along its orientation. With rows growing downward, the neighbours are:

| Orientation | Neighbours compared |
|---|---|
| 0 | left / right |
| 90 | above / below |
| 45 | upper-left / lower-right |
| 135 | upper-right / lower-left |

Ties keep the pixel. A kept magnitude is then classified:

- 255 (strong) if it is at least `HIGH_THRESH`;
- `WEAK_VAL` (weak) if it is at least `LOW_THRESH`;
- 0 otherwise.

Thresholding looks at no neighbours, so it shares this phase instead of
costing a fifth row-buffer lag.

**Hysteresis** (`hysteresis`). Strong pixels stay edges (255). A weak pixel
becomes an edge if any of its eight neighbours is strong. Everything else
becomes 0. This is one streaming pass, so a weak pixel that reaches a strong
one only through other weak pixels is dropped. Full edge following would need
a second pass over the frame, or frame storage.

## Control slave (`canny_ctrl`)

The register map follows the usual layout of HLS-generated block controls:

| Offset | Register | Bits |
|---|---|---|
| 0x00 | CTRL | 0 start (write 1; reads 1 while a frame is in progress), 1 done (cleared by reading CTRL), 2 idle, 3 ready (cleared by reading CTRL), 7 auto-restart (R/W) |
| 0x04 | GIE | 0 global interrupt enable |
| 0x08 | IER | 0 frame-done interrupt enable |
| 0x0C | ISR | 0 frame-done status; writing 1 toggles it |
| 0x10 | FRAMES | number of frames completed (read only) |

**Frame protocol.**

1. Writing start opens the input gate for exactly `WIDTH*HEIGHT` pixels.
   Pixels offered before a start, or beyond the frame, are held off with
   `s_axis_tready` low.
2. The frame ends when its last edge pixel is accepted on `image_out`.
3. At the frame end, done, ready and ISR are set and FRAMES counts up. The
   `interrupt` output goes high if GIE and IER are set.
4. With auto-restart set, the next frame starts at once, so a DMA can stream
   frames back to back with no processor access in between.

**AXI4-Lite details.** The slave has one write and one read in flight. A write
needs its address and data presented together. Responses are always OKAY.

## Timing and throughput

- One pixel per clock in and out when neither side stalls.
- A frame's last edge pixel leaves about `4 x (WIDTH + 2)` cycles after its last
  input pixel. At 1280x720 that is 926,731 cycles from first input to last
  output, or 2.78 ms at 333 MHz (the clock the original system closed timing
  at).
- One pipeline can therefore take about 359 720p frames per second. That is
  enough for 720p60, and for eight 720p30 cameras served in turn (240 frames/s).
- Storage per pipeline is four pairs of row memories, 102,400 bits at
  1280-pixel rows: three phases store 8-bit pixels, the suppression phase
  16-bit gradient beats.
- Each row memory is written at the current column and read, one step
  ahead, at the next column, with a registered read. It therefore fits a
  simple dual-port block RAM. WIDTH must be at least 2.

## Parameters

Top-level parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `WIDTH`, `HEIGHT` | 1280, 720 | Frame size; row-memory depth and pixel count per start |
| `LOW_THRESH`, `HIGH_THRESH` | 20, 50 | Gradient magnitudes for weak and strong edges |

`WEAK_VAL` (default 128) is set in `nms_threshold`, `hysteresis` and
`canny_pipeline`. All phases must use the same value.

## Where this departs from the original system

- The original pipeline was written in a C-based high-level synthesis flow.
  This is hand-written RTL of the same structure: four streaming phases, 3x3
  row-buffer windows, a merged 16-bit gradient stream, and thresholding inside
  the suppression phase.
- These are this design's own choices, because the original gives none of
  them:
  - the blur kernel;
  - the square-root and angle-rounding arithmetic;
  - the byte order of the gradient beat and the orientation code;
  - the threshold values and the weak code;
  - the border rules;
  - the single-pass hysteresis;
  - the register map.
- The original system describes three line buffers per phase. Here, two stored
  rows plus the live input row give the same window.
- The stream width converters between the 32-bit DMA beats and the 8-bit
  pixel stream hold no logic. They appear here only as the byte select and
  zero extension in `canny_top`.
- Not included:
  - the DMA engine, AXI interconnects, reset block and debug logic analyser
    (vendor IP in the original);
  - the processor, DRAM, Wi-Fi, cameras, and all H.264 handling (software).
- The original would serve more cameras by replicating the pipeline (about
  7,300 LUTs each, with eight fitting the device). This RTL has one pipeline.
  A wrapper with several `canny_top` instances and their own DMA channels would
  give that arrangement.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run. Example with Verilator 5, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/canny_pkg.sv tb/canny_ref_pkg.sv tb/axil_bfm_pkg.sv tb/tb_canny_top.sv \
  --top-module tb_canny_top -o sim && ./obj_dir/sim
```

| Testbench | What it does |
|---|---|
| `tb_line_window` | Tags every pixel with its frame, row and column. Checks all nine taps, `tap_ok` and `win_last` of every window, with and without random stalls. |
| `tb_gaussian_blur`, `tb_sobel_gradient`, `tb_nms_threshold`, `tb_hysteresis`, `tb_canny_pipeline` | Three frames each. Frame 0 has no stalls and a cycle budget; the other frames have random input bubbles and output back-pressure. Every beat and `last` flag is compared with `canny_ref_pkg`. |
| `tb_canny_ctrl` | Register reads and writes, input gating, the done read-to-clear, the frame counter, interrupt masking and clearing, and auto-restart. |
| `tb_canny_top` | End to end at 32x20: four frames through the top level, with the processor and DMA roles played by the testbench. Counts that each mechanism occurred (stalls, input held off, auto-restart, interrupts, strong/weak/dropped/suppressed pixels) and checks the frame cycle count. |
| `tb_canny_full` | One 1280x720 frame with all defaults, every pixel compared, frame time checked. Runs in seconds. |
| `tb_canny_streams` | Eight 1280x720 frames from eight "cameras", back to back through auto-restart. Reports the sustained frame rate. |

The reference model in `tb/canny_ref_pkg.sv` works on whole frames in arrays,
straight from the definitions. Its square root uses real arithmetic. It
shares only the documented conventions with the RTL (kernel, angle constants,
border rules, thresholds), not the streaming structure.
