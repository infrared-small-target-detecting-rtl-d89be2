# Infrared small target detector as a parallel streaming pipeline

A small target in an infrared image — a few pixels, barely brighter or darker
than a cluttered sky — cannot be found in a single frame by a threshold. This
design finds it by chaining five image filters, each removing a different kind
of clutter, and runs all five at the same time on a live 640×480, 25 frame/s
camera stream:

1. **Top-hat** (spatial): a 3×3 grey-level morphology minus the original
   image. Wide background structure cancels; only features smaller than the
   structuring element survive.
2. **Three frames difference, TFDF** (temporal): a pixel survives only if it
   changed both between the last two frames and the two before. Still
   background and one-frame noise vanish; a moving target stays.
3. **Or processing**: a per-pixel running maximum over all frames, so the
   moving target draws its track.
4. **Closing**: 3×3 dilation then erosion of the accumulated image, joining the
   pieces of a broken track.
5. **Adaptive threshold segmentation (ATS)**: a per-frame threshold turns the
   closed frame into a binary target/background image, shown on a VGA monitor.

Every stage takes one pixel per clock enable and passes its result on at once,
so the frame never waits for a stage to finish. Anything that must be kept
from one frame to the next (earlier Top-hat frames, the accumulated image, the
displayed frame) lives in one external SRAM, and a *multi-core shared memory*
(a set of FIFOs and a slot scheduler in front of the SRAM) lets all stages use
it at once.

## The stream

All stages talk in one format, `px_t` from `rtl/ist_pkg.sv`: an 8-bit pixel
with its row and column, plus a `valid` strobe. A frame begins at row 0,
column 0; rows and columns are counted by the top from the camera strobe. Since
every pixel carries its position, no stage needs frame or line sync signals,
and every stage works at any input rate up to one pixel per clock.

The spatial filters see the row *below* a pixel only after it has arrived, so
their output lags their input. They do not flush at the end of a frame: the
last rows of a frame come out while the next frame enters. The stream is
therefore assumed continuous across frames, as a camera delivers it.

Pixels outside the frame take the neutral value of the operator — 0 for
dilation (max), 255 for erosion (min) — so the borders add nothing.

## The Top-hat: a 3×3 filter as four streaming stages

A 3×3 square is the dilation of a 1×3 line by a 3×1 line, so a 3×3 max (or
min) is a 1×3 max followed by a 3×1 max. Each half is cheap in a stream:

* `morph_h3` (1×3): a three-register chain and a max/min of the three. The
  centre register is the output pixel; the left and right ones are masked at
  row ends. Lag: 1 sample.
* `morph_v3` (3×1): three one-row dual-port RAMs used in rotation. The current
  row is written into one while the two previous rows are read at the same
  column, giving a vertical column of three. Lag: one row (WIDTH samples).

`tophat` chains four of them — dilate 1×3, dilate 3×1, erode 1×3, erode 3×1 —
which is a 3×3 closing, and takes the absolute difference with the original
pixel. The original is held in a delay FIFO and popped each time the last
stage emits a pixel; since every stage keeps raster order, the two always
belong to the same position. The pipeline's lag is 2·WIDTH+2 samples; the FIFO is sized 5·WIDTH,
leaving room to spare.

Closing first (`ORDER_DILATE_FIRST`, the default) responds to *dark* targets
(closing − original). The parameter `ORDER_ERODE_FIRST` gives an opening
instead, original − opening, for bright targets. `close_filter` reuses the
same four stages without the difference.

## TFDF and or processing: read-modify-write through the SRAM

`tfdf` receives the current Top-hat pixel `t_k` directly and writes it into a
ring of three SRAM frames (frame k into region k mod 3). For every pixel it
reads the same position of frames k−1 and k−2 — two reads per pixel — and
produces

    D_k = min(|t_k − t_(k−1)|, |t_(k−1) − t_(k−2)|),   0 during the first two frames.

`or_proc` keeps the accumulated image O in SRAM and, per pixel, reads O,
writes `max(O, D)` (or D itself in the first frame after reset) and passes the
result on.

Both blocks issue the read as the pixel arrives and park the pixel in a small
wait FIFO until the data returns, so SRAM latency and sharing only delay the
stream; they never reorder it. If one of their FIFOs is ever full when a pixel
arrives, `err_drop` is raised (it never happens at the camera rate).

## The multi-core shared memory

`mcsm` gives every client its own FIFO, so no client ever waits for another:

| channel | write FIFO | read FIFOs (address + data) |
|--------:|-----------|------------------------------|
| 0 | Top-hat frame | TFDF reads of frames k−1, k−2 |
| 1 | TFDF result | or read of O |
| 2 | or write of O | external read port (`ext_*`) |
| 3 | closed frame | VGA fetch |

`sram_ctrl` serves them in a fixed round of eight slots:

    0 Top-hat write, 1 TFDF read, 2 TFDF write, 3 or read,
    4 or write, 5 close read, 6 close write, 7 VGA read

Each slot may make up to `BURST` accesses in a row — `{1,2,1,1,1,1,1,4}`, so
TFDF reads two words (its two frames) and the VGA four. The turn starts at the
current slot and jumps to the first slot with work, so an idle slot costs no
clock. A read slot takes its turn only while its data FIFO has room for the
word it asks for. The SRAM is synchronous with one clock of read latency; the
returning word is routed to the channel that asked for it.

Why it keeps up: per camera pixel the stages need 7 accesses (1 + 2 + 1 + 1 +
1 + 1 writes and reads), 53.8 M/s at 7.68 Mpixel/s, and the VGA needs 18.3 M/s
on average, 72 M/s in all against 100 M/s.

The closing keeps its rows in on-chip RAM and needs no SRAM reads, so its read
channel is brought out of the top as `ext_rq_*`/`ext_rd_*`: any SRAM word —
the TFDF result, the accumulated image — can be read there while the design
runs.

## Memory map

Addresses are in units of one frame, F = WIDTH·HEIGHT words of 8 bits:

| region | contents |
|-------:|----------|
| 0, 1, 2 | Top-hat frames, ring of three |
| 3 | TFDF result of the current frame |
| 4 | accumulated image O |
| 5, 6 | closed frames, double buffer for the display |

At 640×480 that is 2,150,400 words; `SRAM_AW` = 22 bits.

## Display and threshold

`ats` computes, over each closed frame, the mean and the maximum, and sets the
threshold `T = max(T_MIN, (mean + max) / 2)` with `T_MIN` = 16. The threshold
is kept per display buffer and applied as the VGA reads that frame, so each
frame is cut by its own threshold. `thr[0]`/`thr[1]` show the two current
values; `frame_done` pulses when a frame and its threshold are complete.

`vga_ctrl` produces 640×480 at 60 Hz with the usual porches and negative
syncs, with a pixel enable every 4th clock (25 MHz). It fetches up to 12 words
ahead of the beam through its read FIFO. The closed frames are written into
the two buffers alternately; the fetch switches to the newest complete buffer
only at the start of a frame, and the pixels shown follow the fetch, so a
displayed frame is never a mix of two. Until the first frame is complete the
screen is black. Output `vga_grey` is 255 for target, 0 for background.

## Clocking and reset

One clock, 100 MHz, runs everything. The camera strobe (`cam_valid`, one pixel
every 13 clocks at 25 frame/s) and the VGA pixel rate are enables. A device
that delivers its own pixel clock needs a clock-domain crossing in front of
`cam_valid`; none is built here. Reset is asynchronous, active low; after
reset the first camera pixel is taken as row 0, column 0.

`err` at the top is sticky: a FIFO overflow, a dropped request, a Top-hat
delay overflow or a display underrun sets it. None happens in normal
operation.

## Where this design makes its own choices

The chain of filters, the decomposition of the Top-hat, the row RAMs, the
eight accesses in their order and the 100 MHz shared SRAM are the original
design. These parts are not specified there and were chosen here:

* the TFDF formula, the ATS threshold rule and `T_MIN`;
* the closing's structuring element (the same 3×3 square);
* the sign of the Top-hat difference (absolute value) and the bright-target
  option `ORDER_ERODE_FIRST`;
* 8-bit pixels, border values, reset behaviour;
* a single clock with enables instead of separate clock domains;
* twelve FIFOs (each read channel has an address and a data FIFO) where the
  original counts eight;
* the burst lengths, FIFO depths (16), the memory map, and the double
  buffer;
* the Top-hat delay FIFO is one FIFO of 5·WIDTH words instead of five FIFOs
  of WIDTH;
* VGA porches and sync widths (standard 640×480 timing);
* the stages after the TFDF hand their pixels straight to the next stage,
  instead of passing every intermediate image through the SRAM; each result
  is still written to the SRAM, and the close-read channel, which then has
  nothing to do, becomes the external read port.

The SRAM, the camera and the monitor are outside the chip. `tb/sram_model.sv`
is a behavioural model of a synchronous SRAM for the testbenches.

## Files

`rtl/`: `ist_pkg` (types and helpers), `ist_top`, `tophat`, `morph_h3`,
`morph_v3`, `dpram`, `tfdf`, `or_proc`, `close_filter`, `ats`, `mcsm`,
`sram_ctrl`, `sync_fifo`, `vga_ctrl`.

`tb/`: one self-checking testbench per block (`tb_<block>`), the end-to-end
`tb_ist_top` (32×16 frames, short VGA porches, bright target), the full-size
`tb_ist_full` (defaults: 640×480, five frames, dark target), the
low-contrast `tb_ist_lowsnr`, `tb_ref_pkg`
(independent software models of every filter) and `sram_model`.

Every testbench prints `TB_RESULT checks=N failures=M`. The end-to-end tests
compare the TFDF, accumulated and closed frames and the VGA picture, pixel by
pixel, against the reference model, and count that each mechanism occurred:
TFDF history use, accumulation, the buffer swap, the threshold update,
two- and four-word bursts and VGA frames. The full-size test (five frames at
640×480, about 36 million checks) takes under a minute in Verilator.

How far to trust it: every stage is compared pixel by pixel with an
independent model, at full size too, and the scheduler's slot order and
bursts are checked cycle by cycle. The main test scenes are synthetic and
clean: a 2×2 target, 50 to 80 grey levels off its background, in noise of
standard deviation 2, where the displayed image shows the track and nothing
else. `tb_ist_lowsnr` repeats the run on five 64×32 frames at a
signal-to-noise ratio of about 1.5 (contrast 9, noise ±10 uniform). The
pipeline still matches the model exactly, but the detection is poor there:
the threshold stays at its floor `T_MIN` and most white pixels in the last
displayed frame are noise. The TFDF rule and the threshold rule are this
design's simple choices; a detector for real low-contrast video needs a
better-tuned threshold.

## Simulating

With Verilator 5, from the top of the tree:

    verilator --binary --timing -Wno-fatal -Irtl -Itb \
        rtl/ist_pkg.sv tb/tb_ref_pkg.sv $(ls rtl/*.sv | grep -v ist_pkg) tb/sram_model.sv tb/tb_ist_top.sv \
        --top-module tb_ist_top
    ./obj_dir/Vtb_ist_top

Replace `tb_ist_top` with any other testbench. The block testbenches
override sizes (small frames) to stay short; `tb_ist_full` uses the defaults.
To change the frame size, set `WIDTH`/`HEIGHT` on `ist_top`; the SRAM map and
address width follow (`SRAM_AW` in `ist_pkg` must hold 7·WIDTH·HEIGHT).
