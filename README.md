# Blob face recognition in SystemVerilog

This RTL finds printed "blob faces" in a camera image and reports each face's ID.

A blob face looks like this:
- A black square sits in the middle. This is the *heart block*.
- The heart block holds up to four white dots.
- A white frame surrounds the heart block.
- The frame carries twelve black dots. The largest of these is the *origin*.

The face ID is a 4-bit number. It comes from where the white dots sit, read clockwise from the corner or side nearest the origin.

The design follows an FPGA system built around a camera, a DDR2 frame buffer, a soft processor and a USB link. This repository contains the custom hardware of that system. The processor, the memory controller and the board are represented only by ports.

## Pipeline

All datapath blocks run on one 100 MHz clock `clk` and use an active-low asynchronous reset `rst_n`. Pixels move as `blob_pkg::pix_t` streams. Each stream beat carries `valid`, `sof`, `eof` and 8 data bits. A beat is one pixel per clock in raster order, and gaps between beats are allowed.

| Block | What it does |
|---|---|
| `image_capture` | Samples the camera's PCLK, HREF, VSYNC and Y[9:0] through a two-flop synchronizer. Detects PCLK rising edges and frame start, and outputs pixels with x/y. Drives XCLK (clk/4, 25 MHz) and PWDN. |
| `downscale` | Reduces 640x480 to 160x120 by keeping every fourth pixel of every fourth row. Keeps Y[9:2] as the 8-bit pixel. |
| `gaussian_smooth` | 5x5 Gaussian filter with the integer kernel 1-4-7-4-1 / 4-16-26-16-4 / 7-26-41-26-7, whose weights sum to 273. Uses four line buffers. The division by 273 is exact, done as a multiply by 122911 and a shift right by 25. Border pixels are dropped. |
| `binarize` | Adaptive threshold over an 11x11 window: a pixel is white when `121*centre > sum + 121*delta`. `delta` is a signed run-time input. White is 1 and black is 0. |
| `dccl` | Connected-component labelling of black and white pixels in one pass. Uses the four causal neighbours: left, up-left, up and up-right. Black and white labels are counted separately and are 8 bits each. Emits equivalence pairs, plus black/white contact pairs for face recognition. |
| `label_group` | Builds one record per label: bounding box, coordinate sums and pixel count. After the frame it resolves equivalences, merges records into their root labels and divides the sums by the count to get centres. Other blocks read records and contact pairs through read ports. |
| `candidate_search` | Walks the black components of the 160x120 image. Keeps those that could be a heart block: square, with a side of 8 to 40 pixels. For each one it computes a VGA window of side 32*k that would hold the whole face, and keeps the window only if it fits inside 640x480. |
| `normalize` | Reduces a square window of side 32*k (k = 3..15, so 96 to 480 pixels) to 96x96 by bilinear interpolation. Uses only the weight pairs (1,0), (1/2,1/2), (3/4,1/4) and (1/4,3/4), computed with adds and shifts. |
| `face_id` | Runs on the labelled 96x96 image. Finds the heart block, then the white frame touching it, then exactly 12 black dots on the frame, the largest of which is the origin. Then it finds the white dots inside the heart block. Eight origin zones (four corners, four sides) pick the reading order of the dot positions, and a look-up table turns them into ID bits W1..W4. |
| `i2c_master` | SCCB/I2C master for the camera registers. Timing works in quarter-bit steps. Supports clock stretching by the slave, multi-master arbitration and bus-busy detection. Does single-byte register writes (S, addr+W, reg, data, P) and reads (S, addr+W, reg, Sr, addr+R, data, NACK, P). |
| `usb_fifo_ctrl` | Master for the EZ-USB FX2 synchronous slave FIFO, on the FX2's IFCLK. Writes go to EP6 (FIFOADR 10) while FLAGB (full) is high, and a short last packet is sent with PKTEND. Reads come from EP2 (FIFOADR 00) while FLAGC (empty) is high. |
| `blob_recognition_top` | Connects everything with plain ports. |

### The two passes

The top has one filter and labelling chain. The `mode` input picks where its input comes from.

- **mode 0, locate.** Camera pixels go out on the frame-buffer write port (`fb_wr_*`). At the same time they are decimated and run through smoothing, binarization, labelling and grouping. `candidate_search` then fills a table of up to 8 windows, and `locate_done` pulses.
  - The controlling processor reads the table through `cand_idx`, `cand_x0`, `cand_y0` and `cand_kout`.
- **mode 1, identify.** The processor streams one stored window from the frame buffer into `fb_rd`, with `cand_k` set to match.
  - `normalize` reduces the window to 96x96, the same chain labels it, and `face_id` decides.
  - `face_done` pulses when it finishes. The result is `face_found` and `face_id_out`, plus the black and white dot counts.

`mode`, `cand_k` and `delta` must stay stable while a pass runs.

### Timing

- **Locate pass.** Capture takes about 12.3 ms per VGA frame at a 25 MHz pixel clock. Filtering and labelling keep up with the pixel stream. After the last decimated pixel:
  - label resolution takes a few thousand clocks;
  - the candidate search takes 256 clocks.
  - In the full-size test scene, `locate_done` arrives about 5,000 clocks before the camera frame ends, because the last three camera rows are not used.
  - The original system quotes about 4.1 ms for this step.
- **Identify pass.** `normalize` takes one pixel per clock: about 92 us for a 96x96 window and 2.3 ms for 480x480 at 100 MHz. After the last window pixel, label resolution and face recognition take about 2,400 clocks (24 us) for the test face. The original system quotes 450 us for this step.

## What follows the original design, and what is chosen here

These parts follow the original design:
- the block order of the pipeline;
- the reuse of one smoothing, binarization and labelling chain for both passes;
- the 5x5 kernel and the 11x11 mean threshold;
- the record contents kept per label, and the black/white contact list;
- the face rules: heart block, frame, 12 dots, origin, and ID bits by position;
- the four interpolation weight pairs;
- the I2C feature set;
- the FX2 FIFO addresses and flags.

The processor's bus interface of each peripheral is replaced by plain command ports.

The following parts are not specified in detail by the original design, so each was decided here:

- **Decimation** keeps one pixel in each 4x4 block and does not average.
- **Gaussian division** by 273 is exact, using a multiply and a shift.
- **Binarization** compares `121*centre` with `sum + 121*delta`, so no division is needed. The two filters drop 2 + 5 = 7 border pixels on each side, so the labelled QQVGA area is 146x106.
- **Label resolution** has these parts:
  - a 32-entry de-duplication queue;
  - 256-entry EQ and contact lists;
  - repeated union passes with path flattening;
  - a shift/subtract divider for the centres.
  - `label_overflow` reports a lost pair.
- **Candidate tests** are fixed:
  - "Square" means `|w-h|*4 <= max(w,h)`.
  - The heart side must be 8 to 40 QQVGA pixels.
  - The window side is `32*k` with `k = max(3, ceil(12*side/32))`.
  - The window is centred on the heart block.
- **Normalize** maps output pixel i to input position `(i+0.5)*k/3 - 0.5` and rounds the fraction to the nearest quarter.
- **Face thresholds** are this design's choice. They include the centring tolerance and the minimum heart size.
- **SCCB read** uses a repeated start between the register phase and the read phase. A stop followed by a new start would let another master take the bus in between.

## Not built

The following parts of the original system are outside this design. They appear only as ports or as behavioural models in the testbenches:
- the soft processor and its bus;
- the multi-port memory controller, the video frame-buffer ports and the DDR2 memory;
- the clock generator;
- GPIO and the serial port;
- the camera sensor;
- the FX2 chip and the host software.

## Simulation

Each block has a self-checking testbench in `tb/`. Every testbench prints a line `TB_RESULT checks=N failures=M` and has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/blob_pkg.sv $(ls rtl/*.sv | grep -v blob_pkg) tb/tb_ref_pkg.sv tb/i2c_slave_model.sv \
  tb/tb_face_id.sv --top-module tb_face_id -o sim
./obj_dir/sim
```

Every testbench passes with zero failures:
- **Filters** (`tb_gaussian_smooth`, `tb_binarize`) are compared pixel by pixel against a direct computation on random images.
- **`tb_dccl` and `tb_label_group`** check the labels, boxes, centres and counts against a flood-fill reference.
- **`tb_normalize`** compares against a real-arithmetic model for k = 3, 4, 5, 6, 11 and 15.
- **`tb_face_id`** draws faces for all 8 origin zones and all 16 IDs. It also checks that a face with 11 dots and a face without a heart block are rejected.
- **`tb_i2c_master`** runs two masters and two slaves on one bus. It covers writes, reads, NACK, arbitration, waiting for a busy bus and clock stretching.
- **`tb_usb_fifo_ctrl`** drives an FX2 FIFO model with full and empty stalls and a short packet.
- **`tb_blob_recognition_top`** is the end-to-end test, at full size and default parameters:
  - It configures the camera over SCCB and sends a 640x480 scene containing a blob face, a plain black square and a bar.
  - It checks that the locate pass finds exactly the face and the square.
  - It checks that the identify pass returns the right ID for the face and rejects the square.
  - It moves data over USB.
  - It checks both processing times against the original system's figures: 4.1 ms to locate and 450 us to recognise a face.
  - It counts how often each mechanism was used, and expects each count to be non-zero.

The top-level synthesis (Yosys with the slang front end) comes to about 4,300 cells, 5,800 flip-flop bits and 104 kbit of memory.
