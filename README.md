# Camera-based fall detection in an FPGA pipeline

This design watches a room through a CMOS camera and decides, frame by frame,
whether a person in view has fallen. Each pixel flows once through the
analytics at the rate of a 640x480 VGA display. First the frame is compared
with a stored picture of the empty room. Then shadows are removed, and the
foreground mask is cleaned with a 5x5 median filter and 3x3 opening and
closing. Up to four objects get bounding boxes. For each object, the aspect
ratio of its box (height over width) and the movement of its centroid drive a
four-state fall machine: no object, normal, fall recognised, fall confirmed.

The monitor shows the camera picture or the foreground mask. Each box is
outlined in the colour of its state: green for normal, yellow for a
recognised fall, red for a confirmed one. Processing runs at the 25 MHz
pixel clock, one pixel per clock, and no frame is stored on chip except the
one-bit mask. A frame therefore takes 800x525 clocks, about 60 frames per
second.

The RTL is SystemVerilog (IEEE 1800-2017). Every module is synthesizable
except the two simulation models in `tb/`.

## The signal path

```
 sensor ──> image_capture ──> raw2rgb ──> image_buffer ──────────────> video_analytics ──> display_mux ──> VGA
 (pixclk)   (Bayer, x/y,       (2x2 quad   (write FIFOs, SDRAM          (YCrCb, bg-subtract,   (camera or
            bg-frame flag)      -> RGB)     controller, read FIFOs)      median, morphology,    mask, box
                                                                         mask RAM, boxes,       outlines)
                                               vga_ctrl ── requests ──>  fall state machines)
                                               threshold_adjust, sec_timer ──^
```

There are three clock domains:

| domain | modules | notes |
|---|---|---|
| sensor pixel clock | `image_capture`, `raw2rgb`, write side of the write FIFOs | rate set by the sensor |
| SDRAM clock | `sdram_ctrl` | any clock fast enough for the traffic; 125 MHz in the full-size test |
| 25 MHz display clock | everything else | every analytics stage moves at the display's pixel request |

Each domain gets its own reset, released through a two-flop synchroniser in
`fall_detection_top`. The background-capture key is synchronised into the
sensor domain.

### From sensor to RGB

The sensor is assumed to be configured already. It should send 1280x960
raw Bayer samples per frame in G1 R / B G2 quads, with frame-valid and
line-valid. Nothing in this design configures the sensor.

`image_capture` counts coordinates and skips any frame it joins midway. It
marks a frame as a background frame when it is the first whole frame after
reset, or the first after the capture key was pressed. `raw2rgb` keeps one
raw line. For each quad it outputs one 30-bit pixel:

- R is the red sample;
- G is the mean of the two green samples;
- B is the blue sample.

The result is 640x480 RGB at one pixel per quad.

### Frame buffering in SDRAM, and why the frames stay aligned

The analytics need two pictures at the same time: the incoming frame and
the background frame. Both live in SDRAM, each in its own buffer of 307,200
32-bit words. `image_buffer` connects four FIFOs to `sdram_ctrl`, which has
four 32-bit ports:

- write FIFO 0 takes every camera pixel and feeds the incoming-frame buffer;
- write FIFO 1 takes only the pixels of background frames and feeds the
  background buffer;
- read FIFOs 0 and 1 are popped together by the display, so the incoming
  pixel and the background pixel at the same position arrive side by side.

`sdram_ctrl` is a round-robin arbiter. It serves a port when that port's
FIFO has a burst's worth of data (for writes) or room (for reads). A burst
is one row activation, then 16 single-word column commands, then a
precharge. Auto-refresh takes priority when it falls due. Power-up follows
the usual SDR sequence: wait, precharge all, two refreshes, then mode
register set with CAS latency 2.

There are no frame pointers. Each port walks its buffer word by word and
wraps after exactly 307,200 words. The camera writes exactly one frame of
words per frame, and the display reads exactly one frame of words per
frame, so pixel n of every frame always sits at word n. The price is that
both ends must start at a frame boundary. Two start-up rules enforce this:

1. Capture is held in reset until the SDRAM power-up ends (`wr_ready`). It
   then starts with the next whole frame. Without this rule, the write FIFO
   overflows during the 200 µs power-up wait, and every later frame is
   shifted by the pixels that were lost.
2. The display timing stays idle until both read FIFOs are half full
   (`video_ready`). It then starts at pixel (0,0).

The camera and the display do not need the same frame rate. If the camera
is faster or slower, the display sometimes shows a frame that is partly old
and partly new. Sticky flags report a write-FIFO overflow or a read-FIFO
underflow. Either one means the SDRAM clock is too slow for the traffic.

### The display timing is the pipeline's clock enable

`vga_ctrl` produces standard 640x480 timing:

| | visible | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| horizontal | 640 | 16 | 96 | 48 | 800 |
| vertical | 480 | 10 | 2 | 33 | 525 |

During visible pixels it requests a pixel pair. One clock later the pair
arrives with its coordinates, and it moves through the analytics one stage
per clock.

`vga_ctrl` also gives a test pulse that is high from the first visible
pixel to the last, and the number of clocks in between. At full size that
count is 479x800+639 = 383,839. It is measured in simulation.

## Pixel classification

- **`rgb2ycrcb`** (two copies) converts both pixels to Y, Cr and Cb. The
  weights are 0.299, 0.587 and 0.114 for Y, and Cr = 0.713(R−Y),
  Cb = 0.565(B−Y). The coefficients are held in 10-bit fixed point.
- **`bg_subtract`** marks a pixel as foreground when its luma differs from
  the background by more than Ty. A pixel that is darker than the
  background is kept only if its Cr or Cb also differs by more than Tcr or
  Tcb. Otherwise it is taken as shadow: darker, but the same colour.
- **`threshold_adjust`** holds Ty, Tcr and Tcb:
  - start values 40, 12 and 12;
  - a switch pair selects which one to change;
  - two keys step it up or down.

## The window pipeline: median and morphology without frame stores

The mask is filtered by a chain of window operators:

1. `median_filter`: 5x5, which for a binary image is a majority vote of 13
   out of 25;
2. `morph_process`: four 3x3 stages, erode, dilate, dilate, erode. That is
   an opening (removes specks) followed by a closing (fills small gaps).

Each stage is built on `bin_window`. It has K−1 line buffers and a K-column
shift register. When the pixel at (x, y) enters, the window is complete
around (x−R, y−R), with R = (K−1)/2. The stage's output therefore carries
coordinates R lines and R pixels behind its input.

For the first R lines of a frame, the centre lies at the end of the
previous frame. So the last rows of frame n leave a stage while the first
rows of frame n+1 are entering. No stage ever holds a frame, and no stage
ever stalls. The total delay is a few lines. Window cells outside the image
are masked:

- the median counts them as background;
- erosion and dilation ignore them.

The filtered mask has two uses:

- `onchip_mem` (1 bit per pixel) stores it so the display can show it;
- `feature_extract` takes it in stream order.

## Objects: boxes, merging and features

`feature_extract` keeps up to four open boxes while a frame streams in. A
foreground pixel joins the first box it falls within, after that box is
grown by DIST = 16 pixels on every side. Otherwise the pixel opens a new
box. If all four boxes are in use, the pixel is dropped. Each box
accumulates:

- its extent;
- the sums of its member x and y coordinates;
- its member count.

At the last pixel of the frame, the boxes are copied aside, and the next
frame starts at once with empty boxes. Post-processing then runs on the
copy while the next frame streams in:

1. Two boxes are joined when the centre of one lies inside the other. This
   repeats until no pair joins.
2. A shared restoring divider computes each box's centroid (mean member
   position).
3. Width, height, centroid and box centre are published together with
   `frame_done`.

## The fall state machine

`fall_detect` has one instance per object slot. After each `frame_done`:

- `int2float` turns the box height and width into single-precision floats;
- `fp_div` divides them to give the aspect ratio H/W. It is a sequential
  divider for positive normal operands that truncates its result and takes
  27 clocks.

A Q8.8 copy of each ratio goes into a history of HIST = 60 frames (one
second at 60 fps). Time comes from `sec_timer`, which gives 10 ticks per
second.

| state | meaning | goes to |
|---|---|---|
| 0 | no object | 1 when the slot holds an object |
| 1 | normal | 2 when the ratio is below 1 and has dropped by more than 0.5 since one second earlier (the centroid is noted and timing starts) |
| 2 | fall recognised | 3 once more than 6 s pass with the ratio still below 1 and the centroid within 5 pixels of the noted point; 1 as soon as either condition fails |
| 3 | fall confirmed | 1 when the ratio is 1 or more |

Any state goes to 0 when the object disappears. The state is updated 28
clocks after `frame_done`.

The display outline colour follows the state. `fall_state` on the top level
reports it for each slot.

## Top-level interface (`fall_detection_top`)

| group | signals |
|---|---|
| sensor | `cam_pixclk`, `cam_fval`, `cam_lval`, `cam_data[9:0]` |
| SDRAM | `sd_clk`; commands `sdram_cs_n/ras_n/cas_n/we_n`, `sdram_ba[1:0]`, `sdram_addr[12:0]`, `sdram_dqm[3:0]`; data split into `sdram_dq_o`, `sdram_dq_oe` and `sdram_dq_i` (the tristate pad belongs in the board wrapper) |
| user (display clock) | `key_bg_capture`, `sw_thr_sel[1:0]` (0 = Y, 1 = Cr, 2 = Cb), `key_thr_inc`, `key_thr_dec`, `sw_show_mask` |
| VGA | `vga_clk` (25 MHz), `vga_r/g/b[9:0]`, `vga_hs_n`, `vga_vs_n`, `vga_blank_n`; pixels and syncs are aligned, 2 clocks after the timing counters |
| status | `fall_state[4]`, `objects[4]` (box, size, centroid, centre), `frame_done`, `test_pulse`, `frame_cycles`, `wr_overflow`, `rd_underflow` |

Shared types are in `rtl/fd_pkg.sv`: the RGB and YCrCb pixels, the object
record and the state enum. The chroma fields are plain vectors holding two's
complement values. Read them through `$signed`.

Main parameters (the defaults are the full design):

| parameter | default | meaning |
|---|---|---|
| `H_ACT`, `V_ACT`, porches | 640, 480, standard | display, and with it the processing size |
| `NUM_OBJ` | 4 | number of tracked objects |
| `DIST` | 16 | box growth for pixel matching |
| `HIST` | 60 | frames in the ratio history |
| `INACT_SEC` | 6 | inactivity time before a fall is confirmed |
| `CLK_HZ`, `TICKS_PER_SEC` | 25,000,000, 10 | timer |
| `FIFO_AW` | 9 | 512-word FIFOs |
| `BURST` | 16 | SDRAM burst length |
| `REF_CYC` | 780 | SDRAM refresh interval |
| `INIT_CYC` | 20000 | SDRAM power-up wait, in SDRAM clocks |

Resources at the defaults:

- about 395 Kbit of on-chip memory: the 307,200-bit mask, the four FIFOs,
  and the median, morphology and Bayer line buffers;
- roughly 4,000 flip-flops before technology mapping.

## Simulating

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. Two behavioural models live in `tb/`:

- `cmos_sensor_model` draws a synthetic scene: a textured grey room, an
  optional orange figure, and an optional shadow.
- `sdram_model` is an SDR SDRAM model. It checks the command protocol and
  counts refreshes.

To run one testbench with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/fd_pkg.sv tb/tb_fall_detection_top.sv \
          --top-module tb_fall_detection_top -o sim
obj_dir/sim +verilator+rand+reset+2
```

Every module has its own testbench, `tb/tb_<module>.sv`. Two testbenches
cover the whole system:

- **`tb_fall_detection_top`** runs at 40x30 with a 2-frame history and a
  short "second", and takes about 15 s. The figure stands with a shadow
  beside it, lies down, stays still, then leaves. The test checks:
  - the box;
  - that the shadow is absent from the mask;
  - the frame cycle count;
  - the state sequence 1, 2, 3, 0;
  - a threshold step;
  - the mask view and all three outline colours on the VGA pins;
  - SDRAM refreshes;
  - no FIFO error and no SDRAM protocol error.

  It fails any of these mechanisms that never happened.
- **`tb_fall_detection_full`** runs the top with all defaults (1280x960
  sensor, 640x480 display, full SDRAM timing) and takes about 1 minute. It
  checks:
  - background capture;
  - the box of a standing figure and its shadow removal;
  - state "normal";
  - the count 383,839;
  - clean FIFOs.

  With a 60-frame history and a 6 s wait, a full fall at full size would
  take thousands of simulated frames. The fall sequence is therefore
  exercised only at the reduced size.

The simulation models start with random register values, so every register
that is read has a reset.

## How closely this follows the published design, and where it departs

The design follows the published architecture:

- the partition into capture, Bayer conversion, SDRAM buffering with
  32-bit ports, YCrCb shadow-aware background subtraction, 5x5 median,
  opening-closing, four-object boxes with the centre-inside merge rule, and
  the four-state fall machine;
- the thresholds of the state machine (ratio 1, drop 0.5, 6 s, 5 px);
- the processing clock of 25 MHz.

These are this design's own choices, because the source does not give
them:

- FIFO depths;
- the SDRAM command timing, burst length, refresh interval and port
  arbitration;
- the start-up rules;
- the fixed-point coefficients;
- the threshold start values and step;
- the matching distance (16) and first-match allocation;
- how object slots are kept from frame to frame. A slot is whatever box
  the raster scan opens in that position, and objects are not re-identified
  across frames.

The parts the source leaves out are handled as follows:

| part | handling |
|---|---|
| Sensor register configuration | not built; the sensor must already be set to 1280x960 output. |
| SRAM controller | shown in the source's block diagram without any stated use; not built. |
| Vendor floating-point divider | replaced by `fp_div`, which is exact to truncation for positive normal numbers. |
| Aspect ratio history | the previous second's ratio is held as 8.8 fixed point, not as a float. |
| Comparison point for "one second earlier" | taken as HIST = 60 frames back. |
| Inactivity time | counted in tenths of a second. |
| Frame cycle count | counted over the visible frame, giving 383,839 clocks at full size; a full 800x525 frame is 420,000 clocks, or 59.52 fps. The source quotes 421,307 clocks and 59.339 fps for its own measurement. |

The fall logic is only as reliable as its bounding box. A person lying
along the camera's line of sight, or partly hidden, keeps a tall box. Two
people close together merge into one box. The source names the same
limits.
