# Reconnaissance robot on an FPGA: live camera, Sobel edges, obstacle avoidance

A small wheeled robot carries an FPGA board, a 5-megapixel camera and two
obstacle sensors. The FPGA does two unrelated jobs at once:

* **Vision.** It takes the camera's raw Bayer pixels, turns them into a
  640x480 colour image, derives a gray-scale image from it, runs a Sobel edge
  detector over the gray image and shows the colour image, the gray image or
  the edge map on a VGA monitor, live.
* **Driving.** It reads two obstacle sensors and drives the two wheel motors
  through an L293D H-bridge: straight ahead while the path is free; on an
  obstacle, stop, pause, turn away, pause, and look again.

This repository holds synthesizable SystemVerilog for both, a self-checking
testbench for every module and an end-to-end testbench of the whole chip.

## Data flow of the vision part

```
 camera (pix_clk)                                   video (clk_vga)
 ┌───────────┐  ┌────────┐  ┌────────┐  ┌──────────┐   ┌────────────┐   ┌───────────┐
 │ccd_capture│─▶│raw2rgb │─▶│rgb2gray│─▶│async_fifo│─┬▶│ frame_ram  │──▶│           │
 │ FVAL/LVAL │  │2x2 quad│  │R+2G+B  │  │ clock    │ │ │ frame buf  │   │display_mux│─▶ vga_controller ─▶ VGA
 │ x,y count │  │binning │  │  /4    │  │ crossing │ │ └────────────┘   │ RGB/gray/ │
 └───────────┘  └────────┘  └────────┘  └──────────┘ │ ┌──────────┐ ┌──▶│   edge    │
                                                     └▶│sobel_edge│─┤   └───────────┘
                                                       └──────────┘ └▶ sram_edge_store ◀─▶ SRAM chip
```

1. **Capture** (`ccd_capture`). The camera presents a 12-bit pixel per
   pixel clock, qualified by frame-valid and line-valid. Capture begins only
   at a frame whose start it saw, so a frame already running at reset is
   skipped. Every pixel leaves with its column and row number.
2. **Bayer to RGB** (`raw2rgb`). The sensor's colour mosaic is taken as
   `G1 R` on even rows and `B G2` on odd rows. Each 2x2 quad becomes one RGB
   pixel: R, the mean of G1 and G2, and B. A 1280x960 raw frame therefore
   gives a 640x480 colour frame. The even row's (G1, R) pairs wait in a
   640-entry line buffer until the odd row completes the quad.
3. **Gray level** (`rgb2gray`). gray = (R + 2G + B)/4, 8 bits. The colour is
   kept too, reduced to 5/6/5 bits, so one 24-bit word per pixel serves all
   three display modes (`robot_pkg::pixel_t`).
4. **Clock crossing** (`async_fifo`). The camera and the monitor run on
   unrelated clocks. A Gray-code dual-clock FIFO carries
   `{x, y, pixel}` words into the video clock domain. If it is ever full, the
   word is dropped and the sticky `fifo_overflow` output is set.
5. **Storage and edge detection** (video clock). Each pixel popped from the
   FIFO is written into the frame buffer at address `y*640+x`. The same pixel
   also feeds the Sobel detector. Its 1-bit results go into the edge map,
   which is kept in an external 16-bit SRAM.
6. **Display** (`vga_controller`, `display_mux`). The VGA controller scans
   both memories in raster order. The multiplexer shows the colour image, the
   gray image or the edge map, whichever `disp_mode` selects.

### The Sobel detector (`sobel_edge`)

This is the part of the design with the most arithmetic and timing detail.

With rows numbered downwards and the 3x3 window centred on column c, row r:

```
Gx = (G[c+1,r-1] + 2·G[c+1,r] + G[c+1,r+1]) − (G[c-1,r-1] + 2·G[c-1,r] + G[c-1,r+1])
Gy = (G[c-1,r-1] + 2·G[c,r-1] + G[c+1,r-1]) − (G[c-1,r+1] + 2·G[c,r+1] + G[c+1,r+1])
magnitude = |Gx| + |Gy|         (0 … 2040, 11 bits)
edge      = magnitude > edge_thresh
```

* **Magnitude.** The exact magnitude would be sqrt(Gx² + Gy²). This design
  uses the sum of absolute values instead. That is the usual hardware
  approximation, and the threshold is set against it.
* **Streaming.** Pixels arrive in raster order, at most one per clock, with
  idle gaps allowed. Two line buffers hold the two rows above the current
  one. The incoming pixel and the two buffered pixels form the window's new
  right-hand column. Two registered columns make up the rest of the window.
* **Latency.** When pixel (x, y) arrives, the window is complete for centre
  (x−1, y−1). That result comes out one clock later, together with the
  centre's coordinates.
* **Border.** Pixels in the outer row or column have no full neighbourhood,
  so they get no result. A 640x480 frame gives 638x478 = 304,964 results.
  The display draws the border as non-edge.
* **Threshold timing.** The edge map is computed while a camera frame
  arrives. It therefore reflects the threshold in force at that time. A new
  threshold shows once the next camera frame has come in.
* **Heading.** The detector also reports the gradient's heading as one of
  eight compass directions (`out_dir`). Sectors are 45° wide, with
  tan 22.5° taken as 1697/4096. East means brighter to the right and north
  means brighter above. The display does not use the heading; it is there
  for logic that needs it.
* **Drawing.** Edges are drawn black on white, which makes them look like a
  pencil drawing of the scene.

### Memories

**Frame buffer (`frame_ram`).** One frame of 24-bit words (RGB565 + gray),
307,200 words or 7,372,800 bits. It has a write port and a one-clock
registered read port, both on the video clock. During a read and a write of
the same address in one cycle, the read returns the old word.

**Edge map (`sram_edge_store`).** The edge map lives in a 256K x 16
asynchronous SRAM, 16 pixels per word. Pixel (x, y) is bit x%16 of word
y·(IMG_W/16) + x/16, so IMG_W must be a multiple of 16.

* **Writing.** Sobel results arrive in raster order and are collected into a
  16-bit word. The word goes to a one-entry write slot when the next result
  falls into another word, or when the row's last interior pixel has
  arrived. The border columns stay 0.
* **Reading.** Each display request whose x is a multiple of 16 reads one
  SRAM word in that same clock and registers it. The next 15 pixels come
  from the register. The display therefore sees the same one-clock latency
  as from an on-chip memory.
* **Sharing the port.** Reads use one clock in 16 and take priority over
  writes. A pending write waits at most one clock. An assertion checks that
  the write slot is never overrun.
* **Bus timing.** A write holds address, data and WE# low for one whole
  video clock (40 ns). A read completes within one clock, which suits a
  10 ns SRAM. The data bus is split into `sram_dq_o`, `sram_dq_i` and
  `sram_dq_oe`. Combine them with a tri-state pad at the FPGA pin.

**Where this departs from the board.** On the board the frame buffer lives
in the 8-Mbyte SDRAM. Here it is a plain memory array, with no SDRAM
controller. The rest of the design uses about 36.6 kbit of block memory: the
raw2rgb line buffer (15,360 bits), the Sobel line buffers (10,240 bits) and
the FIFO (11,008 bits). The 7.4 Mbit frame array is far larger than the
EP2C35's 483,840 on-chip bits. To run the design on that FPGA, replace
`frame_ram` with an SDRAM controller. Keep the same contract: write a word
per pixel, read a word one clock after its address. There is no double
buffering, so a new camera frame overwrites the one on screen as it arrives.

### VGA timing (`vga_controller`)

Standard 640x480 at 60 Hz from a 25.175 MHz pixel clock:

| direction  | active | front porch | sync | back porch | total |
|------------|--------|-------------|------|------------|-------|
| horizontal | 640    | 16          | 96   | 48         | 800   |
| vertical   | 480    | 10          | 2    | 33         | 525   |

Both sync pulses are active low. In each clock the controller requests the
pixel at its current position, and the source answers one clock later. The
controller registers that answer together with delayed sync and blank
signals, so the outputs lag the request by two clocks. The colour outputs are
10 bits wide, suited to a 10-bit video DAC, and are black during blanking.

## Driving part (`obstacle_avoider`)

```
        ┌──────── free ───────▶ FORWARD (FWD_CYCLES) ─┐
DECIDE ─┤                                             ├──▶ DECIDE
        └─ obstacle ─▶ STOP (STOP_CYCLES) ─▶ TURN (TURN_CYCLES) ─┘
```

* **Sensors.** A sensor output of 1 means an obstacle. The inputs pass
  through a two-flop synchronizer.
* **Turning.** `sensor[0]` is taken as the left sensor and `sensor[1]` as the
  right one. The robot turns away from the sensor that fired, and turns left
  when both fire. Turns are pivot turns: one wheel forward, the other
  backward.
* **Motor code.** Each motor gets the L293D input code: `01` clockwise, `10`
  anti-clockwise, `00` (or `11`) stop. Clockwise on both sides counts as
  forward. If the motors are mounted the other way, swap the codes in
  `robot_pkg::move_to_motors`.

| manoeuvre | `lm` | `rm` |
|-----------|------|------|
| forward   | 01   | 01   |
| stop      | 00   | 00   |
| left      | 10   | 01   |
| right     | 01   | 10   |

* **Delays.** The defaults are 0.1 s forward, 0.5 s stop and 0.5 s turn at
  50 MHz. The motor pins are registered. A stop lasts exactly
  `STOP_CYCLES` clocks. A turn lasts `TURN_CYCLES` + 1, because it includes
  the clock in which the sensors are read again.
* **Board wiring.** Sensors on GPIO_0[1:0], left motor on GPIO_0[3:2], right
  motor on GPIO_0[5:4]. The L293D's inputs are pins 2/7 (left motor) and
  10/15 (right motor).

## Top level (`recon_robot_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `pix_clk` | in | 1 | camera pixel clock |
| `clk_vga` | in | 1 | VGA pixel clock (25.175 MHz, from a PLL outside this RTL) |
| `clk_ctrl` | in | 1 | motor-controller clock (50 MHz for the default delays) |
| `rst_n` | in | 1 | asynchronous reset, released per clock domain through `reset_sync` |
| `ccd_fval`, `ccd_lval`, `ccd_data` | in | 1, 1, 12 | camera bus |
| `disp_mode` | in | 2 | 0 colour, 1 gray, 2 or 3 edge map (slide switches) |
| `edge_thresh` | in | 11 | Sobel threshold (slide switches) |
| `sensor` | in | 2 | obstacle sensors, 1 = obstacle |
| `lm`, `rm` | out | 2, 2 | L293D inputs of the left and right motor |
| `vga_r/g/b` | out | 10 each | colour to the DAC |
| `vga_hs`, `vga_vs`, `vga_blank_n` | out | 1 | syncs (active low), active video |
| `vga_frame_done` | out | 1 | pulse after the last active pixel of a frame |
| `sram_addr`, `sram_dq_o`, `sram_dq_i`, `sram_dq_oe` | out, out, in, out | 18, 16, 16, 1 | edge-map SRAM address and split data bus |
| `sram_ce_n`, `sram_oe_n`, `sram_we_n`, `sram_ub_n`, `sram_lb_n` | out | 1 each | SRAM controls, active low |
| `fifo_overflow` | out | 1 | sticky: a camera pixel was lost at the clock crossing |
| `cam_frames` | out | 16 | camera frames captured |
| `robot_move` | out | 2 | manoeuvre under way (`robot_pkg::move_e`) |

Parameters: `IMG_W`/`IMG_H` (640/480), the raw size `RAW_W`/`RAW_H`
(twice the image size), `FIFO_DEPTH` (256), `SRAM_AW` (18), and the three motor delays.

`disp_mode` and `edge_thresh` are used directly in the video clock domain.
That is fine for switches. Logic that changes them quickly should register
them into `clk_vga` first.

**Throughput.** The FIFO never overflows if the video clock can take one
pixel per clock and the camera delivers at most one colour pixel per two raw
pixels on odd rows. This holds for a pixel clock up to twice the VGA clock;
the testbenches use 50 MHz against 25.2 MHz.

## What comes from the original robot design and what was chosen here

**From the original design:**

* the chain of processing steps
* the 640x480 image size
* the Sobel kernels
* the eight gradient headings
* |Gx| + |Gy| compared with a threshold, 1 above it and 0 otherwise
* the frame border excluded from edge detection
* the three display modes
* the stop / turn / forward control loop with delays
* the L293D motor code
* the pin assignment of sensors and motors

**Chosen here:**

* the camera bus handling and whole-frame start
* the Bayer order and 2x2 binning
* the gray weights
* the FIFO and its depth
* the pixel word format
* the SRAM word packing and port scheduling
* an on-chip frame buffer instead of an SDRAM controller
* the VGA timing values and 10-bit outputs
* black-on-white edge drawing
* how the headings are computed and encoded
* the motor delays, turn directions and the sense of "forward"
* all reset behaviour

The camera's register set-up (exposure, resolution, read mode) is not part
of this RTL. The camera is assumed to deliver 1280x960 raw frames.

## Files

* `rtl/robot_pkg.sv`: shared types (motor codes, manoeuvres, display modes, pixel word)
* `rtl/ccd_capture.sv`, `rtl/raw2rgb.sv`, `rtl/rgb2gray.sv`: camera-side pipeline
* `rtl/async_fifo.sv`, `rtl/reset_sync.sv`: clock-domain crossing
* `rtl/sobel_edge.sv`, `rtl/frame_ram.sv`, `rtl/sram_edge_store.sv`: edge
  detection, frame buffer, SRAM edge map
* `rtl/vga_controller.sv`, `rtl/display_mux.sv`: display
* `rtl/obstacle_avoider.sv`: motor control
* `rtl/recon_robot_top.sv`: the whole chip
* `tb/tb_<module>.sv`: one self-checking testbench per module
* `tb/sram_model.sv`: behavioural model of the 16-bit SRAM, used by the
  testbenches
* `tb/tb_recon_robot_top.sv`: end to end at 64x48 with short motor delays, under a second
* `tb/tb_recon_robot_full.sv`: the same end-to-end test at the default sizes; about 2.5 minutes

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/robot_pkg.sv tb/tb_sobel_edge.sv \
  --top-module tb_sobel_edge -o sim
./obj_dir/sim
```

Substitute any testbench name. The testbenches use only two-state values
and `$urandom`, and each has a watchdog. The end-to-end tests work as
follows:

* **Video.** They send a synthetic block scene as a real camera frame, with
  line and frame blanking. Every active VGA pixel is then compared with a
  reference computed in the testbench, in colour, gray and edge mode. A
  second frame with another threshold follows.
* **Motors.** With the video clocks stopped, they check the forward, stop,
  right-turn and left-turn manoeuvres and their lengths in clocks.
* **Coverage.** They count each of these mechanisms and fail if one never
  occurred.

The full-size run checks all 307,200 pixels of each displayed frame and the
0.5 s motor delays cycle by cycle.
