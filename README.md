# Slot-based video streaming chain: capture, edge detection, VGA

This is a video pipeline built for an FPGA that is cut into exchangeable
vertical *slots*, as on the Erlangen Slot Machine (ESM) board. Each stage of
the chain sits in its own slot and can be swapped by partial reconfiguration
while the other stages keep running. Two board features make that possible,
and this RTL models both:

* **Every slot has its own external SRAM on top.** A controller in the slot
  also lets the two neighbouring slots into that SRAM. Frames therefore move
  from stage to stage through shared memory and need no wires crossing other
  modules.
* **No module is wired to a device pin.** Camera, monitor and other
  peripherals reach the FPGA through a run-time programmable crossbar. A
  module can be placed in any slot and the crossbar is re-pointed to it.

The chain is the three-stage edge-detection case study. A capture module
turns camera YUV into RGB frames. A processing module runs a Sobel, Prewitt or
Laplace edge detector. A rendering module shows the result on a VGA monitor.
The processed image is a quarter-VGA region of interest (320x240), so its
line buffers fit in on-chip block RAM. It is shown 2x2 times on the 640x480
screen.

```
 camera --per_in[1]--> io_crossbar --ch_in[1]--> frame_capture (slot S1)
                                                  | YUV->RGB, frames alternately
                                                  v
                      RAM1 (S1 SRAM)          RAM2 (S2 SRAM)
                           \                    /
                            frame_processing (slot S2)
                            3x3 window + Sobel / Prewitt / Laplace
                                   |
                                   v
                             RAM3 (S3 SRAM)
                                   |
                            vga_render (slot S3) --ch_out[7]--> io_crossbar --per_out[1]--> monitor
```

## Files

| file | contents |
|---|---|
| `rtl/esm_pkg.sv` | shared types: SRAM request/response structs, pixel structs, camera and VGA bus layouts, filter enum, luminance function |
| `rtl/esm_video_top.sv` | the chain: three modules, three SRAM controllers, crossbar |
| `rtl/frame_capture.sv`, `rtl/yuv2rgb.sv` | capture stage |
| `rtl/frame_processing.sv`, `rtl/sliding_window.sv`, `rtl/line_fifo.sv`, `rtl/sobel_prewitt_filter.sv`, `rtl/laplace_filter.sv` | processing stage |
| `rtl/vga_render.sv` | rendering stage |
| `rtl/sram_controller.sv` | per-slot SRAM arbiter |
| `rtl/io_crossbar.sv` | peripheral crossbar |
| `tb/tb_*.sv` | one self-checking testbench per module, an end-to-end test at reduced size, and one at full size |
| `tb/sram_model.sv`, `tb/sram_port_stub.sv`, `tb/esm_chain_tb_body.svh` | testbench models and the shared end-to-end scenario |

## Slots, SRAMs and who may use which

There are three SRAM banks, RAM1 to RAM3, one per slot S1 to S3 (the board
has six). Each bank has an `sram_controller` with three request ports: left
neighbour, central (the slot's own module) and right neighbour. The top wires
them like this:

| controller | left | central | right |
|---|---|---|---|
| RAM1 (S1) | – | capture writes, buffer 0 | processing reads, buffer 0 |
| RAM2 (S2) | capture writes, buffer 1 | processing reads, buffer 1 | – |
| RAM3 (S3) | processing writes the result | renderer reads | – |

The controller serves one request per clock. It picks the valid request that
comes first in its `prio` order, and that order is an input, because the
right priority depends on the application. At RAM3 the renderer must be
first: it cannot wait, since a VGA pixel is due every clock. The processing
module's writes then fill the blanking intervals.

**SRAM handshake** (`sram_req_t` / `sram_rsp_t` in `esm_pkg`):

* A requester raises `valid` with `we`, `addr` and `wdata`, and holds them
  until `gnt`. The grant is combinational, in the same cycle.
* The granted access goes onto the SRAM pins at the next edge.
* A read returns `rvalid` and `rdata` exactly 2 clocks after its grant
  (`SRAM_RD_LAT`), only on the port that issued it. Reads return in order.
* The SRAM is taken to be synchronous with one cycle of access. A word is 32
  bits, so a 2 MByte bank is 512 Ki words (19-bit address).
* A pixel is stored one per word, as `0x00RRGGBB`.

Assertions check that `prio` is a permutation and that at most one port holds
a grant.

## Handing frames from capture to processing

`frame_capture` writes whole frames, taking the two buffers in turn: buffer 0
in RAM1, then buffer 1 in RAM2, then buffer 0 again. When the last pixel of a
frame is in memory (its write FIFO has drained), it raises `buf_full[b]`.
`frame_processing` waits for `buf_full` of the buffer whose turn it is. It
reads that buffer while the camera fills the other one. When it has written
the whole result, it pulses `buf_release[b]`.

The two modules always use different SRAMs, so they never compete for one.

A camera cannot be stalled. So a frame whose target buffer is still full is
dropped whole (`frame_drop`), and the buffer order is kept. A `sof` in the
middle of a frame abandons the partial frame, and the new frame is dropped
too. A 16-entry FIFO covers cycles in which a write is not granted. If it
overflows, the pixel is lost and `overflow` pulses. With the wiring above this
cannot happen, because the capture module has priority at both of its SRAMs.

Colour conversion (`yuv2rgb`) uses BT.601 in 8-bit fixed point, with one
register stage:

```
R = Y + (359*(V-128) >>> 8)
G = Y - ((88*(U-128) + 183*(V-128)) >>> 8)
B = Y + (454*(U-128) >>> 8)
```

Each result is clamped to 0..255.

## The sliding window

This is the part that takes the most care. `sliding_window` keeps a WIN x WIN
block of pixel registers. WIN is 5 by default and the processing stage uses 3.
The rows are chained through WIN-1 line FIFOs:

```
          newest ... oldest
 FIFO1 -> W11 W12 ... W1n -> discarded
 FIFO2 -> W21 W22 ... W2n -> FIFO1
   ...
 pix_in-> Wn1 Wn2 ... Wnn -> FIFO(n-1)
```

On every `shift_en`:

* the new pixel enters the bottom-left cell, and every row moves one cell
  right;
* the cell leaving the right end of a row is pushed into the FIFO of the row
  above;
* that FIFO's oldest entry enters the left end of the row above;
* the top row's rightmost pixel is discarded.

Each FIFO holds `LINE_W - WIN` pixels. A row plus its FIFO is therefore
exactly one image line, and each row holds the same columns as the row below,
one line earlier. A FIFO that has not filled yet feeds zeros.

The port `win[r][c]` gives the window in image orientation, which is mirrored
against the cell numbering above:

* `r = 0` is the oldest line and `c = 0` the oldest column;
* after pixel i has been shifted in,
  `win[r][c] = pixel[i - (WIN-1-r)*LINE_W - (WIN-1-c)]`.

**Use in `frame_processing` (WIN = 3):**

* **Alignment.** After input pixel `i` the window is centred on pixel
  `i - (IMG_W + 1)`. So the first `IMG_W + 1` inputs of a frame produce no
  output. After the last real pixel, `IMG_W + 1` zero pixels are shifted in
  to push the last line through. Output pixel `n` goes to word
  `OUT_BASE + n` of RAM3.
* **Border.** Output pixels on the outermost row or column are written as 0.
  This also hides the pixels of the previous frame or line that are still in
  the window.
* **Flow control.** Results wait in an 8-entry FIFO for a RAM3 write slot. A
  new read is issued only while that FIFO has room for every pixel already in
  flight (reads outstanding plus the window stage). A stalled write therefore
  slows the reads down and never loses a pixel. With free ports the module
  takes one pixel per clock: a frame takes about `W*H + W + 1` cycles plus a
  few of latency.
* **Filter choice.** The filter is sampled from `filter_sel` when a frame
  starts.

## Edge detectors

The window is grey: luminance `(R + 2G + B) / 4`. All outputs saturate at
255.

* `sobel_prewitt_filter`: one structure for both operators.
  `Gx = right column - left column` and `Gy = bottom row - top row`, where the
  centre tap of each column or row has weight `CENTER_W`. Sobel is 2 and
  Prewitt is 1. The output is `|Gx| + |Gy|`.
* `laplace_filter`: the 4-neighbour kernel `[0 1 0; 1 -4 1; 0 1 0]`, with
  output `|L|`.

On the ESM each detector is its own partial bitstream, loaded into the
processing slot. Here all three are present and `filter_sel`, sampled once per
frame, plays the role of the module currently loaded. The edge image is
written as grey RGB (`0x00EEEEEE`).

## Rendering

`vga_render` generates 640x480 / 60 Hz timing: 800x525 clocks at a
25.175 MHz pixel clock, with negative syncs. For every visible pixel (x, y) it
reads word `BASE + (y mod IMG_H)*IMG_W + (x mod IMG_W)` of RAM3. The
320x240 image therefore appears four times on the screen.

Syncs and data-enable are delayed by the 2-clock read latency, so they line
up with the data. If a read is refused, the pixel is black and `underrun`
pulses. That cannot happen while the renderer is first at RAM3.

A VGA frame has 112,800 non-visible clocks. The processing module needs
76,800 of them for its writes, so one image is written within one screen
refresh.

## Crossbar

`io_crossbar` has one 32-bit channel per micro slot (22 of them, the columns
A..V of the FPGA) and 4 peripheral ports. The ports stand for IEEE1394,
video I/O, audio I/O and the board's local bus.

There are two multiplexers, one per direction:

* `ch_in[c]` comes from `per_in[ch_src[c]]`;
* `per_out[p]` comes from `ch_out[per_src[p]]`.

Each destination has a route register, written one at a time through the
`cfg_*` port. Writes to out-of-range indices are ignored. After reset every
route is off and outputs are 0. Outputs are registered, so data takes one
clock through the crossbar.

In the top:

* the camera bus (`cam_bus_t`: valid, sof, Y, U, V; 26 bits) arrives on
  peripheral port 1 and must be routed to channel 1 (`CAP_CH`, slot S1);
* the VGA bus (`vga_bus_t`: hsync_n, vsync_n, de, RGB; 27 bits) leaves on
  channel 7 (`RND_CH`, slot S3) and must be routed to peripheral port 1.

## Top-level parameters

| parameter | default | meaning |
|---|---|---|
| `IMG_W`, `IMG_H` | 320, 240 | region of interest (quarter VGA) |
| `H_ACTIVE/H_FP/H_SYNC/H_BP` | 640/16/96/48 | horizontal VGA timing |
| `V_ACTIVE/V_FP/V_SYNC/V_BP` | 480/10/2/33 | vertical VGA timing |
| `N_CH`, `N_PER` | 22, 4 | crossbar channels (micro slots) and peripheral ports |
| `CAP_CH`, `RND_CH` | 1, 7 | channels of the capture and rendering slots |

Runtime inputs:

* `filter_sel` chooses the edge detector;
* `sram_prio[slot]` gives each controller's priority order. Renderer first at
  RAM3 is required. The tests use central first everywhere.

Everything runs on one clock, with an asynchronous active-low reset.

## How far this follows the original platform

These points follow the original platform description:

* the three-stage chain;
* the alternating RAM1/RAM2 frame buffers;
* the line-buffer sliding window;
* the three edge detectors, with Sobel and Prewitt sharing one structure;
* one SRAM per slot, shared with both neighbours by a priority controller;
* the programmable crossbar with one channel per micro slot;
* the quarter-VGA region of interest shown four times.

The following are this design's own choices, because the description does
not give them:

* all widths, the SRAM word format and timing, and the handshakes;
* the slot each module occupies, and that the result goes into the renderer's
  SRAM;
* the frame-drop policy;
* the colour standard, the luminance formula and the kernel details
  (magnitude `|Gx|+|Gy|`, 4-neighbour Laplace, saturation, zero border);
* the VGA timing;
* the crossbar's configuration port and register stage;
* the single clock.

The window builder and the edge detector share one module, as in the
three-module case study. The general chain in the original description puts
them in two consecutive modules instead.

Partial reconfiguration is emulated by a select input. Bus macros, which are
fixed routing channels across slot boundaries, are plain wires here.

Not modelled, because they are bought-in parts or their logic is not
specified:

* the configuration chain: a CPLD and a Spartan II that load bitstreams from
  a 64 MByte Flash;
* the PLL, the DDR RAM and the MotherBoard PowerPC;
* the peripherals themselves.

The SRAM banks are outside the top: their pins are top-level ports, and the
testbenches attach `tb/sram_model.sv`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/esm_pkg.sv tb/tb_esm_video_top.sv --top-module tb_esm_video_top
./obj_dir/Vtb_esm_video_top
```

The same command works for any `tb/tb_<module>.sv`. `-Wno-fatal` keeps
Verilator's width warnings about the testbenches' integer arithmetic from
stopping the build.

**End-to-end tests.** `tb_esm_video_top` runs a 16x12 image on a 32x24
screen. `tb_esm_video_top_full` runs the design at its default size: about
3.8 million clocks, a few seconds. Both run the scenario in
`tb/esm_chain_tb_body.svh`:

1. While the crossbar is unprogrammed, a frame must not get through.
2. Frames with Sobel, Prewitt and Laplace follow. Every visible pixel of a
   whole VGA frame is compared with an edge image computed in the testbench,
   from YUV through RGB and luminance to the kernel.
3. The camera moves to another peripheral port and only the crossbar route
   is changed. Four frames then come back to back. One must be dropped, and
   the last frame taken must appear on screen.

The run counts the mechanisms and fails if one never happens:

* the re-route;
* frames in both buffers;
* each of the three filters;
* a frame drop;
* a processing write stalled behind the renderer;
* a conflict at RAM3.

Renderer underruns and capture overflows must stay at zero.

**Unit tests:**

* `line_fifo`: random traffic against a queue.
* `sliding_window`: 5x5 window against the index formula above.
* Filters: random and edge-shaped windows against kernels written out tap by
  tap.
* `yuv2rgb`: exact fixed-point result, within 2 of floating-point BT.601.
* `sram_controller`: grant prediction under changing priorities, read data
  and its 2-clock latency.
* `io_crossbar`: random routes in both directions.
* `vga_render`: sync, address and pixel timing, and underrun on refused
  reads.
* `frame_capture`: buffer order, drop, mid-frame sof, overflow.
* `frame_processing`: all filters, with the rate checked at one pixel per
  clock and with heavy write stalls.
