# Projection-histogram motion sensor for a solar-blind UV focal plane

This RTL turns binary edge images of one bright object, such as a hydrogen flame
seen by a solar-blind ultraviolet camera, into motion information for every
frame: where the object is, how fast it moves and in which direction, how big it
is, and whether it grows, shrinks, stays the same or disappears.

The main idea is to avoid all per-pixel arithmetic. The sensor delivers a
*binary* image, one bit per pixel, where 1 marks an object edge. Each row is
reduced by a chain of OR gates, and so is each column. Where a plain histogram
would need one adder per row and per column, the result here is two 1-D bit
vectors (the *projections*). The first and last set bits of those vectors are
the object's bounding box: RV/FV on the x axis and RH/FH on the y axis. A small
sequential circuit then computes everything else from those four numbers and
from the previous frame's numbers. At 250 x 250 pixels and 100 MHz, a complete
image is processed in at most about 540 clock cycles (5.4 us).

```
 photodiodes ─► edge detector ─► (parallel, 1 clock) ─┐
 (analog)        (model)                              ├─► image registers ─► OR projection ─► edge location ─► calculation ─► info
 PC frames  ─► uart_rx ─► frame_decoder (row by row) ─┘    250 x 250 bits     (2 x 250 bits)    RV FV RH FH      Ox Oy Vx Vy Op Od Oz spread
```

## Files

| file | role |
|---|---|
| `rtl/uvs_pkg.sv` | shared types: `edges_t` (RV, FV, RH, FH, present), `info_t`, `spread_t` |
| `rtl/smart_uv_sensor.sv` | top level |
| `rtl/edge_detector.sv` | behavioural model of the analog retina-style edge detector in the pixel array |
| `rtl/uart_rx.sv` | serial byte receiver (8N1) |
| `rtl/frame_decoder.sv` | expands compressed serial frames into image rows |
| `rtl/image_register.sv` | one flip-flop per pixel; parallel or row-wise load |
| `rtl/projection_histogram.sv` | OR-chain projections and the projected registers |
| `rtl/edge_locator.sv`, `rtl/weighting.sv` | combinational edge location (marks, then positions) |
| `rtl/searching_circuit.sv` | sequential edge location, one step per clock |
| `rtl/calculation_circuit.sv` | location, velocity, speed, direction, size, spreading status |
| `rtl/isqrt_seq.sv`, `rtl/cordic_atan2.sv` | square root and arctangent used by the calculation |
| `rtl/sensor_ctrl.sv` | per-frame sequencing and execution-time counter |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_smart_uv_sensor.sv` | end-to-end test at 32 x 32 |
| `tb/tb_smart_uv_sensor_full.sv` | end-to-end test at the default 250 x 250 size |
| `tb/tb_direction_workload.sv` | object circling at 12.4 rad/s, direction sawtooth |

## Getting an image into the registers

The image registers (`image_register`) hold one bit per pixel, 62,500 bits at
the default size. Two sources can fill them. `src_sel` chooses between them.

**Parallel sensor input (`src_sel = 1`).** In the target system, every pixel of
the sensor chip is wired straight to its own FPGA register, so a whole frame
moves across in a single clock (`oeic_capture`). The pixel circuit is analog. It
is modelled in `edge_detector`, which takes a digitized photocurrent per pixel
(`photo`, 8 bits). The model follows the outer retina:

* a horizontal cell H smooths the photocurrents (here H is the mean of the 3 x 3
  neighbourhood);
* a bipolar cell B takes P - H;
* a digitizing cell DG outputs 0 where B exceeds a threshold `ITH`, and 1
  elsewhere.

In a scene of uniform bright objects, the pixels that come out as edges are the
bright pixels along the object outline. The sensor's 0 means "edge", so the
registers store the inverted value: inside the FPGA, 1 means edge and the large
background is 0. A frame offered while the previous one is still being
processed is dropped, and `frame_dropped` pulses.

**Serial link (`src_sel = 0`).** This is for bench use, where a PC draws the
moving object and plays the role of the sensor. Each frame is compressed to one
run per row:

```
0xFF | start_0 len_0 | start_1 len_1 | ... | start_249 len_249 | 0xFE      (502 bytes)
```

`frame_decoder` turns each (start, length) pair into a row of ones, columns
`start .. start+len-1`, and writes the row into the registers as soon as the
length byte arrives. A wrong final byte raises `sync_err`, and that frame is not
processed. The decoder then waits for the next 0xFF. At 921,600 bit/s with
8N1 framing, a frame takes 5.45 ms on the wire. A run covers the object's
filled extent rather than its outline, but both give the same projections.

## Projection with OR chains

`projection_histogram` reduces each row and each column with a chain of
two-input OR gates in series. Each gate takes the next pixel and the output of
the previous gate. `vproj` (one bit per column) projects onto the x axis, and
`hproj` (one bit per row) onto the y axis. The chains are purely combinational,
and the longest one has `max(ROWS, COLS) - 1` gates. That is far more than one
clock period at 100 MHz. The controller therefore waits `HP_SETTLE` cycles
(default 10, i.e. 100 ns) before it loads the projections into the *projected
registers* `vproj_q`/`hproj_q`. The OR chains must be constrained as a multicycle
path of that length, or `HP_SETTLE` adjusted, when the design is implemented.

## Finding the edges: two circuits

Both circuits report the outermost boundary. Several separate objects are
therefore treated as fragments of one large object. Positions count from 0 at
the left (or top). A falling position points *one past* the last set bit, so
`FV - RV` is the object's width in pixels. `search_sel` picks the circuit for
each frame.

* **Edge locator + weighting (`search_sel = 0`).** `edge_locator` marks every
  0->1 transition (`rise`) and every 1->0 transition (`fall`, one bit longer than
  the projection). `weighting` converts the first rising mark and the last
  falling mark into numbers. Both are combinational, so the edges are ready the
  cycle after capture. The cost is priority encoders across the full width.
* **Searching circuit (`search_sel = 1`).** This is the cheaper circuit for
  large images. It steps through the projected register from the left until it
  finds a 1, which gives R. It then steps from the right until it finds a 1,
  which gives F - 1. The same is then done for the other projection. One step
  takes one clock, so a search takes exactly

  `(COLS + 2 - d_V) + (ROWS + 2 - d_H)` cycles, with `d_V = FV - RV`, `d_H = FH - RH`.

  An empty image ends after `COLS` steps with `present = 0`.

## The calculation

`calculation_circuit` keeps the previous frame's location and size. For frame n
it computes:

| output | formula | notes |
|---|---|---|
| `ox`, `oy` | (RV + FV) / 2, (RH + FH) / 2 | truncated to whole pixels |
| `oz` | (FV - RV) x (FH - RH) | pixel^2, bounding-box area |
| `vx`, `vy` | (O[n] - O[n-1]) x `RATE_Q8` / 256 | pixel/s, rounded; `RATE_Q8` = 256 / frame interval in s |
| `op` | floor(sqrt(vx^2 + vy^2)) | 18-step digit-by-digit root |
| `od` | atan2(vy, vx) in degrees, 0..359 | 16-step CORDIC; y axis points down (origin top left) |
| `spread` | size against the previous frame | `BIGGER`, `SMALLER`, `UNCHANGED`, or `LOST` when no object |

The default `RATE_Q8 = 18182` matches a 14.08 ms frame interval (71.02
frames/s). At that rate a displacement of 1 pixel per frame reads 71 pixel/s,
50 pixels reads 3551 pixel/s, and the largest, 249 pixels, reads 17685 pixel/s.
The speed is a straight-line estimate between two frames, so an object moving on
a curve reads slower than it is. Because `ox` is truncated, an object that is
only partly inside the image can show alternating 0 and full speed while it
enters or leaves. Velocity, speed and direction are forced to 0 unless both
frames hold an object, so a vanishing object gives no false jump. A zero vector
has direction 0. When an object appears it counts as `BIGGER`. The result is
ready 22 cycles after the calculation starts.

## Control and timing

`sensor_ctrl` runs one frame at a time: SETTLE (`HP_SETTLE` cycles), CAPTURE,
LOCATE, an optional SEARCH, then CALC. `busy` covers the whole frame.
`exec_cycles` reports the cycles from the complete image to the result, and is
valid with `info_valid`:

```
exec_cycles = HP_SETTLE + 3 + 22                          (edge locator + weighting)
exec_cycles = HP_SETTLE + 3 + 22 + 1 + t_search           (searching circuit)
```

For a 10 x 10 object in a 250 x 250 image, the search version takes 520 cycles
(5.2 us). The worst case is about 540 cycles, which is still far below 50 us per
frame. With the parallel input, the frame rate is therefore set by the sensor,
not by this logic. With the serial link, the link sets the rate.

## Top-level interface (`smart_uv_sensor`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `src_sel` | in | 1 | 0 serial frames, 1 parallel sensor input |
| `search_sel` | in | 1 | 0 edge locator + weighting, 1 searching circuit (sampled per frame) |
| `uart_rx_i` | in | 1 | serial line, idle high |
| `oeic_capture` | in | 1 | load the parallel image this cycle |
| `photo` | in | `PW` x `ROWS` x `COLS` | digitized photocurrents |
| `info` | out | `info_t` | results, held until the next frame |
| `info_valid` | out | 1 | one-cycle pulse per processed frame |
| `exec_cycles` | out | 16 | execution time of the last frame |
| `busy` | out | 1 | a frame is in progress |
| `frame_dropped`, `rx_frame_err`, `sync_err` | out | 1 | one-cycle error pulses |

Parameters: `ROWS`, `COLS` (250; at most 255), `CLK_HZ` (100 MHz), `BAUD`
(921600), `PW` (8), `ITH` (128), `RATE_Q8` (18182), `HP_SETTLE` (10).

## How far to trust it, and where it departs from the original

The original design defines the following, and this RTL follows it:

* the pipeline of photodiodes, edge detector, FPGA registers, projection
  histogram, edge locator, weighting and calculation;
* the inverted register polarity;
* the OR chains;
* the searching circuit and its cycle count;
* equations for location, speed, direction and size, and the four spreading
  states;
* the 250 x 250 size, the 100 MHz clock, the 921,600 bit/s link, the
  502-byte frame layout and the 14.08 ms frame interval.

This RTL adds the following choices of its own:

* the edge detector's neighbourhood, scaling, border handling and threshold
  (the real circuit is analog; the model is not a circuit description);
* 8N1 framing and the 0xFF/0xFE frame markers;
* the settling allowance for the OR chains;
* truncated locations and rounded velocities;
* CORDIC and digit-by-digit square root as the arithmetic;
* zero velocity around missing objects;
* dropping parallel frames while busy;
* both edge-location circuits being present at once, selectable at run time.

Resource note: holding a 250 x 250 image in flip-flops takes 62,500 registers.
That is more than a small FPGA such as a Spartan-6 LX25 provides (about 30,000),
so a build for such a device must shrink the image or keep it in block RAM. The
direct pixel-to-register wiring that this design assumes needs a large device,
or a stacked sensor and FPGA.

Verification status:

* Every module has a self-checking testbench that compares against values
  computed independently in the testbench, including cycle counts where the
  design defines them.
* The 32 x 32 end-to-end test covers all of the following and fails if any of
  them never occurs:
  * serial and parallel frames, and switching between them;
  * both edge-location circuits;
  * empty, growing, shrinking and unchanged objects;
  * a dropped frame, a bad stop byte and a bad stop bit.
* The full-size test (250 x 250, every parameter at its default) runs the
  1-pixel and 50-pixel-per-frame speed cases through the parallel input.
* The direction workload moves a 10-pixel disc around a circle at 12.4 rad/s
  (10 degrees per 14.08 ms frame) on a 64 x 64 sensor for two revolutions. It
  checks every result against the model, that the direction covers all four
  quadrants and wraps once per revolution, and that the mean speed matches the
  chord between frames.
* The serial path has not been simulated at full size. A 502-byte frame is
  about 545,000 clock cycles, which is too long for a model that re-evaluates
  62,500 pixels every cycle. It is covered at 32 x 32.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
From the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/uvs_pkg.sv tb/tb_smart_uv_sensor.sv \
          --top-module tb_smart_uv_sensor -Mdir obj_e2e && obj_e2e/Vtb_smart_uv_sensor
```

Swap in any other `tb/tb_<module>.sv` the same way. The full-size test,
`tb_smart_uv_sensor_full`, takes several minutes to build (the 250 x 250 arrays
expand into a large model) and then runs in seconds. To
change the image size, override `ROWS`/`COLS` on `smart_uv_sensor` (both at most
255, because positions are 8 bits in `uvs_pkg`). To change the frame interval,
override `RATE_Q8`.
