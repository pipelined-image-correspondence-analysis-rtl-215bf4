# Streaming image-correspondence tracker

A camera on a servo motor should keep an object in the middle of its view.
The tracker keeps one small patch, a 9 x 9 pixel window at the optical centre
of a reference ("master") frame. In each later ("slave") frame it searches
for the same patch, looking only along the horizontal line through the image
centre. The offset of the best match from the centre says how far the object
has moved sideways. That offset becomes a new motor position, which is sent
over a 9600 baud serial line.

The search looks along one line only because a camera that turns about its
vertical axis moves the image sideways and not up or down. This is the
epipolar constraint of stereo vision, with the master frame taking the place
of the second camera. Each window has 81 pixels and there are 312 windows on
the line. Comparing all of them after a frame has arrived would need the
whole 320 x 9 stripe in memory. This design does the comparison while the
pixels stream in from the camera instead. No frame is ever stored. The
result of a frame is ready a few tens of clocks after the last pixel of the
stripe has arrived.

The method comes from the paper "Pipelined Image Correspondence Analysis"
(G. Max, Budapest University of Technology and Economics). That paper aimed at
a Xilinx Spartan-3 XC3S200 running at 50 MHz, with 320 x 240 grey frames at
25 frames per second. This RTL is an independent implementation of that
method. Where the paper leaves a point open, the choice made here is stated
below and in each file's header.

## What happens to a frame

```
pixels ─► pixel_rx ─► edge_detector ─────────────┬─► master_store (capture frames)
          (x, y)      sobel_window                │        │ one window line
                      sobel_grad                  │        ▼
                      cordic_vec                  └─► corr_engine (slave frames)
                      → I, D, O per pixel                  │ 312 window sums
                                                           ▼
                      track_ctrl (capture / track /   min_finder → position_calc → motor_link → txd
                      ignore, decided per frame)      (best window) (new position)  (rate limit, uart_tx)
```

1. **pixel_rx** counts columns and lines. The first pixel of a frame is
   marked by `pix_sof`.
2. **edge_detector** gives each pixel three byte-sized features. These are
   its intensity I, its edge magnitude D and its edge orientation O.
3. **track_ctrl** decides at the start of each frame what the frame is for.
   A frame is captured as the new master when `master_load` has been pulsed
   since the last frame start. Otherwise it is tracked if a master is held,
   and ignored if not.
4. On a capture frame, **master_store** keeps the features of the 9 x 9
   centre window.
5. On a tracking frame, **corr_engine** compares the stripe of 9 centre lines
   with the master window at every one of the 312 horizontal positions.
6. **min_finder** keeps the best window and **position_calc** turns it into
   a position. **motor_link** sends the position unless the motor was given
   one too recently.

## Pixel features: I, D and O

A feature pixel is `pica_pkg::feat_t`, three bytes `{i, d, o}`.

**Neighbourhood.** Two line buffers feed a 3 x 3 register window
(`sobel_window`). When pixel (x, y) arrives, the window around (x-1, y-1)
becomes complete. The first window of a frame is therefore ready one clock
after the second pixel of the second line.

Missing neighbours at the border take the value of the nearest pixel:
- The line above line 0 repeats line 0.
- The columns left of column 0 and right of the last column repeat those
  columns.

The right-border window of a line is sent in the clock after the line's last
pixel. The input must therefore leave at least one idle clock between lines.
Cameras always have line blanking. An assertion checks this rule, and
`line_overruns` counts violations. The last line of a frame is never a window
centre. This does not matter here, because the tracker only uses the lines
around the centre.

**Gradients** (`sobel_grad`) use the Sobel kernels with 1-2-1 weights:

```
Dx = (p[0][2] + 2 p[1][2] + p[2][2]) - (p[0][0] + 2 p[1][0] + p[2][0])     (right minus left)
Dy = (p[2][0] + 2 p[2][1] + p[2][2]) - (p[0][0] + 2 p[0][1] + p[0][2])     (bottom minus top)
```

Each result is an 11-bit signed value in -1020..1020. The paper names the
Sobel filter and gives these equations. One of its figures draws 1-1-1
(Prewitt) weights instead. To switch, change the two `tri_sum` calls.

**Magnitude and orientation** (`cordic_vec`) come from one pipelined
vectoring CORDIC, with no multiplier in the loop and no divider:

- A first stage folds the vector into the right half plane. If Dx < 0, both
  components are negated, which leaves Dy/Dx and therefore the angle
  unchanged.
- Each of the 16 stages rotates the vector by ±atan(2^-k) towards the x
  axis, choosing the sign from the sign of y, and adds the angle it turned.
  Angles use units of pi/65536. The atan table in `pica_pkg` is
  round(atan(2^-k)/pi·65536).
- After the last stage, x equals the magnitude times the CORDIC gain (about
  1.6468). One constant multiplication by 39797/65536 removes the gain. The
  package computes that constant from the iteration count.
- D = min(255, magnitude >> D_SHIFT), with D_SHIFT = 2. The largest Sobel
  magnitude is about 1443, so real edges rarely saturate.
- O maps the angle linearly from -pi/2..pi/2 onto 0..255:
  O = ((angle + pi/2)·255 + pi/2) / pi. A zero gradient has no direction and
  is given O = 128.

Eight fraction bits are carried inside the CORDIC. The testbench checks D and
O against real arithmetic, and both are within one count. The pipeline takes
one pixel per clock. The latency from the completing pixel to the feature
output is CORDIC_ITER + 4 clocks.

## Comparing one pixel pair

`match_pixel` applies the threshold t (an input of the top) to the two edge
magnitudes and picks which feature to compare:

| master D > t | slave D > t | R |
|---|---|---|
| no  | no  | \|Im − Is\| (flat region: compare brightness) |
| yes | no  | \|Dm − Ds\| (edge in only one: compare edge strength) |
| no  | yes | \|Dm − Ds\| |
| yes | yes | \|Om − Os\| (both edges: compare direction) |

A magnitude equal to t counts as "not above". The orientation difference is
a plain absolute difference with no wrap-around. O = 0 and O = 255 are
therefore far apart, even though both mean a near-vertical gradient.

## Summing 312 windows on the fly (corr_engine)

This is the core of the design. The stripe is lines Y0..Y0+8, with
Y0 = (IMG_H−9)/2, which is 115 for 240 lines. Window k covers columns
k..k+8, for k = 0..311.

Slave pixel (r, x) of the stripe (r = line within the stripe) belongs to
nine windows at once: windows k = x−c for c = 0..8. In window x−c it sits
at master column c. So every incoming pixel is compared with the nine master
pixels of its line in parallel, using nine `match_pixel` units fed by one
read of `master_store`. The nine results enter a chain of nine accumulators
that shifts once per pixel:

```
acc[0] <= R(master[r][0], pixel)
acc[c] <= acc[c-1] + R(master[r][c], pixel)        c = 1..8
```

Take window k. It gets R with master column 0 at pixel k, with column 1 at
pixel k+1, and so on up to column 8 at pixel k+8. Its partial sum moves one
place down the chain with every pixel. After pixel x, `acc[8]` therefore
holds the full line-r contribution of window x−8.

Pixels arrive line by line, so a window is only complete on the stripe's
last line. The line contributions are added up in a 312-word memory of line
sums. Each word is read, added to and written back in one clock, and every
address is touched once per line, so there is no conflict. The line-sum
memory works like this:
- On stripe line 0, a word is overwritten with the line's contribution.
- On lines 1 to 7, the line's contribution is added to the word.
- On line 8, the finished sum of window k goes to `min_finder` instead of
  back into memory. Windows arrive in order k = 0..311, and `res_last` marks
  the last one.

The finished sum of window k is Σ R(i,j) over its 81 pixels, at most 20655
(15 bits). In total each frame takes 2880 stripe pixels through 9
comparators and 9 adders, plus one read-add-write of the line-sum memory per
pixel. A result leaves two clocks after the pixel that completes its window.

The accumulator chain does not need clearing at the start of a line. `acc[8]`
is read only from column 8 on, and by then the chain holds only the current
line's pixels.

## Decision, position and motor

**min_finder** keeps only the least sum seen so far and its index. A new sum
must be strictly smaller to replace it, so on ties the lowest index wins. The
paper defines the match value as the average, sum/81. Dividing every sum by
81 cannot change which one is least, so the search uses the sums. The average
of the winner (`min_avg`) is computed once, as (sum·25891) >> 21. This
equals floor(sum/81) for every possible sum, and avoids a divider.

**position_calc** computes `offset = min_idx − X0`. X0 = (IMG_W−9)/2 = 155
is the window that lies at the same place as the master window, so offset 0
means no movement. `position` adds offset·POS_GAIN to the last position,
saturating, as a 16-bit signed value. POS_GAIN = 1 means positions are
counted in pixels. Set it to the motor's steps per pixel.

**motor_link** sends each new position as two bytes, high byte first, 8N1 at
9600 baud (`uart_tx`, 5208 clocks per bit). The servo can take only 4-6 new
positions a second. So a position is accepted only if 50 MHz / 6 =
8,333,333 clocks have passed since the last accepted one. Positions that
arrive earlier are dropped and counted in `moves_dropped`, which skips frames
rather than queueing stale positions. Note that `position` keeps
accumulating the offsets of dropped frames too.

## Frame control (track_ctrl)

track_ctrl has three states: `S_IDLE` (no master), `S_CAPTURE` and
`S_TRACK`. The state is chosen when the first feature pixel (0,0) of a frame
leaves the edge detector, and it holds for the whole frame. This instant is
one line plus the pipeline latency after `pix_sof`.

A `master_load` pulse stays pending until the next frame start. Starting a
capture clears `master_valid`, and `master_valid` rises again when the 81st
window pixel is written. If a capture frame is cut short, the result is
therefore "no master" rather than a half-old one. `frames_tracked` counts
slave frames whose 312 sums were produced.

## Interface of pica_top

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | one clock (50 MHz nominal), active-low asynchronous reset |
| `pix_valid`, `pix_sof`, `pix_data[7:0]` | in | pixel stream, line by line; `pix_sof` on the first pixel of a frame; ≥ 1 idle clock between lines |
| `t[7:0]` | in | edge threshold on D |
| `master_load` | in | pulse: take the next frame as master |
| `master_valid` | out | a master window is held |
| `result_valid` | out | one-clock pulse: `min_idx`, `min_sum`, `min_avg` hold the frame's best window |
| `position_valid`, `offset`, `position` | out | new position (one clock after `result_valid`) |
| `motor_txd` | out | serial line to the motor controller (idle high) |
| `motor_busy`, `moves_sent`, `moves_dropped` | out | link status |
| `capture_active`, `track_active`, `frames_tracked` | out | frame mode |
| `line_overruns`, `extra_pixels` | out | input errors: pixel in a line-blanking slot, pixel outside a frame |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `IMG_W`, `IMG_H` | 320, 240 | frame size |
| `WIN` | 9 | window side; NWIN = IMG_W − WIN + 1 windows (312) |
| `CORDIC_ITER` | 16 | CORDIC stages |
| `D_SHIFT` | 2 | magnitude → byte scaling |
| `CLK_HZ`, `BAUD` | 50 000 000, 9600 | serial bit timing |
| `MOVES_PER_S` | 6 | motor rate limit |
| `POS_W` | 16 | position width |

On-chip storage at the defaults is small: 2 × 320 bytes of line buffer,
81 × 3 bytes of master window and 312 × 15 bits of window sums, plus the
pipeline registers. A 320 x 240 frame passes in 77,040 clocks (1.5 ms at
50 MHz), far less than the 40 ms of a 25 frames/s camera. The paper's
192 Mbit/s link (24 M pixels/s) is also well within one pixel per clock.
Wider frames such as 640 x 480 only need larger IMG_W and IMG_H: the line
buffers and the sum memory grow linearly. Pixels are 8 bits; a camera set
to 10 bits per pixel must be reduced to the top 8 before the input.

## Not in the RTL

- **Camera link.** The camera's FireWire (IEEE 1394) interface is a bought
  part. The design expects an already parallel pixel stream.
- **External SRAM.** The board's 2 × 256K × 16 SRAM is not used, because the
  streaming design needs no frame store.
- **Clocking.** Clock managers and the oscillator are vendor parts. The
  design uses one clock input.
- **Motor side.** The servo and the microcontroller on the motor panel are
  separate equipment. Their command format is unknown, so the two-byte
  message is a placeholder to adapt.

## Choices made here where the method leaves freedom

- The parallel pixel input with a start-of-frame flag, and the one idle
  clock needed between lines.
- Nearest-value border cells on all four sides.
- D scaled by >> 2 and saturated; O = 128 for a zero gradient.
- A magnitude equal to t counts as "not above"; orientation differences do
  not wrap.
- Centre window at columns 155..163 and lines 115..123. The stripe uses the
  same lines.
- Line-sum memory instead of sending results every 81 pixels, because pixels
  arrive in line order.
- Ties go to the lowest index. Positions are relative offsets, accumulated
  and saturated.
- Serial framing, message format and the drop-when-too-early rate limit.
- Reset values. All control state uses an asynchronous active-low reset.
  The data arrays (line buffers, master window, sum memory) are not reset and
  need none.

## Simulating

All files are SystemVerilog 2017. Read `rtl/pica_pkg.sv` first. Each
testbench in `tb/` checks itself, and prints
`TB_RESULT checks=N failures=M` at the end. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
  rtl/pica_pkg.sv tb/tb_pica_top.sv --top-module tb_pica_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_pica_full` | the top at its defaults (320 x 240, 50 MHz, 9600 baud, 6 moves/s): capture, three tracked frames, the expected best windows, one position dropped by the rate limit, the two serial messages decoded; about 8.7 M clocks, some seconds |
| `tb_pica_rate` | the intended rates: 320 x 240 at 25 frames/s with pixels at 20 MHz on a 50 MHz clock (results 25 clocks after the stripe's last pixel, inside each 40 ms frame), and a 640 x 480 instance tracking at one pixel per clock |
| `tb_pica_top` | the top at 40 x 16 with a fast link: 18 tracked frames over two masters, every result, offset, position and serial message checked; counts that each mechanism occurred (ignored frames, master change, drops, right-border windows, all three R cases) |
| `tb_pixel_rx`, `tb_sobel_window`, `tb_sobel_grad`, `tb_cordic_vec`, `tb_edge_detector` | coordinates, border handling, gradients, D and O against real arithmetic, latencies |
| `tb_match_pixel`, `tb_master_store`, `tb_corr_engine`, `tb_min_finder` | threshold rule; master capture; all window sums against a direct double loop, result latency; least value, ties, average |
| `tb_position_calc`, `tb_uart_tx`, `tb_motor_link`, `tb_track_ctrl` | offsets and saturation; serial framing and timing; rate limit at 599 and 600 clocks; frame decisions |

The top-level tests use a synthetic scene: a noisy checkerboard that is
shifted sideways from frame to frame. The expected best window therefore
follows from the shift alone, with a sum of exactly zero.
