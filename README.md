# Streaming particle-filter object tracker

This is a colour-object tracker for a live VGA camera. It runs a particle filter
and keeps up with the camera's pixel clock: one pixel per clock, 640x480 at
60 frames/s from a 27 MHz clock. It uses no frame memory.

The usual obstacle is resampling. Multinomial resampling needs the weights of all
particles before any particle can be redrawn, which serialises the filter. This
design uses *FPGA-optimised resampling* instead. Each real particle carries B
*virtual particles* scattered around it. Over a frame it keeps whichever of its
B+1 candidates lands on the pixel of highest likelihood. No particle is
duplicated or removed, so the particles never exchange data. All M particles
therefore run in parallel as identical hardware, each reading the same stream of
pixel weights.

The default build has M = 100 real particles and B = 50 virtual particles per
particle, so it tracks 5,100 candidate positions per frame.

## One frame, clock by clock

A frame is an 858 x 525 raster. Its first 640 columns of its first 480 rows are
valid pixels; the rest is blanking. The filter splits its work across these two
regions:

| region | what happens | clocks |
|---|---|---|
| valid pixels | every pixel's weight is computed (3-clock pipeline) and every particle compares it against its candidates | one per pixel |
| blanking, right after the last valid pixel | **prediction**: each real particle takes the selected state, moved by its velocity plus noise | 1 |
| blanking | **virtual particle generation**: B new virtual particles per particle, one per clock | B + 1 = 51 |
| blanking, in parallel with the two rows above | **weighted centre** of the selected particles | M + 36 = 136 |

The centre of a frame appears a fixed time after that frame's first valid pixel
(pixel (0,0)):

    3 (likelihood) + 858*479 + 640 (last valid pixel) + M + 36 (centre)
      = 411,761 clocks  <  858*525 = 450,450 clocks per frame

So the centre, the new real particles and the new virtual particles are all
ready before the next frame begins. The full-size testbench checks this latency
to the clock.

After reset the controller first initialises the real particles at random
positions (M + 1 clocks). It then predicts and generates virtual particles, and
waits for the next pixel (0,0). It never compares a partial frame.

## The weight comparison (`resampling`)

This is the core of the design and most of its area. Each particle holds:

- a real particle (x, y, vx, vy)
- B virtual particles (x, y, vx, vy)
- result registers `w_max`, `x_max`, `y_max`, `vx_max`, `vy_max`

The likelihood stream delivers (w, x_w, y_w) every clock. In that clock, each of
the B+1 candidates compares its own (x, y) with (x_w, y_w) using two equality
comparators and an AND. The B+1 match bits are ORed together. If any candidate
matches and `w > w_max`, the result registers update:

- `w_max` takes w, and `x_max`/`y_max` take the stream coordinate.
- `vx_max`/`vy_max` take the velocity of the matching candidate.

The velocity is gathered the way a wired-OR bus would gather it. Each candidate
puts its velocity through a mask that is zero unless it matches, and a
(B+1)-input OR combines them.

Things worth knowing when reading or changing it:

- **The comparison is strict.** When several ball pixels have the same weight,
  the first one in raster order wins. With a flat-coloured target this pulls
  particles towards the target's top edge.
- **A real particle that nothing beats keeps its own state.** For the frame's
  first pixel (`cmp_start`) the compare base is weight 0 and the real particle's
  state. A particle whose candidates all miss the target therefore stays where
  it is, with `w_max = 0`.
- **Shared coordinates.** Two candidates on the same pixel with different
  velocities produce the OR of those velocities. That is how the OR-bus
  structure behaves, and it is kept on purpose.
- **The result stays readable.** The result registers hold until the next
  frame's first pixel. The weighted centre reads them during blanking.

## Likelihood (`likelihood`)

Each pixel's weight says how close its hue is to the target hue Ht = 40, a red.
The hue uses an integer formula that needs one division per pixel:

    delta = max - min
    H = 42  + floor(42 (G-B) / delta)   if R is the maximum
    H = 126 + floor(42 (B-R) / delta)   if G is the maximum
    H = 210 + floor(42 (R-G) / delta)   if B is the maximum
    H = -1 (no hue)                     unless delta > max/2

The hue distance wraps around the 253-value hue circle:
Hd = min(|H-Ht|, 253-|H-Ht|). The weight is w = floor(1023 exp(-Hd^2 / 800)),
with scale 1023 and spread 20. It is forced to 0 when there is no hue or when
R < 64.

Hd never exceeds 126, so the Gaussian is a 128-entry table. The table is
computed at elaboration with `$exp`; no data file is involved.

The pipeline has three stages:

1. max/min and the selected difference
2. floor division
3. hue distance and table lookup

## Virtual particle spread (`next_vp_generator`)

The spread of the virtual particles shrinks as the particle's last weight grows:

    sigma = floor((1023 - w) / 16)      (0..63)

Each virtual particle gets:

- uniform offsets in [-sigma, sigma] on x and y, computed as
  `floor(r*(2 sigma+1)/256) - sigma` from an 8-bit random r
- offsets in [-sigma/8, sigma/8] on its velocity

Positions saturate at the frame edges.

A consequence for anyone tuning the tracker: a particle with weight 1008 or more
gets sigma = 0. Its virtual particles then sit exactly on it, so it searches only
through its prediction noise. If it falls off the target, its weight drops to 0,
sigma jumps to 63 on the next frame, and it searches widely again.

## Prediction, initialisation and random numbers

- **Prediction** applies a constant-velocity model to the selected state:
  `x' = x + vx + nx` and `v' = v + nv`. Position noise is triangular in -7..7
  and velocity noise is in -1..1. Results are saturated to the frame and to the
  5-bit velocity range.
- **Initialisation** uses one shared generator. It writes a random state into
  one particle per clock:
  - x, y uniform over the frame
  - velocities in -3..3
- **Random numbers** come from a 33-bit LFSR. Its feedback is the XOR of bits
  31, 21, 1 and 0, and it shifts two bits per clock. It gives two 32-bit words
  per clock: bits 31..0 and bits 32..1.
  - Every particle has three LFSRs: two for prediction and one for virtual
    particles. Their seeds are derived from the particle index.
  - The initialiser has two more.

## Centre and video output

`weighted_center` computes

    xc = sum(x_i w_i) / sum(w_i),  yc = sum(y_i w_i) / sum(w_i)

It reads one particle per clock through a multiplier stage into accumulators.
Two 32-step restoring dividers then share the divisor. The whole calculation
takes M + 36 clocks.

If every weight is zero, for example when the target has left the picture, the
previous centre is kept and `center_hold` is raised.

`center_drawing` passes the camera stream through with one clock of delay. It
paints the centre's row and column green, so the estimate shows as a cross on
the video output.

## Top-level interface (`particle_filter_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | pixel clock; asynchronous active-low reset |
| `cam_valid` | in | 1 | pixel is in the valid region |
| `cam_r`, `cam_g`, `cam_b` | in | 8 | RGB pixel (already demosaiced) |
| `cam_h`, `cam_v` | in | 10 | column and row of the pixel |
| `vid_*` | out | | camera stream with the cross drawn, 1 clock later; `vid_mark` flags painted pixels |
| `center_x`, `center_y` | out | 10, 9 | estimated target position |
| `center_valid` | out | 1 | one-clock pulse when a new centre is out |
| `center_hold` | out | 1 | no particle saw the target; centre kept |
| `phase` | out | 2 | controller state: 0 init, 1 predict, 2 virtual particle setup, 3 compare |
| `frames` | out | 32 | frames compared so far |

Frame detection uses the coordinates: a frame starts at pixel (0,0) and ends at
(H_VALID-1, V_VALID-1). The blanking between frames must be longer than
M + 36 clocks. The default VGA timing leaves 38,689 clocks.

Parameters of the top, with their defaults:

- `M` = 100
- `B` = 50
- `H_VALID` = 640
- `V_VALID` = 480

Shared widths are in `pf_pkg`:

- x: 10 bits
- y: 9 bits
- vx, vy: 5-bit signed
- weight: 10 bits

At the default size, all particle state is in registers: about 168k
flip-flops. No block RAM is used.

## Files

| file | contents |
|---|---|
| `rtl/pf_pkg.sv` | widths, frame constants, `pstate_t`, saturation helpers |
| `rtl/particle_filter_top.sv` | the system |
| `rtl/likelihood.sv` | hue and weight pipeline |
| `rtl/pf_controller.sv` | four-state sequencer |
| `rtl/particle.sv` | one real particle and its virtual particles, with the units below |
| `rtl/resampling.sv` | weight comparison |
| `rtl/prediction.sv` | motion model |
| `rtl/next_vp_generator.sv` | virtual particle placement |
| `rtl/init_rp_generator.sv` | random initial states |
| `rtl/rand_generator.sv` | two-word LFSR |
| `rtl/weighted_center.sv` | centre of gravity |
| `rtl/center_drawing.sv` | cross overlay on the video output |

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and stops itself with a watchdog. For example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/pf_pkg.sv tb/tb_particle_filter_top.sv --top-module tb_particle_filter_top
    ./obj_dir/Vtb_particle_filter_top

There are two system-level tests:

- **`tb_particle_filter_top`** is a reduced run: M = 16, B = 32, a 64x48 image
  in an 80x56 raster, 14 frames, with a red ball moving over a grey background.
  - It checks the centre latency to the clock, and that the centre stays inside
    the ball's bounding box.
  - It blanks the ball for one frame and checks that `center_hold` comes up.
  - It counts each mechanism: initialisation, prediction and virtual particle
    generation, virtual particles replacing real ones, real particles kept,
    centre hold, and cross drawing.
- **`tb_particle_filter_full`** runs the top at its default parameters (M = 100,
  B = 50, full VGA raster) for four frames, about 1.9 million clocks.
  - It checks the 411,761-clock latency, tracking of a radius-20 ball, and the
    drawing.
  - It takes roughly a minute to build and under a minute to run.

The controller, the comparison and the multi-clock units carry assertions for
their sequencing rules. For example, prediction is followed by virtual particle
generation, and a unit is never restarted while busy. `--assert` turns them on.

Verilator simulates with two states. The testbenches drive everything they read
and reset all registers.

## Departures and choices

The architecture fixes:

- the algorithm and its constants: hue formula, Ht = 40, scale 1023, spread 20,
  sigma = (1023-w)/16
- the per-particle structure and the comparison circuit
- the four-state sequencing of comparison in valid pixels and the rest in
  blanking
- the LFSR taps and the two-bit shift
- the latencies: likelihood 3, prediction 1, virtual particles B+1,
  centre M+36

This implementation chose:

- The noise distributions of prediction, initialisation and virtual particle
  velocities.
- The state widths: 10/9/5/5 bits, the packing used where particle states are
  stored in memory.
- Saturation at the frame edges.
- Start-of-frame detection from pixel coordinates, and waiting for a whole
  frame.
- The internal structure of the centre unit, chosen to match its latency.
- Hold-on-zero-weight.
- The cross colour.
- Tie rules: R before G before B in the hue formula, and the first pixel in
  raster order in the comparison.

Not included:

- **Bayer-to-RGB conversion.** The tracker takes RGB pixels with coordinates.
- **The three lower-area variants of the same filter.** One reads the selected
  velocity back from a small memory during blanking instead of using the OR
  network. Two run the comparison logic five times faster and share it across
  particles. This RTL is the fully parallel, pixel-clock version.
