# Pong with camera-tracked paddles: custom FPGA hardware

This is the custom hardware of a two-player Pong game played with real
paddles. The players hold physical paddles with a red end and a green end in
front of a video camera. The hardware does four jobs:

- It stores every video frame in DDR memory.
- It finds the four coloured paddle ends in that frame.
- It runs the game physics: paddle velocities, ball/paddle collisions, wall
  bounces and scoring.
- It plays short tunes for game events.

A processor draws the paddles and the ball on a VGA screen or projector from
the coordinates this hardware produces. Unlike classic Pong, a paddle can move
and tilt in any direction. The ball bounces off the actual line between the
paddle's two ends.

The design targets a Xilinx Virtex-II Pro board (XUP-V2P) with a MicroBlaze
processor, a PLB bus, a multi-ported DDR memory controller (MPMC), a Digilent
video decoder card and an LM4550 AC'97 codec. Those parts are not included
here. The RTL covers the four custom cores, and everything they connect to is
a port of `pong_top`.

## Block overview

```
 video (RGB, 13.5 MHz) ──► video_to_ram ──PLB──► DDR frame ──PLB──► paddle_detector
                           (2 line buffers,                         (colour bounds from DDR,
                            burst writer)                            endpoints back to DDR)
                                                                          │ paddle1, paddle2
                                                                          ▼
 start_game ─────────────────────────────────────────────────────► ball_control
                                                                   velocity_calc
                                                                   collision_outcome
                                                                   ball_registry
                                                                          │ collision, point1|point2
 start_game, end_game ───────────────────────────────────────────► audio_tone_fsm ──► speaker / sample
```

| File | Contents |
|---|---|
| `rtl/pong_pkg.sv` | Shared types: points, paddles, velocities, PLB request/response structs |
| `rtl/pong_top.sv` | The four cores wired together; all external parts are ports |
| `rtl/video_to_ram.sv` | Line ping-pong buffering, clock crossing, line write-out |
| `rtl/line_buffer.sv` | Dual-clock RAM holding one 640-pixel RGB line |
| `rtl/plb_burst_master.sv` | Request / wait for acknowledge / transfer, up to 16 words |
| `rtl/paddle_detector.sv` | Bounds read, frame scan, endpoint update, write-back |
| `rtl/ball_control.sv` | Physics core: the next three blocks |
| `rtl/velocity_calc.sv` | Paddle endpoint velocities |
| `rtl/collision_outcome.sv` | Ball/paddle intersection and new ball velocity |
| `rtl/ball_registry.sv` | Ball position, per-axis motion, edges, scores |
| `rtl/audio_tone_fsm.sv` | Tone sequencer for the four game sounds |

## Video capture into memory (`video_to_ram`)

The video decoder and three vendor cores sit in front of this block. They
extract the sync signals, convert 4:2:2 to 4:4:4 and convert YCrCb to RGB.
What arrives here is a 24-bit RGB pixel per 13.5 MHz clock, a line sync that
is high during horizontal blanking, and a line number from a timing generator.

Writing to memory happens on the 100 MHz bus clock. Two line buffers
decouple the two clock rates:

- While one buffer fills with the current line, the other is emptied onto the
  bus.
- On the rising edge of the line sync the buffers swap roles.
- The finished line's buffer index and line number are passed to the bus side
  with a toggle and a two-flip-flop synchroniser. These values then stay
  unchanged for a whole line period, far longer than the synchroniser needs.

The bus side waits for `mpmc_done_init`. It then writes the line as 40 bursts
of 16 pixels. Each pixel is a word `{8'h00, R, G, B}` at
`FRAME_BASE + 4*(line*640 + x)`. Lines whose number is 480 or more are not
written.

**The bandwidth argument.** A burst costs 1 request cycle, at most 10 cycles
of waiting for the address acknowledge, and 16 data cycles. That is 27 cycles,
so a line needs at most 1080 cycles (10.8 µs) against the 63.55 µs NTSC line
period. Each burst is requested in the cycle the previous one completes, so
the line takes at most one start cycle plus 40 × 27, which is 1081 cycles. With
a memory that acknowledges within 10 cycles, the testbench measures 938 cycles
per line. The `overrun` output is a sticky flag
that records a line arriving before the previous one has left its buffer. It
never fires in the tests.

## Bus transfers (`plb_burst_master`, `pong_pkg`)

Both custom cores are bus masters. The PLB v4.6 protocol is reduced to what a
fixed-length burst needs:

- The master raises `request` and holds `rnw`, `addr` and `len` (1..16 words)
  until the slave's `addr_ack`.
- The slave then acknowledges each word with `wr_dack` or `rd_dack`, and flags
  the last word with `wr_comp` or `rd_comp`.
- On writes, the master shows the current word on `wr_data` and advances on
  each acknowledge.

Signals left out: priority, bus lock, size/type and the burst-terminate
signals. Assertions in `plb_burst_master` check four rules:

- `start` is only accepted while the master is idle, or in the cycle of the
  last data acknowledge, which lets bursts follow back to back.
- The request is held stable until it is acknowledged.
- The burst length is between 1 and 16.
- No data acknowledge arrives outside the data phase.

Fitting this to a real PLB v4.6 slave needs a thin adapter, which is not
included.

## Paddle detection (`paddle_detector`)

The detector runs an endless four-step loop over the PLB:

1. **Read the colour bounds.** The processor keeps 12 words at `BOUNDS_ADDR`:
   the lower and upper bound of R, G and B for End Colour 1, then the same for
   End Colour 2. The bound is the low byte of each word. The detector reads
   them in one 12-word burst every pass, so the processor can recalibrate for
   lighting at any time.
2. **Scan the frame** from `FRAME_BASE` in 16-pixel read bursts, in line
   order.
3. **Classify each pixel as it arrives.** The End Colour 1 test comes first.
   A pixel is End Colour 1 if each of its R, G and B lies strictly between the
   bounds (`low < value < high`). Otherwise the same test runs with the
   End Colour 2 bounds. A matching pixel in a column below `SPLIT_X` becomes
   that endpoint of paddle 1; any other matching pixel goes to paddle 2.
4. **Write back** the eight coordinates to `PADDLE_ADDR` in one 8-word burst,
   in this order: paddle 1 X1, Y1, X2, Y2, then paddle 2.

Coordinates are never cleared. The last matching pixel of a frame wins, and an
endpoint that is not seen keeps its old value. A stray object in a paddle
colour therefore makes the paddle jump. A full 640×480 pass takes about
461,000 cycles (4.6 ms), well within one video frame.

`SPLIT_X` defaults to 240 (that is, 480/2), which is the value the original
design specifies. The frame is 640 pixels wide, so the player boundary is not
at the centre of the screen. Change `SPLIT_X` to 320 for a centred split.

## Game physics (`ball_control`)

This is the part that needs the most care. All motion uses screen pixels. All
velocities are signed 8-bit values in the `pong_pkg::vel_t` type.

### Paddle velocity (`velocity_calc`)

After reset the block first records the eight endpoint coordinates. Then, once
every `SAMPLE_RATE` cycles, it computes each coordinate's change since the
last sample and limits the result to ±`MAX_VEL`. The unit is pixels per
sampling period.

The first sample after reset compares against coordinates recorded at reset,
before the detector has found the paddles. This can produce one period of full
velocity. The end-to-end test lets two sampling periods pass before starting
the game.

### Collision test (`collision_outcome`)

Take the paddle ends (X1,Y1) and (X2,Y2) and the ball centre (X3,Y3). The ball
touches the paddle when both of these hold:

- It lies in the box spanned by the two ends. The test includes the box edges,
  so that a perfectly vertical or horizontal paddle can be hit.
- It lies exactly on the paddle's line. To avoid a divider, the slope
  comparison is cross-multiplied: `(Y3-Y1)*(X2-X1) == (Y2-Y1)*(X3-X1)`.

The ball moves one pixel at a time, so it always passes through the column of
a vertical paddle. A steep or diagonal paddle, however, can be crossed between
two integer points without an exact match. The original design has the same
exact-match test, and this implementation does not widen it.

On contact the new velocity is computed for X and Y separately. In the rules
below, `vb` is the ball velocity and `vp` is the paddle velocity, taken as the
mean of the two endpoint velocities of the paddle that was hit:

| Case | New ball velocity |
|---|---|
| `vb` and `vp` both positive or both negative | `vb + vp` |
| `vb` and `vp` of opposite sign | `-vb + vp` |
| otherwise (either is zero) | `-vb` |

A consequence: a ball struck by a paddle moving the same way keeps its
direction and passes through the paddle. A stationary paddle simply reflects
the ball on both axes.

The state machine runs check → update (one-cycle `update_vel` pulse) → wait
until the ball has left the paddle → wait `WAITCYCLES` → check again. A single
contact therefore produces one update.

### Ball motion, edges and score (`ball_registry`)

After reset the ball waits in the screen centre until `start`. Its velocity is
taken from an LFSR, with each axis between 1 and `VMAX` and a random sign.

Each axis then runs its own loop with its own counter:

1. Move one pixel in the direction of the velocity.
2. Check the edges.
3. Wait `WAITCYCLES * (VMAX + 1 - |v|)` cycles.

So speed comes from how often the ball steps, not from how far it steps. With
the defaults the fastest ball steps every 50,000 cycles, which is 2000 pixels
per second.

The centre is kept at least `RADIUS` (10) pixels from every edge. An axis
reverses only when the ball is in the edge region and moving outwards.

- A top or bottom bounce pulses `collision`.
- A left-edge bounce gives player 2 a point.
- A right-edge bounce gives player 1 a point.

The ball bounces off the left and right edges too. It is not re-served.

A velocity update from the collision logic is held pending per axis. It is
applied when that axis is next in its move or wait step, and the new value is
limited to ±`VMAX`.

`ball_control` ORs paddle contacts and wall bounces into one `collision`
signal for the audio logic.

## Sounds (`audio_tone_fsm`)

An 11-bit counter advances on `tick`, which is the codec's frame strobe in the
system. Its bits 10, 9, 8 and 7 give tones 1 to 4, each an octave above the
previous. A Moore state machine plays one sequence per event. Each tone lasts
`TONE_CYCLES`:

| Event | Tones |
|---|---|
| ball collision | 1 |
| point scored (either player) | 2, 2 |
| start game | 1, 2, 3, 2, 3 |
| end game | 1, 2, 3, 4, 3, 4 |

Events are only accepted while silent. If several events arrive at once, the
priority is end > start > point > collision. `speaker` is the square wave, and
`sample` is the matching ±`AMPLITUDE` 16-bit value for the codec's left
channel. The AC'97 controller itself is not included.

## Parameters of `pong_top`

| Parameter | Default | Meaning |
|---|---|---|
| `H_ACTIVE`, `V_ACTIVE` | 640, 480 | frame size |
| `SPLIT_X` | 240 | paddle 1 / paddle 2 boundary column |
| `FRAME_BASE` | `0x0000_0000` | frame in memory |
| `BOUNDS_ADDR` | `0x0013_0000` | 12 colour-bound words |
| `PADDLE_ADDR` | `0x0013_0040` | 8 paddle-coordinate words |
| `RADIUS` | 10 | ball radius, edge margin |
| `SAMPLE_RATE` | 1,000,000 | paddle velocity period (10 ms) |
| `MAX_PADDLE_VEL` | 3 | paddle velocity limit |
| `COLL_WAIT` | 100,000 | collision hold-off (1 ms) |
| `BALL_WAIT` | 50,000 | base step period of the ball |
| `VMAX` | 3 | ball velocity limit per axis |
| `TONE_CYCLES` | 10,000,000 | length of one tone (0.1 s) |

Fixed by the original design: the 640-pixel line, 16-word bursts, the 12
bounds and 8 coordinates, the strict colour tests, the 240 split, the radius,
the velocity rules and the tone sequences. The others (addresses, timing
periods, limits, widths) are this implementation's choices.

## Where this implementation fills gaps or departs

These points are choices made here, not taken from the original design:

- Line sync polarity and the swap on its rising edge.
- The pixel word layout and the whole memory map.
- The clock-domain handshake.
- The reduced bus signal set.
- The collision box test includes its edges; the original states strict
  inequalities, which could never match an axis-aligned paddle.
- Paddle velocity for collisions is the mean of the two ends.
- `update_vel` is a one-cycle pulse, and the ball registry keeps it pending.
- The velocity-to-period formula, the LFSR start velocity and the edge rule
  "reverse only when moving outwards".
- Which player scores on which edge.
- Merging paddle and wall collisions into one sound event.
- The audio event priority, the tone duration and the tick input.
- Each line buffer is one 24-bit RAM instead of three 8-bit RAMs.

## Simulation

Every block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`. Helper models:

- `tb/plb_mem_model.sv` is a multi-port PLB memory. It acknowledges addresses
  within a configurable number of cycles and can insert data gaps.
- `tb/video_source.sv` produces frames with drawn paddles.

To build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_pong_top rtl/pong_pkg.sv tb/tb_pong_top.sv
./obj_dir/Vtb_pong_top
```

| Testbench | What it shows |
|---|---|
| `tb_plb_burst_master` | random write/read bursts of 1..16 words, data and ≤ 1+10+len cycles; four read bursts chained back to back |
| `tb_line_buffer` | dual-clock write/read-back |
| `tb_video_to_ram` | full-size lines land at the right addresses, off-frame lines are skipped, flush time per line, no write before memory init |
| `tb_paddle_detector` | full 640×480 frames vs. a reference scan, decoys on the bounds, write-back words, burst count and frame time |
| `tb_velocity_calc` | sampled differences, the limit, the period |
| `tb_collision_outcome` | hits on/next to/beyond random paddles, the three velocity cases, one update per contact, hold-off |
| `tb_ball_registry` | step direction and period per axis, edge margin, bounces, points and scores, velocity updates |
| `tb_ball_control` | ball stays between two standing paddles and reverses on each contact; a paddle moving away lets player 2 score |
| `tb_audio_tone_fsm` | each tune cycle by cycle, events ignored while playing, priority |
| `tb_pong_top` | end to end on an 80×60 frame: capture, detection, start, paddle contacts, wall bounces, paddle velocity and its limit, a point, all four tunes; fails if any of these never happens |
| `tb_pong_full` | the top at its default parameters: one full 640×480 frame captured, detected and written back, then the game starts and the ball moves (about 4 million cycles) |

## Not included

These parts of the complete system are not part of this RTL:

- The video decoder chip and the vendor video cores: sync extraction, 4:2:2 to
  4:4:4 conversion, colour space conversion and line-count generation.
- Clock buffers.
- The processor and its memories, the bus itself, GPIO, I2C, UART, debug
  module and TFT video output.
- The memory controller and DDR.
- The AC'97 controller and codec.
- The paddle and ball drawing, which is processor software using Bresenham
  lines and filled midpoint circles.
