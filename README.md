# Two-player ping-pong on a VGA monitor, entirely in logic

Two pads, one at each side of a 640x480 screen, return a round ball. Behind
each pad is a wall. Each player moves a pad up and down with two push
buttons. A ball that reaches the wall behind a pad is a miss, and the other
player gets a point. No processor is involved: a scan generator walks the
screen pixel by pixel, a small state machine moves the objects once per
frame, and a combinational pixel generator paints each pixel from the
object positions.

The design targets a 50 MHz FPGA board clock (a Spartan-3E Nexys-2 board in
the original project). The monitor's 25 MHz pixel rate comes from a clock
enable raised on every second clock.

```
            btn[3:0] ──► 2-flop sync ──► game_logic ──► pos (ball x/y, pad y's) ─┐
                                           ▲   │                               ▼
 clk ──► vga_sync ── pix_tick, pixel_x/y ──┘   └─► score_l, score_r     pingpong_image ──► rgb
            │     └─ video_on, pixel_x/y ─────────────────────────────────────┘
            └──────────────────────────────────────────────────────────────────► hsync, vsync
```

## Files

| file | what it is |
|---|---|
| `rtl/pong_pkg.sv` | shared types: `vga_timing_t`, `pong_geom_t`, `obj_pos_t`, `game_evt_t`, `rgb_t`, default timing and geometry, colours |
| `rtl/vga_sync.sv` | mod-2 pixel enable, horizontal/vertical counters, syncs, `video_on` |
| `rtl/game_logic.sv` | pad movement, ball movement and collisions, scores; once per frame |
| `rtl/pingpong_image.sv` | pixel generator: walls, pads, round ball, blanking |
| `rtl/pingpong_top.sv` | the game: the three blocks plus a button synchroniser |
| `tb/pong_model_pkg.sv` | untimed reference model of the game and of one pixel's colour |
| `tb/pong_screen_checker.sv` | plays the game through the buttons and checks every pixel drawn |
| `tb/tb_*.sv` | self-checking testbenches (see *Verification*) |

## Top-level interface (`pingpong_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | board clock, 50 MHz for a 640x480@60 Hz monitor |
| `rst` | in | 1 | synchronous, active high |
| `btn` | in | 4 | `{button4, button3, button2, button1}` = left up, left down, right up, right down |
| `hsync`, `vsync` | out | 1 | active low |
| `rgb` | out | 8 | colour, `RRRGGGBB`; black during blanking |
| `score_l`, `score_r` | out | 8 | points of each player (binary, wrapping); for a score display |

The buttons are level inputs. They pass a two-flop synchroniser and are read
only at the frame update, so bouncing contacts do no harm and no debouncer
is used. Holding a button moves the pad by a fixed step every frame; holding
both buttons of one player keeps that pad still.

## Scanning the screen (`vga_sync`)

A one-bit counter toggles every clock. Its value is `pix_tick`, the pixel
enable, so one pixel lasts two clocks. On each pixel enable the horizontal
counter advances through 800 positions: 640 visible, a 16-pixel front porch,
a 96-pixel sync pulse and a 48-pixel back porch. At the end of each line the
vertical counter advances through 525 lines: 480 visible, then 10, 2 and 33.
That is 420,000 pixels per frame, or 59.5 frames per second at 25 MHz.

`pixel_x` and `pixel_y` are the counters. `hsync`, `vsync` and `video_on`
are registers loaded from the *next* counter values, so all six outputs
change on the same clock edge and always describe the same pixel. After
reset the scan starts at (0,0) with `pix_tick` low.

The porch and sync numbers are the standard 640x480@60 Hz timing; only the
resolution, the 50→25 MHz halving by a mod-2 counter and the set of signals
come from the original design description. All of it is one parameter,
`TIMING`.

## The frame update (`game_logic`)

This is where the game is, and the part worth reading first.

**When.** All state changes on a single clock per frame: the pixel enable at
`pixel_x == 0`, `pixel_y == screen_h + 1` (line 481 for 480 visible lines).
The visible part of the frame has then been drawn completely, and the next
visible pixel is more than 40 lines away, so the picture never shows an
object half-moved. The position lasts two clocks, which is why the pixel
enable is part of the condition. `refr_tick` is that one-clock strobe.

**State.** The top row of each pad, the ball's top-left corner, one direction
bit per axis for the ball, and the two scores. Internally coordinates are 12
bits wide so that sums near the screen edge cannot wrap; the outputs are 10
bits.

**Pads.** With exactly one of its buttons held, a pad moves `pad_v` (4)
pixels up or down, clamped to rows `0 .. screen_h - pad_h` (0 .. 408). Pad
columns are fixed.

**Ball.** Each update first decides the new direction from the positions
*before* the update, then moves the ball `ball_v` (2) pixels along each axis.
The decision asks where the ball would be after one more step:

| event | condition (ball moving that way) | effect |
|---|---|---|
| top | `ball_y - v < 0` | y direction becomes down |
| bottom | `ball_y + size + v > screen_h` | y direction becomes up |
| left pad hit | left edge on or right of the pad's face and `ball_x - v` past it, and ball and pad overlap vertically | x direction becomes right |
| left miss | otherwise, `ball_x - v` would enter the left wall | x direction becomes right, right player +1 |
| right pad hit | right edge on or left of the pad's face and the step would cross it, with vertical overlap | x direction becomes left |
| right miss | otherwise, the step would enter the right wall | x direction becomes left, left player +1 |

The ball therefore never overlaps a wall or leaves the screen. A pad returns
the ball only from the front. A ball that has slipped past a pad's face
flies on to the wall, bounces there (a miss), and may pass back through the
pad's column. Play never stops: after a miss the ball simply continues from
the wall. The pads' old positions are used for the overlap test, the same
positions that were on screen during the frame just drawn.

`evt` carries one-clock flags for the six events above, for observation.
Assertions check that the ball stays between the walls and inside the
screen, and that the pads stay inside the screen.

With the default even coordinates and speed 2, the ball lands exactly on
each pad face and wall, with no gap.

## Drawing the playfield (`pingpong_image`)

Purely combinational, from `pixel_x`, `pixel_y`, `video_on` and the object
positions:

* walls: columns 32–35 and 604–607, full height, blue;
* pads: columns 48–51 (left) and 588–591 (right), 72 rows from the pad's top
  row, green;
* ball: red pixels inside an 8x8 box, lit where
  `(2*col - 7)^2 + (2*row - 7)^2 <= 64`. In general, for a box of `S`
  pixels, `(2*col - (S-1))^2 + (2*row - (S-1))^2 <= S^2`. This is a disc of
  radius S/2 sampled at pixel centres. For S = 8 it gives rows
  `00111100, 01111110, 11111111` ×4, `01111110, 00111100`. The bitmap is
  worked out at elaboration from that formula, and synthesis keeps it as a
  64-bit ROM;
* everything else black, and all black while `video_on` is low.

Where objects overlap, wall wins over pad and pad wins over ball.

## Parameters

Two struct parameters size everything. Their defaults are in `pong_pkg`.

* `TIMING` (`vga_timing_t`): visible pixels and lines, and the porch and
  sync widths. Default `VGA_640X480`.
* `GEOM` (`pong_geom_t`): screen size (must equal the visible area; the top
  stops elaboration if not), wall, pad and ball sizes and positions, pad and
  ball speeds, reset positions. Default `GEOM_640X480`.

Counters are 10 bits (`COORD_W`), enough for 1024 pixels per line and
1024 lines per frame. `vga_sync` refuses a larger scan. The frame total must
include at least line `screen_h + 1`.

## How the design relates to the original project

From the original description: a 640x480 VGA display refreshed 60 times a
second; the 50 MHz clock halved by a mod-2 counter; a sync block producing
H-sync, V-sync, pixel x/y and `video_on`; a pixel-painting block fed by
those signals and driving `rgb`; left and right walls, left and right pads
and a round ball; one update per frame at pixel (0, 481); pads that move
vertically at constant speed until they reach the top or bottom; a ball with
positive and negative velocity that turns at walls, pads and the top and
bottom edges; a point to the other player on a miss; the button assignment.

Choices made here, where the description says nothing: every size,
position, speed and colour; the porch and sync widths and the sync polarity;
8-bit colour; synchronous reset and the reset state (pads and ball centred,
ball moving right and down); that a miss is the ball reaching the wall
behind a pad and that play continues; the exact collision rules above; 8-bit
wrapping scores; the button synchroniser.

Not included: in the original the game sat next to a soft processor on its
system bus. The processor, the bus and any software are not part of this
RTL, and nothing here depends on them. A seven-segment score display and a
keyboard controller were planned originally but never completed, so they
are not built. The scores are brought out on `score_l` and `score_r` for
such a display.

Size after generic synthesis (word-level cells): about 257 cells, 98
flip-flops and a 64-bit ROM for the whole game.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog if it
hangs.

| testbench | what it does |
|---|---|
| `tb_vga_sync` | two full 640x480 frames; every clock compared with a scan worked out from the 800/525 numbers; frame period 840,000 clocks; 307,200 visible pixels |
| `tb_game_logic` | 6,000 frame updates at full geometry, driving the scan inputs directly; simulated players (pads up, pads down, ball-following, random); state, scores and event flags compared with the model after every update; updates must not happen at neighbouring positions or without the pixel enable; every event kind and both pad limits must occur |
| `tb_pingpong_image` | every pixel of the 640x480 screen for 10 placements (walls, pad faces, edges, random) against the model; blanking; the 8x8 disc row by row |
| `tb_pingpong_top` | the whole game on a 160x120 screen (184x128 scan, geometry scaled) for 700 frames: every pixel's colour, both syncs and the scores checked against the model; pad moves, pad limits, top/bottom bounces, hits and misses on both sides, blanking and sync pulses each counted and required |
| `tb_pingpong_top_full` | the whole game with all defaults for 60 frames (50.4 million pixel clocks): every pixel, both syncs, the scores, the frame period, pads driven to the top limit |

The reference model (`tb/pong_model_pkg.sv`) restates the rules in plain
integer arithmetic and draws the ball with real-valued distances. It does not
use the RTL's formulas.

Run one testbench with plain Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pingpong_top \
  -y rtl -y tb +libext+.sv rtl/pong_pkg.sv tb/pong_model_pkg.sv tb/tb_pingpong_top.sv
./obj_dir/Vtb_pingpong_top
```

Packages must come first on the command line; `-y` finds the modules. The
reduced end-to-end test takes about half a minute and the full-size one
about 40 seconds. To try another playfield, override `TIMING` and `GEOM` on
`pingpong_top`, as `tb_pingpong_top` does, keeping coordinates even if the
ball speed is 2.
