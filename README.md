# Pong on a VGA monitor with a PS/2 keyboard

A complete, synthesizable single-player Pong. The player holds the up and
down arrow keys of a PS/2 keyboard to move the right-hand paddle; the
left-hand paddle is steered by a simple tracking rule. The picture is a
640 x 480 VGA frame with one bit per colour. The ball moves faster than
either paddle (3 pixels per frame in each axis, against 2), so the computer
can be beaten. The first side to let the ball reach its wall loses, and the
whole screen turns green (player wins) or red (computer wins). `start_n`
starts a game; `reset_n` sets up a new one.

The RTL is a SystemVerilog rewrite of a small FPGA course project (a 2004
design for an Altera FLEX 10K70 board with a 25 MHz clock). It keeps that
design's block structure, constants, collision rules and state machines. Where it
departs from the original, the change is listed under
[Departures from the original](#departures-from-the-original).

## Block structure

```
pong                              top level, all on one 25 MHz clock
├── kb_main                       keyboard front end (wiring only)
│   ├── keyboard                  PS/2 serial receiver
│   └── kb_control                arrow-key make/break tracker
├── pongmain                      game core: state machine, colour merge
│   ├── ball                      ball motion, collisions, drawing
│   ├── paddle                    player's paddle (keyboard)
│   └── paddle2                   computer's paddle = paddle + tracker
│       └── paddle
└── vga_sync                      640 x 480 timing, blanking, pixel coordinates
pong_pkg                          shared constants (screen, sizes, speeds, scan codes)
```

Data flow in the top level:

```
kb_clk/kb_data ─► kb_main ─ up/down ─► pongmain ─ r/g/b ─► vga_sync ─► red/green/blue, syncs
                                          ▲                    │
                                          └─ pixel_row/column, vert_sync
```

`kb_main` also decodes the left and right arrows. These outputs are
deliberately left unconnected. `kb_main`'s reset is active high, so the top
drives it with the inverse of `reset_n`.

## How the picture is made

No frame buffer is used. Each object knows its own centre. For every pixel, it
tells `pongmain` combinationally whether it covers that pixel. The test is
`|x - column| <= half_width` and `|y - row| <= half_height`:

| object          | centre                | half width | half height | drawn size |
|-----------------|-----------------------|-----------:|------------:|-----------:|
| ball            | starts at (320, 240)  | 4          | 4           | 9 x 9      |
| player paddle   | column 600, starts at row 210 | 4  | 32          | 9 x 65     |
| computer paddle | column 40, starts at row 200  | 4  | 32          | 9 x 65     |

`pongmain` ORs the three objects into white. It ORs `player1win` into green
and `player2win` into red, so after a game the background takes the winner's
colour and the objects stay white on top of it.

`vga_sync` registers its pixel coordinates once. It registers the blanked
colour and the syncs again. The object tests sit between those two register
stages. Colour and sync therefore leave the chip aligned, both two clocks
behind the pixel counters.

### VGA timing details

| count             | value | meaning                                  |
|-------------------|------:|------------------------------------------|
| `H_VISIBLE`       | 640   | visible clocks per line                  |
| `H_SYNC_START/END`| 659 / 755 | hsync low (97 clocks)                |
| `H_TOTAL`         | 800   | clocks per line                          |
| `V_STEP_COL`      | 699   | column at which the line counter steps   |
| `V_VISIBLE`       | 480   | visible lines                            |
| `V_SYNC_START/END`| 493 / 494 | vsync low (2 lines)                  |
| `V_TOTAL`         | 525   | nominal lines per frame                  |

The line counter returns to 0 once it is at least `V_TOTAL-1` and the
column is at least `V_STEP_COL`. That condition is already true on the
clock after the counter reaches 524, so line 524 lasts one clock. A frame is
therefore 524 lines, or 419,200 clocks (59.6 Hz at 25 MHz). This behaviour
is kept from the original generator, and the testbenches check for it. `pixel_row` and `pixel_column` hold their last visible value
during blanking. `vga_sync` has no reset. Its counters wrap into range by
themselves within one frame.

## Game timing: one step per frame

Everything runs on the single pixel clock. `pongmain` detects the rising
edge of `vert_sync`, which is the end of the vertical sync pulse. That edge
becomes `frame_tick`, a pulse one clock long. The ball and both paddles
update only on `frame_tick`. All speeds are therefore in pixels per frame.

### Game state machine (`pongmain`)

| state        | ball_en | leaves when                                       |
|--------------|:-------:|---------------------------------------------------|
| `WAIT_START` | 0       | `start_n` low → `PLAY`                            |
| `PLAY`       | 1       | left wall hit → `WINNER`, `player1win`; otherwise right wall hit → `WINNER`, `player2win` |
| `WINNER`     | 0       | only by `reset_n`                                 |

`ball_en` is decoded from the state. The ball therefore stops on the clock
after a wall hit is reported, well before the next frame. The paddles are not
gated by `ball_en`. The computer's paddle follows the ball even while the
game waits or after it has ended. Two assertions in `pongmain` check that at
most one winner is flagged, and only in `WINNER`.

### Ball motion and collisions (`ball`)

This block holds most of the game. On each frame tick with `ball_en` high, it
first decides the new direction from the current position. It then moves the
ball 3 pixels in each axis in that direction. Let `S = 4` be the ball half
size and `v = 3` the speed:

* **Top and bottom.** If `y + v >= 480 - S` the ball turns up. Otherwise, if
  `y <= S + v` it turns down. From the start position the ball reaches row 6
  after 78 frames and turns there.
* **Right side (player), tested first.** If `x + v >= 640 - S`, the right wall
  is hit and `backstop1` is set. Otherwise, if `x + v + 8 >= 640 - 40`, the
  ball is in the player's paddle zone, which begins 40 pixels from the wall.
  The 8 allows for the ball and paddle half-widths. In the zone, the ball
  turns left if the paddle overlaps it. If not, `paddle1_plane` is set.
* **Left side (computer), mirrored.** If `x <= S + v`, the left wall is hit and
  `backstop2` is set. Otherwise, `x + v <= 40 + 8` is the computer's zone.
  There the ball turns right or `paddle2_plane` is set.
* **Overlap** means `|paddle_y - ball_y| < 32`. This uses the paddle half
  height only. The ball's own size is not added.

The four flags stay set until reset. Bounces never change the ball's angle.
The path is always a 45° zig-zag, so a hit or a miss depends only on where
the paddle is when the ball arrives.

A bounce is allowed anywhere in a paddle zone. Suppose a paddle misses the
ball and catches up while the ball is still between its plane and the wall.
The paddle then still returns the ball, from behind. This late return is the
original game's known quirk and is kept. A fix would need to remember
`paddle*_plane` and refuse a bounce once it is set.

### Paddles (`paddle`, `paddle2`)

On a frame tick, `move_up` moves the paddle 2 rows up if its centre row is
greater than 32. Otherwise, `move_down` moves it 2 rows down if its centre row is at
most 448. The paddle therefore rests between rows 32 and 450.
`paddle2` is a `paddle` with its move requests produced by a comparison. It
moves down when the ball's row is greater than the paddle's row, and up when
it is smaller. Because the paddle moves 2 rows per frame and the ball 3, the
computer loses ground on long diagonal runs and eventually misses.

## Keyboard path

### PS/2 receiver (`keyboard`)

A PS/2 keyboard clocks out 11-bit frames at 10-16 kHz: a start bit of 0,
eight data bits LSB first, odd parity and a stop bit of 1. The receiver
shifts the raw keyboard clock through an 8-stage register. The filtered
clock changes only when all 8 samples agree, which rejects glitches shorter
than 8 system clocks. Each rising edge of the filtered clock is used as an
enable. On that edge a 0 on the data line starts a frame while the receiver
is idle. The next nine bits are shifted into the top of a 9-bit register.
The tenth edge, the stop bit, copies the low 8 bits to `scan_code` and sets
`scan_ready`. Parity is shifted in but not checked. The data line passes
through two synchronising flip-flops first.

`scan_ready` stays high until `read` is high for a clock. It is low from the
next clock on. It rises about ten system clocks after the stop bit's rising
clock edge.

### Arrow-key tracker (`kb_control`)

The tracker has two states. `IDLE` waits for `scan_ready`. `READ` lasts
exactly one clock: it raises `read_en` and interprets the byte. A prefix
status remembers what came before:

| byte          | status before | effect                         | status after |
|---------------|---------------|--------------------------------|--------------|
| `E0`          | any           | —                              | `EXT`        |
| `F0`          | `EXT`         | —                              | `EXT_BREAK`  |
| `F0`          | other         | —                              | `NONE`       |
| 75/72/6B/74   | `EXT`         | up/down/left/right ← 1 (make)  | `NONE`       |
| 75/72/6B/74   | `EXT_BREAK`   | that key ← 0 (break)           | `NONE`       |
| anything else | any           | —                              | `NONE`       |

Arrow keys send `E0 xx` on press and repeat, and `E0 F0 xx` on release.
Numeric-keypad keys send the same codes without `E0`, so they are ignored.
A key output changes two clocks after `scan_ready` rises.

## Departures from the original

The original was written as processes clocked by the sync pulse and by the
filtered keyboard clock. Here everything is synchronous to one clock:

* **Clocking.** Objects move on a `frame_tick` enable taken from the rising
  edge of `vert_sync`. The original triggered its processes on `vert_sync`
  itself. The PS/2 receiver uses its filtered clock as an edge-detected
  enable, not as a clock.
* **Reset.** Resets are asynchronous. `reset_n` is active low for the game.
  The keyboard reset is active high. In the original, the game blocks
  sampled reset only on the sync edge.
* **Ball direction lag.** In the original ball, a new direction reached the
  position two frames after it was decided. This was a side effect of
  chained signal assignments. Here the direction decided in a frame is used
  for that frame's move. The ball row sent to the computer paddle is the
  current one, not a one-frame-old copy.
* **`ball_en`** is decoded from the state. It is not a separate register.
* **`read_en`** is high in the `READ` state only, following the key
  controller's state chart. The original's `READ` state never returned to
  `IDLE`.
* **Prefix status.** An `E0` always starts a new prefix, and every other
  non-prefix byte clears the status. In the original, an `E0` right after an
  `F0`-terminated release was turned into "no prefix". The first press after
  a release was then lost until the keyboard's auto-repeat.
* **`scan_ready`** is a synchronous flag cleared by `read`. The original
  cleared it asynchronously and set it on an edge of an internal signal.
* **Top-level parameters.** The VGA timing is exposed as parameters on
  `pong`. The defaults are the original numbers. A smaller frame speeds up
  simulation; the game field stays 640 x 480.

The 524-line frame and the late-bounce quirk above are kept on purpose.

## Simulating

All code is plain SystemVerilog (IEEE 1800-2017). The testbenches are
self-checking. Each one prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To build and run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -y rtl -y tb +libext+.sv rtl/pong_pkg.sv tb/tb_pong.sv \
    --top-module tb_pong -o sim
./obj_dir/sim
```

| testbench        | what it covers                                                     | run time |
|------------------|--------------------------------------------------------------------|----------|
| `tb_keyboard`    | PS/2 frames in, byte values, ready/read handshake, latency, glitch rejection | < 1 s |
| `tb_kb_control`  | make/break/repeat of all arrows, ignored sequences, one `read_en` per byte | < 1 s |
| `tb_kb_main`     | serial make/break sequences to key levels                          | < 1 s |
| `tb_vga_sync`    | sync periods and widths, 640 visible clocks × 480 lines, colour pattern alignment | seconds |
| `tb_paddle`      | step size, limits 32 and 450, up-over-down priority, drawn rectangle | < 1 s |
| `tb_paddle2`     | tracking towards the ball, stopping level, limits                  | < 1 s |
| `tb_ball`        | frame-by-frame comparison with an integer model: rallies, both misses, flags, drawing | < 1 s |
| `tb_pongmain`    | wait/play/winner sequence, 106-frame computer win, testbench-played player win, colours | < 1 s |
| `tb_pong`        | whole design with a small video frame: two games over the PS/2 lines | seconds |
| `tb_pong_full`   | the same two games at the full 640 x 480 timing with all defaults (about 325 million clocks) | 5-6 min |

In `tb_pong` and `tb_pong_full`, the testbench plays the right paddle. It
predicts the row where the ball will arrive and sends real key make and break
byte sequences. These two testbenches count each mechanism, and each count
must be non-zero: key make and break decoding, paddle motion both ways,
bounces off both paddles and off the top and bottom, a paddle-plane miss, and
each winner. At full size they also count the lit pixels of each frame. That
count must match the ball and paddle areas exactly, before play and after
each result.

Some testbenches read internal signals, such as the ball's column or the
game state, by hierarchical reference. They only build against the real
modules.

## Changing the design

* Game constants (screen size, object sizes, speeds, start positions,
  paddle columns, scan codes) live in `rtl/pong_pkg.sv`. `ball`, `paddle`
  and `paddle2` also take their speeds and positions as parameters.
* Coordinates are 10 bits (`coord_t`). A larger screen needs a wider
  `COORD_W` and new VGA timing parameters on `pong`.
* The late-bounce quirk can be removed in `ball.sv`. Do not allow the
  direction change in a paddle zone once that side's `paddle*_plane` flag is
  set.
