# Snake on an FPGA: joystick in, VGA out

This is the classic Snake game as synthesizable hardware. No processor runs the game. The snake's body is a
bank of 50 registers that shift one place every game step. A joystick read over SPI steers the head,
and a VGA timing generator paints the playfield straight from those registers while the beam scans the
screen. The design targets a Spartan-3E board with a 50 MHz oscillator, a PmodJSTK joystick module, a
VGA connector with 8-bit colour, LEDs, slide switches, buttons and a four-digit seven-segment display.

The structure, rates and game rules follow a student project report on this game. Where the report says
what a block does but not how, the simplest circuit that does it was chosen. The last sections list each
of those choices.

## The game

* The 640x480 screen is divided into 8x8-pixel blocks, giving an 80x60 grid. The outermost ring of
  blocks is a wall (an 8-pixel frame).
* The snake starts with three blocks in the middle of the screen. The apple is a single block.
* After reset the snake is shown standing still until the start button is pressed. It then moves right,
  one block per step.
* While the snake moves up or down, only left/right joystick tilts count. While it moves left or right,
  only up/down tilts count. The snake therefore can never reverse into itself. At most one turn is taken
  per step.
* When the head moves onto the apple, the snake grows by one block (up to 50). A new apple appears at a
  random place. The game gets a little faster, and the score processor is told.
* When the head would move into the wall or into its own body, the game freezes and the body flashes.
  The start button begins a new game with a three-block snake. The apple stays where it is.
* A slide switch pauses the game.

## Block diagram

```
                 +-----------+   x,y,btn   +-------------+ tilt flags +----------------+
 PmodJSTK <-SPI->| jstk_     |------------>| jstk_decode |----------->| direction_ctrl |
                 | master    |             +-------------+   (LEDs)   +-------+--------+
                 | (spi_     |                                        dir_next|
                 |  master)  |      +------------+  step   +---------------+  |
                 +-----------+      | move_timer |-------->|  snake_core   |<-+
                                    +------------+<--eat---|  body[0..49]  |
                                                           |  len, state   |--eat--> score_event
                                    +------------+  apple  |               |
                                    | apple_gen  |-------->|               |
                                    +------------+<--eat---+-------+-------+
                                                                   | body, len, apple
 50 MHz --tick_gen/2--> pix_ce --> +----------+  px,py   +---------v----+
                                   | vga_sync |--------->|  vga_render  |--> RGB 3:3:2
                                   +----------+ HS, VS   +--------------+
 score_bcd (from score processor) --> sevenseg_driver --> AN[3:0], CA..CG
```

Everything runs on the single 50 MHz clock. The slower rates are one-cycle clock enables made by
`tick_gen`: /2 gives the 25 MHz pixel rate, and /375 gives the half period of the 66.67 kHz joystick
serial clock. The design has no derived clocks and no clock-domain crossings inside it. Only the button,
the switch and MISO pass through two-flip-flop synchronizers.

## The snake body and one game step (`snake_core`)

This is the heart of the design and the part worth reading first.

The body is an array `body[0..49]` of grid cells. Each cell is a packed `{x[6:0], y[5:0]}`, and
`body[0]` is the head. Only the first `len` entries belong to the snake. Entries beyond `len` hold stale
cells. Every consumer masks them by comparing the index with `len`.

On the clock edge where `move_timer` raises `step`, the core does all of the following in one cycle:

1. It computes the next head cell from the current head and `dir_next`, the heading that
   `direction_ctrl` has chosen from the latest joystick tilt.
2. It compares that cell, in parallel, with:
   * the wall ring (x = 0 or 79, y = 0 or 59);
   * every body entry with index below `len - 1`, or below `len` when the snake is growing. The tail
     block moves away during a plain step, so the head may follow directly behind its own tail;
   * the apple.
3. On a wall or body hit, the state becomes `GS_OVER` and nothing moves.
4. Otherwise every entry moves one place towards the tail (`body[i] <= body[i-1]`), and the new head
   enters at `body[0]`. On an apple hit `len` also grows (saturating at 50) and `eat` pulses for one
   cycle.

Growth therefore needs no extra copying. The old tail value is already sitting in `body[len]` after the
shift, so incrementing `len` makes it visible. Each step costs 50 cell comparators for the body check.
`vga_render` uses another 50 comparators against the block under the beam on every pixel.

The game states are `GS_READY` (after reset, snake shown stationary), `GS_RUN` and `GS_OVER`. In
`GS_OVER` the `body_visible` flag toggles every `FLASH_FRAMES` (15) video frames, about 4 Hz. The
renderer hides the head and body while the flag is low. `start`, the rising edge of the start button,
reinitialises the body from any state and pulses `init` for one cycle. That pulse resets the heading to
right in `direction_ctrl` and the step period in `move_timer`.

## Pace and speed-up (`move_timer`)

`move_timer` counts pixel enables while the game runs unpaused and emits `step` every `period` of them.
The period starts at 1,000,000 pixel clocks, which is 40 ms or 25 steps per second at 25 MHz. Each apple
takes 20,000 off, down to a floor of 250,000 (100 steps per second). Pausing freezes the count.

## Apples (`apple_gen`)

A 16-bit maximal-length LFSR (x^16 + x^14 + x^13 + x^11 + 1) advances on every pixel clock. Its low
7 bits give the column and bits 13:8 the row. Each field is folded into the interior (columns 1..78,
rows 1..58) by subtracting 78 or 58 once if it is out of range, then adding 1. The apple register loads
this value on `eat`. The time between apples depends on the player, so the next position is
unpredictable in practice. After reset the apple sits at (60, 20). An apple may land on the snake's body.
It then stays hidden under the body until the head reaches it.

## The joystick link (`jstk_master`, `spi_master`, `jstk_decode`)

Five times per second (every 10,000,000 clocks), `jstk_master` does the following:

1. It pulls SS low and waits 3 SCLK half periods, at least 15 us.
2. It exchanges five bytes in SPI mode 0 (SCLK idles low, sample on the rising edge, MSB first), with a
   gap of 3 half periods after each byte.
3. It raises SS again.

Byte 0 sent is `1000_00LL`, which sets the joystick module's two LEDs. This design shows the module's
own buttons BTN1/BTN2 on them. The bytes received are

| byte | content |
|---|---|
| 0 | X[7:0] |
| 1 | X[9:8] in bits 1:0 |
| 2 | Y[7:0] |
| 3 | Y[9:8] in bits 1:0 |
| 4 | buttons: bit 0 stick push, bit 1 BTN1, bit 2 BTN2 |

A complete exchange takes 98 half periods, about 0.75 ms at 66.67 kHz. `x`, `y` and `btn` hold the last complete sample.

`jstk_decode` splits each 0..1023 axis into three zones. Below 400 is tilt left (X) or down (Y), above
600 is tilt right or up, and between them is centre. It also drives board LEDs 0-5 (X<400, X>600, Y<400,
Y>600, BTN1, BTN2). LED 6 shows the stick push button and LED 7 lights on game over.

The joystick is read only every fifth step at the default rates. A tilt therefore takes effect at the
step after the next poll, up to 200 ms later. That latency is a property of the specified rates, not of
the logic.

## Picture (`vga_sync`, `vga_render`)

`vga_sync` follows the classic counter structure. An 800-count horizontal counter runs on the pixel
enable, and a 521-count vertical counter advances once per line. Each sync is a set/reset register: it
is set when its counter is zero and reset when the counter reaches the pulse width.

| | sync pulse | back porch | display | front porch | total |
|---|---|---|---|---|---|
| horizontal (pixel clocks) | 96 (3.84 us) | 48 | 640 | 16 | 800 (32 us) |
| vertical (lines) | 2 (64 us) | 29 | 480 | 10 | 521 (16.7 ms) |

Both syncs are active low. `vga_render` takes `px >> 3`, `py >> 3` as the block under the beam and
paints it in priority order: wall (white), head (pink), body (green), apple (red), background (bright
blue). It outputs 8-bit RGB 3:3:2 (`vga_red[2:0]`, `vga_green[2:0]`, `vga_blue[1:0]`), black during
blanking. The colour output is registered, and the sync registers are one pixel behind the counters,
so colour and sync leave aligned.

## Score display (`sevenseg_driver`) and the score processor

On the original board a small soft processor keeps the score. It counts points on each apple according
to the snake's current length. That processor and its program are not part of this RTL. The top level
instead gives it a plain interface:

* `score_event`: one-clock pulse per apple eaten;
* `snake_len[5:0]`: current length;
* `score_bcd[15:0]`: input, the score as four BCD digits.

`sevenseg_driver` multiplexes `score_bcd` onto the four digits. Each digit is lit for 1 ms (50,000
clocks), and anodes and segments are active low (`seg[0]` = A ... `seg[6]` = G). Any logic that turns
`score_event`/`snake_len` into a BCD number can be connected there. The testbenches use a model that adds
the current length per apple.

## Top level (`snake_top`) ports

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | 50 MHz |
| rst | in | 1 | synchronous reset, active high |
| btn_start | in | 1 | start / restart (rising edge) |
| sw_pause | in | 1 | 1 = paused |
| jstk_ss_n, jstk_sclk, jstk_mosi | out | 1 | joystick SPI |
| jstk_miso | in | 1 | joystick SPI |
| vga_hs, vga_vs | out | 1 | syncs, active low |
| vga_red, vga_green, vga_blue | out | 3, 3, 2 | colour |
| led | out | 8 | status LEDs (see above) |
| an, seg, dp | out | 4, 7, 1 | seven-segment display, active low |
| score_event, snake_len | out | 1, 6 | to the score processor |
| score_bcd | in | 16 | from the score processor |

Parameters of `snake_top` (defaults are the real rates): `PIX_DIV` 2, `SCLK_HALF_DIV` 375, `POLL_CYCLES`
10,000,000, `MOVE_PERIOD` 1,000,000, `SPEEDUP` 20,000, `MIN_PERIOD` 250,000, `FLASH_FRAMES` 15 and
`REFRESH_CYCLES` 50,000. The grid size, block size, length limit (50) and start length (3) are constants
in `snake_pkg`.

## Where this RTL departs from or adds to the original description

* **Clock.** The report mentions both a 100 MHz input clock (for the joystick divider) and the board's
  50 MHz clock. This design uses 50 MHz throughout. It keeps the stated 25 MHz pixel rate and 66.67 kHz
  SCLK and makes both with clock enables rather than divided clocks.
* **Step period.** The report gives the movement delay as "10^6" with nanoseconds as the unit. Taken
  literally (1 ms per step) the snake would cross the screen in 80 ms. The delay is therefore
  implemented as 10^6 pixel clocks (40 ms). Change `MOVE_PERIOD` to taste.
* **Speed-up.** The report says the game speeds up a little with each apple but gives no amount.
  20,000 pixel clocks per apple with a 250,000 floor is this design's choice.
* **Joystick protocol.** The 5-byte frame, the LED command byte, SPI mode 0 and the byte gaps come from
  the joystick module's own protocol, not from the report. Y > 600 is taken as "up".
* **Vertical counter enable.** A drawing shows the vertical counter enabled by the HS signal. Here it
  is enabled by a one-pixel end-of-line strobe, which counts exactly once per line.
* **Sync polarity, colours, start position, apple reset position, flash rate, random generator, display
  refresh rate.** None is specified. The values above are choices.
* **READY state.** The game's flow chart begins with a start button, so the snake waits after reset.
  The report only describes the restart button explicitly.
* **Not included:** the score processor (only its interface is provided), the joystick module itself
  (a separate board with its own microcontroller), the resistor network and connector that turn the
  8 colour bits into analogue VGA levels, and the board's memories and USB port, which the game does
  not use. The milestone-3 "bounce off the edge" behaviour belongs to an early demo. The finished game,
  built here, ends on a wall hit instead.
* **No button debouncing.** Button bounce only repeats a restart within a few milliseconds, which is
  harmless.

## Simulating

All files are SystemVerilog 2017. `rtl/` holds one module or package per file, and `tb/` holds the
testbenches plus two behavioural models: `jstk_model` (the joystick's SPI side) and `score_model` (the
score processor). With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/snake_pkg.sv tb/tb_snake_top.sv --top-module tb_snake_top
./obj_dir/Vtb_snake_top
```

Replace `tb_snake_top` with any testbench name. Each one prints `TB_RESULT checks=N failures=M` and
stops.

| testbench | what it shows |
|---|---|
| tb_tick_gen | enable divider against a reference counter, with a random enable |
| tb_vga_sync | two full frames at real timing: HS/VS periods and widths, 640x480 active area, porches |
| tb_vga_render | 20,000 pixels against a reference painter (wall, head, body, apple, blanking, flashing, length mask) |
| tb_spi_master | 200 random bytes in both directions against a mode-0 slave, 16 half periods per byte |
| tb_jstk_master | 40 polls of the joystick model: X, Y, buttons, LED command, poll period, SS length |
| tb_jstk_decode | every axis value against the 400/600 thresholds |
| tb_direction_ctrl | 3,000 random tilt/step cycles against the turn rules, no reversal |
| tb_apple_gen | 200,000 cycles: the apple always inside the walls, loaded only on eat, wide coverage |
| tb_move_timer | step spacing at start, after speed-ups, at the floor, while paused, after restart |
| tb_snake_core | a reference-model game: growth to 50, wall crash, body crash, pause, flashing, restart |
| tb_sevenseg_driver | scan order, one digit at a time, hex glyphs |
| tb_snake_top | whole design with shortened joystick and step rates: 6 apples steered by the joystick model, speed-ups, score on the display, pause, wall crash, flashing, restart, body crash, VGA line timing (about 3 s) |
| tb_snake_top_full | whole design at every default rate: turn by joystick, apple, speed-up, score, wall crash, flashing after 15 frames (about 2 minutes) |
