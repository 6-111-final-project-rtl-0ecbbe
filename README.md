# Paratroopers with a camera for a joystick

This is the digital logic of a version of the arcade game *Paratroopers* that
has no joystick. A camera watches the player standing in front of a light
background. Walking left or right moves the gun along the bottom of the
screen. Raising an arm above a learned height fires it. Helicopters cross the
top of the screen and drop bombs and paratroopers. The player shoots them
before they land: a landing paratrooper costs one health point and a landing
bomb costs two. The game ends when health reaches zero.

The logic splits into three units that talk over narrow asynchronous links:

```
 camera -> sync separator --hsync_n/vsync_n--+
        -> 8-bit ADC -------adc_data---------+--> VCU (video capture unit)
                                                  | position, shoot, present, calibrated
                                                  v
                                                 GCU (game control unit)
                                                  | sprite list (req/ready, 8-bit bus)
       calibration picture (req/ready, 8-bit bus) v
 VCU ------------------------------------------> VDU (output generator)
                                                  | 13-bit address, 8-bit data
                                                  v
                                  8K x 8 display SRAM <-> MC6847 video chip -> monitor
```

`rtl/paratroopers_top.sv` wires the three units together. The camera, the sync
separator, the ADC, the display SRAM, the MC6847 and its analog colour and
sync circuits are off-chip parts, so their signals are top-level ports.
Everything runs from one 10 MHz clock. Every signal that crosses from one unit
to another still passes a two-flop synchronizer (`sync2`). The three units were
designed to run on separate boards with separate clocks, and the
synchronizers keep that option open.

## The request/ready link

All data moves between units over the same four-phase handshake. The
receiver raises `req`. The sender puts a byte on the bus and raises `ready`.
The receiver takes the byte and drops `req`. The sender then drops `ready`.
Each side reacts only to the other side's level, so the two sides may run on
unrelated clocks.

Two streams use this link:

* **Sprite list** (GCU to VDU), once per displayed frame. Each sprite is three
  bytes: a code, then x, then y. The list ends with the single byte `0xC0`.
  No code, x or y value can be `0xC0` at the start of a triple, so a receiver
  that gets out of step is back in step after one frame.

  | code | sprite | code | sprite |
  |---|---|---|---|
  | 0 | paratrooper | 6, 7 | gun, left and right half |
  | 1 | bomb | 8, 9 | helicopter flying right (halves mirrored) |
  | 2, 3 | helicopter flying left, left and right half | 10 | bullet |
  | 4, 5 | explosion, left and right half | 11 | score / level read-out, x = value |
  |  |  | 12 | health read-out, x = value |

  x is a signed 8-bit column, so a helicopter can be partly off the left
  edge. y is the top row.
* **Calibration picture** (VCU to VDU). Each byte holds 8 one-bit pixels of a
  sampled line, leftmost pixel in bit 7: 16 bytes per line, 96 lines. After
  the last line comes one extra transfer with `end_of_frame` high.

## Video capture unit (`vcu`)

The camera gives 525-line NTSC frames. The VCU builds a 128 x 96 one-bit
image from them, one line at a time. It never stores a whole frame: it keeps
one line in a 16-byte line buffer and reduces it before the next sampled line
arrives.

* **`vcu_controller`** follows the synchronized syncs. After the vertical sync
  rises it waits out the vertical blanking interval (`VBLANK_CYC` = 13880
  clocks, 1.388 ms). From then on it counts horizontal sync pulses and samples
  every fifth line (`LINE_STRIDE`), 96 in all (`LINES`). A sampled line starts
  `HBLANK_CYC` = 70 clocks (7 µs) after its rising hsync. At line
  `LAST_LINE` = 503 it waits for the next vertical sync.
* **`digitizer`** reads the ADC twice per pixel (three clocks per pixel, so
  128 pixels take 384 of the 635 clocks of a line). It averages the two
  samples and compares the average with `threshold`. A pixel darker than the
  threshold becomes 1, and the player is the dark part of the picture. It
  signals `done` to the controller as soon as sampling ends, before it writes
  the 16 bytes into the line buffer, so the controller never misses an hsync.
  It then pulses `start_proc`.
* **`calibrator`** runs first, over `FRAMES_PER_PHASE` = 750 frames (5 s) per
  phase. In phase 1 the player stands with arms down; in phase 2 with an arm
  raised. For each frame it notes the first line that holds any dark pixel,
  which is the top of the player. At the end of a phase it divides the sum by
  the frame count by repeated subtraction. Phase 1 gives `shoot_low` and
  phase 2 gives `shoot_high`. Both start at 96, the bottom of the screen.
  Meanwhile it forwards every line to the VDU. A line whose number equals a
  threshold is sent as all ones, so the learned heights show as white bars.
  When both phases are done it raises `calibrated` and gives the line buffer
  to the processor.
* **`processor`** reduces each line in 64 clocks. It slides an 8-pixel window
  across each pair of neighbouring bytes. Any position where all 8 pixels are
  dark is a candidate for the player's left or right edge, since the player is
  assumed to be at least 8 pixels wide. Over a frame it keeps the leftmost
  and rightmost candidates. After the last line it outputs
  `position = (left + right) / 2` and `present`. It also outputs the `shoot`
  level, which has hysteresis:
  * it goes high when the first dark line is at or above `shoot_high`;
  * it goes low when the first dark line is at or below `shoot_low`;
  * between the two it keeps its value.

  With hysteresis a raised arm gives one shot, not automatic fire.

## Game control unit (`gcu`)

Two state machines sequence the game:

* **`major_fsm`** steps through INIT, WAIT, LEVEL, GAME and OVER. WAIT lasts
  until the VCU is calibrated. In LEVEL the level follows the player's
  position: `level = 3 - position/32`, so the left edge is the fastest. The
  screen shows the level number, and a shot confirms it and starts the game.
  GAME lasts until health reaches 0. In OVER, the player walking out of the
  picture and back in (`present` low, then high) starts a new game.
* **`game_fsm`** runs one pass per frame request from the VDU. Three worker
  machines run one after another:
  * **output**: send the sprite list;
  * **update**: move, create and remove sprites;
  * **check**: collisions and landings.

  After check it subtracts the frame's damage from health, and it ends the
  game when health would reach 0 (`START_HEALTH` = 10).

The game state is kept in a 32-word RAM (`object_ram`). Each word is a packed
struct from `para_pkg`. Words 0-7 hold helicopters and words 8-31 hold bombs
and paratroopers. Each section is kept packed: `numheli` and `numobject`
count its live entries from the bottom. To remove an entry, the last entry of
the section is copied over it. The four bullets live in registers. The gun
needs no storage because it is always at `position`.

**Update (`update_fsm`)**, per frame:

1. **Bullets** rise one row every frame and vanish at the top. A pending shot
   (from `shoot_reg`, which turns the `shoot` level into a one-shot event)
   starts a bullet at the gun in the first free register.
2. **Pace.** Sprites other than bullets move on one frame in `4 - level`.
   Helicopters move one pixel sideways; bombs and paratroopers fall one row
   until they reach row 84, the ground.
3. **New helicopters.** Each side (entering at x = 127 flying left, at row 0,
   or at x = -15 flying right, at row 8) counts the moves since its last
   helicopter. When the count reaches a target, a new one starts. The target
   is `MIN_GAP` + a random 0-63, drawn at each launch.
4. **Drops.** A helicopter carries a distance to its next drop. When the
   distance runs out over the screen, it drops an object 6 rows below itself
   and draws a new distance. The object is a bomb with probability 3/8
   (`rnd[2:0] < 3`).
5. **Explosions** last 15 frames. An exploding sprite neither moves nor
   collides, and when the count runs out it is removed.

**Check (`check_fsm`)** walks the helicopters (16 x 12 box) and then the
objects (8 x 12 box). It uses each bullet at most once.

* **A hit** sets the sprite exploding, adds one to the score and marks the
  bullet in `kill_mask`. The update machine clears marked bullets at once.
* **A landing:** an object at row 84 explodes and adds 1 (paratrooper) or 2
  (bomb) to the frame's damage.

**Random numbers (`rng`)**: an 8-bit register, never reset. Each clock,
one bit (in turn) is XORed with a sample of an unrelated 1.84 MHz clock
(`rng_in`).

## Video output (`output_generator`)

The VDU draws each picture into the 8 KB display SRAM, which the MC6847 shows
in its 128 x 96, four-colour mode. The layout is 2 bits per pixel, 32 bytes
per row, 3072 bytes in all, with the leftmost pixel of a byte in bits 7:6. The
`calib_sw` / `game_sw` switches choose what to draw:

* **Calibration**: fetch a byte of 8 pixels and write it as two RAM bytes,
  each pixel doubled to colour 3. Repeat until `end_of_frame`.
* **Game**: clear the 3072 bytes, then fetch triples. For a sprite, read its
  12 rows from `sprite_rom`. A row is 8 pixels (16 bits) that fall across up
  to three RAM bytes, depending on `x mod 4`. Each byte is read, ORed with
  the sprite and written back; parts off the screen are skipped. Codes 11
  and 12 write three decimal digits (3 x 7 glyphs) straight into the RAM at
  the bottom left (byte 2851) and bottom right (byte 2879).

While drawing, the generator holds `nms` low so that the MC6847 leaves the RAM
alone. When the picture is done it raises `nms` and waits for the MC6847's
next falling `nfs` (end of a displayed field) before it starts again. The GCU
runs one game step per picture, so the game runs at the display's frame rate.

## Where this RTL departs from, or fills in, the original

The state machines, their states, the link protocol and the main numbers
come from the original design:

* 10 MHz clock; 2 samples per pixel; every 5th line; 96 lines;
* 1.388 ms and 7 µs delays; 750 frames per calibration phase;
* the 8-bit-window edge search and the shoot hysteresis;
* 1/2 damage points, 15-frame explosions, 3/8 bombs;
* the sprite codes, gun row 83 and helicopter rows 0 and 8;
* the 2-bit-per-pixel RAM layout and read-out addresses, and nms/nfs.

These parts are this design's own:

* **Picture content**: sprite bitmaps and colours.
* **Storage and counts**: RAM word layouts, the numbers of slots and bullets.
* **Game rules**: the level-to-speed rule, the launch and drop distance
  formulas, START_HEALTH and MIN_GAP, and the score and health read-out
  codes 11/12.
* **Sequencing**: the restart condition, and the rule that the output
  generator abandons a calibration picture when the switch leaves
  calibration mode. Without that rule the switch would never be seen,
  because the capture unit sends nothing once calibrated.

Two points in the original conflict or are unclear:

* **`nms` polarity.** The text and the state diagram give opposite
  polarities. This RTL holds `nms` low while drawing.
* **Calibration length.** The text mentions both 5 s and about 1900
  frames (10 s) per phase. This RTL uses 750 frames, 5 s at the frame rate.

Not drawn, because the original does not say what they look like:

* **Calibration prompts.** The original has two prompt screens during
  calibration, "arms down" and "arm up". Here the live camera picture with
  the threshold bars is shown in both phases. The calibrator's `phase`
  output says which phase is running.
* **Game-over screen.** The original shows a separate game-over screen. Here
  the game-over frames show the gun and the final score, with health at 0.

Two things to know before trusting it on hardware:

* **Noise.** The edge search assumes a clean, well-lit picture. A few noisy
  dark pixels in a line can move the bounds.
* **Picture alignment.** The VDU always starts a calibration picture at
  address 0, so it lines up only if the camera frame and the display field
  keep step.

## Files

`rtl/` has one module per file:

| unit | modules |
|---|---|
| top | `paratroopers_top` |
| VCU | `vcu`, `vcu_controller`, `digitizer`, `line_buffer`, `calibrator`, `processor` |
| GCU | `gcu`, `major_fsm`, `game_fsm`, `output_fsm`, `update_fsm`, `check_fsm`, `object_ram`, `shoot_reg`, `rng` |
| VDU | `output_generator`, `sprite_rom` |
| shared | `sync2`; `para_pkg` (types, sprite codes, geometry constants) |

Every file opens with a comment on what the module does, its interface and
timing, and which parts follow the original.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. The
exception is `sync2`, whose testbench is `tb_sync2`. Each testbench ends by
printing `TB_RESULT checks=<n> failures=<m>` and has a watchdog. Most compare
against an independent model:

* `tb_update_fsm` and `tb_check_fsm` re-implement one frame of game rules.
* `tb_output_generator` renders whole pictures itself and compares all 3072
  bytes.
* `tb_processor` finds the player's edges by brute force.

Beyond single modules:

* `tb_vcu` drives the capture unit from a camera model.
* `tb_gcu` plays the game through the sprite bus.
* `tb_paratroopers_top` is the end-to-end run. It has models of the camera,
  the display RAM and the MC6847's `nfs`, and it covers two complete games:
  * calibration, level select, a start shot, a game to game over;
  * walking out and back in, and a second game to game over.

  It counts calibration pictures, helicopter launches, drops, hits, landings,
  removals, game overs and restarts, and fails if any of them never happened.
  It uses reduced timing: 8 lines, 2 frames per calibration phase, health 3.
* `tb_full_frame` uses the top with every parameter at its default. It
  sends two full NTSC-timed camera frames in calibration mode and checks
  that each becomes a correct 96-row picture in the display RAM.

A complete calibration at default size needs 1500 frames, about 500 million
clocks. That is more than a practical simulation, so a full game has been
simulated only at the reduced sizes above.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb rtl/para_pkg.sv \
          tb/tb_paratroopers_top.sv --top-module tb_paratroopers_top -Mdir obj_top
./obj_top/Vtb_paratroopers_top
```

`-Wno-fatal` keeps Verilator's width warnings about testbench arithmetic
from stopping the build; the RTL itself builds with no warnings other than
unused signals and parameters. Any other testbench builds the same way. Name the testbench file and its
module instead of the top's. A passing run prints `failures=0`. The end-to-end
run takes a few seconds.
