# Tetris in logic alone: a RAM-free, tile-mapped VGA Tetris

This is a complete Tetris game for a small FPGA board: three push-buttons in, a
640x480 VGA picture out, and no memory anywhere. Nothing is kept as a frame buffer.
The playing field is 20 rows by 10 columns of *tiles*. Each tile is one bit (occupied or
empty), so the whole field is a 200-bit register. The picture is recomputed for every
pixel, as the beam scans, from that register and from the falling piece. A bit-mapped
frame of the same 200x400 pixel area would need 80,000 bits, or roughly 930,000 bits for
a full colour screen. The tile map needs 200 flip-flops.

The game follows the usual rules. Pieces fall one row per step. Key 0 moves the piece
right, key 2 moves it left and key 1 turns it 90 degrees counterclockwise. A piece that
cannot fall any further is written into the field, and the next piece (shown in a small
box to the left of the field) enters at the top. Full rows are deleted one at a time.
The game ends when a new piece has no room.

## Structure

```
             clk_50 ──► clock_divider ──► pix_tick (25 MHz) ─────────────┐
                              └─────────► game_tick (4 Hz) ──┐           │
 key_n[2:0] ─► sync ─► key_right/turn/left ─► game_fsm ◄─────┘           │
                         random_piece ─► new_piece ─┘  │                 │
                                        display (200b) │ next_piece      │
                                                       ▼                 ▼
                                       pixel_gen ◄─ piece_shape     vga_sync ─► x, y
                                           │ rgb (3b)                    │ hsync/vsync
                                           └────► output register ◄──────┘
                                                  vga_r/g/b (4b each), vga_hs, vga_vs
```

| module | role |
|---|---|
| `tetris_pkg` | field size, tile size, piece and state enums, spawn position, colours |
| `tetris_top` | input synchronisers, wiring, output register |
| `clock_divider` | 25 MHz pixel tick and 4 Hz game tick from 50 MHz |
| `game_fsm` | the eight-state game controller, the field register and the falling piece |
| `collision_check` | do a piece's target tiles lie inside the field and on empty tiles? |
| `piece_shape` | 4x4 tile block of each tetromino and rotation |
| `row_clear` | finds the lowest full row and deletes it |
| `random_piece` | 16-bit LFSR giving piece numbers 1..7 |
| `vga_sync` | 800x525 scan counters, sync pulses, pixel coordinates |
| `pixel_gen` | colour of each pixel from the tile map |

Everything runs on the single 50 MHz clock. The 25 MHz and 4 Hz rates are one-cycle
enable pulses, not separate clocks, so the design has no clock-domain crossings.

## The game controller

`game_fsm` is the heart of the design. It takes exactly one step per game tick, so at
4 Hz every state lasts a quarter of a second. It has eight states:

| state | what happens on the tick | next state |
|---|---|---|
| zero | read the keys | key 0 → right; else key 2 → left; else key 1 → turn; no key → down |
| right | if the tiles one column to the right are free, move there | moved → zero; blocked → down |
| left | same, one column to the left | moved → zero; blocked → down |
| turn | if the piece turned 90° counterclockwise fits, turn it | turned → zero; blocked → **change** |
| down | if the tiles one row below are free, move down | moved → zero; blocked → change |
| change | write the piece into the field; the next piece enters at the top; draw a new next piece | minus |
| minus | if a row is full, delete it (rows above move down) | deleted → hold; none → zero |
| hold | nothing; gives the deletion a step before looking again | minus |

Reset returns to zero with an empty field.

Some consequences of this table are worth knowing:

* **A move costs a step, and so does a fall.** Holding a key keeps the piece from
  falling: zero → right → zero → right … never reaches the down state. With no key
  pressed the piece falls one row every two ticks (zero → down → zero), i.e. 2 rows per
  second at 4 Hz.
* **A move blocked by a wall or the stack turns into a fall.** Right or left goes to
  down instead, in the same step sequence.
* **A refused turn lands the piece.** If the turned piece would not fit, the FSM goes
  straight to change, and the piece is written into the field where it stands, even in
  mid-air. This is deliberate: it is how the controller this RTL follows is specified.
  Change `ST_TURN`'s blocked branch to `ST_DOWN` for the friendlier behaviour.
* **Several full rows take several passes.** Each minus → hold pair deletes one row,
  always the lowest full one, so *n* full rows take 2*n*+1 steps before play continues.
* **End of game.** The new piece enters at change. At the next zero the controller
  checks whether that piece overlaps the stack. If it does, `game_over` goes high and the
  FSM freezes, still showing the final picture, until reset.

All five candidate positions are checked at once, every cycle, by five
`collision_check` instances: the current position, one column right, one column left,
turned, and one row down. The check for the current position also gives the piece's
tiles on an empty field (`cells`). OR-ing those tiles into the field gives both the
picture (`display`) and the new field written at change.

## Pieces, the centre tile and rotation

A falling piece is stored as a piece number (1..7 = O, I, S, Z, L, J, T), a rotation
index, and the field position of its centre tile **K**. The piece's tiles lie in a 4x4
block around K, spanning x = −2..+1 (left to right) and y = +1..−2 (top to bottom). K
itself is at (0,0). Block tile (x, y) lands on field row `row − y` and column `col + x`.
Row 0 is the top of the field and column 0 its left edge.

| piece | first orientation (x, y) of its four tiles | orientations |
|---|---|---|
| 1 O | (−1,0) (0,0) (−1,−1) (0,−1) | 1 |
| 2 I | (−2,0) (−1,0) (0,0) (1,0) | 2 |
| 3 S | (0,0) (1,0) (−1,−1) (0,−1) | 2 |
| 4 Z | (−1,0) (0,0) (0,−1) (1,−1) | 2 |
| 5 L | (−1,0) (0,0) (1,0) (−1,−1) | 4 |
| 6 J | (−1,0) (0,0) (1,0) (1,−1) | 4 |
| 7 T | (−1,0) (0,0) (1,0) (0,−1) | 4 |

Each further orientation is the previous one turned counterclockwise, (x, y) → (−y, x).
I, S and Z only alternate between two orientations, so they never leave the 4x4 block.
A new piece enters in its first orientation with K at row 1, column 5. Every orientation
of every piece then still lies inside the field, so a turn right after entry is never
refused because of the top edge.

## Timing and the picture

* **Clocks.** The pixel tick is high every second clock: 25 MHz ≈ 800 × 525 × 60 Hz. The
  game tick is high once every 12,500,000 clocks (4 Hz). The first of each comes one
  full period after reset.
* **Scan.** Each line is 640 visible pixels, a 16-pixel front porch, a 96-pixel sync
  pulse and a 48-pixel back porch. Each frame is 480 visible lines, a 10-line front
  porch, 2 sync lines and a 33-line back porch. Both syncs are active low.
* **Tile map.** The field occupies x = 220..419, y = 40..439. Each 20x20 pixel square
  shows one field bit: blue if occupied, white if empty. The next-piece box is 4x4 tiles
  at x = 80..159, y = 160..239 and shows the next piece in its first orientation. The
  rest of the screen is black.
* **Colour depth.** The pixel generator makes a 3-bit {R,G,B} colour. Each bit is
  repeated four times for the board's 4-bit-per-channel resistor DAC.
* **Latency.** Colour, hsync and vsync leave through one register that loads on the
  pixel tick, so they stay aligned with each other. The picture follows the game with no
  frame delay: a move shows from the next pixel onwards.
* **Inputs.** The buttons are active low. Each passes through a two-flop synchroniser
  and is read as a level when the FSM is in zero. There is no debouncing: at a 4 Hz
  sampling rate, bounce has died out long before the next sample. The reset switch is
  active high and also synchronised.

## Where this RTL departs from, or fills in, the original description

The state set, the transitions (including the refused-turn rule), the key assignment and
priority, the 20x10 one-bit tile field, the 20-pixel tiles, the piece shapes and their
counterclockwise rotation, the 4x4 next-piece box, the 50 MHz / 25 MHz / 4 Hz rates and
the 640x480, 800x525 scan all follow the design this RTL is based on. The rest is this
design's own choice:

* **Clock enables, not divided clocks.** The original derives a 25 MHz and a 4 Hz clock
  with counters. Here the same counters produce enables.
* **When the picture changes.** The original speaks of updating object positions once
  per VGA frame, but also of a 4 Hz game clock. Here the game state changes only on the
  4 Hz tick, which is not aligned to frames, and the picture always shows the current
  registers. A move can therefore appear partway down a frame, which at this rate is
  invisible.
* **Sync and porch widths.** The original only refers to the standard timing. The
  values used are the standard ones for 640x480 at 60 Hz.
* **Row detection and deletion.** The original uses two small FSMs for these. Here they
  are combinational logic, stepped by the minus and hold states. The lowest full row
  goes first.
* **Random source.** The original's generator is not specified. Here it is a 16-bit LFSR
  stepped every clock, and the piece is (value mod 7) + 1.
* **End of game.** The original has no state for it. Here a `game_over` flag freezes the
  FSM until reset.
* **Layout.** The screen positions of the field and the box are estimates from the
  original's screenshots. Its empty field has a faint checkerboard, which 3-bit colour
  cannot show, so the field here is plain white.
* **Spawn.** The spawn position (row 1, column 5) is an estimate.
* **Next piece after reset.** Right after reset the falling piece and the next piece are
  the same.
* **Not built.** Scoring and speeding up with the number of cleared rows. The original
  mentions both only as possible improvements.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. Expected values are worked out independently of the
RTL: `tb/tetris_ref_pkg.sv` re-states the rules with the pieces as coordinate lists and
rotations computed by (x, y) → (−y, x).

| testbench | what it establishes |
|---|---|
| `piece_shape_tb` | all 7 pieces × 4 rotation indices, tile by tile, and the orientation counts |
| `collision_check_tb` | 20,000 random fields, pieces and positions, some partly off the field |
| `row_clear_tb` | 5,000 fields with zero, one or several full rows |
| `random_piece_tb` | the exact LFSR sequence, no piece 0, all seven pieces near 1/7 each |
| `clock_divider_tb` | tick spacing at the real 50 MHz / 25 MHz / 4 Hz settings |
| `vga_sync_tb` | every output over three frames, and the sync periods in clocks |
| `pixel_gen_tb` | every one of the 800x525 positions for three random pictures |
| `game_fsm_tb` | every step against a reference model. A steered sequence gives a double and two single row deletions and pushes pieces against both walls; then five random games run to their end |
| `tetris_top_tb` | the whole game at a 25 kHz game tick. A greedy player presses the buttons and every pixel of every frame is compared with a reference model of game plus screen. Every mechanism must occur: moves made and refused, turns made and refused, falls, landings, single and repeated row deletions, end of game, reset |
| `tetris_top_full_tb` | the whole game at its real settings: 1.5 s of play (75 million clocks, 89 frames), every pixel checked, with a right move, a turn and a fall |

The full-size run takes a little over a minute. The reduced top-level run plays five
games in about 15 seconds. The end-to-end testbenches read four internal signals of
`tetris_top` (`rst`, `pix_tick`, `game_tick`, `new_piece`) to keep their models in step.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tetris_pkg.sv tb/tetris_ref_pkg.sv tb/game_fsm_tb.sv --top-module game_fsm_tb
./obj_dir/Vgame_fsm_tb
```

Replace `game_fsm_tb` with any testbench name. The testbenches use `$urandom` and no
constrained randomisation. Every register that is read is reset.

## Changing it

* **Game speed:** `GAME_HZ` on `tetris_top`. The tick period is `CLK_HZ / GAME_HZ`
  clocks.
* **Board clock:** `CLK_HZ` and `PIX_HZ`. Keep `CLK_HZ / PIX_HZ` an integer.
* **Screen layout:** the `FIELD_*` and `NEXT_*` parameters of `pixel_gen`. Colours are
  in `tetris_pkg`.
* **Field size:** `ROWS` and `COLS` in `tetris_pkg`. The position type `pos_t` (6-bit
  signed) and the tile index widths in `pixel_gen`, `collision_check` and `row_clear`
  assume at most 32 rows and 16 columns. The reference package in `tb/` fixes 20x10.
