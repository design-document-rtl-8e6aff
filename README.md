# Tetris in hardware for the DE1-SoC

A complete Tetris game engine written as synthesizable SystemVerilog, for the
FPGA side of a DE1-SoC board. The falling block, the field of settled cells, the
moves and rotations, row removal and the game-over test all run in one
ten-state finite state machine. A joystick drives the game directly. The
picture goes out to a 640x480 VGA monitor, and a buzzer plays notes from a
three-octave scale. The board's ARM processor reaches the game over an
Avalon-MM slave port. Through it, software can:

- read the joystick commands from a queue;
- read the score, level and game state;
- set the fall speed and start a game;
- read a double-buffered copy of the picture;
- play notes and short sound effects.

The game is fully playable without any software. Software only watches and
steers it.

```
 joy[4:0] ─► joystick_if ─┬─► game_ctrl ──number[199:0]──► vga_ctrl ─► RGB, hsync_r, vsync_r
                          │     │  (FSM, playfield,             │ frame_start
                          │     │   block model, timer, RNG)    ▼
                          │     ├──background, active────► block_buffer (2 x 256 B)
                          │     └──row removed, start, over ─► score_keeper
                          └─► cmd_queue (16 x 8 bit)                │
 Avalon-MM slave ◄─────────► avalon_regs ◄──────────────────────────┘
                               └─ pitch, duration, trigger, selector ─► sound_player ─► buzzer
```

Everything runs on the one 100 MHz system clock, with a synchronous,
active-high reset.

## The playfield and the block model

The field has 20 rows and 10 columns, with row 0 at the top. It is stored as
200 one-bit cells in `playfield`, where 1 means occupied. Cell (r, c) is bit
`r*10+c` of every 200-bit vector in the design. That includes the `number`
input of the VGA block.

There are seven shapes, A to G. Each has one to four rotations, which gives
19 block codes (`blk_t` in `tetris_pkg`):

| Shape | Codes |
|---|---|
| A (square) | A1 |
| B, C (the two L shapes) | B1-B4, C1-C4 |
| D (bar) | D1-D2 |
| E (T) | E1-E4 |
| F, G (the two S shapes) | F1-F2, G1-G2 |

The falling block is a code plus the row `n` (5 bits) and column `m`
(4 bits) of its *anchor*, the cell that stays put when the block turns.

`tetromino_rom` gives, for each code:

- the (row, column) offsets of the three cells around the anchor;
- the code after one rotation (the next code of the same letter, wrapping);
- the shape group.

For B, C and E one rotation is a quarter turn counter-clockwise about the
anchor. D, F and G swap between their two forms.

`block_mask` places a code at (n, m). It returns the 200-bit mask of the four
cells and an out-of-bounds flag. `collision_check` gives the judgment: a
position is legal when no cell is out of bounds and no cell lands on the
background.

## The control state machine

`game_ctrl` holds the active block and steps through ten states:

| State | What happens | Next |
|---|---|---|
| S_idle | Screen blank | S_new on start |
| S_new | Next block becomes active at row 1, column 4; a new next block is drawn from the LFSR; fall timer restarts | S_hold |
| S_hold | Waits | S_down on timer expiry or down key; S_move on up (rotate), left or right |
| S_down | Judges the block one row lower | S_shift if legal, S_remove_1 if not (landed) |
| S_move | Judges the shifted or rotated block | S_shift if legal, S_hold if not (move refused) |
| S_shift | Commits the judged position | S_hold |
| S_remove_1 | ORs the active block into the background | S_remove_2 |
| S_remove_2 | While a row is full, removes the lowest full row and moves the rows above down by one, one row per cycle | S_isdie when no row is full |
| S_isdie | Does the next block fit at the spawn point? | S_new if yes, S_stop if no |
| S_stop | Clears the field | S_idle |

Every state lasts one clock cycle except S_idle, S_hold and S_remove_2.

The judgment is combinational and is evaluated in the deciding state. The
result is registered and applied in S_shift.

Key presses that arrive while the machine is busy are kept, one per
direction, until S_hold serves them. When several are pending, the order is:
down or timer, then up, then left, then right.

**Fall timer.** `drop_timer` counts 1 ms ticks up to the 16-bit speed value
(reset value 1000, so one row per second). It restarts when a block appears
and after every fall. Moves do not restart it.

**Next block.** `lfsr_rand` is a 16-bit Galois LFSR that steps every clock
cycle. It picks the next shape, which always enters in its first rotation.

**Display output.** The 200-bit `number` output is what the screen shows:

- background OR active block while a block is in play;
- background alone while rows are being removed;
- zero in S_idle.

## Score and level

`score_keeper` handles scoring:

- Each removed row adds one point to a 32-bit score.
- Every ten rows raise the 8-bit level.
- A game start clears the score and level.
- At game over, the high score takes the score if it is higher.

The level does not change the fall speed by itself. Software reads the
level and writes the speed register.

## VGA output

`vga_ctrl` makes a 25 MHz pixel enable from the 100 MHz clock (every fourth
cycle) and runs the standard 640x480 timing:

- 800 x 525 pixel periods in all;
- horizontal: 640 visible, then 16 front porch, 96 sync, 48 back porch;
- vertical: 480 visible, then 10 front porch, 2 sync, 33 back porch;
- 31.25 kHz line rate, 59.5 Hz frame rate, both syncs active low.

Each cell is a 24x24 square, white if set and black if not. The field is
240x480 pixels, starting at x = 200. Colours are 4 bits per channel. The port
names `OutBlue`, `OutGreen`, `OutRad` (red), `hsync_r` and `vsync_r` are kept
from the board design. Outputs are registered, one pixel period after the
counters.

## Sound: a modulo-N divider

A tone is made by a modulo-N counter that overflows once every N count
pulses. The buzzer toggles on each overflow, so it sounds at
`count_rate / (2N)`.

`tone_gen` works as follows:

- A 14-bit counter is loaded with `16384 - N` and overflows at 16383.
- The count pulse is 3 MHz. It comes from a fractional accumulator on the
  100 MHz clock, so its average rate is exact.
- For example, N = 5736 gives 3 MHz / 11472 = 261.5 Hz, middle C.
- Doubling or halving the count pulse rate moves the note up or down one
  octave without changing N.
- N = 0 is silence.

`note_rom` holds the 21 ratios of the bass, middle and high C-major scales
(notes 1..7, 8..14 and 15..21). The table and the 3 MHz base are consistent:
every note is within 0.2 % of equal temperament.

`duration_timer` counts note lengths in units of the shortest note, 0.25 s
(25,000,000 cycles). With an eighth-note unit, a quarter note is 2 units.

`sound_player` plays either the note in the pitch and duration registers
(selector 0) or a built-in effect:

| Selector | Effect |
|---|---|
| 1 | Middle 1-3-5 rising |
| 2 | Middle 5-3-1, bass 5, falling |
| 3 | One high 1 |
| 4-15 | Silent |

## Processor interface

`avalon_regs` is an Avalon-MM slave. It uses word addresses and 32-bit data,
has a read latency of one cycle and no wait states.

| Address | Access | Contents |
|---|---|---|
| 0-15 | R | Input command queue entries |
| 30 | RW | Queue head; software writes it to consume entries |
| 31 | R | Queue tail |
| 32 | RW | Game state: [3:0] FSM state, [4] game over, [5] queue overflow. Writing 1 to bit 0 starts a game |
| 33 | R | Level (8 bits) |
| 34 | RW | Speed: fall interval in ms (16 bits, reset 1000) |
| 35 | R | Score (32 bits) |
| 36 | R | High score (32 bits) |
| 39 | RW | Pitch: N in [13:0]; octave in [15:14] (0 as is, 1 up, 2 down) |
| 40 | RW | Duration in units (16 bits) |
| 41 | W/R | Write 1 to start playback; reads give the playing flag |
| 42 | RW | Sound selector (4 bits) |
| 256-511 | R | Display buffer, front bank |

**Command queue.** `cmd_queue` is a 16-entry ring of 8-bit commands. Each
command is `{000, start, right, left, down, up}`. The hardware writes at the
tail. Software reads entries from head to tail, then writes the new head.
Each joystick press is one entry. A press that finds the queue full
(tail + 1 = head) is dropped and sets the overflow flag. The next head write
clears the flag.

**Display buffer.** `block_buffer` has two banks of 256 bytes. One byte per
cell: bit 7 means the cell belongs to the falling block, bit 6 means
occupied, and bits 2:0 hold the falling block's shape group. The copy works
like this:

1. At the end of each visible VGA frame, the current picture is copied into
   the back bank, one byte per cycle.
2. The banks then swap.

Software therefore always reads a complete picture. Landed cells show group 0,
because the field keeps only one bit per cell.

## Parameters

`tetris_top` parameters and their board values:

| Parameter | Default | Meaning |
|---|---|---|
| CLK_HZ | 100000000 | System clock |
| TICK_CYCLES | 100000 | Fall-timer tick (1 ms) |
| SPEED_INIT | 1000 | Reset value of the speed register |
| PIX_DIV | 4 | Clock cycles per pixel |
| COUNT_HZ | 3000000 | Pitch count pulse |
| UNIT_CYCLES | 25000000 | Shortest note |
| QDEPTH | 16 | Command queue entries |
| SEED | 16'hACE1 | LFSR start value |

The testbenches shrink the timers through these parameters.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`. `tb/tb_shapes_pkg.sv` holds the reference
block pictures that several testbenches import. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_game_ctrl \
  -y rtl -y tb +libext+.sv rtl/tetris_pkg.sv tb/tb_shapes_pkg.sv tb/tb_game_ctrl.sv
./obj_dir/Vtb_game_ctrl
```

Change the top module and the last file name for another testbench. The
testbenches are two-state safe: everything that is read is reset.

The main ones:

- **`tb_game_ctrl`** plays 1500 blocks against a reference model of the
  engine written in the testbench. A greedy placer fills rows so that
  removals, multi-row removals and game overs all happen. The model checks
  the state sequence, the block position, the field and the picture.
- **`tb_tetris_top`** runs the whole chip with short timers. A software
  model on the bus:
  - starts games from both the joystick and the bus;
  - drains and checks the command queue and forces an overflow;
  - checks score, level and high score against the rows removed;
  - compares the display buffer with the field;
  - plays sounds;
  - checks VGA activity.

  It counts every mechanism and fails if one never happened.
- **`tb_tetris_full`** runs the top with every parameter at its default,
  about 26 million cycles (20 s in Verilator). It:
  - plays one block from the joystick until it lands;
  - reads the queue and, after a VGA frame, the display buffer;
  - measures the 3200-cycle VGA line;
  - plays middle C for one unit and counts 130 toggles (261.5 Hz).
- **`tb_scale_pitch`** plays all 21 notes of the table, and the middle
  octave shifted up and down, at 100 MHz. It measures every pitch at the
  buzzer against equal temperament (within 0.3 %).
- **`tb_vga_ctrl`** and **`tb_tone_gen`** also run at the full 100 MHz
  settings.

## Where this design makes its own choices

The game's structure follows the original description: the ten states, the
19-block model, the one-bit 20x10 background, one-row-at-a-time removal, the
modulo-N divider with its division table, the register addresses 30-42 and
their widths, and the double 256-byte buffer. Where the description was
ambiguous or silent, this design chose as follows:

- **Refused moves.** A refused move or rotation returns to S_hold and leaves
  the block in place.
- **Landing.** A block that cannot fall goes to S_remove_1.
- **After S_stop.** S_stop returns to S_idle, so a new game needs a new
  start.
- **Game over test.** The game ends when the next block does not fit at the
  spawn point.
- **Anchors, turning direction, spawn point and the random generator** are
  this design's own.
- **Cell storage.** The field keeps one bit per cell, not 4 bits. That is
  why the display buffer cannot show the shape of settled cells.
- **Score width.** Score and high score are 32 bits wide, not 16.
- **Scoring and levels.** Points per row (1) and rows per level (10) are
  this design's. The hardware does not speed the game up with the level;
  software does, through the speed register.
- **Time bases.** The 1 ms fall tick, the 0.25 s note unit and the 3 MHz
  count pulse were chosen here. 3 MHz is the rate at which the division
  table gives the correct pitches.
- **Bus details.** The queue protocol and depth, the start bit, the state
  byte layout, the buffer window at 256 and the buffer byte layout are this
  design's.
- **Sound effects and octave bits.** The effect contents and the octave bits
  of the pitch register are this design's.
- **Joystick.** The joystick is taken as five debounced active-high
  switches. There is no debouncer.
- **Clock and timing.** The clock is taken as 100 MHz, with the pixel rate
  at one quarter of it. The VGA timing is the standard 640x480 one
  (25 MHz against the nominal 25.175 MHz, which monitors accept).

Not part of the RTL: the processor software and its driver, the Avalon
interconnect, the joystick itself, the board's video DAC and monitor, and the
buzzer. The top brings out their signals as ports.
