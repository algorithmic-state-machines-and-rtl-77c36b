# Video-RAM display engines with algorithmic state machines

A 640x480 VGA picture does not have to be painted "by timing", with logic that
watches the sync counters and switches the colour pins at the right moment.
Here the picture lives in a small **video RAM**: every RAM word is the colour
of one screen area, a free-running **scanning engine** reads the RAM in step
with the beam, and whatever circuit wants to draw simply writes RAM words.
Drawing and display are decoupled; the drawing circuits are written as
algorithmic state machines (ASMs) that never look at the pixel position.

The RAM is tiny (it was sized for an FPGA with 18 Kbit of on-chip memory):
3 bits per word (red, green, blue: 8 colours) and one word per 32x32-pixel
cell, so the screen is a 20x15 grid of cells, 300 words used out of 1024.

Four systems are built on this engine. They are independent designs and stand
side by side in the top module `vram_labs_top`:

| system | module | what it does |
|---|---|---|
| cursor | `lab5_cursor` | a white cell on black; releasing an arrow key on a PS/2 keyboard moves it one cell |
| animation | `lab5a_animation` | a 4x4-cell block cycles through 8 patterns stored in a ROM; no keyboard |
| painting | `lab5_paint` | the cursor system plus an edit mode (Enter toggles it); in edit mode the cursor paints a green trail |
| movable animation | `lab5a_move` | the animation with the keyboard put back: arrow keys move the animated block while it keeps animating |

The cursor and animation systems are the base designs. The painting program and
the movable animation are extensions of them, specified only by their required
behaviour, so their state machines are this implementation's own.

## The scanning engine (`scan_engine`)

```
 vga_sync ──h_sync, v_sync──────────────────────────────► pins (delayed 1 clk)
    │ pixel_row, pixel_column
    ▼
 vram_addr_xlat ──ad1──┐
                       ├─mux (v_sync)──► vgamem 1024x3 ──► RGB pins (blanked)
 drawing ASM ──ad2─────┘                    ▲      │
     │  └─────────din2, we─────────────────┘      └──rd_data──► drawing ASM
     └◄──────── v_sync
```

* **`vga_sync`**: column counter 0..799 and row counter 0..524 at 25 MHz.
  Visible area 640x480; `h_sync` low for columns 656..751, `v_sync` low for
  lines 490..491. Both syncs are active low. A line lasts 32 us, so the
  vertical sync pulse lasts 2 lines = **64 us = 1600 clocks**.
* **`vram_addr_xlat`**: the address is `pixel_row[9:5] & pixel_column[9:5]`.
  Dropping five bits of each coordinate makes one word cover 32x32 pixels.
  A cell at column x, row y is word `32*y + x`. Words with x >= 20 are never
  shown.
* **`vgamem`**: 2^10 x 3 bits with a single address port, synchronous write
  (`we`) and a registered read: data appears one clock after the address.
  It starts cleared to black.
* **One port, two users.** A true video RAM is dual-ported: a read-only port
  for the scan and a write-only port for drawing. Here one port is shared
  through a multiplexer. The select is `v_sync`. While the beam is drawing
  (`v_sync` high) the translator owns the RAM. During the vertical sync pulse,
  when nothing is displayed, the drawing circuit owns it. Write enables are
  also gated with `v_sync` low inside the engine.
* **Output alignment.** The RAM read costs one clock, so `h_sync`, `v_sync` and
  the blanking signal are registered once. All five VGA pins then change
  together, one clock after the sync counters. Pixels outside 640x480 are
  forced black.
* **Read-back.** `rd_data` is the raw RAM output. A drawing circuit that puts
  an address on the write port in a clock where `v_sync` is low finds that
  word on `rd_data` in the next clock. Only the painting program uses it.

## Drawing only during vertical sync

This rule is what makes the design work, and the part that most needs
understanding. Each drawing ASM has states that **wait while `v_sync` is 1**.
Such a state acts only in a clock where `v_sync` is low, so every RAM access
falls inside the 1600-clock sync pulse. The time budgets:

| ASM | work per event | clocks |
|---|---|---|
| `cursor_asm` | erase old cell, move, draw new cell | 5 (S5-S9), both writes in one pulse |
| `paint_asm` | as above plus one read-back | 6 (S5-S10) |
| `anim_asm` | copy 4 rows: 1 ROM fetch + 4 cell writes each | 20 |
| `anim_move_asm` | erase 16 cells, then copy as above | 36 |

A state that reaches its turn late in a pulse simply waits for the next one,
so correctness never depends on the budget. The budget only sets how soon a
change becomes visible: at most one frame (16.8 ms).

Each of the four ASMs also carries a concurrent assertion,
`a_write_in_sync_pulse`, which fails if `wr.we` is ever high while `v_sync`
is high. Run the simulator with assertions enabled (`--assert` in Verilator)
to have it checked.

## Cursor state machine (`cursor_asm`)

The keyboard side gives the ASM only `key`, the **last byte received**, as a
level. There is no "new byte" strobe. Releasing an arrow key sends the
three-byte break sequence `E0 F0 xx`. The ASM looks only at the last two bytes
(`F0`, then the code), which is enough because `key` changes from `F0` to the
code.

| state | action | leaves when |
|---|---|---|
| S1 | load cursor colour (white) | `v_sync` low |
| S2 | write the cursor at `{pos_y, pos_x}` | `v_sync` low (the write happens then) |
| S3 | - | `key == F0` |
| S4 | decode: `75` up, `72` down, `6B` left, `74` right, then go to S5; stay while `key == F0`; any other code goes to S10 | next clock |
| S5 | load background colour (black) | `v_sync` low |
| S6 | write it at the old position | `v_sync` low |
| S7 | update X or Y; stops at the grid edges (0..19, 0..14) | next clock |
| S8 | load cursor colour | next clock |
| S9 | write the cursor at the new position | `v_sync` low |
| S10 | clean up | back to S3 |

`wr.we` is high for exactly one clock in S2, S6 and S9. Reset is active low
and synchronous: it returns the ASM to S1 with the cursor at cell (0,0).
Because the ASM follows a level, a make code (`E0 75` when the key is pressed)
does nothing. Only the release moves the cursor.

## Painting program (`paint_asm`, `lab5_paint`)

The Enter key (`F0 5A`, decoded in S4) toggles `edit_mode`, which is shown on
`edit_led`.

* **Edit mode on.** The cell the cursor leaves is written in the paint colour
  (green), so moving draws a trail.
* **Edit mode off.** The cursor must move without damaging the picture. After
  moving, and before drawing the cursor, the ASM reads the new cell back
  (S8 puts the address on the RAM during the sync pulse; S9 stores `rd_data`
  in `saved`). When the cursor leaves that cell, `saved` is written back.

## Animation (`anim_rom`, `anim_asm`, `lab5a_animation`)

* **Pattern ROM.** `anim_rom` holds 8 patterns of 4x4 pixels, one row per
  word. Pattern p, row r is at address `{p, r}`, and column c is in bits
  `[3c+2:3c]`.
* **Contents.** They are computed, not stored: pixel (r, c) of pattern p has
  colour `(r + c + p) mod 8`. The result is diagonal colour stripes that run
  across the block as p steps.
* **Read timing.** The read is registered (one clock).
* **`anim_asm`.** It counts sync pulses. Every `FRAMES_PER_STEP` pulses
  (default 6, giving 10 patterns/s) it copies the next pattern into the cells
  (8..11, 6..9), one pattern pixel per 32x32 cell, and wraps after pattern 7.
  The first copy happens in the first sync pulse after reset.
* **`anim_move_asm`** (movable animation) adds a target position.
  * `arrow_decoder` turns `F0` followed by an arrow code in the byte stream
    (using `scan_ready`) into a one-clock `move` pulse with a `dir`.
  * Each move shifts the target by one cell, kept within top-left cells
    0..16 by 0..11.
  * At the next sync pulse after the target changed, the ASM blanks the 16
    old cells, then draws the current pattern at the new place. Pattern
    stepping continues independently.

## Keyboard and displays

* **`ps2_keyboard`** synchronises `keyboard_clk` and `keyboard_data` with two
  flip-flops and shifts a bit in on each falling keyboard-clock edge.
  * After 11 bits it checks the start, stop and odd-parity bits. A good byte
    is kept in `scan_code`, and `scan_ready` pulses for one clock.
  * A bad frame is dropped.
  * A frame that stalls for `TIMEOUT` clocks (12500 = 500 us) is abandoned, so
    the receiver re-synchronises.
* **`hex7seg`** drives the two seven-segment displays with the last scan code:
  `display1` is the high digit and `display2` the low digit. Segments are
  active low, with bit 0 = segment a through bit 6 = segment g.

## Pins (cursor system)

`clk25MHz`, `reset` (active low), `keyboard_clk`, `keyboard_data`, `red_out`,
`green_out`, `blue_out`, `horiz_sync_out`, `vert_sync_out`, `display1[6:0]`,
`display2[6:0]`. The other three systems have the same pins with the prefixes
`anim_`, `paint_` and `move_` in `vram_labs_top`:

* the animation system has no keyboard and no displays;
* the painting program adds `paint_edit_led`.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `WIDTHAD` | `vgamem` | 10 | address bits (1024 words) |
| `TIMEOUT` / `KBD_TIMEOUT` | `ps2_keyboard`, systems | 12500 | PS/2 frame timeout in clocks |
| `FRAMES_PER_STEP` | animation ASMs, systems | 6 | frames per pattern |
| `POS_X`, `POS_Y` / `X0`, `Y0` | animation ASMs | 8, 6 | top-left cell of the block |
| `CURSOR_COLOR`, `PAINT_COLOR`, `BG_COLOR` | cursor/paint ASMs | 111, 010, 000 | colours |

Timing constants, the grid size and the key codes are in the package
`vga_pkg`.

## What is original and what is chosen here

These parts follow the original lab design:

* 640x480 at 25 MHz, 3-bit pixels, 32x32 cells (a 20x15 grid);
* the address slicing and the 2^10 x 3 single-port RAM shared through a
  multiplexer;
* the nine RAM ports;
* the cursor ASM's state sequence, its key codes and its "act only while
  v_sync is low" rule;
* the 8-pattern 4x4 ROM organised one row per word;
* the requirements of the painting program and of the movable animation;
* the cursor system's pin names.

These are choices made here:

* **Sync timing.** Porch and sync widths are the standard 640x480 60 Hz values,
  consistent with the 64 us sync pulse that the design relies on.
* **RAM.** Registered read with one-clock pin alignment. The multiplexer is
  selected by `v_sync`.
* **Write strobe.** A one-clock write strobe replaces the original's practice
  of toggling the RAM clock from the state machine.
* **Cursor behaviour.** White on black, start at (0,0), moves clamped at the
  edges, and keys other than the arrows ignored.
* **Keyboard receiver.** The parity and timeout handling, and the display
  digit mapping and segment polarity.
* **Animation.** The ROM contents, the animation rate and the block position.
  The original pattern data and the animation state machine were not
  available.
* **Painting and movable animation.** The whole state machines of both
  extensions, including:
  * the read-back that preserves the picture under the cursor;
  * Enter acting as a toggle (the requirement is ambiguous about what a second
    Enter does);
  * erase-then-redraw for moving the block;
  * the extra `edit_led` pin.

Not modelled: the earlier paint-by-timing approach (a circuit that drives RGB
directly from the sync counters), FPGA pin locations, the keyboard and the
monitor themselves. The testbenches contain a behavioural PS/2 keyboard and
observe the VGA pins directly.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_cursor_asm \
          rtl/vga_pkg.sv tb/tb_cursor_asm.sv -Mdir obj_tb && obj_tb/Vtb_cursor_asm
```

Substitute any testbench name. `-y rtl` lets Verilator find the modules the
testbench uses.

* **Unit testbenches** for the state machines drive a shortened
  `vert_sync` (300 clocks high, 40 low) and keep their own model of the video
  RAM.
* **System testbenches** (`tb_lab5_cursor`, `tb_lab5_paint`,
  `tb_lab5a_animation`, `tb_lab5a_move`) run real VGA timing with a PS/2
  keyboard model. They judge only what appears on the VGA pins, by sampling
  the centre of every cell in every frame. They take 5-15 s each.
* **`tb_vram_labs_top`** runs all four systems at their default parameters for
  about 57 frames, roughly 70 s.
  * Checks: every cell of every screen, the syncs, and the scan-code displays.
  * Mechanisms that must each occur at least once: moves in all directions,
    edge clamping, a dropped bad-parity byte, an ignored key, edit-mode
    toggles, painting, uncovering a painted cell, pattern steps and wraps,
    and block moves.

The synthesizable RTL uses `always_ff`/`always_comb`, a shared package with
typedefs (`vram_wr_t`, `color_t`, `dir_t`) and parameters. The only `initial`
block is the RAM's power-up clearing, which block-RAM synthesis supports.
