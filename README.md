# Stylus-driven drawing table: camera pointer, CAD engine, projected VGA display

This is a small two-dimensional CAD system in synthesizable SystemVerilog.
The user draws on a flat surface with a stylus that has a red LED in its tip
and a push switch. A camera looks at the surface, and the hardware finds the
LED in every camera frame. That position is the pointer. The drawing itself
goes out as a 640x480 VGA picture that is projected back onto the same
surface, so the pen and the picture line up.

The drawing engine supports:

- points, lines, rectangles and circles;
- snapping to a 16-pixel grid, or to the nearest pixel already drawn;
- a current colour;
- selecting an object, then deleting, moving, copying, resizing or
  recolouring it.

A 32-pixel toolbar along the left edge of the screen chooses the command.
Everything runs on one 25 MHz clock. There is no processor: every command is
its own small state machine.

```
 camera stream ─► video_input ──(x,y)──► command_top ──{addr,colour}──► pixel_fifo ──► video_output ──► VGA DAC
   (4:2:2)        finds the LED          CAD engine          1024 deep                  frame memory,
                  centroid per frame        │                                           toolbar, grid,
                                            ▼                                           cursor
                                     object memory (ZBT SRAM 512K x 36)          frame memory (SRAM 512K x 9)
```

`cad_system_top` holds the three subsystems and the FIFO. The two SRAMs and
the DAC are external parts; their pins are ports of the top.

## One address space for everything: {y, x}

The one convention to learn first: a screen position is a 19-bit word
`{y[8:0], x[9:0]}` (type `pos_t` in `cad_pkg`). That same word is used:

- as the address in the frame memory, which holds the 9-bit colour
  `{r[2:0], g[2:0], b[2:0]}` of each pixel;
- as the address in the object memory;
- inside every FIFO entry (`pixel_info_t` = position + colour, 28 bits).

No module ever converts between coordinates and addresses. The display
counters address the frame memory directly, and a drawn pixel's position is
its object-memory address.

The screen uses only x < 640 and y < 480. The rest of the 2^19 addresses is
free, and the CAD engine keeps its object table there.

## Finding the stylus (`video_input`)

The camera arrives as a decoded 4:2:2 stream. It is one 10-bit component per
valid clock, in the order Cb, Y, Cr, Y, with the decoder's field (f),
vertical-blank (v) and horizontal-blank (h) flags. No frame is stored:
pixels are judged as they stream past.

- **`video_handler`** keeps the latest Y, Cr and Cb, counts pixels (x
  advances only on a Y sample) and lines, and weaves the two interlaced
  fields into one 480-line picture: y = 2·line + field. For each Y sample in
  active video it raises `cmp_en` with that pixel's position. It pulses
  `frame_done` when vertical blanking starts after the second field.
- **`color_comparator`** says `pass` when Y, Cr and Cb all lie inside the
  window held in **`filter_reg`**. The reset window is a bright red LED:
  Y ≥ 600, Cr ≥ 640, Cb ≤ 560. The window can be reloaded at run time.
  The comparator takes two clocks.
- **`pipe_delay`** delays the position by 4 clocks. The position then
  reaches the accumulator in the same clock as that pixel's `pass`.
- **`video_input_fsm`** (IDLE → WAIT ⇄ STORE → DIVIDE → REGISTER_OUTPUT →
  RESET) adds each passing position into **`centroid_calc`**'s X and Y sums
  and counts the passes. At `frame_done` it divides and loads the output
  register.

The result is the mean position of all red pixels, once per frame. A frame
with no red pixel clears `stylus_valid` and keeps the old position.
Camera coordinates are used directly as screen coordinates; there is no
calibration step.

## The display (`video_output`)

The picture lives in the external frame memory, which needs no refresh
logic. The drawing side never touches that memory. It sends every pixel it
changes through the FIFO, and the display side copies those pixels in during
vertical blanking.

**`sync_gen`** produces standard 640x480 at 60 Hz timing:

- 800 × 525 clocks per frame;
- front porch, sync and back porch of 16/96/48 pixels and 10/2/33 lines.

It also runs a second pair of counters, `rom_pixel_count` (0–31) and
`rom_line_count` (0–479). These sweep the toolbar area once after reset, and
`rom_vblank` rises when the sweep is done.

**`vga_control_unit`** is a four-state machine:

| state | what it does |
|---|---|
| RESET | initialise; counters restarted |
| ROM_SCREEN | reads the **`toolbar_rom`** word at `{rom_line, rom_pixel[4:3]}`. **`initialise_mod`** picks the pixel's bit and turns it into the button's foreground colour or the background colour. The result is written to `{rom_line, 5'b0, rom_pixel}`. |
| ACTIVE_VIDEO | reads the frame memory at `{line, pixel}` and sends it to the DAC. Each 3-bit field becomes the top 3 bits of an 8-bit channel. |
| TRANSFER_DATA | during vertical blanking, pops one FIFO entry per clock and writes it into the frame memory |

Timing inside the control unit:

- The frame memory returns data 2 clocks after the address.
- The control unit registers its memory outputs.
- A 4-clock pixel pipeline carries position and blanking along with each read.
- Horizontal and vertical sync bypass the DAC. They are therefore delayed
  2 clocks more than RGB and blank, to match the DAC's own pipeline.
- All sync outputs are active low.

Two things are overlaid on the memory contents and never stored:

- a grey grid dot every 16 pixels, where the memory holds 0, outside the
  toolbar;
- a red cross cursor (±4 pixels) at the stylus position.

**`flushing_unit`**: the reset button first writes 0 to all 2^19 frame-memory
addresses, one per clock, while `reset_sync` holds the rest of the display
side in reset. Only then does the toolbar get copied in.

**`pixel_fifo`** is 1024 × 28 bits, first-word fall-through. A push into a
full FIFO is dropped and sets the sticky `fifo_overflow`.

## The CAD engine (`command_top`)

### How a click travels

```
click/pos ─► stylus_sync ─► snapper ─► area_map ─► command_handler ─► command module (minor FSM) ─► superplexer ─► ram_interface ─► ZBT SRAM
                              │  ▲         │                                │                                       │
                     snap_to_grid / snap_to_point    toolbar: command, mode, colour        pixels / reads / table writes     FIFO push per changed pixel
```

- **`stylus_sync`** passes the switch through two flip-flops and makes a
  one-clock `click` on its rising edge. It registers the position and
  keeps the last good one whenever the input is off the screen, for example
  when the camera saw no LED.
- **`snapper`** is a major FSM. On a click it starts **`snap_to_grid`** or
  **`snap_to_point`**, as the mode says, and passes on the click with the
  snapped position. Clicks on the toolbar are never snapped.
- **`area_map`** decodes the position. For x < 32, the toolbar is fifteen
  32-line buttons:

  | button | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 |
  |---|---|---|---|---|---|---|---|---|---|---|---|---|---|
  | action | point | line | rect | circle | select | delete | move | copy | resize | no snap | grid snap | point snap | next colour |

  Colours cycle white, red, green, blue, yellow, cyan, magenta, orange.
  If an object is selected when the colour changes, that object is
  recoloured too.
  Anywhere else, a click is a drawing click.
- **`command_handler`** is the second major FSM. It hands a drawing click
  (`next`, `next_pos`) to the minor FSM of the current command and waits on
  that module's `busy`. A command change `cancel`s whatever was half done,
  such as a line's first point. Clicks that arrive while anything is still
  busy are ignored.

### Drawing modules

All four drawing modules share one interface:

- two clicks (`next`) give control points A and B;
- `pending` says that A is held;
- alternatively, `load` gives both points at once, which is what the edit
  commands use;
- the module then emits one pixel per clock (`pix_valid`, `pix_pos`) and
  pulses `done`.

| module | algorithm |
|---|---|
| `draw_point` | one pixel |
| `draw_line` | orders the end points by x, then uses separate states for vertical, horizontal and sloped lines. A sloped line is a Bresenham loop that steps the major axis every clock. Exactly max(\|dx\|,\|dy\|)+1 pixels, each within half a pixel of the true line. |
| `draw_rect` | swaps corners so that (x0,y0) is top-left, then draws the top, bottom, left and right edges. Each outline pixel is drawn once. |
| `draw_circle` | r = ⌊√(dx²+dy²)⌋ from **`isqrt`** (restoring digit-by-digit, one bit per clock, 10 clocks). Then the midpoint circle, emitting the 8 symmetric points of each step on 8 clocks. Off-screen points are skipped. |

### Object memory: what is stored where

The object memory is a 512K × 36 ZBT SRAM. It must be able to answer two
questions:

- which object owns the pixel under the pen (for select and for
  snap-to-point);
- where that object's control points are (for redrawing it).

So there are two kinds of word:

```
pixel word  at {y,x} on screen:   [35] occupied  [34:32] type  [31:21] object number  [20:12] colour  [11:0] 0
table word  at obj_table_addr(n,k): [35] occupied  [34:32] type  [31:23] colour  [22:19] 0  [18:0] control point k (0 = A, 1 = B)
obj_table_addr(n,k) = { y = n[8:0],  x = 768 + 2·n[10:9] + k }     (off screen: x ≥ 768)
```

Objects are numbered from 1 upwards and numbers are never reused, so up to
2047 objects fit. When a drawing command finishes, **`obj_table_writer`**
writes the two table words, one clock each. Where objects overlap, a pixel
belongs to the object drawn last.

### Selection and the edit commands (`edit_cmds`)

This is the most involved part. Select, delete, move, copy and resize are
one minor FSM that *drives the drawing modules* rather than drawing anything
itself. Every edit command starts by selecting:

1. If an object is already selected, it is redrawn in its own colour.
2. The pixel word under the click is read. If it is empty, nothing is
   selected.
3. Otherwise, the object's two table words are read. That gives its type,
   colour and control points.
4. The object is redrawn with style HILITE: the screen gets the selection
   colour (yellow), but the memory words keep the object's own colour.
5. The selection register in `command_top` is updated.

Then each command does its own work:

- **select**: done.
- **delete**: redraw with style ERASE (zero in memory and on screen), and
  clear the table words.
- **move**: wait for a second click P. Then A′ = P and B′ = B + (P − A),
  clamped to the screen. The old object is erased and the new one drawn
  under the same number. The table is rewritten.
- **resize**: as move, but A stays and B′ = P.
- **copy**: as move, but the old object stays and the new one gets a fresh
  number.
- **recolour**: not a command of its own. When the colour register
  changes while an object is selected, the object is redrawn (still
  highlighted) with the new colour in its memory words, and its table
  words are rewritten. Deselecting then shows it in the new colour.

Redrawing an object re-runs its drawing module with `load`, so no
per-object pixel lists are needed.

### One memory port: `superplexer` and `ram_interface`

**`superplexer`** picks one memory request per clock. Priority, highest
first:

1. a snap-to-point read, in point-snap mode;
2. an object-table write;
3. an edit-command read;
4. a pixel from the active drawing module.

A drawn pixel becomes a pixel word, plus the colour to show on screen,
according to its style: normal, highlight or erase. Pixels left of x = 32 or
off the screen are not written, which keeps the toolbar intact.

**`ram_interface`** drives the ZBT SRAM from registered outputs:

- Address and write strobe go out one clock after the request.
- The ZBT data phase is two clocks after the address. Write data is driven
  then, and only then (`sram_oe` is the tristate enable).
- Read data is registered, so `rvalid` and `mem_out` come 4 clocks after the
  request. Reads return in order.

After reset it writes 0 to all 2^19 words; the CAD engine is held in reset
until that is done. Each accepted write to an on-screen address is also
pushed into the FIFO with its display colour.

**`snap_to_point`** searches 177 offsets: every (dx,dy) with dx²+dy² ≤ 56,
tried nearest first. It issues one read per clock and tracks up to 8 reads
in flight. The first occupied pixel wins; if none is found, the position
comes back unchanged. A search takes about 182 clocks (7 µs).

## Sizes and limits

| item | size |
|---|---|
| frame memory | 307,200 of 524,288 words used; flush takes 524,288 clocks (21 ms) |
| toolbar ROM | 2048 × 8 bits = 32 × 480 pixels plus unused words. Built at elaboration from the button frames and a simple glyph per button; there is no data file. |
| FIFO | 1024 entries. It fills only from drawing and drains only in vertical blanking. |
| objects | 2047 (11-bit number) |
| centroid sums | 29 and 28 bits with a 19-bit pass count: enough for every pixel of a frame passing |

**FIFO limit.** A FIFO of 1024 entries holds any line (at most 608 pixels in
the drawing area). It does **not** hold a very large rectangle (up to 2172
outline pixels) or a circle of radius beyond about 180 drawn in one go during
active video. The excess screen pixels are dropped and `fifo_overflow` is
set. Object memory stays correct, so reselecting the object redraws it.

**Overlapping objects.** Where two objects cross, the shared pixel belongs to
the newer one. Deleting or moving the newer object therefore leaves a
one-pixel gap in the older one. There is no intersection bookkeeping.

## Where this design departs from, or fills in, its source description

The overall structure and these points follow the source description:

- the three subsystems and the FIFO between them, and the depth of 1024;
- the {y,x} addressing;
- the 9-bit colour widened by MSBs;
- the toolbar copied from a 2048 × 8 ROM by a control-unit state machine;
- the flush-on-reset of both memories;
- the 4-clock position delay;
- the 177-point snap search;
- the major/minor state machine split;
- the selection register kept in `command_top`;
- the superplexer;
- the edit commands' behaviour.

The following are this design's own choices:

- The camera stream format, weaving fields into 480 lines, and the reset
  colour window.
- The ROM bit select uses the **three** low bits of the ROM pixel counter,
  because 8 bits need 3 select bits. The source text says two.
- Button layout, button colours, the palette and the glyphs.
- 16-pixel grid spacing, the cursor shape, and a frame-memory latency of 2.
- Nearest-first snap order and the snap-circle shape (radius² ≤ 56).
- The object-memory word layout and object-table location.
- Priorities in the superplexer.
- Cancel-on-command-change.
- Copy giving a fresh number.
- Starting a recolour from the colour button.
- The ZBT timing model: data 2 clocks after the address.
- The square root: restoring digit-by-digit, in place of the named
  Meggitt method.
- One clock for everything. The skewed memory clocks and the clock manager
  are outside the design.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`, and each has a watchdog. With plain
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_draw_line \
          rtl/cad_pkg.sv tb/tb_draw_line.sv -o sim --Mdir obj_tb_draw_line
./obj_tb_draw_line/sim
```

Modules are found through `-Irtl -Itb`. Behavioural models of the two
SRAMs are in `tb/`: `frame_sram_model.sv` and `zbt_sram_model.sv`. The ZBT
model asserts that the bus is driven in, and only in, write data phases.

Testbenches worth knowing:

- **`tb_draw_line`, `tb_draw_rect`, `tb_draw_circle`** check the shapes by
  their properties: pixel count, end points, 8-connectivity and distance
  from the ideal line or circle, symmetry, a software midpoint reference,
  and one pixel per clock.
- **`tb_snap_to_point`** places a single drawn pixel at every offset in a
  17×17 square. The pixel must be found exactly when it lies inside the
  search circle.
- **`tb_command_top`** and **`tb_edit_cmds`** run the whole CAD engine, with
  a full-size ZBT model, through drawing, snapping, every edit command and recolouring.
  They check object memory, the object table and a screen model built from
  the FIFO pushes.
- **`tb_cad_system_top`** is the end-to-end test, at the top's default sizes
  (full 2^19 flushes, full memories).
  - A camera model draws a 3×3 red spot in a synthetic frame. The first
    frame is a full 640×480; later frames send only the lines up to the
    spot.
  - The stylus switch is pressed after each position.
  - A monitor rebuilds the VGA picture from the blanking, vsync and RGB
    outputs.
  - It counts 25 mechanisms and fails any that never happened: both
    flushes, toolbar copy, stylus tracking, LED loss, buttons, colour, each
    command, recolour, both snap modes, FIFO transfers, and object, grid, cursor,
    highlight and erase on the VGA picture.
  - It simulates about 4 million clocks in a few seconds.

## Files

- `rtl/cad_pkg.sv`: shared types: `pos_t`, `color_t`, `pixel_info_t`, memory
  word structs, command/mode/style enums, and the table address function.
- `rtl/` has one module per file, named after the module. The top is
  `cad_system_top`.
- `tb/`: testbenches, two memory models, and two shared include files for
  the drawing and command testbenches.
