# 5-in-line game display: a VGA controller without a frame buffer

This is the custom hardware of a 5-in-line (gomoku) game on a Spartan-3E
FPGA board. A soft processor runs the game: it reads the keyboard, judges
wins and picks the machine's moves. It sends the display only what changed,
as one 32-bit word per event. The display keeps the 15 x 15 board in 450
flip-flops, two bits per grid. It redraws the board from that state on every
frame of a 640x480, 60 Hz VGA picture. No frame buffer, no memory port and
no per-pixel traffic between software and hardware are needed.

The RTL here is the display peripheral (`vga_controller`) and its two parts.
The other parts of the system are standard vendor IP, used as they come: the
processor and its block RAM, the peripheral bus, the PS/2 keyboard port, the
UART and the clock generator. They are not included. The display's ports are
where they connect.

```
 processor ──FSL words──▶ ┌──────────────── vga_controller ───────────────┐
                          │  pixel_color_gen                              │
   25 MHz clk ──────────▶ │    board state 15x15x2, cursor (x,y)          │──▶ R[2:0] G[2:0] B[1:0]
                          │    colour = f(hcount, vcount, state)          │
                          │           ▲ hcount, vcount, blank             │
                          │  vga_sync ┘                                   │──▶ hs_n, vs_n
                          └───────────────────────────────────────────────┘
```

## Files

| file | contents |
|------|----------|
| `rtl/fiveline_pkg.sv` | word layout (`instr_t`), command and grid-state enums, colours, board size |
| `rtl/vga_sync.sv` | line and frame counters, `blank`, active-low sync |
| `rtl/pixel_color_gen.sv` | FSL word decoder, board and cursor registers, pixel colour |
| `rtl/vga_controller.sv` | top: the two blocks wired together, colour split into pins |
| `tb/fiveline_ref_pkg.sv` | reference model of the picture, used by the testbenches |
| `tb/tb_vga_sync.sv` | timing test, two full frames |
| `tb/tb_pixel_color_gen.sv` | word decoding and pixel colours, directed and random |
| `tb/tb_vga_controller.sv` | end-to-end: two games played through the FSL port, checked at the VGA pins |

## The instruction word

The processor writes 32-bit words into a Fast Simplex Link (FSL). FSL is a
one-way FIFO link between the processor and a peripheral. Each word is
`state * 256 + 16 * X + Y`:

| bits | field | meaning |
|------|-------|---------|
| 3:0  | Y | row, 0..14 |
| 7:4  | X | column, 0..14 |
| 10:8 | state | command, below |
| 31:11 | – | ignored |

| state | effect |
|-------|--------|
| `000` | grid (X,Y) becomes empty; cursor moves to (X,Y) |
| `001` | grid (X,Y) gets a green (human) piece; cursor moves to (X,Y) |
| `010` | grid (X,Y) gets a blue (machine) piece; cursor moves to (X,Y) |
| `011` | grid (X,Y) is marked as part of the winning line (red); cursor stays |
| `100` | every grid becomes empty in one clock; cursor stays |
| `101`–`111` | ignored |

For example, a green piece on the centre grid is the word `0x177`.

Some of this is the design's own choice rather than given:

- The blue code `010`.
- The meaning of `000`.
- The rule that a placement word also moves the cursor.

With these choices, the grid state is just the low two bits of the command.
The software needs no separate cursor command. To move the cursor without
changing a grid, it resends the state that grid already has. As a result the
cursor always sits on the most recent piece, the machine's pieces included.

There are two ways to clear the board. The `100` code does it in a single
word. The software can also send 225 `000` words, one per grid; the
hardware accepts both.

A word with X or Y equal to 15 is taken off the link and does nothing. So is
an unused code.

## Handshake and timing

Everything runs on the 25 MHz pixel clock. The system makes it by halving
the board's 50 MHz clock outside this block. The FSL link is assumed to be in
the same clock domain.

- **FSL slave side.** When `fsl_s_exists` is high, the word on `fsl_s_data`
  is applied at that clock edge. `fsl_s_read` is raised in the same clock to
  pop it, so words are taken one per clock, back to back. A full 225-word
  clear takes 225 clocks. That is far less than one vertical blanking period
  (41 lines, 32,800 clocks).
- **FSL master side.** These ports (`fsl_m_full`, `fsl_m_write`,
  `fsl_m_data`) are present so the block matches the link's signal set. The
  display never sends anything back, so `fsl_m_write` stays 0.
- **Words in the middle of a frame.** A word that arrives while the picture
  is being drawn changes the picture from the next pixel on. Software that
  wants tear-free updates should send during vertical sync. The end-to-end
  testbench does this.
- **Reset.** `rst` is synchronous and active high. It empties the board and
  puts the cursor on the centre grid (7,7).

### VGA timing (`vga_sync`)

| | visible | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| horizontal (clocks) | 640 | 16 | 96 | 48 | 800 |
| vertical (lines) | 480 | 10 | 2 | 29 | 521 |

This gives 25 MHz / 416,800 = 59.98 frames per second. The porch and pulse
lengths are the usual ones for this mode on the Nexys-2 board, and they are
parameters. Both syncs are active low.

The counters start at the first visible pixel. `hcount`, `vcount` and
`blank` describe the pixel of the current clock. `hs_n`, `vs_n` and the
colour are all registered, so each appears one clock later than the pixel it
belongs to. At the pins, colour and sync therefore line up.

## How a pixel gets its colour

`pixel_color_gen` uses no frame buffer. It works out each pixel's colour from
its screen position and the board state:

1. **On the board or off it.** The 450x450-pixel board sits at (95, 15),
   which centres it on the screen. Anything outside the board is black.
   Blanking is black as well.
2. **Which grid.** Subtracting the board origin gives a position relative to
   the board. This is compared with the 14 grid boundaries (multiples of 30)
   to get the column and row. The same is done to get the pixel's place
   `(u, v)` inside its 30x30 grid. No divider is needed.
3. **Which part of the grid**, in priority order:
   - **Frame:** two pixels wide on every side of the grid (`u < 2`,
     `u >= 28`, and the same for `v`). It is black, so neighbouring grids are
     separated by four-pixel lines.
   - **Cursor bar:** rows 26–27 and columns 4–25 of the grid that holds the
     cursor. It is red.
   - **Piece area:** a disc of radius 11 pixels about the grid centre,
     tested as `(2u-29)² + (2v-29)² <= 4·11²`. It is green, blue or red
     according to the grid's two state bits. An empty grid shows no disc.
   - **Background:** everything else, in white.
4. The colour is registered and leaves as `RRRGGGBB`: 3 bits red, 3 green
   and 2 blue, matching the board's 8-bit VGA port.

The geometry and colours are parameters of `pixel_color_gen`: board origin,
piece radius, and the colours of frame, background, outside area, cursor and
pieces. The grid count (15) and grid size (30) are in `fiveline_pkg`.

In synthesis the board is 225 two-bit registers with a 225-to-1 read
multiplexer. Yosys maps these as a 450-bit memory with a synchronous clear.
Besides the board, the design holds about 40 flip-flops: cursor, counters,
sync and colour.

## What follows the original design and what is chosen here

Taken from the original design:

- Split into a synchronisation block and a pixel-colour block, with the
  signals between them.
- The FSL connection.
- 640x480 at 60 Hz from a 25 MHz clock, and the 8-bit colour.
- A 15 x 15 board of 30x30-pixel grids, two bits per grid, kept in
  registers.
- The word layout, the green, win and clear codes, and clearing with 225
  empty words.
- A grid made of a two-pixel frame, a piece area and a cursor area.
- Green for the human, blue for the machine, red for the winning line.
- Cursor in the centre at start.

Chosen here:

- The blue and empty codes, and that placement words move the cursor.
- What invalid words do.
- The exact porch lengths: standard values for the mode.
- Sync polarity, reset style, and the one-clock output alignment.
- Board position, piece radius, cursor bar size, and the colours of frame,
  background and cursor.
- That the master side of the FSL link is idle.
- Single clock domain for the link.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. With plain Verilator, from the top folder:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fiveline_pkg.sv tb/fiveline_ref_pkg.sv \
  rtl/vga_sync.sv rtl/pixel_color_gen.sv rtl/vga_controller.sv \
  tb/tb_vga_controller.sv --top-module tb_vga_controller
./obj_dir/Vtb_vga_controller
```

For the other two tests, replace the last file and the top module with
`tb_vga_sync` or `tb_pixel_color_gen`. The RTL is fully reset, so no
two-state initialisation is needed.

- **`tb_vga_sync`** runs two full frames. It checks counters, `blank`,
  `hs_n` and `vs_n` against a cycle count on every clock. It also measures
  the line period, the frame period and both pulse widths from the sync
  edges.
- **`tb_pixel_color_gen`** feeds positions and words directly. It compares
  colours with the reference model in `fiveline_ref_pkg`, which is written
  independently using plain division and a circle test. Cases covered:
  - reset;
  - the `0x177` example;
  - the exact edge of the disc;
  - corner grids;
  - win marks;
  - ignored words;
  - the clear code;
  - a random game of 300 words.
- **`tb_vga_controller`** runs the whole peripheral at its real size, about
  27 frames in roughly 10 s. The testbench plays the processor. A small
  model of the game software turns arrow, Enter and Esc presses into words,
  finds five in a line in the four directions and sends the winning grids.
  A queue stands in for the FSL FIFO. Two games are played:
  - **Game 1:** the human wins, and the board is cleared with 225 empty
    words.
  - **Game 2:** the machine wins, and the board is cleared with the clear
    code.

  A monitor that sees only the VGA pins locks to the sync edges and checks
  every visible pixel of every frame against the reference picture. It also
  counts each mechanism and fails if one never happened: green and blue
  pieces, cursor moves, win marks, both clears, ignored words, a 226-word
  back-to-back burst, and checked frames.

## Limits

- The game logic is software on the processor: key handling, win judgement,
  and the machine's defence and offence. It is not part of this hardware.
  The testbench's software model is only good enough to drive the display;
  it does not reproduce the machine's strategy.
- The FSL link is used in a single clock domain. If the processor runs at
  50 MHz, the link FIFO must be an asynchronous one.
- Table-level resource figures of the original FPGA build were not
  reproduced. The register count is comparable, since both designs keep
  the board in flip-flops and use no block RAM.
