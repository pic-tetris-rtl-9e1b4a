# Tile-based VGA graphics engine for a microcontroller Tetris game

A small microcontroller can run the rules of Tetris. It cannot also produce a
640x480 colour picture. This design splits the work. The microcontroller keeps
the game state: the board, the falling piece, the score and the level. An FPGA
keeps the picture and redraws it 60 times a second. The FPGA does not know the
rules of the game. It holds a **tile map**, a 40 x 30 grid of one-byte tile
numbers. For every pixel it looks up the tile under that pixel and reads the
pixel's colour from a **tile ROM** of 64 tiles of 16 x 16 pixels each. The
microcontroller changes the screen only by writing tile numbers into the map.

Two ideas carry the design:

* **Fields instead of addresses.** The microcontroller never sends an address.
  A 4-bit status code says *what* is coming: the board, the score, the high
  score, the level or the next piece. The FPGA knows *where* that field sits on
  screen and lays the bytes out itself, row by row.
* **Double buffering.** There are two game tile maps. One is shown while the
  other is written. After every transfer the two swap, so a half-written board
  is never on screen.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with one clock domain
for the picture (25 MHz) and a small input stage on the microcontroller's
serial clock (10 MHz).

## System

```
 game pad --(latch, clk, data)--> microcontroller --(serial clk, serial data)--> FPGA --(R,G,B 3/3/2, hsync, vsync)--> DAC --> VGA monitor
                                                 --(status[3:0], parallel)----->
```

The microcontroller reads the game pad and runs the game. It is not part of
this RTL, and neither is the game pad. The FPGA design is `tetris_fpga`. Its
colour outputs feed a resistor network outside the FPGA. Each colour bit drives
the monitor's 75 ohm input through 470 ohm (MSB), 1000 ohm or 2000 ohm. That
gives the monitor 0 to about 0.7 V per colour (`tb/rgb_dac_model.sv` models it).
The 25 MHz clock comes from the FPGA's clock manager, which multiplies the
40 MHz board clock by 5/8. That is a vendor primitive, so `tetris_fpga` takes
the 25 MHz clock as its `clk` input.

## The link protocol

The microcontroller drives two things. `status[3:0]` is a parallel port: the
upper nibble of the microcontroller's port D. A separate serial link carries
`serial_clk` and `serial_data` at 10 MHz, 8 bits per byte, MSB first, sampled
on the rising clock edge. The status codes are:

| code | meaning | what the FPGA does |
|-----:|---------|--------------------|
| 0 | nothing | ends a transfer or a command |
| 1 | board follows | 200 bytes, 10 wide x 20 high |
| 2 | score follows | 7 digit tiles |
| 3 | next piece follows | 8 bytes, 4 wide x 2 high |
| 4 | level follows | 2 digit tiles |
| 5 | show start screen | only from the end screen |
| 6 | play | start screen -> game |
| 7 | game over | game -> end screen |
| 8 | high score follows | 7 digit tiles |

A **write transfer** has three steps:

1. Set the code.
2. Send the bytes.
3. Set the code back to 0, but only after the last byte has left the serial
   port.

The FPGA then swaps the game buffers. A field that must change on both buffers,
such as the score, the level or the next piece, is therefore sent twice in a
row. The board is sent once per game step, so the new board lands in the
hidden buffer and becomes visible at the swap.

A **command** (codes 5, 6 and 7) is the code held for a few clock cycles and
then 0.

Byte framing has no separate signal. The receiver counts eight serial clocks
from reset. The serial clock must therefore run only while bytes are sent, and
never a partial byte.

## Screen layout

The 640x480 screen is 40 x 30 tiles. A tile map is 2048 bytes, addressed
`{tile row[4:0], tile column[5:0]}`. Each map row thus has 64 slots, and only
the first 40 are shown. Map rows 30 and 31 are not shown either. Each byte is a
tile number. Only bits 5:0 select one of the 64 tiles in the tile ROM.

| field | first slot (row, column) | address | layout |
|-------|--------------------------|--------:|--------|
| board | 4, 15 | 271 | 10 per row, 20 rows |
| next piece | 8, 31 | 543 | 4 per row, 2 rows |
| score | 16, 30 | 1054 | 7 in one row |
| high score | 22, 3 | 1411 | 7 in one row |
| level | 22, 32 | 1440 | 2 in one row |

When the last byte of a field row has been written, the address jumps to the
field's first column one map row down (+55 for the board, +61 for the piece).
The tile numbers that the game uses are its own convention, not the engine's:

* 1 to 7 for the seven piece colours
* 0x2D for an empty board cell
* 34 + d for digit d
* 0 for blank

The tile ROM holds 16384 bytes, addressed `{tile[5:0], pixel row[3:0], pixel
column[3:0]}`. Each byte is one pixel, `RRRGGGBB`.

## Game states and double buffering

`gamestate_fsm` decides what is shown. `board_buffers` routes the memory ports
to match:

| state | shown | written by transfers | leaves on |
|-------|-------|----------------------|-----------|
| START (00) | start-screen ROM | buffer 2 | play -> GAME1 |
| GAME1 (01) | buffer 1 | buffer 2 | swap -> GAME2, game over -> END |
| GAME2 (10) | buffer 2 | buffer 1 | swap -> GAME1, game over -> END |
| END (11) | end-screen ROM | buffer 1 | start -> START |

Bit 1 of the state alone decides which buffer is written. Each buffer is a
single-port RAM. Its address input is switched between the VGA read address
and the control unit's write address, and only the written buffer gets the
write enable. A swap is a one-cycle pulse from `control_fsm`, issued in the
cycle after a write code goes back to another value. Game over wins over a
swap in the same cycle. Commands that do not fit the current state are ignored:
start during a game, and play on the end screen.

The states need some care after "play". The game starts in GAME1 and shows
buffer 1, which may hold an old picture. The microcontroller then sends its
full data set twice (board, score, high score, level, piece). Each transfer
swaps the buffers, and after two rounds both buffers hold everything. The end
and start screens do not touch the buffers. A new game shows the last picture
of the old game until its first transfer lands.

## Receive path and clock domains

`receive_data` runs its shift register and 3-bit bit counter on `serial_clk`.
On the eighth bit it copies the byte into a holding register and flips a toggle
flag. In the 25 MHz domain the flag passes two synchronizing flops. A change of
the flag copies the holding register, which is stable for the next eight serial
clocks, into `rx_data` and pulses `rx_valid` for one cycle. That is 3 to 4
cycles after the last serial edge, with about 20 cycles of margin per byte.
`status` is used directly in the 25 MHz domain. It changes only between
transfers and is sampled into the state register, so a change is seen one cycle
earlier or later without effect.

`control_fsm` loads the field's start address when it enters a write state. If
a byte arrives in that same cycle, it is placed at the start address. Each
received byte is written one cycle later (`wr_en`, `wr_addr`, `wr_data`).
Bytes that arrive outside a write state are dropped.

## VGA pipeline

`vga_sync` counts 800 clocks per line and 525 lines per frame at 25 MHz
(59.5 Hz):

* hsync is low for columns 7 to 102.
* vsync is low for lines 2 and 3.
* The picture occupies columns 151 to 790 of lines 37 to 516.

All its outputs are registered. `vga_driver` is a three-stage pipeline:

* **stage 0:** `tile_scan` counters give the tile and the pixel inside it. The
  tile-map address goes to the memories.
* **stage 1:** the tile number comes back. With the pixel row and column
  delayed by one cycle, it forms the tile-ROM address.
* **stage 2:** the pixel comes back and is split into R, G and B, forced to
  black outside the picture.

hsync, vsync and the display enable are delayed two cycles to stay aligned
with the pixels. Measured from the sync counters, the outputs lag by three
clocks. This shifts the whole picture, not the picture against the syncs.

## Modules

| file | role |
|------|------|
| `rtl/tetris_pkg.sv` | status codes, field table, map/tile geometry, VGA timing, game-state encoding |
| `rtl/tetris_fpga.sv` | top level |
| `rtl/receive_data.sv` | serial-to-parallel with clock-domain crossing |
| `rtl/control_fsm.sv` | status decode, field addressing, swap and screen commands |
| `rtl/gamestate_fsm.sv` | START / GAME1 / GAME2 / END |
| `rtl/board_buffers.sv` | two game buffers, two screen ROMs, address and output muxes |
| `rtl/board_ram.sv` | 2048 x 8 single-port RAM |
| `rtl/screen_rom.sv` | 2048 x 8 screen ROM |
| `rtl/tile_rom.sv` | 16384 x 8 tile-pixel ROM |
| `rtl/vga_driver.sv` | VGA pipeline |
| `rtl/vga_sync.sv` | sync and display-enable generation |
| `rtl/tile_scan.sv` | tile and pixel counters |

## Artwork

The screen images and the tile set are artwork. They are not included. Without
them the ROMs are filled at elaboration with placeholders that make every tile
and position visible:

* **Tiles.** Each tile has a white top and left edge and a black bottom and
  right edge. The inside colour comes from the tile number t: red = t[2:0],
  green = t[5:3], blue = 01.
* **Screens.** A frame of tile 1 (start screen) or tile 2 (end screen) runs
  around the 40 x 30 area, with grey tile 0x2D inside.

To use real artwork, pass `$readmemh` files through the top-level parameters:

* `TILE_INIT_FILE`: 16384 bytes, tile by tile, row by row.
* `START_INIT_FILE` and `END_INIT_FILE`: 2048 bytes each, 64 slots per map
  row. Slots in columns 40 to 63 and rows 30 and 31 are 0.

## Where this design departs from the original

The block structure, codes, addresses, sizes, timing and state machines follow
the original design. These points differ:

* **Serial hand-over.** The received byte crosses into the 25 MHz domain
  through a synchronized toggle. The original clocked its output register with
  a strobe derived from the serial clock.
* **Field start address.** It is loaded on entry to the write state. The
  original used a separate state-change pulse one cycle later.
* **Row counter of a field.** It is an ordinary synchronous counter. The
  original clocked it with the byte strobe.
* **Bytes outside a write state** are dropped. The original wrote every byte at
  the running address. The original game software lowers the status right after
  loading the last byte into its serial port. This design needs the status
  held until that byte has been sent.
* **Vertical counters.** The sync generator's line counter and the tile-row
  counters step synchronously at the end of a line. The original clocked them
  from hsync and from the display enable. That offset its picture by one pixel
  line, which this design does not have.
* **Blanking** uses the display enable delayed with the syncs. The original
  used the undelayed one, a two-pixel shift.
* **Output multiplexer.** Its select is the game state delayed by one cycle,
  to match the memory read latency.
* **Clock manager.** It is not included.

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. Some files in `tb/` are shared by the
testbenches:

* `tb/tb_ref_pkg.sv` holds the reference formulas: placeholder artwork and
  field slots.
* `tb/vga_track.svh` is a VGA checker. It locates every pixel from hsync and
  vsync alone and compares whole frames.

To build and run one testbench, for example the end-to-end one:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/tetris_pkg.sv tb/tb_ref_pkg.sv tb/tetris_fpga_tb.sv --top-module tetris_fpga_tb
./obj_dir/Vtetris_fpga_tb
```

For another testbench, replace `tetris_fpga_tb` with its name. Packages must be
listed first.

`tetris_fpga_tb` runs the top at its default parameters for nine full frames,
about 4 million clocks in a few seconds. A model of the microcontroller sends
real transfers over the serial link. The testbench checks every pixel of each
frame, and the blanking, against its own model of the two buffers and the
screens:

1. After reset: the start screen.
2. After play: an empty buffer.
3. After two full data sets.
4. After single board updates.
5. After score and piece updates.
6. After game over.
7. Back at the start screen.
8. In a second game.

It also passes the colour through the DAC model and checks the 0 to 0.7 V
range. It reports how often each mechanism happened and fails if any never
did:

* byte reception
* writes to each field
* board and piece row wraps
* buffer swaps in both directions
* each screen change

The block testbenches check:

* the receiver with 100 random bytes and their latency
* every field address sequence and the swap pulse
* random game-state command sequences
* the memories, slot by slot
* the VGA timing numbers over three frames
* the tile counters over two frames
* the VGA driver, pixel by pixel over two frames, and the sync periods and
  pulse widths at its outputs

## Limits

* The ROMs hold placeholders, not the real screens and tiles.
* Nothing here checks behaviour on real hardware: metastability margins,
  monitor tolerance of the 59.5 Hz timing, or DAC levels on a real cable.
* The receiver cannot resynchronize to byte boundaries, except through reset.
  A glitch on the serial clock shifts all later bytes.
