# Pac-Man tile and sprite graphics for a DE1-SoC style FPGA

This is the FPGA half of a Pac-Man arcade game. The game itself runs as
software on the board's ARM processor: keyboard input, movement, ghost
behaviour, pellets, score, lives and the game state machine. Each frame,
the software describes the whole picture by writing a small shared memory.
That memory holds where Pac-Man and the four ghosts are, which image each
one shows, and which image fills each cell of the background. The hardware
here turns that description into a 640x480, 60 Hz VGA picture. It draws a
background of tiles with the five sprites on top, and uses a READY flag to
tell the software when it may write the next frame.

The point of the split is that the software never touches pixels. Moving a
ghost means writing its x and y, and eating a pellet means rewriting one
tile word. Smooth motion comes from giving sprites pixel coordinates that are
not tied to the tile grid.

## Block structure

```
 processor port                                  +----------------+
 (Avalon-MM style) --> shared_ram --port B--+--> | tile_generator |--\
                         ^   |              |    +----------------+   \   +-----------+   +------------+
                    READY|   |              |                          +->| image_mux |-->| vga_driver |--> VGA pins
                         |   |              |    +------------------+  /  +-----------+   +------------+
                     frame_ctrl ------------+--> | sprite_generator |-/                        |
                         ^        sprite table   +------------------+                          |
                         +----------------- hcount / vcount / pix_en <-------------------------+
```

| module | role |
|---|---|
| `pacman_top` | wires the blocks together; the top level |
| `pacman_pkg` | shared types: sprite attributes, tile entry, RGB332 pixel |
| `shared_ram` | 16-bit dual-port memory: sprite table, tile map, READY word |
| `frame_ctrl` | READY handshake; copies the sprite table once per frame |
| `tile_generator` | background layer, read from the tile map in raster order |
| `sprite_generator` | five sprites with per-frame shadow attributes |
| `image_mux` | layering: Pac-Man, then ghosts 1-4, then tiles |
| `vga_driver` | pixel strobe, counters, syncs, output register |
| `pattern_ram` | image memory, used for tile images and for each sprite's images |

## The shared memory map

The processor sees 16-bit words at word addresses. Byte enables allow 8-bit
writes.

| word | bits | content |
|---|---|---|
| 0 | 9:0 | Pac-Man x (pixels, left edge) |
| 1 | 8:0 | Pac-Man y (lines, top edge) |
| 2 | 5, 4, 2:0 | Pac-Man horizontal flip, vertical flip, image number |
| 3-5, 6-8, 9-11, 12-14 | same | ghosts 1 to 4 |
| 15 + t | 7, 6, 5:0 | tile t: horizontal flip, vertical flip, image number |
| 1215 (0x4bf) | 0 | READY, read only |

There is one tile word per cell of a 40x30 grid, and t = row*40 + column. A
tile's position is given by where its word sits, so tiles carry no
coordinates. A full x or y position fits in one 16-bit write, which is why the
words are 16 bits wide even though most entries use only 8 of them.

## Frame handshake

The hardware sets the pace. The READY flag works like this:

- After reset READY is 1, so the software can write the first frame at once.
- On the last blanking line before the picture starts (line 524), READY drops.
  `frame_ctrl` then copies the 15 sprite words into shadow registers in
  `sprite_generator`, one word per pixel period. This takes 16 pixel
  periods.
- After the last visible line (line 480), READY rises again.

So the software gets one READY rise per frame, about 1.4 ms before the copy.
Sprite positions are taken once per frame, so a sprite written in the middle
of a frame does not tear. Tile words are read live while the picture is
scanned. A tile word written while READY is 0 can therefore show up partway
down the current frame. The software should only write while READY is 1.

`frame_ctrl` uses shared RAM port B only on line 524 and the tile generator
uses it only on visible lines, so the two never overlap. `pacman_top` picks
the port's owner from `frame_ctrl`'s `busy` output. An assertion in
`frame_ctrl` checks that the copy has finished before the picture starts.

## Pixel pipeline and timing

The whole design runs on one clock, 50 MHz on the board. `vga_driver`
produces `pix_en` once every `CLK_DIV` = 2 clocks, which gives the 25 MHz
pixel rate of standard 640x480 VGA (800 x 525 pixel periods per frame, about
59.5 frames/s). Every pipeline register advances only on `pix_en`.

| pixel strobe | tile path | sprite path |
|---|---|---|
| 0 | cell number, read tile word from shared RAM | hit test against all five sprites, read each sprite's image memory |
| 1 | decode word, apply flips, read tile image memory | pixel arrives |
| 2 | tile pixel ready | sprite pixel and "covers" bit registered |
| 3 | `image_mux` output register | |
| 4 | VGA output register | |

`vga_driver` delays its syncs and blanking by `PIXEL_LAT` = 3 strobes, so
colour and syncs leave the output register together. During blanking the
colour outputs are 0. `vga_clk` rises in the middle of each output period.
`vga_sync_n` is held high because no sync is sent on green.

## Tiles

There are 1200 cells, each 16x16 screen pixels. A tile image is stored at
32x32 pixels and 8 bits per pixel, so each cell shows every second stored
pixel in each direction. The flip bits mirror the offset within the cell
before that scaling. The image memory holds 44 images (6 maze pieces, 2 dot
images and 36 letters and digits), or 360,448 bits. The 6-bit image field
can name images 44-63, which do not exist; those cells show colour 0.

## Sprites

Each sprite covers 32x32 screen pixels from a stored 16x16 image, so each
stored pixel shows as a 2x2 block. Each sprite has its own image memory of 8
images: Pac-Man's mouth frames, or a ghost's four directions plus four
"vulnerable" images. With separate memories, all five sprites are looked up
in the same pixel period. Pixel value 0 is transparent, so the tile under a
sprite shows through. A sprite that extends past the right or bottom edge is
cut off by the blanking.

## Layering

Any covering sprite beats the tile. Among sprites, Pac-Man (sprite 0) beats
ghost 1, which beats ghost 2, and so on. `image_mux` also reports which layer
won (`src`), which is useful when debugging.

## Pixels and images

A pixel is 8 bits, RGB332 (`rrrgggbb`). The VGA driver expands it to the 8-bit
R, G and B DAC inputs by repeating bits. The image memories start empty: the
artwork is loaded through the top-level `pat_*` port:

- `pat_tile` = 1: `pat_addr` = image*1024 + y*32 + x in the tile image memory.
- `pat_tile` = 0: `pat_addr[13:11]` selects the sprite and `pat_addr[10:0]` =
  image*256 + y*16 + x.

## Interpretations and departures

The original design description disagrees with itself in a few places. These
are the choices made here:

- **Number of tiles and READY address.** 1200 tiles fill 640x480 only as 16x16
  cells, and the 1200 count also matches an 11-bit tile number. A 0x1a0 READY
  address would leave room for only about 400 tiles. This RTL uses 1200 tiles,
  so READY is at word 1215. `TILE_COLS`, `TILE_ROWS` and `TILE_PX` are
  parameters.
- **Tile size on screen.** The images are stored at 32x32 as budgeted, but are
  shown in 16x16 cells. Sprites are shown at 32x32, twice their stored size.
- **Flip bits** are the two top bits of each image field. The sprite image
  field has 6 bits: bit 5 is the horizontal flip, bit 4 the vertical flip,
  bits 2:0 the image, and bit 3 is unused.
- **Word addressing.** The memory is described as byte-addressable, but it is
  laid out in 16-bit lines. The port here uses word addresses with byte
  enables.
- **Own choices** where the description says nothing: RGB332 colour,
  transparent colour 0, the standard VGA porches, the lines on which READY
  changes, READY being read-only for the processor, 1-clock read latency on
  both RAM ports, ghost-to-ghost priority, and a write port for loading the
  images.

Not included: the game software and its state machine, the keyboard and USB
handling, and the audio path. The audio path is a vendor audio core with its
FIFOs, clock and CODEC configuration cores, and the CODEC itself. None of
these is FPGA logic designed here. The processor's bus bridge is not part of
this RTL either. Its Avalon-MM signals connect straight to the processor
port of `pacman_top`.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The checks in each:

- `tb_shared_ram`: byte-enabled writes, reads on both ports, READY behaviour.
- `tb_pattern_ram`: reads, holding the output when not enabled, reads beyond
  the end.
- `tb_vga_driver`: counters, strobe spacing, colour/sync alignment, frame
  length.
- `tb_tile_generator`: map addresses and every pixel of a small grid,
  including flips and missing images.
- `tb_sprite_generator`: every pixel of a 160x120 area for several random
  sprite tables.
- `tb_image_mux`: priority among the layers.
- `tb_frame_ctrl`: the lines on which READY changes, the order and contents of
  the copy, its length.
- `tb_pacman_top`: the whole design on a 128x96 screen for three frames.
- `tb_pacman_full`: two frames at full size.

The two top-level testbenches share `tb/pacman_env.sv`. It plays the
software's role: it loads random images, writes sprite and tile tables while
READY is 1, reads some of them back, and captures the picture from the VGA
pins. It compares every visible pixel with a reference picture that it
computes itself. It also counts each mechanism (each layer shown, Pac-Man
hiding a ghost, transparent pixels, tile and sprite flips, missing tile
images, a sprite cut by the edge, the READY handshake and its period), and
fails if any never happens.

To build and run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pacman_pkg.sv tb/tb_pacman_full.sv \
          -y rtl -y tb +libext+.sv --top-module tb_pacman_full -o sim
./obj_dir/sim
```

Replace `tb_pacman_full` with any other testbench name. The two full-size
frames simulate in a few seconds.
