// pacman_pkg: types and constants shared by the Pac-Man graphics subsystem.
//
// The graphics hardware draws a 640x480 VGA picture from two layers: a
// background of tiles, read in raster order from a tile map, and five
// sprites (Pac-Man and four ghosts) positioned by x/y coordinates. The
// processor describes a frame by writing 16-bit words of a shared RAM:
//   word 3*s+0 : sprite s x position, bits [9:0]
//   word 3*s+1 : sprite s y position, bits [8:0]
//   word 3*s+2 : sprite s image word, bits [5:0]
//   word 15+t  : tile t entry, bits [7:0] (t = row*40 + column)
//   last word  : READY flag, bit 0 (read only)
// Sprite 0 is Pac-Man, sprites 1..4 are ghosts 1..4. The x, y and image
// fields, their widths and the word order follow the address map of the
// design; the placement of the two flip bits at the top of each image field
// and the 8-bit RGB332 pixel format are this implementation's choices.
package pacman_pkg;

  // Number of sprites and shared-RAM words per sprite.
  localparam int unsigned N_SPRITES       = 5;
  localparam int unsigned WORDS_PER_SPRITE = 3;
  localparam int unsigned SPRITE_WORDS    = N_SPRITES * WORDS_PER_SPRITE;

  // Field widths of the sprite and tile records.
  localparam int unsigned SPR_X_W   = 10;
  localparam int unsigned SPR_Y_W   = 9;
  localparam int unsigned SPR_IMG_W = 3;
  localparam int unsigned TILE_IMG_W = 6;

  // One on-screen pixel: 8 bits, RGB332 (rrrgggbb).
  typedef logic [7:0] pixel_t;

  // Sprite pixel value that lets the layer below show through.
  localparam pixel_t TRANSPARENT = 8'h00;

  // Decoded sprite attributes, one record per sprite.
  typedef struct packed {
    logic [SPR_X_W-1:0]   x;      // left edge, screen pixels
    logic [SPR_Y_W-1:0]   y;      // top edge, screen lines
    logic                 hflip;  // mirror left-right
    logic                 vflip;  // mirror top-bottom
    logic [SPR_IMG_W-1:0] img;    // image number within this sprite's set
  } sprite_attr_t;

  // Decoded tile map entry.
  typedef struct packed {
    logic                  hflip;
    logic                  vflip;
    logic [TILE_IMG_W-1:0] img;
  } tile_entry_t;

  function automatic tile_entry_t decode_tile(input logic [15:0] w);
    tile_entry_t t;
    t.hflip = w[7];
    t.vflip = w[6];
    t.img   = w[5:0];
    return t;
  endfunction

  // Expand RGB332 to 8 bits per colour by repeating the high bits.
  function automatic logic [23:0] rgb332_to_888(input pixel_t p);
    logic [7:0] r, g, b;
    r = {p[7:5], p[7:5], p[7:6]};
    g = {p[4:2], p[4:2], p[4:3]};
    b = {p[1:0], p[1:0], p[1:0], p[1:0]};
    return {r, g, b};
  endfunction

endpackage
