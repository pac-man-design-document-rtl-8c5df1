// tile_generator: background layer of the screen.
//
// The screen is covered by a grid of TILE_COLS x TILE_ROWS cells. The tile
// map in the shared RAM holds one word per cell, in raster order from
// MAP_BASE, so a cell's position is implied by where its word sits and no
// coordinates are stored. For the pixel (hcount, vcount) the generator
//   stage 0: computes the cell number and reads its map word,
//   stage 1: decodes image number and flip bits (bit 7 horizontal flip,
//            bit 6 vertical flip, bits 5:0 image), mirrors the pixel's
//            offset inside the cell as requested, scales it to the stored
//            image size and reads the tile image memory,
//   stage 2: presents the pixel on tile_pix.
// Each stage advances on pix_en, so tile_pix belongs to the pixel whose
// coordinates were presented two strobes earlier.
//
// Cell size on screen (TILE_PX) and stored image size (TILE_IMG_PX) are
// separate parameters; when the image is larger than the cell every
// (TILE_IMG_PX/TILE_PX)-th stored pixel is shown. Image numbers at or above
// N_TILE_IMAGES read as 0. The image memory is loaded through pat_we /
// pat_waddr / pat_wdata (pixel address = image*TILE_IMG_PX^2 + y*TILE_IMG_PX
// + x). The grid, the image counts and sizes and the 6+2 bit map word follow
// the design; bit placement and scaling are this implementation's choices.
module tile_generator #(
  parameter int unsigned TILE_COLS     = 40,
  parameter int unsigned TILE_ROWS     = 30,
  parameter int unsigned TILE_PX       = 16,
  parameter int unsigned TILE_IMG_PX   = 32,
  parameter int unsigned N_TILE_IMAGES = 44,
  parameter int unsigned MAP_BASE      = 15,
  parameter int unsigned ADDR_W        = 11,
  parameter int unsigned PAT_ADDR_W    = 16
) (
  input  logic                  clk,
  input  logic                  pix_en,
  input  logic [10:0]           hcount,
  input  logic [9:0]            vcount,
  input  logic                  active,
  // tile map read port (shared RAM port B), data one clock after map_rd_en
  output logic                  map_rd_en,
  output logic [ADDR_W-1:0]     map_rd_addr,
  input  logic [15:0]           map_rd_data,
  // tile image memory load port
  input  logic                  pat_we,
  input  logic [PAT_ADDR_W-1:0] pat_waddr,
  input  logic [7:0]            pat_wdata,
  // pixel, two strobes after hcount/vcount
  output pacman_pkg::pixel_t    tile_pix
);
  import pacman_pkg::*;

  localparam int unsigned IMG_SIZE = TILE_IMG_PX * TILE_IMG_PX;
  localparam int unsigned PAT_DEPTH = N_TILE_IMAGES * IMG_SIZE;

  initial begin
    assert (MAP_BASE + TILE_COLS * TILE_ROWS <= (1 << ADDR_W))
      else $fatal(1, "tile_generator: ADDR_W too small");
    assert (PAT_DEPTH <= (1 << PAT_ADDR_W))
      else $fatal(1, "tile_generator: PAT_ADDR_W too small");
  end

  // stage 0: cell number -> map address
  logic [31:0] col, row;
  assign col = 32'(hcount) / TILE_PX;
  assign row = 32'(vcount) / TILE_PX;
  assign map_rd_en   = pix_en && active;
  assign map_rd_addr = ADDR_W'(MAP_BASE + row * TILE_COLS + col);

  // offset inside the cell travels with the map read
  logic [31:0] offx1, offy1;
  always_ff @(posedge clk) begin
    if (pix_en) begin
      offx1 <= 32'(hcount) % TILE_PX;
      offy1 <= 32'(vcount) % TILE_PX;
    end
  end

  // stage 1: decode, flip, scale, image read
  tile_entry_t ent;
  logic [31:0] ox, oy, ix, iy;
  logic [PAT_ADDR_W-1:0] pat_raddr;
  always_comb begin
    ent = decode_tile(map_rd_data);
    ox  = ent.hflip ? (TILE_PX - 1 - offx1) : offx1;
    oy  = ent.vflip ? (TILE_PX - 1 - offy1) : offy1;
    ix  = (ox * TILE_IMG_PX) / TILE_PX;
    iy  = (oy * TILE_IMG_PX) / TILE_PX;
    if (32'(ent.img) < N_TILE_IMAGES)
      pat_raddr = PAT_ADDR_W'(32'(ent.img) * IMG_SIZE + iy * TILE_IMG_PX + ix);
    else
      pat_raddr = PAT_ADDR_W'(PAT_DEPTH);  // out of range: reads as 0
  end

  // stage 2: pixel out of the image memory
  pattern_ram #(.DEPTH(PAT_DEPTH), .ADDR_W(PAT_ADDR_W)) u_tile_images (
    .clk   (clk),
    .we    (pat_we),
    .waddr (pat_waddr),
    .wdata (pat_wdata),
    .rd_en (pix_en),
    .raddr (pat_raddr),
    .rdata (tile_pix)
  );

endmodule
