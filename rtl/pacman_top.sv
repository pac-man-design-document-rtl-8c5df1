// pacman_top: FPGA graphics subsystem of the Pac-Man game.
//
// The game itself (input, movement, ghosts, pellets, score, lives) runs as
// software on the processor. Once per frame the software describes the
// picture by writing the shared RAM: the position, image and flips of
// Pac-Man and the four ghosts, and one word per background tile. This block
// turns that description into a 640x480, 60 Hz VGA picture:
//
//   shared_ram ---> tile_generator ----\
//        \                              image_mux ---> vga_driver ---> VGA
//         frame_ctrl -> sprite_generator/
//
// vga_driver counts pixels and lines; tile_generator and sprite_generator
// each produce their pixel two strobes later; image_mux puts sprites over
// tiles (Pac-Man first) one strobe later; vga_driver delays its syncs by the
// same three strobes. frame_ctrl raises READY in the shared RAM after the
// visible picture, and on the last blank line lowers it and copies the
// sprite table into the sprite generator. Shared RAM port B is owned by
// frame_ctrl during that copy and by the tile generator otherwise.
//
// Ports: clk (system clock, 50 MHz, one pixel every CLK_DIV clocks), reset
// (synchronous, active high); the processor's Avalon-MM style port to the
// shared RAM (word addresses, 16-bit data, readdata one clock after read);
// an image load port (pat_tile selects the tile image memory, otherwise
// pat_addr[13:11] selects the sprite and pat_addr[10:0] the pixel); the VGA
// pins; and ready, the READY flag, also readable at the word after the
// tile map (word 15 + TILE_COLS*TILE_ROWS, 1215 at the defaults).
module pacman_top #(
  parameter int unsigned TILE_COLS     = 40,
  parameter int unsigned TILE_ROWS     = 30,
  parameter int unsigned TILE_PX       = 16,
  parameter int unsigned TILE_IMG_PX   = 32,
  parameter int unsigned N_TILE_IMAGES = 44,
  parameter int unsigned SPR_PX        = 32,
  parameter int unsigned SPR_IMG_PX    = 16,
  parameter int unsigned SPR_IMAGES    = 8,
  parameter int unsigned H_ACTIVE      = 640,
  parameter int unsigned H_FP          = 16,
  parameter int unsigned H_SYNC        = 96,
  parameter int unsigned H_BP          = 48,
  parameter int unsigned V_ACTIVE      = 480,
  parameter int unsigned V_FP          = 10,
  parameter int unsigned V_SYNC        = 2,
  parameter int unsigned V_BP          = 33,
  parameter int unsigned CLK_DIV       = 2,
  parameter int unsigned ADDR_W        = 11
) (
  input  logic              clk,
  input  logic              reset,
  // processor port to the shared RAM
  input  logic              chipselect,
  input  logic              read,
  input  logic              write,
  input  logic [ADDR_W-1:0] address,
  input  logic [1:0]        byteenable,
  input  logic [15:0]       writedata,
  output logic [15:0]       readdata,
  output logic              ready,
  // image memory load port
  input  logic              pat_we,
  input  logic              pat_tile,
  input  logic [15:0]       pat_addr,
  input  logic [7:0]        pat_wdata,
  // VGA
  output logic [7:0]        vga_r,
  output logic [7:0]        vga_g,
  output logic [7:0]        vga_b,
  output logic              vga_clk,
  output logic              vga_hs,
  output logic              vga_vs,
  output logic              vga_blank_n,
  output logic              vga_sync_n
);
  import pacman_pkg::*;

  localparam int unsigned N_TILES = TILE_COLS * TILE_ROWS;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  // timing
  logic        pix_en, active;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  pixel_t      pixel;

  // shared RAM port B
  logic              b_rd_en;
  logic [ADDR_W-1:0] b_rd_addr;
  logic [15:0]       b_rd_data;

  // frame control
  logic              fc_busy, fc_rd_en, set_ready, clr_ready, frame_loaded;
  logic [ADDR_W-1:0] fc_rd_addr;
  logic              attr_we;
  logic [3:0]        attr_idx;
  logic [15:0]       attr_word;

  // tile generator
  logic              tg_rd_en;
  logic [ADDR_W-1:0] tg_rd_addr;
  pixel_t            tile_pix;

  // sprite generator
  pixel_t                 spr_pix [N_SPRITES];
  logic [N_SPRITES-1:0]   spr_valid;
  sprite_attr_t           attr    [N_SPRITES];
  logic [2:0]             mux_src;

  assign b_rd_en   = fc_busy ? fc_rd_en   : tg_rd_en;
  assign b_rd_addr = fc_busy ? fc_rd_addr : tg_rd_addr;

  shared_ram #(.N_TILES(N_TILES), .ADDR_W(ADDR_W)) u_shared_ram (
    .clk, .reset,
    .chipselect, .read, .write, .address, .byteenable, .writedata, .readdata,
    .rd_en     (b_rd_en),
    .rd_addr   (b_rd_addr),
    .rd_data   (b_rd_data),
    .set_ready (set_ready),
    .clr_ready (clr_ready),
    .ready     (ready)
  );

  vga_driver #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .CLK_DIV(CLK_DIV), .PIXEL_LAT(3)
  ) u_vga (
    .clk, .reset,
    .pix_en, .hcount, .vcount, .active,
    .pixel,
    .vga_r, .vga_g, .vga_b, .vga_clk, .vga_hs, .vga_vs, .vga_blank_n, .vga_sync_n
  );

  frame_ctrl #(.V_ACTIVE(V_ACTIVE), .V_TOTAL(V_TOTAL), .ADDR_W(ADDR_W)) u_frame (
    .clk, .reset, .pix_en, .hcount, .vcount,
    .busy      (fc_busy),
    .rd_en     (fc_rd_en),
    .rd_addr   (fc_rd_addr),
    .rd_data   (b_rd_data),
    .attr_we, .attr_idx, .attr_word,
    .set_ready, .clr_ready, .frame_loaded
  );

  tile_generator #(
    .TILE_COLS(TILE_COLS), .TILE_ROWS(TILE_ROWS), .TILE_PX(TILE_PX),
    .TILE_IMG_PX(TILE_IMG_PX), .N_TILE_IMAGES(N_TILE_IMAGES),
    .MAP_BASE(SPRITE_WORDS), .ADDR_W(ADDR_W), .PAT_ADDR_W(16)
  ) u_tiles (
    .clk, .pix_en, .hcount, .vcount, .active,
    .map_rd_en   (tg_rd_en),
    .map_rd_addr (tg_rd_addr),
    .map_rd_data (b_rd_data),
    .pat_we      (pat_we && pat_tile),
    .pat_waddr   (pat_addr),
    .pat_wdata   (pat_wdata),
    .tile_pix    (tile_pix)
  );

  sprite_generator #(
    .SPR_PX(SPR_PX), .SPR_IMG_PX(SPR_IMG_PX), .SPR_IMAGES(SPR_IMAGES), .PAT_ADDR_W(11)
  ) u_sprites (
    .clk, .reset, .pix_en, .hcount, .vcount,
    .attr_we, .attr_idx, .attr_word,
    .pat_we     (pat_we && !pat_tile),
    .pat_sprite (pat_addr[13:11]),
    .pat_waddr  (pat_addr[10:0]),
    .pat_wdata  (pat_wdata),
    .spr_pix, .spr_valid, .attr
  );

  image_mux u_mux (
    .clk, .reset, .pix_en,
    .tile_pix, .spr_pix, .spr_valid,
    .pixel, .src (mux_src)
  );

endmodule
