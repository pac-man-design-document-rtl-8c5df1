// sprite_generator: the five moving objects (Pac-Man and four ghosts).
//
// Each sprite has a shadow register with its x and y position, two flip
// bits and an image number. The frame controller fills these registers from
// the sprite attribute table of the shared RAM at the start of each frame,
// one 16-bit word at a time (attr_we, attr_idx = 3*sprite + field, attr_word):
//   field 0: x = word[9:0]   field 1: y = word[8:0]
//   field 2: hflip = word[5], vflip = word[4], image = word[2:0]
// so the processor may rewrite the table while a frame is on screen.
//
// For the pixel (hcount, vcount) every sprite in parallel
//   stage 0: tests whether the pixel lies in its SPR_PX x SPR_PX square at
//            (x, y), mirrors the offset as requested, scales it to the
//            stored SPR_IMG_PX x SPR_IMG_PX image and reads its own image
//            memory (SPR_IMAGES images per sprite),
//   stage 1: receives the pixel,
//   stage 2: presents spr_pix[s] and spr_valid[s]; valid means the pixel
//            is inside the sprite and not TRANSPARENT (0).
// The two-strobe latency matches the tile generator. Sprite images are loaded
// through pat_we / pat_sprite / pat_waddr (image*SPR_IMG_PX^2 + y*SPR_IMG_PX
// + x) / pat_wdata. Field widths, the 16x16 stored and 32x32 shown sizes
// and the flip bits follow the design; the transparent colour, the bit
// positions of the flips and the per-sprite memories are this
// implementation's choices.
module sprite_generator #(
  parameter int unsigned SPR_PX     = 32,
  parameter int unsigned SPR_IMG_PX = 16,
  parameter int unsigned SPR_IMAGES = 8,
  parameter int unsigned PAT_ADDR_W = 11
) (
  input  logic                                   clk,
  input  logic                                   reset,
  input  logic                                   pix_en,
  input  logic [10:0]                            hcount,
  input  logic [9:0]                             vcount,
  // attribute load from the frame controller
  input  logic                                   attr_we,
  input  logic [3:0]                             attr_idx,
  input  logic [15:0]                            attr_word,
  // sprite image memory load port
  input  logic                                   pat_we,
  input  logic [2:0]                             pat_sprite,
  input  logic [PAT_ADDR_W-1:0]                  pat_waddr,
  input  logic [7:0]                             pat_wdata,
  // per-sprite pixel, two strobes after hcount/vcount
  output pacman_pkg::pixel_t                     spr_pix   [pacman_pkg::N_SPRITES],
  output logic [pacman_pkg::N_SPRITES-1:0]       spr_valid,
  // current attributes, for observation
  output pacman_pkg::sprite_attr_t               attr      [pacman_pkg::N_SPRITES]
);
  import pacman_pkg::*;

  localparam int unsigned IMG_SIZE  = SPR_IMG_PX * SPR_IMG_PX;
  localparam int unsigned PAT_DEPTH = SPR_IMAGES * IMG_SIZE;

  initial begin
    assert (PAT_DEPTH <= (1 << PAT_ADDR_W)) else $fatal(1, "sprite_generator: PAT_ADDR_W too small");
  end

  // shadow attribute registers
  always_ff @(posedge clk) begin
    if (reset) begin
      for (int s = 0; s < int'(N_SPRITES); s++) attr[s] <= '0;
    end else if (attr_we && 32'(attr_idx) < SPRITE_WORDS) begin
      case (32'(attr_idx) % WORDS_PER_SPRITE)
        0: attr[32'(attr_idx) / WORDS_PER_SPRITE].x <= attr_word[SPR_X_W-1:0];
        1: attr[32'(attr_idx) / WORDS_PER_SPRITE].y <= attr_word[SPR_Y_W-1:0];
        default: begin
          attr[32'(attr_idx) / WORDS_PER_SPRITE].hflip <= attr_word[5];
          attr[32'(attr_idx) / WORDS_PER_SPRITE].vflip <= attr_word[4];
          attr[32'(attr_idx) / WORDS_PER_SPRITE].img   <= attr_word[SPR_IMG_W-1:0];
        end
      endcase
    end
  end

  for (genvar s = 0; s < int'(N_SPRITES); s++) begin : g_spr
    // stage 0: hit test and image address
    logic [31:0] dx, dy, ox, oy, ix, iy;
    logic        hit0, hit1;
    logic [PAT_ADDR_W-1:0] raddr;
    pixel_t      pix1;
    always_comb begin
      dx    = 32'(hcount) - 32'(attr[s].x);
      dy    = 32'(vcount) - 32'(attr[s].y);
      hit0  = (32'(hcount) >= 32'(attr[s].x)) && (dx < SPR_PX) &&
              (32'(vcount) >= 32'(attr[s].y)) && (dy < SPR_PX);
      ox    = attr[s].hflip ? (SPR_PX - 1 - dx) : dx;
      oy    = attr[s].vflip ? (SPR_PX - 1 - dy) : dy;
      ix    = (ox * SPR_IMG_PX) / SPR_PX;
      iy    = (oy * SPR_IMG_PX) / SPR_PX;
      raddr = PAT_ADDR_W'(32'(attr[s].img) * IMG_SIZE + iy * SPR_IMG_PX + ix);
    end

    pattern_ram #(.DEPTH(PAT_DEPTH), .ADDR_W(PAT_ADDR_W)) u_images (
      .clk   (clk),
      .we    (pat_we && 32'(pat_sprite) == s),
      .waddr (pat_waddr),
      .wdata (pat_wdata),
      .rd_en (pix_en),
      .raddr (raddr),
      .rdata (pix1)
    );

    // stage 1 -> 2
    always_ff @(posedge clk) begin
      if (reset) begin
        hit1         <= 1'b0;
        spr_valid[s] <= 1'b0;
        spr_pix[s]   <= TRANSPARENT;
      end else if (pix_en) begin
        hit1         <= hit0;
        spr_valid[s] <= hit1 && (pix1 != TRANSPARENT);
        spr_pix[s]   <= pix1;
      end
    end
  end

endmodule
