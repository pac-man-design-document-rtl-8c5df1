// image_mux: merges the sprite layer over the tile layer.
//
// Sprites are always drawn over tiles. Among the sprites, the lower index
// wins: sprite 0 (Pac-Man) over ghost 1 over ghost 2 and so on, so Pac-Man
// has the highest priority, then the ghosts, then the tiles (pellets and
// maze). A sprite takes part only where its spr_valid bit is set (inside the
// sprite and not transparent). The result is registered on pix_en, adding
// one strobe of latency; src tells which layer supplied the pixel
// (0..N_SPRITES-1 for a sprite, N_SPRITES for the tiles). The order of
// Pac-Man, ghosts and tiles follows the design; the order among the ghosts
// is this implementation's choice.
module image_mux (
  input  logic                             clk,
  input  logic                             reset,
  input  logic                             pix_en,
  input  pacman_pkg::pixel_t               tile_pix,
  input  pacman_pkg::pixel_t               spr_pix   [pacman_pkg::N_SPRITES],
  input  logic [pacman_pkg::N_SPRITES-1:0] spr_valid,
  output pacman_pkg::pixel_t               pixel,
  output logic [2:0]                       src
);
  import pacman_pkg::*;

  pixel_t     sel;
  logic [2:0] sel_src;
  always_comb begin
    sel     = tile_pix;
    sel_src = 3'(N_SPRITES);
    for (int s = int'(N_SPRITES) - 1; s >= 0; s--) begin
      if (spr_valid[s]) begin
        sel     = spr_pix[s];
        sel_src = 3'(s);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      pixel <= '0;
      src   <= 3'(N_SPRITES);
    end else if (pix_en) begin
      pixel <= sel;
      src   <= sel_src;
    end
  end

endmodule
