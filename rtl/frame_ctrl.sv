// frame_ctrl: frame synchronisation between the processor and the graphics.
//
// The graphics hardware sets the pace of the game. The READY flag in the
// last word of the shared RAM tells the processor that it may write the
// next frame's sprite and tile data:
//   - after reset READY is 1;
//   - on the last line before the visible picture (vcount == V_TOTAL-1,
//     hcount == 0) READY is cleared and the controller copies the
//     SPRITE_WORDS words of the sprite attribute table into the sprite
//     generator's shadow registers, one word per pixel strobe, through
//     shared RAM port B (busy is high while it owns that port);
//   - when the last visible line has been scanned (vcount == V_ACTIVE,
//     hcount == 0) READY is set again.
// The processor therefore sees READY once per frame, 60 times a second, and
// has the vertical blanking interval to update the tables. The tile map is
// read during the scan by the tile generator. The READY flag, its address
// and the start-of-frame sprite read follow the design; the exact lines on
// which READY changes are this implementation's choice.
// The sprite table lies in the first SPRITE_WORDS words, so the upper bits
// of rd_addr are always 0, and attr_word is rd_data passed straight through.
module frame_ctrl #(
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_TOTAL  = 525,
  parameter int unsigned ADDR_W   = 11
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              pix_en,
  input  logic [10:0]       hcount,
  input  logic [9:0]        vcount,
  // shared RAM port B while busy
  output logic              busy,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [15:0]       rd_data,
  // to the sprite generator
  output logic              attr_we,
  output logic [3:0]        attr_idx,
  output logic [15:0]       attr_word,
  // READY flag control
  output logic              set_ready,
  output logic              clr_ready,
  // one pulse per frame, when the sprite copy has finished
  output logic              frame_loaded
);
  import pacman_pkg::*;

  typedef enum logic [0:0] {IDLE, LOAD} state_t;
  state_t      state;
  logic [4:0]  cnt;       // next word to request
  logic        pend;      // a requested word arrives on this strobe
  logic [3:0]  pend_idx;

  logic start;
  assign start     = pix_en && state == IDLE && 32'(vcount) == V_TOTAL - 1 && hcount == '0;
  assign set_ready = pix_en && 32'(vcount) == V_ACTIVE && hcount == '0;
  assign clr_ready = start;

  assign busy    = (state == LOAD);
  assign rd_en   = busy && pix_en && 32'(cnt) < SPRITE_WORDS;
  assign rd_addr = ADDR_W'(cnt);

  assign attr_we   = busy && pix_en && pend;
  assign attr_idx  = pend_idx;
  assign attr_word = rd_data;

  always_ff @(posedge clk) begin
    if (reset) begin
      state        <= IDLE;
      cnt          <= '0;
      pend         <= 1'b0;
      pend_idx     <= '0;
      frame_loaded <= 1'b0;
    end else begin
      frame_loaded <= 1'b0;
      if (start) begin
        state <= LOAD;
        cnt   <= '0;
        pend  <= 1'b0;
      end else if (busy && pix_en) begin
        pend     <= rd_en;
        pend_idx <= cnt[3:0];
        if (rd_en) cnt <= cnt + 1'b1;
        if (!rd_en && pend) begin
          state        <= IDLE;
          frame_loaded <= 1'b1;
        end
      end
    end
  end

  // the copy must end before the visible picture begins
  property p_load_done_before_scan;
    @(posedge clk) disable iff (reset) (vcount == '0 && hcount == 11'd64) |-> state == IDLE;
  endproperty
  assert property (p_load_done_before_scan);

endmodule
