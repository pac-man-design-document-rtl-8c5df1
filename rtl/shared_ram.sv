// shared_ram: the memory shared by the processor and the graphics hardware.
//
// It holds the sprite attribute table (words 0..14), the tile map (one word
// per tile, in raster order, starting at word 15) and, in its last word, the
// READY flag through which the graphics hardware tells the processor that it
// may write the next frame. Each word is 16 bits wide; sprite words use up
// to 10 of them and tile words 8, so that an x or y position is written in a
// single access.
//
// Port A (processor, Avalon-MM slave style): chipselect, read, write, a word
// address, byteenable, writedata and readdata. Writes take effect on the
// clock edge; readdata is valid one clock after read is asserted. Writes to
// the READY word are ignored: that flag is owned by the graphics hardware.
// Port B (graphics): read-only, rd_en/rd_addr in, rd_data valid one clock
// later. set_ready / clr_ready move the READY flag; set wins if both are
// high. After reset READY is 1, so software may write the first frame.
//
// The word map, 16-bit word width and READY word are from the design; the
// byte enables, read-only READY and read latency are choices made here.
module shared_ram #(
  parameter int unsigned N_TILES = 1200,
  parameter int unsigned ADDR_W  = 11
) (
  input  logic              clk,
  input  logic              reset,
  // port A: processor
  input  logic              chipselect,
  input  logic              read,
  input  logic              write,
  input  logic [ADDR_W-1:0] address,
  input  logic [1:0]        byteenable,
  input  logic [15:0]       writedata,
  output logic [15:0]       readdata,
  // port B: graphics
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [15:0]       rd_data,
  // READY flag
  input  logic              set_ready,
  input  logic              clr_ready,
  output logic              ready
);
  import pacman_pkg::*;

  localparam int unsigned DEPTH      = SPRITE_WORDS + N_TILES;  // words before READY
  localparam int unsigned READY_ADDR = DEPTH;

  initial begin
    assert (READY_ADDR < (1 << ADDR_W))
      else $fatal(1, "shared_ram: ADDR_W too small for %0d tiles", N_TILES);
  end

  logic [15:0] mem [DEPTH];

  // port A write, with byte enables
  always_ff @(posedge clk) begin
    if (chipselect && write && 32'(address) < DEPTH) begin
      if (byteenable[0]) mem[address][7:0]  <= writedata[7:0];
      if (byteenable[1]) mem[address][15:8] <= writedata[15:8];
    end
  end

  // port A read
  always_ff @(posedge clk) begin
    if (chipselect && read) begin
      if (address == ADDR_W'(READY_ADDR)) readdata <= {15'd0, ready};
      else if (32'(address) < DEPTH)  readdata <= mem[address];
      else                                readdata <= '0;
    end
  end

  // port B read
  always_ff @(posedge clk) begin
    if (rd_en) begin
      if (32'(rd_addr) < DEPTH) rd_data <= mem[rd_addr];
      else                          rd_data <= '0;
    end
  end

  // READY flag
  always_ff @(posedge clk) begin
    if (reset)          ready <= 1'b1;
    else if (set_ready) ready <= 1'b1;
    else if (clr_ready) ready <= 1'b0;
  end

endmodule
