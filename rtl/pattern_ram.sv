// pattern_ram: on-chip image memory for tile or sprite images.
//
// A simple dual-port memory of DEPTH 8-bit pixels (RGB332). The write port
// loads images (one pixel per clock); the read port is used by a generator
// during scan-out and returns the pixel one clock after rd_en, holding it
// otherwise. Reads beyond DEPTH return 0. Images are stored row by row: the
// pixel (px, py) of image n is at n*IMG_PX*IMG_PX + py*IMG_PX + px.
// The memory starts cleared in simulation; the image contents are loaded by
// the system through the write port (the artwork itself is not part of this
// RTL).
module pattern_ram #(
  parameter int unsigned DEPTH  = 2048,
  parameter int unsigned ADDR_W = 11
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [7:0]        wdata,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] raddr,
  output logic [7:0]        rdata
);

  logic [7:0] mem [DEPTH];

  initial begin
    assert (DEPTH <= (1 << ADDR_W)) else $fatal(1, "pattern_ram: ADDR_W too small");
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = 8'h00;
  end

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : 8'h00;
  end

endmodule
