// tb_pacman_top: end-to-end test of the graphics subsystem on a reduced
// screen: an 8x6 grid of 16-pixel tiles (128x96 visible, short porches),
// 6 tile images, full-size sprites. Two frames are drawn and every visible
// pixel is checked; see pacman_env for what is driven and checked.
module tb_pacman_top;
  localparam int COLS = 8, ROWS = 6, NIMG = 6, ADDR_W = 7;
  localparam int H_ACTIVE = 128, H_FP = 4, H_SYNC = 8, H_BP = 4;
  localparam int V_ACTIVE = 96, V_FP = 2, V_SYNC = 2, V_BP = 4;

  logic clk = 0, reset;
  logic chipselect, read, write, ready, pat_we, pat_tile;
  logic [ADDR_W-1:0] address;
  logic [1:0] byteenable;
  logic [15:0] writedata, readdata, pat_addr;
  logic [7:0] pat_wdata, vga_r, vga_g, vga_b;
  logic vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;

  always #10 clk = ~clk;

  pacman_top #(
    .TILE_COLS(COLS), .TILE_ROWS(ROWS), .N_TILE_IMAGES(NIMG),
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .ADDR_W(ADDR_W)
  ) dut (.*);

  pacman_env #(
    .TILE_COLS(COLS), .TILE_ROWS(ROWS), .N_TILE_IMAGES(NIMG),
    .H_TOTAL(H_ACTIVE + H_FP + H_SYNC + H_BP), .V_TOTAL(V_ACTIVE + V_FP + V_SYNC + V_BP),
    .ADDR_W(ADDR_W), .FRAMES(3), .WATCHDOG(400000)
  ) env (.*);
endmodule
