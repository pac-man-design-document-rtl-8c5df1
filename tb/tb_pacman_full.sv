// tb_pacman_full: end-to-end test of the graphics subsystem at its full
// size: 640x480 at 60 Hz from a 50 MHz clock, a 40x30 tile map, 44 tile
// images and five sprites. Two frames are drawn and every visible pixel is
// checked; see pacman_env for what is driven and checked.
module tb_pacman_full;
  logic clk = 0, reset;
  logic chipselect, read, write, ready, pat_we, pat_tile;
  logic [10:0] address;
  logic [1:0] byteenable;
  logic [15:0] writedata, readdata, pat_addr;
  logic [7:0] pat_wdata, vga_r, vga_g, vga_b;
  logic vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;

  always #10 clk = ~clk;

  pacman_top dut (.*);

  pacman_env #(.FRAMES(2), .WATCHDOG(5000000)) env (.*);
endmodule
