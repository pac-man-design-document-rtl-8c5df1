// vga_driver: VGA timing generator and output stage.
//
// The design runs from one system clock (50 MHz on the target board); a
// pixel strobe pix_en, high one clock in CLK_DIV, advances the horizontal
// and vertical counters, giving the 25 MHz pixel rate of 640x480 at 60 Hz
// (800 x 525 pixel periods per frame). The counters (hcount, vcount) and
// the active-area flag are presented to the pixel generators at once. The
// generators answer with the pixel colour PIXEL_LAT strobes later; the
// driver delays its syncs and blanking by the same amount so that colour and
// sync leave the output register together. Outside the active area the
// colour outputs are forced to 0.
//
// Outputs follow the usual DE1-SoC VGA DAC pins: 8-bit R, G, B, active-low
// HS, VS, BLANK_n and SYNC_n (held high: no sync on green), and a pixel clock
// vga_clk whose rising edge falls in the middle of each output period.
// Only the role of the block (turn the multiplexed image into VGA output) is
// from the design; the timing numbers are the standard 640x480 mode.
module vga_driver #(
  parameter int unsigned H_ACTIVE  = 640,
  parameter int unsigned H_FP      = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BP      = 48,
  parameter int unsigned V_ACTIVE  = 480,
  parameter int unsigned V_FP      = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BP      = 33,
  parameter int unsigned CLK_DIV   = 2,
  parameter int unsigned PIXEL_LAT = 3
) (
  input  logic                 clk,
  input  logic                 reset,
  // to the pixel generators
  output logic                 pix_en,
  output logic [10:0]          hcount,
  output logic [9:0]           vcount,
  output logic                 active,
  // pixel from the image multiplexer, PIXEL_LAT strobes after hcount/vcount
  input  pacman_pkg::pixel_t   pixel,
  // VGA pins
  output logic [7:0]           vga_r,
  output logic [7:0]           vga_g,
  output logic [7:0]           vga_b,
  output logic                 vga_clk,
  output logic                 vga_hs,
  output logic                 vga_vs,
  output logic                 vga_blank_n,
  output logic                 vga_sync_n
);
  import pacman_pkg::*;

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned DIV_W   = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  initial begin
    assert (H_TOTAL <= 2048 && V_TOTAL <= 1024) else $fatal(1, "vga_driver: counters too narrow");
  end

  // pixel strobe
  logic [DIV_W-1:0] div_cnt;
  always_ff @(posedge clk) begin
    if (reset || 32'(div_cnt) == CLK_DIV - 1) div_cnt <= '0;
    else                                       div_cnt <= div_cnt + 1'b1;
  end
  assign pix_en = (32'(div_cnt) == CLK_DIV - 1);

  // counters
  always_ff @(posedge clk) begin
    if (reset) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_en) begin
      if (32'(hcount) == H_TOTAL - 1) begin
        hcount <= '0;
        vcount <= (32'(vcount) == V_TOTAL - 1) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  assign active = (32'(hcount) < H_ACTIVE) && (32'(vcount) < V_ACTIVE);

  logic hs_now, vs_now;
  assign hs_now = !((32'(hcount) >= H_ACTIVE + H_FP) && (32'(hcount) < H_ACTIVE + H_FP + H_SYNC));
  assign vs_now = !((32'(vcount) >= V_ACTIVE + V_FP) && (32'(vcount) < V_ACTIVE + V_FP + V_SYNC));

  // align active/syncs with the pixel pipeline: PIXEL_LAT stages here, then
  // the output register below
  logic [2:0] ctl_pipe [PIXEL_LAT+1];
  always_comb ctl_pipe[0] = {active, hs_now, vs_now};
  for (genvar i = 1; i <= int'(PIXEL_LAT); i++) begin : g_delay
    always_ff @(posedge clk) begin
      if (reset)       ctl_pipe[i] <= 3'b011;
      else if (pix_en) ctl_pipe[i] <= ctl_pipe[i-1];
    end
  end

  // output register
  logic [23:0] rgb;
  assign rgb = rgb332_to_888(pixel);
  always_ff @(posedge clk) begin
    if (reset) begin
      {vga_r, vga_g, vga_b} <= '0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
    end else if (pix_en) begin
      {vga_r, vga_g, vga_b} <= ctl_pipe[PIXEL_LAT][2] ? rgb : 24'd0;
      vga_hs      <= ctl_pipe[PIXEL_LAT][1];
      vga_vs      <= ctl_pipe[PIXEL_LAT][0];
      vga_blank_n <= ctl_pipe[PIXEL_LAT][2];
    end
  end

  assign vga_sync_n = 1'b1;
  // high during the second half of each pixel period
  assign vga_clk = (32'(div_cnt) >= CLK_DIV / 2);

endmodule
