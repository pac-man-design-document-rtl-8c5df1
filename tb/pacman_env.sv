// pacman_env: end-to-end stimulus and checker for pacman_top.
//
// Drives the processor port and the image load port of a pacman_top and
// watches its VGA pins, like the game software and a monitor would:
//   1. after reset, READY must be 1 (also read through the processor port);
//   2. loads random tile images and sprite images (about a quarter of the
//      sprite pixels transparent);
//   3. for each of FRAMES frames, while READY is 1: writes a new sprite
//      table (Pac-Man always overlapping ghost 1, one sprite crossing the
//      right edge, flips set) and rewrites the tile map (random images,
//      flips and some image numbers past the last image), reads a few words
//      back, waits for READY to fall, captures the whole visible picture
//      from the pins and compares every pixel with a reference picture
//      computed here from the tables and images;
//   4. checks the READY period against the frame length.
// It counts how often each mechanism occurred (each layer shown, Pac-Man
// hiding a ghost, a transparent sprite pixel showing the tile, flipped
// tiles and sprites, blank tiles, a sprite cut by the screen edge, the
// READY handshake) and counts a failure for any that never did. The
// geometry parameters must match those of the pacman_top it watches.
module pacman_env #(
  parameter int TILE_COLS = 40, TILE_ROWS = 30, TILE_PX = 16, TILE_IMG_PX = 32,
  parameter int N_TILE_IMAGES = 44, SPR_PX = 32, SPR_IMG_PX = 16, SPR_IMAGES = 8,
  parameter int H_TOTAL = 800, V_TOTAL = 525, CLK_DIV = 2, ADDR_W = 11,
  parameter int FRAMES = 2, WATCHDOG = 10000000
) (
  input  logic              clk,
  output logic              reset,
  output logic              chipselect,
  output logic              read,
  output logic              write,
  output logic [ADDR_W-1:0] address,
  output logic [1:0]        byteenable,
  output logic [15:0]       writedata,
  input  logic [15:0]       readdata,
  input  logic              ready,
  output logic              pat_we,
  output logic              pat_tile,
  output logic [15:0]       pat_addr,
  output logic [7:0]        pat_wdata,
  input  logic [7:0]        vga_r,
  input  logic [7:0]        vga_g,
  input  logic [7:0]        vga_b,
  input  logic              vga_clk,
  input  logic              vga_hs,
  input  logic              vga_vs,
  input  logic              vga_blank_n,
  input  logic              vga_sync_n
);
  import pacman_pkg::*;

  localparam int W = TILE_COLS * TILE_PX;
  localparam int H = TILE_ROWS * TILE_PX;
  localparam int N_TILES = TILE_COLS * TILE_ROWS;
  localparam int T_IMG = TILE_IMG_PX * TILE_IMG_PX;
  localparam int S_IMG = SPR_IMG_PX * SPR_IMG_PX;
  localparam int READY_ADDR = 15 + N_TILES;

  int checks = 0, failures = 0;

  // mechanism counters
  typedef enum int {
    M_PACMAN, M_GHOST, M_TILE, M_PAC_OVER_GHOST, M_TRANSPARENT, M_TILE_HFLIP,
    M_TILE_VFLIP, M_SPR_HFLIP, M_SPR_VFLIP, M_BLANK_TILE, M_EDGE_CUT, M_READY_CYCLE, M_COUNT
  } mech_t;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"Pac-Man pixel", "ghost pixel", "tile pixel",
    "Pac-Man over ghost", "transparent sprite pixel", "tile h-flip", "tile v-flip",
    "sprite h-flip", "sprite v-flip", "blank tile", "sprite cut by screen edge",
    "READY handshake"};

  // reference copies of everything written
  logic [7:0]  timg [N_TILE_IMAGES * T_IMG];
  logic [7:0]  simg [N_SPRITES][SPR_IMAGES * S_IMG];
  logic [15:0] tmap [N_TILES];
  int sx [N_SPRITES], sy [N_SPRITES], si [N_SPRITES];
  bit shf [N_SPRITES], svf [N_SPRITES];

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic host_write(input int a, input logic [15:0] d);
    @(negedge clk);
    chipselect = 1; write = 1; read = 0; address = ADDR_W'(a); byteenable = 2'b11; writedata = d;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  task automatic host_read(input int a, output logic [15:0] d);
    @(negedge clk);
    chipselect = 1; read = 1; write = 0; address = ADDR_W'(a);
    @(negedge clk);
    chipselect = 0; read = 0;
    d = readdata;
  endtask

  // reference picture
  function automatic pixel_t tile_ref(int x, int y, output bit blank);
    logic [15:0] w;
    int ox, oy;
    w = tmap[(y / TILE_PX) * TILE_COLS + x / TILE_PX];
    ox = x % TILE_PX; oy = y % TILE_PX;
    if (w[7]) ox = TILE_PX - 1 - ox;
    if (w[6]) oy = TILE_PX - 1 - oy;
    blank = int'(w[5:0]) >= N_TILE_IMAGES;
    if (blank) return 8'h00;
    return timg[int'(w[5:0]) * T_IMG + (oy * TILE_IMG_PX / TILE_PX) * TILE_IMG_PX
                + ox * TILE_IMG_PX / TILE_PX];
  endfunction

  function automatic pixel_t sprite_ref(int s, int x, int y, output bit in_spr);
    int dx, dy;
    dx = x - sx[s]; dy = y - sy[s];
    in_spr = dx >= 0 && dx < SPR_PX && dy >= 0 && dy < SPR_PX;
    if (!in_spr) return 8'h00;
    if (shf[s]) dx = SPR_PX - 1 - dx;
    if (svf[s]) dy = SPR_PX - 1 - dy;
    return simg[s][si[s] * S_IMG + (dy * SPR_IMG_PX / SPR_PX) * SPR_IMG_PX + dx * SPR_IMG_PX / SPR_PX];
  endfunction

  function automatic pixel_t pixel_ref(int x, int y, bit count);
    bit blank, in_spr;
    int winner;
    bit covered [N_SPRITES];
    pixel_t p, tp;
    winner = -1;
    p = 8'h00;
    for (int s = 0; s < int'(N_SPRITES); s++) begin
      pixel_t sp;
      sp = sprite_ref(s, x, y, in_spr);
      covered[s] = in_spr && sp != 8'h00;
      if (covered[s] && winner < 0) begin winner = s; p = sp; end
      if (count && in_spr && shf[s]) mech[M_SPR_HFLIP]++;
      if (count && in_spr && svf[s]) mech[M_SPR_VFLIP]++;
      if (count && in_spr && sp == 8'h00) mech[M_TRANSPARENT]++;
    end
    tp = tile_ref(x, y, blank);
    if (count) begin
      logic [15:0] w;
      w = tmap[(y / TILE_PX) * TILE_COLS + x / TILE_PX];
      if (winner == 0) mech[M_PACMAN]++;
      else if (winner > 0) mech[M_GHOST]++;
      else mech[M_TILE]++;
      if (covered[0] && covered[1]) mech[M_PAC_OVER_GHOST]++;
      if (winner < 0 && w[7]) mech[M_TILE_HFLIP]++;
      if (winner < 0 && w[6]) mech[M_TILE_VFLIP]++;
      if (winner < 0 && blank) mech[M_BLANK_TILE]++;
    end
    return (winner >= 0) ? p : tp;
  endfunction

  // READY period, in clocks
  int ready_rises = 0;
  longint last_rise = -1, clock_no = 0;
  always @(posedge clk) begin
    clock_no++;
  end
  always @(posedge ready) begin
    if (!reset) begin
      if (last_rise >= 0)
        check(clock_no - last_rise == longint'(H_TOTAL * V_TOTAL * CLK_DIV),
              $sformatf("READY period %0d clocks", clock_no - last_rise));
      last_rise = clock_no;
      ready_rises++;
    end
  end

  task automatic new_tables(int frame);
    logic [15:0] d;
    // sprites: Pac-Man, then ghost 1 overlapping it, others random
    for (int s = 0; s < int'(N_SPRITES); s++) begin
      sx[s] = $urandom_range(0, W - SPR_PX / 2);
      sy[s] = $urandom_range(0, H - SPR_PX);
      si[s] = $urandom_range(0, SPR_IMAGES - 1);
      shf[s] = 1'($urandom); svf[s] = 1'($urandom);
    end
    sx[1] = sx[0] + SPR_PX / 4; sy[1] = sy[0] + SPR_PX / 4;
    if (sx[1] > W - SPR_PX / 2) sx[1] = W - SPR_PX / 2;
    sx[4] = W - SPR_PX / 2;                 // crosses the right edge
    shf[2] = 1'b1; svf[3] = 1'b1;
    if (sx[4] + SPR_PX > W) mech[M_EDGE_CUT]++;
    for (int s = 0; s < int'(N_SPRITES); s++) begin
      host_write(3 * s,     16'(sx[s]));
      host_write(3 * s + 1, 16'(sy[s]));
      host_write(3 * s + 2, 16'({shf[s], svf[s], 1'b0, 3'(si[s])}));
    end
    for (int t = 0; t < N_TILES; t++) begin
      logic [5:0] img;
      img = ($urandom_range(0, 7) == 0) ? 6'($urandom_range(N_TILE_IMAGES, 63))
                                        : 6'($urandom_range(0, N_TILE_IMAGES - 1));
      tmap[t] = {8'h00, 2'($urandom), img};
      host_write(15 + t, tmap[t]);
    end
    // read back a few words through the processor port
    for (int s = 0; s < int'(N_SPRITES); s++) begin
      host_read(3 * s, d);
      check(d == 16'(sx[s]), $sformatf("read back x of sprite %0d", s));
    end
    host_read(15 + N_TILES - 1, d);
    check(d == tmap[N_TILES - 1], "read back last tile");
    host_read(READY_ADDR, d);
    check(d == 16'd1, $sformatf("READY still 1 after frame %0d tables were written", frame));
  endtask

  task automatic capture_and_compare();
    int x, y, bad;
    bit was_blank;
    bad = 0;
    // the new tables apply from the picture after READY falls
    @(negedge ready);
    mech[M_READY_CYCLE]++;
    x = 0; y = 0; was_blank = 1;
    while (y < H) begin
      @(posedge vga_clk);
      if (vga_blank_n) begin
        pixel_t e;
        logic [23:0] got;
        e = pixel_ref(x, y, 1'b1);
        got = {vga_r, vga_g, vga_b};
        checks++;
        if (got != rgb332_to_888(e)) begin
          failures++;
          bad++;
          if (bad < 10) $display("FAIL pixel %0d,%0d: got %h expected %h", x, y, got, rgb332_to_888(e));
        end
        x++;
        was_blank = 0;
      end else begin
        if (!was_blank) begin
          check(x == W, $sformatf("line %0d has %0d pixels", y, x));
          y++; x = 0;
        end
        was_blank = 1;
        check({vga_r, vga_g, vga_b} == 24'd0, "colour is black during blanking");
      end
    end
    check(vga_sync_n, "sync_n high");
    $display("frame checked, %0d mismatching pixels", bad);
  endtask

  initial begin
    logic [15:0] d;
    reset = 1; chipselect = 0; read = 0; write = 0; address = 0; byteenable = 0; writedata = 0;
    pat_we = 0; pat_tile = 0; pat_addr = 0; pat_wdata = 0;
    for (int m = 0; m < int'(M_COUNT); m++) mech[m] = 0;
    repeat (4) @(negedge clk);
    reset = 0;
    check(ready, "READY after reset");
    host_read(READY_ADDR, d);
    check(d == 16'd1, "READY word after reset");

    // images
    for (int a = 0; a < N_TILE_IMAGES * T_IMG; a++) begin
      timg[a] = 8'($urandom);
      @(negedge clk);
      pat_we = 1; pat_tile = 1; pat_addr = 16'(a); pat_wdata = timg[a];
    end
    for (int s = 0; s < int'(N_SPRITES); s++)
      for (int a = 0; a < SPR_IMAGES * S_IMG; a++) begin
        simg[s][a] = ($urandom_range(0, 3) == 0) ? 8'h00 : 8'($urandom_range(1, 255));
        @(negedge clk);
        pat_we = 1; pat_tile = 0; pat_addr = 16'((s << 11) | a); pat_wdata = simg[s][a];
      end
    @(negedge clk);
    pat_we = 0;

    for (int f = 0; f < FRAMES; f++) begin
      if (!ready) @(posedge ready);
      new_tables(f);
      capture_and_compare();
    end
    if (!ready) @(posedge ready);
    repeat (2) @(posedge clk);
    check(ready_rises >= FRAMES, $sformatf("READY rose %0d times", ready_rises));

    for (int m = 0; m < int'(M_COUNT); m++) begin
      $display("mechanism %-28s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism '%s' never happened", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
