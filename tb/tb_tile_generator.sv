// tb_tile_generator: self-checking test of the tile layer.
// A 4x3 grid of 4x4-pixel cells showing 8x8 stored images (every second
// stored pixel), 5 images, map at word 15. The testbench models the map RAM
// (one clock read latency), loads random images, writes random map words
// (including both flips and image numbers past the last image) and checks,
// for random pixels, the map address and the pixel two strobes later
// against a reference computed here.
module tb_tile_generator;
  import pacman_pkg::*;
  localparam int COLS = 4, ROWS = 3, PX = 4, IMG = 8, NIMG = 5, BASE = 15;
  localparam int ADDR_W = 6, PAT_W = 9;

  logic clk = 0, pix_en, active;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic map_rd_en;
  logic [ADDR_W-1:0] map_rd_addr;
  logic [15:0] map_rd_data;
  logic pat_we;
  logic [PAT_W-1:0] pat_waddr;
  logic [7:0] pat_wdata;
  pixel_t tile_pix;
  int checks = 0, failures = 0;
  int n_hflip = 0, n_vflip = 0, n_blank = 0;

  logic [15:0] map [1 << ADDR_W];
  logic [7:0] pat [NIMG * IMG * IMG];

  tile_generator #(.TILE_COLS(COLS), .TILE_ROWS(ROWS), .TILE_PX(PX), .TILE_IMG_PX(IMG),
                   .N_TILE_IMAGES(NIMG), .MAP_BASE(BASE), .ADDR_W(ADDR_W), .PAT_ADDR_W(PAT_W))
    dut (.*);

  always #5 clk = ~clk;

  // map RAM model
  always_ff @(posedge clk) if (map_rd_en) map_rd_data <= map[map_rd_addr];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pixel_t expected(int h, int v);
    logic [15:0] w;
    int ox, oy;
    w = map[BASE + (v / PX) * COLS + h / PX];
    ox = h % PX; oy = v % PX;
    if (w[7]) ox = PX - 1 - ox;
    if (w[6]) oy = PX - 1 - oy;
    if (int'(w[5:0]) >= NIMG) return 8'h00;
    return pat[int'(w[5:0]) * IMG * IMG + (oy * IMG / PX) * IMG + ox * IMG / PX];
  endfunction

  initial begin
    int hq [$], vq [$];
    pix_en = 0; active = 0; hcount = 0; vcount = 0; pat_we = 0; pat_waddr = 0; pat_wdata = 0;
    for (int i = 0; i < (1 << ADDR_W); i++) map[i] = 16'hdead;
    for (int i = 0; i < COLS * ROWS; i++) begin
      logic [5:0] img;
      img = ($urandom_range(0, 5) == 0) ? 6'($urandom_range(NIMG, 63)) : 6'($urandom_range(0, NIMG - 1));
      map[BASE + i] = {8'($urandom), 2'($urandom), img};
    end
    map[BASE] [7:6] = 2'b10;   // make sure both flips occur
    map[BASE + 1][7:6] = 2'b01;
    @(negedge clk);
    for (int a = 0; a < NIMG * IMG * IMG; a++) begin
      pat[a] = 8'($urandom);
      pat_we = 1; pat_waddr = PAT_W'(a); pat_wdata = pat[a];
      @(negedge clk);
    end
    pat_we = 0;

    for (int t = 0; t < 3000; t++) begin
      int h, v;
      if (t < COLS * PX * ROWS * PX) begin h = t % (COLS * PX); v = t / (COLS * PX); end
      else begin h = $urandom_range(0, COLS * PX - 1); v = $urandom_range(0, ROWS * PX - 1); end
      hcount = 11'(h); vcount = 10'(v); active = 1; pix_en = 1;
      #1;
      checks++;
      if (int'(map_rd_addr) != BASE + (v / PX) * COLS + h / PX || !map_rd_en) begin
        failures++;
        $display("FAIL map address %0d for %0d,%0d", map_rd_addr, h, v);
      end
      hq.push_back(h); vq.push_back(v);
      @(negedge clk);
      // non-strobe clock with other inputs: pipeline must hold
      pix_en = 0; hcount = 11'($urandom_range(0, COLS * PX - 1));
      @(negedge clk);
      // tile_pix now belongs to the pixel presented one strobe before this one
      if (hq.size() == 3) begin
        void'(hq.pop_front());
        void'(vq.pop_front());
      end
      if (t >= 1) begin
        int ph, pv;
        logic [15:0] w;
        ph = hq[0]; pv = vq[0];
        w = map[BASE + (pv / PX) * COLS + ph / PX];
        checks++;
        if (tile_pix !== expected(ph, pv)) begin
          failures++;
          $display("FAIL pixel %0d,%0d: got %h expected %h", ph, pv, tile_pix, expected(ph, pv));
        end
        if (w[7]) n_hflip++;
        if (w[6]) n_vflip++;
        if (int'(w[5:0]) >= NIMG) n_blank++;
      end
    end
    checks++;
    if (n_hflip == 0 || n_vflip == 0 || n_blank == 0) begin
      failures++;
      $display("FAIL coverage hflip=%0d vflip=%0d blank=%0d", n_hflip, n_vflip, n_blank);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
