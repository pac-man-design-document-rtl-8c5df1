// tb_vga_driver: self-checking test of the VGA timing and output stage.
// Uses a small screen (16x8 visible, short porches) and CLK_DIV = 2. The
// testbench keeps its own pixel and line counters, feeds back a pixel made
// from the coordinates of PIXEL_LAT strobes earlier, and checks after every
// strobe: the counters, the strobe spacing, and that colour, blanking and
// both syncs at the pins all belong to the same earlier pixel. It also
// checks the frame length in strobes.
module tb_vga_driver;
  import pacman_pkg::*;
  localparam int H_ACTIVE = 16, H_FP = 2, H_SYNC = 3, H_BP = 4;
  localparam int V_ACTIVE = 8,  V_FP = 1, V_SYNC = 2, V_BP = 2;
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int LAT = 3;
  localparam int FRAMES = 3;

  logic clk = 0, reset;
  logic pix_en, active, vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [10:0] hcount;
  logic [9:0] vcount;
  pixel_t pixel;
  logic [7:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0;

  vga_driver #(.H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
               .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
               .CLK_DIV(2), .PIXEL_LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (H_TOTAL * V_TOTAL * 2 * (FRAMES + 2)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pixel_t enc(int h, int v);
    return pixel_t'(h * 7 + v * 29 + 1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int hh [$], vv [$];
  initial begin
    int h = 0, v = 0, t = 0, since = 0, last_vs_fall = -1, frames = 0, clocks = 0;
    logic prev_vs = 1;
    reset = 1; pixel = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    while (frames < FRAMES) begin
      @(negedge clk);
      clocks++;
      if (!pix_en) continue;
      // spacing of strobes
      if (t > 0) check(clocks == 2, $sformatf("strobe spacing %0d", clocks));
      clocks = 0;
      check(int'(hcount) == h && int'(vcount) == v,
            $sformatf("counters %0d,%0d expected %0d,%0d", hcount, vcount, h, v));
      check(active == (h < H_ACTIVE && v < V_ACTIVE), "active flag");
      hh.push_back(h); vv.push_back(v);
      // pins now show the pixel presented LAT+1 strobes ago
      if (t > LAT + 1) begin
        int ph, pv;
        bit act, hs, vs;
        logic [23:0] exp;
        ph = hh[t - LAT - 1]; pv = vv[t - LAT - 1];
        act = ph < H_ACTIVE && pv < V_ACTIVE;
        hs = !(ph >= H_ACTIVE + H_FP && ph < H_ACTIVE + H_FP + H_SYNC);
        vs = !(pv >= V_ACTIVE + V_FP && pv < V_ACTIVE + V_FP + V_SYNC);
        exp = act ? rgb332_to_888(enc(ph, pv)) : 24'd0;
        check({vga_r, vga_g, vga_b} == exp, $sformatf("colour at %0d,%0d", ph, pv));
        check(vga_blank_n == act && vga_hs == hs && vga_vs == vs,
              $sformatf("sync/blank at %0d,%0d", ph, pv));
        if (prev_vs && !vga_vs) begin
          if (last_vs_fall >= 0)
            check(t - last_vs_fall == H_TOTAL * V_TOTAL, $sformatf("frame length %0d", t - last_vs_fall));
          last_vs_fall = t;
          frames++;
        end
        prev_vs = vga_vs;
      end
      // pixel input belongs to the counters of LAT strobes ago
      if (t >= LAT) pixel = enc(hh[t - LAT], vv[t - LAT]);
      t++;
      h++;
      if (h == H_TOTAL) begin
        h = 0;
        v = (v == V_TOTAL - 1) ? 0 : v + 1;
      end
    end
    check(vga_sync_n == 1'b1, "sync_n held high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
