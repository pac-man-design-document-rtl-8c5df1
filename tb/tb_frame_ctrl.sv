// tb_frame_ctrl: self-checking test of the frame/READY controller.
// A short frame (8 lines of 40 strobes, 4 visible) with a strobe every
// second clock. A model of shared RAM port B returns a known word for each
// address one clock after rd_en. Over several frames the test checks: READY
// is cleared exactly on the first strobe of the last line and set exactly on
// the first strobe of line V_ACTIVE; the 15 sprite words arrive in order,
// each with its own data; busy covers the copy and is low during the
// visible lines; frame_loaded pulses once per frame; the copy takes
// SPRITE_WORDS + 1 strobes.
module tb_frame_ctrl;
  import pacman_pkg::*;
  localparam int V_ACTIVE = 4, V_TOTAL = 8, H_TOTAL = 40, ADDR_W = 11, FRAMES = 4;

  logic clk = 0, reset, pix_en;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic busy, rd_en, attr_we, set_ready, clr_ready, frame_loaded;
  logic [ADDR_W-1:0] rd_addr;
  logic [15:0] rd_data, attr_word;
  logic [3:0] attr_idx;
  int checks = 0, failures = 0;

  frame_ctrl #(.V_ACTIVE(V_ACTIVE), .V_TOTAL(V_TOTAL), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] word_at(int a);
    return 16'(a * 16'h1357 + 16'h0a5a);
  endfunction
  always_ff @(posedge clk) if (rd_en) rd_data <= word_at(int'(rd_addr));

  initial begin
    repeat (H_TOTAL * V_TOTAL * 2 * (FRAMES + 2)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int next_idx = 0, loads = 0, sets = 0, clrs = 0, busy_strobes = 0;
    reset = 1; pix_en = 0; hcount = 0; vcount = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int f = 0; f < FRAMES; f++) begin
      for (int v = 0; v < V_TOTAL; v++)
        for (int h = 0; h < H_TOTAL; h++) begin
          hcount = 11'(h); vcount = 10'(v);
          pix_en = 1;
          #1;
          check(set_ready == (v == V_ACTIVE && h == 0), $sformatf("set_ready at %0d,%0d", h, v));
          check(clr_ready == (v == V_TOTAL - 1 && h == 0), $sformatf("clr_ready at %0d,%0d", h, v));
          if (v < V_ACTIVE) check(!busy, "busy during visible lines");
          if (set_ready) sets++;
          if (clr_ready) begin clrs++; next_idx = 0; busy_strobes = 0; end
          if (busy) busy_strobes++;
          if (attr_we) begin
            check(int'(attr_idx) == next_idx, $sformatf("attr_idx %0d expected %0d", attr_idx, next_idx));
            check(attr_word == word_at(next_idx), $sformatf("word %0d data", next_idx));
            next_idx++;
          end
          @(negedge clk);
          if (frame_loaded) begin
            loads++;
            check(next_idx == int'(SPRITE_WORDS), $sformatf("%0d words copied", next_idx));
            check(busy_strobes == int'(SPRITE_WORDS) + 1, $sformatf("copy took %0d strobes", busy_strobes));
          end
          pix_en = 0;
          @(negedge clk);
          check(!attr_we && !set_ready && !clr_ready, "no action between strobes");
        end
    end
    check(loads == FRAMES && sets == FRAMES && clrs == FRAMES,
          $sformatf("per-frame events loads=%0d sets=%0d clears=%0d", loads, sets, clrs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
