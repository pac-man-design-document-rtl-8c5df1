// tb_image_mux: self-checking test of the layer multiplexer.
// Random tile and sprite pixels and valid bits; the expected output (first
// valid sprite by index, else the tile) is computed here and compared one
// strobe later. Strobes arrive every second clock.
module tb_image_mux;
  import pacman_pkg::*;
  logic clk = 0, reset, pix_en;
  pixel_t tile_pix, pixel;
  pixel_t spr_pix [N_SPRITES];
  logic [N_SPRITES-1:0] spr_valid;
  logic [2:0] src;
  int checks = 0, failures = 0;
  int seen_src [N_SPRITES+1];

  image_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pixel_t exp_pix;
    int exp_src;
    reset = 1; pix_en = 0; tile_pix = 0; spr_valid = 0;
    for (int s = 0; s < int'(N_SPRITES); s++) spr_pix[s] = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 2000; i++) begin
      tile_pix = 8'($urandom);
      for (int s = 0; s < int'(N_SPRITES); s++) spr_pix[s] = 8'($urandom);
      spr_valid = N_SPRITES'($urandom) & N_SPRITES'($urandom);
      exp_pix = tile_pix; exp_src = N_SPRITES;
      for (int s = 0; s < int'(N_SPRITES); s++)
        if (spr_valid[s] && exp_src == int'(N_SPRITES)) begin
          exp_pix = spr_pix[s]; exp_src = s;
        end
      pix_en = 1;
      @(negedge clk);
      pix_en = 0;
      // change inputs on a non-strobe clock: output must hold
      tile_pix = ~tile_pix;
      @(negedge clk);
      checks++;
      if (pixel !== exp_pix || int'(src) != exp_src) begin
        failures++;
        $display("FAIL: valid=%b got %h/%0d expected %h/%0d", spr_valid, pixel, src, exp_pix, exp_src);
      end
      seen_src[exp_src]++;
    end
    for (int s = 0; s <= int'(N_SPRITES); s++) begin
      checks++;
      if (seen_src[s] == 0) begin
        failures++;
        $display("FAIL: layer %0d never selected", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
