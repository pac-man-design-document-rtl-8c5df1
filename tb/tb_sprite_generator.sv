// tb_sprite_generator: self-checking test of the sprite layer.
// Loads random 16x16 images (about a quarter of the pixels transparent) for
// all five sprites, then for several random sprite tables (positions packed
// into a 160x120 area so that sprites overlap, random flips and images)
// writes the 15 attribute words and scans every pixel of the area. Each
// sprite's spr_valid/spr_pix two strobes later is compared with a reference
// computed here from the table and the images (32x32 on screen, every stored
// pixel shown as a 2x2 block). Hits, transparent pixels and both flips are
// counted and must all occur.
module tb_sprite_generator;
  import pacman_pkg::*;
  localparam int SPX = 32, IPX = 16, NIMG = 8;
  localparam int W = 160, H = 120;

  logic clk = 0, reset, pix_en;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic attr_we;
  logic [3:0] attr_idx;
  logic [15:0] attr_word;
  logic pat_we;
  logic [2:0] pat_sprite;
  logic [10:0] pat_waddr;
  logic [7:0] pat_wdata;
  pixel_t spr_pix [N_SPRITES];
  logic [N_SPRITES-1:0] spr_valid;
  sprite_attr_t attr [N_SPRITES];
  int checks = 0, failures = 0;
  int n_hit = 0, n_transp = 0, n_hflip = 0, n_vflip = 0;

  logic [7:0] pat [N_SPRITES][NIMG * IPX * IPX];
  int sx [N_SPRITES], sy [N_SPRITES], simg [N_SPRITES];
  bit shf [N_SPRITES], svf [N_SPRITES];

  sprite_generator #(.SPR_PX(SPX), .SPR_IMG_PX(IPX), .SPR_IMAGES(NIMG), .PAT_ADDR_W(11)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: in_spr?, pixel
  task automatic ref_pix(input int s, input int h, input int v, output bit in_spr, output pixel_t p);
    int dx, dy;
    dx = h - sx[s]; dy = v - sy[s];
    in_spr = dx >= 0 && dx < SPX && dy >= 0 && dy < SPX;
    if (shf[s]) dx = SPX - 1 - dx;
    if (svf[s]) dy = SPX - 1 - dy;
    p = in_spr ? pat[s][simg[s] * IPX * IPX + (dy / 2) * IPX + dx / 2] : 8'h00;
  endtask

  initial begin
    int hq [$], vq [$];
    reset = 1; pix_en = 0; hcount = 0; vcount = 0; attr_we = 0; attr_idx = 0; attr_word = 0;
    pat_we = 0; pat_sprite = 0; pat_waddr = 0; pat_wdata = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int s = 0; s < int'(N_SPRITES); s++)
      for (int a = 0; a < NIMG * IPX * IPX; a++) begin
        pat[s][a] = ($urandom_range(0, 3) == 0) ? 8'h00 : 8'($urandom_range(1, 255));
        pat_we = 1; pat_sprite = 3'(s); pat_waddr = 11'(a); pat_wdata = pat[s][a];
        @(negedge clk);
      end
    pat_we = 0;

    for (int round = 0; round < 4; round++) begin
      // new table, loaded word by word; unused upper bits are random
      for (int s = 0; s < int'(N_SPRITES); s++) begin
        sx[s] = $urandom_range(0, W - 8); sy[s] = $urandom_range(0, H - 8);
        simg[s] = $urandom_range(0, NIMG - 1);
        shf[s] = 1'($urandom); svf[s] = 1'($urandom);
        if (round == 0) begin shf[s] = s[0]; svf[s] = s[1]; end
        for (int f = 0; f < 3; f++) begin
          logic [15:0] w;
          w = 16'($urandom);
          case (f)
            0: w[9:0] = 10'(sx[s]);
            1: begin w[8:0] = 9'(sy[s]); end
            default: begin w[5] = shf[s]; w[4] = svf[s]; w[2:0] = 3'(simg[s]); end
          endcase
          attr_we = 1; attr_idx = 4'(3 * s + f); attr_word = w;
          @(negedge clk);
        end
      end
      attr_we = 0;
      for (int s = 0; s < int'(N_SPRITES); s++) begin
        checks++;
        if (int'(attr[s].x) != sx[s] || int'(attr[s].y) != sy[s] || int'(attr[s].img) != simg[s] ||
            attr[s].hflip != shf[s] || attr[s].vflip != svf[s]) begin
          failures++;
          $display("FAIL attributes of sprite %0d", s);
        end
      end
      hq.delete(); vq.delete();
      for (int t = 0; t < W * H + 2; t++) begin
        hcount = 11'(t % W); vcount = 10'(t / W);
        hq.push_back(t % W); vq.push_back(t / W);
        pix_en = 1;
        @(negedge clk);
        pix_en = 0;
        @(negedge clk);
        if (hq.size() == 3) begin
          void'(hq.pop_front());
          void'(vq.pop_front());
        end
        if (t >= 1) begin
          for (int s = 0; s < int'(N_SPRITES); s++) begin
            bit in_spr;
            pixel_t p;
            ref_pix(s, hq[0], vq[0], in_spr, p);
            checks++;
            if (spr_valid[s] != (in_spr && p != 8'h00) || (spr_valid[s] && spr_pix[s] != p)) begin
              failures++;
              if (failures < 10)
                $display("FAIL sprite %0d at %0d,%0d: got %b/%h expected %b/%h", s, hq[0], vq[0],
                         spr_valid[s], spr_pix[s], in_spr && p != 0, p);
            end
            if (in_spr && p != 0) n_hit++;
            if (in_spr && p == 0) n_transp++;
            if (in_spr && shf[s]) n_hflip++;
            if (in_spr && svf[s]) n_vflip++;
          end
        end
      end
    end
    checks++;
    if (n_hit == 0 || n_transp == 0 || n_hflip == 0 || n_vflip == 0) begin
      failures++;
      $display("FAIL coverage hit=%0d transparent=%0d hflip=%0d vflip=%0d", n_hit, n_transp, n_hflip, n_vflip);
    end
    $display("sprite pixels %0d, transparent %0d", n_hit, n_transp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
