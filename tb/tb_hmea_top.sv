// tb_hmea_top: end-to-end test of the motion estimator at its default CIF
// size (352x288).
// 1. A previous frame (smoothed random texture) and a current frame (the
//    previous one moved by a known vector on the left half, fresh texture on
//    the right half) are generated and streamed through the downsampler. Every
//    level-1 and level-0 word is checked against the 2x2 mean computed here,
//    and the words are stored to form the frame store.
// 2. Macroblocks at the corners, edges and inside of the frame are searched.
//    A reference model written here runs the same three-level search on the
//    stored pyramid and the results (level-0 candidates, level-1 MV, final MV
//    and SAD, half-pel MV and SAD, four 8x8-mode MVs and SADs) and the cycle
//    count (780 per macroblock) are compared.
// It also counts how often the design's mechanisms occur (window clamped at
// the frame edge, duplicate level-0 position rejected, second level-0
// candidate winning at level 1, known motion recovered, the last position
// read out of the accumulator winning) and fails if one
// never did.
module tb_hmea_top;
  import hmea_pkg::*;

  localparam int W = 352;
  localparam int H = 288;
  localparam int MVX = 6;     // true motion of the left half
  localparam int MVY = -9;
  localparam int FAR = 20;    // true motion (+FAR,+FAR) of the bottom-right quarter
  localparam int CYCLES_PER_MB = 780;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // DUT signals
  logic       ds_valid, ds_sof;
  pix_t       ds_pix [4];
  logic       l1_valid, l0_valid;
  logic [9:0] l1_x, l1_y, l0_x, l0_y;
  pix_t       l1_pix [4], l0_pix [4];
  logic       start;
  logic [7:0] mb_x, mb_y;
  logic       busy, done;
  mv_t        mv, mv1, hmv;
  sad_t       sad, hsad;
  mv_t        cand [2];
  mv_t        mv8 [4];
  sad_t       sad8 [4];
  logic       rd_en;
  level_e     rd_lvl;
  crd_t       cur_x [2], ref_x [3];
  crd_t       cur_y, ref_y;
  pix_t       cur_pix [2], ref_pix [3];

  hmea_top dut (
    .clk, .rst_n,
    .ds_valid_i(ds_valid), .ds_sof_i(ds_sof), .ds_pix_i(ds_pix),
    .l1_valid_o(l1_valid), .l1_x_o(l1_x), .l1_y_o(l1_y), .l1_pix_o(l1_pix),
    .l0_valid_o(l0_valid), .l0_x_o(l0_x), .l0_y_o(l0_y), .l0_pix_o(l0_pix),
    .start_i(start), .mb_x_i(mb_x), .mb_y_i(mb_y), .busy_o(busy), .done_o(done),
    .mv_o(mv), .sad_o(sad), .hmv_o(hmv), .hsad_o(hsad), .cand_o(cand), .mv1_o(mv1), .mv8_o(mv8), .sad8_o(sad8),
    .rd_en_o(rd_en), .rd_lvl_o(rd_lvl), .cur_x_o(cur_x), .cur_y_o(cur_y),
    .ref_x_o(ref_x), .ref_y_o(ref_y), .cur_pix_i(cur_pix), .ref_pix_i(ref_pix)
  );

  // frame store: [frame][level] images, frame 0 = current, 1 = previous
  pix_t img2 [2][H][W];
  pix_t img1 [2][H/2][W/2];
  pix_t img0 [2][H/4][W/4];
  int   sel_frame;  // which frame the downsampler output is stored as

  function automatic pix_t px(int f, int lvl, int x, int y);
    int ww = W >> (2 - lvl);
    int hh = H >> (2 - lvl);
    if (x < 0) x = 0;
    if (y < 0) y = 0;
    if (x > ww - 1) x = ww - 1;
    if (y > hh - 1) y = hh - 1;
    case (lvl)
      0:       return img0[f][y][x];
      1:       return img1[f][y][x];
      default: return img2[f][y][x];
    endcase
  endfunction

  // frame-store read port, one cycle of latency
  always_ff @(posedge clk) begin
    if (rd_en) begin
      for (int i = 0; i < 2; i++) cur_pix[i] <= px(0, int'(rd_lvl), int'(cur_x[i]), int'(cur_y));
      for (int i = 0; i < 3; i++) ref_pix[i] <= px(1, int'(rd_lvl), int'(ref_x[i]), int'(ref_y));
    end
  end

  // capture and check the downsampler output (outputs are undefined until
  // the first clock edge in reset, so nothing is sampled during reset)
  int n_l1 = 0, n_l0 = 0;
  always_ff @(posedge clk) begin
    if (rst_n && l1_valid) begin
      n_l1++;
      for (int i = 0; i < 4; i++) begin
        int xx, yy, s;
        xx = 4*int'(l1_x) + i;
        yy = int'(l1_y);
        s = int'(img2[sel_frame][2*yy][2*xx]) + int'(img2[sel_frame][2*yy][2*xx+1])
              + int'(img2[sel_frame][2*yy+1][2*xx]) + int'(img2[sel_frame][2*yy+1][2*xx+1]);
        img1[sel_frame][yy][xx] = l1_pix[i];
        checks++;
        if (int'(l1_pix[i]) != s / 4) begin
          failures++;
          if (failures < 10) $display("level-1 pixel (%0d,%0d): got %0d expected %0d", xx, yy, l1_pix[i], s/4);
        end
      end
    end
    if (rst_n && l0_valid) begin
      n_l0++;
      for (int i = 0; i < 4; i++) begin
        int xx, yy, s;
        xx = 4*int'(l0_x) + i;
        yy = int'(l0_y);
        s = 0;
        for (int a = 0; a < 4; a++)
          for (int b = 0; b < 4; b++) s += int'(img2[sel_frame][4*yy+b][4*xx+a]);
        img0[sel_frame][yy][xx] = l0_pix[i];
        // two truncating means in a row equal the 4x4 mean only up to the
        // rounding of the first stage, so compare with the two-stage value
        s = 0;
        for (int a = 0; a < 2; a++)
          for (int b = 0; b < 2; b++) begin
            int q;
            q = int'(img2[sel_frame][4*yy+2*b][4*xx+2*a]) + int'(img2[sel_frame][4*yy+2*b][4*xx+2*a+1])
                  + int'(img2[sel_frame][4*yy+2*b+1][4*xx+2*a]) + int'(img2[sel_frame][4*yy+2*b+1][4*xx+2*a+1]);
            s += q / 4;
          end
        checks++;
        if (int'(l0_pix[i]) != s / 4) begin
          failures++;
          if (failures < 10) $display("level-0 pixel (%0d,%0d): got %0d expected %0d", xx, yy, l0_pix[i], s/4);
        end
      end
    end
  end

  task automatic downsample(int f);
    sel_frame = f;
    for (int y = 0; y < H; y++)
      for (int w = 0; w < W/4; w++) begin
        ds_valid <= 1'b1;
        ds_sof   <= (y == 0 && w == 0);
        for (int i = 0; i < 4; i++) ds_pix[i] <= img2[f][y][4*w+i];
        @(posedge clk);
      end
    ds_valid <= 1'b0;
    ds_sof   <= 1'b0;
    repeat (10) @(posedge clk);
  endtask

  // ---------------- reference model of the search ----------------
  function automatic int sad_at(int lvl, int bx, int by, int bs_x, int bs_y, int px_, int py_);
    int s = 0;
    for (int j = 0; j < bs_y; j++)
      for (int i = 0; i < bs_x; i++) begin
        int c = int'(px(0, lvl, bx + i, by + j));
        int r = int'(px(1, lvl, bx + i + px_, by + j + py_));
        s += (c > r) ? c - r : r - c;
      end
    return s;
  endfunction

  // previous-frame pixel half a pixel from integer position (x, y) in
  // direction (dx, dy): mean of the 2 or 4 integer pixels, truncated
  function automatic int hpix2(int x, int y, int dx, int dy);
    int s;
    if (dy == 0) return (int'(px(1, 2, x, y)) + int'(px(1, 2, x + dx, y))) / 2;
    if (dx == 0) return (int'(px(1, 2, x, y)) + int'(px(1, 2, x, y + dy))) / 2;
    s = int'(px(1, 2, x, y)) + int'(px(1, 2, x + dx, y)) + int'(px(1, 2, x, y + dy)) + int'(px(1, 2, x + dx, y + dy));
    return s / 4;
  endfunction

  int n_half = 0;
  int n_clamp = 0, n_dup = 0, n_cand2 = 0, n_true = 0, n_adv = 0, n_mb = 0;
  int n_last = 0;   // the last position read out of the accumulator (+2,+2) won

  task automatic check_mb(int mbx, int mby);
    int bsad, ssad, bx_, by_, sx, sy, have2;
    int t0, cyc;
    int c0x [2], c0y [2];
    int m1x, m1y, m1s, from2;
    int m2x, m2y, m2s;
    int qsad [4], qk [4];
    int hs, hx, hy;

    // level 0: positions in the order the comparator sees them
    bsad = -1; ssad = -1; have2 = 0;
    for (int tt = 0; tt < 64; tt++)
      for (int idx = 0; idx < 50; idx++)
        for (int j = 0; j < 2; j++) begin
          int d = idx / 25, k = idx % 25;
          if (16*j + k + 4*d == tt) begin
            int mx = k % 5 + 4*d - 4, my = k / 5 + 4*j - 4;
            int s = sad_at(0, 4*mbx, 4*mby, 4, 4, mx, my);
            if (bsad < 0 || s < bsad) begin
              if (bsad >= 0 && !(bx_ == mx && by_ == my)) begin ssad = bsad; sx = bx_; sy = by_; end
              bsad = s; bx_ = mx; by_ = my;
            end else if (!(mx == bx_ && my == by_)) begin
              if (ssad < 0 || s < ssad) begin ssad = s; sx = mx; sy = my; end
            end else begin
              n_dup++;
            end
          end
        end
    c0x[0] = bx_; c0y[0] = by_; c0x[1] = sx; c0y[1] = sy;

    // level 1: two passes, best over both
    m1s = -1; from2 = 0;
    for (int n = 0; n < 2; n++)
      for (int k = 0; k < 25; k++) begin
        int mx = 2*c0x[n] + k % 5 - 2, my = 2*c0y[n] + k / 5 - 2;
        int s = sad_at(1, 8*mbx, 8*mby, 8, 8, mx, my);
        if (m1s < 0 || s < m1s) begin m1s = s; m1x = mx; m1y = my; from2 = n; end
      end

    // level 2 and the 8x8 mode
    m2s = -1;
    for (int q = 0; q < 4; q++) qsad[q] = -1;
    for (int k = 0; k < 25; k++) begin
      int mx = 2*m1x + k % 5 - 2, my = 2*m1y + k / 5 - 2;
      int s = sad_at(2, 16*mbx, 16*mby, 16, 16, mx, my);
      if (m2s < 0 || s < m2s) begin m2s = s; m2x = mx; m2y = my; end
      for (int q = 0; q < 4; q++) begin
        int s8 = sad_at(2, 16*mbx + 8*(q % 2), 16*mby + 8*(q / 2), 8, 8, mx, my);
        if (qsad[q] < 0 || s8 < qsad[q]) begin qsad[q] = s8; qk[q] = k; end
      end
    end

    // half-pel step: eight neighbours of the integer MV, ties keep the
    // integer position, then the first in row-major order
    hs = m2s; hx = 2*m2x; hy = 2*m2y;
    for (int q = 0; q < 9; q++) begin
      int dx, dy, s;
      dx = q % 3 - 1; dy = q / 3 - 1;
      if (q != 4) begin
        s = 0;
        for (int j = 0; j < 16; j++)
          for (int i = 0; i < 16; i++) begin
            int c, r;
            c = int'(px(0, 2, 16*mbx + i, 16*mby + j));
            // clamp integer coordinates first, as the frame store does
            r = hpix2(16*mbx + i + m2x, 16*mby + j + m2y, dx, dy);
            s += (c > r) ? c - r : r - c;
          end
        if (s < hs) begin hs = s; hx = 2*m2x + dx; hy = 2*m2y + dy; end
      end
    end
    if (hx != 2*m2x || hy != 2*m2y) n_half++;

    if (16*mbx + 2*m1x - 2 < 0 || 16*mby + 2*m1y - 2 < 0 ||
        16*mbx + 2*m1x + 17 > W - 1 || 16*mby + 2*m1y + 17 > H - 1) n_clamp++;
    if (from2) n_cand2++;
    if ((m1x - 2*c0x[from2] == 2 && m1y - 2*c0y[from2] == 2) ||
        (m2x - 2*m1x == 2 && m2y - 2*m1y == 2)) n_last++;
    if (mbx < (W/32) - 1 && mby > 0 && mby < H/16 - 1 && m2x == -MVX && m2y == -MVY) n_true++;

    // run the design
    @(posedge clk);
    mb_x  <= 8'(mbx);
    mb_y  <= 8'(mby);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t0 = 0;
    while (!done) begin @(posedge clk); t0++; end
    cyc = t0 + 1;
    n_mb++;

    checks++;
    if (cyc != CYCLES_PER_MB) begin
      failures++; $display("MB(%0d,%0d): %0d cycles, expected %0d", mbx, mby, cyc, CYCLES_PER_MB);
    end
    for (int n = 0; n < 2; n++) begin
      checks++;
      if (int'(cand[n].x) != c0x[n] || int'(cand[n].y) != c0y[n]) begin
        failures++;
        $display("MB(%0d,%0d) level-0 candidate %0d: got (%0d,%0d) expected (%0d,%0d)",
                 mbx, mby, n, int'(cand[n].x), int'(cand[n].y), c0x[n], c0y[n]);
      end
    end
    checks++;
    if (int'(mv1.x) != m1x || int'(mv1.y) != m1y) begin
      failures++;
      $display("MB(%0d,%0d) level-1 MV: got (%0d,%0d) expected (%0d,%0d)", mbx, mby, int'(mv1.x), int'(mv1.y), m1x, m1y);
    end
    checks++;
    if (int'(hmv.x) != hx || int'(hmv.y) != hy || int'(hsad) != hs) begin
      failures++;
      $display("MB(%0d,%0d) half-pel: got (%0d,%0d) SAD %0d expected (%0d,%0d) SAD %0d",
               mbx, mby, int'(hmv.x), int'(hmv.y), hsad, hx, hy, hs);
    end
    checks++;
    if (int'(mv.x) != m2x || int'(mv.y) != m2y || int'(sad) != m2s) begin
      failures++;
      $display("MB(%0d,%0d) final: got (%0d,%0d) SAD %0d expected (%0d,%0d) SAD %0d",
               mbx, mby, int'(mv.x), int'(mv.y), sad, m2x, m2y, m2s);
    end
    // 8x8 mode results are latched one cycle after the scan ends
    @(posedge clk);
    n_adv++;
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (int'(mv8[q].x) != 2*m1x + qk[q] % 5 - 2 || int'(mv8[q].y) != 2*m1y + qk[q] / 5 - 2 ||
          int'(sad8[q]) != qsad[q]) begin
        failures++;
        $display("MB(%0d,%0d) 8x8 block %0d: got (%0d,%0d) SAD %0d expected k=%0d SAD %0d",
                 mbx, mby, q, int'(mv8[q].x), int'(mv8[q].y), sad8[q], qk[q], qsad[q]);
      end
    end
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int noise [H][W];

  initial begin
    ds_valid = 1'b0; ds_sof = 1'b0; start = 1'b0; mb_x = '0; mb_y = '0;
    for (int i = 0; i < 4; i++) ds_pix[i] = '0;
    for (int i = 0; i < 2; i++) cur_pix[i] = '0;
    for (int i = 0; i < 3; i++) ref_pix[i] = '0;
    // textures: random values smoothed over 4x4 pixels
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) noise[y][x] = int'($urandom_range(255));
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int s;
          s = 0;
          for (int j = 0; j < 4; j++)
            for (int i = 0; i < 4; i++) s += noise[(y + j) % H][(x + i) % W];
          img2[f][y][x] = pix_t'(s / 16);
        end
    end
    // current frame: left half = previous frame moved by (MVX, MVY)
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W/2; x++) begin
        int sx, sy;
        sx = x - MVX;
        sy = y - MVY;
        if (sx < 0) sx = 0;
        if (sy < 0) sy = 0;
        if (sx > W - 1) sx = W - 1;
        if (sy > H - 1) sy = H - 1;
        img2[0][y][x] = img2[1][sy][sx];
      end
    // bottom-right quarter: a coarse texture (random values averaged over
    // 16x16 pixels and amplified) in the previous frame, moved by
    // (-FAR, -FAR) in the current one, i.e. a true MV of (+FAR, +FAR) beyond
    // the level-0 range: level 0 stops at (+4,+4), and level 1 must find its
    // best at the last position (+2,+2) of its local search
    for (int y = H/2; y < H; y++)
      for (int x = W/2; x < W; x++) begin
        int s;
        s = 0;
        for (int j = 0; j < 16; j++)
          for (int i = 0; i < 16; i++) s += noise[(y + j) % H][(x + i) % W];
        s = 128 + (s - 256 * 128) / 32;
        img2[1][y][x] = pix_t'((s < 0) ? 0 : (s > 255) ? 255 : s);
      end
    for (int y = H/2; y < H; y++)
      for (int x = W/2; x < W; x++)
        img2[0][y][x] = img2[1][(y + FAR < H) ? y + FAR : H - 1][(x + FAR < W) ? x + FAR : W - 1];

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    downsample(1);
    downsample(0);
    checks++;
    if (n_l1 != 2 * (W/8) * (H/2) || n_l0 != 2 * (W/16) * (H/4)) begin
      failures++;
      $display("downsampler produced %0d level-1 and %0d level-0 words", n_l1, n_l0);
    end

    // corners, edges, and a band of macroblocks across both halves
    check_mb(0, 0);
    check_mb(W/16 - 1, H/16 - 1);
    check_mb(0, H/16 - 1);
    check_mb(W/16 - 1, 0);
    for (int i = 1; i < 8; i++) check_mb(i, 3 + i % 3);
    for (int i = 12; i < 20; i++) check_mb(i, 6 + i % 4);
    for (int i = 0; i < 4; i++) check_mb(W/32 + 2 + 2*i, H/32 + 1 + i);
    // a sweep over the rest of the frame, so that every search position,
    // including the last one read out, wins somewhere
    for (int i = 0; i < 48; i++) check_mb((5 * i + 3) % (W/16), (7 * i + 1) % (H/16));

    $display("mechanisms: l1_words=%0d l0_words=%0d mbs=%0d window_clamped=%0d dup_rejected=%0d cand2_won=%0d true_motion=%0d mode8x8=%0d half_pel_moved=%0d last_position_won=%0d",
             n_l1, n_l0, n_mb, n_clamp, n_dup, n_cand2, n_true, n_adv, n_half, n_last);
    if (n_l1 == 0) failures++;
    if (n_l0 == 0) failures++;
    if (n_clamp == 0) failures++;
    if (n_dup == 0) failures++;
    if (n_cand2 == 0) failures++;
    if (n_true == 0) failures++;
    if (n_adv == 0) failures++;
    if (n_half == 0) failures++;
    if (n_last == 0) failures++;
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
