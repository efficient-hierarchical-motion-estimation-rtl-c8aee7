// tb_half_pel: half-pel refinement on random 64x48 frames. For macroblocks at
// the corners and inside, with random integer MVs (some pointing out of the
// frame), the half-pel MV and SAD are compared with a direct computation of
// the eight interpolated SADs (truncating 2- and 4-pixel means, coordinates
// clamped to the frame; ties keep the integer position, then row-major
// order). The integer SAD given to the block is either the true one or a
// very small one, so both outcomes occur. done must come 328 cycles after
// start.
module tb_half_pel;
  import hmea_pkg::*;

  localparam int W = 64;
  localparam int H = 48;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic       start, busy, rd_en, done;
  logic [7:0] mbx, mby;
  mv_t        mv, hmv;
  sad_t       isad, hsad;
  crd_t       cx, cy, rx, ry;
  pix_t       cpix, rpix;

  half_pel #(.W(W), .H(H)) dut (.clk, .rst_n, .start_i(start), .mb_x_i(mbx), .mb_y_i(mby),
    .mv_i(mv), .sad_i(isad), .busy_o(busy), .rd_en_o(rd_en), .cur_x_o(cx), .cur_y_o(cy),
    .ref_x_o(rx), .ref_y_o(ry), .cur_pix_i(cpix), .ref_pix_i(rpix), .hmv_o(hmv), .hsad_o(hsad),
    .done_o(done));

  pix_t cur [H][W];
  pix_t prv [H][W];

  function automatic int pv(int x, int y);
    x = (x < 0) ? 0 : (x > W - 1 ? W - 1 : x);
    y = (y < 0) ? 0 : (y > H - 1 ? H - 1 : y);
    return int'(prv[y][x]);
  endfunction

  function automatic int hp(int x, int y, int dx, int dy);
    if (dy == 0) return (pv(x, y) + pv(x + dx, y)) / 2;
    if (dx == 0) return (pv(x, y) + pv(x, y + dy)) / 2;
    return (pv(x, y) + pv(x + dx, y) + pv(x, y + dy) + pv(x + dx, y + dy)) / 4;
  endfunction

  always_ff @(posedge clk) begin
    if (rd_en) begin
      cpix <= cur[cy][cx];
      rpix <= prv[ry][rx];
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_moved = 0, n_kept = 0;

  initial begin
    start = 1'b0; mbx = '0; mby = '0; mv = '0; isad = '0; cpix = '0; rpix = '0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        prv[y][x] = pix_t'($urandom);
        cur[y][x] = '0;
      end
    // current frame: previous frame smoothed horizontally and moved by (3,-2),
    // so that half positions often match better than integer ones
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        cur[y][x] = pix_t'((pv(x - 3, y + 2) + pv(x - 2, y + 2)) / 2);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 16; m++) begin
      int bx, by, ix, iy, is, bs, ex, ey, lat;
      bx = m % 4; by = (m / 4) % 3;
      ix = (m < 8) ? -3 : int'($urandom_range(20)) - 10;
      iy = (m < 8) ? 2 : int'($urandom_range(20)) - 10;
      // true integer SAD
      is = 0;
      for (int j = 0; j < 16; j++)
        for (int i = 0; i < 16; i++) begin
          int c, r;
          c = int'(cur[16*by + j][16*bx + i]); r = pv(16*bx + i + ix, 16*by + j + iy);
          is += (c > r) ? c - r : r - c;
        end
      if (m % 5 == 4) is = 3;   // integer position that cannot be beaten
      bs = is; ex = 2*ix; ey = 2*iy;
      for (int q = 0; q < 9; q++) begin
        int dx, dy, s;
        dx = q % 3 - 1; dy = q / 3 - 1;
        if (q != 4) begin
          s = 0;
          for (int j = 0; j < 16; j++)
            for (int i = 0; i < 16; i++) begin
              int c, r;
              c = int'(cur[16*by + j][16*bx + i]);
              r = hp(16*bx + i + ix, 16*by + j + iy, dx, dy);
              s += (c > r) ? c - r : r - c;
            end
          if (s < bs) begin bs = s; ex = 2*ix + dx; ey = 2*iy + dy; end
        end
      end
      if (ex == 2*ix && ey == 2*iy) n_kept++; else n_moved++;
      mbx <= 8'(bx); mby <= 8'(by); mv.x <= mv_comp_t'(ix); mv.y <= mv_comp_t'(iy); isad <= sad_t'(is);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat = 0;
      #1;
      while (!done && lat < 1000) begin @(posedge clk); #1; lat++; end
      checks += 2;
      if (lat + 1 != 328) begin failures++; $display("MB %0d: done after %0d cycles", m, lat + 1); end
      if (int'(hmv.x) != ex || int'(hmv.y) != ey || int'(hsad) != bs) begin
        failures++;
        $display("MB %0d: got (%0d,%0d) SAD %0d, expected (%0d,%0d) SAD %0d", m, int'(hmv.x), int'(hmv.y), hsad, ex, ey, bs);
      end
      @(posedge clk);
    end
    checks++;
    if (n_moved == 0 || n_kept == 0) begin failures++; $display("moved %0d kept %0d", n_moved, n_kept); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
