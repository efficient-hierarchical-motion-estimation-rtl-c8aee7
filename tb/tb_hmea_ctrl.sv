// tb_hmea_ctrl: runs the level sequencer for a corner macroblock and an inner
// one of a 64x48 frame, with fixed comparator answers (best MV (1,-2), second
// (-3,4)). Every read cycle (level, five coordinates, block framing) is
// compared with the schedule built here from the level rules: level 0 sends
// the same 4x4 block twice against a 12x12 window at -4; level 1 one pass per
// candidate around twice the candidate; level 2 two rounds of 16 rows around
// twice the level-1 MV; coordinates clamped to the frame. Also checks the
// number of scan, clear and done pulses and the total of 452 cycles.
module tb_hmea_ctrl;
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
  cand_t      best, second;
  level_e     level;
  crd_t       cur_x [2], ref_x [3];
  crd_t       cur_y, ref_y;
  cstream_t   meta;
  mv_t        base, cand [2], mv1, mv;
  sad_t       sad;
  logic       cmp_clear, acc_clear, acc_scan, adv_clear, adv_scan;

  hmea_ctrl #(.W(W), .H(H)) dut (
    .clk, .rst_n, .start_i(start), .mb_x_i(mbx), .mb_y_i(mby), .best_i(best), .second_i(second),
    .busy_o(busy), .level_o(level), .rd_en_o(rd_en), .cur_x_o(cur_x), .cur_y_o(cur_y),
    .ref_x_o(ref_x), .ref_y_o(ref_y), .meta_o(meta), .base_o(base),
    .cmp_clear_o(cmp_clear), .acc_clear_o(acc_clear), .acc_scan_o(acc_scan),
    .adv_clear_o(adv_clear), .adv_scan_o(adv_scan),
    .cand_o(cand), .mv1_o(mv1), .mv_o(mv), .sad_o(sad), .done_o(done));

  typedef struct {
    int lvl, cx0, cx1, cy, rx0, rx1, rx2, ry, valid, first, last, col, tag;
  } rd_t;
  rd_t exp_q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampv(int v, int hi);
    return (v < 0) ? 0 : (v > hi ? hi : v);
  endfunction

  // one pass: nb 4x4 blocks per DAU, current block part at (cx, cy), window
  // at (wx, wy); same_block: level 0 repeats the same four rows
  task automatic add_pass(int lvl, int nb, int cx, int cy, int wx, int wy, int round, int same_block);
    int xm, ym;
    xm = (W >> (2 - lvl)) - 1;
    ym = (H >> (2 - lvl)) - 1;
    for (int t = 0; t < 16*nb + 16; t++) begin
      rd_t r;
      int c, rr, j;
      c = t % 4; rr = (t / 4) % 4; j = t / 16;
      r.lvl = lvl;
      r.cx0 = clampv(cx + c, xm);
      r.cx1 = clampv(cx + 4 + c, xm);
      r.cy  = clampv(cy + (same_block ? rr : 4*j + rr), ym);
      r.rx0 = clampv(wx + c, xm);
      r.rx1 = clampv(wx + 4 + c, xm);
      r.rx2 = clampv(wx + 8 + c, xm);
      r.ry  = clampv(wy + t / 4, ym);
      r.valid = (t < 16*nb);
      r.first = (rr == 0 && c == 0);
      r.last  = (rr == 3 && c == 3);
      r.col   = c;
      r.tag   = 4*round + (j % 4);
      exp_q.push_back(r);
    end
  endtask

  task automatic run_mb(int bx, int by);
    int cyc, n_scan, n_adv, n_cmpclr, n_accclr;
    exp_q.delete();
    add_pass(0, 2, 4*bx, 4*by, 4*bx - 4, 4*by - 4, 0, 1);
    add_pass(1, 2, 8*bx, 8*by, 8*bx + 2*1 - 2, 8*by + 2*(-2) - 2, 0, 0);
    add_pass(1, 2, 8*bx, 8*by, 8*bx + 2*(-3) - 2, 8*by + 2*4 - 2, 0, 0);
    add_pass(2, 4, 16*bx, 16*by, 16*bx + 2*1 - 2, 16*by + 2*(-2) - 2, 0, 0);
    add_pass(2, 4, 16*bx + 8, 16*by, 16*bx + 2*1 - 2 + 8, 16*by + 2*(-2) - 2, 1, 0);
    mbx <= 8'(bx); mby <= 8'(by); start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0; n_scan = 0; n_adv = 0; n_cmpclr = 0; n_accclr = 0;
    while (!done && cyc < 2000) begin
      #1;
      if (rd_en) begin
        rd_t e;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("MB(%0d,%0d): unexpected read at cycle %0d", bx, by, cyc);
        end else begin
          e = exp_q.pop_front();
          if (e.lvl != int'(level) || e.cx0 != int'(cur_x[0]) || e.cx1 != int'(cur_x[1]) ||
              (e.valid && e.cy != int'(cur_y)) || e.rx0 != int'(ref_x[0]) || e.rx1 != int'(ref_x[1]) ||
              e.rx2 != int'(ref_x[2]) || e.ry != int'(ref_y) || e.valid != int'(meta.valid) ||
              (e.valid && (e.first != int'(meta.first) || e.last != int'(meta.last) ||
                           e.col != int'(meta.col) || e.tag != int'(meta.tag)))) begin
            failures++;
            $display("MB(%0d,%0d) cycle %0d lvl %0d: cur (%0d,%0d)/(%0d) ref (%0d,%0d,%0d)/(%0d) v%0d tag %0d; expected cur (%0d,%0d)/(%0d) ref (%0d,%0d,%0d)/(%0d) v%0d tag %0d",
                     bx, by, cyc, level, cur_x[0], cur_x[1], cur_y, ref_x[0], ref_x[1], ref_x[2], ref_y, meta.valid, meta.tag,
                     e.cx0, e.cx1, e.cy, e.rx0, e.rx1, e.rx2, e.ry, e.valid, e.tag);
          end
        end
      end
      if (acc_scan) n_scan++;
      if (adv_scan) n_adv++;
      if (cmp_clear) n_cmpclr++;
      if (acc_clear) n_accclr++;
      @(posedge clk);
      cyc++;
    end
    checks++;
    if (cyc + 1 != 452 || exp_q.size() != 0) begin
      failures++; $display("MB(%0d,%0d): %0d cycles, %0d reads missing", bx, by, cyc + 1, exp_q.size());
    end
    checks++;
    if (n_scan != 3 || n_adv != 1 || n_cmpclr != 3 || n_accclr != 3) begin
      failures++; $display("MB(%0d,%0d): scans %0d adv %0d cmp clears %0d acc clears %0d", bx, by, n_scan, n_adv, n_cmpclr, n_accclr);
    end
    checks++;
    if (cand[0] != best.mv || cand[1] != second.mv || mv1 != best.mv || mv != best.mv || sad != best.sad) begin
      failures++; $display("MB(%0d,%0d): result registers wrong", bx, by);
    end
    @(posedge clk);
  endtask

  initial begin
    start = 1'b0; mbx = '0; mby = '0;
    best = '0; second = '0;
    best.valid = 1'b1; best.sad = 16'd1234; best.mv.x = 8'sd1; best.mv.y = -8'sd2;
    second.valid = 1'b1; second.sad = 16'd2000; second.mv.x = -8'sd3; second.mv.y = 8'sd4;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_mb(0, 0);
    run_mb(2, 1);
    run_mb(3, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
