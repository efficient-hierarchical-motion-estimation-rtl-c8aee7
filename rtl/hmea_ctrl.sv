// hmea_ctrl: level sequencer and address generator of the motion estimator.
// For one macroblock (MB) it runs the three search levels:
//   level 0: 4x4 block, 12x12 window centred on the MB, full search over
//            [-4,+4] in two rounds of window rows; the comparator keeps the two
//            least-SAD MVs (candidates).
//   level 1: 8x8 block, 12x12 window centred on twice each candidate, one pass
//            per candidate; each pass sums the four 4x4 SADs per position in
//            the accumulation buffer and scans them into the comparator, which
//            keeps the best over both passes.
//   level 2: 16x16 block, 20x20 window centred on twice the level-1 MV, in two
//            rounds (MB columns 0..7 against window columns 0..11, then MB
//            columns 8..15 against window columns 8..19); one scan gives the
//            final MV.
// A pass sends NB 4x4 blocks per DAU (NB = 2 at levels 0/1, 4 per level-2
// round) and 4*NB+4 window rows of three 4-column parts (left, middle, right),
// one pixel of each lane per cycle, i.e. 16*NB+16 cycles. Read addresses are
// issued on five lanes (current columns 0..3 and 4..7 of the block, window
// parts left/middle/right) for a synchronous memory with one cycle of latency;
// coordinates are clamped to the frame of the level (edge pixels repeat).
// meta_o is the framing of the current-block stream that goes with the lane-0
// address of the same cycle. Its pix field is always zero here: the pixel
// itself comes back from the frame store a cycle later and the top merges it.
// Timing (cycles after start_i): level 0 = 64, each level-1 pass = 48 + 16
// drain + 27 scan, level 2 = 160 + 16 + 27, plus one cycle per level change.
// The scan wait covers the 25 read-out cycles, the cycle the scan pulse takes
// to reach the accumulator and the comparator's register, so the last
// position (offset +2,+2) is compared before the result is taken.
// done_o pulses once the final MV is valid.
// The level order, block/window sizes, window partitions, candidate count and
// +-2 local range follow the HMEA description; the fixed drain wait, the
// sequential level-1 passes and the edge clamping are this design's choices.
module hmea_ctrl
  import hmea_pkg::*;
#(
  parameter int unsigned W = 352,   // level-2 frame width in pixels
  parameter int unsigned H = 288    // level-2 frame height in pixels
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  input  logic [7:0] mb_x_i,        // MB column index
  input  logic [7:0] mb_y_i,        // MB row index
  input  cand_t      best_i,        // comparator outputs
  input  cand_t      second_i,
  output logic       busy_o,
  output level_e     level_o,
  output logic       rd_en_o,
  output crd_t       cur_x_o [2],
  output crd_t       cur_y_o,
  output crd_t       ref_x_o [3],
  output crd_t       ref_y_o,
  output cstream_t   meta_o,
  output mv_t        base_o,        // centre of the current local search
  output logic       cmp_clear_o,
  output logic       acc_clear_o,
  output logic       acc_scan_o,
  output logic       adv_clear_o,
  output logic       adv_scan_o,
  output mv_t        cand_o [2],    // level-0 candidates
  output mv_t        mv1_o,         // level-1 MV (level-1 pixels)
  output mv_t        mv_o,          // final integer MV (level-2 pixels)
  output sad_t       sad_o,
  output logic       done_o
);

  localparam int unsigned DRAIN = 16;
  localparam int unsigned SCAN  = NPOS + 2;   // 25 words + comparator register

  typedef enum logic [2:0] {S_IDLE, S_FEED, S_DRAIN, S_SCAN, S_DONE} state_e;

  state_e     state;
  level_e     level;
  logic       cand_n;       // level-1 pass index
  logic       round;        // level-2 round
  logic [2:0] nb;           // 4x4 blocks per DAU in this pass
  logic [6:0] t;            // feed cycle
  logic [4:0] d;            // drain / scan counter
  crd_t       cx, cy;       // top-left of the current block part
  crd_t       wx, wy;       // top-left of the window part
  crd_t       mbx_c, mby_c; // MB corner at level 0
  mv_t        cand [2];
  mv_t        mv1;

  // ---- address and framing generation ----
  logic [6:0] feed_len;
  logic       c_on;
  logic [1:0] c_col;
  logic [1:0] c_row;
  logic [1:0] c_blk;
  crd_t       xmax, ymax;

  function automatic crd_t clamp(crd_t v, crd_t hi);
    if (v < 0)  return '0;
    if (v > hi) return hi;
    return v;
  endfunction

  always_comb begin
    feed_len = {nb, 4'b0000} + 7'd16;
    c_on     = (t < {nb, 4'b0000});
    c_col    = t[1:0];
    c_row    = t[3:2];
    c_blk    = t[5:4];
    xmax     = crd_t'((W >> (2 - int'(level))) - 1);
    ymax     = crd_t'((H >> (2 - int'(level))) - 1);

    rd_en_o  = (state == S_FEED);
    // level 0 sends the same 4x4 block twice; levels 1/2 go down the block
    if (level == LVL0) cur_y_o = clamp(cy + crd_t'(c_row), ymax);
    else               cur_y_o = clamp(cy + crd_t'({c_blk, c_row}), ymax);
    cur_x_o[0] = clamp(cx + crd_t'(c_col), xmax);
    cur_x_o[1] = clamp(cx + crd_t'(c_col) + crd_t'(4), xmax);
    ref_y_o  = clamp(wy + crd_t'(t[6:2]), ymax);
    for (int i = 0; i < 3; i++)
      ref_x_o[i] = clamp(wx + crd_t'(4*i) + crd_t'(c_col), xmax);

    meta_o       = '0;
    meta_o.valid = (state == S_FEED) && c_on;
    meta_o.first = (c_row == 2'd0) && (c_col == 2'd0);
    meta_o.last  = (c_row == 2'd3) && (c_col == 2'd3);
    meta_o.col   = c_col;
    meta_o.tag   = {round, c_blk};
  end

  function automatic mv_t dbl(mv_t v);
    mv_t r;
    r.x = mv_comp_t'(v.x <<< 1);
    r.y = mv_comp_t'(v.y <<< 1);
    return r;
  endfunction

  // ---- sequencing ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      level  <= LVL0;
      cand_n <= 1'b0;
      round  <= 1'b0;
      nb     <= 3'd2;
      t      <= '0;
      d      <= '0;
      cx <= '0; cy <= '0; wx <= '0; wy <= '0;
      mbx_c <= '0; mby_c <= '0;
      cand[0] <= '0; cand[1] <= '0;
      mv1    <= '0;
      base_o <= '0;
      mv_o   <= '0;
      sad_o  <= '0;
      done_o <= 1'b0;
      cmp_clear_o <= 1'b0;
      acc_clear_o <= 1'b0;
      acc_scan_o  <= 1'b0;
      adv_clear_o <= 1'b0;
      adv_scan_o  <= 1'b0;
    end else begin
      done_o      <= 1'b0;
      cmp_clear_o <= 1'b0;
      acc_clear_o <= 1'b0;
      acc_scan_o  <= 1'b0;
      adv_clear_o <= 1'b0;
      adv_scan_o  <= 1'b0;
      case (state)
        S_IDLE: if (start_i) begin
          mbx_c  <= crd_t'({mb_x_i, 2'b00});
          mby_c  <= crd_t'({mb_y_i, 2'b00});
          level  <= LVL0;
          round  <= 1'b0;
          nb     <= 3'd2;
          cx     <= crd_t'({mb_x_i, 2'b00});
          cy     <= crd_t'({mb_y_i, 2'b00});
          wx     <= crd_t'({mb_x_i, 2'b00}) - crd_t'(4);
          wy     <= crd_t'({mb_y_i, 2'b00}) - crd_t'(4);
          base_o <= '0;
          t      <= '0;
          cmp_clear_o <= 1'b1;
          state  <= S_FEED;
        end
        S_FEED: begin
          if (t == feed_len - 7'd1) begin
            t <= '0;
            if (level == LVL2 && !round) begin
              round <= 1'b1;
              cx    <= cx + crd_t'(8);
              wx    <= wx + crd_t'(8);
            end else begin
              d     <= '0;
              state <= S_DRAIN;
            end
          end else begin
            t <= t + 7'd1;
          end
        end
        S_DRAIN: begin
          if (d == 5'(DRAIN - 1)) begin
            d <= '0;
            if (level == LVL0) begin
              // two candidates found: first level-1 pass around candidate 0
              cand[0] <= best_i.mv;
              cand[1] <= second_i.mv;
              level   <= LVL1;
              cand_n  <= 1'b0;
              cx      <= mbx_c <<< 1;
              cy      <= mby_c <<< 1;
              wx      <= (mbx_c <<< 1) + (crd_t'(best_i.mv.x) <<< 1) - crd_t'(2);
              wy      <= (mby_c <<< 1) + (crd_t'(best_i.mv.y) <<< 1) - crd_t'(2);
              base_o  <= dbl(best_i.mv);
              acc_clear_o <= 1'b1;
              cmp_clear_o <= 1'b1;
              state   <= S_FEED;
            end else begin
              acc_scan_o <= 1'b1;
              adv_scan_o <= (level == LVL2);
              state      <= S_SCAN;
            end
          end else begin
            d <= d + 5'd1;
          end
        end
        S_SCAN: begin
          if (d == 5'(SCAN - 1)) begin
            d <= '0;
            if (level == LVL1 && !cand_n) begin
              cand_n <= 1'b1;
              wx     <= cx + (crd_t'(cand[1].x) <<< 1) - crd_t'(2);
              wy     <= cy + (crd_t'(cand[1].y) <<< 1) - crd_t'(2);
              base_o <= dbl(cand[1]);
              acc_clear_o <= 1'b1;
              state  <= S_FEED;
            end else if (level == LVL1) begin
              mv1    <= best_i.mv;
              level  <= LVL2;
              round  <= 1'b0;
              nb     <= 3'd4;
              cx     <= mbx_c <<< 2;
              cy     <= mby_c <<< 2;
              wx     <= (mbx_c <<< 2) + (crd_t'(best_i.mv.x) <<< 1) - crd_t'(2);
              wy     <= (mby_c <<< 2) + (crd_t'(best_i.mv.y) <<< 1) - crd_t'(2);
              base_o <= dbl(best_i.mv);
              acc_clear_o <= 1'b1;
              adv_clear_o <= 1'b1;
              cmp_clear_o <= 1'b1;
              state  <= S_FEED;
            end else begin
              mv_o   <= best_i.mv;
              sad_o  <= best_i.sad;
              state  <= S_DONE;
            end
          end else begin
            d <= d + 5'd1;
          end
        end
        S_DONE: begin
          done_o <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o   = (state != S_IDLE);
  assign level_o  = level;
  assign cand_o[0] = cand[0];
  assign cand_o[1] = cand[1];
  assign mv1_o    = mv1;

endmodule
