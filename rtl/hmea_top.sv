// hmea_top: hierarchical motion estimator (HMEA) for 16x16 macroblocks.
//
// Two independent parts share the clock:
//  * The downsampler turns each incoming full-resolution (level-2) frame into
//    its half (level-1) and quarter (level-0) resolution images with a 2x2
//    averaging filter. The three images of the current and of the previous
//    frame are kept in an external frame store.
//  * The search engine finds the motion vector of one macroblock: a full
//    search of the level-0 4x4 block over [-4,+4] keeps the two best MVs;
//    level 1 refines both by +-2 around their doubled value with the 8x8
//    block and keeps the better; level 2 refines that by +-2 with the 16x16
//    block. The final MV is in level-2 pixels, within [-22,+22].
//
// Search datapath. All SADs come from two difference accumulation units
// (DAUs), each computing the 25 SADs of a 4x4 block over +-2. Each search
// window is read as three 4-column parts (left, middle, right). DAU0 takes
// the left part on Pl and the middle part, 4 cycles later, on Pr. DAU1 runs 4
// cycles behind DAU0: it gets the middle part on Pl and the right part,
// 8 cycles late, on Pr. Its current-block input is the same 4x4 block at
// level 0, which gives horizontal offsets 0..4 and 4..8. At levels 1 and 2 it
// is the block's next four columns, so both DAUs add into the same positions.
// Level-0 results go straight to the comparator. Level-1/2 results are
// summed per position in the accumulation buffer (sad_accum) and then
// scanned into it. The 8x8 prediction mode (adv_pred) sums the level-2 results
// per 8x8 subblock.
//
// Frame-store interface. When rd_en_o is high, the engine reads at level
// rd_lvl_o two current-frame pixels (cur_x_o[i], cur_y_o) and three
// previous-frame pixels (ref_x_o[i], ref_y_o). The data must arrive on
// cur_pix_i/ref_pix_i in the next cycle. Coordinates are already clamped to
// the frame.
//
// Half-pel step. After the integer search, the half_pel block evaluates the
// eight half-pel positions around the integer MV on the full-resolution
// images, using lane 0 of the current and of the previous frame (at level 2).
//
// Control: pulse start_i with mb_x_i/mb_y_i while busy_o is low. done_o pulses
// when hmv_o/hsad_o (half-pel result) are valid. mv_o/sad_o (integer result),
// cand_o, mv1_o and the 8x8 prediction-mode results mv8_o/sad8_o are valid
// from the same cycle on and stay until the next macroblock. One macroblock
// takes 780 cycles from start_i to done_o: 64 (level 0) + 2 x 91 (level 1)
// + 203 (level 2) + 3 (hand-over) = 452 for the integer MV, and 328 for the
// half-pel step.
module hmea_top
  import hmea_pkg::*;
#(
  parameter int unsigned W = 352,   // frame width (CIF)
  parameter int unsigned H = 288    // frame height (CIF)
) (
  input  logic       clk,
  input  logic       rst_n,
  // downsampler
  input  logic       ds_valid_i,
  input  logic       ds_sof_i,
  input  pix_t       ds_pix_i [4],
  output logic       l1_valid_o,
  output logic [9:0] l1_x_o,
  output logic [9:0] l1_y_o,
  output pix_t       l1_pix_o [4],
  output logic       l0_valid_o,
  output logic [9:0] l0_x_o,
  output logic [9:0] l0_y_o,
  output pix_t       l0_pix_o [4],
  // search control
  input  logic       start_i,
  input  logic [7:0] mb_x_i,
  input  logic [7:0] mb_y_i,
  output logic       busy_o,
  output logic       done_o,
  output mv_t        mv_o,          // integer MV (level-2 pixels)
  output sad_t       sad_o,
  output mv_t        hmv_o,         // half-pel MV (half-pel units)
  output sad_t       hsad_o,
  output mv_t        cand_o [2],
  output mv_t        mv1_o,
  output mv_t        mv8_o [4],
  output sad_t       sad8_o [4],
  // frame store
  output logic       rd_en_o,
  output level_e     rd_lvl_o,
  output crd_t       cur_x_o [2],
  output crd_t       cur_y_o,
  output crd_t       ref_x_o [3],
  output crd_t       ref_y_o,
  input  pix_t       cur_pix_i [2],
  input  pix_t       ref_pix_i [3]
);

  localparam int unsigned NCMP = 2*NPOS + 1;

  // ---------------- downsampler ----------------
  downsampler #(.W(W), .H(H)) u_ds (
    .clk, .rst_n,
    .in_valid_i (ds_valid_i), .in_sof_i (ds_sof_i), .in_pix_i (ds_pix_i),
    .l1_valid_o, .l1_x_o, .l1_y_o, .l1_pix_o,
    .l0_valid_o, .l0_x_o, .l0_y_o, .l0_pix_o
  );

  // ---------------- controller / address generator ----------------
  level_e   level;
  logic     int_done, ctrl_busy, ctrl_rd_en;
  crd_t     ctrl_cur_x [2], ctrl_ref_x [3];
  crd_t     ctrl_cur_y, ctrl_ref_y;
  logic [7:0] mb_x_q, mb_y_q;
  cstream_t meta;
  mv_t      base;
  cand_t    best, second;
  logic     cmp_clear, acc_clear, acc_scan, adv_clear, adv_scan;

  hmea_ctrl #(.W(W), .H(H)) u_ctrl (
    .clk, .rst_n,
    .start_i (start_i && !busy_o), .mb_x_i, .mb_y_i,
    .best_i (best), .second_i (second),
    .busy_o (ctrl_busy), .level_o (level),
    .rd_en_o (ctrl_rd_en), .cur_x_o (ctrl_cur_x), .cur_y_o (ctrl_cur_y),
    .ref_x_o (ctrl_ref_x), .ref_y_o (ctrl_ref_y),
    .meta_o (meta), .base_o (base),
    .cmp_clear_o (cmp_clear), .acc_clear_o (acc_clear), .acc_scan_o (acc_scan),
    .adv_clear_o (adv_clear), .adv_scan_o (adv_scan),
    .cand_o, .mv1_o, .mv_o, .sad_o, .done_o (int_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mb_x_q <= '0;
      mb_y_q <= '0;
    end else if (start_i && !busy_o) begin
      mb_x_q <= mb_x_i;
      mb_y_q <= mb_y_i;
    end
  end

  // ---------------- half-pel refinement ----------------
  logic hp_busy, hp_rd_en;
  crd_t hp_cur_x, hp_cur_y, hp_ref_x, hp_ref_y;

  half_pel #(.W(W), .H(H)) u_hp (
    .clk, .rst_n,
    .start_i (int_done), .mb_x_i (mb_x_q), .mb_y_i (mb_y_q), .mv_i (mv_o), .sad_i (sad_o),
    .busy_o (hp_busy), .rd_en_o (hp_rd_en),
    .cur_x_o (hp_cur_x), .cur_y_o (hp_cur_y), .ref_x_o (hp_ref_x), .ref_y_o (hp_ref_y),
    .cur_pix_i (cur_pix_i[0]), .ref_pix_i (ref_pix_i[0]),
    .hmv_o, .hsad_o, .done_o
  );

  // the integer search and the half-pel step share the frame-store lanes;
  // they never read at the same time
  always_comb begin
    busy_o   = ctrl_busy || hp_busy || int_done;
    rd_en_o  = ctrl_rd_en || hp_rd_en;
    rd_lvl_o = hp_busy ? LVL2 : level;
    cur_x_o  = ctrl_cur_x;
    cur_y_o  = ctrl_cur_y;
    ref_x_o  = ctrl_ref_x;
    ref_y_o  = ctrl_ref_y;
    if (hp_busy) begin
      cur_x_o[0] = hp_cur_x;
      cur_y_o    = hp_cur_y;
      ref_x_o[0] = hp_ref_x;
      ref_y_o    = hp_ref_y;
    end
  end

  // ---------------- DAU input network ----------------
  cstream_t meta_q;       // framing aligned with the returned pixels
  cstream_t c0, c1_src, c1;
  pix_t     mid_d4, right_d8;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) meta_q <= '0;
    else        meta_q <= meta;
  end

  always_comb begin
    c0         = meta_q;
    c0.pix     = cur_pix_i[0];
    c1_src     = meta_q;
    // level 0: both DAUs search with the same block; otherwise DAU1 takes
    // the next four columns
    c1_src.pix = (level == LVL0) ? cur_pix_i[0] : cur_pix_i[1];
  end

  byte_delay #(.DEPTH(4), .T(cstream_t)) u_dly_c1 (.clk, .rst_n, .d_i(c1_src), .q_o(c1));
  byte_delay #(.DEPTH(4), .T(pix_t)) u_dly_mid (.clk, .rst_n, .d_i(ref_pix_i[1]), .q_o(mid_d4));
  byte_delay #(.DEPTH(8), .T(pix_t)) u_dly_right (.clk, .rst_n, .d_i(ref_pix_i[2]), .q_o(right_d8));

  logic  d0_done [NPOS], d1_done [NPOS];
  sad4_t d0_sad  [NPOS], d1_sad  [NPOS];
  tag_t  d0_tag  [NPOS], d1_tag  [NPOS];

  dau u_dau0 (.clk, .rst_n, .c_i(c0), .pl_i(ref_pix_i[0]), .pr_i(mid_d4),
              .done_o(d0_done), .sad_o(d0_sad), .tag_o(d0_tag));
  dau u_dau1 (.clk, .rst_n, .c_i(c1), .pl_i(mid_d4), .pr_i(right_d8),
              .done_o(d1_done), .sad_o(d1_sad), .tag_o(d1_tag));

  // ---------------- Block 1: accumulation for levels 1 and 2 ----------------
  logic       acc_v;
  logic [4:0] acc_idx;
  sad_t       acc_sad;

  sad_accum u_acc (
    .clk, .rst_n, .clear_i(acc_clear),
    .d0_done_i(d0_done), .d0_sad_i(d0_sad), .d1_done_i(d1_done), .d1_sad_i(d1_sad),
    .scan_i(acc_scan), .busy_o(), .out_valid_o(acc_v), .out_idx_o(acc_idx), .out_sad_o(acc_sad)
  );

  // ---------------- comparator ----------------
  function automatic mv_t pos_mv(mv_t centre, logic [4:0] k);
    mv_t r;
    r.x = centre.x + mv_comp_t'(k % 5) - mv_comp_t'(2);
    r.y = centre.y + mv_comp_t'(k / 5) - mv_comp_t'(2);
    return r;
  endfunction

  cand_t cmp_in [NCMP];

  always_comb begin
    for (int d = 0; d < 2; d++) begin
      for (int k = 0; k < int'(NPOS); k++) begin
        cmp_in[d*NPOS + k].valid = (level == LVL0) && (d == 0 ? d0_done[k] : d1_done[k]);
        cmp_in[d*NPOS + k].sad   = sad_t'(d == 0 ? d0_sad[k] : d1_sad[k]);
        cmp_in[d*NPOS + k].mv.x  = mv_comp_t'(k % 5 + 4*d - 4);
        cmp_in[d*NPOS + k].mv.y  = mv_comp_t'(k / 5 - 4)
                                 + ((d == 0 ? d0_tag[k][0] : d1_tag[k][0]) ? mv_comp_t'(4) : '0);
      end
    end
    cmp_in[NCMP-1].valid = acc_v && (level != LVL0);
    cmp_in[NCMP-1].sad   = acc_sad;
    cmp_in[NCMP-1].mv    = pos_mv(base, acc_idx);
  end

  cand_cmp #(.NIN(NCMP)) u_cmp (
    .clk, .rst_n, .clear_i(cmp_clear), .cand_i(cmp_in), .best_o(best), .second_o(second)
  );

  // ---------------- Block 2: 8x8 prediction mode ----------------
  logic       adv_done;
  logic [4:0] adv_idx [4];
  sad_t       adv_sad [4];

  adv_pred u_adv (
    .clk, .rst_n, .clear_i(adv_clear),
    .d0_done_i(d0_done), .d0_sad_i(d0_sad), .d0_tag_i(d0_tag),
    .d1_done_i(d1_done), .d1_sad_i(d1_sad), .d1_tag_i(d1_tag),
    .scan_i(adv_scan), .done_o(adv_done), .best_idx_o(adv_idx), .best_sad_o(adv_sad)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < 4; q++) begin
        mv8_o[q]  <= '0;
        sad8_o[q] <= '0;
      end
    end else if (adv_done) begin
      for (int q = 0; q < 4; q++) begin
        mv8_o[q]  <= pos_mv(base, adv_idx[q]);
        sad8_o[q] <= adv_sad[q];
      end
    end
  end

endmodule
