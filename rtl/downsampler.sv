// downsampler: pipelined 2x2 averaging filter that turns a level-2 (full
// resolution) frame into its level-1 (half) and level-0 (quarter) images.
// Each lower-level pixel is the mean of a 2x2 group, computed as
// (a + b + c + d) >> 2: two pair additions, one addition, and dropping the
// two low bits.
//
// Input: the frame in raster order, four horizontally adjacent pixels per
// cycle (in_valid_i/in_pix_i), with in_sof_i on the first word of the frame.
// The frame width W must be a multiple of 16.
//
// Level 2 -> level 1. On an even row, the sums of pixel pairs (0+1) and
// (2+3) of every word are stored in a W/4 x 18-bit line buffer (ram1). On
// the next (odd) row the pair sums of the same word are added to the stored
// ones, the low two bits dropped, giving two level-1 pixels per input word.
// Two consecutive results are latched into one four-pixel level-1 word
// (only on odd words), emitted on l1_*: l1_x_o is the word index, l1_y_o the
// level-1 row.
// Level 1 -> level 0. The level-1 words go through the same datapath with a
// W/8 x 18-bit line buffer (ram4) and come out as four-pixel level-0 words on
// l0_*. The coordinates are the level-2 word and row counters (10 bits)
// halved once or twice, so their top bit (level 1) or two bits (level 0) are
// always zero; the ports keep the counters' width.
//
// Timing: one input word per cycle with no stall; a level-1 word appears 3
// cycles after the odd input word that completes it, a level-0 word 3 cycles
// after the level-1 word that completes it. A W x H frame takes W*H/4 cycles
// plus 6 cycles of latency.
// The datapaths (pair adders, line buffers of 18-bit pair sums, truncation,
// odd-word latching) follow the downsampling hardware description; the
// level-1 and level-0 rows leave as streams instead of being kept in on-chip
// row memories, which is this design's choice.
module downsampler
  import hmea_pkg::*;
#(
  parameter int unsigned W = 352,
  parameter int unsigned H = 288
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid_i,
  input  logic        in_sof_i,
  input  pix_t        in_pix_i [4],
  output logic        l1_valid_o,
  output logic [9:0]  l1_x_o,
  output logic [9:0]  l1_y_o,
  output pix_t        l1_pix_o [4],
  output logic        l0_valid_o,
  output logic [9:0]  l0_x_o,
  output logic [9:0]  l0_y_o,
  output pix_t        l0_pix_o [4]
);

  localparam int unsigned WW2 = W / 4;  // input words per level-2 row
  localparam int unsigned WW1 = W / 8;  // words per level-1 row
  localparam int unsigned AW2 = $clog2(WW2);
  localparam int unsigned AW1 = $clog2(WW1);

  typedef logic [8:0] psum_t;

  // ---------------- level 2 -> level 1 ----------------
  logic [9:0] w2, y2;                     // position of the incoming word
  logic [9:0] cur_w, cur_y;
  psum_t      ram1 [WW2];
  psum_t      ram1b [WW2];

  always_comb begin
    cur_w = in_sof_i ? '0 : w2;
    cur_y = in_sof_i ? '0 : y2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w2 <= '0;
      y2 <= '0;
    end else if (in_valid_i) begin
      if (cur_w == 10'(WW2 - 1)) begin
        w2 <= '0;
        y2 <= (cur_y == 10'(H - 1)) ? '0 : cur_y + 10'd1;
      end else begin
        w2 <= cur_w + 10'd1;
        y2 <= cur_y;
      end
    end
  end

  // stage 1: pair sums and line-buffer read
  logic       s1_v;
  logic [9:0] s1_w, s1_y;
  psum_t      s1_a, s1_b, s1_ra, s1_rb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_w <= '0; s1_y <= '0;
      s1_a <= '0; s1_b <= '0; s1_ra <= '0; s1_rb <= '0;
    end else begin
      s1_v  <= in_valid_i;
      s1_w  <= cur_w;
      s1_y  <= cur_y;
      s1_a  <= psum_t'(in_pix_i[0]) + psum_t'(in_pix_i[1]);
      s1_b  <= psum_t'(in_pix_i[2]) + psum_t'(in_pix_i[3]);
      s1_ra <= ram1[cur_w[AW2-1:0]];
      s1_rb <= ram1b[cur_w[AW2-1:0]];
    end
  end

  always_ff @(posedge clk) begin
    if (s1_v && !s1_y[0]) begin
      ram1[s1_w[AW2-1:0]]  <= s1_a;
      ram1b[s1_w[AW2-1:0]] <= s1_b;
    end
  end

  // stage 2: second addition and truncation (odd rows only)
  logic       s2_v;
  logic [9:0] s2_w, s2_y;
  pix_t       s2_p0, s2_p1;
  logic [9:0] sum_a, sum_b;

  always_comb begin
    sum_a = 10'(s1_a) + 10'(s1_ra);
    sum_b = 10'(s1_b) + 10'(s1_rb);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s2_w <= '0; s2_y <= '0; s2_p0 <= '0; s2_p1 <= '0;
    end else begin
      s2_v  <= s1_v && s1_y[0];
      s2_w  <= s1_w;
      s2_y  <= s1_y;
      s2_p0 <= sum_a[9:2];
      s2_p1 <= sum_b[9:2];
    end
  end

  // stage 3: latch odd words into four-pixel level-1 words
  pix_t hold1 [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold1[0] <= '0; hold1[1] <= '0;
      l1_valid_o <= 1'b0; l1_x_o <= '0; l1_y_o <= '0;
      for (int i = 0; i < 4; i++) l1_pix_o[i] <= '0;
    end else begin
      l1_valid_o <= s2_v && s2_w[0];
      if (s2_v && !s2_w[0]) begin
        hold1[0] <= s2_p0;
        hold1[1] <= s2_p1;
      end
      if (s2_v && s2_w[0]) begin
        l1_x_o      <= {1'b0, s2_w[9:1]};
        l1_y_o      <= {1'b0, s2_y[9:1]};
        l1_pix_o[0] <= hold1[0];
        l1_pix_o[1] <= hold1[1];
        l1_pix_o[2] <= s2_p0;
        l1_pix_o[3] <= s2_p1;
      end
    end
  end

  // ---------------- level 1 -> level 0 ----------------
  psum_t      ram4 [WW1];
  psum_t      ram4b [WW1];
  logic       t1_v;
  logic [9:0] t1_w, t1_y;
  psum_t      t1_a, t1_b, t1_ra, t1_rb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1_v <= 1'b0; t1_w <= '0; t1_y <= '0;
      t1_a <= '0; t1_b <= '0; t1_ra <= '0; t1_rb <= '0;
    end else begin
      t1_v  <= l1_valid_o;
      t1_w  <= l1_x_o;
      t1_y  <= l1_y_o;
      t1_a  <= psum_t'(l1_pix_o[0]) + psum_t'(l1_pix_o[1]);
      t1_b  <= psum_t'(l1_pix_o[2]) + psum_t'(l1_pix_o[3]);
      t1_ra <= ram4[l1_x_o[AW1-1:0]];
      t1_rb <= ram4b[l1_x_o[AW1-1:0]];
    end
  end

  always_ff @(posedge clk) begin
    if (t1_v && !t1_y[0]) begin
      ram4[t1_w[AW1-1:0]]  <= t1_a;
      ram4b[t1_w[AW1-1:0]] <= t1_b;
    end
  end

  logic       t2_v;
  logic [9:0] t2_w, t2_y;
  pix_t       t2_p0, t2_p1;
  logic [9:0] tsum_a, tsum_b;

  always_comb begin
    tsum_a = 10'(t1_a) + 10'(t1_ra);
    tsum_b = 10'(t1_b) + 10'(t1_rb);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t2_v <= 1'b0; t2_w <= '0; t2_y <= '0; t2_p0 <= '0; t2_p1 <= '0;
    end else begin
      t2_v  <= t1_v && t1_y[0];
      t2_w  <= t1_w;
      t2_y  <= t1_y;
      t2_p0 <= tsum_a[9:2];
      t2_p1 <= tsum_b[9:2];
    end
  end

  pix_t hold0 [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold0[0] <= '0; hold0[1] <= '0;
      l0_valid_o <= 1'b0; l0_x_o <= '0; l0_y_o <= '0;
      for (int i = 0; i < 4; i++) l0_pix_o[i] <= '0;
    end else begin
      l0_valid_o <= t2_v && t2_w[0];
      if (t2_v && !t2_w[0]) begin
        hold0[0] <= t2_p0;
        hold0[1] <= t2_p1;
      end
      if (t2_v && t2_w[0]) begin
        l0_x_o      <= {1'b0, t2_w[9:1]};
        l0_y_o      <= {1'b0, t2_y[9:1]};
        l0_pix_o[0] <= hold0[0];
        l0_pix_o[1] <= hold0[1];
        l0_pix_o[2] <= t2_p0;
        l0_pix_o[3] <= t2_p1;
      end
    end
  end

endmodule
