// sad_accum: SAD accumulation buffer for levels 1 and 2 ("Block 1").
// A DAU computes SADs of 4x4 blocks only; an 8x8 SAD (level 1) is the sum of
// four 4x4 SADs and a 16x16 SAD (level 2) the sum of sixteen, spread over the
// two DAUs. This block keeps one 16-bit word per search position k (25 words).
// `clear_i` zeroes the words (the "first accumulation" case); afterwards every
// done pulse of either DAU adds that PE's SAD into word k. The two DAUs never
// deliver the same k in the same cycle (DAU1 runs 4 cycles behind DAU0), but
// both are added if they did.
// `scan_i` starts a read-out: the 25 words leave as a circular shift, word 0
// first, one per cycle on out_valid_o/out_idx_o/out_sad_o, and are back in
// place after 25 cycles.
// Accumulating in 25 parallel words instead of one adder in front of a
// 25-stage shift register is this design's choice; it accepts the DAU results
// in the order the array produces them.
module sad_accum
  import hmea_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear_i,
  input  logic        d0_done_i [NPOS],
  input  sad4_t       d0_sad_i  [NPOS],
  input  logic        d1_done_i [NPOS],
  input  sad4_t       d1_sad_i  [NPOS],
  input  logic        scan_i,
  output logic        busy_o,
  output logic        out_valid_o,
  output logic [4:0]  out_idx_o,
  output sad_t        out_sad_o
);

  sad_t       acc [NPOS];
  logic [4:0] cnt;
  logic       scanning;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NPOS); k++) acc[k] <= '0;
      cnt      <= '0;
      scanning <= 1'b0;
    end else if (clear_i) begin
      for (int k = 0; k < int'(NPOS); k++) acc[k] <= '0;
      cnt      <= '0;
      scanning <= 1'b0;
    end else if (scanning) begin
      for (int k = 0; k < int'(NPOS) - 1; k++) acc[k] <= acc[k+1];
      acc[NPOS-1] <= acc[0];
      if (cnt == 5'(NPOS - 1)) begin
        scanning <= 1'b0;
        cnt      <= '0;
      end else begin
        cnt <= cnt + 5'd1;
      end
    end else begin
      for (int k = 0; k < int'(NPOS); k++)
        acc[k] <= acc[k] + (d0_done_i[k] ? sad_t'(d0_sad_i[k]) : '0)
                         + (d1_done_i[k] ? sad_t'(d1_sad_i[k]) : '0);
      if (scan_i) scanning <= 1'b1;
    end
  end

  assign busy_o      = scanning;
  assign out_valid_o = scanning;
  assign out_idx_o   = cnt;
  assign out_sad_o   = acc[0];

endmodule
