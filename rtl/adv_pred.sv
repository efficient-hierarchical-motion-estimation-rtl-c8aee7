// adv_pred: 8x8 prediction mode ("Block 2"). During the level-2 search it
// sums the DAU results per 8x8 subblock of the 16x16 macroblock, giving for
// each of the four subblocks the SAD of all 25 search positions, and then
// finds the least one of each subblock.
// Level-2 blocks are tagged {round, row}: round 0 covers macroblock columns
// 0..7 (DAU0 columns 0..3, DAU1 columns 4..7), round 1 columns 8..15, and row
// (0..3) is the 4x4 block row. Subblock q = {row[1], round}:
// 0 = top-left, 1 = top-right, 2 = bottom-left, 3 = bottom-right.
// `clear_i` zeroes the sums; `scan_i` then walks the 25 positions in 25 cycles
// and `done_o` pulses when best_idx_o/best_sad_o hold, per subblock, the
// position index k = a + 5b (displacement (a-2, b-2)) with the least SAD
// (the lowest k among equals).
// The subblock split by tag and the sequential scan are this design's choice.
module adv_pred
  import hmea_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear_i,
  input  logic        d0_done_i [NPOS],
  input  sad4_t       d0_sad_i  [NPOS],
  input  tag_t        d0_tag_i  [NPOS],
  input  logic        d1_done_i [NPOS],
  input  sad4_t       d1_sad_i  [NPOS],
  input  tag_t        d1_tag_i  [NPOS],
  input  logic        scan_i,
  output logic        done_o,
  output logic [4:0]  best_idx_o [4],
  output sad_t        best_sad_o [4]
);

  sad_t       acc [4][NPOS];
  logic [4:0] cnt;
  logic       scanning;
  logic [4:0] bidx [4];
  sad_t       bsad [4];

  function automatic logic [1:0] quad(tag_t t);
    return {t[1], t[2]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < 4; q++) begin
        for (int k = 0; k < int'(NPOS); k++) acc[q][k] <= '0;
        bidx[q] <= '0;
        bsad[q] <= '0;
      end
      cnt      <= '0;
      scanning <= 1'b0;
      done_o   <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (clear_i) begin
        for (int q = 0; q < 4; q++)
          for (int k = 0; k < int'(NPOS); k++) acc[q][k] <= '0;
        scanning <= 1'b0;
        cnt      <= '0;
      end else if (scanning) begin
        for (int q = 0; q < 4; q++) begin
          if (cnt == 5'd0 || acc[q][cnt] < bsad[q]) begin
            bsad[q] <= acc[q][cnt];
            bidx[q] <= cnt;
          end
        end
        if (cnt == 5'(NPOS - 1)) begin
          scanning <= 1'b0;
          cnt      <= '0;
          done_o   <= 1'b1;
        end else begin
          cnt <= cnt + 5'd1;
        end
      end else begin
        for (int k = 0; k < int'(NPOS); k++) begin
          for (int q = 0; q < 4; q++) begin
            acc[q][k] <= acc[q][k]
              + ((d0_done_i[k] && quad(d0_tag_i[k]) == 2'(q)) ? sad_t'(d0_sad_i[k]) : '0)
              + ((d1_done_i[k] && quad(d1_tag_i[k]) == 2'(q)) ? sad_t'(d1_sad_i[k]) : '0);
          end
        end
        if (scan_i) begin
          scanning <= 1'b1;
          cnt      <= '0;
        end
      end
    end
  end

  for (genvar q = 0; q < 4; q++) begin : g_out
    assign best_idx_o[q] = bidx[q];
    assign best_sad_o[q] = bsad[q];
  end

endmodule
