// tb_adv_pred: applies random level-2 style DAU results (random tags, SADs and
// done pulses on both DAUs), then scans. For each of the four 8x8 subblocks
// the reported position must be the lowest-index position with the least
// summed SAD, and done must pulse exactly 26 cycles after the scan request.
module tb_adv_pred;
  import hmea_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic       clear, scan, done;
  logic       d0_done [NPOS], d1_done [NPOS];
  sad4_t      d0_sad [NPOS], d1_sad [NPOS];
  tag_t       d0_tag [NPOS], d1_tag [NPOS];
  logic [4:0] bidx [4];
  sad_t       bsad [4];
  int         model [4][NPOS];

  adv_pred dut (.clk, .rst_n, .clear_i(clear),
                .d0_done_i(d0_done), .d0_sad_i(d0_sad), .d0_tag_i(d0_tag),
                .d1_done_i(d1_done), .d1_sad_i(d1_sad), .d1_tag_i(d1_tag),
                .scan_i(scan), .done_o(done), .best_idx_o(bidx), .best_sad_o(bsad));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // subblock of a tag {round, row}: bottom = row >= 2, right = round
  function automatic int quad(tag_t t);
    return 2 * int'(t[1]) + int'(t[2]);
  endfunction

  initial begin
    clear = 1'b0; scan = 1'b0;
    for (int k = 0; k < int'(NPOS); k++) begin
      d0_done[k] = 1'b0; d1_done[k] = 1'b0; d0_sad[k] = '0; d1_sad[k] = '0; d0_tag[k] = '0; d1_tag[k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 40; s++) begin
      int lat;
      clear <= 1'b1;
      @(posedge clk);
      clear <= 1'b0;
      for (int q = 0; q < 4; q++) for (int k = 0; k < int'(NPOS); k++) model[q][k] = 0;
      for (int t = 0; t < 16; t++) begin
        for (int k = 0; k < int'(NPOS); k++) begin
          logic a, b;
          tag_t ta, tb;
          sad4_t sa, sb;
          a = ($urandom % 2) == 0; b = ($urandom % 2) == 0;
          ta = tag_t'($urandom); tb = tag_t'($urandom);
          // small SADs in odd searches make equal sums likely
          sa = (s % 2) ? sad4_t'($urandom_range(3)) : sad4_t'($urandom);
          sb = (s % 2) ? sad4_t'($urandom_range(3)) : sad4_t'($urandom);
          d0_done[k] <= a; d0_tag[k] <= ta; d0_sad[k] <= sa;
          d1_done[k] <= b; d1_tag[k] <= tb; d1_sad[k] <= sb;
          if (a) model[quad(ta)][k] += int'(sa);
          if (b) model[quad(tb)][k] += int'(sb);
        end
        @(posedge clk);
      end
      for (int k = 0; k < int'(NPOS); k++) begin d0_done[k] <= 1'b0; d1_done[k] <= 1'b0; end
      scan <= 1'b1;
      @(posedge clk);
      scan <= 1'b0;
      lat = 1;
      #1;
      while (!done && lat < 100) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 26) begin failures++; $display("search %0d: done after %0d cycles", s, lat); end
      for (int q = 0; q < 4; q++) begin
        int bk;
        bk = 0;
        for (int k = 1; k < int'(NPOS); k++) if (model[q][k] < model[q][bk]) bk = k;
        checks++;
        if (int'(bidx[q]) != bk || int'(bsad[q]) != model[q][bk]) begin
          failures++;
          $display("search %0d subblock %0d: idx %0d sad %0d, expected idx %0d sad %0d", s, q, bidx[q], bsad[q], bk, model[q][bk]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
