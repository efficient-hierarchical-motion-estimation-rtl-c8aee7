// tb_cand_cmp: feeds the comparator (four inputs per cycle) random candidates
// drawn from a small set of positions, each position always with the same
// SAD, as a repeated search position would be. After each search the best
// must be the first candidate with the least SAD, and the second the first
// candidate with the least SAD among the other positions.
module tb_cand_cmp;
  import hmea_pkg::*;

  localparam int NIN = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic  clear;
  cand_t cin [NIN];
  cand_t best, second;

  cand_cmp #(.NIN(NIN)) dut (.clk, .rst_n, .clear_i(clear), .cand_i(cin), .best_o(best), .second_o(second));

  int   pos_sad [81];
  cand_t seq [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cand_t mk(int p);
    cand_t r;
    r.valid = 1'b1;
    r.sad   = sad_t'(pos_sad[p]);
    r.mv.x  = mv_comp_t'(p % 9 - 4);
    r.mv.y  = mv_comp_t'(p / 9 - 4);
    return r;
  endfunction

  initial begin
    clear = 1'b0;
    for (int i = 0; i < NIN; i++) cin[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 300; s++) begin
      int bi, si;
      for (int p = 0; p < 81; p++) pos_sad[p] = (s % 2) ? int'($urandom_range(30)) : int'($urandom_range(65535));
      clear <= 1'b1;
      @(posedge clk);
      clear <= 1'b0;
      seq.delete();
      for (int t = 0; t < 20; t++) begin
        for (int i = 0; i < NIN; i++) begin
          if ($urandom % 4 != 0) begin
            cin[i] <= mk(int'($urandom_range(80)));
            seq.push_back(mk(int'($urandom_range(0))));  // placeholder, fixed below
            seq.pop_back();
          end else begin
            cin[i] <= '0;
          end
        end
        #1;
        for (int i = 0; i < NIN; i++) if (cin[i].valid) seq.push_back(cin[i]);
        @(posedge clk);
      end
      for (int i = 0; i < NIN; i++) cin[i] <= '0;
      @(posedge clk);
      #1;
      // reference: first least SAD, then first least SAD at another position
      bi = -1; si = -1;
      foreach (seq[n]) if (bi < 0 || seq[n].sad < seq[bi].sad) bi = n;
      foreach (seq[n]) if (seq[n].mv != seq[bi].mv && (si < 0 || seq[n].sad < seq[si].sad)) si = n;
      checks++;
      if (!best.valid || best.sad != seq[bi].sad || best.mv != seq[bi].mv) begin
        failures++;
        $display("search %0d: best sad %0d mv (%0d,%0d), expected sad %0d mv (%0d,%0d)", s,
                 best.sad, int'(best.mv.x), int'(best.mv.y), seq[bi].sad, int'(seq[bi].mv.x), int'(seq[bi].mv.y));
      end
      checks++;
      if (si >= 0 && (!second.valid || second.sad != seq[si].sad || second.mv != seq[si].mv)) begin
        failures++;
        $display("search %0d: second sad %0d mv (%0d,%0d), expected sad %0d mv (%0d,%0d)", s,
                 second.sad, int'(second.mv.x), int'(second.mv.y), seq[si].sad, int'(seq[si].mv.x), int'(seq[si].mv.y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
