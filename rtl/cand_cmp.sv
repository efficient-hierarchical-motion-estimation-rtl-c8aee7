// cand_cmp: candidate comparator. It keeps the least and the second-least SAD
// seen since `clear_i`, each with its motion vector (MV).
// Up to NIN candidates arrive per cycle; they are inserted one after another
// in input order within the cycle. A candidate replaces the best one only if
// its SAD is strictly smaller, so among equal SADs the earliest wins. A
// candidate whose MV equals the current best MV is never taken as the second
// one: the level-0 search evaluates some positions twice (both DAUs cover
// horizontal offset 0, both rounds vertical offset 0), and the two candidates
// must be different positions.
// Level 0 uses best and second (two MV candidates); levels 1 and 2 use best.
// Results are registered: a candidate presented in cycle t is reflected in the
// outputs from cycle t+1.
module cand_cmp
  import hmea_pkg::*;
#(
  parameter int unsigned NIN = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear_i,
  input  cand_t cand_i [NIN],
  output cand_t best_o,
  output cand_t second_o
);

  cand_t best_q, second_q;
  cand_t best_d, second_d;

  always_comb begin
    best_d   = best_q;
    second_d = second_q;
    for (int i = 0; i < int'(NIN); i++) begin
      if (cand_i[i].valid) begin
        if (!best_d.valid || cand_i[i].sad < best_d.sad) begin
          if (best_d.valid && best_d.mv != cand_i[i].mv) second_d = best_d;
          best_d = cand_i[i];
        end else if (cand_i[i].mv != best_d.mv &&
                     (!second_d.valid || cand_i[i].sad < second_d.sad)) begin
          second_d = cand_i[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_q   <= '0;
      second_q <= '0;
    end else if (clear_i) begin
      best_q   <= '0;
      second_q <= '0;
    end else begin
      best_q   <= best_d;
      second_q <= second_d;
    end
  end

  assign best_o   = best_q;
  assign second_o = second_q;

endmodule
