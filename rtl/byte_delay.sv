// byte_delay: fixed-length shift register ("r-shift register" of the
// estimator's datapath). It delays a value of any type T by DEPTH clock cycles
// and is used to start DAU1 four cycles after DAU0 and to present the right
// half of a search window (Pr) four cycles after its left half (Pl).
// DEPTH = 0 is a plain wire. Registers reset to zero.
module byte_delay #(
  parameter int unsigned DEPTH = 4,
  parameter type         T     = logic [7:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  T     d_i,
  output T     q_o
);

  if (DEPTH == 0) begin : g_wire
    assign q_o = d_i;
  end else begin : g_shift
    T sr [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) sr[i] <= T'(0);
      end else begin
        sr[0] <= d_i;
        for (int i = 1; i < int'(DEPTH); i++) sr[i] <= sr[i-1];
      end
    end
    assign q_o = sr[DEPTH-1];
  end

endmodule
