// pe: processing element of the difference accumulation unit (DAU).
// Each PE owns one search position. For every valid current-block pixel it
// adds |c - p| to its accumulator; the pixel marked `first` restarts the sum and
// the pixel marked `last` ends it. One cycle after the last pixel, `done_o`
// pulses for one cycle and `sad_o`/`tag_o` hold the finished 4x4 SAD and the
// tag of the block until the next block ends.
// The absolute-difference-and-accumulate function is the one the PE array is
// described with; the first/last framing and the tag are this design's choice.
module pe
  import hmea_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  cstream_t c_i,    // current pixel and its framing
  input  pix_t     p_i,    // search-window pixel paired with it
  output logic     done_o,
  output sad4_t    sad_o,
  output tag_t     tag_o
);

  sad4_t acc;
  sad4_t absdiff;
  sad4_t sum;

  always_comb begin
    absdiff = (c_i.pix >= p_i) ? sad4_t'(pix_t'(c_i.pix - p_i)) : sad4_t'(pix_t'(p_i - c_i.pix));
    sum     = (c_i.first ? '0 : acc) + absdiff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      done_o <= 1'b0;
      sad_o  <= '0;
      tag_o  <= '0;
    end else begin
      done_o <= c_i.valid && c_i.last;
      if (c_i.valid) begin
        acc <= sum;
        if (c_i.last) begin
          sad_o <= sum;
          tag_o <= c_i.tag;
        end
      end
    end
  end

endmodule
