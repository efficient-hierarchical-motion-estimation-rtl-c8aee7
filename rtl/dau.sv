// dau: difference accumulation unit, a 5x5 semisystolic PE array that computes
// the 25 SADs of a 4x4 current block over a +-2 search range.
//
// Data flow. The current block C is sent in raster order, one pixel per cycle
// (16 cycles per block). The 8x8 search window is sent as two 4-column halves:
// Pl carries the left half row by row, one pixel per cycle, and Pr carries the
// right half in the same order but four cycles later than Pl (the caller adds
// that delay). Blocks may follow each other without a gap; block j then meets
// window rows 4j.. of a continuing Pl/Pr stream, which is how one stream of
// window rows serves several vertical offsets.
//
// Array. PE(a,b) (a = horizontal offset 0..4, b = vertical offset 0..4)
// computes the SAD for displacement (a-2, b-2). It sees C delayed by a+5b
// cycles, and the window halves delayed by b cycles. PE(0,b) always takes Pl,
// PE(4,b) always Pr, and PE(1..3,b) select Pl or Pr by the column of the current
// pixel: Pr when col + a >= 4. With these delays PE(a,b) pairs C(r,c) with
// window pixel (r+b, c+a) and the 25 PEs finish one cycle apart, in index
// order k = a + 5b.
//
// Outputs. For every PE, done_o[k] pulses one cycle after its last pixel, and
// sad_o[k]/tag_o[k] hold the result. PE k of block j finishes at
// t0 + 16j + 16 + k, where t0 is the cycle the block's first pixel entered.
//
// The array shape, the delays (5 cycles on C and 1 cycle on Pl/Pr between PE
// groups, 1 cycle on C between PEs of a group) and the Pl/Pr multiplexing
// follow the DAU description; deriving the multiplexer selects from a column
// index carried with C, instead of from a separate DFF chain, is this design's
// choice.
module dau
  import hmea_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  cstream_t c_i,               // current block stream
  input  pix_t     pl_i,              // left half of the search window
  input  pix_t     pr_i,              // right half, 4 cycles after pl_i
  output logic     done_o [NPOS],
  output sad4_t    sad_o  [NPOS],
  output tag_t     tag_o  [NPOS]
);

  localparam int unsigned CDEPTH = NPOS;  // C taps 0..24

  cstream_t ctap  [CDEPTH];   // ctap[n]: C delayed n cycles
  pix_t     pltap [5];        // Pl delayed b cycles
  pix_t     prtap [5];        // Pr delayed b cycles

  assign ctap[0]  = c_i;
  assign pltap[0] = pl_i;
  assign prtap[0] = pr_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 1; n < int'(CDEPTH); n++) ctap[n] <= '0;
      for (int b = 1; b < 5; b++) begin
        pltap[b] <= '0;
        prtap[b] <= '0;
      end
    end else begin
      for (int n = 1; n < int'(CDEPTH); n++) ctap[n] <= ctap[n-1];
      for (int b = 1; b < 5; b++) begin
        pltap[b] <= pltap[b-1];
        prtap[b] <= prtap[b-1];
      end
    end
  end

  for (genvar b = 0; b < 5; b++) begin : g_row
    for (genvar a = 0; a < 5; a++) begin : g_col
      localparam int unsigned K = a + 5*b;
      pix_t p_sel;
      always_comb begin
        if ((int'(ctap[K].col) + a) >= 4) p_sel = prtap[b];
        else                              p_sel = pltap[b];
      end
      pe u_pe (
        .clk    (clk),
        .rst_n  (rst_n),
        .c_i    (ctap[K]),
        .p_i    (p_sel),
        .done_o (done_o[K]),
        .sad_o  (sad_o[K]),
        .tag_o  (tag_o[K])
      );
    end
  end

endmodule
