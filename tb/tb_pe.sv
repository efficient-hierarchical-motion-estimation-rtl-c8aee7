// tb_pe: drives one processing element with random 4x4 blocks (16 pixel
// pairs framed by first/last), with and without idle cycles between pixels,
// and checks the SAD, the tag and that done pulses exactly one cycle after
// the last pixel.
module tb_pe;
  import hmea_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  cstream_t c;
  pix_t     p;
  logic     done;
  sad4_t    sad;
  tag_t     tag;

  pe dut (.clk, .rst_n, .c_i(c), .p_i(p), .done_o(done), .sad_o(sad), .tag_o(tag));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_sad;
    tag_t tg;
    c = '0; p = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 200; blk++) begin
      expect_sad = 0;
      tg = tag_t'($urandom);
      for (int i = 0; i < 16; i++) begin
        pix_t a, b;
        a = pix_t'($urandom);
        b = pix_t'($urandom);
        if (blk % 7 == 0) begin a = 8'd255; b = 8'd0; end   // largest SAD
        expect_sad += (a > b) ? int'(a) - int'(b) : int'(b) - int'(a);
        c.valid <= 1'b1; c.first <= (i == 0); c.last <= (i == 15);
        c.col <= 2'(i); c.tag <= tg; c.pix <= a; p <= b;
        @(posedge clk);
        c.valid <= 1'b0; c.first <= 1'b0; c.last <= 1'b0;
        #1;
        checks++;
        if (done != (i == 15)) begin failures++; $display("blk %0d pixel %0d: done=%0d", blk, i, done); end
        if (blk % 3 == 1 && i < 15) begin
          c.pix <= pix_t'($urandom); p <= pix_t'($urandom);   // idle cycle, ignored
          @(posedge clk);
        end
      end
      checks++;
      if (int'(sad) != expect_sad || tag != tg) begin
        failures++;
        $display("blk %0d: sad %0d tag %0d, expected %0d tag %0d", blk, sad, tag, expect_sad, tg);
      end
    end
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("done stayed high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
