// tb_byte_delay: sends random bytes through a 4-stage and an 8-stage delay
// line and checks that each output equals the input of exactly DEPTH cycles
// earlier, and that both lines start from zero after reset.
module tb_byte_delay;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [7:0] d, q4, q8;
  logic [7:0] hist [$];

  byte_delay #(.DEPTH(4)) dut4 (.clk, .rst_n, .d_i(d), .q_o(q4));
  byte_delay #(.DEPTH(8)) dut8 (.clk, .rst_n, .d_i(d), .q_o(q8));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      d <= 8'($urandom);
      @(posedge clk);
      #1;
      hist.push_front(d);
      // hist[0] is the value sampled at this edge, hist[n] n cycles earlier
      checks += 2;
      if (q4 != ((hist.size() > 3) ? hist[3] : 8'd0)) begin failures++; $display("t=%0d q4=%0h", t, q4); end
      if (q8 != ((hist.size() > 7) ? hist[7] : 8'd0)) begin failures++; $display("t=%0d q8=%0h", t, q8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
