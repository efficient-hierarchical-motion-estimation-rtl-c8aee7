// tb_sad_accum: applies random done pulses and 4x4 SADs from two DAUs (never
// the same position from both in one cycle, plus some cycles where both do),
// then starts a scan and checks that the 25 sums come out in position order,
// one per cycle, right after the scan request. A second scan must return the
// same sums (circular buffer), and clear must zero them.
module tb_sad_accum;
  import hmea_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic       clear, scan, busy, ov;
  logic       d0_done [NPOS], d1_done [NPOS];
  sad4_t      d0_sad [NPOS], d1_sad [NPOS];
  logic [4:0] oidx;
  sad_t       osad;
  int         model [NPOS];

  sad_accum dut (.clk, .rst_n, .clear_i(clear), .d0_done_i(d0_done), .d0_sad_i(d0_sad),
                 .d1_done_i(d1_done), .d1_sad_i(d1_sad), .scan_i(scan), .busy_o(busy),
                 .out_valid_o(ov), .out_idx_o(oidx), .out_sad_o(osad));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_inputs();
    for (int k = 0; k < int'(NPOS); k++) begin
      d0_done[k] <= 1'b0; d1_done[k] <= 1'b0; d0_sad[k] <= sad4_t'($urandom); d1_sad[k] <= sad4_t'($urandom);
    end
  endtask

  task automatic scan_and_check(string what);
    scan <= 1'b1;
    @(posedge clk);
    scan <= 1'b0;
    for (int i = 0; i < int'(NPOS); i++) begin
      #1;
      checks++;
      if (!ov || int'(oidx) != i || int'(osad) != model[i]) begin
        failures++;
        $display("%s: slot %0d valid=%0d idx=%0d sad=%0d expected %0d", what, i, ov, oidx, osad, model[i]);
      end
      @(posedge clk);
    end
    #1;
    checks++;
    if (ov) begin failures++; $display("%s: scan did not stop", what); end
  endtask

  initial begin
    clear = 1'b0; scan = 1'b0;
    for (int k = 0; k < int'(NPOS); k++) begin
      d0_done[k] = 1'b0; d1_done[k] = 1'b0; d0_sad[k] = '0; d1_sad[k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 4; round++) begin
      clear <= 1'b1;
      @(posedge clk);
      clear <= 1'b0;
      for (int k = 0; k < int'(NPOS); k++) model[k] = 0;
      for (int t = 0; t < 8; t++) begin   // at most 16 SADs per position, as for a 16x16 block
        for (int k = 0; k < int'(NPOS); k++) begin
          logic a, b;
          sad4_t sa, sb;
          a = ($urandom % 2) == 0;
          b = ($urandom % 2) == 0;
          sa = sad4_t'($urandom);
          sb = sad4_t'($urandom);
          d0_done[k] <= a; d0_sad[k] <= sa;
          d1_done[k] <= b; d1_sad[k] <= sb;
          if (a) model[k] += int'(sa);
          if (b) model[k] += int'(sb);
        end
        @(posedge clk);
      end
      idle_inputs();
      @(posedge clk);
      scan_and_check("first scan");
      scan_and_check("second scan");
    end
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    for (int k = 0; k < int'(NPOS); k++) model[k] = 0;
    scan_and_check("after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
