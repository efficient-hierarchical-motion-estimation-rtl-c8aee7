// tb_dau: streams NB random 4x4 blocks back to back through one DAU against
// a random 8-column search window of 4*NB+4 rows (left half on Pl, right
// half four cycles later on Pr). Checks every one of the 25*NB SADs against a
// direct computation: PE k = a + 5b of block j must give
// sum |C_j(r,c) - W(4j+r+b, c+a)| with its tag and finish exactly at cycle
// 16j + 16 + k after the first pixel.
module tb_dau;
  import hmea_pkg::*;

  localparam int NB = 4;
  localparam int ROWS = 4*NB + 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  cstream_t c;
  pix_t     pl, pr;
  logic     done [NPOS];
  sad4_t    sad  [NPOS];
  tag_t     tag  [NPOS];

  dau dut (.clk, .rst_n, .c_i(c), .pl_i(pl), .pr_i(pr), .done_o(done), .sad_o(sad), .tag_o(tag));

  pix_t cur [NB][4][4];
  pix_t win [ROWS][8];
  int   cyc;
  int   seen [NB][NPOS];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sad(int j, int a, int b);
    int s;
    s = 0;
    for (int r = 0; r < 4; r++)
      for (int cc = 0; cc < 4; cc++) begin
        int x, y;
        x = int'(cur[j][r][cc]);
        y = int'(win[4*j + r + b][cc + a]);
        s += (x > y) ? x - y : y - x;
      end
    return s;
  endfunction

  // check every done pulse when it happens
  always @(posedge clk) begin
    #1;
    for (int k = 0; k < int'(NPOS); k++) begin
      if (done[k]) begin
        int j, exp_cyc;
        j = int'(tag[k]);
        exp_cyc = 16*j + 16 + k;
        checks++;
        if (j >= NB || int'(sad[k]) != ref_sad(j, k % 5, k / 5) || cyc != exp_cyc) begin
          failures++;
          $display("PE %0d tag %0d: sad %0d at cycle %0d", k, j, sad[k], cyc);
        end else begin
          seen[j][k]++;
        end
      end
    end
  end

  initial begin
    c = '0; pl = '0; pr = '0; cyc = -100;
    for (int j = 0; j < NB; j++)
      for (int r = 0; r < 4; r++)
        for (int cc = 0; cc < 4; cc++) cur[j][r][cc] = pix_t'($urandom);
    for (int r = 0; r < ROWS; r++)
      for (int cc = 0; cc < 8; cc++) win[r][cc] = pix_t'($urandom);
    win[0][0] = 8'd255; cur[0][0][0] = 8'd0;
    for (int j = 0; j < NB; j++) seen[j] = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int t = 0; t < 16*NB + 64; t++) begin
      cyc = t;   // cycle index of the values applied now
      if (t < 16*NB) begin
        c.valid <= 1'b1;
        c.first <= (t % 16 == 0);
        c.last  <= (t % 16 == 15);
        c.col   <= 2'(t % 4);
        c.tag   <= tag_t'(t / 16);
        c.pix   <= cur[t/16][(t/4) % 4][t % 4];
      end else begin
        c <= '0;
      end
      pl <= (t < 4*ROWS) ? win[t/4][t%4] : pix_t'($urandom);
      pr <= (t >= 4 && t < 4*ROWS + 4) ? win[(t-4)/4][4 + (t-4)%4] : pix_t'($urandom);
      @(posedge clk);
    end
    for (int j = 0; j < NB; j++)
      for (int k = 0; k < int'(NPOS); k++) begin
        checks++;
        if (seen[j][k] != 1) begin failures++; $display("block %0d PE %0d reported %0d times", j, k, seen[j][k]); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
