// tb_downsampler: streams two random 64x16 frames, four pixels per cycle,
// through the downsampler and checks every level-1 and level-0 word against
// the 2x2 mean (sum >> 2) computed here, the word counts per frame, and that
// each level-1 word appears exactly 3 cycles after the input word that
// completes it.
module tb_downsampler;
  import hmea_pkg::*;

  localparam int W = 64;
  localparam int H = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic       in_valid, in_sof;
  pix_t       in_pix [4];
  logic       l1_v, l0_v;
  logic [9:0] l1_x, l1_y, l0_x, l0_y;
  pix_t       l1_pix [4], l0_pix [4];

  downsampler #(.W(W), .H(H)) dut (.clk, .rst_n, .in_valid_i(in_valid), .in_sof_i(in_sof), .in_pix_i(in_pix),
    .l1_valid_o(l1_v), .l1_x_o(l1_x), .l1_y_o(l1_y), .l1_pix_o(l1_pix),
    .l0_valid_o(l0_v), .l0_x_o(l0_x), .l0_y_o(l0_y), .l0_pix_o(l0_pix));

  pix_t img [H][W];
  int   lvl1 [H/2][W/2];
  int   cyc, n1, n0;
  int   due [$];   // cycles at which a level-1 word is expected

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    cyc++;
    if (l1_v) begin
      n1++;
      checks++;
      if (due.size() == 0 || due[0] != cyc) begin
        failures++; $display("level-1 word at cycle %0d, not when due", cyc);
      end
      if (due.size() > 0) void'(due.pop_front());
      for (int i = 0; i < 4; i++) begin
        int x, y;
        x = 4*int'(l1_x) + i; y = int'(l1_y);
        checks++;
        if (int'(l1_pix[i]) != lvl1[y][x]) begin
          failures++; $display("level-1 (%0d,%0d) = %0d, expected %0d", x, y, l1_pix[i], lvl1[y][x]);
        end
      end
    end
    if (l0_v) begin
      n0++;
      for (int i = 0; i < 4; i++) begin
        int x, y, e;
        x = 4*int'(l0_x) + i; y = int'(l0_y);
        e = (lvl1[2*y][2*x] + lvl1[2*y][2*x+1] + lvl1[2*y+1][2*x] + lvl1[2*y+1][2*x+1]) / 4;
        checks++;
        if (int'(l0_pix[i]) != e) begin
          failures++; $display("level-0 (%0d,%0d) = %0d, expected %0d", x, y, l0_pix[i], e);
        end
      end
    end
  end

  initial begin
    in_valid = 1'b0; in_sof = 1'b0; cyc = 0; n1 = 0; n0 = 0;
    for (int i = 0; i < 4; i++) in_pix[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[y][x] = (f == 0 && y < 2) ? 8'd255 : pix_t'($urandom);
      for (int y = 0; y < H/2; y++)
        for (int x = 0; x < W/2; x++)
          lvl1[y][x] = (int'(img[2*y][2*x]) + int'(img[2*y][2*x+1]) + int'(img[2*y+1][2*x]) + int'(img[2*y+1][2*x+1])) / 4;
      n1 = 0; n0 = 0;
      for (int y = 0; y < H; y++)
        for (int w = 0; w < W/4; w++) begin
          in_valid <= 1'b1;
          in_sof   <= (y == 0 && w == 0);
          for (int i = 0; i < 4; i++) in_pix[i] <= img[y][4*w+i];
          if (y % 2 == 1 && w % 2 == 1) due.push_back(cyc + 1 + 3);
          @(posedge clk);
          // one idle cycle now and then
          if ((y + w) % 5 == 0) begin in_valid <= 1'b0; @(posedge clk); end
        end
      in_valid <= 1'b0;
      in_sof <= 1'b0;
      repeat (10) @(posedge clk);
      checks++;
      if (n1 != (W/8) * (H/2) || n0 != (W/16) * (H/4)) begin
        failures++; $display("frame %0d: %0d level-1 and %0d level-0 words", f, n1, n0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
