// half_pel: half-pel refinement around the final integer motion vector.
// The eight half-pel positions around the integer MV are evaluated for the
// 16x16 macroblock and the least SAD among them and the integer position is
// kept. A half-pel reference pixel is the mean of its two (horizontal or
// vertical half position) or four (diagonal half position) integer
// neighbours, with the low bits dropped: (a+b)>>1 and (a+b+c+d)>>2.
//
// How it works: the 18x18 reference region around the displaced block
// (integer MV -1 .. +16) is read in raster order, one pixel per cycle, with
// the matching current pixel. Two 18-stage shift registers (line buffers)
// and two column registers per row hold a 3x3 neighbourhood. Once it is
// complete, its centre is the integer match of one current pixel, and eight
// accumulators add the absolute differences for the eight half positions.
//
// Interface: pulse start_i with the macroblock position, the integer MV
// (level-2 pixels) and its SAD. The block reads through one current-frame and
// one previous-frame port (level-2 image, coordinates clamped to the frame,
// data one cycle after rd_en_o). done_o pulses when hmv_o (MV in half-pel
// units) and hsad_o are valid. Ties keep the integer position, then the
// lowest half position index (row-major order of the 3x3 grid around the MV).
// Timing: 324 read cycles + 4, i.e. done_o 328 cycles after start_i.
// The eight half positions, the three kinds of interpolated pixel and the
// truncating averages follow the half-pel search description; the streaming
// 3x3 window with its own accumulators (instead of reusing the DAUs) is this
// design's choice.
module half_pel
  import hmea_pkg::*;
#(
  parameter int unsigned W = 352,
  parameter int unsigned H = 288
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  input  logic [7:0] mb_x_i,
  input  logic [7:0] mb_y_i,
  input  mv_t        mv_i,
  input  sad_t       sad_i,
  output logic       busy_o,
  output logic       rd_en_o,
  output crd_t       cur_x_o,
  output crd_t       cur_y_o,
  output crd_t       ref_x_o,
  output crd_t       ref_y_o,
  input  pix_t       cur_pix_i,
  input  pix_t       ref_pix_i,
  output mv_t        hmv_o,
  output sad_t       hsad_o,
  output logic       done_o
);

  localparam int unsigned RS = 18;          // region side
  localparam crd_t XMAX = crd_t'(W - 1);
  localparam crd_t YMAX = crd_t'(H - 1);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_FLUSH, S_PICK} state_e;

  state_e     state;
  logic [4:0] u, v;            // read position in the region
  crd_t       bx, by;          // macroblock corner
  mv_t        mv;
  sad_t       isad;
  logic [1:0] fl;

  function automatic crd_t clamp(crd_t x, crd_t hi);
    if (x < 0)  return '0;
    if (x > hi) return hi;
    return x;
  endfunction

  // ---- read addresses ----
  always_comb begin
    rd_en_o = (state == S_READ);
    ref_x_o = clamp(bx + crd_t'(mv.x) - crd_t'(1) + crd_t'(u), XMAX);
    ref_y_o = clamp(by + crd_t'(mv.y) - crd_t'(1) + crd_t'(v), YMAX);
    cur_x_o = clamp(bx + crd_t'(u) - crd_t'(2), XMAX);
    cur_y_o = clamp(by + crd_t'(v) - crd_t'(2), YMAX);
  end

  // ---- returned data, one cycle later ----
  logic       dv;
  logic [4:0] du, dvv;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dv <= 1'b0; du <= '0; dvv <= '0;
    end else begin
      dv  <= rd_en_o;
      du  <= u;
      dvv <= v;
    end
  end

  // 3x3 neighbourhood: r[row][col], row 2 / col 2 = newest
  pix_t lb1 [RS];   // previous row
  pix_t lb2 [RS];   // row before that
  pix_t r [3][3];

  always_comb begin
    r[2][2] = ref_pix_i;
    r[1][2] = lb1[RS-1];
    r[0][2] = lb2[RS-1];
  end

  pix_t col1 [3], col0 [3];   // columns u-1 and u-2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(RS); i++) begin lb1[i] <= '0; lb2[i] <= '0; end
      for (int i = 0; i < 3; i++) begin col1[i] <= '0; col0[i] <= '0; end
    end else if (dv) begin
      lb1[0] <= ref_pix_i;
      lb2[0] <= lb1[RS-1];
      for (int i = 1; i < int'(RS); i++) begin
        lb1[i] <= lb1[i-1];
        lb2[i] <= lb2[i-1];
      end
      for (int i = 0; i < 3; i++) begin
        col1[i] <= r[i][2];
        col0[i] <= col1[i];
      end
    end
  end

  // neighbourhood around the centre n[1][1]; n[y][x]
  pix_t n [3][3];
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      n[i][0] = col0[i];
      n[i][1] = col1[i];
      n[i][2] = r[i][2];
    end
  end

  // interpolated pixel of half position (hx, hy), hx, hy in -1..1
  function automatic pix_t interp(int hx, int hy, pix_t nb [3][3]);
    logic [9:0] s;
    if (hx != 0 && hy != 0) begin
      s = 10'(nb[1][1]) + 10'(nb[1][1+hx]) + 10'(nb[1+hy][1]) + 10'(nb[1+hy][1+hx]);
      return s[9:2];
    end else begin
      s = 10'(nb[1][1]) + 10'(nb[1+hy][1+hx]);
      return s[8:1];
    end
  endfunction

  // half positions 0..7 in row-major order of the 3x3 grid, centre skipped
  function automatic int hxof(int p);
    int q;
    q = (p < 4) ? p : p + 1;
    return q % 3 - 1;
  endfunction
  function automatic int hyof(int p);
    int q;
    q = (p < 4) ? p : p + 1;
    return q / 3 - 1;
  endfunction

  sad_t acc [8];
  logic win_ok;
  assign win_ok = dv && (du >= 5'd2) && (dvv >= 5'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 8; p++) acc[p] <= '0;
    end else if (start_i && state == S_IDLE) begin
      for (int p = 0; p < 8; p++) acc[p] <= '0;
    end else if (win_ok) begin
      for (int p = 0; p < 8; p++) begin
        pix_t ip;
        ip = interp(hxof(p), hyof(p), n);
        acc[p] <= acc[p] + sad_t'((cur_pix_i >= ip) ? pix_t'(cur_pix_i - ip) : pix_t'(ip - cur_pix_i));
      end
    end
  end

  // ---- sequencing and final choice ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      u <= '0; v <= '0; fl <= '0;
      bx <= '0; by <= '0; mv <= '0; isad <= '0;
      hmv_o <= '0; hsad_o <= '0; done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      case (state)
        S_IDLE: if (start_i) begin
          bx    <= crd_t'({mb_x_i, 4'b0000});
          by    <= crd_t'({mb_y_i, 4'b0000});
          mv    <= mv_i;
          isad  <= sad_i;
          u     <= '0;
          v     <= '0;
          state <= S_READ;
        end
        S_READ: begin
          if (u == 5'(RS - 1)) begin
            u <= '0;
            if (v == 5'(RS - 1)) begin
              v     <= '0;
              fl    <= '0;
              state <= S_FLUSH;
            end else begin
              v <= v + 5'd1;
            end
          end else begin
            u <= u + 5'd1;
          end
        end
        S_FLUSH: begin
          fl <= fl + 2'd1;
          if (fl == 2'd1) state <= S_PICK;
        end
        S_PICK: begin
          sad_t bs;
          mv_t  bm;
          bs   = isad;
          bm.x = mv_comp_t'(mv.x <<< 1);
          bm.y = mv_comp_t'(mv.y <<< 1);
          for (int p = 0; p < 8; p++) begin
            if (acc[p] < bs) begin
              bs   = acc[p];
              bm.x = mv_comp_t'(mv.x <<< 1) + mv_comp_t'(hxof(p));
              bm.y = mv_comp_t'(mv.y <<< 1) + mv_comp_t'(hyof(p));
            end
          end
          hsad_o <= bs;
          hmv_o  <= bm;
          done_o <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state != S_IDLE);

endmodule
