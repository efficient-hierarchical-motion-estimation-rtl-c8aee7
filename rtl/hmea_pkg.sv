// hmea_pkg: shared widths, types and constants of the hierarchical motion
// estimator (HMEA). The estimator searches a 16x16 macroblock on a three-level
// pyramid: level 0 (quarter-quarter size, 4x4 block), level 1 (half size, 8x8
// block) and level 2 (full size, 16x16 block). All SAD arithmetic is built on a
// 4x4 block searched over +-2 pixels, which gives 25 search positions.
package hmea_pkg;

  localparam int unsigned PIX_W  = 8;   // gray-level pixel
  localparam int unsigned SAD4_W = 12;  // SAD of one 4x4 block: 16*255 < 2^12
  localparam int unsigned SAD_W  = 16;  // SAD of a 16x16 block: 256*255 < 2^16
  localparam int unsigned NPOS   = 25;  // search positions of one DAU (+-2 by +-2)
  localparam int unsigned TAG_W  = 3;   // {round, 4x4 block row index}
  localparam int unsigned MV_W   = 8;   // signed motion-vector component
  localparam int unsigned CRD_W  = 12;  // signed pixel coordinate

  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic [SAD4_W-1:0]       sad4_t;
  typedef logic [SAD_W-1:0]        sad_t;
  typedef logic signed [MV_W-1:0]  mv_comp_t;
  typedef logic signed [CRD_W-1:0] crd_t;
  typedef logic [TAG_W-1:0]        tag_t;

  typedef struct packed {
    mv_comp_t x;
    mv_comp_t y;
  } mv_t;

  // One sample of the current-block stream of a DAU. A 4x4 block is sent in
  // raster order, one pixel per cycle; first/last mark its first and last pixel.
  typedef struct packed {
    logic       valid;
    logic       first;
    logic       last;
    logic [1:0] col;   // column of the pixel inside its 4x4 block
    tag_t       tag;   // carried to the PE outputs to identify the block
    pix_t       pix;
  } cstream_t;

  // A SAD with its motion vector, as handled by the comparators.
  typedef struct packed {
    logic valid;
    sad_t sad;
    mv_t  mv;
  } cand_t;

  typedef enum logic [1:0] {LVL0 = 2'd0, LVL1 = 2'd1, LVL2 = 2'd2} level_e;

endpackage
