// ime_pkg: shared constants and types of the low-power integer motion
// estimation (IME) engine.
//
// The engine matches a 16x16 current macroblock against candidate blocks of
// a search window with a four-step square search whose square interval is one
// pixel. A candidate's position is a motion vector (mv_t) in pixels relative
// to the co-located block; search-window coordinates are the MV plus the
// search range. The 41 partitions of an H.264 macroblock are numbered as
//   0       16x16
//   1..2    16x8  (top, bottom)
//   3..4    8x16  (left, right)
//   5..8    8x8   (raster order)
//   9..16   8x4   (two per 8x8, top then bottom)
//   17..24  4x8   (two per 8x8, left then right)
//   25..40  4x4   (raster order over the macroblock)
// The block size, the search range (+-32 horizontally, +-16 vertically) and
// the four moving directions follow the published architecture. The
// partition numbering, the coordinate widths and the tie-break rule of
// cand_better() are this design's own choices.
package ime_pkg;

  localparam int unsigned BLK      = 16;         // macroblock edge, pixels
  localparam int unsigned PIX_W    = 8;          // luma sample width
  localparam int unsigned SAD_W    = 16;         // holds 256*255
  localparam int unsigned NUM_PART = 41;         // H.264 partitions of one MB
  localparam int unsigned COORD_W  = 8;          // signed MV component width

  typedef logic [PIX_W-1:0]          pix_t;
  typedef logic [SAD_W-1:0]          sad_t;
  typedef logic signed [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
  } mv_t;

  // Moving direction of the candidate block. The reference array shifts its
  // contents the opposite way: DIR_DOWN is the array's up-shift, DIR_UP its
  // down-shift, DIR_RIGHT its left-shift and DIR_LEFT its right-shift.
  typedef enum logic [1:0] {
    DIR_UP    = 2'd0,
    DIR_DOWN  = 2'd1,
    DIR_LEFT  = 2'd2,
    DIR_RIGHT = 2'd3
  } dir_t;

  // Corner of a 3x3 square relative to its centre (end-point code).
  typedef enum logic [1:0] {
    EP_TL = 2'd0,
    EP_TR = 2'd1,
    EP_BL = 2'd2,
    EP_BR = 2'd3
  } ep_t;

  // Candidate ordering used wherever a minimum is kept: smaller SAD first,
  // then smaller y, then smaller x. The order is total, so the minimum over
  // a set of candidates does not depend on the order they were visited in.
  function automatic logic cand_better(input sad_t sad_a, input mv_t mv_a,
                                       input sad_t sad_b, input mv_t mv_b);
    if (sad_a != sad_b) return sad_a < sad_b;
    if (mv_a.y != mv_b.y) return mv_a.y < mv_b.y;
    return mv_a.x < mv_b.x;
  endfunction

  // Min-point code of a neighbour (dx,dy in -1..1, not both 0):
  // 0 (-1,-1), 1 (0,-1), 2 (1,-1), 3 (-1,0), 4 (1,0), 5 (-1,1), 6 (0,1), 7 (1,1).
  function automatic logic [2:0] mp_code(input int dx, input int dy);
    int k;
    k = (dy + 1) * 3 + (dx + 1);
    if (k > 4) k = k - 1;
    return 3'(k);
  endfunction

endpackage
