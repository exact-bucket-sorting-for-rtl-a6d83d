// seg_pkg: types and constants shared by the blocks of the segmenting unit.
//
// Coordinates are unsigned integer pixel positions. A segment (sx, sy) is the
// closed rectangle [sx*SW, (sx+1)*SW] x [sy*SH, (sy+1)*SH]; the segment size
// SW x SH is programmable as powers of two (log2 values). The edge function of
// triangle side k is A_k(x,y) = (x - x_i)*Dy - (y - y_i)*Dx; the input
// pipeline scales each side by +1 or -1 so that the closed triangle is exactly
// the set of points where all three A_k are non-negative, i.e. a point is
// inside when all three sign bits are 0.
package seg_pkg;

  // Coordinate width: 11 bits covers screens up to 2048 x 2048 (640 x 480 is
  // the resolution the design is sized for).
  localparam int unsigned COORD_W = 11;
  // Segment coordinate width (enough for 2048/32 columns, 2048/16 rows).
  localparam int unsigned SEG_W   = 8;
  // Edge function width: products of an (COORD_W+2)-bit offset and an
  // (COORD_W+1)-bit delta, plus headroom for one segment of stepping beyond
  // the screen in every direction.
  localparam int unsigned A_W     = 2 * COORD_W + 6;
  // Triangle pointer width (the word written into the pointer lists).
  localparam int unsigned PTR_W   = 32;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [SEG_W-1:0]   segc_t;
  typedef logic signed [A_W-1:0] aval_t;
  typedef logic [PTR_W-1:0]   ptr_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
  } vertex_t;

  // Setup data for one triangle, produced by the input pipeline and loaded by
  // the segment generator. Index k of each array is triangle side k
  // (0: A-B, 1: A-C, 2: B-C, vertices sorted by Y).
  typedef struct packed {
    ptr_t          ptr;     // triangle pointer
    aval_t [2:0]   a_tl;    // A values at SVertex TL of the first segment
    aval_t [2:0]   a_tr;    // A values at SVertex TR of the first segment
    aval_t [2:0]   dkx;     // Dx * segment height (row step)
    aval_t [2:0]   dky;     // Dy * segment width  (column step)
    segc_t         col_a;   // segment of Vertex A
    segc_t         row_a;
    segc_t         row_c;   // segment row of Vertex C (last row)
    segc_t         col_l;   // leftmost column the triangle reaches
    segc_t         col_r;   // rightmost column the triangle reaches
  } tri_setup_t;

  // One overlapped segment, as handed to the address generator.
  typedef struct packed {
    ptr_t  ptr;
    segc_t sx;
    segc_t sy;
  } seg_hit_t;

  // Steps of the segment generator (Table 1 of the micro-operations).
  typedef enum logic [2:0] {
    STEP_NONE  = 3'd0,  // idle, or held by the address generator
    STEP_LOAD  = 3'd1,  // load a new triangle
    STEP_RIGHT = 3'd2,
    STEP_LEFT  = 3'd3,
    STEP_JUMP  = 3'd4,  // to the segment left of the row's first segment
    STEP_ROWGP = 3'd5,  // row step below the current segment
    STEP_ROW   = 3'd6,  // row step below the last good step-down point
    STEP_DONE  = 3'd7   // triangle finished, nothing to load
  } step_e;

endpackage
