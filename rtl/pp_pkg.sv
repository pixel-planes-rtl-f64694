// pp_pkg: shared constants and types of the Pixel-planes raster engine.
//
// Number formats: screen coordinates are SCREEN_BITS-bit unsigned integers
// (512 x 512 screen), depth is an L_BITS-bit unsigned integer (all ones is
// "infinitely far"), each colour intensity is an M_BITS-bit unsigned integer.
// Coefficients of F(x,y) = A*x + B*y + C' + C'' travel from the pre-processor
// to the broadcast unit as COEF_W-bit two's-complement words; on the memory
// grid they travel bit-serially, least significant bit first, and all
// arithmetic is modulo 2^(stream length), which is exact as long as F itself
// fits in the stream.
//
// The stream lengths are the document's: K+N+2 cycles for an edge, L+N+2 for
// the depth plane and M+N+2 for each colour plane, where N is SCREEN_BITS.
// K, L, M and the 512 x 512 screen are the document's figures; COEF_W and the
// op-code encoding are this design's own choices.
package pp_pkg;

  localparam int unsigned SCREEN_BITS = 9;   // N: 512 x 512 display
  localparam int unsigned K_BITS      = 10;  // K: bits of an edge coefficient
  localparam int unsigned L_BITS      = 16;  // L: bits of a depth value
  localparam int unsigned M_BITS      = 8;   // M: bits of one colour intensity
  localparam int unsigned COEF_W      = 40;  // parallel coefficient word width

  localparam int unsigned EDGE_LEN  = K_BITS + SCREEN_BITS + 2;
  localparam int unsigned Z_LEN     = L_BITS + SCREEN_BITS + 2;
  localparam int unsigned COLOR_LEN = M_BITS + SCREEN_BITS + 2;

  // Operation carried with every bit on the memory grid. The plane operations
  // last a whole coefficient stream and act at its last bit; CLEAR_Z and SWAP
  // are one-cycle control words.
  typedef enum logic [3:0] {
    OP_NOP        = 4'd0,
    OP_EDGE_FIRST = 4'd1,  // first edge of a polygon: also re-enables every cell
    OP_EDGE       = 4'd2,  // further edge: disables cells outside it
    OP_ZPLANE     = 4'd3,  // depth plane: z-buffer compare and update
    OP_RED        = 4'd4,  // colour planes: write one portion of I
    OP_GREEN      = 4'd5,
    OP_BLUE       = 4'd6,
    OP_CLEAR_Z    = 4'd7,  // new scene: preset every Z register to all ones
    OP_SWAP       = 4'd8   // scene done: copy every I register into P
  } op_t;

  // Control lines broadcast alongside the four coefficient bit streams.
  typedef struct packed {
    op_t  op;
    logic sof;   // first (least significant) bit of a stream, or a control word
    logic eof;   // last (sign) bit of a stream, or a control word
    logic keep;  // this bit index lies inside the register being written
  } grid_ctl_t;

  // One vertex as delivered by the host, in display coordinates.
  typedef struct packed {
    logic [SCREEN_BITS-1:0] x;
    logic [SCREEN_BITS-1:0] y;
    logic [L_BITS-1:0]      z;
    logic [M_BITS-1:0]      r;
    logic [M_BITS-1:0]      g;
    logic [M_BITS-1:0]      b;
  } vertex_t;

  // One entry of the host stream: a vertex or a scene control word.
  typedef enum logic [1:0] {
    HOST_VERTEX    = 2'd0,
    HOST_NEW_SCENE = 2'd1,
    HOST_END_SCENE = 2'd2
  } host_kind_t;

  typedef struct packed {
    host_kind_t kind;
    logic       last;  // with HOST_VERTEX: last vertex of the polygon
    vertex_t    v;
  } host_item_t;

  // One entry from the re-queue unit to the coefficient calculator: a
  // triangle (v1 is always the polygon's first vertex) or a scene word.
  typedef struct packed {
    host_kind_t kind;
    vertex_t    v1;
    vertex_t    v2;
    vertex_t    v3;
  } tri_item_t;

  // One coefficient set (or control word) from the pre-processor.
  typedef struct packed {
    op_t                op;
    logic signed [COEF_W-1:0] a;
    logic signed [COEF_W-1:0] b;
    logic signed [COEF_W-1:0] c1;  // C'
    logic signed [COEF_W-1:0] c2;  // C''
  } coef_word_t;

endpackage
