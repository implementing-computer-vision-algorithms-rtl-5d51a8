// vision_pkg: types and constants shared by the blob-finding vision pipeline.
//
// The pipeline turns a 16-bit RGB frame into a list of objects. Pixel
// coordinates are 9 bits wide (line and column), and an object record is
// 32 bits: 9-bit line and 9-bit column of the object's area centre plus a
// 14-bit size of its enclosing chain. The default frame is 320 x 240.
// The bit order inside the 16-bit pixel (5-6-5, red in the top bits) and the
// order of the fields inside the 32-bit record are this design's choice.
package vision_pkg;

  localparam int unsigned IMG_W_DEF = 320;   // pixels per line
  localparam int unsigned IMG_H_DEF = 240;   // lines per frame
  localparam int unsigned COORD_W   = 9;     // bits of a line or column number
  localparam int unsigned SIZE_W    = 14;    // bits of the chain size field
  localparam int unsigned REC_W     = 32;    // bits of an object record

  typedef logic [COORD_W-1:0] coord_t;

  // Which stage owns the frame; the stages run one after the other.
  typedef enum logic [1:0] {
    PH_IDLE    = 2'd0,   // waiting for the first pixel of a frame
    PH_CAPTURE = 2'd1,   // thresholding incoming pixels into the binary image
    PH_EDGE    = 2'd2,   // edge extraction
    PH_CHAIN   = 2'd3    // chain-code segmentation
  } phase_t;

  // 16-bit RGB pixel as delivered by the video decoder: 5 bits red,
  // 6 bits green, 5 bits blue.
  typedef struct packed {
    logic [4:0] r;
    logic [5:0] g;
    logic [4:0] b;
  } rgb565_t;

  // Inclusive colour ranges of the threshold stage.
  typedef struct packed {
    logic [4:0] r_lo, r_hi;
    logic [5:0] g_lo, g_hi;
    logic [4:0] b_lo, b_hi;
  } thr_cfg_t;

  // One entry of the object array.
  typedef struct packed {
    coord_t            line;    // line of the area centre
    coord_t            column;  // column of the area centre
    logic [SIZE_W-1:0] size;    // pixels in the enclosing chain (saturating)
  } obj_rec_t;

  // Extra measurements of an object, presented once per object.
  typedef struct packed {
    logic [17:0] area;       // enclosed area in pixels (integer part)
    logic [23:0] perim_q8;   // perimeter, unsigned 16.8 fixed point
    logic [15:0] shape_q8;   // area / perimeter, unsigned 8.8 fixed point
    coord_t      x_min, x_max, y_min, y_max;  // minimum enclosing rectangle
    logic        flat;       // enclosed area was zero: centre taken from the rectangle
  } obj_stats_t;

  // Freeman chain directions, image coordinates (x to the right, y down;
  // "north" is the line above).
  typedef enum logic [2:0] {
    DIR_E = 3'd0, DIR_NE = 3'd1, DIR_N = 3'd2, DIR_NW = 3'd3,
    DIR_W = 3'd4, DIR_SW = 3'd5, DIR_S = 3'd6, DIR_SE = 3'd7
  } freeman_t;

  function automatic int dir_dx(freeman_t d);
    case (d)
      DIR_E, DIR_NE, DIR_SE: return 1;
      DIR_W, DIR_NW, DIR_SW: return -1;
      default:               return 0;
    endcase
  endfunction

  function automatic int dir_dy(freeman_t d);
    case (d)
      DIR_N, DIR_NE, DIR_NW: return -1;
      DIR_S, DIR_SE, DIR_SW: return 1;
      default:               return 0;
    endcase
  endfunction

endpackage
