// blob_pkg: types and constants shared by the blob recognition pipeline.
//
// A pixel stream is a pix_t: one pixel per cycle in which valid is high, in
// raster order, sof on the first pixel of a frame and eof on the last.  The
// image size travels beside the stream as run-time width/height inputs, so the
// same filter instance can handle the 160x120 (QQVGA) image and the 96x96
// normalized candidate image.  Labels of the connected-component stage are
// typed: bit LBL_W is the pixel type (1 = black, 0 = white) and the low LBL_W
// bits the label value, 0 meaning "no label".  The label width is this
// design's choice; the source only calls it an N-bit word.
package blob_pkg;

  localparam int PIX_W   = 8;    // gray level width after 10->8 bit reduction
  localparam int COORD_W = 10;   // enough for 0..639
  localparam int LBL_W   = 8;    // label value bits (labels 1..255 per type)

  typedef struct packed {
    logic             valid;
    logic             sof;
    logic             eof;
    logic [PIX_W-1:0] data;
  } pix_t;

  typedef logic [LBL_W:0] tlabel_t;   // {black, label}

  // Per-component record produced by label_group after a frame.
  typedef struct packed {
    logic               root;      // this label is the representative of a component
    logic [COORD_W-1:0] min_x;
    logic [COORD_W-1:0] max_x;
    logic [COORD_W-1:0] min_y;
    logic [COORD_W-1:0] max_y;
    logic [COORD_W-1:0] cx;        // centre, sum of coordinates / pixel count
    logic [COORD_W-1:0] cy;
    logic [17:0]        count;     // pixel count
  } comp_t;

  // Zones of the blob face (origin position around the heart block)
  typedef enum logic [3:0] {
    Z_TOP_LEFT, Z_TOP_MID, Z_TOP_RIGHT, Z_MID_LEFT, Z_MID_RIGHT,
    Z_BOTTOM_LEFT, Z_BOTTOM_MID, Z_BOTTOM_RIGHT, Z_CENTRE
  } ozone_e;

  // Zones of a white dot inside the heart block
  typedef enum logic [2:0] {
    D_UP_LEFT, D_UP_RIGHT, D_DOWN_LEFT, D_DOWN_RIGHT,
    D_LEFT_EDGE, D_RIGHT_EDGE, D_TOP_EDGE, D_BOTTOM_EDGE
  } dzone_e;

endpackage
