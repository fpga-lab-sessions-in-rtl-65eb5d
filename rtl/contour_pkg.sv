// contour_pkg: sizes shared by the blocks of the streaming contour detector.
//
// The detector processes a raster-scanned grey-level video stream on the
// fly (stream in, stream out), without a frame store. Pixels are 8 bits
// wide, as in the data-flow diagram of the design; the gradient sum carries
// one more bit. The image size is not fixed by the design: LINEWIDTH and
// COLHEIGHT default to a 640x480 camera frame, which is a choice of this
// implementation and can be overridden on every module.
package contour_pkg;

  // Grey-level pixel width (8 bits in the data-flow diagram).
  localparam int unsigned PIX_W = 8;
  // Gradient g = g_ext + g_int is carried on PIX_W + 1 = 9 bits.
  localparam int unsigned GRAD_W = PIX_W + 1;

  // Default image geometry (pixels per line, lines per frame).
  localparam int unsigned LINEWIDTH_DEF = 640;
  localparam int unsigned COLHEIGHT_DEF = 480;

  // Operation selected on an edge handler or max/min unit.
  typedef enum logic {
    MORPH_DILATE = 1'b0,   // max over the window, missing pixels -> -inf
    MORPH_ERODE  = 1'b1    // min over the window, missing pixels -> +inf
  } morph_op_e;

endpackage
