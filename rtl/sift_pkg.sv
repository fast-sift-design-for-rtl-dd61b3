// sift_pkg: types and constants shared by the layer-parallel SIFT engine.
//
// The engine works on 8-bit grey pixels.  Integral-image values are kept
// modulo 2**II_W: every box sum the engine forms from them is far smaller
// than 2**II_W, so the wrap-around cancels in the four-corner difference.
// The widths are this design's choices; the text gives only the 8-bit
// pixel and DoG precision.  The keypoint record is what stage two writes into the output buffer.
package sift_pkg;

  localparam int PIX_W   = 8;    // input and Gaussian-layer pixel width
  localparam int II_W    = 20;   // integral image word width (modulo arithmetic)
  localparam int DOG_W   = 9;    // signed difference-of-Gaussian width
  localparam int COORD_W = 12;   // row / column coordinate width (up to 4095)
  localparam int NBINS   = 36;   // orientation histogram bins, 10 degrees each
  localparam int BIN_W   = 6;
  localparam int MAG_W   = 9;    // gradient magnitude width, sqrt(2*255^2) < 512
  localparam int HIST_W  = 18;   // histogram bin accumulator width

  // Operation selector of the universal (precision-equivalent-cycle) unit.
  typedef enum logic [1:0] {
    PEC_SQRT    = 2'd0,   // Y = floor(sqrt(A))
    PEC_DIV     = 2'd1,   // Y = floor(A * 2**FRAC / B)
    PEC_INVSQRT = 2'd2    // Y = floor(2**FRAC / sqrt(A))
  } pec_op_e;

  // One extracted feature point.
  typedef struct packed {
    logic               octave;      // 0: full resolution, 1: down-sampled by four
    logic [COORD_W-1:0] row;         // position in the octave's own grid
    logic [COORD_W-1:0] col;
    logic [BIN_W-1:0]   orient;      // dominant orientation bin (0..35)
    logic [HIST_W-1:0]  peak;        // histogram value of that bin
  } keypoint_t;

endpackage
