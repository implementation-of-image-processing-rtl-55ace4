// median_pkg: types and constants shared by the 3x3 median filter system.
//
// The system moves 8-bit gray-level pixels from a source memory through a
// fetch stage, a ten-stage pipelined median core and a write stage into a
// result memory. This package holds what more than one of those stages must
// agree on: the pixel width, the state encoding of the median block's
// controller, the depth of the median pipeline and the number of zero sets
// sent after the last image row to empty that pipeline.
package median_pkg;

  // 8-bit gray level pixels (0 = black, 255 = white).
  localparam int PIX_W = 8;
  typedef logic [PIX_W-1:0] pixel_t;

  // States of the median block's Moore controller.
  typedef enum logic [1:0] {
    ST_IDLE         = 2'd0,  // pipeline holds, no data taken
    ST_CLOCK_ENABLE = 2'd1,  // pipeline advances
    ST_INITIATE     = 2'd2   // pipeline advances, set starts a new row
  } med_state_t;

  // Enabled clock edges from the edge that takes the oldest of three sets
  // to the edge that puts their median in the output register.
  localparam int MED_LATENCY = 10;

  // Zero sets sent after the last row: the newest set of the last window
  // needs this many further enabled edges to reach the output.
  localparam int FLUSH_SETS = MED_LATENCY - 2;

  // Width of the image header fields (height, width), stored little-endian.
  localparam int DIM_W = 16;
  typedef logic [DIM_W-1:0] dim_t;

endpackage
