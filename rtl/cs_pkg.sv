// cs_pkg: constants shared by the compressive-sensing video encoder.
// The encoder emulates pixel-wise coded exposure: every pixel of a group of
// NUM_FRAMES video frames is exposed for one contiguous "bump" of BUMP frames,
// and the exposed samples (each divided by BUMP) are summed into one output
// frame. The defaults are the 13x compression configuration: 640x480 frames,
// an 8x8 sensing-matrix tile, 13 frames per group, bump length 4.
package cs_pkg;
  localparam int unsigned FRAME_W    = 640;
  localparam int unsigned FRAME_H    = 480;
  localparam int unsigned NUM_FRAMES = 13;
  localparam int unsigned BUMP       = 4;
  localparam int unsigned BLK        = 8;
  localparam int unsigned PIX_W      = 8;
  // Start index 1..4 is pulled to frame 1 so early frames are not under-exposed.
  localparam int unsigned LOW_START  = 1;
endpackage
