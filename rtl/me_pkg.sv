// me_pkg: constants and types shared by the bandwidth-scalable motion
// estimator with error detection and data recovery (EDDR).
// A 16x16 macroblock (MB) is split into sixteen 4x4 blocks. Each 4x4 SAD is
// produced by a processing element (PE) and guarded by a residue-and-quotient
// (RQ) code modulo RQ_M. The 4x4 SADs are merged into the 41 H.264 partition
// SADs. RQ_M, SR_MAX and the widths are this design's choices; the 4x4 PE and
// the 16x16 MB follow the reference description.
package me_pkg;
  localparam int MB_SIZE = 16;               // MB edge in pixels
  localparam int BLK     = 4;                // PE block edge in pixels
  localparam int PIX_W   = 8;                // pixel width
  localparam int SAD4_W  = 12;               // 4x4 SAD width (16*255 < 4096)
  localparam int SAD_W   = 16;               // 16x16 SAD width (256*255 < 65536)
  localparam int RQ_M    = 64;               // RQ code modulus
  localparam int SR_MAX  = 16;               // largest search range (+/-)
  localparam int NPART   = 41;               // partitions of one MB
  localparam int MV_W    = 8;                // signed MV component width
  localparam int COST_W  = 18;               // R-D cost width

  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  // MB partition modes the mode decision chooses between
  typedef enum logic [1:0] {
    MODE_16X16 = 2'd0,
    MODE_16X8  = 2'd1,
    MODE_8X16  = 2'd2,
    MODE_8X8   = 2'd3
  } mb_mode_t;

  // bandwidth modes of the search range predictor
  typedef enum logic [1:0] {
    BW_L = 2'd0,
    BW_N = 2'd1,
    BW_H = 2'd2
  } bw_mode_t;

  // first partition index of each partition size in the 41-entry SAD list:
  // 16x16 (1), 16x8 (2), 8x16 (2), 8x8 (4), 8x4 (8), 4x8 (8), 4x4 (16)
  localparam int P16X16 = 0;
  localparam int P16X8  = 1;
  localparam int P8X16  = 3;
  localparam int P8X8   = 5;
  localparam int P8X4   = 9;
  localparam int P4X8   = 17;
  localparam int P4X4   = 25;

  function automatic logic [MV_W-1:0] abs_mv(input logic signed [MV_W-1:0] v);
    return (v < 0) ? MV_W'(-v) : MV_W'(v);
  endfunction
endpackage
