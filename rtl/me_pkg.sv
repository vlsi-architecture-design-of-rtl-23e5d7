// me_pkg: constants and types shared by the HEXDS motion estimation block.
//
// The block works on 16x16 blocks of 8-bit pixels (16x16 is the block size of
// the architecture; the pixel width is this design's choice). Search positions
// are (x, y) pairs held in two's complement so that the pattern offsets, which
// are negative as often as positive, add to them with plain adders. x is the
// column (horizontal) coordinate and y the row (vertical) coordinate inside the
// reference search area; y grows downwards.
package me_pkg;
  localparam int PIX_W    = 8;   // pixel width
  localparam int BLK_LOG2 = 4;   // 16x16 block
  localparam int SAD_W    = 16;  // 256 * 255 = 65280 fits
  localparam int CW       = 6;   // signed coordinate width, holds -2 .. 2W+2 for W <= 8
  localparam int PITCH_LOG2 = 5; // reference area row pitch, 32 pixels (holds 16 + 2W for W <= 8)
  localparam int MAX_W    = 8;   // largest search range the widths above allow

  typedef logic signed [CW-1:0] coord_t;

  typedef struct packed {
    coord_t x;  // column
    coord_t y;  // row
  } point_t;

  // Which pattern the search is in.
  typedef enum logic [1:0] {
    PH_INIT_HEX = 2'd0,  // first large hexagon: centre plus six corners
    PH_HEX_STEP = 2'd1,  // later large hexagon steps: three new corners
    PH_SDSP     = 2'd2   // final small diamond: four points at distance 1
  } phase_t;
endpackage
