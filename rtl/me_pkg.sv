// me_pkg: constants and types shared by the parallel-tree full-search
// motion estimation engine.
//
// The default geometry is the one the design is built around: 8-bit luma
// pixels, 16x16 macroblocks, a search range of -16..+15 in both directions
// (32x32 candidate positions) and a 48x48-pixel search window held on chip
// (three 16-column strips, so that horizontally adjacent macroblocks can
// reuse two of them; each strip is four 4-column banks that can be read
// separately). SAD values are 16 bits wide, enough for
// 16*16*255 = 65280. All of these are fixed by the text the design follows,
// except the 48-column window organisation, which is this design's reading
// of the 20.48 Kbit on-chip RAM figure (48*48*8 + 16*16*8 = 20480 bits).
package me_pkg;

  localparam int unsigned PIX_W   = 8;     // bits per pixel
  localparam int unsigned BLK_N   = 16;    // macroblock size N
  localparam int unsigned SRCH_P  = 16;    // search range -p .. p-1
  localparam int unsigned SW_DIM  = 48;    // search window rows / columns
  localparam int unsigned STRIP_W = 16;    // columns per search-window strip
  localparam int unsigned N_STRIP = SW_DIM / STRIP_W;
  localparam int unsigned BANK_W  = 4;     // columns per window RAM bank
  localparam int unsigned N_BANK  = SW_DIM / BANK_W;
  localparam int unsigned SAD_W   = 16;    // SAD accumulator width
  localparam int unsigned MV_W    = 5;     // signed motion vector component

  typedef logic [PIX_W-1:0]        pixel_t;
  typedef logic [SAD_W-1:0]        sad_t;
  typedef logic signed [MV_W-1:0]  mvc_t;

  typedef struct packed {
    mvc_t x;
    mvc_t y;
  } mv_t;

endpackage
