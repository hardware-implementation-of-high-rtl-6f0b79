// vbsme_pkg: types and constants shared by the variable block size motion
// estimation (VBSME) datapath.
//
// A 16x16 macroblock is split into sixteen 4x4 blocks (numbered 0..15 in
// raster order, block k at column k%4 and row k/4). From their SADs the
// design builds 41 SADs, one for every block of the seven H.264 partition
// shapes. The 41 vectors are numbered 0..40 here; the paper's partition
// figure numbers the same blocks 1..41 in the same order:
//   0..15  the sixteen 4x4 blocks, raster order
//  16..23  blocks two 4x4 wide and one 4x4 tall: 16+i is the left half of
//          4x4-row i, 20+i the right half
//  24..31  blocks one 4x4 wide and two 4x4 tall: 24+c top half of column c,
//          28+c bottom half
//  32..35  8x8 quadrants: top-left, top-right, bottom-left, bottom-right
//  36..37  left and right 8-wide, 16-tall halves
//  38..39  top and bottom 16-wide, 8-tall halves
//  40      the whole 16x16 macroblock
// Pixels are 8-bit and four of them share one 32-bit buffer word, the
// leftmost pixel in bits [7:0].
package vbsme_pkg;

  localparam int unsigned PIX_W  = 8;
  localparam int unsigned WORD_W = 4 * PIX_W;   // one buffer word = four pixels
  localparam int unsigned MB     = 16;          // macroblock edge in pixels
  localparam int unsigned N_BLK  = 16;          // 4x4 blocks per macroblock
  localparam int unsigned N_VEC  = 41;          // SADs / vectors per macroblock
  localparam int unsigned N_CAND = 3;           // candidates per LPE (PEs per LPE)
  localparam int unsigned SAD4_W = 12;          // 4x4 SAD: 16*255 = 4080
  localparam int unsigned SAD_W  = 16;          // 16x16 SAD: 256*255 = 65280
  localparam int unsigned MV_W   = 8;           // signed motion vector component
  localparam int unsigned N_MODE = 7;

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic [WORD_W-1:0]        word_t;
  typedef pix_t [3:0]               row4_t;     // four pixels of one block row
  typedef logic [SAD4_W-1:0]        sad4_t;
  typedef logic [SAD_W-1:0]         sad_t;
  typedef logic signed [MV_W-1:0]   mv_t;

  typedef struct packed {
    mv_t x;
    mv_t y;
  } mv_pair_t;

  // Partition modes, in the order of the paper's partition figure.
  typedef enum logic [2:0] {
    MODE_4X4   = 3'd0,   // 16 blocks, vectors 0..15
    MODE_4X8   = 3'd1,   // 8 blocks,  vectors 16..23 (two 4x4 wide)
    MODE_8X4   = 3'd2,   // 8 blocks,  vectors 24..31 (two 4x4 tall)
    MODE_8X8   = 3'd3,   // 4 blocks,  vectors 32..35
    MODE_8X16  = 3'd4,   // 2 blocks,  vectors 36..37 (left/right halves)
    MODE_16X8  = 3'd5,   // 2 blocks,  vectors 38..39 (top/bottom halves)
    MODE_16X16 = 3'd6    // 1 block,   vector 40
  } mode_t;

endpackage
