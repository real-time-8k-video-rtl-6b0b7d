// vq_pkg: types and constants shared by the video quality assessment blocks.
//
// A microblock is a 4x4 tile of 8-bit luminance samples carried in one 128-bit
// stream word. Pixels are numbered p1..p16 column by column (p1..p4 are the
// first column, top to bottom; p5..p8 the second column, and so on), the order
// in which the transfer sequence lists them. Pixel pN sits in word bits
// [8N-1 : 8N-8], so p1 is the least significant byte; that byte order is this
// design's own choice. Four microblocks make one 8x8 block and arrive in the
// order top-left, top-right, bottom-left, bottom-right.
//
// The first word of a stream carries the frame resolution (width in bits
// [15:0], height in bits [31:16]); every frame then ends with one 128-bit
// result word (vq_result_t). Both layouts are this design's own choice.
package vq_pkg;

  localparam int unsigned PIX_W   = 8;    // luminance sample width
  localparam int unsigned MB_DIM  = 4;    // microblock is MB_DIM x MB_DIM
  localparam int unsigned MB_PIX  = MB_DIM * MB_DIM;
  localparam int unsigned WORD_W  = MB_PIX * PIX_W;  // 128-bit stream word
  localparam int unsigned SUM_W   = 32;   // frame accumulators (co_uint32)
  localparam int unsigned DIM_W   = 16;   // width / height field of the header

  typedef logic [PIX_W-1:0]  pixel_t;
  typedef logic [SUM_W-1:0]  sum_t;
  typedef logic [WORD_W-1:0] word_t;

  // Element k holds pixel p(k+1); element (col*4 + row) is at (row, col).
  typedef pixel_t [MB_PIX-1:0] mb_pix_t;

  // Position of a microblock inside its 8x8 block, in arrival order.
  typedef enum logic [1:0] {
    MB_TL = 2'd0,
    MB_TR = 2'd1,
    MB_BL = 2'd2,
    MB_BR = 2'd3
  } mb_pos_e;

  // Resolution header word (low 32 bits of the first stream word).
  typedef struct packed {
    logic [DIM_W-1:0] height;
    logic [DIM_W-1:0] width;
  } resolution_t;

  // Per-frame result word.
  typedef struct packed {
    sum_t frame_idx;   // [127:96] frame number since the resolution word
    sum_t interlace;   // [95:64]  interlaced microblocks in the frame
    sum_t intra_sum;   // [63:32]  blockiness IntraSum
    sum_t inter_sum;   // [31:0]   blockiness InterSum
  } vq_result_t;

  // Sample at (row, col) of a microblock.
  function automatic pixel_t mb_at(mb_pix_t mb, int unsigned row, int unsigned col);
    return mb[col*MB_DIM + row];
  endfunction

  function automatic pixel_t abs_diff(pixel_t a, pixel_t b);
    return (a > b) ? pixel_t'(a - b) : pixel_t'(b - a);
  endfunction

endpackage
