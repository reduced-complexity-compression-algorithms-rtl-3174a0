// Shared types and constants of the Block C4 / Block GC3 layout decoders.
//
// Pixels are 5-bit grey levels. The image is cut into BLK x BLK blocks
// (8 x 8); each block carries one segmentation value saying whether its
// pixels are predicted or copied, and from where. The segmentation value is
// 11 bits wide: one direction bit and a 10-bit distance. A distance of zero
// means "predict" (P); otherwise the block is copied from `d` pixels to
// the left (dir = 0) or `d` rows above (dir = 1). The 11-bit width is the
// one the Block C4 region decoder uses; the field layout is this design's
// own choice.
//
// The combinatorial-code token of the HCC decoder holds k (number of ones in
// an 8-bit block, 0..8) and the rank of the block among all 8-bit words with
// k ones, counted from 0 in ascending numeric order.
package c4_pkg;

  localparam int unsigned PIX_W  = 5;   // bits per pixel
  localparam int unsigned BLK    = 8;   // segmentation block edge (M)
  localparam int unsigned DIST_W = 10;  // copy distance field

  localparam int unsigned HCC_H      = 8;  // HCC block size
  localparam int unsigned HCC_K_W    = 4;  // k = 0..8
  localparam int unsigned HCC_RANK_W = 7;  // rank < C(8,4) = 70

  typedef logic [PIX_W-1:0] pix_t;

  typedef enum logic {
    DIR_LEFT  = 1'b0,
    DIR_ABOVE = 1'b1
  } copy_dir_e;

  typedef struct packed {
    copy_dir_e         dir;
    logic [DIST_W-1:0] d;     // 0: predict
  } seg_t;

  typedef struct packed {
    logic [HCC_K_W-1:0]    k;
    logic [HCC_RANK_W-1:0] rank;
  } hcc_tok_t;

  localparam seg_t SEG_PREDICT = '{dir: DIR_LEFT, d: '0};

  // A block is copied when its distance is non-zero, whatever the direction.
  function automatic logic seg_is_copy(logic [DIST_W-1:0] d);
    return d != '0;
  endfunction

endpackage
