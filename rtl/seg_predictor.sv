// Three-block segmentation predictor.
//
// The segmentation map of Block C4 gives every 8 x 8 block a value (predict,
// or copy with direction and distance). Such maps are made of rectangles on
// an orthogonal grid, so a block is guessed from its upper-left (a), upper
// (b) and left (c) neighbours: if c equals a the boundary, if any, is
// vertical and the block most likely continues the block above (z = b);
// otherwise it continues the block to its left (z = c). The rule is the
// document's; the guess only fails around corners. Combinational.
module seg_predictor
  import c4_pkg::*;
(
  input  seg_t a,  // upper-left block
  input  seg_t b,  // upper block
  input  seg_t c,  // left block
  output seg_t z   // prediction for the current block
);

  assign z = (c == a) ? b : c;

endmodule
