// Linear pixel predictor.
//
// Predicts a pixel from its already decoded neighbours as
// left + above - upper_left, clipped to the pixel range 0 .. 2**PIX_W - 1.
// On a Manhattan layout this reproduces both horizontal and vertical edges,
// so prediction only misses at corners. Combinational. The use of a linear
// predictor over the three neighbours follows the document; the exact
// formula and the clipping are this design's choice.
module linear_predictor
  import c4_pkg::*;
(
  input  pix_t left,
  input  pix_t above,
  input  pix_t upleft,
  output pix_t pred
);

  localparam int signed PMAX = 2 ** PIX_W - 1;

  logic signed [PIX_W+1:0] s;
  assign s = $signed({2'b00, left}) + $signed({2'b00, above}) - $signed({2'b00, upleft});

  always_comb begin
    if (s < 0)                        pred = '0;
    else if (s > (PIX_W + 2)'(PMAX))  pred = pix_t'(PMAX);
    else                              pred = pix_t'(s);
  end

endmodule
