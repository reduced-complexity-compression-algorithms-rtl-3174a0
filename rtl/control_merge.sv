// Control/Merge stage: picks the final value of a pixel.
//
// Two multiplexers: the first chooses between the linearly predicted value
// and the copied value according to the block's predict/copy segmentation;
// the second replaces that choice by the Huffman-decoded error value where
// the error-location map has a one. The control part lets a pixel leave only
// when everything it needs is there: the pixel itself (stage_valid), its
// error-location bit, the error value if that bit is one, and a ready
// writer. It then consumes the error-location bit and, if used, the error
// value. Combinational. The two multiplexers are the document's; the
// handshake is this design's choice.
module control_merge
  import c4_pkg::*;
(
  input  logic stage_valid,
  input  logic is_copy,
  input  pix_t predict_val,
  input  pix_t copy_val,
  input  logic el_valid,
  input  logic el_bit,
  output logic el_ready,
  input  logic ev_valid,
  input  pix_t ev_value,
  output logic ev_ready,
  output logic pix_valid,
  input  logic pix_ready,
  output pix_t pix,
  output logic fire
);

  pix_t pc_val;
  assign pc_val    = is_copy ? copy_val : predict_val;
  assign pix       = el_bit ? ev_value : pc_val;
  assign pix_valid = stage_valid && el_valid && (!el_bit || ev_valid);
  assign fire      = pix_valid && pix_ready;
  assign el_ready  = fire;
  assign ev_ready  = fire && el_bit;

endmodule
