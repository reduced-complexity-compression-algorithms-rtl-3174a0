// Block GC3 layout decoder.
//
// One decoder of the writer chip in its Block GC3 form: the shared pixel
// pipeline (region decoder, address generator, history buffer, linear
// predictor, Huffman decoder, control/merge) whose pixel error-location map
// arrives Golomb run-length coded. The Golomb bucket size is an input,
// 2**log2_bucket, so it can be matched to the process layer being written
// (for example 16 for poly and metal 1, 64 for metal 2, 128 for p-active).
// The Golomb decoder emits one map bit per cycle with no stalls, so the
// pixel rate is set by the segmentation and error-value streams and the
// writer. Interfaces are valid/ready streams of 8-bit words (first code bit
// in the MSB), 11-bit segmentation values and 5-bit output pixels.
// The composition follows the document; interfaces are this design's own.
module blockgc3_decoder
  import c4_pkg::*;
#(
  parameter int unsigned IMG_W           = 1024,
  parameter int unsigned IMG_H           = 1024,
  parameter int unsigned HIST_DEPTH      = 2048,
  parameter int unsigned SEG_LOG2_BUCKET = 4,
  parameter int unsigned HUFF_MAX_LEN    = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] log2_bucket,
  // Golomb-coded pixel error locations
  input  logic       el_valid,
  output logic       el_ready,
  input  logic [7:0] el_data,
  // segmentation
  input  logic       sl_valid,
  output logic       sl_ready,
  input  logic [7:0] sl_data,
  input  logic       sv_valid,
  output logic       sv_ready,
  input  seg_t       sv_data,
  // Huffman-coded error values
  input  logic       hv_valid,
  output logic       hv_ready,
  input  logic [7:0] hv_data,
  input  logic [5:0] huff_count  [HUFF_MAX_LEN+1],
  input  pix_t       huff_symbol [32],
  // decoded pixels
  output logic       pix_valid,
  input  logic       pix_ready,
  output pix_t       pix
);

  logic map_valid, map_ready, map_bit;

  golomb_rld #(.IN_W(8), .MAX_LOG2B(7)) u_el_golomb (
    .clk,
    .rst_n,
    .log2_bucket,
    .in_valid  (el_valid),
    .in_ready  (el_ready),
    .in_data   (el_data),
    .out_valid (map_valid),
    .out_ready (map_ready),
    .out_bit   (map_bit)
  );

  decoder_core #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .HIST_DEPTH(HIST_DEPTH),
    .SEG_LOG2_BUCKET(SEG_LOG2_BUCKET), .HUFF_MAX_LEN(HUFF_MAX_LEN)
  ) u_core (
    .clk,
    .rst_n,
    .el_valid (map_valid),
    .el_ready (map_ready),
    .el_bit   (map_bit),
    .sl_valid,
    .sl_ready,
    .sl_data,
    .sv_valid,
    .sv_ready,
    .sv_data,
    .hv_valid,
    .hv_ready,
    .hv_data,
    .huff_count,
    .huff_symbol,
    .pix_valid,
    .pix_ready,
    .pix
  );

endmodule
