// Block C4 layout decoder.
//
// One decoder of the writer chip in its Block C4 form: the shared pixel
// pipeline (region decoder, address generator, history buffer, linear
// predictor, Huffman decoder, control/merge) whose pixel error-location map
// arrives as a three-level hierarchical combinatorial code (HCC, block size
// 8). The code is split into one (k, rank) token sub-stream per level,
// tok_*[0] for the lowest level; the parallel HCC decoder decodes the levels
// independently through 2-byte FIFOs. The HCC decoder can fall behind the
// pixel pipeline when many level-0 blocks are coded, which then stalls it.
// Interfaces are valid/ready streams; pixels leave as 5-bit values.
// The composition follows the document; interfaces are this design's own.
module blockc4_decoder
  import c4_pkg::*;
#(
  parameter int unsigned IMG_W           = 1024,
  parameter int unsigned IMG_H           = 1024,
  parameter int unsigned HIST_DEPTH      = 2048,
  parameter int unsigned SEG_LOG2_BUCKET = 4,
  parameter int unsigned HUFF_MAX_LEN    = 12,
  parameter int unsigned HCC_LEVELS      = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  // HCC-coded pixel error locations, one token stream per level
  input  logic       tok_valid [HCC_LEVELS],
  output logic       tok_ready [HCC_LEVELS],
  input  hcc_tok_t   tok       [HCC_LEVELS],
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

  hcc_decoder #(.LEVELS(HCC_LEVELS), .FIFO_BYTES(2)) u_hcc (
    .clk,
    .rst_n,
    .tok_valid,
    .tok_ready,
    .tok,
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
