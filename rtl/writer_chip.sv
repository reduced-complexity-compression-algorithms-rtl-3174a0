// Decoder array of a maskless-lithography writer chip.
//
// Compressed layout data reach the writer chip at a fraction of the rate the
// writing elements need; the chip decodes it with many small decoders
// running in parallel, each turning its own compressed streams into a
// stream of 5-bit pixels for its part of the writer array. This top holds
// both decoder forms side by side: NUM_GC3 Block GC3 decoders (Golomb-coded
// error locations) and NUM_C4 Block C4 decoders (HCC-coded error locations),
// 200 of each by default, the count that gives about 500 Gb/s of pixels.
// The two arrays are independent alternatives and share nothing but the
// clock and reset.
//
// Every decoder has its own input streams and pixel output (arrays indexed
// by decoder). All decoders of one array write the same process layer, so
// the Huffman table and, for Block GC3, the Golomb bucket size are shared
// per array. The pixel outputs are where the D/A converters of the writing
// elements would connect. The array size follows the document; the port
// organisation is this design's choice.
module writer_chip
  import c4_pkg::*;
#(
  parameter int unsigned NUM_GC3      = 200,
  parameter int unsigned NUM_C4       = 200,
  parameter int unsigned IMG_W        = 1024,
  parameter int unsigned IMG_H        = 1024,
  parameter int unsigned HIST_DEPTH   = 2048,
  parameter int unsigned HUFF_MAX_LEN = 12
) (
  input  logic       clk,
  input  logic       rst_n,

  // ---- Block GC3 decoders ----
  input  logic [2:0] gc3_log2_bucket,
  input  logic [5:0] gc3_huff_count  [HUFF_MAX_LEN+1],
  input  pix_t       gc3_huff_symbol [32],
  input  logic       gc3_el_valid [NUM_GC3],
  output logic       gc3_el_ready [NUM_GC3],
  input  logic [7:0] gc3_el_data  [NUM_GC3],
  input  logic       gc3_sl_valid [NUM_GC3],
  output logic       gc3_sl_ready [NUM_GC3],
  input  logic [7:0] gc3_sl_data  [NUM_GC3],
  input  logic       gc3_sv_valid [NUM_GC3],
  output logic       gc3_sv_ready [NUM_GC3],
  input  seg_t       gc3_sv_data  [NUM_GC3],
  input  logic       gc3_hv_valid [NUM_GC3],
  output logic       gc3_hv_ready [NUM_GC3],
  input  logic [7:0] gc3_hv_data  [NUM_GC3],
  output logic       gc3_pix_valid [NUM_GC3],
  input  logic       gc3_pix_ready [NUM_GC3],
  output pix_t       gc3_pix       [NUM_GC3],

  // ---- Block C4 decoders ----
  input  logic [5:0] c4_huff_count  [HUFF_MAX_LEN+1],
  input  pix_t       c4_huff_symbol [32],
  input  logic       c4_tok_valid [NUM_C4][3],
  output logic       c4_tok_ready [NUM_C4][3],
  input  hcc_tok_t   c4_tok       [NUM_C4][3],
  input  logic       c4_sl_valid  [NUM_C4],
  output logic       c4_sl_ready  [NUM_C4],
  input  logic [7:0] c4_sl_data   [NUM_C4],
  input  logic       c4_sv_valid  [NUM_C4],
  output logic       c4_sv_ready  [NUM_C4],
  input  seg_t       c4_sv_data   [NUM_C4],
  input  logic       c4_hv_valid  [NUM_C4],
  output logic       c4_hv_ready  [NUM_C4],
  input  logic [7:0] c4_hv_data   [NUM_C4],
  output logic       c4_pix_valid [NUM_C4],
  input  logic       c4_pix_ready [NUM_C4],
  output pix_t       c4_pix       [NUM_C4]
);

  for (genvar i = 0; i < NUM_GC3; i++) begin : g_gc3
    blockgc3_decoder #(
      .IMG_W(IMG_W), .IMG_H(IMG_H), .HIST_DEPTH(HIST_DEPTH), .HUFF_MAX_LEN(HUFF_MAX_LEN)
    ) u_dec (
      .clk,
      .rst_n,
      .log2_bucket (gc3_log2_bucket),
      .el_valid    (gc3_el_valid[i]),
      .el_ready    (gc3_el_ready[i]),
      .el_data     (gc3_el_data[i]),
      .sl_valid    (gc3_sl_valid[i]),
      .sl_ready    (gc3_sl_ready[i]),
      .sl_data     (gc3_sl_data[i]),
      .sv_valid    (gc3_sv_valid[i]),
      .sv_ready    (gc3_sv_ready[i]),
      .sv_data     (gc3_sv_data[i]),
      .hv_valid    (gc3_hv_valid[i]),
      .hv_ready    (gc3_hv_ready[i]),
      .hv_data     (gc3_hv_data[i]),
      .huff_count  (gc3_huff_count),
      .huff_symbol (gc3_huff_symbol),
      .pix_valid   (gc3_pix_valid[i]),
      .pix_ready   (gc3_pix_ready[i]),
      .pix         (gc3_pix[i])
    );
  end

  for (genvar i = 0; i < NUM_C4; i++) begin : g_c4
    blockc4_decoder #(
      .IMG_W(IMG_W), .IMG_H(IMG_H), .HIST_DEPTH(HIST_DEPTH), .HUFF_MAX_LEN(HUFF_MAX_LEN),
      .HCC_LEVELS(3)
    ) u_dec (
      .clk,
      .rst_n,
      .tok_valid   (c4_tok_valid[i]),
      .tok_ready   (c4_tok_ready[i]),
      .tok         (c4_tok[i]),
      .sl_valid    (c4_sl_valid[i]),
      .sl_ready    (c4_sl_ready[i]),
      .sl_data     (c4_sl_data[i]),
      .sv_valid    (c4_sv_valid[i]),
      .sv_ready    (c4_sv_ready[i]),
      .sv_data     (c4_sv_data[i]),
      .hv_valid    (c4_hv_valid[i]),
      .hv_ready    (c4_hv_ready[i]),
      .hv_data     (c4_hv_data[i]),
      .huff_count  (c4_huff_count),
      .huff_symbol (c4_huff_symbol),
      .pix_valid   (c4_pix_valid[i]),
      .pix_ready   (c4_pix_ready[i]),
      .pix         (c4_pix[i])
    );
  end

endmodule
