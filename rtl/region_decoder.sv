// Region decoder of the Block C4 / Block GC3 decoders.
//
// Rebuilds the segmentation map, one value per BLK x BLK block, in raster
// block order. Each block is first predicted by seg_predictor from the
// blocks to its left, above and upper-left. The segmentation error-location
// stream, Golomb run-length coded with a fixed bucket size, holds one bit per
// block: a 0 keeps the prediction, a 1 replaces it with the next value of the
// segmentation error-value stream. A row buffer of IMG_W/BLK values keeps
// the decoded block row; it provides the upper neighbours while the next
// block row is decoded and the block's value for the other BLK-1 pixel rows
// of its own block row. A register keeps the overwritten value of the
// previous column, which becomes the upper-left neighbour.
//
// Query interface (driven by the pixel pipeline, one query per pixel):
// q_bx is the block column; q_new marks the first pixel of a block in the
// first pixel row of a block row, where a new value must be decoded; q_top
// marks the first block row (no upper neighbours; blocks outside the image
// count as "predict"). seg_valid/seg answer in the same cycle; q_take (only
// with seg_valid) commits the query and, with q_new, consumes the stream bits.
// The predictor, the Golomb-coded error locations and the error values follow
// the document; the row buffer, the query handshake and the boundary rule
// are this design's choices.
module region_decoder
  import c4_pkg::*;
#(
  parameter int unsigned IMG_W           = 1024,
  parameter int unsigned SEG_LOG2_BUCKET = 4,
  localparam int unsigned NBX            = IMG_W / BLK,
  localparam int unsigned BX_W           = (NBX > 1) ? $clog2(NBX) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // Golomb-coded segmentation error locations
  input  logic            sl_valid,
  output logic            sl_ready,
  input  logic [7:0]      sl_data,
  // segmentation error values
  input  logic            sv_valid,
  output logic            sv_ready,
  input  seg_t            sv_data,
  // query
  input  logic [BX_W-1:0] q_bx,
  input  logic            q_new,
  input  logic            q_top,
  input  logic            q_take,
  output logic            seg_valid,
  output seg_t            seg
);

  seg_t rowbuf [NBX];
  seg_t ul_reg;  // value rowbuf[q_bx-1] held before it was overwritten

  logic g_valid, g_ready, g_bit;
  golomb_rld #(.IN_W(8), .MAX_LOG2B(7)) u_golomb (
    .clk,
    .rst_n,
    .log2_bucket (3'(SEG_LOG2_BUCKET)),
    .in_valid    (sl_valid),
    .in_ready    (sl_ready),
    .in_data     (sl_data),
    .out_valid   (g_valid),
    .out_ready   (g_ready),
    .out_bit     (g_bit)
  );

  seg_t b_old, a_ctx, b_ctx, c_ctx, pred;
  assign b_old = rowbuf[q_bx];
  assign a_ctx = (q_top || q_bx == '0) ? SEG_PREDICT : ul_reg;
  assign b_ctx = q_top ? SEG_PREDICT : b_old;
  assign c_ctx = (q_bx == '0) ? SEG_PREDICT : rowbuf[q_bx - 1'b1];

  seg_predictor u_pred (
    .a (a_ctx),
    .b (b_ctx),
    .c (c_ctx),
    .z (pred)
  );

  always_comb begin
    if (q_new) begin
      seg_valid = g_valid && (!g_bit || sv_valid);
      seg       = g_bit ? sv_data : pred;
    end else begin
      seg_valid = 1'b1;
      seg       = b_old;
    end
  end

  assign g_ready  = q_new && q_take;
  assign sv_ready = q_new && q_take && g_bit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ul_reg <= SEG_PREDICT;
    end else if (q_new && q_take) begin
      ul_reg <= b_old;
    end
  end

  always_ff @(posedge clk) begin
    if (q_new && q_take) begin
      rowbuf[q_bx] <= seg;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) q_take |-> seg_valid);

endmodule
