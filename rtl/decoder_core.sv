// Pixel pipeline shared by the Block C4 and Block GC3 decoders.
//
// Decodes a layout image of IMG_W x IMG_H 5-bit pixels in raster order, one
// pixel per clock when its inputs keep up, and starts over with the next
// image. Each pixel is either predicted from its neighbours or copied from
// an earlier part of the image, as the block's segmentation says, and a
// separately coded error-location map marks the pixels where that guess is
// wrong and a Huffman-coded error value takes its place. Every decoded pixel
// is written back into the history buffer for later prediction and copying.
//
// Two pipeline stages:
//   A  walks the raster position, asks the region decoder for the block's
//      segmentation (decoding a new one at the first pixel of each block in
//      the first row of a block row), lets the address generator form the
//      upper-neighbour and copy-source addresses and issues both reads.
//   B  receives the read data, forms left / above / upper-left neighbours
//      (zero outside the image), runs the linear predictor and lets
//      control_merge choose the pixel, which leaves through pix_* and is
//      written to the history buffer.
// A advances when B is empty or moves on in the same cycle; stalls come from
// a segmentation value or error-location bit or error value that has not
// arrived, or from the writer. A copy from the previous pixel (distance 1,
// left) takes B's last output instead of the buffer, which does not hold it
// yet when A reads.
//
// Inputs: el_* is the decoded pixel error-location map (one bit per pixel),
// sl_*/sv_* the segmentation streams, hv_* and huff_* the Huffman-coded error
// values and their table. The block structure follows the document; the
// two-stage schedule, the forwarding path, the boundary rule and the
// handshakes are this design's choices.
module decoder_core
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
  // pixel error locations, decoded
  input  logic       el_valid,
  output logic       el_ready,
  input  logic       el_bit,
  // segmentation streams
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

  localparam int unsigned AW   = $clog2(HIST_DEPTH);
  localparam int unsigned NBX  = IMG_W / BLK;
  localparam int unsigned BX_W = (NBX > 1) ? $clog2(NBX) : 1;
  localparam int unsigned XW   = $clog2(IMG_W);
  localparam int unsigned YW   = (IMG_H > 1) ? $clog2(IMG_H) : 1;

  initial assert (IMG_W % BLK == 0 && IMG_W >= 2 * BLK)
    else $error("decoder_core: IMG_W must be a multiple of BLK, at least 2*BLK");

  // ---------------- stage A ----------------
  logic [XW-1:0] ax;
  logic [YW-1:0] ay;
  logic          a_fire, b_valid, b_fire;
  logic          seg_valid;
  seg_t          seg;
  logic [AW-1:0] wr_addr, above_addr, copy_addr;
  logic          copy_left1;

  region_decoder #(.IMG_W(IMG_W), .SEG_LOG2_BUCKET(SEG_LOG2_BUCKET)) u_region (
    .clk,
    .rst_n,
    .sl_valid,
    .sl_ready,
    .sl_data,
    .sv_valid,
    .sv_ready,
    .sv_data,
    .q_bx      (BX_W'(ax / XW'(BLK))),
    .q_new     ((ax % XW'(BLK) == '0) && (ay % YW'(BLK) == '0)),
    .q_top     (ay < YW'(BLK)),
    .q_take    (a_fire),
    .seg_valid,
    .seg
  );

  address_generator #(.IMG_W(IMG_W), .HIST_DEPTH(HIST_DEPTH)) u_addr (
    .clk,
    .rst_n,
    .advance    (a_fire),
    .seg,
    .wr_addr,
    .above_addr,
    .copy_addr,
    .copy_left1
  );

  assign a_fire = seg_valid && (!b_valid || b_fire);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ax <= '0;
      ay <= '0;
    end else if (a_fire) begin
      if (ax == XW'(IMG_W - 1)) begin
        ax <= '0;
        ay <= (ay == YW'(IMG_H - 1)) ? '0 : ay + 1'b1;
      end else begin
        ax <= ax + 1'b1;
      end
    end
  end

  // ---------------- stage B ----------------
  logic          b_x0, b_y0, b_copy, b_left1;
  logic [AW-1:0] b_waddr;
  pix_t          rd_above, rd_copy;
  pix_t          left_reg, ul_reg;
  pix_t          n_left, n_above, n_upleft, pred, copy_val;
  pix_t          ev_value;
  logic          ev_valid, ev_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_x0    <= 1'b0;
      b_y0    <= 1'b0;
      b_copy  <= 1'b0;
      b_left1 <= 1'b0;
      b_waddr <= '0;
    end else if (a_fire) begin
      b_valid <= 1'b1;
      b_x0    <= ax == '0;
      b_y0    <= ay == '0;
      b_copy  <= seg_is_copy(seg.d);
      b_left1 <= copy_left1;
      b_waddr <= wr_addr;
    end else if (b_fire) begin
      b_valid <= 1'b0;
    end
  end

  history_buffer #(.HIST_DEPTH(HIST_DEPTH)) u_hist (
    .clk,
    .re      (a_fire),
    .raddr_a (above_addr),
    .raddr_b (copy_addr),
    .rdata_a (rd_above),
    .rdata_b (rd_copy),
    .we      (b_fire),
    .waddr   (b_waddr),
    .wdata   (pix)
  );

  assign n_left   = b_x0 ? '0 : left_reg;
  assign n_above  = b_y0 ? '0 : rd_above;
  assign n_upleft = (b_x0 || b_y0) ? '0 : ul_reg;
  assign copy_val = b_left1 ? left_reg : rd_copy;

  linear_predictor u_lp (
    .left   (n_left),
    .above  (n_above),
    .upleft (n_upleft),
    .pred
  );

  huffman_decoder #(.NSYM(32), .MAX_LEN(HUFF_MAX_LEN), .IN_W(8)) u_huff (
    .clk,
    .rst_n,
    .cfg_count  (huff_count),
    .cfg_symbol (huff_symbol),
    .in_valid   (hv_valid),
    .in_ready   (hv_ready),
    .in_data    (hv_data),
    .out_valid  (ev_valid),
    .out_ready  (ev_ready),
    .out_value  (ev_value)
  );

  control_merge u_merge (
    .stage_valid (b_valid),
    .is_copy     (b_copy),
    .predict_val (pred),
    .copy_val,
    .el_valid,
    .el_bit,
    .el_ready,
    .ev_valid,
    .ev_value,
    .ev_ready,
    .pix_valid,
    .pix_ready,
    .pix,
    .fire        (b_fire)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left_reg <= '0;
      ul_reg   <= '0;
    end else if (b_fire) begin
      left_reg <= pix;
      ul_reg   <= n_above;
    end
  end

endmodule
