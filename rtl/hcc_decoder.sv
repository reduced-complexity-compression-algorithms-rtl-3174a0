// Hierarchical combinatorial-code (HCC) decoder, parallel form.
//
// The pixel error-location map of Block C4 is coded as a hierarchy of
// LEVELS combinatorial codes with block size H = 8. A bit of level L+1 tells
// whether the corresponding 8-bit block of level L is all zeros (bit 0) or is
// coded by one (k, rank) token (bit 1). The top level has no parent: every
// one of its blocks is coded, so one top-level token stands for 8**LEVELS
// output bits (512 for three levels).
//
// Each level l has its own token sub-stream tok[l]. Level l reads one control
// bit from the level above (constant 1 at the top), and produces one byte:
// either eight zeros from the run-length path or the CC-decoded token. The
// byte goes into a FIFO_BYTES-deep FIFO. A serializer hands the bits of the
// FIFO head, MSB first, to the level below, or for level 0 to the output.
// Levels run independently and only wait when their FIFO is full or their
// input is empty, so after the initial fill the output advances one bit per
// cycle while token streams keep up.
//
// Interface: tok_valid/tok_ready/tok per level (index 0 = lowest level),
// out_valid/out_ready/out_bit for the decoded map. The hierarchy, block size,
// level count, sub-streams and 2-byte FIFOs follow the document; the token
// format, the FIFO after level 0 and the handshakes are this design's choice.
module hcc_decoder
  import c4_pkg::*;
#(
  parameter int unsigned LEVELS     = 3,
  parameter int unsigned FIFO_BYTES = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     tok_valid [LEVELS],
  output logic     tok_ready [LEVELS],
  input  hcc_tok_t tok       [LEVELS],
  output logic     out_valid,
  input  logic     out_ready,
  output logic     out_bit
);

  localparam int unsigned H = HCC_H;

  // Per-level FIFO read side and serializer.
  logic         fo_valid [LEVELS];
  logic         fo_ready [LEVELS];
  logic [H-1:0] fo_data  [LEVELS];
  logic         ser_take [LEVELS];  // consumer takes the current bit
  logic [$clog2(H)-1:0] ser_idx [LEVELS];

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    logic         ctrl_valid, ctrl_bit;
    logic         fi_valid, fi_ready;
    logic [H-1:0] cc_bits;

    if (l == LEVELS - 1) begin : g_top
      assign ctrl_valid = 1'b1;
      assign ctrl_bit   = 1'b1;
    end else begin : g_mid
      assign ctrl_valid   = fo_valid[l+1];
      assign ctrl_bit     = fo_data[l+1][~ser_idx[l+1]];
      assign ser_take[l+1] = ctrl_valid && fi_valid && fi_ready;
    end

    cc_decoder #(.H(H)) u_cc (
      .k    (tok[l].k),
      .rank (tok[l].rank),
      .bits (cc_bits)
    );

    // MUX between the CC decoder and the run-length (all-zero) path.
    assign fi_valid     = ctrl_valid && (!ctrl_bit || tok_valid[l]);
    assign tok_ready[l] = ctrl_valid && ctrl_bit && fi_ready;

    sync_fifo #(.WIDTH(H), .DEPTH(FIFO_BYTES)) u_fifo (
      .clk,
      .rst_n,
      .in_valid  (fi_valid),
      .in_ready  (fi_ready),
      .in_data   (ctrl_bit ? cc_bits : '0),
      .out_valid (fo_valid[l]),
      .out_ready (fo_ready[l]),
      .out_data  (fo_data[l])
    );

    assign fo_ready[l] = ser_take[l] && (ser_idx[l] == $clog2(H)'(H - 1));

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        ser_idx[l] <= '0;
      end else if (ser_take[l]) begin
        ser_idx[l] <= ser_idx[l] + 1'b1;
      end
    end
  end

  assign out_valid   = fo_valid[0];
  assign out_bit     = fo_data[0][~ser_idx[0]];
  assign ser_take[0] = out_valid && out_ready;

endmodule
