// History buffer: on-chip store of recently decoded pixels.
//
// HIST_DEPTH words of PIX_W bits (2048 x 5 bits = 1.25 KB by default) with
// one write port and two synchronous read ports, one for the upper
// neighbour used by linear prediction and one for the copy source. Read data
// appear in the cycle after `re` and are held while `re` is low. A write and
// a read of the same address in one cycle return the old word. Written as an
// array; in silicon it would be an SRAM macro. The size follows the buffer
// size the document works with; the two read ports are this design's choice.
module history_buffer
  import c4_pkg::*;
#(
  parameter int unsigned HIST_DEPTH = 2048,
  localparam int unsigned AW        = $clog2(HIST_DEPTH)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr_a,
  input  logic [AW-1:0] raddr_b,
  output pix_t          rdata_a,
  output pix_t          rdata_b,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  pix_t          wdata
);

  pix_t mem [HIST_DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) begin
      rdata_a <= mem[raddr_a];
      rdata_b <= mem[raddr_b];
    end
  end

endmodule
