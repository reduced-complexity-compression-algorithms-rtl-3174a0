// Address generator for the history buffer.
//
// The history buffer is a circular store of the last HIST_DEPTH pixels in
// raster order, so the pixel n positions back always sits n entries below the
// write pointer, modulo HIST_DEPTH. This block keeps that pointer for the
// pixel being issued and computes, in the same cycle, the address of its
// upper neighbour (IMG_W back, for linear prediction) and of its copy source:
// d pixels back for a copy from the left, d * IMG_W back for a copy from
// above. copy_left1 flags a copy from the immediately preceding pixel, which
// is not yet in the buffer when the read is issued and is forwarded by the
// pipeline instead. The pointer moves on `advance`. Computing copy addresses
// from (dir, d) follows the document; the circular organisation is this
// design's choice, and it requires every offset to stay below HIST_DEPTH.
module address_generator
  import c4_pkg::*;
#(
  parameter int unsigned IMG_W      = 1024,
  parameter int unsigned HIST_DEPTH = 2048,
  localparam int unsigned AW        = $clog2(HIST_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          advance,
  input  seg_t          seg,
  output logic [AW-1:0] wr_addr,
  output logic [AW-1:0] above_addr,
  output logic [AW-1:0] copy_addr,
  output logic          copy_left1
);

  initial assert (HIST_DEPTH == 2 ** AW && IMG_W < HIST_DEPTH)
    else $error("address_generator: HIST_DEPTH must be a power of two above IMG_W");

  logic [AW-1:0] ptr;
  logic [AW-1:0] offset;  // modulo HIST_DEPTH, like the addresses

  always_comb begin
    if (seg.dir == DIR_ABOVE) offset = AW'(seg.d) * AW'(IMG_W);
    else                      offset = AW'(seg.d);
  end

  assign wr_addr    = ptr;
  assign above_addr = ptr - AW'(IMG_W);
  assign copy_addr  = ptr - offset;
  assign copy_left1 = (seg.dir == DIR_LEFT) && (seg.d == DIST_W'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (advance) ptr <= ptr + 1'b1;
  end

endmodule
