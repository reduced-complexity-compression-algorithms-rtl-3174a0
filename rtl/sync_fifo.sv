// Small synchronous FIFO with valid/ready on both sides.
//
// DEPTH entries of WIDTH bits held in registers; a word written in one cycle
// can be read in the next. Reading and writing in the same cycle is allowed
// also when full, as the read frees the slot the write uses. Used as the
// 2-byte FIFO placed between the levels of the HCC decoder; the depth follows
// the document, the handshake is this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 2,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic [AW:0]      count;

  logic do_wr, do_rd;
  assign out_valid = count != '0;
  assign out_data  = mem[rd_ptr];
  assign do_rd     = out_valid && out_ready;
  assign in_ready  = (count != (AW + 1)'(DEPTH)) || out_ready;
  assign do_wr     = in_valid && in_ready;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) begin
        wr_ptr <= next_ptr(wr_ptr);
      end
      if (do_rd) begin
        rd_ptr <= next_ptr(rd_ptr);
      end
      count <= count + (AW + 1)'(do_wr) - (AW + 1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) begin
      mem[wr_ptr] <= in_data;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW + 1)'(DEPTH));

endmodule
