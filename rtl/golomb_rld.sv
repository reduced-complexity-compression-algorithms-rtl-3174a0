// Golomb run-length decoder.
//
// Expands a Golomb run-length code into the binary stream it stands for, one
// output bit per clock. With bucket size B = 2**log2_bucket there are two
// codewords:
//   "0"            -> B zeros             (a bucket with no one in it)
//   "1" n[L-1:0]   -> n zeros, then a one (L = log2_bucket, n < B, MSB first)
//
// Structure (after the decoder drawn for Block GC3): a barrel-shifter bit
// buffer of two input words compacts the incoming 8-bit words so the next
// codeword always starts at its MSB; a counter counts the zeros already
// emitted and two comparators, one against n and one against the bucket size,
// decide when the one is emitted and when the codeword ends; a multiplexer
// picks the output bit. The codeword after the current one is decoded in the
// cycle the current one ends, so a steady input gives one bit every cycle with
// no bubbles. The bucket size is an input so it can change from layer to
// layer; in the segmentation path it is tied to a constant.
//
// Interface: in_* carries code words (first code bit in bit IN_W-1), out_*
// the decoded bits; both are valid/ready streams. log2_bucket must only change
// between streams. The codeword layout (1-bit "0", 1+log2 B bits "1,n") and
// the flag values follow the document; the buffer size, handshakes and reset
// are this design's choices.
module golomb_rld #(
  parameter int unsigned IN_W      = 8,
  parameter int unsigned MAX_LOG2B = 7,
  localparam int unsigned LB_W     = $clog2(MAX_LOG2B + 1),
  localparam int unsigned BUF_W    = 2 * IN_W,
  localparam int unsigned CNT_W    = $clog2(BUF_W + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [LB_W-1:0] log2_bucket,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [IN_W-1:0] in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output logic            out_bit
);

  // A codeword must fit in the bit buffer after a word has been taken.
  initial assert (MAX_LOG2B + 1 <= IN_W)
    else $error("golomb_rld: longest codeword exceeds the input word");

  logic [BUF_W-1:0]     sbuf;      // code bits, next bit at the MSB
  logic [CNT_W-1:0]     fill;      // valid bits in sbuf
  logic                 active;    // a codeword is being expanded
  logic                 is_bucket; // active codeword is "0" (B zeros)
  logic [MAX_LOG2B-1:0] run_n;     // n of an active "1,n" codeword
  logic [MAX_LOG2B:0]   zcnt;      // zeros emitted so far for the codeword

  logic [MAX_LOG2B:0]   bucket;
  assign bucket = (MAX_LOG2B + 1)'(1) << log2_bucket;

  // Codeword at the head of the buffer.
  logic                 head_flag;
  logic [MAX_LOG2B-1:0] head_n;
  logic [CNT_W-1:0]     head_len;
  logic                 head_ok;
  assign head_flag = sbuf[BUF_W-1];
  assign head_n    = sbuf[BUF_W-2 -: MAX_LOG2B] >> (LB_W'(MAX_LOG2B) - log2_bucket);
  assign head_len  = head_flag ? CNT_W'(log2_bucket) + CNT_W'(1) : CNT_W'(1);
  assign head_ok   = fill >= head_len;

  // Comparators of the active codeword.
  logic hit_n, hit_b;
  assign hit_n = !is_bucket && (zcnt == {1'b0, run_n});
  assign hit_b =  is_bucket && (zcnt == bucket - 1'b1);

  logic fire, cw_last;
  always_comb begin
    if (active) begin
      out_valid = 1'b1;
      out_bit   = hit_n;
      cw_last   = hit_n || hit_b;
    end else begin
      out_valid = head_ok;
      out_bit   = head_flag && (head_n == '0);
      cw_last   = head_flag ? (head_n == '0) : (log2_bucket == '0);
    end
  end
  assign fire = out_valid && out_ready;

  // Bits removed from the buffer this cycle.
  logic [CNT_W-1:0] used, fill_left;
  assign used      = (fire && !active) ? head_len : '0;
  assign fill_left = fill - used;
  assign in_ready  = fill_left <= CNT_W'(BUF_W - IN_W);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sbuf      <= '0;
      fill      <= '0;
      active    <= 1'b0;
      is_bucket <= 1'b0;
      run_n     <= '0;
      zcnt      <= '0;
    end else begin
      if (in_valid && in_ready) begin
        sbuf <= (sbuf << used) | ({in_data, {(BUF_W - IN_W){1'b0}}} >> fill_left);
        fill <= fill_left + CNT_W'(IN_W);
      end else begin
        sbuf <= sbuf << used;
        fill <= fill_left;
      end
      if (fire) begin
        if (cw_last) begin
          active <= 1'b0;
        end else if (!active) begin
          active    <= 1'b1;
          is_bucket <= !head_flag;
          run_n     <= head_n;
          zcnt      <= 1;
        end else begin
          zcnt <= zcnt + 1'b1;
        end
      end
    end
  end

endmodule
