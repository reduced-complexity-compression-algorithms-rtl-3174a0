// Canonical Huffman decoder for the error values.
//
// Where prediction or copying gets a pixel wrong, the encoder sends the
// correct 5-bit value Huffman coded. This decoder takes the coded bits one
// per clock and walks the canonical code tree by code length: after each bit
// it checks whether the code read so far is one of the cfg_count[len] codes
// of the current length (which occupy a contiguous range starting at
// `first`); if so the symbol is cfg_symbol[index + code - first], otherwise it
// moves on to the next length. A codeword of n bits therefore takes n cycles,
// and the symbol is presented from a register in the cycle after its last bit.
//
// The code table is loaded through cfg_count (number of codewords of each
// length 1..MAX_LEN, entry 0 unused) and cfg_symbol (symbols sorted by code
// length, then by code), so the encoder may pick a code per layer; the
// inputs must be stable while decoding. in_* brings 8-bit words, first code
// bit in the MSB; out_* delivers decoded values. Huffman coding of the error
// values follows the document; the canonical form, the table interface and
// the bit-serial structure are this design's choices.
module huffman_decoder
  import c4_pkg::*;
#(
  parameter int unsigned NSYM    = 32,
  parameter int unsigned MAX_LEN = 12,
  parameter int unsigned IN_W    = 8,
  localparam int unsigned CNT_W  = $clog2(NSYM + 1),
  localparam int unsigned IDX_W  = $clog2(NSYM + 1),
  localparam int unsigned LEN_W  = $clog2(MAX_LEN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] cfg_count  [MAX_LEN+1],
  input  pix_t             cfg_symbol [NSYM],
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [IN_W-1:0]  in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output pix_t             out_value
);

  // Input word and position of the next bit in it.
  logic [IN_W-1:0]         word;
  logic                    word_valid;
  logic [$clog2(IN_W)-1:0] bit_idx;

  // Canonical decoding state.
  logic [MAX_LEN:0] code;   // bits read so far (shifted)
  logic [MAX_LEN:0] first;  // first code of the current length
  logic [IDX_W-1:0] index;  // symbols of all shorter lengths
  logic [LEN_W-1:0] len;    // bits read so far

  logic             slot_free, step, take_bit, last_bit;
  logic [MAX_LEN:0] code_now, count_now;
  logic [IDX_W-1:0] offset;  // position within the current length
  logic             hit;
  logic [LEN_W-1:0] len_now;

  assign slot_free = !out_valid || out_ready;
  assign step      = word_valid && slot_free;
  assign last_bit  = bit_idx == $clog2(IN_W)'(IN_W - 1);
  assign take_bit  = step;
  assign in_ready  = !word_valid || (take_bit && last_bit);

  assign len_now   = len + 1'b1;
  assign code_now  = code | (MAX_LEN + 1)'(word[~bit_idx]);
  assign count_now = (MAX_LEN + 1)'(cfg_count[len_now]);
  assign offset    = IDX_W'(code_now - first);
  assign hit       = code_now < first + count_now;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word_valid <= 1'b0;
      word       <= '0;
      bit_idx    <= '0;
      code       <= '0;
      first      <= '0;
      index      <= '0;
      len        <= '0;
      out_valid  <= 1'b0;
      out_value  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        word       <= in_data;
        word_valid <= 1'b1;
        bit_idx    <= '0;
      end else if (take_bit) begin
        bit_idx <= bit_idx + 1'b1;
        if (last_bit) word_valid <= 1'b0;
      end

      if (out_valid && out_ready) out_valid <= 1'b0;

      if (step) begin
        if (hit) begin
          out_valid <= 1'b1;
          out_value <= cfg_symbol[$clog2(NSYM)'(index + offset)];
          code      <= '0;
          first     <= '0;
          index     <= '0;
          len       <= '0;
        end else begin
          code  <= code_now << 1;
          first <= (first + count_now) << 1;
          index <= index + IDX_W'(count_now);
          len   <= len_now;
        end
      end
    end
  end

  // A code longer than MAX_LEN means a bad table or a corrupt stream.
  assert property (@(posedge clk) disable iff (!rst_n) step |-> (hit || len_now < LEN_W'(MAX_LEN)));

endmodule
