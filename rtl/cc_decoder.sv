// Combinatorial-code (CC) block decoder.
//
// Turns a (k, rank) pair back into the H-bit block it encodes: the block has
// k ones and is the rank-th (counting from 0) of all H-bit words with k ones
// in ascending numeric order. Example for H = 8: (2, 17) -> 01000100,
// (2, 14) -> 00110000. The bits are resolved from the MSB down: a zero at the
// current position keeps the word among the C(rest, k_left) smaller words, so
// the bit is one exactly when the remaining rank is at least that binomial
// coefficient, which is then subtracted. The binomial table is built at
// elaboration from Pascal's rule. Purely combinational. The CC function
// follows the document; this ranking order is the one of its H = 8 example.
module cc_decoder
  import c4_pkg::*;
#(
  parameter int unsigned H = HCC_H
) (
  input  logic [HCC_K_W-1:0]    k,
  input  logic [HCC_RANK_W-1:0] rank,
  output logic [H-1:0]          bits
);

  // BT[n][r] = C(n, r), zero for r > n
  typedef logic [H-1:0][H:0][15:0] btab_t;

  function automatic btab_t make_binom();
    btab_t t;
    t = '0;
    for (int n = 0; n < H; n++) begin
      t[n][0] = 16'd1;
      for (int r = 1; r <= n; r++)
        t[n][r] = t[n-1][r-1] + t[n-1][r];
    end
    return t;
  endfunction

  localparam btab_t BT = make_binom();

  always_comb begin
    int unsigned r_left;
    int unsigned k_left;
    int unsigned c;
    r_left = 32'(rank);
    k_left = 32'(k);
    bits   = '0;
    for (int i = 0; i < H; i++) begin
      c = (k_left <= H) ? 32'(BT[H-1-i][k_left]) : 0;
      if (k_left != 0 && r_left >= c) begin
        bits[H-1-i] = 1'b1;
        r_left      = r_left - c;
        k_left      = k_left - 1;
      end
    end
  end

endmodule
