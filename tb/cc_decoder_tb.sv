// Testbench of cc_decoder: every 8-bit word is ranked by the reference
// encoder (count of smaller words of equal weight) and must come back from
// (k, rank); the two H = 8 examples (2,17) -> 01000100 and (2,14) -> 00110000
// are checked explicitly.
module cc_decoder_tb;
  import c4_pkg::*;
  import c4_enc_pkg::*;

  logic [3:0] k;
  logic [6:0] rank;
  logic [7:0] bits;
  int checks = 0, failures = 0;

  cc_decoder dut (.*);

  task automatic check(int kk, int rr, bit [7:0] want);
    k = 4'(kk); rank = 7'(rr);
    #1;
    checks++;
    if (bits !== want) begin
      failures++;
      $display("(%0d,%0d): got %b want %b", kk, rr, bits, want);
    end
  endtask

  initial begin
    check(2, 17, 8'b01000100);
    check(2, 14, 8'b00110000);
    for (int w = 0; w < 256; w++) check(popcount8(8'(w)), cc_rank(8'(w)), 8'(w));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
