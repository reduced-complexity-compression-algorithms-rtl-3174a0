// Testbench of huffman_decoder: a random canonical code (lengths 3 to 7,
// shuffled symbols) from the reference encoder codes 3000 random values;
// they are fed with random gaps and back-pressure and must come back in
// order. A second run with steady input checks the bit-serial rate: the
// whole stream takes one cycle per code bit plus a cycle of latency.
module huffman_decoder_tb;
  import c4_pkg::*;
  import c4_enc_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic [5:0] cfg_count  [13];
  pix_t       cfg_symbol [32];
  logic       in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0] in_data = 0;
  pix_t       out_value;
  int checks = 0, failures = 0;

  huffman_decoder #(.NSYM(32), .MAX_LEN(12)) dut (.*);

  always #5 clk = ~clk;

  huff_code hc;
  byte_q_t  code;
  int       vals[$];
  int       idx, nout, cyc, first_cyc, last_cyc, nbits;
  bit       steady;

  always @(posedge clk) begin
    int nidx;
    cyc++;
    if (rst_n) begin
      nidx = idx + int'(in_valid && in_ready);
      idx <= nidx;
      in_valid <= (nidx < code.size()) && (steady || $urandom_range(3) != 0);
      in_data  <= (nidx < code.size()) ? code[nidx] : 8'h00;
      out_ready <= steady || $urandom_range(2) != 0;
      if (out_valid && out_ready && nout < vals.size()) begin
        checks++;
        if (int'(out_value) != vals[nout]) begin
          failures++;
          if (failures < 10) $display("value %0d: got %0d want %0d", nout, out_value, vals[nout]);
        end
        if (nout == 0) first_cyc = cyc;
        last_cyc = cyc;
        nout <= nout + 1;
      end
    end
  end

  task automatic run(bit st);
    rst_n = 0; steady = st; idx = 0; nout = 0;
    code = hc.encode(vals);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    fork
      wait (nout >= vals.size());
      repeat (40 * vals.size() + 100) @(posedge clk);
    join_any
    disable fork;
    checks++;
    if (nout < vals.size()) begin failures++; $display("only %0d values", nout); end
  endtask

  initial begin
    hc = new();
    foreach (cfg_count[i]) cfg_count[i] = 6'(hc.count[i]);
    foreach (cfg_symbol[i]) cfg_symbol[i] = pix_t'(hc.symbol[i]);
    for (int i = 0; i < 3000; i++) vals.push_back($urandom_range(31));
    run(0);
    vals.delete();
    nbits = 0;
    for (int i = 0; i < 1000; i++) begin
      vals.push_back($urandom_range(31));
      nbits += hc.len_of[vals[i]];
    end
    run(1);
    // first symbol appears after its own bits; the rest need one cycle per bit
    checks++;
    if (last_cyc - first_cyc != nbits - hc.len_of[vals[0]]) begin
      failures++;
      $display("rate: %0d cycles for %0d bits", last_cyc - first_cyc, nbits - hc.len_of[vals[0]]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
