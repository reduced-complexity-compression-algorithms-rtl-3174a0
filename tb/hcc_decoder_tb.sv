// Testbench of hcc_decoder (3 levels, H = 8): random error maps, from very
// sparse to dense and with clustered runs of ones, are HCC coded by the
// reference encoder into three token sub-streams, fed with random gaps and
// back-pressure, and the decoded map is compared bit by bit. A steady run
// checks that after the initial fill the parallel decoder gives one bit per
// cycle with no stall.
module hcc_decoder_tb;
  import c4_pkg::*;
  import c4_enc_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     tok_valid [3];
  logic     tok_ready [3];
  hcc_tok_t tok       [3];
  logic     out_valid, out_ready = 0, out_bit;
  int checks = 0, failures = 0;

  hcc_decoder #(.LEVELS(3), .FIFO_BYTES(2)) dut (.*);

  always #5 clk = ~clk;

  bit        src[$];
  bit [10:0] tq[3][$];
  int        idx[3];
  int        nout, cyc, first_cyc, last_cyc;
  bit        steady;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int l = 0; l < 3; l++) begin
        int nidx;
        nidx = idx[l] + int'(tok_valid[l] && tok_ready[l]);
        idx[l] <= nidx;
        tok_valid[l] <= (nidx < tq[l].size()) && (steady || $urandom_range(3) != 0);
        tok[l]       <= (nidx < tq[l].size()) ? hcc_tok_t'(tq[l][nidx]) : '0;
      end
      out_ready <= steady || $urandom_range(3) != 0;
      if (out_valid && out_ready && nout < src.size()) begin
        checks++;
        if (out_bit !== src[nout]) begin
          failures++;
          if (failures < 10) $display("bit %0d: got %0b want %0b", nout, out_bit, src[nout]);
        end
        if (nout == 0) first_cyc = cyc;
        last_cyc = cyc;
        nout <= nout + 1;
      end
    end
  end

  task automatic run(bit st);
    rst_n = 0; steady = st; nout = 0;
    foreach (idx[l]) begin idx[l] = 0; tok_valid[l] = 0; tok[l] = '0; end
    hcc_encode(src, tq);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    fork
      wait (nout >= src.size());
      repeat (20 * src.size() + 100) @(posedge clk);
    join_any
    disable fork;
    checks++;
    if (nout < src.size()) begin failures++; $display("only %0d of %0d bits", nout, src.size()); end
  endtask

  initial begin
    for (int dens = 0; dens < 4; dens++) begin
      src.delete();
      for (int i = 0; i < 512 * 8; i++) begin
        int pct;
        pct = (dens == 0) ? 0 : (dens == 1) ? 1 : (dens == 2) ? 10 : 50;
        if ((i / 512) % 3 == 1) pct = 0;  // some all-zero top blocks
        src.push_back($urandom_range(99) < pct);
      end
      run(0);
    end
    src.delete();
    for (int i = 0; i < 512 * 8; i++) src.push_back($urandom_range(199) == 0);
    run(1);
    checks++;
    if (last_cyc - first_cyc != src.size() - 1) begin
      failures++;
      $display("steady: %0d bits in %0d cycles", src.size(), last_cyc - first_cyc + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
