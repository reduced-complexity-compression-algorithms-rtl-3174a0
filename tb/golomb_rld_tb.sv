// Testbench of golomb_rld: random binary streams of several densities are
// Golomb coded by the reference encoder for bucket sizes 1 to 128, fed with
// random gaps and random output back-pressure, and the decoded bits are
// compared with the originals. A hand-coded vector checks the codeword
// layout, and a run with steady input checks one output bit per cycle.
module golomb_rld_tb;
  import c4_enc_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic [2:0] log2_bucket = 0;
  logic       in_valid = 0, in_ready;
  logic [7:0] in_data = 0;
  logic       out_valid, out_ready = 0, out_bit;
  int checks = 0, failures = 0;

  golomb_rld dut (.*);

  always #5 clk = ~clk;

  byte_q_t code;
  bit      src[$];
  int      idx, nout, cyc, first_cyc, last_cyc;
  bit      steady;

  always @(posedge clk) begin
    int nidx;
    cyc++;
    if (rst_n) begin
      nidx = idx + int'(in_valid && in_ready);
      idx <= nidx;
      in_valid <= (nidx < code.size()) && (steady || $urandom_range(3) != 0);
      in_data  <= (nidx < code.size()) ? code[nidx] : 8'h00;
      out_ready <= steady || $urandom_range(4) != 0;
      if (out_valid && out_ready) begin
        if (nout < src.size()) begin
          checks++;
          if (out_bit !== src[nout]) begin
            failures++;
            if (failures < 10) $display("mismatch bit %0d: got %0b want %0b (lb=%0d)", nout, out_bit, src[nout], log2_bucket);
          end
          if (nout == 0) first_cyc = cyc;
          last_cyc = cyc;
        end
        nout <= nout + 1;
      end
    end
  end

  task automatic run(int lb, bit st);
    rst_n = 0; in_valid = 0; out_ready = 0;
    log2_bucket = 3'(lb); steady = st;
    code = golomb_encode(src, lb);
    idx = 0; nout = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    fork
      wait (nout >= src.size());
      repeat (20 * src.size() + 100) @(posedge clk);
    join_any
    disable fork;
    checks++;
    if (nout < src.size()) begin
      failures++;
      $display("lb=%0d: only %0d of %0d bits", lb, nout, src.size());
    end
  endtask

  initial begin
    bit fig[$];
    byte_q_t exp_code;
    // Worked example: 0100010000110000 with B = 2 is
    // (1,1)(0)(1,1)(0)(0)(1,0)(1,0)(0)(0) -> 11 0 11 0 0 10 10 0 0
    fig = '{0,1,0,0,0,1,0,0,0,0,1,1,0,0,0,0};
    exp_code = golomb_encode(fig, 1);
    checks++;
    if (exp_code[0] !== 8'b11011001 || exp_code[1] !== 8'b01000000) begin
      failures++;
      $display("reference coder: %b %b", exp_code[0], exp_code[1]);
    end
    src = fig;
    run(1, 0);

    foreach (src[i]) ;
    for (int lb = 0; lb <= 7; lb++) begin
      for (int dens = 0; dens < 3; dens++) begin
        int pct;
        pct = (dens == 0) ? 1 : (dens == 1) ? 8 : 40;
        src.delete();
        for (int i = 0; i < 1500; i++) src.push_back($urandom_range(99) < pct);
        run(lb, 0);
      end
    end

    // steady input: one bit per cycle, no bubbles
    src.delete();
    for (int i = 0; i < 2000; i++) src.push_back($urandom_range(99) < 5);
    run(4, 1);
    checks++;
    if (last_cyc - first_cyc != src.size() - 1) begin
      failures++;
      $display("throughput: %0d bits in %0d cycles", src.size(), last_cyc - first_cyc + 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
