// Testbench of seg_predictor: random and deliberately equal neighbour values;
// the expected value follows the rule "if c = a then b else c".
module seg_predictor_tb;
  import c4_pkg::*;

  seg_t a, b, c, z;
  int checks = 0, failures = 0;

  seg_predictor dut (.*);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = seg_t'($urandom_range(2047));
      b = seg_t'($urandom_range(2047));
      c = ($urandom_range(1) == 0) ? a : seg_t'($urandom_range(2047));
      #1;
      checks++;
      if (z !== ((c == a) ? b : c)) begin
        failures++;
        $display("a=%h b=%h c=%h z=%h", a, b, c, z);
      end
    end
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
