// Testbench of linear_predictor: all 32768 neighbour combinations against
// left + above - upper-left clipped to 0..31.
module linear_predictor_tb;
  import c4_pkg::*;

  pix_t left, above, upleft, pred;
  int checks = 0, failures = 0;

  linear_predictor dut (.*);

  initial begin
    for (int l = 0; l < 32; l++)
      for (int u = 0; u < 32; u++)
        for (int a = 0; a < 32; a++) begin
          int e;
          left = pix_t'(l); above = pix_t'(u); upleft = pix_t'(a);
          #1;
          e = l + u - a;
          if (e < 0) e = 0;
          if (e > 31) e = 31;
          checks++;
          if (int'(pred) != e) begin
            failures++;
            if (failures < 10) $display("%0d+%0d-%0d: got %0d want %0d", l, u, a, pred, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
