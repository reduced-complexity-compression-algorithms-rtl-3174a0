// Testbench of address_generator (IMG_W = 1024, 2048 entries): the pointer
// moves on advance only, and the upper-neighbour and copy addresses are the
// pointer minus 1024, minus d, or minus d * 1024, modulo 2048.
module address_generator_tb;
  import c4_pkg::*;

  logic        clk = 0, rst_n = 0, advance = 0, copy_left1;
  seg_t        seg;
  logic [10:0] wr_addr, above_addr, copy_addr;
  int checks = 0, failures = 0;
  int ptr = 0;

  address_generator #(.IMG_W(1024), .HIST_DEPTH(2048)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    seg = SEG_PREDICT;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int off;
      advance = $urandom_range(1);
      if ($urandom_range(1)) seg = '{dir: DIR_ABOVE, d: 10'($urandom_range(1))};
      else seg = '{dir: DIR_LEFT, d: ($urandom_range(3) == 0) ? 10'd1 : 10'($urandom_range(1023))};
      #1;
      off = (seg.dir == DIR_ABOVE) ? int'(seg.d) * 1024 : int'(seg.d);
      checks++;
      if (int'(wr_addr) != ptr || int'(above_addr) != ((ptr - 1024) & 2047) ||
          int'(copy_addr) != ((ptr - off) & 2047) ||
          copy_left1 !== (seg.dir == DIR_LEFT && seg.d == 1)) begin
        failures++;
        if (failures < 10) $display("ptr %0d: %0d %0d %0d", ptr, wr_addr, above_addr, copy_addr);
      end
      @(negedge clk);
      if (advance) ptr = (ptr + 1) & 2047;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
