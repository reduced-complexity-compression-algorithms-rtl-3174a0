// Testbench of history_buffer (2048 x 5 bits): random writes and reads
// against an array model; read data arrive one cycle after re and are held
// while re is low; a read of the address being written returns the old word.
module history_buffer_tb;
  import c4_pkg::*;

  logic        clk = 0;
  logic        re = 0, we = 0;
  logic [10:0] raddr_a = 0, raddr_b = 0, waddr = 0;
  pix_t        rdata_a, rdata_b, wdata = 0;
  int checks = 0, failures = 0;
  pix_t model [2048];
  pix_t exp_a, exp_b;
  bit   have;

  history_buffer #(.HIST_DEPTH(2048)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      we = 1; waddr = 11'(i); wdata = pix_t'($urandom_range(31)); re = 0;
      model[i] = wdata;
    end
    have = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (rdata_a !== exp_a || rdata_b !== exp_b) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %0d/%0d want %0d/%0d", i, rdata_a, rdata_b, exp_a, exp_b);
        end
      end
      re = $urandom_range(1);
      we = $urandom_range(1);
      raddr_a = 11'($urandom_range(2047));
      raddr_b = ($urandom_range(3) == 0) ? waddr : 11'($urandom_range(2047));
      waddr = ($urandom_range(3) == 0) ? raddr_a : 11'($urandom_range(2047));
      wdata = pix_t'($urandom_range(31));
      if (re) begin
        exp_a = model[raddr_a];
        exp_b = model[raddr_b];
        have = 1;
      end
      if (we) model[waddr] = wdata;
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
