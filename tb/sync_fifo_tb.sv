// Testbench of sync_fifo (2 x 8 bits): random writes and reads; the output
// sequence must equal the input sequence, the FIFO must refuse a write when
// full without a read, and take one when a read frees a slot.
module sync_fifo_tb;
  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;
  int unsigned model[$];
  int n_full = 0;

  sync_fifo #(.WIDTH(8), .DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (model.size() == 0 || out_data !== 8'(model[0])) begin
        failures++;
        $display("read %h, expected %h", out_data, model.size() ? model[0] : 0);
      end
      if (model.size()) void'(model.pop_front());
    end
    checks++;
    if (in_ready !== (model.size() < 2 || out_ready)) begin
      failures++;
      $display("in_ready %b with %0d stored", in_ready, model.size());
    end
    if (model.size() == 2 && !out_ready) n_full++;
    if (in_valid && in_ready) model.push_back(in_data);
    in_valid  <= $urandom_range(1);
    in_data   <= 8'($urandom_range(255));
    out_ready <= $urandom_range(2) == 0;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (3000) @(posedge clk);
    checks++;
    if (n_full == 0) begin failures++; $display("FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
