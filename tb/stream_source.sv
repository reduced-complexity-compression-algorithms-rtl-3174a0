// Testbench helper: plays a queue of words out on a valid/ready stream.
// The test fills `q` hierarchically; with `gaps` set, valid drops at random
// cycles. `sent` counts transferred words, `waits` the cycles the stream had
// a word but the consumer was not ready.
module stream_source #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         gaps,
  output logic         valid,
  input  logic         ready,
  output logic [W-1:0] data
);
  bit [W-1:0] q[$];
  int idx = 0;
  int sent = 0;
  int waits = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      idx   <= 0;
      valid <= 1'b0;
      data  <= '0;
    end else begin
      int nidx;
      nidx = idx + int'(valid && ready);
      if (valid && ready) sent++;
      if (valid && !ready) waits++;
      idx   <= nidx;
      valid <= (nidx < q.size()) && (!gaps || $urandom_range(7) != 0);
      data  <= (nidx < q.size()) ? q[nidx] : '0;
    end
  end
endmodule
