// Testbench of control_merge: random inputs; the pixel must be the error
// value where the error location is 1, else the copy or predicted value, and
// the handshake outputs must follow the availability of what the pixel needs.
module control_merge_tb;
  import c4_pkg::*;

  logic stage_valid, is_copy, el_valid, el_bit, el_ready, ev_valid, ev_ready;
  logic pix_valid, pix_ready, fire;
  pix_t predict_val, copy_val, ev_value, pix;
  int checks = 0, failures = 0;

  control_merge dut (.*);

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic ev, ok;
      pix_t want;
      {stage_valid, is_copy, el_valid, el_bit, ev_valid, pix_ready} = 6'($urandom_range(63));
      predict_val = pix_t'($urandom_range(31));
      copy_val    = pix_t'($urandom_range(31));
      ev_value    = pix_t'($urandom_range(31));
      #1;
      want = el_bit ? ev_value : (is_copy ? copy_val : predict_val);
      ok = stage_valid && el_valid && (!el_bit || ev_valid);
      ev = ok && pix_ready;
      checks++;
      if ((ok && pix !== want) || pix_valid !== ok || fire !== ev || el_ready !== ev || ev_ready !== (ev && el_bit)) begin
        failures++;
        if (failures < 10) $display("case %0d mismatch", i);
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
