// Testbench of decoder_core, the pixel pipeline without an error-location
// decoder: two random 64 x 32 layout images (buffer of 256 pixels) are
// encoded by the reference encoder; the error map is fed as raw bits, the
// segmentation and error values in coded form, all with random gaps, and the
// writer applies random back-pressure. Every output pixel must equal the
// original image. It also checks the peak rate with steady streams: one pixel
// per cycle when no pixel needs an error value.
module decoder_core_tb;
  import c4_pkg::*;
  import c4_enc_pkg::*;

  localparam int W = 64, H = 32, DEPTH = 256, NIMG = 2;
  logic        clk = 0, rst_n = 0, gaps = 1;
  logic        el_valid, el_ready, sl_valid, sl_ready, sv_valid, sv_ready, hv_valid, hv_ready;
  logic [0:0]  el_raw;
  logic [7:0]  sl_data, hv_data;
  logic [10:0] sv_raw;
  logic [5:0]  huff_count [13];
  pix_t        huff_symbol [32];
  logic        pix_valid, pix_ready = 0;
  pix_t        pix;
  int checks = 0, failures = 0;

  stream_source #(.W(1))  u_el (.clk, .rst_n, .gaps, .valid(el_valid), .ready(el_ready), .data(el_raw));
  stream_source #(.W(8))  u_sl (.clk, .rst_n, .gaps, .valid(sl_valid), .ready(sl_ready), .data(sl_data));
  stream_source #(.W(11)) u_sv (.clk, .rst_n, .gaps, .valid(sv_valid), .ready(sv_ready), .data(sv_raw));
  stream_source #(.W(8))  u_hv (.clk, .rst_n, .gaps, .valid(hv_valid), .ready(hv_ready), .data(hv_data));

  decoder_core #(.IMG_W(W), .IMG_H(H), .HIST_DEPTH(DEPTH), .SEG_LOG2_BUCKET(4)) dut (
    .clk, .rst_n, .el_valid, .el_ready, .el_bit(el_raw[0]), .sl_valid, .sl_ready, .sl_data,
    .sv_valid, .sv_ready, .sv_data(seg_t'(sv_raw)), .hv_valid, .hv_ready, .hv_data,
    .huff_count, .huff_symbol, .pix_valid, .pix_ready, .pix);

  always #5 clk = ~clk;

  c4_stream st;
  huff_code hc;
  int  n = 0, cyc = 0, first_cyc = 0, last_cyc = 0, n_stall = 0;
  bit  steady = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      pix_ready <= steady || $urandom_range(3) != 0;
      if (pix_ready && !pix_valid && n > 0 && n < NIMG * W * H) n_stall++;
      if (pix_valid && pix_ready && n < NIMG * W * H) begin
        checks++;
        if (int'(pix) != st.img[n]) begin
          failures++;
          if (failures < 10) $display("pixel %0d (x=%0d y=%0d): got %0d want %0d", n, n % W, (n / W) % H, pix, st.img[n]);
        end
        if (n == 0) first_cyc = cyc;
        last_cyc = cyc;
        n <= n + 1;
      end
    end
  end

  task automatic run(int perr, bit st_mode);
    rst_n = 0; steady = st_mode; gaps = !st_mode; n = 0;
    st.generate_all(perr, 60, 25);
    u_el.q.delete(); u_sv.q.delete();
    foreach (st.el[i]) u_el.q.push_back(st.el[i]);
    u_sl.q = golomb_encode(st.sel, 4);
    foreach (st.sv[i]) u_sv.q.push_back(11'(st.sv[i]));
    u_hv.q = hc.encode(st.ev);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork
      wait (n >= NIMG * W * H);
      repeat (60 * NIMG * W * H) @(posedge clk);
    join_any
    disable fork;
    checks++;
    if (n < NIMG * W * H) begin failures++; $display("only %0d pixels", n); end
  endtask

  initial begin
    hc = new();
    foreach (huff_count[i]) huff_count[i] = 6'(hc.count[i]);
    foreach (huff_symbol[i]) huff_symbol[i] = pix_t'(hc.symbol[i]);
    st = new(W, H, DEPTH, NIMG, 4, 4);
    run(8, 0);
    $display("blocks: %0d predicted, %0d copy-left (%0d at distance 1), %0d copy-above; %0d error pixels; %0d stall cycles",
             st.n_pred_blocks, st.n_copy_left, st.n_copy_left1, st.n_copy_above, st.ev.size(), n_stall);
    checks++;
    if (st.n_copy_left1 == 0 || st.n_copy_above == 0 || st.ev.size() == 0 || n_stall == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    // peak rate: no error pixels, steady streams, ready writer
    run(0, 1);
    checks++;
    if (last_cyc - first_cyc != NIMG * W * H - 1) begin
      failures++;
      $display("rate: %0d pixels in %0d cycles", NIMG * W * H, last_cyc - first_cyc + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
