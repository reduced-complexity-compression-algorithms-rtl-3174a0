// End-to-end testbench of writer_chip at reduced size: two Block GC3 and two
// Block C4 decoders on 64 x 32 images with a 256-pixel buffer. Each decoder
// gets its own pair of random layout images from the reference encoder, all
// streams have random gaps and every writer port random back-pressure; all
// decoded pixels are compared with the originals. The test runs twice, the
// second time as a new layer with another Golomb bucket size and Huffman
// table. It counts how often each mechanism of the design happened (error
// value replacing a pixel, predict and copy blocks, copies from distance 1
// through the forwarding path and from above, transmitted segmentation
// values, all-zero and coded HCC blocks, pipeline stalls, writer
// back-pressure, image wrap, bucket change) and fails if one never did.
module writer_chip_tb;
  import c4_pkg::*;
  import c4_enc_pkg::*;

  localparam int NG = 2, NC = 2;
  localparam int W = 64, H = 32, DEPTH = 256, NIMG = 2;
  localparam int NPIX = NIMG * W * H;

  logic       clk = 0, rst_n = 0, gaps = 1;
  logic [2:0] gc3_log2_bucket = 4;
  logic [5:0] gc3_huff_count [13], c4_huff_count [13];
  pix_t       gc3_huff_symbol [32], c4_huff_symbol [32];
  logic       gc3_el_valid [NG], gc3_el_ready [NG], gc3_sl_valid [NG], gc3_sl_ready [NG];
  logic       gc3_sv_valid [NG], gc3_sv_ready [NG], gc3_hv_valid [NG], gc3_hv_ready [NG];
  logic [7:0] gc3_el_data [NG], gc3_sl_data [NG], gc3_hv_data [NG];
  seg_t       gc3_sv_data [NG];
  logic       gc3_pix_valid [NG], gc3_pix_ready [NG];
  pix_t       gc3_pix [NG];
  logic       c4_tok_valid [NC][3], c4_tok_ready [NC][3];
  hcc_tok_t   c4_tok [NC][3];
  logic       c4_sl_valid [NC], c4_sl_ready [NC], c4_sv_valid [NC], c4_sv_ready [NC];
  logic       c4_hv_valid [NC], c4_hv_ready [NC];
  logic [7:0] c4_sl_data [NC], c4_hv_data [NC];
  seg_t       c4_sv_data [NC];
  logic       c4_pix_valid [NC], c4_pix_ready [NC];
  pix_t       c4_pix [NC];

  writer_chip #(.NUM_GC3(NG), .NUM_C4(NC), .IMG_W(W), .IMG_H(H), .HIST_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  c4_stream st_g[NG], st_c[NC];
  huff_code hc;
  int n_g[NG], n_c[NC];
  // mechanism counters
  int m_err_value = 0, m_left1 = 0, m_copy_above = 0, m_copy_left = 0, m_predict = 0;
  int m_seg_sent = 0, m_hcc_rld = 0, m_hcc_cc = 0, m_stall = 0, m_backpressure = 0;
  int m_wrap = 0, m_bucket_change = 0;

  // ---- GC3 sources and checkers
  for (genvar i = 0; i < NG; i++) begin : g_g
    logic [10:0] sv_raw;
    stream_source #(.W(8))  u_el (.clk, .rst_n, .gaps, .valid(gc3_el_valid[i]), .ready(gc3_el_ready[i]), .data(gc3_el_data[i]));
    stream_source #(.W(8))  u_sl (.clk, .rst_n, .gaps, .valid(gc3_sl_valid[i]), .ready(gc3_sl_ready[i]), .data(gc3_sl_data[i]));
    stream_source #(.W(11)) u_sv (.clk, .rst_n, .gaps, .valid(gc3_sv_valid[i]), .ready(gc3_sv_ready[i]), .data(sv_raw));
    stream_source #(.W(8))  u_hv (.clk, .rst_n, .gaps, .valid(gc3_hv_valid[i]), .ready(gc3_hv_ready[i]), .data(gc3_hv_data[i]));
    assign gc3_sv_data[i] = seg_t'(sv_raw);
    always @(posedge clk) if (rst_n) begin
      gc3_pix_ready[i] <= $urandom_range(4) != 0;
      if (gc3_pix_valid[i] && !gc3_pix_ready[i]) m_backpressure++;
      if (gc3_pix_ready[i] && !gc3_pix_valid[i] && n_g[i] > 0 && n_g[i] < NPIX) m_stall++;
      if (gc3_pix_valid[i] && gc3_pix_ready[i] && n_g[i] < NPIX) begin
        checks++;
        if (int'(gc3_pix[i]) != st_g[i].img[n_g[i]]) begin
          failures++;
          if (failures < 10) $display("GC3 %0d pixel %0d: got %0d want %0d", i, n_g[i], gc3_pix[i], st_g[i].img[n_g[i]]);
        end
        if (dut.g_gc3[i].u_dec.u_core.u_merge.ev_ready) m_err_value++;
        if (dut.g_gc3[i].u_dec.u_core.b_copy && dut.g_gc3[i].u_dec.u_core.b_left1) m_left1++;
        if (n_g[i] == W * H) m_wrap++;
        n_g[i]++;
      end
    end
  end

  // ---- C4 sources and checkers
  for (genvar i = 0; i < NC; i++) begin : g_c
    logic [10:0] sv_raw;
    logic [10:0] tok_raw [3];
    for (genvar l = 0; l < 3; l++) begin : g_t
      stream_source #(.W(11)) u_t (.clk, .rst_n, .gaps, .valid(c4_tok_valid[i][l]), .ready(c4_tok_ready[i][l]), .data(tok_raw[l]));
      assign c4_tok[i][l] = hcc_tok_t'(tok_raw[l]);
    end
    stream_source #(.W(8))  u_sl (.clk, .rst_n, .gaps, .valid(c4_sl_valid[i]), .ready(c4_sl_ready[i]), .data(c4_sl_data[i]));
    stream_source #(.W(11)) u_sv (.clk, .rst_n, .gaps, .valid(c4_sv_valid[i]), .ready(c4_sv_ready[i]), .data(sv_raw));
    stream_source #(.W(8))  u_hv (.clk, .rst_n, .gaps, .valid(c4_hv_valid[i]), .ready(c4_hv_ready[i]), .data(c4_hv_data[i]));
    assign c4_sv_data[i] = seg_t'(sv_raw);
    always @(posedge clk) if (rst_n) begin
      c4_pix_ready[i] <= $urandom_range(4) != 0;
      if (c4_pix_valid[i] && !c4_pix_ready[i]) m_backpressure++;
      if (c4_pix_ready[i] && !c4_pix_valid[i] && n_c[i] > 0 && n_c[i] < NPIX) m_stall++;
      if (c4_pix_valid[i] && c4_pix_ready[i] && n_c[i] < NPIX) begin
        checks++;
        if (int'(c4_pix[i]) != st_c[i].img[n_c[i]]) begin
          failures++;
          if (failures < 10) $display("C4 %0d pixel %0d: got %0d want %0d", i, n_c[i], c4_pix[i], st_c[i].img[n_c[i]]);
        end
        if (dut.g_c4[i].u_dec.u_core.u_merge.ev_ready) m_err_value++;
        if (dut.g_c4[i].u_dec.u_core.b_copy && dut.g_c4[i].u_dec.u_core.b_left1) m_left1++;
        if (n_c[i] == W * H) m_wrap++;
        n_c[i]++;
      end
    end
  end

  function automatic bit all_done();
    foreach (n_g[i]) if (n_g[i] < NPIX) return 0;
    foreach (n_c[i]) if (n_c[i] < NPIX) return 0;
    return 1;
  endfunction

  task automatic load_layer(int lb);
    bit [10:0] tq[3][$];
    hc = new();
    gc3_log2_bucket = 3'(lb);
    foreach (gc3_huff_count[i]) begin gc3_huff_count[i] = 6'(hc.count[i]); c4_huff_count[i] = 6'(hc.count[i]); end
    foreach (gc3_huff_symbol[i]) begin gc3_huff_symbol[i] = pix_t'(hc.symbol[i]); c4_huff_symbol[i] = pix_t'(hc.symbol[i]); end
    foreach (st_g[i]) begin
      st_g[i] = new(W, H, DEPTH, NIMG, lb, 4);
      st_g[i].generate_all(8, 60, 25);
      m_predict += st_g[i].n_pred_blocks; m_copy_left += st_g[i].n_copy_left; m_copy_above += st_g[i].n_copy_above;
      m_seg_sent += st_g[i].sv.size();
      n_g[i] = 0;
    end
    foreach (st_c[i]) begin
      st_c[i] = new(W, H, DEPTH, NIMG, lb, 4);
      st_c[i].generate_all(8, 60, 25);
      m_predict += st_c[i].n_pred_blocks; m_copy_left += st_c[i].n_copy_left; m_copy_above += st_c[i].n_copy_above;
      m_seg_sent += st_c[i].sv.size();
      hcc_encode(st_c[i].el, tq);
      m_hcc_cc += tq[0].size();
      m_hcc_rld += tq[1].size() * 8 - tq[0].size();
      n_c[i] = 0;
    end
    g_g[0].u_el.q = golomb_encode(st_g[0].el, lb);
    g_g[0].u_sl.q = golomb_encode(st_g[0].sel, 4);
    g_g[0].u_hv.q = hc.encode(st_g[0].ev);
    g_g[0].u_sv.q.delete(); foreach (st_g[0].sv[k]) g_g[0].u_sv.q.push_back(11'(st_g[0].sv[k]));
    g_g[1].u_el.q = golomb_encode(st_g[1].el, lb);
    g_g[1].u_sl.q = golomb_encode(st_g[1].sel, 4);
    g_g[1].u_hv.q = hc.encode(st_g[1].ev);
    g_g[1].u_sv.q.delete(); foreach (st_g[1].sv[k]) g_g[1].u_sv.q.push_back(11'(st_g[1].sv[k]));
    hcc_encode(st_c[0].el, tq);
    g_c[0].g_t[0].u_t.q = tq[0]; g_c[0].g_t[1].u_t.q = tq[1]; g_c[0].g_t[2].u_t.q = tq[2];
    g_c[0].u_sl.q = golomb_encode(st_c[0].sel, 4);
    g_c[0].u_hv.q = hc.encode(st_c[0].ev);
    g_c[0].u_sv.q.delete(); foreach (st_c[0].sv[k]) g_c[0].u_sv.q.push_back(11'(st_c[0].sv[k]));
    hcc_encode(st_c[1].el, tq);
    g_c[1].g_t[0].u_t.q = tq[0]; g_c[1].g_t[1].u_t.q = tq[1]; g_c[1].g_t[2].u_t.q = tq[2];
    g_c[1].u_sl.q = golomb_encode(st_c[1].sel, 4);
    g_c[1].u_hv.q = hc.encode(st_c[1].ev);
    g_c[1].u_sv.q.delete(); foreach (st_c[1].sv[k]) g_c[1].u_sv.q.push_back(11'(st_c[1].sv[k]));
  endtask

  task automatic run_layer(int lb);
    rst_n = 0;
    load_layer(lb);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork
      wait (all_done());
      repeat (60 * NPIX) @(posedge clk);
    join_any
    disable fork;
    checks++;
    if (!all_done()) begin failures++; $display("layer with bucket 2**%0d did not finish", lb); end
  endtask

  task automatic need(string what, int count);
    $display("  %-34s %0d", what, count);
    checks++;
    if (count == 0) begin failures++; $display("  ^ never happened"); end
  endtask

  initial begin
    run_layer(4);
    run_layer(6);
    m_bucket_change++;
    $display("mechanisms:");
    need("error value replaced a pixel", m_err_value);
    need("predicted blocks", m_predict);
    need("copy-left blocks", m_copy_left);
    need("copy-above blocks", m_copy_above);
    need("distance-1 copies via forwarding", m_left1);
    need("transmitted segmentation values", m_seg_sent);
    need("HCC coded level-0 blocks", m_hcc_cc);
    need("HCC all-zero level-0 blocks", m_hcc_rld);
    need("pipeline stall cycles", m_stall);
    need("writer back-pressure cycles", m_backpressure);
    need("image wraps", m_wrap);
    need("Golomb bucket changes", m_bucket_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
