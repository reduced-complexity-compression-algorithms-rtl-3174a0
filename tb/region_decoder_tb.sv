// Testbench of region_decoder (64-pixel-wide images, bucket 16): the
// reference encoder builds random segmentations of two 64 x 32 images,
// predicts each block with the three-block rule, and codes the error map
// (Golomb) and error values. The testbench then queries the decoder as the
// pixel pipeline does, pixel by pixel in raster order with random pauses,
// and compares every returned value with the generated map.
module region_decoder_tb;
  import c4_pkg::*;
  import c4_enc_pkg::*;

  localparam int W = 64, H = 32;
  logic       clk = 0, rst_n = 0, gaps = 1;
  logic       sl_valid, sl_ready, sv_valid, sv_ready;
  logic [7:0] sl_data;
  logic [10:0] sv_raw;
  logic [2:0] q_bx;
  logic       q_new, q_top, q_take, seg_valid;
  seg_t       seg;
  int checks = 0, failures = 0;
  int n_err = 0, n_pred = 0;

  stream_source #(.W(8))  u_sl (.clk, .rst_n, .gaps, .valid(sl_valid), .ready(sl_ready), .data(sl_data));
  stream_source #(.W(11)) u_sv (.clk, .rst_n, .gaps, .valid(sv_valid), .ready(sv_ready), .data(sv_raw));

  region_decoder #(.IMG_W(W), .SEG_LOG2_BUCKET(4)) dut (
    .clk, .rst_n, .sl_valid, .sl_ready, .sl_data, .sv_valid, .sv_ready, .sv_data(seg_t'(sv_raw)),
    .q_bx, .q_new, .q_top, .q_take, .seg_valid, .seg);

  always #5 clk = ~clk;

  c4_stream st;
  int p = 0;  // pixel index over all images
  int x, y, im;
  assign im = p / (W * H);
  assign x  = p % W;
  assign y  = (p / W) % H;
  assign q_bx  = 3'(x / 8);
  assign q_new = (x % 8 == 0) && (y % 8 == 0);
  assign q_top = y < 8;

  bit go;
  always @(posedge clk) go <= $urandom_range(3) != 0;
  assign q_take = rst_n && go && seg_valid && p < 2 * W * H;

  always @(posedge clk) if (q_take) begin
    int want;
    want = st.seg[im * (W / 8) * (H / 8) + (y / 8) * (W / 8) + x / 8];
    checks++;
    if (int'(seg) != want) begin
      failures++;
      if (failures < 10) $display("pixel %0d: seg %h want %h", p, seg, want);
    end
    if (q_new) begin
      if (dut.g_bit) n_err++; else n_pred++;
    end
    p <= p + 1;
  end

  initial begin
    st = new(W, H, 256, 2, 4, 4);
    st.generate_all(10, 60, 30);
    u_sl.q = golomb_encode(st.sel, 4);
    foreach (st.sv[i]) u_sv.q.push_back(11'(st.sv[i]));
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork
      wait (p >= 2 * W * H);
      repeat (40 * W * H) @(posedge clk);
    join_any
    disable fork;
    checks++;
    if (p < 2 * W * H || n_err == 0 || n_pred == 0) begin
      failures++;
      $display("decoded %0d pixels; %0d predicted, %0d transmitted blocks", p, n_pred, n_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
