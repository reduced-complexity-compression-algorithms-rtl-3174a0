// Reference encoder for the decoder testbenches.
//
// Produces test images together with every compressed stream the decoders
// take, written independently of the decoder RTL: it generates a random
// block segmentation (predict / copy-left / copy-above) and a layout-like
// image that follows it with sprinkled errors, then computes the pixel error
// map and error values, the segmentation error map and values, and codes
// them: Golomb run-length code, hierarchical combinatorial code (tokens per
// level), canonical Huffman code. Code ranks are found by counting smaller
// words of equal weight, code tables by the textbook canonical assignment.
package c4_enc_pkg;

  typedef bit [7:0] byte_q_t[$];
  typedef int       int_q_t[$];

  // ---------------- bit packing ----------------
  function automatic byte_q_t pack_bits(ref bit bits[$]);
    byte_q_t q;
    bit [7:0] w;
    int n;
    n = 0; w = 0;
    foreach (bits[i]) begin
      w = {w[6:0], bits[i]};
      n++;
      if (n == 8) begin q.push_back(w); n = 0; w = 0; end
    end
    if (n != 0) q.push_back(w << (8 - n));
    q.push_back(8'h00);  // slack so decoders never starve at the very end
    q.push_back(8'h00);
    return q;
  endfunction

  // ---------------- Golomb run-length code ----------------
  // "0" = 2**lb zeros; "1" + n (lb bits, MSB first) = n zeros then a one.
  function automatic byte_q_t golomb_encode(ref bit src[$], input int lb);
    bit out[$];
    int b, run;
    b = 1 << lb;
    run = 0;
    foreach (src[i]) begin
      if (src[i]) begin
        out.push_back(1'b1);
        for (int j = lb - 1; j >= 0; j--) out.push_back(run[j]);
        run = 0;
      end else begin
        run++;
        if (run == b) begin out.push_back(1'b0); run = 0; end
      end
    end
    if (run != 0) out.push_back(1'b0);
    return pack_bits(out);
  endfunction

  // ---------------- combinatorial code ----------------
  function automatic int popcount8(bit [7:0] w);
    int c = 0;
    for (int i = 0; i < 8; i++) c += w[i];
    return c;
  endfunction

  // rank = number of 8-bit words with the same number of ones that are smaller
  function automatic int cc_rank(bit [7:0] w);
    int r = 0;
    for (int v = 0; v < int'(w); v++) if (popcount8(8'(v)) == popcount8(w)) r++;
    return r;
  endfunction

  // Three-level HCC, H = 8. src length is padded to a multiple of 512.
  // tok[l] holds {k[3:0], rank[6:0]} tokens of level l (0 = lowest).
  function automatic void hcc_encode(ref bit src[$], ref bit [10:0] tok[3][$]);
    bit lvl[$];
    bit up[$];
    for (int l = 0; l < 3; l++) tok[l].delete();
    lvl = src;
    while (lvl.size() % 512 != 0) lvl.push_back(1'b0);
    for (int l = 0; l < 3; l++) begin
      up.delete();
      for (int i = 0; i < lvl.size(); i += 8) begin
        bit [7:0] w;
        for (int j = 0; j < 8; j++) w[7-j] = lvl[i+j];
        up.push_back(w != 0);
        if (l == 2 || w != 0) tok[l].push_back({4'(popcount8(w)), 7'(cc_rank(w))});
      end
      lvl = up;
    end
  endfunction

  // ---------------- canonical Huffman ----------------
  class huff_code;
    int count[13];      // codewords per length
    int symbol[32];     // symbols in canonical order
    int len_of[32];
    int code_of[32];

    // Complete code: 4 of length 3, 4 of 4, 8 of 6, 16 of 7; random symbols.
    function new();
      int perm[32];
      int n, code;
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      foreach (count[i]) count[i] = 0;
      count[3] = 4; count[4] = 4; count[6] = 8; count[7] = 16;
      foreach (symbol[i]) symbol[i] = perm[i];
      n = 0; code = 0;
      for (int l = 1; l <= 12; l++) begin
        for (int i = 0; i < count[l]; i++) begin
          len_of[symbol[n]]  = l;
          code_of[symbol[n]] = code;
          code++; n++;
        end
        code = code << 1;
      end
    endfunction

    function automatic byte_q_t encode(ref int vals[$]);
      bit out[$];
      foreach (vals[i])
        for (int j = len_of[vals[i]] - 1; j >= 0; j--) out.push_back(code_of[vals[i]][j]);
      return pack_bits(out);
    endfunction
  endclass

  // ---------------- image and segmentation ----------------
  class c4_stream;
    int W, H, DEPTH, NIMG, LOG2B, SEG_LOG2B;
    int img[$];      // all images, raster order
    int seg[$];      // {dir, d[9:0]} per block, all images
    bit el[$];       // pixel error map
    int ev[$];       // error values
    bit sel[$];      // segmentation error map
    int sv[$];       // segmentation error values
    // statistics
    int n_copy_left, n_copy_above, n_copy_left1, n_pred_blocks;

    function new(int w, int h, int depth, int nimg, int log2b, int seg_log2b);
      W = w; H = h; DEPTH = depth; NIMG = nimg; LOG2B = log2b; SEG_LOG2B = seg_log2b;
    endfunction

    static function int lp(int a, int b, int c);
      int s = a + b - c;
      if (s < 0) return 0;
      if (s > 31) return 31;
      return s;
    endfunction

    static function int seg_pred(int a, int b, int c);
      return (c == a) ? b : c;
    endfunction

    // Guess for pixel (x, y) of image base from the already known pixels.
    function int guess(int base, int x, int y);
      int s, d, off, p;
      int l, a, u;
      p = base + y * W + x;
      s = seg[(base / (W * H)) * (W / 8) * (H / 8) + (y / 8) * (W / 8) + x / 8];
      d = s & 1023;
      if (d != 0) begin
        off = (s >> 10) ? d * W : d;
        return img[p - off];
      end
      l = (x > 0) ? img[p - 1] : 0;
      u = (y > 0) ? img[p - W] : 0;
      a = (x > 0 && y > 0) ? img[p - W - 1] : 0;
      return lp(l, u, a);
    endfunction

    // perr: error probability in percent (predict blocks); pcopy: share of copy blocks
    function void generate_all(int perr, int pcopy, int pchange);
      int nbx, nby;
      nbx = W / 8; nby = H / 8;
      img.delete(); seg.delete(); el.delete(); ev.delete(); sel.delete(); sv.delete();
      n_copy_left = 0; n_copy_above = 0; n_copy_left1 = 0; n_pred_blocks = 0;
      for (int im = 0; im < NIMG; im++) begin
        int sbase = seg.size();
        // segmentation: mostly continue the neighbours, sometimes pick anew
        for (int by = 0; by < nby; by++)
          for (int bx = 0; bx < nbx; bx++) begin
            int a, b, c, z, v, pmin;
            a = (by > 0 && bx > 0) ? seg[sbase + (by - 1) * nbx + bx - 1] : 0;
            b = (by > 0) ? seg[sbase + (by - 1) * nbx + bx] : 0;
            c = (bx > 0) ? seg[sbase + by * nbx + bx - 1] : 0;
            z = seg_pred(a, b, c);
            v = z;
            pmin = by * 8 * W + bx * 8;
            if ($urandom_range(99) < pchange) begin
              int r = $urandom_range(99);
              if (r >= pcopy) v = 0;
              else if (r < pcopy / 2 && by > 0) begin
                int dmax = (DEPTH - 1) / W;
                if (dmax > by * 8) dmax = by * 8;
                if (dmax > 1023) dmax = 1023;
                v = (1 << 10) | $urandom_range(dmax, 1);
              end else begin
                int dmax = DEPTH - 1;
                if (dmax > 1023) dmax = 1023;
                if (dmax > pmin) dmax = pmin;
                if (dmax >= 1) v = ($urandom_range(3) == 0) ? 1 : $urandom_range(dmax, 1);
                else v = 0;
              end
            end
            // a continued copy must still be legal here
            if ((v & 1023) != 0) begin
              int d = v & 1023;
              if ((v >> 10) && (d * W >= DEPTH || d > by * 8)) v = 0;
              if (!(v >> 10) && (d >= DEPTH || d > pmin)) v = 0;
            end
            seg.push_back(v);
            sel.push_back(v != z);
            if (v != z) sv.push_back(v);
            if ((v & 1023) == 0) n_pred_blocks++;
            else if (v >> 10) n_copy_above++;
            else begin n_copy_left++; if ((v & 1023) == 1) n_copy_left1++; end
          end
        // pixels
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            int g, v, s, pe;
            int base = im * W * H;
            img.push_back(0);
            g = guess(base, x, y);
            s = seg[im * nbx * nby + (y / 8) * nbx + x / 8];
            pe = ((s & 1023) == 0) ? perr : perr / 4;
            v = g;
            if ($urandom_range(99) < pe) v = ($urandom_range(3) == 0) ? $urandom_range(31) : (($urandom_range(1) == 0) ? 0 : 31);
            img[base + y * W + x] = v;
            el.push_back(v != g);
            if (v != g) ev.push_back(v);
          end
      end
    endfunction
  endclass

endpackage
