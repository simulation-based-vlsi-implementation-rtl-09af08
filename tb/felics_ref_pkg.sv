// felics_ref_pkg - reference model of the FELICS encoder for the testbenches.
//
// Written independently of the RTL, bit by bit: codewords are built by
// appending single bits to a bit queue, and a decoder reads a stream back to
// pixels. Same coding rules as the RTL:
//   raw : 8 bits of the pixel;  in range : '0' + adjusted binary code of P-L;
//   below : '10' + Golomb-Rice(L-P-1);  above : '11' + Golomb-Rice(P-H-1).
// Adjusted binary code: range = delta+1, ub = ceil(log2 range),
// lb = floor(log2 range), thr = 2^ub - range, shift = (range-thr)/2,
// r = (x - shift) mod range, code r in lb bits if r < thr else r+thr in ub.
// Golomb-Rice: k = max(floor(log2(delta+1)) - 1, 0); q = v >> k ones, a 0,
// k low bits; q >= 16 becomes 16 ones and the 8-bit v.
package felics_ref_pkg;

  typedef bit bitq_t[$];

  localparam int QLIM = 16;

  function automatic int ceil_log2(int n);
    int b = 0;
    while ((1 << b) < n) b++;
    return b;
  endfunction

  function automatic int floor_log2(int n);
    int b = 0;
    while ((1 << (b + 1)) <= n) b++;
    return b;
  endfunction

  function automatic void put_bits(ref bitq_t q, input int value, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(bit'((value >> i) & 1));
  endfunction

  function automatic int kof(int delta);
    int k = floor_log2(delta + 1) - 1;
    return (k < 0) ? 0 : k;
  endfunction

  function automatic void abc_bits(ref bitq_t q, input int x, input int delta);
    int range = delta + 1;
    int ub    = ceil_log2(range);
    int lb    = floor_log2(range);
    int thr   = (1 << ub) - range;
    int shift = (range - thr) / 2;
    int r     = (x - shift + range) % range;
    if (r < thr) put_bits(q, r, lb);
    else         put_bits(q, r + thr, ub);
  endfunction

  function automatic void gr_bits(ref bitq_t q, input int v, input int k);
    int quo = v >> k;
    if (quo >= QLIM) begin
      repeat (QLIM) q.push_back(1'b1);
      put_bits(q, v, 8);
    end else begin
      repeat (quo) q.push_back(1'b1);
      q.push_back(1'b0);
      put_bits(q, v, k);
    end
  endfunction

  // Class codes match felics_pkg::cls_e: 0 in, 1 below, 2 above, 3 raw.
  function automatic int encode(ref bitq_t q, input int p, input int n1,
                                input int n2, input bit raw);
    int lo = (n1 < n2) ? n1 : n2;
    int hi = (n1 < n2) ? n2 : n1;
    if (raw) begin
      put_bits(q, p, 8);
      return 3;
    end
    if (p < lo) begin
      q.push_back(1'b1); q.push_back(1'b0);
      gr_bits(q, lo - p - 1, kof(hi - lo));
      return 1;
    end
    if (p > hi) begin
      q.push_back(1'b1); q.push_back(1'b1);
      gr_bits(q, p - hi - 1, kof(hi - lo));
      return 2;
    end
    q.push_back(1'b0);
    abc_bits(q, p - lo, hi - lo);
    return 0;
  endfunction

  // Reference pixels of column c, row r in a W-wide image (raster order).
  function automatic void refs(input int img[], input int w, input int r,
                               input int c, output int n1, output int n2,
                               output bit raw);
    raw = 0; n1 = 0; n2 = 0;
    if (r == 0 && c < 2) raw = 1;
    else if (r == 0) begin n1 = img[c - 1]; n2 = img[c - 2]; end
    else if (c == 0) begin n1 = img[(r - 1) * w]; n2 = img[(r - 1) * w + 1]; end
    else begin n1 = img[r * w + c - 1]; n2 = img[(r - 1) * w + c]; end
  endfunction

  function automatic int get_bits(ref bitq_t q, ref int pos, input int n);
    int v = 0;
    for (int i = 0; i < n; i++) begin
      v = (v << 1) | int'(q[pos]);
      pos++;
    end
    return v;
  endfunction

  // Decode a whole W x H image from q starting at pos. Returns 0 when the
  // stream runs out early.
  function automatic bit decode_image(ref bitq_t q, ref int pos, input int w,
                                      input int h, ref int img[]);
    img = new[w * h];
    for (int r = 0; r < h; r++) begin
      for (int c = 0; c < w; c++) begin
        int n1, n2, lo, hi, delta, v, p;
        bit raw;
        if (pos >= q.size()) return 0;
        refs(img, w, r, c, n1, n2, raw);
        lo = (n1 < n2) ? n1 : n2;
        hi = (n1 < n2) ? n2 : n1;
        delta = hi - lo;
        if (raw) p = get_bits(q, pos, 8);
        else if (get_bits(q, pos, 1) == 0) begin
          int range = delta + 1;
          int ub    = ceil_log2(range);
          int lb    = floor_log2(range);
          int thr   = (1 << ub) - range;
          int shift = (range - thr) / 2;
          int t     = get_bits(q, pos, lb);
          int rr;
          if (ub == lb || t < thr) rr = t;
          else rr = ((t << 1) | get_bits(q, pos, 1)) - thr;
          p = lo + (rr + shift) % range;
        end else begin
          bit above = bit'(get_bits(q, pos, 1));
          int k = kof(delta);
          int ones = 0;
          while (ones < QLIM && get_bits(q, pos, 1) == 1) ones++;
          if (ones == QLIM) v = get_bits(q, pos, 8);
          else v = (ones << k) | get_bits(q, pos, k);
          p = above ? hi + v + 1 : lo - v - 1;
        end
        img[r * w + c] = p;
      end
    end
    return 1;
  endfunction

endpackage
