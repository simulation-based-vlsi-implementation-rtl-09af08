// tb_prediction_template - streams two random images (the second straight
// after the first, with random gaps in in_valid) through the template and
// checks, for every pixel, the raw flag, the pixel and the unordered pair
// {N1, N2} against the FELICS template worked out here on a 2-D copy of the
// image, and the last flag on the final pair. Runs at IMG_W=6, IMG_H=4 and,
// in a second instance, at the default 10 x 10.
module tb_prediction_template;
  import felics_pkg::*;
  import felics_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  int checks = 0, failures = 0;

  typedef struct { int p; int lo; int hi; bit raw; bit last; } pe_t;

  // one harness per size
  logic  v_a, v_b;
  pix_t  pe_a, po_a, pe_b, po_b;
  tmpl_t e_a, o_a, e_b, o_b;

  prediction_template #(.IMG_W(6), .IMG_H(4)) dut_a (
    .clk, .rst_n, .in_valid(v_a), .in_pix_even(pe_a), .in_pix_odd(po_a),
    .even_o(e_a), .odd_o(o_a));

  prediction_template dut_b (
    .clk, .rst_n, .in_valid(v_b), .in_pix_even(pe_b), .in_pix_odd(po_b),
    .even_o(e_b), .odd_o(o_b));

  pe_t qa[$], qb[$];
  int  raw_seen = 0, last_seen = 0;

  function automatic void expect_image(ref pe_t q[$], input int img[], input int w,
                                       input int h);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        pe_t e;
        int n1, n2;
        bit raw;
        refs(img, w, r, c, n1, n2, raw);
        e.p = img[r * w + c];
        e.raw = raw;
        e.lo = (n1 < n2) ? n1 : n2;
        e.hi = (n1 < n2) ? n2 : n1;
        e.last = (r == h - 1) && (c >= w - 2);
        q.push_back(e);
      end
  endfunction

  function automatic void check_one(ref pe_t q[$], input tmpl_t t, input string tag);
    pe_t e;
    int lo, hi;
    bit ok;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL %s unexpected pixel", tag);
      return;
    end
    e = q.pop_front();
    lo = (t.n1 < t.n2) ? int'(t.n1) : int'(t.n2);
    hi = (t.n1 < t.n2) ? int'(t.n2) : int'(t.n1);
    ok = (int'(t.p) == e.p) && (t.raw == e.raw) && (t.last == e.last) &&
         (e.raw || (lo == e.lo && hi == e.hi));
    if (e.raw) raw_seen++;
    if (e.last) last_seen++;
    if (!ok) begin
      failures++;
      $display("FAIL %s p=%0d/%0d raw=%0d/%0d last=%0d/%0d refs=%0d,%0d exp %0d,%0d",
               tag, t.p, e.p, t.raw, e.raw, t.last, e.last, lo, hi, e.lo, e.hi);
    end
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      if (e_a.valid) begin check_one(qa, e_a, "A even"); check_one(qa, o_a, "A odd"); end
      if (e_b.valid) begin check_one(qb, e_b, "B even"); check_one(qb, o_b, "B odd"); end
    end
  end

  function automatic void make_image(ref int img[], input int w, input int h);
    img = new[w * h];
    foreach (img[i]) img[i] = $urandom_range(255);
  endfunction

  // one task per harness: a task cannot drive module signals through ref
  // arguments with nonblocking assignments
  task automatic feed_a();
    int img[];
    make_image(img, 6, 4);
    expect_image(qa, img, 6, 4);
    for (int i = 0; i < 6 * 4; i += 2) begin
      while ($urandom_range(3) == 0) begin
        @(negedge clk);
        v_a <= 0;
      end
      @(negedge clk);
      v_a  <= 1;
      pe_a <= pix_t'(img[i]);
      po_a <= pix_t'(img[i + 1]);
    end
    @(negedge clk);
    v_a <= 0;
  endtask

  task automatic feed_b();
    int img[];
    make_image(img, 10, 10);
    expect_image(qb, img, 10, 10);
    for (int i = 0; i < 10 * 10; i += 2) begin
      while ($urandom_range(3) == 0) begin
        @(negedge clk);
        v_b <= 0;
      end
      @(negedge clk);
      v_b  <= 1;
      pe_b <= pix_t'(img[i]);
      po_b <= pix_t'(img[i + 1]);
    end
    @(negedge clk);
    v_b <= 0;
  endtask

  initial begin
    rst_n = 0; v_a = 0; v_b = 0; pe_a = 0; po_a = 0; pe_b = 0; po_b = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork
      begin
        feed_a();
        feed_a();
      end
      begin
        feed_b();
        feed_b();
      end
    join
    repeat (3) @(posedge clk);
    checks++;
    if (qa.size() != 0 || qb.size() != 0) failures++;
    checks++;
    if (raw_seen != 8 || last_seen != 8) begin
      failures++;
      $display("FAIL raw_seen=%0d last_seen=%0d", raw_seen, last_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
