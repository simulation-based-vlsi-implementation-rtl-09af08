// tb_coding_engine - feeds one coding engine with random pixels and
// reference pixels (raw ones included, some in-range with delta = 0, some
// far outside the range to reach the Golomb-Rice escape) and compares each
// codeword, its length and range class with the reference encoder. Also
// checks the two-clock latency and the last flag.
module tb_coding_engine;
  import felics_pkg::*;
  import felics_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic      rst_n;
  tmpl_t     in;
  lane_out_t out;
  int checks = 0, failures = 0;
  int cnt_cls[4] = '{default: 0};
  int cnt_escape = 0, cnt_zero = 0;
  int cyc = 0;

  typedef struct {
    int   cyc;
    int   cls;
    bit   last;
    bitq_t bits;
  } exp_t;
  exp_t expq[$];

  coding_engine dut (.clk, .rst_n, .in, .out);

  always @(posedge clk) cyc++;

  // compare outputs, half a clock after they change
  always @(negedge clk) begin
    if (rst_n && out.valid) begin
      automatic exp_t e;
      automatic bit ok;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = expq.pop_front();
        ok = (int'(out.cw.len) == e.bits.size()) && (int'(out.cls) == e.cls) &&
             (out.last == e.last) && (cyc - e.cyc == 2);
        for (int i = 0; i < e.bits.size() && ok; i++)
          if (out.cw.bits[e.bits.size() - 1 - i] != e.bits[i]) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL cyc=%0d exp cyc %0d cls=%0d/%0d len=%0d/%0d bits=%b",
                   cyc, e.cyc, out.cls, e.cls, out.cw.len, e.bits.size(), out.cw.bits);
        end
      end
    end
  end

  initial begin
    rst_n = 0;
    in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 20000; i++) begin
      automatic tmpl_t t;
      automatic exp_t e;
      automatic int mode = $urandom_range(9);
      t.valid = ($urandom_range(7) != 0);
      t.raw   = (mode == 0);
      t.last  = ($urandom_range(15) == 0);
      t.p     = pix_t'($urandom_range(255));
      t.n1    = pix_t'($urandom_range(255));
      t.n2    = (mode == 1) ? t.n1 : pix_t'($urandom_range(255));
      if (mode == 2) begin
        // far from a narrow range: long Golomb-Rice codes
        t.n1 = pix_t'($urandom_range(250, 255));
        t.n2 = t.n1;
        t.p  = pix_t'($urandom_range(0, 100));
      end
      @(negedge clk);
      in <= t;
      if (t.valid) begin
        automatic int lo = (t.n1 < t.n2) ? int'(t.n1) : int'(t.n2);
        automatic int hi = (t.n1 < t.n2) ? int'(t.n2) : int'(t.n1);
        e.cyc  = cyc;
        e.last = t.last;
        e.cls  = encode(e.bits, int'(t.p), int'(t.n1), int'(t.n2), t.raw);
        cnt_cls[e.cls]++;
        if (e.cls == 1 && ((lo - int'(t.p) - 1) >> kof(hi - lo)) >= QLIM) cnt_escape++;
        if (e.cls == 0 && hi == lo) cnt_zero++;
        expq.push_back(e);
      end
    end
    @(negedge clk);
    in <= '0;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d codewords never came out", expq.size());
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (cnt_cls[c] == 0) begin failures++; $display("FAIL class %0d never seen", c); end
    end
    checks++;
    if (cnt_escape == 0 || cnt_zero == 0) failures++;
    $display("classes in/below/above/raw = %0d/%0d/%0d/%0d escapes=%0d zero-length=%0d",
             cnt_cls[0], cnt_cls[1], cnt_cls[2], cnt_cls[3], cnt_escape, cnt_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
