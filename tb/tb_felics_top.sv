// tb_felics_top - end-to-end test of the FELICS encoder at its default size
// (10 x 10 pixels, 64-bit output words).
//
// Sends a sequence of images through the encoder: the 10 x 10 test image of
// the paper's pixel-value figure, then random, flat, smooth and
// high-contrast images, some back to back and some with gaps in in_valid.
// The output words are collected into a bit stream, each image is decoded
// with the reference decoder (felics_ref_pkg) and compared pixel for pixel
// with what was sent, so the test proves the code is lossless and decodable.
//
// It also counts how often each mechanism of the design happens and fails if
// one never does: raw first pixels, in-range adjusted binary codes (long and
// short ones, zero-length ones for delta = 0), below- and above-range
// Golomb-Rice codes, the Golomb-Rice escape, an image whose end needs a
// second output word, and a final word sent while the next image already
// streams. Back-to-back images must finish within pairs + 5 clocks of their
// first pair (two pixels per clock, four pipeline stages).
module tb_felics_top;
  import felics_pkg::*;
  import felics_ref_pkg::*;

  localparam int W = 10, H = 10, OUT_W = 64;

  logic clk = 0;
  always #5 clk = ~clk;

  logic             rst_n, in_valid;
  pix_t             in_pix_even, in_pix_odd;
  logic             out_valid, out_last;
  logic [OUT_W-1:0] out_word;
  logic [6:0]       out_nbits;
  lane_out_t        dbg_even, dbg_odd;

  felics_top dut (
    .clk, .rst_n, .in_valid, .in_pix_even, .in_pix_odd,
    .out_valid, .out_word, .out_nbits, .out_last, .dbg_even, .dbg_odd);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- test images ----------------
  // Pixel values printed in the paper's 10 x 10 test image, row by row.
  localparam int FIG_IMG[100] = '{
     63,  66, 108, 151, 148, 127, 109,  79,  91, 114,
     48,  52, 101, 141, 147, 139, 129, 115, 134, 137,
     41,  55,  69, 100, 101, 119, 121, 111, 125, 135,
     81,  99,  68, 105, 126, 125,  83,  81,  77, 113,
    162, 149,  99, 100, 111,  91,  63,  56,  54, 115,
    176, 189, 158, 109, 116,  88,  58,  60,  99, 159,
    100, 137, 150, 100, 120, 118, 122,  97, 153, 181,
     62,  85, 127,  60, 102, 132, 149, 149, 151, 163,
     68,  33,  73, 111,  63,  83, 134, 134, 110, 127,
     49,  54,  94, 103, 126,  94,  73,  72,  88, 128};

  typedef struct {
    int img[];
    int start_cyc;
    bit gapless;
  } sent_t;
  sent_t sent[$];

  function automatic void make_image(ref int img[], input int kind);
    img = new[W * H];
    for (int i = 0; i < W * H; i++) begin
      case (kind)
        0: img[i] = FIG_IMG[i];
        1: img[i] = $urandom_range(255);
        2: img[i] = 77;                                       // flat
        3: img[i] = (i % W) * 8 + (i / W) * 3 + $urandom_range(2);  // smooth ramp
        4: img[i] = ($urandom_range(1) != 0) ? $urandom_range(250, 255)
                                              : $urandom_range(0, 5);  // high contrast
        default: img[i] = 128 + ((i % 2 == 0) ? 0 : 1) * $urandom_range(3); // near flat
      endcase
    end
  endfunction

  task automatic send_image(input int kind, input bit gaps);
    sent_t s;
    make_image(s.img, kind);
    s.gapless = !gaps;
    for (int i = 0; i < W * H; i += 2) begin
      if (gaps) begin
        while ($urandom_range(3) == 0) begin
          @(negedge clk);
          in_valid <= 0;
        end
      end
      @(negedge clk);
      if (i == 0) begin
        s.start_cyc = cyc;
        sent.push_back(s);
      end
      in_valid    <= 1;
      in_pix_even <= pix_t'(s.img[i]);
      in_pix_odd  <= pix_t'(s.img[i + 1]);
    end
  endtask

  // ---------------- output side ----------------
  bitq_t stream;
  int n_images = 0, n_two_word_end = 0, n_busy_flush = 0;
  bit prev_full_word = 0;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      for (int i = 0; i < int'(out_nbits); i++) stream.push_back(out_word[OUT_W - 1 - i]);
      if (out_last) begin
        automatic sent_t s;
        automatic int got[];
        automatic int pos = 0;
        automatic bit ok;
        if (prev_full_word) n_two_word_end++;
        if (dbg_even.valid && prev_full_word) n_busy_flush++;
        checks++;
        if (sent.size() == 0) begin
          failures++;
          $display("FAIL image end with nothing sent");
        end else begin
          s = sent.pop_front();
          ok = decode_image(stream, pos, W, H, got) && (pos == stream.size());
          for (int i = 0; i < W * H && ok; i++) if (got[i] != s.img[i]) ok = 0;
          if (!ok) begin
            failures++;
            $display("FAIL image %0d does not decode back (%0d of %0d bits used)",
                     n_images, pos, stream.size());
          end
          if (n_images == 0)
            $display("paper test image: %0d bits for %0d pixels (%0d bits raw)",
                     stream.size(), W * H, 8 * W * H);
          checks++;
          if (s.gapless && cyc - s.start_cyc > W * H / 2 + 5) begin
            failures++;
            $display("FAIL image %0d took %0d clocks", n_images, cyc - s.start_cyc);
          end
        end
        n_images++;
        stream.delete();
      end
      prev_full_word = !out_last;
    end else begin
      prev_full_word = 0;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_cls[4] = '{default: 0};
  int n_escape = 0, n_zero_len = 0, n_abc_long = 0, n_abc_short = 0;

  function automatic void count_lane(lane_out_t l);
    if (!l.valid) return;
    n_cls[int'(l.cls)]++;
    if ((l.cls == CLS_BELOW || l.cls == CLS_ABOVE) && int'(l.cw.len) == 2 + GR_QLIM + 8 &&
        l.cw.bits[8 + GR_QLIM - 1 -: GR_QLIM] == '1)
      n_escape++;
    if (l.cls == CLS_IN && l.cw.len == 6'd1) n_zero_len++;
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      count_lane(dbg_even);
      count_lane(dbg_odd);
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    rst_n = 0; in_valid = 0; in_pix_even = 0; in_pix_odd = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    send_image(0, 0);                     // the paper's test image
    for (int n = 0; n < 30; n++) send_image(n % 6, (n % 4) == 3);
    @(negedge clk);
    in_valid <= 0;
    repeat (10) @(posedge clk);

    checks++;
    if (sent.size() != 0 || n_images != 31) begin
      failures++;
      $display("FAIL %0d images finished, %0d outstanding", n_images, sent.size());
    end
    $display("raw %0d, in range %0d, below %0d, above %0d, escapes %0d, zero-length %0d",
             n_cls[3], n_cls[0], n_cls[1], n_cls[2], n_escape, n_zero_len);
    $display("images %0d, two-word ends %0d, flushes overlapping the next image %0d",
             n_images, n_two_word_end, n_busy_flush);
    foreach (n_cls[c]) begin
      checks++;
      if (n_cls[c] == 0) begin failures++; $display("FAIL class %0d never happened", c); end
    end
    checks++;
    if (n_escape == 0)       begin failures++; $display("FAIL no escape");            end
    checks++;
    if (n_zero_len == 0)     begin failures++; $display("FAIL no zero-length code");  end
    checks++;
    if (n_two_word_end == 0) begin failures++; $display("FAIL no two-word end");      end
    checks++;
    if (n_busy_flush == 0)   begin failures++; $display("FAIL no overlapping flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
