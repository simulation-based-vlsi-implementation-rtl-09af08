// tb_bitstream_generator - sends random codeword pairs (lengths 0..26, random
// gaps in valid, random image ends) and rebuilds the stream from the output
// words, MSB first, out_nbits bits each. Every image's bits must come out in
// order and end with a word flagged out_last. Counts the ways an image can
// end: remainder in the same clock, full word plus remainder next clock,
// remainder exactly one word, and a flush clock that also takes new
// codewords.
module tb_bitstream_generator;
  import felics_pkg::*;
  import felics_ref_pkg::*;

  localparam int OUT_W = 64;

  logic clk = 0;
  always #5 clk = ~clk;

  logic             rst_n;
  lane_out_t        ev, od;
  logic             out_valid, out_last;
  logic [OUT_W-1:0] out_word;
  logic [6:0]       out_nbits;
  int checks = 0, failures = 0;
  int n_end_same = 0, n_end_next = 0, n_end_exact = 0, n_flush_busy = 0, n_full = 0;

  bitstream_generator dut (
    .clk, .rst_n, .even_i(ev), .odd_i(od),
    .out_valid, .out_word, .out_nbits, .out_last);

  bitq_t images[$];     // expected bits of each finished image
  bitq_t cur_exp;       // expected bits of the image being sent
  bitq_t got;           // bits received for the current image
  int    pending = 0;   // reference count of bits waiting in the generator
  bit    flush_next = 0;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (int'(out_nbits) == OUT_W) n_full++;
      for (int i = 0; i < int'(out_nbits); i++) got.push_back(out_word[OUT_W - 1 - i]);
      checks++;
      if (out_nbits > OUT_W || (!out_last && int'(out_nbits) != OUT_W)) begin
        failures++;
        $display("FAIL bad out_nbits %0d", out_nbits);
      end
      if (out_last) begin
        automatic bitq_t e;
        checks++;
        if (images.size() == 0) begin
          failures++;
          $display("FAIL out_last with no finished image");
        end else begin
          e = images.pop_front();
          if (e != got) begin
            failures++;
            $display("FAIL image stream mismatch: %0d bits expected, %0d received",
                     e.size(), got.size());
          end
        end
        got.delete();
      end
    end
  end

  function automatic cw_t rand_cw(ref bitq_t q);
    cw_t c;
    int n = $urandom_range(26);
    if ($urandom_range(3) == 0) n = $urandom_range(3);
    c.len  = LEN_W'(n);
    c.bits = '0;
    for (int i = 0; i < n; i++) begin
      bit b = bit'($urandom_range(1));
      c.bits = (c.bits << 1) | CW_W'(b);
      q.push_back(b);
    end
    return c;
  endfunction

  initial begin
    rst_n = 0; ev = '0; od = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 20000; i++) begin
      automatic lane_out_t e = '0, o = '0;
      @(negedge clk);
      if ($urandom_range(4) != 0) begin
        automatic int prev_bits = pending;
        automatic int total;
        e.valid = 1; o.valid = 1;
        e.cw = rand_cw(cur_exp);
        o.cw = rand_cw(cur_exp);
        o.last = ($urandom_range(9) == 0);
        e.last = o.last;
        if (flush_next) begin
          n_flush_busy++;
          prev_bits = 0;
        end
        total = prev_bits + int'(e.cw.len) + int'(o.cw.len);
        flush_next = 0;
        if (o.last) begin
          images.push_back(cur_exp);
          cur_exp.delete();
          if (total < OUT_W) n_end_same++;
          else if (total == OUT_W) n_end_exact++;
          else begin n_end_next++; flush_next = 1; end
          pending = flush_next ? total - OUT_W : 0;
        end else begin
          pending = (total >= OUT_W) ? total - OUT_W : total;
        end
      end else if (flush_next) begin
        flush_next = 0;
        pending = 0;
      end
      ev <= e;
      od <= o;
    end
    @(negedge clk);
    ev <= '0; od <= '0;
    repeat (4) @(posedge clk);
    checks++;
    if (images.size() != 0) begin
      failures++;
      $display("FAIL %0d images never finished", images.size());
    end
    $display("ends: same clock %0d, next clock %0d, exact %0d; busy flushes %0d; full words %0d",
             n_end_same, n_end_next, n_end_exact, n_flush_busy, n_full);
    checks++;
    if (n_end_same == 0 || n_end_next == 0 || n_flush_busy == 0 || n_full == 0) begin
      failures++;
      $display("FAIL an ending case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
