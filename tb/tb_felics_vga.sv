// tb_felics_vga - codes one 640 x 480 grey image, the size of the source
// image before it is reduced to 10 x 10, with the encoder built for that
// row length. The image is a smooth gradient with noise and a few sharp
// edges, generated here. The stream is decoded with the reference decoder
// and compared pixel for pixel; the whole image must leave the encoder within
// 640*480/2 + 5 clocks of its first pixel pair.
module tb_felics_vga;
  import felics_pkg::*;
  import felics_ref_pkg::*;

  localparam int W = 640, H = 480, OUT_W = 64;

  logic clk = 0;
  always #5 clk = ~clk;

  logic             rst_n, in_valid;
  pix_t             in_pix_even, in_pix_odd;
  logic             out_valid, out_last;
  logic [OUT_W-1:0] out_word;
  logic [6:0]       out_nbits;
  lane_out_t        dbg_even, dbg_odd;

  felics_top #(.IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst_n, .in_valid, .in_pix_even, .in_pix_odd,
    .out_valid, .out_word, .out_nbits, .out_last, .dbg_even, .dbg_odd);

  int checks = 0, failures = 0;
  int cyc = 0, start_cyc = 0, end_cyc = -1;
  int img[];
  bitq_t stream;

  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      for (int i = 0; i < int'(out_nbits); i++) stream.push_back(out_word[OUT_W - 1 - i]);
      if (out_last) end_cyc = cyc;
    end
  end

  initial begin
    int got[];
    int pos = 0;
    bit ok;
    img = new[W * H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        automatic int v = (c / 3 + r / 2) % 256 + $urandom_range(4) - 2;
        if ((c / 80 + r / 60) % 5 == 0) v = 255 - v;   // sharp edges
        img[r * W + c] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    rst_n = 0; in_valid = 0; in_pix_even = 0; in_pix_odd = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < W * H; i += 2) begin
      @(negedge clk);
      if (i == 0) start_cyc = cyc;
      in_valid    <= 1;
      in_pix_even <= pix_t'(img[i]);
      in_pix_odd  <= pix_t'(img[i + 1]);
    end
    @(negedge clk);
    in_valid <= 0;
    repeat (10) @(posedge clk);

    checks++;
    if (end_cyc < 0) begin
      failures++;
      $display("FAIL image never finished");
    end else begin
      ok = decode_image(stream, pos, W, H, got) && (pos == stream.size());
      for (int i = 0; i < W * H && ok; i++) if (got[i] != img[i]) ok = 0;
      if (!ok) begin
        failures++;
        $display("FAIL image does not decode back");
      end
      $display("640x480: %0d bits for %0d pixels (%0d.%02d bits per pixel), %0d clocks",
               stream.size(), W * H, stream.size() / (W * H),
               (stream.size() * 100 / (W * H)) % 100, end_cyc - start_cyc);
      checks++;
      if (end_cyc - start_cyc > W * H / 2 + 5) begin
        failures++;
        $display("FAIL took %0d clocks", end_cyc - start_cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (W * H / 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
