// tb_golomb_rice_coder - exhaustive over the residual v (0..255) and k
// (0..7): the codeword is compared bit by bit with one built here by
// appending q ones, a zero and k low bits (or 16 ones and 8 bits of v when
// the quotient reaches 16).
module tb_golomb_rice_coder;
  import felics_pkg::*;
  import felics_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]       v;
  logic [2:0]       k;
  logic [CW_W-1:0]  code;
  logic [LEN_W-1:0] len;
  int checks = 0, failures = 0, escapes = 0;

  golomb_rice_coder dut (.v, .k, .code, .len);

  initial begin
    for (int kk = 0; kk < 8; kk++) begin
      for (int vv = 0; vv < 256; vv++) begin
        automatic bitq_t q = {};
        automatic bit ok;
        v = 8'(vv); k = 3'(kk);
        #1;
        gr_bits(q, vv, kk);
        if ((vv >> kk) >= QLIM) escapes++;
        ok = (int'(len) == q.size());
        for (int i = 0; i < q.size() && ok; i++)
          if (code[q.size() - 1 - i] != q[i]) ok = 0;
        if (ok && len < CW_W && (code >> len) != 0) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL v=%0d k=%0d code=%b len=%0d ref len=%0d", vv, kk, code, len, q.size());
        end
      end
      @(posedge clk);
    end
    // a small example by hand: v=5, k=1 -> q=2 -> 110 1
    v = 8'd5; k = 3'd1;
    #1;
    checks++;
    if (len != 6'd4 || code != 32'b1101) failures++;
    checks++;
    if (escapes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
