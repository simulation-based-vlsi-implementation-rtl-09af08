// tb_abc_codeword_gen - checks codeword generation. First the paper's
// Table I (delta = 4, rotated samples 4,0,1,2,3 for P-L = 0..4 must give
// 111, 00, 01, 10, 110). Then, for every delta and every rotated sample,
// that short codes have lower_bound bits and long ones upper_bound bits, and
// that every codeword decodes back to its sample and no codeword is a prefix
// of another.
module tb_abc_codeword_gen;
  import felics_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] r, code;
  logic [8:0] thr;
  logic [3:0] ub, lb, len;
  int checks = 0, failures = 0;

  abc_codeword_gen dut (.r, .thr, .ub, .lb, .code, .len);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s r=%0d thr=%0d ub=%0d lb=%0d code=%b len=%0d",
               what, r, thr, ub, lb, code, len);
    end
  endtask

  initial begin
    // Table I: sample P-L 0..4 rotates to 4,0,1,2,3
    int rot[5]   = '{4, 0, 1, 2, 3};
    int tcode[5] = '{3'b111, 2'b00, 2'b01, 2'b10, 3'b110};
    int tlen[5]  = '{3, 2, 2, 2, 3};
    for (int i = 0; i < 5; i++) begin
      r = 8'(rot[i]); thr = 9'd3; ub = 4'd3; lb = 4'd2;
      #1;
      check(int'(code) == tcode[i] && int'(len) == tlen[i], "Table I");
    end

    for (int d = 0; d < 256; d++) begin
      automatic int rng  = d + 1;
      automatic int eub  = ceil_log2(rng);
      automatic int elb  = floor_log2(rng);
      automatic int ethr = (1 << eub) - rng;
      automatic int cds[$], lns[$];
      for (int ri = 0; ri < rng; ri++) begin
        int t, back;
        r = 8'(ri); thr = 9'(ethr); ub = 4'(eub); lb = 4'(elb);
        #1;
        check(int'(len) == ((ri < ethr) ? elb : eub), "length");
        check(len == 0 || (int'(code) >> int'(len)) == 0, "code fits length");
        // decode: lb bits first, one more if they are not below thr
        t = (len == lb) ? int'(code) : (int'(code) >> 1);
        if (eub == elb || t < ethr) back = t;
        else back = int'(code) - ethr;
        check(back == ri, "decodes back");
        cds.push_back(int'(code));
        lns.push_back(int'(len));
      end
      for (int a = 0; a < cds.size(); a++)
        for (int b = 0; b < cds.size(); b++)
          if (a != b && lns[a] <= lns[b]) begin
            checks++;
            if ((cds[b] >> (lns[b] - lns[a])) == cds[a]) begin
              failures++;
              $display("FAIL prefix delta=%0d", d);
            end
          end
      if (d % 16 == 0) @(posedge clk);
    end
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
