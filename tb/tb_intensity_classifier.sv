// tb_intensity_classifier - drives random and corner (P, N1, N2) triples and
// compares L, H, delta, the range class and the residual with values worked
// out here from the definitions.
module tb_intensity_classifier;
  import felics_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  pix_t       p, n1, n2, l, h;
  logic [7:0] delta, resid;
  cls_e       cls;
  int checks = 0, failures = 0;
  int n_in = 0, n_below = 0, n_above = 0;

  intensity_classifier dut (.p, .n1, .n2, .l, .h, .delta, .cls, .resid);

  task automatic try(int pp, int a, int b);
    int lo, hi, ecls, eres;
    p = pix_t'(pp); n1 = pix_t'(a); n2 = pix_t'(b);
    #1;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    if (pp < lo)      begin ecls = 1; eres = lo - pp - 1; n_below++; end
    else if (pp > hi) begin ecls = 2; eres = pp - hi - 1; n_above++; end
    else              begin ecls = 0; eres = pp - lo;     n_in++;    end
    checks++;
    if (int'(l) != lo || int'(h) != hi || int'(delta) != hi - lo ||
        int'(cls) != ecls || int'(resid) != eres) begin
      failures++;
      $display("FAIL p=%0d n1=%0d n2=%0d -> l=%0d h=%0d d=%0d cls=%0d res=%0d",
               pp, a, b, l, h, delta, cls, resid);
    end
  endtask

  initial begin
    try(0, 0, 0); try(255, 255, 255); try(0, 255, 0); try(255, 0, 255);
    try(10, 20, 30); try(40, 30, 20); try(25, 30, 20); try(20, 20, 30);
    try(30, 30, 20); try(19, 30, 20); try(31, 20, 30);
    for (int i = 0; i < 100000; i++) begin
      try($urandom_range(255), $urandom_range(255), $urandom_range(255));
      if (i % 1000 == 0) @(posedge clk);
    end
    checks++;
    if (n_in == 0 || n_below == 0 || n_above == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
