// tb_abc_param - exhaustive check of the adjusted-binary parameter
// computation over all 256 values of delta, against integer log2 loops, plus
// the paper's worked example (delta = 4: lower bound 2, upper bound 3).
module tb_abc_param;
  import felics_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] delta;
  logic [8:0] range_o, thr, shift;
  logic [3:0] ub, lb;
  int checks = 0, failures = 0;

  abc_param dut (.delta, .range_o, .ub, .lb, .thr, .shift);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s delta=%0d range=%0d ub=%0d lb=%0d thr=%0d shift=%0d",
               what, delta, range_o, ub, lb, thr, shift);
    end
  endtask

  initial begin
    for (int d = 0; d < 256; d++) begin
      automatic int rng, eub, elb, ethr;
      delta = 8'(d);
      @(posedge clk);
      rng  = d + 1;
      eub  = ceil_log2(rng);
      elb  = floor_log2(rng);
      ethr = (1 << eub) - rng;
      check(int'(range_o) == rng, "range");
      check(int'(ub) == eub, "upper_bound");
      check(int'(lb) == elb, "lower_bound");
      check(int'(thr) == ethr, "threshold");
      check(int'(shift) == (rng - ethr) / 2, "shift");
    end
    delta = 8'd4;
    @(posedge clk);
    check(ub == 4'd3 && lb == 4'd2 && thr == 9'd3 && shift == 9'd1, "Table I example");
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
