// tb_abc_rotation - exhaustive check of the circular rotation: for every
// delta and every in-range sample x the rotated value must be
// (x - shift) mod range, and the rotation must be a permutation of
// 0 .. range-1. Also the paper's delta = 4 case: 0..4 -> 4,0,1,2,3.
module tb_abc_rotation;
  import felics_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] x, r;
  logic [8:0] range_i, shift;
  int checks = 0, failures = 0;

  abc_rotation dut (.x, .range_i, .shift, .r);

  initial begin
    for (int d = 0; d < 256; d++) begin
      automatic int rng = d + 1;
      automatic int ub  = ceil_log2(rng);
      automatic int thr = (1 << ub) - rng;
      automatic int sh  = (rng - thr) / 2;
      automatic bit seen[int];
      for (int xi = 0; xi <= d; xi++) begin
        x = 8'(xi); range_i = 9'(rng); shift = 9'(sh);
        #1;
        checks++;
        if (int'(r) != (xi + rng - sh) % rng || seen.exists(int'(r))) begin
          failures++;
          $display("FAIL delta=%0d x=%0d r=%0d", d, xi, r);
        end
        seen[int'(r)] = 1;
      end
      if (d % 32 == 0) @(posedge clk);
    end
    begin
      int exp_r[5] = '{4, 0, 1, 2, 3};
      for (int xi = 0; xi < 5; xi++) begin
        x = 8'(xi); range_i = 9'd5; shift = 9'd1;
        #1;
        checks++;
        if (int'(r) != exp_r[xi]) begin
          failures++;
          $display("FAIL Table I rotation x=%0d r=%0d", xi, r);
        end
      end
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
