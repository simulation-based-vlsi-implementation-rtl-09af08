// abc_param - parameter computation of the simplified adjusted binary code.
//
// From delta = H - L of the two reference pixels it forms the coding
// parameters of the in-range sample P - L, exactly as the paper defines them:
//   range       = delta + 1
//   upper_bound = ceil(log2(range))
//   lower_bound = floor(log2(range))
//   threshold   = 2^upper_bound - range
// It also gives the shift number used by the circular rotation. The paper
// names the shift number but prints no formula for it; this design uses
//   shift = (range - threshold) / 2,
// half of the samples that need upper_bound bits, which rotates the middle
// section of the range to the start and reproduces the paper's Table I
// (delta = 4: samples 0..4 -> 111, 00, 01, 10, 110).
// lower_bound is the position of the leading one of range, and upper_bound
// adds one when range is not a power of two.
//
// Purely combinational. delta = 0 gives range 1, both bounds 0, threshold 0:
// an in-range sample then needs no bits.
module abc_param (
  input  logic [7:0] delta,
  output logic [8:0] range_o,   // 1 .. 256
  output logic [3:0] ub,        // upper bound, 0 .. 8
  output logic [3:0] lb,        // lower bound, 0 .. 8
  output logic [8:0] thr,       // threshold, 0 .. 127
  output logic [8:0] shift      // shift number of the circular rotation
);

  logic [8:0] rng;
  logic       pow2;

  always_comb begin
    rng = {1'b0, delta} + 9'd1;
    lb  = 4'd0;
    for (int i = 0; i < 9; i++) begin
      if (rng[i]) lb = 4'(i);
    end
    pow2    = (rng & (rng - 9'd1)) == 9'd0;
    ub      = pow2 ? lb : lb + 4'd1;
    thr     = 9'((10'd1 << ub) - {1'b0, rng});
    shift   = (rng - thr) >> 1;
    range_o = rng;
  end

endmodule
