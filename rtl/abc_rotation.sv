// abc_rotation - circular rotation of the simplified adjusted binary code.
//
// The sample x = P - L lies in 0 .. range-1. The rotation subtracts the shift
// number modulo range, so that the samples of the middle of the range (the
// most probable ones) become 0 .. threshold-1 and get the short codewords,
// while the samples at both sides of the range become threshold .. range-1
// and get the long ones. The paper describes what the rotation achieves;
// the modular subtraction is this design's way of doing it.
//
// Purely combinational: one compare and one add/subtract.
module abc_rotation (
  input  logic [7:0] x,        // sample P - L, below range_i
  input  logic [8:0] range_i,  // delta + 1
  input  logic [8:0] shift,    // from abc_param
  output logic [7:0] r         // rotated sample, below range_i
);

  always_comb begin
    if ({1'b0, x} >= shift) r = 8'({1'b0, x} - shift);
    else                    r = 8'({1'b0, x} + range_i - shift);
  end

endmodule
