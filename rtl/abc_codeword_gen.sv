// abc_codeword_gen - codeword generation of the simplified adjusted binary code.
//
// Follows the paper: a rotated sample below threshold is sent as itself in
// lower_bound bits; a sample at or above threshold has threshold added and is
// sent in upper_bound bits. Because r + threshold >= 2*threshold, the first
// lower_bound bits of a long codeword are never below threshold, so the code
// is prefix-free and a decoder tells the two lengths apart after lower_bound
// bits.
//
// Purely combinational. The codeword is right-aligned in code, its first bit
// at position len-1.
module abc_codeword_gen (
  input  logic [7:0] r,     // rotated sample
  input  logic [8:0] thr,   // threshold
  input  logic [3:0] ub,    // upper bound
  input  logic [3:0] lb,    // lower bound
  output logic [7:0] code,  // codeword, right-aligned
  output logic [3:0] len    // codeword length, 0 .. 8
);

  always_comb begin
    if ({1'b0, r} < thr) begin
      code = r;
      len  = lb;
    end else begin
      code = 8'({1'b0, r} + thr);
      len  = ub;
    end
  end

endmodule
