// golomb_rice_coder - Golomb-Rice codeword of an out-of-range residual.
//
// A residual v is split into the quotient q = v >> k and the k low bits. The
// codeword is q ones, a terminating zero and the k low bits, first bit
// first. Golomb-Rice coding with a parameter k is what the paper names; the
// unary polarity and the length limit are this design's choices. Since q can
// reach 255 for k = 0, a quotient of GR_QLIM or more is replaced by GR_QLIM
// ones followed by the 8-bit residual itself, which caps the codeword at
// GR_QLIM + 8 = 24 bits.
//
// Purely combinational. The codeword is right-aligned in code, its first bit
// at position len-1.
module golomb_rice_coder
  import felics_pkg::*;
(
  input  logic [7:0]       v,     // residual
  input  logic [2:0]       k,     // Golomb-Rice parameter
  output logic [CW_W-1:0]  code,  // codeword, right-aligned
  output logic [LEN_W-1:0] len    // codeword length
);

  logic [7:0]      q;
  logic [CW_W-1:0] ones;
  logic [CW_W-1:0] rem;

  always_comb begin
    q = v >> k;
    if (q < 8'(GR_QLIM)) begin
      ones = (CW_W'(1) << q) - CW_W'(1);
      rem  = CW_W'(v) & ((CW_W'(1) << k) - CW_W'(1));
      code = (ones << (int'(k) + 1)) | rem;
      len  = LEN_W'(q) + LEN_W'(k) + LEN_W'(1);
    end else begin
      ones = (CW_W'(1) << GR_QLIM) - CW_W'(1);
      rem  = '0;
      code = (ones << 8) | CW_W'(v);
      len  = LEN_W'(GR_QLIM + 8);
    end
  end

endmodule
