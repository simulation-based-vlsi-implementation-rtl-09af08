// intensity_classifier - intensity distribution model of FELICS.
//
// With the two reference pixels N1 and N2 it takes L = min(N1,N2) and
// H = max(N1,N2), as the paper does, and delta = H - L. The current pixel P
// is "in range" when L <= P <= H; its sample P - L is then coded with the
// adjusted binary code. Outside the range the distance to the nearer bound
// minus one (L-P-1 below, P-H-1 above) is passed on for the Golomb-Rice
// code; subtracting one is this design's choice, since a pixel outside the
// range is at least one step away from it.
//
// Purely combinational: two compares, three subtractions and a few muxes.
module intensity_classifier
  import felics_pkg::*;
(
  input  pix_t       p,
  input  pix_t       n1,
  input  pix_t       n2,
  output pix_t       l,
  output pix_t       h,
  output logic [7:0] delta,
  output cls_e       cls,
  output logic [7:0] resid   // P-L in range, L-P-1 below, P-H-1 above
);

  always_comb begin
    l     = (n1 < n2) ? n1 : n2;
    h     = (n1 < n2) ? n2 : n1;
    delta = h - l;
    if (p < l) begin
      cls   = CLS_BELOW;
      resid = l - p - 8'd1;
    end else if (p > h) begin
      cls   = CLS_ABOVE;
      resid = p - h - 8'd1;
    end else begin
      cls   = CLS_IN;
      resid = p - l;
    end
  end

endmodule
