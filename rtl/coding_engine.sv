// coding_engine - one FELICS coding engine (pipeline stages 2 and 3).
//
// The encoder splits the pixels of a row into even and odd samples and gives
// each its own engine, so two pixels are coded per clock; this module is one
// such engine. It takes the current pixel and its two reference pixels from
// the prediction template and produces the pixel's complete codeword.
//
//   stage 2: intensity classification (L, H, delta, range class, residual),
//            adjusted-binary parameter computation and Golomb-Rice k
//            selection, all registered;
//   stage 3: circular rotation and codeword generation of the adjusted
//            binary code, Golomb-Rice codeword, choice by range class and
//            the range-class prefix ('0' in range, '10' below, '11' above);
//            a raw pixel is passed on as its 8 bits. Registered.
//
// The paper gives the two-engine split and the three procedures of the
// adjusted binary code; how the work is cut into stages and the prefix
// code are this design's choices.
//
// Timing: a valid input appears at out two clocks later; one pixel per clock,
// no back-pressure. rst_n is synchronous and active low and clears the valid
// bits only.
module coding_engine
  import felics_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  tmpl_t     in,
  output lane_out_t out
);

  // ---------------- stage 2 ----------------
  pix_t       l, h;
  logic [7:0] delta, resid;
  cls_e       cls;
  logic [8:0] rng, thr, shift;
  logic [3:0] ub, lb;
  logic [2:0] k;

  intensity_classifier u_cls (
    .p(in.p), .n1(in.n1), .n2(in.n2),
    .l(l), .h(h), .delta(delta), .cls(cls), .resid(resid)
  );

  abc_param u_par (
    .delta(delta), .range_o(rng), .ub(ub), .lb(lb), .thr(thr), .shift(shift)
  );

  gr_k_select u_k (.delta(delta), .k(k));

  typedef struct packed {
    logic       valid;
    logic       last;
    cls_e       cls;
    pix_t       p;
    logic [7:0] resid;
    logic [8:0] rng;
    logic [8:0] thr;
    logic [8:0] shift;
    logic [3:0] ub;
    logic [3:0] lb;
    logic [2:0] k;
  } s2_t;

  s2_t s2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2.valid <= 1'b0;
      s2.last  <= 1'b0;
    end else begin
      s2.valid <= in.valid;
      s2.last  <= in.valid & in.last;
    end
    s2.cls   <= in.raw ? CLS_RAW : cls;
    s2.p     <= in.p;
    s2.resid <= resid;
    s2.rng   <= rng;
    s2.thr   <= thr;
    s2.shift <= shift;
    s2.ub    <= ub;
    s2.lb    <= lb;
    s2.k     <= k;
  end

  // ---------------- stage 3 ----------------
  logic [7:0]       rot;
  logic [7:0]       abc_code;
  logic [3:0]       abc_len;
  logic [CW_W-1:0]  gr_code;
  logic [LEN_W-1:0] gr_len;
  cw_t              cw;

  abc_rotation u_rot (
    .x(s2.resid), .range_i(s2.rng), .shift(s2.shift), .r(rot)
  );

  abc_codeword_gen u_gen (
    .r(rot), .thr(s2.thr), .ub(s2.ub), .lb(s2.lb), .code(abc_code), .len(abc_len)
  );

  golomb_rice_coder u_gr (
    .v(s2.resid), .k(s2.k), .code(gr_code), .len(gr_len)
  );

  always_comb begin
    unique case (s2.cls)
      CLS_RAW: begin
        cw.bits = CW_W'(s2.p);
        cw.len  = LEN_W'(PIX_W);
      end
      CLS_IN: begin
        // '0' then the adjusted binary code
        cw.bits = CW_W'(abc_code);
        cw.len  = LEN_W'(abc_len) + LEN_W'(1);
      end
      CLS_BELOW: begin
        // '10' then the Golomb-Rice code
        cw.bits = (CW_W'(2'b10) << gr_len) | gr_code;
        cw.len  = gr_len + LEN_W'(2);
      end
      default: begin
        // '11' then the Golomb-Rice code
        cw.bits = (CW_W'(2'b11) << gr_len) | gr_code;
        cw.len  = gr_len + LEN_W'(2);
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out.valid <= 1'b0;
      out.last  <= 1'b0;
    end else begin
      out.valid <= s2.valid;
      out.last  <= s2.valid & s2.last;
    end
    out.cls <= s2.cls;
    out.cw  <= cw;
  end

endmodule
