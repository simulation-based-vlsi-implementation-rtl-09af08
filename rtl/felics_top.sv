// felics_top - FELICS lossless image encoder, two pixels per clock.
//
// FELICS (fast, efficient, lossless image compression system) codes each
// pixel P against two already-coded neighbours N1, N2. With L = min and
// H = max of them, a pixel inside [L, H] is coded with the (simplified)
// adjusted binary code of P-L, and a pixel outside with a Golomb-Rice code
// of its distance to the range. Pixels are split into even and odd columns,
// each with its own coding engine, and the encoder is a four-stage pipeline:
//
//   1 prediction_template  : reference pixels from the row buffer
//   2 coding_engine (x2)    : range class, adjusted-binary parameters, k
//   3 coding_engine (x2)    : circular rotation and codeword generation
//   4 bitstream_generator   : packing into OUT_W-bit words
//
// The two-engine split, the four stages, the coding equations and the raw
// first two pixels follow the paper; stage contents, the codeword prefix,
// the Golomb-Rice k mapping and escape, and the output word format are this
// design's choices (see the module headers).
//
// Interface: present pixel pairs {even, odd} of an IMG_W x IMG_H grey image
// in raster order with in_valid; gaps are allowed, back-pressure is not
// needed. The stream appears on out_word, MSB first, with out_valid; the
// final word of an image has out_last and out_nbits valid bits. The
// codeword of each engine in stage 3 is also brought out on dbg_even and
// dbg_odd. Latency: four clocks from a pair to the word holding its last bit
// when that word fills; rst_n is synchronous and active low.
module felics_top
  import felics_pkg::*;
#(
  parameter int IMG_W = 10,
  parameter int IMG_H = 10,
  parameter int OUT_W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  pix_t             in_pix_even,
  input  pix_t             in_pix_odd,
  output logic             out_valid,
  output logic [OUT_W-1:0] out_word,
  output logic [6:0]       out_nbits,
  output logic             out_last,
  output lane_out_t        dbg_even,
  output lane_out_t        dbg_odd
);

  tmpl_t     t_even, t_odd;
  lane_out_t c_even, c_odd;

  prediction_template #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_tmpl (
    .clk, .rst_n, .in_valid, .in_pix_even, .in_pix_odd,
    .even_o(t_even), .odd_o(t_odd)
  );

  coding_engine u_even (.clk, .rst_n, .in(t_even), .out(c_even));
  coding_engine u_odd  (.clk, .rst_n, .in(t_odd),  .out(c_odd));

  bitstream_generator #(.OUT_W(OUT_W)) u_bsg (
    .clk, .rst_n, .even_i(c_even), .odd_i(c_odd),
    .out_valid, .out_word, .out_nbits, .out_last
  );

  assign dbg_even = c_even;
  assign dbg_odd  = c_odd;

endmodule
