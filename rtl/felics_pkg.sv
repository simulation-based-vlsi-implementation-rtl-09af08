// felics_pkg - types and constants shared by the FELICS encoder.
//
// The encoder codes 8-bit grey-level pixels. Every pixel leaves the coding
// engine as one variable-length codeword, held right-aligned in a fixed
// 32-bit field together with its length; the first bit to be sent is bit
// len-1 and the last is bit 0.
//
// Codeword layout (the prefix bits are this design's choice; the paper does
// not spell out how the range class is signalled):
//   raw pixel       : 8 bits of the pixel value (first two pixels of an image)
//   in range        : '0'  + simplified adjusted binary code of P-L
//   below range     : '10' + Golomb-Rice code of L-P-1
//   above range     : '11' + Golomb-Rice code of P-H-1
// The Golomb-Rice code is limited to GR_QLIM unary ones; a longer quotient
// is replaced by GR_QLIM ones followed by the 8-bit residual (escape).
package felics_pkg;

  localparam int PIX_W   = 8;   // bits per pixel
  localparam int CW_W    = 32;  // codeword field, prefix included
  localparam int LEN_W   = 6;   // codeword length field
  localparam int GR_QLIM = 16;  // longest unary part before the escape

  typedef logic [PIX_W-1:0] pix_t;

  // Range class of a pixel against its two reference pixels.
  typedef enum logic [1:0] {
    CLS_IN    = 2'd0,  // L <= P <= H : adjusted binary code
    CLS_BELOW = 2'd1,  // P <  L      : Golomb-Rice code
    CLS_ABOVE = 2'd2,  // P >  H      : Golomb-Rice code
    CLS_RAW   = 2'd3   // first two pixels, sent uncoded
  } cls_e;

  // Output of the prediction template (pipeline stage 1) for one pixel.
  typedef struct packed {
    logic valid;
    logic raw;   // pixel is sent uncoded
    logic last;  // last pixel pair of the image
    pix_t p;     // current pixel
    pix_t n1;    // reference pixel N1
    pix_t n2;    // reference pixel N2
  } tmpl_t;

  // Variable-length codeword, right-aligned.
  typedef struct packed {
    logic [CW_W-1:0]  bits;
    logic [LEN_W-1:0] len;
  } cw_t;

  // Codeword stage output of one engine (pipeline stage 3).
  typedef struct packed {
    logic valid;
    logic last;
    cls_e cls;
    cw_t  cw;
  } lane_out_t;

endpackage
