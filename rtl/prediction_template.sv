// prediction_template - pipeline stage 1 of the FELICS encoder.
//
// Pixels arrive in raster order, two per clock: the even column 2j and the
// odd column 2j+1 of the current row. For each of them the template picks
// the two reference pixels N1 and N2 from pixels already seen:
//   first row         : the two pixels to the left (columns c-1 and c-2);
//   first column      : the two pixels above (columns 0 and 1 of the row
//                       above);
//   elsewhere         : the pixel to the left and the pixel above.
// The first two pixels of the image have no reference pixels and are
// flagged raw: they go into the bit stream uncoded, as the paper specifies.
// The paper names the template and the raw first pixels; the neighbour
// choice above is the usual FELICS template and is this design's reading.
//
// The row above is kept in line_buffer, IMG_W/2 pixel pairs deep; the pair
// read at address j is the same pair of the previous row. The left
// neighbours of the even pixel come from the previous pair, held in a
// register. Position counters wrap at the end of the image, so images follow
// one another without a gap.
//
// Timing: outputs are registered, one clock after the input pair; one pair
// per clock when in_valid is high, no back-pressure. rst_n is synchronous,
// active low, and returns the position to the top-left corner.
module prediction_template
  import felics_pkg::*;
#(
  parameter int IMG_W = 10,  // pixels per row, even
  parameter int IMG_H = 10   // rows per image
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  pix_t  in_pix_even,
  input  pix_t  in_pix_odd,
  output tmpl_t even_o,
  output tmpl_t odd_o
);

  localparam int PAIRS = IMG_W / 2;
  localparam int CW    = (PAIRS > 1) ? $clog2(PAIRS) : 1;
  localparam int RW    = (IMG_H > 1) ? $clog2(IMG_H) : 1;

  logic [CW-1:0] col;        // pair index j within the row
  logic [RW-1:0] row;
  pix_t          prev_even;  // pixel at column 2j-2
  pix_t          prev_odd;   // pixel at column 2j-1
  logic [15:0]   above;      // {column 2j+1, column 2j} of the row above
  pix_t          above_even, above_odd;
  logic          first_row, first_col, last_pair;

  line_buffer #(.DEPTH(PAIRS), .DW(16)) u_line (
    .clk   (clk),
    .we    (in_valid),
    .addr  (col),
    .wdata ({in_pix_odd, in_pix_even}),
    .rdata (above)
  );

  assign above_even = above[7:0];
  assign above_odd  = above[15:8];
  assign first_row  = (row == '0);
  assign first_col  = (col == '0);
  assign last_pair  = (int'(col) == PAIRS - 1) && (int'(row) == IMG_H - 1);

  tmpl_t even_n, odd_n;

  always_comb begin
    even_n       = '0;
    odd_n        = '0;
    even_n.valid = in_valid;
    odd_n.valid  = in_valid;
    even_n.last  = last_pair;
    odd_n.last   = last_pair;
    even_n.p     = in_pix_even;
    odd_n.p      = in_pix_odd;

    if (first_row) begin
      if (first_col) begin
        even_n.raw = 1'b1;
        odd_n.raw  = 1'b1;
      end else begin
        even_n.n1 = prev_odd;
        even_n.n2 = prev_even;
        odd_n.n1  = in_pix_even;
        odd_n.n2  = prev_odd;
      end
    end else begin
      if (first_col) begin
        even_n.n1 = above_even;
        even_n.n2 = above_odd;
      end else begin
        even_n.n1 = prev_odd;
        even_n.n2 = above_even;
      end
      odd_n.n1 = in_pix_even;
      odd_n.n2 = above_odd;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col          <= '0;
      row          <= '0;
      prev_even    <= '0;
      prev_odd     <= '0;
      even_o.valid <= 1'b0;
      odd_o.valid  <= 1'b0;
    end else begin
      even_o.valid <= even_n.valid;
      odd_o.valid  <= odd_n.valid;
      if (in_valid) begin
        prev_even <= in_pix_even;
        prev_odd  <= in_pix_odd;
        if (int'(col) == PAIRS - 1) begin
          col <= '0;
          row <= (int'(row) == IMG_H - 1) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
    {even_o.raw, even_o.last, even_o.p, even_o.n1, even_o.n2} <=
      {even_n.raw, even_n.last, even_n.p, even_n.n1, even_n.n2};
    {odd_o.raw, odd_o.last, odd_o.p, odd_o.n1, odd_o.n2} <=
      {odd_n.raw, odd_n.last, odd_n.p, odd_n.n1, odd_n.n2};
  end

  initial begin
    assert (IMG_W >= 2 && IMG_W % 2 == 0)
      else $error("prediction_template: IMG_W must be even and at least 2");
  end

endmodule
