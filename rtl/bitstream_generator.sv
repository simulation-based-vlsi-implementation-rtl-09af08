// bitstream_generator - pipeline stage 4 of the FELICS encoder.
//
// Each clock the two coding engines deliver one codeword each (even sample
// first, then odd). The generator appends both to a bit accumulator and,
// whenever OUT_W bits or more are waiting, sends the oldest OUT_W of them as
// one output word. The stream is MSB first: the first bit of the image is bit
// OUT_W-1 of the first word.
//
// The accumulator is a right-aligned shift register: appending a codeword of
// len bits shifts it left by len and ORs the codeword in; the oldest waiting
// bit sits at position cnt-1. ACC_W = OUT_W + 2*CW_W, enough for OUT_W-1
// waiting bits plus two longest codewords, so the encoder never stalls.
//
// At the last pixel pair of an image the remainder is flushed as a final,
// left-aligned word with out_nbits < OUT_W (or = OUT_W) and out_last set. If
// the remainder does not fit in the clock of the last pair, it leaves in the
// next clock, while that clock's new codewords (of the next image) start a
// fresh accumulator.
//
// The paper names the bit-stream generator only; word width, bit order and
// flushing are this design's choices.
//
// Timing: output registered, one clock after the codewords. rst_n is
// synchronous, active low, and empties the accumulator.
module bitstream_generator
  import felics_pkg::*;
#(
  parameter int OUT_W = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  lane_out_t        even_i,
  input  lane_out_t        odd_i,
  output logic             out_valid,
  output logic [OUT_W-1:0] out_word,
  output logic [6:0]       out_nbits,  // valid bits in out_word, from the MSB
  output logic             out_last    // final word of an image
);

  localparam int ACC_W = OUT_W + 2 * CW_W;

  logic [ACC_W-1:0] acc, acc_app;
  logic [7:0]       cnt, cnt_app, new_bits;
  logic             flush_pend;
  logic [LEN_W-1:0] le, lo;
  logic [CW_W-1:0]  be, bo;
  logic             last_in;

  always_comb begin
    le      = even_i.valid ? even_i.cw.len : '0;
    lo      = odd_i.valid  ? odd_i.cw.len  : '0;
    be      = even_i.valid ? even_i.cw.bits : '0;
    bo      = odd_i.valid  ? odd_i.cw.bits  : '0;
    last_in = odd_i.valid & odd_i.last;
    acc_app = (((acc << le) | ACC_W'(be)) << lo) | ACC_W'(bo);
    new_bits = 8'(le) + 8'(lo);
    cnt_app  = cnt + new_bits;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc        <= '0;
      cnt        <= '0;
      flush_pend <= 1'b0;
      out_valid  <= 1'b0;
      out_word   <= '0;
      out_nbits  <= '0;
      out_last   <= 1'b0;
    end else if (flush_pend) begin
      // send the remainder of the previous image; new codewords start afresh
      out_valid  <= 1'b1;
      out_word   <= OUT_W'(acc << (OUT_W - int'(cnt)));
      out_nbits  <= 7'(cnt);
      out_last   <= 1'b1;
      acc        <= acc_app;
      cnt        <= new_bits;
      flush_pend <= last_in;
    end else if (int'(cnt_app) >= OUT_W) begin
      out_valid  <= 1'b1;
      out_word   <= OUT_W'(acc_app >> (int'(cnt_app) - OUT_W));
      out_nbits  <= 7'(OUT_W);
      out_last   <= last_in && (int'(cnt_app) == OUT_W);
      acc        <= acc_app;
      cnt        <= 8'(int'(cnt_app) - OUT_W);
      flush_pend <= last_in && (int'(cnt_app) > OUT_W);
    end else if (last_in) begin
      out_valid  <= 1'b1;
      out_word   <= OUT_W'(acc_app << (OUT_W - int'(cnt_app)));
      out_nbits  <= 7'(cnt_app);
      out_last   <= 1'b1;
      acc        <= '0;
      cnt        <= '0;
      flush_pend <= 1'b0;
    end else begin
      out_valid  <= 1'b0;
      out_last   <= 1'b0;
      acc        <= acc_app;
      cnt        <= cnt_app;
    end
  end

  // both engines always carry a pixel in the same clock
  a_pair : assert property (@(posedge clk) disable iff (!rst_n)
                            even_i.valid == odd_i.valid)
    else $error("bitstream_generator: even and odd lanes out of step");

  // the accumulator never holds more bits than it has room for
  a_room : assert property (@(posedge clk) disable iff (!rst_n)
                            int'(cnt) < OUT_W)
    else $error("bitstream_generator: accumulator overflow");

endmodule
