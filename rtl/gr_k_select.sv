// gr_k_select - storage-less choice of the Golomb-Rice parameter k.
//
// Classic FELICS keeps, for every context delta, a table of cumulative code
// lengths for each candidate k and picks the best one, which costs a large
// table (the paper quotes 1024 entries for a variable k against 256 for a
// fixed one). The storage-less selection named by the paper derives k from
// the context alone. The paper does not give the mapping; this design uses
//   k = max(floor(log2(delta + 1)) - 1, 0)
// so k grows by one each time the width of the reference range doubles:
// delta 0..2 -> 0, 3..6 -> 1, 7..14 -> 2, ... 127..254 -> 6, 255 -> 7.
//
// Purely combinational: a leading-one detector and a decrement.
module gr_k_select (
  input  logic [7:0] delta,
  output logic [2:0] k
);

  logic [8:0] rng;
  logic [3:0] lead;

  always_comb begin
    rng  = {1'b0, delta} + 9'd1;
    lead = 4'd0;
    for (int i = 0; i < 9; i++) begin
      if (rng[i]) lead = 4'(i);
    end
    k = (lead == 4'd0) ? 3'd0 : 3'(lead - 4'd1);
  end

endmodule
