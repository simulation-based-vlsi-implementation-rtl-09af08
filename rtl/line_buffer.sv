// line_buffer - one image row of pixel pairs, for the prediction template.
//
// A circular buffer of DEPTH words. Each clock with we set it returns the
// word stored at addr (written DEPTH writes earlier, i.e. the same pair of
// the previous row) and stores wdata in its place. Read is asynchronous, so
// the old word is available in the same clock as the write. The memory is
// not reset; the prediction template reads it only after the first row has
// filled it.
module line_buffer #(
  parameter int DEPTH = 5,
  parameter int DW    = 16,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

endmodule
