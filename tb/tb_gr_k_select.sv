// tb_gr_k_select - checks the k parameter for every delta against a table
// of delta intervals written out by hand: 0..2 -> 0, 3..6 -> 1, 7..14 -> 2,
// 15..30 -> 3, 31..62 -> 4, 63..126 -> 5, 127..254 -> 6, 255 -> 7.
module tb_gr_k_select;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] delta;
  logic [2:0] k;
  int checks = 0, failures = 0;

  gr_k_select dut (.delta, .k);

  initial begin
    int upper[8] = '{2, 6, 14, 30, 62, 126, 254, 255};
    for (int d = 0; d < 256; d++) begin
      automatic int ek = 0;
      while (d > upper[ek]) ek++;
      delta = 8'(d);
      @(posedge clk);
      checks++;
      if (int'(k) != ek) begin
        failures++;
        $display("FAIL delta=%0d k=%0d expected %0d", d, k, ek);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
