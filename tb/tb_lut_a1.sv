// tb_lut_a1: exhaustive check of LUT A1. Its two outputs must equal the two
// lowest bits of the exact partial product digit * a (two's complement), for
// every Booth triplet and every value of a[1:0].
module tb_lut_a1;
  logic [2:0] trip;
  logic [1:0] a01, pp;
  int checks = 0, failures = 0;

  lut_a1 dut (.trip(trip), .a01(a01), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int d, prod;
      trip = 3'(v);
      a01  = 2'(v >> 3);
      #1;
      d    = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      prod = d * int'(a01);          // low bits depend only on a[1:0]
      checks++;
      if (pp !== 2'(prod)) begin
        failures++;
        $display("FAIL trip=%b a01=%b pp=%b exp %b", trip, a01, pp, 2'(prod));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
