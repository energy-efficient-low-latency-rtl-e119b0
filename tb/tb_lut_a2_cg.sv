// tb_lut_a2_cg: exhaustive check of the A2/CG LUT configuration.
// With x the 3 low bits of the one's complement partial product
// (|digit|*a, inverted for a negative digit, 0 for digit 0) and c = digit < 0:
//   pp2 = bit 2 of digit*a   and   cgout = carry out of x + c into bit 3.
module tb_lut_a2_cg;
  logic [2:0] trip, a012;
  logic       pp2, cgout;
  int checks = 0, failures = 0;

  lut_a2_cg dut (.trip(trip), .a012(a012), .pp2(pp2), .cgout(cgout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int d, prod, mag, x, c, cg;
      trip = 3'(v);
      a012 = 3'(v >> 3);
      #1;
      d    = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      prod = d * int'(a012);
      c    = (d < 0) ? 1 : 0;
      mag  = ((d < 0) ? -d : d) * int'(a012);
      x    = (c == 1) ? (~mag & 7) : (mag & 7);
      cg   = ((x + c) >> 3) & 1;
      checks++;
      if (pp2 !== prod[2] || int'(cgout) != cg) begin
        failures++;
        $display("FAIL trip=%b a=%b pp2=%b exp %b cg=%b exp %0d", trip, a012, pp2, prod[2], cgout, cg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
