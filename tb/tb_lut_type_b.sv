// tb_lut_type_b: exhaustive check of the type-B sign cell.
// Expected sign SE of digit*a: 0 for digit 0, the multiplicand MSB for a
// positive digit, its inverse for a negative one. The cell must put
// (not SE) xor pin on propagate and pin on generate.
module tb_lut_type_b;
  logic [2:0] trip;
  logic       a_msb, pin, p_out, g_out;
  int checks = 0, failures = 0;

  lut_type_b dut (.trip(trip), .a_msb(a_msb), .pin(pin), .p_out(p_out), .g_out(g_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int   d;
      logic se;
      trip  = 3'(v);
      a_msb = v[3];
      pin   = v[4];
      #1;
      d = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      se = (d == 0) ? 1'b0 : ((d > 0) ? a_msb : ~a_msb);
      checks++;
      if (p_out !== (~se ^ pin) || g_out !== pin) begin
        failures++;
        $display("FAIL trip=%b msb=%b pin=%b p=%b g=%b", trip, a_msb, pin, p_out, g_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
