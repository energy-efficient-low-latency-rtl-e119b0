// tb_lut_type_a: exhaustive check of the type-A partial-product bit cell.
// Expected: bit = 0 for digit 0, else (|digit| == 2 ? a[n-1] : a[n])
// inverted for a negative digit; the carry-in output is 1 for digit < 0.
module tb_lut_type_a;
  logic [2:0] trip;
  logic       a_n, a_nm1, p_out, cin_out;
  int checks = 0, failures = 0;

  lut_type_a dut (.trip(trip), .a_n(a_n), .a_nm1(a_nm1), .p_out(p_out), .cin_out(cin_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int  d;
      logic exp_p;
      trip  = 3'(v);
      a_n   = v[3];
      a_nm1 = v[4];
      #1;
      d = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      if (d == 0) exp_p = 1'b0;
      else        exp_p = ((d == 2 || d == -2) ? a_nm1 : a_n) ^ (d < 0);
      checks++;
      if (p_out !== exp_p || cin_out !== (d < 0)) begin
        failures++;
        $display("FAIL trip=%b a_n=%b a_nm1=%b p=%b cin=%b", trip, a_n, a_nm1, p_out, cin_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
