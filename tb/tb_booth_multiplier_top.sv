// tb_booth_multiplier_top: end-to-end test of the top at its default size
// (8x8), every operand pair. Both products are compared with integer
// multiplication. The test also counts how often each mechanism of the
// design is exercised and fails if one never is:
//   - every Booth digit value -2, -1, 0, +1, +2 in some row
//   - a negative digit (row negation carry-in) rippling the full carry chain
//     (a = 0, digit -1: inverted zeros plus one)
//   - the 2^N corner: digit -2 applied to the most negative multiplicand
//   - a product whose sign differs from a (negative b) and both operands
//     negative
// The products are combinational; they are sampled 1 time unit after the
// operands change.
module tb_booth_multiplier_top;
  logic [7:0]  a, b;
  logic [15:0] p_area, p_delay;
  int checks = 0, failures = 0;
  int digit_seen [5];
  int full_ripple = 0, corner_2n = 0, both_neg = 0;

  booth_multiplier_top dut (.a(a), .b(b), .p_area(p_area), .p_delay(p_delay));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 5; d++) digit_seen[d] = 0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int exp;
        logic [8:0] bx;
        a = 8'(i); b = 8'(j);
        #1;
        exp = int'($signed(a)) * int'($signed(b));
        checks++;
        if (int'($signed(p_area)) != exp || int'($signed(p_delay)) != exp) begin
          failures++;
          if (failures < 20)
            $display("FAIL %0d * %0d: area=%0d delay=%0d", $signed(a), $signed(b),
                     $signed(p_area), $signed(p_delay));
        end
        // mechanism coverage, from the operands alone
        bx = {b, 1'b0};
        for (int r = 0; r < 4; r++) begin
          int d;
          d = -2 * int'(bx[2*r+2]) + int'(bx[2*r+1]) + int'(bx[2*r]);
          digit_seen[d+2]++;
          if (d == -1 && a == 8'h00) full_ripple++;
          if (d == -2 && a == 8'h80) corner_2n++;
        end
        if (a[7] && b[7]) both_neg++;
      end
    for (int d = 0; d < 5; d++) begin
      $display("digit %0d seen %0d times", d - 2, digit_seen[d]);
      if (digit_seen[d] == 0) failures++;
    end
    $display("full carry ripple %0d, 2^N corner %0d, both negative %0d",
             full_ripple, corner_2n, both_neg);
    if (full_ripple == 0) failures++;
    if (corner_2n == 0)   failures++;
    if (both_neg == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
