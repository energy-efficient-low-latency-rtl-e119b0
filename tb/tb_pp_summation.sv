// tb_pp_summation: random rows through trees of 2, 3, 4 and 8 rows
// (adder only; one padded compressor level; one level; two levels).
// Each sum is compared with the integer sum of its rows modulo 2^W.
module tb_pp_summation;
  logic [7:0][31:0] r32;
  logic [3:0][15:0] r16;
  logic [31:0]      s8;
  logic [15:0]      s4, s3, s2;
  int checks = 0, failures = 0;

  pp_summation #(.ROWS(8), .W(32)) dut8 (.rows(r32),      .sum(s8));
  pp_summation #(.ROWS(4), .W(16)) dut4 (.rows(r16),      .sum(s4));
  pp_summation #(.ROWS(3), .W(16)) dut3 (.rows(r16[2:0]), .sum(s3));
  pp_summation #(.ROWS(2), .W(16)) dut2 (.rows(r16[1:0]), .sum(s2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      longint e8;
      int     e4, e3, e2;
      for (int r = 0; r < 8; r++) r32[r] = $urandom;
      for (int r = 0; r < 4; r++) r16[r] = 16'($urandom);
      if (k == 0) begin r32 = '1; r16 = '1; end
      #1;
      e8 = 0;
      for (int r = 0; r < 8; r++) e8 += longint'(r32[r]);
      e2 = int'(r16[0]) + int'(r16[1]);
      e3 = e2 + int'(r16[2]);
      e4 = e3 + int'(r16[3]);
      checks += 4;
      if (s8 !== 32'(e8)) begin failures++; $display("FAIL 8 rows: %h exp %h", s8, 32'(e8)); end
      if (s4 !== 16'(e4)) begin failures++; $display("FAIL 4 rows: %h exp %h", s4, 16'(e4)); end
      if (s3 !== 16'(e3)) begin failures++; $display("FAIL 3 rows: %h exp %h", s3, 16'(e3)); end
      if (s2 !== 16'(e2)) begin failures++; $display("FAIL 2 rows: %h exp %h", s2, 16'(e2)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
