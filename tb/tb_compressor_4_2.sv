// tb_compressor_4_2: random and corner rows through a 16-bit 4:2 compressor
// row; sum + carry must equal the sum of the four inputs modulo 2^16 and
// the carry row's bit 0 must be 0.
module tb_compressor_4_2;
  logic [3:0][15:0] x;
  logic [15:0]      sum, carry;
  int checks = 0, failures = 0;

  compressor_4_2 #(.W(16)) dut (.x(x), .sum(sum), .carry(carry));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int unsigned e;
      for (int r = 0; r < 4; r++) x[r] = 16'($urandom);
      if (k == 0) x = '1;
      if (k == 1) x = '0;
      #1;
      e = 0;
      for (int r = 0; r < 4; r++) e += int'(x[r]);
      checks++;
      if (16'(sum + carry) !== 16'(e) || carry[0] !== 1'b0) begin
        failures++;
        $display("FAIL %h %h %h %h -> %h + %h", x[0], x[1], x[2], x[3], sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
