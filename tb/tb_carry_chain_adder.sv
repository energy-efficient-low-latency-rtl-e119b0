// tb_carry_chain_adder: random and corner operands through the 16-bit final
// adder, compared with integer addition modulo 2^16.
module tb_carry_chain_adder;
  logic [15:0] x, y, s;
  int checks = 0, failures = 0;

  carry_chain_adder #(.W(16)) dut (.x(x), .y(y), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      x = 16'($urandom);
      y = 16'($urandom);
      if (k == 0) begin x = 16'hffff; y = 16'h0001; end
      #1;
      checks++;
      if (s !== 16'(int'(x) + int'(y))) begin
        failures++;
        $display("FAIL %h + %h = %h", x, y, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
