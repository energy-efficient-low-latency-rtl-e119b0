// tb_carry_chain: the chain with p = x ^ y, g = x must add x + y + cin.
// Random operands at W = 8 and W = 13, sum and carry out compared with
// integer addition.
module tb_carry_chain;
  logic [7:0]  x8, y8, s8;
  logic [12:0] x13, y13, s13;
  logic        cin, co8, co13;
  int checks = 0, failures = 0;

  carry_chain #(.W(8))  dut8  (.p(x8 ^ y8),   .g(x8),  .cin(cin), .s(s8),  .cout(co8));
  carry_chain #(.W(13)) dut13 (.p(x13 ^ y13), .g(y13), .cin(cin), .s(s13), .cout(co13));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int unsigned e8, e13;
      x8  = 8'($urandom);  y8  = 8'($urandom);
      x13 = 13'($urandom); y13 = 13'($urandom);
      cin = 1'($urandom);
      if (k == 0) begin x8 = 8'hff; y8 = 8'h00; cin = 1'b1; end  // full ripple
      #1;
      e8  = int'(x8) + int'(y8) + int'(cin);
      e13 = int'(x13) + int'(y13) + int'(cin);
      checks += 2;
      if ({co8, s8} !== 9'(e8)) begin
        failures++;
        $display("FAIL W=8 %h + %h + %b = %h", x8, y8, cin, {co8, s8});
      end
      if ({co13, s13} !== 14'(e13)) begin
        failures++;
        $display("FAIL W=13 %h + %h + %b = %h", x13, y13, cin, {co13, s13});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
