// tb_pp_row_delay: exhaustive check of the delay-optimized partial-product row
// (N = 8, and N = 4) for every multiplicand and Booth triplet, on a first row
// (pin = 1) and a later row. Expected unsigned row value:
//   digit*a + 3*2^N + FIRST*2^N   modulo 2^(N+3).
module tb_pp_row_delay;
  logic [7:0]  a8;
  logic [3:0]  a4;
  logic [2:0]  trip;
  logic [10:0] row8_first, row8_other;
  logic [6:0]  row4_first;
  int checks = 0, failures = 0;

  pp_row_delay #(.N(8), .FIRST(1'b1)) dut_f (.a(a8), .trip(trip), .row(row8_first));
  pp_row_delay #(.N(8), .FIRST(1'b0)) dut_o (.a(a8), .trip(trip), .row(row8_other));
  pp_row_delay #(.N(4), .FIRST(1'b1)) dut_4 (.a(a4), .trip(trip), .row(row4_first));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      for (int v = 0; v < 256; v++) begin
        int d, av, e_f, e_o, e_4;
        trip = 3'(t);
        a8   = 8'(v);
        a4   = 4'(v);
        #1;
        d   = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
        av  = int'($signed(a8));
        e_f = (d * av + 4 * 256) & 'h7ff;
        e_o = (d * av + 3 * 256) & 'h7ff;
        e_4 = (d * int'($signed(a4)) + 4 * 16) & 'h7f;
        checks += 2;
        if (int'(row8_first) != e_f || int'(row8_other) != e_o) begin
          failures++;
          $display("FAIL N=8 trip=%b a=%0d first=%h (exp %h) other=%h (exp %h)",
                   trip, av, row8_first, e_f, row8_other, e_o);
        end
        if (v < 16) begin
          checks++;
          if (int'(row4_first) != e_4) begin
            failures++;
            $display("FAIL N=4 trip=%b a=%h row=%h exp %h", trip, a4, row4_first, e_4);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
