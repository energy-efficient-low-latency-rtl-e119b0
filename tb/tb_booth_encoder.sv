// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder.
// For every triplet the expected s/c/z are derived from the digit value
// -2*b[m+1] + b[m] + b[m-1]: s = |digit| == 2, c = digit < 0, z = digit == 0.
module tb_booth_encoder;
  import booth_pkg::*;

  logic [2:0]  trip;
  booth_ctrl_t ctrl;
  int checks = 0, failures = 0;

  booth_encoder dut (.trip(trip), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int d;
      trip = 3'(t);
      #1;
      d = -2 * ((t >> 2) & 1) + ((t >> 1) & 1) + (t & 1);
      checks++;
      if (ctrl.s !== (d == 2 || d == -2) || ctrl.c !== (d < 0) || ctrl.z !== (d == 0)) begin
        failures++;
        $display("FAIL trip=%b digit=%0d got s=%b c=%b z=%b", trip, d, ctrl.s, ctrl.c, ctrl.z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
