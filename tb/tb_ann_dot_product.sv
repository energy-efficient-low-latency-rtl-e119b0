// tb_ann_dot_product: neural-network style workload on the default 8x8 top.
// A fully connected layer of 10 neurons over 784 inputs (the size of a
// 28x28 image) with 8-bit signed fixed-point activations and weights: every
// weight*activation product comes from the multiplier (both variants), is
// accumulated in 32 bits and compared, per neuron, with an integer
// reference dot product. The index of the largest neuron output (the class
// an output layer would pick) must agree too. Four layers of random data
// are run, one of them with saturated extreme values.
module tb_ann_dot_product;
  localparam int INPUTS  = 784;
  localparam int NEURONS = 10;
  localparam int LAYERS  = 4;

  logic [7:0]  a, b;
  logic [15:0] p_area, p_delay;
  int checks = 0, failures = 0;
  int mults = 0;

  booth_multiplier_top dut (.a(a), .b(b), .p_area(p_area), .p_delay(p_delay));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [7:0] act [INPUTS];
    logic signed [7:0] w   [NEURONS][INPUTS];
    for (int l = 0; l < LAYERS; l++) begin
      int best_dut, best_ref;
      int acc_ref_best, acc_dut_best;
      for (int i = 0; i < INPUTS; i++) act[i] = (l == 3) ? -8'sd128 : 8'($urandom);
      for (int n = 0; n < NEURONS; n++)
        for (int i = 0; i < INPUTS; i++)
          w[n][i] = (l == 3) ? ((n % 2 == 0) ? -8'sd128 : 8'sd127) : 8'($urandom);
      best_dut = 0; best_ref = 0; acc_ref_best = 0; acc_dut_best = 0;
      for (int n = 0; n < NEURONS; n++) begin
        int acc_a, acc_d, acc_ref;
        acc_a = 0; acc_d = 0; acc_ref = 0;
        for (int i = 0; i < INPUTS; i++) begin
          a = w[n][i];
          b = act[i];
          #1;
          acc_a   += int'($signed(p_area));
          acc_d   += int'($signed(p_delay));
          acc_ref += int'(w[n][i]) * int'(act[i]);
          mults++;
        end
        checks++;
        if (acc_a != acc_ref || acc_d != acc_ref) begin
          failures++;
          $display("FAIL layer %0d neuron %0d: area=%0d delay=%0d exp=%0d",
                   l, n, acc_a, acc_d, acc_ref);
        end
        if (n == 0 || acc_a > acc_dut_best) begin best_dut = n; acc_dut_best = acc_a; end
        if (n == 0 || acc_ref > acc_ref_best) begin best_ref = n; acc_ref_best = acc_ref; end
      end
      checks++;
      if (best_dut != best_ref) begin
        failures++;
        $display("FAIL layer %0d: class %0d, expected %0d", l, best_dut, best_ref);
      end
    end
    $display("%0d multiplications", mults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
