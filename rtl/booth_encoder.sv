// booth_encoder: radix-4 modified Booth encoder for one multiplier triplet.
//
// The triplet {b[m+1], b[m], b[m-1]} stands for the digit
// BE = -2*b[m+1] + b[m] + b[m-1] in {-2,-1,0,+1,+2}. The encoder turns it
// into three control signals (truth table of the Booth encoding table):
//   s = 1 for |BE| = 2 (partial product takes the multiplicand shifted by 1)
//   c = 1 for BE < 0   (partial product is negated)
//   z = 1 for BE = 0   (partial product is zero)
// On the FPGA this function is folded into every partial-product LUT, which
// each see the same three multiplier bits; here it is a shared helper so the
// table is written once. Purely combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]  trip,
  output booth_ctrl_t ctrl
);

  always_comb begin
    unique case (trip)
      3'b000:  ctrl = '{s: 1'b0, c: 1'b0, z: 1'b1};   //  0
      3'b001:  ctrl = '{s: 1'b0, c: 1'b0, z: 1'b0};   // +1
      3'b010:  ctrl = '{s: 1'b0, c: 1'b0, z: 1'b0};   // +1
      3'b011:  ctrl = '{s: 1'b1, c: 1'b0, z: 1'b0};   // +2
      3'b100:  ctrl = '{s: 1'b1, c: 1'b1, z: 1'b0};   // -2
      3'b101:  ctrl = '{s: 1'b0, c: 1'b1, z: 1'b0};   // -1
      3'b110:  ctrl = '{s: 1'b0, c: 1'b1, z: 1'b0};   // -1
      default: ctrl = '{s: 1'b0, c: 1'b0, z: 1'b1};   //  0 (3'b111)
    endcase
  end

endmodule
