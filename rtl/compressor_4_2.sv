// compressor_4_2: a row of 4:2 compressor cells, four W-bit rows to two.
//
// Each column i takes x1..x4 and the horizontal carry cin from column i-1:
//   cout  = maj(x1, x2, x3)                 -> cin of column i+1
//   p     = x1 ^ x2 ^ x3 ^ x4
//   sum   = p ^ cin                         (xor of the carry logic)
//   carry = p ? cin : x4                    (mux of the carry logic)
// cout does not depend on cin, so nothing ripples along the row: the cell is
// one 6-input LUT (cout and p) plus one mux/xor pair of the carry logic.
// Outputs: sum (weight 2^i) and carry already shifted to weight 2^(i+1);
// sum + carry = x1 + x2 + x3 + x4 modulo 2^W. Combinational.
// Using 4:2 compressors on LUTs and carry logic follows the description;
// the cell equations are the standard ones, chosen here.
module compressor_4_2 #(
  parameter int unsigned W = 16
) (
  input  logic [3:0][W-1:0] x,
  output logic [W-1:0]      sum,
  output logic [W-1:0]      carry
);

  logic [W:0]   hc;      // horizontal carries

  always_comb begin
    hc[0] = 1'b0;
    for (int i = 0; i < W; i++) begin
      logic p;
      hc[i+1] = (x[0][i] & x[1][i]) | (x[0][i] & x[2][i]) | (x[1][i] & x[2][i]);
      p       = x[0][i] ^ x[1][i] ^ x[2][i] ^ x[3][i];
      sum[i]  = p ^ hc[i];
      // vertical carry, weight 2^(i+1); the top column's is dropped (mod 2^W)
      if (i < W - 1) carry[i+1] = p ? hc[i] : x[3][i];
    end
    carry[0] = 1'b0;
  end

endmodule
