// lut_type_b: sign cell (LUT type B) at column N of a partial-product row.
//
// Inputs are the Booth triplet, the multiplicand MSB and pin. The cell works
// out the sign SE of the row's partial product (sign-extension table):
// SE = 0 for a zero digit, SE = MSB for a positive digit and SE = not MSB for
// a negative one. Instead of sign-extending each row, the row carries
// (not SE) at column N plus constants that sum to zero modulo 2^(N+M)
// (a 1 at column N+1 of every row and a second 1 at column N of the first
// row). pin is 1 on the first row and 0 on the others.
// The column therefore adds the two bits (not SE) and pin: propagate is
// their xor and generate is pin, as the carry chain needs.
// The exact xor operand is this design's reading; the use of pin as the
// generate signal follows the description. Combinational.
module lut_type_b
  import booth_pkg::*;
(
  input  logic [2:0] trip,   // {b[m+1], b[m], b[m-1]}
  input  logic       a_msb,  // multiplicand MSB
  input  logic       pin,    // 1 on the first row, else 0
  output logic       p_out,  // carry-chain propagate
  output logic       g_out   // carry-chain generate
);

  booth_ctrl_t ctrl;
  logic        se;

  booth_encoder u_enc (.trip(trip), .ctrl(ctrl));

  always_comb begin
    se    = ctrl.z ? 1'b0 : (a_msb ^ ctrl.c);
    p_out = ~se ^ pin;
    g_out = pin;
  end

endmodule
