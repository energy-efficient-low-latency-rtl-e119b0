// carry_chain_adder: final two-operand adder of the multiplier.
//
// One LUT per bit forms propagate x ^ y and generate x; the carry chain
// produces s = x + y modulo 2^W. Combinational.
// A binary adder on the carry chain closes the reduction as described; a
// ripple chain rather than a carry-lookahead adder is this design's choice.
module carry_chain_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);

  logic unused_cout;

  carry_chain #(.W(W)) u_chain (
    .p   (x ^ y),
    .g   (x),
    .cin (1'b0),
    .s   (s),
    .cout(unused_cout)
  );

endmodule
