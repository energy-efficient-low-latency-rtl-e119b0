// lut_a1: LUT A1 of the delay-optimized row, the two lowest row bits.
//
// A single dual-output LUT (five inputs: the Booth triplet and a[1:0])
// gives the two lowest bits of the row with the negation carry already
// added. With x the one's complement partial product
// (x_n = z ? 0 : (s ? a[n-1] : a[n]) ^ c, a[-1] = 0):
//   pp[0] = x0 ^ c
//   pp[1] = x1 ^ (x0 & c)
// which are bits 1:0 of x + c. Combinational.
// The cell's role and inputs follow the described A1 LUT; its truth table
// is derived here so that the row is exact.
module lut_a1
  import booth_pkg::*;
(
  input  logic [2:0] trip,  // {b[m+1], b[m], b[m-1]}
  input  logic [1:0] a01,   // multiplicand bits 1:0
  output logic [1:0] pp     // pp(x,1), pp(x,0)
);

  booth_ctrl_t ctrl;

  booth_encoder u_enc (.trip(trip), .ctrl(ctrl));

  always_comb begin
    logic x0, x1;
    x0    = ctrl.z ? 1'b0 : ((ctrl.s ? 1'b0   : a01[0]) ^ ctrl.c);
    x1    = ctrl.z ? 1'b0 : ((ctrl.s ? a01[0] : a01[1]) ^ ctrl.c);
    pp[0] = x0 ^ ctrl.c;
    pp[1] = x1 ^ (x0 & ctrl.c);
  end

endmodule
