// lut_a2_cg: LUT configuration shared by types A2 and CG of the delay row.
//
// A 6-input function of the Booth triplet and a[2:0]. With x the one's
// complement partial product (see lut_a1) and c the negation carry:
//   pp2   = x2 ^ (x1 & x0 & c)   bit 2 of x + c           (type A2 uses it)
//   cgout = x2 & x1 & x0 & c     carry of x + c into bit 3 (type CG uses it)
// A 6-input LUT has only one output at six inputs, so a row instantiates
// this cell twice and uses one output of each. Combinational.
// Sharing one configuration between A2 and CG follows the description; the
// truth table is derived here so that the row is exact.
module lut_a2_cg
  import booth_pkg::*;
(
  input  logic [2:0] trip,   // {b[m+1], b[m], b[m-1]}
  input  logic [2:0] a012,   // multiplicand bits 2:0
  output logic       pp2,    // pp(x,2)
  output logic       cgout   // carry into column 3
);

  booth_ctrl_t ctrl;

  booth_encoder u_enc (.trip(trip), .ctrl(ctrl));

  always_comb begin
    logic x0, x1, x2;
    x0    = ctrl.z ? 1'b0 : ((ctrl.s ? 1'b0    : a012[0]) ^ ctrl.c);
    x1    = ctrl.z ? 1'b0 : ((ctrl.s ? a012[0] : a012[1]) ^ ctrl.c);
    x2    = ctrl.z ? 1'b0 : ((ctrl.s ? a012[1] : a012[2]) ^ ctrl.c);
    pp2   = x2 ^ (x1 & x0 & ctrl.c);
    cgout = x2 & x1 & x0 & ctrl.c;
  end

endmodule
