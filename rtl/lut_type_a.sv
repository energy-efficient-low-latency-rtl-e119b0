// lut_type_a: partial-product bit cell (LUT type A) of the area-optimized row.
//
// One 6-input LUT per partial-product bit n. From the Booth triplet it
// derives s, c and z, then: a first mux picks a[n] (digit magnitude 1) or
// a[n-1] (magnitude 2, i.e. the multiplicand shifted left), an xor with c
// forms the one's complement for a negative digit, and a last mux forces the
// bit to 0 for a zero digit. The result drives the propagate input of the
// carry chain. The generate input of these columns is 0, so the chain only
// adds the row's carry-in, which completes the two's complement.
// cin_out is the row's input carry (c of the digit); only the rightmost cell
// of a row uses it (the LUT's second output). Combinational.
// The s-mux, the zero-mux and the rightmost cell supplying the carry-in
// follow the described type-A LUT; the xor by c between the two muxes and
// the generate input tied to 0 are this design's reading.
module lut_type_a
  import booth_pkg::*;
(
  input  logic [2:0] trip,    // {b[m+1], b[m], b[m-1]}
  input  logic       a_n,     // multiplicand bit n
  input  logic       a_nm1,   // multiplicand bit n-1 (0 for n = 0)
  output logic       p_out,   // carry-chain propagate
  output logic       cin_out  // row carry-in (negative digit)
);

  booth_ctrl_t ctrl;

  booth_encoder u_enc (.trip(trip), .ctrl(ctrl));

  always_comb begin
    logic sel;
    sel     = ctrl.s ? a_nm1 : a_n;
    p_out   = ctrl.z ? 1'b0 : (sel ^ ctrl.c);
    cin_out = ctrl.c;
  end

endmodule
