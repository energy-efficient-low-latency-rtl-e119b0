// pp_row_area: one partial-product row of the area-optimized multiplier.
//
// For the Booth triplet of this row the row value is digit * a, written in
// N+3 bits with the sign extension replaced by constants:
//   columns 0..N-1  LUT type A: one's complement partial-product bit
//   column  N       LUT type B: (not SE) + pin   (pin = 1 only if FIRST)
//   column  N+1     type C: the constant 1 of the sign-extension prefix
//   column  N+2     carry out of the chain
// The carry chain adds the row's negation carry c, produced by the rightmost
// type-A cell, so the row leaves in two's complement form. As an unsigned
// N+3-bit number the row is
//   row = digit*a + 3*2^N + FIRST*2^N        (always in 0 .. 5*2^N),
// and summed over all M/2 rows of a multiplier, at offsets 2i, the added
// constants cancel modulo 2^(N+M), so the rows need no sign extension.
// The cell structure follows the described LUT A/B/C row; the exact sign
// encoding at columns N and N+1 is this design's choice. Combinational.
module pp_row_area #(
  parameter int unsigned N     = 8,
  parameter bit          FIRST = 1'b0
) (
  input  logic [N-1:0] a,     // multiplicand
  input  logic [2:0]   trip,  // {b[m+1], b[m], b[m-1]}
  output logic [N+2:0] row
);

  logic [N+1:0] p, g, s;
  logic         row_cin;
  logic         cout;

  // the rightmost cell's second output is the row's carry-in
  for (genvar n = 0; n < N; n++) begin : g_type_a
    logic cin_n;
    lut_type_a u_a (
      .trip   (trip),
      .a_n    (a[n]),
      .a_nm1  ((n == 0) ? 1'b0 : a[(n == 0) ? 0 : n-1]),
      .p_out  (p[n]),
      .cin_out(cin_n)
    );
    assign g[n] = 1'b0;
    if (n == 0) begin : g_cin
      assign row_cin = cin_n;
    end
  end

  lut_type_b u_b (
    .trip (trip),
    .a_msb(a[N-1]),
    .pin  (FIRST),
    .p_out(p[N]),
    .g_out(g[N])
  );

  // type C: constant 1 at column N+1
  assign p[N+1] = 1'b1;
  assign g[N+1] = 1'b0;

  carry_chain #(.W(N+2)) u_chain (
    .p   (p),
    .g   (g),
    .cin (row_cin),
    .s   (s),
    .cout(cout)
  );

  assign row = {cout, s};

endmodule
