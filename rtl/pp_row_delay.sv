// pp_row_delay: one partial-product row of the delay-optimized multiplier.
//
// Same value as pp_row_area (digit*a plus the same sign-extension
// constants, N+3 bits), but the carry chain is shorter: LUT A1 makes row
// bits 1:0, LUT A2 row bit 2 and LUT CG the carry into column 3, all with the
// negation carry already added. The carry chain then starts at column 3:
//   columns 3..N-1  LUT type A cells (propagate only)
//   column  N       LUT type B (not SE) + pin   (pin = 1 only if FIRST)
//   column  N+1     constant 1 (type C)
//   column  N+2     carry out of the chain
// so the chain covers N columns instead of N+3. Requires N >= 4.
// The A1/A2/CG split follows the described delay-optimized row; the sign
// columns are the same choice as in pp_row_area.
// Combinational.
module pp_row_delay #(
  parameter int unsigned N     = 8,
  parameter bit          FIRST = 1'b0
) (
  input  logic [N-1:0] a,     // multiplicand
  input  logic [2:0]   trip,  // {b[m+1], b[m], b[m-1]}
  output logic [N+2:0] row
);

  localparam int unsigned CW = N - 1;   // chain columns 3..N+1

  logic [1:0]    pp01;
  logic          pp2, cg, unused_pp2, unused_cg;
  logic [CW-1:0] p, g, s;
  logic          cout;

  lut_a1 u_a1 (.trip(trip), .a01(a[1:0]), .pp(pp01));

  lut_a2_cg u_a2 (.trip(trip), .a012(a[2:0]), .pp2(pp2),        .cgout(unused_cg));
  lut_a2_cg u_cg (.trip(trip), .a012(a[2:0]), .pp2(unused_pp2), .cgout(cg));

  for (genvar n = 3; n < N; n++) begin : g_type_a
    logic unused_cin;
    lut_type_a u_a (
      .trip   (trip),
      .a_n    (a[n]),
      .a_nm1  (a[n-1]),
      .p_out  (p[n-3]),
      .cin_out(unused_cin)
    );
    assign g[n-3] = 1'b0;
  end

  lut_type_b u_b (
    .trip (trip),
    .a_msb(a[N-1]),
    .pin  (FIRST),
    .p_out(p[N-3]),
    .g_out(g[N-3])
  );

  // type C: constant 1 at column N+1
  assign p[N-2] = 1'b1;
  assign g[N-2] = 1'b0;

  carry_chain #(.W(CW)) u_chain (
    .p   (p),
    .g   (g),
    .cin (cg),
    .s   (s),
    .cout(cout)
  );

  assign row = {cout, s, pp2, pp01};

endmodule
