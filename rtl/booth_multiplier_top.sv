// booth_multiplier_top: the two proposed signed N x M multipliers side by side.
//
// Both multiply the same two's complement operands a and b exactly:
//   p_area  - area-optimized version: every partial-product row is one LUT
//             per bit on a carry chain N+3 columns long
//   p_delay - critical-path-optimized version: the three low bits of every
//             row and its chain carry come from dedicated LUTs (A1, A2, CG),
//             cutting each row's carry chain to N columns
// The two products are always equal; they differ only in LUT count and
// critical path on an FPGA. Purely combinational, no clock or reset.
// Both versions are the described ones; building them side by side in one
// top is this design's choice, since neither is singled out as the main one.
module booth_multiplier_top
  import booth_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned M = 8
) (
  input  logic [N-1:0]   a,        // signed multiplicand
  input  logic [M-1:0]   b,        // signed multiplier
  output logic [N+M-1:0] p_area,   // product, area-optimized multiplier
  output logic [N+M-1:0] p_delay   // product, delay-optimized multiplier
);

  signed_booth_multiplier #(.N(N), .M(M), .VARIANT(PPG_AREA)) u_area (
    .a(a), .b(b), .p(p_area));

  signed_booth_multiplier #(.N(N), .M(M), .VARIANT(PPG_DELAY)) u_delay (
    .a(a), .b(b), .p(p_delay));

endmodule
