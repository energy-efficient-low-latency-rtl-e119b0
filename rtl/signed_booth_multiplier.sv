// signed_booth_multiplier: exact signed N x M radix-4 Booth multiplier.
//
// The multiplier b is cut into M/2 overlapping triplets
// {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0), each a Booth digit in -2..+2.
// Row i (pp_row_area or pp_row_delay, chosen by VARIANT) turns digit_i*a
// into an unsigned N+3-bit value with sign-extension constants folded in;
// the rows, placed at offset 2i, are summed modulo 2^(N+M) by pp_summation
// (4:2 compressor levels, then a carry-chain adder), where the constants
// cancel and p = a * b as (N+M)-bit two's complement.
// Operands and product are two's complement. Purely combinational: the
// result is valid one propagation delay after a or b change.
// M must be even and N at least 4.
module signed_booth_multiplier
  import booth_pkg::*;
#(
  parameter int unsigned  N       = 8,
  parameter int unsigned  M       = 8,
  parameter ppg_variant_e VARIANT = PPG_AREA
) (
  input  logic [N-1:0]   a,   // signed multiplicand
  input  logic [M-1:0]   b,   // signed multiplier
  output logic [N+M-1:0] p    // signed product
);

  localparam int unsigned R = M / 2;
  localparam int unsigned W = N + M;

  logic [M:0]           bx;             // b with b[-1] = 0 appended
  logic [R-1:0][W-1:0]  rows;

  assign bx = {b, 1'b0};

  for (genvar i = 0; i < R; i++) begin : g_row
    logic [N+2:0]       row;

    if (VARIANT == PPG_DELAY) begin : g_delay
      pp_row_delay #(.N(N), .FIRST(i == 0)) u_row (
        .a(a), .trip(bx[2*i +: 3]), .row(row));
    end else begin : g_area
      pp_row_area #(.N(N), .FIRST(i == 0)) u_row (
        .a(a), .trip(bx[2*i +: 3]), .row(row));
    end

    // place the row at column 2i; bits above the product width are dropped
    assign rows[i] = W'((W+N+3)'(row) << (2*i));
  end

  pp_summation #(.ROWS(R), .W(W)) u_sum (.rows(rows), .sum(p));

  initial begin
    assert (M % 2 == 0) else $error("M must be even");
    assert (N >= 4)     else $error("N must be at least 4");
  end

endmodule
