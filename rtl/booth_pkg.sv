// booth_pkg: types shared by the radix-4 Booth multiplier.
//
// booth_ctrl_t carries the three control signals of one Booth digit, as
// produced by the Booth encoder from a multiplier triplet
// {b[m+1], b[m], b[m-1]}:
//   s - the digit has magnitude 2: select a[n-1] instead of a[n]
//   c - the digit is negative: invert the partial product and add 1
//   z - the digit is 0: force the partial product to zero
// ppg_variant_e selects how a partial-product row is generated: the
// area-optimized row (one LUT per bit on a long carry chain) or the
// delay-optimized row (three low bits and the chain carry made in LUTs so
// the carry chain is three columns shorter).
package booth_pkg;

  typedef struct packed {
    logic s;
    logic c;
    logic z;
  } booth_ctrl_t;

  typedef enum logic {
    PPG_AREA  = 1'b0,
    PPG_DELAY = 1'b1
  } ppg_variant_e;

  // Signed value (-2..+2) of a radix-4 Booth digit for the triplet
  // {b[m+1], b[m], b[m-1]}: -2*b[m+1] + b[m] + b[m-1].
  function automatic int booth_digit(input logic [2:0] trip);
    return -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
  endfunction

endpackage
