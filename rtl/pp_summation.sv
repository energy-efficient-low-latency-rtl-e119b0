// pp_summation: adds ROWS aligned partial-product rows modulo 2^W.
//
// Level l holds n(l) rows, n(0) = ROWS. While more than two rows remain,
// a level splits its rows into groups of four (the last group padded with
// zero rows) and reduces each group to two with a 4:2 compressor row, so
// n(l+1) = 2*ceil(n(l)/4). When two rows remain, the carry-chain adder adds
// them; a single row passes through. For 8 rows: 8 -> 4 -> 2 -> adder; for
// 4 rows: 4 -> 2 -> adder; for 2 rows only the adder. The tree shape is this
// design's choice (4:2 compressors then a binary adder, as described).
// Combinational.
module pp_summation #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned W    = 16
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum
);

  // number of rows at level l
  function automatic int unsigned rows_at(input int unsigned l);
    int unsigned n = ROWS;
    for (int unsigned k = 0; k < l; k++)
      if (n > 2) n = 2 * ((n + 3) / 4);
    return n;
  endfunction

  // number of compressor levels
  function automatic int unsigned num_levels();
    int unsigned n = ROWS;
    int unsigned l = 0;
    while (n > 2) begin
      n = 2 * ((n + 3) / 4);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();
  localparam int unsigned PADDED = 4 * ((ROWS + 3) / 4);

  // level l uses entries 0 .. rows_at(l)-1; unused entries are zero
  logic [LEVELS:0][PADDED-1:0][W-1:0] lvl;

  for (genvar r = 0; r < PADDED; r++) begin : g_in
    assign lvl[0][r] = (r < ROWS) ? rows[(r < ROWS) ? r : 0] : '0;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned GROUPS = (rows_at(l) + 3) / 4;
    for (genvar k = 0; k < GROUPS; k++) begin : g_cmp
      compressor_4_2 #(.W(W)) u_cmp (
        .x    (lvl[l][4*k +: 4]),
        .sum  (lvl[l+1][2*k]),
        .carry(lvl[l+1][2*k+1])
      );
    end
    for (genvar r = 2 * GROUPS; r < PADDED; r++) begin : g_zero
      assign lvl[l+1][r] = '0;
    end
  end

  if (rows_at(LEVELS) == 2) begin : g_add
    carry_chain_adder #(.W(W)) u_add (
      .x(lvl[LEVELS][0]), .y(lvl[LEVELS][1]), .s(sum));
  end else begin : g_pass
    assign sum = lvl[LEVELS][0];
  end

endmodule
