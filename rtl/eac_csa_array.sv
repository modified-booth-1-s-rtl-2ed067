// Partial-product addition array with end-around carries.
//
// Reduces NPP partial products of W bits each to two W-bit vectors, sum_o
// and carry_o, whose sum equals the sum of the partial products modulo
// 2^W-1. The array is a linear carry-save array, as drawn for the 8x8
// multipliers: a row of half adders adds the first two partial products,
// then each further partial product gets a row of full adders fed by the
// previous row's sum and carry vectors. Because 2^W = 1 modulo 2^W-1, the
// carry out of the top column of every row is not dropped but fed back into
// column 0 of the next row (a left rotation of the carry vector). This is
// what makes the same array serve 1's complement arithmetic (W = 2N-1) and
// modulo 2^N-1 arithmetic (W = N).
//
// Parameters: W word width, NPP number of partial products (>= 2).
// Purely combinational; the regular row structure allows registers to be
// placed between rows or after the array.
module eac_csa_array #(
  parameter int unsigned W   = 15,
  parameter int unsigned NPP = 4
) (
  input  logic [NPP-1:0][W-1:0] pp_i,
  output logic [W-1:0]          sum_o,
  output logic [W-1:0]          carry_o
);

  // Row r (r = 1 .. NPP-1) leaves sum s[r] and carry c[r].
  logic [NPP-1:1][W-1:0] s;
  logic [NPP-1:1][W-1:0] c;
  logic [NPP-1:1][W-1:0] gen;  // un-rotated carries of each row

  // Row 1: half adders.
  always_comb begin
    s[1]   = pp_i[0] ^ pp_i[1];
    gen[1] = pp_i[0] & pp_i[1];
    c[1]   = {gen[1][W-2:0], gen[1][W-1]};
  end

  // Rows 2 .. NPP-1: full adders.
  for (genvar r = 2; r < NPP; r++) begin : g_fa_row
    always_comb begin
      s[r]   = s[r-1] ^ c[r-1] ^ pp_i[r];
      gen[r] = (s[r-1] & c[r-1]) | (s[r-1] & pp_i[r]) | (c[r-1] & pp_i[r]);
      c[r]   = {gen[r][W-2:0], gen[r][W-1]};
    end
  end

  assign sum_o   = s[NPP-1];
  assign carry_o = c[NPP-1];

endmodule
