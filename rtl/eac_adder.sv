// Final result forming adder: W-bit end-around-carry adder.
//
// Adds x and y modulo 2^W-1, which is both 1's complement addition and
// modulo 2^W-1 addition: the carry out of the top bit is added back in at
// bit 0. Built here in the simplest way that gives that function, a binary
// adder followed by an incrementer on the carry; faster parallel-prefix
// end-around-carry adders are drop-in replacements. The second addition
// cannot overflow: if the first one carried, its low W bits are at most
// 2^W-2. With SINGLE_ZERO = 0 zero keeps both its forms: an exact sum of
// 2^W-1 comes out as all ones (the negative zero), as in a plain 1's
// complement adder. With SINGLE_ZERO = 1 an all-ones result is replaced by
// all zeros, the single-zero adder that a floating-point datapath needs;
// the way this is done (a W-input AND and a row of AND gates after the
// sum) is this implementation's choice. Purely combinational.
module eac_adder #(
  parameter int unsigned W           = 15,
  parameter bit          SINGLE_ZERO = 1'b0  // map -0 (all ones) to +0
) (
  input  logic [W-1:0] x_i,
  input  logic [W-1:0] y_i,
  output logic [W-1:0] sum_o,
  output logic         eac_o   // an end-around carry was added (for observation)
);

  logic [W:0]   raw;
  logic [W-1:0] eac_sum;

  always_comb begin
    raw     = {1'b0, x_i} + {1'b0, y_i};
    eac_o   = raw[W];
    eac_sum = raw[W-1:0] + W'(raw[W]);
    if (SINGLE_ZERO && (&eac_sum)) sum_o = '0;
    else                           sum_o = eac_sum;
  end

endmodule
