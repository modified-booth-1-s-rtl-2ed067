// Radix-4 modified Booth encoder for one digit.
//
// Looks at the overlapping multiplier triplet b(2i+1) b(2i) b(2i-1) and
// recodes it as the digit b(2i-1) + b(2i) - 2*b(2i+1), an element of
// {-2,-1,0,+1,+2}, expressed on the 3-bit bus of booth_pkg::booth_digit_t:
//   one = b(2i-1) xor b(2i)                 (|digit| = 1)
//   two = triplet is 011 or 100             (|digit| = 2)
//   neg = b(2i+1)                           (Sign)
// Triplet 111 thus gives neg with neither one nor two, which makes the
// selector emit all ones, the negative zero of 1's complement; 000 gives all
// zeros. The same encoder serves the 1's complement and the modulo 2^n-1
// multiplier. The boolean functions follow the recoding table and the
// encoder drawing of the design; the gate-level form is left to synthesis.
// Purely combinational.
module booth_encoder
  import booth_pkg::*;
(
  input  logic         b_hi,   // b(2i+1)
  input  logic         b_mid,  // b(2i)
  input  logic         b_lo,   // b(2i-1)
  output booth_digit_t dig
);

  always_comb begin
    dig.one = b_lo ^ b_mid;
    dig.two = ~(b_lo ^ b_mid) & (b_mid ^ b_hi);
    dig.neg = b_hi;
  end

`ifndef SYNTHESIS
  // 1x and 2x are never selected together.
  always_comb assert (!(dig.one && dig.two)) else $error("booth_encoder: 1x and 2x both set");
`endif

endmodule
