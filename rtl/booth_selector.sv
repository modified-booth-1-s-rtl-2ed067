// Booth selector: one bit of one partial product.
//
// pp = ((a_i & 1x) | (a_im1 & 2x)) xor Sign
// a_i is the multiplicand bit that lands in this column when the digit is
// +-1 and a_im1 its lower neighbour, which lands here when the digit is +-2.
// Which bits these are depends on the arithmetic: in the 1's complement
// multiplier they come from the multiplicand shifted left with sign bits
// filled in from below; in the modulo 2^n-1 multiplier from the multiplicand
// rotated left. Negation is a plain bitwise complement in both, so no "+1"
// has to be added anywhere. Function as in the selector drawing of the
// design; the gate-level form is left to synthesis. Purely combinational.
module booth_selector
  import booth_pkg::*;
(
  input  logic         a_i,    // multiplicand bit for 1x
  input  logic         a_im1,  // multiplicand bit for 2x
  input  booth_digit_t dig,
  output logic         pp
);

  always_comb pp = ((a_i & dig.one) | (a_im1 & dig.two)) ^ dig.neg;

endmodule
