// Shared types for the radix-4 (modified) Booth multipliers.
//
// The Booth encoder and the Booth selectors talk over a 3-bit bus: "one"
// selects the multiplicand once (1x), "two" selects it shifted by one place
// (2x), and "neg" (the Sign line) complements the selected word. With neither
// one nor two set the selector emits all Sign bits, which in 1's complement
// and in modulo 2^n-1 arithmetic is a zero either way (all 0s or all 1s).
// The three-wire bus follows the encoder/selector pair of the design; the
// packed struct is this implementation's way of carrying it.
package booth_pkg;

  typedef struct packed {
    logic one;  // select A   (digit magnitude 1)
    logic two;  // select 2A  (digit magnitude 2)
    logic neg;  // complement the selected word (negative digit)
  } booth_digit_t;

  // Number of radix-4 digits of an N-bit 1's complement multiplier: the
  // sign bit b(N-1) is folded into the top digit and also enters the lowest
  // digit as b(-1).
  function automatic int unsigned ones_num_digits(int unsigned n);
    return (n + 1) / 2;
  endfunction

  // Number of radix-4 digits of an N-bit unsigned modulo 2^N-1 multiplier,
  // which is first given a leading zero (N+1 bits).
  function automatic int unsigned mod_num_digits(int unsigned n);
    return n / 2 + 1;
  endfunction

endpackage
