// Top level: the two radix-4 modified Booth multipliers side by side.
//
// - ones_*: an N_ONES x N_ONES 1's complement multiplier (ones_comp_booth_mult)
//   giving a (2*N_ONES-1)-bit 1's complement product, the core meant for
//   floating-point mantissa multiplication.
// - mod_*:  an N_MOD-bit modulo 2^N_MOD-1 multiplier (mod2n1_booth_mult),
//   the 2^n-1 channel of a residue number system (modulo 255 by default).
//
// Both are built from the same three parts, the Booth encoder, the Booth
// selector and an end-around-carry carry-save array followed by an
// end-around-carry adder, and differ only in how the selectors are wired to
// the multiplicand (shift with sign fill against rotation). The two units
// are independent; they share only clk and rst_n.
//
// Timing: with PIPELINE = 1 (the default here) each unit registers its
// carry-save vectors before the final adder, so a result and its out_valid
// appear one clk after the operands and in_valid, and a new operation can
// be started every clk. With PIPELINE = 0 both units are combinational.
// rst_n is an asynchronous active-low reset of the pipeline registers.
module booth_mult_top #(
  parameter int unsigned N_ONES   = 8,
  parameter int unsigned N_MOD    = 8,
  parameter bit          PIPELINE = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  // 1's complement multiplier
  input  logic                ones_in_valid,
  input  logic [N_ONES-1:0]   ones_a,
  input  logic [N_ONES-1:0]   ones_b,
  output logic                ones_out_valid,
  output logic [2*N_ONES-2:0] ones_p,
  // modulo 2^N_MOD-1 multiplier
  input  logic                mod_in_valid,
  input  logic [N_MOD-1:0]    mod_a,
  input  logic [N_MOD-1:0]    mod_b,
  output logic                mod_out_valid,
  output logic [N_MOD-1:0]    mod_p
);

  ones_comp_booth_mult #(.N(N_ONES), .PIPELINE(PIPELINE)) u_ones (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (ones_in_valid),
    .a        (ones_a),
    .b        (ones_b),
    .out_valid(ones_out_valid),
    .p        (ones_p)
  );

  mod2n1_booth_mult #(.N(N_MOD), .PIPELINE(PIPELINE)) u_mod (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (mod_in_valid),
    .a        (mod_a),
    .b        (mod_b),
    .out_valid(mod_out_valid),
    .p        (mod_p)
  );

endmodule
