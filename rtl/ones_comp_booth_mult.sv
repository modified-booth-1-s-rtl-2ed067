// N x N 1's complement radix-4 modified Booth multiplier.
//
// Operands a and b are N-bit 1's complement numbers (bit N-1 is the sign,
// value range -(2^(N-1)-1) .. +(2^(N-1)-1)). The product p is a (2N-1)-bit
// 1's complement number, wide enough for every product. A zero product may
// come out as either all zeros or all ones, unless SINGLE_ZERO = 1 selects
// a final adder that always returns all zeros (for use inside a
// floating-point multiplier).
//
// How it works. In 1's complement the sign bit of b weighs -(2^(N-1)-1), so
// b = sum_i 4^i * (b(2i-1) + b(2i) - 2*b(2i+1)) with b(-1) = b(N-1) and, for
// odd N, b(N) = b(N-1): the sign bit re-enters the lowest digit instead of
// being added as a separate +1. Each digit is recoded by a booth_encoder.
// Each partial product A*digit*4^i is formed without any adder: multiplying
// a 1's complement number by 2^k is a left shift that fills the k vacated low
// bits with copies of the sign bit, the upper bits are sign-extended up to
// 2N-1 bits, and a negative digit just complements the word. One
// booth_selector per product bit picks the 1x or 2x bit. The partial
// products are reduced by eac_csa_array (carries wrap round, since
// arithmetic is modulo 2^(2N-1)-1) and summed by the end-around-carry adder
// eac_adder. No correction terms are needed anywhere, so every row of the
// array is the same.
//
// Timing. PIPELINE = 0: fully combinational, out_valid = in_valid, p follows
// a and b; clk and rst_n are unused. PIPELINE = 1: the sum and carry vectors
// of the array (2*(2N-1) bits, 30 for N = 8) are registered on the rising
// edge of clk and the final adder works on the registered vectors, so p and
// out_valid appear one clock after in_valid/a/b were sampled, with a new
// operation accepted every clock. rst_n is an asynchronous active-low reset
// of the pipeline register. The digit recoding, partial products, array and
// the register position before the final adder follow the design; the
// PIPELINE switch, valid signal and reset are this implementation's own.
module ones_comp_booth_mult
  import booth_pkg::*;
#(
  parameter int unsigned N           = 8,    // operand width including sign
  parameter bit          PIPELINE    = 1'b0, // register before the final adder
  parameter bit          SINGLE_ZERO = 1'b0  // final adder never returns -0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           out_valid,
  output logic [2*N-2:0] p
);

  localparam int unsigned W   = 2 * N - 1;          // product width
  localparam int unsigned G   = ones_num_digits(N); // number of digits
  localparam int unsigned OFF = 2 * G;              // low sign fill of ax

  // bx[k+1] = b(k) for k = -1 .. 2G-1, sign-filled at both ends.
  logic [2*G:0] bx;
  // ax[m] = a(m-OFF), sign-filled below bit 0 and above bit N-1.
  logic [W+OFF-1:0] ax;

  always_comb begin
    for (int k = 0; k <= 2 * G; k++)
      bx[k] = (k >= 1 && k <= N) ? b[k-1] : b[N-1];
    for (int m = 0; m < W + OFF; m++)
      ax[m] = (m >= OFF && m < OFF + N) ? a[m-OFF] : a[N-1];
  end

  booth_digit_t [G-1:0]     dig;
  logic [G-1:0][W-1:0]      pp;

  for (genvar i = 0; i < G; i++) begin : g_digit
    booth_encoder u_enc (
      .b_hi (bx[2*i+2]),
      .b_mid(bx[2*i+1]),
      .b_lo (bx[2*i]),
      .dig  (dig[i])
    );
    // Column j of digit i takes a(j-2i) for 1x and a(j-2i-1) for 2x.
    for (genvar j = 0; j < W; j++) begin : g_bit
      booth_selector u_sel (
        .a_i  (ax[j-2*i+OFF]),
        .a_im1(ax[j-2*i-1+OFF]),
        .dig  (dig[i]),
        .pp   (pp[i][j])
      );
    end
  end

  logic [W-1:0] csa_sum, csa_carry;

  if (G >= 2) begin : g_array
    eac_csa_array #(.W(W), .NPP(G)) u_array (
      .pp_i   (pp),
      .sum_o  (csa_sum),
      .carry_o(csa_carry)
    );
  end else begin : g_single
    // N = 1 or 2: a single digit, nothing to reduce.
    assign csa_sum   = pp[0];
    assign csa_carry = '0;
  end

  logic [W-1:0] fa_x, fa_y;

  if (PIPELINE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        fa_x      <= '0;
        fa_y      <= '0;
        out_valid <= 1'b0;
      end else begin
        fa_x      <= csa_sum;
        fa_y      <= csa_carry;
        out_valid <= in_valid;
      end
    end
  end else begin : g_comb
    assign fa_x      = csa_sum;
    assign fa_y      = csa_carry;
    assign out_valid = in_valid;
  end

  logic final_eac;  // end-around carry of the final adder, observation only

  eac_adder #(.W(W), .SINGLE_ZERO(SINGLE_ZERO)) u_final (
    .x_i  (fa_x),
    .y_i  (fa_y),
    .sum_o(p),
    .eac_o(final_eac)
  );

endmodule
