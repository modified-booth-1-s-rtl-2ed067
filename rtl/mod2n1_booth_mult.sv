// Modulo 2^N-1 radix-4 modified Booth multiplier (modulo 255 for N = 8).
//
// a and b are N-bit residues modulo 2^N-1 (all ones is a second form of
// zero, and is accepted as such). p = a*b modulo 2^N-1, again with zero in
// either form.
//
// How it works. b is made a positive signed number by a leading zero and
// recoded into N/2+1 radix-4 digits b(2i-1) + b(2i) - 2*b(2i+1), with
// b(-1) = b(N) = b(N+1) = 0, by booth_encoder. Because 2^N = 1 modulo
// 2^N-1, multiplying a residue by 2^k is a left rotation by k mod N, and
// negation is a bitwise complement. So the partial product of digit i is a
// rotated left by 2i (1x) or 2i+1 (2x), complemented when the digit is
// negative: one booth_selector per bit, N bits per partial product and no
// sign extension. The partial products are reduced by eac_csa_array with
// W = N (each carry out of the top column wraps round to column 0) and
// summed by the end-around-carry adder eac_adder.
//
// Timing. PIPELINE = 0: combinational, out_valid = in_valid, clk and rst_n
// unused. PIPELINE = 1: the two N-bit vectors leaving the array are
// registered on the rising edge of clk (asynchronous active-low reset
// rst_n) and the result appears one clock later, one operation per clock.
// Recoding, rotation, array and adder follow the design; the pipeline
// option, valid signal and reset are this implementation's own.
module mod2n1_booth_mult
  import booth_pkg::*;
#(
  parameter int unsigned N        = 8,   // residue width, modulus 2^N-1
  parameter bit          PIPELINE = 1'b0 // register before the final adder
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [N-1:0] p
);

  localparam int unsigned G = mod_num_digits(N);

  // bx[k+1] = b(k) for k = -1 .. 2G-1, zero outside 0 .. N-1.
  logic [2*G:0] bx;

  always_comb begin
    for (int k = 0; k <= 2 * G; k++)
      bx[k] = (k >= 1 && k <= N) ? b[k-1] : 1'b0;
  end

  booth_digit_t [G-1:0] dig;
  logic [G-1:0][N-1:0]  pp;

  for (genvar i = 0; i < G; i++) begin : g_digit
    booth_encoder u_enc (
      .b_hi (bx[2*i+2]),
      .b_mid(bx[2*i+1]),
      .b_lo (bx[2*i]),
      .dig  (dig[i])
    );
    // Column j of digit i takes a((j-2i) mod N) for 1x, a((j-2i-1) mod N)
    // for 2x.
    for (genvar j = 0; j < N; j++) begin : g_bit
      localparam int unsigned J1 = (j + N * (2 * G) - 2 * i) % N;
      localparam int unsigned J2 = (j + N * (2 * G) - 2 * i - 1) % N;
      booth_selector u_sel (
        .a_i  (a[J1]),
        .a_im1(a[J2]),
        .dig  (dig[i]),
        .pp   (pp[i][j])
      );
    end
  end

  logic [N-1:0] csa_sum, csa_carry;

  eac_csa_array #(.W(N), .NPP(G)) u_array (
    .pp_i   (pp),
    .sum_o  (csa_sum),
    .carry_o(csa_carry)
  );

  logic [N-1:0] fa_x, fa_y;

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

  eac_adder #(.W(N)) u_final (
    .x_i  (fa_x),
    .y_i  (fa_y),
    .sum_o(p),
    .eac_o(final_eac)
  );

endmodule
