// Self-checking testbench for eac_csa_array in the two shapes of the 8x8
// multipliers (W = 15 with 4 partial products, W = 8 with 5) and a
// two-operand one. Random partial products; the check is that sum + carry
// equals the sum of the partial products modulo 2^W - 1, computed with
// wide integers.
module tb_eac_csa_array;

  logic [3:0][14:0] pp_a;
  logic [14:0]      s_a, c_a;
  logic [4:0][7:0]  pp_b;
  logic [7:0]       s_b, c_b;
  logic [1:0][5:0]  pp_c;
  logic [5:0]       s_c, c_c;
  int checks = 0, failures = 0;

  eac_csa_array #(.W(15), .NPP(4)) dut_a (.pp_i(pp_a), .sum_o(s_a), .carry_o(c_a));
  eac_csa_array #(.W(8),  .NPP(5)) dut_b (.pp_i(pp_b), .sum_o(s_b), .carry_o(c_b));
  eac_csa_array #(.W(6),  .NPP(2)) dut_c (.pp_i(pp_c), .sum_o(s_c), .carry_o(c_c));

  function automatic longint unsigned modm(longint unsigned v, int w);
    return v % ((64'd1 << w) - 1);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 20000; k++) begin
      longint unsigned ref_a, ref_b, ref_c;
      for (int r = 0; r < 4; r++) pp_a[r] = 15'($urandom);
      for (int r = 0; r < 5; r++) pp_b[r] = 8'($urandom);
      for (int r = 0; r < 2; r++) pp_c[r] = 6'($urandom);
      if (k % 5 == 0) begin  // all-ones words force carries out of the top
        pp_a[0] = '1; pp_a[1] = '1; pp_b[0] = '1; pp_b[1] = '1; pp_c[0] = '1;
      end
      #1;
      ref_a = 0; ref_b = 0; ref_c = 0;
      for (int r = 0; r < 4; r++) ref_a += longint'(pp_a[r]);
      for (int r = 0; r < 5; r++) ref_b += longint'(pp_b[r]);
      for (int r = 0; r < 2; r++) ref_c += longint'(pp_c[r]);
      checks++;
      if (modm(longint'(s_a) + longint'(c_a), 15) != modm(ref_a, 15)) begin
        failures++;
        $display("FAIL W=15 k=%0d", k);
      end
      checks++;
      if (modm(longint'(s_b) + longint'(c_b), 8) != modm(ref_b, 8)) begin
        failures++;
        $display("FAIL W=8 k=%0d", k);
      end
      checks++;
      if (modm(longint'(s_c) + longint'(c_c), 6) != modm(ref_c, 6)) begin
        failures++;
        $display("FAIL W=6 k=%0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
