// End-to-end testbench for booth_mult_top at its default parameters (8x8
// 1's complement multiplier and modulo 255 multiplier, pipelined).
//
// Both units are fed every pair of 8-bit operands once, in a shuffled order,
// mostly back to back with occasional idle clocks. Each result must appear
// exactly one clock after its operands and match the product worked out
// from the operand values (1's complement product, or product modulo 255;
// zero accepted in either form), and must not change when new operands are
// applied between clock edges. The testbench also counts how often the
// mechanisms of the design occur: each kind of recoded digit (+-1, +-2, the
// all-ones zero digit), the end-around carry of each final adder, results
// in the negative-zero form, all-ones (zero) residues as inputs,
// back-to-back issue and idle clocks. A mechanism that never occurs counts
// as a failure.
module tb_booth_mult_top;

  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ones_in_valid, ones_out_valid, mod_in_valid, mod_out_valid;
  logic [7:0]  ones_a, ones_b, mod_a, mod_b, mod_p;
  logic [14:0] ones_p;

  booth_mult_top dut (
    .clk(clk), .rst_n(rst_n),
    .ones_in_valid(ones_in_valid), .ones_a(ones_a), .ones_b(ones_b),
    .ones_out_valid(ones_out_valid), .ones_p(ones_p),
    .mod_in_valid(mod_in_valid), .mod_a(mod_a), .mod_b(mod_b),
    .mod_out_valid(mod_out_valid), .mod_p(mod_p)
  );

  always #5 clk = ~clk;

  // Mechanism counters.
  int n_pos1, n_pos2, n_neg1, n_neg2, n_zero_pos, n_zero_neg;
  int n_eac_ones, n_eac_mod, n_negzero_ones, n_allones_mod, n_zero_in_mod;
  int n_b2b, n_bubble;

  function automatic int onesval8(logic [7:0] v);
    logic [7:0] inv;
    inv = ~v;
    return v[7] ? -int'(inv) : int'(v);
  endfunction

  function automatic int onesval15(logic [14:0] v);
    logic [14:0] inv;
    inv = ~v;
    return v[14] ? -int'(inv) : int'(v);
  endfunction

  // Count the radix-4 digits of a 1's complement multiplier, from the
  // triplets b(2i+1) b(2i) b(2i-1) with b(-1) = b(7).
  task automatic count_digits(logic [7:0] b);
    logic [8:0] bx;
    bx = {b, b[7]};
    for (int i = 0; i < 4; i++) begin
      case (bx[2*i +: 3])
        3'b000: n_zero_pos++;
        3'b111: n_zero_neg++;
        3'b001, 3'b010: n_pos1++;
        3'b011: n_pos2++;
        3'b100: n_neg2++;
        default: n_neg1++;
      endcase
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && ones_out_valid && dut.u_ones.final_eac) n_eac_ones++;
    if (rst_n && mod_out_valid && dut.u_mod.final_eac)   n_eac_mod++;
  end

  initial begin
    int perm[65536];
    logic [7:0] qoa[$], qob[$], qma[$], qmb[$];
    int idx = 0, done_ones = 0, done_mod = 0;
    bit prev_v = 0;
    {n_pos1, n_pos2, n_neg1, n_neg2, n_zero_pos, n_zero_neg} = '0;
    {n_eac_ones, n_eac_mod, n_negzero_ones, n_allones_mod, n_zero_in_mod} = '0;
    {n_b2b, n_bubble} = '0;

    for (int k = 0; k < 65536; k++) perm[k] = k;
    for (int k = 65535; k > 0; k--) begin
      int j, t;
      j = int'($urandom % (k + 1));
      t = perm[k]; perm[k] = perm[j]; perm[j] = t;
    end

    ones_in_valid = 0; mod_in_valid = 0;
    ones_a = '0; ones_b = '0; mod_a = '0; mod_b = '0;
    repeat (2) @(negedge clk);
    // Outputs must be idle in reset.
    checks++;
    if (ones_out_valid || mod_out_valid) begin
      failures++;
      $display("FAIL out_valid during reset");
    end
    rst_n = 1'b1;

    while (done_ones < 65536 || done_mod < 65536) begin
      @(negedge clk);
      // Results of the operations issued one clock earlier.
      checks++;
      if (ones_out_valid != (qoa.size() == 1) || mod_out_valid != (qma.size() == 1)) begin
        failures++;
        $display("FAIL latency: out_valid %b/%b with %0d/%0d in flight",
                 ones_out_valid, mod_out_valid, qoa.size(), qma.size());
      end
      if (ones_out_valid && qoa.size() != 0) begin
        logic [7:0] ea, eb;
        ea = qoa.pop_front(); eb = qob.pop_front();
        checks++;
        if (onesval15(ones_p) != onesval8(ea) * onesval8(eb)) begin
          failures++;
          if (failures < 20)
            $display("FAIL ones %0d * %0d gave %0d", onesval8(ea), onesval8(eb), onesval15(ones_p));
        end
        if (ones_p == '1) n_negzero_ones++;
        done_ones++;
      end
      if (mod_out_valid && qma.size() != 0) begin
        logic [7:0] ea, eb;
        ea = qma.pop_front(); eb = qmb.pop_front();
        checks++;
        if ((int'(mod_p) % 255) != ((int'(ea) * int'(eb)) % 255)) begin
          failures++;
          if (failures < 20) $display("FAIL mod %0d * %0d gave %0d", ea, eb, mod_p);
        end
        if (mod_p == '1) n_allones_mod++;
        done_mod++;
      end
      // Issue the next pair, with an idle clock now and then.
      begin
        logic [14:0] held_ones_p;
        logic [7:0]  held_mod_p;
        held_ones_p = ones_p;
        held_mod_p  = mod_p;
      if (idx < 65536 && ($urandom % 16) != 0) begin
        ones_in_valid = 1; mod_in_valid = 1;
        ones_a = 8'(perm[idx] >> 8); ones_b = 8'(perm[idx]);
        mod_a  = 8'(perm[idx]);      mod_b  = 8'(perm[idx] >> 8);
        qoa.push_back(ones_a); qob.push_back(ones_b);
        qma.push_back(mod_a);  qmb.push_back(mod_b);
        count_digits(ones_b);
        if (mod_a == 8'hff || mod_b == 8'hff) n_zero_in_mod++;
        if (prev_v) n_b2b++;
        prev_v = 1;
        idx++;
      end else begin
        ones_in_valid = 0; mod_in_valid = 0;
        ones_a = 8'($urandom); ones_b = 8'($urandom);  // must be ignored
        mod_a = 8'($urandom);  mod_b = 8'($urandom);
        if (idx < 65536) n_bubble++;
        prev_v = 0;
      end
      // The results are registered: new operands must not reach the outputs
      // before the next clock edge.
      #1;
      checks++;
      if (ones_p !== held_ones_p || mod_p !== held_mod_p) begin
        failures++;
        if (failures < 20) $display("FAIL output changed between clock edges");
      end
      end
    end

    $display("digits: +1 %0d  +2 %0d  -1 %0d  -2 %0d  0(000) %0d  0(111) %0d",
             n_pos1, n_pos2, n_neg1, n_neg2, n_zero_pos, n_zero_neg);
    $display("end-around carries: 1's complement %0d, modulo %0d", n_eac_ones, n_eac_mod);
    $display("negative-zero products %0d, all-ones residues out %0d, all-ones residues in %0d",
             n_negzero_ones, n_allones_mod, n_zero_in_mod);
    $display("back-to-back issues %0d, idle clocks %0d", n_b2b, n_bubble);
    begin
      int counts[13];
      counts = '{n_pos1, n_pos2, n_neg1, n_neg2, n_zero_pos, n_zero_neg,
                         n_eac_ones, n_eac_mod, n_negzero_ones, n_allones_mod,
                         n_zero_in_mod, n_b2b, n_bubble};
      foreach (counts[m]) begin
        checks++;
        if (counts[m] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never occurred", m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
