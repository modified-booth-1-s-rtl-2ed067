// Self-checking testbench for booth_encoder: all eight triplets against the
// radix-4 recoding table, digit = b(2i-1) + b(2i) - 2*b(2i+1).
module tb_booth_encoder;
  import booth_pkg::*;

  logic         b_hi, b_mid, b_lo;
  booth_digit_t dig;
  int checks = 0, failures = 0;

  booth_encoder dut (.b_hi(b_hi), .b_mid(b_mid), .b_lo(b_lo), .dig(dig));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int exp_val, got_mag;
      logic exp_one, exp_two, exp_neg;
      {b_hi, b_mid, b_lo} = 3'(t);
      #1;
      exp_val = int'(b_lo) + int'(b_mid) - 2 * int'(b_hi);
      // Expected bus from the table: magnitude 1 -> one, 2 -> two, sign = b_hi.
      exp_one = (exp_val == 1 || exp_val == -1);
      exp_two = (exp_val == 2 || exp_val == -2);
      exp_neg = b_hi;
      checks++;
      if (dig.one !== exp_one || dig.two !== exp_two || dig.neg !== exp_neg) begin
        failures++;
        $display("FAIL triplet %b: got one=%b two=%b neg=%b", 3'(t), dig.one, dig.two, dig.neg);
      end
      got_mag = dig.two ? 2 : (dig.one ? 1 : 0);
      checks++;
      if ((dig.neg ? -got_mag : got_mag) != exp_val) begin
        failures++;
        $display("FAIL triplet %b: digit value", 3'(t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
