// Self-checking testbench for booth_selector: every input combination that
// the encoder can produce, against the selection rule of the recoding table
// (0 -> Sign, 1x -> a_i, 2x -> a_(i-1), complemented for negative digits).
module tb_booth_selector;
  import booth_pkg::*;

  logic         a_i, a_im1, pp;
  booth_digit_t dig;
  int checks = 0, failures = 0;

  booth_selector dut (.a_i(a_i), .a_im1(a_im1), .dig(dig), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 32; t++) begin
      logic sel, exp_pp;
      {a_i, a_im1, dig.one, dig.two, dig.neg} = 5'(t);
      if (dig.one && dig.two) continue;  // never produced by the encoder
      #1;
      if (dig.one)      sel = a_i;
      else if (dig.two) sel = a_im1;
      else              sel = 1'b0;
      exp_pp = dig.neg ? ~sel : sel;
      checks++;
      if (pp !== exp_pp) begin
        failures++;
        $display("FAIL a_i=%b a_im1=%b one=%b two=%b neg=%b pp=%b", a_i, a_im1,
                 dig.one, dig.two, dig.neg, pp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
