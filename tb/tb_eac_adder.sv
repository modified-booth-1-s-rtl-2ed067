// Self-checking testbench for eac_adder: W = 4 exhaustively and W = 15
// with random operands, the latter also with SINGLE_ZERO = 1 (x + ~x is
// applied often, so the negative zero occurs). The expected sum is worked out with wide integer
// arithmetic: x + y, minus 2^W - 1 if it reached 2^W (end-around carry).
module tb_eac_adder;

  logic [3:0]  x4, y4, s4;
  logic        e4;
  logic [14:0] x15, y15, s15;
  logic        e15;
  logic [14:0] sz15;
  logic        ez15;
  int checks = 0, failures = 0;
  int eac_seen = 0;

  eac_adder #(.W(4))  dut4  (.x_i(x4),  .y_i(y4),  .sum_o(s4),  .eac_o(e4));
  eac_adder #(.W(15)) dut15 (.x_i(x15), .y_i(y15), .sum_o(s15), .eac_o(e15));
  eac_adder #(.W(15), .SINGLE_ZERO(1'b1)) dutz15 (.x_i(x15), .y_i(y15), .sum_o(sz15), .eac_o(ez15));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        int t;
        x4 = 4'(x); y4 = 4'(y);
        #1;
        t = x + y;
        if (t >= 16) t = t - 15;
        checks++;
        if (int'(s4) != t || e4 != (x + y >= 16)) begin
          failures++;
          $display("FAIL W=4 %0d + %0d = %0d", x, y, s4);
        end
        if (e4) eac_seen++;
      end
    for (int k = 0; k < 20000; k++) begin
      int t;
      x15 = 15'($urandom);
      y15 = (k % 7 == 0) ? ~x15 : 15'($urandom);
      #1;
      t = int'(x15) + int'(y15);
      if (t >= 32768) t = t - 32767;
      checks++;
      if (int'(s15) != t) begin
        failures++;
        $display("FAIL W=15 %0d + %0d = %0d", x15, y15, s15);
      end
      // Single-zero variant: -0 (all ones) becomes +0, nothing else changes.
      checks++;
      if (int'(sz15) != ((t == 32767) ? 0 : t)) begin
        failures++;
        $display("FAIL W=15 single zero %0d + %0d = %0d", x15, y15, sz15);
      end
    end
    checks++;
    if (eac_seen == 0) begin
      failures++;
      $display("FAIL no end-around carry exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
