// Self-checking testbench for ones_comp_booth_mult.
//
// Combinational instances at the operand lengths 4, 8, 16 and 32 (and 5,
// an odd width): 4, 5 and 8 bits exhaustively, 16 and 32 bits with random
// and corner operands. The expected product is computed from the integer
// values of the 1's complement operands; a zero product is accepted as all
// zeros or all ones, except from an N = 8 SINGLE_ZERO = 1 instance, which
// must never return all ones. A PIPELINE = 1 instance (N = 8) is then driven with a
// new operation every clock and checked to deliver each product exactly one
// clock later.
module tb_ones_comp_booth_mult;

  int checks = 0, failures = 0;
  int negzero_seen = 0;

  // Value of a w-bit 1's complement word.
  function automatic longint onesval(logic [63:0] v, int w);
    logic [63:0] mask;
    mask = (w == 64) ? '1 : ((64'd1 << w) - 1);
    v = v & mask;
    if (v[w-1]) return -longint'(~v & mask);
    return longint'(v);
  endfunction

  // A w-bit 1's complement word for value x (|x| < 2^(w-1)).
  function automatic logic [63:0] onesword(longint x, int w);
    logic [63:0] mask;
    mask = (w == 64) ? '1 : ((64'd1 << w) - 1);
    if (x < 0) return ~(64'(-x)) & mask;
    return 64'(x);
  endfunction

  logic clk = 1'b0, rst_n = 1'b0;

  logic [3:0]  a4,  b4;  logic [6:0]  p4;
  logic [4:0]  a5,  b5;  logic [8:0]  p5;
  logic [7:0]  a8,  b8;  logic [14:0] p8;
  logic [15:0] a16, b16; logic [30:0] p16;
  logic [31:0] a32, b32; logic [62:0] p32;
  logic v4, v5, v8, v16, v32;

  ones_comp_booth_mult #(.N(4))  dut4  (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a4),  .b(b4),  .out_valid(v4),  .p(p4));
  ones_comp_booth_mult #(.N(5))  dut5  (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a5),  .b(b5),  .out_valid(v5),  .p(p5));
  logic [14:0] pz8; logic vz8;
  ones_comp_booth_mult #(.N(8), .SINGLE_ZERO(1'b1)) dutz8 (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a8), .b(b8), .out_valid(vz8), .p(pz8));
  ones_comp_booth_mult           dut8  (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a8),  .b(b8),  .out_valid(v8),  .p(p8));
  ones_comp_booth_mult #(.N(16)) dut16 (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a16), .b(b16), .out_valid(v16), .p(p16));
  ones_comp_booth_mult #(.N(32)) dut32 (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a32), .b(b32), .out_valid(v32), .p(p32));

  // Pipelined instance.
  logic        pin_v, pout_v;
  logic [7:0]  pa, pb;
  logic [14:0] pp;
  ones_comp_booth_mult #(.N(8), .PIPELINE(1'b1)) dutp (
    .clk(clk), .rst_n(rst_n), .in_valid(pin_v), .a(pa), .b(pb), .out_valid(pout_v), .p(pp));

  always #5 clk = ~clk;

  task automatic check(string tag, logic [63:0] a, logic [63:0] b, logic [63:0] p, int n);
    longint va, vb, vp;
    va = onesval(a, n);
    vb = onesval(b, n);
    vp = onesval(p, 2 * n - 1);
    checks++;
    if (vp != va * vb) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: %0d * %0d gave %0d (0x%0h)", tag, va, vb, vp, p);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pin_v = 1'b0; pa = '0; pb = '0;
    // Exhaustive small widths.
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        a4 = 4'(x); b4 = 4'(y);
        a5 = 5'(x); b5 = 5'(y);
        #1;
        check("N=8", 64'(a8), 64'(b8), 64'(p8), 8);
        check("N=8 single zero", 64'(a8), 64'(b8), 64'(pz8), 8);
        checks++;
        if (pz8 == '1) begin
          failures++;
          $display("FAIL single zero: negative zero returned");
        end
        if (p8 == '1) negzero_seen++;
        if (x < 16 && y < 16) check("N=4", 64'(a4), 64'(b4), 64'(p4), 4);
        if (x < 32 && y < 32) check("N=5", 64'(a5), 64'(b5), 64'(p5), 5);
      end
    // Random and corner operands for the wide ones.
    for (int k = 0; k < 30000; k++) begin
      case (k % 10)
        0: begin a16 = 16'h7fff; b16 = 16'h7fff; a32 = 32'h7fffffff; b32 = 32'h8000_0000; end
        1: begin a16 = 16'h8000; b16 = 16'h8000; a32 = 32'h8000_0000; b32 = 32'h8000_0000; end
        2: begin a16 = 16'hffff; b16 = 16'($urandom); a32 = '1; b32 = $urandom; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); a32 = $urandom; b32 = $urandom; end
      endcase
      #1;
      check("N=16", 64'(a16), 64'(b16), 64'(p16), 16);
      check("N=32", 64'(a32), 64'(b32), 64'(p32), 32);
    end
    checks++;
    if (negzero_seen == 0) begin
      failures++;
      $display("FAIL the plain adder never produced a negative zero");
    end
    checks++;
    if (!(v4 && v5 && v8 && v16 && v32 && vz8)) begin
      failures++;
      $display("FAIL combinational out_valid");
    end

    // Pipelined: one operation per clock, result one clock later.
    @(negedge clk);
    rst_n = 1'b1;
    begin
      logic [7:0] qa[$], qb[$];
      int issued = 0, got = 0;
      for (int cyc = 0; cyc < 3000; cyc++) begin
        @(negedge clk);
        // Output now belongs to the operation issued one clock earlier.
        if (pout_v) begin
          logic [7:0] ea, eb;
          checks++;
          if (qa.size() != 1) begin
            failures++;
            $display("FAIL pipelined result with %0d operations in flight", qa.size());
          end
          ea = qa.pop_front(); eb = qb.pop_front();
          check("pipe", 64'(ea), 64'(eb), 64'(pp), 8);
          got++;
        end else begin
          checks++;
          if (qa.size() != 0) begin
            failures++;
            $display("FAIL pipelined result missing");
            void'(qa.pop_front()); void'(qb.pop_front());
          end
        end
        pin_v = ($urandom % 8) != 0;  // mostly back-to-back, some bubbles
        pa = 8'($urandom); pb = 8'($urandom);
        if (pin_v) begin qa.push_back(pa); qb.push_back(pb); issued++; end
      end
      checks++;
      if (got < 1000) begin
        failures++;
        $display("FAIL too few pipelined results: %0d", got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
