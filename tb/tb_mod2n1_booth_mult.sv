// Self-checking testbench for mod2n1_booth_mult.
//
// Combinational instances for the moduli 2^4-1, 2^5-1, 2^8-1, 2^16-1 and
// 2^32-1: the first three exhaustively (including the all-ones form of
// zero as an operand), the others with random and corner operands. The
// expected residue is (a*b) mod (2^N-1) in 64-bit integers; a zero result
// is accepted in either form. A PIPELINE = 1 instance (modulo 255) is then
// driven with a new operation every clock and checked to deliver each
// product exactly one clock later.
module tb_mod2n1_booth_mult;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;

  logic [3:0]  a4,  b4,  p4;
  logic [4:0]  a5,  b5,  p5;
  logic [7:0]  a8,  b8,  p8;
  logic [15:0] a16, b16, p16;
  logic [31:0] a32, b32, p32;
  logic v4, v5, v8, v16, v32;

  mod2n1_booth_mult #(.N(4))  dut4  (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a4),  .b(b4),  .out_valid(v4),  .p(p4));
  mod2n1_booth_mult #(.N(5))  dut5  (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a5),  .b(b5),  .out_valid(v5),  .p(p5));
  mod2n1_booth_mult           dut8  (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a8),  .b(b8),  .out_valid(v8),  .p(p8));
  mod2n1_booth_mult #(.N(16)) dut16 (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a16), .b(b16), .out_valid(v16), .p(p16));
  mod2n1_booth_mult #(.N(32)) dut32 (.clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a32), .b(b32), .out_valid(v32), .p(p32));

  logic       pin_v, pout_v;
  logic [7:0] pa, pb, pp;
  mod2n1_booth_mult #(.N(8), .PIPELINE(1'b1)) dutp (
    .clk(clk), .rst_n(rst_n), .in_valid(pin_v), .a(pa), .b(pb), .out_valid(pout_v), .p(pp));

  always #5 clk = ~clk;

  task automatic check(string tag, longint unsigned a, longint unsigned b,
                       longint unsigned p, int n);
    longint unsigned m;
    m = (64'd1 << n) - 1;
    checks++;
    if ((p % m) != ((a % m) * (b % m)) % m || p > m) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d * %0d gave %0d", tag, a, b, p);
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
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        a4 = 4'(x); b4 = 4'(y);
        a5 = 5'(x); b5 = 5'(y);
        #1;
        check("N=8", a8, b8, p8, 8);
        if (x < 16 && y < 16) check("N=4", a4, b4, p4, 4);
        if (x < 32 && y < 32) check("N=5", a5, b5, p5, 5);
      end
    for (int k = 0; k < 30000; k++) begin
      case (k % 10)
        0: begin a16 = 16'hfffe; b16 = 16'hfffe; a32 = 32'hffff_fffe; b32 = 32'hffff_fffe; end
        1: begin a16 = 16'hffff; b16 = 16'($urandom); a32 = '1; b32 = $urandom; end
        2: begin a16 = 16'haaaa; b16 = 16'h5555; a32 = 32'haaaa_aaaa; b32 = 32'h5555_5555; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); a32 = $urandom; b32 = $urandom; end
      endcase
      #1;
      check("N=16", a16, b16, p16, 16);
      check("N=32", a32, b32, p32, 32);
    end
    checks++;
    if (!(v4 && v5 && v8 && v16 && v32)) begin
      failures++;
      $display("FAIL combinational out_valid");
    end

    @(negedge clk);
    rst_n = 1'b1;
    begin
      logic [7:0] qa[$], qb[$];
      int got = 0;
      for (int cyc = 0; cyc < 3000; cyc++) begin
        @(negedge clk);
        if (pout_v) begin
          logic [7:0] ea, eb;
          checks++;
          if (qa.size() != 1) begin
            failures++;
            $display("FAIL pipelined result with %0d operations in flight", qa.size());
          end
          ea = qa.pop_front(); eb = qb.pop_front();
          check("pipe", ea, eb, pp, 8);
          got++;
        end else begin
          checks++;
          if (qa.size() != 0) begin
            failures++;
            $display("FAIL pipelined result missing");
            void'(qa.pop_front()); void'(qb.pop_front());
          end
        end
        pin_v = ($urandom % 8) != 0;
        pa = 8'($urandom); pb = 8'($urandom);
        if (pin_v) begin qa.push_back(pa); qb.push_back(pb); end
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
