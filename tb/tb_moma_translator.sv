// tb_moma_translator: self-checking test of the weighted-to-diminished translator.
// For N = 4 every operand pair in 0..16 is applied; for N = 8 and N = 2 random and
// corner pairs. Each case checks |Y + U + 1|_{2^N+1} = |A + B|_{2^N+1}, computed
// here with plain integer arithmetic; for N = 4 and 8, Y and U are also compared
// bit for bit with an unsimplified full-adder evaluation of the translator
// equations. The three pairs of the MOMA(6, 17) worked
// example are also checked bit for bit against their published U and Y vectors.
module tb_moma_translator;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [4:0] a4, b4;  logic [3:0] y4, u4;
  logic [8:0] a8, b8;  logic [7:0] y8, u8;
  logic [2:0] a2, b2;  logic [1:0] y2, u2;

  moma_translator #(.N(4)) dut4 (.a(a4), .b(b4), .y(y4), .u(u4));
  moma_translator #(.N(8)) dut8 (.a(a8), .b(b8), .y(y8), .u(u8));
  moma_translator #(.N(2)) dut2 (.a(a2), .b(b2), .y(y2), .u(u2));

  function automatic bit congruent(input longint unsigned a, input longint unsigned b,
                                   input longint unsigned y, input longint unsigned u,
                                   input int n);
    longint unsigned m;
    m = (longint'(1) << n) + 1;
    return ((y + u + 1) % m) == ((a + b) % m);
  endfunction

  // Reference from the defining equations: D = 1..1 ~c_n ~s_n, full carry-save of
  // A_{n-1}, B_{n-1}, D, carry vector rotated with its top bit inverted.
  function automatic void ref_yu(input int a, input int b, input int n,
                                 output int y, output int u);
    int an, bn, lo_mask, d, carry;
    an = (a >> n) & 1;  bn = (b >> n) & 1;
    lo_mask = (1 << n) - 1;
    d = (lo_mask & ~3) | ((~(an & bn) & 1) << 1) | (~(an ^ bn) & 1);
    u = ((a & lo_mask) ^ (b & lo_mask) ^ d) & lo_mask;
    carry = ((a & b) | (a & d) | (b & d)) & lo_mask;
    y = ((carry << 1) & lo_mask) | (~(carry >> (n - 1)) & 1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic example(input int a, input int b, input int exp_u, input int exp_y);
    a4 = 5'(a); b4 = 5'(b);
    @(posedge clk);
    check(u4 == 4'(exp_u) && y4 == 4'(exp_y),
          $sformatf("example (%0d,%0d): U=%b Y=%b", a, b, u4, y4));
  endtask

  initial begin
    a4 = '0; b4 = '0; a8 = '0; b8 = '0; a2 = '0; b2 = '0;
    // worked example, pairs (X1,X2) (X3,X4) (X5,X6)
    example(4, 12, 4'b0111, 4'b1000);
    example(16, 4, 4'b1010, 4'b1001);
    example(16, 9, 4'b0111, 4'b0000);
    // exhaustive N = 4 and N = 2
    for (int a = 0; a <= 16; a++)
      for (int b = 0; b <= 16; b++) begin
        int ry, ru;
        a4 = 5'(a); b4 = 5'(b);
        a2 = 3'(a % 5); b2 = 3'(b % 5);
        @(posedge clk);
        check(congruent(a, b, y4, u4, 4), $sformatf("N=4 a=%0d b=%0d", a, b));
        ref_yu(a, b, 4, ry, ru);
        check(int'(y4) == ry && int'(u4) == ru, $sformatf("N=4 a=%0d b=%0d bits", a, b));
        check(congruent(a % 5, b % 5, y2, u2, 2), $sformatf("N=2 a=%0d b=%0d", a % 5, b % 5));
      end
    // N = 8: corners and random
    for (int t = 0; t < 2000; t++) begin
      int a, b, ry, ru;
      if (t < 4) begin
        a = (t & 1) ? 256 : 0;
        b = (t & 2) ? 256 : 255;
      end else begin
        a = int'($urandom_range(256, 0));
        b = int'($urandom_range(256, 0));
      end
      a8 = 9'(a); b8 = 9'(b);
      @(posedge clk);
      check(congruent(a, b, y8, u8, 8), $sformatf("N=8 a=%0d b=%0d", a, b));
      ref_yu(a, b, 8, ry, ru);
      check(int'(y8) == ry && int'(u8) == ru, $sformatf("N=8 a=%0d b=%0d bits", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
