// tb_moma_dim1_adder: self-checking test of the augmented diminished-1 adder.
// The weighted result must equal |F + G + 1|_{2^N+1}, with bit N set exactly when
// F and G are bitwise complementary. Exhaustive for N = 4 (also N = 5, a width that
// is not a power of two), random plus every complementary-pair boundary for N = 16.
// The worked example's F = 0101, G = 0100 must give 01010.
module tb_moma_dim1_adder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_top = 0;   // cases with result 2^N

  logic [3:0]  f4, g4;   logic [4:0]  r4;
  logic [4:0]  f5, g5;   logic [5:0]  r5;
  logic [15:0] f16, g16; logic [16:0] r16;

  moma_dim1_adder #(.N(4))  dut4  (.f(f4),  .g(g4),  .r(r4));
  moma_dim1_adder #(.N(5))  dut5  (.f(f5),  .g(g5),  .r(r5));
  moma_dim1_adder #(.N(16)) dut16 (.f(f16), .g(g16), .r(r16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    f4 = '0; g4 = '0; f5 = '0; g5 = '0; f16 = '0; g16 = '0;
    f4 = 4'b0101; g4 = 4'b0100;
    @(posedge clk);
    check(r4 == 5'b01010, $sformatf("example r=%b", r4));
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        f4 = 4'(a); g4 = 4'(b); f5 = 5'(a); g5 = 5'(b);
        @(posedge clk);
        if (a < 16 && b < 16) begin
          check(int'(r4) == (a + b + 1) % 17, $sformatf("N=4 %0d %0d -> %0d", a, b, r4));
          if (r4[4]) n_top++;
        end
        check(int'(r5) == (a + b + 1) % 33, $sformatf("N=5 %0d %0d -> %0d", a, b, r5));
      end
    for (int t = 0; t < 3000; t++) begin
      longint unsigned a, b;
      a = longint'($urandom_range(65535, 0));
      b = (t % 3 == 0) ? (65535 - a) : longint'($urandom_range(65535, 0));
      f16 = 16'(a); g16 = 16'(b);
      @(posedge clk);
      check(longint'(r16) == (a + b + 1) % 65537, $sformatf("N=16 %0d %0d -> %0d", a, b, r16));
      if (r16[16]) n_top++;
    end
    check(n_top > 0, "result 2^N never produced");
    $display("result 2^N produced %0d times", n_top);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
