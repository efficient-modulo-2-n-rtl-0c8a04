// tb_moma_eac_csa: self-checking test of one inverted end-around-carry CSA stage.
// Checks |S + C|_{2^N+1} = |x0 + x1 + x2 + 1|_{2^N+1} exhaustively for N = 4 and
// on random and all-ones vectors for N = 16, and checks that the re-entered bit 0
// of C is the complemented top carry.
module tb_moma_eac_csa;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]  p0, p1, p2, s4, c4;
  logic [15:0] q0, q1, q2, s16, c16;

  moma_eac_csa #(.N(4))  dut4  (.x0(p0), .x1(p1), .x2(p2), .s(s4),  .c(c4));
  moma_eac_csa #(.N(16)) dut16 (.x0(q0), .x1(q1), .x2(q2), .s(s16), .c(c16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    p0 = '0; p1 = '0; p2 = '0; q0 = '0; q1 = '0; q2 = '0;
    for (int i = 0; i < 4096; i++) begin
      int a, b, c, maj3;
      a = i & 15; b = (i >> 4) & 15; c = (i >> 8) & 15;
      p0 = 4'(a); p1 = 4'(b); p2 = 4'(c);
      @(posedge clk);
      check(((int'(s4) + int'(c4)) % 17) == ((a + b + c + 1) % 17),
            $sformatf("N=4 %0d+%0d+%0d", a, b, c));
      maj3 = (a & b) | (a & c) | (b & c);
      check(c4[0] == ~maj3[3], "N=4 re-entered carry");
    end
    for (int t = 0; t < 2000; t++) begin
      longint unsigned a, b, c;
      a = (t == 0) ? 65535 : longint'($urandom_range(65535, 0));
      b = (t == 0) ? 65535 : longint'($urandom_range(65535, 0));
      c = (t == 0) ? 65535 : longint'($urandom_range(65535, 0));
      q0 = 16'(a); q1 = 16'(b); q2 = 16'(c);
      @(posedge clk);
      check(((longint'(s16) + longint'(c16)) % 65537) == ((a + b + c + 1) % 65537),
            $sformatf("N=16 %0d+%0d+%0d", a, b, c));
    end
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
