// tb_moma: end-to-end test of the weighted MOMA at its default size, MOMA(6, 17).
// First applies the worked example X = (4, 12, 16, 4, 16, 9), whose result is
// |61|_17 = 10, and checks the translator outputs, the correction vector and the
// final addends on the way. Then applies random operand sets, biased towards the
// corner values 0 and 2^N, and compares the result with the sum of the operands
// taken modulo 2^N+1 in integer arithmetic.
// Mechanisms counted, each of which must occur at least once:
//   pairs where one top bit is set (s_n = 1), pairs with both top bits set
//   (c_n = 1), final results equal to 2^N (F, G complementary), results equal to 0,
//   and inverted end-around carries re-entered as 0 and as 1 in the tree.
module tb_moma;

  localparam int N = 4;
  localparam int K = 6;
  localparam int M = (1 << N) + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_one_top = 0, n_both_top = 0, n_res_top = 0, n_res_zero = 0;
  int n_eac0 = 0, n_eac1 = 0;

  logic [N:0] x [K];
  logic [N:0] s;

  moma dut (.x(x), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // carry vectors leaving the tree's carry-save adders: bit 0 is the re-entered carry
  task automatic count_eac();
    if (dut.u_tree.g_stage[0].g_csa[0].u_csa.c[0]) n_eac1++; else n_eac0++;
    if (dut.u_tree.g_stage[1].g_csa[0].u_csa.c[0]) n_eac1++; else n_eac0++;
    if (dut.u_tree.g_stage[3].g_csa[0].u_csa.c[0]) n_eac1++; else n_eac0++;
  endtask

  initial begin
    int sum;
    foreach (x[i]) x[i] = '0;
    // worked example
    x[0] = 5'd4; x[1] = 5'd12; x[2] = 5'd16; x[3] = 5'd4; x[4] = 5'd16; x[5] = 5'd9;
    @(posedge clk);
    check(s == 5'd10, $sformatf("example result %0d", s));
    check(dut.g_pair[0].u_tr.u == 4'b0111 && dut.g_pair[0].u_tr.y == 4'b1000, "example U1/Y1");
    check(dut.g_pair[1].u_tr.u == 4'b1010 && dut.g_pair[1].u_tr.y == 4'b1001, "example U2/Y2");
    check(dut.g_pair[2].u_tr.u == 4'b0111 && dut.g_pair[2].u_tr.y == 4'b0000, "example U3/Y3");
    check(dut.rows[6] == 4'b1110, "example COR");
    check((dut.f == 4'b0101 && dut.g == 4'b0100) || (dut.f == 4'b0100 && dut.g == 4'b0101),
          "example F/G");
    $display("example: F=%b G=%b result=%b", dut.f, dut.g, s);
    // random operand sets
    for (int t = 0; t < 20000; t++) begin
      sum = 0;
      foreach (x[i]) begin
        int v;
        case ($urandom_range(3, 0))
          0: v = 0;
          1: v = 1 << N;
          default: v = int'($urandom_range(1 << N, 0));
        endcase
        // every 50th set: only X_1 = 2^N (result 2^N); every 50th + 25: all 2^N
        if (t % 50 == 0) v = (i == 0) ? (1 << N) : 0;
        if (t % 50 == 25) v = 1 << N;
        x[i] = (N+1)'(v);
        sum += v;
      end
      @(posedge clk);
      check(int'(s) == sum % M, $sformatf("t=%0d sum=%0d got %0d", t, sum, s));
      for (int p = 0; p < K / 2; p++) begin
        if (x[2*p][N] && x[2*p+1][N]) n_both_top++;
        else if (x[2*p][N] || x[2*p+1][N]) n_one_top++;
      end
      if (s[N]) n_res_top++;
      if (s == '0) n_res_zero++;
      count_eac();
    end
    $display("one top bit %0d, both top bits %0d, result 2^N %0d, result 0 %0d, EAC 0/1 %0d/%0d",
             n_one_top, n_both_top, n_res_top, n_res_zero, n_eac0, n_eac1);
    check(n_one_top > 0, "no pair with one top bit");
    check(n_both_top > 0, "no pair with both top bits");
    check(n_res_top > 0, "no result 2^N");
    check(n_res_zero > 0, "no result 0");
    check(n_eac0 > 0 && n_eac1 > 0, "re-entered carry not seen at both values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
