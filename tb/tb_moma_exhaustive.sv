// tb_moma_exhaustive: applies every one of the 17^6 operand sets to the default
// MOMA(6, 17) and compares each result with the operand sum modulo 17. The sum is
// kept incrementally while the operands count through 0..16 like the digits of a
// base-17 number.
module tb_moma_exhaustive;

  localparam int N = 4;
  localparam int K = 6;
  localparam int M = (1 << N) + 1;
  localparam int TOTAL = M * M * M * M * M * M;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_top = 0;

  logic [N:0] x [K];
  logic [N:0] s;

  moma dut (.x(x), .s(s));

  initial begin
    int digit [K];
    int sum;
    foreach (digit[i]) digit[i] = 0;
    sum = 0;
    for (int t = 0; t < TOTAL; t++) begin
      foreach (x[i]) x[i] = (N+1)'(digit[i]);
      @(posedge clk);
      checks++;
      if (int'(s) != sum % M) begin
        failures++;
        if (failures < 10) $display("FAIL set %0d: got %0d, expected %0d", t, s, sum % M);
      end
      if (s[N]) n_top++;
      // next operand set
      for (int i = 0; i < K; i++) begin
        if (digit[i] < M - 1) begin
          digit[i]++;
          sum++;
          break;
        end
        sum -= digit[i];
        digit[i] = 0;
      end
    end
    if (n_top != TOTAL / M) begin
      failures++;
      $display("FAIL result 2^N seen %0d times, expected %0d", n_top, TOTAL / M);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (TOTAL + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
