// tb_moma_sizes: runs the MOMA at the nine sizes of the area/delay evaluation,
// k = 4, 8, 12 operands of n = 4, 8, 16 bits, plus two odd operand counts
// (k = 5, n = 4 and k = 3, n = 2) whose last operand is paired with zero.
// Each size gets random operand sets biased towards 0 and 2^n, the all-2^n set and
// a set summing to 2^n; results are compared with the integer sum modulo 2^n+1.
// Each size must produce a result of 2^n at least once.
module tb_moma_sizes;

  localparam int NCFG = 11;
  localparam int CFG_K [NCFG] = '{4, 8, 12, 4, 8, 12, 4, 8, 12, 5, 3};
  localparam int CFG_N [NCFG] = '{4, 4, 4, 8, 8, 8, 16, 16, 16, 4, 2};
  localparam int TRIALS = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done = 0;
  int n_top [NCFG];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int K = CFG_K[c];
    localparam int N = CFG_N[c];
    localparam longint unsigned M = (longint'(1) << N) + 1;

    logic [N:0] x [K];
    logic [N:0] s;

    moma #(.N(N), .K(K)) dut (.x(x), .s(s));

    initial begin
      longint unsigned sum, v;
      n_top[c] = 0;
      foreach (x[i]) x[i] = '0;
      for (int t = 0; t < TRIALS; t++) begin
        sum = 0;
        foreach (x[i]) begin
          if (t == 0) v = longint'(1) << N;                       // all operands 2^n
          else if (t == 1) v = (i == 0) ? (longint'(1) << N) : 0; // sum is 2^n
          else case ($urandom_range(3, 0))
            0: v = 0;
            1: v = longint'(1) << N;
            default: v = {$urandom, $urandom} % M;
          endcase
          x[i] = (N+1)'(v);
          sum += v;
        end
        @(posedge clk);
        check(longint'(s) == sum % M, $sformatf("k=%0d n=%0d sum=%0d got %0d", K, N, sum, s));
        if (s[N]) n_top[c]++;
      end
      check(n_top[c] > 0, $sformatf("k=%0d n=%0d never gave 2^n", K, N));
      done++;
    end
  end

  initial begin
    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (TRIALS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
