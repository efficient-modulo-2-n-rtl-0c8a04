// tb_moma_eac_tree: self-checking test of the inverted-EAC carry-save Dadda tree.
// Feeds random rows and checks |F + G|_{2^N+1} = |sum(rows) + ROWS - 2|_{2^N+1}
// (one +1 per carry-save adder). Sizes: 7 rows of 4 bits (the MOMA(6, 17) tree),
// 13 rows of 8 bits and 25 rows of 16 bits (MOMA(12, 2^n+1) trees), 3 rows (a single
// adder) and 2 rows (no adder). Also checks the number of tree levels against the
// minimum CSA depth for those heights.
module tb_moma_eac_tree;
  import moma_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]  ra [7];   logic [3:0]  fa, ga;
  logic [7:0]  rb [13];  logic [7:0]  fb, gb;
  logic [15:0] rc [25];  logic [15:0] fc, gc;
  logic [5:0]  rd [3];   logic [5:0]  fd, gd;
  logic [5:0]  re [2];   logic [5:0]  fe, ge;

  moma_eac_tree #(.N(4),  .ROWS(7))  dut_a (.rows(ra), .f(fa), .g(ga));
  moma_eac_tree #(.N(8),  .ROWS(13)) dut_b (.rows(rb), .f(fb), .g(gb));
  moma_eac_tree #(.N(16), .ROWS(25)) dut_c (.rows(rc), .f(fc), .g(gc));
  moma_eac_tree #(.N(6),  .ROWS(3))  dut_d (.rows(rd), .f(fd), .g(gd));
  moma_eac_tree #(.N(6),  .ROWS(2))  dut_e (.rows(re), .f(fe), .g(ge));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint unsigned sa, sb, sc, sd, se;
    foreach (ra[i]) ra[i] = '0;
    foreach (rb[i]) rb[i] = '0;
    foreach (rc[i]) rc[i] = '0;
    foreach (rd[i]) rd[i] = '0;
    foreach (re[i]) re[i] = '0;
    // minimum CSA-tree depths theta(h)
    check(tree_stages(3) == 1 && tree_stages(4) == 2 && tree_stages(6) == 3 &&
          tree_stages(7) == 4 && tree_stages(9) == 4 && tree_stages(13) == 5 &&
          tree_stages(19) == 6 && tree_stages(25) == 7, "tree depth");
    for (int t = 0; t < 3000; t++) begin
      sa = 0; sb = 0; sc = 0; sd = 0; se = 0;
      foreach (ra[i]) begin ra[i] = (t == 0) ? '1 : 4'($urandom);  sa += ra[i]; end
      foreach (rb[i]) begin rb[i] = (t == 0) ? '1 : 8'($urandom);  sb += rb[i]; end
      foreach (rc[i]) begin rc[i] = (t == 0) ? '1 : 16'($urandom); sc += rc[i]; end
      foreach (rd[i]) begin rd[i] = 6'($urandom); sd += rd[i]; end
      foreach (re[i]) begin re[i] = 6'($urandom); se += re[i]; end
      @(posedge clk);
      check((longint'(fa) + ga) % 17 == (sa + 5) % 17, "7x4");
      check((longint'(fb) + gb) % 257 == (sb + 11) % 257, "13x8");
      check((longint'(fc) + gc) % 65537 == (sc + 23) % 65537, "25x16");
      check((longint'(fd) + gd) % 65 == (sd + 1) % 65, "3x6");
      check((longint'(fe) + ge) % 65 == se % 65, "2x6");
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
