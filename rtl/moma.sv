// moma: weighted multi-operand adder modulo 2^n+1, MOMA(K, 2^N+1).
//
// Adds K operands X_1..X_K, each in weighted form 0..2^N ((N+1) bits), and returns
// |X_1 + ... + X_K|_{2^N+1} in weighted form ((N+1) bits, 0..2^N), using a single
// carry-propagate addition:
//   1. Translators: the operands are taken in pairs (X_1,X_2), (X_3,X_4), ...; if K
//      is odd the last one is paired with 0. Each of the P = ceil(K/2) translators
//      turns its pair into two n-bit diminished vectors Y_i, U_i with
//      |X_a + X_b| = |Y_i + U_i + 1| (mod 2^N+1).
//   2. Inverted-EAC CSA Dadda tree: the 2P diminished vectors plus the constant
//      correction COR = |-P|_{2^N+1} (2P+1 rows) are reduced to F and G. The tree's
//      2P-1 adders each add 1, the translators P, so with COR = -P
//      |sum X| = |F + G + 1|.
//   3. Augmented diminished-1 adder: forms |F + G + 1| as the n low bits and flags
//      the result 2^N (F, G complementary) in the top bit.
// Row order fed to the tree: U_1, Y_1, U_2, Y_2, ..., U_P, Y_P, COR.
// Defaults are the worked MOMA(6, 17) example (K = 6, N = 4); the evaluated sizes
// k = 4, 8, 12 and n = 4, 8, 16 are reached by changing K and N.
// COR must fit in N bits, which rules out P = 1 (K = 1, 2): K >= 3 is required.
// Purely combinational, no clock or reset; result valid one propagation delay after
// the operands.
module moma
  import moma_pkg::*;
#(
  parameter int N = 4,
  parameter int K = 6
) (
  input  logic [N:0] x [K],   // operands, each 0..2^N
  output logic [N:0] s        // |sum x|_{2^N+1}, 0..2^N
);

  localparam int P    = num_pairs(K);
  localparam int ROWS = 2 * P + 1;
  localparam logic [N-1:0] COR = N'(cor_value(K, N));

  logic [N-1:0] rows [ROWS];
  logic [N-1:0] f, g;

  for (genvar i = 0; i < P; i++) begin : g_pair
    logic [N:0] op_b;
    if (2 * i + 1 < K) begin : g_full
      assign op_b = x[2*i+1];
    end else begin : g_odd
      assign op_b = '0;
    end
    moma_translator #(.N(N)) u_tr (
      .a (x[2*i]),
      .b (op_b),
      .y (rows[2*i+1]),
      .u (rows[2*i])
    );
  end

  assign rows[ROWS-1] = COR;

  moma_eac_tree #(.N(N), .ROWS(ROWS)) u_tree (
    .rows (rows),
    .f    (f),
    .g    (g)
  );

  moma_dim1_adder #(.N(N)) u_add (
    .f (f),
    .g (g),
    .r (s)
  );

  if (K < 3) begin : g_bad_k
    $error("moma: K must be at least 3 (COR = 2^N does not fit in N bits)");
  end
  if (N < 2 || N > 62) begin : g_bad_n
    $error("moma: N must be between 2 and 62");
  end
  if ((P % ((1 << N) + 1)) == 1) begin : g_bad_cor
    $error("moma: ceil(K/2) = 1 mod 2^N+1 gives COR = 2^N, which does not fit in N bits");
  end

endmodule
