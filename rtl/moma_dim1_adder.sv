// moma_dim1_adder: augmented diminished-1 (inverted end-around-carry) adder that
// forms the (n+1)-bit weighted result of a modulo 2^n+1 MOMA.
//
// Given the tree outputs F, G (n bits each) it returns R = |F + G + 1|_{2^n+1} in
// weighted form, 0..2^n:
//   * low n bits: F + G incremented when the integer addition F + G has no carry
//     out, left as it is otherwise (inverted end-around carry), modulo 2^n;
//   * bit n: 1 exactly when F and G are bitwise complementary (F + G = 2^n - 1),
//     the only case in which the result is 2^n. The low bits are then all zero.
// Carry computation: a Kogge-Stone parallel prefix over (generate g_i = f_i & g_i,
// propagate p_i = f_i ^ g_i) gives the group terms G[i:0], P[i:0] in ceil(log2 n)
// levels. The carry entering bit 0 is ~G[n-1:0], and one further level forms
// c_i = G[i:0] | P[i:0] & ~G[n-1:0]. Because the propagate terms are the half-sums
// (an XOR adder), the result's top bit is simply the group propagate P[n-1:0] and
// needs no extra gates. The extra carry-increment level is this design's choice of
// parallel-prefix structure.
// Purely combinational. Requires N >= 2.
module moma_dim1_adder #(
  parameter int N = 4
) (
  input  logic [N-1:0] f,
  input  logic [N-1:0] g,
  output logic [N:0]   r     // weighted result, 0..2^N
);

  localparam int L = $clog2(N);

  logic [N-1:0] gp [L+1];   // group generate, level by level
  logic [N-1:0] pp [L+1];   // group propagate, level by level
  logic [N-1:0] h;          // half-sum terms
  logic [N-2:0] c;          // carry out of bits N-2..0 (bit N-1's is not needed)
  logic         cin;        // inverted end-around carry into bit 0

  assign h     = f ^ g;
  assign gp[0] = f & g;
  assign pp[0] = h;

  for (genvar l = 0; l < L; l++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_op
        assign gp[l+1][i] = gp[l][i] | (pp[l][i] & gp[l][i - (1 << l)]);
        assign pp[l+1][i] = pp[l][i] & pp[l][i - (1 << l)];
      end else begin : g_buf
        assign gp[l+1][i] = gp[l][i];
        assign pp[l+1][i] = pp[l][i];
      end
    end
  end

  assign cin = ~gp[L][N-1];
  assign c   = gp[L][N-2:0] | (pp[L][N-2:0] & {(N-1){cin}});

  assign r[N-1:0] = h ^ {c, cin};
  assign r[N]     = pp[L][N-1];

  // When the top bit is set the low bits must be zero (result 2^N)
  always_comb begin
    assert (!r[N] || r[N-1:0] == '0)
      else $error("moma_dim1_adder: result above 2^N");
  end

  if (N < 2) begin : g_bad_n
    $error("moma_dim1_adder: N must be at least 2");
  end

endmodule
