// moma_eac_csa: one inverted end-around-carry (EAC) carry-save adder, modulo 2^n+1.
//
// Reduces three n-bit vectors to a sum vector S and a carry vector C. The carry out
// of the top position has weight 2^n, and |c 2^n|_{2^n+1} = |2^n + ~c|_{2^n+1}, so it
// is complemented and re-entered at bit 0 of C:
//   C = c_{n-2} ... c_0 ~c_{n-1}.
// Each such stage therefore yields |S + C|_{2^n+1} = |x0 + x1 + x2 + 1|_{2^n+1}; the
// surrounding MOMA folds these +1 offsets into its constant correction vector.
// Purely combinational. Requires N >= 2.
module moma_eac_csa #(
  parameter int N = 4
) (
  input  logic [N-1:0] x0,
  input  logic [N-1:0] x1,
  input  logic [N-1:0] x2,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  logic [N-1:0] maj;

  assign s   = x0 ^ x1 ^ x2;
  assign maj = (x0 & x1) | (x0 & x2) | (x1 & x2);
  assign c   = {maj[N-2:0], ~maj[N-1]};

  if (N < 2) begin : g_bad_n
    $error("moma_eac_csa: N must be at least 2");
  end

endmodule
