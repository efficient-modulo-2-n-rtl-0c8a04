// moma_translator: weighted-to-diminished translator of a modulo 2^n+1 MOMA.
//
// Takes two weighted operands A, B in [0, 2^n] ((n+1) bits each) and produces two
// n-bit "diminished vectors" Y, U with |A + B|_{2^n+1} = |Y + U + 1|_{2^n+1}.
// How: the top bits a_n, b_n are moved into an n-bit constant-like vector
// D = 1...1 ~c_n ~s_n, where s_n = a_n ^ b_n and c_n = a_n & b_n (so ~c_n is a NAND
// and ~s_n an XNOR of the two top bits). A_{n-1}, B_{n-1} and D then go through one
// inverted end-around-carry carry-save stage: U is the sum vector, and the carry
// vector is shifted left by one with its outgoing top carry y_{n-1} complemented and
// re-entered at bit 0, Y = y_{n-2} ... y_0 ~y_{n-1}.
// Because D is all ones in bits n-1..2, those positions reduce to half-adder cost:
// u_i = XNOR(a_i, b_i), y_i = OR(a_i, b_i). The two low positions are simplified too,
// using the operand range 0..2^n: a_n = 1 forces a_{n-1..0} = 0 (likewise for B).
// This design's own derivation of those two positions, from the full adders
// FA(a_1, b_1, NAND(a_n, b_n)) and FA(a_0, b_0, XNOR(a_n, b_n)), gives:
//   u_1 = NOR(a_1 ^ b_1, a_n & b_n)      y_1 = a_1 | b_1
//   u_0 = XNOR(a_0 | a_n, b_0 | b_n)     y_0 = (a_0 | b_0) & ~(a_n | b_n)
// These equal the full-adder outputs for every operand in 0..2^n; inputs above
// 2^n are outside the contract.
// Purely combinational, no clock. Requires N >= 2.
module moma_translator #(
  parameter int N = 4
) (
  input  logic [N:0]   a,   // weighted operand, 0..2^N
  input  logic [N:0]   b,   // weighted operand, 0..2^N
  output logic [N-1:0] y,   // diminished vector Y (rotated, inverted carry vector)
  output logic [N-1:0] u    // diminished vector U (sum vector)
);

  logic [N-1:0] carry;

  always_comb begin
    for (int i = 2; i < N; i++) begin
      // D bit is 1: full adder collapses to XNOR / OR
      u[i]     = ~(a[i] ^ b[i]);
      carry[i] = a[i] | b[i];
    end
    // bit 1: third input NAND(a_n, b_n)
    u[1]     = ~((a[1] ^ b[1]) | (a[N] & b[N]));
    carry[1] = a[1] | b[1];
    // bit 0: third input XNOR(a_n, b_n)
    u[0]     = ~((a[0] | a[N]) ^ (b[0] | b[N]));
    carry[0] = (a[0] | b[0]) & ~(a[N] | b[N]);
  end

  // carry out of bit N-1 has weight 2^N = -1 (mod 2^N+1): re-enter it inverted
  assign y = {carry[N-2:0], ~carry[N-1]};

  if (N < 2) begin : g_bad_n
    $error("moma_translator: N must be at least 2");
  end

endmodule
