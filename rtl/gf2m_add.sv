// gf2m_add: GF(2^M) addition circuit. Addition (and subtraction) of two field
// elements in polynomial basis is the bitwise XOR of their coefficients.
// Purely combinational, no latency.
module gf2m_add #(
  parameter int unsigned M = 163
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] s
);
  always_comb s = a ^ b;
endmodule
