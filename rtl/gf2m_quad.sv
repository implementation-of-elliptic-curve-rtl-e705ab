// gf2m_quad: GF(2^M) quad-squaring circuit, a^4, built as two squaring
// circuits in cascade. Used for the x^4 and Z^4 terms of point doubling and to
// perform two of the repeated squarings of an inversion in one clock cycle.
// Purely combinational, no latency.
module gf2m_quad #(
  parameter int unsigned M = 163,
  parameter logic [M-1:0] POLY = M'('hC9)
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] q
);
  logic [M-1:0] a2;
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq0 (.a(a),  .s(a2));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq1 (.a(a2), .s(q));
endmodule
