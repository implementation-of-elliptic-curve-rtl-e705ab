// gf2m_sqr: GF(2^M) squaring circuit. In polynomial basis squaring is linear:
// coefficient i of the operand moves to degree 2i (zeros interleaved), and the
// result is reduced modulo f(x). Purely combinational, no latency.
module gf2m_sqr #(
  parameter int unsigned M = 163,
  parameter logic [M-1:0] POLY = M'('hC9)
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] s
);
  logic [2*M-2:0] spread;
  always_comb begin
    spread = '0;
    for (int i = 0; i < int'(M); i++) spread[2*i] = a[i];
  end
  gf2m_reduce #(.M(M), .POLY(POLY)) u_red (.c(spread), .r(s));
endmodule
