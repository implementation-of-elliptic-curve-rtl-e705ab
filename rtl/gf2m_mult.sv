// gf2m_mult: full-precision, single-cycle GF(2^M) multiplier, as used three
// times in the low-latency processor. The product is formed most significant
// operand bit first: p <- p*x mod f(x) + b_i * a, so reduction is interleaved
// with accumulation and the whole product settles combinationally within one
// clock cycle. The bit-serial-in-space structure is this design's choice; the
// processor only requires a one-cycle full-precision product.
module gf2m_mult #(
  parameter int unsigned M = 163,
  parameter logic [M-1:0] POLY = M'('hC9)
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] p
);
  logic [M-1:0] acc;
  always_comb begin
    acc = '0;
    for (int i = int'(M) - 1; i >= 0; i--) begin
      acc = {acc[M-2:0], 1'b0} ^ (acc[M-1] ? POLY : '0);
      if (b[i]) acc = acc ^ a;
    end
    p = acc;
  end
endmodule
