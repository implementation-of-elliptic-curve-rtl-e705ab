// gf2m_reduce: reduces an unreduced polynomial product of degree <= 2M-2 modulo
// f(x) = x^M + POLY(x). Each set coefficient at degree i >= M is cancelled from
// the top down by adding f(x) x^(i-M). Purely combinational.
module gf2m_reduce #(
  parameter int unsigned M = 163,
  parameter logic [M-1:0] POLY = M'('hC9)
) (
  input  logic [2*M-2:0] c,
  output logic [M-1:0]   r
);
  localparam logic [2*M-2:0] F_EXT = (2*M-1)'({1'b1, POLY});
  logic [2*M-2:0] t;
  always_comb begin
    t = c;
    for (int i = 2*M-2; i >= int'(M); i--) begin
      if (t[i]) t = t ^ (F_EXT << (i - int'(M)));
    end
    r = t[M-1:0];
  end
endmodule
