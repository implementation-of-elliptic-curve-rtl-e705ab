// gf2m_mult_seg: segmented, two-stage pipelined full-precision GF(2^M)
// multiplier of the high-performance processor.
//
// Operand b is cut into SEGS segments of D = ceil(M/SEGS) bits. Stage 1 forms
// the SEGS carry-less partial products a * b_s (each M+D-1 bits, unreduced) in
// parallel and registers them. Stage 2 aligns and adds the partial products
// into the full 2M-1-bit product, reduces it modulo f(x) and registers the
// result. One product can be started every clock cycle; the product of the
// operands presented in cycle t is on p in cycle t+2. The segment count sets
// which stage holds the critical path: wide segments lengthen stage 1 (the
// polynomial multiplication), narrow ones leave the reduction in stage 2 as
// the longest path. SEGS = 4 is this design's choice.
module gf2m_mult_seg #(
  parameter int unsigned M    = 163,
  parameter logic [M-1:0] POLY = M'('hC9),
  parameter int unsigned SEGS = 4
) (
  input  logic         clk,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] p
);
  localparam int unsigned D  = (M + SEGS - 1) / SEGS;
  localparam int unsigned PW = M + D - 1;          // partial-product width
  localparam int unsigned FW = M + SEGS * D - 1;   // aligned-sum width (>= 2M-1)

  logic [SEGS*D-1:0] b_ext;
  logic [PW-1:0]     pp     [SEGS];
  logic [PW-1:0]     pp_q   [SEGS];
  logic [2*M-2:0]    full;
  logic [M-1:0]      red;

  always_comb b_ext = (SEGS*D)'(b);

  // Stage 1: carry-less partial products of a and each segment of b.
  always_comb begin
    for (int s = 0; s < int'(SEGS); s++) begin
      logic [PW-1:0] acc;
      acc = '0;
      for (int j = 0; j < int'(D); j++) begin
        if (b_ext[s*D + j]) acc = acc ^ (PW'(a) << j);
      end
      pp[s] = acc;
    end
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < int'(SEGS); s++) pp_q[s] <= pp[s];
  end

  // Stage 2: accumulate the aligned partial products, then reduce.
  always_comb begin
    // Bits above 2M-2 of the aligned sum are always zero (b is zero-padded).
    logic [2*M-2:0] sum;
    sum = '0;
    for (int s = 0; s < int'(SEGS); s++) sum = sum ^ (2*M-1)'(FW'(pp_q[s]) << (s*D));
    full = sum;
  end

  gf2m_reduce #(.M(M), .POLY(POLY)) u_red (.c(full), .r(red));

  always_ff @(posedge clk) p <= red;
endmodule
