// llecc_ladder: ladder datapath of the low-latency processor (LLECC).
//
// One iteration of the Lopez-Dahab Montgomery ladder combines a point addition
// Madd into register pair A and a point doubling Mdouble of pair D, where
// (A, D) = (P1, P2) when the scalar bit is 1 and (P2, P1) when it is 0:
//   Madd:    ZA' = (XA ZD + XD ZA)^2,    XA' = x ZA' + (XA ZD)(XD ZA)
//   Mdouble: ZD' = XD^2 ZD^2,            XD' = XD^4 + b ZD^4
// The six multiplications run on three full-precision single-cycle multipliers
// in two clock cycles; adders and squarers are cascaded on the multiplier
// inputs and outputs so that no extra cycle is needed:
//   step 0: XA*ZD, XD*ZA, XD^2*ZD^2 -> ZA' = (sum)^2, ZD'; keep both products
//           and XD^4, ZD^4 in local registers
//   step 1: x*ZA', (XA ZD)(XD ZA), b*ZD^4 -> XA', XD'
// The local registers X1, Z1, X2, Z2 are loaded from and stored to main memory
// one per cycle (ld_en/ld_sel, ld_one loads the constant 1). When mul_ext is
// high, multiplier 0 computes ext_a*ext_b on ext_p for the rest of the
// processor (coordinate conversion, inversion). All registers update at the
// rising clock edge; kbit must stay the same for both steps of an iteration.
// The split of the six products over the two steps is this design's choice.
module llecc_ladder #(
  parameter int unsigned M = 163,
  parameter logic [M-1:0] POLY = M'('hC9)
) (
  input  logic         clk,
  input  logic [M-1:0] x,        // affine x of the base point
  input  logic [M-1:0] b,        // curve constant
  input  logic         ld_en,
  input  logic [1:0]   ld_sel,
  input  logic         ld_one,
  input  logic [M-1:0] ld_data,
  input  logic         step_en,
  input  logic         step,
  input  logic         kbit,
  input  logic         mul_ext,
  input  logic [M-1:0] ext_a,
  input  logic [M-1:0] ext_b,
  output logic [M-1:0] ext_p,
  output logic [M-1:0] x1,
  output logic [M-1:0] z1,
  output logic [M-1:0] x2,
  output logic [M-1:0] z2,
  output logic [M-1:0] local_q    // local register selected by ld_sel
);
  logic [M-1:0] t1, t2, q1, q2;
  logic [M-1:0] xa, za, xd, zd;
  logic [M-1:0] xd_sq, zd_sq, xd_q, zd_q;
  logic [M-1:0] m0a, m0b, m1a, m1b, m2a, m2b, p0, p1, p2;
  logic [M-1:0] sum01, za_new, xa_new, xd_new;

  always_comb begin
    xa = kbit ? x1 : x2;
    za = kbit ? z1 : z2;
    xd = kbit ? x2 : x1;
    zd = kbit ? z2 : z1;
  end

  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_xd  (.a(xd),    .s(xd_sq));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_zd  (.a(zd),    .s(zd_sq));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_xd2 (.a(xd_sq), .s(xd_q));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_zd2 (.a(zd_sq), .s(zd_q));

  always_comb begin
    if (mul_ext) begin
      m0a = ext_a; m0b = ext_b;
    end else if (!step) begin
      m0a = xa;    m0b = zd;
    end else begin
      m0a = x;     m0b = za;
    end
    if (!step) begin
      m1a = xd;    m1b = za;
      m2a = xd_sq; m2b = zd_sq;
    end else begin
      m1a = t1;    m1b = t2;
      m2a = b;     m2b = q2;
    end
  end

  gf2m_mult #(.M(M), .POLY(POLY)) u_mul0 (.a(m0a), .b(m0b), .p(p0));
  gf2m_mult #(.M(M), .POLY(POLY)) u_mul1 (.a(m1a), .b(m1b), .p(p1));
  gf2m_mult #(.M(M), .POLY(POLY)) u_mul2 (.a(m2a), .b(m2b), .p(p2));

  gf2m_add #(.M(M)) u_add0 (.a(p0), .b(p1), .s(sum01));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq_sum (.a(sum01), .s(za_new));
  gf2m_add #(.M(M)) u_add2 (.a(q1), .b(p2), .s(xd_new));

  always_comb begin
    xa_new = sum01;   // step 1: x ZA' + (XA ZD)(XD ZA)
    ext_p  = p0;
  end

  always_comb begin
    case (ld_sel)
      2'd0:    local_q = x1;
      2'd1:    local_q = z1;
      2'd2:    local_q = x2;
      default: local_q = z2;
    endcase
  end

  always_ff @(posedge clk) begin
    if (ld_en) begin
      case (ld_sel)
        2'd0:    x1 <= ld_one ? M'(1) : ld_data;
        2'd1:    z1 <= ld_one ? M'(1) : ld_data;
        2'd2:    x2 <= ld_one ? M'(1) : ld_data;
        default: z2 <= ld_one ? M'(1) : ld_data;
      endcase
    end else if (step_en && !step) begin
      t1 <= p0;
      t2 <= p1;
      q1 <= xd_q;
      q2 <= zd_q;
      if (kbit) begin
        z1 <= za_new;
        z2 <= p2;
      end else begin
        z2 <= za_new;
        z1 <= p2;
      end
    end else if (step_en) begin
      if (kbit) begin
        x1 <= xa_new;
        x2 <= xd_new;
      end else begin
        x2 <= xa_new;
        x1 <= xd_new;
      end
    end
  end
endmodule
