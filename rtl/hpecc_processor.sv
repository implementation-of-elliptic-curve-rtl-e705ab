// hpecc_processor: high-performance elliptic-curve point multiplier (HPECC).
//
// Computes Q = k*P on y^2 + xy = x^3 + ax^2 + b over GF(2^M) with the
// Lopez-Dahab Montgomery ladder and converts the result to affine
// coordinates with one Itoh-Tsujii inversion, like llecc_processor, but with
// a single multiplier: the segmented two-stage pipelined gf2m_mult_seg. The
// datapath around it is one squaring circuit, one quad-squaring circuit and
// two adders, and four registers: R1 and R2 hold the two cross products of
// Madd, R6 the product (XA ZD)(XD ZA) until x*ZA arrives, and Q1 the
// quad-square XD^4, so that quad-squaring needs no trip through main memory.
// The ladder variables live in main memory (ecc_regfile: two read ports, one
// write port). hpecc_ctrl issues one multiplication per cycle, six per ladder
// iteration, and overlaps the last two pipeline stages with the next
// iteration, bypassing the adder output to the multiplier input.
//
// Interface and scalar convention as llecc_processor: hold x, y, b, k stable
// and pulse start while busy is low; k[M-1] must be 1; done pulses when qx, qy
// (and q_inf for the point at infinity) are valid. Latency for M = 163:
// 1129 cycles from the cycle after start to done.
module hpecc_processor
  import ecc_pkg::*;
#(
  parameter int unsigned M    = M_DEFAULT,
  parameter logic [M-1:0] POLY = M'(POLY_DEFAULT),
  parameter int unsigned SEGS = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  input  logic [M-1:0] b,
  input  logic [M-1:0] k,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] qx,
  output logic [M-1:0] qy,
  output logic         q_inf
);
  hpecc_ctrl_t  ctl;
  logic         inv_busy, inv_done, z1_one_q;
  logic [M-1:0] rda_mem, rdb_mem, rda, rdb, wd;
  logic [M-1:0] ma, mb, prod, inv_r, inv_ma, inv_mb;
  logic [M-1:0] r1, r2, r6, q1;
  logic [M-1:0] sq_in, sq_out, quad_in, quad_out;
  logic [M-1:0] add1_b, add1_s, add2_a, add2_b, add2_s;

  hpecc_ctrl #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .k, .inv_done, .ctl, .busy, .done
  );

  ecc_regfile #(.W(M), .DEPTH(RF_DEPTH)) u_mem (
    .clk, .we(ctl.rf_we), .wa(ctl.rf_wa), .wd,
    .ra(ctl.rf_ra), .rda(rda_mem), .rb(ctl.rf_rb), .rdb(rdb_mem)
  );

  // Z1 = 1 at the start of the ladder: reads of Z1 return 1 until Z1 is written.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   z1_one_q <= 1'b0;
    else if (ctl.z1_one)                          z1_one_q <= 1'b1;
    else if (ctl.rf_we && ctl.rf_wa == A_Z1)      z1_one_q <= 1'b0;
  end

  always_comb begin
    rda = (z1_one_q && ctl.rf_ra == A_Z1) ? M'(1) : rda_mem;
    rdb = (z1_one_q && ctl.rf_rb == A_Z1) ? M'(1) : rdb_mem;
  end

  // Shared squarer, quad-squarer and the two adders.
  always_comb begin
    case (ctl.rf_wsel)
      HW_ZA:   sq_in = add1_s;
      HW_ZD:   sq_in = prod;
      default: sq_in = rda;
    endcase
    quad_in = (ctl.mul_b == MB_QUAD) ? rdb : rda;
    add1_b  = (ctl.rf_wsel == HW_ZA) ? r1 : r6;
    add2_a  = (ctl.rf_wsel == HW_XD) ? q1 : (ctl.rf_wsel == HW_QADD) ? quad_out : rda;
    add2_b  = (ctl.rf_wsel == HW_XD) ? prod : rdb;
  end

  gf2m_sqr  #(.M(M), .POLY(POLY)) u_sqr  (.a(sq_in),   .s(sq_out));
  gf2m_quad #(.M(M), .POLY(POLY)) u_quad (.a(quad_in), .q(quad_out));
  gf2m_add  #(.M(M)) u_add1 (.a(prod),   .b(add1_b), .s(add1_s));
  gf2m_add  #(.M(M)) u_add2 (.a(add2_a), .b(add2_b), .s(add2_s));

  // The single pipelined multiplier.
  always_comb begin
    case (ctl.mul_a)
      MA_BYP:  ma = add1_s;
      MA_R1:   ma = r1;
      MA_INV:  ma = inv_ma;
      default: ma = rda;
    endcase
    case (ctl.mul_b)
      MB_QUAD: mb = quad_out;
      MB_R2:   mb = r2;
      MB_INV:  mb = inv_mb;
      default: mb = rdb;
    endcase
  end

  gf2m_mult_seg #(.M(M), .POLY(POLY), .SEGS(SEGS)) u_mul (.clk, .a(ma), .b(mb), .p(prod));

  gf2m_inv #(.M(M), .POLY(POLY), .MUL_LAT(2)) u_inv (
    .clk, .rst_n, .start(ctl.inv_start), .a(rda), .busy(inv_busy), .done(inv_done),
    .r(inv_r), .mul_a(inv_ma), .mul_b(inv_mb), .mul_p(prod)
  );

  always_ff @(posedge clk) begin
    if (ctl.r1_we) r1 <= prod;
    if (ctl.r2_we) r2 <= prod;
    if (ctl.r6_we) r6 <= prod;
    if (ctl.q1_we) q1 <= quad_out;
  end

  always_comb begin
    case (ctl.rf_wsel)
      HW_XIN:  wd = x;
      HW_YIN:  wd = y;
      HW_BIN:  wd = b;
      HW_SQR,
      HW_ZA,
      HW_ZD:   wd = sq_out;
      HW_XA:   wd = add1_s;
      HW_QADD,
      HW_XD,
      HW_ADD:  wd = add2_s;
      HW_INV:  wd = inv_r;
      default: wd = prod;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qx    <= '0;
      qy    <= '0;
      q_inf <= 1'b0;
    end else begin
      if (ctl.outx_we) begin
        qx    <= rda;
        q_inf <= (rdb == '0);
      end
      if (ctl.outy_we) qy <= rda;
    end
  end

  // The inversion unit may only be started when it is idle.
  assert property (@(posedge clk) ctl.inv_start |-> !inv_busy);
endmodule
