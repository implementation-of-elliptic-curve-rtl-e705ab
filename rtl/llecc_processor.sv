// llecc_processor: low-latency elliptic-curve point multiplier (LLECC).
//
// Computes Q = k*P on the binary curve y^2 + xy = x^3 + ax^2 + b over
// GF(2^M) with the Lopez-Dahab Montgomery ladder in projective coordinates,
// then converts the result to affine coordinates with one Itoh-Tsujii
// inversion. Three full-precision single-cycle multipliers (in llecc_ladder)
// perform the six multiplications of a ladder iteration in two clock cycles,
// with adders and squarers cascaded on the multiplier outputs. An FSM
// (llecc_ctrl) sequences the processor; a 16-word main memory (ecc_regfile)
// holds the curve data and the conversion temporaries. Multiplier 0 is shared
// with the coordinate conversion and the inversion unit.
//
// Interface: hold x, y, b and k stable and pulse start while busy is low.
// k[M-1] must be 1 (the ladder starts from (P, 2P)); a scalar below the group
// order can be brought to that form by adding a multiple of the order.
// done pulses for one cycle when qx, qy are valid; q_inf is set when k*P is
// the point at infinity. a does not appear in the ladder or in the conversion.
// Latency for M = 163: 448 cycles from the cycle after start to done.
module llecc_processor
  import ecc_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT,
  parameter logic [M-1:0] POLY = M'(POLY_DEFAULT)
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
  llecc_ctrl_t  ctl;
  logic         inv_busy, inv_done;
  logic [M-1:0] rda, rdb, wd;
  logic [M-1:0] sq_a, quad_a, qadd, add_ab, alu_res;
  logic [M-1:0] ext_a, ext_b, ext_p, inv_r, inv_ma, inv_mb, local_q;
  logic [M-1:0] x1, z1, x2, z2;

  llecc_ctrl #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .k, .inv_done, .ctl, .busy, .done
  );

  ecc_regfile #(.W(M), .DEPTH(RF_DEPTH)) u_mem (
    .clk, .we(ctl.rf_we), .wa(ctl.rf_wa), .wd,
    .ra(ctl.rf_ra), .rda, .rb(ctl.rf_rb), .rdb
  );

  gf2m_sqr  #(.M(M), .POLY(POLY)) u_sqr  (.a(rda), .s(sq_a));
  gf2m_quad #(.M(M), .POLY(POLY)) u_quad (.a(rda), .q(quad_a));
  gf2m_add  #(.M(M)) u_add_q (.a(quad_a), .b(rdb), .s(qadd));
  gf2m_add  #(.M(M)) u_add   (.a(rda),    .b(rdb), .s(add_ab));

  always_comb begin
    ext_a = ctl.inv_mul ? inv_ma : rda;
    ext_b = ctl.inv_mul ? inv_mb : rdb;
  end

  llecc_ladder #(.M(M), .POLY(POLY)) u_ladder (
    .clk, .x(rda), .b(rdb),
    .ld_en(ctl.ld_en), .ld_sel(ctl.ld_sel), .ld_one(ctl.ld_one), .ld_data(rda),
    .step_en(ctl.step_en), .step(ctl.step), .kbit(ctl.kbit),
    .mul_ext(ctl.mul_ext | ctl.inv_mul), .ext_a, .ext_b, .ext_p,
    .x1, .z1, .x2, .z2, .local_q
  );

  gf2m_inv #(.M(M), .POLY(POLY), .MUL_LAT(0)) u_inv (
    .clk, .rst_n, .start(ctl.inv_start), .a(rda), .busy(inv_busy), .done(inv_done),
    .r(inv_r), .mul_a(inv_ma), .mul_b(inv_mb), .mul_p(ext_p)
  );

  always_comb begin
    case (ctl.alu_op)
      CI_MUL:  alu_res = ext_p;
      CI_SQR:  alu_res = sq_a;
      default: alu_res = add_ab;
    endcase
    case (ctl.rf_wsel)
      WS_XIN:   wd = x;
      WS_YIN:   wd = y;
      WS_BIN:   wd = b;
      WS_SQR:   wd = sq_a;
      WS_QADD:  wd = qadd;
      WS_LOCAL: wd = local_q;
      WS_INV:   wd = inv_r;
      default:  wd = alu_res;
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
