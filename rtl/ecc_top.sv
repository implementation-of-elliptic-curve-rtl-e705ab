// ecc_top: the two elliptic-curve point-multiplication processors side by
// side, sharing only clock and reset.
//
//   ll_*  low-latency processor (llecc_processor): three single-cycle
//         full-precision multipliers, two cycles per ladder iteration,
//         448 cycles per point multiplication for M = 163
//   hp_*  high-performance processor (hpecc_processor): one segmented
//         two-stage pipelined multiplier, six cycles per ladder iteration,
//         1129 cycles for M = 163, with a shorter critical path
//
// Both compute Q = k*P on y^2 + xy = x^3 + ax^2 + b over GF(2^M) and have the
// same handshake: hold x, y, b, k stable and pulse start while busy is low;
// k[M-1] must be 1; done pulses for one cycle when qx, qy and q_inf are valid.
module ecc_top
  import ecc_pkg::*;
#(
  parameter int unsigned M    = M_DEFAULT,
  parameter logic [M-1:0] POLY = M'(POLY_DEFAULT),
  parameter int unsigned SEGS = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  // low-latency processor
  input  logic         ll_start,
  input  logic [M-1:0] ll_x,
  input  logic [M-1:0] ll_y,
  input  logic [M-1:0] ll_b,
  input  logic [M-1:0] ll_k,
  output logic         ll_busy,
  output logic         ll_done,
  output logic [M-1:0] ll_qx,
  output logic [M-1:0] ll_qy,
  output logic         ll_q_inf,
  // high-performance processor
  input  logic         hp_start,
  input  logic [M-1:0] hp_x,
  input  logic [M-1:0] hp_y,
  input  logic [M-1:0] hp_b,
  input  logic [M-1:0] hp_k,
  output logic         hp_busy,
  output logic         hp_done,
  output logic [M-1:0] hp_qx,
  output logic [M-1:0] hp_qy,
  output logic         hp_q_inf
);
  llecc_processor #(.M(M), .POLY(POLY)) u_llecc (
    .clk, .rst_n, .start(ll_start), .x(ll_x), .y(ll_y), .b(ll_b), .k(ll_k),
    .busy(ll_busy), .done(ll_done), .qx(ll_qx), .qy(ll_qy), .q_inf(ll_q_inf)
  );

  hpecc_processor #(.M(M), .POLY(POLY), .SEGS(SEGS)) u_hpecc (
    .clk, .rst_n, .start(hp_start), .x(hp_x), .y(hp_y), .b(hp_b), .k(hp_k),
    .busy(hp_busy), .done(hp_done), .qx(hp_qx), .qy(hp_qy), .q_inf(hp_q_inf)
  );
endmodule
