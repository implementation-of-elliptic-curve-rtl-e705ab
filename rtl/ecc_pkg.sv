// ecc_pkg: constants, types and the coordinate-conversion program shared by the
// two point-multiplication processors (LLECC and HPECC).
//
// The processors work in GF(2^M) with polynomial basis, f(x) = x^M + POLY(x).
// The default field is the 163-bit one the processors are evaluated with; the
// reduction polynomial x^163 + x^7 + x^6 + x^3 + 1 (the NIST B-163/K-163 one)
// is this design's choice, as is everything about the main-memory layout.
//
// The conversion program turns the Lopez-Dahab projective result (X1,Z1,X2,Z2)
// back into affine (xk, yk) with one inversion:
//   xk = X1 / Z1 = X1 * (x Z2) * T,         T = (x Z1 Z2)^-1
//   yk = (x + xk) * [(X1 + x Z1)(X2 + x Z2) + (x^2 + y) Z1 Z2] * T + y
// It uses ten multiplications, six additions and one squaring, one operation
// per program step, plus the inversion and two output steps.
package ecc_pkg;

  localparam int unsigned M_DEFAULT = 163;
  // Low terms of the reduction polynomial for M = 163: x^7 + x^6 + x^3 + 1.
  localparam logic [M_DEFAULT-1:0] POLY_DEFAULT = M_DEFAULT'('hC9);

  // Main-memory (register file) map.
  localparam int unsigned RF_DEPTH = 16;
  localparam int unsigned RF_AW    = 4;
  typedef logic [RF_AW-1:0] rf_addr_t;
  localparam rf_addr_t A_X  = 4'd0;   // affine x of the base point
  localparam rf_addr_t A_Y  = 4'd1;   // affine y of the base point
  localparam rf_addr_t A_B  = 4'd2;   // curve constant b
  localparam rf_addr_t A_X1 = 4'd3;
  localparam rf_addr_t A_Z1 = 4'd4;
  localparam rf_addr_t A_X2 = 4'd5;
  localparam rf_addr_t A_Z2 = 4'd6;
  localparam rf_addr_t A_T0 = 4'd7;
  localparam rf_addr_t A_T1 = 4'd8;
  localparam rf_addr_t A_T2 = 4'd9;
  localparam rf_addr_t A_T3 = 4'd10;
  localparam rf_addr_t A_T4 = 4'd11;
  localparam rf_addr_t A_T5 = 4'd12;
  localparam rf_addr_t A_T6 = 4'd13;
  localparam rf_addr_t A_T7 = 4'd14;
  localparam rf_addr_t A_T8 = 4'd15;

  // Operations of the conversion program.
  typedef enum logic [2:0] {
    CI_MUL,   // rf[wa] = rf[ra] * rf[rb]
    CI_ADD,   // rf[wa] = rf[ra] + rf[rb]
    CI_SQR,   // rf[wa] = rf[ra]^2
    CI_INV,   // rf[wa] = rf[ra]^-1 (Itoh-Tsujii unit)
    CI_OUTX,  // qx = rf[ra]; infinity flag from rf[rb] == 0
    CI_OUTY   // qy = rf[ra]
  } conv_op_t;

  typedef struct packed {
    conv_op_t op;
    rf_addr_t ra;
    rf_addr_t rb;
    rf_addr_t wa;
  } conv_instr_t;


  function automatic conv_instr_t conv_prog(input int unsigned pc);
    conv_instr_t i;
    case (pc)
      0:  i = '{CI_MUL,  A_Z1, A_Z2, A_T0};  // Z1 Z2
      1:  i = '{CI_MUL,  A_X,  A_Z1, A_T1};  // x Z1
      2:  i = '{CI_MUL,  A_X,  A_Z2, A_T2};  // x Z2
      3:  i = '{CI_MUL,  A_X,  A_T0, A_T3};  // x Z1 Z2
      4:  i = '{CI_INV,  A_T3, A_T3, A_T4};  // T = (x Z1 Z2)^-1
      5:  i = '{CI_ADD,  A_X1, A_T1, A_T5};  // X1 + x Z1
      6:  i = '{CI_ADD,  A_X2, A_T2, A_T6};  // X2 + x Z2
      7:  i = '{CI_MUL,  A_T5, A_T6, A_T5};
      8:  i = '{CI_SQR,  A_X,  A_X,  A_T6};  // x^2
      9:  i = '{CI_ADD,  A_T6, A_Y,  A_T6};  // x^2 + y
      10: i = '{CI_MUL,  A_T6, A_T0, A_T6};  // (x^2 + y) Z1 Z2
      11: i = '{CI_ADD,  A_T5, A_T6, A_T5};
      12: i = '{CI_MUL,  A_X1, A_T2, A_T7};  // X1 x Z2
      13: i = '{CI_MUL,  A_T7, A_T4, A_T7};  // xk
      14: i = '{CI_ADD,  A_X,  A_T7, A_T8};  // x + xk
      15: i = '{CI_MUL,  A_T5, A_T8, A_T5};
      16: i = '{CI_MUL,  A_T5, A_T4, A_T5};
      17: i = '{CI_ADD,  A_T5, A_Y,  A_T5};  // yk
      18: i = '{CI_OUTX, A_T7, A_Z1, A_T7};
      default: i = '{CI_OUTY, A_T5, A_T5, A_T5};
    endcase
    return i;
  endfunction

  // Write-data selection of the main memory.
  typedef enum logic [2:0] {
    WS_XIN,    // affine x input
    WS_YIN,    // affine y input
    WS_BIN,    // curve constant b input
    WS_SQR,    // rf[ra]^2
    WS_QADD,   // rf[ra]^4 + rf[rb]
    WS_LOCAL,  // a ladder local register
    WS_ALU,    // result of a conversion step
    WS_INV     // result of the inversion unit
  } wsel_t;

  // Control word from the LLECC control unit to its datapath.
  typedef struct packed {
    logic       rf_we;
    rf_addr_t   rf_wa;
    wsel_t      rf_wsel;
    rf_addr_t   rf_ra;
    rf_addr_t   rf_rb;
    logic       ld_en;     // load a ladder local register
    logic [1:0] ld_sel;    // 0 X1, 1 Z1, 2 X2, 3 Z2 (also selects store source)
    logic       ld_one;    // load the constant 1 instead of rf[ra]
    logic       step_en;   // run a ladder step
    logic       step;      // which of the two steps
    logic       kbit;      // scalar bit of this iteration
    logic       mul_ext;   // conversion borrows multiplier 0
    conv_op_t   alu_op;
    logic       inv_start;
    logic       inv_mul;   // inversion unit owns multiplier 0
    logic       outx_we;
    logic       outy_we;
  } llecc_ctrl_t;

  // HPECC multiplier operand selection.
  typedef enum logic [1:0] {MA_RFA, MA_BYP, MA_R1, MA_INV} hp_mula_t;
  typedef enum logic [1:0] {MB_RFB, MB_QUAD, MB_R2, MB_INV} hp_mulb_t;

  // HPECC main-memory write-data selection.
  typedef enum logic [3:0] {
    HW_XIN,   // affine x input
    HW_YIN,   // affine y input
    HW_BIN,   // curve constant b input
    HW_SQR,   // rf[ra]^2
    HW_QADD,  // rf[ra]^4 + rf[rb]
    HW_ZA,    // (R1 + product)^2        : Z of the added point
    HW_ZD,    // product^2               : Z of the doubled point
    HW_XD,    // Q1 + product            : X of the doubled point
    HW_XA,    // product + R6            : X of the added point
    HW_MUL,   // product (conversion)
    HW_ADD,   // rf[ra] + rf[rb] (conversion)
    HW_INV    // result of the inversion unit
  } hp_wsel_t;

  // Control word from the HPECC control unit to its datapath.
  typedef struct packed {
    logic     rf_we;
    rf_addr_t rf_wa;
    hp_wsel_t rf_wsel;
    rf_addr_t rf_ra;
    rf_addr_t rf_rb;
    hp_mula_t mul_a;
    hp_mulb_t mul_b;
    logic     r1_we;     // R1 <= product
    logic     r2_we;     // R2 <= product
    logic     r6_we;     // R6 <= product
    logic     q1_we;     // Q1 <= rf[ra]^4
    logic     z1_one;    // init: Z1 reads as 1 until it is first written
    logic     inv_start;
    logic     outx_we;
    logic     outy_we;
  } hpecc_ctrl_t;

endpackage
