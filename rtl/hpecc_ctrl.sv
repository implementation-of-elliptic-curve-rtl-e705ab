// hpecc_ctrl: FSM control unit of the high-performance processor (HPECC).
//
// The processor has a single two-stage pipelined multiplier, so a ladder
// iteration issues one multiplication per cycle for six cycles, and the last
// two products of an iteration drain while the next iteration has started.
// For one iteration with added pair A and doubled pair D (A = 1 when the
// scalar bit is 1), p = the pair doubled in the previous iteration (its X is
// already in memory) and q = the pair added in the previous iteration (its X
// is still in the pipeline):
//   s0  issue Xp*Zq                  | R6 <= product (XA ZD)(XD ZA) of prev
//   s1  issue Xq*Zp (Xq bypassed)    | X of prev A <= product x*ZA' + R6
//   s2  issue XD*ZD                  | R1 <= Xp*Zq
//   s3  issue b*ZD^4                 | Z_A <= (R1 + product)^2, R2 <= product
//   s4  issue R1*R2, Q1 <= XD^4      | Z_D <= product^2
//   s5  issue x*Z_A                  | X_D <= Q1 + product
// After the last iteration two drain cycles finish the last X_A. Every memory
// write and read fits one write and two read ports per cycle, so the ladder
// runs directly on main memory; only R1, R2, R6 and Q1 sit in the datapath.
//
// Phases after start: INIT 5 cycles (x, b, X1 = x, Z2 = x^2, X2 = x^4 + b;
// Z1 reads as 1 until it is first written), LOOP 6 cycles per scalar bit
// k[M-2]..k[0] plus 2 drain cycles, CONV the program of ecc_pkg with y written
// first, 3 cycles per multiplication, 1 per addition or squaring, and
// 1 + 108 + 1 cycles for the inversion. For M = 163: 5 + 972 + 2 + 150 =
// 1129 busy cycles. The six-cycle iteration and the five-cycle initialisation
// are those the processor is specified with; the operation order inside the
// iteration, the drain and the conversion schedule are this design's.
module hpecc_ctrl
  import ecc_pkg::*;
#(
  parameter int unsigned M = 163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic         inv_done,
  output hpecc_ctrl_t  ctl,
  output logic         busy,
  output logic         done
);
  localparam int unsigned BW = $clog2(M);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_LOOP, S_DRAIN, S_YIN, S_CONV, S_INVW}
    state_t;

  state_t        state;
  logic [2:0]    cnt;      // init step, ladder slot, drain step, multiply cycle
  logic [BW-1:0] bi;
  logic          first;    // first ladder iteration: nothing to overlap with
  logic          aprev;    // pair added in the previous iteration (1: P1)
  logic [4:0]    pc;
  logic [M-1:0]  k_reg;
  conv_instr_t   ins;
  logic          kbit;

  always_comb begin
    ins  = conv_prog(int'(pc));
    kbit = k_reg[bi];
  end

  function automatic rf_addr_t xa(input logic pair1);
    return pair1 ? A_X1 : A_X2;
  endfunction
  function automatic rf_addr_t za(input logic pair1);
    return pair1 ? A_Z1 : A_Z2;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      bi    <= '0;
      first <= 1'b1;
      aprev <= 1'b0;
      pc    <= '0;
      k_reg <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          k_reg <= k;
          cnt   <= '0;
          state <= S_INIT;
        end
        S_INIT: begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd4) begin
            cnt   <= '0;
            bi    <= BW'(M - 2);
            first <= 1'b1;
            aprev <= 1'b0;   // the first iteration takes p = P1, q = P2
            state <= S_LOOP;
          end
        end
        S_LOOP: begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd5) begin
            cnt   <= '0;
            first <= 1'b0;
            aprev <= kbit;
            if (bi == '0) state <= S_DRAIN;
            else          bi <= bi - BW'(1);
          end
        end
        S_DRAIN: begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd1) begin
            cnt   <= '0;
            state <= S_YIN;
          end
        end
        S_YIN: begin
          pc    <= '0;
          cnt   <= '0;
          state <= S_CONV;
        end
        S_CONV: begin
          case (ins.op)
            CI_INV:  state <= S_INVW;
            CI_OUTY: begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
            CI_MUL: begin
              cnt <= cnt + 3'd1;
              if (cnt == 3'd2) begin
                cnt <= '0;
                pc  <= pc + 5'd1;
              end
            end
            default: pc <= pc + 5'd1;
          endcase
        end
        S_INVW: if (inv_done) begin
          pc    <= pc + 5'd1;
          state <= S_CONV;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb busy = (state != S_IDLE);

  // Pairs of the current iteration (1 = P1, 0 = P2).
  logic pa, pd, pp, pq;
  always_comb begin
    pa = kbit;
    pd = ~kbit;
    pp = ~aprev;     // doubled in the previous iteration
    pq = aprev;      // added in the previous iteration
  end

  always_comb begin
    ctl         = '0;
    ctl.rf_wsel = HW_MUL;
    ctl.mul_a   = MA_RFA;
    ctl.mul_b   = MB_RFB;
    case (state)
      S_INIT: begin
        ctl.rf_we  = 1'b1;
        ctl.rf_ra  = A_X;
        ctl.rf_rb  = A_B;
        ctl.z1_one = 1'b1;
        case (cnt)
          3'd0:    begin ctl.rf_wa = A_X;  ctl.rf_wsel = HW_XIN; end
          3'd1:    begin ctl.rf_wa = A_B;  ctl.rf_wsel = HW_BIN; end
          3'd2:    begin ctl.rf_wa = A_X1; ctl.rf_wsel = HW_XIN; end
          3'd3:    begin ctl.rf_wa = A_Z2; ctl.rf_wsel = HW_SQR; end
          default: begin ctl.rf_wa = A_X2; ctl.rf_wsel = HW_QADD; end
        endcase
      end
      S_LOOP: begin
        case (cnt)
          3'd0: begin
            ctl.rf_ra = xa(pp);
            ctl.rf_rb = za(pq);
            ctl.r6_we = !first;
          end
          3'd1: begin
            ctl.rf_ra   = xa(pq);
            ctl.rf_rb   = za(pp);
            ctl.mul_a   = first ? MA_RFA : MA_BYP;
            ctl.rf_we   = !first;
            ctl.rf_wa   = xa(aprev);
            ctl.rf_wsel = HW_XA;
          end
          3'd2: begin
            ctl.rf_ra = xa(pd);
            ctl.rf_rb = za(pd);
            ctl.r1_we = 1'b1;
          end
          3'd3: begin
            ctl.rf_ra   = A_B;
            ctl.rf_rb   = za(pd);
            ctl.mul_b   = MB_QUAD;
            ctl.rf_we   = 1'b1;
            ctl.rf_wa   = za(pa);
            ctl.rf_wsel = HW_ZA;
            ctl.r2_we   = 1'b1;
          end
          3'd4: begin
            ctl.rf_ra   = xa(pd);
            ctl.mul_a   = MA_R1;
            ctl.mul_b   = MB_R2;
            ctl.q1_we   = 1'b1;
            ctl.rf_we   = 1'b1;
            ctl.rf_wa   = za(pd);
            ctl.rf_wsel = HW_ZD;
          end
          default: begin
            ctl.rf_ra   = A_X;
            ctl.rf_rb   = za(pa);
            ctl.rf_we   = 1'b1;
            ctl.rf_wa   = xa(pd);
            ctl.rf_wsel = HW_XD;
          end
        endcase
      end
      S_DRAIN: begin
        if (cnt == 3'd0) ctl.r6_we = 1'b1;
        else begin
          ctl.rf_we   = 1'b1;
          ctl.rf_wa   = xa(aprev);
          ctl.rf_wsel = HW_XA;
        end
      end
      S_YIN: begin
        ctl.rf_we   = 1'b1;
        ctl.rf_wa   = A_Y;
        ctl.rf_wsel = HW_YIN;
      end
      S_CONV: begin
        ctl.rf_ra = ins.ra;
        ctl.rf_rb = ins.rb;
        ctl.rf_wa = ins.wa;
        case (ins.op)
          CI_MUL: begin
            ctl.rf_we   = (cnt == 3'd2);
            ctl.rf_wsel = HW_MUL;
          end
          CI_ADD: begin
            ctl.rf_we   = 1'b1;
            ctl.rf_wsel = HW_ADD;
          end
          CI_SQR: begin
            ctl.rf_we   = 1'b1;
            ctl.rf_wsel = HW_SQR;
          end
          CI_INV:  ctl.inv_start = 1'b1;
          CI_OUTX: ctl.outx_we = 1'b1;
          default: ctl.outy_we = 1'b1;
        endcase
      end
      S_INVW: begin
        ctl.mul_a   = MA_INV;
        ctl.mul_b   = MB_INV;
        ctl.rf_wa   = ins.wa;
        ctl.rf_wsel = HW_INV;
        ctl.rf_we   = inv_done;
      end
      default: ;
    endcase
  end
endmodule
