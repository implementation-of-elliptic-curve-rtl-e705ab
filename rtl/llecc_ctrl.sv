// llecc_ctrl: FSM control unit of the low-latency processor (LLECC).
//
// After start it sequences one point multiplication Q = k*P:
//   INIT   5 cycles  write x, y, b to main memory, then Z2 = x^2, X2 = x^4 + b
//   LOAD   4 cycles  load the ladder local registers X1 = x, Z1 = 1, X2, Z2
//   LOOP   2 cycles per scalar bit k[M-2] .. k[0] (k[M-1] is taken as 1)
//   STORE  4 cycles  write X1, Z1, X2, Z2 back to main memory
//   CONV   the coordinate-conversion program of ecc_pkg, one step per cycle;
//          the inversion step takes one cycle to start the inversion unit,
//          the unit's own cycles, and one cycle to write its result
// For M = 163 that is 5 + 4 + 324 + 4 + (17 + 2 + 90 + 2) = 448 cycles with
// busy high. k is captured when start is accepted (in IDLE); done pulses for
// one cycle after the last output is written. The control word is decoded
// combinationally from the state. The phase lengths of INIT, LOAD, LOOP and
// STORE and the inversion length are those the processor is specified with;
// the content of each cycle and the conversion schedule are this design's.
module llecc_ctrl
  import ecc_pkg::*;
#(
  parameter int unsigned M = 163
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [M-1:0] k,
  input  logic        inv_done,
  output llecc_ctrl_t ctl,
  output logic        busy,
  output logic        done
);
  localparam int unsigned BW = $clog2(M);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_LOAD, S_LOOP, S_STORE, S_CONV, S_INVW}
    state_t;

  state_t        state;
  logic [2:0]    cnt;
  logic [BW-1:0] bi;
  logic          stp;
  logic [4:0]    pc;
  logic [M-1:0]  k_reg;
  conv_instr_t   ins;

  always_comb ins = conv_prog(int'(pc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      bi    <= '0;
      stp   <= 1'b0;
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
            state <= S_LOAD;
          end
        end
        S_LOAD: begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd3) begin
            cnt   <= '0;
            bi    <= BW'(M - 2);
            stp   <= 1'b0;
            state <= S_LOOP;
          end
        end
        S_LOOP: begin
          stp <= ~stp;
          if (stp) begin
            if (bi == '0) state <= S_STORE;
            else          bi <= bi - BW'(1);
          end
        end
        S_STORE: begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd3) begin
            cnt   <= '0;
            pc    <= '0;
            state <= S_CONV;
          end
        end
        S_CONV: begin
          if (ins.op == CI_INV) begin
            state <= S_INVW;
          end else if (ins.op == CI_OUTY) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            pc <= pc + 5'd1;
          end
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

  always_comb begin
    ctl         = '0;
    ctl.rf_wsel = WS_ALU;
    ctl.alu_op  = CI_ADD;
    case (state)
      S_INIT: begin
        ctl.rf_we = 1'b1;
        ctl.rf_ra = A_X;
        ctl.rf_rb = A_B;
        case (cnt)
          3'd0:    begin ctl.rf_wa = A_X;  ctl.rf_wsel = WS_XIN; end
          3'd1:    begin ctl.rf_wa = A_Y;  ctl.rf_wsel = WS_YIN; end
          3'd2:    begin ctl.rf_wa = A_B;  ctl.rf_wsel = WS_BIN; end
          3'd3:    begin ctl.rf_wa = A_Z2; ctl.rf_wsel = WS_SQR; end
          default: begin ctl.rf_wa = A_X2; ctl.rf_wsel = WS_QADD; end
        endcase
      end
      S_LOAD: begin
        ctl.ld_en  = 1'b1;
        ctl.ld_sel = cnt[1:0];
        ctl.ld_one = (cnt == 3'd1);
        case (cnt)
          3'd0:    ctl.rf_ra = A_X;
          3'd2:    ctl.rf_ra = A_X2;
          default: ctl.rf_ra = A_Z2;
        endcase
      end
      S_LOOP: begin
        ctl.rf_ra   = A_X;
        ctl.rf_rb   = A_B;
        ctl.step_en = 1'b1;
        ctl.step    = stp;
        ctl.kbit    = k_reg[bi];
      end
      S_STORE: begin
        ctl.rf_we   = 1'b1;
        ctl.rf_wa   = A_X1 + rf_addr_t'(cnt);
        ctl.rf_wsel = WS_LOCAL;
        ctl.ld_sel  = cnt[1:0];
      end
      S_CONV: begin
        ctl.rf_ra  = ins.ra;
        ctl.rf_rb  = ins.rb;
        ctl.rf_wa  = ins.wa;
        ctl.alu_op = ins.op;
        case (ins.op)
          CI_MUL:  begin ctl.rf_we = 1'b1; ctl.mul_ext = 1'b1; end
          CI_ADD,
          CI_SQR:  ctl.rf_we = 1'b1;
          CI_INV:  ctl.inv_start = 1'b1;
          CI_OUTX: ctl.outx_we = 1'b1;
          default: ctl.outy_we = 1'b1;
        endcase
      end
      S_INVW: begin
        ctl.inv_mul = 1'b1;
        ctl.rf_wa   = ins.wa;
        ctl.rf_wsel = WS_INV;
        ctl.rf_we   = inv_done;
      end
      default: ;
    endcase
  end
endmodule
