// gf2m_inv: Itoh-Tsujii inversion in GF(2^M), a^-1 = a^(2^M - 2).
//
// With beta_k = a^(2^k - 1) and beta_(i+j) = beta_i^(2^j) * beta_j, the unit
// first builds beta_1, beta_2, beta_4, ... beta_(2^T) (T = floor(log2(M-1))),
// keeping in a small local memory those beta_(2^i) whose bit i is set in M-1.
// It then joins the lower set bits of M-1 from the top down, and the final
// squaring of beta_(M-1) is cascaded onto the output of the last
// multiplication. That takes floor(log2(M-1)) + h(M-1) - 1 multiplications.
// Repeated squarings run two per clock cycle through the quad-squarer (one
// cycle for a single squaring), so for M = 163 there are 81 squaring cycles.
//
// The multiplier is not inside the unit: mul_a/mul_b drive a shared field
// multiplier and mul_p returns its product MUL_LAT cycles later (0 for a
// combinational multiplier, 2 for the two-stage pipelined one); each
// multiplication step lasts MUL_LAT+1 cycles. For M = 163: 81 + 9*(MUL_LAT+1)
// cycles. The addition chain and the squaring schedule follow the cycle counts
// the processors are specified with; their exact ordering is this design's.
//
// Interface: pulse start with the operand on a (it is captured). busy is high
// while the unit works; done pulses for one cycle with the result on r, which
// holds until the next start. An operand of zero yields zero.
module gf2m_inv #(
  parameter int unsigned M       = 163,
  parameter logic [M-1:0] POLY   = M'('hC9),
  parameter int unsigned MUL_LAT = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] r,
  output logic [M-1:0] mul_a,
  output logic [M-1:0] mul_b,
  input  logic [M-1:0] mul_p
);
  localparam int unsigned E  = M - 1;
  localparam int unsigned T  = $clog2(E + 1) - 1;   // floor(log2(E))
  localparam int unsigned SW = T + 2;
  localparam int unsigned LW = $clog2(T + 1) + 1;
  localparam int unsigned CW = (MUL_LAT > 0) ? $clog2(MUL_LAT + 1) : 1;
  localparam logic [31:0] EV = 32'(E);

  // Highest set bit of E below position j, or -1.
  function automatic int next_low_bit(input int j);
    int nb;
    nb = -1;
    for (int i = 0; i < j; i++) if (EV[i]) nb = i;
    return nb;
  endfunction

  typedef enum logic {PH_BUILD, PH_JOIN} phase_t;

  logic [M-1:0]  rr, bb;
  logic [M-1:0]  bmem [2**LW];
  logic [SW-1:0] sq_left;
  logic [LW-1:0] lvl, jb;
  logic [CW-1:0] mcnt;
  phase_t        phase;

  logic [M-1:0] r_sq, r_quad, p_sq;
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq0 (.a(rr),   .s(r_sq));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sq1 (.a(r_sq), .s(r_quad));
  gf2m_sqr #(.M(M), .POLY(POLY)) u_sqp (.a(mul_p), .s(p_sq));

  always_comb begin
    mul_a = rr;
    mul_b = bb;
    r     = rr;
  end

  int  nb_build, nb_join;
  logic last_mul;
  always_comb begin
    nb_build = next_low_bit(int'(T));
    nb_join  = next_low_bit(int'(jb));
    last_mul = (phase == PH_BUILD) ? (int'(lvl) == int'(T) && nb_build < 0)
                                   : (nb_join < 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      rr      <= '0;
      bb      <= '0;
      sq_left <= '0;
      lvl     <= '0;
      jb      <= '0;
      mcnt    <= '0;
      phase   <= PH_BUILD;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        rr      <= a;
        bb      <= a;
        sq_left <= SW'(1);
        lvl     <= LW'(1);
        mcnt    <= '0;
        phase   <= PH_BUILD;
        if (EV[0]) bmem[0] <= a;
      end else if (busy) begin
        if (sq_left >= SW'(2)) begin
          rr      <= r_quad;
          sq_left <= sq_left - SW'(2);
        end else if (sq_left == SW'(1)) begin
          rr      <= r_sq;
          sq_left <= '0;
        end else if (int'(mcnt) != int'(MUL_LAT)) begin
          mcnt <= mcnt + CW'(1);
        end else begin
          mcnt <= '0;
          if (last_mul) begin
            rr   <= p_sq;
            busy <= 1'b0;
            done <= 1'b1;
          end else if (phase == PH_BUILD && int'(lvl) < int'(T)) begin
            rr      <= mul_p;
            bb      <= mul_p;
            sq_left <= SW'(1) << lvl;
            if (EV[5'(lvl)]) bmem[lvl] <= mul_p;
            lvl     <= lvl + LW'(1);
          end else if (phase == PH_BUILD) begin
            rr      <= mul_p;
            phase   <= PH_JOIN;
            jb      <= LW'(nb_build);
            bb      <= bmem[LW'(nb_build)];
            sq_left <= SW'(1) << nb_build;
          end else begin
            rr      <= mul_p;
            jb      <= LW'(nb_join);
            bb      <= bmem[LW'(nb_join)];
            sq_left <= SW'(1) << nb_join;
          end
        end
      end
    end
  end
endmodule
