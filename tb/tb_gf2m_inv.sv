// tb_gf2m_inv: testbench of the Itoh-Tsujii inversion unit in GF(2^163).
// Two instances: one served by the single-cycle multiplier (MUL_LAT = 0) and
// one by a multiplier model with two pipeline registers (MUL_LAT = 2). Each
// result is compared with a Fermat inversion from gf_ref_pkg, and the number
// of busy cycles with 81 squaring cycles + 9 multiplications of MUL_LAT+1
// cycles: 90 and 108.
module tb_gf2m_inv;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  fe_t  a;
  logic busy0, done0, busy2, done2;
  fe_t  r0, ma0, mb0, mp0, r2, ma2, mb2, mp2, pipe1, pipe2;

  gf2m_inv #(.M(RM), .POLY(RPOLY), .MUL_LAT(0)) dut0 (
    .clk, .rst_n, .start, .a, .busy(busy0), .done(done0), .r(r0),
    .mul_a(ma0), .mul_b(mb0), .mul_p(mp0));
  gf2m_mult #(.M(RM), .POLY(RPOLY)) u_m0 (.a(ma0), .b(mb0), .p(mp0));

  gf2m_inv #(.M(RM), .POLY(RPOLY), .MUL_LAT(2)) dut2 (
    .clk, .rst_n, .start, .a, .busy(busy2), .done(done2), .r(r2),
    .mul_a(ma2), .mul_b(mb2), .mul_p(mp2));
  always_ff @(posedge clk) begin
    pipe1 <= gmul(ma2, mb2);
    pipe2 <= pipe1;
  end
  always_comb mp2 = pipe2;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fe_t v);
    int c0, c2;
    fe_t e;
    bit d0, d2;
    a = v;
    start = 1;
    @(negedge clk);
    start = 0;
    c0 = 0; c2 = 0; d0 = 0; d2 = 0;
    while (!(d0 && d2)) begin
      if (busy0) c0++;
      if (busy2) c2++;
      if (done0 && !d0) begin d0 = 1; e = ginv(v); checks++;
        if (r0 !== e) begin failures++; $display("MUL_LAT=0: inv(%h) = %h, expected %h", v, r0, e); end
      end
      if (done2 && !d2) begin d2 = 1; e = ginv(v); checks++;
        if (r2 !== e) begin failures++; $display("MUL_LAT=2: inv(%h) = %h, expected %h", v, r2, e); end
      end
      @(negedge clk);
    end
    checks += 2;
    if (c0 != 90)  begin failures++; $display("MUL_LAT=0 took %0d cycles, expected 90", c0); end
    if (c2 != 108) begin failures++; $display("MUL_LAT=2 took %0d cycles, expected 108", c2); end
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(fe_t'(1));
    run(fe_t'(2));
    run(fe_t'(1) << (RM - 1));
    for (int i = 0; i < 12; i++) run(rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
