// tb_gf2m_mult_seg: testbench of the segmented two-stage pipelined GF(2^163)
// multiplier. A new random operand pair enters every cycle; each product must
// appear exactly two cycles later and match the reference multiplication.
// Also run with 3 segments to cover a last segment shorter than the others.
module tb_gf2m_mult_seg;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  fe_t a, b, p4, p3;
  fe_t hist_a [3], hist_b [3];

  gf2m_mult_seg #(.M(RM), .POLY(RPOLY), .SEGS(4)) dut4 (.clk, .a, .b, .p(p4));
  gf2m_mult_seg #(.M(RM), .POLY(RPOLY), .SEGS(3)) dut3 (.clk, .a, .b, .p(p3));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t e;
    for (int i = 0; i < 300; i++) begin
      a = (i == 0) ? '1 : (i == 1) ? fe_t'(1) : rand_fe();
      b = (i == 0) ? '1 : (i == 1) ? fe_t'(1) << (RM - 1) : rand_fe();
      hist_a[i % 3] = a;
      hist_b[i % 3] = b;
      @(negedge clk);
      // After the clock edge that took pair i, p holds the product of pair i-1.
      if (i >= 1) begin
        e = gmul(hist_a[(i + 2) % 3], hist_b[(i + 2) % 3]);
        checks += 2;
        if (p4 !== e) begin failures++; $display("SEGS=4 cycle %0d: %h, expected %h", i, p4, e); end
        if (p3 !== e) begin failures++; $display("SEGS=3 cycle %0d: %h, expected %h", i, p3, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
