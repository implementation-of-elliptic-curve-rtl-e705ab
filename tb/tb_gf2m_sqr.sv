// tb_gf2m_sqr: testbench of the GF(2^163) squaring circuit.
// Random and corner-case operands; every result is compared with the
// reference arithmetic of gf_ref_pkg.
module tb_gf2m_sqr;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  fe_t a, b, got, exp_v;
  gf2m_sqr #(.M(RM), .POLY(RPOLY)) dut (.a, .s(got));
  task automatic check_one(input fe_t ta, input fe_t tb_v);
    a = ta;
    b = tb_v;
    #1;
    exp_v = gmul(a, a);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 5) $display("MISMATCH a=%h b=%h got=%h exp=%h", a, b, got, exp_v);
    end
  endtask
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    check_one('0, '0);
    check_one(fe_t'(1), fe_t'(1));
    check_one('1, '1);
    check_one(fe_t'(1) << (RM - 1), fe_t'(1) << (RM - 1));
    check_one(fe_t'(1) << (RM - 1), fe_t'(2));
    for (int i = 0; i < 300; i++) check_one(rand_fe(), rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
