// tb_llecc_ladder: testbench of the LLECC ladder datapath in GF(2^163).
// Loads random projective points into the local registers, runs ladder
// iterations for both scalar-bit values and compares the four coordinates
// after each two-cycle iteration with the Madd/Mdouble formulas evaluated by
// gf_ref_pkg. Also checks the borrowed multiplier port and the store path.
module tb_llecc_ladder;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  fe_t  x, b, ld_data, ext_a, ext_b, ext_p, x1, z1, x2, z2, local_q;
  logic ld_en = 0, ld_one = 0, step_en = 0, step = 0, kbit = 0, mul_ext = 0;
  logic [1:0] ld_sel = 0;

  llecc_ladder #(.M(RM), .POLY(RPOLY)) dut (
    .clk, .x, .b, .ld_en, .ld_sel, .ld_one, .ld_data, .step_en, .step, .kbit,
    .mul_ext, .ext_a, .ext_b, .ext_p, .x1, .z1, .x2, .z2, .local_q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [1:0] s, input fe_t v);
    ld_en = 1; ld_sel = s; ld_data = v;
    @(negedge clk);
    ld_en = 0;
  endtask

  task automatic chk(input string n, input fe_t got, input fe_t e);
    checks++;
    if (got !== e) begin failures++; $display("%s = %h, expected %h", n, got, e); end
  endtask

  initial begin
    fe_t rx1, rz1, rx2, rz2, xa, za, xd, zd, t1, t2, zan, xan, zdn, xdn;
    x = rand_fe(); b = rand_fe(); ld_data = '0; ext_a = '0; ext_b = '0;
    @(negedge clk);
    ld_one = 1; load(2'd1, rand_fe()); ld_one = 0;
    chk("Z1 after constant load", z1, fe_t'(1));
    for (int it = 0; it < 40; it++) begin
      rx1 = rand_fe(); rz1 = rand_fe(); rx2 = rand_fe(); rz2 = rand_fe();
      load(2'd0, rx1); load(2'd1, rz1); load(2'd2, rx2); load(2'd3, rz2);
      for (int s = 0; s < 4; s++) begin
        ld_sel = 2'(s);
        #1;
        chk("local_q", local_q, (s == 0) ? rx1 : (s == 1) ? rz1 : (s == 2) ? rx2 : rz2);
      end
      for (int rep = 0; rep < 3; rep++) begin
        kbit = 1'($urandom_range(0, 1));
        x = rand_fe(); b = rand_fe();
        {xa, za, xd, zd} = kbit ? {rx1, rz1, rx2, rz2} : {rx2, rz2, rx1, rz1};
        t1  = gmul(xa, zd);
        t2  = gmul(xd, za);
        zan = gsq(t1 ^ t2);
        xan = gmul(x, zan) ^ gmul(t1, t2);
        zdn = gmul(gsq(xd), gsq(zd));
        xdn = gsq(gsq(xd)) ^ gmul(b, gsq(gsq(zd)));
        step_en = 1; step = 0;
        @(negedge clk);
        step = 1;
        @(negedge clk);
        step_en = 0; step = 0;
        {rx1, rz1, rx2, rz2} = kbit ? {xan, zan, xdn, zdn} : {xdn, zdn, xan, zan};
        chk("X1", x1, rx1); chk("Z1", z1, rz1); chk("X2", x2, rx2); chk("Z2", z2, rz2);
      end
      mul_ext = 1; ext_a = rand_fe(); ext_b = rand_fe();
      #1;
      chk("ext_p", ext_p, gmul(ext_a, ext_b));
      mul_ext = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
