// tb_ecc_top: end-to-end testbench of ecc_top at its default size (GF(2^163)).
// Both processors are started together on the same point and scalar, on the
// NIST B-163 and K-163 curves, and each result is compared with an affine
// double-and-add reference. Latencies must be 448 (low-latency) and 1129
// (high-performance) cycles. The scalar equal to the B-163 group order must
// give the point at infinity. The testbench counts how often each mechanism
// of the two datapaths was exercised and fails if one never was.
module tb_ecc_top;
  import gf_ref_pkg::*;
  import ecc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  fe_t  x, y, b, k;
  logic ll_busy, ll_done, ll_q_inf, hp_busy, hp_done, hp_q_inf;
  fe_t  ll_qx, ll_qy, hp_qx, hp_qy;

  ecc_top dut (
    .clk, .rst_n,
    .ll_start(start), .ll_x(x), .ll_y(y), .ll_b(b), .ll_k(k),
    .ll_busy, .ll_done, .ll_qx, .ll_qy, .ll_q_inf,
    .hp_start(start), .hp_x(x), .hp_y(y), .hp_b(b), .hp_k(k),
    .hp_busy, .hp_done, .hp_qx, .hp_qy, .hp_q_inf);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int ll_add1 = 0, ll_add0 = 0, ll_load = 0, ll_store = 0, ll_conv_mul = 0, ll_inv_mul = 0;
  int hp_add1 = 0, hp_add0 = 0, hp_bypass = 0, hp_drain = 0, hp_z1one = 0, hp_conv_mul = 0;
  int inv_quad = 0, inv_single = 0, inv_runs = 0, infinity = 0, overlap = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_llecc.ctl.step_en && !dut.u_llecc.ctl.step) begin
      if (dut.u_llecc.ctl.kbit) ll_add1++; else ll_add0++;
    end
    if (dut.u_llecc.ctl.ld_en) ll_load++;
    if (dut.u_llecc.ctl.rf_we && dut.u_llecc.ctl.rf_wsel == WS_LOCAL) ll_store++;
    if (dut.u_llecc.ctl.mul_ext) ll_conv_mul++;
    if (dut.u_llecc.ctl.inv_mul) ll_inv_mul++;
    if (dut.u_hpecc.ctl.rf_we && dut.u_hpecc.ctl.rf_wsel == HW_ZA) begin
      if (dut.u_hpecc.ctl.rf_wa == A_Z1) hp_add1++; else hp_add0++;
    end
    if (dut.u_hpecc.ctl.mul_a == MA_BYP) hp_bypass++;
    if (dut.u_hpecc.ctl.rf_we && dut.u_hpecc.ctl.rf_wsel == HW_XA && !dut.u_hpecc.ctl.r1_we
        && dut.u_hpecc.ctl.mul_a != MA_BYP) hp_drain++;
    if (dut.u_hpecc.z1_one_q && (dut.u_hpecc.ctl.rf_ra == A_Z1 || dut.u_hpecc.ctl.rf_rb == A_Z1))
      hp_z1one++;
    if (dut.u_hpecc.ctl.rf_we && dut.u_hpecc.ctl.rf_wsel == HW_MUL) hp_conv_mul++;
    if (dut.u_llecc.u_inv.busy && dut.u_llecc.u_inv.sq_left >= 2) inv_quad++;
    if (dut.u_hpecc.u_inv.busy && dut.u_hpecc.u_inv.sq_left == 1) inv_single++;
    if (dut.u_llecc.u_inv.done) inv_runs++;
    if (dut.u_hpecc.u_inv.done) inv_runs++;
    if (ll_busy && hp_busy) overlap++;
  end

  task automatic chk(input string n, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", n); end
  endtask

  task automatic run(input fe_t cb, input fe_t gx, input fe_t gy, input fe_t kv);
    pt_t g, e;
    int cyc_ll, cyc_hp;
    bit got_ll, got_hp;
    g.inf = 1'b0; g.x = gx; g.y = gy;
    e = pmul(kv, g, fe_t'(1));
    if (e.inf) infinity++;
    x = gx; y = gy; b = cb; k = kv; start = 1;
    @(negedge clk);
    start = 0;
    cyc_ll = 0; cyc_hp = 0; got_ll = 0; got_hp = 0;
    while (!(got_ll && got_hp)) begin
      if (ll_busy) cyc_ll++;
      if (hp_busy) cyc_hp++;
      @(negedge clk);
      if (ll_done) begin
        got_ll = 1;
        chk("LLECC infinity flag", ll_q_inf === e.inf);
        if (!e.inf) begin
          chk("LLECC qx", ll_qx === e.x);
          chk("LLECC qy", ll_qy === e.y);
        end
      end
      if (hp_done) begin
        got_hp = 1;
        chk("HPECC infinity flag", hp_q_inf === e.inf);
        if (!e.inf) begin
          chk("HPECC qx", hp_qx === e.x);
          chk("HPECC qy", hp_qy === e.y);
        end
      end
    end
    chk($sformatf("LLECC latency %0d", cyc_ll), cyc_ll == 448);
    chk($sformatf("HPECC latency %0d", cyc_hp), cyc_hp == 1129);
    @(negedge clk);
  endtask

  task automatic need(input string n, input int cnt);
    $display("mechanism %-34s %0d", n, cnt);
    chk({"mechanism never exercised: ", n}, cnt > 0);
  endtask

  initial begin
    x = '0; y = '0; b = '0; k = '0;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(B163_B, B163_GX, B163_GY, rand_fe() | (fe_t'(1) << (RM - 1)));
    run(K163_B, K163_GX, K163_GY, rand_fe() | (fe_t'(1) << (RM - 1)));
    run(B163_B, B163_GX, B163_GY, B163_N);
    need("LLECC ladder step, bit 1", ll_add1);
    need("LLECC ladder step, bit 0", ll_add0);
    need("LLECC local register load", ll_load);
    need("LLECC local register store", ll_store);
    need("LLECC multiplier lent to conversion", ll_conv_mul);
    need("LLECC multiplier lent to inversion", ll_inv_mul);
    need("HPECC ladder step, bit 1", hp_add1);
    need("HPECC ladder step, bit 0", hp_add0);
    need("HPECC pipeline bypass", hp_bypass);
    need("HPECC pipeline drain", hp_drain);
    need("HPECC Z1 read as one", hp_z1one);
    need("HPECC conversion multiplication", hp_conv_mul);
    need("inversion quad-squaring cycle", inv_quad);
    need("inversion single squaring cycle", inv_single);
    need("inversion completed", inv_runs);
    need("result at infinity", infinity);
    need("both processors busy together", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
