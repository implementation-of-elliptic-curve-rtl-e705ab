// tb_hpecc_ctrl: testbench of the HPECC control unit for M = 163.
// A model of the inversion unit answers inv_start with inv_done 109 cycles
// later (108 working cycles). The testbench checks the phase lengths (5 init
// writes, 6 cycles per ladder iteration, 2 drain cycles, 1129 busy cycles),
// that in every iteration Z of the added pair is written in slot 3 and Z and
// X of the doubled pair in slots 4 and 5 as the scalar bit selects, that the
// bypass is used in every iteration but the first, and the operation mix of
// the conversion.
module tb_hpecc_ctrl;
  import ecc_pkg::*;
  localparam int unsigned M = 163;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, inv_done = 0, busy, done;
  logic [M-1:0] k;
  hpecc_ctrl_t ctl;

  hpecc_ctrl #(.M(M)) dut (.clk, .rst_n, .start, .k, .inv_done, .ctl, .busy, .done);

  always #5 clk = ~clk;

  int inv_cnt = 0;
  always_ff @(posedge clk) begin
    inv_done <= 1'b0;
    if (ctl.inv_start) inv_cnt <= 1;
    else if (inv_cnt != 0) begin
      inv_cnt <= (inv_cnt == 108) ? 0 : inv_cnt + 1;
      if (inv_cnt == 108) inv_done <= 1'b1;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string n, input int got, input int e);
    checks++;
    if (got != e) begin failures++; $display("%s: %0d, expected %0d", n, got, e); end
  endtask

  task automatic run(input logic [M-1:0] kv);
    int n_busy, n_init, n_loop, n_byp, n_bad, n_mul, n_add, n_sqr, n_inv, n_invw, n_out, n_done;
    int n_xa, slot, bit_idx;
    logic kb;
    n_busy = 0; n_init = 0; n_loop = 0; n_byp = 0; n_bad = 0; n_mul = 0; n_add = 0;
    n_sqr = 0; n_inv = 0; n_invw = 0; n_out = 0; n_done = 0; n_xa = 0;
    slot = 0; bit_idx = M - 2;
    k = kv; start = 1;
    @(negedge clk);
    start = 0;
    while (busy) begin
      n_busy++;
      if (ctl.rf_we && ctl.rf_wsel inside {HW_XIN, HW_BIN, HW_QADD}) n_init++;
      if (ctl.rf_we && ctl.rf_wsel == HW_SQR && ctl.z1_one) n_init++;
      if (ctl.mul_a == MA_BYP) n_byp++;
      if (ctl.rf_we && ctl.rf_wsel == HW_XA) n_xa++;
      if (n_busy > 5 && n_busy <= 5 + 6 * (M - 1)) begin   // ladder iteration
        n_loop++;
        kb = kv[bit_idx];
        if (slot == 3 && !(ctl.rf_we && ctl.rf_wsel == HW_ZA && ctl.rf_wa == (kb ? A_Z1 : A_Z2))) n_bad++;
        if (slot == 4 && !(ctl.rf_we && ctl.rf_wsel == HW_ZD && ctl.rf_wa == (kb ? A_Z2 : A_Z1))) n_bad++;
        if (slot == 1 && bit_idx < M - 2 &&
            !(ctl.rf_we && ctl.rf_wsel == HW_XA && ctl.rf_wa == (kv[bit_idx + 1] ? A_X1 : A_X2))) n_bad++;
        if (slot == 0 && bit_idx < M - 2 && ctl.rf_ra != (kv[bit_idx + 1] ? A_X2 : A_X1)) n_bad++;
        if (slot == 5 && !(ctl.rf_we && ctl.rf_wsel == HW_XD && ctl.rf_wa == (kb ? A_X2 : A_X1))) n_bad++;
        slot++;
        if (slot == 6) begin slot = 0; bit_idx--; end
      end
      if (ctl.rf_we && ctl.rf_wsel == HW_MUL) n_mul++;
      if (ctl.rf_we && ctl.rf_wsel == HW_ADD) n_add++;
      if (ctl.rf_we && ctl.rf_wsel == HW_SQR && !ctl.z1_one) n_sqr++;
      if (ctl.inv_start) n_inv++;
      if (ctl.mul_a == MA_INV) n_invw++;
      if (ctl.outx_we || ctl.outy_we) n_out++;
      @(negedge clk);
      if (done) n_done++;
    end
    chk("busy cycles", n_busy, 1129);
    chk("init writes", n_init, 5);
    chk("ladder cycles", n_loop, 6 * (M - 1));
    chk("write slot errors", n_bad, 0);
    chk("bypassed operands", n_byp, M - 2);
    chk("X of added pair writes", n_xa, M - 1);
    chk("multiplications", n_mul, 10);
    chk("additions", n_add, 6);
    chk("squarings", n_sqr, 1);
    chk("inversions", n_inv, 1);
    chk("inversion wait cycles", n_invw, 109);
    chk("outputs", n_out, 2);
    chk("done pulses", n_done, 1);
  endtask

  initial begin
    k = '0;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run({1'b1, {(M-1){1'b0}}});
    run('1);
    for (int i = 0; i < 3; i++) run({1'b1, 162'(gf_ref_pkg::rand_fe())});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
