// tb_llecc_ctrl: testbench of the LLECC control unit for M = 163.
// A model of the inversion unit answers inv_start with inv_done 91 cycles
// later (90 working cycles). The testbench checks the length of every phase
// (5 init writes, 4 loads, 324 ladder cycles, 4 stores, 448 busy cycles in
// all), that each ladder iteration presents the right scalar bit for both of
// its steps, the operation mix of the conversion (10 multiplications,
// 6 additions, 1 squaring, 1 inversion, 2 outputs) and the done pulse.
module tb_llecc_ctrl;
  import ecc_pkg::*;
  localparam int unsigned M = 163;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, inv_done = 0, busy, done;
  logic [M-1:0] k;
  llecc_ctrl_t ctl;

  llecc_ctrl #(.M(M)) dut (.clk, .rst_n, .start, .k, .inv_done, .ctl, .busy, .done);

  always #5 clk = ~clk;

  // Inversion unit model: done 91 cycles after the start cycle.
  int inv_cnt = 0;
  always_ff @(posedge clk) begin
    inv_done <= 1'b0;
    if (ctl.inv_start) inv_cnt <= 1;
    else if (inv_cnt != 0) begin
      inv_cnt <= (inv_cnt == 90) ? 0 : inv_cnt + 1;
      if (inv_cnt == 90) inv_done <= 1'b1;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string n, input int got, input int e);
    checks++;
    if (got != e) begin failures++; $display("%s: %0d, expected %0d", n, got, e); end
  endtask

  task automatic run(input logic [M-1:0] kv);
    int n_busy, n_init, n_load, n_step, n_store, n_mul, n_add, n_sqr, n_inv, n_out, n_done;
    int n_invw, n_bitbad, bit_idx;
    n_busy = 0; n_init = 0; n_load = 0; n_step = 0; n_store = 0; n_mul = 0;
    n_add = 0; n_sqr = 0; n_inv = 0; n_out = 0; n_done = 0; n_invw = 0; n_bitbad = 0;
    bit_idx = M - 2;
    k = kv; start = 1;
    @(negedge clk);
    start = 0;
    while (busy) begin
      n_busy++;
      if (ctl.rf_we && ctl.rf_wsel inside {WS_XIN, WS_YIN, WS_BIN, WS_SQR, WS_QADD}) n_init++;
      if (ctl.ld_en) n_load++;
      if (ctl.step_en) begin
        n_step++;
        if (ctl.kbit != kv[bit_idx]) n_bitbad++;
        if (ctl.step) bit_idx--;
      end
      if (ctl.rf_we && ctl.rf_wsel == WS_LOCAL) n_store++;
      if (ctl.rf_we && ctl.rf_wsel == WS_ALU && ctl.alu_op == CI_MUL && ctl.mul_ext) n_mul++;
      if (ctl.rf_we && ctl.rf_wsel == WS_ALU && ctl.alu_op == CI_ADD) n_add++;
      if (ctl.rf_we && ctl.rf_wsel == WS_ALU && ctl.alu_op == CI_SQR) n_sqr++;
      if (ctl.inv_start) n_inv++;
      if (ctl.inv_mul) n_invw++;
      if (ctl.outx_we || ctl.outy_we) n_out++;
      @(negedge clk);
      if (done) n_done++;
    end
    chk("busy cycles", n_busy, 448);
    chk("init writes", n_init, 5);
    chk("local loads", n_load, 4);
    chk("ladder cycles", n_step, 2 * (M - 1));
    chk("scalar bit errors", n_bitbad, 0);
    chk("stores", n_store, 4);
    chk("multiplications", n_mul, 10);
    chk("additions", n_add, 6);
    chk("squarings", n_sqr, 1);
    chk("inversions", n_inv, 1);
    chk("inversion wait cycles", n_invw, 91);
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
