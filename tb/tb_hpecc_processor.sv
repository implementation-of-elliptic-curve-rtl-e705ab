// tb_hpecc_processor: end-to-end testbench of the high-performance processor on
// the NIST B-163 and K-163 curves. Each scalar has bit 162 set; the result
// k*G is compared with an affine double-and-add multiplication from
// gf_ref_pkg, and the latency (busy cycles) with 1129. The scalar equal to the
// B-163 group order must give the point at infinity.
module tb_hpecc_processor;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done, q_inf;
  fe_t  x, y, b, k, qx, qy;

  hpecc_processor dut (.clk, .rst_n, .start, .x, .y, .b, .k, .busy, .done, .qx, .qy, .q_inf);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fe_t cb, input fe_t gx, input fe_t gy, input fe_t kv);
    pt_t g, e;
    int cyc;
    g.inf = 1'b0; g.x = gx; g.y = gy;
    e = pmul(kv, g, fe_t'(1));
    x = gx; y = gy; b = cb; k = kv; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin
      if (busy) cyc++;
      @(negedge clk);
    end
    checks += 2;
    if (cyc != 1129) begin failures++; $display("latency %0d, expected 1129", cyc); end
    if (q_inf !== e.inf) begin failures++; $display("k=%h: q_inf=%b, expected %b", kv, q_inf, e.inf); end
    if (!e.inf) begin
      checks += 2;
      if (qx !== e.x) begin failures++; $display("k=%h: qx=%h, expected %h", kv, qx, e.x); end
      if (qy !== e.y) begin failures++; $display("k=%h: qy=%h, expected %h", kv, qy, e.y); end
    end
    @(negedge clk);
  endtask

  initial begin
    pt_t g;
    x = '0; y = '0; b = '0; k = '0;
    g.inf = 1'b0; g.x = B163_GX; g.y = B163_GY;
    checks++;
    if (!on_curve(g, fe_t'(1), B163_B)) begin failures++; $display("B-163 base point not on curve"); end
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(B163_B, B163_GX, B163_GY, fe_t'(1) << (RM - 1));
    for (int i = 0; i < 3; i++) run(B163_B, B163_GX, B163_GY, rand_fe() | (fe_t'(1) << (RM - 1)));
    run(K163_B, K163_GX, K163_GY, rand_fe() | (fe_t'(1) << (RM - 1)));
    run(B163_B, B163_GX, B163_GY, B163_N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
