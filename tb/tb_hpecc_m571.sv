// tb_hpecc_m571: runs the high-performance processor at m = 571 with
// f(x) = x^571 + x^10 + x^5 + x^2 + 1, the larger field the processor is
// evaluated with. The base point (x, y) is random and the curve constant is
// chosen to put it on the curve: b = y^2 + xy + x^3 + x^2 (a = 1). The result
// is compared with affine double-and-add using an extended-Euclid inversion,
// written here for 571-bit operands independently of the RTL, and the
// latency with 5 + 6*570 + 2 + 366 = 3793 cycles.
module tb_hpecc_m571;
  localparam int unsigned M = 571;
  typedef logic [M-1:0] fe_t;
  localparam fe_t POLY = fe_t'('h425);
  localparam logic [M:0] FULL = {1'b1, POLY};

  typedef struct packed {
    logic inf;
    fe_t  x;
    fe_t  y;
  } pt_t;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done, q_inf;
  fe_t  x, y, b, k, qx, qy;

  hpecc_processor #(.M(M), .POLY(POLY)) dut (
    .clk, .rst_n, .start, .x, .y, .b, .k, .busy, .done, .qx, .qy, .q_inf);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fe_t gmul(input fe_t a, input fe_t bb);
    fe_t r, s;
    r = '0;
    s = a;
    for (int i = 0; i < int'(M); i++) begin
      if (bb[i]) r ^= s;
      s = s[M-1] ? ({s[M-2:0], 1'b0} ^ POLY) : {s[M-2:0], 1'b0};
    end
    return r;
  endfunction

  // Binary extended Euclid: keeps g1*a = u and g2*a = v (mod f).
  function automatic fe_t ginv(input fe_t a);
    logic [M:0] u, v, g1, g2;
    u = {1'b0, a}; v = FULL; g1 = 1; g2 = 0;
    while (u != 1 && v != 1) begin
      while (!u[0]) begin
        u = u >> 1;
        g1 = g1[0] ? (g1 ^ FULL) >> 1 : g1 >> 1;
      end
      while (!v[0]) begin
        v = v >> 1;
        g2 = g2[0] ? (g2 ^ FULL) >> 1 : g2 >> 1;
      end
      if (u > v) begin u ^= v; g1 ^= g2; end
      else       begin v ^= u; g2 ^= g1; end
    end
    return (u == 1) ? g1[M-1:0] : g2[M-1:0];
  endfunction

  function automatic pt_t pdbl(input pt_t p);
    pt_t q;
    fe_t l;
    q = '0;
    q.inf = 1'b1;
    if (p.inf || p.x == '0) return q;
    l = p.x ^ gmul(p.y, ginv(p.x));
    q.inf = 1'b0;
    q.x = gmul(l, l) ^ l ^ fe_t'(1);
    q.y = gmul(p.x, p.x) ^ gmul(l ^ fe_t'(1), q.x);
    return q;
  endfunction

  function automatic pt_t padd(input pt_t p, input pt_t r);
    pt_t q;
    fe_t l;
    if (p.inf) return r;
    if (r.inf) return p;
    q = '0;
    q.inf = 1'b1;
    if (p.x == r.x) return (p.y == r.y) ? pdbl(p) : q;
    l = gmul(p.y ^ r.y, ginv(p.x ^ r.x));
    q.inf = 1'b0;
    q.x = gmul(l, l) ^ l ^ p.x ^ r.x ^ fe_t'(1);
    q.y = gmul(l, p.x ^ q.x) ^ q.x ^ p.y;
    return q;
  endfunction

  function automatic pt_t pmul(input fe_t kv, input pt_t p);
    pt_t q;
    q = '0;
    q.inf = 1'b1;
    for (int i = int'(M) - 1; i >= 0; i--) begin
      q = pdbl(q);
      if (kv[i]) q = padd(q, p);
    end
    return q;
  endfunction

  function automatic fe_t rand_fe();
    fe_t v;
    for (int i = 0; i < int'(M); i++) v[i] = 1'($urandom_range(0, 1));
    return v;
  endfunction

  initial begin
    pt_t g, e;
    int cyc;
    fe_t t;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    t = rand_fe();
    checks++;
    if (gmul(t, ginv(t)) != fe_t'(1)) begin failures++; $display("reference inversion wrong"); end
    for (int run = 0; run < 2; run++) begin
      g.inf = 1'b0;
      g.x = rand_fe();
      g.y = rand_fe();
      b = gmul(g.y, g.y) ^ gmul(g.x, g.y) ^ gmul(gmul(g.x, g.x), g.x) ^ gmul(g.x, g.x);
      k = rand_fe() | (fe_t'(1) << (M - 1));
      e = pmul(k, g);
      x = g.x; y = g.y; start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done) begin
        if (busy) cyc++;
        @(negedge clk);
      end
      checks += 4;
      if (cyc != 3793) begin failures++; $display("latency %0d, expected 3793", cyc); end
      if (q_inf !== e.inf) begin failures++; $display("q_inf %b, expected %b", q_inf, e.inf); end
      if (qx !== e.x) begin failures++; $display("qx mismatch"); end
      if (qy !== e.y) begin failures++; $display("qy mismatch"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
