// gf_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL. GF(2^163) with f(x) = x^163 + x^7 + x^6 + x^3 + 1: multiplication
// least significant bit first, inversion by Fermat's little theorem
// (a^(2^163 - 2) by square-and-multiply), and affine point addition, doubling
// and double-and-add scalar multiplication on y^2 + xy = x^3 + a x^2 + b.
// Also the NIST B-163 and K-163 curve constants and base points.
package gf_ref_pkg;
  localparam int unsigned RM = 163;
  typedef logic [RM-1:0] fe_t;
  localparam fe_t RPOLY = fe_t'('hC9);

  typedef struct packed {
    logic inf;
    fe_t  x;
    fe_t  y;
  } pt_t;

  localparam fe_t B163_B  = 163'h20A601907B8C953CA1481EB10512F78744A3205FD;
  localparam fe_t B163_GX = 163'h3F0EBA16286A2D57EA0991168D4994637E8343E36;
  localparam fe_t B163_GY = 163'h0D51FBC6C71A0094FA2CDD545B11C5C0C797324F1;
  localparam fe_t B163_N  = 163'h40000000000000000000292FE77E70C12A4234C33;
  localparam fe_t K163_B  = 163'h1;
  localparam fe_t K163_GX = 163'h2FE13C0537BBC11ACAA07D793DE4E6D5E5C94EEE8;
  localparam fe_t K163_GY = 163'h289070FB05D38FF58321F2E800536D538CCDAA3D9;

  function automatic fe_t gmul(input fe_t a, input fe_t b);
    fe_t r, s;
    r = '0;
    s = a;
    for (int i = 0; i < int'(RM); i++) begin
      if (b[i]) r ^= s;
      s = s[RM-1] ? ({s[RM-2:0], 1'b0} ^ RPOLY) : {s[RM-2:0], 1'b0};
    end
    return r;
  endfunction

  function automatic fe_t gsq(input fe_t a);
    return gmul(a, a);
  endfunction

  function automatic fe_t ginv(input fe_t a);
    fe_t r, s;
    r = fe_t'(1);
    s = a;
    for (int i = 1; i < int'(RM); i++) begin
      s = gsq(s);
      r = gmul(r, s);
    end
    return r;
  endfunction

  function automatic pt_t pdbl(input pt_t p, input fe_t ca);
    pt_t q;
    fe_t l;
    if (p.inf || p.x == '0) begin
      q = '0;
      q.inf = 1'b1;
      return q;
    end
    l = p.x ^ gmul(p.y, ginv(p.x));
    q.inf = 1'b0;
    q.x = gsq(l) ^ l ^ ca;
    q.y = gsq(p.x) ^ gmul(l ^ fe_t'(1), q.x);
    return q;
  endfunction

  function automatic pt_t padd(input pt_t p, input pt_t r, input fe_t ca);
    pt_t q;
    fe_t l;
    if (p.inf) return r;
    if (r.inf) return p;
    if (p.x == r.x) begin
      if (p.y == r.y) return pdbl(p, ca);
      q = '0;
      q.inf = 1'b1;
      return q;
    end
    l = gmul(p.y ^ r.y, ginv(p.x ^ r.x));
    q.inf = 1'b0;
    q.x = gsq(l) ^ l ^ p.x ^ r.x ^ ca;
    q.y = gmul(l, p.x ^ q.x) ^ q.x ^ p.y;
    return q;
  endfunction

  function automatic pt_t pmul(input fe_t k, input pt_t p, input fe_t ca);
    pt_t q;
    q = '0;
    q.inf = 1'b1;
    for (int i = int'(RM) - 1; i >= 0; i--) begin
      q = pdbl(q, ca);
      if (k[i]) q = padd(q, p, ca);
    end
    return q;
  endfunction

  function automatic bit on_curve(input pt_t p, input fe_t ca, input fe_t cb);
    fe_t lhs, rhs;
    lhs = gsq(p.y) ^ gmul(p.x, p.y);
    rhs = gmul(gsq(p.x), p.x) ^ gmul(ca, gsq(p.x)) ^ cb;
    return lhs == rhs;
  endfunction

  function automatic fe_t rand_fe();
    logic [191:0] w;
    for (int i = 0; i < 6; i++) w[32*i +: 32] = $urandom();
    return w[RM-1:0];
  endfunction
endpackage
