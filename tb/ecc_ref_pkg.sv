// ecc_ref_pkg: reference arithmetic for the testbenches.
//
// Plain big-integer modular arithmetic (up to 255-bit moduli) and affine
// elliptic curve formulas, written with the % operator and modular inversion
// by Fermat's little theorem. None of it shares code or formulas with the
// processor, which works in projective coordinates and Montgomery form, so
// the two can check each other.
package ecc_ref_pkg;

  typedef logic [255:0] fe_t;

  // NIST P-192 prime 2^192 - 2^64 - 1, used as the default test field.
  localparam fe_t P192 = 256'hFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFEFFFFFFFFFFFFFFFF;

  function automatic fe_t mulmod(input fe_t a, input fe_t b, input fe_t p);
    logic [511:0] t;
    t = ({256'b0, a} * {256'b0, b}) % {256'b0, p};
    return t[255:0];
  endfunction

  function automatic fe_t addmod(input fe_t a, input fe_t b, input fe_t p);
    logic [256:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, p}) s = s - {1'b0, p};
    return s[255:0];
  endfunction

  function automatic fe_t submod(input fe_t a, input fe_t b, input fe_t p);
    return (a >= b) ? a - b : a + p - b;
  endfunction

  function automatic fe_t powmod(input fe_t a, input fe_t e, input fe_t p);
    fe_t r;
    r = 1;
    for (int i = 255; i >= 0; i--) begin
      r = mulmod(r, r, p);
      if (e[i]) r = mulmod(r, a, p);
    end
    return r;
  endfunction

  function automatic fe_t invmod(input fe_t a, input fe_t p);
    return powmod(a, p - 2, p);
  endfunction

  // x mod p for a value of up to 511 bits
  function automatic fe_t modw(input logic [511:0] x, input fe_t p);
    logic [511:0] t;
    t = x % {256'b0, p};
    return t[255:0];
  endfunction

  // 2^(2(pb+2)) mod p: the constant that moves a value into Montgomery form
  function automatic fe_t mont_r2(input int pb, input fe_t p);
    logic [511:0] one;
    one = 512'b1;
    return modw(one << (2 * (pb + 2)), p);
  endfunction

  // ---- twisted Edwards, affine: a x^2 + y^2 = 1 + d x^2 y^2 ----
  task automatic te_add(input fe_t x1, input fe_t y1, input fe_t x2, input fe_t y2,
                        input fe_t a, input fe_t d, input fe_t p,
                        output fe_t x3, output fe_t y3);
    fe_t t;
    t  = mulmod(d, mulmod(mulmod(x1, x2, p), mulmod(y1, y2, p), p), p);
    x3 = mulmod(addmod(mulmod(x1, y2, p), mulmod(y1, x2, p), p),
                invmod(addmod(1, t, p), p), p);
    y3 = mulmod(submod(mulmod(y1, y2, p), mulmod(a, mulmod(x1, x2, p), p), p),
                invmod(submod(1, t, p), p), p);
  endtask

  task automatic te_smul(input fe_t k, input fe_t x, input fe_t y,
                         input fe_t a, input fe_t d, input fe_t p,
                         output fe_t xr, output fe_t yr);
    fe_t qx, qy;
    qx = 0;
    qy = 1;                           // neutral element
    for (int i = 255; i >= 0; i--) begin
      te_add(qx, qy, qx, qy, a, d, p, qx, qy);
      if (k[i]) te_add(qx, qy, x, y, a, d, p, qx, qy);
    end
    xr = qx;
    yr = qy;
  endtask

  // d that puts (x, y) on a x^2 + y^2 = 1 + d x^2 y^2
  function automatic fe_t te_d_for(input fe_t x, input fe_t y, input fe_t a, input fe_t p);
    fe_t x2, y2;
    x2 = mulmod(x, x, p);
    y2 = mulmod(y, y, p);
    return mulmod(submod(addmod(mulmod(a, x2, p), y2, p), 1, p),
                  invmod(mulmod(x2, y2, p), p), p);
  endfunction

  // ---- short Weierstrass, affine: y^2 = x^3 + A x + B (B unused) ----
  task automatic w_add(input logic inf1, input fe_t x1, input fe_t y1,
                       input logic inf2, input fe_t x2, input fe_t y2,
                       input fe_t a, input fe_t p,
                       output logic inf3, output fe_t x3, output fe_t y3);
    fe_t l;
    if (inf1) begin inf3 = inf2; x3 = x2; y3 = y2; return; end
    if (inf2) begin inf3 = inf1; x3 = x1; y3 = y1; return; end
    if (x1 == x2) begin
      if (addmod(y1, y2, p) == 0) begin inf3 = 1; x3 = 0; y3 = 0; return; end
      l = mulmod(addmod(mulmod(3, mulmod(x1, x1, p), p), a, p),
                 invmod(addmod(y1, y1, p), p), p);
    end else begin
      l = mulmod(submod(y2, y1, p), invmod(submod(x2, x1, p), p), p);
    end
    inf3 = 0;
    x3 = submod(submod(mulmod(l, l, p), x1, p), x2, p);
    y3 = submod(mulmod(l, submod(x1, x3, p), p), y1, p);
  endtask

  task automatic w_smul(input fe_t k, input fe_t x, input fe_t y,
                        input fe_t a, input fe_t p,
                        output fe_t xr, output fe_t yr);
    logic inf;
    fe_t qx, qy;
    inf = 1;
    qx = 0;
    qy = 0;
    for (int i = 255; i >= 0; i--) begin
      w_add(inf, qx, qy, inf, qx, qy, a, p, inf, qx, qy);
      if (k[i]) w_add(inf, qx, qy, 1'b0, x, y, a, p, inf, qx, qy);
    end
    xr = qx;
    yr = qy;
  endtask

endpackage
