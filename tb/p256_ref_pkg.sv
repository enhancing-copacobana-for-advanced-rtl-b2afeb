// p256_ref_pkg: slow, straightforward reference arithmetic on the P-256 curve
// for the testbenches: field operations with the '%' operator, inversion by
// Fermat's little theorem and affine point addition/doubling.
package p256_ref_pkg;
  typedef logic [255:0] fe_t;
  localparam fe_t P = 256'hFFFFFFFF_00000001_00000000_00000000_00000000_FFFFFFFF_FFFFFFFF_FFFFFFFF;
  localparam fe_t GX = 256'h6B17D1F2_E12C4247_F8BCE6E5_63A440F2_77037D81_2DEB33A0_F4A13945_D898C296;
  localparam fe_t GY = 256'h4FE342E2_FE1A7F9B_8EE7EB4A_7C0F9E16_2BCE3357_6B315ECE_CBB64068_37BF51F5;
  localparam fe_t B  = 256'h5AC635D8_AA3A93E7_B3EBBD55_769886BC_651D06B0_CC53B0F6_3BCE3C3E_27D2604B;

  typedef struct { fe_t x; fe_t y; bit inf; } apt_t;

  function automatic fe_t fmul(fe_t a, fe_t b);
    logic [511:0] t;
    t = {256'd0, a} * {256'd0, b};
    t = t % {256'd0, P};
    return t[255:0];
  endfunction
  function automatic fe_t fadd(fe_t a, fe_t b);
    logic [256:0] t;
    t = ({1'b0, a} + {1'b0, b}) % {1'b0, P};
    return t[255:0];
  endfunction
  function automatic fe_t fsub(fe_t a, fe_t b);
    logic [256:0] t;
    t = ({1'b0, a} + {1'b0, P} - {1'b0, b}) % {1'b0, P};
    return t[255:0];
  endfunction
  function automatic fe_t finv(fe_t a);
    fe_t r, e;
    r = 256'd1;
    e = P - 256'd2;
    for (int i = 255; i >= 0; i--) begin
      r = fmul(r, r);
      if (e[i]) r = fmul(r, a);
    end
    return r;
  endfunction

  function automatic apt_t padd(apt_t a, apt_t b);
    apt_t r;
    fe_t lam;
    if (a.inf) return b;
    if (b.inf) return a;
    if (a.x == b.x) begin
      if (fadd(a.y, b.y) == 256'd0) begin r.inf = 1; r.x = 0; r.y = 0; return r; end
      // doubling, a = -3
      lam = fmul(fsub(fmul(256'd3, fmul(a.x, a.x)), 256'd3), finv(fadd(a.y, a.y)));
    end else begin
      lam = fmul(fsub(b.y, a.y), finv(fsub(b.x, a.x)));
    end
    r.inf = 0;
    r.x = fsub(fsub(fmul(lam, lam), a.x), b.x);
    r.y = fsub(fmul(lam, fsub(a.x, r.x)), a.y);
    return r;
  endfunction

  function automatic apt_t pmul(fe_t k, apt_t p);
    apt_t r;
    r.inf = 1; r.x = 0; r.y = 0;
    for (int i = 255; i >= 0; i--) begin
      r = padd(r, r);
      if (k[i]) r = padd(r, p);
    end
    return r;
  endfunction

  function automatic bit on_curve(apt_t p);
    return fmul(p.y, p.y) == fadd(fsub(fmul(fmul(p.x, p.x), p.x), fmul(256'd3, p.x)), B);
  endfunction
endpackage
