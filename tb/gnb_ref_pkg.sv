// Reference arithmetic for the testbenches: GF(2^m) in a type-T Gaussian normal basis
// and affine point operations on the Koblitz curve y^2 + xy = x^3 + x^2 + 1.
//
// Multiplication does not use the hardware's multiplication matrix. It maps each
// operand into the ring GF(2)[g]/(g^P - 1), P = mT + 1, where basis element i is the
// sum of g^e over the coset {2^i u^j mod P}, multiplies there by cyclic convolution,
// and maps back (a g^0 term stands for the unity element, all ones).
// Inversion uses a^(2^m - 2) with an Itoh-Tsujii style chain over m - 1.
package gnb_ref_pkg;

  class gnb_ref #(int unsigned M = 163, int unsigned T = 4);
    localparam int unsigned P = M * T + 1;
    typedef logic [M-1:0] fe_t;
    typedef logic [P-1:0] gv_t;
    typedef struct packed { fe_t x; fe_t y; } pt_t;

    static int unsigned ftab [P];
    static int unsigned e2   [M];   // 2^i mod P, one member of coset i
    static bit          ready = 1'b0;

    static function void init();
      int unsigned ug, e, pw, uj;
      bit ok;
      if (ready) return;
      ug = 0;
      for (int unsigned c = 2; c < P && ug == 0; c++) begin
        e = 1; ok = 1'b1;
        for (int unsigned k = 1; k < T; k++) begin
          e = (e * c) % P;
          if (e == 1) ok = 1'b0;
        end
        e = (e * c) % P;
        if (ok && e == 1) ug = c;
      end
      for (int unsigned i = 0; i < P; i++) ftab[i] = 0;
      pw = 1;
      for (int unsigned i = 0; i < M; i++) begin
        e2[i] = pw;
        uj = 1;
        for (int unsigned j = 0; j < T; j++) begin
          ftab[(pw * uj) % P] = i;
          uj = (uj * ug) % P;
        end
        pw = (pw * 2) % P;
      end
      ready = 1'b1;
    endfunction

    static function gv_t to_gv(fe_t a);
      gv_t g = '0;
      for (int unsigned e = 1; e < P; e++) g[e] = a[ftab[e]];
      return g;
    endfunction

    static function fe_t mul(fe_t a, fe_t b);
      gv_t ga, gb, acc;
      fe_t c;
      init();
      ga  = to_gv(a);
      gb  = to_gv(b);
      acc = '0;
      for (int unsigned e = 1; e < P; e++)
        if (ga[e]) acc ^= (gb << e) | (gb >> (P - e));
      for (int unsigned i = 0; i < M; i++) c[i] = acc[e2[i]] ^ acc[0];
      return c;
    endfunction

    static function fe_t sqr(fe_t a);
      return {a[M-2:0], a[M-1]};
    endfunction

    static function fe_t sqrn(fe_t a, int unsigned n);
      fe_t r = a;
      for (int unsigned i = 0; i < n; i++) r = sqr(r);
      return r;
    endfunction

    // a^(2^k - 1) for k = m - 1 by the binary method on k, then one squaring
    static function fe_t inv(fe_t a);
      fe_t b;
      int unsigned k, n;
      int top;
      n   = M - 1;
      top = $clog2(n + 1) - 1;
      b   = a;
      k   = 1;
      for (int i = top - 1; i >= 0; i--) begin
        b = mul(sqrn(b, k), b);
        k = 2 * k;
        if ((n >> i) & 1) begin
          b = mul(sqr(b), a);
          k = k + 1;
        end
      end
      return sqr(b);
    endfunction

    static function pt_t frob(pt_t p);
      pt_t q;
      q.x = sqr(p.x);
      q.y = sqr(p.y);
      return q;
    endfunction

    static function pt_t neg(pt_t p);
      pt_t q;
      q.x = p.x;
      q.y = p.x ^ p.y;
      return q;
    endfunction

    // affine addition, P1 != +-P2 assumed
    static function pt_t add(pt_t p1, pt_t p2);
      pt_t q;
      fe_t lam;
      lam = mul(p1.y ^ p2.y, inv(p1.x ^ p2.x));
      q.x = sqr(lam) ^ lam ^ p1.x ^ p2.x ^ '1;
      q.y = mul(lam, p1.x ^ q.x) ^ q.x ^ p1.y;
      return q;
    endfunction

    static function bit on_curve(pt_t p);
      fe_t lhs, rhs, x2;
      x2  = sqr(p.x);
      lhs = sqr(p.y) ^ mul(p.x, p.y);
      rhs = mul(x2, p.x) ^ x2 ^ '1;
      return lhs == rhs;
    endfunction

    static function fe_t rand_fe();
      fe_t a;
      for (int unsigned i = 0; i < M; i++) a[i] = 1'($urandom);
      return a;
    endfunction

    // random point: pick x, solve z^2 + z = x + 1 + 1/x^2, y = x z
    static function pt_t rand_point();
      pt_t p;
      fe_t c, zz;
      forever begin
        p.x = rand_fe();
        if (p.x == '0) continue;
        c = p.x ^ '1 ^ sqr(inv(p.x));
        if (^c) continue;
        zz[0] = 1'b0;
        for (int unsigned i = 1; i < M; i++) zz[i] = zz[i-1] ^ c[i];
        p.y = mul(p.x, zz);
        return p;
      end
    endfunction
  endclass

endpackage
