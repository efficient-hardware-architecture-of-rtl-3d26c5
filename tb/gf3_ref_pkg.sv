// gf3_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL. Trits are plain integers 0..2 here and the field
// operations are schoolbook loops, so a fault in the RTL encoding or
// reduction networks is not mirrored in the model.
//
// gf3_ref#(M,N,B) provides GF(3^m) add/sub/neg/mul/cube modulo
// x^M - x^N + 1, GF(3^6m) multiplication on the basis
// 1, s, r, sr, r^2, sr^2 (s^2 = -1, r^3 = r + b), and the eta_T Miller loop
// without cube roots. Conversion helpers map to and from the two-bit packed
// encoding used by the RTL.
//
// fe_fexp#(M,N,B,MU) builds a final-exponentiation program for the
// final-exponentiation coprocessor (see the class comment) and provides the
// reference power F^((3^6m - 1)/N) by square-and-multiply.
package gf3_ref_pkg;
  import gf3_pkg::*;

  class gf3_ref #(int M = 97, int N = 12, int B = 1);

    typedef int unsigned el_t [M];
    typedef el_t f6_t [6];
    typedef logic [M-1:0][1:0] pk_t;

    static function int unsigned tmod(int v);
      int r;
      r = v % 3;
      if (r < 0) r += 3;
      return r;
    endfunction

    static function pk_t pack(el_t a);
      pk_t p;
      for (int i = 0; i < M; i++) p[i] = (a[i] == 0) ? 2'b00 : (a[i] == 1) ? 2'b01 : 2'b10;
      return p;
    endfunction

    static function el_t unpack(pk_t p);
      el_t a;
      for (int i = 0; i < M; i++) a[i] = (p[i] == 2'b01) ? 1 : (p[i] == 2'b10) ? 2 : 0;
      return a;
    endfunction

    static function el_t rnd();
      el_t a;
      for (int i = 0; i < M; i++) a[i] = $urandom_range(2);
      return a;
    endfunction

    static function el_t zero();
      el_t a;
      for (int i = 0; i < M; i++) a[i] = 0;
      return a;
    endfunction

    static function el_t konst(int v);
      el_t a;
      a = zero();
      a[0] = tmod(v);
      return a;
    endfunction

    static function el_t add(el_t a, el_t b);
      el_t c;
      for (int i = 0; i < M; i++) c[i] = (a[i] + b[i]) % 3;
      return c;
    endfunction

    static function el_t neg(el_t a);
      el_t c;
      for (int i = 0; i < M; i++) c[i] = (3 - a[i]) % 3;
      return c;
    endfunction

    static function el_t sub(el_t a, el_t b);
      return add(a, neg(b));
    endfunction

    static function el_t scal(int s, el_t a);
      el_t c;
      for (int i = 0; i < M; i++) c[i] = tmod(s * int'(a[i]));
      return c;
    endfunction

    static function bit eq(el_t a, el_t b);
      for (int i = 0; i < M; i++) if (a[i] != b[i]) return 0;
      return 1;
    endfunction

    // schoolbook product, then reduction from the top with x^M = x^N - 1
    static function el_t mul(el_t a, el_t b);
      int unsigned w [2*M-1];
      el_t c;
      for (int i = 0; i < 2*M-1; i++) w[i] = 0;
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) w[i+j] = (w[i+j] + a[i] * b[j]) % 3;
      for (int k = 2*M-2; k >= M; k--) begin
        w[k-M+N] = (w[k-M+N] + w[k]) % 3;
        w[k-M]   = (w[k-M] + 2 * w[k]) % 3;
        w[k] = 0;
      end
      for (int i = 0; i < M; i++) c[i] = w[i];
      return c;
    endfunction

    static function el_t cube(el_t a);
      return mul(mul(a, a), a);
    endfunction

    // GF(3^6m) product. Index j = 2*i + s holds the coefficient of r^i s^s.
    static function f6_t mul6(f6_t x, f6_t y);
      el_t w [5][2];
      f6_t z;
      for (int i = 0; i < 5; i++) begin w[i][0] = zero(); w[i][1] = zero(); end
      for (int i = 0; i < 3; i++)
        for (int si = 0; si < 2; si++)
          for (int j = 0; j < 3; j++)
            for (int sj = 0; sj < 2; sj++) begin
              el_t p;
              p = mul(x[2*i+si], y[2*j+sj]);
              if (si == 1 && sj == 1) w[i+j][0] = sub(w[i+j][0], p);   // s^2 = -1
              else                    w[i+j][si+sj] = add(w[i+j][si+sj], p);
            end
      // r^4 = r^2 + b r, r^3 = r + b
      for (int s = 0; s < 2; s++) begin
        w[2][s] = add(w[2][s], w[4][s]);
        w[1][s] = add(w[1][s], scal(B, w[4][s]));
        w[1][s] = add(w[1][s], w[3][s]);
        w[0][s] = add(w[0][s], scal(B, w[3][s]));
      end
      for (int i = 0; i < 3; i++) begin z[2*i] = w[i][0]; z[2*i+1] = w[i][1]; end
      return z;
    endfunction

    static function f6_t cube6(f6_t x);
      return mul6(mul6(x, x), x);
    endfunction

    // eta_T Miller loop without cube roots (M odd), straight from its
    // definition: F = L*G0, then (M-1)/2 times F = F^3 * G.
    static function f6_t miller(el_t xp_in, el_t yp_in, el_t xq_in, el_t yq_in);
      el_t xp, yp, xq, yq, t, u;
      f6_t f, g, l;
      xp = add(xp_in, konst(B));
      yp = neg(yp_in);
      xq = cube(xq_in);
      yq = cube(yq_in);
      t  = add(xp, xq);
      l[0] = neg(mul(yp, t)); l[1] = yq; l[2] = yp; l[3] = zero(); l[4] = zero(); l[5] = zero();
      g[0] = neg(mul(t, t)); g[1] = mul(yp, yq); g[2] = neg(t); g[3] = zero();
      g[4] = konst(-1); g[5] = zero();
      f = mul6(l, g);
      for (int i = 1; i <= (M - 1) / 2; i++) begin
        f  = cube6(f);
        xq = sub(cube(cube(xq)), konst(B));
        yq = neg(cube(cube(yq)));
        t  = add(xp, xq);
        u  = mul(yp, yq);
        g[0] = neg(mul(t, t)); g[1] = u; g[2] = neg(t);
        f = mul6(f, g);
      end
      return f;
    endfunction

  endclass

  // fe_fexp#(M,N,B,MU): generator of a final-exponentiation program for the
  // final-exponentiation coprocessor, and the reference F^((3^6m - 1)/N).
  // The program raises F, held in data words 0..5, to M = (3^3m - 1)
  // (3^m + 1)(3^m + 1 - mu b 3^((m+1)/2)):
  //   U = (A0 - A1 s)^2 / (A0^2 + A1^2) = ((A0^2 - A1^2) + A0 A1 s) / (A0^2 + A1^2)
  //   V = U^(3^m) * U,  W = V^(3^m) * V * conj(V^(3^((m+1)/2)))^(mu b)
  // with F = A0 + A1 s, A0, A1 in GF(3^3m). Powers 3^k are Frobenius maps
  // (coefficients cubed k times by one CUBE instruction, then s -> (-1)^k s,
  // r -> r + k b, r^2 -> r^2 - k b r + k^2). The GF(3^3m) inverse of
  // a0 + a1 r + a2 r^2 uses the cofactors b0 = (a0 + a2)^2 - a1^2 - b a1 a2,
  // b1 = b a2^2 - a0 a1, b2 = a1^2 - a0 a2 - a2^2 and w = a0 b0 + b (a2 b1 +
  // a1 b2) in GF(3^m), inverted by Fermat's little theorem. GF(3^6m)
  // products use Karatsuba over s. Data words are allocated from 64.
  // The reference (pow6) is plain square-and-multiply on big integers.
  class fe_fexp #(int M = 97, int N = 12, int B = 1, int MU = 1);
    typedef gf3_ref#(M, N, B) R;
    fe_instr_t pq [$];
    bit        used [64];
    int        unit_rr = 0;

    function int alloc();
      for (int i = 0; i < 64; i++) if (!used[i]) begin used[i] = 1; return i; end
      $fatal(1, "out of data words");
      return 0;
    endfunction
    function void free(int a);
      used[a] = 0;
    endfunction

    function void emit(fe_op_t op, int dst, int a, int b, int imm, int unit = 0);
      fe_instr_t i;
      i.op = op; i.unit = 2'(unit); i.dst = FE_AW'(dst); i.srca = FE_AW'(a); i.srcb = FE_AW'(b);
      i.imm = 9'(imm);
      pq.push_back(i);
    endfunction
    function int sgc(int c);    // coefficient -> sign code
      int t;
      t = ((c % 3) + 3) % 3;
      return (t == 0) ? 0 : (t == 1) ? 1 : 2;
    endfunction
    // dst = ca*a + cb*b
    function void lin2(int dst, int a, int ca, int b, int cb);
      emit(FE_ADD, dst, a, b, sgc(ca) | (sgc(cb) << 2));
    endfunction
    // dst = ca*a + cb*b + cc*c  (through the accumulator)
    function void lin3(int dst, int a, int ca, int b, int cb, int c, int cc);
      int t;
      t = alloc();
      lin2(t, a, ca, b, cb);
      emit(FE_ADD, dst, c, c, sgc(cc) | (1 << 4));
      free(t);
    endfunction
    function void mul(int dst, int a, int b);
      emit(FE_MUL, dst, a, b, 0, unit_rr);
      unit_rr = (unit_rr + 1) % 3;
    endfunction
    function void copy(int dst, int a);
      lin2(dst, a, 1, a, 0);
    endfunction
    // dst = a^(3^k), 0 < k <= 512
    function void cubes(int dst, int a, int k);
      emit(FE_CUBE, dst, a, 0, k - 1);
    endfunction

    // GF(3^m) inverse by a^(3^m - 2) (beta_k = a^((3^k - 1)/2) chain)
    function void inv1(int dst, int a);
      int bt, t, k, nb;
      int bits [$];
      bt = alloc(); t = alloc();
      copy(bt, a);
      nb = M - 1;
      while (nb > 0) begin bits.push_front(nb & 1); nb = nb >> 1; end
      k = 1;
      for (int i = 1; i < bits.size(); i++) begin
        cubes(t, bt, k); mul(bt, t, bt); k = 2 * k;
        if (bits[i] != 0) begin cubes(t, bt, 1); mul(bt, t, a); k = k + 1; end
      end
      mul(t, bt, bt);
      cubes(t, t, 1);
      mul(dst, t, a);
      free(bt); free(t);
    endfunction

    // GF(3^3m) = GF(3^m)[r]/(r^3 - r - b), elements as 3 word addresses
    typedef int e3_t [3];
    function e3_t alloc3();
      e3_t e;
      for (int i = 0; i < 3; i++) e[i] = alloc();
      return e;
    endfunction
    function void free3(e3_t e);
      for (int i = 0; i < 3; i++) free(e[i]);
    endfunction
    function void mul3(e3_t d, e3_t x, e3_t y);
      int p [3][3];
      int w [5];
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin p[i][j] = alloc(); mul(p[i][j], x[i], y[j]); end
      w[0] = p[0][0]; w[4] = p[2][2];
      w[1] = alloc(); lin2(w[1], p[0][1], 1, p[1][0], 1);
      w[2] = alloc(); lin3(w[2], p[0][2], 1, p[1][1], 1, p[2][0], 1);
      w[3] = alloc(); lin2(w[3], p[1][2], 1, p[2][1], 1);
      // r^4 = r^2 + b r, r^3 = r + b
      lin3(d[0], w[0], 1, w[3], B, w[3], 0);
      lin3(d[1], w[1], 1, w[3], 1, w[4], B);
      lin2(d[2], w[2], 1, w[4], 1);
      for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) free(p[i][j]);
      free(w[1]); free(w[2]); free(w[3]);
    endfunction
    // Frobenius 3^k on GF(3^3m): coefficients cubed k times, r -> r + e, e = k b
    function void frob3(e3_t d, e3_t x, int k);
      e3_t c;
      int e;
      c = alloc3();
      for (int i = 0; i < 3; i++) cubes(c[i], x[i], k);
      e = ((k * B) % 3 + 3) % 3;
      lin3(d[0], c[0], 1, c[1], e, c[2], e * e);
      lin2(d[1], c[1], 1, c[2], -e);
      copy(d[2], c[2]);
      free3(c);
    endfunction
    // 1/x in GF(3^3m) by cofactors: x * (b0 + b1 r + b2 r^2) = w lies in GF(3^m)
    function void inv3(e3_t d, e3_t x);
      int s02, q02, q1, q2, p12, p01, p02, c, t1, t2, t3, w, wi;
      e3_t cf;
      s02 = alloc(); lin2(s02, x[0], 1, x[2], 1);
      q02 = alloc(); mul(q02, s02, s02);
      q1 = alloc();  mul(q1, x[1], x[1]);
      q2 = alloc();  mul(q2, x[2], x[2]);
      p12 = alloc(); mul(p12, x[1], x[2]);
      p01 = alloc(); mul(p01, x[0], x[1]);
      p02 = alloc(); mul(p02, x[0], x[2]);
      cf = alloc3();
      lin3(cf[0], q02, 1, q1, -1, p12, -B);     // (a0+a2)^2 - a1^2 - b a1 a2
      lin2(cf[1], q2, B, p01, -1);              // b a2^2 - a0 a1
      lin3(cf[2], q1, 1, p02, -1, q2, -1);      // a1^2 - a0 a2 - a2^2
      free(s02); free(q02); free(q1); free(q2); free(p12); free(p01); free(p02);
      t1 = alloc(); t2 = alloc(); t3 = alloc();
      mul(t1, x[0], cf[0]); mul(t2, x[2], cf[1]); mul(t3, x[1], cf[2]);
      w = alloc();
      lin3(w, t1, 1, t2, B, t3, B);             // a0 b0 + b (a2 b1 + a1 b2)
      free(t1); free(t2); free(t3);
      wi = alloc();
      inv1(wi, w);
      for (int i = 0; i < 3; i++) mul(d[i], cf[i], wi);
      free(w); free(wi); free3(cf);
    endfunction

    // GF(3^6m): word j = coefficient of r^(j/2) s^(j%2)
    typedef int e6_t [6];
    function e6_t alloc6();
      e6_t e;
      for (int i = 0; i < 6; i++) e[i] = alloc();
      return e;
    endfunction
    function void free6(e6_t e);
      for (int i = 0; i < 6; i++) free(e[i]);
    endfunction
    function e3_t part(e6_t x, int s);
      e3_t r;
      for (int i = 0; i < 3; i++) r[i] = x[2*i+s];
      return r;
    endfunction
    // (X0 + X1 s)(Y0 + Y1 s) = X0Y0 - X1Y1 + ((X0+X1)(Y0+Y1) - X0Y0 - X1Y1) s
    function void mul6(e6_t d, e6_t x, e6_t y);
      e3_t a, b, c, sx, sy;
      a = alloc3(); b = alloc3(); c = alloc3(); sx = alloc3(); sy = alloc3();
      mul3(a, part(x, 0), part(y, 0));
      mul3(b, part(x, 1), part(y, 1));
      for (int i = 0; i < 3; i++) begin
        lin2(sx[i], x[2*i], 1, x[2*i+1], 1);
        lin2(sy[i], y[2*i], 1, y[2*i+1], 1);
      end
      mul3(c, sx, sy);
      for (int i = 0; i < 3; i++) begin
        lin2(d[2*i], a[i], 1, b[i], -1);
        lin3(d[2*i+1], c[i], 1, a[i], -1, b[i], -1);
      end
      free3(a); free3(b); free3(c); free3(sx); free3(sy);
    endfunction
    function void conj6(e6_t d, e6_t x);
      for (int i = 0; i < 3; i++) begin copy(d[2*i], x[2*i]); lin2(d[2*i+1], x[2*i+1], -1, x[2*i+1], 0); end
    endfunction
    // Frobenius 3^k on GF(3^6m)
    function void frob6(e6_t d, e6_t x, int k);
      e3_t t;
      t = alloc3();
      for (int s = 0; s < 2; s++) begin
        frob3(t, part(x, s), k);
        for (int i = 0; i < 3; i++)
          lin2(d[2*i+s], t[i], (s == 1 && (k % 2 == 1)) ? -1 : 1, t[i], 0);
      end
      free3(t);
    endfunction
    // x^(3^3m - 1) = (X0 - X1 s)^2 / (X0^2 + X1^2)
    //              = ((X0^2 - X1^2) + X0 X1 s) / (X0^2 + X1^2)   (-2 = 1)
    function void pow3m1(e6_t d, e6_t x);
      e3_t a, b, c, n, ni, re;
      a = alloc3(); b = alloc3(); c = alloc3(); n = alloc3(); ni = alloc3(); re = alloc3();
      mul3(a, part(x, 0), part(x, 0));
      mul3(b, part(x, 1), part(x, 1));
      mul3(c, part(x, 0), part(x, 1));
      for (int i = 0; i < 3; i++) begin
        lin2(n[i], a[i], 1, b[i], 1);
        lin2(re[i], a[i], 1, b[i], -1);
      end
      inv3(ni, n);
      mul3(part(d, 0), re, ni);
      mul3(part(d, 1), c, ni);
      free3(a); free3(b); free3(c); free3(n); free3(ni); free3(re);
    endfunction

    // ------------------------------------------------------------ program
    e6_t res;     // words holding F^M when the program ends

    // Builds the program for F in words 0..5; the result words are in res.
    function void build();
      e6_t f, u, v, w, t1, t2;
      pq.delete();
      unit_rr = 0;
      // ---- program
      for (int i = 0; i < 64; i++) used[i] = 0;
      for (int j = 0; j < 6; j++) begin f[j] = j; used[j] = 1; end
      u = alloc6();
      pow3m1(u, f);                      // U = F^(3^3m - 1)
      t2 = alloc6();
      frob6(t2, u, M);
      v = alloc6();
      mul6(v, t2, u);                    // V = U^(3^m + 1)
      free6(u);
      frob6(t2, v, M);
      w = alloc6();
      mul6(w, t2, v);                    // V^(3^m + 1)
      t1 = alloc6();
      frob6(t1, v, (M + 1) / 2);         // V^(3^((m+1)/2))
      if (MU * B > 0) conj6(t2, t1);     // ^(-mu b)
      else for (int j = 0; j < 6; j++) copy(t2[j], t1[j]);
      res = alloc6();
      mul6(res, w, t2);
      emit(FE_END, 0, 0, 0, 0);
    endfunction

    // operation counts of the program
    function void counts(output int nm, output int na, output int nc);
      nm = 0; na = 0; nc = 0;
      foreach (pq[k]) begin
        if (pq[k].op == FE_MUL) nm++;
        if (pq[k].op == FE_ADD) na++;
        if (pq[k].op == FE_CUBE) nc += int'(pq[k].imm) + 1;
      end
    endfunction

    // ------------------------------------------------------------ reference
    typedef logic [1023:0] big_t;

    // (3^6m - 1)/N, N = 3^m + 1 + mu b 3^((m+1)/2)
    static function big_t exponent();
      big_t p3m, p3h, nn;
      p3m = 1;
      for (int i = 0; i < M; i++) p3m = p3m * 3;
      p3h = 1;
      for (int i = 0; i < (M + 1) / 2; i++) p3h = p3h * 3;
      nn = (MU * B > 0) ? p3m + 1 + p3h : p3m + 1 - p3h;
      if (((p3m * p3m * p3m * p3m * p3m * p3m - 1) % nn) != 0) $fatal(1, "N does not divide 3^6m - 1");
      return (p3m * p3m * p3m * p3m * p3m * p3m - 1) / nn;
    endfunction
    static function R::f6_t pow6(R::f6_t x, big_t e);
      R::f6_t r;
      int top;
      for (int j = 0; j < 6; j++) r[j] = R::zero();
      r[0] = R::konst(1);
      top = 0;
      for (int i = 0; i < 1024; i++) if (e[i]) top = i;
      for (int i = top; i >= 0; i--) begin
        r = R::mul6(r, r);
        if (e[i]) r = R::mul6(r, x);
      end
      return r;
    endfunction


  endclass

endpackage
