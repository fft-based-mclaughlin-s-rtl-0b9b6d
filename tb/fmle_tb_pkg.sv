// fmle_tb_pkg: reference arithmetic for the FMLE testbenches, written with
// plain wide-integer operators and direct (O(s^2)) transform sums so that it
// shares nothing with the design under test.
//
// fmle_ref#(U, V, C) provides, for l = U*2^V and q = 2^(C*2^V) + 1:
//   modinv   modular inverse by the extended Euclidean algorithm
//   modexp   square-and-multiply exponentiation
//   xform    CT (nega = 0) or NCT (nega = 1) of an l-bit integer given in
//            base-2^U digits: X_k = sum_i phi^(i*nega) x_i w^(ik) mod q
//   bound    B_u[k] = 2(k+1)(b-1)^2
// fmle_ref_wide#(U, V, C) offers the same functions for moduli beyond the
// simulator's limit on wide multiplication and division (about 4,096 bits):
// modular products are formed bit by bit with shifts, additions and
// subtractions, the inverse modulo the odd r uses the binary extended
// Euclidean algorithm, and the transform works on narrow integers.
package fmle_tb_pkg;

  class fmle_ref #(int unsigned U = 17, int unsigned V = 6, int unsigned C = 1);
    localparam int unsigned S  = 1 << V;
    localparam int unsigned QW = C * S;
    localparam int unsigned L  = U * S;
    localparam int unsigned BW = 2 * L + 64;
    typedef logic [BW-1:0] big_t;
    typedef logic [QW:0]   elem_t;

    static function big_t qmod();
      return (big_t'(1) << QW) + 1;
    endfunction

    static function big_t rmod();
      return (big_t'(1) << L) - 1;
    endfunction

    // a^-1 mod m, ok = 0 when gcd(a, m) != 1
    static function big_t modinv(big_t a, big_t m, output bit ok);
      big_t r0, r1, s0, s1, qq, tmp;
      r0 = m; r1 = a % m; s0 = 0; s1 = 1;
      while (r1 != 0) begin
        qq  = r0 / r1;
        tmp = r0 - qq * r1; r0 = r1; r1 = tmp;
        // s0 - qq*s1 mod m, kept non-negative
        tmp = (s0 + m - (qq * s1) % m) % m; s0 = s1; s1 = tmp;
      end
      ok = (r0 == 1);
      return s0;
    endfunction

    static function big_t modexp(big_t x, big_t e, big_t n);
      big_t res, base;
      res = 1 % n; base = x % n;
      while (e != 0) begin
        if (e[0]) res = (res * base) % n;
        base = (base * base) % n;
        e = e >> 1;
      end
      return res;
    endfunction

    static function void xform(big_t x, bit nega, ref elem_t out[S]);
      big_t q, acc, w, ph, wp[S], pp[S];
      q = qmod();
      w = big_t'(1) << (2 * C);
      ph = big_t'(1) << C;
      wp[0] = 1; pp[0] = 1;
      for (int t = 1; t < S; t++) begin
        wp[t] = (wp[t-1] * w) % q;
        pp[t] = (pp[t-1] * ph) % q;
      end
      for (int k = 0; k < S; k++) begin
        acc = 0;
        for (int i = 0; i < S; i++) begin
          big_t d;
          d = big_t'(x[i*U +: U]);
          if (nega) d = (d * pp[i]) % q;
          acc = (acc + d * wp[(i * k) % S]) % q;
        end
        out[k] = elem_t'(acc);
      end
    endfunction

    static function elem_t bound(int k);
      big_t b1;
      b1 = (big_t'(1) << U) - 1;
      return elem_t'(2 * (k + 1) * b1 * b1);
    endfunction

    // Random odd modulus of nbits bits (top bit set) coprime to r; also
    // returns n' = -n^-1 mod r.
    static function big_t rand_modulus(int nbits, output big_t nprime);
      big_t n, inv, r;
      bit ok;
      r = rmod();
      do begin
        n = 0;
        for (int w = 0; w < nbits / 32 + 1; w++) n[w*32 +: 32] = $urandom;
        n = n & ((big_t'(1) << nbits) - 1);
        n[nbits-1] = 1'b1;
        n[0] = 1'b1;
        inv = modinv(n, r, ok);
      end while (!ok);
      nprime = (r - inv) % r;
      return n;
    endfunction

    static function big_t rand_below(big_t lim);
      big_t v;
      v = 0;
      for (int w = 0; w < BW / 32; w++) v[w*32 +: 32] = $urandom;
      return v % lim;
    endfunction
  endclass

  class fmle_ref_wide #(int unsigned U = 17, int unsigned V = 6, int unsigned C = 1);
    localparam int unsigned S  = 1 << V;
    localparam int unsigned QW = C * S;
    localparam int unsigned L  = U * S;
    localparam int unsigned BW = L + 64;
    localparam int unsigned SW = 2 * QW + 2 * U + 16;
    typedef logic [BW-1:0] big_t;
    typedef logic [SW-1:0] small_t;
    typedef logic [QW:0]   elem_t;

    static function big_t rmod();
      return (big_t'(1) << L) - 1;
    endfunction

    // a * b mod m for b < m, using the low nbits bits of a
    static function big_t modmul(big_t a, big_t b, big_t m, int nbits = BW);
      big_t acc;
      acc = 0;
      for (int i = nbits - 1; i >= 0; i--) begin
        acc = acc << 1;
        if (acc >= m) acc = acc - m;
        if (a[i]) begin
          acc = acc + b;
          if (acc >= m) acc = acc - m;
        end
      end
      return acc;
    endfunction

    static function big_t mod(big_t a, big_t m);
      return modmul(a, 1, m);
    endfunction

    // a^-1 mod m for odd m; ok = 0 when gcd(a, m) != 1
    static function big_t modinv(big_t a, big_t m, output bit ok);
      big_t uu, vv, x1, x2;
      uu = mod(a, m); vv = m; x1 = 1; x2 = 0;
      ok = 1'b0;
      if (uu == 0) return 0;
      while (uu != 1 && vv != 1 && uu != 0 && vv != 0) begin
        while (!uu[0]) begin
          uu = uu >> 1;
          x1 = x1[0] ? (x1 + m) >> 1 : x1 >> 1;
        end
        while (!vv[0]) begin
          vv = vv >> 1;
          x2 = x2[0] ? (x2 + m) >> 1 : x2 >> 1;
        end
        if (uu >= vv) begin
          uu = uu - vv; x1 = (x1 >= x2) ? x1 - x2 : x1 + m - x2;
        end else begin
          vv = vv - uu; x2 = (x2 >= x1) ? x2 - x1 : x2 + m - x1;
        end
      end
      ok = (uu == 1 || vv == 1);
      return (uu == 1) ? x1 : x2;
    endfunction

    static function big_t modexp(big_t x, big_t e, big_t n);
      big_t res, base;
      res = mod(1, n); base = mod(x, n);
      while (e != 0) begin
        if (e[0]) res = modmul(res, base, n);
        base = modmul(base, base, n);
        e = e >> 1;
      end
      return res;
    endfunction

    static function void xform(big_t x, bit nega, ref elem_t out[S]);
      small_t q, acc, w, ph, wp[S], pp[S];
      q = (small_t'(1) << QW) + 1;
      w = small_t'(1) << (2 * C);
      ph = small_t'(1) << C;
      wp[0] = 1; pp[0] = 1;
      for (int t = 1; t < S; t++) begin
        wp[t] = (wp[t-1] * w) % q;
        pp[t] = (pp[t-1] * ph) % q;
      end
      for (int k = 0; k < S; k++) begin
        acc = 0;
        for (int i = 0; i < S; i++) begin
          small_t d;
          d = small_t'(x[i*U +: U]);
          if (nega) d = (d * pp[i]) % q;
          acc = (acc + d * wp[(i * k) % S]) % q;
        end
        out[k] = elem_t'(acc);
      end
    endfunction

    static function elem_t bound(int k);
      small_t b1;
      b1 = (small_t'(1) << U) - 1;
      return elem_t'(small_t'(2 * (k + 1)) * b1 * b1);
    endfunction

    static function big_t rand_modulus(int nbits, output big_t nprime);
      big_t n, inv, r;
      bit ok;
      r = rmod();
      do begin
        n = 0;
        for (int w = 0; w < nbits / 32 + 1; w++) n[w*32 +: 32] = $urandom;
        n = n & ((big_t'(1) << nbits) - 1);
        n[nbits-1] = 1'b1;
        n[0] = 1'b1;
        inv = modinv(n, r, ok);
      end while (!ok);
      nprime = (inv == 0) ? 0 : r - inv;
      return n;
    endfunction

    static function big_t rand_below(big_t lim);
      big_t v;
      v = 0;
      for (int w = 0; w < BW / 32; w++) v[w*32 +: 32] = $urandom;
      return mod(v, lim);
    endfunction
  endclass

endpackage
