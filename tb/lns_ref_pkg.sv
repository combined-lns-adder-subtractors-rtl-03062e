// lns_ref_pkg: reference model of the LNS arithmetic, for the testbenches.
//
// Every operation is computed from its definition with real arithmetic, at
// the time it is needed, rather than from precomputed tables:
//   addition      t = max(x,y) + round(2^F log2(1 +- 2^-|x-y|/2^F)) / 2^F
//   multiplication exponent sum, sign XOR
// with the number format's conventions (s_b(0) held at 1 - 2^-F, d_b(0) and
// every result below range at the most negative code, results above range at
// the most positive code). Words are handled as ints: sign and exponent.
// The model also counts which mechanisms an operation exercised, so that a
// testbench can show it reached each of them.
package lns_ref_pkg;

  typedef struct {
    int s;   // 0 positive, 1 negative
    int e;   // exponent code, two's complement value
  } lw_t;

  // Mechanism counters, incremented by the operations below.
  int n_sb = 0;          // additions of equal-sign operands (s_b lookups)
  int n_db = 0;          // additions of opposite-sign operands (d_b lookups)
  int n_cancel = 0;      // |x| == |y| with opposite signs: d_b(0)
  int n_sat_lo = 0;      // results clamped at the smallest code
  int n_sat_hi = 0;      // results clamped at the largest code
  int n_pair_sb1 = 0;    // shared-table pair with its first adder on s_b
  int n_pair_db1 = 0;    // shared-table pair with its first adder on d_b

  function automatic int emin(int w); return -(1 << (w - 2)); endfunction
  function automatic int emax(int w); return (1 << (w - 2)) - 1; endfunction

  function automatic int rnd(real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(0.5 - r);
  endfunction

  function automatic real fabs(real r);
    return (r < 0.0) ? -r : r;
  endfunction

  function automatic lw_t unpack(logic [31:0] v, int w);
    lw_t r;
    r.s = int'((v >> (w - 1)) & 32'd1);
    r.e = int'(v & ((32'd1 << (w - 1)) - 32'd1));
    if (r.e >= (1 << (w - 2))) r.e -= (1 << (w - 1));
    return r;
  endfunction

  function automatic logic [31:0] pack(lw_t a, int w);
    logic [31:0] v;
    v = 32'(a.e) & ((32'(1) << (w - 1)) - 1);
    if (a.s != 0) v |= 32'(1) << (w - 1);
    return v;
  endfunction

  function automatic int sat(int e, int w);
    if (e < emin(w)) begin n_sat_lo++; return emin(w); end
    if (e > emax(w)) begin n_sat_hi++; return emax(w); end
    return e;
  endfunction

  // log2(1 + 2^-d) and log2(1 - 2^-d), d = |x - y| in code units, scaled.
  function automatic int sb_of(int d, int f);
    int v;
    v = rnd($ln(1.0 + $pow(2.0, -real'(d) / real'(1 << f))) / $ln(2.0) * real'(1 << f));
    return (v > (1 << f) - 1) ? (1 << f) - 1 : v;
  endfunction

  function automatic int db_of(int d, int w, int f);
    int v;
    if (d == 0) return emin(w);
    v = rnd($ln(1.0 - $pow(2.0, -real'(d) / real'(1 << f))) / $ln(2.0) * real'(1 << f));
    return (v < emin(w)) ? emin(w) : v;
  endfunction

  function automatic lw_t add(lw_t x, lw_t y, int w, int f);
    lw_t r;
    int d, big;
    d   = (x.e >= y.e) ? x.e - y.e : y.e - x.e;
    big = (x.e >= y.e) ? x.e : y.e;
    r.s = (x.e >= y.e) ? x.s : y.s;
    if (x.s == y.s) begin
      n_sb++;
      r.e = sat(big + sb_of(d, f), w);
    end else begin
      n_db++;
      if (d == 0) n_cancel++;
      r.e = sat(big + db_of(d, w, f), w);
    end
    return r;
  endfunction

  function automatic lw_t neg(lw_t x);
    lw_t r;
    r = x;
    r.s = 1 - x.s;
    return r;
  endfunction

  function automatic lw_t sub(lw_t x, lw_t y, int w, int f);
    return add(x, neg(y), w, f);
  endfunction

  function automatic lw_t mul(lw_t x, lw_t y, int w);
    lw_t r;
    r.s = x.s ^ y.s;
    r.e = sat(x.e + y.e, w);
    return r;
  endfunction

  function automatic lw_t from_real(real c, int w, int f);
    lw_t r;
    r.s = (c < 0.0) ? 1 : 0;
    if (c < 0.0) c = -c;
    if (c == 0.0) r.e = emin(w);
    else begin
      r.e = rnd($ln(c) / $ln(2.0) * real'(1 << f));
      if (r.e < emin(w)) r.e = emin(w);
      if (r.e > emax(w)) r.e = emax(w);
    end
    return r;
  endfunction

  function automatic real to_real(lw_t a, int f);
    real m;
    m = $pow(2.0, real'(a.e) / real'(1 << f));
    return (a.s != 0) ? -m : m;
  endfunction

  // The 8-point DCT of the flow graph, evaluated with the operations above.
  // Returns whether the sign-parity rule of the three shared-table pairs held.
  function automatic bit dct8(input lw_t fi [8], output lw_t fo [8], input int w, input int f);
    real PI;
    lw_t g [4], h [4];
    lw_t a5, a6, a7, a8, m, n, p, q, r, s, u, v, x2, y2;
    bit ok;
    PI = 3.14159265358979323846;
    ok = 1;
    for (int i = 0; i < 4; i++) begin
      g[i] = add(fi[i], fi[7-i], w, f);
      h[i] = sub(fi[i], fi[7-i], w, f);
    end
    a5 = add(g[0], g[3], w, f);  a8 = sub(g[0], g[3], w, f);
    a6 = add(g[1], g[2], w, f);  a7 = sub(g[1], g[2], w, f);
    fo[0] = mul(add(a5, a6, w, f), from_real($sin(PI / 4.0), w, f), w);
    fo[4] = mul(sub(a5, a6, w, f), from_real($cos(PI / 4.0), w, f), w);
    u  = mul(a7, from_real($sin(PI / 8.0), w, f), w);
    v  = mul(a8, from_real($cos(PI / 8.0), w, f), w);
    x2 = mul(a7, from_real(-$cos(PI / 8.0), w, f), w);
    y2 = mul(a8, from_real($sin(PI / 8.0), w, f), w);
    ok &= ((u.s ^ v.s) != (x2.s ^ y2.s));
    if (u.s == v.s) n_pair_sb1++; else n_pair_db1++;
    fo[2] = add(u, v, w, f);
    fo[6] = add(x2, y2, w, f);
    m = mul(add(h[1], h[2], w, f), from_real($cos(PI / 4.0), w, f), w);
    n = mul(sub(h[1], h[2], w, f), from_real($sin(PI / 4.0), w, f), w);
    p = add(h[0], m, w, f);  q = sub(h[0], m, w, f);
    s = add(h[3], n, w, f);  r = sub(h[3], n, w, f);
    u  = mul(s, from_real($sin(PI / 16.0), w, f), w);
    v  = mul(p, from_real($cos(PI / 16.0), w, f), w);
    x2 = mul(s, from_real(-$sin(7.0 * PI / 16.0), w, f), w);
    y2 = mul(p, from_real($cos(7.0 * PI / 16.0), w, f), w);
    ok &= ((u.s ^ v.s) != (x2.s ^ y2.s));
    if (u.s == v.s) n_pair_sb1++; else n_pair_db1++;
    fo[1] = add(u, v, w, f);
    fo[7] = add(x2, y2, w, f);
    u  = mul(r, from_real($sin(5.0 * PI / 16.0), w, f), w);
    v  = mul(q, from_real($cos(5.0 * PI / 16.0), w, f), w);
    x2 = mul(r, from_real(-$sin(3.0 * PI / 16.0), w, f), w);
    y2 = mul(q, from_real($cos(3.0 * PI / 16.0), w, f), w);
    ok &= ((u.s ^ v.s) != (x2.s ^ y2.s));
    if (u.s == v.s) n_pair_sb1++; else n_pair_db1++;
    fo[5] = add(u, v, w, f);
    fo[3] = add(x2, y2, w, f);
    return ok;
  endfunction

  // Exact DCT of the flow graph's scaling, in real arithmetic.
  function automatic real dct_exact(real fi [8], int k);
    real PI, acc;
    PI = 3.14159265358979323846;
    acc = 0.0;
    for (int i = 0; i < 8; i++) acc += fi[i] * $cos(real'((2 * i + 1) * k) * PI / 16.0);
    return (k == 0) ? acc / $sqrt(2.0) : acc;
  endfunction

endpackage
