// fp_ref_pkg: reference arithmetic for the testbenches, written independently
// of the design's units. Single-precision operations are evaluated in double
// precision (exact for a product of two singles, and for a sum of two singles
// either exact or far from a rounding boundary) and then rounded to single
// precision, nearest-even, with results below the normal range flushed to
// zero and overflow going to infinity, as the design's units do. It also
// holds a reference model of the whole kernel, operation by operation.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) return f[31] ? -0.0 : 0.0;
    if (f[30:23] == 8'hFF) d = {f[31], 11'h7FF, f[22:0], 29'h0};
    else                   d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'h0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [23:0] m;
    logic        g, rest, up;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'h0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:29]};
    g = d[28];
    rest = |d[27:0];
    up = g & (rest | m[0]);
    if (up) begin
      if (m == 24'hFF_FFFF) begin m = 24'h80_0000; e++; end
      else m = m + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'h0};
    if (e <= 0) return {d[63], 31'h0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] radd(input logic [31:0] a, input logic [31:0] b);
    real s;
    s = f2r(a) + f2r(b);
    if (s == 0.0) return (a[31] & b[31]) ? 32'h8000_0000 : 32'h0;
    return r2f(s);
  endfunction

  function automatic logic [31:0] rsub(input logic [31:0] a, input logic [31:0] b);
    return radd(a, {~b[31], b[30:0]});
  endfunction

  function automatic logic [31:0] rmul(input logic [31:0] a, input logic [31:0] b);
    real p;
    p = f2r(a) * f2r(b);
    if (p == 0.0) return {a[31] ^ b[31], 31'h0};
    return r2f(p);
  endfunction

  function automatic logic rlt(input logic [31:0] a, input logic [31:0] b);
    return f2r(a) < f2r(b);
  endfunction

  // a random single with exponent in [emin, emax] (unbiased) and random sign
  function automatic logic [31:0] rand_f32(input int emin, input int emax);
    int e;
    e = emin + int'($urandom % 32'(emax - emin + 1));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

  typedef struct {
    logic [31:0] u, v, d, t, uv, m0, m1;
    logic [3:0]  flags;   // {M0<M1, D<U+V, V<0, U<0}
    logic        hit;
    logic [31:0] out_t, out_d;
  } kres_t;

  // Kernel reference: w = {T0, T1, T2, P0, PD (xyz each), Told, Dold}
  function automatic kres_t kernel_ref(input logic [31:0] w [17]);
    kres_t r;
    logic [31:0] s0 [3], s1 [3], s2 [3], c0 [3], c1 [3], pd [3];
    for (int i = 0; i < 3; i++) begin
      s0[i] = rsub(w[3+i], w[i]);
      s1[i] = rsub(w[6+i], w[i]);
      s2[i] = rsub(w[9+i], w[i]);
      pd[i] = w[12+i];
    end
    // C0 = PD x S1, C1 = S2 x S0
    c0[0] = rsub(rmul(pd[1], s1[2]), rmul(pd[2], s1[1]));
    c0[1] = rsub(rmul(pd[2], s1[0]), rmul(pd[0], s1[2]));
    c0[2] = rsub(rmul(pd[0], s1[1]), rmul(pd[1], s1[0]));
    c1[0] = rsub(rmul(s2[1], s0[2]), rmul(s2[2], s0[1]));
    c1[1] = rsub(rmul(s2[2], s0[0]), rmul(s2[0], s0[2]));
    c1[2] = rsub(rmul(s2[0], s0[1]), rmul(s2[1], s0[0]));
    r.u  = radd(radd(rmul(s2[0], c0[0]), rmul(s2[1], c0[1])), rmul(s2[2], c0[2]));
    r.v  = radd(radd(rmul(pd[0], c1[0]), rmul(pd[1], c1[1])), rmul(pd[2], c1[2]));
    r.d  = radd(radd(rmul(s0[0], c0[0]), rmul(s0[1], c0[1])), rmul(s0[2], c0[2]));
    r.t  = radd(radd(rmul(s1[0], c1[0]), rmul(s1[1], c1[1])), rmul(s1[2], c1[2]));
    r.uv = radd(r.u, r.v);
    r.m0 = rmul(r.t, w[16]);
    r.m1 = rmul(w[15], r.d);
    r.flags = {rlt(r.m0, r.m1), rlt(r.d, r.uv), rlt(r.v, 32'h0), rlt(r.u, 32'h0)};
    r.hit = !r.flags[0] && !r.flags[1] && !r.flags[2] && r.flags[3];
    r.out_t = r.hit ? r.t : w[15];
    r.out_d = r.hit ? r.d : w[16];
    return r;
  endfunction

  // A random ray/triangle item in a box of +-8. With probability about one
  // half the ray is aimed at a point inside the triangle. The triangle is
  // oriented so that the determinant is positive.
  function automatic void rand_item(output logic [31:0] w [17], input logic [31:0] told,
                                    input logic [31:0] dold);
    real t0 [3], t1 [3], t2 [3], p0 [3], pd [3], tgt [3], a, b, det;
    real e1 [3], e2 [3], pv [3], tmp;
    for (int i = 0; i < 3; i++) begin
      t0[i] = (real'($urandom % 16001) - 8000.0) / 1000.0;
      t1[i] = (real'($urandom % 16001) - 8000.0) / 1000.0;
      t2[i] = (real'($urandom % 16001) - 8000.0) / 1000.0;
      p0[i] = (real'($urandom % 16001) - 8000.0) / 1000.0;
    end
    a = real'($urandom % 1000) / 1000.0;
    b = real'($urandom % 1000) / 1000.0;
    if ($urandom % 2 == 0) begin
      if (a + b > 1.0) begin a = 1.0 - a; b = 1.0 - b; end   // inside
    end else begin
      a = a * 2.0 - 0.5; b = b * 2.0 - 0.5;                  // anywhere
    end
    for (int i = 0; i < 3; i++) begin
      tgt[i] = t0[i] + a * (t1[i] - t0[i]) + b * (t2[i] - t0[i]);
      pd[i]  = tgt[i] - p0[i];
      e1[i]  = t1[i] - t0[i];
      e2[i]  = t2[i] - t0[i];
    end
    pv[0] = pd[1] * e2[2] - pd[2] * e2[1];
    pv[1] = pd[2] * e2[0] - pd[0] * e2[2];
    pv[2] = pd[0] * e2[1] - pd[1] * e2[0];
    det = e1[0] * pv[0] + e1[1] * pv[1] + e1[2] * pv[2];
    if (det < 0.0)
      for (int i = 0; i < 3; i++) begin tmp = t1[i]; t1[i] = t2[i]; t2[i] = tmp; end
    for (int i = 0; i < 3; i++) begin
      w[i]    = r2f(t0[i]);
      w[3+i]  = r2f(t1[i]);
      w[6+i]  = r2f(t2[i]);
      w[9+i]  = r2f(p0[i]);
      w[12+i] = r2f(pd[i]);
    end
    w[15] = told;
    w[16] = dold;
  endfunction

endpackage
