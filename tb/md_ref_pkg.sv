// md_ref_pkg -- reference model for the max-min calculator testbenches.
//
// Computes the matching degree of two trapezoidal/triangular membership
// functions the slow, direct way, independently of the hardware's gap/divide
// formula: it evaluates min(A(m), X(m)) in real arithmetic at every break point
// and at every crossing of a rising edge of one MF with a falling edge of the
// other, and takes the maximum. The result is then quantised as the calculator
// specifies: all ones for grade 1, zero for grade 0, otherwise
// L - floor(L * (1 - g)) limited to 1 .. L - 1, with L = 8 when both MFs are
// triangles and L = 16 otherwise. A triangle is coded with its fourth point 0.
package md_ref_pkg;

  typedef struct {
    int p1;
    int p2;
    int p3;
    int p4;
  } ref_mf_t;

  // Widen a triangle (p4 = 0) to the trapezoid (p1, p2, p2, p3).
  function automatic ref_mf_t widen(int p1, int p2, int p3, int p4);
    ref_mf_t r;
    if (p4 == 0) begin
      r.p1 = p1; r.p2 = p2; r.p3 = p2; r.p4 = p3;
    end else begin
      r.p1 = p1; r.p2 = p2; r.p3 = p3; r.p4 = p4;
    end
    return r;
  endfunction

  function automatic real mu(ref_mf_t f, real m);
    if (m < real'(f.p1) || m > real'(f.p4)) return 0.0;
    if (m >= real'(f.p2) && m <= real'(f.p3)) return 1.0;
    if (m < real'(f.p2)) return (m - real'(f.p1)) / real'(f.p2 - f.p1);
    return (real'(f.p4) - m) / real'(f.p4 - f.p3);
  endfunction

  function automatic real min_at(ref_mf_t a, ref_mf_t x, real m);
    real ua = mu(a, m);
    real ux = mu(x, m);
    return (ua < ux) ? ua : ux;
  endfunction

  // Crossing of the rising edge (u0,0)-(u1,1) with the falling edge (v0,1)-(v1,0).
  function automatic real cross_m(int u0, int u1, int v0, int v1);
    real den = real'(v1 - v0) + real'(u1 - u0);
    if (den == 0.0) return real'(u0);
    return (real'(u0) * real'(v1 - v0) + real'(v1) * real'(u1 - u0)) / den;
  endfunction

  // Grade g = max over m of min(A(m), X(m)).
  function automatic real grade(ref_mf_t a, ref_mf_t x);
    real cand[10];
    real g = 0.0;
    real v;
    cand[0] = a.p1; cand[1] = a.p2; cand[2] = a.p3; cand[3] = a.p4;
    cand[4] = x.p1; cand[5] = x.p2; cand[6] = x.p3; cand[7] = x.p4;
    cand[8] = cross_m(x.p1, x.p2, a.p3, a.p4);
    cand[9] = cross_m(a.p1, a.p2, x.p3, x.p4);
    foreach (cand[k]) begin
      v = min_at(a, x, cand[k]);
      if (v > g) g = v;
    end
    return g;
  endfunction

  // Expected 12-bit h for the given break points.
  function automatic int expected_h(int a1, int a2, int a3, int a4,
                                    int x1, int x2, int x3, int x4, int hw);
    ref_mf_t a = widen(a1, a2, a3, a4);
    ref_mf_t x = widen(x1, x2, x3, x4);
    real g = grade(a, x);
    int lv = (a4 == 0 && x4 == 0) ? 8 : 16;
    int d;
    if (g >= 1.0 - 1e-9) return (1 << hw) - 1;
    if (g <= 1e-9) return 0;
    d = int'($floor(real'(lv) * (1.0 - g) + 1e-9));
    if (d == 0) d = 1;
    return lv - d;
  endfunction

  // 1 when the pair crosses over so close to grade 1 that the truncated term
  // floor(L * (1 - g)) is 0 and h is limited to L - 1.
  function automatic bit is_limited(int a1, int a2, int a3, int a4,
                                    int x1, int x2, int x3, int x4);
    real g = grade(widen(a1, a2, a3, a4), widen(x1, x2, x3, x4));
    int lv = (a4 == 0 && x4 == 0) ? 8 : 16;
    if (g >= 1.0 - 1e-9 || g <= 1e-9) return 1'b0;
    return int'($floor(real'(lv) * (1.0 - g) + 1e-9)) == 0;
  endfunction

  // Random ordered break points: a start and three small steps, so that the
  // two MFs land in every relative position. is_tri selects the triangle coding.
  function automatic void random_mf(bit is_tri, output int p1, output int p2,
                                    output int p3, output int p4);
    int s1, s2, s3;
    do begin
      p1 = int'($urandom_range(0, 56));
      s1 = int'($urandom_range(0, 9));
      s2 = int'($urandom_range(0, 9));
      s3 = int'($urandom_range(0, 9));
      p2 = p1 + s1;
      p3 = p2 + s2;
      p4 = is_tri ? 0 : p3 + s3;
    end while (p3 > 63 || p4 > 63 || (!is_tri && p4 == 0) || (is_tri && p3 == 0));
  endfunction

endpackage
