// tb_fp31_pkg: reference helpers for the testbenches. Converts 31-bit bounds
// (sign, 7-bit exponent with bias 63, 23-bit fraction; exponent 0 = zero,
// 127 = infinity) to and from real numbers independently of the RTL, draws
// random bounds and measures the distance between two bounds in units in the
// last place.
package tb_fp31_pkg;

  localparam real INF = 1.0e300;   // stands for infinity in reference values

  function automatic real f2r(logic [30:0] a);
    real m;
    int  e;
    if (a[29:23] == 7'd0) return 0.0;
    if (a[29:23] == 7'h7f) return a[30] ? -INF : INF;
    m = 1.0 + real'(a[22:0]) / 8388608.0;
    e = int'(a[29:23]) - 63;
    m = m * (2.0 ** e);
    return a[30] ? -m : m;
  endfunction

  // Exact conversion of a real with at most 24 significant bits.
  function automatic logic [30:0] r2f(real r);
    logic s;
    int   e;
    real  m;
    if (r == 0.0) return 31'd0;
    if (r >= INF) return {1'b0, 7'h7f, 23'd0};
    if (r <= -INF) return {1'b1, 7'h7f, 23'd0};
    s = r < 0.0;
    m = s ? -r : r;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0) begin m = m * 2.0; e--; end
    return {s, 7'(e + 63), 23'($rtoi((m - 1.0) * 8388608.0))};
  endfunction

  function automatic logic [30:0] rnd_fp(int emin, int emax);
    logic [30:0] r;
    r[30]    = 1'($urandom);
    r[29:23] = 7'(emin + int'($urandom % (emax - emin + 1)));
    r[22:0]  = 23'($urandom);
    return r;
  endfunction

  function automatic int key(logic [30:0] a);
    int m;
    if (a[29:23] == 7'd0) return 0;
    m = {2'b0, a[29:0]};
    if (a[29:23] == 7'h7f) m = {2'b0, 7'h7f, 23'd0};
    return a[30] ? -m : m;
  endfunction

  // Checks that [dn, up] is the tightest enclosure of the exact value r:
  // dn <= r <= up, and dn == up when r is representable, otherwise adjacent.
  function automatic bit tight(logic [30:0] dn, logic [30:0] up, real r);
    real rd, ru;
    rd = f2r(dn);
    ru = f2r(up);
    if (!(rd <= r && r <= ru)) return 0;
    if (rd == r) return key(up) == key(dn);
    return (key(up) - key(dn)) == 1 || (key(up) == 0 && key(dn) == -1)
           || (key(dn) == 0 && key(up) == 1);
  endfunction

  // Random real with a 12-bit significand, exponent in [-5, 5]; 1 in 10 is 0.
  function automatic real rnd_real();
    real m;
    int  e;
    if ($urandom % 10 == 0) return 0.0;
    m = real'(2048 + $urandom % 2048) / 2048.0;
    e = int'($urandom % 11) - 5;
    m = m * (2.0 ** e);
    return ($urandom % 2) ? -m : m;
  endfunction

  // Interval {empty, iota, lo, hi} from two reals (given in any order).
  function automatic logic [63:0] mk(real x, real y, bit iota = 0);
    if (x <= y) return {1'b0, iota, r2f(x), r2f(y)};
    return {1'b0, iota, r2f(y), r2f(x)};
  endfunction

  function automatic real rlo(logic [63:0] v);
    return f2r(v[61:31]);
  endfunction

  function automatic real rhi(logic [63:0] v);
    return f2r(v[30:0]);
  endfunction

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic real rmin(real x, real y);
    return x < y ? x : y;
  endfunction

  function automatic real rmax(real x, real y);
    return x > y ? x : y;
  endfunction

  // Checks that the hardware interval r encloses the reference [lo, hi]
  // and exceeds it by no more than a few units in the last place. A
  // reference that is empty only by a hair may come out nonempty.
  function automatic bit check_itv(logic [63:0] r, bit ref_empty, real lo, real hi);
    real hl, hh;
    if (ref_empty)
      return r[63] || (lo > hi && (lo - hi) <= 1.0e-5 * rmax(rabs(lo), rabs(hi)));
    if (r[63]) return 0;
    hl = rlo(r);
    hh = rhi(r);
    if (!(hl <= lo && hi <= hh)) return 0;
    if (lo - hl > rabs(lo) * (2.0 ** -21) + 1.0e-30) return 0;
    if (hh - hi > rabs(hi) * (2.0 ** -21) + 1.0e-30) return 0;
    return 1;
  endfunction

  // Looser variant of check_itv for the transcendental contractors: each
  // bound may be off by a relative 2^-20 plus an absolute abs_tol, and a
  // reference bound beyond the largest finite number (2^64) may come out
  // as infinity.
  function automatic bit check_itv_tol(logic [63:0] r, bit ref_empty, real lo, real hi,
                                       real abs_tol);
    real hl, hh, big;
    big = 2.0 ** 64;
    if (ref_empty)
      return r[63] || (lo > hi && (lo - hi) <= 1.0e-5 * rmax(rabs(lo), rabs(hi)) + abs_tol);
    if (r[63]) return 0;
    hl = rlo(r);
    hh = rhi(r);
    if (!(hl <= lo && hi <= hh)) return 0;
    if (!(hl <= -INF && lo < -big) && lo - hl > rabs(lo) * (2.0 ** -20) + abs_tol) return 0;
    if (!(hh >= INF && hi > big) && hh - hi > rabs(hi) * (2.0 ** -20) + abs_tol) return 0;
    return 1;
  endfunction

endpackage
