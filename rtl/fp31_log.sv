// fp31_log: natural logarithm of a positive 31-bit bound, as a guaranteed
// pair y_dn <= log(a) <= y_up.
//
// Purely combinational. a = m * 2^E with m in [1/sqrt2, sqrt2], and
// log a = E*ln2 + 2*atanh(s) with s = (m - 1)/(m + 1), |s| <= 0.172. The
// atanh series s + s^3/3 + ... + s^15/15 is evaluated in Horner form on
// fixed-point numbers with 50 fraction bits. The total error is below
// 2^-45 absolute. The value is widened by 2^-44 on each side and the ends
// are rounded outward. The bound is absolute: results close to zero (a near
// 1) are wider than one unit in the last place.
// Special cases: log(1) = 0 exactly, log(0) = -inf, log(+inf) = +inf.
// A negative input is outside the domain and gives -inf/+inf; callers clip
// intervals to [0, +inf] first.
// That log is a primitive of the extension follows the document; the
// algorithm and its accuracy are this design's own.
module fp31_log
  import xinterval_pkg::*;
(
  input  fp31_t a,
  output fp31_t y_dn,
  output fp31_t y_up
);

  localparam logic [63:0] LN2_Q62   = 64'h2c5c85fdf473de6a;  // ln 2 * 2^62
  localparam logic [63:0] SQRT2_Q50 = 64'h5a827999fcef3;     // sqrt 2 * 2^50
  localparam logic [63:0] ONE_Q50   = 64'd1 << 50;
  localparam int          NTERMS    = 8;                     // 1/1 .. 1/15

  function automatic logic [63:0] inv_odd(int j);
    return ONE_Q50 / 64'(2 * j + 1);
  endfunction

  int                  ue;
  logic        [63:0]  m, num, sm, s2, q;
  logic                neg;
  logic        [127:0] u;
  logic signed [127:0] t;
  logic signed [63:0]  l, tot, lo_v, hi_v;

  always_comb begin
    ue = int'(a.exp) - BIAS;
    m  = 64'({1'b1, a.frac}) << 27;
    if (m > SQRT2_Q50) begin
      m  = m >> 1;
      ue = ue + 1;
    end
    neg = m < ONE_Q50;
    num = neg ? ONE_Q50 - m : m - ONE_Q50;
    u   = (128'(num) << 50) / 128'(m + ONE_Q50);
    sm  = u[63:0];
    u   = 128'(sm) * 128'(sm);
    s2  = u[113:50];
    q   = inv_odd(NTERMS - 1);
    for (int j = NTERMS - 2; j >= 0; j--) begin
      u = 128'(q) * 128'(s2);
      q = u[113:50] + inv_odd(j);
    end
    u   = 128'(sm) * 128'(q);
    l   = $signed(u[112:49]);                 // 2 * s * q
    if (neg) l = -l;
    t   = 128'(signed'(64'(ue))) * $signed({64'd0, LN2_Q62});
    tot = 64'(t >>> 12) + l;
    lo_v = tot - 64'sd64;
    hi_v = tot + 64'sd64;
    if (fp_is_zero(a)) begin
      y_dn = FP_NEG_INF;
      y_up = FP_NEG_INF;
    end else if (a.sign) begin
      y_dn = FP_NEG_INF;
      y_up = FP_POS_INF;
    end else if (fp_is_inf(a)) begin
      y_dn = FP_POS_INF;
      y_up = FP_POS_INF;
    end else if (a.exp == 7'(BIAS) && a.frac == '0) begin
      y_dn = FP_ZERO;
      y_up = FP_ZERO;
    end else begin
      y_dn = fx_to_fp(lo_v, 0, 1'b0);
      y_up = fx_to_fp(hi_v, 0, 1'b1);
    end
  end

endmodule
