// fp31_exp: exp(a) of a 31-bit bound, as a guaranteed pair y_dn <= exp(a) <=
// y_up.
//
// Purely combinational. The argument is converted to fixed point with 50
// fraction bits and reduced as a = k*ln2 + r with |r| <= 0.35. exp(r) is
// then evaluated by a degree-11 Taylor polynomial in Horner form. The
// truncation errors of the conversion, the reduction, the Horner steps and
// the series remainder add up to less than 2^-44 relative. The value is
// widened by 2^-40 relative on each side, and the two ends are rounded
// outward into the bound format with scale 2^k. Results are at most one
// unit in the last place wider than the tightest pair.
// Special cases: exp(0) = 1 exactly, exp(+inf) = +inf, exp(-inf) = 0;
// |a| >= 128 overflows or underflows, with outward rounding.
// That exp is a primitive of the extension follows the document; the
// algorithm and its accuracy are this design's own.
module fp31_exp
  import xinterval_pkg::*;
(
  input  fp31_t a,
  output fp31_t y_dn,
  output fp31_t y_up
);

  localparam logic [63:0] LN2_Q62    = 64'h2c5c85fdf473de6a;  // ln 2 * 2^62
  localparam logic [24:0] INVLN2_Q24 = 25'h1715476;           // 1/ln 2 * 2^24
  localparam int          NTERMS     = 12;                    // 1/0! .. 1/11!

  // 1/j! with 50 fraction bits, computed at elaboration.
  function automatic logic [63:0] inv_fact(int j);
    logic [63:0] f = 64'd1;
    for (int i = 2; i <= j; i++) f = f * 64'(i);
    return (64'd1 << 50) / f;
  endfunction

  int                  ue, k;
  logic        [57:0]  xf;
  logic signed [63:0]  xs, r, p, lo_v, hi_v;
  logic signed [127:0] t;

  always_comb begin
    ue = int'(a.exp) - BIAS;
    xf = '0;
    if (ue + 27 >= 0) xf = 58'({1'b1, a.frac}) << (ue + 27);
    else if (ue + 27 > -24) xf = 58'({1'b1, a.frac}) >> (-(ue + 27));
    xs = a.sign ? -$signed({6'd0, xf}) : $signed({6'd0, xf});
    // k = round(x / ln2)
    t  = 128'(xs) * $signed({103'd0, INVLN2_Q24});
    t  = t + (128'sd1 <<< 73);
    k  = int'(t >>> 74);
    // r = x - k*ln2, 50 fraction bits
    t  = 128'(signed'(64'(k))) * $signed({64'd0, LN2_Q62});
    r  = xs - 64'(t >>> 12);
    // Horner evaluation of sum r^j / j!
    p  = $signed(inv_fact(NTERMS - 1));
    for (int j = NTERMS - 2; j >= 0; j--) begin
      t = 128'(p) * 128'(r);
      p = 64'(t >>> 50) + $signed(inv_fact(j));
    end
    lo_v = p - (p >>> 40) - 64'sd1;
    hi_v = p + (p >>> 40) + 64'sd1;
    if (fp_is_zero(a)) begin
      y_dn = '{sign: 1'b0, exp: 7'(BIAS), frac: '0};
      y_up = y_dn;
    end else if (fp_is_inf(a)) begin
      y_dn = a.sign ? FP_ZERO : FP_POS_INF;
      y_up = y_dn;
    end else if (ue >= 7) begin
      y_dn = a.sign ? FP_ZERO : FP_MAX;
      y_up = a.sign ? FP_MIN_NRM : FP_POS_INF;
    end else begin
      y_dn = fx_to_fp(lo_v, k, 1'b0);
      y_up = fx_to_fp(hi_v, k, 1'b1);
    end
  end

endmodule
