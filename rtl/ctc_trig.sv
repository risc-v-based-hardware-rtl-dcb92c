// ctc_trig: forward contractors of cos and sin on intervals.
//
// r = f(a) with f = cos (sine = 0) or sin (sine = 1). The range is the hull
// of f at both ends, widened to 1 when the interval contains a maximum of f
// and to -1 when it contains a minimum. Extrema are found on the phase
// u = x/pi (cos) or x/pi - 1/2 (sin): maxima sit at even integers of u and
// minima at odd ones. Both ends of the phase are computed in fixed point
// and pushed outward by 2^-30 before the integer test, so an extremum near
// an end is included rather than missed; the result is always an
// enclosure. Intervals reaching beyond |x| >= 64 give [-1, 1]. The iota flag
// of a is kept. Combinational: two fp31_cos instances and the phase test.
// That cos and sin are contractor primitives follows the document; the
// backward contractors are not part of this block, and the encoding,
// accuracy and algorithm are this design's own.
module ctc_trig
  import xinterval_pkg::*;
(
  input  logic sine,
  input  itv_t a,
  output itv_t r
);

  localparam logic [63:0] INVPI_Q62 = 64'h145f306dc9c882a5;   // 1/pi * 2^62
  localparam logic signed [63:0] HALF = 64'sd1 <<< 49;
  localparam logic signed [63:0] EPS  = 64'sd1 <<< 20;

  fp31_t               l_dn, l_up, h_dn, h_up;
  logic                big, has_max, has_min;
  logic signed [63:0]  ua, ub, n_lo, n_hi;
  logic signed [127:0] t;

  fp31_cos u_lo (.a(a.lo), .sine(sine), .y_dn(l_dn), .y_up(l_up));
  fp31_cos u_hi (.a(a.hi), .sine(sine), .y_dn(h_dn), .y_up(h_up));

  always_comb begin
    big = fp_is_inf(a.lo) || fp_is_inf(a.hi) ||
          int'(a.lo.exp) >= BIAS + 6 || int'(a.hi.exp) >= BIAS + 6;
    t    = 128'(fp_to_fx(a.lo)) * $signed({64'd0, INVPI_Q62});
    ua   = 64'(t >>> 62) - (sine ? HALF : 64'sd0) - EPS;
    t    = 128'(fp_to_fx(a.hi)) * $signed({64'd0, INVPI_Q62});
    ub   = 64'(t >>> 62) - (sine ? HALF : 64'sd0) + EPS;
    n_lo = -((-ua) >>> 50);        // ceil(ua)
    n_hi = ub >>> 50;              // floor(ub)
    has_max = (n_hi > n_lo) || (n_hi == n_lo && !n_lo[0]);
    has_min = (n_hi > n_lo) || (n_hi == n_lo &&  n_lo[0]);

    r.empty = 1'b0;
    r.iota  = a.iota;
    r.lo    = has_min ? FP_M_ONE : fp_min(l_dn, h_dn);
    r.hi    = has_max ? FP_ONE   : fp_max(l_up, h_up);
    if (big) begin
      r.lo = FP_M_ONE;
      r.hi = FP_ONE;
    end
    if (a.empty) r = ITV_EMPTY;
  end

endmodule
