// ctc_sqr: forward and backward contractors of the square (y = x^2).
//
// Operand roles: a = rs1 (x), b = rs2 (y).
//   fw = 1: r = a^2: [lo^2, hi^2] for a >= 0, [hi^2, lo^2] for a <= 0 and
//           [0, max(lo^2, hi^2)] when a straddles zero.
//   fw = 0: r = hull((a /\ sqrt(y+)), (a /\ -sqrt(y+))) with
//           y+ = b /\ [0, +inf]; empty when y+ is empty.
// The backward form keeps the iota flag of a. Combinational: two fp31_mul
// and two fp31_sqrt instances.
module ctc_sqr
  import xinterval_pkg::*;
(
  input  logic fw,
  input  itv_t a,
  input  itv_t b,
  output itv_t r
);

  fp31_t ll_dn, ll_up, hh_dn, hh_up;
  fp31_t sl_dn, sl_up, sh_dn, sh_up;
  itv_t  yp, s, fwd, bwd;

  fp31_mul u_sq_lo (.a(a.lo), .b(a.lo), .y_dn(ll_dn), .y_up(ll_up));
  fp31_mul u_sq_hi (.a(a.hi), .b(a.hi), .y_dn(hh_dn), .y_up(hh_up));

  assign yp = itv_meet(b, ITV_NONNEG);
  fp31_sqrt u_rt_lo (.a(yp.lo), .y_dn(sl_dn), .y_up(sl_up));
  fp31_sqrt u_rt_hi (.a(yp.hi), .y_dn(sh_dn), .y_up(sh_up));

  always_comb begin
    fwd.empty = a.empty;
    fwd.iota  = a.iota;
    if (fp_le(FP_ZERO, a.lo)) begin
      fwd.lo = ll_dn; fwd.hi = hh_up;
    end else if (fp_le(a.hi, FP_ZERO)) begin
      fwd.lo = hh_dn; fwd.hi = ll_up;
    end else begin
      fwd.lo = FP_ZERO; fwd.hi = fp_max(ll_up, hh_up);
    end
    if (fwd.empty) fwd = ITV_EMPTY;

    s.empty = yp.empty;
    s.iota  = 1'b0;
    s.lo    = sl_dn;
    s.hi    = sh_up;
    bwd = itv_hull(itv_meet(a, s), itv_meet(a, itv_neg(s)));
    if (a.empty || yp.empty) bwd = ITV_EMPTY;

    r = fw ? fwd : bwd;
  end

endmodule
