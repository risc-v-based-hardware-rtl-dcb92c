// ctc_exp: forward and backward contractors of the exponential (y = exp x).
//
// Operand roles: a = rs1 (x), b = rs2 (y).
//   fw = 1: r = [exp(lo), exp(hi)] rounded outward (exp is increasing).
//   fw = 0: r = a /\ [log(lo(y+)), log(hi(y+))], y+ = b /\ [0, +inf];
//           log(0) = -inf, and an empty y+ gives the empty set.
// The result keeps the iota flag of a. Combinational: two fp31_exp and two
// fp31_log instances. That exp is a contractor primitive follows the
// document; encoding, accuracy and algorithm are this design's own.
module ctc_exp
  import xinterval_pkg::*;
(
  input  logic fw,
  input  itv_t a,
  input  itv_t b,
  output itv_t r
);

  fp31_t el_dn, el_up, eh_dn, eh_up;
  fp31_t ll_dn, ll_up, lh_dn, lh_up;
  itv_t  yp, s, fwd, bwd;

  assign yp = itv_meet(b, ITV_NONNEG);

  fp31_exp u_exp_lo (.a(a.lo), .y_dn(el_dn), .y_up(el_up));
  fp31_exp u_exp_hi (.a(a.hi), .y_dn(eh_dn), .y_up(eh_up));
  fp31_log u_log_lo (.a(yp.lo), .y_dn(ll_dn), .y_up(ll_up));
  fp31_log u_log_hi (.a(yp.hi), .y_dn(lh_dn), .y_up(lh_up));

  always_comb begin
    fwd.empty = a.empty;
    fwd.iota  = a.iota;
    fwd.lo    = el_dn;
    fwd.hi    = eh_up;
    if (a.empty) fwd = ITV_EMPTY;

    s.empty = yp.empty;
    s.iota  = 1'b0;
    s.lo    = ll_dn;
    s.hi    = lh_up;
    bwd     = itv_meet(a, s);

    r = fw ? fwd : bwd;
  end

endmodule
