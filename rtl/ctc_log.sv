// ctc_log: forward and backward contractors of the natural logarithm with the
// iota flag for inputs that leave the domain, handled like the square root.
//
// Operand roles: a = rs1 (x), b = rs2 (y).
//   fw = 1: r = log(a /\ [0, +inf]) rounded outward, log(0) = -inf; the iota
//           flag is set when part of a lies below zero. An input entirely
//           below zero gives the empty set, flagged iota.
//   fw = 0: r = a /\ [exp(lo(y)), exp(hi(y))]. When b carries the iota flag
//           the part of a below zero is kept in the result. The result is
//           flagged iota when a reaches below zero.
// Combinational: two fp31_log and two fp31_exp instances. That log is a
// contractor primitive and that partial functions mark out-of-domain inputs
// follows the document; encoding, accuracy and algorithm are this design's
// own.
module ctc_log
  import xinterval_pkg::*;
(
  input  logic fw,
  input  itv_t a,
  input  itv_t b,
  output itv_t r
);

  itv_t  xd, s, core, neg_part, fwd, bwd;
  fp31_t ll_dn, ll_up, lh_dn, lh_up;
  fp31_t el_dn, el_up, eh_dn, eh_up;
  logic  below;

  assign xd    = itv_meet(a, ITV_NONNEG);
  assign below = !a.empty && fp_lt(a.lo, FP_ZERO);

  fp31_log u_log_lo (.a(xd.lo), .y_dn(ll_dn), .y_up(ll_up));
  fp31_log u_log_hi (.a(xd.hi), .y_dn(lh_dn), .y_up(lh_up));
  fp31_exp u_exp_lo (.a(b.lo), .y_dn(el_dn), .y_up(el_up));
  fp31_exp u_exp_hi (.a(b.hi), .y_dn(eh_dn), .y_up(eh_up));

  always_comb begin
    fwd.empty = xd.empty;
    fwd.iota  = a.iota | below;
    fwd.lo    = ll_dn;
    fwd.hi    = lh_up;
    if (fwd.empty) begin
      fwd.lo = FP_ZERO;
      fwd.hi = FP_ZERO;
    end
    if (a.empty) fwd = ITV_EMPTY;

    s.empty  = b.empty;
    s.iota   = 1'b0;
    s.lo     = el_dn;
    s.hi     = eh_up;
    core     = itv_meet(a, s);
    neg_part = itv_meet(a, '{empty: 1'b0, iota: 1'b0, lo: FP_NEG_INF, hi: FP_ZERO});
    bwd      = b.iota ? itv_hull(core, neg_part) : core;
    bwd.iota = a.iota | below;
    if (a.empty || b.empty) bwd = ITV_EMPTY;

    r = fw ? fwd : bwd;
  end

endmodule
