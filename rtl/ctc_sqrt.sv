// ctc_sqrt: forward and backward contractors of the square root with the
// iota flag for inputs that leave the domain [0, +inf].
//
// Operand roles: a = rs1 (x), b = rs2 (y).
//   fw = 1 (sqrt_iota): r = sqrt(a /\ [0, +inf]); the iota flag is set when
//           part of a lies below zero. An input entirely below zero gives
//           the empty set, flagged iota.
//   fw = 0 (sqrt_iota bw): r = a /\ [lo(y+)^2, hi(y+)^2], y+ = b /\ [0, +inf].
//           When b carries the iota flag, the part of a below zero, which the
//           forward step dropped, is kept in the result instead of being
//           contracted away. The result is flagged iota when a reaches
//           below zero.
// That the forward step marks out-of-domain inputs and the backward step
// reads the flag follows the document; how the flag changes the backward
// result is this design's reading of it. Combinational: two fp31_sqrt and two
// fp31_mul instances.
module ctc_sqrt
  import xinterval_pkg::*;
(
  input  logic fw,
  input  itv_t a,
  input  itv_t b,
  output itv_t r
);

  itv_t  xd, yp, sq, core, neg_part, fwd, bwd;
  fp31_t rl_dn, rl_up, rh_dn, rh_up;
  fp31_t ql_dn, ql_up, qh_dn, qh_up;
  logic  below;

  assign xd    = itv_meet(a, ITV_NONNEG);
  assign yp    = itv_meet(b, ITV_NONNEG);
  assign below = !a.empty && fp_lt(a.lo, FP_ZERO);

  fp31_sqrt u_rt_lo (.a(xd.lo), .y_dn(rl_dn), .y_up(rl_up));
  fp31_sqrt u_rt_hi (.a(xd.hi), .y_dn(rh_dn), .y_up(rh_up));
  fp31_mul  u_sq_lo (.a(yp.lo), .b(yp.lo), .y_dn(ql_dn), .y_up(ql_up));
  fp31_mul  u_sq_hi (.a(yp.hi), .b(yp.hi), .y_dn(qh_dn), .y_up(qh_up));

  always_comb begin
    fwd.empty = xd.empty;
    fwd.iota  = a.iota | below;
    fwd.lo    = rl_dn;
    fwd.hi    = rh_up;
    if (fwd.empty) begin
      fwd.lo = FP_ZERO;
      fwd.hi = FP_ZERO;
    end
    if (a.empty) fwd = ITV_EMPTY;

    sq.empty = yp.empty;
    sq.iota  = 1'b0;
    sq.lo    = ql_dn;
    sq.hi    = qh_up;
    core     = itv_meet(a, sq);
    neg_part = itv_meet(a, '{empty: 1'b0, iota: 1'b0, lo: FP_NEG_INF, hi: FP_ZERO});
    bwd      = b.iota ? itv_hull(core, neg_part) : core;
    bwd.iota = a.iota | below;
    if (a.empty || b.empty) bwd = ITV_EMPTY;

    r = fw ? fwd : bwd;
  end

endmodule
