// itv_div: interval quotient [x] / [y] for a divisor that does not contain
// zero, with outward rounding.
//
// Combinational helper. The sign of [y] and of each bound of [x] select which
// endpoint pair gives each bound, so only two fp31_div instances are needed
// (lower bound rounded toward -inf, upper toward +inf) and inf/inf never
// arises. The caller must handle divisors containing zero; for them the
// output is meaningless. Empty operands give an empty result; iota flags are
// or-ed.
module itv_div
  import xinterval_pkg::*;
(
  input  itv_t x,
  input  itv_t y,
  output itv_t r
);

  fp31_t ln, ld, hn, hd;
  fp31_t lo_dn, lo_up, hi_dn, hi_up;
  logic  ypos, xlo_nn, xhi_nn;

  always_comb begin
    ypos   = fp_lt(FP_ZERO, y.lo);
    xlo_nn = fp_le(FP_ZERO, x.lo);
    xhi_nn = fp_le(FP_ZERO, x.hi);
    if (ypos) begin
      ln = x.lo; ld = xlo_nn ? y.hi : y.lo;
      hn = x.hi; hd = xhi_nn ? y.lo : y.hi;
    end else begin
      ln = x.hi; ld = xhi_nn ? y.hi : y.lo;
      hn = x.lo; hd = xlo_nn ? y.lo : y.hi;
    end
  end

  fp31_div u_div_lo (.a(ln), .b(ld), .y_dn(lo_dn), .y_up(lo_up));
  fp31_div u_div_hi (.a(hn), .b(hd), .y_dn(hi_dn), .y_up(hi_up));

  always_comb begin
    r.empty = x.empty | y.empty;
    r.iota  = x.iota | y.iota;
    r.lo    = lo_dn;
    r.hi    = hi_up;
    if (r.empty) begin
      r.lo = FP_ZERO;
      r.hi = FP_ZERO;
    end
  end

endmodule
