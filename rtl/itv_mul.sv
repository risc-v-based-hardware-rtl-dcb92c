// itv_mul: interval product [x] * [y] with outward rounding.
//
// Combinational helper. The four endpoint products are formed by fp31_mul
// instances; the lower bound is the least of the products rounded toward -inf
// and the upper bound the greatest of those rounded toward +inf (0 * inf
// counts as 0). The result is empty when an operand is empty; its iota flag
// is the OR of the operands' flags.
module itv_mul
  import xinterval_pkg::*;
(
  input  itv_t x,
  input  itv_t y,
  output itv_t r
);

  fp31_t pa [4];
  fp31_t pb [4];
  fp31_t dn [4];
  fp31_t up [4];

  assign pa[0] = x.lo; assign pb[0] = y.lo;
  assign pa[1] = x.lo; assign pb[1] = y.hi;
  assign pa[2] = x.hi; assign pb[2] = y.lo;
  assign pa[3] = x.hi; assign pb[3] = y.hi;

  for (genvar g = 0; g < 4; g++) begin : g_prod
    fp31_mul u_mul (.a(pa[g]), .b(pb[g]), .y_dn(dn[g]), .y_up(up[g]));
  end

  always_comb begin
    r.empty = x.empty | y.empty;
    r.iota  = x.iota | y.iota;
    r.lo    = fp_min(fp_min(dn[0], dn[1]), fp_min(dn[2], dn[3]));
    r.hi    = fp_max(fp_max(up[0], up[1]), fp_max(up[2], up[3]));
    if (r.empty) begin
      r.lo = FP_ZERO;
      r.hi = FP_ZERO;
    end
  end

endmodule
