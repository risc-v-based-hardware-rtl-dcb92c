// fp31_mul: product of two 31-bit bounds, rounded toward -inf (y_dn) and
// toward +inf (y_up).
//
// Purely combinational. The 24x24-bit significand product is normalised and
// rounded by fp_round. Following the usual convention of interval endpoint
// arithmetic, 0 * inf gives 0; any other product with an infinity is an
// infinity of the product's sign.
// Directed rounding follows the document; the datapath is this design's own.
module fp31_mul
  import xinterval_pkg::*;
(
  input  fp31_t a,
  input  fp31_t b,
  output fp31_t y_dn,
  output fp31_t y_up
);

  logic        s;
  logic [47:0] p;
  int          e;

  always_comb begin
    s = a.sign ^ b.sign;
    p = {1'b1, a.frac} * {1'b1, b.frac};
    e = int'(a.exp) + int'(b.exp) - BIAS;
    if (fp_is_zero(a) || fp_is_zero(b)) begin
      y_dn = FP_ZERO;
      y_up = FP_ZERO;
    end else if (fp_is_inf(a) || fp_is_inf(b)) begin
      y_dn = s ? FP_NEG_INF : FP_POS_INF;
      y_up = y_dn;
    end else begin
      if (p[47]) begin
        e = e + 1;
      end else begin
        p = p << 1;
      end
      y_dn = fp_round(s, e, p, 1'b0, 1'b0);
      y_up = fp_round(s, e, p, 1'b0, 1'b1);
    end
  end

endmodule
