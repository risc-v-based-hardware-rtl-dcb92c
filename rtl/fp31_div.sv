// fp31_div: quotient a / b of two 31-bit bounds, rounded toward -inf (y_dn)
// and toward +inf (y_up).
//
// Purely combinational. The significand of a, shifted left by 26 bits, is
// divided by that of b; the 26- or 27-bit quotient is normalised and a
// nonzero remainder sets the sticky bit. Special cases: 0 / b = 0,
// a / inf = 0, finite / 0 = inf and inf / finite = inf (signs combined). The
// interval units never divide by an interval containing zero, so 0/0 and
// inf/inf do not occur; they return 0 and inf respectively.
// Directed rounding follows the document; the datapath is this design's own.
module fp31_div
  import xinterval_pkg::*;
(
  input  fp31_t a,
  input  fp31_t b,
  output fp31_t y_dn,
  output fp31_t y_up
);

  logic        s;
  logic [49:0] num;
  logic [49:0] q, r;
  logic [47:0] sig;
  int          e;

  always_comb begin
    s   = a.sign ^ b.sign;
    num = {1'b1, a.frac, 26'd0};
    q   = num / {26'd0, 1'b1, b.frac};
    r   = num % {26'd0, 1'b1, b.frac};
    e   = int'(a.exp) - int'(b.exp) + BIAS;
    sig = '0;
    if (fp_is_zero(a) || fp_is_inf(b)) begin
      y_dn = FP_ZERO;
      y_up = FP_ZERO;
    end else if (fp_is_inf(a) || fp_is_zero(b)) begin
      y_dn = s ? FP_NEG_INF : FP_POS_INF;
      y_up = y_dn;
    end else begin
      if (q[26]) begin
        sig = {q[26:0], 21'd0};
      end else begin
        sig = {q[25:0], 22'd0};
        e   = e - 1;
      end
      y_dn = fp_round(s, e, sig, r != '0, 1'b0);
      y_up = fp_round(s, e, sig, r != '0, 1'b1);
    end
  end

endmodule
