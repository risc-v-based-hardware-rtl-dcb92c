// fp31_sqrt: square root of a non-negative 31-bit bound, rounded toward -inf
// (y_dn) and toward +inf (y_up).
//
// Purely combinational. The exponent is made even by doubling the
// significand when needed; a restoring digit-by-digit integer square root
// then yields a 26-bit root with its leading one at bit 25, and a nonzero
// remainder sets the sticky bit. sqrt(0) = 0 and sqrt(inf) = inf. A negative
// input is outside the domain and gives zero; callers clip intervals to
// [0, +inf] first.
// Directed rounding follows the document; the datapath is this design's own.
module fp31_sqrt
  import xinterval_pkg::*;
(
  input  fp31_t a,
  output fp31_t y_dn,
  output fp31_t y_up
);

  int          ue, ee;
  logic [51:0] rad;
  logic [25:0] root;
  logic [27:0] rem, trial;
  logic [47:0] sig;

  always_comb begin
    ue   = int'(a.exp) - BIAS;
    ee   = ue - (ue & 1);
    rad  = (ue & 1) != 0 ? {1'b1, a.frac, 28'd0} : {1'b0, 1'b1, a.frac, 27'd0};
    root = '0;
    rem  = '0;
    trial = '0;
    for (int i = 25; i >= 0; i--) begin
      rem   = {rem[25:0], rad[2*i+1], rad[2*i]};
      trial = {root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[24:0], 1'b1};
      end else begin
        root = {root[24:0], 1'b0};
      end
    end
    sig = {root, 22'd0};
    if (fp_is_zero(a) || a.sign) begin
      y_dn = FP_ZERO;
      y_up = FP_ZERO;
    end else if (fp_is_inf(a)) begin
      y_dn = FP_POS_INF;
      y_up = FP_POS_INF;
    end else begin
      y_dn = fp_round(1'b0, (ee >>> 1) + BIAS, sig, rem != '0, 1'b0);
      y_up = fp_round(1'b0, (ee >>> 1) + BIAS, sig, rem != '0, 1'b1);
    end
  end

endmodule
