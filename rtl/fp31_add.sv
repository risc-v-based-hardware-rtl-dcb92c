// fp31_add: sum of two 31-bit bounds, rounded both toward -inf (y_dn) and
// toward +inf (y_up).
//
// Purely combinational. The smaller operand is aligned to the larger one in a
// 50-bit field; bits shifted out are kept as a sticky bit so that the two
// directed roundings are exact. The result is normalised with a leading-zero
// count and handed to fp_round. An exact zero sum is +0. inf + (-inf) cannot
// occur between bounds of valid intervals; if it does, the widest values are
// returned (-inf for y_dn, +inf for y_up) so an enclosure stays valid.
// Directed rounding follows the document; the datapath is this design's own.
module fp31_add
  import xinterval_pkg::*;
(
  input  fp31_t a,
  input  fp31_t b,
  output fp31_t y_dn,
  output fp31_t y_up
);

  fp31_t       opl, ops;
  logic [49:0] mb, ms_full, ms;
  logic [50:0] sum;
  logic        sticky;
  int          d, lz, e;
  logic [50:0] norm;

  always_comb begin
    y_dn = FP_ZERO;
    y_up = FP_ZERO;
    opl = a; ops = b;
    mb = '0; ms_full = '0; ms = '0; sum = '0; sticky = 1'b0;
    d = 0; lz = 0; e = 0; norm = '0;
    if (fp_is_inf(a) && fp_is_inf(b) && (a.sign != b.sign)) begin
      y_dn = FP_NEG_INF;
      y_up = FP_POS_INF;
    end else if (fp_is_inf(a)) begin
      y_dn = a; y_up = a;
    end else if (fp_is_inf(b)) begin
      y_dn = b; y_up = b;
    end else if (fp_is_zero(a) && fp_is_zero(b)) begin
      y_dn = FP_ZERO; y_up = FP_ZERO;
    end else if (fp_is_zero(a)) begin
      y_dn = b; y_up = b;
    end else if (fp_is_zero(b)) begin
      y_dn = a; y_up = a;
    end else begin
      if ({b.exp, b.frac} > {a.exp, a.frac}) begin
        opl = b; ops = a;
      end
      d       = int'(opl.exp) - int'(ops.exp);
      mb      = {1'b1, opl.frac, 26'd0};
      ms_full = {1'b1, ops.frac, 26'd0};
      if (d > 49) begin
        ms     = '0;
        sticky = 1'b1;
      end else begin
        ms     = ms_full >> d;
        sticky = (ms << d) != ms_full;
      end
      if (opl.sign == ops.sign)
        sum = {1'b0, mb} + {1'b0, ms};
      else
        sum = {1'b0, mb} - {1'b0, ms} - {50'd0, sticky};
      if (sum == '0 && !sticky) begin
        y_dn = FP_ZERO; y_up = FP_ZERO;
      end else begin
        lz = 0;
        for (int i = 50; i >= 0; i--) begin
          if (sum[i]) break;
          lz++;
        end
        norm = sum << lz;
        e    = int'(opl.exp) + 1 - lz;
        y_dn = fp_round(opl.sign, e, norm[50:3], sticky | (|norm[2:0]), 1'b0);
        y_up = fp_round(opl.sign, e, norm[50:3], sticky | (|norm[2:0]), 1'b1);
      end
    end
  end

endmodule
