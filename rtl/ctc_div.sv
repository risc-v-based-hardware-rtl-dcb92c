// ctc_div: forward and backward contractors of division (z = x / y).
//
// Operand roles: a = rs1 (x), b = rs2 (y), c = rs3 (z).
//   CTC_FW : r = a / b; a divisor equal to [0, 0] gives the empty set and any
//            other divisor containing zero gives [-inf, +inf]
//   CTC_BW1: r = a /\ (c * b)
//   CTC_BW2: r = b /\ (a / c); uncontracted b when c contains zero
// Empty inputs give an empty result. Combinational; built from one itv_div
// and one itv_mul.
module ctc_div
  import xinterval_pkg::*;
(
  input  ctc_mode_e mode,
  input  itv_t      a,
  input  itv_t      b,
  input  itv_t      c,
  output itv_t      r
);

  itv_t quot, prod, dvs;

  assign dvs = (mode == CTC_BW2) ? c : b;
  itv_div u_div (.x(a), .y(dvs), .r(quot));
  itv_mul u_mul (.x(c), .y(b), .r(prod));

  always_comb begin
    r = ITV_EMPTY;
    unique case (mode)
      CTC_BW1: r = itv_meet(a, prod);
      CTC_BW2: begin
        if (a.empty || b.empty || c.empty) r = ITV_EMPTY;
        else if (itv_has_zero(c))          r = b;
        else                               r = itv_meet(b, quot);
      end
      default: begin
        if (a.empty || b.empty) begin
          r = ITV_EMPTY;
        end else if (fp_is_zero(b.lo) && fp_is_zero(b.hi)) begin
          r = ITV_EMPTY;
        end else if (itv_has_zero(b)) begin
          r = ITV_ENTIRE;
          r.iota = a.iota | b.iota;
        end else begin
          r = quot;
        end
      end
    endcase
  end

endmodule
