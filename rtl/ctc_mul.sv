// ctc_mul: forward and backward contractors of multiplication (z = x * y).
//
// Operand roles: a = rs1 (x), b = rs2 (y), c = rs3 (z).
//   CTC_FW : r = a * b
//   CTC_BW1: r = a /\ (c / b)
//   CTC_BW2: r = b /\ (c / a)
// When the divisor contains zero the quotient is not formed and the operand
// is returned uncontracted (still a valid contractor, though not always the
// tightest one). Empty inputs give an empty result. Combinational; built from
// one itv_mul and one itv_div.
module ctc_mul
  import xinterval_pkg::*;
(
  input  ctc_mode_e mode,
  input  itv_t      a,
  input  itv_t      b,
  input  itv_t      c,
  output itv_t      r
);

  itv_t prod, quot, dvs, keep;

  itv_mul u_mul (.x(a), .y(b), .r(prod));
  assign dvs  = (mode == CTC_BW2) ? a : b;
  assign keep = (mode == CTC_BW2) ? b : a;
  itv_div u_div (.x(c), .y(dvs), .r(quot));

  always_comb begin
    if (mode == CTC_FW) begin
      r = prod;
      if (r.empty) r = ITV_EMPTY;
    end else if (keep.empty || dvs.empty || c.empty) begin
      r = ITV_EMPTY;
    end else if (itv_has_zero(dvs)) begin
      r = keep;
    end else begin
      r = itv_meet(keep, quot);
    end
  end

endmodule
