// ctc_addsub: forward and backward contractors of addition and subtraction.
//
// Operands follow the register roles of the instruction set: a = rs1,
// b = rs2, c = rs3. With sub = 0:
//   CTC_FW : r = a + b
//   CTC_BW1: r = a /\ (c - b)      (contracts x of z = x + y)
//   CTC_BW2: r = b /\ (c - a)      (contracts y)
// and with sub = 1 (z = x - y):
//   CTC_FW : r = a - b
//   CTC_BW1: r = a /\ (c + b)
//   CTC_BW2: r = b /\ (a - c)
// The intersection with the pre-propagation operand inside the backward
// contractor, and the three-register form, follow the document; the
// subtraction variants apply the same rule. One interval adder (two fp31_add
// instances) is shared by all six operations: its second operand is negated
// where needed. Forward results carry the OR of the operands' iota flags;
// backward results keep the flag of the contracted operand. Combinational.
module ctc_addsub
  import xinterval_pkg::*;
(
  input  logic      sub,
  input  ctc_mode_e mode,
  input  itv_t      a,
  input  itv_t      b,
  input  itv_t      c,
  output itv_t      r
);

  itv_t  p, q, s, keep;
  fp31_t lo_dn, lo_up, hi_dn, hi_up;

  always_comb begin
    keep = a;
    unique case (mode)
      CTC_BW1: begin
        p = c;
        q = sub ? b : itv_neg(b);
        keep = a;
      end
      CTC_BW2: begin
        p = sub ? a : c;
        q = sub ? itv_neg(c) : itv_neg(a);
        keep = b;
      end
      default: begin
        p = a;
        q = sub ? itv_neg(b) : b;
      end
    endcase
  end

  fp31_add u_add_lo (.a(p.lo), .b(q.lo), .y_dn(lo_dn), .y_up(lo_up));
  fp31_add u_add_hi (.a(p.hi), .b(q.hi), .y_dn(hi_dn), .y_up(hi_up));

  always_comb begin
    s.empty = p.empty | q.empty;
    s.iota  = p.iota | q.iota;
    s.lo    = lo_dn;
    s.hi    = hi_up;
    if (mode == CTC_FW) begin
      r = s;
      if (r.empty) r = ITV_EMPTY;
    end else begin
      r = itv_meet(keep, s);
    end
  end

endmodule
