// xinterval_unit: interval execution unit. Given a decoded operation and the
// three source intervals it computes the destination interval.
//
// Combinational. Every supported primitive has its own contractor block
// (ctc_addsub for + and -, ctc_mul, ctc_div, ctc_sqr, ctc_sqrt, ctc_exp,
// ctc_log, ctc_trig); all of them
// see the operands and the operation selects which result is used. Operand
// roles are those of the instruction set: a = rs1, b = rs2, c = rs3.
// Supported operations: forward contractors of +, -, *, /, x^2, sqrt, exp,
// log, cos and sin, the two backward contractors of +, -, * and /, and the
// backward contractors of x^2, sqrt, exp and log. Unknown operations give the
// empty interval.
// The set of primitives follows the document; sharing the operand buses
// between them, with no arithmetic shared across primitives, is this
// design's choice.
module xinterval_unit
  import xinterval_pkg::*;
(
  input  itv_op_e op,
  input  itv_t    a,
  input  itv_t    b,
  input  itv_t    c,
  output itv_t    r
);

  ctc_mode_e mode;
  logic      is_sub, is_fw1;
  itv_t      r_addsub, r_mul, r_div, r_sqr, r_sqrt, r_exp, r_log, r_trig;

  always_comb begin
    unique case (op)
      OP_ADD_BW1, OP_SUB_BW1, OP_MUL_BW1, OP_DIV_BW1: mode = CTC_BW1;
      OP_ADD_BW2, OP_SUB_BW2, OP_MUL_BW2, OP_DIV_BW2: mode = CTC_BW2;
      default:                                        mode = CTC_FW;
    endcase
    is_sub = op inside {OP_SUB_FW, OP_SUB_BW1, OP_SUB_BW2};
    is_fw1 = op inside {OP_SQR_FW, OP_SQRT_FW, OP_EXP_FW, OP_LOG_FW};
  end

  ctc_addsub u_addsub (.sub(is_sub), .mode(mode), .a(a), .b(b), .c(c), .r(r_addsub));
  ctc_mul    u_mul    (.mode(mode), .a(a), .b(b), .c(c), .r(r_mul));
  ctc_div    u_div    (.mode(mode), .a(a), .b(b), .c(c), .r(r_div));
  ctc_sqr    u_sqr    (.fw(is_fw1), .a(a), .b(b), .r(r_sqr));
  ctc_sqrt   u_sqrt   (.fw(is_fw1), .a(a), .b(b), .r(r_sqrt));
  ctc_exp    u_exp    (.fw(is_fw1), .a(a), .b(b), .r(r_exp));
  ctc_log    u_log    (.fw(is_fw1), .a(a), .b(b), .r(r_log));
  ctc_trig   u_trig   (.sine(op == OP_SIN_FW), .a(a), .r(r_trig));

  always_comb begin
    unique case (op)
      OP_ADD_FW, OP_ADD_BW1, OP_ADD_BW2,
      OP_SUB_FW, OP_SUB_BW1, OP_SUB_BW2: r = r_addsub;
      OP_MUL_FW, OP_MUL_BW1, OP_MUL_BW2: r = r_mul;
      OP_DIV_FW, OP_DIV_BW1, OP_DIV_BW2: r = r_div;
      OP_SQR_FW, OP_SQR_BW:              r = r_sqr;
      OP_SQRT_FW, OP_SQRT_BW:            r = r_sqrt;
      OP_EXP_FW, OP_EXP_BW:              r = r_exp;
      OP_LOG_FW, OP_LOG_BW:              r = r_log;
      OP_COS_FW, OP_SIN_FW:              r = r_trig;
      default:                           r = ITV_EMPTY;
    endcase
  end

endmodule
