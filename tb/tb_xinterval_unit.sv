// tb_xinterval_unit: self-checking testbench of xinterval_unit. Fixed
// operands x = [1, 4], y = [3, 5], z = [4.5, 6] are run through every
// operation and compared with results worked out by hand (exact ones) or
// with reals (division, square root, exp, log, cos and sin); OP_NONE must give the empty set.
// A second pass swaps the operands to catch rs1/rs2 mix-ups. Combinational.
module tb_xinterval_unit;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  itv_op_e op;
  itv_t    a, b, c, r;
  int checks = 0, failures = 0;

  xinterval_unit dut (.op(op), .a(a), .b(b), .c(c), .r(r));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(itv_op_e o, bit e, real lo, real hi);
    op = o;
    #1;
    checks++;
    if (!check_itv(r, e, lo, hi)) begin
      failures++;
      $display("FAIL %s: r=%h (%g, %g) expected %0d [%g, %g]", o.name(), r, rlo(r), rhi(r), e, lo, hi);
    end
  endtask

  initial begin
    a = mk(1.0, 4.0); b = mk(3.0, 5.0); c = mk(4.5, 6.0);
    t(OP_ADD_FW,  0, 4.0, 9.0);
    t(OP_ADD_BW1, 0, 1.0, 3.0);
    t(OP_ADD_BW2, 0, 3.0, 5.0);
    t(OP_SUB_FW,  0, -4.0, 1.0);
    t(OP_SUB_BW1, 1, 0.0, 0.0);
    t(OP_SUB_BW2, 1, 0.0, 0.0);
    t(OP_MUL_FW,  0, 3.0, 20.0);
    t(OP_MUL_BW1, 0, 1.0, 2.0);
    t(OP_MUL_BW2, 0, 3.0, 5.0);
    t(OP_DIV_FW,  0, 0.2, 4.0 / 3.0);
    t(OP_DIV_BW1, 1, 0.0, 0.0);
    t(OP_DIV_BW2, 1, 0.0, 0.0);
    t(OP_SQR_FW,  0, 1.0, 16.0);
    t(OP_SQR_BW,  0, $sqrt(3.0), $sqrt(5.0));
    t(OP_SQRT_FW, 0, 1.0, 2.0);
    t(OP_SQRT_BW, 1, 0.0, 0.0);
    t(OP_EXP_FW,  0, $exp(1.0), $exp(4.0));
    t(OP_EXP_BW,  0, $ln(3.0), $ln(5.0));
    t(OP_LOG_FW,  0, 0.0, $ln(4.0));
    t(OP_LOG_BW,  1, 0.0, 0.0);
    t(OP_COS_FW,  0, -1.0, $cos(1.0));
    t(OP_SIN_FW,  0, $sin(4.0), 1.0);
    t(OP_NONE,    1, 0.0, 0.0);
    // swapped roles: x = [3, 5], y = [1, 4], z = [0, 7]
    a = mk(3.0, 5.0); b = mk(1.0, 4.0); c = mk(0.0, 7.0);
    t(OP_ADD_BW1, 0, 3.0, 5.0);
    t(OP_ADD_BW2, 0, 1.0, 4.0);
    t(OP_SUB_BW1, 0, 3.0, 5.0);
    t(OP_SUB_BW2, 0, 1.0, 4.0);
    t(OP_SUB_FW,  0, -1.0, 4.0);
    t(OP_MUL_BW1, 0, 3.0, 5.0);
    t(OP_MUL_BW2, 0, 1.0, 7.0 / 3.0);
    t(OP_DIV_FW,  0, 0.75, 5.0);
    t(OP_DIV_BW1, 0, 3.0, 5.0);
    t(OP_DIV_BW2, 0, 1.0, 4.0);
    t(OP_SQR_BW,  1, 0.0, 0.0);
    t(OP_SQRT_BW, 0, 3.0, 5.0);
    t(OP_EXP_BW,  1, 0.0, 0.0);
    t(OP_LOG_BW,  0, 3.0, 5.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
