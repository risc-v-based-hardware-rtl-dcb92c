// tb_fp31_add: self-checking testbench of fp31_add. Random finite operands
// are applied and the two directed roundings are compared with the exact
// result computed in double precision: the pair must enclose it and be the
// tightest such pair. Directed cases cover zeros, infinities, overflow and
// underflow. The block is combinational; each vector is held for 1 ns.
module tb_fp31_add;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  fp31_t a, b, y_dn, y_up;
  int checks = 0, failures = 0;

  fp31_add dut (.a(a), .b(b), .y_dn(y_dn), .y_up(y_up));

  task automatic expect_pair(logic [30:0] dn, logic [30:0] up, string what);
    checks++;
    if (y_dn !== dn || y_up !== up) begin
      failures++;
      $display("FAIL %s: a=%h b=%h dn=%h up=%h expected %h %h", what, a, b, y_dn, y_up, dn, up);
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb, r;
    for (int i = 0; i < 4000; i++) begin
      a = rnd_fp(50, 76);
      b = rnd_fp(50, 76);
      if (i < 200) b = fp31_t'({1'b0, 7'(a.exp - 7'(i % 27)), 23'($urandom)});
      #1;
      ra = f2r(a); rb = f2r(b); r = ra + rb;
      checks++;
      if (!tight(y_dn, y_up, r)) begin
        failures++;
        $display("FAIL random: a=%h b=%h dn=%h up=%h ref=%g", a, b, y_dn, y_up, r);
      end
    end
    a = r2f(1.5); b = r2f(-1.5); #1; expect_pair(r2f(0.0), r2f(0.0), "x-x");
    a = r2f(3.0); b = r2f(0.0); #1; expect_pair(r2f(3.0), r2f(3.0), "x+0");
    a = FP_POS_INF; b = r2f(-5.0); #1; expect_pair(FP_POS_INF, FP_POS_INF, "inf+x");
    a = FP_NEG_INF; b = FP_POS_INF; #1; expect_pair(FP_NEG_INF, FP_POS_INF, "-inf+inf");
    a = FP_MAX; b = FP_MAX; #1; expect_pair(FP_MAX, FP_POS_INF, "overflow");
    a = fp_neg(FP_MAX); b = fp_neg(FP_MAX); #1; expect_pair(FP_NEG_INF, fp_neg(FP_MAX), "neg overflow");
    a = r2f(1.0); b = r2f(2.0 ** -40); #1; expect_pair(r2f(1.0), fp31_t'(r2f(1.0) + 1), "sticky up");
    a = r2f(1.0); b = r2f(-(2.0 ** -40)); #1; expect_pair(fp31_t'(r2f(1.0) - 1), r2f(1.0), "sticky down");
    b = r2f(-(2.0 ** -60)); #1; expect_pair(fp31_t'(r2f(1.0) - 1), r2f(1.0), "far sticky down");
    a = r2f(3.0); b = r2f(-(2.0 ** -55)); #1; expect_pair(fp31_t'(r2f(3.0) - 1), r2f(3.0), "far sticky down 3");
    a = fp31_t'({1'b0, 7'd1, 23'd1}); b = fp31_t'({1'b1, 7'd1, 23'd0}); #1;
    expect_pair(FP_ZERO, FP_MIN_NRM, "underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
