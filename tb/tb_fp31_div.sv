// tb_fp31_div: self-checking testbench of fp31_div. Random finite operands
// are applied and the two directed roundings are compared with the exact
// result computed in double precision: the pair must enclose it and be the
// tightest such pair. Directed cases cover zeros, infinities, overflow and
// underflow. The block is combinational; each vector is held for 1 ns.
module tb_fp31_div;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  fp31_t a, b, y_dn, y_up;
  int checks = 0, failures = 0;

  fp31_div dut (.a(a), .b(b), .y_dn(y_dn), .y_up(y_up));

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
      a = rnd_fp(40, 86);
      b = rnd_fp(40, 86);
      #1;
      ra = f2r(a); rb = f2r(b); r = ra / rb;
      checks++;
      if (!tight(y_dn, y_up, r)) begin
        failures++;
        $display("FAIL random: a=%h b=%h dn=%h up=%h ref=%g", a, b, y_dn, y_up, r);
      end
    end
    a = r2f(3.0); b = r2f(-2.0); #1; expect_pair(r2f(-1.5), r2f(-1.5), "exact");
    a = r2f(1.0); b = r2f(3.0); #1;
    expect_pair(r2f(real'(24'h555555) / 16777216.0 * 2.0 / 2.0), fp31_t'(r2f(real'(24'hAAAAAA) / 33554432.0) + 1), "1/3");
    a = r2f(5.0); b = FP_POS_INF; #1; expect_pair(FP_ZERO, FP_ZERO, "x/inf");
    a = FP_POS_INF; b = r2f(-4.0); #1; expect_pair(FP_NEG_INF, FP_NEG_INF, "inf/x");
    a = FP_MAX; b = r2f(0.5); #1; expect_pair(FP_MAX, FP_POS_INF, "overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
