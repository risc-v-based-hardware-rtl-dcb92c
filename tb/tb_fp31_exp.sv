// tb_fp31_exp: self-checking testbench of fp31_exp. Random bounds are applied
// and the pair (y_dn, y_up) must enclose the value of $exp computed in
// double precision and be at most two units in the last place apart. Directed cases cover the exact and
// special values. Combinational; each vector is held for 1 time unit.
module tb_fp31_exp;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  fp31_t a, y_dn, y_up;
  int checks = 0, failures = 0;

  fp31_exp dut (.a(a), .y_dn(y_dn), .y_up(y_up));

  task automatic expect_pair(logic [30:0] dn, logic [30:0] up, string what);
    checks++;
    if (y_dn !== dn || y_up !== up) begin
      failures++;
      $display("FAIL %s: a=%h dn=%h up=%h expected %h %h", what, a, y_dn, y_up, dn, up);
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
    real ra, r;
    for (int i = 0; i < 4000; i++) begin
      a = rnd_fp(40, 67);
      #1;
      ra = f2r(a); r = $exp(ra);
      checks++;
      if (!(f2r(y_dn) <= r && r <= f2r(y_up)) || !(key(y_up) - key(y_dn) <= 2)) begin
        failures++;
        $display("FAIL random: a=%h (%g) dn=%h (%g) up=%h (%g) ref=%g", a, ra, y_dn, f2r(y_dn), y_up, f2r(y_up), r);
      end
    end
    a = FP_ZERO; #1; expect_pair(r2f(1.0), r2f(1.0), "exp 0");
    a = FP_NEG_INF; #1; expect_pair(FP_ZERO, FP_ZERO, "exp -inf");
    a = FP_POS_INF; #1; expect_pair(FP_POS_INF, FP_POS_INF, "exp inf");
    a = r2f(200.0); #1; expect_pair(FP_MAX, FP_POS_INF, "exp overflow");
    a = r2f(-200.0); #1; expect_pair(FP_ZERO, FP_MIN_NRM, "exp underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
