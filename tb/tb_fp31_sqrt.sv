// tb_fp31_sqrt: self-checking testbench of fp31_sqrt. For random positive
// bounds the two directed roundings must satisfy dn^2 <= a <= up^2 (squares
// computed exactly in double precision) and be adjacent bounds, or equal when
// the root is exact. Directed cases cover zero, infinity, perfect squares and
// odd and even exponents. Combinational; each vector is held for 1 time unit.
module tb_fp31_sqrt;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  fp31_t a, y_dn, y_up;
  int checks = 0, failures = 0;

  fp31_sqrt dut (.a(a), .y_dn(y_dn), .y_up(y_up));

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
    real ra, d, u;
    for (int i = 0; i < 4000; i++) begin
      a = rnd_fp(1, 126);
      a.sign = 1'b0;
      #1;
      ra = f2r(a); d = f2r(y_dn); u = f2r(y_up);
      checks++;
      if (!(d * d <= ra && ra <= u * u) ||
          !((d * d == ra) ? (y_up == y_dn) : (key(y_up) - key(y_dn) == 1))) begin
        failures++;
        $display("FAIL random: a=%h dn=%h up=%h", a, y_dn, y_up);
      end
    end
    a = r2f(9.0); #1; expect_pair(r2f(3.0), r2f(3.0), "9");
    a = r2f(0.25); #1; expect_pair(r2f(0.5), r2f(0.5), "0.25");
    a = r2f(2.25); #1; expect_pair(r2f(1.5), r2f(1.5), "2.25");
    a = FP_ZERO; #1; expect_pair(FP_ZERO, FP_ZERO, "0");
    a = FP_POS_INF; #1; expect_pair(FP_POS_INF, FP_POS_INF, "inf");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
