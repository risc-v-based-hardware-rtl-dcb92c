// tb_fp31_cos: self-checking testbench of fp31_cos. Random bounds with
// |a| < 64 are applied in both modes; the pair (y_dn, y_up) must enclose
// $cos or $sin computed in double precision and be at most 2^-40 wide
// (absolute) or two units in the last place apart. Directed cases cover
// zero, tiny arguments, infinity and the large-argument fallback.
// Combinational; each vector is held for 1 time unit.
module tb_fp31_cos;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  fp31_t a, y_dn, y_up;
  logic  sine;
  int checks = 0, failures = 0;

  fp31_cos dut (.a(a), .sine(sine), .y_dn(y_dn), .y_up(y_up));

  task automatic check_pair(real ref_v, string what);
    checks++;
    if (!(f2r(y_dn) <= ref_v && ref_v <= f2r(y_up)) ||
        !((key(y_up) - key(y_dn) <= 2) || (f2r(y_up) - f2r(y_dn) <= 2.0 ** -40))) begin
      failures++;
      $display("FAIL %s sine=%0d: a=%h (%g) dn=%g up=%g ref=%g", what, sine, a, f2r(a),
               f2r(y_dn), f2r(y_up), ref_v);
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
    real ra;
    for (int i = 0; i < 3000; i++) begin
      a = rnd_fp(BIAS - 16, BIAS + 5);
      ra = f2r(a);
      sine = 1'b0; #1; check_pair($cos(ra), "random");
      sine = 1'b1; #1; check_pair($sin(ra), "random");
    end
    a = FP_ZERO; sine = 1'b0; #1;
    checks++;
    if (y_dn !== FP_ONE || y_up !== FP_ONE) begin failures++; $display("FAIL cos 0"); end
    sine = 1'b1; #1;
    checks++;
    if (y_dn !== FP_ZERO || y_up !== FP_ZERO) begin failures++; $display("FAIL sin 0"); end
    a = FP_POS_INF; #1;
    checks++;
    if (y_dn !== FP_M_ONE || y_up !== FP_ONE) begin failures++; $display("FAIL sin inf"); end
    a = r2f(1000.0); sine = 1'b0; #1;
    checks++;
    if (y_dn !== FP_M_ONE || y_up !== FP_ONE) begin failures++; $display("FAIL cos 1000"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
