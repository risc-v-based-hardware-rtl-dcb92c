// tb_ctc_exp: self-checking testbench of ctc_exp. Forward: [exp(lo), exp(hi)]
// of random intervals against $exp in double precision, with overflow to
// infinity and underflow to zero accepted. Backward: x /\ log(y /\ [0, +inf])
// against $ln, log(0) taken as -infinity. Bounds may be wider than the
// reference by a relative 2^-20 plus an absolute 2^-40; nothing narrower is
// accepted. Combinational; each vector is held for 1 time unit.
module tb_ctc_exp;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  localparam real ABS_TOL = 2.0 ** -40;

  logic fw;
  itv_t a, b, r;
  int checks = 0, failures = 0;
  int n_bw_empty = 0, n_bw_zero = 0;

  ctc_exp dut (.fw(fw), .a(a), .b(b), .r(r));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real al, ah, bl, bh, lo, hi;
    bit  re, ok, ai;
    for (int i = 0; i < 4000; i++) begin
      ai = 1'($urandom % 2);
      a  = mk(rnd_real(), rnd_real(), ai);
      b  = mk(rnd_real(), rnd_real());
      al = rlo(a); ah = rhi(a); bl = rlo(b); bh = rhi(b);
      fw = 1'b1; #1;
      checks++;
      ok = check_itv_tol(r, 0, $exp(al), $exp(ah), ABS_TOL) && r.iota == ai;
      if (!ok) begin failures++; $display("FAIL fw a=%h r=%h", a, r); end
      fw = 1'b0; #1;
      if (bh < 0.0) begin
        re = 1; lo = 0.0; hi = 0.0;
      end else begin
        if (bl <= 0.0) begin lo = al; n_bw_zero++; end
        else lo = rmax(al, $ln(bl));
        hi = rmin(ah, $ln(bh));
        re = lo > hi;
      end
      if (re) n_bw_empty++;
      checks++;
      ok = check_itv_tol(r, re, lo, hi, ABS_TOL) && (r.empty || r.iota == ai);
      if (!ok) begin
        failures++;
        $display("FAIL bw a=%h b=%h r=%h ref=%0d [%g,%g]", a, b, r, re, lo, hi);
      end
    end
    // Directed: exp of [-inf, 0] is [0, 1]; backward through [0, +inf] keeps x.
    a = ITV_ENTIRE; a.hi = FP_ZERO; fw = 1'b1; #1;
    checks++;
    if (r !== {2'b00, FP_ZERO, 31'(r2f(1.0))}) begin
      failures++; $display("FAIL exp [-inf,0] r=%h", r);
    end
    a = mk(-3.0, 5.0); b = ITV_NONNEG; fw = 1'b0; #1;
    checks++;
    if (r !== a) begin failures++; $display("FAIL bw through [0,inf] r=%h", r); end
    a = ITV_EMPTY; fw = 1'b1; #1;
    checks++;
    if (!r.empty) begin failures++; $display("FAIL exp of empty r=%h", r); end
    checks++;
    if (n_bw_empty == 0 || n_bw_zero == 0) begin
      failures++; $display("FAIL backward cases not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
