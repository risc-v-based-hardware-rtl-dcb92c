// tb_ctc_trig: self-checking testbench of ctc_trig. Random intervals, wide
// ones and narrow ones (width up to 1/8), are run in both modes. The
// reference is the hull of $cos/$sin at both ends, widened to 1 or -1 when
// an integer multiple of pi (cos) or pi/2 plus a multiple of pi (sin) that
// is a maximum or minimum lies inside, all computed with reals. Bounds may be
// wider than the reference by 2^-40 absolute; the iota flag of the operand
// must be kept. Intervals beyond |x| >= 64 must give [-1, 1]. Combinational.
module tb_ctc_trig;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic sine;
  itv_t a, r;
  int checks = 0, failures = 0;
  int n_max = 0, n_min = 0, n_mono = 0;

  ctc_trig dut (.sine(sine), .a(a), .r(r));

  function automatic real f(real x, bit s);
    return s ? $sin(x) : $cos(x);
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real al, ah, lo, hi, off, x;
    int  nl, nh;
    bit  ai, hmax, hmin;
    for (int i = 0; i < 4000; i++) begin
      ai = 1'($urandom % 2);
      if (i % 2 == 0) a = mk(rnd_real(), rnd_real(), ai);
      else begin
        x = rnd_real();
        a = mk(x, x + real'($urandom % 1024) / 8192.0, ai);
      end
      for (int s = 0; s < 2; s++) begin
        sine = 1'(s); #1;
        al = rlo(a); ah = rhi(a);
        off = s ? 0.5 : 0.0;
        nl = int'($ceil(al / PI - off));
        nh = int'($floor(ah / PI - off));
        hmax = (nh > nl) || (nh == nl && (nl % 2 == 0));
        hmin = (nh > nl) || (nh == nl && (nl % 2 != 0));
        lo = hmin ? -1.0 : rmin(f(al, s), f(ah, s));
        hi = hmax ?  1.0 : rmax(f(al, s), f(ah, s));
        if (hmax) n_max++;
        if (hmin) n_min++;
        if (!hmax && !hmin) n_mono++;
        checks++;
        if (!check_itv_tol(r, 0, lo, hi, 2.0 ** -40) || r.iota != ai) begin
          failures++;
          $display("FAIL sine=%0d a=[%g,%g] r=[%g,%g] ref=[%g,%g]", s, al, ah, rlo(r), rhi(r), lo, hi);
        end
      end
    end
    a = mk(10.0, 100.0); sine = 1'b0; #1;
    checks++;
    if (r !== {2'b00, FP_M_ONE, FP_ONE}) begin failures++; $display("FAIL large interval r=%h", r); end
    a = ITV_EMPTY; #1;
    checks++;
    if (!r.empty) begin failures++; $display("FAIL empty operand r=%h", r); end
    checks++;
    if (n_max == 0 || n_min == 0 || n_mono == 0) begin
      failures++; $display("FAIL extremum cases not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
