// tb_ctc_mul: self-checking testbench of ctc_mul. Random intervals; the
// reference products (exact in double precision) and quotients are formed
// with reals from the four endpoint combinations. Backward contractors with
// a divisor containing zero must return the operand unchanged. Checks
// enclosure, tightness to a few ulps and the empty flag. Combinational.
module tb_ctc_mul;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  ctc_mode_e mode;
  itv_t      a, b, c, r;
  int checks = 0, failures = 0;

  ctc_mul dut (.mode(mode), .a(a), .b(b), .c(c), .r(r));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ref_empty, real lo, real hi, string what);
    checks++;
    if (!check_itv(r, ref_empty, lo, hi)) begin
      failures++;
      $display("FAIL %s mode=%0d: a=%h b=%h c=%h r=%h ref=%0d [%g,%g]",
               what, mode, a, b, c, r, ref_empty, lo, hi);
    end
  endtask

  initial begin
    real al, ah, bl, bh, cl, ch, ql, qh, kl, kh, dl, dh, lo, hi;
    int  nz;
    nz = 0;
    for (int i = 0; i < 3000; i++) begin
      a = mk(rnd_real(), rnd_real());
      b = mk(rnd_real(), rnd_real());
      c = mk(rnd_real(), rnd_real());
      al = rlo(a); ah = rhi(a); bl = rlo(b); bh = rhi(b); cl = rlo(c); ch = rhi(c);
      mode = CTC_FW; #1;
      lo = rmin(rmin(al * bl, al * bh), rmin(ah * bl, ah * bh));
      hi = rmax(rmax(al * bl, al * bh), rmax(ah * bl, ah * bh));
      check(0, lo, hi, "fw");
      for (int m = 1; m < 3; m++) begin
        mode = ctc_mode_e'(m); #1;
        if (m == 1) begin dl = bl; dh = bh; kl = al; kh = ah; end
        else        begin dl = al; dh = ah; kl = bl; kh = bh; end
        if (dl <= 0.0 && dh >= 0.0) begin
          nz++;
          check(0, kl, kh, "bw divisor with zero");
        end else begin
          ql = rmin(rmin(cl / dl, cl / dh), rmin(ch / dl, ch / dh));
          qh = rmax(rmax(cl / dl, cl / dh), rmax(ch / dl, ch / dh));
          lo = rmax(kl, ql); hi = rmin(kh, qh);
          check(lo > hi, lo, hi, "bw");
        end
      end
    end
    checks++;
    if (nz == 0) begin failures++; $display("FAIL zero divisor never drawn"); end
    // infinite bounds: [2, inf] * [3, 4] = [6, inf]
    a = {2'b00, r2f(2.0), FP_POS_INF}; b = mk(3.0, 4.0); mode = CTC_FW; #1;
    check(0, 6.0, INF, "inf bound");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
