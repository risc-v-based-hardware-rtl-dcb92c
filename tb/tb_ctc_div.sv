// tb_ctc_div: self-checking testbench of ctc_div. Random intervals with
// reference quotients and products formed with reals from the four endpoint
// combinations. A divisor containing zero must give [-inf, +inf] forward
// ([0, 0] gives the empty set) and no contraction backward. Combinational.
module tb_ctc_div;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  ctc_mode_e mode;
  itv_t      a, b, c, r;
  int checks = 0, failures = 0;

  ctc_div dut (.mode(mode), .a(a), .b(b), .c(c), .r(r));

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
    real al, ah, bl, bh, cl, ch, ql, qh, lo, hi;
    for (int i = 0; i < 3000; i++) begin
      a = mk(rnd_real(), rnd_real());
      b = mk(rnd_real(), rnd_real());
      c = mk(rnd_real(), rnd_real());
      al = rlo(a); ah = rhi(a); bl = rlo(b); bh = rhi(b); cl = rlo(c); ch = rhi(c);
      mode = CTC_FW; #1;
      if (bl == 0.0 && bh == 0.0) check(1, 0.0, 0.0, "fw by [0,0]");
      else if (bl <= 0.0 && bh >= 0.0) check(0, -INF, INF, "fw by zero");
      else begin
        lo = rmin(rmin(al / bl, al / bh), rmin(ah / bl, ah / bh));
        hi = rmax(rmax(al / bl, al / bh), rmax(ah / bl, ah / bh));
        check(0, lo, hi, "fw");
      end
      mode = CTC_BW1; #1;
      ql = rmin(rmin(cl * bl, cl * bh), rmin(ch * bl, ch * bh));
      qh = rmax(rmax(cl * bl, cl * bh), rmax(ch * bl, ch * bh));
      lo = rmax(al, ql); hi = rmin(ah, qh);
      check(lo > hi, lo, hi, "bw1");
      mode = CTC_BW2; #1;
      if (cl <= 0.0 && ch >= 0.0) check(0, bl, bh, "bw2 by zero");
      else begin
        ql = rmin(rmin(al / cl, al / ch), rmin(ah / cl, ah / ch));
        qh = rmax(rmax(al / cl, al / ch), rmax(ah / cl, ah / ch));
        lo = rmax(bl, ql); hi = rmin(bh, qh);
        check(lo > hi, lo, hi, "bw2");
      end
    end
    a = mk(1.0, 2.0); b = mk(0.0, 0.0); mode = CTC_FW; #1;
    check(1, 0.0, 0.0, "directed [0,0]");
    a = mk(1.0, 3.0); b = mk(-4.0, -2.0); #1;
    check(0, -1.5, -0.25, "directed negative");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
