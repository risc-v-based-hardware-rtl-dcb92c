// tb_ctc_addsub: self-checking testbench of ctc_addsub. Random intervals with
// short significands make every sum exact in double precision, so the
// reference for each of the six operations (forward, backward 1 and 2 of
// + and -) is computed with reals and the intersection done on reals. The
// empty flag, the enclosure and the iota rules are checked. Combinational;
// each vector is held for 1 time unit.
module tb_ctc_addsub;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  logic      sub;
  ctc_mode_e mode;
  itv_t      a, b, c, r;
  int checks = 0, failures = 0;

  ctc_addsub dut (.sub(sub), .mode(mode), .a(a), .b(b), .c(c), .r(r));

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
      $display("FAIL %s sub=%0d mode=%0d: a=%h b=%h c=%h r=%h ref=%0d [%g,%g]",
               what, sub, mode, a, b, c, r, ref_empty, lo, hi);
    end
  endtask

  initial begin
    real al, ah, bl, bh, cl, ch, sl, sh, kl, kh, lo, hi;
    for (int i = 0; i < 3000; i++) begin
      a = mk(rnd_real(), rnd_real());
      b = mk(rnd_real(), rnd_real());
      c = mk(rnd_real(), rnd_real());
      al = rlo(a); ah = rhi(a); bl = rlo(b); bh = rhi(b); cl = rlo(c); ch = rhi(c);
      for (int s = 0; s < 2; s++) begin
        for (int m = 0; m < 3; m++) begin
          sub = 1'(s);
          mode = ctc_mode_e'(m);
          #1;
          if (m == 0) begin
            if (s == 0) begin lo = al + bl; hi = ah + bh; end
            else        begin lo = al - bh; hi = ah - bl; end
            check(0, lo, hi, "fw");
          end else begin
            if (s == 0 && m == 1) begin sl = cl - bh; sh = ch - bl; kl = al; kh = ah; end
            if (s == 0 && m == 2) begin sl = cl - ah; sh = ch - al; kl = bl; kh = bh; end
            if (s == 1 && m == 1) begin sl = cl + bl; sh = ch + bh; kl = al; kh = ah; end
            if (s == 1 && m == 2) begin sl = al - ch; sh = ah - cl; kl = bl; kh = bh; end
            lo = rmax(kl, sl); hi = rmin(kh, sh);
            check(lo > hi, lo, hi, "bw");
          end
        end
      end
    end
    // flags: iota propagates forward, the contracted operand's flag is kept
    a = mk(1.0, 2.0, 1); b = mk(3.0, 4.0); c = mk(0.0, 100.0);
    sub = 1'b0; mode = CTC_FW; #1;
    checks++; if (!r.iota || r.empty) begin failures++; $display("FAIL iota fw"); end
    mode = CTC_BW2; #1;
    checks++; if (r.iota) begin failures++; $display("FAIL iota bw2"); end
    a.empty = 1'b1; mode = CTC_FW; #1;
    checks++; if (!r.empty) begin failures++; $display("FAIL empty propagation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
