// tb_ctc_sqr: self-checking testbench of ctc_sqr. Forward: the reference
// square of a random interval is formed with reals (exact). Backward: half of
// the vectors use a y whose bounds are exact squares, so the reference
// hull((x /\ sqrt(y)), (x /\ -sqrt(y))) is exact and checked tightly; the
// other half use random y and are checked for enclosure only. Combinational.
module tb_ctc_sqr;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  logic fw;
  itv_t a, b, r;
  int checks = 0, failures = 0;

  ctc_sqr dut (.fw(fw), .a(a), .b(b), .r(r));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real al, ah, bl, bh, sl, sh, pl, ph, nl, nh, lo, hi, u, v;
    bit  pe, ne, re, exact, ok;
    for (int i = 0; i < 4000; i++) begin
      a = mk(rnd_real(), rnd_real());
      exact = (i % 2) == 0;
      if (exact) begin
        u = rnd_real(); v = rnd_real();
        b = mk(u * u * (($urandom % 8 == 0) ? -1.0 : 1.0), v * v);
      end else begin
        b = mk(rnd_real(), rnd_real());
      end
      al = rlo(a); ah = rhi(a); bl = rlo(b); bh = rhi(b);
      fw = 1'b1; #1;
      if (al >= 0.0)      begin lo = al * al; hi = ah * ah; end
      else if (ah <= 0.0) begin lo = ah * ah; hi = al * al; end
      else                begin lo = 0.0; hi = rmax(al * al, ah * ah); end
      checks++;
      if (!check_itv(r, 0, lo, hi)) begin
        failures++; $display("FAIL fw a=%h r=%h", a, r);
      end
      fw = 1'b0; #1;
      if (bh < 0.0) begin
        re = 1;
      end else begin
        sl = $sqrt(rmax(bl, 0.0)); sh = $sqrt(bh);
        pl = rmax(al, sl);  ph = rmin(ah, sh);  pe = pl > ph;
        nl = rmax(al, -sh); nh = rmin(ah, -sl); ne = nl > nh;
        re = pe && ne;
        lo = pe ? nl : (ne ? pl : rmin(pl, nl));
        hi = pe ? nh : (ne ? ph : rmax(ph, nh));
      end
      checks++;
      if (exact) ok = re ? r.empty : check_itv(r, 0, lo, hi);
      else       ok = re || (!r.empty && rlo(r) <= lo && hi <= rhi(r));
      if (!ok) begin
        failures++;
        $display("FAIL bw a=%h b=%h r=%h ref=%0d [%g,%g]", a, b, r, re, lo, hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
