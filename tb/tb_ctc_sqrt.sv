// tb_ctc_sqrt: self-checking testbench of ctc_sqrt. Forward: sqrt of the
// part of a random interval at or above zero, checked against $sqrt, with
// the iota flag expected exactly when the interval reaches below zero and
// the empty set (flagged iota) for an interval wholly below zero. Backward:
// x /\ [lo(y+)^2, hi(y+)^2], exact in double precision, and, for a y flagged
// iota, the hull with the part of x below zero. Combinational.
module tb_ctc_sqrt;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  logic fw;
  itv_t a, b, r;
  int checks = 0, failures = 0;
  int n_iota_fw = 0, n_keep = 0;

  ctc_sqrt dut (.fw(fw), .a(a), .b(b), .r(r));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real al, ah, bl, bh, cl, ch, lo, hi, nl, nh;
    bit  ce, ne, re, ok, bi;
    for (int i = 0; i < 4000; i++) begin
      a  = mk(rnd_real(), rnd_real());
      bi = 1'($urandom % 2);
      b  = mk(rnd_real(), rnd_real(), bi);
      al = rlo(a); ah = rhi(a); bl = rlo(b); bh = rhi(b);
      fw = 1'b1; #1;
      checks++;
      if (ah < 0.0) ok = r.empty && r.iota;
      else ok = check_itv(r, 0, $sqrt(rmax(al, 0.0)), $sqrt(ah)) && (r.iota == (al < 0.0));
      if (al < 0.0) n_iota_fw++;
      if (!ok) begin failures++; $display("FAIL fw a=%h r=%h", a, r); end
      fw = 1'b0; #1;
      if (bh < 0.0) begin
        lo = al; hi = rmin(ah, 0.0);
        re = !bi || lo > hi;
      end else begin
        cl = rmax(bl, 0.0); cl = cl * cl; ch = bh * bh;
        lo = rmax(al, cl); hi = rmin(ah, ch); ce = lo > hi;
        nl = al; nh = rmin(ah, 0.0); ne = !bi || nl > nh;
        if (bi && !ne) n_keep++;
        re = ce && ne;
        if (ce && !ne) begin lo = nl; hi = nh; end
        else if (!ce && !ne) begin lo = rmin(lo, nl); hi = rmax(hi, nh); end
      end
      checks++;
      ok = re ? r.empty : (check_itv(r, 0, lo, hi) && r.iota == (al < 0.0));
      if (!ok) begin
        failures++;
        $display("FAIL bw a=%h b=%h r=%h ref=%0d [%g,%g]", a, b, r, re, lo, hi);
      end
    end
    checks++;
    if (n_iota_fw == 0 || n_keep == 0) begin
      failures++; $display("FAIL iota cases not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
