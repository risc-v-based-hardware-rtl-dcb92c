// tb_ctc_log: self-checking testbench of ctc_log. Forward: log of the part of
// a random interval at or above zero against $ln, log(0) = -infinity, with
// the iota flag expected exactly when the interval reaches below zero and
// the empty set (flagged iota) for an interval wholly below zero. Backward:
// x /\ [exp(lo(y)), exp(hi(y))] against $exp and, for a y flagged iota, the
// hull with the part of x below zero. Bounds may be wider than the reference
// by a relative 2^-20 plus an absolute 2^-40. Combinational.
module tb_ctc_log;
  import tb_fp31_pkg::*;
  import xinterval_pkg::*;

  localparam real ABS_TOL = 2.0 ** -40;

  logic fw;
  itv_t a, b, r;
  int checks = 0, failures = 0;
  int n_iota_fw = 0, n_keep = 0;

  ctc_log dut (.fw(fw), .a(a), .b(b), .r(r));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real al, ah, bl, bh, lo, hi, nl, nh;
    bit  ce, ne, re, ok, bi;
    for (int i = 0; i < 4000; i++) begin
      a  = mk(rnd_real(), rnd_real());
      bi = 1'($urandom % 2);
      b  = mk(rnd_real(), rnd_real(), bi);
      al = rlo(a); ah = rhi(a); bl = rlo(b); bh = rhi(b);
      fw = 1'b1; #1;
      checks++;
      if (ah < 0.0) ok = r.empty && r.iota;
      else ok = check_itv_tol(r, 0, (al > 0.0) ? $ln(al) : -INF,
                              (ah > 0.0) ? $ln(ah) : -INF, ABS_TOL)
                && (r.iota == (al < 0.0));
      if (al < 0.0) n_iota_fw++;
      if (!ok) begin failures++; $display("FAIL fw a=%h r=%h", a, r); end
      fw = 1'b0; #1;
      lo = rmax(al, $exp(bl)); hi = rmin(ah, $exp(bh)); ce = lo > hi;
      nl = al; nh = rmin(ah, 0.0); ne = !bi || nl > nh;
      if (bi && !ne) n_keep++;
      re = ce && ne;
      if (ce && !ne) begin lo = nl; hi = nh; end
      else if (!ce && !ne) begin lo = rmin(lo, nl); hi = rmax(hi, nh); end
      checks++;
      ok = check_itv_tol(r, re, lo, hi, ABS_TOL) && (r.empty || r.iota == (al < 0.0));
      if (!ok) begin
        failures++;
        $display("FAIL bw a=%h b=%h r=%h ref=%0d [%g,%g]", a, b, r, re, lo, hi);
      end
    end
    // Directed: log [0, 1] = [-inf, 0]; log [-2, -1] is empty and flagged.
    a = mk(0.0, 1.0); fw = 1'b1; #1;
    checks++;
    if (r !== {2'b00, FP_NEG_INF, FP_ZERO}) begin
      failures++; $display("FAIL log [0,1] r=%h", r);
    end
    a = mk(-2.0, -1.0); #1;
    checks++;
    if (!(r.empty && r.iota)) begin failures++; $display("FAIL log [-2,-1] r=%h", r); end
    checks++;
    if (n_iota_fw == 0 || n_keep == 0) begin
      failures++; $display("FAIL iota cases not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
