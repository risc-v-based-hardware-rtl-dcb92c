// tb_xinterval_top: end-to-end testbench of xinterval_top, run with the
// top's default parameters. It plays the host core: it loads intervals into
// the register file through the load port, issues interval instruction words
// back to back, one per cycle, and reads registers back through the store
// port.
//
// Workload: localization of a robot from three landmarks by ring
// constraints (x - xa)^2 + (y - ya)^2 in d^2. For each landmark the forward
// contractor (two subtractions and three squares) and the backward
// contractor (backward addition, two backward squares, two backward
// subtractions) run as 12 instructions; the three landmarks are processed
// three times in a row, starting from the box [0, +inf] x [0, +inf].
// Every result is compared with a reference computed with reals from the
// source registers as the testbench has seen them, the result must appear
// one cycle after issue, and the final box must hold the true position and
// be small. Further scenarios: an inconsistent distance (empty box), the
// square root with and without the iota flag, exp followed by log, cos,
// an unimplemented (backward cos) instruction word that must be flagged
// illegal and write nothing, and a paving of [0, 8] x [0, 8] in which the
// testbench bisects boxes and the extension contracts them; the true
// position must end up in a kept box.
// Mechanisms counted (each must happen at least once): dependent
// instructions back to back, infinite bounds, empty results, iota set by
// the forward square root, iota read by the backward square root, illegal
// instructions, loads and stores.
module tb_xinterval_top;
  import tb_fp31_pkg::*;
  import tb_asm_pkg::*;
  import xinterval_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        instr_valid, instr_illegal, ld_valid, res_valid;
  logic [31:0] instr;
  logic [4:0]  ld_addr, st_addr, res_rd;
  logic [63:0] ld_data, st_data;
  itv_t        res_data;

  xinterval_top dut (
    .clk(clk), .rst_n(rst_n), .instr_valid(instr_valid), .instr(instr),
    .instr_illegal(instr_illegal), .ld_valid(ld_valid), .ld_addr(ld_addr),
    .ld_data(ld_data), .st_addr(st_addr), .st_data(st_data),
    .res_valid(res_valid), .res_rd(res_rd), .res_data(res_data));

  always #5 clk = ~clk;

  typedef struct {bit e; bit i; real lo; real hi;} ritv_t;

  logic [63:0] sh [32];        // registers as the testbench expects them
  int checks = 0, failures = 0;
  int n_b2b = 0, n_inf = 0, n_empty = 0, n_iota_fw = 0, n_iota_bw = 0;
  int n_illegal = 0, n_load = 0, n_store = 0, n_instr = 0;
  int last_rd = -1;
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference interval arithmetic on reals ----------------
  function automatic real clampi(real v);
    return v > INF ? INF : (v < -INF ? -INF : v);
  endfunction

  function automatic ritv_t R(logic [63:0] v);
    ritv_t r;
    r.e = v[63]; r.i = v[62]; r.lo = rlo(v); r.hi = rhi(v);
    return r;
  endfunction

  function automatic ritv_t meet(ritv_t a, ritv_t b);
    ritv_t r;
    r.e = a.e || b.e; r.i = a.i;
    r.lo = rmax(a.lo, b.lo); r.hi = rmin(a.hi, b.hi);
    if (r.lo > r.hi) r.e = 1;
    return r;
  endfunction

  function automatic ritv_t hull(ritv_t a, ritv_t b);
    ritv_t r;
    if (a.e) return b;
    if (b.e) return a;
    r.e = 0; r.i = a.i || b.i; r.lo = rmin(a.lo, b.lo); r.hi = rmax(a.hi, b.hi);
    return r;
  endfunction

  function automatic ritv_t addi(ritv_t a, ritv_t b);
    ritv_t r;
    r.e = a.e || b.e; r.i = a.i || b.i;
    r.lo = clampi(a.lo + b.lo); r.hi = clampi(a.hi + b.hi);
    return r;
  endfunction

  function automatic ritv_t negi(ritv_t a);
    ritv_t r = a;
    r.lo = -a.hi; r.hi = -a.lo;
    return r;
  endfunction

  function automatic real sq(real v);
    return rabs(v) >= 1.0e150 ? INF : v * v;
  endfunction

  function automatic real rt(real v);
    return v >= INF ? INF : $sqrt(v);
  endfunction

  function automatic ritv_t sqri(ritv_t a);
    ritv_t r = a;
    if (a.lo >= 0.0)      begin r.lo = sq(a.lo); r.hi = sq(a.hi); end
    else if (a.hi <= 0.0) begin r.lo = sq(a.hi); r.hi = sq(a.lo); end
    else                  begin r.lo = 0.0; r.hi = rmax(sq(a.lo), sq(a.hi)); end
    return r;
  endfunction

  function automatic ritv_t nonneg();
    ritv_t r;
    r.e = 0; r.i = 0; r.lo = 0.0; r.hi = INF;
    return r;
  endfunction

  function automatic ritv_t sqr_bw(ritv_t x, ritv_t y);
    ritv_t yp, s, r;
    yp = meet(y, nonneg());
    if (yp.e || x.e) begin r.e = 1; return r; end
    s.e = 0; s.i = 0; s.lo = rt(yp.lo); s.hi = rt(yp.hi);
    r = hull(meet(x, s), meet(x, negi(s)));
    r.i = x.i;
    return r;
  endfunction

  function automatic ritv_t sqrt_fw(ritv_t x);
    ritv_t r;
    r = meet(x, nonneg());
    r.i = x.i || (x.lo < 0.0);
    if (!r.e) begin r.lo = rt(r.lo); r.hi = rt(r.hi); end
    return r;
  endfunction

  function automatic ritv_t sqrt_bw(ritv_t x, ritv_t y);
    ritv_t yp, s, r, n;
    yp = meet(y, nonneg());
    s.e = yp.e; s.i = 0; s.lo = sq(yp.lo); s.hi = sq(yp.hi);
    r = meet(x, s);
    if (y.i) begin
      n.e = 0; n.i = 0; n.lo = -INF; n.hi = 0.0;
      r = hull(r, meet(x, n));
    end
    r.i = x.i || (x.lo < 0.0);
    return r;
  endfunction

  // ---------------------------- host actions -------------------------------
  task automatic load(int rd, logic [63:0] v);
    ld_valid = 1'b1; ld_addr = 5'(rd); ld_data = v;
    @(posedge clk); #1;
    ld_valid = 1'b0;
    sh[rd] = v;
    n_load++;
  endtask

  task automatic store_check(int rs);
    st_addr = 5'(rs);
    #1;
    checks++;
    n_store++;
    if (st_data !== sh[rs]) begin
      failures++;
      $display("FAIL store f%0d: %h expected %h", rs, st_data, sh[rs]);
    end
  endtask

  // Issues one instruction; the result must be valid one cycle later.
  task automatic issue(logic [31:0] w, int rd, int s1, int s2, ritv_t exp_r, string what);
    bit ok;
    if (s1 == last_rd || s2 == last_rd) n_b2b++;
    instr_valid = 1'b1; instr = w;
    @(posedge clk); #1;
    instr_valid = 1'b0;
    n_instr++;
    checks++;
    if (exp_r.e) ok = res_data.empty;
    else ok = check_itv(res_data, 0, exp_r.lo, exp_r.hi) && res_data.iota == exp_r.i;
    if (!res_valid || res_rd != 5'(rd) || !ok) begin
      failures++;
      $display("FAIL %s f%0d: valid=%0d rd=%0d r=%h (%g, %g) expected %0d [%g, %g]", what, rd,
               res_valid, res_rd, res_data, rlo(res_data), rhi(res_data), exp_r.e, exp_r.lo, exp_r.hi);
    end
    if (res_data.empty) n_empty++;
    if (!res_data.empty && (rlo(res_data) <= -INF || rhi(res_data) >= INF)) n_inf++;
    sh[rd] = res_data;
    last_rd = rd;
  endtask

  // Forward-backward contractor of one ring constraint. Registers:
  // f1 = x, f2 = y, f3 = xa, f4 = ya, f5 = d, f6..f10 intermediates.
  task automatic ring_contractor();
    issue(fwctc(1, 6, 1, 3), 6, 1, 3, addi(R(sh[1]), negi(R(sh[3]))), "DistX = x - xa");
    issue(sqrfwctc(8, 6), 8, 6, -1, sqri(R(sh[6])), "DistXSqr");
    issue(fwctc(1, 7, 2, 4), 7, 2, 4, addi(R(sh[2]), negi(R(sh[4]))), "DistY = y - ya");
    issue(sqrfwctc(9, 7), 9, 7, -1, sqri(R(sh[7])), "DistYSqr");
    issue(sqrfwctc(10, 5), 10, 5, -1, sqri(R(sh[5])), "DistSqr");
    issue(bwctc1(0, 8, 8, 9, 10), 8, 8, 9,
          meet(R(sh[8]), addi(R(sh[10]), negi(R(sh[9])))), "add bw1");
    issue(bwctc2(0, 9, 8, 9, 10), 9, 8, 9,
          meet(R(sh[9]), addi(R(sh[10]), negi(R(sh[8])))), "add bw2");
    issue(sqrbwctc(6, 6, 8), 6, 6, 8, sqr_bw(R(sh[6]), R(sh[8])), "sqr bw x");
    issue(sqrbwctc(7, 7, 9), 7, 7, 9, sqr_bw(R(sh[7]), R(sh[9])), "sqr bw y");
    issue(bwctc1(1, 1, 1, 3, 6), 1, 1, 6,
          meet(R(sh[1]), addi(R(sh[6]), R(sh[3]))), "sub bw1 x");
    issue(bwctc1(1, 2, 2, 4, 7), 2, 2, 7,
          meet(R(sh[2]), addi(R(sh[7]), R(sh[4]))), "sub bw1 y");
  endtask

  initial begin
    real lx [3] = '{0.0, 10.0, 0.0};
    real ly [3] = '{0.0, 0.0, 10.0};
    real px = 3.0, py = 4.0, rng, x_lo, x_hi, y_lo, y_hi;
    longint c0, c1;
    ritv_t e;
    instr_valid = 1'b0; instr = '0; ld_valid = 1'b0; ld_addr = '0; ld_data = '0; st_addr = '0;
    foreach (sh[i]) sh[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 32; i += 7) store_check(i);

    // initial box [0, +inf] x [0, +inf]
    load(1, {2'b00, FP_ZERO, FP_POS_INF});
    load(2, {2'b00, FP_ZERO, FP_POS_INF});
    for (int round = 0; round < 3; round++) begin
      for (int k = 0; k < 3; k++) begin
        rng = $sqrt((px - lx[k]) ** 2 + (py - ly[k]) ** 2);
        load(3, mk(lx[k], lx[k]));
        load(4, mk(ly[k], ly[k]));
        load(5, {2'b00, r2f(rng - 0.05), r2f(rng + 0.05)});
        c0 = cycle;
        ring_contractor();
        c1 = cycle;
        checks++;
        if (c1 - c0 != 11) begin
          failures++; $display("FAIL 11 instructions took %0d cycles", c1 - c0);
        end
      end
    end
    store_check(1); store_check(2);
    x_lo = rlo(sh[1]); x_hi = rhi(sh[1]); y_lo = rlo(sh[2]); y_hi = rhi(sh[2]);
    $display("robot box: x in [%f, %f], y in [%f, %f]", x_lo, x_hi, y_lo, y_hi);
    checks++;
    if (sh[1][63] || sh[2][63] || !(x_lo <= px && px <= x_hi && y_lo <= py && py <= y_hi)) begin
      failures++; $display("FAIL true position not in the box");
    end
    checks++;
    if (x_hi - x_lo > 0.5 || y_hi - y_lo > 0.5) begin
      failures++; $display("FAIL box not contracted");
    end

    // inconsistent measurement: landmark 1 at distance [20, 21] -> empty box
    load(3, mk(0.0, 0.0)); load(4, mk(0.0, 0.0)); load(5, mk(20.0, 21.0));
    ring_contractor();
    checks++;
    if (!sh[1][63] || !sh[2][63]) begin
      failures++; $display("FAIL inconsistent distance did not empty the box");
    end

    // square root: iota set forward, read backward
    load(11, mk(-1.0, 4.0));
    issue(sqrtfwctc(12, 11), 12, 11, -1, sqrt_fw(R(sh[11])), "sqrt fw");
    if (sh[12][62]) n_iota_fw++;
    issue(sqrtbwctc(13, 11, 12), 13, 11, 12, sqrt_bw(R(sh[11]), R(sh[12])), "sqrt bw iota");
    checks++;
    if (rlo(sh[13]) != -1.0) begin
      failures++; $display("FAIL iota did not keep the out-of-domain part");
    end else n_iota_bw++;
    load(14, mk(1.0, 1.5));
    e.e = 0; e.i = 1; e.lo = 1.0; e.hi = 2.25;
    issue(sqrtbwctc(15, 11, 14), 15, 11, 14, e, "sqrt bw no iota");

    // exp and log: [0, 1] -> [1, e] -> back to [0, 1]
    load(17, mk(0.0, 1.0));
    e.e = 0; e.i = 0; e.lo = 1.0; e.hi = $exp(1.0);
    issue(expfwctc(18, 17), 18, 17, 0, e, "exp fw");
    e.lo = 0.0; e.hi = 1.0;
    issue(logfwctc(19, 18), 19, 18, 0, e, "log fw");

    // cos of [0, 1]
    e.lo = $cos(1.0); e.hi = 1.0;
    issue(cosfwctc(20, 17), 20, 17, 0, e, "cos fw");

    // a cos backward contractor is not implemented: illegal, nothing written
    instr_valid = 1'b1; instr = r_type(8, 3'b110, 16, 11, 0);
    #1;
    checks++;
    if (!instr_illegal) begin failures++; $display("FAIL cos word not illegal"); end
    else n_illegal++;
    @(posedge clk); #1;
    instr_valid = 1'b0;
    checks++;
    if (res_valid) begin failures++; $display("FAIL illegal word wrote a result"); end
    store_check(16);

    // Paving (SIVIA): the host bisects boxes of [0, 8] x [0, 8] and the
    // extension contracts each one with the three distances, now measured
    // with +-0.5; empty boxes are dropped, boxes narrower than 0.25 kept.
    begin
      real bx_lo [$], bx_hi [$], by_lo [$], by_hi [$];
      real cx_lo, cx_hi, cy_lo, cy_hi, mid;
      int  n_box = 0, n_kept = 0, n_drop = 0, n_bisect = 0;
      bit  found = 0, dead;
      bx_lo.push_back(0.0); bx_hi.push_back(8.0); by_lo.push_back(0.0); by_hi.push_back(8.0);
      while (bx_lo.size() > 0 && n_box < 400) begin
        cx_lo = bx_lo.pop_back(); cx_hi = bx_hi.pop_back();
        cy_lo = by_lo.pop_back(); cy_hi = by_hi.pop_back();
        n_box++;
        load(1, mk(cx_lo, cx_hi)); load(2, mk(cy_lo, cy_hi));
        dead = 0;
        for (int k = 0; k < 3 && !dead; k++) begin
          rng = $sqrt((px - lx[k]) ** 2 + (py - ly[k]) ** 2);
          load(3, mk(lx[k], lx[k])); load(4, mk(ly[k], ly[k]));
          load(5, {2'b00, r2f(rng - 0.5), r2f(rng + 0.5)});
          ring_contractor();
          dead = sh[1][63] || sh[2][63];
        end
        if (dead) begin
          n_drop++;
          continue;
        end
        cx_lo = rlo(sh[1]); cx_hi = rhi(sh[1]); cy_lo = rlo(sh[2]); cy_hi = rhi(sh[2]);
        if (cx_hi - cx_lo < 0.25 && cy_hi - cy_lo < 0.25) begin
          n_kept++;
          if (cx_lo <= px && px <= cx_hi && cy_lo <= py && py <= cy_hi) found = 1;
        end else begin
          n_bisect++;
          if (cx_hi - cx_lo >= cy_hi - cy_lo) begin
            mid = $floor((cx_lo + cx_hi) * 512.0) / 1024.0;
            bx_lo.push_back(cx_lo); bx_hi.push_back(mid); by_lo.push_back(cy_lo); by_hi.push_back(cy_hi);
            bx_lo.push_back(mid); bx_hi.push_back(cx_hi); by_lo.push_back(cy_lo); by_hi.push_back(cy_hi);
          end else begin
            mid = $floor((cy_lo + cy_hi) * 512.0) / 1024.0;
            bx_lo.push_back(cx_lo); bx_hi.push_back(cx_hi); by_lo.push_back(cy_lo); by_hi.push_back(mid);
            bx_lo.push_back(cx_lo); bx_hi.push_back(cx_hi); by_lo.push_back(mid); by_hi.push_back(cy_hi);
          end
        end
      end
      $display("paving: boxes=%0d kept=%0d dropped=%0d bisected=%0d left=%0d found=%0d",
               n_box, n_kept, n_drop, n_bisect, bx_lo.size(), found);
      checks++;
      if (!found || bx_lo.size() != 0 || n_bisect == 0) begin
        failures++; $display("FAIL paving did not finish around the true position");
      end
    end

    $display("mechanisms: instr=%0d b2b=%0d inf=%0d empty=%0d iota_fw=%0d iota_bw=%0d illegal=%0d load=%0d store=%0d",
             n_instr, n_b2b, n_inf, n_empty, n_iota_fw, n_iota_bw, n_illegal, n_load, n_store);
    checks++;
    if (n_b2b == 0 || n_inf == 0 || n_empty == 0 || n_iota_fw == 0 || n_iota_bw == 0 ||
        n_illegal == 0 || n_load == 0 || n_store == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
