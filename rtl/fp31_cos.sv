// fp31_cos: cos(a) or, with sine = 1, sin(a) of a 31-bit bound, as a
// guaranteed pair y_dn <= f(a) <= y_up.
//
// Purely combinational. The argument is converted to fixed point with 50
// fraction bits and reduced as a = k*pi/2 + r with |r| <= pi/4 (pi/2 held
// to 62 fraction bits). cos r and sin r come from Taylor polynomials in
// Horner form (9 terms each, remainder below 2^-57); the quadrant
// (k mod 4, shifted by one for the sine, since sin a = cos(a - pi/2)) picks
// +-cos r or +-sin r. The accumulated truncation error stays below 2^-45;
// the value is widened by 2^-42 on each side, rounded outward and clipped
// to [-1, 1]. The error is absolute, so results close to zero (a close to
// a zero of the function) are loose in relative terms.
// Special cases: f(0) exact; |a| < 2^-12 uses cos a in [1 - 2^-24, 1] and
// sin a between a and its neighbour toward zero; |a| >= 64 and infinities
// give [-1, 1].
// That cos and sin are primitives of the extension follows the document;
// the algorithm and its accuracy are this design's own.
module fp31_cos
  import xinterval_pkg::*;
(
  input  fp31_t a,
  input  logic  sine,
  output fp31_t y_dn,
  output fp31_t y_up
);

  localparam logic [63:0] PIO2_Q62   = 64'h6487ed5110b4611a;  // pi/2 * 2^62
  localparam logic [24:0] TWOOPI_Q24 = 25'h0a2f983;           // 2/pi * 2^24
  localparam int          NTERMS     = 9;
  localparam logic signed [63:0] ERR = 64'sd256;              // 2^-42
  localparam fp31_t       ONE_M      = '{sign: 1'b0, exp: 7'(BIAS - 1), frac: '1};

  // 1/j! with 50 fraction bits, computed at elaboration.
  function automatic logic [63:0] inv_fact(int j);
    logic [63:0] f = 64'd1;
    for (int i = 2; i <= j; i++) f = f * 64'(i);
    return (64'd1 << 50) / f;
  endfunction

  int                  ue, k;
  logic [1:0]          q;
  logic signed [63:0]  xs, r, r2, pc, ps, v;
  logic signed [127:0] t;
  fp31_t               nb;   // neighbour of a toward zero

  always_comb begin
    ue = int'(a.exp) - BIAS;
    xs = fp_to_fx(a);
    // k = round(a * 2/pi)
    t  = 128'(xs) * $signed({103'd0, TWOOPI_Q24});
    t  = t + (128'sd1 <<< 73);
    k  = int'(t >>> 74);
    t  = 128'(signed'(64'(k))) * $signed({64'd0, PIO2_Q62});
    r  = xs - 64'(t >>> 12);
    t  = 128'(r) * 128'(r);
    r2 = 64'(t >>> 50);
    // cos r = sum (-1)^j r^2j / (2j)!, sin r = r * sum (-1)^j r^2j / (2j+1)!
    pc = $signed(inv_fact(2 * (NTERMS - 1)));
    ps = $signed(inv_fact(2 * (NTERMS - 1) + 1));
    for (int j = NTERMS - 2; j >= 0; j--) begin
      t  = 128'(pc) * 128'(r2);
      pc = $signed(inv_fact(2 * j)) - 64'(t >>> 50);
      t  = 128'(ps) * 128'(r2);
      ps = $signed(inv_fact(2 * j + 1)) - 64'(t >>> 50);
    end
    t  = 128'(ps) * 128'(r);
    ps = 64'(t >>> 50);
    q  = 2'(k - (sine ? 1 : 0));
    case (q)
      2'd0:    v = pc;
      2'd1:    v = -ps;
      2'd2:    v = -pc;
      default: v = ps;
    endcase
    y_dn = fx_to_fp(v - ERR, 0, 1'b0);
    y_up = fx_to_fp(v + ERR, 0, 1'b1);
    if (fp_lt(y_dn, FP_M_ONE)) y_dn = FP_M_ONE;
    if (fp_lt(FP_ONE, y_up))   y_up = FP_ONE;

    nb = a;
    {nb.exp, nb.frac} = {a.exp, a.frac} - 30'd1;
    if (fp_is_zero(a)) begin
      y_dn = sine ? FP_ZERO : FP_ONE;
      y_up = y_dn;
    end else if (fp_is_inf(a) || ue >= 6) begin
      y_dn = FP_M_ONE;
      y_up = FP_ONE;
    end else if (ue < -12) begin
      if (!sine) begin
        y_dn = ONE_M;
        y_up = FP_ONE;
      end else if (a.sign) begin
        y_dn = a;
        y_up = nb;
      end else begin
        y_dn = nb;
        y_up = a;
      end
    end
  end

endmodule
