// xinterval_pkg: types, constants and helper functions shared by the
// interval extension.
//
// Bound format (31 bits): 1 sign bit, 7 exponent bits (bias 63) and 23
// fraction bits, i.e. IEEE-754 single precision with one exponent bit less.
// The 7-bit exponent and the 31-bit width follow the published format; bias,
// field order and the special values are this design's choice:
//   exponent 0       -> zero (subnormals are not supported, fraction ignored)
//   exponent 127     -> infinity (fraction ignored)
// Interval format (64 bits, one RISC-V D register):
//   [63] empty flag, [62] iota flag, [61:31] lower bound, [30:0] upper bound.
// An empty interval is encoded with empty=1; its bounds carry no meaning.
//
// Rounding: every bound operation produces both the result rounded toward
// -inf (used for lower bounds) and toward +inf (used for upper bounds).
// Results too small for a normal number go to zero or to the smallest normal
// number depending on the direction, so enclosures always stay valid.
package xinterval_pkg;

  localparam int unsigned EXP_W  = 7;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned BOUND_W = 1 + EXP_W + FRAC_W;   // 31
  localparam int unsigned ITV_W  = 2 + 2 * BOUND_W;       // 64
  localparam int          BIAS   = 63;
  localparam logic [EXP_W-1:0] EXP_INF = '1;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp31_t;

  typedef struct packed {
    logic  empty;
    logic  iota;
    fp31_t lo;
    fp31_t hi;
  } itv_t;

  // Instruction encoding. Opcodes are the RISC-V custom-0 and custom-1 slots.
  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;   // R-type instructions
  localparam logic [6:0] OPC_CUSTOM1 = 7'b0101011;   // R4-type instructions
  localparam logic [2:0] F3_FW2  = 3'b100;  // two-input forward contractors
  localparam logic [2:0] F3_FW1  = 3'b101;  // one-input forward contractors
  localparam logic [2:0] F3_BW1  = 3'b110;  // one-input backward contractors
  localparam logic [2:0] F3_R4_BW1 = 3'b000; // R4: backward contractor 1
  localparam logic [2:0] F3_R4_BW2 = 3'b001; // R4: backward contractor 2

  // Primitive identifiers, used as funct7 (R-type) or funct2 (R4-type).
  localparam logic [6:0] PRIM_ADD  = 7'd0;
  localparam logic [6:0] PRIM_SUB  = 7'd1;
  localparam logic [6:0] PRIM_MUL  = 7'd2;
  localparam logic [6:0] PRIM_DIV  = 7'd3;
  localparam logic [6:0] PRIM_SQRT = 7'd4;
  localparam logic [6:0] PRIM_SQR  = 7'd5;
  localparam logic [6:0] PRIM_EXP  = 7'd6;
  localparam logic [6:0] PRIM_LOG  = 7'd7;
  localparam logic [6:0] PRIM_COS  = 7'd8;
  localparam logic [6:0] PRIM_SIN  = 7'd9;

  typedef enum logic [4:0] {
    OP_ADD_FW, OP_ADD_BW1, OP_ADD_BW2,
    OP_SUB_FW, OP_SUB_BW1, OP_SUB_BW2,
    OP_MUL_FW, OP_MUL_BW1, OP_MUL_BW2,
    OP_DIV_FW, OP_DIV_BW1, OP_DIV_BW2,
    OP_SQR_FW, OP_SQR_BW,
    OP_SQRT_FW, OP_SQRT_BW,
    OP_EXP_FW, OP_EXP_BW,
    OP_LOG_FW, OP_LOG_BW,
    OP_COS_FW, OP_SIN_FW,
    OP_NONE
  } itv_op_e;

  // Mode of the two-input contractor modules.
  typedef enum logic [1:0] {CTC_FW = 2'd0, CTC_BW1 = 2'd1, CTC_BW2 = 2'd2} ctc_mode_e;

  localparam fp31_t FP_ZERO    = '{sign: 1'b0, exp: '0, frac: '0};
  localparam fp31_t FP_POS_INF = '{sign: 1'b0, exp: EXP_INF, frac: '0};
  localparam fp31_t FP_NEG_INF = '{sign: 1'b1, exp: EXP_INF, frac: '0};
  localparam fp31_t FP_MAX     = '{sign: 1'b0, exp: EXP_INF - 1, frac: '1};
  localparam fp31_t FP_MIN_NRM = '{sign: 1'b0, exp: 7'd1, frac: '0};
  localparam fp31_t FP_ONE     = '{sign: 1'b0, exp: 7'(BIAS), frac: '0};
  localparam fp31_t FP_M_ONE   = '{sign: 1'b1, exp: 7'(BIAS), frac: '0};

  localparam itv_t ITV_EMPTY  = '{empty: 1'b1, iota: 1'b0, lo: FP_ZERO, hi: FP_ZERO};
  localparam itv_t ITV_ENTIRE = '{empty: 1'b0, iota: 1'b0, lo: FP_NEG_INF, hi: FP_POS_INF};
  localparam itv_t ITV_NONNEG = '{empty: 1'b0, iota: 1'b0, lo: FP_ZERO, hi: FP_POS_INF};

  function automatic logic fp_is_zero(fp31_t a);
    return a.exp == '0;
  endfunction

  function automatic logic fp_is_inf(fp31_t a);
    return a.exp == EXP_INF;
  endfunction

  function automatic fp31_t fp_neg(fp31_t a);
    fp31_t r = a;
    r.sign = ~a.sign;
    return r;
  endfunction

  // Totally ordered key of a bound: both zeros map to 0, infinities to the
  // extremes.
  function automatic logic signed [31:0] fp_key(fp31_t a);
    logic signed [31:0] mag;
    if (fp_is_zero(a)) return 32'sd0;
    mag = fp_is_inf(a) ? $signed({2'b0, EXP_INF, {FRAC_W{1'b0}}})
                       : $signed({2'b0, a.exp, a.frac});
    return a.sign ? -mag : mag;
  endfunction

  function automatic logic fp_lt(fp31_t a, fp31_t b);
    return fp_key(a) < fp_key(b);
  endfunction

  function automatic logic fp_le(fp31_t a, fp31_t b);
    return fp_key(a) <= fp_key(b);
  endfunction

  function automatic fp31_t fp_min(fp31_t a, fp31_t b);
    return fp_lt(b, a) ? b : a;
  endfunction

  function automatic fp31_t fp_max(fp31_t a, fp31_t b);
    return fp_lt(a, b) ? b : a;
  endfunction

  // Directed rounding of a nonzero finite value
  //   (-1)^sign * sig / 2^47 * 2^(e - BIAS), sig[47] = 1,
  // plus an optional sticky bit standing for nonzero bits below sig[0].
  // up = 1 rounds toward +inf, up = 0 toward -inf.
  function automatic fp31_t fp_round(logic sign, int e, logic [47:0] sig,
                                     logic sticky, logic up);
    logic        away;     // rounding moves the magnitude up
    logic        inexact;
    logic [24:0] m;
    int          ee;
    fp31_t       r;
    away    = sign ? ~up : up;
    inexact = (|sig[23:0]) | sticky;
    m       = {1'b0, sig[47:24]} + {24'd0, inexact & away};
    ee      = e;
    if (m[24]) begin
      m  = m >> 1;
      ee = ee + 1;
    end
    if (ee >= int'(EXP_INF)) begin
      r = away ? FP_POS_INF : FP_MAX;
    end else if (ee <= 0) begin
      r = away ? FP_MIN_NRM : FP_ZERO;
    end else begin
      r.sign = 1'b0;
      r.exp  = ee[EXP_W-1:0];
      r.frac = m[FRAC_W-1:0];
    end
    r.sign = sign;
    return r;
  endfunction

  // Conversion of a signed fixed-point value v * 2^(k - 50) to a bound with
  // directed rounding (up = 1 toward +inf). Used by the exp and log units.
  function automatic fp31_t fx_to_fp(logic signed [63:0] v, int k, logic up);
    logic        s;
    logic [63:0] mag, norm;
    int          pos;
    if (v == 0) return FP_ZERO;
    s   = v[63];
    mag = s ? 64'(-v) : 64'(v);
    pos = 0;
    for (int i = 0; i < 64; i++) if (mag[i]) pos = i;
    norm = mag << (63 - pos);
    return fp_round(s, pos - 50 + k + BIAS, norm[63:16], |norm[15:0], up);
  endfunction

  // Conversion of a bound with |a| < 2^13 to signed fixed point with 50
  // fraction bits; bits below 2^-50 are dropped. Zero gives 0.
  function automatic logic signed [63:0] fp_to_fx(fp31_t a);
    int          sh;
    logic [63:0] m;
    if (fp_is_zero(a)) return '0;
    sh = int'(a.exp) - BIAS + 27;
    m  = 64'({1'b1, a.frac});
    if (sh >= 0) m = m << sh;
    else         m = m >> (-sh);
    return a.sign ? -$signed(m) : $signed(m);
  endfunction

  // Intersection of two intervals. The iota flag is kept from the first one.
  function automatic itv_t itv_meet(itv_t a, itv_t b);
    itv_t r;
    r.empty = a.empty | b.empty;
    r.iota  = a.iota;
    r.lo    = fp_max(a.lo, b.lo);
    r.hi    = fp_min(a.hi, b.hi);
    if (fp_lt(r.hi, r.lo)) r.empty = 1'b1;
    if (r.empty) begin
      r.lo = FP_ZERO;
      r.hi = FP_ZERO;
    end
    return r;
  endfunction

  // Smallest interval holding both; iota flags are or-ed.
  function automatic itv_t itv_hull(itv_t a, itv_t b);
    itv_t r;
    if (a.empty && b.empty) return ITV_EMPTY;
    if (a.empty) return b;
    if (b.empty) return a;
    r.empty = 1'b0;
    r.iota  = a.iota | b.iota;
    r.lo    = fp_min(a.lo, b.lo);
    r.hi    = fp_max(a.hi, b.hi);
    return r;
  endfunction

  function automatic itv_t itv_neg(itv_t a);
    itv_t r = a;
    r.lo = fp_neg(a.hi);
    r.hi = fp_neg(a.lo);
    return r;
  endfunction

  function automatic logic itv_has_zero(itv_t a);
    return !a.empty && fp_le(a.lo, FP_ZERO) && fp_le(FP_ZERO, a.hi);
  endfunction

endpackage
