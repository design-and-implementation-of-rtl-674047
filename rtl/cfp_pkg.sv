// cfp_pkg: types and constants shared by the single-precision complex
// multiplier. fp32_t is the IEEE-754 binary32 layout (sign in bit 31, 8-bit
// biased exponent in 30:23, 23-bit fraction in 22:0). The hidden leading one
// is present whenever the stored exponent is non-zero. Values with a zero
// exponent field (zero and subnormals) are read as signed zero by every unit
// of this design; that flush-to-zero rule is a choice of this design.
package cfp_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned MANT_W = FRAC_W + 1;   // with hidden bit: 24
  localparam int unsigned BIAS   = 127;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;     // infinity / NaN exponent

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  // Canonical quiet NaN returned for every invalid operation.
  localparam fp32_t QNAN = '{sign: 1'b0, exp: EXP_MAX, frac: 23'h400000};

  // Operand classes after flush-to-zero.
  typedef enum logic [1:0] {
    CLS_ZERO,
    CLS_NORM,
    CLS_INF,
    CLS_NAN
  } fp_class_e;

  function automatic fp_class_e classify(logic [EXP_W-1:0] exp, logic [FRAC_W-1:0] frac);
    if (exp == '0)           return CLS_ZERO;
    else if (exp != EXP_MAX) return CLS_NORM;
    else if (frac == '0)     return CLS_INF;
    else                     return CLS_NAN;
  endfunction

  function automatic fp32_t make_inf(logic s);
    return '{sign: s, exp: EXP_MAX, frac: '0};
  endfunction

  function automatic fp32_t make_zero(logic s);
    return '{sign: s, exp: '0, frac: '0};
  endfunction

endpackage
