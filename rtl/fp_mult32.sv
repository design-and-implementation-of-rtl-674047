// fp_mult32: single-precision floating-point real multiplier.
//
// Three independent paths, as in the block diagram of the real multiplier:
//   sign:     s = a.sign XOR b.sign;
//   exponent: the two biased exponents are added by an 8-bit ripple-carry
//             adder and the bias 127 is removed once (10-bit signed
//             arithmetic so overflow and underflow are visible);
//   mantissa: the 24-bit significands (hidden one + fraction) are multiplied
//             by the CIFM multiplier, giving a 48-bit product in [1,4).
// Normalisation: if product bit 47 is set the product is shifted right by one
// and the exponent incremented. The 23-bit fraction is then rounded to
// nearest, ties to even, from the guard bit and a sticky OR of the rest; a
// rounding carry that reaches 2.0 bumps the exponent again.
// Exceptions (this design's choice, IEEE-754 compatible except for
// subnormals): zero and subnormal operands count as zero; an exponent above
// 254 gives signed infinity; below 1 gives signed zero; inf*0 and any NaN
// operand give the quiet NaN 0x7FC00000.
// Purely combinational; ports are cfp_pkg::fp32_t.
module fp_mult32
  import cfp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);

  fp_class_e          ca, cb;
  logic               sign;
  logic [MANT_W-1:0]  ma, mb;
  logic [2*MANT_W-1:0] prod;

  assign ma = {1'b1, a.frac};
  assign mb = {1'b1, b.frac};

  logic [EXP_W-1:0]   esum;
  logic               ecarry;

  cifm_mult24 u_mant (.a(ma), .b(mb), .p(prod));

  // Exponent path: 8-bit ripple adder, then the bias is taken off once.
  ripple_adder #(.W(EXP_W)) u_exp (
    .a(a.exp), .b(b.exp), .cin(1'b0), .s(esum), .cout(ecarry)
  );

  always_comb begin
    logic signed [9:0] e;         // unbiased-sum exponent, biased form
    logic [MANT_W-1:0] m;         // 24-bit normalised significand
    logic              guard, sticky, round_up;
    logic [MANT_W:0]   m_rnd;

    ca   = classify(a.exp, a.frac);
    cb   = classify(b.exp, b.frac);
    sign = a.sign ^ b.sign;

    e = 10'({ecarry, esum}) - 10'(BIAS);
    if (prod[47]) begin
      m      = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      e      = e + 10'sd1;
    end else begin
      m      = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | m[0]);
    m_rnd    = {1'b0, m} + (MANT_W+1)'(round_up);
    if (m_rnd[MANT_W]) begin
      m_rnd = m_rnd >> 1;
      e     = e + 10'sd1;
    end

    if (ca == CLS_NAN || cb == CLS_NAN ||
        (ca == CLS_INF && cb == CLS_ZERO) || (ca == CLS_ZERO && cb == CLS_INF))
      p = QNAN;
    else if (ca == CLS_INF || cb == CLS_INF)
      p = make_inf(sign);
    else if (ca == CLS_ZERO || cb == CLS_ZERO)
      p = make_zero(sign);
    else if (e >= 10'sd255)
      p = make_inf(sign);
    else if (e <= 10'sd0)
      p = make_zero(sign);
    else
      p = '{sign: sign, exp: e[EXP_W-1:0], frac: m_rnd[FRAC_W-1:0]};
  end

endmodule
