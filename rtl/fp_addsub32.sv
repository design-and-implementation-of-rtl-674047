// fp_addsub32: single-precision floating-point adder / subtractor.
//
// Computes s = a + b (sub = 0) or s = a - b (sub = 1). The data path follows
// the classic add/sub organisation:
//   small ALU  - the biased exponents are subtracted; the control picks the
//                operand with the larger magnitude (larger exponent, or larger
//                fraction when the exponents are equal) as the big operand;
//   shift right - the small significand, extended by guard, round and sticky
//                bits, is shifted right by the exponent difference; bits that
//                fall off are ORed into the sticky bit;
//   big ALU    - the aligned significands are added, or subtracted when the
//                effective signs differ (the result is never negative because
//                the big operand is taken first);
//   normalise  - a carry out shifts the sum right by one and increments the
//                exponent; otherwise leading zeros are counted and the sum is
//                shifted left with the exponent decremented by the count;
//   rounding   - round to nearest, ties to even; a carry out of rounding
//                renormalises once more.
// The result takes the exponent of the larger operand before normalisation
// and the sign of the larger operand. Exceptions follow the same rules as
// fp_mult32 (this design's choice): subnormal operands are zero, tiny results
// flush to signed zero, overflow gives infinity, inf - inf and NaN operands
// give 0x7FC00000, exact cancellation gives +0.
// Purely combinational; ports are cfp_pkg::fp32_t.
module fp_addsub32
  import cfp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t s
);

  localparam int unsigned EXT_W = MANT_W + 3;   // significand + G, R, S

  fp_class_e ca, cb;
  logic      sb;                                // effective sign of b

  always_comb begin
    logic signed [8:0]  ediff;                  // small ALU
    logic               a_big;
    logic [EXP_W-1:0]   e_big;
    logic               s_big, s_small;
    logic [MANT_W-1:0]  m_big, m_small;
    logic [4:0]         shamt;
    logic [2*EXT_W-1:0] shifted;
    logic [EXT_W-1:0]   aligned;
    logic [EXT_W:0]     sum;                    // big ALU, one carry bit
    logic [EXT_W-1:0]   n;
    logic [4:0]         lz;
    logic signed [9:0]  e;
    logic               round_up;
    logic [MANT_W:0]    m_rnd;

    ca = classify(a.exp, a.frac);
    cb = classify(b.exp, b.frac);
    sb = b.sign ^ sub;

    // Small ALU and control: choose the larger operand.
    ediff = 9'(a.exp) - 9'(b.exp);
    a_big = (ediff > 0) || (ediff == 0 && a.frac >= b.frac);
    e_big   = a_big ? a.exp : b.exp;
    s_big   = a_big ? a.sign : sb;
    s_small = a_big ? sb : a.sign;
    m_big   = a_big ? {1'b1, a.frac} : {1'b1, b.frac};
    m_small = a_big ? {1'b1, b.frac} : {1'b1, a.frac};
    if (a_big) shamt = (ediff > 9'sd31)  ? 5'd31 : ediff[4:0];
    else       shamt = (-ediff > 9'sd31) ? 5'd31 : 5'((-ediff));

    // Alignment shift with sticky collection.
    shifted = {m_small, 3'b000, EXT_W'(0)} >> shamt;
    aligned = shifted[2*EXT_W-1:EXT_W];
    aligned[0] = aligned[0] | (|shifted[EXT_W-1:0]);

    // Big ALU.
    if (s_big ^ s_small) sum = {1'b0, m_big, 3'b000} - {1'b0, aligned};
    else                 sum = {1'b0, m_big, 3'b000} + {1'b0, aligned};

    // Normalisation: right by one on carry, else left by the leading zeros.
    lz = '0;
    for (int k = EXT_W - 1; k >= 0; k--) begin
      if (sum[k]) break;
      lz = lz + 5'd1;
    end
    if (sum[EXT_W]) begin
      n = sum[EXT_W:1];
      n[0] = n[0] | sum[0];
      e = 10'(e_big) + 10'sd1;
    end else begin
      n = sum[EXT_W-1:0] << lz;
      e = 10'(e_big) - 10'(lz);
    end

    // Rounding hardware: nearest, ties to even.
    round_up = n[2] & (n[1] | n[0] | n[3]);
    m_rnd    = {1'b0, n[EXT_W-1:3]} + (MANT_W+1)'(round_up);
    if (m_rnd[MANT_W]) begin
      m_rnd = m_rnd >> 1;
      e     = e + 10'sd1;
    end

    // Exceptions and result packing.
    if (ca == CLS_NAN || cb == CLS_NAN ||
        (ca == CLS_INF && cb == CLS_INF && a.sign != sb))
      s = QNAN;
    else if (ca == CLS_INF)
      s = make_inf(a.sign);
    else if (cb == CLS_INF)
      s = make_inf(sb);
    else if (ca == CLS_ZERO && cb == CLS_ZERO)
      s = make_zero(a.sign & sb);
    else if (ca == CLS_ZERO)
      s = '{sign: sb, exp: b.exp, frac: b.frac};
    else if (cb == CLS_ZERO)
      s = a;
    else if (sum == '0)
      s = make_zero(1'b0);
    else if (e >= 10'sd255)
      s = make_inf(s_big);
    else if (e <= 10'sd0)
      s = make_zero(s_big);
    else
      s = '{sign: s_big, exp: e[EXP_W-1:0], frac: m_rnd[FRAC_W-1:0]};
  end

endmodule
