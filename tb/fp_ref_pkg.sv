// fp_ref_pkg: reference arithmetic for the floating-point testbenches.
//
// The expected results are worked out with the simulator's double-precision
// real arithmetic, independent of the RTL. A single-precision product is
// exact in double; a single-precision sum is either exact in double or far
// from a single-precision rounding tie, so converting the double result to
// single with round-to-nearest-even (f32_from_real) gives the correctly
// rounded single result. The conversion applies the same flush-to-zero rule
// as the design: subnormal inputs read as signed zero, results whose rounded
// exponent is below the normal range become signed zero, NaN results are
// the canonical quiet NaN 0x7FC00000.
package fp_ref_pkg;

  // binary32 bit pattern -> real, subnormals read as signed zero.
  function automatic real f32_to_real(logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'd0) begin
      d = {x[31], 63'd0};
    end else if (x[30:23] == 8'hFF) begin
      d = {x[31], 11'h7FF, x[22:0] != 0, 51'd0};
    end else begin
      d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    end
    return $bitstoreal(d);
  endfunction

  // real -> binary32, round to nearest even with unbounded exponent range,
  // then flush below-normal results to zero and saturate to infinity.
  function automatic logic [31:0] f32_from_real(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7FF)
      return (d[51:0] != 0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'd0};
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    return f32_from_real(f32_to_real(a) * f32_to_real(b));
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b, logic sub);
    real rb;
    rb = f32_to_real(b);
    return f32_from_real(sub ? f32_to_real(a) - rb : f32_to_real(a) + rb);
  endfunction

  function automatic bit is_nan(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction

  // Random binary32 with exponent field drawn from [elo, ehi].
  function automatic logic [31:0] rand_f32(int elo, int ehi);
    logic [31:0] x;
    x = $urandom;
    x[30:23] = 8'(elo + int'($urandom_range(ehi - elo)));
    return x;
  endfunction

endpackage
