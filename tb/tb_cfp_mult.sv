// tb_cfp_mult: end-to-end test of the complex floating-point multiplier at
// its default (and only) configuration.
//
// For each operand set the four partial products and both result parts are
// compared bit-exactly with a reference that rounds every step to single
// precision, as the hardware does: rout = rnd(rnd(ar*br) - rnd(ai*bi)) and
// iout = rnd(rnd(ar*bi) + rnd(ai*br)). Stimulus: directed cases, a unit
// circle rotation (twiddle factors as used in a DFT), random values in a
// normal range, operands with short mantissas, and the full bit range.
// The test counts how often each mechanism of the design was exercised and
// fails if any never was: checker-disabled partial multipliers, product
// normalisation shift, product rounding increment, adder carry out,
// normalising left shift after cancellation, exact cancellation, overflow to
// infinity, flush of tiny results and NaN generation.
module tb_cfp_mult;
  import fp_ref_pkg::*;

  logic [31:0] ar, ai, br, bi;
  logic [31:0] rout, iout, arbr, aibi, arbi, aibr;
  int checks = 0, failures = 0;

  typedef enum int {
    M_CHK_OFF, M_PROD_NORM, M_PROD_RND, M_CARRY, M_LEFT, M_CANCEL,
    M_OVF, M_FLUSH, M_NAN, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"checker-disabled 12x12 module", "product normalise shift",
                               "product rounding increment", "adder carry out",
                               "cancellation left shift", "exact cancellation",
                               "overflow to infinity", "tiny result flushed", "NaN result"};

  cfp_mult dut (.ar(ar), .ai(ai), .br(br), .bi(bi),
                .rout(rout), .iout(iout), .arbr(arbr), .aibi(aibi),
                .arbi(arbi), .aibr(aibr));

  function automatic bit finite_nz(logic [31:0] x);
    return x[30:23] != 0 && x[30:23] != 8'hFF;
  endfunction

  // Mechanisms of one real product x*y.
  function automatic void note_mul(logic [31:0] x, logic [31:0] y, logic [31:0] r);
    logic [23:0] mx, my;
    logic [47:0] pr;
    if (!finite_nz(x) || !finite_nz(y)) return;
    if (r[30:23] == 8'hFF) mech[M_OVF]++;
    if (r[30:23] == 8'h00) mech[M_FLUSH]++;
    mx = {1'b1, x[22:0]};
    my = {1'b1, y[22:0]};
    if (mx[11:0] == 0 || my[11:0] == 0) mech[M_CHK_OFF]++;
    pr = 48'(mx) * 48'(my);
    if (pr[47]) mech[M_PROD_NORM]++;
    if (pr[47] ? (pr[23] && (pr[24] || pr[22:0] != 0))
               : (pr[22] && (pr[23] || pr[21:0] != 0))) mech[M_PROD_RND]++;
  endfunction

  // Mechanisms of one add/sub x op y = r.
  function automatic void note_add(logic [31:0] x, logic [31:0] y, logic [31:0] r);
    if (!finite_nz(x) || !finite_nz(y)) return;
    if (r[30:23] == 8'hFF) mech[M_OVF]++;
    else if (r[30:0] == 0) begin
      if (x[30:0] == y[30:0]) mech[M_CANCEL]++;
      else mech[M_FLUSH]++;
    end else begin
      if (r[30:23] > x[30:23] && r[30:23] > y[30:23]) mech[M_CARRY]++;
      if (r[30:23] < x[30:23] && r[30:23] < y[30:23]) mech[M_LEFT]++;
    end
  endfunction

  task automatic cmp(string what, logic [31:0] got, logic [31:0] expv);
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL %s = %h expected %h (ar=%h ai=%h br=%h bi=%h)",
               what, got, expv, ar, ai, br, bi);
    end
  endtask

  task automatic apply(logic [31:0] xr, logic [31:0] xi, logic [31:0] yr, logic [31:0] yi);
    logic [31:0] e_arbr, e_aibi, e_arbi, e_aibr, e_re, e_im;
    ar = xr; ai = xi; br = yr; bi = yi;
    #1;
    e_arbr = ref_mul(xr, yr);
    e_aibi = ref_mul(xi, yi);
    e_arbi = ref_mul(xr, yi);
    e_aibr = ref_mul(xi, yr);
    e_re   = ref_add(e_arbr, e_aibi, 1'b1);
    e_im   = ref_add(e_arbi, e_aibr, 1'b0);
    cmp("arbr", arbr, e_arbr);
    cmp("aibi", aibi, e_aibi);
    cmp("arbi", arbi, e_arbi);
    cmp("aibr", aibr, e_aibr);
    cmp("rout", rout, e_re);
    cmp("iout", iout, e_im);
    note_mul(xr, yr, e_arbr); note_mul(xi, yi, e_aibi);
    note_mul(xr, yi, e_arbi); note_mul(xi, yr, e_aibr);
    note_add(e_arbr, e_aibi, e_re);
    note_add(e_arbi, e_aibr, e_im);
    if (is_nan(e_re) || is_nan(e_im)) mech[M_NAN]++;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mech[i]) mech[i] = 0;
    // (1 + 2j)(3 + 4j) = -5 + 10j
    apply(32'h3F80_0000, 32'h4000_0000, 32'h4040_0000, 32'h4080_0000);
    // (2 + 1j)(2 - 1j) = 5 + 0j: exact cancellation in the imaginary part
    apply(32'h4000_0000, 32'h3F80_0000, 32'h4000_0000, 32'hBF80_0000);
    // j * j = -1
    apply(32'h0000_0000, 32'h3F80_0000, 32'h0000_0000, 32'h3F80_0000);
    // overflow of the partial products and the sum
    apply(32'h7F00_0000, 32'h7F00_0000, 32'h4000_0000, 32'h4000_0000);
    // finite partial products whose difference overflows
    apply(32'h7F00_0000, 32'h7F00_0000, 32'h3FC0_0000, 32'hBFC0_0000);
    // tiny partial products flushed to zero
    apply(32'h0100_0000, 32'h0000_0000, 32'h0100_0000, 32'h0000_0000);
    // normal partial products whose difference is flushed to zero
    apply(32'h0180_0001, 32'h0180_0000, 32'h3F80_0000, 32'h3F80_0000);
    // infinity times zero gives NaN
    apply(32'h7F80_0000, 32'h0000_0000, 32'h0000_0000, 32'h3F80_0000);
    // rotation by the 16 twiddle factors exp(-j*2*pi*k/16)
    for (int k = 0; k < 16; k++) begin
      real c, s;
      c = $cos(2.0 * 3.14159265358979 * k / 16.0);
      s = -$sin(2.0 * 3.14159265358979 * k / 16.0);
      apply(32'h3FC0_0000, 32'hBF20_0000, f32_from_real(c), f32_from_real(s));
    end
    // random values in a normal range
    for (int k = 0; k < 3000; k++)
      apply(rand_f32(100, 150), rand_f32(100, 150), rand_f32(100, 150), rand_f32(100, 150));
    // short mantissas: lower mantissa halves zero, checkers disable modules
    for (int k = 0; k < 500; k++) begin
      logic [31:0] x, y;
      x = rand_f32(120, 135); x[10:0] = '0;
      y = rand_f32(120, 135); y[10:0] = '0;
      apply(x, y, rand_f32(120, 135), rand_f32(120, 135));
    end
    // nearly equal partial products: cancellation
    for (int k = 0; k < 500; k++) begin
      logic [31:0] x, y;
      x = rand_f32(120, 135);
      y = rand_f32(120, 135);
      apply(x, y, y ^ 32'($urandom_range(3)), x);
    end
    // full bit range
    for (int k = 0; k < 2000; k++) apply($urandom, $urandom, $urandom, $urandom);

    foreach (mech[i]) begin
      $display("%-32s %0d", mech_name[i], mech[i]);
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", mech_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
