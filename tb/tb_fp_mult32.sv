// tb_fp_mult32: checks the single-precision multiplier bit-exactly against
// the double-precision reference of fp_ref_pkg: directed cases (exact
// products, normalisation shift, rounding ties, overflow, underflow, zeros,
// subnormals, infinities, NaN) followed by random operands in a safe
// exponent range and over the full range.
module tb_fp_mult32;
  import cfp_pkg::*;
  import fp_ref_pkg::*;

  fp32_t a, b, p;
  int checks = 0, failures = 0;

  fp_mult32 dut (.a(a), .b(b), .p(p));

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [31:0] expv;
    a = x; b = y;
    #1;
    expv = ref_mul(x, y);
    checks++;
    if (p !== expv) begin
      failures++;
      $display("FAIL %h * %h = %h expected %h", x, y, p, expv);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F80_0000, 32'h3F80_0000);   // 1 * 1
    check(32'h3FC0_0000, 32'h3FC0_0000);   // 1.5 * 1.5, product >= 2
    check(32'h4049_0FDB, 32'hC02D_F854);   // pi * -e
    check(32'h3F80_0001, 32'h3F80_0001);   // rounding of a long product
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);   // rounding carries into exponent
    check(32'h7F7F_FFFF, 32'h4000_0000);   // overflow to +inf
    check(32'h0080_0000, 32'h3F00_0000);   // underflow flushed to zero
    check(32'h8000_0000, 32'h40A0_0000);   // -0 * 5
    check(32'h0000_0001, 32'h4000_0000);   // subnormal operand reads as zero
    check(32'h7F80_0000, 32'hC000_0000);   // inf * -2
    check(32'h7F80_0000, 32'h0000_0000);   // inf * 0 = NaN
    check(32'h7FC0_1234, 32'h3F80_0000);   // NaN operand
    for (int k = 0; k < 3000; k++) check(rand_f32(64, 190), rand_f32(64, 190));
    for (int k = 0; k < 3000; k++) check(rand_f32(0, 255), rand_f32(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
