// tb_fp_addsub32: checks the single-precision adder/subtractor bit-exactly
// against the double-precision reference of fp_ref_pkg, in both modes:
// directed cases (exact cancellation, carry out, alignment beyond the
// significand, rounding ties, overflow, tiny results, zeros, infinities,
// NaN) and random operands with close exponents (massive cancellation),
// moderate exponent differences and the full range. It also counts how
// often the normalising left shift and the rounding increment were needed
// and fails if either never happened.
module tb_fp_addsub32;
  import cfp_pkg::*;
  import fp_ref_pkg::*;

  fp32_t a, b, s;
  logic  sub;
  int checks = 0, failures = 0;
  int n_left = 0, n_carry = 0;

  fp_addsub32 dut (.a(a), .b(b), .sub(sub), .s(s));

  task automatic check(logic [31:0] x, logic [31:0] y, logic op);
    logic [31:0] expv;
    a = x; b = y; sub = op;
    #1;
    expv = ref_add(x, y, op);
    checks++;
    if (s !== expv) begin
      failures++;
      $display("FAIL %h %s %h = %h expected %h", x, op ? "-" : "+", y, s, expv);
    end
    // Classify what the data path had to do, from the operands and result.
    if (expv[30:23] != 0 && expv[30:23] != 8'hFF && x[30:23] != 0 && y[30:23] != 0 &&
        x[30:23] != 8'hFF && y[30:23] != 8'hFF) begin
      if (expv[30:23] < x[30:23] && expv[30:23] < y[30:23]) n_left++;
      if (expv[30:23] > x[30:23] && expv[30:23] > y[30:23]) n_carry++;
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
    check(32'h3F80_0000, 32'h3F80_0000, 0);   // 1 + 1, carry out
    check(32'h3F80_0000, 32'h3F80_0000, 1);   // 1 - 1 = +0
    check(32'h3F80_0001, 32'h3F80_0000, 1);   // massive cancellation
    check(32'h4B80_0000, 32'h3F80_0000, 0);   // 2^24 + 1, tie to even
    check(32'h4B80_0000, 32'h3FC0_0000, 0);   // 2^24 + 1.5, round up
    check(32'h3F80_0000, 32'h3380_0000, 1);   // 1 - 2^-24
    check(32'h7F00_0000, 32'h0000_0001, 0);   // alignment far beyond significand
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 0);   // overflow
    check(32'h0180_0000, 32'h0100_0001, 1);   // tiny result flushed
    check(32'h8000_0000, 32'h8000_0000, 0);   // -0 + -0
    check(32'h0000_0000, 32'hC0A0_0000, 1);   // 0 - -5
    check(32'h40A0_0000, 32'h8000_0003, 0);   // subnormal operand reads as zero
    check(32'h7F80_0000, 32'h7F80_0000, 1);   // inf - inf = NaN
    check(32'h7F80_0000, 32'hFF80_0000, 1);   // inf - -inf = inf
    check(32'hFF80_0000, 32'h4000_0000, 0);   // -inf + 2
    check(32'h4000_0000, 32'h7F80_0000, 1);   // 2 - inf
    check(32'h7FC0_0000, 32'h3F80_0000, 0);   // NaN operand
    for (int k = 0; k < 4000; k++) begin
      logic [31:0] x, y;
      x = rand_f32(100, 150);
      y = x;
      y[30:23] = 8'(int'(x[30:23]) + int'($urandom_range(2)) - 1);
      y[22:0] = (k % 2) ? 23'($urandom) : x[22:0] ^ 23'($urandom_range(255));
      check(x, y, 1'($urandom));
    end
    for (int k = 0; k < 4000; k++) check(rand_f32(110, 140), rand_f32(110, 140), 1'($urandom));
    for (int k = 0; k < 4000; k++) check(rand_f32(0, 255), rand_f32(0, 255), 1'($urandom));
    $display("normalise left: %0d, carry out: %0d", n_left, n_carry);
    if (n_left == 0 || n_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
