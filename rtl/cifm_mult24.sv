// cifm_mult24: 24x24-bit unsigned mantissa multiplier (CIFM).
//
// The operands are split into 12-bit halves AH/AL and BH/BL. Four 12x12
// modules compute AH*BH, AH*BL, AL*BH and AL*BL in parallel, each enabled by
// the checkers only when both of its halves are non-zero. The product is then
// assembled as in the block diagram:
//   P[11:0]  = (AL*BL)[11:0], taken directly;
//   ADDER 2  = (AL*BL)[23:12] + AH*BL + AL*BH + (AH*BH)[11:0] << 12, giving
//              P[35:12] and a 2-bit carry;
//   ADDER 1  = (AH*BH)[23:12] + carry, giving P[47:36].
// The operand split and the two-adder output assembly follow the document;
// the zero-test checkers are this design's reading. Purely combinational.
module cifm_mult24 (
  input  logic [23:0] a,
  input  logic [23:0] b,
  output logic [47:0] p
);

  logic a_hi_nz, a_lo_nz, b_hi_nz, b_lo_nz;
  logic [23:0] p_hh, p_hl, p_lh, p_ll;   // AH*BH, AH*BL, AL*BH, AL*BL
  logic [25:0] adder2;
  logic [11:0] adder1;

  cifm_checker #(.HALF_W(12)) u_chk_a (.x(a), .hi_nz(a_hi_nz), .lo_nz(a_lo_nz));
  cifm_checker #(.HALF_W(12)) u_chk_b (.x(b), .hi_nz(b_hi_nz), .lo_nz(b_lo_nz));

  mult12x12_cifm u_hh (.en(a_hi_nz & b_hi_nz), .a(a[23:12]), .b(b[23:12]), .p(p_hh));
  mult12x12_cifm u_hl (.en(a_hi_nz & b_lo_nz), .a(a[23:12]), .b(b[11:0]),  .p(p_hl));
  mult12x12_cifm u_lh (.en(a_lo_nz & b_hi_nz), .a(a[11:0]),  .b(b[23:12]), .p(p_lh));
  mult12x12_cifm u_ll (.en(a_lo_nz & b_lo_nz), .a(a[11:0]),  .b(b[11:0]),  .p(p_ll));

  always_comb begin
    adder2 = 26'(p_ll[23:12]) + 26'(p_hl) + 26'(p_lh) + 26'({p_hh[11:0], 12'b0});
    adder1 = p_hh[23:12] + 12'(adder2[25:24]);
    p      = {adder1, adder2[23:0], p_ll[11:0]};
  end

endmodule
