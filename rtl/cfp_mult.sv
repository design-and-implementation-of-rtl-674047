// cfp_mult: single-precision complex floating-point multiplier (top level).
//
// For a = ar + j*ai and b = br + j*bi it computes
//   rout = ar*br - ai*bi   (real part)
//   iout = ar*bi + ai*br   (imaginary part)
// with the four-real-multiplier organisation: four fp_mult32 units form the
// partial products in parallel, one fp_addsub32 set to subtract gives the real
// part and one set to add gives the imaginary part. Each fp_mult32 uses the
// CIFM 24x24 mantissa multiplier. The four intermediate products are also
// brought out (arbr, aibi, arbi, aibr), as they appear in the reference
// simulation of the design.
// Every operation is rounded to nearest-even single precision, so
// rout = round(round(ar*br) - round(ai*bi)), and likewise for iout.
// The design is purely combinational: results are valid one propagation delay
// after the inputs change. No clock, reset or handshake.
module cfp_mult (
  input  logic [31:0] ar,
  input  logic [31:0] ai,
  input  logic [31:0] br,
  input  logic [31:0] bi,
  output logic [31:0] rout,
  output logic [31:0] iout,
  output logic [31:0] arbr,
  output logic [31:0] aibi,
  output logic [31:0] arbi,
  output logic [31:0] aibr
);

  import cfp_pkg::*;

  fp32_t p_arbr, p_aibi, p_arbi, p_aibr, p_re, p_im;

  fp_mult32 u_mul_arbi (.a(fp32_t'(ar)), .b(fp32_t'(bi)), .p(p_arbi));
  fp_mult32 u_mul_aibr (.a(fp32_t'(ai)), .b(fp32_t'(br)), .p(p_aibr));
  fp_mult32 u_mul_arbr (.a(fp32_t'(ar)), .b(fp32_t'(br)), .p(p_arbr));
  fp_mult32 u_mul_aibi (.a(fp32_t'(ai)), .b(fp32_t'(bi)), .p(p_aibi));

  fp_addsub32 u_add_im (.a(p_arbi), .b(p_aibr), .sub(1'b0), .s(p_im));
  fp_addsub32 u_sub_re (.a(p_arbr), .b(p_aibi), .sub(1'b1), .s(p_re));

  assign rout = p_re;
  assign iout = p_im;
  assign arbr = p_arbr;
  assign aibi = p_aibi;
  assign arbi = p_arbi;
  assign aibr = p_aibr;

endmodule
