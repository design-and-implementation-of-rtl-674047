// cifm_checker: control-signal generator of the CIFM 24x24 multiplier.
//
// One checker watches each mantissa operand and reports, per 12-bit half,
// whether that half holds any one bit. The CIFM multiplier enables a 12x12
// partial multiplier only when both of its operand halves are non-zero; a
// disabled module outputs zero, which is also its exact product, so the
// checkers save switching without changing the result. The document names the
// checkers as control signals for the multiplier; the zero test is this
// design's reading of what they check. Combinational.
module cifm_checker #(
  parameter int unsigned HALF_W = 12
) (
  input  logic [2*HALF_W-1:0] x,
  output logic                hi_nz,
  output logic                lo_nz
);

  assign hi_nz = |x[2*HALF_W-1:HALF_W];
  assign lo_nz = |x[HALF_W-1:0];

endmodule
