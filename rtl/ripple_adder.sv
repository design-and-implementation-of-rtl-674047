// ripple_adder: W-bit ripple-carry adder, used for the exponent sum of the
// real multiplier.
//
// A chain of W full adders; bit k's carry out is bit k+1's carry in, so the
// delay grows linearly with W. s = a + b + cin modulo 2^W, cout is the carry
// out of the top bit. The ripple structure follows the real multiplier's
// block diagram, which names an 8-bit ripple adder for the exponents.
// Purely combinational.
module ripple_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;
  for (genvar k = 0; k < W; k++) begin : g_fa
    assign s[k]   = a[k] ^ b[k] ^ c[k];
    assign c[k+1] = (a[k] & b[k]) | (c[k] & (a[k] ^ b[k]));
  end
  assign cout = c[W];

endmodule
