// mult12x12_cifm: 12x12-bit unsigned multiplier of the CIFM scheme.
//
// Each operand is cut into three 4-bit digits and the nine digit products are
// formed in parallel by mult4x4_opt cells. The product a_i*b_j carries weight
// 2^(4*(i+j)); the nine shifted products are summed in one combinational sum.
// When en (the checker's control signal) is low the output is zero.
// The split into 4x4 cells follows the document; how the nine products are
// added is this design's choice. Purely combinational.
module mult12x12_cifm (
  input  logic        en,
  input  logic [11:0] a,
  input  logic [11:0] b,
  output logic [23:0] p
);

  logic [7:0] dp [3][3];   // dp[i][j] = a digit i * b digit j

  for (genvar i = 0; i < 3; i++) begin : g_a
    for (genvar j = 0; j < 3; j++) begin : g_b
      mult4x4_opt u_m4 (
        .a (a[4*i +: 4]),
        .b (b[4*j +: 4]),
        .p (dp[i][j])
      );
    end
  end

  always_comb begin
    logic [23:0] acc;
    acc = '0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        acc = acc + (24'(dp[i][j]) << (4 * (i + j)));
    p = en ? acc : '0;
  end

endmodule
