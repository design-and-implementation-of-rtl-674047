// mult4x4_opt: 4x4-bit unsigned multiplier, the leaf cell of the CIFM
// mantissa multiplier.
//
// The four partial products pp_k = a & {4{b[k]}} are summed in three levels:
//   level 1: adjoining partial products are paired,
//            s01 = pp0 + (pp1 << 1) and s23 = pp2 + (pp3 << 1) (6 bits each);
//   level 2: block 5 adds the overlapping bits, s01[5:2] + s23[3:0];
//            block 6 holds the upper two bits of the second pair, s23[5:4];
//   level 3: block 5's carry is added into block 6 to give p[7:6].
// p[1:0] come straight from s01[1:0] and p[5:2] from block 5.
// The three-level pairing follows the description of the optimised 4x4
// multiplier; the exact split into blocks 5 and 6 is this design's reading.
// Purely combinational.
module mult4x4_opt (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [3:0] pp [4];
  logic [5:0] s01, s23;      // level 1
  logic [4:0] blk5;          // level 2
  logic [1:0] blk6;

  always_comb begin
    for (int k = 0; k < 4; k++) pp[k] = a & {4{b[k]}};
    s01  = {2'b00, pp[0]} + {1'b0, pp[1], 1'b0};
    s23  = {2'b00, pp[2]} + {1'b0, pp[3], 1'b0};
    blk5 = {1'b0, s01[5:2]} + {1'b0, s23[3:0]};
    blk6 = s23[5:4];
    p    = {blk6 + {1'b0, blk5[4]}, blk5[3:0], s01[1:0]};
  end

endmodule
