// Overlap circuit of the hybrid Karatsuba multiplier.
//
// The operands are split into three NP-bit pieces, A = A2*x^(2NP) +
// A1*x^NP + A0 (NP = 80), and the six piece products come from the 80-bit
// multipliers:
//   p0 = A0B0, p1 = A1B1, p2 = A2B2,
//   p01 = (A0+A1)(B0+B1), p02 = (A0+A2)(B0+B2), p12 = (A1+A2)(B1+B2).
// The 3-term Karatsuba formula puts them together:
//   C = p2*x^(4NP) + (p12+p1+p2)*x^(3NP) + (p02+p0+p1+p2)*x^(2NP)
//     + (p01+p0+p1)*x^NP + p0.
// Each product is 2NP-1 coefficients long, so neighbouring terms share
// coefficients; this block XORs all overlapping powers into the full
// 6NP-1 coefficient product. Combinational. The formula is the 3-term
// Karatsuba method the design names; the grouping into one block follows
// its "overlap circuit".
module kara_overlap #(
  parameter int unsigned NP = 80
) (
  input  logic [2*NP-2:0] p0,
  input  logic [2*NP-2:0] p1,
  input  logic [2*NP-2:0] p2,
  input  logic [2*NP-2:0] p01,
  input  logic [2*NP-2:0] p02,
  input  logic [2*NP-2:0] p12,
  output logic [6*NP-2:0] c
);
  logic [2*NP-2:0] t1, t2, t3;
  always_comb begin
    t1 = p01 ^ p0 ^ p1;
    t2 = p02 ^ p0 ^ p1 ^ p2;
    t3 = p12 ^ p1 ^ p2;
    c  = '0;
    c[0      +: 2*NP-1] = c[0      +: 2*NP-1] ^ p0;
    c[NP     +: 2*NP-1] = c[NP     +: 2*NP-1] ^ t1;
    c[2*NP   +: 2*NP-1] = c[2*NP   +: 2*NP-1] ^ t2;
    c[3*NP   +: 2*NP-1] = c[3*NP   +: 2*NP-1] ^ t3;
    c[4*NP   +: 2*NP-1] = c[4*NP   +: 2*NP-1] ^ p2;
  end
endmodule
