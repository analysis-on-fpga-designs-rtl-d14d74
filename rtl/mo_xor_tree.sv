// One XOR tree of the Massey-Omura multiplier.
//
// For rotated operands a^(i) and b^(i) (both rotated left by i) it returns
// coordinate c_i = a^(i) * M_0 * b^(i)T of the normal-basis product, where
// M_0 is the multiplication matrix of the type-II optimal normal basis of
// GF(2^M). M_0 has C_N = 2M-1 nonzero entries, so the tree is C_N two-input
// AND gates feeding a balanced XOR tree of depth ceil(log2(C_N)) (9 levels
// for M = 233). The same tree, fed with different rotations, produces every
// coordinate. Combinational. The structure is the design's; the entries of
// M_0 are computed at elaboration by gf233_pkg::onb2_pairs().
module mo_xor_tree
  import gf233_pkg::MAXM, gf233_pkg::onb2_pairs;
#(
  parameter int unsigned M = 233
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         c
);
  localparam int unsigned CN = 2*M - 1;
  localparam logic [2*(2*MAXM-1)*16-1:0] PAIRS = onb2_pairs(M);

  // one AND gate per nonzero entry of M_0, all XORed together
  logic [CN-1:0] terms;
  always_comb begin
    for (int t = 0; t < CN; t++)
      terms[t] = a[PAIRS[32*t+16 +: 16]] & b[PAIRS[32*t +: 16]];
  end
  assign c = ^terms;
endmodule
