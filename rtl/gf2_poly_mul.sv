// School-method polynomial multiplier over GF(2), combinational.
//
// Computes c(x) = a(x) * b(x) for a of degree < NA and b of degree < NB; the
// product has NA+NB-1 coefficients. Coefficient k is the XOR of all AND terms
// a_i & b_(k-i), i.e. one XOR tree per output bit, as in the coefficient
// table of the classical multiplier: NA*NB AND gates and, once synthesis
// balances each XOR, a tree of depth ceil(log2(min(NA,NB))). The defaults
// are the full 233x233 polynomial multiplier of the classical GF(2^233)
// multiplier; the hybrid Karatsuba multiplier uses it at 40x20 inside its
// pipelined 40-bit multiplier.
module gf2_poly_mul #(
  parameter int unsigned NA = 233,
  parameter int unsigned NB = 233
) (
  input  logic [NA-1:0]      a,
  input  logic [NB-1:0]      b,
  output logic [NA+NB-2:0]   c
);
  always_comb begin
    for (int k = 0; k < int'(NA+NB-1); k++) begin
      c[k] = 1'b0;
      // terms of row k: a_i * b_(k-i) for all i with both indices in range
      for (int i = 0; i < int'(NA); i++)
        if (k - i >= 0 && k - i < int'(NB))
          c[k] = c[k] ^ (a[i] & b[k-i]);
    end
  end
endmodule
