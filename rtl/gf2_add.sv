// GF(2) polynomial adder: the sum of two polynomials over GF(2) is the
// bitwise XOR of their coefficient vectors. This is the "40-bit adder" and
// "80-bit adder" of the hybrid Karatsuba multiplier (W = 40 or 80); it forms
// the operand sums A_L + A_H of a Karatsuba step and combines the partial
// products. Purely combinational, no carries, one gate level.
module gf2_add #(
  parameter int unsigned W = 40
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);
  assign s = x ^ y;
endmodule
