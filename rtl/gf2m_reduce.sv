// Modular reducer for GF(2^M) with a trinomial f(x) = x^M + x^K + 1.
//
// Takes an unreduced product of 2M-1 coefficients and returns it modulo f.
// Since x^M = x^K + 1, every coefficient d >= M is folded onto d-M+K and
// d-M. Folding from the top coefficient downwards lets a term that lands at
// or above M again be folded later in the same pass, because d-M+K < d. The
// loop unrolls into a fixed XOR network; each result
// bit is the XOR of at most a few input bits, so the reducer is shallow.
// Combinational. Defaults: x^233 + x^74 + 1.
module gf2m_reduce #(
  parameter int unsigned M = 233,
  parameter int unsigned K = 74
) (
  input  logic [2*M-2:0] d,
  output logic [M-1:0]   r
);
  logic [2*M-2:0] t;
  always_comb begin
    t = d;
    for (int i = 2*M-2; i >= int'(M); i--) begin
      t[i-M+K] = t[i-M+K] ^ t[i];
      t[i-M]   = t[i-M] ^ t[i];
    end
    r = t[M-1:0];
  end
endmodule
