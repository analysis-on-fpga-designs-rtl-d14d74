// Shared constants, types and elaboration-time functions of the GF(2^233)
// multipliers.
//
// The field is GF(2^233). Polynomial-basis elements are reduced modulo the
// trinomial f(x) = x^233 + x^74 + 1, the field and polynomial the design is
// built for. Normal-basis elements use the type-II optimal normal basis of
// GF(2^233), which exists because p = 2*233+1 = 467 is prime and 2 is a
// primitive root modulo 467. The basis element beta_i is gamma^(2^i) +
// gamma^(-2^i), gamma a primitive 467th root of unity; bit i of a word is the
// coordinate of beta_i.
//
// onb2_pairs() computes the nonzero entries of the multiplication matrix M_0
// of that basis (c_0 = a * M_0 * b^T). Entry (i,j) is 1 when beta_i*beta_j
// contains beta_0, that is when 2^i +- 2^j = +-1 (mod p). Row 0 has one entry
// and every other row two, so there are C_N = 2m-1 of them. Each pair is
// packed as {i[15:0], j[15:0]}.
package gf233_pkg;

  localparam int unsigned M  = 233;  // extension degree
  localparam int unsigned K  = 74;   // middle term of x^M + x^K + 1
  localparam int unsigned P2 = 2*M-1; // coefficients of an unreduced product

  typedef logic [M-1:0]  elem_t;  // one field element
  typedef logic [P2-1:0] dprod_t; // unreduced double-length product

  localparam int unsigned MAXM = 512; // largest degree onb2_pairs() handles

  // Pair list of M_0 for the type-II ONB of GF(2^mm): 2*mm-1 pairs of 16-bit
  // indices, pair t in bits [32*t +: 32]. mm must be below MAXM.
  function automatic logic [2*(2*MAXM-1)*16-1:0] onb2_pairs(input int unsigned mm);
    logic [2*(2*MAXM-1)*16-1:0] r;
    int unsigned p, e, t, v;
    int unsigned lg [0:2*MAXM];
    int unsigned pw [0:MAXM-1];
    r = '0;
    p = 2*mm + 1;
    for (int k = 0; k <= 2*MAXM; k++) lg[k] = 0;
    e = 1;
    for (int unsigned j = 0; j < mm; j++) begin
      pw[j]   = e;
      lg[e]   = j;
      lg[p-e] = j;
      e = (2*e) % p;
    end
    t = 0;
    for (int unsigned i = 0; i < mm; i++) begin
      // candidate partners j: 2^j = +-(2^i + 1) or +-(2^i - 1)
      v = (pw[i] + 1) % p;
      if (v != 0) begin
        r[32*t +: 32] = {i[15:0], lg[v][15:0]};
        t++;
      end
      v = (pw[i] + p - 1) % p;
      if (v != 0) begin
        r[32*t +: 32] = {i[15:0], lg[v][15:0]};
        t++;
      end
    end
    return r;
  endfunction

endpackage
