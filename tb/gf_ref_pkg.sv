// Reference arithmetic for the testbenches, written independently of the
// RTL's structure.
//   clmul        carry-less product by shift-and-add over the bits of b
//   pb_mulmod    GF(2^233) product, x^233 + x^74 + 1, by the bit-serial
//                interleaved method (multiply by x and reduce after each bit)
//   pb_reduce    reduction of a 465-bit polynomial by repeated subtraction
//   onb_mul      GF(2^233) product in the type-II optimal normal basis,
//                computed in the ring GF(2)[g]/(g^467 - 1): beta_i maps to
//                g^e + g^-e with e = 2^i mod 467, the images are multiplied
//                as cyclic polynomials, a g^0 term is replaced by the sum of
//                all other powers (1 + g + ... + g^466 = 0 for the field's
//                gamma), and the coordinate of beta_i is read at g^e.
//   rand_elem    a random 233-bit word
package gf_ref_pkg;

  localparam int unsigned M = 233;
  localparam int unsigned K = 74;
  localparam int unsigned P = 2*M + 1;

  function automatic logic [479:0] clmul(input logic [239:0] a, input logic [239:0] b);
    logic [479:0] acc = '0;
    for (int i = 0; i < 240; i++)
      if (b[i]) acc ^= ({240'b0, a} << i);
    return acc;
  endfunction

  function automatic logic [M-1:0] pb_mulmod(input logic [M-1:0] a, input logic [M-1:0] b);
    logic [M-1:0] r = '0;
    logic top;
    for (int i = M-1; i >= 0; i--) begin
      top = r[M-1];
      r = r << 1;
      if (top) begin
        r[0] ^= 1'b1;
        r[K] ^= 1'b1;
      end
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  function automatic logic [M-1:0] pb_reduce(input logic [2*M-2:0] d);
    logic [2*M-2:0] t = d;
    logic [2*M-2:0] f;
    f = '0;
    f[M] = 1'b1; f[K] = 1'b1; f[0] = 1'b1;
    for (int s = M-2; s >= 0; s--)
      if (t[M+s]) t ^= (f << s);
    return t[M-1:0];
  endfunction

  function automatic logic [M-1:0] onb_mul(input logic [M-1:0] a, input logic [M-1:0] b);
    logic [P-1:0] va = '0, vb = '0, w = '0;
    logic [M-1:0] r;
    int unsigned e [M];
    e[0] = 1;
    for (int i = 1; i < M; i++) e[i] = (2*e[i-1]) % P;
    for (int i = 0; i < M; i++) begin
      va[e[i]] ^= a[i]; va[P-e[i]] ^= a[i];
      vb[e[i]] ^= b[i]; vb[P-e[i]] ^= b[i];
    end
    for (int k = 0; k < P; k++)
      if (vb[k]) w ^= (k == 0) ? va : ((va << k) | (va >> (P-k)));
    if (w[0]) w = ~w;          // g^0 = g^1 + ... + g^466; clears w[0] too
    for (int i = 0; i < M; i++) r[i] = w[e[i]];
    return r;
  endfunction

  function automatic logic [M-1:0] rand_elem();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[32*i +: 32] = $urandom;
    return r[M-1:0];
  endfunction

endpackage
