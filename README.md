# Parallel GF(2^233) multipliers: classical, hybrid Karatsuba and Massey-Omura

Multiplication in the binary field GF(2^233) is the costly operation of
elliptic-curve cryptography over the NIST field of that size. This RTL holds
three fully or semi-parallel hardware multipliers for it, built for FPGA
speed with pipelining, and interchangeable behind one handshake:

| multiplier | basis | idea | latency | rate |
|---|---|---|---|---|
| classical (`gf233_classical_mul`) | polynomial, f = x^233 + x^74 + 1 | school-method product, then reduction | 3 cycles | 1 per cycle |
| hybrid Karatsuba (`gf233_karatsuba_mul`) | polynomial, same f | 6-term Karatsuba from a 3-term step over a 2-term step, 40-bit school multipliers at the bottom | 7 cycles | 1 per 2 cycles |
| Massey-Omura (`gf233_mo_mul`) | type-II optimal normal basis | 117 identical XOR trees fed with rotated operands, two steps | 3 cycles | 1 per 2 cycles |

`gf233_mul_top` places the three side by side (ports prefixed `cl_`, `ka_`,
`mo_`). The structures follow a published FPGA study of these three
multipliers; pipeline depths, the handshake and reset are choices of this
implementation and are marked as such in each file's header.

## Common interface

`clk`, `rst_n` (asynchronous, active low), `start`, `a`, `b` (233 bits),
`ready`, `done`, `c`. Pulse `start` for one cycle with the operands while
`ready` is high; `done` is high for one cycle when `c` holds the product, and
`c` then holds until the next result. Results come back in order. A start
while `ready` is low is a protocol error (caught by an assertion in the
Karatsuba and Massey-Omura multipliers). Polynomial-basis words hold the
coefficient of x^i in bit i; normal-basis words hold the coordinate of
beta^(2^i) in bit i.

## Hybrid Karatsuba multiplier

This is the most involved of the three. The 233-bit operands are
zero-extended to 240 = 3 x 80 bits, A = A2 x^160 + A1 x^80 + A0.

**Top step, 3-term Karatsuba.** Six 80-bit products are needed:
p0 = A0B0, p1 = A1B1, p2 = A2B2, p01 = (A0+A1)(B0+B1), p02 = (A0+A2)(B0+B2),
p12 = (A1+A2)(B1+B2), and

    C = p2 x^320 + (p12+p1+p2) x^240 + (p02+p0+p1+p2) x^160 + (p01+p0+p1) x^80 + p0

There are only three 80-bit multipliers (`kara80`); each computes two of the
six products in consecutive cycles: the plain products first, then the
products of the operand sums (formed by 80-bit adders, `gf2_add`).

**80-bit multiplier, 2-term Karatsuba.** `kara80` splits each operand into
40-bit halves and uses three 40-bit multipliers for L = aL bL, H = aH bH and
Mid = (aL+aH)(bL+bH); a b = H x^80 + (Mid+L+H) x^40 + L. It is fully
pipelined (3 cycles) so it can take a new operand pair every cycle.

**40-bit multiplier.** `kara_mul40` is a school-method multiplier in two
pipeline stages: a times each 20-bit half of b, then the two partial products
combined. In total one multiplication uses 18 40x40 products on 9 physical
40-bit multipliers.

**Control circuit.** `kara_ctrl` is a shift register of start tokens. Its
taps time everything, counted from the cycle t in which a start is accepted:
plain pieces issued at t+1, sums at t+2, plain products captured at t+4, the
overlap circuit's output stored at t+5, the reduced result stored at t+6,
`done` at t+7. `ready` is low in the cycle after a start, because the
80-bit multipliers are then busy with the sums.

**Overlap circuit and reducer.** `kara_overlap` XORs the six products, which
overlap in 79 coefficients each, into the 465-coefficient product (the
formula above). `gf2m_reduce` then reduces it modulo x^233 + x^74 + 1.

## Massey-Omura multiplier

In a normal basis every coordinate of the product is the same bilinear form,
c_i = a^(i) M_0 b^(i)T, applied to both operands cyclically rotated by i. For
GF(2^233) a type-II optimal normal basis exists (467 = 2*233+1 is prime and 2
is a primitive root mod 467), so M_0 has only 2m-1 = 465 nonzero entries:
(i,j) with 2^i +- 2^j = +-1 mod 467. `gf233_pkg::onb2_pairs()` computes
them during elaboration; each `mo_xor_tree` is 465 AND gates and an XOR tree.

A fully parallel version needs 233 trees; this one has 117 and takes two
steps. Two `mo_cycshift` stages hold a and b and output them rotated by
0..116. In step 1 the trees yield c_0..c_116; the operand registers then load
the rotation by 117, and in step 2 the same trees yield c_117..c_232 (the
last tree's second result, c_233 = c_0, is dropped). The element 1 is the
all-ones word; squaring is a rotation by one place.

## Classical multiplier

`gf2_poly_mul` is a school-method multiplier with one XOR tree per product
coefficient (54289 AND gates at 233 bits); `gf2m_reduce` folds every
coefficient d >= 233 onto d-159 and d-233 (x^233 = x^74 + 1), from the top
down. `gf233_classical_mul` registers the operands, the unreduced product and
the result.

## Files

- `rtl/gf233_pkg.sv`: field constants, element types, the ONB matrix function
- `rtl/gf2_add.sv`, `rtl/gf2_poly_mul.sv`, `rtl/gf2m_reduce.sv`: shared arithmetic
- `rtl/gf233_classical_mul.sv`
- `rtl/kara_mul40.sv`, `rtl/kara80.sv`, `rtl/kara_ctrl.sv`, `rtl/kara_overlap.sv`, `rtl/gf233_karatsuba_mul.sv`
- `rtl/mo_cycshift.sv`, `rtl/mo_xor_tree.sv`, `rtl/gf233_mo_mul.sv`
- `rtl/gf233_mul_top.sv`
- `tb/tb_<module>.sv`: one self-checking testbench per module; `tb/gf_ref_pkg.sv`
  holds the reference arithmetic (shift-and-add products, bit-serial modular
  multiplication, and normal-basis multiplication through the embedding of
  the type-II ONB into GF(2)[g]/(g^467 - 1)), all independent of the RTL's
  structure.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=F`. Example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      rtl/gf233_pkg.sv tb/gf_ref_pkg.sv tb/tb_gf233_mul_top.sv \
      --top-module tb_gf233_mul_top
    ./obj_dir/Vtb_gf233_mul_top

`tb_gf233_mul_top` runs all three multipliers at full size concurrently and
checks results, latencies, full-rate issue (back-to-back for the classical
one, every second cycle for the others), reduction and use of the top 80-bit
piece. The C++ build of the full-size design is slow (several minutes,
dominated by the 233x233 combinational product and the 117 XOR trees);
simulation itself takes under a second.

## Departures and limits

- Register placement, latencies and the start/ready/done handshake are not
  taken from the source design, which only states that the multipliers share
  one interface and are heavily pipelined.
- The normal basis is assumed to be the type-II ONB; a different normal basis
  would need a different M_0 (only `onb2_pairs()` changes).
- The control circuit's internals (token shift register) are this design's.
- AND gates are not shared between symmetric entries of M_0, and the classical
  multiplier does not explicitly share XOR-tree shapes between c_i and
  c_(2n-2-i); synthesis may do either.
- Other field sizes: `MM`/`KK` are parameters, but the Karatsuba split needs
  3*NP >= MM and the Massey-Omura multiplier needs a type-II ONB of GF(2^MM).
- No timing, area or FPGA mapping results are claimed.
