// Three parallel GF(2^233) multipliers side by side, each with the same
// start/ready/done interface so that they are interchangeable:
//   cl_*  classical multiplier, polynomial basis (x^233 + x^74 + 1),
//         latency 3 cycles, one operation per cycle
//   ka_*  hybrid Karatsuba multiplier, polynomial basis (same f(x)),
//         latency 7 cycles, one operation every 2 cycles
//   mo_*  semi-parallel Massey-Omura multiplier, type-II optimal normal
//         basis, latency 3 cycles, one operation every 2 cycles
// Each has its own operands and result. A start must be given only while
// the matching ready is high; done marks the cycle the result appears on c,
// which then holds until the next result. Clock and active-low asynchronous
// reset are shared. The three multipliers and their common interface follow
// the design; bringing all three into one top is this implementation's way
// of offering them together.
module gf233_mul_top #(
  parameter int unsigned MM = gf233_pkg::M,
  parameter int unsigned KK = gf233_pkg::K
) (
  input  logic          clk,
  input  logic          rst_n,
  // classical
  input  logic          cl_start,
  input  logic [MM-1:0] cl_a,
  input  logic [MM-1:0] cl_b,
  output logic          cl_ready,
  output logic          cl_done,
  output logic [MM-1:0] cl_c,
  // hybrid Karatsuba
  input  logic          ka_start,
  input  logic [MM-1:0] ka_a,
  input  logic [MM-1:0] ka_b,
  output logic          ka_ready,
  output logic          ka_done,
  output logic [MM-1:0] ka_c,
  // Massey-Omura
  input  logic          mo_start,
  input  logic [MM-1:0] mo_a,
  input  logic [MM-1:0] mo_b,
  output logic          mo_ready,
  output logic          mo_done,
  output logic [MM-1:0] mo_c
);
  gf233_classical_mul #(.MM(MM), .KK(KK)) u_cl (
    .clk, .rst_n, .start(cl_start), .a(cl_a), .b(cl_b),
    .ready(cl_ready), .done(cl_done), .c(cl_c)
  );

  gf233_karatsuba_mul #(.MM(MM), .KK(KK)) u_ka (
    .clk, .rst_n, .start(ka_start), .a(ka_a), .b(ka_b),
    .ready(ka_ready), .done(ka_done), .c(ka_c)
  );

  gf233_mo_mul #(.MM(MM)) u_mo (
    .clk, .rst_n, .start(mo_start), .a(mo_a), .b(mo_b),
    .ready(mo_ready), .done(mo_done), .c(mo_c)
  );
endmodule
