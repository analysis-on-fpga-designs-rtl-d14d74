// Pipelined 40x40-bit school-method polynomial multiplier over GF(2), the
// "40-bit multiplier" at the bottom of the hybrid Karatsuba multiplier.
//
// The product a*b (79 coefficients) is computed in two pipeline stages:
//   stage 1  a times the low half of b and a times the high half of b, two
//            independent school-method partial products, registered;
//   stage 2  the two partial products added with the high one shifted by
//            N/2 positions, registered on p.
// A new operand pair is accepted every cycle; p belongs to the operands
// presented two cycles earlier. There is no valid signal: the control
// circuit of the Karatsuba multiplier knows the latency. The school method
// at this size follows the design; the two-stage split is this
// implementation's choice. N must be even.
module kara_mul40 #(
  parameter int unsigned N = 40
) (
  input  logic           clk,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] p
);
  localparam int unsigned H = N/2;
  logic [N+H-2:0] pl, ph, pl_q, ph_q;

  gf2_poly_mul #(.NA(N), .NB(H)) u_lo (.a(a), .b(b[H-1:0]), .c(pl));
  gf2_poly_mul #(.NA(N), .NB(H)) u_hi (.a(a), .b(b[N-1:H]), .c(ph));

  always_ff @(posedge clk) begin
    pl_q <= pl;
    ph_q <= ph;
    p    <= {{H{1'b0}}, pl_q} ^ {ph_q, {H{1'b0}}};
  end
endmodule
