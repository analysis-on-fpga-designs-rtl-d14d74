// Classical GF(2^m) multiplier: school-method polynomial multiplier followed
// by the modular reducer for x^m + x^k + 1.
//
// Pipeline (three register stages, one new operation accepted every cycle):
//   stage 1  operand registers a_q, b_q
//   stage 2  the (2m-1)-coefficient polynomial product of a_q and b_q
//   stage 3  that product reduced modulo f(x), presented on c
// A start pulse with a and b in cycle t gives done = 1 and the result on c
// in cycle t+3. ready is always 1; c holds its value until the next result.
// The split into a multiplier and a reducer follows the design; the places
// of the pipeline registers and the start/ready/done handshake, shared by
// all three multipliers, are this implementation's choices.
module gf233_classical_mul
#(
  parameter int unsigned MM = gf233_pkg::M,
  parameter int unsigned KK = gf233_pkg::K
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [MM-1:0] a,
  input  logic [MM-1:0] b,
  output logic          ready,
  output logic          done,
  output logic [MM-1:0] c
);
  logic [MM-1:0]   a_q, b_q;
  logic [2*MM-2:0] prod, prod_q;
  logic [MM-1:0]   red;
  logic [2:0]      v_q;   // valid bits of the three stages

  gf2_poly_mul #(.NA(MM), .NB(MM)) u_pmul (.a(a_q), .b(b_q), .c(prod));
  gf2m_reduce  #(.M(MM), .K(KK))   u_red  (.d(prod_q), .r(red));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q    <= '0;
      a_q    <= '0;
      b_q    <= '0;
      prod_q <= '0;
      c      <= '0;
    end else begin
      v_q <= {v_q[1:0], start};
      if (start)  begin a_q <= a; b_q <= b; end
      if (v_q[0]) prod_q <= prod;
      if (v_q[1]) c      <= red;
    end
  end

  assign ready = 1'b1;
  assign done  = v_q[2];
endmodule
