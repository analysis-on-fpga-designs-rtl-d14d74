// Hybrid Karatsuba GF(2^m) multiplier (polynomial basis, f = x^m + x^k + 1).
//
// The operands are zero-extended to 3*NP = 240 bits and multiplied with a
// 6-coefficient Karatsuba scheme built from two small ones: a 3-term
// Karatsuba step over 80-bit pieces on top, and a 2-term step inside each
// 80-bit multiplier, whose three 40-bit products use the school method.
// The top step needs six 80-bit products; three 80-bit multipliers each
// compute two of them, in consecutive cycles:
//   cycle 1  A0*B0, A1*B1, A2*B2                  (plain pieces)
//   cycle 2  (A0+A1)(B0+B1), (A0+A2)(B0+B2), (A1+A2)(B1+B2)
// 80-bit adders form the operand sums. The overlap circuit XORs the six
// products into the 2m-1 coefficient product, which is registered and then
// reduced by the modular reducer into c.
//
// Interface, shared with the other two multipliers: a start pulse with a and
// b while ready is high; done pulses when c holds the product, 7 cycles
// after the start cycle. A new start is accepted every second cycle (ready is
// low for one cycle after a start); c holds until the next result.
// The decomposition (3 x 80-bit multipliers used twice, 2-term Karatsuba
// over 40-bit school multipliers, control and overlap circuits, reducer)
// follows the design; the pipeline depths and the handshake are this
// implementation's choices.
module gf233_karatsuba_mul
#(
  parameter int unsigned MM = gf233_pkg::M,
  parameter int unsigned KK = gf233_pkg::K,
  parameter int unsigned NP = 80          // piece width, 3*NP >= MM, even
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
  localparam int unsigned W   = 3*NP;    // padded operand width
  localparam int unsigned LAT = 3;       // latency of kara80
  localparam int unsigned PW  = 2*NP-1;  // width of one piece product

  logic issue_lo, issue_mid, cap_lo, cap_mid, red_en;

  kara_ctrl #(.LAT(LAT)) u_ctrl (
    .clk, .rst_n, .start, .ready, .issue_lo, .issue_mid,
    .cap_lo, .cap_mid, .red_en, .done
  );

  // operand registers, zero-extended to 3 pieces
  logic [W-1:0] a_q, b_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (start && ready) begin
      a_q <= W'(a);
      b_q <= W'(b);
    end
  end

  // 80-bit adders for the operand sums
  logic [NP-1:0] a01, a02, a12, b01, b02, b12;
  gf2_add #(.W(NP)) u_a01 (.x(a_q[0+:NP]),  .y(a_q[NP+:NP]),   .s(a01));
  gf2_add #(.W(NP)) u_a02 (.x(a_q[0+:NP]),  .y(a_q[2*NP+:NP]), .s(a02));
  gf2_add #(.W(NP)) u_a12 (.x(a_q[NP+:NP]), .y(a_q[2*NP+:NP]), .s(a12));
  gf2_add #(.W(NP)) u_b01 (.x(b_q[0+:NP]),  .y(b_q[NP+:NP]),   .s(b01));
  gf2_add #(.W(NP)) u_b02 (.x(b_q[0+:NP]),  .y(b_q[2*NP+:NP]), .s(b02));
  gf2_add #(.W(NP)) u_b12 (.x(b_q[NP+:NP]), .y(b_q[2*NP+:NP]), .s(b12));

  // operand selection: plain pieces in the issue_lo cycle, sums otherwise
  logic [NP-1:0] ma [3], mb [3];
  logic [PW-1:0] mp [3];
  always_comb begin
    if (issue_mid) begin
      ma[0] = a01; mb[0] = b01;
      ma[1] = a02; mb[1] = b02;
      ma[2] = a12; mb[2] = b12;
    end else begin
      for (int i = 0; i < 3; i++) begin
        ma[i] = a_q[i*NP +: NP];
        mb[i] = b_q[i*NP +: NP];
      end
    end
  end

  for (genvar i = 0; i < 3; i++) begin : g_k80
    kara80 #(.N(NP)) u_k80 (.clk(clk), .a(ma[i]), .b(mb[i]), .p(mp[i]));
  end

  // plain products wait one cycle for the sum products
  logic [PW-1:0] lo_q [3];
  always_ff @(posedge clk) begin
    if (cap_lo) lo_q <= mp;
  end

  logic [2*W-2:0]  full;
  logic [2*MM-2:0] prod_q;
  logic [MM-1:0]   red;

  kara_overlap #(.NP(NP)) u_ovl (
    .p0(lo_q[0]), .p1(lo_q[1]), .p2(lo_q[2]),
    .p01(mp[0]), .p02(mp[1]), .p12(mp[2]),
    .c(full)
  );

  gf2m_reduce #(.M(MM), .K(KK)) u_red (.d(prod_q), .r(red));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
      c      <= '0;
    end else begin
      // coefficients above 2m-2 of a product of two degree < m operands are 0
      if (cap_mid) prod_q <= full[2*MM-2:0];
      if (red_en)  c      <= red;
    end
  end

  // the sum operands are read in the cycle after the start was accepted
  a_start_rate: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> ready);
endmodule
