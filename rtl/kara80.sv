// "karatsuba 80": an 80x80-bit polynomial multiplier over GF(2) built from
// one step of the 2-term Karatsuba formula on three 40-bit multipliers.
//
// With a = aH*x^40 + aL and b = bH*x^40 + bL:
//   L = aL*bL,  H = aH*bH,  Mid = (aL+aH)*(bL+bH)
//   a*b = H*x^80 + (Mid + L + H)*x^40 + L
// Two 40-bit adders form aL+aH and bL+bH, three pipelined 40-bit multipliers
// form L, H and Mid, and two 80-bit adders form Mid+L+H. The last step, the
// overlap of the three parts, is registered on p.
// Timing: fully pipelined, one operand pair per cycle, p (159 coefficients)
// valid three cycles after a and b (two in the 40-bit multipliers, one in
// the output register). The structure follows the design; the register
// placement is this implementation's choice.
module kara80 #(
  parameter int unsigned N = 80   // operand width, even; halves are N/2
) (
  input  logic           clk,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-2:0] p
);
  localparam int unsigned H = N/2;

  logic [H-1:0]   sa, sb;
  logic [2*H-2:0] pl, ph, pm, t1, mid;

  gf2_add #(.W(H)) u_adda (.x(a[H-1:0]), .y(a[N-1:H]), .s(sa));
  gf2_add #(.W(H)) u_addb (.x(b[H-1:0]), .y(b[N-1:H]), .s(sb));

  kara_mul40 #(.N(H)) u_mul_l (.clk(clk), .a(a[H-1:0]), .b(b[H-1:0]), .p(pl));
  kara_mul40 #(.N(H)) u_mul_h (.clk(clk), .a(a[N-1:H]), .b(b[N-1:H]), .p(ph));
  kara_mul40 #(.N(H)) u_mul_m (.clk(clk), .a(sa),       .b(sb),       .p(pm));

  gf2_add #(.W(2*H-1)) u_add1 (.x(pm), .y(pl), .s(t1));
  gf2_add #(.W(2*H-1)) u_add2 (.x(t1), .y(ph), .s(mid));

  always_ff @(posedge clk) begin
    p <= {ph, 1'b0, pl} ^ {{H{1'b0}}, mid, {H{1'b0}}};
  end
endmodule
