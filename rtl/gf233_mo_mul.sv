// Semi-parallel Massey-Omura multiplier for GF(2^m) in the type-II optimal
// normal basis (m = 233).
//
// A fully parallel Massey-Omura multiplier needs m identical XOR trees, one
// per result coordinate. This one has ND = ceil(m/2) = 117 trees and takes
// two steps. Two cycshift stages hold a and b and present them rotated left
// by 0 ... ND-1; tree n, fed with rotation n of both operands, yields c_n.
// In step 1 the trees give c_0 ... c_(ND-1), which are stored; the operand
// registers then take rotation ND (their last output rotated once more), and
// in step 2 the same trees give c_ND ... c_(2ND-1), of which the first m-ND
// complete the result (for odd m the last tree's second output is c_m = c_0
// and is dropped).
// Interface, shared with the other two multipliers: start with a and b while
// ready is high; done pulses 3 cycles after the start cycle with the product
// on c, which holds until the next result. ready is low during step 1, so a
// new multiplication can start every second cycle. Bit i of a, b and c is
// the coordinate of beta^(2^i). The two-step organisation, the cycshift
// stages with feedback and the 117 trees follow the design; the handshake
// and the output register are this implementation's choices.
module gf233_mo_mul
#(
  parameter int unsigned MM = gf233_pkg::M,
  parameter int unsigned ND = (MM + 1) / 2
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
  typedef enum logic [1:0] {IDLE, STEP1, STEP2} state_t;
  state_t st;

  logic load, step;
  logic [ND-1:0][MM-1:0] ra, rb;
  logic [ND-1:0]         tc;    // outputs of the XOR trees
  logic [ND-1:0]         c_lo;  // first half of the result

  assign ready = (st != STEP1);
  assign load  = start && ready;
  assign step  = (st == STEP1);

  mo_cycshift #(.M(MM), .ND(ND)) u_csa (.clk, .rst_n, .load, .step, .d(a), .rot(ra));
  mo_cycshift #(.M(MM), .ND(ND)) u_csb (.clk, .rst_n, .load, .step, .d(b), .rot(rb));

  for (genvar n = 0; n < ND; n++) begin : g_tree
    mo_xor_tree #(.M(MM)) u_xt (.a(ra[n]), .b(rb[n]), .c(tc[n]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= IDLE;
      c_lo <= '0;
      c    <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE:  if (load) st <= STEP1;
        STEP1: begin
          c_lo <= tc;
          st   <= STEP2;
        end
        STEP2: begin
          c    <= {tc[MM-ND-1:0], c_lo};
          done <= 1'b1;
          st   <= load ? STEP1 : IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  a_start_rate: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> ready);
endmodule
