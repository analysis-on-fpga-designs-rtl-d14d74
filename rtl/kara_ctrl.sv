// Control circuit of the hybrid Karatsuba multiplier.
//
// The six 80-bit products of one multiplication are shared out over the
// three pipelined 80-bit multipliers in two consecutive cycles: first the
// three plain products (A0*B0, A1*B1, A2*B2), then the three products of
// operand sums. The controller is a shift register of start tokens; each tap
// is the strobe of one step, so several multiplications can be in flight
// and every multiplier is busy in every other cycle under full load.
// With a start accepted in cycle t (start & ready), the strobes are:
//   issue_lo   t+1         plain operand pieces go to the multipliers
//   issue_mid  t+2         operand sums go to the multipliers
//   cap_lo     t+1+LAT     plain products leave the multipliers, captured
//   cap_mid    t+2+LAT     sum products leave; overlap circuit output stored
//   red_en     t+3+LAT     reduced result stored on c
//   done       t+4+LAT     result valid
// ready is low in the cycle after an accepted start, when the multipliers
// would otherwise be claimed twice; the rate is one multiplication every two
// cycles. LAT is the latency of an 80-bit multiplier. The design says only
// that the control circuit starts the multipliers at suitable times and
// times the adders; the token shift register is this implementation's.
module kara_ctrl #(
  parameter int unsigned LAT = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic ready,
  output logic issue_lo,
  output logic issue_mid,
  output logic cap_lo,
  output logic cap_mid,
  output logic red_en,
  output logic done
);
  localparam int unsigned LEN = LAT + 4;
  logic [LEN-1:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= '0;
    else        sh <= {sh[LEN-2:0], start & ready};
  end

  assign ready     = ~sh[0];
  assign issue_lo  = sh[0];
  assign issue_mid = sh[1];
  assign cap_lo    = sh[LAT];
  assign cap_mid   = sh[LAT+1];
  assign red_en    = sh[LAT+2];
  assign done      = sh[LAT+3];

  // a start is only taken when ready; the multipliers are never claimed twice
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(issue_lo && issue_mid));
endmodule
