// cycshift stage of the semi-parallel Massey-Omura multiplier.
//
// An operand register followed by a fan of cyclic rotations: output n is the
// register contents rotated left by n positions, rot[n][i] = q[(i+n) mod M],
// i.e. output n is output n-1 rotated by one more bit. There are ND outputs
// (117 for m = 233, half of the coordinates rounded up).
// load stores d. step stores the register rotated by ND, which is the last
// output rotated once more, so the next cycle's outputs carry rotations
// ND ... 2*ND-1 for the second half of the result.
// Timing: outputs change on the clock edge after load or step. The rotation
// fan and the feedback through the operand register follow the design; the
// load/step controls are this implementation's.
module mo_cycshift #(
  parameter int unsigned M  = 233,
  parameter int unsigned ND = (M + 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic                 step,
  input  logic [M-1:0]         d,
  output logic [ND-1:0][M-1:0] rot
);
  logic [M-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
    else if (step) q <= {q[ND-1:0], q[M-1:ND]};   // rotate left by ND
  end

  for (genvar n = 0; n < ND; n++) begin : g_rot
    if (n == 0) begin : g_id
      assign rot[n] = q;
    end else begin : g_sh
      assign rot[n] = {q[n-1:0], q[M-1:n]};
    end
  end
endmodule
