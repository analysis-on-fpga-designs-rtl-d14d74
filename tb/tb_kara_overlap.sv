// Testbench of kara_overlap (NP = 80): random 240-bit operands are cut into
// three 80-bit pieces, the six piece products are formed with the reference
// carry-less multiplier, and the circuit's output must equal the full
// carry-less product of the two 240-bit operands.
module tb_kara_overlap;
  import gf_ref_pkg::*;
  localparam int unsigned NP = 80;
  logic [3*NP-1:0] a, b;
  logic [2*NP-2:0] p0, p1, p2, p01, p02, p12;
  logic [6*NP-2:0] c;
  logic [479:0]    r;
  int checks = 0, failures = 0;

  kara_overlap #(.NP(NP)) dut (.p0, .p1, .p2, .p01, .p02, .p12, .c);

  function automatic logic [2*NP-2:0] pm(input logic [NP-1:0] x, input logic [NP-1:0] y);
    logic [479:0] t = clmul(240'(x), 240'(y));
    return t[2*NP-2:0];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 8; i++) begin
        a[30*i +: 30] = 30'($urandom);
        b[30*i +: 30] = 30'($urandom);
      end
      if (n == 0) begin a = '1; b = '1; end
      p0  = pm(a[0+:NP], b[0+:NP]);
      p1  = pm(a[NP+:NP], b[NP+:NP]);
      p2  = pm(a[2*NP+:NP], b[2*NP+:NP]);
      p01 = pm(a[0+:NP] ^ a[NP+:NP], b[0+:NP] ^ b[NP+:NP]);
      p02 = pm(a[0+:NP] ^ a[2*NP+:NP], b[0+:NP] ^ b[2*NP+:NP]);
      p12 = pm(a[NP+:NP] ^ a[2*NP+:NP], b[NP+:NP] ^ b[2*NP+:NP]);
      #1;
      r = clmul(a, b);
      checks++;
      if (c !== r[6*NP-2:0]) begin
        failures++;
        if (failures < 5) $display("case %0d wrong", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
