// Testbench of gf2_poly_mul at its full 233x233 size and at 40x20: random
// operands plus 1, x^k and all-ones corner cases, each product compared with
// the shift-and-add carry-less product of the reference package.
module tb_gf2_poly_mul;
  import gf_ref_pkg::*;
  logic [232:0] a, b;
  logic [464:0] c;
  logic [39:0]  sa;
  logic [19:0]  sb;
  logic [58:0]  sc;
  logic [479:0] ref_c;
  int checks = 0, failures = 0;

  gf2_poly_mul dut (.a, .b, .c);
  gf2_poly_mul #(.NA(40), .NB(20)) dut_s (.a(sa), .b(sb), .c(sc));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      case (n)
        0: begin a = 233'd1;             b = rand_elem(); end
        1: begin a = 233'd1 << 232;      b = 233'd1 << 232; end
        2: begin a = '1;                 b = '1; end
        default: begin a = rand_elem(); b = rand_elem(); end
      endcase
      sa = a[39:0];
      sb = b[19:0];
      #1;
      ref_c = clmul(240'(a), 240'(b));
      checks++;
      if (c !== ref_c[464:0]) begin
        failures++;
        if (failures < 5) $display("233x233 mismatch at n=%0d", n);
      end
      ref_c = clmul(240'(sa), 240'(sb));
      checks++;
      if (sc !== ref_c[58:0]) begin
        failures++;
        if (failures < 5) $display("40x20 mismatch at n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
