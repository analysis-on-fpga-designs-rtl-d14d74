// Testbench of mo_xor_tree (M = 233): for random a and b, and for the unit
// element and single basis elements, the tree fed with both operands rotated
// left by n must give coordinate n of the normal-basis product computed by
// the reference package (cyclic-polynomial image of the type-II ONB).
module tb_mo_xor_tree;
  import gf_ref_pkg::*;
  logic [232:0] a, b, ra, rb, r;
  logic c;
  int checks = 0, failures = 0;

  mo_xor_tree dut (.a(ra), .b(rb), .c);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 40; k++) begin
      case (k)
        0: begin a = '1; b = rand_elem(); end        // 1 * b = b
        1: begin a = 233'd1; b = 233'd1; end          // beta_0^2 = beta_1
        2: begin a = 233'd1 << 232; b = 233'd1 << 17; end
        default: begin a = rand_elem(); b = rand_elem(); end
      endcase
      r = onb_mul(a, b);
      for (int n = 0; n < 233; n++) begin
        ra = (n == 0) ? a : ((a >> n) | (a << (233 - n)));
        rb = (n == 0) ? b : ((b >> n) | (b << (233 - n)));
        #1;
        checks++;
        if (c !== r[n]) begin
          failures++;
          if (failures < 5) $display("case %0d coordinate %0d wrong", k, n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
