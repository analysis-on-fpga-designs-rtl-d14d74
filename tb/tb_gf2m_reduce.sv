// Testbench of gf2m_reduce (x^233 + x^74 + 1): random 465-bit inputs, single
// high powers x^d for every d from 233 to 464, and inputs already below
// degree 233, each compared with reduction by repeated subtraction of
// shifted copies of f(x).
module tb_gf2m_reduce;
  import gf_ref_pkg::*;
  logic [464:0] d;
  logic [232:0] r, hi;
  int checks = 0, failures = 0;

  gf2m_reduce dut (.d, .r);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    #1;
    checks++;
    if (r !== pb_reduce(d)) begin
      failures++;
      if (failures < 5) $display("mismatch: %s", what);
    end
  endtask

  initial begin
    for (int i = 233; i < 465; i++) begin
      d = '0; d[i] = 1'b1;
      check($sformatf("x^%0d", i));
    end
    for (int n = 0; n < 20; n++) begin
      d = 465'(rand_elem());
      check("low");
    end
    for (int n = 0; n < 300; n++) begin
      hi = rand_elem();
      d  = {hi[231:0], rand_elem()};
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
