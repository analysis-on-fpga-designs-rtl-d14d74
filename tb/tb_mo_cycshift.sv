// Testbench of mo_cycshift (M = 233, ND = 117): after load, output n must be
// the loaded word rotated left by n (bit i = d[(i+n) mod M]); after step, by
// n+ND. Also checks that the register holds when neither load nor step.
module tb_mo_cycshift;
  import gf_ref_pkg::*;
  localparam int unsigned MM = 233, ND = 117;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [MM-1:0] d, w;
  logic [ND-1:0][MM-1:0] rot;
  int checks = 0, failures = 0;

  mo_cycshift #(.M(MM), .ND(ND)) dut (.clk, .rst_n, .load, .step, .d, .rot);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rot(input int base, input string what);
    logic ok;
    for (int n = 0; n < ND; n++) begin
      ok = 1;
      for (int i = 0; i < MM; i++)
        if (rot[n][i] !== w[(i + n + base) % MM]) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 5) $display("%s: output %0d wrong", what, n);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      w = rand_elem();
      @(negedge clk); d = w; load = 1; step = 0;
      @(negedge clk); load = 0; d = rand_elem();
      check_rot(0, "after load");
      @(negedge clk);
      check_rot(0, "hold");
      step = 1;
      @(negedge clk); step = 0;
      check_rot(ND, "after step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
