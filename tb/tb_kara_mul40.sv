// Testbench of kara_mul40 (N = 40): a new random operand pair every cycle;
// each output is compared, two cycles later, with the shift-and-add
// carry-less product. Checks both the product and the 2-cycle latency.
module tb_kara_mul40;
  import gf_ref_pkg::*;
  localparam int unsigned N = 40, LAT = 2, NOPS = 500;
  logic clk = 0;
  logic [N-1:0]   a, b;
  logic [2*N-2:0] p;
  logic [479:0]   r;
  logic [2*N-2:0] exp_q [$];
  int checks = 0, failures = 0;

  kara_mul40 #(.N(N)) dut (.clk, .a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NOPS + LAT; n++) begin
      a = {$urandom, $urandom};
      b = (n == 1) ? 40'd1 : {$urandom, $urandom};
      if (n == 2) a = '1;
      if (n == 2) b = '1;
      r = clmul(240'(a), 240'(b));
      exp_q.push_back(r[2*N-2:0]);
      @(posedge clk);
      #1;
      if (n >= LAT - 1) begin
        // p now holds the product of the pair applied LAT-1 cycles before
        checks++;
        if (p !== exp_q[0]) begin
          failures++;
          if (failures < 5) $display("product %0d wrong", n - LAT + 1);
        end
        void'(exp_q.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
