// Testbench of gf233_karatsuba_mul at full size (m = 233). Operations are
// started back to back and with random gaps; every result is compared with
// the bit-serial interleaved GF(2^233) product of the reference package, and
// the cycle count from start to done must be 7; starts come every second cycle at most (ready). Corner cases: 0, 1, x^232.
module tb_gf233_karatsuba_mul;
  import gf_ref_pkg::*;
  localparam int unsigned LATENCY = 7;
  localparam int unsigned NOPS    = 400;
  localparam int unsigned MIN_GAP = 2;   // cycles between accepted starts at full rate

  logic clk = 0, rst_n = 0, start = 0, ready, done;
  logic [232:0] a = '0, b = '0, c;
  int checks = 0, failures = 0, cycle = 0, last_t = 0, issued = 0, got = 0, b2b = 0;
  logic [232:0] exp_q [$];
  int           t_q   [$];

  gf233_karatsuba_mul dut (.clk, .rst_n, .start, .a, .b, .ready, .done, .c);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: change inputs after each rising edge
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (issued < NOPS) begin
      #1;
      if (ready && ($urandom_range(0, 3) != 0)) begin
        case (issued)
          0: begin a = '0;             b = rand_elem(); end
          1: begin a = 233'd1;         b = rand_elem(); end
          2: begin a = 233'd1 << 232;  b = 233'd1 << 232; end
          3: begin a = '1;             b = '1; end
          default: begin a = rand_elem(); b = rand_elem(); end
        endcase
        if (issued > 0 && cycle - last_t == MIN_GAP) b2b++;
        last_t = cycle;
        start = 1;
        exp_q.push_back(pb_mulmod(a, b));
        t_q.push_back(cycle);
        issued++;
      end else begin
        start = 0;
      end
      @(posedge clk);
    end
    #1 start = 0;
  end

  // checker: results come back in order
  always @(posedge clk) begin
    if (rst_n && done) begin
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("done without a pending operation");
      end else begin
        if (c !== exp_q[0]) begin
          failures++;
          if (failures < 5) $display("result %0d wrong", got);
        end
        if (cycle - t_q[0] != LATENCY) begin
          failures++;
          if (failures < 5) $display("result %0d latency %0d", got, cycle - t_q[0]);
        end
        void'(exp_q.pop_front());
        void'(t_q.pop_front());
      end
      got++;
      if (got == NOPS) begin
        checks++;
        if (b2b == 0) begin failures++; $display("no starts in the cycle ready returned"); end
        $display("starts in the cycle ready returned: %0d", b2b);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
