// End-to-end testbench of gf233_mul_top at its default size (m = 233), all
// three multipliers running at once. Each gets NOPS multiplications with
// random operands and random gaps, started as soon as ready allows at
// times. Results are compared with independent reference products: the
// bit-serial interleaved product modulo x^233 + x^74 + 1 for the classical
// and Karatsuba multipliers, and the cyclic-polynomial normal-basis product
// for the Massey-Omura multiplier. Latencies are checked (3, 7 and 3).
// Mechanisms counted, each of which must occur at least once:
//   cl back-to-back starts in consecutive cycles (full pipeline)
//   ka starts two cycles apart, so every 80-bit multiplier serves two
//      multiplications in consecutive cycles
//   mo a new start in step 2 of the previous multiplication
//   reduction: an unreduced product of degree >= 233 (for cl and ka)
//   ka operands whose top 80-bit piece is nonzero (padding piece in use)
module tb_gf233_mul_top;
  import gf_ref_pkg::*;
  localparam int unsigned NOPS = 150;
  localparam int LAT [3] = '{3, 7, 3};
  localparam int GAP [3] = '{1, 2, 2};
  localparam string NAME [3] = '{"classical", "karatsuba", "massey-omura"};

  logic clk = 0, rst_n = 0;
  logic         start [3];
  logic [232:0] a [3], b [3], c [3];
  logic         ready [3], done [3];

  int checks = 0, failures = 0, cycle = 0;
  int issued [3], got [3], last_t [3], fullrate [3];
  int reduced = 0, top_piece = 0;
  logic [232:0] exp_q [3][$];
  int           t_q   [3][$];

  gf233_mul_top dut (
    .clk, .rst_n,
    .cl_start(start[0]), .cl_a(a[0]), .cl_b(b[0]), .cl_ready(ready[0]), .cl_done(done[0]), .cl_c(c[0]),
    .ka_start(start[1]), .ka_a(a[1]), .ka_b(b[1]), .ka_ready(ready[1]), .ka_done(done[1]), .ka_c(c[1]),
    .mo_start(start[2]), .mo_a(a[2]), .mo_b(b[2]), .mo_ready(ready[2]), .mo_done(done[2]), .mo_c(c[2])
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int degree(input logic [232:0] x);
    for (int i = 232; i >= 0; i--) if (x[i]) return i;
    return -1;
  endfunction

  initial begin
    for (int m = 0; m < 3; m++) begin
      start[m] = 0; a[m] = '0; b[m] = '0;
      issued[m] = 0; got[m] = 0; last_t[m] = -100; fullrate[m] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (issued[0] < NOPS || issued[1] < NOPS || issued[2] < NOPS) begin
      #1;
      for (int m = 0; m < 3; m++) begin
        if (issued[m] < NOPS && ready[m] && $urandom_range(0, 2) != 0) begin
          a[m] = rand_elem();
          b[m] = rand_elem();
          if (issued[m] == 0) a[m] = (m == 2) ? '1 : 233'd1;   // unit element
          if (cycle - last_t[m] == GAP[m]) fullrate[m]++;
          last_t[m] = cycle;
          if (m < 2 && degree(a[m]) + degree(b[m]) >= 233) reduced++;
          if (m == 1 && (a[m][232:160] != 0 || b[m][232:160] != 0)) top_piece++;
          exp_q[m].push_back(m == 2 ? onb_mul(a[m], b[m]) : pb_mulmod(a[m], b[m]));
          t_q[m].push_back(cycle);
          issued[m]++;
          start[m] = 1;
        end else begin
          start[m] = 0;
        end
      end
      @(posedge clk);
    end
    #1;
    for (int m = 0; m < 3; m++) start[m] = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int m = 0; m < 3; m++) begin
        if (done[m]) begin
          checks += 2;
          if (exp_q[m].size() == 0) begin
            failures += 2;
            $display("%s: done without a pending operation", NAME[m]);
          end else begin
            if (c[m] !== exp_q[m][0]) begin
              failures++;
              if (failures < 6) $display("%s: result %0d wrong", NAME[m], got[m]);
            end
            if (cycle - t_q[m][0] != LAT[m]) begin
              failures++;
              if (failures < 6) $display("%s: latency %0d", NAME[m], cycle - t_q[m][0]);
            end
            void'(exp_q[m].pop_front());
            void'(t_q[m].pop_front());
          end
          got[m]++;
        end
      end
      if (got[0] == NOPS && got[1] == NOPS && got[2] == NOPS) begin
        for (int m = 0; m < 3; m++) begin
          $display("%s: %0d results, %0d starts at the full rate", NAME[m], got[m], fullrate[m]);
          checks++;
          if (fullrate[m] == 0) begin failures++; $display("%s: full rate never reached", NAME[m]); end
        end
        $display("products needing reduction: %0d, karatsuba operands using the top piece: %0d",
                 reduced, top_piece);
        checks += 2;
        if (reduced == 0)   begin failures++; $display("no reduction exercised"); end
        if (top_piece == 0) begin failures++; $display("top piece never used"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
