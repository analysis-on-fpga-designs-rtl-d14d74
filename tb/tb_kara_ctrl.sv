// Testbench of kara_ctrl (LAT = 3): random start requests; an independent
// model records the cycle of every accepted start (start while ready) and
// predicts each strobe: issue_lo 1, issue_mid 2, cap_lo 1+LAT, cap_mid
// 2+LAT, red_en 3+LAT and done 4+LAT cycles later. Also checks that ready
// is low exactly in the cycle after an accepted start, and that starts in
// the first cycle ready allows again do occur.
module tb_kara_ctrl;
  localparam int unsigned LAT = 3, NCYC = 2000;
  logic clk = 0, rst_n = 0, start = 0;
  logic ready, issue_lo, issue_mid, cap_lo, cap_mid, red_en, done;
  logic [NCYC+16:0] acc = '0;  // acc[t]: start accepted in cycle t
  int checks = 0, failures = 0, cyc = 0, fast = 0;

  kara_ctrl #(.LAT(LAT)) dut (.clk, .rst_n, .start, .ready, .issue_lo, .issue_mid,
                              .cap_lo, .cap_mid, .red_en, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic was(input int t);
    return (t >= 0) ? acc[t] : 1'b0;
  endfunction

  task automatic chk(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 8) $display("cycle %0d: %s is %b, expected %b", cyc, what, got, want);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      #1;
      start = ($urandom_range(0, 2) != 0);
      #1;
      chk(ready,     !was(cyc-1),        "ready");
      chk(issue_lo,  was(cyc-1),         "issue_lo");
      chk(issue_mid, was(cyc-2),         "issue_mid");
      chk(cap_lo,    was(cyc-1-LAT),     "cap_lo");
      chk(cap_mid,   was(cyc-2-LAT),     "cap_mid");
      chk(red_en,    was(cyc-3-LAT),     "red_en");
      chk(done,      was(cyc-4-LAT),     "done");
      acc[cyc] = start && !was(cyc-1);
      if (acc[cyc] && was(cyc-2)) fast++;
      @(posedge clk);
    end
    checks++;
    if (fast == 0) begin failures++; $display("no start at the full rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
