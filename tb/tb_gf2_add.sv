// Testbench of gf2_add: random 80-bit operands, the sum is checked bit by
// bit against the GF(2) addition table (a bit of the sum is 1 when exactly
// one of the two operand bits is 1).
module tb_gf2_add;
  localparam int unsigned W = 80;
  logic [W-1:0] x, y, s;
  int checks = 0, failures = 0;

  gf2_add #(.W(W)) dut (.x, .y, .s);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      x = {$urandom, $urandom, $urandom};
      y = (n == 0) ? '0 : {$urandom, $urandom, $urandom};
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (s[i] !== ((x[i] != y[i]) ? 1'b1 : 1'b0)) begin
          failures++;
          if (failures < 5) $display("bit %0d wrong: x=%b y=%b s=%b", i, x[i], y[i], s[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
