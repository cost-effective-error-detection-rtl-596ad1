// tb_mod_zero_cmp: exhaustive check of the 2N-bit zero comparator for N = 2,
// 3 and 4: zero must be high exactly when (u + v) mod (2^N - 1) == 0,
// covering the non-normalized cases u + v = 2^N - 1 and 2(2^N - 1).
module tb_mod_zero_cmp;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [1:0] u2, v2;
  logic [2:0] u3, v3;
  logic [3:0] u4, v4;
  logic       z2, z3, z4;

  mod_zero_cmp #(.N(2)) dut2 (.u(u2), .v(v2), .zero(z2));
  mod_zero_cmp          dut3 (.u(u3), .v(v3), .zero(z3));
  mod_zero_cmp #(.N(4)) dut4 (.u(u4), .v(v4), .zero(z4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, int x, int y, logic got);
    int m = (1 << n) - 1;
    checks++;
    if (got != ((x + y) % m == 0)) begin
      failures++;
      $display("FAIL N=%0d u=%0d v=%0d zero=%0d", n, x, y, got);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        u2 = 2'(x); v2 = 2'(y); u3 = 3'(x); v3 = 3'(y); u4 = 4'(x); v4 = 4'(y);
        @(posedge clk);
        if (x < 4 && y < 4) check(2, x, y, z2);
        if (x < 8 && y < 8) check(3, x, y, z3);
        check(4, x, y, z4);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
